// mac_card -- one Multiplier Accumulator Card (MAC).
//
// The card is a microprogrammed multiply-accumulate engine for coordinate
// transformations.  The host loads operands into two 256 x 16 input
// memories (X and Y), starts one of four subroutines, and reads 32-bit
// results from a 256 x 32 output memory (Z).  Datapath:
//   X RAM, Y RAM -> 16 x 16 multiplier -> 32-bit ALU (A = product,
//   B = Z latch) -> Z RAM, with the Z RAM output fed back through the Z
//   latch, so each Z element is accumulated in place.
// Each memory is addressed by a row/column counter pair that starts at an
// address latched from the data bus and is stepped by the microprogram.
// Subroutines (F2..F0 at start; element offsets are from the start
// addresses):
//   0 dot product     Z(r,0) = sum_j X(r,j) Y(j,0),        r < 8, j < 4
//   1 perspective     Z(i,c) = X(i,c) Y(i,0),              i < 16, c < 2
//   2 weighted sum    Z(s,0) = sum_ij X(i,j) Y(4s+i,j),    s < 2, i,j < 4
//   3 vector transf.  Z(0,c) = sum_j X(0,j) Y(j,c),        c < 4, j < 4
// Routines 0-2 take 67 clocks from the start command to idle (6.7 us at the
// card's 100 ns microcycle), routine 3 takes 35 (3.5 us).
//
// Host interface (one operation per clock while the card is selected and
// idle, see bus_control): write X/Y at AB7..0 from DB15..0; start, with the
// X, Y and Z starting addresses on DB7..0, DB15..8 and DB23..16; read Z at
// AB7..0, the word appears on db_out with db_oe set in the same cycle.
// busy is RUN-H of the current microword.  The tri-state data bus is split
// into db_in, db_out and db_oe.
//
// The block structure, bus coding, memory sizes, counter scheme, ALU and
// cycle budget follow the card's description.  This design's own choices:
// the microprogram (mac_pkg), the assignment of data-bus bytes to the three
// starting addresses, function codes 0-3, reading Y rows 4..7 for the
// second weighted sum, and folding the product latches (G8-G12) into the
// multiplier's output registers: with separate Y and LSP ports there is no
// shared pin left for those latches to bridge.
module mac_card
  import mac_pkg::*;
#(
  parameter logic [1:0] CARD_ID = 2'd0
) (
  input  logic        clk,
  input  logic        rst,      // synchronous, active high
  input  logic [23:0] ab,       // address bus
  input  logic [3:0]  f,        // system function bus F3..F0
  input  logic [31:0] db_in,    // data bus into the card
  output logic [31:0] db_out,   // Z word driven onto the data bus
  output logic        db_oe,    // card drives the data bus (RDIM-H)
  output logic        busy      // card busy
);

  logic                card_sel_l;
  logic [7:0]          dec_l;
  logic                wrim, xwren, ywren, mplod, rdim;
  logic [UADDR_W-1:0]  upc;
  uword_t              uw;
  logic [7:0]          x_cnt, y_cnt, z_cnt;
  logic [MEM_AW-1:0]   x_addr, y_addr, z_addr;
  logic [XY_W-1:0]     x_data, y_data;
  logic [Z_W-1:0]      z_data, z_latch, alu_f, product;
  logic [15:0]         msp, lsp;
  logic                msp_oe, lsp_oe, alu_cout_l;

  card_decoder #(.CARD_ID(CARD_ID)) u_dec (
    .ab(ab), .dec_l(dec_l), .card_sel_l(card_sel_l)
  );

  bus_control u_bus (
    .card_sel_l(card_sel_l), .f(f), .ab16(ab[16]), .ab8(ab[8]), .busy(busy),
    .wrim(wrim), .xwren(xwren), .ywren(ywren), .mplod(mplod), .rdim(rdim)
  );

  micro_sequencer u_seq (
    .clk(clk), .rst(rst), .start(mplod), .func(f[2:0]), .run_h(uw.run_h),
    .upc(upc)
  );

  ucode_rom u_rom (.addr(upc), .word(uw));

  assign busy = uw.run_h;

  addr_counter u_xcnt (
    .clk(clk), .rst(rst), .start_ld(mplod), .start_addr(db_in[7:0]),
    .hlod_l(uw.xhlod_l), .hinc(uw.xhinc_h),
    .llod_l(uw.xllod_l), .linc(uw.xlinc_h),
    .bus_sel(wrim), .bus_addr(ab[7:0]), .cnt(x_cnt), .addr(x_addr)
  );

  addr_counter u_ycnt (
    .clk(clk), .rst(rst), .start_ld(mplod), .start_addr(db_in[15:8]),
    .hlod_l(uw.yhlod_l), .hinc(uw.yhinc_h),
    .llod_l(uw.yllod_l), .linc(uw.ylinc_h),
    .bus_sel(wrim), .bus_addr(ab[7:0]), .cnt(y_cnt), .addr(y_addr)
  );

  addr_counter u_zcnt (
    .clk(clk), .rst(rst), .start_ld(mplod), .start_addr(db_in[23:16]),
    .hlod_l(uw.zhlod_l), .hinc(uw.zhinc_h),
    .llod_l(uw.zllod_l), .linc(uw.zlinc_h),
    .bus_sel(rdim), .bus_addr(ab[7:0]), .cnt(z_cnt), .addr(z_addr)
  );

  mac_ram #(.AW(MEM_AW), .DW(XY_W)) u_xram (
    .clk(clk), .we(xwren), .addr(x_addr), .wdata(db_in[XY_W-1:0]),
    .rdata(x_data)
  );

  mac_ram #(.AW(MEM_AW), .DW(XY_W)) u_yram (
    .clk(clk), .we(ywren), .addr(y_addr), .wdata(db_in[XY_W-1:0]),
    .rdata(y_data)
  );

  mpy16 u_mpy (
    .clk(clk), .clkxy_en(uw.mulcken_h), .clkml_en(uw.mulaen_h),
    .x(x_data), .y(y_data), .rnd(1'b0), .tril(uw.trilen_h), .trim(1'b0),
    .msp(msp), .lsp(lsp), .msp_oe(msp_oe), .lsp_oe(lsp_oe)
  );

  // 32-bit product: the sign is repeated in both halves of the chip output
  assign product = {msp[15], msp, lsp[14:0]};

  // Z latch (E5-E8): Z RAM output back to the ALU
  always_ff @(posedge clk) begin
    if (rst)             z_latch <= '0;
    else if (uw.zlaen_h) z_latch <= z_data;
  end

  alu181 #(.W(Z_W)) u_alu (
    .a(product), .b(z_latch), .s(uw.aluf), .m(uw.alum0), .cin_l(uw.aluc0_l),
    .f(alu_f), .cout_l(alu_cout_l)
  );

  mac_ram #(.AW(MEM_AW), .DW(Z_W)) u_zram (
    .clk(clk), .we(uw.zwrite_h), .addr(z_addr), .wdata(alu_f), .rdata(z_data)
  );

  assign db_out = z_data;
  assign db_oe  = rdim;

  // The host may not address Z while the microprogram writes it.
  a_no_bus_during_run : assert property (
    @(posedge clk) disable iff (rst) uw.run_h |-> !(rdim || wrim || mplod));

endmodule
