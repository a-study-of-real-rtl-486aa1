// mpy16 -- 16 x 16 bit two's complement parallel multiplier (MPY-16AJ type).
//
// The chip has X and Y input registers and MSP and LSP output registers.
// Operands are clocked into the input registers (CLKX, CLKY); once the
// multiply time has passed, the product is clocked into the output
// registers (CLKM, CLKL).  Operands are fractional two's complement, sign
// bit plus 15 fraction bits, and the 31-bit product (sign plus 30 fraction
// bits) is split into
//   MSP = sign, PR1..PR15      LSP = sign, PR16..PR30
// so the sign appears in the MSB of both halves.  RND adds 2^-16 to the
// product, rounding the MSP.  (-1) x (-1) overflows to -1.
// On the chip the LSP output shares pins with the Y input, TRIL selecting
// the direction; here Y and the LSP are separate ports and lsp_oe
// (= not TRIL) tells when the LSP would drive the pins.  TRIM likewise
// gives msp_oe.
// Timing: clock enables stand for the chip's register clocks, all sampled
// on the one rising clock edge.  A product clocked into the input
// registers in one cycle can be clocked out at the next edge or later;
// the chip's 200 ns multiply time fits in the card's two 100 ns microwords.
// Function, formats, rounding and overflow follow the data sheet; using
// clock enables on a single clock is this design's choice.
module mpy16 (
  input  logic        clk,
  input  logic        clkxy_en,  // CLKX / CLKY: load input registers
  input  logic        clkml_en,  // CLKM / CLKL: load output registers
  input  logic [15:0] x,
  input  logic [15:0] y,
  input  logic        rnd,       // sampled with the operands
  input  logic        tril,      // 1: LSP pins are Y inputs
  input  logic        trim,      // 1: MSP outputs disabled
  output logic [15:0] msp,
  output logic [15:0] lsp,
  output logic        msp_oe,
  output logic        lsp_oe
);

  logic signed [15:0] x_q, y_q;
  logic               rnd_q;
  logic signed [31:0] prod;

  always_ff @(posedge clk) begin
    if (clkxy_en) begin
      x_q   <= x;
      y_q   <= y;
      rnd_q <= rnd;
    end
  end

  always_comb begin
    prod = x_q * y_q;
    if (rnd_q) prod = prod + 32'sd16384;  // 2^-16 of the fractional product
  end

  always_ff @(posedge clk) begin
    if (clkml_en) begin
      msp <= prod[30:15];
      lsp <= {prod[30], prod[14:0]};
    end
  end

  assign msp_oe = !trim;
  assign lsp_oe = !tril;

endmodule
