// addr_counter -- address generator of one MAC memory (X, Y or Z).
//
// The 8-bit memory address is two 4-bit fields, row (HI) and column (LO);
// element (7,3) lives at address 0111_0011.  This block holds the starting
// address latch (part of B1-B4), the two synchronous 4-bit counters (B7/B8
// for X, C7/C8 for Y, D7/D8 for Z) and the selector (B5/B6) that gives the
// memory either the counters or the host address bus.
//   * start_ld (MPLOD) latches the starting address from the data bus.
//   * hlod_l / llod_l (active low) reload a counter from the latch; the
//     load wins over the increment, as in a 74163-type counter.
//   * hinc / linc add one to a counter, wrapping at 16.
//   * bus_sel (WRIM or RDIM) selects the host address instead of the
//     counters; it is combinational.
// The counters and latch change on the rising clock edge.  The field split,
// the counters and the selector follow the card's description; the 74163
// load priority and the clear on reset are this design's choices.
module addr_counter (
  input  logic       clk,
  input  logic       rst,       // synchronous, clears latch and counters
  input  logic       start_ld,  // MPLOD: latch start address
  input  logic [7:0] start_addr,
  input  logic       hlod_l,
  input  logic       hinc,
  input  logic       llod_l,
  input  logic       linc,
  input  logic       bus_sel,   // use the host address
  input  logic [7:0] bus_addr,
  output logic [7:0] cnt,       // counter value, row in [7:4]
  output logic [7:0] addr       // address to the memory
);

  logic [7:0] start_q;
  logic [3:0] hi_q, lo_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      start_q <= '0;
      hi_q    <= '0;
      lo_q    <= '0;
    end else begin
      if (start_ld) start_q <= start_addr;
      if (!hlod_l)   hi_q <= start_q[7:4];
      else if (hinc) hi_q <= hi_q + 4'd1;
      if (!llod_l)   lo_q <= start_q[3:0];
      else if (linc) lo_q <= lo_q + 4'd1;
    end
  end

  assign cnt  = {hi_q, lo_q};
  assign addr = bus_sel ? bus_addr : cnt;

endmodule
