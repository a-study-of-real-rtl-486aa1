// micro_sequencer -- microprogram counter of the MAC card.
//
// The function code F2..F0 addresses a small PROM (C12) whose output is the
// entry address of the requested subroutine.  Two cascaded synchronous
// 4-bit counters (C14, C15) form an 8-bit microprogram counter that loads
// this address when a function is started and then increments on every
// clock while the current microword's RUN-H bit is set.  A routine ends on
// a word with RUN-H low: the counter stops there and the card is idle
// ("the MAC halts after each operation and is ready for a new command").
// Interface: start (MPLOD) and func are sampled on the rising clock edge;
// upc is the registered counter value and addresses ucode_rom
// combinationally.  Reset clears the counter to 0, a halt word.  The entry
// address table is computed by mac_pkg::entry_of; its contents are this
// design's own.
module micro_sequencer
  import mac_pkg::*;
(
  input  logic               clk,
  input  logic               rst,     // synchronous
  input  logic               start,   // load entry address of func
  input  logic [2:0]         func,    // F2..F0
  input  logic               run_h,   // RUN-H of the current microword
  output logic [UADDR_W-1:0] upc      // microprogram address
);

  logic [UADDR_W-1:0] entry;
  assign entry = entry_of(func);

  always_ff @(posedge clk) begin
    if (rst)        upc <= '0;
    else if (start) upc <= entry;
    else if (run_h) upc <= upc + 1'b1;
  end

endmodule
