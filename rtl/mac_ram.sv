// mac_ram -- input or output memory of the MAC card.
//
// The card's X and Y input memories are 256 x 16 and its Z output memory is
// 256 x 32, all built from 256 x 4 TTL static RAMs (93L422) whose outputs
// are always enabled.  This model keeps that behaviour: the read data
// follows the address combinationally, and a write takes place at the
// rising clock edge when we is high.  Contents are not initialised, like
// the real RAMs.  Sizes are parameters with the card's numbers as
// defaults; the synchronous write stands in for the RAM's write pulse.
module mac_ram #(
  parameter int unsigned AW = 8,
  parameter int unsigned DW = 16
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] wdata,
  output logic [DW-1:0] rdata
);

  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
  end

  assign rdata = mem[addr];

endmodule
