// frame_buffer -- 512 x 512 pixel memory of the raster display.
//
// Each pixel is a PW-bit code: the two low bits are the intensity (11 full,
// 10 intermediate, 01 minimum, 00 black) and the high bits the colour.
// The write port takes one pixel per clock.  With w_or low the code
// replaces the stored pixel; with w_or high it is ORed into it, which is
// how the line generator lays overlapping lap pixels on top of each other
// (a read-modify-write within the clock, the read being asynchronous).
// The read port, for the display or the host, returns the pixel one clock
// after its address (registered).  Contents start undefined; the host
// clears the picture by writing black.  Size and the OR rule follow the
// document; the pixel width and the port timing are this design's.
module frame_buffer #(
  parameter int unsigned CW = 9,   // 512 x 512
  parameter int unsigned PW = 4
) (
  input  logic          clk,
  input  logic          we,
  input  logic          w_or,
  input  logic [CW-1:0] wx,
  input  logic [CW-1:0] wy,
  input  logic [PW-1:0] wcode,
  input  logic [CW-1:0] rx,
  input  logic [CW-1:0] ry,
  output logic [PW-1:0] rdata
);

  logic [PW-1:0] mem [2**(2*CW)];
  logic [2*CW-1:0] waddr;

  assign waddr = {wy, wx};

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= w_or ? (mem[waddr] | wcode) : wcode;
    rdata <= mem[{ry, rx}];
  end

endmodule
