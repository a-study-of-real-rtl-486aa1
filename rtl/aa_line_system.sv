// aa_line_system -- anti-aliased vector drawing into the frame buffer.
//
// The line generator's pixel stream goes straight into the frame buffer's
// write port: full pixels overwrite, lap pixels are ORed in.  A host
// write port (used to clear or paint the picture) shares that port while
// the generator is idle; a read port returns any pixel one clock after its
// address.  Starting a line while busy is ignored.  This wiring is this
// design's; the document gives the algorithm and the OR rule.
module aa_line_system #(
  parameter int unsigned CW = 9,
  parameter int unsigned PW = 4
) (
  input  logic          clk,
  input  logic          rst,
  // line command
  input  logic          start,
  input  logic [CW-1:0] x0, y0, x1, y1,
  input  logic [PW-1:0] full_code,
  input  logic [PW-1:0] imed_code,
  input  logic [PW-1:0] imin_code,
  output logic          busy,
  output logic          done,
  output logic [1:0]    line_type,
  // host pixel write (only while idle) and read
  input  logic          h_we,
  input  logic [CW-1:0] h_wx, h_wy,
  input  logic [PW-1:0] h_wcode,
  input  logic [CW-1:0] rd_x, rd_y,
  output logic [PW-1:0] rd_data
);

  logic          pv, por;
  logic [CW-1:0] px, py;
  logic [PW-1:0] pc;
  logic          we, w_or;
  logic [CW-1:0] wx, wy;
  logic [PW-1:0] wcode;

  aa_line_gen #(.CW(CW), .PW(PW)) u_gen (
    .clk(clk), .rst(rst), .start(start && !busy),
    .x0(x0), .y0(y0), .x1(x1), .y1(y1),
    .full_code(full_code), .imed_code(imed_code), .imin_code(imin_code),
    .busy(busy), .done(done), .line_type(line_type),
    .pix_valid(pv), .pix_x(px), .pix_y(py), .pix_code(pc), .pix_or(por)
  );

  always_comb begin
    if (pv) begin
      we = 1'b1; w_or = por; wx = px; wy = py; wcode = pc;
    end else begin
      we = h_we && !busy; w_or = 1'b0; wx = h_wx; wy = h_wy; wcode = h_wcode;
    end
  end

  frame_buffer #(.CW(CW), .PW(PW)) u_fb (
    .clk(clk), .we(we), .w_or(w_or), .wx(wx), .wy(wy), .wcode(wcode),
    .rx(rd_x), .ry(rd_y), .rdata(rd_data)
  );

endmodule
