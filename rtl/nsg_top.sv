// nsg_top -- top level of the cockpit raster graphics hardware.
//
// Two subsystems of the display system stand side by side, each with its
// own ports and sharing only the clock and reset:
//   * mac_system: four Multiplier Accumulator Cards on a shared address,
//     data and function bus.  The host uses them to transform the end
//     points of the scene's lines (4 x 4 matrix times vector) and for
//     other multiply-accumulate jobs.
//   * aa_line_system: the anti-aliasing vector generator drawing into a
//     512 x 512 frame buffer.
// In the document the host computer moves the transformed, projected end
// points from the cards to the line drawing routine; that host is outside
// this design, so both subsystems' ports are brought out here.
module nsg_top #(
  parameter int unsigned N_CARDS = 4,
  parameter int unsigned CW      = 9,
  parameter int unsigned PW      = 4
) (
  input  logic               clk,
  input  logic               rst,
  // MAC system buses
  input  logic [23:0]        mac_ab,
  input  logic [3:0]         mac_f,
  input  logic [31:0]        mac_db_in,
  output logic [31:0]        mac_db_out,
  output logic               mac_db_oe,
  output logic [N_CARDS-1:0] mac_busy,
  // line drawing
  input  logic               ln_start,
  input  logic [CW-1:0]      ln_x0, ln_y0, ln_x1, ln_y1,
  input  logic [PW-1:0]      ln_full, ln_imed, ln_imin,
  output logic               ln_busy,
  output logic               ln_done,
  output logic [1:0]         ln_type,
  input  logic               fb_we,
  input  logic [CW-1:0]      fb_wx, fb_wy,
  input  logic [PW-1:0]      fb_wcode,
  input  logic [CW-1:0]      fb_rx, fb_ry,
  output logic [PW-1:0]      fb_rdata
);

  mac_system #(.N_CARDS(N_CARDS)) u_mac (
    .clk(clk), .rst(rst), .ab(mac_ab), .f(mac_f), .db_in(mac_db_in),
    .db_out(mac_db_out), .db_oe(mac_db_oe), .busy(mac_busy)
  );

  aa_line_system #(.CW(CW), .PW(PW)) u_line (
    .clk(clk), .rst(rst), .start(ln_start),
    .x0(ln_x0), .y0(ln_y0), .x1(ln_x1), .y1(ln_y1),
    .full_code(ln_full), .imed_code(ln_imed), .imin_code(ln_imin),
    .busy(ln_busy), .done(ln_done), .line_type(ln_type),
    .h_we(fb_we), .h_wx(fb_wx), .h_wy(fb_wy), .h_wcode(fb_wcode),
    .rd_x(fb_rx), .rd_y(fb_ry), .rd_data(fb_rdata)
  );

endmodule
