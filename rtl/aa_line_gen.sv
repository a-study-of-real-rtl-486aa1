// aa_line_gen -- anti-aliasing Bresenham vector generator.
//
// Draws a line on a 512 x 512 raster as a stream of pixel writes.  It is
// Bresenham's algorithm with one addition: where a run of axial (M1) moves
// meets the next run, the two runs overlap over a "transition region" (a
// lap).  Inside the lap each M1 step writes two pixels: one beside the line
// in the M2 (diagonal) direction and the usual pixel, with intensities that
// shift from the old run to the new one.  Intensities are pixel codes whose
// two low bits are 11 (full), 10 (intermediate, about 66%) and 01
// (minimum, about 33%); lap pixels are ORed into memory, full pixels
// overwrite it.
//
// Set-up (one clock, state SETUP):
//   octant -> moves M1 (axial) and M2 (diagonal), Da >= Db >= 0
//   delta = 2Db - Da
//   diagonal lines (delta >= 0): ANTI1 = -2Db, minimum code := intermediate
//   axial lines: ANTI1 = -LAP2*Db if Da >= RATIO*Db (long lap),
//                else -LAP1*Db, raised to -2Db if delta >= it;
//                delta += ANTI1 (centres the laps)
//   ANTI2 = 2*ANTI1.
// Generation: the first pixel is full if delta < ANTI2, else intermediate.
// Then Da steps: an M2 step (delta >= 0) writes a full pixel; an M1 step
// writes a full pixel if delta < ANTI2, otherwise it is a lap step of two
// clocks: first the pixel at old position + M2, then the pixel at the new
// position, coded (minimum, intermediate) in the first half of the lap
// (delta < ANTI1) and (intermediate, minimum) in the second half.
// LAP1, LAP2 and RATIO are powers of two (4, 16, 32), applied as shifts.
//
// Interface: start is taken in IDLE with the end points and the three
// codes; busy is high until the last pixel; done pulses one clock after
// it.  One pixel per clock on pix_* (registered); pix_or tells the memory
// to OR the code in.  A lap pixel that falls outside the raster is
// dropped.  line_type reports 1 = long-lap axial, 2 = standard axial,
// 3 = diagonal.  Timing: 2 set-up clocks, then one clock per pixel.
// The algorithm, constants and codes follow the document; the state
// machine, the pixel stream interface and the clipping are this design's.
// Where the document's two descriptions of the first half of a lap differ,
// this follows the prose: minimum intensity beside the line, intermediate
// on it.
module aa_line_gen #(
  parameter int unsigned CW        = 9,   // coordinate width, 512 x 512
  parameter int unsigned PW        = 4,   // pixel code width
  parameter int unsigned LAP1_SH   = 2,   // lap constant one = 4
  parameter int unsigned LAP2_SH   = 4,   // lap constant two = 16
  parameter int unsigned RATIO_SH  = 5    // aspect ratio = 32
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          start,
  input  logic [CW-1:0] x0, y0, x1, y1,
  input  logic [PW-1:0] full_code,      // INTENS(1)
  input  logic [PW-1:0] imed_code,      // INTENS(2), 66%
  input  logic [PW-1:0] imin_code,      // INTENS(3), 33%
  output logic          busy,
  output logic          done,
  output logic [1:0]    line_type,
  output logic          pix_valid,
  output logic [CW-1:0] pix_x,
  output logic [CW-1:0] pix_y,
  output logic [PW-1:0] pix_code,
  output logic          pix_or
);

  localparam int unsigned DW = CW + RATIO_SH + 4;  // decision variable width
  localparam int unsigned PSW = CW + 2;            // signed position width

  typedef enum logic [2:0] {S_IDLE, S_SETUP, S_FIRST, S_LOOP, S_LAP2} state_e;
  typedef logic signed [DW-1:0]  dv_t;
  typedef logic signed [PSW-1:0] pos_t;

  state_e        state;
  logic [CW-1:0] ax0, ay0, ax1, ay1;
  logic [PW-1:0] c_full, c_imed, c_imin_p, c_imin;
  dv_t           delta, anti1, anti2, del2b, del2ab;
  logic [CW:0]   cnt;
  pos_t          cx, cy;
  logic signed [1:0] m1x, m1y, m2x, m2y;

  // ---------------- set-up arithmetic, from the latched end points --------
  dv_t  s_delx, s_dely, s_adx, s_ady, s_dela, s_delb, s_delta0, s_delta;
  dv_t  s_anti1, s_lap1, s_lap2;
  logic signed [1:0] s_m1x, s_m1y, s_m2x, s_m2y;
  logic [1:0] s_type;
  logic       s_diag;

  always_comb begin
    s_delx = dv_t'(ax1) - dv_t'(ax0);
    s_dely = dv_t'(ay1) - dv_t'(ay0);
    s_adx  = (s_delx < 0) ? -s_delx : s_delx;
    s_ady  = (s_dely < 0) ? -s_dely : s_dely;
    s_m2x  = (s_delx < 0) ? -2'sd1 : 2'sd1;
    s_m2y  = (s_dely < 0) ? -2'sd1 : 2'sd1;
    if (s_adx >= s_ady) begin
      s_dela = s_adx;
      s_delb = s_ady;
      s_m1x  = s_m2x;
      s_m1y  = 2'sd0;
    end else begin
      s_dela = s_ady;
      s_delb = s_adx;
      s_m1x  = 2'sd0;
      s_m1y  = s_m2y;
    end
    s_delta0 = (s_delb <<< 1) - s_dela;
    s_lap1   = -(s_delb <<< LAP1_SH);
    s_lap2   = -(s_delb <<< LAP2_SH);
    s_diag   = (s_delta0 >= 0);
    s_delta  = s_delta0;
    if (s_diag) begin
      s_anti1 = -(s_delb <<< 1);
      s_type  = 2'd3;
    end else begin
      if ((s_delb <<< RATIO_SH) <= s_dela) begin
        s_anti1 = s_lap2;
        s_type  = 2'd1;
      end else begin
        s_anti1 = (s_delta0 >= s_lap1) ? -(s_delb <<< 1) : s_lap1;
        s_type  = 2'd2;
      end
      s_delta = s_delta0 + s_anti1;
    end
  end

  // ---------------- pixel positions --------------------------------------
  pos_t n1x, n1y, n2x, n2y;   // position + M1, position + M2
  logic n2_in;
  always_comb begin
    n1x = cx + pos_t'(m1x);
    n1y = cy + pos_t'(m1y);
    n2x = cx + pos_t'(m2x);
    n2y = cy + pos_t'(m2y);
    n2_in = (n2x >= 0) && (n2x < pos_t'(2**CW)) && (n2y >= 0) && (n2y < pos_t'(2**CW));
  end

  logic first_half;
  assign first_half = (delta < anti1);

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= S_IDLE;
      done      <= 1'b0;
      pix_valid <= 1'b0;
      pix_x     <= '0;
      pix_y     <= '0;
      pix_code  <= '0;
      pix_or    <= 1'b0;
      line_type <= '0;
      cnt       <= '0;
    end else begin
      done      <= 1'b0;
      pix_valid <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          ax0 <= x0; ay0 <= y0; ax1 <= x1; ay1 <= y1;
          c_full <= full_code; c_imed <= imed_code; c_imin_p <= imin_code;
          state <= S_SETUP;
        end
        S_SETUP: begin
          del2b  <= s_delb <<< 1;
          del2ab <= (s_delb - s_dela) <<< 1;
          delta  <= s_delta;
          anti1  <= s_anti1;
          anti2  <= s_anti1 <<< 1;
          c_imin <= s_diag ? c_imed : c_imin_p;
          cnt    <= s_dela[CW:0];
          m1x <= s_m1x; m1y <= s_m1y; m2x <= s_m2x; m2y <= s_m2y;
          cx <= pos_t'(ax0);
          cy <= pos_t'(ay0);
          line_type <= s_type;
          state <= S_FIRST;
        end
        S_FIRST: begin
          pix_valid <= 1'b1;
          pix_x     <= cx[CW-1:0];
          pix_y     <= cy[CW-1:0];
          pix_code  <= (delta < anti2) ? c_full : c_imed;
          pix_or    <= !(delta < anti2);
          state     <= S_LOOP;
        end
        S_LOOP: begin
          if (cnt == 0) begin
            done  <= 1'b1;
            state <= S_IDLE;
          end else if (delta < 0 && delta < anti2) begin
            // plain M1 step
            pix_valid <= 1'b1;
            pix_x <= n1x[CW-1:0];
            pix_y <= n1y[CW-1:0];
            pix_code <= c_full;
            pix_or <= 1'b0;
            cx <= n1x; cy <= n1y;
            delta <= delta + del2b;
            cnt <= cnt - 1'b1;
          end else if (delta < 0) begin
            // lap step, first pixel beside the line
            pix_valid <= n2_in;
            pix_x <= n2x[CW-1:0];
            pix_y <= n2y[CW-1:0];
            pix_code <= first_half ? c_imin : c_imed;
            pix_or <= 1'b1;
            state <= S_LAP2;
          end else begin
            // M2 step
            pix_valid <= 1'b1;
            pix_x <= n2x[CW-1:0];
            pix_y <= n2y[CW-1:0];
            pix_code <= c_full;
            pix_or <= 1'b0;
            cx <= n2x; cy <= n2y;
            delta <= delta + del2ab;
            cnt <= cnt - 1'b1;
          end
        end
        S_LAP2: begin
          pix_valid <= 1'b1;
          pix_x <= n1x[CW-1:0];
          pix_y <= n1y[CW-1:0];
          pix_code <= first_half ? c_imed : c_imin;
          pix_or <= 1'b1;
          cx <= n1x; cy <= n1y;
          delta <= delta + del2b;
          cnt <= cnt - 1'b1;
          state <= S_LOOP;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

endmodule
