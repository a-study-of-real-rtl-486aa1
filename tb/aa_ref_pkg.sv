// aa_ref_pkg -- software reference of the anti-aliasing line algorithm, for
// the testbenches.  It runs the algorithm as a plain sequential program
// (octant set-up, lap set-up, then the M1/M2 loop) and returns the list of
// pixel writes in the order the hardware must produce them, with lap
// pixels outside the 512 x 512 raster left out.  The lap constants are 4
// and 16 and the aspect ratio 32.
package aa_ref_pkg;

  typedef struct {
    int x;
    int y;
    int code;
    bit ored;
  } pix_t;

  typedef struct {
    int n_lap_steps;   // two-pixel M1 steps
    int n_m2_steps;
    int n_m1_plain;
    int line_type;
    int n_clipped;
  } stats_t;

  function automatic void draw(input int sx, input int sy, input int ex, input int ey,
                               input int full, input int imed, input int imin_in,
                               input int size,
                               output pix_t px[$], output stats_t st);
    int dx, dy, dxy, m1x, m1y, m2x, m2y, a, b, d2b, d2ab, delta, an1, an2;
    int imin, x, y, nx, ny, qx, qy;
    px = {};
    st = '{default: 0};
    dx = ex - sx;
    dy = ey - sy;
    dxy = (dx < 0 ? -dx : dx) - (dy < 0 ? -dy : dy);
    m2x = (dx >= 0) ? 1 : -1;
    m2y = (dy >= 0) ? 1 : -1;
    if (dxy >= 0) begin
      a = (dx < 0) ? -dx : dx;
      b = (dy < 0) ? -dy : dy;
      m1x = m2x;
      m1y = 0;
    end else begin
      a = (dy < 0) ? -dy : dy;
      b = (dx < 0) ? -dx : dx;
      m1x = 0;
      m1y = m2y;
    end
    d2b = 2 * b;
    d2ab = 2 * (b - a);
    delta = d2b - a;
    if (delta >= 0) begin
      an1 = -d2b;
      imin = imed;
      st.line_type = 3;
    end else begin
      if (32 * b <= a) begin
        an1 = -16 * b;
        st.line_type = 1;
      end else begin
        an1 = -4 * b;
        if (delta >= an1) an1 = -d2b;
        st.line_type = 2;
      end
      imin = imin_in;
      delta = delta + an1;
    end
    an2 = 2 * an1;
    x = sx;
    y = sy;
    if (delta < an2) px.push_back('{x, y, full, 1'b0});
    else px.push_back('{x, y, imed, 1'b1});
    while (a > 0) begin
      if (delta < 0) begin
        nx = x + m1x;
        ny = y + m1y;
        if (delta < an2) begin
          px.push_back('{nx, ny, full, 1'b0});
          st.n_m1_plain++;
        end else begin
          qx = x + m2x;
          qy = y + m2y;
          st.n_lap_steps++;
          if (qx >= 0 && qx < size && qy >= 0 && qy < size)
            px.push_back('{qx, qy, (delta < an1) ? imin : imed, 1'b1});
          else
            st.n_clipped++;
          px.push_back('{nx, ny, (delta < an1) ? imed : imin, 1'b1});
        end
        x = nx;
        y = ny;
        delta = delta + d2b;
      end else begin
        x = x + m2x;
        y = y + m2y;
        px.push_back('{x, y, full, 1'b0});
        st.n_m2_steps++;
        delta = delta + d2ab;
      end
      a = a - 1;
    end
  endfunction

endpackage
