// tb_aa_line_gen -- self-checking test of the anti-aliasing vector generator.
//
// Draws a fixed set of lines that cover every octant and every line type
// (long-lap axial, standard axial, diagonal, horizontal, vertical, single
// point, laps clipped at the raster edge) plus random lines, and compares
// the pixel stream, pixel by pixel, with the software reference in
// aa_ref_pkg.  It also checks the clock count: two set-up clocks, then one
// clock per pixel (lap steps two) and one closing clock.
module tb_aa_line_gen;
  import aa_ref_pkg::*;

  localparam int FULL = 11, IMED = 10, IMIN = 9;  // colour 10, intensity 11/10/01

  logic clk = 1'b0, rst = 1'b1, start = 1'b0;
  logic [8:0] x0, y0, x1, y1;
  logic busy, done, pv, por;
  logic [1:0] ltype;
  logic [8:0] px, py;
  logic [3:0] pc;
  int checks = 0, failures = 0;
  int type_seen[4];
  int laps = 0, clipped = 0;

  always #5 clk = ~clk;

  aa_line_gen dut (
    .clk(clk), .rst(rst), .start(start), .x0(x0), .y0(y0), .x1(x1), .y1(y1),
    .full_code(4'(FULL)), .imed_code(4'(IMED)), .imin_code(4'(IMIN)),
    .busy(busy), .done(done), .line_type(ltype),
    .pix_valid(pv), .pix_x(px), .pix_y(py), .pix_code(pc), .pix_or(por)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic run_line(input int ax, input int ay, input int bx, input int by);
    pix_t exp[$];
    stats_t st;
    pix_t got[$];
    int cycles, exp_cycles;
    draw(ax, ay, bx, by, FULL, IMED, IMIN, 512, exp, st);
    @(negedge clk);
    x0 = 9'(ax); y0 = 9'(ay); x1 = 9'(bx); y1 = 9'(by);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cycles = 1;
    while (!done) begin
      @(posedge clk);
      #1;
      cycles++;
      if (pv) got.push_back('{int'(px), int'(py), int'(pc), por});
      if (cycles > 4000) break;
    end
    check(got.size() == exp.size(),
          $sformatf("line (%0d,%0d)-(%0d,%0d): %0d pixels, expected %0d",
                    ax, ay, bx, by, got.size(), exp.size()));
    for (int i = 0; i < exp.size() && i < got.size(); i++)
      check(got[i] == exp[i],
            $sformatf("line (%0d,%0d)-(%0d,%0d) pixel %0d: got (%0d,%0d) %h or=%0b, expected (%0d,%0d) %h or=%0b",
                      ax, ay, bx, by, i, got[i].x, got[i].y, got[i].code, got[i].ored,
                      exp[i].x, exp[i].y, exp[i].code, exp[i].ored));
    check(int'(ltype) == st.line_type, $sformatf("line type %0d, expected %0d", ltype, st.line_type));
    // start clock, set-up, first pixel, one per step (+1 for lap steps), close
    exp_cycles = 3 + (st.n_m2_steps + st.n_m1_plain + 2 * st.n_lap_steps) + 1;
    check(cycles == exp_cycles, $sformatf("line took %0d clocks, expected %0d", cycles, exp_cycles));
    type_seen[st.line_type]++;
    laps += st.n_lap_steps;
    clipped += st.n_clipped;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst = 1'b0;
    // octants 1..8 and special slopes
    run_line(100, 100, 180, 110);   // shallow, octant 1
    run_line(100, 100, 110, 180);   // steep, octant 2
    run_line(100, 100, 20, 130);    // octant 4
    run_line(100, 100, 70, 190);    // octant 3
    run_line(100, 100, 10, 60);     // octant 5
    run_line(100, 100, 95, 20);     // octant 6
    run_line(100, 100, 150, 30);    // octant 7
    run_line(100, 100, 300, 60);    // octant 8
    run_line(0, 0, 400, 5);         // long lap (Da >= 32 Db)
    run_line(10, 10, 200, 200);     // 45 degrees
    run_line(10, 10, 200, 150);     // diagonal type
    run_line(10, 10, 300, 10);      // horizontal
    run_line(10, 10, 10, 300);      // vertical
    run_line(50, 50, 50, 50);       // single point
    run_line(0, 511, 511, 500);     // laps beside the top edge
    run_line(511, 0, 0, 10);        // laps beside the right edge
    run_line(0, 0, 511, 511);
    run_line(347, 423, 511, 95);    // lap pixels beside the raster edge
    run_line(33, 80, 0, 146);
    run_line(3, 476, 73, 511);
    for (int i = 0; i < 40; i++)
      run_line($urandom_range(0, 511), $urandom_range(0, 511),
               $urandom_range(0, 511), $urandom_range(0, 511));
    for (int t = 1; t <= 3; t++)
      check(type_seen[t] > 0, $sformatf("line type %0d never drawn", t));
    check(laps > 0, "no lap steps");
    check(clipped > 0, "no clipped lap pixel");
    $display("line types: long-lap %0d standard %0d diagonal %0d, lap steps %0d, clipped %0d",
             type_seen[1], type_seen[2], type_seen[3], laps, clipped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
