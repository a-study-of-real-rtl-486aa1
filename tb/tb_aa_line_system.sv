// tb_aa_line_system -- test of the line generator writing into the
// refresh memory.
//
// An 80 x 128 window of the raster, touching its left edge, is cleared
// through the host write port.  Lines are then drawn into it: one whose
// lap pixels fall off the left edge (they must be dropped), lines of each
// type (long lap, standard lap, no lap), and random lines that cross each
// other so that lap pixels are ORed onto earlier pixels.  A model of the
// window is updated from the reference pixel list of each line, and at the
// end every pixel of the window is read back and compared.  Also checked:
// a host write and a second start during a line are ignored, the reported
// line type, and that busy has fallen once done is given.
module tb_aa_line_system;
  import aa_ref_pkg::*;

  localparam int CW = 9;
  localparam int PW = 4;
  localparam int WX = 80, WY0 = 64, WY = 128;
  localparam int FULL = 11, IMED = 10, IMIN = 9;

  logic clk = 1'b0, rst = 1'b1;
  logic start = 1'b0;
  logic [CW-1:0] x0, y0, x1, y1, h_wx, h_wy, rd_x, rd_y;
  logic [PW-1:0] h_wcode, rd_data;
  logic h_we = 1'b0;
  logic busy, done;
  logic [1:0] line_type;
  logic [PW-1:0] model [WX][WY];
  int checks = 0, failures = 0;
  int type_seen[4];
  int lap_steps = 0, clipped = 0, or_merges = 0, lines = 0;

  always #5 clk = ~clk;

  aa_line_system #(.CW(CW), .PW(PW)) dut (
    .clk(clk), .rst(rst), .start(start), .x0(x0), .y0(y0), .x1(x1), .y1(y1),
    .full_code(PW'(FULL)), .imed_code(PW'(IMED)), .imin_code(PW'(IMIN)),
    .busy(busy), .done(done), .line_type(line_type),
    .h_we(h_we), .h_wx(h_wx), .h_wy(h_wy), .h_wcode(h_wcode),
    .rd_x(rd_x), .rd_y(rd_y), .rd_data(rd_data)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic draw_line(input int ax, input int ay, input int bx, input int by);
    pix_t px[$];
    stats_t st;
    int cycles;
    draw(ax, ay, bx, by, FULL, IMED, IMIN, 2**CW, px, st);
    foreach (px[i]) begin
      int mx, my;
      mx = px[i].x;
      my = px[i].y - WY0;
      if (px[i].ored) begin
        if ((model[mx][my] | PW'(px[i].code)) != PW'(px[i].code)) or_merges++;
        model[mx][my] = model[mx][my] | PW'(px[i].code);
      end else model[mx][my] = PW'(px[i].code);
    end
    @(negedge clk);
    start = 1'b1;
    x0 = CW'(ax); y0 = CW'(ay); x1 = CW'(bx); y1 = CW'(by);
    @(negedge clk);
    start = 1'b0;
    cycles = 1;
    while (!done && cycles < 3000) begin
      // a second start, and a host write on every cycle, must be ignored
      // while the line is drawn
      start = (cycles == 5);
      if (cycles == 5) begin
        x0 = '0; y0 = CW'(WY0); x1 = CW'(WX - 1); y1 = CW'(WY0 + WY - 1);
      end
      h_we = 1'b1; h_wx = CW'(ax); h_wy = CW'(ay); h_wcode = 4'hF;
      @(negedge clk);
      cycles++;
    end
    start = 1'b0;
    h_we = 1'b0;
    check(line_type == 2'(st.line_type),
          $sformatf("line type %0d expected %0d", line_type, st.line_type));
    type_seen[st.line_type]++;
    lap_steps += st.n_lap_steps;
    clipped += st.n_clipped;
    lines++;
    @(negedge clk);
    check(!busy, "busy after done");
  endtask

  initial begin
    x0 = '0; y0 = '0; x1 = '0; y1 = '0; h_wx = '0; h_wy = '0; h_wcode = '0;
    rd_x = '0; rd_y = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int y = 0; y < WY; y++)
      for (int x = 0; x < WX; x++) begin
        @(negedge clk);
        h_we = 1'b1; h_wx = CW'(x); h_wy = CW'(y + WY0); h_wcode = '0;
        model[x][y] = '0;
      end
    @(negedge clk);
    h_we = 1'b0;
    draw_line(33, 80, 0, 146);       // lap pixels off the left edge
    draw_line(2, 100, 78, 102);      // long lap
    draw_line(5, 70, 60, 90);        // standard lap
    draw_line(10, 180, 70, 120);     // no lap
    draw_line(40, 64, 40, 191);      // vertical
    for (int n = 0; n < 30; n++)
      draw_line($urandom_range(0, WX - 1), $urandom_range(WY0, WY0 + WY - 1),
                $urandom_range(0, WX - 1), $urandom_range(WY0, WY0 + WY - 1));
    for (int y = 0; y < WY; y++)
      for (int x = 0; x < WX; x++) begin
        @(negedge clk);
        rd_x = CW'(x); rd_y = CW'(y + WY0);
        @(negedge clk);
        check(rd_data == model[x][y],
              $sformatf("pixel (%0d,%0d) = %0d expected %0d", x, y + WY0, rd_data, model[x][y]));
      end
    for (int t = 1; t <= 3; t++) check(type_seen[t] > 0, $sformatf("no line of type %0d", t));
    check(lap_steps > 0, "no lap step");
    check(clipped > 0, "no lap pixel clipped");
    check(or_merges > 0, "no OR merge with an earlier pixel");
    $display("lines %0d types %0d/%0d/%0d lap steps %0d clipped %0d OR merges %0d",
             lines, type_seen[1], type_seen[2], type_seen[3], lap_steps, clipped, or_merges);
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
