// tb_nsg_top -- end-to-end test of the whole design at full size (four MAC
// cards, 512 x 512 x 4 refresh memory, default parameters).
//
// The test plays the host computer:
//   1. clears the whole refresh memory through the host pixel port;
//   2. loads all four cards: cards 0-2 with random data, card 3 with eight
//      polygon vertices (x, y, 1, 0 as fractions) in X and a 4 x 4
//      rotate-scale-translate matrix in Y;
//   3. starts the dot product, perspective and weighted sum routines on
//      cards 0-2 and the vector transformation of the first vertex on card 3,
//      then draws a line while all four cards run; a second start to a busy
//      card must be ignored;
//   4. checks every Z word of cards 0-2, transforms the remaining vertices
//      on card 3 and reads them back, each checked against the reference;
//   5. turns the transformed vertices into pixel addresses and draws the
//      closed polygon with the line generator, plus lines that force each
//      line type and a line whose lap pixels fall off the raster, with a
//      host pixel write attempted during each line (it must be ignored);
//   6. reads back all 262,144 pixels and compares them with a model built
//      from the reference line algorithm.
// Each mechanism is counted and one that never happened is a failure.
module tb_nsg_top;
  import mac_ref_pkg::*;
  import aa_ref_pkg::*;

  localparam int N  = 4;
  localparam int CW = 9;
  localparam int PW = 4;
  localparam int SIZE = 2**CW;
  localparam int FULL = 11, IMED = 10, IMIN = 9;

  logic clk = 1'b0, rst = 1'b1;
  logic [23:0] mac_ab;
  logic [3:0]  mac_f;
  logic [31:0] mac_db_in, mac_db_out;
  logic        mac_db_oe;
  logic [N-1:0] mac_busy;
  logic ln_start = 1'b0, ln_busy, ln_done;
  logic [CW-1:0] ln_x0, ln_y0, ln_x1, ln_y1;
  logic [1:0] ln_type;
  logic fb_we = 1'b0;
  logic [CW-1:0] fb_wx, fb_wy, fb_rx, fb_ry;
  logic [PW-1:0] fb_wcode, fb_rdata;

  int checks = 0, failures = 0;
  xy_mem_t X[N], Y[N];
  z_mem_t  Z[N], Zexp[N];
  logic [PW-1:0] fbm [SIZE][SIZE];
  int vx[8], vy[8];

  // mechanism counters
  int mac_runs[4];
  int mac_ignored = 0, max_cards_busy = 0, line_during_mac = 0;
  int type_seen[4];
  int lap_steps = 0, m2_steps = 0, clipped = 0, or_merges = 0;
  int host_writes = 0, host_ignored = 0, lines = 0;

  always #5 clk = ~clk;

  nsg_top dut (
    .clk(clk), .rst(rst),
    .mac_ab(mac_ab), .mac_f(mac_f), .mac_db_in(mac_db_in),
    .mac_db_out(mac_db_out), .mac_db_oe(mac_db_oe), .mac_busy(mac_busy),
    .ln_start(ln_start), .ln_x0(ln_x0), .ln_y0(ln_y0), .ln_x1(ln_x1), .ln_y1(ln_y1),
    .ln_full(PW'(FULL)), .ln_imed(PW'(IMED)), .ln_imin(PW'(IMIN)),
    .ln_busy(ln_busy), .ln_done(ln_done), .ln_type(ln_type),
    .fb_we(fb_we), .fb_wx(fb_wx), .fb_wy(fb_wy), .fb_wcode(fb_wcode),
    .fb_rx(fb_rx), .fb_ry(fb_ry), .fb_rdata(fb_rdata)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  always @(negedge clk) begin
    if ($countones(mac_busy) > max_cards_busy) max_cards_busy = $countones(mac_busy);
  end

  // ---- MAC host transfers ----

  function automatic logic [23:0] bus_addr(int card, logic a16, logic a8, logic [7:0] a);
    return {3'b011, 1'b0, 2'(card), 1'b0, a16, 7'd0, a8, a};
  endfunction

  task automatic idle_bus();
    mac_ab = '0; mac_f = '0; mac_db_in = '0;
  endtask

  task automatic write_xy(input int card, input logic sel_y, input logic [7:0] a,
                          input logic [15:0] d);
    @(negedge clk);
    mac_ab = bus_addr(card, 1'b0, sel_y, a); mac_f = 4'b0111; mac_db_in = {16'd0, d};
    @(negedge clk);
    idle_bus();
  endtask

  task automatic read_z(input int card, input logic [7:0] a, output logic [31:0] d);
    @(negedge clk);
    mac_ab = bus_addr(card, 1'b0, 1'b0, a); mac_f = 4'b1000;
    #1;
    d = mac_db_out;
    @(negedge clk);
    idle_bus();
  endtask

  task automatic start_mac(input int card, input int fn, input logic [7:0] xs,
                           input logic [7:0] ys, input logic [7:0] zs);
    @(negedge clk);
    mac_ab = bus_addr(card, 1'b1, 1'b0, 8'd0); mac_f = {1'b0, 3'(fn)};
    mac_db_in = {8'd0, zs, ys, xs};
    @(negedge clk);
    idle_bus();
  endtask

  // ---- line drawing ----

  task automatic model_line(input int ax, input int ay, input int bx, input int by,
                            output stats_t st);
    pix_t px[$];
    draw(ax, ay, bx, by, FULL, IMED, IMIN, SIZE, px, st);
    foreach (px[i]) begin
      if (px[i].ored) begin
        if ((fbm[px[i].x][px[i].y] | PW'(px[i].code)) != PW'(px[i].code)) or_merges++;
        fbm[px[i].x][px[i].y] = fbm[px[i].x][px[i].y] | PW'(px[i].code);
      end else fbm[px[i].x][px[i].y] = PW'(px[i].code);
    end
  endtask

  task automatic start_line(input int ax, input int ay, input int bx, input int by,
                            output stats_t st);
    model_line(ax, ay, bx, by, st);
    @(negedge clk);
    ln_start = 1'b1;
    ln_x0 = CW'(ax); ln_y0 = CW'(ay); ln_x1 = CW'(bx); ln_y1 = CW'(by);
    @(negedge clk);
    ln_start = 1'b0;
    if (|mac_busy) line_during_mac++;
  endtask

  task automatic finish_line(input stats_t st);
    int cycles;
    cycles = 0;
    while (!ln_done && cycles < 5000) begin
      // a host pixel write while the line runs must be ignored
      fb_we = (cycles == 3);
      fb_wx = '0; fb_wy = '0; fb_wcode = 4'hF;
      if (cycles == 3) host_ignored++;
      @(negedge clk);
      cycles++;
    end
    fb_we = 1'b0;
    check(ln_done, "line never finished");
    check(ln_type == 2'(st.line_type), $sformatf("line type %0d expected %0d", ln_type, st.line_type));
    type_seen[st.line_type]++;
    lap_steps += st.n_lap_steps;
    m2_steps += st.n_m2_steps;
    clipped += st.n_clipped;
    lines++;
    @(negedge clk);
  endtask

  task automatic line(input int ax, input int ay, input int bx, input int by);
    stats_t st;
    start_line(ax, ay, bx, by, st);
    finish_line(st);
  endtask

  // ---- the run ----

  initial begin
    stats_t st0;
    logic [7:0] xs[3], ys[3], zs[3];
    logic [31:0] d;
    // rotation by about 30 degrees, scale 0.7, move to the raster centre
    localparam logic [15:0] C = 16'd19859, S = 16'd11469, T = 16'd16384;
    const logic [15:0] M[4][4] = '{'{C, S, 16'd0, 16'd0},
                                   '{-S, C, 16'd0, 16'd0},
                                   '{T, T, 16'd0, 16'd0},
                                   '{16'd0, 16'd0, 16'd0, 16'd0}};
    const int PX[8] = '{200, 60, 0, -140, -200, -60, 0, 140};
    const int PY[8] = '{0, 60, 200, 140, 0, -60, -200, -140};

    idle_bus();
    ln_x0 = '0; ln_y0 = '0; ln_x1 = '0; ln_y1 = '0;
    fb_wx = '0; fb_wy = '0; fb_wcode = '0; fb_rx = '0; fb_ry = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;

    // 1. clear the raster
    for (int y = 0; y < SIZE; y++)
      for (int x = 0; x < SIZE; x++) begin
        @(negedge clk);
        fb_we = 1'b1; fb_wx = CW'(x); fb_wy = CW'(y); fb_wcode = '0;
        fbm[x][y] = '0;
        host_writes++;
      end
    @(negedge clk);
    fb_we = 1'b0;

    // 2. load the cards
    for (int c = 0; c < 3; c++)
      for (int a = 0; a < 256; a++) begin
        X[c][a] = 16'($urandom);
        Y[c][a] = 16'($urandom);
        write_xy(c, 1'b0, 8'(a), X[c][a]);
        write_xy(c, 1'b1, 8'(a), Y[c][a]);
      end
    for (int a = 0; a < 256; a++) begin
      X[3][a] = '0;
      Y[3][a] = '0;
    end
    for (int r = 0; r < 8; r++) begin
      X[3][{4'(r), 4'd0}] = 16'(PX[r] * 64);
      X[3][{4'(r), 4'd1}] = 16'(PY[r] * 64);
      X[3][{4'(r), 4'd2}] = 16'h7FFF;
    end
    for (int j = 0; j < 4; j++)
      for (int c = 0; c < 4; c++) Y[3][{4'(j), 4'(c)}] = M[j][c];
    for (int a = 0; a < 256; a++) begin
      write_xy(3, 1'b0, 8'(a), X[3][a]);
      write_xy(3, 1'b1, 8'(a), Y[3][a]);
    end
    for (int c = 0; c < 3; c++)
      for (int a = 0; a < 256; a++) read_z(c, 8'(a), Z[c][a]);

    // 3. all four cards and the line generator at once
    for (int c = 0; c < 3; c++) begin
      xs[c] = 8'($urandom); ys[c] = 8'($urandom); zs[c] = 8'($urandom);
      compute(c, X[c], Y[c], Z[c], xs[c], ys[c], zs[c], Zexp[c]);
      start_mac(c, c, xs[c], ys[c], zs[c]);
      mac_runs[c]++;
    end
    start_mac(3, 3, 8'h00, 8'h00, 8'h00);
    mac_runs[3]++;
    start_mac(0, 1, 8'h00, 8'h00, 8'h00);   // card 0 is busy: ignored
    mac_ignored++;
    start_line(300, 20, 500, 60, st0);
    finish_line(st0);
    while (|mac_busy) @(negedge clk);

    // 4. check cards 0-2, then transform every vertex on card 3
    for (int c = 0; c < 3; c++)
      for (int a = 0; a < 256; a++) begin
        read_z(c, 8'(a), d);
        check(d == Zexp[c][a], $sformatf("card %0d Z[%h] = %h expected %h", c, a, d, Zexp[c][a]));
      end
    for (int r = 0; r < 8; r++) begin
      if (r > 0) begin
        start_mac(3, 3, {4'(r), 4'd0}, 8'h00, {4'(r), 4'd0});
        mac_runs[3]++;
        while (mac_busy[3]) @(negedge clk);
      end
      compute(3, X[3], Y[3], Z[3], {4'(r), 4'd0}, 8'h00, {4'(r), 4'd0}, Zexp[3]);
      for (int c = 0; c < 4; c++) begin
        read_z(3, {4'(r), 4'(c)}, d);
        check(d == Zexp[3][{4'(r), 4'(c)}],
              $sformatf("vertex %0d Z%0d = %h expected %h", r, c, d, Zexp[3][{4'(r), 4'(c)}]));
        if (c == 0) vx[r] = $signed(d) >>> 21;
        if (c == 1) vy[r] = $signed(d) >>> 21;
      end
      check(vx[r] >= 0 && vx[r] < SIZE && vy[r] >= 0 && vy[r] < SIZE,
            $sformatf("vertex %0d at (%0d,%0d) off the raster", r, vx[r], vy[r]));
    end

    // 5. draw the polygon and the extra lines
    for (int r = 0; r < 8; r++) line(vx[r], vy[r], vx[(r + 1) % 8], vy[(r + 1) % 8]);
    line(10, 480, 500, 470);      // long lap
    line(20, 300, 200, 360);      // standard lap
    line(480, 100, 400, 300);     // no lap
    line(33, 80, 0, 146);         // lap pixels off the left edge
    line(347, 423, 511, 95);      // lap pixels off the right edge
    line(100, 400, 100, 400);     // a single point

    // 6. read the whole raster back
    for (int y = 0; y < SIZE; y++)
      for (int x = 0; x < SIZE; x++) begin
        @(negedge clk);
        fb_rx = CW'(x); fb_ry = CW'(y);
        @(negedge clk);
        if (fb_rdata != fbm[x][y]) begin
          check(1'b0, $sformatf("pixel (%0d,%0d) = %0d expected %0d", x, y, fb_rdata, fbm[x][y]));
        end else checks++;
      end

    for (int f = 0; f < 4; f++) check(mac_runs[f] > 0, $sformatf("MAC routine %0d never ran", f));
    check(mac_ignored > 0, "no MAC start while busy");
    check(max_cards_busy == N, $sformatf("only %0d cards ran at once", max_cards_busy));
    check(line_during_mac > 0, "no line drawn while the cards ran");
    for (int t = 1; t <= 3; t++) check(type_seen[t] > 0, $sformatf("no line of type %0d", t));
    check(lap_steps > 0, "no lap step");
    check(m2_steps > 0, "no diagonal step");
    check(clipped > 0, "no lap pixel clipped");
    check(or_merges > 0, "no OR merge");
    check(host_writes > 0, "no host pixel write");
    check(host_ignored > 0, "no host write during a line");
    $display("MAC runs dot %0d perspective %0d weighted %0d transform %0d; ignored starts %0d; cards at once %0d",
             mac_runs[0], mac_runs[1], mac_runs[2], mac_runs[3], mac_ignored, max_cards_busy);
    $display("lines %0d (during MAC %0d) types %0d/%0d/%0d lap steps %0d diagonal steps %0d clipped %0d OR merges %0d host writes %0d ignored %0d",
             lines, line_during_mac, type_seen[1], type_seen[2], type_seen[3], lap_steps, m2_steps,
             clipped, or_merges, host_writes, host_ignored);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
