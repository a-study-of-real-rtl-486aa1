// tb_mac_system -- test of four MAC cards sharing the host buses.
//
// Each card gets its own random X and Y contents.  The four cards are then
// started one clock apart, card c on routine c, so that all four run at
// the same time; each must stay busy for its own routine's time (66 or 34
// clocks after its start command) while the others run.  Afterwards every
// card's whole Z memory is read back and compared with the reference: a
// read addressed to one card must return that card's data only.  Finally
// all four are started again on one routine with new start addresses, and
// a start sent to an already busy card must be ignored.
module tb_mac_system;
  import mac_ref_pkg::*;

  localparam int N = 4;

  logic clk = 1'b0, rst = 1'b1;
  logic [23:0] ab;
  logic [3:0]  f;
  logic [31:0] db_in, db_out;
  logic        db_oe;
  logic [N-1:0] busy;
  int checks = 0, failures = 0;
  int max_busy = 0, ignored_starts = 0;
  int runs[4];
  xy_mem_t X[N], Y[N];
  z_mem_t  Z[N], Zexp[N];
  int busy_len[N];
  int exp_len[N];

  always #5 clk = ~clk;

  mac_system #(.N_CARDS(N)) dut (
    .clk(clk), .rst(rst), .ab(ab), .f(f), .db_in(db_in),
    .db_out(db_out), .db_oe(db_oe), .busy(busy)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [23:0] bus_addr(int card, logic a16, logic a8, logic [7:0] a);
    return {3'b011, 1'b0, 2'(card), 1'b0, a16, 7'd0, a8, a};
  endfunction

  task automatic idle_bus();
    ab = '0; f = '0; db_in = '0;
  endtask

  task automatic write_xy(input int card, input logic sel_y, input logic [7:0] a,
                          input logic [15:0] d);
    @(negedge clk);
    ab = bus_addr(card, 1'b0, sel_y, a); f = 4'b0111; db_in = {16'd0, d};
    @(negedge clk);
    idle_bus();
  endtask

  task automatic read_z(input int card, input logic [7:0] a, output logic [31:0] d);
    @(negedge clk);
    ab = bus_addr(card, 1'b0, 1'b0, a); f = 4'b1000;
    #1;
    check(db_oe == 1'b1, "data bus not driven on read");
    d = db_out;
    @(negedge clk);
    idle_bus();
  endtask

  // busy lengths are measured in clocks with busy high, sampled at negedge
  always @(negedge clk) begin
    int nb;
    nb = 0;
    for (int c = 0; c < N; c++) begin
      if (busy[c]) begin
        busy_len[c]++;
        nb++;
      end
    end
    if (nb > max_busy) max_busy = nb;
  end

  task automatic start_all(input int fn_all, input bit disturb);
    logic [7:0] xs[N], ys[N], zs[N];
    int fn[N];
    for (int c = 0; c < N; c++) begin
      for (int a = 0; a < 256; a++) read_z(c, 8'(a), Z[c][a]);
      fn[c] = (fn_all < 0) ? c : fn_all;
      xs[c] = 8'($urandom); ys[c] = 8'($urandom); zs[c] = 8'($urandom);
      compute(fn[c], X[c], Y[c], Z[c], xs[c], ys[c], zs[c], Zexp[c]);
      exp_len[c] = (fn[c] == 3) ? 34 : 66;
      busy_len[c] = 0;
    end
    for (int c = 0; c < N; c++) begin
      @(negedge clk);
      ab = bus_addr(c, 1'b1, 1'b0, 8'd0); f = {1'b0, 3'(fn[c])};
      db_in = {8'd0, zs[c], ys[c], xs[c]};
      runs[fn[c]]++;
    end
    if (disturb) begin
      // restart card 0 while it runs: must be ignored
      @(negedge clk);
      ab = bus_addr(0, 1'b1, 1'b0, 8'd0); f = 4'b0010; db_in = '0;
      ignored_starts++;
    end
    @(negedge clk);
    idle_bus();
    while (|busy) @(negedge clk);
    for (int c = 0; c < N; c++) begin
      check(busy_len[c] == exp_len[c],
            $sformatf("card %0d busy %0d clocks, expected %0d", c, busy_len[c], exp_len[c]));
      for (int a = 0; a < 256; a++) begin
        logic [31:0] d;
        read_z(c, 8'(a), d);
        check(d == Zexp[c][a], $sformatf("card %0d Z[%h] = %h, expected %h", c, a, d, Zexp[c][a]));
      end
    end
  endtask

  initial begin
    idle_bus();
    repeat (3) @(negedge clk);
    rst = 1'b0;
    @(negedge clk);
    check(busy == '0, "busy after reset");
    check(db_oe == 1'b0, "data bus driven while idle");
    for (int c = 0; c < N; c++)
      for (int a = 0; a < 256; a++) begin
        X[c][a] = 16'($urandom);
        Y[c][a] = 16'($urandom);
        write_xy(c, 1'b0, 8'(a), X[c][a]);
        write_xy(c, 1'b1, 8'(a), Y[c][a]);
      end
    start_all(-1, 1'b0);
    start_all(0, 1'b1);
    start_all(3, 1'b0);
    check(max_busy == N, $sformatf("at most %0d cards ran at once", max_busy));
    check(ignored_starts > 0, "no start while busy");
    $display("runs: dot %0d perspective %0d weighted %0d transform %0d; cards at once %0d",
             runs[0], runs[1], runs[2], runs[3], max_busy);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
