// tb_mac_card -- end-to-end test of one Multiplier Accumulator Card.
//
// Acting as the host on the card's buses, the test loads all of X and Y
// with random numbers, reads the whole Z memory, starts a routine with
// random starting addresses (so the row and column counters wrap), waits
// for busy to fall and reads Z again.  Every Z word must match the
// reference in mac_ref_pkg: the routine's results where it writes, the old
// contents everywhere else.  It also checks the run time (67 clocks from
// the start command to idle for routines 0-2, 35 for the vector
// transformation, i.e. 6.7 us and 3.5 us at 100 ns), that a start command
// during a run is ignored, and that a card with another number ignores the
// bus.
module tb_mac_card;
  import mac_ref_pkg::*;

  localparam logic [1:0] ID = 2'd2;

  logic clk = 1'b0, rst = 1'b1;
  logic [23:0] ab;
  logic [3:0]  f;
  logic [31:0] db_in, db_out;
  logic        db_oe, busy;
  int checks = 0, failures = 0;
  int runs[4];
  int ignored_starts = 0;
  xy_mem_t X, Y;
  z_mem_t  Z, Zexp;

  always #5 clk = ~clk;

  mac_card #(.CARD_ID(ID)) dut (
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

  function automatic logic [23:0] bus_addr(logic [1:0] card, logic a16, logic a8, logic [7:0] a);
    return {3'b011, 1'b0, card, 1'b0, a16, 7'd0, a8, a};
  endfunction

  task automatic idle_bus();
    ab = '0; f = '0; db_in = '0;
  endtask

  task automatic write_xy(input logic sel_y, input logic [7:0] a, input logic [15:0] d);
    @(negedge clk);
    ab = bus_addr(ID, 1'b0, sel_y, a); f = 4'b0111; db_in = {16'd0, d};
    @(negedge clk);
    idle_bus();
  endtask

  task automatic read_z(input logic [7:0] a, output logic [31:0] d);
    @(negedge clk);
    ab = bus_addr(ID, 1'b0, 1'b0, a); f = 4'b1000;
    #1;
    check(db_oe == 1'b1, "data bus not driven on read");
    d = db_out;
    @(negedge clk);
    idle_bus();
  endtask

  task automatic start_fn(input logic [1:0] card, input int fn, input logic [7:0] xs,
                          input logic [7:0] ys, input logic [7:0] zs);
    @(negedge clk);
    ab = bus_addr(card, 1'b1, 1'b0, 8'd0); f = {1'b0, 3'(fn)}; db_in = {8'd0, zs, ys, xs};
  endtask

  task automatic run_test(input int fn, input bit disturb);
    logic [7:0] xs, ys, zs;
    int cycles, exp_cycles;
    for (int a = 0; a < 256; a++) begin
      X[a] = 16'($urandom);
      Y[a] = 16'($urandom);
      write_xy(1'b0, 8'(a), X[a]);
      write_xy(1'b1, 8'(a), Y[a]);
    end
    for (int a = 0; a < 256; a++) read_z(8'(a), Z[a]);
    xs = 8'($urandom); ys = 8'($urandom); zs = 8'($urandom);
    compute(fn, X, Y, Z, xs, ys, zs, Zexp);
    start_fn(ID, fn, xs, ys, zs);
    @(negedge clk);
    idle_bus();
    cycles = 1;
    while (busy && cycles < 500) begin
      if (disturb && cycles == 20) begin
        // a second start while busy must be ignored
        start_fn(ID, (fn + 1) % 4, 8'h00, 8'h00, 8'h00);
        @(negedge clk);
        idle_bus();
        cycles += 2;
        ignored_starts++;
      end else begin
        @(negedge clk);
        cycles++;
      end
    end
    exp_cycles = (fn == 3) ? 35 : 67;
    check(cycles == exp_cycles, $sformatf("routine %0d took %0d clocks, expected %0d", fn, cycles, exp_cycles));
    for (int a = 0; a < 256; a++) begin
      logic [31:0] d;
      read_z(8'(a), d);
      check(d == Zexp[a], $sformatf("routine %0d Z[%h] = %h, expected %h", fn, a, d, Zexp[a]));
    end
    runs[fn]++;
  endtask

  initial begin
    idle_bus();
    repeat (3) @(negedge clk);
    rst = 1'b0;
    check(busy == 1'b0, "busy after reset");
    // a command for another card is ignored
    start_fn(2'd1, 0, 8'h00, 8'h00, 8'h00);
    @(negedge clk);
    idle_bus();
    check(busy == 1'b0, "card started by another card's address");
    for (int fn = 0; fn < 4; fn++) run_test(fn, fn == 1);
    for (int fn = 0; fn < 4; fn++) run_test(fn, 1'b0);
    for (int fn = 0; fn < 4; fn++) check(runs[fn] > 0, $sformatf("routine %0d never ran", fn));
    check(ignored_starts > 0, "no start during a run");
    $display("runs: dot %0d perspective %0d weighted %0d transform %0d, ignored starts %0d",
             runs[0], runs[1], runs[2], runs[3], ignored_starts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
