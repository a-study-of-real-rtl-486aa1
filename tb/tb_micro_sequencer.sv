// tb_micro_sequencer -- test of the microprogram counter.
//
// For every function code: start loads the entry address (1, 68, 135 and
// 202 for routines 0..3, 0 for unused codes), the counter then advances one
// step per clock while run_h is high and holds while it is low.  Reset
// returns it to 0.
module tb_micro_sequencer;

  logic clk = 1'b0, rst = 1'b1, start = 1'b0, run_h = 1'b0;
  logic [2:0] func = '0;
  logic [7:0] upc;
  int checks = 0, failures = 0;
  int entries[8] = '{1, 68, 135, 202, 0, 0, 0, 0};

  always #5 clk = ~clk;

  micro_sequencer dut (.clk(clk), .rst(rst), .start(start), .func(func),
                       .run_h(run_h), .upc(upc));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    check(upc == 0, "reset value");
    for (int fc = 0; fc < 8; fc++) begin
      int exp;
      @(negedge clk);
      func = 3'(fc);
      start = 1'b1;
      run_h = 1'b1;
      @(negedge clk);
      start = 1'b0;
      exp = entries[fc];
      check(upc == 8'(exp), $sformatf("func %0d entry %0d expected %0d", fc, upc, exp));
      for (int i = 0; i < 20; i++) begin
        run_h = ($urandom_range(0, 2) != 0);
        @(negedge clk);
        if (run_h) exp++;
        check(upc == 8'(exp), $sformatf("func %0d step %0d upc %0d expected %0d", fc, i, upc, exp));
      end
    end
    @(negedge clk);
    rst = 1'b1;
    @(negedge clk);
    check(upc == 0, "reset clears counter");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
