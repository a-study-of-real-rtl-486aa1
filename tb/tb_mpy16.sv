// tb_mpy16 -- test of the 16 x 16 two's complement multiplier.
//
// Random and corner operands (0, +max, -1 in fraction terms, mixed signs),
// with and without rounding.  The expected MSP/LSP split is worked out
// from the integer product: product = x * y (+ 2^14 when rounding); MSP is
// bits 30..15, LSP is bit 30 then bits 14..0, so the sign appears in both.
// Also checks the register behaviour: the output changes only when the
// output registers are clocked, and the (-1) x (-1) overflow gives -1.
module tb_mpy16;

  logic clk = 1'b0, ckxy = 1'b0, ckml = 1'b0, rnd = 1'b0, tril = 1'b1, trim = 1'b0;
  logic [15:0] x, y, msp, lsp;
  logic msp_oe, lsp_oe;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  mpy16 dut (.clk(clk), .clkxy_en(ckxy), .clkml_en(ckml), .x(x), .y(y), .rnd(rnd),
             .tril(tril), .trim(trim), .msp(msp), .lsp(lsp), .msp_oe(msp_oe), .lsp_oe(lsp_oe));

  task automatic mul(input logic [15:0] a, input logic [15:0] b, input logic r);
    longint p;
    logic [31:0] pv;
    logic [15:0] em, el, old_m, old_l;
    @(negedge clk);
    x = a; y = b; rnd = r; ckxy = 1'b1; ckml = 1'b0;
    @(negedge clk);
    ckxy = 1'b0;
    old_m = msp; old_l = lsp;
    @(negedge clk);   // output registers not clocked yet
    checks++;
    if (msp != old_m || lsp != old_l) begin
      failures++;
      $display("FAIL: output changed without CLKM/CLKL");
    end
    ckml = 1'b1;
    @(negedge clk);
    ckml = 1'b0;
    p = longint'($signed(a)) * longint'($signed(b)) + (r ? 64'sd16384 : 64'sd0);
    pv = p[31:0];
    em = pv[30:15];
    el = {pv[30], pv[14:0]};
    checks++;
    if (msp != em || lsp != el) begin
      failures++;
      $display("FAIL: %h * %h rnd=%0b gives %h %h expected %h %h", a, b, r, msp, lsp, em, el);
    end
  endtask

  initial begin
    mul(16'h4000, 16'h4000, 1'b0);  // 0.5 * 0.5 = 0.25
    checks++;
    if (msp != 16'h2000) begin
      failures++;
      $display("FAIL: 0.5 * 0.5 MSP %h expected 2000", msp);
    end
    mul(16'h8000, 16'h8000, 1'b0);  // (-1) * (-1) overflows to -1
    checks++;
    if (msp != 16'h8000) begin
      failures++;
      $display("FAIL: overflow case MSP %h expected 8000", msp);
    end
    mul(16'h7fff, 16'h7fff, 1'b0);
    mul(16'h8000, 16'h7fff, 1'b0);
    mul(16'hffff, 16'h0001, 1'b1);
    mul(16'h0000, 16'h1234, 1'b0);
    for (int i = 0; i < 500; i++) mul(16'($urandom), 16'($urandom), 1'($urandom));
    tril = 1'b0; trim = 1'b1;
    #1;
    checks++;
    if (!lsp_oe || msp_oe) begin
      failures++;
      $display("FAIL: output enables");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
