// tb_mac_ram -- test of the card memories at both sizes (256 x 16 and
// 256 x 32): random writes and reads against a model array, and a check
// that the read data follows the address in the same cycle.
module tb_mac_ram;

  logic clk = 1'b0;
  logic we16, we32;
  logic [7:0] a16, a32;
  logic [15:0] d16, q16;
  logic [31:0] d32, q32;
  logic [15:0] m16 [256];
  logic [31:0] m32 [256];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  mac_ram #(.AW(8), .DW(16)) u16 (.clk(clk), .we(we16), .addr(a16), .wdata(d16), .rdata(q16));
  mac_ram #(.AW(8), .DW(32)) u32 (.clk(clk), .we(we32), .addr(a32), .wdata(d32), .rdata(q32));

  initial begin
    // fill both
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      we16 = 1'b1; we32 = 1'b1;
      a16 = 8'(i); a32 = 8'(i);
      d16 = 16'($urandom); d32 = $urandom;
      m16[i] = d16; m32[i] = d32;
    end
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      we16 = $urandom_range(0, 3) == 0;
      we32 = $urandom_range(0, 3) == 0;
      a16 = 8'($urandom); a32 = 8'($urandom);
      d16 = 16'($urandom); d32 = $urandom;
      #1;
      checks += 2;
      if (q16 != m16[a16]) begin
        failures++;
        $display("FAIL: 16-bit read %h at %h expected %h", q16, a16, m16[a16]);
      end
      if (q32 != m32[a32]) begin
        failures++;
        $display("FAIL: 32-bit read %h at %h expected %h", q32, a32, m32[a32]);
      end
      if (we16) m16[a16] = d16;
      if (we32) m32[a32] = d32;
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
