// tb_addr_counter -- random test of the row/column address counters.
//
// Drives random start loads, reloads and increments (and the bus selector)
// for 3000 clocks and compares counter and address outputs with a model
// kept in the testbench: each nibble reloads from the latched start
// address (reload wins), otherwise increments modulo 16.
module tb_addr_counter;

  logic clk = 1'b0, rst = 1'b1;
  logic start_ld, hlod_l, hinc, llod_l, linc, bus_sel;
  logic [7:0] start_addr, bus_addr, cnt, addr;
  logic [7:0] m_start;
  logic [3:0] m_hi, m_lo;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  addr_counter dut (
    .clk(clk), .rst(rst), .start_ld(start_ld), .start_addr(start_addr),
    .hlod_l(hlod_l), .hinc(hinc), .llod_l(llod_l), .linc(linc),
    .bus_sel(bus_sel), .bus_addr(bus_addr), .cnt(cnt), .addr(addr)
  );

  initial begin
    {start_ld, hinc, linc, bus_sel} = '0;
    {hlod_l, llod_l} = 2'b11;
    start_addr = '0;
    bus_addr = '0;
    m_start = '0; m_hi = '0; m_lo = '0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      start_ld   = ($urandom_range(0, 15) == 0);
      start_addr = 8'($urandom);
      hlod_l     = ($urandom_range(0, 7) != 0);
      llod_l     = ($urandom_range(0, 7) != 0);
      hinc       = $urandom_range(0, 1) == 1;
      linc       = $urandom_range(0, 1) == 1;
      bus_sel    = ($urandom_range(0, 5) == 0);
      bus_addr   = 8'($urandom);
      #1;
      checks++;
      if (addr != (bus_sel ? bus_addr : {m_hi, m_lo})) begin
        failures++;
        $display("FAIL: addr %h expected %h", addr, bus_sel ? bus_addr : {m_hi, m_lo});
      end
      @(posedge clk);
      if (!hlod_l) m_hi = m_start[7:4];
      else if (hinc) m_hi = m_hi + 4'd1;
      if (!llod_l) m_lo = m_start[3:0];
      else if (linc) m_lo = m_lo + 4'd1;
      if (start_ld) m_start = start_addr;
      #1;
      checks++;
      if (cnt != {m_hi, m_lo}) begin
        failures++;
        $display("FAIL: cycle %0d cnt %h expected %h", i, cnt, {m_hi, m_lo});
      end
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
