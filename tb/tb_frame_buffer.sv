// tb_frame_buffer -- test of the refresh memory at its full 512 x 512 x 4
// size against a model array.
//
// Random plain writes and OR writes are mixed with reads at random
// addresses; a read returns the pixel one clock after the address is
// given.  A write and a read of the same pixel in one cycle must return
// the old value.  Addresses are kept to a 64 x 64 corner plus random far
// pixels so that writes and reads meet often.
module tb_frame_buffer;

  localparam int CW = 9;
  localparam int PW = 4;

  logic clk = 1'b0;
  logic we = 1'b0, w_or = 1'b0;
  logic [CW-1:0] wx, wy, rx, ry;
  logic [PW-1:0] wcode, rdata;
  logic [PW-1:0] model [2**CW][2**CW];
  bit            known [2**CW][2**CW];
  logic [PW-1:0] expect_q;
  bit   expect_v = 1'b0;
  int checks = 0, failures = 0, or_merges = 0;

  always #5 clk = ~clk;

  frame_buffer #(.CW(CW), .PW(PW)) dut (
    .clk(clk), .we(we), .w_or(w_or), .wx(wx), .wy(wy), .wcode(wcode),
    .rx(rx), .ry(ry), .rdata(rdata)
  );

  function automatic logic [CW-1:0] pick();
    return ($urandom_range(0, 7) == 0) ? CW'($urandom) : CW'($urandom_range(0, 63));
  endfunction

  initial begin
    wx = '0; wy = '0; rx = '0; ry = '0; wcode = '0;
    // clear the corner used most
    for (int y = 0; y < 64; y++)
      for (int x = 0; x < 64; x++) begin
        @(negedge clk);
        we = 1'b1; w_or = 1'b0; wx = CW'(x); wy = CW'(y); wcode = '0;
        model[x][y] = '0;
        known[x][y] = 1'b1;
      end
    @(negedge clk);
    we = 1'b0;
    for (int n = 0; n < 20000; n++) begin
      @(negedge clk);
      if (expect_v) begin
        checks++;
        if (rdata != expect_q) begin
          failures++;
          $display("FAIL: read %h expected %h", rdata, expect_q);
        end
      end
      rx = pick(); ry = pick();
      if (!known[rx][ry]) begin
        // never-written far pixel: only write it, read next time
        we = 1'b1; w_or = 1'b0; wx = rx; wy = ry; wcode = PW'($urandom);
        expect_v = 1'b0;
      end else begin
        expect_q = model[rx][ry];
        expect_v = 1'b1;
        we = $urandom_range(0, 1) == 1;
        w_or = $urandom_range(0, 1) == 1;
        wx = ($urandom_range(0, 3) == 0) ? rx : pick();
        wy = ($urandom_range(0, 3) == 0) ? ry : pick();
        wcode = PW'($urandom);
        if (we && w_or && !known[wx][wy]) w_or = 1'b0;
      end
      if (we) begin
        known[wx][wy] = 1'b1;
        if (w_or) begin
          if ((model[wx][wy] | wcode) != wcode) or_merges++;
          model[wx][wy] = model[wx][wy] | wcode;
        end else model[wx][wy] = wcode;
      end
    end
    checks++;
    if (or_merges == 0) begin
      failures++;
      $display("FAIL: no OR write met an earlier pixel");
    end
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
