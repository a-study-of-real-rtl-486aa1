// tb_bus_control -- exhaustive test of the MAC host command decoder.
//
// Walks all 256 combinations of card select, F3..F0, AB16, AB8 and busy and
// compares the five strobes with the operation table: write X/Y with
// F3=0, AB16=0, F2..F0=111; start with F3=0, AB16=1; read Z with F3=1,
// F2..F0=000; nothing unless the card is selected and idle.
module tb_bus_control;

  logic card_sel_l, ab16, ab8, busy;
  logic [3:0] f;
  logic wrim, xwren, ywren, mplod, rdim;
  int checks = 0, failures = 0;

  bus_control dut (
    .card_sel_l(card_sel_l), .f(f), .ab16(ab16), .ab8(ab8), .busy(busy),
    .wrim(wrim), .xwren(xwren), .ywren(ywren), .mplod(mplod), .rdim(rdim)
  );

  initial begin
    for (int v = 0; v < 256; v++) begin
      logic ok_sel, e_x, e_y, e_st, e_rd;
      {card_sel_l, f, ab16, ab8, busy} = 8'(v);
      #1;
      ok_sel = (card_sel_l == 1'b0) && (busy == 1'b0);
      e_x  = ok_sel && f == 4'b0111 && !ab16 && !ab8;
      e_y  = ok_sel && f == 4'b0111 && !ab16 && ab8;
      e_st = ok_sel && !f[3] && ab16;
      e_rd = ok_sel && f == 4'b1000;
      checks++;
      if ({xwren, ywren, wrim, mplod, rdim} != {e_x, e_y, e_x | e_y, e_st, e_rd}) begin
        failures++;
        $display("FAIL: in=%b got x=%b y=%b wrim=%b mplod=%b rdim=%b", 8'(v),
                 xwren, ywren, wrim, mplod, rdim);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
