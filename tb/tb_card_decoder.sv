// tb_card_decoder -- exhaustive test of the card select decoder.
//
// Four decoders, one per card number, see every combination of AB23..AB18
// (and a few patterns on the other address bits).  A card must be selected
// exactly when AB23..AB21 = 011 and AB19..AB18 equal its number, and the
// low decoder output must be pin Y7, Y6, Y5 or Y4 for cards 0..3.
module tb_card_decoder;

  logic [23:0] ab;
  logic [7:0]  dec_l [4];
  logic [3:0]  sel_l;
  int checks = 0, failures = 0;

  for (genvar c = 0; c < 4; c++) begin : g_dut
    card_decoder #(.CARD_ID(2'(c))) dut (.ab(ab), .dec_l(dec_l[c]), .card_sel_l(sel_l[c]));
  end

  initial begin
    for (int hi = 0; hi < 64; hi++) begin
      for (int rnd = 0; rnd < 4; rnd++) begin
        logic en;
        logic [7:0] exp_dec;
        ab = {6'(hi), 18'($urandom)};
        #1;
        en = (ab[23:21] == 3'b011);
        exp_dec = 8'hFF;
        if (en) exp_dec[7 - ab[19:18]] = 1'b0;
        for (int c = 0; c < 4; c++) begin
          checks++;
          if (sel_l[c] != !(en && ab[19:18] == 2'(c)) || dec_l[c] != exp_dec) begin
            failures++;
            $display("FAIL: ab=%h card %0d sel_l=%b dec_l=%b expected dec_l=%b",
                     ab, c, sel_l[c], dec_l[c], exp_dec);
          end
        end
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
