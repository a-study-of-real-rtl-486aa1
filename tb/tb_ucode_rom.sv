// tb_ucode_rom -- structural test of the microprogram memory contents.
//
// Reads the ROM through its port and checks, for each routine: address 0
// is a halt word; the entry word has RUN-H and all six LOD-L low; the
// routine runs for the expected number of RUN-H words (66, or 34 for the
// vector transformation) and then stops on a halt word; it clocks the
// multiplier once per term and writes Z once per term; operand clocking
// (MULCKEN) and product latching (MULAEN) alternate; TRILEN follows
// MULCKEN; the ALU uses only F = A and F = A plus B in arithmetic mode with
// no carry; and the number of "F = A" writes equals the number of Z
// elements produced (8, 32, 2 and 4).
module tb_ucode_rom;
  import mac_pkg::*;

  logic [7:0] addr;
  uword_t     w;
  int checks = 0, failures = 0;

  ucode_rom dut (.addr(addr), .word(w));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    int entry[4] = '{1, 68, 135, 202};
    int words[4] = '{66, 66, 66, 34};
    int terms[4] = '{32, 32, 32, 16};
    int elems[4] = '{8, 32, 2, 4};
    addr = 0;
    #1;
    check(w.run_h == 1'b0 && w.zwrite_h == 1'b0, "address 0 is a halt word");
    for (int r = 0; r < 4; r++) begin
      int n_run, n_mul, n_lat, n_wr, n_pass;
      logic last_mul;
      n_run = 0; n_mul = 0; n_lat = 0; n_wr = 0; n_pass = 0;
      last_mul = 1'b0;
      addr = 8'(entry[r]);
      #1;
      check(w.run_h && !w.xllod_l && !w.xhlod_l && !w.yllod_l && !w.yhlod_l &&
            !w.zllod_l && !w.zhlod_l, $sformatf("routine %0d entry word loads counters", r));
      while (w.run_h && n_run < 200) begin
        n_run++;
        if (w.mulcken_h) begin
          n_mul++;
          check(!last_mul, $sformatf("routine %0d: two operand clocks in a row", r));
          last_mul = 1'b1;
        end
        if (w.mulaen_h) begin
          n_lat++;
          check(last_mul, $sformatf("routine %0d: product latch without operands", r));
          last_mul = 1'b0;
        end
        check(w.trilen_h == w.mulcken_h, $sformatf("routine %0d: TRILEN differs from MULCKEN", r));
        check(w.zlaen_h == w.mulaen_h, $sformatf("routine %0d: ZLAEN differs from MULAEN", r));
        if (w.zwrite_h) begin
          n_wr++;
          check(w.alum0 == 1'b0 && w.aluc0_l == 1'b1 &&
                (w.aluf == 4'b0000 || w.aluf == 4'b1001),
                $sformatf("routine %0d: ALU function %b", r, w.aluf));
          if (w.aluf == 4'b0000) n_pass++;
        end
        addr++;
        #1;
      end
      check(n_run == words[r], $sformatf("routine %0d: %0d RUN words, expected %0d", r, n_run, words[r]));
      check(n_mul == terms[r] && n_lat == terms[r] && n_wr == terms[r],
            $sformatf("routine %0d: %0d/%0d/%0d operand/latch/write words, expected %0d",
                      r, n_mul, n_lat, n_wr, terms[r]));
      check(n_pass == elems[r], $sformatf("routine %0d: %0d new elements, expected %0d", r, n_pass, elems[r]));
      check(!w.zwrite_h && !w.mulcken_h, $sformatf("routine %0d: halt word is inactive", r));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
