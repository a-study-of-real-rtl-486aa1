// tb_mac_pkg -- test of the microprogram that mac_pkg generates.
//
// The microprogram image is executed in software, one word per step, with
// a model of the card's three pairs of row/column counters: a load word
// (LOD-L low) copies the start address, INC steps a 4-bit field with
// wraparound, and load wins over increment.  Every word with MULCKEN
// records the X and Y addresses it multiplies; every word with ZWRITE
// records the Z address it writes and whether the ALU passes the product
// (first term of an element) or adds it.  The recorded sequence must equal
// the routine's equations term by term for random start addresses, the
// run must last 66 words (34 for the transformation) and end on a halt
// word, and entry_of() must send codes 4-7 to a halt word.
module tb_mac_pkg;
  import mac_pkg::*;

  int checks = 0, failures = 0;
  ucode_t rom;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [7:0] at(logic [7:0] s, int r, int c);
    return {4'(s[7:4] + r), 4'(s[3:0] + c)};
  endfunction

  // expected (x, y, z) address of term k of routine f
  function automatic void expect_term(int f, int k, logic [7:0] xs, logic [7:0] ys,
                                      logic [7:0] zs, output logic [7:0] xa,
                                      output logic [7:0] ya, output logic [7:0] za,
                                      output bit first);
    int r, c, i, j, s;
    case (f)
      0: begin r = k / 4; j = k % 4;
           xa = at(xs, r, j); ya = at(ys, j, 0); za = at(zs, r, 0); first = (j == 0); end
      1: begin i = k / 2; c = k % 2;
           xa = at(xs, i, c); ya = at(ys, i, 0); za = at(zs, i, c); first = 1'b1; end
      2: begin s = k / 16; i = (k / 4) % 4; j = k % 4;
           xa = at(xs, i, j); ya = at(ys, 4 * s + i, j); za = at(zs, s, 0); first = (k % 16 == 0); end
      default: begin c = k / 4; j = k % 4;
           xa = at(xs, 0, j); ya = at(ys, j, c); za = at(zs, 0, c); first = (j == 0); end
    endcase
  endfunction

  function automatic logic [3:0] step4(logic [3:0] v, logic [3:0] st, logic lod_l, logic inc);
    if (!lod_l) return st;
    if (inc) return v + 4'd1;
    return v;
  endfunction

  task automatic run_routine(input int f, input logic [7:0] xs, input logic [7:0] ys,
                             input logic [7:0] zs);
    logic [7:0] x, y, z, xa, ya, za;
    logic [7:0] tx[$], ty[$], wz[$];
    bit wfirst[$];
    bit first;
    int pc, words, nterms;
    uword_t w;
    x = 8'($urandom); y = 8'($urandom); z = 8'($urandom);   // counters start anywhere
    pc = int'(entry_of(3'(f)));
    words = 0;
    w = uword_t'(rom[pc]);
    while (w.run_h && words < 300) begin
      if (w.mulcken_h) begin
        tx.push_back(x);
        ty.push_back(y);
      end
      if (w.zwrite_h) begin
        wz.push_back(z);
        check(w.alum0 == 1'b0 && w.aluc0_l == 1'b1, "ALU not in arithmetic mode without carry");
        check(w.aluf == ALU_PASS_A || w.aluf == ALU_A_PLUS_B, $sformatf("ALU code %b", w.aluf));
        wfirst.push_back(w.aluf == ALU_PASS_A);
      end
      x = {step4(x[7:4], xs[7:4], w.xhlod_l, w.xhinc_h), step4(x[3:0], xs[3:0], w.xllod_l, w.xlinc_h)};
      y = {step4(y[7:4], ys[7:4], w.yhlod_l, w.yhinc_h), step4(y[3:0], ys[3:0], w.yllod_l, w.ylinc_h)};
      z = {step4(z[7:4], zs[7:4], w.zhlod_l, w.zhinc_h), step4(z[3:0], zs[3:0], w.zllod_l, w.zlinc_h)};
      pc++;
      words++;
      w = uword_t'(rom[pc % 256]);
    end
    nterms = (f == 3) ? 16 : 32;
    check(words == ((f == 3) ? 34 : 66), $sformatf("routine %0d ran %0d words", f, words));
    check(tx.size() == nterms && wz.size() == nterms,
          $sformatf("routine %0d: %0d products, %0d Z writes, expected %0d", f, tx.size(), wz.size(), nterms));
    for (int k = 0; k < nterms && k < tx.size() && k < wz.size(); k++) begin
      expect_term(f, k, xs, ys, zs, xa, ya, za, first);
      check(tx[k] == xa && ty[k] == ya,
            $sformatf("routine %0d term %0d reads X %h Y %h, expected %h %h", f, k, tx[k], ty[k], xa, ya));
      check(wz[k] == za && wfirst[k] == first,
            $sformatf("routine %0d term %0d writes Z %h pass=%0b, expected %h %0b", f, k, wz[k], wfirst[k], za, first));
    end
  endtask

  initial begin
    rom = ucode_image();
    // RUN-H is bit 0 of the word
    check(rom[0][0] == 1'b0, "address 0 is not a halt word");
    for (int c = 4; c < 8; c++)
      check(rom[entry_of(3'(c))][0] == 1'b0, $sformatf("code %0d does not halt", c));
    check(run_cycles(FN_DOT) == 67 && run_cycles(FN_XFORM) == 35, "run_cycles");
    for (int f = 0; f < 4; f++) begin
      run_routine(f, 8'h00, 8'h00, 8'h00);
      for (int n = 0; n < 20; n++) run_routine(f, 8'($urandom), 8'($urandom), 8'($urandom));
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
