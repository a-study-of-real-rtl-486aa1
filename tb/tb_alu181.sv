// tb_alu181 -- test of the 32-bit 74181-type ALU against its function
// table.  The expected result of each of the 16 arithmetic functions (with
// and without carry) and 16 logic functions is written out as the table
// lists it (A plus B, A minus B minus 1, NOT(A XOR B), ...), for random
// operands and for all-ones / zero corners, and the carry out of the add
// is checked.
module tb_alu181;

  logic [31:0] a, b, f;
  logic [3:0]  s;
  logic        m, cin_l, cout_l;
  int checks = 0, failures = 0;

  alu181 dut (.a(a), .b(b), .s(s), .m(m), .cin_l(cin_l), .f(f), .cout_l(cout_l));

  function automatic logic [31:0] logic_fn(logic [3:0] sel, logic [31:0] x, logic [31:0] y);
    case (sel)
      4'h0: return ~x;
      4'h1: return ~(x | y);
      4'h2: return ~x & y;
      4'h3: return '0;
      4'h4: return ~(x & y);
      4'h5: return ~y;
      4'h6: return x ^ y;
      4'h7: return x & ~y;
      4'h8: return ~x | y;
      4'h9: return ~(x ^ y);
      4'hA: return y;
      4'hB: return x & y;
      4'hC: return '1;
      4'hD: return x | ~y;
      4'hE: return x | y;
      default: return x;
    endcase
  endfunction

  // arithmetic table, without carry in
  function automatic logic [32:0] arith_fn(logic [3:0] sel, logic [31:0] x, logic [31:0] y);
    logic [32:0] X, Y;
    X = {1'b0, x};
    Y = {1'b0, y};
    case (sel)
      4'h0: return X;
      4'h1: return {1'b0, x | y};
      4'h2: return {1'b0, x | ~y};
      4'h3: return {1'b0, 32'hFFFF_FFFF};
      4'h4: return X + {1'b0, x & ~y};
      4'h5: return {1'b0, x | y} + {1'b0, x & ~y};
      4'h6: return X + {1'b0, ~y};
      4'h7: return {1'b0, x & ~y} + {1'b0, 32'hFFFF_FFFF};
      4'h8: return X + {1'b0, x & y};
      4'h9: return X + Y;
      4'hA: return {1'b0, x | ~y} + {1'b0, x & y};
      4'hB: return {1'b0, x & y} + {1'b0, 32'hFFFF_FFFF};
      4'hC: return X + X;
      4'hD: return {1'b0, x | y} + X;
      4'hE: return {1'b0, x | ~y} + X;
      default: return X + {1'b0, 32'hFFFF_FFFF};
    endcase
  endfunction

  initial begin
    for (int n = 0; n < 300; n++) begin
      case (n)
        0: begin a = '0; b = '0; end
        1: begin a = '1; b = '1; end
        2: begin a = '1; b = 32'd1; end
        default: begin a = $urandom; b = $urandom; end
      endcase
      for (int sel = 0; sel < 16; sel++) begin
        for (int mode = 0; mode < 3; mode++) begin
          logic [32:0] e;
          s = 4'(sel);
          m = (mode == 2);
          cin_l = (mode != 1);
          #1;
          if (m) e = {1'b0, logic_fn(s, a, b)};
          else e = arith_fn(s, a, b) + 33'(!cin_l);
          checks++;
          if (f != e[31:0] || (!m && cout_l != !e[32])) begin
            failures++;
            $display("FAIL: s=%h m=%b cin_l=%b a=%h b=%h f=%h cout_l=%b expected %h %b",
                     s, m, cin_l, a, b, f, cout_l, e[31:0], !e[32]);
          end
        end
      end
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
