// alu181 -- 32-bit arithmetic logic unit of the MAC card.
//
// The card's ALU is eight 4-bit 74S181 slices with 74S182 carry look-ahead
// generators: a 64-bit input, 32-bit output unit performing 16 arithmetic
// and 16 logic functions, selected by ALUF3..ALUF0 (S3..S0), ALUM0 (M) and
// ALUC0-L (carry in, active low).  A is the multiplier product and B the
// Z latch.  The card's microprogram uses only S = 0000 (F = A, start of a
// sum) and S = 1001 (F = A plus B, accumulate) with M = 0 and no carry.
// This module computes the whole 74181 table for active-high data:
//   arithmetic (M = 0): F = (A | B&S0 | ~B&S1) + (A&~B&S2 | A&B&S3) + Cin
//   logic      (M = 1): F = ~((A | B&S0 | ~B&S1) ^ (A&~B&S2 | A&B&S3))
// The two forms are the standard 74181 propagate / generate decomposition;
// the look-ahead carry tree is left to synthesis, a single 32-bit adder.
// cout_l is the active-low carry out of the most significant slice.
// Combinational.  The function set and control names are the card's; the
// equations are the published behaviour of the 74181 family.
module alu181 #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [3:0]   s,       // ALUF3..ALUF0
  input  logic         m,       // 1 = logic functions
  input  logic         cin_l,   // carry in, active low
  output logic [W-1:0] f,
  output logic         cout_l
);

  logic [W-1:0] t1, t2;
  logic [W:0]   sum;

  always_comb begin
    t1  = a | (b & {W{s[0]}}) | (~b & {W{s[1]}});
    t2  = (a & ~b & {W{s[2]}}) | (a & b & {W{s[3]}});
    sum = {1'b0, t1} + {1'b0, t2} + {{W{1'b0}}, !cin_l};
    if (m) begin
      f      = ~(t1 ^ t2);
      cout_l = 1'b1;
    end else begin
      f      = sum[W-1:0];
      cout_l = !sum[W];
    end
  end

endmodule
