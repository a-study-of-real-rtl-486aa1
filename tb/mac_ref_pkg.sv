// mac_ref_pkg -- reference arithmetic of the MAC subroutines, for the
// testbenches.  Given the X, Y and Z memory images and the three starting
// addresses, compute() returns the Z image after a routine.  Element (r,c)
// of a memory started at s is at address {s[7:4] + r, s[3:0] + c}, each
// field wrapping at 16.  Products are 16 x 16 signed; the 32-bit value is
// the multiplier's 31-bit fractional product sign-extended, and sums wrap
// at 32 bits.
package mac_ref_pkg;

  typedef logic [15:0] xy_mem_t [256];
  typedef logic [31:0] z_mem_t [256];

  function automatic logic [7:0] at(logic [7:0] s, int r, int c);
    return {4'(s[7:4] + r), 4'(s[3:0] + c)};
  endfunction

  function automatic logic [31:0] prod(logic [15:0] a, logic [15:0] b);
    logic [31:0] p;
    p = 32'($signed(a) * $signed(b));
    return {p[30], p[30:0]};
  endfunction

  // number of Z elements written by each routine
  function automatic int n_results(int fn);
    case (fn)
      0: return 8;
      1: return 32;
      2: return 2;
      default: return 4;
    endcase
  endfunction

  function automatic void compute(input int fn, input xy_mem_t X, input xy_mem_t Y,
                                  input z_mem_t zin, input logic [7:0] xs,
                                  input logic [7:0] ys, input logic [7:0] zs,
                                  output z_mem_t zout);
    logic [31:0] acc;
    zout = zin;
    case (fn)
      0: for (int r = 0; r < 8; r++) begin
           acc = '0;
           for (int j = 0; j < 4; j++) acc += prod(X[at(xs, r, j)], Y[at(ys, j, 0)]);
           zout[at(zs, r, 0)] = acc;
         end
      1: for (int i = 0; i < 16; i++)
           for (int c = 0; c < 2; c++)
             zout[at(zs, i, c)] = prod(X[at(xs, i, c)], Y[at(ys, i, 0)]);
      2: for (int s = 0; s < 2; s++) begin
           acc = '0;
           for (int i = 0; i < 4; i++)
             for (int j = 0; j < 4; j++) acc += prod(X[at(xs, i, j)], Y[at(ys, 4 * s + i, j)]);
           zout[at(zs, s, 0)] = acc;
         end
      default: for (int c = 0; c < 4; c++) begin
           acc = '0;
           for (int j = 0; j < 4; j++) acc += prod(X[at(xs, 0, j)], Y[at(ys, j, c)]);
           zout[at(zs, 0, c)] = acc;
         end
    endcase
  endfunction

endpackage
