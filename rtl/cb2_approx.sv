// cb2_approx: a 2-bit conditional bounding segment realised inexactly.
//
// The exact 2-bit CUB function (S | C, 14 literals as a sum of products) and
// CLB function (S & C, 12 literals) are replaced by cheaper functions found
// by flipping truth-table rows by +-1 and re-minimising, keeping the
// literal-count / total-squared-distance Pareto front (TD = sum over the 16
// input rows of (approx - exact)^2). The fronts, with a = {a1,a0},
// b = {b1,b0}:
//   CUB  TD1  (6 literals): s1 = a1|b1, s0 = a0|b0|(a1&b1)
//        TD2  (4 literals): s1 = a1|b1, s0 = a0|b0
//        MIN  (2 literals, TD 4): s1 = a1|b1, s0 = 1
//   CLB  TD1  (6 literals): s1 = 0,     s0 = a1&b1&(a0|b0)
//        TD2  (2 literals): s1 = 0,     s0 = a1&b1
//        MIN  (1 literal, TD 6): s1 = 0, s0 = b1
// The CUB points at 14/0, 6/1 and 4/2 literals/TD are those reported for
// this search; the 2-literal CUB point and all CLB functions are this
// design's own results of the same search (the reported minimum CUB point
// is 3 literals at TD 6, which the 2-literal/TD 4 function dominates).
// With MODE = CB_DITHER, d = 1 selects the CLB function and d = 0 the CUB
// function. IMPL = CB_IMPL_EXACT is not used here (cb_logic builds exact
// segments with an adder). Combinational.
module cb2_approx
  import approx_pkg::*;
#(
  parameter cb_impl_e IMPL = CB_IMPL_TD2,
  parameter cb_mode_e MODE = CB_CUB
) (
  input  logic [1:0] a,
  input  logic [1:0] b,
  input  logic       d,
  output logic [1:0] s
);

  logic [1:0] cub, clb;

  always_comb begin
    cub[1] = a[1] | b[1];
    clb[1] = 1'b0;
    unique case (IMPL)
      CB_IMPL_TD1: begin
        cub[0] = a[0] | b[0] | (a[1] & b[1]);
        clb[0] = a[1] & b[1] & (a[0] | b[0]);
      end
      CB_IMPL_MIN: begin
        cub[0] = 1'b1;
        clb[0] = b[1];
      end
      default: begin // CB_IMPL_TD2
        cub[0] = a[0] | b[0];
        clb[0] = a[1] & b[1];
      end
    endcase
  end

  // CLB form selected: fixed by MODE, or by d when dithered
  logic sel_clb;
  assign sel_clb = (MODE == CB_CLB) || (MODE == CB_DITHER && d);
  assign s = sel_clb ? clb : cub;

endmodule
