// approx_pkg: types shared by the approximate-arithmetic blocks.
//
// adder_arch_e selects how an exact carry chain is built (ripple, 4-bit
// group lookahead, Kogge-Stone prefix). cb_mode_e selects the conditional
// bounding behaviour of an AFIC adder: CUB (MSB carry hardwired to 0, LSBs
// forced to all ones when the true LSB carry is 1), CLB (MSB carry hardwired
// to 1, LSBs forced to all zeros when the true LSB carry is 0) or dithered
// (a control bit chooses between the two per addition). dither_src_e lists
// the ways that control bit can be produced. cb_impl_e selects an exact or
// a literal-reduced (inexact) realisation of the bounding logic.
package approx_pkg;

  typedef enum logic [1:0] {
    ARCH_RCA = 2'd0,
    ARCH_CLA = 2'd1,
    ARCH_KS  = 2'd2
  } adder_arch_e;

  typedef enum logic [1:0] {
    CB_CUB    = 2'd0,
    CB_CLB    = 2'd1,
    CB_DITHER = 2'd2
  } cb_mode_e;

  // realisation of the bounding logic: exact, or built from literal-reduced
  // 2-bit segments, named by their total squared distance TD from the exact
  // 2-bit function over its 16 input rows (MIN: the fewest literals)
  typedef enum logic [1:0] {
    CB_IMPL_EXACT = 2'd0,
    CB_IMPL_TD1   = 2'd1,
    CB_IMPL_TD2   = 2'd2,
    CB_IMPL_MIN   = 2'd3
  } cb_impl_e;

  typedef enum logic [2:0] {
    DITH_EXTERNAL = 3'd0,
    DITH_CLOCK    = 3'd1,
    DITH_HISTORY  = 3'd2,
    DITH_H1       = 3'd3,
    DITH_RANDOM   = 3'd4
  } dither_src_e;

  typedef enum logic [1:0] {
    ALS_EXACT = 2'd0,
    ALS_F1    = 2'd1,
    ALS_F1R2  = 2'd2,
    ALS_F1R1  = 2'd3
  } als_variant_e;

endpackage
