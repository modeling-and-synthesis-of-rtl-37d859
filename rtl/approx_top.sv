// approx_top: the approximate-arithmetic designs side by side.
//
//   add_*  16-bit dithering AFIC adder, h = 9 LSBs, lookahead MSB segment,
//          dither bit from A[h-1] (the h-1 scheme). Combinational sum;
//          add_en advances the dither controller state.
//   opt_*  the same 16-bit h = 9 h-1 dithering adder with literal-reduced
//          (inexact, TD2) 2-bit bounding segments in place of the exact
//          LSB logic: the cheaper "optimal trade-off" LSB realisation.
//          The h-1 scheme needs no state, so this unit is purely
//          combinational, with d = opt_a[8].
//   mul_*  16 x 16 truncated multiplier (upper 16 product bits) with an
//          AFIC-CUB last-stage adder, h = 5. Combinational.
//   seq_*  16 x 16 sequential shift-add multiplier with a dithering AFIC
//          adder (h = 4); start/busy/done handshake, 16 cycles per product.
//   als_*  the four 2-bit adder variants from two-level approximate logic
//          synthesis (exact, M = 1, M = 1 with 2 and with 1 erroneous input
//          pair), all driven by the same operands.
// With the h-1 scheme add_d is simply add_a[8], and als_y_f1[0] (S0 of the
// F1 variant) is the constant 1; both are outputs by design. The true LSB
// carry of the opt_* adder (opt_c_lsb) is left unused: only history
// dithering would need it.
// The units share only clk and rst_n (asynchronous, active low). Sizes of
// the adder and the multiplier follow the source's main configurations; the
// sequential multiplier sizes are this design's choice.
module approx_top
  import approx_pkg::*;
#(
  parameter int ADD_N = 16,
  parameter int ADD_H = 9,
  parameter int MUL_N = 16,
  parameter int MUL_H = 5,
  parameter int SEQ_N = 16,
  parameter int SEQ_H = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  // dithering adder
  input  logic             add_en,
  input  logic [ADD_N-1:0] add_a,
  input  logic [ADD_N-1:0] add_b,
  input  logic             add_d_ext,
  output logic [ADD_N:0]   add_s,
  output logic             add_d,
  // dithering adder with inexact LSB logic
  input  logic [ADD_N-1:0] opt_a,
  input  logic [ADD_N-1:0] opt_b,
  output logic [ADD_N:0]   opt_s,
  // truncated multiplier
  input  logic [MUL_N-1:0] mul_a,
  input  logic [MUL_N-1:0] mul_b,
  output logic [MUL_N-1:0] mul_p,
  // sequential multiplier
  input  logic             seq_start,
  input  logic [SEQ_N-1:0] seq_a,
  input  logic [SEQ_N-1:0] seq_b,
  output logic             seq_busy,
  output logic             seq_done,
  output logic [2*SEQ_N-1:0] seq_p,
  // 2-bit synthesised adders
  input  logic [1:0]       als_a,
  input  logic [1:0]       als_b,
  output logic [2:0]       als_y_exact,
  output logic [2:0]       als_y_f1,
  output logic [2:0]       als_y_f1r2,
  output logic [2:0]       als_y_f1r1
);

  dithering_adder #(.N(ADD_N), .H(ADD_H), .ARCH(ARCH_CLA), .SRC(DITH_H1)) u_add (
    .clk  (clk),
    .rst_n(rst_n),
    .en   (add_en),
    .a    (add_a),
    .b    (add_b),
    .d_ext(add_d_ext),
    .s    (add_s),
    .d    (add_d)
  );

  logic opt_c_lsb;

  afic_adder #(.N(ADD_N), .H(ADD_H), .MODE(CB_DITHER), .ARCH(ARCH_CLA), .IMPL(CB_IMPL_TD2)) u_opt (
    .a    (opt_a),
    .b    (opt_b),
    .d    (opt_a[ADD_H-1]),
    .s    (opt_s),
    .c_lsb(opt_c_lsb)
  );

  approx_trunc_mult #(.N(MUL_N), .H(MUL_H), .MODE(CB_CUB), .ARCH(ARCH_RCA)) u_mul (
    .a(mul_a),
    .b(mul_b),
    .d(1'b0),
    .p(mul_p)
  );

  seq_mult #(.N(SEQ_N), .H(SEQ_H), .ARCH(ARCH_RCA), .SRC(DITH_H1)) u_seq (
    .clk  (clk),
    .rst_n(rst_n),
    .start(seq_start),
    .a    (seq_a),
    .b    (seq_b),
    .busy (seq_busy),
    .done (seq_done),
    .p    (seq_p)
  );

  als_adder2 #(.VARIANT(ALS_EXACT)) u_als_exact (.a(als_a), .b(als_b), .c(als_y_exact[2]), .s(als_y_exact[1:0]));
  als_adder2 #(.VARIANT(ALS_F1))    u_als_f1    (.a(als_a), .b(als_b), .c(als_y_f1[2]),    .s(als_y_f1[1:0]));
  als_adder2 #(.VARIANT(ALS_F1R2))  u_als_f1r2  (.a(als_a), .b(als_b), .c(als_y_f1r2[2]),  .s(als_y_f1r2[1:0]));
  als_adder2 #(.VARIANT(ALS_F1R1))  u_als_f1r1  (.a(als_a), .b(als_b), .c(als_y_f1r1[2]),  .s(als_y_f1r1[1:0]));

endmodule
