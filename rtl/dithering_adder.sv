// dithering_adder: AFIC adder whose bounding direction is chosen per addition.
//
// One dither bit d drives both the carry hardwired into the MSB segment and
// the multiplexer between the CUB and CLB LSB blocks (cb_logic with
// CB_DITHER shares the true-sum adder between the two). d comes from
// dither_ctrl according to SRC; the default is the h-1 scheme, where
// A[h-1] predicts the LSB carry.
//
// Interface: a, b, d_ext combinational in, s = S[N:0] combinational out, d
// the dither bit applied to the current addition. en marks a valid addition
// and advances the controller state on the next rising clk edge (clock,
// history and random schemes). Defaults N = 16, H = 9 on a lookahead base
// follow the source's main 16-bit configuration. IMPL selects exact or
// literal-reduced bounding logic (shared CUB/CLB segments, see cb_logic).
module dithering_adder
  import approx_pkg::*;
#(
  parameter int          N    = 16,
  parameter int          H    = 9,
  parameter int          SEG  = H,
  parameter adder_arch_e ARCH = ARCH_CLA,
  parameter dither_src_e SRC  = DITH_H1,
  parameter cb_impl_e    IMPL = CB_IMPL_EXACT
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         d_ext,
  output logic [N:0]   s,
  output logic         d
);

  logic c_lsb;

  dither_ctrl #(.SRC(SRC)) u_ctrl (
    .clk  (clk),
    .rst_n(rst_n),
    .en   (en),
    .d_ext(d_ext),
    .a_h1 (a[H-1]),
    .c_lsb(c_lsb),
    .d    (d)
  );

  afic_adder #(.N(N), .H(H), .SEG(SEG), .MODE(CB_DITHER), .ARCH(ARCH), .IMPL(IMPL)) u_add (
    .a    (a),
    .b    (b),
    .d    (d),
    .s    (s),
    .c_lsb(c_lsb)
  );

endmodule
