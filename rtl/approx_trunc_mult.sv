// approx_trunc_mult: truncated N x N multiplier whose last-stage adder is an
// AFIC conditional-bounding adder.
//
// Only partial-product bits of weight 2^N and above are generated (a
// truncated multiplier: the lower N columns are dropped with no correction),
// so each of the N rows b_i * a * 2^i contributes its upper bits
// (a * b_i << i)[2N-1:N]. A tree of 3:2 carry-save compressors reduces these
// rows level by level (three rows become a sum row and a left-shifted carry
// row; leftovers pass to the next level) until two rows remain. Those two
// are summed by afic_adder with H LSBs, which is where the document places
// the approximation on top of truncation. Result p = upper N product bits,
// modulo 2^N. Combinational.
//
// Truncation, final AFIC stage and the sizes (N = 16, h in {3,5,7}; also
// N = 24 with h in {3,7,11}) follow the source. The source reduces with a
// Dadda tree; this design uses a row-wise carry-save tree, which yields the
// same final sum of the two rows modulo 2^N. No truncation-correction
// constant and the CUB default are choices of this design. IMPL selects
// exact or literal-reduced bounding logic in the last stage.
module approx_trunc_mult
  import approx_pkg::*;
#(
  parameter int          N    = 16,
  parameter int          H    = 5,
  parameter cb_mode_e    MODE = CB_CUB,
  parameter adder_arch_e ARCH = ARCH_RCA,
  parameter cb_impl_e    IMPL = CB_IMPL_EXACT
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         d,
  output logic [N-1:0] p
);

  // rows left after l levels of 3:2 reduction
  function automatic int nrows(input int l);
    int r;
    r = N;
    for (int i = 0; i < l; i++) r = 2 * (r / 3) + r % 3;
    return r;
  endfunction

  function automatic int nlevels();
    int l;
    l = 0;
    while (nrows(l) > 2) l++;
    return l;
  endfunction

  localparam int LEVELS = nlevels();

  logic [N-1:0] pp [N];

  // level 0: truncated partial products (bits of weight 2^N and above)
  for (genvar i = 0; i < N; i++) begin : g_pp
    assign pp[i] = N'(({{N{1'b0}}, a & {N{b[i]}}} << i) >> N);
  end

  // each level compresses its input rows three at a time
  for (genvar l = 0; l < LEVELS; l++) begin : g_lvl
    localparam int R  = nrows(l);
    localparam int G  = R / 3;
    localparam int RN = nrows(l + 1);
    logic [N-1:0] rin  [N];
    logic [N-1:0] rout [N];
    if (l == 0) begin : g_first
      assign rin = pp;
    end else begin : g_next
      assign rin = g_lvl[l-1].rout;
    end
    for (genvar g = 0; g < G; g++) begin : g_csa
      logic [N-1:0] x, y, z;
      assign x = rin[3*g];
      assign y = rin[3*g+1];
      assign z = rin[3*g+2];
      assign rout[2*g]   = x ^ y ^ z;
      assign rout[2*g+1] = ((x & y) | (x & z) | (y & z)) << 1;
    end
    for (genvar j = 0; j < R % 3; j++) begin : g_pass
      assign rout[2*G+j] = rin[3*G+j];
    end
    for (genvar j = RN; j < N; j++) begin : g_unused
      assign rout[j] = '0;
    end
  end

  logic [N-1:0] op_a, op_b;

  if (LEVELS == 0) begin : g_nored
    assign op_a = pp[0];
    assign op_b = (N > 1) ? pp[N-1] : '0;
  end else begin : g_red
    assign op_a = g_lvl[LEVELS-1].rout[0];
    assign op_b = g_lvl[LEVELS-1].rout[1];
  end

  logic c_top_unused;
  logic c_lsb_unused;

  afic_adder #(.N(N), .H(H), .MODE(MODE), .ARCH(ARCH), .IMPL(IMPL)) u_final (
    .a    (op_a),
    .b    (op_b),
    .d    (d),
    .s    ({c_top_unused, p}),
    .c_lsb(c_lsb_unused)
  );

endmodule
