// cb_logic: conditional bounding (CB) logic for the h LSBs of an AFIC adder.
//
// The true LSB sum S and its carry-out C are formed by an exact adder. The
// MSB segment of an AFIC adder never sees C, so its result is wrong exactly
// when C differs from the carry hardwired into it. The LSBs compensate:
//   CUB (MSB carry fixed at 0):  S'_i = S_i | C   -> all ones when C = 1
//   CLB (MSB carry fixed at 1):  S'_i = S_i & C   -> all zeros when C = 0
//   dithered (CDB):              S'_i = d ? (S_i & C) : (S_i | C)
// so the output equals the true sum whenever C matches the hardwired carry.
//
// Hierarchical partitioning: with SEG < H the LSB block is split into H/SEG
// isolated segments of SEG bits. Each starts with carry-in 0 and is bounded
// by its own carry-out; carries between segments are dropped. This shortens
// the LSB path at some quality cost. SEG = H is the flat, exact CB function.
//
// Inexact realisation: with IMPL other than CB_IMPL_EXACT the block is built
// from 2-bit literal-reduced segments (cb2_approx) with no adder at all; if
// H is odd the top bit is a 1-bit exact segment (a|b for CUB, a&b for CLB).
// SEG is then ignored.
//
// Output c is the carry-out of the top segment computed exactly (the true
// LSB carry when the block is flat); it is the carry the MSB segment
// ignores and feeds history-based dither control only.
//
// The CB equations, segmenting and inexact segments follow the source
// description; the per-segment form of CLB, SEG dividing H and placing the
// odd bit on top are choices of this design. Purely combinational.
module cb_logic
  import approx_pkg::*;
#(
  parameter int          H    = 9,
  parameter int          SEG  = H,
  parameter cb_mode_e    MODE = CB_DITHER,
  parameter adder_arch_e ARCH = ARCH_CLA,
  parameter cb_impl_e    IMPL = CB_IMPL_EXACT
) (
  input  logic [H-1:0] a,
  input  logic [H-1:0] b,
  input  logic         d,
  output logic [H-1:0] s,
  output logic         c
);

  // CLB form selected: fixed by MODE, or by d when dithered
  logic sel_clb;
  assign sel_clb = (MODE == CB_CLB) || (MODE == CB_DITHER && d);

  if (IMPL == CB_IMPL_EXACT) begin : g_exact
    localparam int NSEG = H / SEG;

    initial begin
      assert (H % SEG == 0) else $error("cb_logic: SEG must divide H");
    end

    logic [NSEG-1:0] cseg;

    for (genvar k = 0; k < NSEG; k++) begin : g_seg
      logic [SEG-1:0] st;
      logic [SEG-1:0] cub, clb;

      exact_adder #(.W(SEG), .ARCH(ARCH)) u_add (
        .a   (a[k*SEG +: SEG]),
        .b   (b[k*SEG +: SEG]),
        .cin (1'b0),
        .sum (st),
        .cout(cseg[k])
      );

      assign cub = st | {SEG{cseg[k]}};
      assign clb = st & {SEG{cseg[k]}};

      assign s[k*SEG +: SEG] = sel_clb ? clb : cub;
    end

    assign c = cseg[NSEG-1];

  end else begin : g_inexact
    localparam int NP  = H / 2;      // 2-bit segments
    localparam int TOP = H % 2;      // odd top bit

    for (genvar k = 0; k < NP; k++) begin : g_seg
      cb2_approx #(.IMPL(IMPL), .MODE(MODE)) u_seg (
        .a(a[2*k +: 2]),
        .b(b[2*k +: 2]),
        .d(d),
        .s(s[2*k +: 2])
      );
    end

    if (TOP == 1) begin : g_top1
      logic cub1, clb1;
      assign cub1 = a[H-1] | b[H-1];
      assign clb1 = a[H-1] & b[H-1];
      assign c    = clb1;
      assign s[H-1] = sel_clb ? clb1 : cub1;
    end else begin : g_top2
      // exact carry of the top 2-bit segment
      assign c = (a[H-1] & b[H-1]) | ((a[H-1] | b[H-1]) & a[H-2] & b[H-2]);
    end
  end

endmodule
