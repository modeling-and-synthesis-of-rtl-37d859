// afic_adder: aligned fixed internal-carry (AFIC) approximate adder.
//
// The N-bit addition is split at bit H. The upper K = N-H bits are an exact
// adder whose carry-in is hardwired instead of coming from the LSBs: 0 for
// CB_CUB (the result can only underestimate in the MSBs), 1 for CB_CLB
// (overestimate), or the dither bit d for CB_DITHER. Because every upper
// bit shares this one fixed carry, the largest MSB error is 2^H. The lower
// H bits come from conditional bounding logic (cb_logic), which outputs the
// true LSB sum when the true LSB carry equals the hardwired one and saturates
// the LSBs toward the true value otherwise. With a flat LSB block the total error is then
// at most 2^H in magnitude and is zero whenever the carries match.
//
// Interface: a, b (N bits), d (dither control, CB_DITHER only; 1 means MSB
// carry 1 plus CLB). Outputs s = S[N:0] and c_lsb, the true LSB carry that the
// MSBs ignore (used by history-based dither control). Combinational.
// The structure follows the source; SEG (LSB partitioning) defaults to a
// flat LSB block and IMPL (exact or literal-reduced bounding logic, see
// cb_logic) to the exact one. With inexact bounding the error bound grows
// by the error of the LSB approximation.
module afic_adder
  import approx_pkg::*;
#(
  parameter int          N    = 16,
  parameter int          H    = 9,
  parameter int          SEG  = H,
  parameter cb_mode_e    MODE = CB_DITHER,
  parameter adder_arch_e ARCH = ARCH_CLA,
  parameter cb_impl_e    IMPL = CB_IMPL_EXACT
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         d,
  output logic [N:0]   s,
  output logic         c_lsb
);

  localparam int K = N - H;

  logic msb_cin;
  logic [K-1:0] msb_sum;
  logic         msb_cout;
  logic [H-1:0] lsb_sum;

  always_comb begin
    unique case (MODE)
      CB_CUB:  msb_cin = 1'b0;
      CB_CLB:  msb_cin = 1'b1;
      default: msb_cin = d;
    endcase
  end

  exact_adder #(.W(K), .ARCH(ARCH)) u_msb (
    .a   (a[N-1:H]),
    .b   (b[N-1:H]),
    .cin (msb_cin),
    .sum (msb_sum),
    .cout(msb_cout)
  );

  cb_logic #(.H(H), .SEG(SEG), .MODE(MODE), .ARCH(ARCH), .IMPL(IMPL)) u_lsb (
    .a(a[H-1:0]),
    .b(b[H-1:0]),
    .d(d),
    .s(lsb_sum),
    .c(c_lsb)
  );

  assign s = {msb_cout, msb_sum, lsb_sum};

endmodule
