// dither_ctrl: produces the one-bit dither control of a dithering AFIC adder.
//
// d = 1 selects an overestimating addition (MSB carry fixed to 1, CLB LSBs),
// d = 0 an underestimating one (carry 0, CUB LSBs). Alternating between the
// two lets errors of opposite sign cancel in accumulations. SRC selects the
// scheme:
//   DITH_EXTERNAL  d follows d_ext (application-controlled);
//   DITH_CLOCK     d alternates 0,1,0,1,... once per addition (en);
//   DITH_HISTORY   a history register: when the hardwired carry (d) and the
//                  true LSB carry (c_lsb) of the current addition differ, the
//                  opposite bounding is used for the next addition, otherwise
//                  the choice is kept;
//   DITH_H1        d = a_h1 = A[h-1], a carry predictor: when A[h-1] and
//                  B[h-1] agree the LSB carry equals them, otherwise the
//                  choice is effectively random;
//   DITH_RANDOM    d is the low bit of a 16-bit Fibonacci LFSR
//                  (x^16+x^14+x^13+x^11+1, seed 16'hACE1), stepped per en.
// The schemes are those named by the source; the exact history rule, the
// per-addition toggling and the LFSR polynomial and seed are choices of this
// design. Registered state updates on the rising clk edge when en is high and
// is reset asynchronously by rst_n low (d = 0). DITH_H1 and DITH_EXTERNAL
// are combinational and use no state.
module dither_ctrl
  import approx_pkg::*;
#(
  parameter dither_src_e SRC = DITH_H1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  logic d_ext,
  input  logic a_h1,
  input  logic c_lsb,
  output logic d
);

  logic        d_q;
  logic [15:0] lfsr_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d_q    <= 1'b0;
      lfsr_q <= 16'hACE1;
    end else if (en) begin
      unique case (SRC)
        DITH_CLOCK:   d_q <= ~d_q;
        DITH_HISTORY: d_q <= (c_lsb != d_q) ? ~d_q : d_q;
        default:      d_q <= d_q;
      endcase
      lfsr_q <= {lfsr_q[14:0], lfsr_q[15] ^ lfsr_q[13] ^ lfsr_q[12] ^ lfsr_q[10]};
    end
  end

  always_comb begin
    unique case (SRC)
      DITH_EXTERNAL: d = d_ext;
      DITH_H1:       d = a_h1;
      DITH_RANDOM:   d = lfsr_q[0];
      default:       d = d_q;
    endcase
  end

endmodule
