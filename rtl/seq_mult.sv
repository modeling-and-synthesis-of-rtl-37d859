// seq_mult: sequential shift-add multiplier with a dithering AFIC adder.
//
// A sequential multiplier is a chain of accumulations, which is where a
// consistently over- or under-estimating approximate adder would let its
// error build up; a dithering adder lets errors of both signs average out.
// Each cycle the multiplier bit in lo[0] selects A or 0, the dithering adder
// forms hi + addend (N+1 bits), and {sum, lo} is shifted right by one: the
// sum's LSB becomes a finished product bit. After N cycles {hi, lo} is the
// 2N-bit product (exact when the adder makes no error).
//
// Interface: start (ignored while busy) loads a and b; busy is high for the
// N cycles of the multiplication; done pulses for one cycle with p valid
// (p holds until the next done). Latency: done rises N cycles after the
// clock edge that accepts start. Synchronous to clk, asynchronous active-low
// reset. The use of the dithering adder follows the source; the right-shift
// structure, sizes and default dither scheme are choices of this design.
module seq_mult
  import approx_pkg::*;
#(
  parameter int          N    = 16,
  parameter int          H    = 4,
  parameter adder_arch_e ARCH = ARCH_RCA,
  parameter dither_src_e SRC  = DITH_H1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic           busy,
  output logic           done,
  output logic [2*N-1:0] p
);

  localparam int CW = $clog2(N + 1);

  logic [N-1:0]  a_q, hi_q, lo_q;
  logic [CW-1:0] cnt_q;
  logic [N-1:0]  addend;
  logic [N:0]    sum;
  logic          d_unused;

  assign addend = lo_q[0] ? a_q : '0;

  dithering_adder #(.N(N), .H(H), .ARCH(ARCH), .SRC(SRC)) u_add (
    .clk  (clk),
    .rst_n(rst_n),
    .en   (busy),
    .a    (addend),
    .b    (hi_q),
    .d_ext(1'b0),
    .s    (sum),
    .d    (d_unused)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q   <= '0;
      hi_q  <= '0;
      lo_q  <= '0;
      cnt_q <= '0;
      busy  <= 1'b0;
      done  <= 1'b0;
      p     <= '0;
    end else begin
      done <= 1'b0;
      if (busy) begin
        hi_q  <= sum[N:1];
        lo_q  <= {sum[0], lo_q[N-1:1]};
        cnt_q <= cnt_q - 1'b1;
        if (cnt_q == CW'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
          p    <= {sum, lo_q[N-1:1]};
        end
      end else if (start) begin
        a_q   <= a;
        lo_q  <= b;
        hi_q  <= '0;
        cnt_q <= CW'(N);
        busy  <= 1'b1;
      end
    end
  end

endmodule
