// tb_workload_mult_psnr: quality of truncated multipliers with an AFIC-CUB
// last-stage adder on 10,000 uniformly random operand pairs, for N = 16
// with h = 3, 5, 7 and N = 24 with h = 3, 7, 11. The reference is the
// plain truncated product (same dropped columns, exact final addition),
// computed bit by bit; errors are also reported against the full product.
// PSNR = 10 log10(peak^2 / MSE), peak = 2^(2N) on the full-product scale
// (a choice of this testbench). Checks: error against the truncated product
// lies in [-2^h, 0] in output units, and PSNR falls as h grows.
module tb_workload_mult_psnr;
  import approx_pkg::*;

  localparam int SAMPLES = 10000;

  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [15:0] a16, b16;
  logic [23:0] a24, b24;
  logic [15:0] p16 [3];
  logic [23:0] p24 [3];

  approx_trunc_mult #(.N(16), .H(3)) u16_3 (.a(a16), .b(b16), .d(1'b0), .p(p16[0]));
  approx_trunc_mult #(.N(16), .H(5)) u16_5 (.a(a16), .b(b16), .d(1'b0), .p(p16[1]));
  approx_trunc_mult #(.N(16), .H(7)) u16_7 (.a(a16), .b(b16), .d(1'b0), .p(p16[2]));
  approx_trunc_mult #(.N(24), .H(3))  u24_3  (.a(a24), .b(b24), .d(1'b0), .p(p24[0]));
  approx_trunc_mult #(.N(24), .H(7))  u24_7  (.a(a24), .b(b24), .d(1'b0), .p(p24[1]));
  approx_trunc_mult #(.N(24), .H(11)) u24_11 (.a(a24), .b(b24), .d(1'b0), .p(p24[2]));

  function automatic longint unsigned trunc_ref(longint unsigned x, longint unsigned y, int n);
    longint unsigned acc;
    acc = 0;
    for (int i = 0; i < n; i++)
      for (int j = 0; j < n; j++)
        if (i + j >= n && x[i] && y[j]) acc += 64'd1 << (i + j - n);
    return acc % (64'd1 << n);
  endfunction

  real sq_full16 [4], sq_full24 [4];   // index 3: plain truncation

  initial begin
    longint unsigned r16, r24;
    real f16, f24, e;
    int h16 [3] = '{3, 5, 7};
    int h24 [3] = '{3, 7, 11};
    real ps16 [4], ps24 [4];
    for (int k = 0; k < 4; k++) begin sq_full16[k] = 0.0; sq_full24[k] = 0.0; end
    for (int i = 0; i < SAMPLES; i++) begin
      @(negedge clk);
      a16 = 16'($urandom); b16 = 16'($urandom);
      a24 = 24'($urandom); b24 = 24'($urandom);
      #1;
      r16 = trunc_ref(a16, b16, 16);
      r24 = trunc_ref(a24, b24, 24);
      f16 = real'(a16) * real'(b16);
      f24 = real'(a24) * real'(b24);
      for (int k = 0; k < 3; k++) begin
        longint unsigned d16, d24;
        d16 = (r16 - p16[k]) % (64'd1 << 16);
        d24 = (r24 - p24[k]) % (64'd1 << 24);
        checks += 2;
        if (d16 > (64'd1 << h16[k])) begin failures++; $display("FAIL N=16 h=%0d err %0d", h16[k], d16); end
        if (d24 > (64'd1 << h24[k])) begin failures++; $display("FAIL N=24 h=%0d err %0d", h24[k], d24); end
        e = f16 - real'(p16[k]) * 65536.0;
        sq_full16[k] += e * e;
        e = f24 - real'(p24[k]) * 16777216.0;
        sq_full24[k] += e * e;
      end
      e = f16 - real'(r16) * 65536.0;
      sq_full16[3] += e * e;
      e = f24 - real'(r24) * 16777216.0;
      sq_full24[3] += e * e;
    end
    for (int k = 0; k < 4; k++) begin
      ps16[k] = 10.0 * $log10((2.0 ** 64) / (sq_full16[k] / SAMPLES));
      ps24[k] = 10.0 * $log10((2.0 ** 96) / (sq_full24[k] / SAMPLES));
    end
    $display("N=16: truncated %6.1f dB, h=3 %6.1f dB, h=5 %6.1f dB, h=7 %6.1f dB", ps16[3], ps16[0], ps16[1], ps16[2]);
    $display("N=24: truncated %6.1f dB, h=3 %6.1f dB, h=7 %6.1f dB, h=11 %6.1f dB", ps24[3], ps24[0], ps24[1], ps24[2]);
    checks += 2;
    if (!(ps16[3] >= ps16[0] && ps16[0] > ps16[1] && ps16[1] > ps16[2])) begin failures++; $display("FAIL N=16 PSNR order"); end
    if (!(ps24[3] >= ps24[0] && ps24[0] > ps24[1] && ps24[1] > ps24[2])) begin failures++; $display("FAIL N=24 PSNR order"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (SAMPLES + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
