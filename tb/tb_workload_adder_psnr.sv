// tb_workload_adder_psnr: quality of the 16-bit AFIC adders on 10,000
// uniformly distributed random operand pairs, for h = 9 and h = 11, with
// exact CUB LSB logic and with h-1 dithering. Reports the mean error and
// PSNR = 10 log10(peak^2 / MSE) with peak = 2^16 (the operand range; this
// peak definition is a choice of this testbench). Checks the properties
// the structure guarantees: CUB never overestimates and errs by at most
// 2^h, the h-1 adder errs by at most 2^h in either direction, a larger h
// lowers PSNR, and h-1 dithering raises PSNR over CUB at the same h (by at
// least 3 dB) while bringing the mean error close to zero. The two h = 9
// results are also held against the published figures for exact CUB logic
// (52.9 dB) and exact h-1 dithering logic (61.9 dB), within 1 dB.
// The h = 9 adders are repeated with literal-reduced (inexact) 2-bit CB
// segments (TD2 and MIN realisations): each must lose PSNR against its
// exact-logic counterpart; CUB with the TD2 segments is held within 1 dB of
// the published 51.2 dB, h-1 with the MIN segments within 1 dB of 57.2 dB
// and h-1 with the TD2 segments within 1.5 dB of 58.6 dB. The MIN CUB
// result is reported only: the published minimum-literal CUB segment is a
// different function from the one used here.
// Mean relative error |error| / (a + b) is measured over the full operand
// range and over a reduced range (8-bit operands, below the h = 9 partition
// boundary). In the reduced range the exact CUB and exact h-1 adders must be
// error-free (the LSB carry is never set, so nothing is bounded); the
// inexact ones must err there, and all must stay under 1 % over the full
// range.
module tb_workload_adder_psnr;
  import approx_pkg::*;

  localparam int SAMPLES = 10000;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [15:0] a, b;
  logic [16:0] s_cub9, s_cub11, s_h9, s_h11;
  logic [16:0] s_cub9_td2, s_cub9_min, s_h9_td2, s_h9_min;
  logic        d9, d11, c9, c11, c9t, c9m, d9t, d9m;

  afic_adder #(.N(16), .H(9),  .MODE(CB_CUB)) u_cub9  (.a, .b, .d(1'b0), .s(s_cub9),  .c_lsb(c9));
  afic_adder #(.N(16), .H(11), .MODE(CB_CUB)) u_cub11 (.a, .b, .d(1'b0), .s(s_cub11), .c_lsb(c11));
  dithering_adder #(.N(16), .H(9))  u_h9  (.clk, .rst_n, .en(1'b1), .a, .b, .d_ext(1'b0), .s(s_h9),  .d(d9));
  dithering_adder #(.N(16), .H(11)) u_h11 (.clk, .rst_n, .en(1'b1), .a, .b, .d_ext(1'b0), .s(s_h11), .d(d11));

  afic_adder #(.N(16), .H(9), .MODE(CB_CUB), .IMPL(CB_IMPL_TD2)) u_cub9t (.a, .b, .d(1'b0), .s(s_cub9_td2), .c_lsb(c9t));
  afic_adder #(.N(16), .H(9), .MODE(CB_CUB), .IMPL(CB_IMPL_MIN)) u_cub9m (.a, .b, .d(1'b0), .s(s_cub9_min), .c_lsb(c9m));
  dithering_adder #(.N(16), .H(9), .IMPL(CB_IMPL_TD2)) u_h9t (.clk, .rst_n, .en(1'b1), .a, .b, .d_ext(1'b0), .s(s_h9_td2), .d(d9t));
  dithering_adder #(.N(16), .H(9), .IMPL(CB_IMPL_MIN)) u_h9m (.clk, .rst_n, .en(1'b1), .a, .b, .d_ext(1'b0), .s(s_h9_min), .d(d9m));

  real rel [8];
  real rel_small [8];
  real sq [8];
  real mean [8];
  real psnr [8];
  string names [8] = '{"CUB h=9", "CUB h=11", "h-1 h=9", "h-1 h=11",
                       "CUB TD2", "CUB MIN", "h-1 TD2", "h-1 MIN"};

  function automatic real db(real mse);
    return 10.0 * $log10((65536.0 * 65536.0) / mse);
  endfunction

  initial begin
    longint signed e [8];
    longint unsigned t;
    int hh [8] = '{9, 11, 9, 11, 9, 9, 9, 9};
    for (int k = 0; k < 8; k++) begin sq[k] = 0.0; mean[k] = 0.0; rel[k] = 0.0; rel_small[k] = 0.0; end
    rst_n = 1;
    for (int i = 0; i < SAMPLES; i++) begin
      @(negedge clk);
      a = 16'($urandom); b = 16'($urandom);
      #1;
      t = a + b;
      e[0] = longint'(s_cub9) - longint'(t);
      e[1] = longint'(s_cub11) - longint'(t);
      e[2] = longint'(s_h9) - longint'(t);
      e[3] = longint'(s_h11) - longint'(t);
      e[4] = longint'(s_cub9_td2) - longint'(t);
      e[5] = longint'(s_cub9_min) - longint'(t);
      e[6] = longint'(s_h9_td2) - longint'(t);
      e[7] = longint'(s_h9_min) - longint'(t);
      for (int k = 0; k < 8; k++) begin
        sq[k] += real'(e[k]) * real'(e[k]);
        if (t != 0) rel[k] += real'(e[k] < 0 ? -e[k] : e[k]) / real'(t);
        mean[k] += real'(e[k]);
        checks++;
        // only exact CUB logic never overestimates; the rest err within 2^h
        if (e[k] > ((k < 2) ? 0 : (longint'(1) << hh[k])) || e[k] < -(longint'(1) << hh[k])) begin
          failures++;
          $display("FAIL %s bound: a=%0h b=%0h e=%0d", names[k], a, b, e[k]);
        end
      end
    end
    // reduced range: both operands below 2^8
    for (int i = 0; i < SAMPLES; i++) begin
      @(negedge clk);
      a = 16'($urandom) & 16'h00ff; b = 16'($urandom) & 16'h00ff;
      #1;
      t = a + b;
      e[0] = longint'(s_cub9) - longint'(t);
      e[1] = longint'(s_cub11) - longint'(t);
      e[2] = longint'(s_h9) - longint'(t);
      e[3] = longint'(s_h11) - longint'(t);
      e[4] = longint'(s_cub9_td2) - longint'(t);
      e[5] = longint'(s_cub9_min) - longint'(t);
      e[6] = longint'(s_h9_td2) - longint'(t);
      e[7] = longint'(s_h9_min) - longint'(t);
      for (int k = 0; k < 8; k++)
        if (t != 0) rel_small[k] += real'(e[k] < 0 ? -e[k] : e[k]) / real'(t);
    end
    for (int k = 0; k < 8; k++) begin
      rel[k] = 100.0 * rel[k] / SAMPLES;
      rel_small[k] = 100.0 * rel_small[k] / SAMPLES;
      checks++;
      if (rel[k] >= 1.0) begin failures++; $display("FAIL %s relative error %f %%", names[k], rel[k]); end
      checks++;
      if ((k < 4) ? (rel_small[k] != 0.0) : (rel_small[k] < 5.0)) begin
        failures++;
        $display("FAIL %s reduced-range relative error %f %%", names[k], rel_small[k]);
      end
    end
    for (int k = 0; k < 8; k++) begin
      mean[k] = mean[k] / SAMPLES;
      psnr[k] = db(sq[k] / SAMPLES);
      $display("%-9s  mean error %9.2f  PSNR %6.2f dB  rel. err. full %5.2f %%  small %5.2f %%",
               names[k], mean[k], psnr[k], rel[k], rel_small[k]);
    end
    checks += 4;
    if (!(psnr[0] > psnr[1] && psnr[2] > psnr[3])) begin failures++; $display("FAIL larger h should lower PSNR"); end
    if (!(psnr[2] > psnr[0] + 3.0)) begin failures++; $display("FAIL h-1 dithering gain at h=9"); end
    if (!(psnr[3] > psnr[1] + 3.0)) begin failures++; $display("FAIL h-1 dithering gain at h=11"); end
    if (!((mean[2] < 0 ? -mean[2] : mean[2]) * 10.0 < -mean[0])) begin failures++; $display("FAIL mean not centred"); end
    checks += 2;
    if (psnr[0] < 51.9 || psnr[0] > 53.9) begin failures++; $display("FAIL CUB h=9 PSNR far from 52.9 dB"); end
    if (psnr[2] < 60.9 || psnr[2] > 62.9) begin failures++; $display("FAIL h-1 h=9 PSNR far from 61.9 dB"); end
    checks += 7;
    if (!(psnr[4] < psnr[0] && psnr[5] < psnr[0])) begin failures++; $display("FAIL inexact CUB not below exact"); end
    if (!(psnr[6] < psnr[2] && psnr[7] < psnr[2])) begin failures++; $display("FAIL inexact h-1 not below exact"); end
    if (!(psnr[6] > psnr[4] + 3.0)) begin failures++; $display("FAIL h-1 gain with TD2 segments"); end
    if (!(psnr[7] > psnr[5] + 3.0)) begin failures++; $display("FAIL h-1 gain with MIN segments"); end
    if (psnr[4] < 50.2 || psnr[4] > 52.2) begin failures++; $display("FAIL CUB TD2 PSNR far from 51.2 dB"); end
    if (psnr[7] < 56.2 || psnr[7] > 58.2) begin failures++; $display("FAIL h-1 MIN PSNR far from 57.2 dB"); end
    if (psnr[6] < 57.1 || psnr[6] > 60.1) begin failures++; $display("FAIL h-1 TD2 PSNR far from 58.6 dB"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2 * SAMPLES + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
