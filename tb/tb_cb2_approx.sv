// tb_cb2_approx: exhaustive check of the inexact 2-bit bounding segments.
// For each realisation the total squared distance from the exact CUB
// (S | C) or CLB (S & C) function over the 16 input rows, computed here
// arithmetically, must equal the value the realisation is named for
// (CUB: 1, 2, 4; CLB: 1, 2, 6), no row may be off by more than 1, and the
// dithered copy must follow d.
module tb_cb2_approx;
  import approx_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [1:0] a, b;
  logic       d;
  logic [1:0] s_cub [3];
  logic [1:0] s_clb [3];
  logic [1:0] s_dith;

  cb2_approx #(.IMPL(CB_IMPL_TD1), .MODE(CB_CUB)) u_c1 (.a, .b, .d(1'b0), .s(s_cub[0]));
  cb2_approx                                       u_c2 (.a, .b, .d(1'b0), .s(s_cub[1]));
  cb2_approx #(.IMPL(CB_IMPL_MIN), .MODE(CB_CUB)) u_c4 (.a, .b, .d(1'b0), .s(s_cub[2]));
  cb2_approx #(.IMPL(CB_IMPL_TD1), .MODE(CB_CLB)) u_l1 (.a, .b, .d(1'b0), .s(s_clb[0]));
  cb2_approx #(.IMPL(CB_IMPL_TD2), .MODE(CB_CLB)) u_l2 (.a, .b, .d(1'b0), .s(s_clb[1]));
  cb2_approx #(.IMPL(CB_IMPL_MIN), .MODE(CB_CLB)) u_l6 (.a, .b, .d(1'b0), .s(s_clb[2]));
  cb2_approx #(.IMPL(CB_IMPL_TD2), .MODE(CB_DITHER)) u_d (.a, .b, .d, .s(s_dith));

  initial begin
    int td_cub [3], td_clb [3];
    int exp_cub [3] = '{1, 2, 4};
    int exp_clb [3] = '{1, 2, 6};
    int sum, ecub, eclb, dl;
    for (int k = 0; k < 3; k++) begin td_cub[k] = 0; td_clb[k] = 0; end
    for (int i = 0; i < 32; i++) begin
      {d, a, b} = 5'(i);
      #1;
      sum  = int'(a) + int'(b);
      ecub = (sum >= 4) ? 3 : sum;
      eclb = (sum >= 4) ? sum - 4 : 0;
      for (int k = 0; k < 3; k++) begin
        dl = int'(s_cub[k]) - ecub;
        if (!d) td_cub[k] += dl * dl;
        checks++;
        if (dl > 1 || dl < -1) begin failures++; $display("FAIL cub %0d row %0d", k, i); end
        dl = int'(s_clb[k]) - eclb;
        if (!d) td_clb[k] += dl * dl;
        checks++;
        if (dl > 1 || dl < -1) begin failures++; $display("FAIL clb %0d row %0d", k, i); end
      end
      checks++;
      if (s_dith != (d ? s_clb[1] : s_cub[1])) begin failures++; $display("FAIL dither row %0d", i); end
      @(posedge clk);
    end
    for (int k = 0; k < 3; k++) begin
      checks += 2;
      if (td_cub[k] != exp_cub[k]) begin failures++; $display("FAIL CUB TD %0d exp %0d", td_cub[k], exp_cub[k]); end
      if (td_clb[k] != exp_clb[k]) begin failures++; $display("FAIL CLB TD %0d exp %0d", td_clb[k], exp_clb[k]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
