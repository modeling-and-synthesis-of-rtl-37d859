// tb_dithering_adder: checks the dithering adder (default: 16 bits, h = 9,
// h-1 scheme) and a clock-dithered and a history-dithered copy. Each sum is
// compared with the arithmetic AFIC reference under the dither bit a model
// of the scheme predicts. Then, over a run of random additions, the mean
// error of each dithered adder must be much closer to zero than that of a
// plain CUB adder, and the h-1 adder must be exact whenever A[h-1] = B[h-1].
module tb_dithering_adder;
  import approx_pkg::*;
  import approx_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        en;
  logic [15:0] a, b;
  logic [16:0] s_h1, s_clk, s_his, s_cub;
  logic        d_h1, d_clk, d_his;
  logic        c_cub;

  dithering_adder u_h1 (.clk, .rst_n, .en, .a, .b, .d_ext(1'b0), .s(s_h1), .d(d_h1));
  dithering_adder #(.SRC(DITH_CLOCK), .ARCH(ARCH_RCA)) u_clk
    (.clk, .rst_n, .en, .a, .b, .d_ext(1'b0), .s(s_clk), .d(d_clk));
  dithering_adder #(.SRC(DITH_HISTORY), .ARCH(ARCH_KS)) u_his
    (.clk, .rst_n, .en, .a, .b, .d_ext(1'b0), .s(s_his), .d(d_his));
  afic_adder #(.MODE(CB_CUB)) u_cub (.a, .b, .d(1'b0), .s(s_cub), .c_lsb(c_cub));

  bit m_clk, m_his;
  longint signed sum_e_h1, sum_e_clk, sum_e_his, sum_e_cub;
  int n_d0, n_d1, n_pred;

  task automatic chk(string what, longint unsigned got, longint unsigned exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s a=%0h b=%0h got %0h exp %0h", what, a, b, got, exp);
    end
  endtask

  initial begin
    en = 0; a = 0; b = 0;
    sum_e_h1 = 0; sum_e_clk = 0; sum_e_his = 0; sum_e_cub = 0;
    n_d0 = 0; n_d1 = 0; n_pred = 0;
    m_clk = 0; m_his = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      en = 1; a = 16'($urandom); b = 16'($urandom);
      #1;
      chk("h1 d",  d_h1, a[8]);
      chk("clk d", d_clk, m_clk);
      chk("his d", d_his, m_his);
      chk("h1",  s_h1,  afic_ref(a, b, a[8],  2, 16, 9, 9));
      chk("clk", s_clk, afic_ref(a, b, m_clk, 2, 16, 9, 9));
      chk("his", s_his, afic_ref(a, b, m_his, 2, 16, 9, 9));
      if (a[8] == b[8]) begin
        n_pred++;
        chk("h1 exact when predictable", s_h1, a + b);
      end
      if (d_h1) n_d1++; else n_d0++;
      sum_e_h1  += longint'(s_h1)  - longint'(a + b);
      sum_e_clk += longint'(s_clk) - longint'(a + b);
      sum_e_his += longint'(s_his) - longint'(a + b);
      sum_e_cub += longint'(s_cub) - longint'(a + b);
      @(posedge clk);
      m_clk = ~m_clk;
      if (lsb_carry(a, b, 9) != m_his) m_his = ~m_his;
    end
    $display("accumulated error over 4000 additions: CUB %0d, h-1 %0d, clock %0d, history %0d",
             sum_e_cub, sum_e_h1, sum_e_clk, sum_e_his);
    checks += 4;
    if (sum_e_cub >= 0) begin failures++; $display("FAIL CUB should underestimate"); end
    if (4 * (sum_e_h1  < 0 ? -sum_e_h1  : sum_e_h1)  > -sum_e_cub) begin failures++; $display("FAIL h-1 averaging"); end
    if (4 * (sum_e_clk < 0 ? -sum_e_clk : sum_e_clk) > -sum_e_cub) begin failures++; $display("FAIL clock averaging"); end
    if (4 * (sum_e_his < 0 ? -sum_e_his : sum_e_his) > -sum_e_cub) begin failures++; $display("FAIL history averaging"); end
    checks++;
    if (n_d0 == 0 || n_d1 == 0 || n_pred == 0) begin
      failures++;
      $display("FAIL coverage d0=%0d d1=%0d predictable=%0d", n_d0, n_d1, n_pred);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
