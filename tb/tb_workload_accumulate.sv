// tb_workload_accumulate: error accumulation in chains of additions, the
// situation dithering is meant for. Five 24-bit ripple-based AFIC adders
// with h = 10 LSBs each keep their own accumulator: a plain CUB adder and
// dithering adders driven by the random, clock, history and h-1 schemes.
// 400 chains of 32 additions of random 18-bit values are run; the error of
// each final sum against the exact sum is collected. Reports mean and
// standard deviation per scheme and checks that every dithering scheme has
// a much smaller mean error and a smaller mean squared error than CUB
// (random dithering spreads the error more widely than CUB, but centres
// it on zero), and that every
// intermediate sum of each adder stays within its per-addition bound.
module tb_workload_accumulate;
  import approx_pkg::*;
  import approx_ref_pkg::*;

  localparam int N = 24, H = 10, CHAINS = 400, LEN = 32;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [N-1:0] x;
  logic [N-1:0] acc [5];
  logic [N:0]   s   [5];
  logic         dd  [4];
  logic         c_cub;

  afic_adder #(.N(N), .H(H), .MODE(CB_CUB), .ARCH(ARCH_RCA)) u_cub
    (.a(x), .b(acc[0]), .d(1'b0), .s(s[0]), .c_lsb(c_cub));
  dithering_adder #(.N(N), .H(H), .ARCH(ARCH_RCA), .SRC(DITH_RANDOM))  u_rnd
    (.clk, .rst_n, .en(1'b1), .a(x), .b(acc[1]), .d_ext(1'b0), .s(s[1]), .d(dd[0]));
  dithering_adder #(.N(N), .H(H), .ARCH(ARCH_RCA), .SRC(DITH_CLOCK))   u_clk
    (.clk, .rst_n, .en(1'b1), .a(x), .b(acc[2]), .d_ext(1'b0), .s(s[2]), .d(dd[1]));
  dithering_adder #(.N(N), .H(H), .ARCH(ARCH_RCA), .SRC(DITH_HISTORY)) u_his
    (.clk, .rst_n, .en(1'b1), .a(x), .b(acc[3]), .d_ext(1'b0), .s(s[3]), .d(dd[2]));
  dithering_adder #(.N(N), .H(H), .ARCH(ARCH_RCA), .SRC(DITH_H1))      u_h1
    (.clk, .rst_n, .en(1'b1), .a(x), .b(acc[4]), .d_ext(1'b0), .s(s[4]), .d(dd[3]));

  string names [5] = '{"CUB", "random", "clock", "history", "h-1"};

  initial begin
    real m [5], v [5], e;
    longint unsigned exact;
    for (int k = 0; k < 5; k++) begin m[k] = 0.0; v[k] = 0.0; end
    x = '0;
    foreach (acc[k]) acc[k] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < CHAINS; c++) begin
      exact = 0;
      foreach (acc[k]) acc[k] = '0;
      for (int i = 0; i < LEN; i++) begin
        @(negedge clk);
        x = N'($urandom % (1 << 18));
        #1;
        for (int k = 0; k < 5; k++) begin
          longint signed de;
          de = longint'(s[k]) - longint'(x) - longint'(acc[k]);
          checks++;
          if (de > (longint'(1) << H) || de < -(longint'(1) << H) || (k == 0 && de > 0)) begin
            failures++;
            $display("FAIL %s step error %0d", names[k], de);
          end
        end
        exact += x;
        @(posedge clk);
        for (int k = 0; k < 5; k++) acc[k] = s[k][N-1:0];
      end
      for (int k = 0; k < 5; k++) begin
        e = real'(longint'(acc[k]) - longint'(exact));
        m[k] += e;
        v[k] += e * e;
      end
    end
    for (int k = 0; k < 5; k++) begin
      m[k] = m[k] / CHAINS;
      v[k] = v[k] / CHAINS;     // mean squared error
      $display("%-8s final-sum error: mean %10.1f  std dev %9.1f  rms %9.1f", names[k], m[k],
               $sqrt(v[k] - m[k] * m[k]), $sqrt(v[k]));
    end
    for (int k = 1; k < 5; k++) begin
      checks += 2;
      if (!((m[k] < 0 ? -m[k] : m[k]) * 4.0 < -m[0])) begin failures++; $display("FAIL %s mean", names[k]); end
      if (!(v[k] < v[0])) begin failures++; $display("FAIL %s mean squared error", names[k]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (CHAINS * LEN + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
