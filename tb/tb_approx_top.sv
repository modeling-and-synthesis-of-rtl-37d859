// tb_approx_top: end-to-end test of the whole design at its default sizes.
// Runs additions through the 16-bit h-1 dithering adders (exact and
// literal-reduced LSB logic), products through
// the truncated multiplier and the sequential multiplier (in parallel), and
// all 16 input pairs through the 2-bit adders. Every result is compared with
// an arithmetic reference. Counts how often each mechanism occurs (dither
// bit 0 and 1, hardwired carry matching and mismatching the true LSB carry,
// LSB saturation to all ones and all zeros, an inexact-LSB result that
// differs from the exact-LSB one, a multiplier result changed by
// the AFIC last stage, a sequential product completing, a start ignored while
// busy, an approximate 2-bit output) and fails for any that never happened.
module tb_approx_top;
  import approx_pkg::*;
  import approx_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        add_en, add_d_ext, add_d;
  logic [15:0] add_a, add_b;
  logic [16:0] add_s;
  logic [15:0] opt_a, opt_b;
  logic [16:0] opt_s;
  logic [15:0] mul_a, mul_b, mul_p;
  logic        seq_start, seq_busy, seq_done;
  logic [15:0] seq_a, seq_b;
  logic [31:0] seq_p;
  logic [1:0]  als_a, als_b;
  logic [2:0]  als_y_exact, als_y_f1, als_y_f1r2, als_y_f1r1;

  approx_top dut (.*);

  int n_d0, n_d1, n_match, n_mismatch, n_sat1, n_sat0, n_mul_afic, n_seq, n_seq_ignored, n_als, n_opt;

  // reference for the inexact (TD2) h-1 adder: upper 7 bits add with carry
  // d = a[8]; for d = 0 every LSB is a | b (2-bit TD2 CUB segments and the
  // exact 1-bit top segment), for d = 1 each pair gives {0, a1 & b1} and bit
  // 8 gives a8 & b8
  function automatic longint unsigned opt_ref(logic [15:0] x, logic [15:0] y);
    logic [8:0] l;
    logic       d;
    d = x[8];
    if (!d) l = x[8:0] | y[8:0];
    else begin
      l[8] = x[8] & y[8];
      for (int k = 0; k < 4; k++) begin
        l[2*k+1] = 1'b0;
        l[2*k]   = x[2*k+1] & y[2*k+1];
      end
    end
    return ((longint'(x[15:9]) + longint'(y[15:9]) + longint'(d)) << 9) | longint'(l);
  endfunction

  task automatic chk(string what, longint unsigned got, longint unsigned exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got %0h exp %0h", what, got, exp);
    end
  endtask

  function automatic longint unsigned trunc_ref(longint unsigned x, longint unsigned y);
    longint unsigned acc;
    acc = 0;
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++)
        if (i + j >= 16 && x[i] && y[j]) acc += 64'd1 << (i + j - 16);
    return acc % (64'd1 << 16);
  endfunction

  function automatic longint unsigned seq_model(longint unsigned x, longint unsigned y);
    longint unsigned hi, lo, sm, addend;
    hi = 0; lo = y;
    for (int i = 0; i < 16; i++) begin
      addend = lo[0] ? x : 0;
      sm = afic_ref(addend, hi, addend[3], 2, 16, 4, 4);
      lo = (lo >> 1) | ((sm & 1) << 15);
      hi = sm >> 1;
    end
    return (hi << 16) | lo;
  endfunction

  // sequential multiplier driver, runs alongside the combinational tests
  initial begin : seq_driver
    longint unsigned exp;
    int cyc;
    seq_start = 0; seq_a = 0; seq_b = 0;
    wait (rst_n);
    for (int i = 0; i < 60; i++) begin
      @(negedge clk);
      seq_a = 16'($urandom); seq_b = 16'($urandom); seq_start = 1;
      exp = seq_model(seq_a, seq_b);
      @(posedge clk);
      @(negedge clk);
      seq_a = 16'($urandom);          // a new request while busy is ignored
      cyc = 1;
      while (!seq_done && cyc < 100) begin
        @(posedge clk);
        #1;
        if (!seq_done) cyc++;
      end
      seq_start = 0;
      n_seq_ignored++;
      chk("seq latency", cyc, 16);
      chk("seq product", seq_p, exp);
      n_seq++;
    end
  end

  initial begin
    longint unsigned r, t;
    add_en = 0; add_d_ext = 0; add_a = 0; add_b = 0; opt_a = 0; opt_b = 0; n_opt = 0; mul_a = 0; mul_b = 0; als_a = 0; als_b = 0;
    n_d0 = 0; n_d1 = 0; n_match = 0; n_mismatch = 0; n_sat1 = 0; n_sat0 = 0;
    n_mul_afic = 0; n_seq = 0; n_seq_ignored = 0; n_als = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 1200; i++) begin
      @(negedge clk);
      add_en = 1;
      add_a = 16'($urandom); add_b = 16'($urandom); add_d_ext = 1'($urandom);
      mul_a = 16'($urandom); mul_b = 16'($urandom);
      opt_a = add_a; opt_b = 16'($urandom);
      {als_a, als_b} = 4'(i);
      #1;
      // dithering adder
      chk("add d", add_d, add_a[8]);
      chk("add s", add_s, afic_ref(add_a, add_b, add_a[8], 2, 16, 9, 9));
      if (add_d) n_d1++; else n_d0++;
      if (lsb_carry(add_a, add_b, 9) == add_d) n_match++;
      else begin
        n_mismatch++;
        if (add_d) n_sat0++; else n_sat1++;
        checks++;
        if (add_d ? (add_s[8:0] != 9'h000) : (add_s[8:0] != 9'h1ff)) begin
          failures++;
          $display("FAIL LSB saturation");
        end
      end
      // inexact-LSB h-1 adder
      chk("opt s", opt_s, opt_ref(opt_a, opt_b));
      if (opt_s != 17'(afic_ref(opt_a, opt_b, opt_a[8], 2, 16, 9, 9))) n_opt++;
      // truncated multiplier, AFIC-CUB h = 5
      r = trunc_ref(mul_a, mul_b);
      t = (r - mul_p) % (64'd1 << 16);
      checks++;
      if (t > 32) begin failures++; $display("FAIL mul %0h*%0h got %0h ref %0h", mul_a, mul_b, mul_p, r); end
      if (t != 0) n_mul_afic++;
      // 2-bit adders
      t = als_a + als_b;
      chk("als exact", als_y_exact, t);
      checks += 3;
      if (als_y_f1   > t + 1 || als_y_f1   + 1 < t) begin failures++; $display("FAIL F1"); end
      if (als_y_f1r2 > t + 1 || als_y_f1r2 + 1 < t) begin failures++; $display("FAIL F1,2/16"); end
      if (als_y_f1r1 > t + 1 || als_y_f1r1 + 1 < t) begin failures++; $display("FAIL F1,1/16"); end
      if (als_y_f1 != t[2:0] || als_y_f1r2 != t[2:0] || als_y_f1r1 != t[2:0]) n_als++;
      @(posedge clk);
    end
    wait (n_seq == 60);
    $display("mechanisms: d0=%0d d1=%0d carry-match=%0d mismatch=%0d sat-ones=%0d sat-zeros=%0d mul-afic-err=%0d seq-products=%0d seq-ignored-starts=%0d als-approx=%0d inexact-lsb=%0d",
             n_d0, n_d1, n_match, n_mismatch, n_sat1, n_sat0, n_mul_afic, n_seq, n_seq_ignored, n_als, n_opt);
    checks++;
    if (n_d0 == 0 || n_d1 == 0 || n_match == 0 || n_mismatch == 0 || n_sat1 == 0 || n_sat0 == 0 ||
        n_mul_afic == 0 || n_seq == 0 || n_seq_ignored == 0 || n_als == 0 || n_opt == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
