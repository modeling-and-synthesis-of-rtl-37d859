// tb_afic_adder: checks the AFIC adder against the arithmetic reference for
// the default 16-bit, h = 9 dithered adder (both dither values), CUB and CLB
// variants on ripple and Kogge-Stone bases, and a 24-bit adder with the LSB
// block split into segments. Also checks the properties the structure
// promises: exact when the true LSB carry equals the hardwired carry, error
// sign (CUB never over-, CLB never under-estimates) and |error| <= 2^h.
module tb_afic_adder;
  import approx_pkg::*;
  import approx_ref_pkg::*;

  int checks = 0, failures = 0;
  int n_exact = 0, n_err = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [15:0] a, b;
  logic        d;
  logic [16:0] s_def, s_cub, s_clb;
  logic        c_def, c_cub, c_clb;
  logic [23:0] a24, b24;
  logic [24:0] s24;
  logic        c24;

  afic_adder u_def (.a(a), .b(b), .d(d), .s(s_def), .c_lsb(c_def));
  afic_adder #(.MODE(CB_CUB), .ARCH(ARCH_RCA)) u_cub (.a(a), .b(b), .d(1'b0), .s(s_cub), .c_lsb(c_cub));
  afic_adder #(.MODE(CB_CLB), .ARCH(ARCH_KS))  u_clb (.a(a), .b(b), .d(1'b0), .s(s_clb), .c_lsb(c_clb));
  afic_adder #(.N(24), .H(12), .SEG(3), .MODE(CB_CUB), .ARCH(ARCH_RCA)) u_seg
    (.a(a24), .b(b24), .d(1'b0), .s(s24), .c_lsb(c24));

  task automatic chk(string what, longint unsigned got, longint unsigned exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s a=%0h b=%0h d=%0d got %0h exp %0h", what, a, b, d, got, exp);
    end
  endtask

  task automatic check_all();
    longint signed e_cub, e_clb, e_def;
    longint unsigned t;
    bit c;
    t = a + b;
    c = lsb_carry(a, b, 9);
    chk("def", s_def, afic_ref(a, b, d, 2, 16, 9, 9));
    chk("cub", s_cub, afic_ref(a, b, 0, 0, 16, 9, 9));
    chk("clb", s_clb, afic_ref(a, b, 0, 1, 16, 9, 9));
    chk("carry", {c_def, c_cub, c_clb}, {3{c}});
    e_cub = longint'(s_cub) - longint'(t);
    e_clb = longint'(s_clb) - longint'(t);
    e_def = longint'(s_def) - longint'(t);
    checks += 3;
    if (e_cub > 0 || e_cub < -512) begin failures++; $display("FAIL cub error %0d", e_cub); end
    if (e_clb < 0 || e_clb > 512)  begin failures++; $display("FAIL clb error %0d", e_clb); end
    if ((c == d) != (e_def == 0))  begin failures++; $display("FAIL def exactness c=%0d d=%0d e=%0d", c, d, e_def); end
    if (e_def == 0) n_exact++; else n_err++;
    chk("seg", s24, afic_ref(a24, b24, 0, 0, 24, 12, 3));
  endtask

  initial begin
    a = 16'h01ff; b = 16'h0001; d = 0; a24 = '1; b24 = 24'h1; #1 check_all();
    d = 1; #1 check_all();
    a = 16'hffff; b = 16'hffff; d = 0; a24 = 24'h000fff; b24 = 24'h000fff; #1 check_all();
    d = 1; #1 check_all();
    a = 16'h0000; b = 16'h0000; d = 1; #1 check_all();
    for (int i = 0; i < 5000; i++) begin
      @(posedge clk);
      a = 16'($urandom); b = 16'($urandom); d = 1'($urandom);
      a24 = 24'($urandom); b24 = 24'($urandom);
      #1 check_all();
    end
    // both exact and erroneous additions must have been seen
    checks++;
    if (n_exact == 0 || n_err == 0) begin
      failures++;
      $display("FAIL coverage exact=%0d err=%0d", n_exact, n_err);
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
