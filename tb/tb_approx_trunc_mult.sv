// tb_approx_trunc_mult: checks the truncated multiplier with AFIC last stage.
// The reference for the truncated product is the sum of the partial-product
// bits a_i*b_j with i+j >= N, divided by 2^N (computed bit by bit, modulo
// 2^N). The approximate output must lie within the AFIC bound of it: at most
// 2^h below for CUB, at most 2^h above for CLB. Exact outputs are checked
// where the final two rows cannot carry across the h boundary (an operand
// of zero, or a single partial-product row). The truncation loss against the full product
// must stay below N (the dropped columns). Default N = 16, h = 5; also a
// CLB copy and an N = 24, h = 7 copy.
module tb_approx_trunc_mult;
  import approx_pkg::*;

  int checks = 0, failures = 0;
  int n_err = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [15:0] a, b;
  logic [15:0] p_def, p_clb;
  logic [23:0] a24, b24;
  logic [23:0] p24;

  approx_trunc_mult u_def (.a, .b, .d(1'b0), .p(p_def));
  approx_trunc_mult #(.MODE(CB_CLB), .ARCH(ARCH_CLA)) u_clb (.a, .b, .d(1'b0), .p(p_clb));
  approx_trunc_mult #(.N(24), .H(7), .ARCH(ARCH_KS)) u_24 (.a(a24), .b(b24), .d(1'b0), .p(p24));

  function automatic longint unsigned trunc_ref(longint unsigned x, longint unsigned y, int n);
    longint unsigned acc;
    acc = 0;
    for (int i = 0; i < n; i++)
      for (int j = 0; j < n; j++)
        if (i + j >= n && x[i] && y[j]) acc += 64'd1 << (i + j - n);
    return acc % (64'd1 << n);
  endfunction

  // signed difference got - ref modulo 2^n
  function automatic longint signed mdiff(longint unsigned got, longint unsigned r, int n);
    longint signed dlt;
    dlt = longint'((got - r) % (64'd1 << n));
    if (dlt >= (64'sd1 << (n - 1))) dlt -= (64'sd1 << n);
    return dlt;
  endfunction

  task automatic check_all();
    longint unsigned r16, r24, full;
    longint signed e;
    r16 = trunc_ref(a, b, 16);
    r24 = trunc_ref(a24, b24, 24);
    // truncation itself: ref is at most N-1 below the true upper product half
    full = (longint'(a) * longint'(b)) >> 16;
    checks++;
    if (full < r16 || full - r16 > 15) begin failures++; $display("FAIL truncation ref %0d vs %0d", r16, full); end
    e = mdiff(p_def, r16, 16);
    checks++;
    if (e > 0 || e < -32) begin failures++; $display("FAIL cub a=%0h b=%0h got %0h ref %0h", a, b, p_def, r16); end
    if (e != 0) n_err++;
    e = mdiff(p_clb, r16, 16);
    checks++;
    if (e < 0 || e > 32) begin failures++; $display("FAIL clb a=%0h b=%0h got %0h ref %0h", a, b, p_clb, r16); end
    e = mdiff(p24, r24, 24);
    checks++;
    if (e > 0 || e < -128) begin failures++; $display("FAIL 24 a=%0h b=%0h got %0h ref %0h", a24, b24, p24, r24); end
  endtask

  initial begin
    // zero operands: every row is zero, result must be exactly zero
    a = 0; b = 16'hffff; a24 = 0; b24 = '1; #1 check_all();
    checks += 2;
    if (p_def != 0 || p24 != 0) begin failures++; $display("FAIL zero"); end
    // CLB: both rows zero, true LSB carry 0 but the hardwired carry adds 2^h
    checks++;
    if (p_clb != 16'd32) begin failures++; $display("FAIL clb zero %0h", p_clb); end
    // a single partial-product row: b = 2^15, product upper half = a >> 1
    a = 16'hbeef; b = 16'h8000; a24 = 24'h123456; b24 = 24'h800000; #1 check_all();
    checks += 2;
    if (p_def != 16'(16'hbeef >> 1)) begin failures++; $display("FAIL single row %0h", p_def); end
    if (p24 != 24'(24'h123456 >> 1)) begin failures++; $display("FAIL single row 24 %0h", p24); end
    a = 16'hffff; b = 16'hffff; a24 = '1; b24 = '1; #1 check_all();
    for (int i = 0; i < 3000; i++) begin
      @(posedge clk);
      a = 16'($urandom); b = 16'($urandom); a24 = 24'($urandom); b24 = 24'($urandom);
      #1 check_all();
    end
    checks++;
    if (n_err == 0) begin failures++; $display("FAIL: AFIC last stage never produced an error"); end
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
