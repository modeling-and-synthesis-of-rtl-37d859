// tb_seq_mult: checks the sequential shift-add multiplier. A cycle-by-cycle
// model replays the right-shift accumulation with the arithmetic AFIC
// reference and the h-1 dither bit, and the product must match it exactly;
// done must come exactly N = 16 cycles after start is accepted, and start
// while busy must be ignored. A copy built with h = 1 on operands whose
// accumulations never carry out of bit 0 (multiplicand even) must give the
// exact product, and the default copy's error must stay within the bound
// 2^h * (2^N - 1).
module tb_seq_mult;
  import approx_pkg::*;
  import approx_ref_pkg::*;

  localparam int N = 16;
  localparam int H = 4;

  int checks = 0, failures = 0;
  int n_ops = 0, n_inexact = 0, n_ignored = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic           start;
  logic [N-1:0]   a, b;
  logic           busy, done, busy1, done1;
  logic [2*N-1:0] p, p1;

  seq_mult u_dut (.clk, .rst_n, .start, .a, .b, .busy, .done, .p);
  seq_mult #(.H(1)) u_h1 (.clk, .rst_n, .start, .a, .b, .busy(busy1), .done(done1), .p(p1));

  function automatic longint unsigned model(longint unsigned x, longint unsigned y, int h);
    longint unsigned hi, lo, sm, addend;
    hi = 0; lo = y;
    for (int i = 0; i < N; i++) begin
      addend = lo[0] ? x : 0;
      sm = afic_ref(addend, hi, addend[h-1], 2, N, h, h);
      lo = (lo >> 1) | ((sm & 1) << (N - 1));
      hi = sm >> 1;
    end
    return (hi << N) | lo;
  endfunction

  task automatic run_one(logic [N-1:0] x, logic [N-1:0] y, bit exact_h1);
    int cyc;
    longint unsigned exp, tru;
    longint signed e;
    @(negedge clk);
    a = x; b = y; start = 1;
    @(posedge clk);
    @(negedge clk);
    start = 1;              // held while busy: must be ignored
    a = ~x; b = ~y;
    cyc = 1;
    while (!done) begin
      @(posedge clk);
      #1;
      if (!done) cyc++;
      if (cyc > 100) break;
    end
    start = 0;
    n_ignored++;
    exp = model(x, y, H);
    tru = longint'(x) * longint'(y);
    checks += 3;
    if (cyc != N) begin failures++; $display("FAIL latency %0d", cyc); end
    if (p != 32'(exp)) begin failures++; $display("FAIL p %0h*%0h got %0h model %0h", x, y, p, exp); end
    e = longint'(p) - longint'(tru);
    if (e < 0) e = -e;
    if (e > (longint'(1) << H) * ((longint'(1) << N) - 1)) begin failures++; $display("FAIL bound"); end
    if (p != 32'(tru)) n_inexact++;
    if (exact_h1) begin
      checks++;
      if (p1 != 32'(tru)) begin failures++; $display("FAIL h=1 exact %0h*%0h got %0h", x, y, p1); end
    end
    n_ops++;
    // let the ignored start drain: both copies must be idle afterwards
    @(negedge clk);
    checks++;
    if (busy || busy1) begin failures++; $display("FAIL restarted while start was held during busy"); end
  endtask

  initial begin
    start = 0; a = 0; b = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    run_one(16'd3, 16'd5, 1'b0);
    run_one(16'hfffe, 16'hffff, 1'b1);
    run_one(16'h0000, 16'h1234, 1'b1);
    for (int i = 0; i < 300; i++) begin
      logic [N-1:0] x;
      x = 16'($urandom);
      if (i % 2 == 0) x[0] = 1'b0;
      run_one(x, 16'($urandom), i % 2 == 0);
    end
    checks++;
    if (n_inexact == 0) begin failures++; $display("FAIL: approximation never visible"); end
    $display("products=%0d inexact=%0d", n_ops, n_inexact);
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
