// tb_exact_adder: checks the exact adder in all three carry structures
// (ripple, lookahead, Kogge-Stone) against integer addition, with random
// operands at the default width 7 and at width 16, plus all-ones and carry
// chain corner cases. Combinational; the clock only paces the stimulus.
module tb_exact_adder;
  import approx_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [6:0]  a7, b7;
  logic        cin;
  logic [6:0]  s7 [3];
  logic        c7 [3];
  logic [15:0] a16, b16;
  logic [15:0] s16 [3];
  logic        c16 [3];

  exact_adder                        u_def  (.a(a7), .b(b7), .cin(cin), .sum(s7[1]), .cout(c7[1]));
  exact_adder #(.W(7),  .ARCH(ARCH_RCA)) u_r7 (.a(a7), .b(b7), .cin(cin), .sum(s7[0]), .cout(c7[0]));
  exact_adder #(.W(7),  .ARCH(ARCH_KS))  u_k7 (.a(a7), .b(b7), .cin(cin), .sum(s7[2]), .cout(c7[2]));
  exact_adder #(.W(16), .ARCH(ARCH_RCA)) u_r16 (.a(a16), .b(b16), .cin(cin), .sum(s16[0]), .cout(c16[0]));
  exact_adder #(.W(16), .ARCH(ARCH_CLA)) u_c16 (.a(a16), .b(b16), .cin(cin), .sum(s16[1]), .cout(c16[1]));
  exact_adder #(.W(16), .ARCH(ARCH_KS))  u_k16 (.a(a16), .b(b16), .cin(cin), .sum(s16[2]), .cout(c16[2]));

  task automatic check_all();
    int unsigned e7, e16;
    e7  = a7 + b7 + cin;
    e16 = a16 + b16 + cin;
    for (int k = 0; k < 3; k++) begin
      checks += 2;
      if ({c7[k], s7[k]} != 8'(e7)) begin
        failures++;
        $display("FAIL W=7 arch=%0d %0d+%0d+%0d got %0d", k, a7, b7, cin, {c7[k], s7[k]});
      end
      if ({c16[k], s16[k]} != 17'(e16)) begin
        failures++;
        $display("FAIL W=16 arch=%0d %0d+%0d+%0d got %0d", k, a16, b16, cin, {c16[k], s16[k]});
      end
    end
  endtask

  initial begin
    a7 = 7'h7f; b7 = 7'h00; a16 = 16'hffff; b16 = 16'h0000; cin = 1;
    #1 check_all();
    a7 = 7'h7f; b7 = 7'h7f; a16 = 16'hffff; b16 = 16'hffff; cin = 1;
    #1 check_all();
    a7 = 7'h55; b7 = 7'h2a; a16 = 16'h5555; b16 = 16'haaaa; cin = 0;
    #1 check_all();
    for (int i = 0; i < 3000; i++) begin
      @(posedge clk);
      a7 = 7'($urandom); b7 = 7'($urandom); a16 = 16'($urandom); b16 = 16'($urandom);
      cin = 1'($urandom);
      #1 check_all();
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
