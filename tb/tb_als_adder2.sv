// tb_als_adder2: exhaustive check of the four 2-bit adder variants against
// the constraints they were synthesised for: the exact variant equals a + b;
// every approximate variant is within 1 of a + b on all 16 input pairs
// (magnitude limit M = 1); the frequency-limited variants are wrong on at
// most 2 and at most 1 of the 16 pairs. Also checks that F1 drives S0 = 1
// and really is approximate (errs on 8 pairs: every even true sum).
module tb_als_adder2;
  import approx_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [1:0] a, b;
  logic [2:0] y [4];

  als_adder2 #(.VARIANT(ALS_EXACT)) u0 (.a, .b, .c(y[0][2]), .s(y[0][1:0]));
  als_adder2                        u1 (.a, .b, .c(y[1][2]), .s(y[1][1:0]));
  als_adder2 #(.VARIANT(ALS_F1R2))  u2 (.a, .b, .c(y[2][2]), .s(y[2][1:0]));
  als_adder2 #(.VARIANT(ALS_F1R1))  u3 (.a, .b, .c(y[3][2]), .s(y[3][1:0]));

  int nerr [4];

  initial begin
    int t, e;
    foreach (nerr[k]) nerr[k] = 0;
    for (int i = 0; i < 16; i++) begin
      {a, b} = 4'(i);
      #1;
      t = int'(a) + int'(b);
      for (int k = 0; k < 4; k++) begin
        e = int'(y[k]) - t;
        if (e != 0) nerr[k]++;
        checks++;
        if (e > 1 || e < -1) begin
          failures++;
          $display("FAIL variant %0d a=%0d b=%0d got %0d", k, a, b, y[k]);
        end
      end
      checks++;
      if (y[1][0] != 1'b1) begin failures++; $display("FAIL F1 S0"); end
      @(posedge clk);
    end
    checks += 4;
    if (nerr[0] != 0) begin failures++; $display("FAIL exact variant errs on %0d", nerr[0]); end
    if (nerr[1] != 8) begin failures++; $display("FAIL F1 errs on %0d", nerr[1]); end
    if (nerr[2] > 2)  begin failures++; $display("FAIL F1,2/16 errs on %0d", nerr[2]); end
    if (nerr[3] > 1)  begin failures++; $display("FAIL F1,1/16 errs on %0d", nerr[3]); end
    $display("erroneous pairs: exact %0d, F1 %0d, F1,2/16 %0d, F1,1/16 %0d", nerr[0], nerr[1], nerr[2], nerr[3]);
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
