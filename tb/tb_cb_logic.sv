// tb_cb_logic: checks conditional bounding logic against the arithmetic
// definition: CUB forces the LSBs to all ones when the true carry is 1, CLB
// to all zeros when it is 0, the dithered block follows d, and a segmented
// block bounds every segment by its own carry. Exhaustive over small
// widths, random at the default h = 9. The literal-reduced builds are
// checked against their bitwise forms: with the TD2 segments CUB reduces to
// s = a | b on every bit (odd top bit included) and CLB to s = a1 & b1 in
// the low bit of each pair; with the MIN segments CUB gives
// {a1 | b1, 1} per pair; the dithered TD2 build follows d; c is the top
// bit's own carry a8 & b8 when h is odd.
module tb_cb_logic;
  import approx_pkg::*;
  import approx_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [8:0] a9, b9;
  logic       d;
  logic [8:0] s_def, s_cub, s_clb;
  logic       c_def, c_cub, c_clb;
  logic [3:0] a4, b4;
  logic [3:0] s_seg;
  logic       c_seg;
  logic [8:0] s_i_cub, s_i_dith;
  logic       c_i_cub, c_i_dith;
  logic [3:0] s_i4_clb, s_i4_min;
  logic       c_i4_clb, c_i4_min;

  cb_logic                        u_def (.a(a9), .b(b9), .d(d), .s(s_def), .c(c_def));
  cb_logic #(.MODE(CB_CUB), .ARCH(ARCH_RCA)) u_cub (.a(a9), .b(b9), .d(1'b0), .s(s_cub), .c(c_cub));
  cb_logic #(.MODE(CB_CLB), .ARCH(ARCH_KS))  u_clb (.a(a9), .b(b9), .d(1'b0), .s(s_clb), .c(c_clb));
  cb_logic #(.H(4), .SEG(2), .MODE(CB_CUB))  u_seg (.a(a4), .b(b4), .d(1'b0), .s(s_seg), .c(c_seg));

  cb_logic #(.MODE(CB_CUB), .IMPL(CB_IMPL_TD2)) u_i_cub  (.a(a9), .b(b9), .d(1'b0), .s(s_i_cub), .c(c_i_cub));
  cb_logic #(.IMPL(CB_IMPL_TD2))                u_i_dith (.a(a9), .b(b9), .d(d), .s(s_i_dith), .c(c_i_dith));
  cb_logic #(.H(4), .MODE(CB_CLB), .IMPL(CB_IMPL_TD2)) u_i4_clb (.a(a4), .b(b4), .d(1'b0), .s(s_i4_clb), .c(c_i4_clb));
  cb_logic #(.H(4), .MODE(CB_CUB), .IMPL(CB_IMPL_MIN)) u_i4_min (.a(a4), .b(b4), .d(1'b0), .s(s_i4_min), .c(c_i4_min));

  task automatic chk(string what, longint unsigned got, longint unsigned exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s a=%0d b=%0d d=%0d got %0d exp %0d", what, a9, b9, d, got, exp);
    end
  endtask

  // TD2 CLB over 9 bits: pairs give {0, a1 & b1}, the odd top bit a8 & b8
  function automatic logic [8:0] clb_td2_9(logic [8:0] x, logic [8:0] y);
    logic [8:0] r;
    r[8] = x[8] & y[8];
    for (int k = 0; k < 4; k++) begin
      r[2*k+1] = 1'b0;
      r[2*k]   = x[2*k+1] & y[2*k+1];
    end
    return r;
  endfunction

  task automatic check9();
    // reference on a 9-bit adder with no MSBs: afic_ref with n = h = 9 gives
    // {carry-in to MSB, LSBs}; keep the LSBs only
    chk("def", s_def, afic_ref(a9, b9, d, 2, 9, 9, 9) % 512);
    chk("cub", s_cub, afic_ref(a9, b9, 0, 0, 9, 9, 9) % 512);
    chk("clb", s_clb, afic_ref(a9, b9, 0, 1, 9, 9, 9) % 512);
    chk("c",   {c_def, c_cub, c_clb}, {3{lsb_carry(a9, b9, 9)}});
    chk("inexact cub", s_i_cub, a9 | b9);
    chk("inexact dith", s_i_dith, d ? clb_td2_9(a9, b9) : a9 | b9);
    chk("inexact c", {c_i_cub, c_i_dith}, {2{a9[8] & b9[8]}});
  endtask

  initial begin
    // exhaustive 4-bit, two 2-bit segments (each bounded by its own carry)
    for (int i = 0; i < 256; i++) begin
      {a4, b4} = 8'(i);
      #1;
      checks++;
      if (s_seg != 4'(afic_ref(a4, b4, 0, 0, 4, 4, 2)) || c_seg != lsb_carry(a4 >> 2, b4 >> 2, 2)) begin
        failures++;
        $display("FAIL seg a=%0d b=%0d got %0d/%0d", a4, b4, s_seg, c_seg);
      end
      checks += 2;
      if (s_i4_clb != {1'b0, a4[3] & b4[3], 1'b0, a4[1] & b4[1]} ||
          c_i4_clb != ((a4[3] & b4[3]) | ((a4[3] | b4[3]) & a4[2] & b4[2]))) begin
        failures++;
        $display("FAIL inexact clb a=%0d b=%0d got %0d/%0d", a4, b4, s_i4_clb, c_i4_clb);
      end
      if (s_i4_min != {a4[3] | b4[3], 1'b1, a4[1] | b4[1], 1'b1}) begin
        failures++;
        $display("FAIL inexact min a=%0d b=%0d got %0d", a4, b4, s_i4_min);
      end
    end
    // corner cases: carry exactly at the boundary
    a9 = 9'h1ff; b9 = 9'h001; d = 0; #1 check9();
    a9 = 9'h1ff; b9 = 9'h001; d = 1; #1 check9();
    a9 = 9'h0ff; b9 = 9'h100; d = 1; #1 check9();
    a9 = 9'h0ff; b9 = 9'h100; d = 0; #1 check9();
    for (int i = 0; i < 4000; i++) begin
      @(posedge clk);
      a9 = 9'($urandom); b9 = 9'($urandom); d = 1'($urandom);
      #1 check9();
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
