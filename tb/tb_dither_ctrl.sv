// tb_dither_ctrl: checks every dither scheme cycle by cycle against a model:
// external and h-1 follow their inputs, the clock scheme alternates on each
// enabled addition, the history scheme flips only after a mismatch between
// hardwired and true carry, the random scheme follows the LFSR sequence.
// Also checks reset values and that en = 0 holds the state.
module tb_dither_ctrl;
  import approx_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic en, d_ext, a_h1, c_lsb;
  logic d_ext_o, d_clk, d_his, d_h1, d_rnd;

  dither_ctrl #(.SRC(DITH_EXTERNAL)) u_ext (.clk, .rst_n, .en, .d_ext, .a_h1, .c_lsb, .d(d_ext_o));
  dither_ctrl #(.SRC(DITH_CLOCK))    u_clk (.clk, .rst_n, .en, .d_ext, .a_h1, .c_lsb, .d(d_clk));
  dither_ctrl #(.SRC(DITH_HISTORY))  u_his (.clk, .rst_n, .en, .d_ext, .a_h1, .c_lsb, .d(d_his));
  dither_ctrl                        u_h1  (.clk, .rst_n, .en, .d_ext, .a_h1, .c_lsb, .d(d_h1));
  dither_ctrl #(.SRC(DITH_RANDOM))   u_rnd (.clk, .rst_n, .en, .d_ext, .a_h1, .c_lsb, .d(d_rnd));

  bit          m_clk, m_his;
  logic [15:0] m_lfsr;
  int          n_flip_his = 0, n_hold_his = 0;

  task automatic chk(string what, bit got, bit exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s at %0t got %0d exp %0d", what, $time, got, exp);
    end
  endtask

  initial begin
    en = 0; d_ext = 0; a_h1 = 0; c_lsb = 0;
    m_clk = 0; m_his = 0; m_lfsr = 16'hACE1;
    repeat (2) @(posedge clk);
    #1;
    chk("reset clk", d_clk, 0);
    chk("reset his", d_his, 0);
    chk("reset rnd", d_rnd, 1'b1);   // 0xACE1 has LSB 1
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      en = 1'($urandom); d_ext = 1'($urandom); a_h1 = 1'($urandom); c_lsb = 1'($urandom);
      #1;
      chk("ext", d_ext_o, d_ext);
      chk("h1",  d_h1,  a_h1);
      chk("clk", d_clk, m_clk);
      chk("his", d_his, m_his);
      chk("rnd", d_rnd, m_lfsr[0]);
      @(posedge clk);
      if (en) begin
        m_clk = ~m_clk;
        if (c_lsb != m_his) begin m_his = ~m_his; n_flip_his++; end
        else n_hold_his++;
        m_lfsr = {m_lfsr[14:0], m_lfsr[15] ^ m_lfsr[13] ^ m_lfsr[12] ^ m_lfsr[10]};
      end
    end
    checks++;
    if (n_flip_his == 0 || n_hold_his == 0) begin
      failures++;
      $display("FAIL history coverage flips=%0d holds=%0d", n_flip_his, n_hold_his);
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
