// tb_control_unit: checks the control unit against a reference model.
//
// The model here applies the search rule step by step: in acquisition the
// frequency gain is halved before the step when fast differs from its
// previous value, then the gain is subtracted when fast is high and added
// when it is low, saturating at 0 and 2047; a lock pulse with the frequency
// gain at 8 or less switches to maintenance, where the phase gain (its own
// model) is used. The test runs closed loops against an ideal plant
// (fast = word above a target) for several targets, which must settle within
// two LSB of the target and enter maintenance within 15 cycles, then random
// fast/lock/enable sequences, comparing the word, both gains and the mode
// every cycle.
`timescale 1ps/1fs
module tb_control_unit;
  import adpll_pkg::*;
  logic       clk = 1'b0, rst_n = 1'b1, enable = 1'b1, fast = 1'b0, lock = 1'b0;
  ctrl_word_t ctrl, fgain;
  logic       locked;
  logic [3:0] pgain;
  int checks = 0, failures = 0;

  control_unit u_dut (.clk, .rst_n, .enable, .fast, .lock, .ctrl, .locked, .fgain, .pgain);

  always #10000 clk = ~clk;

  // Reference model state.
  int   m_word, m_fgain, m_pgain, m_run;
  bit   m_locked, m_prev, m_have, m_pprev;

  task automatic model_reset();
    m_word = 1024; m_fgain = 512; m_pgain = 1; m_run = 0;
    m_locked = 0; m_prev = 0; m_have = 0; m_pprev = 0;
  endtask

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic model_step(input bit en, input bit f, input bit l);
    int g;
    if (!en) return;
    if (!m_locked && l && m_fgain <= 8) begin
      m_locked = 1;
      m_pgain = 1; m_run = 1; m_pprev = f;
      g = 1;
    end else if (m_locked) begin
      if (f != m_pprev) begin
        m_run = 1;
        if (m_pgain > 1) m_pgain = m_pgain / 2;
      end else if (m_run + 1 >= 8) begin
        m_run = 0;
        if (m_pgain < 8) m_pgain = m_pgain * 2;
      end else m_run++;
      m_pprev = f;
      g = m_pgain;
    end else begin
      if (m_have && f != m_prev && m_fgain > 1) m_fgain = m_fgain / 2;
      g = m_fgain;
    end
    m_word = f ? m_word - g : m_word + g;
    if (m_word < 0) m_word = 0;
    if (m_word > 2047) m_word = 2047;
    m_prev = f;
    m_have = 1;
  endtask

  task automatic cycle(input bit en, input bit f, input bit l);
    enable = en; fast = f; lock = l;
    @(posedge clk);
    #1;
    model_step(en, f, l);
    check(int'(ctrl) == m_word, $sformatf("word %0d expected %0d", ctrl, m_word));
    check(locked == m_locked, $sformatf("locked %b expected %b", locked, m_locked));
    check(m_locked || int'(fgain) == m_fgain, $sformatf("fgain %0d expected %0d", fgain, m_fgain));
    check(!m_locked || int'(pgain) == m_pgain, $sformatf("pgain %0d expected %0d", pgain, m_pgain));
  endtask

  task automatic do_reset();
    rst_n = 1'b0;
    #100;
    rst_n = 1'b1;
    model_reset();
    #1;
    check(int'(ctrl) == 1024 && !locked, "reset state");
  endtask

  initial begin
    int targets [8] = '{0, 1, 300, 777, 1023, 1024, 1500, 2046};
    #10 rst_n = 1'b0;
    #100 rst_n = 1'b1;
    @(negedge clk);
    foreach (targets[t]) begin
      bit f, f_prev;
      int lock_at;
      do_reset();
      f_prev = 1'b0;
      lock_at = -1;
      for (int c = 1; c <= 40; c++) begin
        f = int'(ctrl) > targets[t];
        cycle(1'b1, f, f && !f_prev && c > 1);
        f_prev = f;
        if (locked && lock_at < 0) lock_at = c;
      end
      check(int'(ctrl) >= targets[t] - 2 && int'(ctrl) <= targets[t] + 2,
            $sformatf("target %0d: settled at %0d", targets[t], ctrl));
      check(lock_at > 0 && lock_at <= 15, $sformatf("target %0d: maintenance after %0d cycles", targets[t], lock_at));
    end
    do_reset();
    for (int i = 0; i < 2000; i++) begin
      if (i % 500 == 499) do_reset();
      cycle(($urandom % 10) != 0, $urandom % 2, ($urandom % 4) == 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(20000 * 3000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
