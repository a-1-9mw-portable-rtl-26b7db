// tb_phase_gain_reg: checks the phase gain register against a reference model.
//
// The model here follows the rule directly: start at 0001 on load; on each
// step shift right (down to 0001) when fast differs from the previous
// value, shift left (up to 1000) when fast has kept its value for eight
// cycles. The test drives long runs of equal fast values and random
// sequences and compares gain and gain_next every cycle. It also checks
// that the gain walks 0001, 0010, 0100, 1000 after 8, 16 and 24 equal cycles.
`timescale 1ps/1fs
module tb_phase_gain_reg;
  logic       clk = 1'b0, rst_n = 1'b1, load = 1'b0, step = 1'b0, fast = 1'b0;
  logic [3:0] gain, gain_next;
  int checks = 0, failures = 0;

  phase_gain_reg u_dut (.clk, .rst_n, .load, .step, .fast, .gain, .gain_next);

  always #10000 clk = ~clk;

  // Reference model.
  logic [3:0] m_gain = 4'b0001;
  int         m_run = 0;
  logic       m_prev = 1'b0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic cycle(input bit l, input bit s, input bit f);
    logic [3:0] exp_next;
    load = l; step = s; fast = f;
    #1;
    exp_next = m_gain;
    if (l) begin
      exp_next = 4'b0001; m_run = 1; m_prev = f;
    end else if (s) begin
      if (f != m_prev) begin
        m_run = 1;
        if (m_gain != 4'b0001) exp_next = m_gain >> 1;
      end else if (m_run + 1 >= 8) begin
        m_run = 0;
        if (m_gain != 4'b1000) exp_next = m_gain << 1;
      end else m_run++;
      m_prev = f;
    end
    check(gain_next == exp_next, $sformatf("gain_next %b expected %b", gain_next, exp_next));
    @(posedge clk);
    #1;
    m_gain = exp_next;
    check(gain == m_gain, $sformatf("gain %b expected %b", gain, m_gain));
  endtask

  initial begin
    #10 rst_n = 1'b0;
    #100 rst_n = 1'b1;
    @(posedge clk); #1;
    cycle(1, 0, 1'b1);
    check(gain == 4'b0001, "load");
    // Ramp-up: fast kept high.
    for (int i = 1; i <= 30; i++) begin
      cycle(0, 1, 1'b1);
      if (i == 7)  check(gain == 4'b0010, $sformatf("after 8 equal cycles gain %b", gain));
      if (i == 15) check(gain == 4'b0100, $sformatf("after 16 equal cycles gain %b", gain));
      if (i == 23) check(gain == 4'b1000, $sformatf("after 24 equal cycles gain %b", gain));
    end
    check(gain == 4'b1000, "saturates at 1000");
    // Alternation: shifts right down to 0001.
    for (int i = 0; i < 6; i++) cycle(0, 1, i[0]);
    check(gain == 4'b0001, "alternating fast brings gain to 0001");
    // Hold (no step): nothing moves.
    repeat (10) cycle(0, 0, 1'b1);
    // Random.
    for (int i = 0; i < 400; i++) cycle(($urandom % 50) == 0, ($urandom % 8) != 0, ($urandom % 6) == 0 ? ~m_prev : m_prev);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(20000 * 1000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
