// tb_pfd: checks the detector's fast and lock decisions for every select.
//
// The DCO is replaced by a stimulus oscillator of period P that restarts in
// phase at each reference rising edge (falling 10 ps after it) and is held
// high while dco_en is low. For each of the six selects the test applies a
// sequence of periods around the threshold of that select, 3 % slower or
// faster, and checks after each detection point that
//   fast == (time of the counted edge < 10 ns), computed here from the
//           tap, the mode and P;
//   lock == fast now and not fast at the previous detection point.
// It also checks that dco_en drops for a fast DCO and that fast changes only
// at the falling edge of the reference clock.
`timescale 1ps/1fs
module tb_pfd;
  import adpll_pkg::*;
  localparam real TREF = 20000.0;
  logic             ref_clk = 1'b0, dco_clk = 1'b1, rst_n = 1'b1, enable = 1'b1;
  logic [N_SEL-1:0] sel = 6'b000001;
  logic             dco_en, fast, lock, count_out;
  real              per = 3000.0;
  int checks = 0, failures = 0;
  int en_drops = 0;

  pfd u_dut (.*);

  always #(TREF/2) ref_clk = ~ref_clk;

  // Stimulus oscillator, restarted at every reference rising edge.
  initial forever begin
    realtime t0, t;
    int k;
    @(posedge ref_clk);
    t0 = $realtime;
    dco_clk = 1'b1;
    k = 0;
    forever begin
      t = t0 + 10.0 + k * per / 2.0;
      if (t >= t0 + TREF - 100.0) begin
        // Park high shortly before the restart, while the counter is in reset.
        #(t0 + TREF - 100.0 - $realtime);
        dco_clk = 1'b1;
        break;
      end
      if (t > $realtime) #(t - $realtime);
      if (!dco_en) begin
        dco_clk = 1'b1;
        break;
      end
      dco_clk = ~dco_clk;
      k++;
    end
  end

  always @(negedge dco_en) if (rst_n && enable) en_drops++;

  // fast may only change at the detection point.
  always @(fast) if (rst_n && $realtime > 0 && ($realtime % (TREF/2)) > 1.0 && ref_clk)
    begin failures++; $display("FAIL: fast changed at %.1f", $realtime); end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    real thr [6] = '{3333.3, 2500.0, 2000.0, 1666.7, 1176.5, 1000.0};
    int  taps [6] = '{3, 4, 5, 6, 9, 10};
    bit  odds [6] = '{0, 0, 0, 0, 1, 0};
    real scale [6] = '{1.03, 0.97, 0.97, 1.03, 0.97, 1.03};
    #10 rst_n = 1'b0;
    #5000 rst_n = 1'b1;
    // Warm-up period: the counter gets its first reset edge at the first
    // falling edge of the reference.
    per = 1000.0;
    @(negedge ref_clk);
    #1;
    for (int s = 0; s < 6; s++) begin
      bit prev_fast;
      sel = '0;
      sel[s] = 1'b1;
      prev_fast = fast;
      for (int i = 0; i < 6; i++) begin
        real t_edge;
        bit exp_fast;
        per = thr[s] * scale[i];
        @(posedge ref_clk);
        @(negedge ref_clk);
        #1;
        t_edge = 10.0 + (odds[s] ? (taps[s] - 0.5) * per : taps[s] * per);
        exp_fast = (t_edge < TREF/2);
        check(fast == exp_fast, $sformatf("sel %0d P=%.1f: fast=%b expected %b", s, per, fast, exp_fast));
        check(lock == (exp_fast && !prev_fast), $sformatf("sel %0d step %0d: lock=%b", s, i, lock));
        prev_fast = exp_fast;
      end
    end
    check(en_drops > 0, "dco_en never dropped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(TREF * 100);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
