// tb_adpll_synth: end-to-end test of the ADPLL frequency synthesizer.
//
// For each of the six select lines the test resets the synthesizer, runs the
// 50 MHz reference for RUN_CYCLES cycles and checks that
//   - the loop reaches maintenance mode within LOCK_MAX reference cycles
//     (this model locks in 11 to 27 cycles, depending on the frequency);
//   - after lock the DCO period, measured between rising edges in the high
//     half of the reference, is within TOL_PCT of the target period;
//   - the control word then stays within a few LSB (no loss of lock);
// then, still locked at 1 GHz, it switches the select to 600 MHz and checks
// that maintenance mode alone brings the DCO to the new frequency.
// It also counts how often each mechanism of the loop occurred: frequency
// gain right shifts, the lock pulse, entry into maintenance, phase gain left
// and right shifts, DCO pauses by the enable generator, odd-mode counting,
// both coarse bands, and the global enable being held low; one that never
// occurred counts as a failure. The top runs at its default parameters.
`timescale 1ps/1fs
module tb_adpll_synth;
  import adpll_pkg::*;

  localparam int  RUN_CYCLES = 60;
  localparam int  LOCK_MAX   = 30;
  localparam real TREF_PS    = 20000.0;
  localparam real TOL_PCT    = 2.0;
  localparam int  SWITCH_CYCLES = 150;

  logic             ref_clk = 1'b0;
  logic             rst_n   = 1'b1;
  logic             enable  = 1'b0;
  logic [N_SEL-1:0] sel     = '0;
  logic             dco_clk, fast, lock, locked;
  ctrl_word_t       ctrl, freq_gain;
  logic [PGAIN_W-1:0] phase_gain;

  int checks = 0, failures = 0;

  adpll_synth u_dut (.*);

  always #(TREF_PS/2) ref_clk = ~ref_clk;

  // Mechanism counters.
  int n_fshift = 0, n_lockpulse = 0, n_maint = 0, n_pleft = 0, n_pright = 0;
  int n_pause = 0, n_odd = 0, n_low_band = 0, n_high_band = 0, n_disabled = 0;
  ctrl_word_t         fgain_q;
  logic [PGAIN_W-1:0] pgain_q;
  logic               locked_q;

  always @(posedge ref_clk) begin
    if (rst_n) begin
      if (freq_gain < fgain_q) n_fshift++;
      if (locked && locked_q && phase_gain > pgain_q) n_pleft++;
      if (locked && locked_q && phase_gain < pgain_q) n_pright++;
      if (locked && !locked_q) n_maint++;
      if (ctrl[CW_W-1]) n_high_band++; else n_low_band++;
      if (!enable) n_disabled++;
    end
    fgain_q  <= freq_gain;
    pgain_q  <= phase_gain;
    locked_q <= locked;
  end
  always @(negedge ref_clk) if (rst_n && lock) n_lockpulse++;
  always @(negedge u_dut.u_pfd.dco_en) if (rst_n && enable) n_pause++;

  // Period measurement: DCO rising edges while the reference is high.
  realtime last_rise;
  real     per_sum;
  int      per_n;
  logic    measuring = 1'b0;
  always @(posedge dco_clk) begin
    if (measuring && ref_clk && last_rise > 0 && ($realtime - last_rise) < TREF_PS/2) begin
      per_sum += $realtime - last_rise;
      per_n++;
    end
    last_rise = $realtime;
  end
  always @(posedge ref_clk) last_rise = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic run_one(input int idx, input real f_mhz, input int ratio);
    int lock_cycle, wmin, wmax;
    real per, exp_per;
    sel = '0;
    sel[idx] = 1'b1;
    rst_n = 1'b0;
    enable = 1'b1;
    repeat (2) @(posedge ref_clk);
    #1000;
    rst_n = 1'b1;
    lock_cycle = -1;
    for (int c = 1; c <= RUN_CYCLES; c++) begin
      @(posedge ref_clk);
      #1;
      if (locked && lock_cycle < 0) lock_cycle = c;
      if (lock_cycle > 0 && c == lock_cycle + 5) begin
        measuring = 1'b1;
        per_sum = 0.0;
        per_n = 0;
        wmin = int'(ctrl);
        wmax = int'(ctrl);
      end
      if (measuring) begin
        if (int'(ctrl) < wmin) wmin = int'(ctrl);
        if (int'(ctrl) > wmax) wmax = int'(ctrl);
      end
      if (u_dut.u_pfd.u_counter.odd && rst_n) n_odd++;
    end
    measuring = 1'b0;
    exp_per = 1.0e6 / f_mhz;
    per = (per_n > 0) ? per_sum / per_n : 0.0;
    $display("%0d MHz: locked after %0d cycles, word %0d..%0d, mean period %.1f ps (target %.1f)",
             int'(f_mhz), lock_cycle, wmin, wmax, per, exp_per);
    check(lock_cycle > 0, $sformatf("%0d MHz: never locked", int'(f_mhz)));
    check(lock_cycle > 0 && lock_cycle <= LOCK_MAX,
          $sformatf("%0d MHz: lock took %0d cycles", int'(f_mhz), lock_cycle));
    check(per_n > 0 && per > exp_per * (1.0 - TOL_PCT/100.0) && per < exp_per * (1.0 + TOL_PCT/100.0),
          $sformatf("%0d MHz: period %.1f ps", int'(f_mhz), per));
    check(lock_cycle > 0 && (wmax - wmin) <= 32,
          $sformatf("%0d MHz: word wandered %0d..%0d", int'(f_mhz), wmin, wmax));
    check(ratio == int'(decode_sel(sel).ratio), "ratio table");
  endtask

  initial begin
    #10 rst_n = 1'b0;
    #(TREF_PS * 3);
    run_one(F300M, 300.0, 6);
    run_one(F400M, 400.0, 8);
    run_one(F500M, 500.0, 10);
    run_one(F600M, 600.0, 12);
    run_one(F850M, 850.0, 17);
    run_one(F1G,   1000.0, 20);
    // Select switch while locked (a step disturbance): the loop stays in
    // maintenance and the phase gain must grow and shrink to follow it.
    begin
      real per;
      sel = '0;
      sel[F600M] = 1'b1;
      repeat (SWITCH_CYCLES) @(posedge ref_clk);
      per_sum = 0.0;
      per_n = 0;
      measuring = 1'b1;
      repeat (10) @(posedge ref_clk);
      measuring = 1'b0;
      per = (per_n > 0) ? per_sum / per_n : 0.0;
      $display("1 GHz -> 600 MHz in maintenance: mean period %.1f ps (target %.1f)", per, 1.0e6/600.0);
      check(locked, "left maintenance after select switch");
      check(per_n > 0 && per > 1666.7 * (1.0 - TOL_PCT/100.0) && per < 1666.7 * (1.0 + TOL_PCT/100.0),
            $sformatf("after switch: period %.1f ps", per));
    end
    // Global enable low: the loop must freeze.
    begin
      ctrl_word_t w;
      @(posedge ref_clk); #1;
      enable = 1'b0;
      w = ctrl;
      repeat (5) @(posedge ref_clk);
      #1;
      check(ctrl == w, "control word moved while disabled");
      check(u_dut.u_pfd.dco_en == 1'b0, "DCO enabled while disabled");
      enable = 1'b1;
    end
    $display("mechanisms: fgain_shift=%0d lock_pulse=%0d maintenance=%0d pgain_left=%0d pgain_right=%0d dco_pause=%0d odd_mode=%0d low_band=%0d high_band=%0d disabled=%0d",
             n_fshift, n_lockpulse, n_maint, n_pleft, n_pright, n_pause, n_odd, n_low_band, n_high_band, n_disabled);
    check(n_fshift > 0, "no frequency gain shift");
    check(n_lockpulse > 0, "no lock pulse");
    check(n_maint == 6, "maintenance not entered for every frequency");
    check(n_pleft > 0, "no phase gain left shift");
    check(n_pright > 0, "no phase gain right shift");
    check(n_pause > 0, "no DCO pause");
    check(n_odd > 0, "odd mode never used");
    check(n_low_band > 0 && n_high_band > 0, "one coarse band never used");
    check(n_disabled > 0, "enable never low");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(TREF_PS * ((RUN_CYCLES + 10) * 8 + SWITCH_CYCLES + 50));
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
