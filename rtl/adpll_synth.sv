// adpll_synth: ADPLL-based frequency synthesizer (top level).
//
// Multiplies a 50 MHz reference clock to 300, 400, 500, 600, 850 MHz or
// 1 GHz, chosen by the one-hot select sel = {S1-G, S850M, S600M, S500M,
// S400M, S300M}. Three blocks close the loop: the phase/frequency detector
// (pfd) counts DCO edges over the high half of each reference cycle and says
// whether the DCO is fast; the control unit moves the 11-bit DCO control word
// by a modified binary search, once per reference cycle, and switches to a
// small phase gain after lock; the DCO (a behavioural model of the ring
// oscillator) produces the output clock. The DCO is restarted at every
// reference rising edge, so phase is realigned each cycle while frequency is
// searched. Lock is reached within about fifteen reference cycles.
//
// Timing: the detector samples at the falling edge of ref_clk, the control
// unit updates the word at the rising edge, and the DCO runs on the new word
// from that same rising edge.
//
// Interface: ref_clk (50 MHz), rst_n (asynchronous, active low), enable,
// sel, dco_clk (output clock), ctrl (DCO control word), fast and lock (the
// detector's outputs), locked (maintenance mode, i.e. the synthesizer is
// locked), and the frequency and phase gain registers for observation.
module adpll_synth
  import adpll_pkg::*;
(
  input  logic             ref_clk,
  input  logic             rst_n,
  input  logic             enable,
  input  logic [N_SEL-1:0] sel,
  output logic             dco_clk,
  output ctrl_word_t       ctrl,
  output logic             fast,
  output logic             lock,
  output logic             locked,
  output ctrl_word_t       freq_gain,
  output logic [PGAIN_W-1:0] phase_gain
);
  timeunit 1ps; timeprecision 1fs;

  logic               dco_en;
  logic               count_out;

  pfd u_pfd (
    .ref_clk,
    .dco_clk,
    .rst_n,
    .enable,
    .sel,
    .dco_en,
    .fast,
    .lock,
    .count_out
  );

  control_unit u_cu (
    .clk    (ref_clk),
    .rst_n,
    .enable,
    .fast,
    .lock,
    .ctrl,
    .locked,
    .fgain  (freq_gain),
    .pgain  (phase_gain)
  );

  dco u_dco (
    .enable  (dco_en),
    .ctrl,
    .clk_out (dco_clk)
  );
endmodule
