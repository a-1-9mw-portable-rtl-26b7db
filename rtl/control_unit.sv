// control_unit: DCO control word search (modified binary search).
//
// Once per reference cycle the control unit adds a gain to the 11-bit DCO
// control word when the DCO is slow (fast low) and subtracts it when the DCO
// is fast. In frequency acquisition the gain comes from the frequency gain
// register, a one-hot register that is shifted one bit right, before the
// step is applied, whenever fast differs from its previous value (the search
// changed direction). After lock the multiplexer switches to the phase gain
// register (maintenance mode), which keeps tracking the reference. The
// structure (control logic, two gain registers, mux, add/sub, control word
// register) and the search rule follow the original design.
//
// This design's choices: the word starts at INIT_WORD (the middle of the
// range) with a frequency gain of INIT_FGAIN; the first decision after reset
// is not counted as a direction change; the sum saturates at 0 and at the
// largest word; maintenance is entered on the first lock pulse from the
// detector once the frequency gain has come down to LOCK_FGAIN (the largest
// phase gain, 1000), and is left only by reset; when enable is low nothing
// changes.
//
// Interface: clk (reference clock, rising edge), rst_n (asynchronous, active
// low), enable, fast and lock from the detector (stable at the rising edge of
// clk), ctrl (DCO control word), locked (maintenance mode), and the two gain
// registers for observation.
module control_unit
  import adpll_pkg::*;
#(
  parameter ctrl_word_t      INIT_WORD  = ctrl_word_t'(1 << (CW_W - 1)),
  parameter ctrl_word_t      INIT_FGAIN = ctrl_word_t'(1 << (CW_W - 2)),
  parameter int unsigned     RUN_LEN    = 8,
  parameter ctrl_word_t      LOCK_FGAIN = ctrl_word_t'(1 << (PGAIN_W - 1))
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               enable,
  input  logic               fast,
  input  logic               lock,
  output ctrl_word_t         ctrl,
  output logic               locked,
  output ctrl_word_t         fgain,
  output logic [PGAIN_W-1:0] pgain
);
  timeunit 1ps; timeprecision 1fs;

  typedef enum logic { ACQUIRE = 1'b0, MAINTAIN = 1'b1 } mode_e;

  mode_e              mode;
  logic               fast_prev, have_prev;
  logic               enter_lock, shift;
  ctrl_word_t         fgain_next, gain_sel;
  logic [PGAIN_W-1:0] pgain_next;
  logic [CW_W:0]      sum;

  // Control logic.
  assign enter_lock = (mode == ACQUIRE) && lock && (fgain <= LOCK_FGAIN);
  assign shift      = (mode == ACQUIRE) && have_prev && (fast != fast_prev)
                      && (fgain != ctrl_word_t'(1));
  assign fgain_next = shift ? (fgain >> 1) : fgain;

  phase_gain_reg #(.RUN_LEN(RUN_LEN)) u_pgain (
    .clk,
    .rst_n,
    .load      (enable && enter_lock),
    .step      (enable && (mode == MAINTAIN)),
    .fast,
    .gain      (pgain),
    .gain_next (pgain_next)
  );

  // Gain mux and adder/subtractor.
  always_comb begin
    if (mode == MAINTAIN || enter_lock) gain_sel = ctrl_word_t'(pgain_next);
    else                                gain_sel = fgain_next;
    if (fast) sum = {1'b0, ctrl} - {1'b0, gain_sel};
    else      sum = {1'b0, ctrl} + {1'b0, gain_sel};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode      <= ACQUIRE;
      ctrl      <= INIT_WORD;
      fgain     <= INIT_FGAIN;
      fast_prev <= 1'b0;
      have_prev <= 1'b0;
    end else if (enable) begin
      fast_prev <= fast;
      have_prev <= 1'b1;
      fgain     <= fgain_next;
      if (enter_lock) mode <= MAINTAIN;
      if (sum[CW_W])  ctrl <= fast ? '0 : '1;   // borrow or carry: saturate
      else            ctrl <= sum[CW_W-1:0];
    end
  end

  assign locked = (mode == MAINTAIN);

  a_fgain_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot(fgain));
endmodule
