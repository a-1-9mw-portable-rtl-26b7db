// phase_gain_reg: phase gain register of the control unit (maintenance mode).
//
// A 4-bit one-hot register that sets the step of the DCO control word once
// the loop is locked. It is loaded with 0001 on entering maintenance. On
// every update it shifts one bit right when fast differs from its previous
// value, and one bit left when fast has kept the same value for RUN_LEN
// reference cycles, so the gain only takes the values 0001, 0010, 0100 and
// 1000. All of this follows the original design. Counting the RUN_LEN cycles from
// the last change or the last left shift, and loading the previous fast value
// with load, are this design's choices.
//
// gain_next is the value after the current update, available in the same
// cycle, so the control unit can first adjust the gain and then apply it.
//
// Interface: clk (reference clock), rst_n, load (start maintenance: gain
// becomes 0001), step (update this cycle), fast, gain, gain_next. Updates at
// the rising edge of clk.
module phase_gain_reg
  import adpll_pkg::*;
#(
  parameter int unsigned RUN_LEN = 8
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               load,
  input  logic               step,
  input  logic               fast,
  output logic [PGAIN_W-1:0] gain,
  output logic [PGAIN_W-1:0] gain_next
);
  timeunit 1ps; timeprecision 1fs;

  localparam int unsigned RUN_W = $clog2(RUN_LEN + 1);

  logic             fast_prev;
  logic [RUN_W-1:0] run;       // cycles fast has kept its value
  logic [RUN_W-1:0] run_next;

  always_comb begin
    gain_next = gain;
    run_next  = run;
    if (load) begin
      gain_next = PGAIN_W'(1);
      run_next  = RUN_W'(1);
    end else if (step) begin
      if (fast != fast_prev) begin
        run_next = RUN_W'(1);
        if (!gain[0]) gain_next = gain >> 1;
      end else if (run + RUN_W'(1) >= RUN_W'(RUN_LEN)) begin
        run_next = '0;
        if (!gain[PGAIN_W-1]) gain_next = gain << 1;
      end else begin
        run_next = run + RUN_W'(1);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gain      <= PGAIN_W'(1);
      run       <= '0;
      fast_prev <= 1'b0;
    end else begin
      gain <= gain_next;
      run  <= run_next;
      if (load || step) fast_prev <= fast;
    end
  end

  // The gain is always one of 0001, 0010, 0100, 1000.
  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot(gain));
endmodule
