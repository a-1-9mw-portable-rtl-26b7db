// dco_counter: adjustable-length DCO counter of the phase/frequency detector.
//
// A chain of CNT_LEN D flip-flops whose first input is tied high, clocked
// by the DCO. After the asynchronous reset is released, a one walks down the
// chain: flip-flop k goes high on the k-th counted DCO edge. One tap, chosen
// by the output-frequency select, is brought out as count_out; the detector
// samples it at the falling edge of the reference clock.
//
// A 2:1 clock mux picks the counted edge. In even mode the counter is
// clocked by the inverted DCO node (falling edges), in odd mode by the node
// itself (rising edges). The DCO restarts each reference cycle with a falling
// edge of its node, which marks the start of DCO cycle one; in even mode a
// start flip-flop takes that first edge, so flip-flop k goes high k DCO
// periods after it. In odd mode the rising edges fall half a period into each
// cycle and are counted directly, so flip-flop k goes high k - 0.5 periods
// after the start. Measured from the DCO's own first edge, the count also
// carries the phase error left when the DCO did not pause before the
// reference edge. This gives the per-tap frequency labels of the original counter
// diagram (DFF1 50/100 MHz ... DFF10 950 MHz/1 GHz). The chain, the tied-high
// first input, the tap switches and the odd/even mux follow the original design;
// the start flip-flop and which DCO edge each mux setting uses are this
// design's choices.
//
// Interface: dco_clk (DCO node), rst (asynchronous, active high: held while
// the reference clock is low, released a matched delay after it rises),
// odd, tap (1-based index of the compared flip-flop), count_out.
module dco_counter
  import adpll_pkg::*;
#(
  parameter int unsigned LEN = CNT_LEN
) (
  input  logic       dco_clk,
  input  logic       rst,
  input  logic       odd,
  input  logic [3:0] tap,
  output logic       count_out
);
  timeunit 1ps; timeprecision 1fs;

  logic           cnt_clk;
  logic           started;   // even mode: first DCO edge seen
  logic [LEN-1:0] dff;

  // Odd/even clock mux.
  assign cnt_clk = odd ? dco_clk : ~dco_clk;

  always_ff @(posedge cnt_clk or posedge rst) begin
    if (rst) begin
      started <= 1'b0;
      dff     <= '0;
    end else begin
      started <= 1'b1;
      dff     <= {dff[LEN-2:0], started || odd};
    end
  end

  // Tap switches: only the selected flip-flop drives the output.
  always_comb begin
    count_out = 1'b0;
    for (int unsigned k = 1; k <= LEN; k++)
      if (tap == 4'(k)) count_out = dff[k-1];
  end
endmodule
