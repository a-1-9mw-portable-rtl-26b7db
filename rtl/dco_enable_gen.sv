// dco_enable_gen: DCO enable generator of the phase/frequency detector.
//
// The DCO is enabled at each rising edge of the reference clock. The
// generator counts DCO rising edges in the current reference period; at the
// edge whose number equals the multiplication ratio it drops the enable, so
// the DCO holds until the next reference rising edge restarts it in phase
// with the reference. When the DCO is on frequency the pause is about half a
// DCO cycle; when it is slow the enable simply stays high. The original design
// gives this function (the enable is dropped only before the next reference
// rising edge and for about half a DCO cycle); the edge counter that does it
// is this design's own.
//
// Clock-domain crossing: the reference domain toggles per_seq at every
// rising edge, which tells the DCO domain that a new period has started, and
// toggles run_seq at a rising edge only when the DCO is stopped. The DCO
// domain copies run_seq into stop_seq when it stops the DCO. dco_en is high
// while run_seq and stop_seq differ, the global enable is set and reset is
// released, so a reference edge re-enables a stopped DCO without needing a
// DCO edge, and a DCO that is still running (slow) is left running. The
// toggles are sampled without synchronizers: each one is sampled only while
// the other side is stopped or far from its own edge. The DCO stays stopped
// from reset to the first reference rising edge.
//
// Interface: ref_clk, dco_clk (DCO node), rst_n (asynchronous, active low),
// enable (global enable), ratio (DCO cycles per reference cycle), dco_en.
module dco_enable_gen
  import adpll_pkg::*;
(
  input  logic               ref_clk,
  input  logic               dco_clk,
  input  logic               rst_n,
  input  logic               enable,
  input  logic [RATIO_W-1:0] ratio,
  output logic               dco_en
);
  timeunit 1ps; timeprecision 1fs;

  logic               per_seq;   // reference domain: toggles every period
  logic               run_seq;   // reference domain: toggles on each restart
  logic               seen_seq;  // DCO domain: period the edge count belongs to
  logic               stop_seq;  // DCO domain: run_seq of the last stop
  logic [RATIO_W-1:0] edges;     // DCO rising edges counted in this period

  always_ff @(posedge ref_clk or negedge rst_n) begin
    if (!rst_n) begin
      per_seq <= 1'b0;
      run_seq <= 1'b0;
    end else begin
      per_seq <= ~per_seq;
      if (stop_seq == run_seq) run_seq <= ~run_seq;
    end
  end

  always_ff @(posedge dco_clk or negedge rst_n) begin
    if (!rst_n) begin
      seen_seq <= 1'b0;
      stop_seq <= 1'b0;
      edges    <= '0;
    end else begin
      logic [RATIO_W-1:0] n;
      n = (seen_seq != per_seq) ? RATIO_W'(1) : edges + RATIO_W'(1);
      seen_seq <= per_seq;
      edges    <= n;
      if (n == ratio) stop_seq <= run_seq;
    end
  end

  assign dco_en = enable && rst_n && (stop_seq != run_seq);
endmodule
