// pfd: dual-mode one-cycle phase/frequency detector.
//
// Each reference cycle the detector (1) enables the DCO and starts counting
// DCO edges at the rising edge of the reference clock, and (2) at the
// falling edge, the detection point, samples the selected counter tap. If
// the count has arrived by then the DCO is fast and fast goes high;
// otherwise fast goes low. The counter is held in reset while the reference
// clock is low. The reset is asserted a matched delay after the falling edge,
// so that it never races the sample, and released at the rising edge, before
// the DCO's restart edge. Comparison and adjustment take one reference cycle.
//
// Two synchronizers feed the lock gate: the first holds the counter output
// of this detection point (that is fast), the second holds the inverted
// counter output of the previous detection point. lock is their AND: it is
// high for one cycle when fast goes from slow to fast, i.e. when the search
// has stepped across the target. Reading the second synchronizer as one
// detection point older is this design's interpretation; the original design
// gives the two synchronizers, the inverter and the AND.
//
// Interface: ref_clk, dco_clk (DCO node), rst_n, enable, sel (one-hot
// frequency select, S300M in bit 0 ... S1-G in bit 5), dco_en (to the DCO), fast, lock and,
// for observation, count_out. fast and lock change at the falling edge of
// ref_clk.
module pfd
  import adpll_pkg::*;
#(
  parameter real RESET_DELAY_PS = 50.0
) (
  input  logic             ref_clk,
  input  logic             dco_clk,
  input  logic             rst_n,
  input  logic             enable,
  input  logic [N_SEL-1:0] sel,
  output logic             dco_en,
  output logic             fast,
  output logic             lock,
  output logic             count_out
);
  timeunit 1ps; timeprecision 1fs;

  count_cfg_t cfg;
  logic       ref_low, ref_low_dly, cnt_rst;
  logic       sync2_stage, sync2;

  assign cfg = decode_sel(sel);

  dco_enable_gen u_en_gen (
    .ref_clk, .dco_clk, .rst_n, .enable,
    .ratio (cfg.ratio),
    .dco_en
  );

  assign ref_low = ~ref_clk;

  matched_delay #(.DELAY_PS(RESET_DELAY_PS)) u_rst_dly (
    .a (ref_low),
    .y (ref_low_dly)
  );

  assign cnt_rst = (ref_low && ref_low_dly) || !rst_n;

  dco_counter u_counter (
    .dco_clk,
    .rst       (cnt_rst),
    .odd       (cfg.odd),
    .tap       (cfg.tap),
    .count_out
  );

  // Synchronizers, clocked at the detection point.
  always_ff @(negedge ref_clk or negedge rst_n) begin
    if (!rst_n) begin
      fast        <= 1'b0;
      sync2_stage <= 1'b0;
      sync2       <= 1'b0;
    end else begin
      fast        <= count_out;
      sync2_stage <= ~count_out;
      sync2       <= sync2_stage;
    end
  end

  assign lock = fast && sync2;
endmodule
