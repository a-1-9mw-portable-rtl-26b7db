// dcde: behavioural model of the modified digitally controlled delay element.
//
// Behavioural model, not synthesizable logic. The real element is an
// inverting stage whose delay is set by current-mirror transistors in
// binary-weighted fashion (a 7-bit code, weights 1, 2, 4 ... LSB), plus, in
// the modified element, three extra devices of one LSB each. The delay
// falls monotonically as the code grows. This model keeps the ports and the
// monotonic linear behaviour:
//
//   delay = D_MAX_PS - (code + number of extra devices on) * (D_MAX_PS - D_MIN_PS) / 128
//
// The end points are fitted so that the DCO built from eight elements covers
// about 224 MHz to 1.06 GHz (the 130 nm curve of the DCO characteristic); the
// original design gives the range, not the element delays. out follows ~in
// after that delay.
//
// Interface: in, code (7-bit binary-weighted control), extra (three one-LSB
// devices, each on when its bit is set), out.
module dcde
  import adpll_pkg::*;
#(
  parameter real D_MAX_PS = 252.9,
  parameter real D_MIN_PS = 110.4
) (
  input  logic               in,
  input  logic [FINE7_W-1:0] code,
  input  logic [EXTRA_W-1:0] extra,
  output logic               out
);
  timeunit 1ps; timeprecision 1fs;

  localparam real LSB_PS = (D_MAX_PS - D_MIN_PS) / 128.0;

  real delay_ps;

  always_comb
    delay_ps = D_MAX_PS - (real'(code) + real'($countones(extra))) * LSB_PS;

  // Scheduled once at time zero and then on every input change.
  always begin
    out <= #(delay_ps) ~in;
    @(in);
  end
endmodule
