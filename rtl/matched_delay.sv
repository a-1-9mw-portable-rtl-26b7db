// matched_delay: behavioural model of a matched delay line.
//
// Behavioural model, not synthesizable logic: the real part is a chain of
// gates sized to match the delay of a clock path. Here the output follows
// the input after DELAY_PS picoseconds; pulses wider than the delay pass
// unchanged (the only use here). The original design uses
// matched delays in front of the DCO counter reset and on the reference
// clock that the counter output is compared with; the value of the delay is
// not given and the default is this design's choice.
//
// Interface: a (input), y (delayed copy).
module matched_delay #(
  parameter real DELAY_PS = 50.0
) (
  input  logic a,
  output logic y
);
  timeunit 1ps; timeprecision 1fs;

  // Scheduled once at time zero and then on every input change.
  always begin
    y <= #(DELAY_PS) a;
    @(a);
  end
endmodule
