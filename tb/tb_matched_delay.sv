// tb_matched_delay: checks that the matched delay passes each edge of its
// input after exactly DELAY_PS, for pulses from 60 ps to 180 ps wide.
`timescale 1ps/1fs
module tb_matched_delay;
  localparam real D = 50.0;   // the default delay
  logic a = 1'b0, y;
  int checks = 0, failures = 0;
  realtime t_in [$];

  matched_delay u_dut (.a, .y);

  always @(a) if ($realtime > 100.0) t_in.push_back($realtime);
  always @(y) if ($realtime > 100.0) begin
    realtime t;
    checks++;
    t = t_in.pop_front();
    if ($realtime - t < D - 0.001 || $realtime - t > D + 0.001) begin
      failures++;
      $display("FAIL: edge delayed by %.3f ps at %.1f y=%b a=%b", $realtime - t, $realtime, y, a);
    end
  end

  initial begin
    #200;
    for (int i = 0; i < 20; i++) begin
      #(60 + (i % 5) * 30);
      a = ~a;
    end
    #200;
    checks++;
    if (y != a) begin failures++; $display("FAIL: final level"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
