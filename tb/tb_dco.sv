// tb_dco: checks the DCO model's period law, its range and its gating.
//
// The expected period is computed here from the ring: 2 x (NAND 10 ps + two
// inverters 10 ps each + the DCDE delays [+ 179 ps route in the low band]),
// each DCDE giving 252.9 - (code + extra devices) x 142.5/128 ps, with the
// ctrl[2:0] devices spread one per element round-robin. The test also checks
// the end points against the 224 MHz - 1.06 GHz range, that the node is held
// high while disabled and falls one NAND delay after enable, and that
// switching the coarse bit while running leaves a single wavefront (the
// period matches the new band).
`timescale 1ps/1fs
module tb_dco;
  import adpll_pkg::*;
  logic       enable = 1'b0;
  ctrl_word_t ctrl = '0;
  logic       clk_out;
  int checks = 0, failures = 0;

  dco u_dut (.enable, .ctrl, .clk_out);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic real exp_period(input int w);
    int  n = (w >= 1024) ? 4 : 8;
    int  c = (w >> 3) & 127;
    int  v = w & 7;
    real lsb = (252.9 - 110.4) / 128.0;
    real half = 30.0 + ((w >= 1024) ? 0.0 : 179.0) + n * (252.9 - c * lsb) - v * lsb;
    return 2.0 * half;
  endfunction

  task automatic measure(output real per);
    realtime t0;
    repeat (3) @(posedge clk_out);
    t0 = $realtime;
    repeat (8) @(posedge clk_out);
    per = ($realtime - t0) / 8.0;
  endtask

  initial begin
    real per, e;
    realtime t0;
    #5000;
    check(clk_out == 1'b1, "node not held high while disabled");
    ctrl = 11'd1500;
    t0 = $realtime;
    enable = 1'b1;
    @(negedge clk_out);
    check(($realtime - t0) > 9.99 && ($realtime - t0) < 10.01,
          $sformatf("restart edge after %.2f ps", $realtime - t0));
    for (int i = 0; i < 12; i++) begin
      int w;
      w = (i == 0) ? 0 : (i == 1) ? 1 : (i == 2) ? 7 : (i == 3) ? 8 : (i == 4) ? 300 :
          (i == 5) ? 512 : (i == 6) ? 1023 : (i == 7) ? 1024 : (i == 8) ? 1031 :
          (i == 9) ? 1500 : (i == 10) ? 1800 : 2047;
      enable = 1'b0;
      #5000;
      ctrl = 11'(w);
      #5000;
      enable = 1'b1;
      measure(per);
      e = exp_period(w);
      check(per > e - 0.5 && per < e + 0.5,
            $sformatf("word %0d: period %.2f ps, expected %.2f", w, per, e));
      if (w == 0)    check(1.0e6 / per > 215.0 && 1.0e6 / per < 233.0, "low end of range");
      if (w == 2047) check(1.0e6 / per > 1030.0 && 1.0e6 / per < 1090.0, "high end of range");
    end
    // Coarse switch while running, both directions.
    ctrl = 11'd1200;
    repeat (5) @(posedge clk_out);
    #123;
    ctrl = 11'd700;
    repeat (4) @(posedge clk_out);
    measure(per);
    check(per > exp_period(700) - 0.5 && per < exp_period(700) + 0.5,
          $sformatf("after switch to low band: %.2f ps", per));
    #77;
    ctrl = 11'd1200;
    repeat (4) @(posedge clk_out);
    measure(per);
    check(per > exp_period(1200) - 0.5 && per < exp_period(1200) + 0.5,
          $sformatf("after switch to high band: %.2f ps", per));
    enable = 1'b0;
    #10000;
    check(clk_out == 1'b1, "node not high after stop");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
