// tb_dcde: checks the delay law of the DCDE model.
//
// For a set of codes and extra-device patterns the test toggles the input
// and measures the time to the inverted output, comparing it with the delay
// computed here from the end points (252.9 ps at code 0, 142.5/128 ps less
// per LSB). It also checks that the delay never grows with the code.
`timescale 1ps/1fs
module tb_dcde;
  logic       in = 1'b0;
  logic [6:0] code = '0;
  logic [2:0] extra = '0;
  logic       out;
  int checks = 0, failures = 0;

  dcde u_dut (.in, .code, .extra, .out);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic measure(input int c, input int x, output real d);
    realtime t0;
    code = 7'(c);
    extra = 3'(x);
    #1000;
    t0 = $realtime;
    in = ~in;
    @(out);
    d = $realtime - t0;
    check(out == ~in, "output not inverted");
  endtask

  initial begin
    real d, prev, expd;
    int ones;
    #1000;
    prev = 1.0e9;
    for (int c = 0; c < 128; c += 9) begin
      for (int x = 0; x < 8; x++) begin
        measure(c, x, d);
        ones = (x & 1) + ((x >> 1) & 1) + ((x >> 2) & 1);
        expd = 252.9 - (c + ones) * (252.9 - 110.4) / 128.0;
        check(d > expd - 0.01 && d < expd + 0.01,
              $sformatf("code %0d extra %b: delay %.3f, expected %.3f", c, x, d, expd));
        if (x == 0) begin
          check(d < prev, $sformatf("delay not monotonic at code %0d", c));
          prev = d;
        end
      end
    end
    measure(127, 0, d);
    check(d > 111.4 && d < 111.6, $sformatf("code 127 delay %.3f", d));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
