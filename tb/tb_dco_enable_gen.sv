// tb_dco_enable_gen: checks the DCO enable generator with a gated clock.
//
// The test stands in for the DCO with a gated oscillator of period P: it is
// held high while dco_en is low and, once enabled, falls after 10 ps and then
// toggles every P/2. For a fast DCO (P below 20 ns / ratio) the enable must
// fall on the ratio-th rising edge of the period and rise again at the next
// reference rising edge; for a slow DCO it must stay high. The DCO must be
// held during reset and while the global enable is low.
`timescale 1ps/1fs
module tb_dco_enable_gen;
  localparam real TREF = 20000.0;
  logic       ref_clk = 1'b0, dco_clk = 1'b1, rst_n = 1'b1, enable = 1'b1;
  logic [4:0] ratio = 5'd10;
  logic       dco_en;
  real        per = 1900.0;
  int checks = 0, failures = 0;

  dco_enable_gen u_dut (.ref_clk, .dco_clk, .rst_n, .enable, .ratio, .dco_en);

  always #(TREF/2) ref_clk = ~ref_clk;

  // Gated oscillator.
  always begin
    wait (dco_en);
    #10 dco_clk = 1'b0;
    while (dco_en) begin
      #(per/2) dco_clk = ~dco_clk;
      if (!dco_en && !dco_clk) begin
        // only stops in the high state
      end
    end
    wait (!dco_en);
    dco_clk = 1'b1;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int rises_in_period;
  always @(posedge ref_clk) rises_in_period = 0;
  always @(posedge dco_clk) rises_in_period++;

  task automatic run(input int r, input real p, input bit expect_stop);
    ratio = 5'(r);
    per = p;
    repeat (3) @(posedge ref_clk);
    repeat (3) begin
      int n;
      @(posedge ref_clk);
      #1;
      check(dco_en == 1'b1, "not enabled at reference edge");
      @(negedge dco_en or posedge ref_clk);
      if (expect_stop) begin
        check(ref_clk == 1'b0 || !dco_en, "");
        check(!dco_en && rises_in_period == r,
              $sformatf("ratio %0d: stopped after %0d rising edges", r, rises_in_period));
        check(dco_clk == 1'b1, "stopped low");
      end else begin
        check(dco_en == 1'b1, $sformatf("ratio %0d slow: stopped", r));
      end
    end
  endtask

  initial begin
    #10 rst_n = 1'b0;
    #5000;
    check(dco_en == 1'b0, "DCO enabled in reset");
    @(negedge ref_clk);
    rst_n = 1'b1;
    #100;
    check(dco_en == 1'b0, "DCO enabled before first reference edge");
    run(10, 1900.0, 1'b1);
    run(6, 3200.0, 1'b1);
    run(20, 960.0, 1'b1);
    run(17, 1150.0, 1'b1);
    run(10, 2100.0, 1'b0);
    run(10, 1900.0, 1'b1);
    enable = 1'b0;
    #1;
    check(dco_en == 1'b0, "enabled while global enable low");
    repeat (2) @(posedge ref_clk);
    #1;
    check(dco_en == 1'b0, "enabled while global enable low");
    enable = 1'b1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(TREF * 200);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
