// tb_dco_counter: checks the adjustable-length counter tap by tap.
//
// For every tap 1..10 and both modes the test resets the counter, applies
// DCO edges one at a time and checks that count_out rises exactly on the
// expected edge: in even mode on the (tap + 1)-th falling edge (the first
// falling edge only starts the count), in odd mode on the tap-th rising edge.
// It also checks that reset clears the chain at once.
`timescale 1ps/1fs
module tb_dco_counter;
  logic       dco_clk = 1'b1;
  logic       rst = 1'b0;
  logic       odd = 1'b0;
  logic [3:0] tap = 4'd1;
  logic       count_out;
  int checks = 0, failures = 0;

  dco_counter u_dut (.dco_clk, .rst, .odd, .tap, .count_out);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #10 rst = 1'b1;
    #100;
    for (int m = 0; m < 2; m++) begin
      for (int t = 1; t <= 10; t++) begin
        int need, edges;
        odd = m[0];
        tap = 4'(t);
        rst = 1'b1;
        dco_clk = 1'b1;
        #100;
        rst = 1'b0;
        #100;
        need = odd ? t : t + 1;
        edges = 0;
        // Counted edges: falling in even mode, rising in odd mode.
        for (int e = 1; e <= 12; e++) begin
          if (odd) begin dco_clk = 1'b0; #50; dco_clk = 1'b1; #50; end
          else     begin dco_clk = 1'b0; #50; dco_clk = 1'b1; #50; end
          edges++;
          check(count_out == (edges >= need),
                $sformatf("mode %0d tap %0d: after %0d edges count_out=%b", m, t, edges, count_out));
        end
        rst = 1'b1;
        #1;
        check(count_out == 1'b0, "reset did not clear");
      end
    end
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
