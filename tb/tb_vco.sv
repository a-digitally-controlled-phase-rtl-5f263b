// tb_vco: held in reset the output stays high; after release it stays
// high for half a period and then oscillates at
// 57.2 + (3.3 - VC)/2.0 * 876.8 MHz. Frequency is measured by counting
// rising edges over 1 us for several control voltages, and the range ends
// are checked against 57.2 and 934 MHz.
module tb_vco;
  timeunit 1ns; timeprecision 1fs;
  real vc = 3.3; logic rst_n = 0, vclk;
  int checks = 0, failures = 0;
  vco dut (.*);
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s vc=%f", what, vc); end
  endtask
  int edges;
  real f_exp, t0;
  real vlist[5] = '{3.3, 2.8, 2.3, 1.6, 1.3};
  always @(posedge vclk) edges++;
  initial begin
    #10 check(vclk, "stopped high in reset");
    foreach (vlist[i]) begin
      vc = vlist[i];
      f_exp = 57.2 + (3.3 - vc) / 2.0 * 876.8;
      rst_n = 0; #5;
      check(vclk, "high while reset");
      t0 = $realtime; rst_n = 1;
      @(negedge vclk);
      check(($realtime - t0) > 500.0 / f_exp - 0.001 && ($realtime - t0) < 500.0 / f_exp + 0.001,
            "first half period after release");
      edges = 0; #1000;
      check(real'(edges) > f_exp - 1.5 && real'(edges) < f_exp + 1.5, $sformatf("frequency %0d vs %f", edges, f_exp));
    end
    rst_n = 0; #3 check(vclk, "stops high when reset mid-cycle");
    #20 check(vclk, "stays stopped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
