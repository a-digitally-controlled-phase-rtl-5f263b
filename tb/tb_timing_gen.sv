// tb_timing_gen: checks the two-REF-cycle fundamental cycle: phi1, phi2
// and upd alternate every REF period starting with an update cycle after
// reset, the VCO reset follows phi2 until full_lock holds it released, and
// acq_restart starts a measure cycle on the next REF edge.
module tb_timing_gen;
  timeunit 1ns; timeprecision 1fs;
  logic ref_clk = 0, rst_n = 0, acq_restart = 0, full_lock = 0;
  logic phi1, phi2, vco_rst_n, upd;
  int checks = 0, failures = 0;
  timing_gen dut (.*);
  always #20 ref_clk = ~ref_clk;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s at %t", what, $time); end
  endtask
  bit exp_meas;
  initial begin
    @(posedge ref_clk); #1;
    check(!phi1 && phi2 && !vco_rst_n && !upd, "reset state: no measurement, VCO held");
    @(negedge ref_clk) rst_n = 1;
    @(negedge ref_clk);
    check(!phi1 && !phi2 && !vco_rst_n && !upd, "first cycle after reset: update cycle");
    exp_meas = 0;
    repeat (10) begin
      @(negedge ref_clk); exp_meas = !exp_meas;
      check(phi1 == exp_meas && phi2 == exp_meas && upd == exp_meas, "phases alternate");
      check(vco_rst_n == exp_meas, "VCO reset follows phi2 during acquisition");
    end
    full_lock = 1;
    repeat (4) begin
      @(negedge ref_clk); exp_meas = !exp_meas;
      check(phi1 == exp_meas, "phases keep alternating after lock");
      check(vco_rst_n, "VCO not reset after full lock");
    end
    full_lock = 0;
    // Restart during a measure cycle and during an update cycle.
    repeat (2) begin
      acq_restart = 1; @(negedge ref_clk); acq_restart = 0;
      check(phi1 && upd, "restart starts a measure cycle");
      @(negedge ref_clk); check(!phi1 && !vco_rst_n, "then an update cycle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #10000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
