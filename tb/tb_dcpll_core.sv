// tb_dcpll_core: the digital core in open loop. The bench drives VCLK from
// its own ideal oscillator whose frequency it chooses each fundamental
// cycle (stopped high while the core asks for VCO reset), and keeps an
// integer reference of the loop: K = VCLK rising edges seen in the 40 ns
// window counting a VCLK already high at its start, raw = N + 1 - K, mode, mask, gain sequence 32 -> 16 -> ... -> 1 and the
// clamped DAC code. After every update edge it compares fdo, gn, dcc,
// lock_ind and full_lock with the reference, and it checks that the VCO
// reset is released once full lock is reached.
module tb_dcpll_core;
  timeunit 1ns; timeprecision 1fs;
  import dcpll_pkg::*;
  logic ref_clk = 0, rst_n = 0, vclk = 1, acq_restart = 0, vco_rst_n;
  logic [5:0] n_mult = 6'd32;
  gain_t init_gain = 6'b100000, gn;
  dcc_t dcc; fdo_t fdo; logic lock_ind, full_lock;
  int checks = 0, failures = 0;
  real t_vclk = 3.2;
  dcpll_core dut (.*);
  always #20 ref_clk = ~ref_clk;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s at %t", what, $time); end
  endtask
  initial forever begin
    if (!vco_rst_n) begin vclk = 1; @(posedge vco_rst_n); end
    else begin #(t_vclk / 2.0); if (vco_rst_n) vclk = !vclk; end
  end
  // Frequencies (MHz) applied in successive fundamental cycles.
  real flist[12] = '{310.0, 310.0, 510.0, 1010.0, 812.0, 805.0, 798.0, 812.0, 790.0, 801.0, 812.0, 790.0};
  int raw, x, g, gain, rdcc;
  // Reference pulse count: VCLK rising edges inside the phi1 window, plus
  // one if VCLK is already high when the window opens.
  int n_x;
  always @(posedge dut.phi1) n_x = vclk ? 1 : 0;
  always @(posedge vclk) if (dut.phi1) n_x++;
  bit rlock, phase;
  initial begin
    @(negedge ref_clk) rst_n = 1;
    rlock = 1; g = 32; rdcc = 286;
    foreach (flist[i]) begin
      // Wait for a measure cycle to begin, with the new frequency set
      // during the update cycle before it.
      t_vclk = 1000.0 / flist[i];
      @(posedge ref_clk iff dut.phi2 == 0);
      // Measure cycle runs; evaluate at the edge that ends it.
      @(posedge ref_clk);
      raw = 33 - n_x;
      phase = !rlock || raw == 0 || raw == 1;
      x = (phase && raw == 0) ? -1 : raw;
      gain = !phase ? 32 : ((rlock ? 32 : g) == 1 ? 1 : (rlock ? 32 : g) / 2);
      check(int'(dut.fdo_raw) == raw, $sformatf("raw %0d want %0d", dut.fdo_raw, raw));
      check(int'(fdo) == x && int'(gn) == gain, $sformatf("fdo %0d/%0d gn %0d/%0d", fdo, x, gn, gain));
      rdcc = rdcc + x * gain;
      rdcc = rdcc < 0 ? 0 : (rdcc > 1023 ? 1023 : rdcc);
      if (phase) begin rlock = 0; g = gain; end
      #1;
      check(int'(dcc) == rdcc, $sformatf("dcc %0d want %0d", dcc, rdcc));
      check(lock_ind == rlock, "lock indicator");
      check(full_lock == (!rlock && g == 1), "full lock");
    end
    check(full_lock, "full lock reached");
    repeat (4) @(posedge ref_clk);
    check(vco_rst_n, "VCO reset released after full lock");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
