// tb_dcpll_gain_sweep: acquisition time against loop gain.
//
// The full loop (default parameters) acquires VCLK = 800 MHz from the
// 302 MHz free-running VCO with initial gains 32, 16, 8 and 4. With the
// VCO model one DAC step is 0.857 MHz, so the normalised loop gain is
// K = Gn * 0.857 / 25. The frequency error after n updates shrinks as
// |1 - K|**n from 497.6 MHz, and frequency acquisition ends at the first
// reading of 0 or 1, i.e. once the error is below one to two REF counts
// (25-50 MHz). The number of frequency-mode updates must therefore lie
// between ceil(ln(50/497.6)/ln|1-K|) and ceil(ln(25/497.6)/ln|1-K|).
// Phase acquisition must take log2(Gn) updates. The successive
// approximation spans +-Gn DAC steps, which covers the last REF count
// only when K is near 1: with Gn = 32 the final VCLK must be within 0.5 %
// of 800 MHz, with smaller gains only within two REF counts (50 MHz).
module tb_dcpll_gain_sweep;
  timeunit 1ns; timeprecision 1fs;
  import dcpll_pkg::*;

  logic ref_clk = 1'b0, rst_n = 1'b0, acq_restart = 1'b0;
  logic [5:0] n_mult = 6'd32;
  gain_t init_gain = 6'b100000;
  logic out_clk, vclk, lock_ind, full_lock;
  dcc_t dcc; fdo_t fdo; gain_t gn;
  int checks = 0, failures = 0;

  dcpll_top dut (.*);
  always #20 ref_clk = ~ref_clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int n_edges;
  always @(posedge vclk) n_edges++;

  initial begin
    int freq_cyc, phase_cyc, est_lo, est_hi, lg;
    real k, f;
    for (lg = 5; lg >= 2; lg--) begin
      init_gain = gain_t'(1 << lg);
      rst_n = 1'b0;
      repeat (2) @(posedge ref_clk);
      @(negedge ref_clk) rst_n = 1'b1;
      freq_cyc = 0; phase_cyc = 0;
      while (!full_lock && freq_cyc + phase_cyc < 100) begin
        @(posedge ref_clk);
        if (dut.u_core.upd) begin
          if (dut.u_core.mode == MODE_FREQ) freq_cyc++; else phase_cyc++;
        end
      end
      k = real'(1 << lg) * (876.8 / 1023.0) / 25.0;
      est_lo = int'($ceil($ln(50.0 / 497.6) / $ln((k > 1.0) ? k - 1.0 : 1.0 - k)));
      est_hi = int'($ceil($ln(25.0 / 497.6) / $ln((k > 1.0) ? k - 1.0 : 1.0 - k)));
      repeat (10) @(posedge ref_clk);
      n_edges = 0;
      repeat (20) @(posedge ref_clk);
      f = real'(n_edges) / 800.0 * 1000.0;
      $display("gain %0d: K=%f, %0d freq updates (estimate %0d..%0d), %0d phase updates, VCLK %f MHz",
               1 << lg, k, freq_cyc, est_lo, est_hi, phase_cyc, f);
      check(full_lock, "full lock reached");
      check(freq_cyc >= est_lo && freq_cyc <= est_hi, "frequency acquisition time against |1-K|**n");
      check(phase_cyc == lg, "phase acquisition takes log2(gain) updates");
      if (lg == 5) check(f > 796.0 && f < 804.0, "VCLK within 0.5 % of 800 MHz");
      else         check(f > 750.0 && f < 850.0, "VCLK within two REF counts of 800 MHz");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
