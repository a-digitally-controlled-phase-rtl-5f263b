// tb_dpfd: the detector measures a VCLK of known period over a 40 ns REF
// window. The VCLK source starts high when phi2 rises (as the VCO leaves
// reset) and rises every period T, so M = floor(40 ns / T) pulses are
// enclosed and the output must be N - M; in phase mode a 0 must read -1.
module tb_dpfd;
  timeunit 1ns; timeprecision 1fs;
  import dcpll_pkg::*;
  logic vclk = 1, phi1 = 0, phi2 = 1, run = 0;
  logic [5:0] n_mult;
  loop_mode_e mode = MODE_FREQ;
  fdo_t fdo_raw, fdo;
  int checks = 0, failures = 0;
  real t_vclk;
  dpfd dut (.*);
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s at %t", what, $time); end
  endtask
  // VCLK source, stopped high while 'run' is low.
  initial forever begin
    if (!run) begin vclk = 1; @(posedge run); end
    else begin #(t_vclk / 2.0); if (run) vclk = !vclk; end
  end
  int n, m;
  real f;
  initial begin
    #1 phi2 = 0;
    repeat (120) begin
      n = $urandom_range(4, 40);
      f = 60.0 + real'($urandom_range(0, 8700)) / 10.0;      // 60..930 MHz
      t_vclk = 1000.0 / f;
      m = int'($floor(40.0 / t_vclk));
      if (40.0 / t_vclk - real'(m) < 0.01 || real'(m + 1) - 40.0 / t_vclk < 0.01) continue;
      if (n - m < -32 || n - m > 31) continue;
      n_mult = 6'(n); mode = loop_mode_e'($urandom_range(0, 1));
      #5 phi1 = 1; phi2 = 1; run = 1;
      #40 phi1 = 0;
      #1 check(int'(fdo_raw) == n - m, $sformatf("N-M for N=%0d f=%f (got %0d, want %0d)", n, f, fdo_raw, n - m));
      check(int'(fdo) == ((mode == MODE_PHASE && n == m) ? -1 : n - m), "masked output");
      #19 phi2 = 0; run = 0;
    end
    // A VCLK exactly at N * REF in phase mode reads -1, one pulse short reads +1.
    n_mult = 6'd32; mode = MODE_PHASE;
    foreach (t_vclk_list[i]) begin
      t_vclk = t_vclk_list[i];
      #5 phi1 = 1; phi2 = 1; run = 1;
      #40 phi1 = 0;
      #1 check(int'(fdo) == (i == 0 ? -1 : 1), "phase-mode +1/-1");
      #19 phi2 = 0; run = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  real t_vclk_list[2] = '{1.249, 1.252};
  initial begin #100000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
