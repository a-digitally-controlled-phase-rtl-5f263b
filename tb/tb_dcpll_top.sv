// tb_dcpll_top: end-to-end test of the DCPLL with a 25 MHz reference.
//
// Three acquisitions are run: N = 32 (VCLK 800 MHz, OUT 400 MHz) and
// N = 16 (VCLK 400 MHz, OUT 200 MHz), each from reset with the VCO at its
// free-running frequency of about 302 MHz, then N = 32 again from lock at
// N = 16 through acq_restart. For each the bench records the number of fundamental cycles
// spent in frequency acquisition and in phase acquisition, checks them
// against the chip's figures (at most 3 and 1 frequency cycles), checks that
// phase acquisition ends after five halvings of the initial gain 32, that
// the total acquisition fits in the 16 / 12 REF cycles of the chip, and
// that afterwards VCLK measured over several REF periods is within 0.5 %
// of N * 25 MHz and OUT is VCLK / 2. It also counts the loop's mechanisms:
// frequency-mode updates, the mode switch, masked (-1) phase steps, gain
// halvings, the gain sticking at its minimum, the VCO reset being dropped
// after full lock and a restart. Each must occur at least once.
module tb_dcpll_top;
  timeunit 1ns; timeprecision 1fs;
  import dcpll_pkg::*;

  localparam real T_REF = 40.0;  // 25 MHz

  logic ref_clk = 1'b0, rst_n = 1'b0, acq_restart = 1'b0;
  logic [5:0] n_mult = 6'd32;
  gain_t init_gain = 6'b100000;
  logic out_clk, vclk, lock_ind, full_lock;
  dcc_t dcc; fdo_t fdo; gain_t gn;

  int checks = 0, failures = 0;
  int n_freq_upd = 0, n_switch = 0, n_masked = 0, n_halve = 0, n_stick = 0;
  int n_free_run = 0, n_restart = 0;

  dcpll_top dut (.*);

  always #(T_REF/2) ref_clk = ~ref_clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Mechanism counters, sampled on loop-update edges.
  gain_t gn_prev;
  always @(posedge ref_clk) if (rst_n && dut.u_core.upd) begin
    if (dut.u_core.mode == MODE_FREQ) n_freq_upd++;
    if (lock_ind && dut.u_core.mode == MODE_PHASE) n_switch++;
    if (dut.u_core.mode == MODE_PHASE && dut.u_core.fdo_raw == 0 && fdo == -1) n_masked++;
    if (!lock_ind && gn == (dut.u_core.u_gain.g >> 1)) n_halve++;
    if (!lock_ind && dut.u_core.u_gain.g == 6'b1 && gn == 6'b1) n_stick++;
  end
  always @(posedge ref_clk) if (full_lock && !dut.u_core.phi2 && dut.u_core.vco_rst_n) n_free_run++;

  // Count VCLK and OUT rising edges over a window of REF periods.
  task automatic measure(input int n_ref, output int vcnt, output int ocnt);
    int v = 0, o = 0;
    fork
      begin repeat (n_ref) @(posedge ref_clk); end
      forever @(posedge vclk) v++;
      forever @(posedge out_clk) o++;
    join_any
    disable fork;
    vcnt = v; ocnt = o;
  endtask

  // Acquire at VCLK = n * REF; max_ref bounds the REF cycles to full lock,
  // exp_freq (if not -1) bounds the number of frequency-mode cycles.
  task automatic acquire(input int n, input int max_ref, input int exp_freq);
    int ref_cycles, freq_cyc, phase_cyc, vcnt, ocnt;
    real f_vclk, f_exp;
    ref_cycles = 0; freq_cyc = 0; phase_cyc = 0;
    while (!full_lock && ref_cycles < 200) begin
      @(posedge ref_clk);
      ref_cycles++;
      if (dut.u_core.upd) begin
        if (dut.u_core.mode == MODE_FREQ) freq_cyc++; else phase_cyc++;
      end
    end
    $display("N=%0d: %0d freq cycles, %0d phase cycles, %0d REF cycles, DCC=%0d",
             n, freq_cyc, phase_cyc, ref_cycles, dcc);
    check(full_lock, "full lock reached");
    check(phase_cyc == 5, "phase acquisition takes five cycles from gain 32");
    // Acquisition time in REF cycles: two per fundamental cycle.
    check(2 * (freq_cyc + phase_cyc) <= max_ref, "acquisition within the chip's REF-cycle count");
    if (exp_freq >= 0) check(freq_cyc >= 1 && freq_cyc <= exp_freq, "frequency acquisition cycles");
    // Let the unreset loop run, then measure over 20 REF periods (0.8 us).
    repeat (20) @(posedge ref_clk);
    measure(20, vcnt, ocnt);
    f_vclk = real'(vcnt) / (20.0 * T_REF) * 1000.0;
    f_exp  = real'(n) * 25.0;
    $display("N=%0d: VCLK %f MHz (target %f), OUT edges %0d", n, f_vclk, f_exp, ocnt);
    check(f_vclk > f_exp * 0.995 && f_vclk < f_exp * 1.005, "VCLK within 0.5 %");
    check(ocnt >= vcnt/2 - 1 && ocnt <= vcnt/2 + 1, "OUT = VCLK / 2");
    check(full_lock && !lock_ind, "stays locked");
  endtask

  initial begin
    // 800 MHz VCLK from the free-running VCO.
    repeat (3) @(posedge ref_clk);
    @(negedge ref_clk) rst_n = 1'b1;
    acquire(32, 16, 3);
    // 400 MHz VCLK from the free-running VCO.
    @(negedge ref_clk) begin rst_n = 1'b0; n_mult = 6'd16; end
    @(negedge ref_clk) rst_n = 1'b1;
    acquire(16, 12, 1);
    // Re-target to N = 32 from lock at N = 16 through a restart.
    @(negedge ref_clk) begin n_mult = 6'd32; acq_restart = 1'b1; end
    @(negedge ref_clk) acq_restart = 1'b0;
    n_restart++;
    check(lock_ind, "restart re-enters frequency acquisition");
    acquire(32, 200, -1);
    check(n_freq_upd > 0,  "frequency-mode updates happened");
    check(n_switch == 3,   "one mode switch per acquisition");
    check(n_masked > 0,    "mask turned 0 into -1");
    check(n_halve >= 8,    "gain halvings happened");
    check(n_stick > 0,     "gain stuck at its minimum");
    check(n_free_run > 0,  "VCO reset dropped after full lock");
    check(n_restart == 1,  "restart exercised");
    $display("mechanisms: freq_upd=%0d switch=%0d masked=%0d halve=%0d stick=%0d free_run=%0d restart=%0d",
             n_freq_upd, n_switch, n_masked, n_halve, n_stick, n_free_run, n_restart);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(T_REF * 2000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
