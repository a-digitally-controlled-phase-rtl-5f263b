// tb_lock_detect: random DPFD readings at random update edges against a
// reference: lock_ind starts high, falls at the first update whose reading
// is 0 or 1, stays low, and returns high on acq_restart; mode is phase
// whenever lock_ind is low or the current reading is 0 or 1.
module tb_lock_detect;
  timeunit 1ns; timeprecision 1fs;
  import dcpll_pkg::*;
  logic ref_clk = 0, rst_n = 0, acq_restart = 0, upd = 0;
  fdo_t fdo_raw = 6'sd20;
  logic lock_ind;
  loop_mode_e mode;
  int checks = 0, failures = 0;
  int n_switch = 0;
  lock_detect dut (.*);
  always #20 ref_clk = ~ref_clk;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s at %t", what, $time); end
  endtask
  bit lock_ref, near;
  initial begin
    @(posedge ref_clk); #1 check(lock_ind, "reset: frequency mode");
    @(negedge ref_clk) rst_n = 1;
    lock_ref = 1;
    repeat (400) begin
      @(negedge ref_clk);
      upd = $urandom_range(0, 1);
      acq_restart = ($urandom_range(0, 15) == 0);
      // Mostly large errors, sometimes the lock values.
      fdo_raw = ($urandom_range(0, 3) == 0) ? fdo_t'($urandom_range(0, 1))
                                            : fdo_t'($urandom_range(2, 61));
      #1;
      near = (fdo_raw == 0 || fdo_raw == 1);
      check(mode == ((!lock_ref || near) ? MODE_PHASE : MODE_FREQ), "mode");
      @(posedge ref_clk); #1;
      if (acq_restart) lock_ref = 1;
      else if (upd && (!lock_ref || near)) begin
        if (lock_ref) n_switch++;
        lock_ref = 0;
      end
      check(lock_ind == lock_ref, "lock indicator");
    end
    check(n_switch > 3, "switches seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
