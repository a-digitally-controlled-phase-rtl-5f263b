// tb_gain_controller: in frequency mode Gn equals the initial gain; from
// the update that enters phase mode it is halved at every update, sticks
// at 000001, and full_lock rises once 000001 has been applied. With an
// initial gain of 32 the sequence must be 16, 8, 4, 2, 1, 1, ...
module tb_gain_controller;
  timeunit 1ns; timeprecision 1fs;
  import dcpll_pkg::*;
  logic ref_clk = 0, rst_n = 0, acq_restart = 0, upd = 0, lock_ind = 1;
  loop_mode_e mode = MODE_FREQ;
  gain_t init_gain = 6'b100000, gn;
  logic full_lock;
  int checks = 0, failures = 0;
  gain_controller dut (.*);
  always #20 ref_clk = ~ref_clk;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s at %t (gn=%b)", what, $time, gn); end
  endtask
  int expect_seq[8] = '{16, 8, 4, 2, 1, 1, 1, 1};
  int ig;
  initial begin
    @(negedge ref_clk) rst_n = 1;
    for (int pass = 0; pass < 6; pass++) begin
      ig = (pass == 0) ? 5 : $urandom_range(0, 5);
      init_gain = gain_t'(1 << ig);
      // Frequency mode: a few updates at full gain.
      mode = MODE_FREQ; lock_ind = 1;
      repeat (3) begin
        upd = 1; #1 check(gn == init_gain, "frequency mode passes the initial gain");
        check(!full_lock, "no full lock in frequency mode");
        @(negedge ref_clk); upd = 0; @(negedge ref_clk);
      end
      // Switch: mode goes to phase while lock_ind is still high.
      for (int k = 0; k < 8; k++) begin
        mode = MODE_PHASE; upd = 1; #1;
        check(int'(gn) == ((ig - 1 - k) < 0 ? 1 : (1 << (ig - 1 - k))),
              "phase mode halves per update");
        if (pass == 0) check(int'(gn) == expect_seq[k], "sequence from 32");
        @(negedge ref_clk); lock_ind = 0; upd = 0; #1;
        check(full_lock == (ig - 1 - k <= 0), "full lock after the minimum gain");
        @(negedge ref_clk);
      end
      // Idle edges (no upd) must not shift.
      repeat (2) @(negedge ref_clk);
      check(gn == 6'b1, "holds the minimum gain");
      acq_restart = 1; lock_ind = 1; mode = MODE_FREQ;
      @(negedge ref_clk); acq_restart = 0;
      check(!full_lock, "restart clears full lock");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
