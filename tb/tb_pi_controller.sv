// tb_pi_controller: after reset the code is 286; at each update edge it
// becomes clamp(DCC + FDO * Gn, 0, 1023) and it holds between updates.
// Random FDO and gains, checked against an integer reference.
module tb_pi_controller;
  timeunit 1ns; timeprecision 1fs;
  import dcpll_pkg::*;
  logic ref_clk = 0, rst_n = 0, upd = 0;
  fdo_t fdo = '0; gain_t gn = 6'b1; dcc_t dcc;
  int checks = 0, failures = 0, n_clamp = 0;
  pi_controller dut (.*);
  always #20 ref_clk = ~ref_clk;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s at %t (dcc=%0d)", what, $time, dcc); end
  endtask
  int ref_dcc, s;
  initial begin
    @(posedge ref_clk); #1 check(dcc == 286, "reset value");
    @(negedge ref_clk) rst_n = 1;
    ref_dcc = 286;
    repeat (500) begin
      upd = ($urandom_range(0, 3) != 0);
      fdo = fdo_t'($urandom_range(0, 63));
      gn  = gain_t'(1 << $urandom_range(0, 5));
      @(negedge ref_clk);
      if (upd) begin
        s = ref_dcc + int'(fdo) * int'(gn);
        if (s < 0 || s > 1023) n_clamp++;
        ref_dcc = s < 0 ? 0 : (s > 1023 ? 1023 : s);
      end
      check(int'(dcc) == ref_dcc, "accumulate");
    end
    check(n_clamp > 0, "clamp exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
