// tb_dpfd_mask: every 6-bit input in both modes; only a 0 in phase mode
// becomes -1.
module tb_dpfd_mask;
  timeunit 1ns; timeprecision 1fs;
  import dcpll_pkg::*;
  fdo_t fdo_raw, fdo;
  loop_mode_e mode;
  int checks = 0, failures = 0;
  dpfd_mask dut (.*);
  initial begin
    for (int m = 0; m < 2; m++)
      for (int v = -32; v < 32; v++) begin
        mode = loop_mode_e'(m); fdo_raw = fdo_t'(v); #1;
        checks++;
        if (int'(fdo) != ((m == 1 && v == 0) ? -1 : v)) begin
          failures++; $display("FAIL: mode %0d in %0d out %0d", m, v, fdo);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
