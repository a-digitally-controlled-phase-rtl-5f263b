// tb_dac: the control voltage must follow VDD - VLSB * DCC with
// VLSB = VT ln(8) RL/RB (about 1.955 mV) for every code, fall strictly
// with the code, and span about 2 V from code 0 to 1023.
module tb_dac;
  timeunit 1ns; timeprecision 1fs;
  import dcpll_pkg::*;
  dcc_t dcc; real vc, prev;
  int checks = 0, failures = 0;
  dac dut (.*);
  localparam real VLSB = 0.02585 * 2.0794415 * 0.03637;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s dcc=%0d vc=%f", what, dcc, vc); end
  endtask
  initial begin
    prev = 10.0;
    for (int c = 0; c < 1024; c++) begin
      dcc = dcc_t'(c); #1;
      check(vc > 3.3 - VLSB * c - 1e-6 && vc < 3.3 - VLSB * c + 1e-6, "transfer law");
      check(vc < prev, "monotonic");
      prev = vc;
    end
    check(vc > 1.25 && vc < 1.35, "full-scale span about 2 V");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
