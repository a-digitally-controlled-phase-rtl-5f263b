// tb_dpfd_sampler: node X follows VCLK while phi1 and phi2 are high, keeps
// its level when phi1 falls, and is cleared whenever phi2 is low.
module tb_dpfd_sampler;
  timeunit 1ns; timeprecision 1fs;
  logic vclk = 0, phi1 = 0, phi2 = 0, x;
  int checks = 0, failures = 0;
  dpfd_sampler dut (.*);
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s at %t", what, $time); end
  endtask
  bit held;
  initial begin
    #1 check(x == 0, "cleared while phi2 low");
    vclk = 1; #1 check(x == 0, "still cleared while phi2 low");
    phi2 = 1; #1 check(x == 0, "phi1 low: holds the cleared value");
    phi1 = 1; #1 check(x == 1, "phi1 high: follows VCLK");
    repeat (50) begin
      vclk = $urandom_range(0, 1); #1 check(x == vclk, "transparent");
    end
    repeat (20) begin
      vclk = $urandom_range(0, 1); #1;
      held = vclk; phi1 = 0; #1;
      repeat (5) begin vclk = !vclk; #1 check(x == held, "holds when phi1 low"); end
      phi1 = 1; #1 check(x == vclk, "transparent again");
    end
    vclk = 1; #1 phi2 = 0; #1 check(x == 0, "phi2 low clears even with phi1 high");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #10000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
