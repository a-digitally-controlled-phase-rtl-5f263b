// tb_out_divider: OUT toggles on every VCLK rising edge after reset, so it
// has half the VCLK rate.
module tb_out_divider;
  timeunit 1ns; timeprecision 1fs;
  logic vclk = 0, rst_n = 0, out_clk;
  int checks = 0, failures = 0, nv = 0, no = 0;
  out_divider dut (.*);
  always #0.625 vclk = ~vclk;
  always @(posedge vclk) if (rst_n) nv++;
  always @(posedge out_clk) no++;
  initial begin
    #3 checks++; if (out_clk) failures++;
    @(negedge vclk) rst_n = 1;
    repeat (40) begin
      @(negedge vclk); checks++;
      if (out_clk != nv[0]) begin failures++; $display("FAIL: phase"); end
    end
    checks++; if (no != nv / 2) begin failures++; $display("FAIL: rate %0d %0d", no, nv); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #10000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
