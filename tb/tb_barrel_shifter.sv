// tb_barrel_shifter: every 6-bit FDO with every one-hot gain; the product
// must equal FDO * 2**i.
module tb_barrel_shifter;
  timeunit 1ns; timeprecision 1fs;
  import dcpll_pkg::*;
  fdo_t fdo; gain_t gn; prod_t prod;
  int checks = 0, failures = 0;
  barrel_shifter dut (.*);
  initial begin
    for (int i = 0; i < 6; i++)
      for (int v = -32; v < 32; v++) begin
        fdo = fdo_t'(v); gn = gain_t'(1 << i); #1;
        checks++;
        if (int'(prod) != v * (1 << i)) begin
          failures++; $display("FAIL: %0d * 2**%0d = %0d", v, i, prod);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
