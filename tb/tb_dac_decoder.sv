// tb_dac_decoder: for every 5-bit code exactly 'code' cells are on, they
// are the first 'code' cells in row-major order (a thermometer code), and
// every cell on at one code is still on at the next (monotonicity).
module tb_dac_decoder;
  timeunit 1ns; timeprecision 1fs;
  logic [4:0] code;
  logic [3:0][7:0] sw, prev;
  int checks = 0, failures = 0;
  dac_decoder dut (.*);
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s code=%0d sw=%b", what, code, sw); end
  endtask
  initial begin
    prev = '0;
    for (int c = 0; c < 32; c++) begin
      code = 5'(c); #1;
      check($countones(sw) == c, "number of cells on");
      for (int i = 0; i < 4; i++)
        for (int j = 0; j < 8; j++)
          check(sw[i][j] == ((i * 8 + j) < c), "thermometer order");
      check((prev & ~sw) == '0, "monotonic");
      prev = sw;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
