// tb_dpfd_counter: loads N+1 while phi2 is low and then decrements once per
// rising edge of X; after K edges it must read N+1-K as a 6-bit
// two's-complement number.
module tb_dpfd_counter;
  timeunit 1ns; timeprecision 1fs;
  logic x = 0, phi2 = 1;
  logic [5:0] n_mult;
  logic signed [5:0] cnt;
  int checks = 0, failures = 0;
  dpfd_counter #(.W(6)) dut (.*);
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s at %t", what, $time); end
  endtask
  int n, k, expv;
  initial begin
    #1;
    repeat (200) begin
      n = $urandom_range(1, 62); k = $urandom_range(0, 63);
      n_mult = 6'(n); phi2 = 0; x = 0; #1;
      check(cnt == 6'(n + 1), "preload N+1");
      phi2 = 1; #1;
      repeat (k) begin x = 1; #1; x = 0; #1; end
      expv = n + 1 - k;
      check(cnt == 6'(expv), "N+1-K after K edges");
      if (expv >= -32 && expv <= 31) check(int'(cnt) == expv, "signed value");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
