// out_divider: divide-by-two from the VCO clock to the synthesizer output.
//
// The chip runs VCLK at twice the output frequency (800 MHz VCLK for a
// 400 MHz output). A toggle flop gives OUT = VCLK / 2 with 50 % duty
// cycle, changing on VCLK rising edges; rst_n clears it. The ratio of two
// follows the paper's operating points; the circuit is this design's.
module out_divider (
  input  logic vclk,
  input  logic rst_n,
  output logic out_clk
);
  timeunit 1ns; timeprecision 1fs;

  always_ff @(posedge vclk or negedge rst_n) begin
    if (!rst_n) out_clk <= 1'b0;
    else        out_clk <= ~out_clk;
  end
endmodule
