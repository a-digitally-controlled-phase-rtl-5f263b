// pi_controller: digital loop filter (barrel shifter, adder, register).
//
// At every loop-update edge (REF rising edge with upd high) the register
// takes DCC + FDO * Gn. The sum is clamped to the 10-bit DAC range so that
// a large overshoot cannot wrap the code around. The register resets to
// DCC_RESET, which sets the VCO's free-running frequency.
//
// Structure follows the paper. The clamp and the reset value are this
// design's choices (the paper mentions neither); DCC_RESET = 286 puts the
// VCO model used with this design at about 302 MHz, the free-running
// frequency reported for the chip.
module pi_controller
  import dcpll_pkg::*;
#(
  parameter dcc_t DCC_RESET = dcc_t'(286)
) (
  input  logic  ref_clk,
  input  logic  rst_n,
  input  logic  upd,
  input  fdo_t  fdo,
  input  gain_t gn,
  output dcc_t  dcc
);
  timeunit 1ns; timeprecision 1fs;

  localparam int unsigned SUM_W = PROD_W + 2;
  localparam int          DCC_MAX = (1 << DCC_W) - 1;

  prod_t                   prod;
  logic signed [SUM_W-1:0] sum;
  dcc_t                    dcc_next;

  barrel_shifter u_shift (.fdo(fdo), .gn(gn), .prod(prod));

  assign sum = $signed({2'b00, dcc}) + SUM_W'(prod);

  always_comb begin
    if (sum < 0)                         dcc_next = '0;
    else if (sum > SUM_W'(DCC_MAX))      dcc_next = dcc_t'(DCC_MAX);
    else                                 dcc_next = dcc_t'(sum);
  end

  always_ff @(posedge ref_clk or negedge rst_n) begin
    if (!rst_n)   dcc <= DCC_RESET;
    else if (upd) dcc <= dcc_next;
  end
endmodule
