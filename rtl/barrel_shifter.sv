// barrel_shifter: gain multiplier of the PI controller.
//
// Multiplies the signed FDO by 2**i, where i is the position of the single
// set bit of the one-hot gain word Gn. Built as a one-hot mux of the six
// shifted copies of the sign-extended input, which is what a barrel
// shifter driven by a decoded shift amount is. A power-of-two gain instead
// of a multiplier is the paper's choice; the shifter's structure is this
// design's. Purely combinational.
module barrel_shifter
  import dcpll_pkg::*;
(
  input  fdo_t  fdo,
  input  gain_t gn,
  output prod_t prod
);
  timeunit 1ns; timeprecision 1fs;

  prod_t ext;
  assign ext = prod_t'(fdo);  // sign extension

  always_comb begin
    prod = '0;
    for (int i = 0; i < GAIN_W; i++)
      if (gn[i]) prod = prod | (ext <<< i);
  end
endmodule
