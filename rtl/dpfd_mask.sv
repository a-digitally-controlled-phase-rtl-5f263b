// dpfd_mask: output mask of the DPFD.
//
// In phase-acquisition mode the DPFD reading is one of two values: 1 when
// OUT lags REF and 0 when it leads. The mask turns 0 into -1 so that each
// successive-approximation step moves the DAC code up or down. In
// frequency-acquisition mode the reading passes unchanged. Purely
// combinational; follows the paper.
module dpfd_mask
  import dcpll_pkg::*;
(
  input  fdo_t       fdo_raw,
  input  loop_mode_e mode,
  output fdo_t       fdo
);
  timeunit 1ns; timeprecision 1fs;

  always_comb begin
    if (mode == MODE_PHASE && fdo_raw == fdo_t'(0)) fdo = fdo_t'(-1);
    else                                            fdo = fdo_raw;
  end
endmodule
