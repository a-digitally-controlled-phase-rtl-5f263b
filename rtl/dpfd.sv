// dpfd: digital phase-frequency detector.
//
// Measures the frequency difference between REF and the VCO by counting
// VCLK pulses inside one REF period: sampler (node X), 6-bit down-counter
// preloaded with N+1, and the phase-mode mask. fdo_raw = N - M, where M is
// the number of VCLK pulses enclosed by REF; it is proportional to the
// frequency error (N/wREF)(wREF - wOUT) up to a quantisation error in
// (-1, 1). fdo is fdo_raw with 0 mapped to -1 in phase mode.
//
// Timing: the count is final when phi1 falls at the REF edge that ends the
// measure cycle, and it stays put until phi2 falls again. The REF-domain
// logic reads it on that same REF edge (the loop-update edge). Structure
// follows the paper.
module dpfd
  import dcpll_pkg::*;
(
  input  logic             vclk,
  input  logic             phi1,
  input  logic             phi2,
  input  logic [FDO_W-1:0] n_mult,
  input  loop_mode_e       mode,
  output fdo_t             fdo_raw,
  output fdo_t             fdo
);
  timeunit 1ns; timeprecision 1fs;

  logic x;

  dpfd_sampler u_sampler (.vclk(vclk), .phi1(phi1), .phi2(phi2), .x(x));

  dpfd_counter #(.W(FDO_W)) u_counter (
    .x(x), .phi2(phi2), .n_mult(n_mult), .cnt(fdo_raw)
  );

  dpfd_mask u_mask (.fdo_raw(fdo_raw), .mode(mode), .fdo(fdo));
endmodule
