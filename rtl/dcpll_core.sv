// dcpll_core: all digital logic of the DCPLL.
//
// Clocked by REF (25 MHz in the reference application) except the DPFD
// counter, which counts VCLK pulses through the sampler. Every fundamental
// cycle (two REF periods) the DPFD measures N - M during the measure
// cycle; at the REF edge that ends it, the lock indicator decides the
// mode, the gain controller supplies Gn, and the PI controller adds
// FDO * Gn to the DAC code. During the following update cycle the VCO is
// held in reset so that the next measurement starts phase-aligned to REF.
//
// Frequency acquisition: with a loop gain of 1 (Gn close to wREF/KO) the
// code jumps to the right value in one update. Phase acquisition: the FDO
// becomes +1/-1 and the gain halves each update, a binary search on the
// sub-count quantisation error. After the update at the minimum gain
// full_lock rises and the VCO is no longer reset.
//
// Ports: n_mult = N (VCLK = N * REF), init_gain = one-hot initial gain,
// acq_restart = start a new acquisition (e.g. after changing N). dcc, fdo,
// gn, lock_ind and full_lock are the loop's internal state, brought out
// for monitoring. Partitioning follows the paper's block diagram.
module dcpll_core
  import dcpll_pkg::*;
#(
  parameter dcc_t DCC_RESET = dcc_t'(286)
) (
  input  logic             ref_clk,
  input  logic             rst_n,
  input  logic             vclk,
  input  logic [FDO_W-1:0] n_mult,
  input  gain_t            init_gain,
  input  logic             acq_restart,
  output logic             vco_rst_n,
  output dcc_t             dcc,
  output fdo_t             fdo,
  output gain_t            gn,
  output logic             lock_ind,
  output logic             full_lock
);
  timeunit 1ns; timeprecision 1fs;

  logic       phi1, phi2, upd;
  fdo_t       fdo_raw;
  loop_mode_e mode;

  timing_gen u_timing (
    .ref_clk(ref_clk), .rst_n(rst_n), .acq_restart(acq_restart),
    .full_lock(full_lock), .phi1(phi1), .phi2(phi2),
    .vco_rst_n(vco_rst_n), .upd(upd)
  );

  dpfd u_dpfd (
    .vclk(vclk), .phi1(phi1), .phi2(phi2), .n_mult(n_mult), .mode(mode),
    .fdo_raw(fdo_raw), .fdo(fdo)
  );

  lock_detect u_lock (
    .ref_clk(ref_clk), .rst_n(rst_n), .acq_restart(acq_restart), .upd(upd),
    .fdo_raw(fdo_raw), .lock_ind(lock_ind), .mode(mode)
  );

  gain_controller u_gain (
    .ref_clk(ref_clk), .rst_n(rst_n), .acq_restart(acq_restart), .upd(upd),
    .lock_ind(lock_ind), .mode(mode), .init_gain(init_gain), .gn(gn),
    .full_lock(full_lock)
  );

  pi_controller #(.DCC_RESET(DCC_RESET)) u_pi (
    .ref_clk(ref_clk), .rst_n(rst_n), .upd(upd), .fdo(fdo), .gn(gn),
    .dcc(dcc)
  );
endmodule
