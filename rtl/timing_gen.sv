// timing_gen: fundamental-cycle sequencer of the DCPLL.
//
// One fundamental loop cycle spans two REF periods: a frequency-measure
// cycle, during which the VCO runs from a phase aligned with REF and the
// DPFD counts VCLK pulses, followed by a loop-update cycle, during which
// the DPFD counter is reloaded and the VCO is held in reset. A single
// toggle flop clocked by REF makes this split.
//
// Outputs (all registered on the REF rising edge):
//   phi1      high during the measure cycle: the DPFD sampler passes VCLK.
//   phi2      low during the update cycle: sampler node cleared, counter
//             loaded with N+1.
//   vco_rst_n low during the update cycle while acquisition is going on;
//             held high once full_lock is set, since a locked loop no
//             longer needs the VCO phase realigned every cycle.
//   upd       high during the measure cycle: the REF edge that ends it is
//             the loop-update edge at which the lock indicator, the gain
//             controller and the PI register take the new FDO.
// acq_restart starts a new acquisition from a measure cycle.
// During reset and the first REF period after it, phi1, upd and vco_rst_n
// stay low and phi2 stays high; the first falling phi2 loads the counter,
// and the first measure cycle starts one REF period later.
//
// phi2 doubles as the DPFD counter's asynchronous load, so the meas flop
// drives both synchronous logic and an asynchronous load; lint tools
// flag that, and it is intended.
//
// The exact phi1/phi2 waveforms are this design's choice: both are high
// for the measure cycle and low for the update cycle, apart from the
// start-up period above.
module timing_gen (
  input  logic ref_clk,
  input  logic rst_n,
  input  logic acq_restart,
  input  logic full_lock,
  output logic phi1,
  output logic phi2,
  output logic vco_rst_n,
  output logic upd
);
  timeunit 1ns; timeprecision 1fs;

  logic meas;    // 1 = frequency-measure cycle, 0 = loop-update cycle
  logic primed;  // an update cycle has passed since reset

  // Reset leaves meas high so that the first edge after reset is a falling
  // phi2, which loads the DPFD counter before the first measurement.
  always_ff @(posedge ref_clk or negedge rst_n) begin
    if (!rst_n) begin
      meas   <= 1'b1;
      primed <= 1'b0;
    end else begin
      primed <= primed | ~meas;
      if (acq_restart) meas <= 1'b1;
      else             meas <= ~meas;
    end
  end

  assign phi1      = meas & primed;
  assign phi2      = meas;
  assign upd       = meas & primed;
  assign vco_rst_n = (meas & primed) | full_lock;
endmodule
