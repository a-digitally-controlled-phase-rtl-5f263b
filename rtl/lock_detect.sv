// lock_detect: lock indicator and loop-mode decision.
//
// lock_ind is high during frequency acquisition. At a loop-update edge
// (upd high) whose DPFD reading fdo_raw is 0 or 1 - that is, M = N or
// M = N - 1, the two values that only the quantisation error separates -
// the loop enters phase acquisition and lock_ind falls; it stays low until
// acq_restart or reset. The mode output is combinational so that the very
// update which detects the switch is already handled as a phase-mode step
// (masked FDO, halved gain): this is why phase acquisition takes five
// cycles from an initial gain of 32. Accepting 0 as well as 1 covers a VCO
// that lands exactly on N. Both points are this design's reading of the
// paper, which says only that the switch happens when the DPFD output
// decreases to 1.
module lock_detect
  import dcpll_pkg::*;
(
  input  logic       ref_clk,
  input  logic       rst_n,
  input  logic       acq_restart,
  input  logic       upd,
  input  fdo_t       fdo_raw,
  output logic       lock_ind,
  output loop_mode_e mode
);
  timeunit 1ns; timeprecision 1fs;

  logic near;
  assign near = (fdo_raw == fdo_t'(0)) || (fdo_raw == fdo_t'(1));
  assign mode = (!lock_ind || near) ? MODE_PHASE : MODE_FREQ;

  always_ff @(posedge ref_clk or negedge rst_n) begin
    if (!rst_n)                        lock_ind <= 1'b1;
    else if (acq_restart)              lock_ind <= 1'b1;
    else if (upd && mode == MODE_PHASE) lock_ind <= 1'b0;
  end
endmodule
