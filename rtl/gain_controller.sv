// gain_controller: one-hot gain shift register (Gn<5:0>).
//
// In frequency-acquisition mode the output Gn is the programmed initial
// gain. In phase-acquisition mode the register shifts its one-hot bit one
// place to the right at each loop update, halving the loop gain every
// fundamental cycle; once the bit reaches the LSB it recirculates there,
// so the loop keeps the minimum gain. Bit i of Gn set means the FDO is
// multiplied by 2**i.
//
// Gn is combinational from the register and the mode so that the update
// at which phase mode begins already uses initial_gain/2 (the first term
// of the successive approximation). full_lock rises once the minimum gain
// has been applied in phase mode.
//
// The one-hot assertion samples rst_n synchronously while the register
// resets asynchronously; lint tools flag that mix, and it is harmless.
//
// Shift-register behaviour follows the paper; the paper shifts on the
// rising edge of phi1, here the shift happens on the loop-update edge so
// that the halved gain and the masked FDO meet in the same update.
module gain_controller
  import dcpll_pkg::*;
(
  input  logic       ref_clk,
  input  logic       rst_n,
  input  logic       acq_restart,
  input  logic       upd,
  input  logic       lock_ind,
  input  loop_mode_e mode,
  input  gain_t      init_gain,
  output gain_t      gn,
  output logic       full_lock
);
  timeunit 1ns; timeprecision 1fs;

  gain_t g;      // current phase-mode gain
  gain_t base;   // value the next shift starts from
  gain_t shr;    // base halved, sticking at the LSB

  assign base = lock_ind ? init_gain : g;
  assign shr  = base[0] ? base : (base >> 1);
  assign gn   = (mode == MODE_PHASE) ? shr : init_gain;

  always_ff @(posedge ref_clk or negedge rst_n) begin
    if (!rst_n)           g <= init_gain;
    else if (acq_restart) g <= init_gain;
    else if (upd)         g <= gn;
  end

  assign full_lock = !lock_ind && g[0];

  // Gn must stay one-hot whenever the programmed gain is.
  a_onehot: assert property (@(posedge ref_clk) disable iff (!rst_n)
                             $onehot(init_gain) |-> $onehot(gn));
endmodule
