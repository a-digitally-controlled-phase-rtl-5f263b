// dcpll_top: the digitally controlled PLL clock synthesizer.
//
// REF (25 MHz) in, OUT = N/2 * REF out (VCLK = N * REF). The digital core
// measures the VCO frequency directly by counting VCLK pulses in a REF
// period, and a gain-programmable accumulator sets the 10-bit DAC code
// that drives the VCO. A loop gain of one settles the frequency in one
// fundamental cycle (two REF periods); a successive approximation with
// halving gain then removes the sub-count error.
//
// The DAC and VCO are behavioural models of analog blocks, so this top is
// for simulation; dcpll_core is the synthesizable part. Reference
// settings: n_mult = 32, init_gain = 6'b100000 (gain 32) for VCLK 800 MHz
// / OUT 400 MHz; n_mult = 16 for VCLK 400 MHz / OUT 200 MHz.
module dcpll_top
  import dcpll_pkg::*;
#(
  parameter dcc_t DCC_RESET = dcc_t'(286)
) (
  input  logic             ref_clk,
  input  logic             rst_n,
  input  logic [FDO_W-1:0] n_mult,
  input  gain_t            init_gain,
  input  logic             acq_restart,
  output logic             out_clk,
  output logic             vclk,
  output dcc_t             dcc,
  output fdo_t             fdo,
  output gain_t            gn,
  output logic             lock_ind,
  output logic             full_lock
);
  timeunit 1ns; timeprecision 1fs;

  logic vco_rst_n;
  real  vc;

  dcpll_core #(.DCC_RESET(DCC_RESET)) u_core (
    .ref_clk(ref_clk), .rst_n(rst_n), .vclk(vclk), .n_mult(n_mult),
    .init_gain(init_gain), .acq_restart(acq_restart), .vco_rst_n(vco_rst_n),
    .dcc(dcc), .fdo(fdo), .gn(gn), .lock_ind(lock_ind), .full_lock(full_lock)
  );

  dac u_dac (.dcc(dcc), .vc(vc));

  vco u_vco (.vc(vc), .rst_n(vco_rst_n), .vclk(vclk));

  out_divider u_div (.vclk(vclk), .rst_n(rst_n), .out_clk(out_clk));
endmodule
