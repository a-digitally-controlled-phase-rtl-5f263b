// dcpll_pkg: widths and types shared by the digitally controlled PLL.
//
// The frequency-difference word (FDO) is the 6-bit two's-complement value
// left in the DPFD down-counter, the gain word Gn is a 6-bit one-hot code
// (bit i set = multiply by 2**i), and the DAC control code (DCC) is 10 bits.
// The 6-bit FDO, the 6-bit gain and the 10-bit DAC follow the paper; the
// width of the barrel-shifter product is derived from them.
package dcpll_pkg;
  timeunit 1ns; timeprecision 1fs;

  localparam int unsigned FDO_W  = 6;   // DPFD down-counter width
  localparam int unsigned GAIN_W = 6;   // one-hot gain word Gn<5:0>
  localparam int unsigned DCC_W  = 10;  // DAC control code width
  localparam int unsigned PROD_W = FDO_W + GAIN_W - 1; // FDO * 2**5 fits

  typedef logic signed [FDO_W-1:0]  fdo_t;
  typedef logic        [GAIN_W-1:0] gain_t;
  typedef logic        [DCC_W-1:0]  dcc_t;
  typedef logic signed [PROD_W-1:0] prod_t;

  // Loop mode: frequency acquisition until the DPFD first reads 0 or 1,
  // phase acquisition (successive approximation) afterwards.
  typedef enum logic {MODE_FREQ = 1'b0, MODE_PHASE = 1'b1} loop_mode_e;
endpackage
