// dac: behavioural model of the 10-bit current-steering DAC (not
// synthesizable: the output is an analog voltage, modelled as a real).
//
// Two identical 5-bit sub-DACs share one PTAT bias current. The upper five
// DCC bits drive the MSB sub-DAC, whose current is amplified 32 times, the
// lower five the LSB sub-DAC. Each sub-DAC's decoder (the synthesizable
// dac_decoder) turns its code into a thermometer pattern of 32 equal
// cells. The total current flows into a load resistor RL from VDD:
//   VC = VDD - VT*ln(n)*(RL/RB) * sum_i DCC[i]*2**i
// so VC depends only on the resistor ratio, not on the absolute RB.
// VDD = 3.3 V follows the paper; VT, n and RL/RB are not given there and
// are chosen so that the full code range spans 2.0 V.
module dac
  import dcpll_pkg::*;
#(
  parameter real VDD         = 3.3,      // supply (V)
  parameter real VT          = 0.02585,  // thermal voltage at 300 K (V)
  parameter real N_PTAT      = 8.0,      // emitter-area ratio of the bias cell
  parameter real RL_OVER_RB  = 0.03637   // load / bias resistor ratio
) (
  input  dcc_t dcc,
  output real  vc
);
  timeunit 1ns; timeprecision 1fs;

  logic [3:0][7:0] sw_msb, sw_lsb;

  dac_decoder u_dec_msb (.code(dcc[9:5]), .sw(sw_msb));
  dac_decoder u_dec_lsb (.code(dcc[4:0]), .sw(sw_lsb));

  always_comb begin
    int unsigned on_msb, on_lsb;
    on_msb = $countones(sw_msb);
    on_lsb = $countones(sw_lsb);
    vc = VDD - VT * $ln(N_PTAT) * RL_OVER_RB * real'(on_msb * 32 + on_lsb);
  end
endmodule
