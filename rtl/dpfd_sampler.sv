// dpfd_sampler: VCLK sampler at the input of the DPFD.
//
// Node X follows VCLK while phi1 is high, keeps its last level while phi1
// is low (in silicon a cross-coupled latch resolves it to a rail, which is
// what prevents metastability), and is forced to 0 while phi2 is low so
// that every measurement starts from X = 0. With the VCO released from
// reset at its high state, the first edge seen on X is a rising one; the
// down-counter's N+1 preload cancels it.
//
// The pass/hold/clear behaviour follows the paper's tristate-inverter
// sampler; it is written here as a level-sensitive latch with an
// asynchronous clear. The latch is intended: it is the circuit.
module dpfd_sampler (
  input  logic vclk,
  input  logic phi1,
  input  logic phi2,
  output logic x
);
  timeunit 1ns; timeprecision 1fs;

  always_latch begin
    if (!phi2)     x = 1'b0;
    else if (phi1) x = vclk;
  end
endmodule
