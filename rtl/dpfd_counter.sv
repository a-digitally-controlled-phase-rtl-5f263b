// dpfd_counter: 6-bit down-counter of the DPFD.
//
// While phi2 is low the counter is loaded with N+1 (N = frequency
// multiplication factor). While phi2 is high it decrements on every rising
// edge of the sampler node X. When REF has enclosed M VCLK pulses, X has
// risen M+1 times (the first rise is the VCO leaving reset) and the
// counter reads N - M, read as a W-bit two's-complement number: the
// modular wrap of the preload is harmless as long as N - M stays within
// [-2**(W-1), 2**(W-1)-1]. Preload value, count direction and 6-bit width
// follow the paper; the asynchronous load is this design's way of
// loading while X is held still.
module dpfd_counter #(
  parameter int unsigned W = 6
) (
  input  logic                x,
  input  logic                phi2,
  input  logic [W-1:0]        n_mult,
  output logic signed [W-1:0] cnt
);
  timeunit 1ns; timeprecision 1fs;

  always_ff @(posedge x or negedge phi2) begin
    if (!phi2) cnt <= n_mult + W'(1);
    else       cnt <= cnt - W'(1);
  end
endmodule
