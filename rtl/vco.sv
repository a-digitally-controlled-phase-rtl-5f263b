// vco: behavioural model of the resettable three-stage ring oscillator
// (not synthesizable: it uses delays and a real control voltage).
//
// The ring has two normal differential delay cells and one cell that can
// switch from inverting to non-inverting. While rst_n is low the ring is
// non-inverting overall, so it stops with the output high; when rst_n
// returns high it restarts from that state, so the first half period after
// release is high and the oscillation is phase-aligned to the release.
// The frequency follows the swing VDD - VC set by the replica bias:
//   f = F_MIN + (VDD - VC) / V_SPAN * (F_MAX - F_MIN), clipped to the range.
// F_MIN/F_MAX are the tuning range reported for the chip (57.2-934 MHz);
// the linear law is this model's assumption. The control voltage is read
// afresh at every half period.
module vco #(
  parameter real F_MIN_MHZ = 57.2,
  parameter real F_MAX_MHZ = 934.0,
  parameter real VDD       = 3.3,
  parameter real V_SPAN    = 2.0    // VDD - VC at the top of the range (V)
) (
  input  real  vc,
  input  logic rst_n,
  output logic vclk
);
  timeunit 1ns; timeprecision 1fs;

  function automatic real half_period_ns(real v);
    real swing, f;
    swing = VDD - v;
    if (swing < 0.0)    swing = 0.0;
    if (swing > V_SPAN) swing = V_SPAN;
    f = F_MIN_MHZ + swing / V_SPAN * (F_MAX_MHZ - F_MIN_MHZ);
    return 500.0 / f;
  endfunction

  initial begin
    vclk = 1'b1;
    forever begin
      if (!rst_n) begin
        vclk = 1'b1;
        @(posedge rst_n);
      end else begin
        fork
          #(half_period_ns(vc));
          @(negedge rst_n);
        join_any
        disable fork;
        if (rst_n) vclk = ~vclk;
      end
    end
  end
endmodule
