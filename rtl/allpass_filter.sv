// allpass_filter: behavioural model (not synthesizable) of the analog
// all-pass filter that delays V(t) by the same amount as the low-pass branch.
//
// First-order all-pass H(s) = K (wa - s) / (wa + s), phase -2*atan(f/fa),
// simulated with the bilinear transform (prewarped at fa) every DT_NS:
//   y[n] = K * (c * x[n] + x[n-1]) - c * y[n-1],  c = (t - 1) / (t + 1),
//   t = tan(pi * fa * DT).
// fa and K are computed so that, at MATCH_HZ (50 Hz), phase and gain equal
// those of a first-order low-pass with corner LP_FC_HZ (70 Hz):
//   fa = MATCH_HZ / tan(atan(MATCH_HZ/LP_FC_HZ) / 2),
//   K  = 1 / sqrt(1 + (MATCH_HZ/LP_FC_HZ)^2).
//
// Ports: vin_i, vout_o in volts.
// From the document: the all-pass delays V(t) by the low-pass's delay and has
// its gain at 50 Hz. The first-order form is this model's choice.
`timescale 1ns / 1ns
module allpass_filter #(
  parameter real         MATCH_HZ = 50.0,  // frequency at which both branches agree
  parameter real         LP_FC_HZ = 70.0,  // corner of the low-pass being matched
  parameter int unsigned DT_NS    = 1000
) (
  input  real vin_i,
  output real vout_o
);
  localparam real PI = 3.14159265358979;
  real c, k, x_prev, y_prev;

  initial begin
    real fa, t;
    fa     = MATCH_HZ / $tan($atan(MATCH_HZ / LP_FC_HZ) / 2.0);
    t      = $tan(PI * fa * real'(DT_NS) * 1.0e-9);
    c      = (t - 1.0) / (t + 1.0);
    k      = 1.0 / $sqrt(1.0 + (MATCH_HZ / LP_FC_HZ) ** 2);
    x_prev = 0.0;
    y_prev = 0.0;
    vout_o = 0.0;
  end

  always begin
    #(DT_NS);
    y_prev = c * vin_i + x_prev - c * y_prev;   // unity-gain all-pass state
    x_prev = vin_i;
    vout_o = k * y_prev;
  end
endmodule
