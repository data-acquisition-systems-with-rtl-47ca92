// diff_amp: behavioural model (not synthesizable) of the differential
// amplifier: vout_o = GAIN * (vp_i - vn_i), with no delay.
//
// With vp_i the delayed signal and vn_i the low-pass reference, the output is
// GAIN times the disturbance V - Vr. GAIN = 3 follows the document; together
// with the comparator thresholds of +/-0.6 V it sets alpha = 0.2 V.
// The output is clipped to +/-VSAT_V, a rail chosen by this model (the supply
// voltage of the amplifier is not given).
`timescale 1ns / 1ns
module diff_amp #(
  parameter real GAIN   = 3.0,
  parameter real VSAT_V = 12.0
) (
  input  real vp_i,
  input  real vn_i,
  output real vout_o
);
  real v;
  assign v      = GAIN * (vp_i - vn_i);
  assign vout_o = (v > VSAT_V) ? VSAT_V : ((v < -VSAT_V) ? -VSAT_V : v);
endmodule
