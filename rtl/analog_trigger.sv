// analog_trigger: behavioural model (not synthesizable) of the analog
// transient detector.
//
// V(t) feeds two branches: a low-pass filter that yields the undisturbed
// reference Vr(t) and an all-pass filter that gives V(t) the same delay and
// gain at the mains frequency. A differential amplifier (gain 3) forms
// 3*(V - Vr); two comparators test it against +0.6 V and -0.6 V, i.e.
// |V - Vr| > alpha = 0.2 V; their OR fires a monostable that emits a fixed
// impulse usable as an acquisition trigger.
//
// Ports: vin_i (volts); impulse_o (the trigger); vref_o, vdiff_o, upper_o,
// lower_o expose the internal nodes.
// Block structure, 70 Hz corner, gain 3 and +/-0.6 V thresholds follow the
// document; filter orders and the impulse width are this model's choices.
`timescale 1ns / 1ns
module analog_trigger #(
  parameter real         LP_FC_HZ = 70.0,
  parameter real         MATCH_HZ = 50.0,
  parameter real         GAIN     = 3.0,
  parameter real         VTH_V    = 0.6,      // comparator threshold, = GAIN * alpha
  parameter int unsigned PULSE_NS = 1_000_000,
  parameter int unsigned DT_NS    = 1000
) (
  input  real  vin_i,
  output logic impulse_o,
  output real  vref_o,
  output real  vdiff_o,
  output logic upper_o,
  output logic lower_o
);
  real  v_delayed, vth_pos, vth_neg;
  logic any;

  assign vth_pos = VTH_V;
  assign vth_neg = -VTH_V;

  allpass_filter #(.MATCH_HZ(MATCH_HZ), .LP_FC_HZ(LP_FC_HZ), .DT_NS(DT_NS))
    u_allpass (.vin_i, .vout_o(v_delayed));
  lowpass_filter #(.FC_HZ(LP_FC_HZ), .DT_NS(DT_NS))
    u_lowpass (.vin_i, .vout_o(vref_o));
  diff_amp #(.GAIN(GAIN))
    u_diff (.vp_i(v_delayed), .vn_i(vref_o), .vout_o(vdiff_o));
  comparator u_cmp_upper (.vp_i(vdiff_o), .vn_i(vth_pos), .out_o(upper_o));
  comparator u_cmp_lower (.vp_i(vth_neg), .vn_i(vdiff_o), .out_o(lower_o));
  or_gate    u_or (.a_i(upper_o), .b_i(lower_o), .y_o(any));
  monostable #(.PULSE_NS(PULSE_NS)) u_mono (.trig_i(any), .pulse_o(impulse_o));
endmodule
