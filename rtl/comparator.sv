// comparator: behavioural model (not synthesizable) of a voltage comparator
// with a logic output: out_o = 1 when vp_i > vn_i.
//
// Two instances form the window test: the upper one compares the amplified
// difference with +0.6 V (V - Vr > alpha), the lower one compares -0.6 V
// with it (V - Vr < -alpha). The model has no hysteresis and no delay (the document gives
// neither); the output changes as soon as an input does.
`timescale 1ns / 1ns
module comparator (
  input  real  vp_i,
  input  real  vn_i,
  output logic out_o
);
  assign out_o = (vp_i > vn_i);
endmodule
