// monostable: behavioural model (not synthesizable) of the monostable
// multivibrator that turns each detection into an impulse of fixed amplitude
// and duration, whatever the shape of the disturbance.
//
// A rising edge on trig_i while the output is low starts an impulse of
// PULSE_NS on pulse_o. Edges during an impulse are ignored
// (non-retriggerable). The output goes high at the triggering edge.
// From the document: the role of the block. The impulse width (1 ms, from the
// 1 MOhm / 1 nF timing parts of the drawn circuit) and the non-retriggerable
// behaviour are this model's choices.
`timescale 1ns / 1ns
module monostable #(
  parameter int unsigned PULSE_NS = 1_000_000
) (
  input  logic trig_i,
  output logic pulse_o
);
  initial pulse_o = 1'b0;
  always @(posedge trig_i) begin
    pulse_o <= 1'b1;
    #(PULSE_NS);
    pulse_o <= 1'b0;
  end
endmodule
