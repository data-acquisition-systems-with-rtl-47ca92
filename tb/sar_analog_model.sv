// sar_analog_model: behavioural model of the converter's external analog half
// (sample-and-hold, 12-bit D/A converter and comparator), for testbenches.
//
// The input voltage is held when hold_i rises (start of a conversion). The
// D/A converter maps code k to -VRANGE/2 + k * VRANGE / 4096 volts; comp_o is
// 1 when the held voltage is strictly above that level. An ideal converter
// driven by this model returns the largest code whose D/A level lies below
// the input.
`timescale 1ns / 1ns
module sar_analog_model #(
  parameter real VRANGE = 5.0   // full input range, -2.5 V .. +2.5 V
) (
  input  real         vin_i,
  input  logic        hold_i,
  input  logic [11:0] code_i,
  output logic        comp_o
);
  real v_held;
  initial v_held = 0.0;
  always @(posedge hold_i) v_held = vin_i;
  assign comp_o = v_held > (-VRANGE / 2.0 + real'(code_i) * VRANGE / 4096.0);
endmodule
