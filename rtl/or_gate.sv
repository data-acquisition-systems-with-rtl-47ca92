// or_gate: two-input OR that merges the upper and lower comparator outputs,
// so that an excursion on either side of the reference, |V - Vr| > alpha,
// is detected (|V - Vr| > alpha). Purely combinational.
`timescale 1ns / 1ns
module or_gate (
  input  logic a_i,
  input  logic b_i,
  output logic y_o
);
  always_comb y_o = a_i | b_i;
endmodule
