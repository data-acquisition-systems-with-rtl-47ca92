// lowpass_filter: behavioural model (not synthesizable) of the analog
// low-pass filter that derives the disturbance-free reference Vr(t) from the
// monitored signal V(t).
//
// First-order response with its -3 dB corner at FC_HZ (70 Hz), evaluated
// every DT_NS nanoseconds of simulated time as
//   y <= y + a * (x - y),  a = 1 - exp(-2*pi*FC_HZ*DT).
// At 50 Hz it gives a gain of 0.81 and a phase lag of 35.5 degrees, which the
// all-pass branch reproduces. A slow transient passes through, a fast one is
// suppressed, so V - Vr shows the transient.
//
// Ports: vin_i (volts), vout_o (volts, updated every DT_NS).
// From the document: low-pass derivation of the reference and the 70 Hz
// corner. The filter order is this model's choice (the circuit's topology is
// only drawn, not specified).
`timescale 1ns / 1ns
module lowpass_filter #(
  parameter real         FC_HZ = 70.0,  // -3 dB frequency
  parameter int unsigned DT_NS = 1000   // model time step
) (
  input  real vin_i,
  output real vout_o
);
  localparam real PI = 3.14159265358979;
  real a;

  initial begin
    a      = 1.0 - $exp(-2.0 * PI * FC_HZ * real'(DT_NS) * 1.0e-9);
    vout_o = 0.0;
  end

  always begin
    #(DT_NS);
    vout_o = vout_o + a * (vin_i - vout_o);
  end
endmodule
