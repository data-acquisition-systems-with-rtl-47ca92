// deriv: discrete derivative of the sampled signal.
//
// For each new sample x[n] (valid_i pulse) the module outputs the signed
// difference d[n] = x[n] - x[n-1], one clock later, with a valid_o pulse.
// With a constant sampling period Ts this is the derivative scaled by Ts:
// dV/dt ~ d[n] * LSB / Ts. The first sample after reset has no predecessor
// and produces no output.
//
// Interface: x_i 12-bit offset-binary sample, d_o 13-bit two's complement.
// Timing: one clock of latency, one result per input sample.
//
// The document gives the block's role (derivative of the monitored signal,
// block DERIV of the original schematic); the first-difference form is this
// design's choice.
`timescale 1ns / 1ns
module deriv
  import das_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  sample_t x_i,
  input  logic    valid_i,
  output diff_t   d_o,
  output logic    valid_o
);
  sample_t x_prev;
  logic    have_prev;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_prev    <= '0;
      have_prev <= 1'b0;
      d_o       <= '0;
      valid_o   <= 1'b0;
    end else begin
      valid_o <= 1'b0;
      if (valid_i) begin
        x_prev    <= x_i;
        have_prev <= 1'b1;
        d_o       <= diff_t'({1'b0, x_i}) - diff_t'({1'b0, x_prev});
        valid_o   <= have_prev;
      end
    end
  end
endmodule
