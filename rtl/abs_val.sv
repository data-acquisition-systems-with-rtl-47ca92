// abs_val: absolute value of the sample difference.
//
// Takes the signed 13-bit difference d and outputs |d| as a 12-bit unsigned
// magnitude (|d| <= 4095 for 12-bit samples, so nothing saturates), registered,
// with a valid pulse one clock after the input pulse.
//
// The block and its place between DERIV and the inequality test follow
// the original FPGA schematic (block ABS); the registered output is this design's choice.
`timescale 1ns / 1ns
module abs_val
  import das_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  diff_t   d_i,
  input  logic    valid_i,
  output sample_t mag_o,
  output logic    valid_o
);
  sample_t neg;  // two's-complement negation of the low bits
  assign neg = ~d_i[SAMPLE_W-1:0] + 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mag_o   <= '0;
      valid_o <= 1'b0;
    end else begin
      valid_o <= valid_i;
      if (valid_i) mag_o <= d_i[DIFF_W-1] ? neg : d_i[SAMPLE_W-1:0];
    end
  end
endmodule
