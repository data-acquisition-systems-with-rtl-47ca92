// fpga_apparatus: the derivative-controlled acquisition unit.
//
// Chain, as in the FPGA schematic: CONV_AD (SAR converter logic) -> DERIV
// (first difference) -> ABS (magnitude) -> CONTROL (inequality against LVL,
// window WIN) -> CNTRLMEM (writes accepted samples to the external memory).
// Each sample x[n] is stored or dropped depending on |x[n] - x[n-1]|.
//
// Interface: dac_code_o / comp_i connect the external D/A converter and
// comparator of the converter; lvl_i, win_i, mode_i are the user settings;
// data_o, we_o, trig_o go to the sample memory (a logic scope).
// Timing: with the 1 MHz clock a sample is taken every 60 clocks (60 us);
// the decision about it and the write follow 16 clocks after the conversion
// starts (13 for the conversion, 3 for DERIV, ABS and CONTROL, 1 for the write).
//
// The block list and order follow the document; clock rate and the interface
// to the memory are this design's choices.
`timescale 1ns / 1ns
module fpga_apparatus
  import das_pkg::*;
#(
  parameter int unsigned SAMPLE_CYCLES = 60,
  parameter int unsigned COUNT_W       = 16
) (
  input  logic               clk,
  input  logic               rst_n,
  input  trig_mode_e         mode_i,
  input  sample_t            lvl_i,
  input  sample_t            win_i,
  input  logic               comp_i,
  output sample_t            dac_code_o,
  output sample_t            data_o,
  output logic               we_o,
  output logic               trig_o,
  output logic [COUNT_W-1:0] stored_o,
  output logic               hit_o,        // relation event on the last decided sample
  output logic               dec_valid_o,  // a decision was made this clock
  output logic               conv_busy_o   // a conversion is in progress
);
  sample_t sample;
  logic    sample_valid;
  diff_t   d;
  logic    d_valid;
  sample_t mag;
  logic    mag_valid;
  logic    store, trig, dec_valid;

  conv_ad #(.SAMPLE_CYCLES(SAMPLE_CYCLES)) u_conv_ad (
    .clk, .rst_n, .comp_i, .dac_code_o,
    .sample_o(sample), .sample_valid_o(sample_valid), .busy_o(conv_busy_o)
  );

  deriv u_deriv (
    .clk, .rst_n, .x_i(sample), .valid_i(sample_valid), .d_o(d), .valid_o(d_valid)
  );

  abs_val u_abs (
    .clk, .rst_n, .d_i(d), .valid_i(d_valid), .mag_o(mag), .valid_o(mag_valid)
  );

  control u_control (
    .clk, .rst_n, .mode_i, .lvl_i, .win_i, .mag_i(mag), .valid_i(mag_valid),
    .store_o(store), .trig_o(trig), .hit_o, .valid_o(dec_valid)
  );

  cntrlmem #(.COUNT_W(COUNT_W)) u_cntrlmem (
    .clk, .rst_n, .sample_i(sample), .sample_valid_i(sample_valid),
    .dec_valid_i(dec_valid), .store_i(store), .trig_i(trig),
    .data_o, .we_o, .trig_o, .stored_o
  );

  assign dec_valid_o = dec_valid;
endmodule
