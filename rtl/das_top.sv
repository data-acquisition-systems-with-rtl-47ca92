// das_top: the two intelligent-trigger units of the acquisition system, side
// by side, watching the same monitored signal.
//
//  - u_fpga (fpga_apparatus, synthesizable): samples the signal through an
//    external D/A converter and comparator (dac_code_o / comp_i), every 60 us,
//    and writes to the sample memory (data_o, we_o, trig_o) only the samples
//    selected by the derivative relation chosen with mode_i, level lvl_i and
//    window win_i.
//  - u_analog (analog_trigger, behavioural model of the analog circuit):
//    emits a 1 ms impulse_o whenever vin_i leaves a +/-0.2 V band around its
//    own low-pass filtered reference; the impulse triggers a conventional
//    recorder.
//
// The two halves share no signal inside: in the measurement set-up both see
// the same input, the FPGA through its converter (comp_i), the analog circuit
// directly (vin_i). The top is therefore not synthesizable as a whole; only
// u_fpga is logic.
`timescale 1ns / 1ns
module das_top
  import das_pkg::*;
#(
  parameter int unsigned SAMPLE_CYCLES = 60,          // clocks per 60 us sample (1 MHz clock)
  parameter int unsigned COUNT_W       = 16,
  parameter real         LP_FC_HZ      = 70.0,
  parameter real         MATCH_HZ      = 50.0,
  parameter real         GAIN          = 3.0,
  parameter real         VTH_V         = 0.6,
  parameter int unsigned PULSE_NS      = 1_000_000,
  parameter int unsigned DT_NS         = 1000
) (
  // digital trigger unit
  input  logic               clk,
  input  logic               rst_n,
  input  trig_mode_e         mode_i,
  input  sample_t            lvl_i,
  input  sample_t            win_i,
  input  logic               comp_i,
  output sample_t            dac_code_o,
  output logic               conv_busy_o,
  output sample_t            data_o,
  output logic               we_o,
  output logic               trig_o,
  output logic [COUNT_W-1:0] stored_o,
  output logic               hit_o,
  output logic               dec_valid_o,
  // analog trigger unit
  input  real                vin_i,
  output logic               impulse_o,
  output real                vref_o,
  output real                vdiff_o,
  output logic               upper_o,
  output logic               lower_o
);
  fpga_apparatus #(.SAMPLE_CYCLES(SAMPLE_CYCLES), .COUNT_W(COUNT_W)) u_fpga (
    .clk, .rst_n, .mode_i, .lvl_i, .win_i, .comp_i, .dac_code_o,
    .data_o, .we_o, .trig_o, .stored_o, .hit_o, .dec_valid_o, .conv_busy_o
  );

  analog_trigger #(
    .LP_FC_HZ(LP_FC_HZ), .MATCH_HZ(MATCH_HZ), .GAIN(GAIN), .VTH_V(VTH_V),
    .PULSE_NS(PULSE_NS), .DT_NS(DT_NS)
  ) u_analog (
    .vin_i, .impulse_o, .vref_o, .vdiff_o, .upper_o, .lower_o
  );
endmodule
