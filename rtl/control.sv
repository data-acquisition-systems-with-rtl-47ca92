// control: the inequality test that decides which samples are acquired.
//
// For each derivative magnitude |d[n]| (valid_i pulse) it decides whether
// sample x[n] is stored, using the level lvl_i and the window length win_i
// (both in the units of the data path: LSBs per sampling period and samples).
//
//   MODE_HIGH_SLOPE, relation |dV/dt| >= beta1:
//     a sample with |d| >= lvl starts (or restarts) an acquisition window;
//     that sample and the following win_i-1 samples are stored.
//   MODE_LOW_SLOPE, relation |dV/dt| <= beta2:
//     samples with |d| <= lvl are stored; a sample with |d| > lvl is
//     discarded and so are the following win_i-1 samples, whatever their
//     slope, so a fixed time window around a transient is dropped.
//   A window of 0 behaves as a window of 1 sample.
//
// Outputs (one clock after valid_i, with valid_o): store_o = keep this sample,
// trig_o = first stored sample of a run (the acquisition trigger), hit_o = the
// relation's event (|d| >= lvl, resp. |d| > lvl) occurred on this sample.
//
// From the document: the two slope relations, the user-set threshold (LVL)
// and time window (WIN, 5 ms in its example), and the 12-bit LVL/WIN inputs
// of the original schematic. Design choices: a run-time mode input (the
// original reconfigures the FPGA instead) and the use of WIN as the record
// length in the high-slope mode.
`timescale 1ns / 1ns
module control
  import das_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  trig_mode_e mode_i,
  input  sample_t    lvl_i,    // threshold on |d| (beta * Ts / LSB)
  input  sample_t    win_i,    // window length in samples
  input  sample_t    mag_i,    // |d[n]|
  input  logic       valid_i,
  output logic       store_o,
  output logic       trig_o,
  output logic       hit_o,
  output logic       valid_o
);
  sample_t win_cnt;      // samples left in the current window after this one
  logic    stored_prev;  // previous decision, to find the start of a run

  logic    event_now, store_now;
  sample_t win_load;

  always_comb begin
    win_load  = (win_i == '0) ? '0 : win_i - 1'b1;
    if (mode_i == MODE_HIGH_SLOPE) begin
      event_now = (mag_i >= lvl_i);
      store_now = event_now || (win_cnt != '0);
    end else begin
      event_now = (mag_i > lvl_i);
      store_now = !event_now && (win_cnt == '0);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      win_cnt     <= '0;
      stored_prev <= 1'b0;
      store_o     <= 1'b0;
      trig_o      <= 1'b0;
      hit_o       <= 1'b0;
      valid_o     <= 1'b0;
    end else begin
      valid_o <= valid_i;
      trig_o  <= 1'b0;
      if (valid_i) begin
        if (event_now)            win_cnt <= win_load;
        else if (win_cnt != '0)   win_cnt <= win_cnt - 1'b1;
        store_o     <= store_now;
        trig_o      <= store_now && !stored_prev;
        hit_o       <= event_now;
        stored_prev <= store_now;
      end
    end
  end
endmodule
