// cntrlmem: memory control between the decision logic and the sample memory.
//
// It captures each new converter sample, holds it while the derivative,
// absolute-value and inequality stages decide about it (a few clocks, always
// less than one sampling period), and, when the decision is "store", presents
// the sample on data_o with a one-clock write strobe we_o. trig_o marks the
// first sample of each acquisition run so the recording instrument can place
// its trigger point (and its pretrigger) there. stored_o counts the samples
// written since reset.
//
// Timing: we_o follows dec_valid_i by one clock; data_o holds its value until
// the next write.
//
// From the document: the block (CNTRLMEM in the original schematic, output DATA[11:0]) and the
// use of an external logic scope as sample memory. The strobe/marker
// interface and the counter are this design's choices.
`timescale 1ns / 1ns
module cntrlmem
  import das_pkg::*;
#(
  parameter int unsigned COUNT_W = 16  // width of the stored-sample counter
) (
  input  logic               clk,
  input  logic               rst_n,
  input  sample_t            sample_i,      // from the converter
  input  logic               sample_valid_i,
  input  logic               dec_valid_i,   // decision about the held sample
  input  logic               store_i,
  input  logic               trig_i,
  output sample_t            data_o,        // DATA[11:0] to the memory
  output logic               we_o,          // write strobe
  output logic               trig_o,        // start-of-run marker, with we_o
  output logic [COUNT_W-1:0] stored_o
);
  sample_t held;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      held     <= '0;
      data_o   <= '0;
      we_o     <= 1'b0;
      trig_o   <= 1'b0;
      stored_o <= '0;
    end else begin
      we_o   <= 1'b0;
      trig_o <= 1'b0;
      if (sample_valid_i) held <= sample_i;
      if (dec_valid_i && store_i) begin
        data_o   <= held;
        we_o     <= 1'b1;
        trig_o   <= trig_i;
        stored_o <= stored_o + 1'b1;
      end
    end
  end
endmodule
