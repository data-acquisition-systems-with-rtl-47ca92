// conv_ad: digital half of a 12-bit successive-approximation A/D converter.
//
// Every SAMPLE_CYCLES clocks a conversion starts. The module then tests one
// bit per clock, from the MSB down: it sets the trial bit in the code sent to
// the external D/A converter, waits one clock for the D/A output and the
// external comparator to settle, and keeps the bit when the comparator says
// the input is above the D/A voltage (comp_i = 1). After SAMPLE_W tests the
// result is presented on sample_o with a one-clock sample_valid_o pulse.
//
// Interface: dac_code_o drives the external D/A converter; comp_i is the
// external comparator (1 when V(t) > V_dac). busy_o is high during a
// conversion.
// Timing: a conversion takes SAMPLE_W + 1 clocks from the start tick to
// sample_valid_o; the sampling period is exactly SAMPLE_CYCLES clocks.
//
// From the document: 12-bit SAR split between the FPGA and an external D/A
// converter with comparators; 60 us sampling period. Design choices: a 1 MHz
// clock (so SAMPLE_CYCLES = 60), one clock of settling per bit, a single
// comparator input (the role of the second external comparator is not given).
`timescale 1ns / 1ns
module conv_ad
  import das_pkg::*;
#(
  parameter int unsigned SAMPLE_CYCLES = 60  // clocks per sampling period (60 us at 1 MHz)
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    comp_i,          // external comparator: 1 when input > D/A output
  output sample_t dac_code_o,      // code for the external D/A converter
  output sample_t sample_o,        // last completed conversion
  output logic    sample_valid_o,  // one-clock pulse when sample_o is new
  output logic    busy_o
);
  localparam int unsigned CNT_W = $clog2(SAMPLE_CYCLES);
  localparam int unsigned BIT_W = $clog2(SAMPLE_W);

  initial assert (SAMPLE_CYCLES > SAMPLE_W + 1)
    else $error("conv_ad: sampling period shorter than one conversion");

  logic [CNT_W-1:0] period_cnt;
  logic [BIT_W-1:0] bit_idx;     // bit under test
  sample_t          trial;       // code under test (kept bits + trial bit)
  logic             busy;

  wire start = (period_cnt == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) period_cnt <= '0;
    else if (period_cnt == CNT_W'(SAMPLE_CYCLES - 1)) period_cnt <= '0;
    else period_cnt <= period_cnt + 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy           <= 1'b0;
      bit_idx        <= '0;
      trial          <= '0;
      sample_o       <= '0;
      sample_valid_o <= 1'b0;
    end else begin
      sample_valid_o <= 1'b0;
      if (start) begin
        busy    <= 1'b1;
        bit_idx <= BIT_W'(SAMPLE_W - 1);
        trial   <= sample_t'(1) << (SAMPLE_W - 1);
      end else if (busy) begin
        // decide the bit under test, then set the next trial bit
        sample_t decided;
        decided = trial;
        if (!comp_i) decided[bit_idx] = 1'b0;
        if (bit_idx == '0) begin
          busy           <= 1'b0;
          trial          <= decided;
          sample_o       <= decided;
          sample_valid_o <= 1'b1;
        end else begin
          decided[bit_idx - 1'b1] = 1'b1;
          trial   <= decided;
          bit_idx <= bit_idx - 1'b1;
        end
      end
    end
  end

  assign dac_code_o = trial;
  assign busy_o     = busy;
endmodule
