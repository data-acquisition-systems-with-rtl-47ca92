// Shared types and constants of the derivative-trigger acquisition unit.
//
// Samples are 12-bit offset-binary codes from the successive-approximation
// converter (0 = -2.5 V, 4095 = +2.5 V - 1 LSB, one LSB = 5 V / 4096).
// The 12-bit width and the +/-2.5 V input range follow the document; the
// offset-binary coding is this design's choice.
// The trigger mode selects which of the two derivative relations governs the
// acquisition: |dV/dt| >= level (catch fast transients) or
// |dV/dt| <= level (keep only the undisturbed, slowly varying parts).
`timescale 1ns / 1ns
package das_pkg;


  localparam int unsigned SAMPLE_W = 12;            // converter resolution
  localparam int unsigned DIFF_W   = SAMPLE_W + 1;  // signed sample difference

  typedef logic [SAMPLE_W-1:0]       sample_t;
  typedef logic signed [DIFF_W-1:0]  diff_t;

  // Trigger relation
  typedef enum logic {
    MODE_HIGH_SLOPE = 1'b0,  // acquire when |dV| >= level
    MODE_LOW_SLOPE  = 1'b1   // acquire when |dV| <= level, blank WIN samples otherwise
  } trig_mode_e;
endpackage
