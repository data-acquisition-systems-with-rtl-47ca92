// tb_abs_val: random signed differences (and the extremes +/-4095, 0, +/-1);
// the magnitude must appear one clock later with its valid pulse.
`timescale 1ns / 1ns
module tb_abs_val;
  import das_pkg::*;
  logic clk = 0, rst_n = 0;
  diff_t d;
  logic vin = 0;
  sample_t mag;
  logic vout;
  int checks = 0, failures = 0;

  always #500 clk = ~clk;
  abs_val dut (.clk, .rst_n, .d_i(d), .valid_i(vin), .mag_o(mag), .valid_o(vout));

  initial begin
    d = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 500; i++) begin
      int v, e;
      case (i)
        0: v = 4095;  1: v = -4095;  2: v = 0;  3: v = -1;  4: v = 1;
        default: v = int'($urandom % 8191) - 4095;
      endcase
      e = (v < 0) ? -v : v;
      @(negedge clk);
      d = diff_t'(v); vin = 1;
      @(posedge clk); #1;
      checks++;
      if (!vout || int'(mag) != e) begin
        failures++; $display("FAIL |%0d| gave %0d valid=%b", v, mag, vout);
      end
      @(negedge clk); vin = 0;
      @(posedge clk); #1;
      checks++;
      if (vout) begin failures++; $display("FAIL valid without input"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(1000 * 5000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
