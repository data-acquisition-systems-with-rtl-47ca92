// tb_deriv: random samples at random spacing; each output must equal the
// difference of the last two inputs, one clock after the input, and the first
// sample after reset must give no output.
`timescale 1ns / 1ns
module tb_deriv;
  import das_pkg::*;
  logic clk = 0, rst_n = 0;
  sample_t x;
  logic vin = 0;
  diff_t d;
  logic vout;
  int checks = 0, failures = 0;
  int prev = -1, expect_d = 0;
  bit expect_valid = 0;

  always #500 clk = ~clk;
  deriv dut (.clk, .rst_n, .x_i(x), .valid_i(vin), .d_o(d), .valid_o(vout));

  always @(posedge clk) if (rst_n) begin
    checks++;
    if (vout !== expect_valid || (expect_valid && int'(d) != expect_d)) begin
      failures++;
      $display("FAIL valid=%b d=%0d expected valid=%b d=%0d", vout, d, expect_valid, expect_d);
    end
  end

  initial begin
    x = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      int nx;
      nx = (i % 50 == 7) ? 4095 : (i % 50 == 8) ? 0 : int'($urandom % 4096);
      @(negedge clk);
      x = sample_t'(nx); vin = 1;
      @(posedge clk);
      #1;
      expect_valid = (prev >= 0);
      expect_d = nx - prev;
      prev = nx;
      @(negedge clk);
      vin = 0;
      @(posedge clk); #1;
      expect_valid = 0;
      repeat ($urandom % 3) @(posedge clk);
    end
    @(posedge clk);
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
