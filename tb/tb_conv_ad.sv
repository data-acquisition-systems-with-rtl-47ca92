// tb_conv_ad: checks the SAR converter logic against an ideal quantiser.
// A random voltage is applied for every conversion through the analog model;
// the returned code must equal floor((v + 2.5) / LSB) (clamped to 0..4095),
// conversions must come exactly 60 clocks apart and end 13 clocks after busy
// rises.
`timescale 1ns / 1ns
module tb_conv_ad;
  import das_pkg::*;
  localparam int unsigned SAMPLE_CYCLES = 60;
  localparam real LSB = 5.0 / 4096.0;

  logic clk = 0, rst_n = 0;
  real  vin;
  logic comp;
  sample_t dac_code, sample;
  logic valid, busy;
  int checks = 0, failures = 0;

  always #500 clk = ~clk;  // 1 MHz

  conv_ad dut (
    .clk, .rst_n, .comp_i(comp), .dac_code_o(dac_code),
    .sample_o(sample), .sample_valid_o(valid), .busy_o(busy)
  );
  sar_analog_model u_ana (.vin_i(vin), .hold_i(busy), .code_i(dac_code), .comp_o(comp));

  function automatic int expected_code(real v);
    int k;
    k = $rtoi($floor((v + 2.5) / LSB));
    if (k < 0) k = 0;
    if (k > 4095) k = 4095;
    return k;
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  longint cyc = 0, last_valid = -1, busy_rise = -1;
  real v_at_start;
  logic busy_d = 0;
  int n_conv = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    busy_d <= busy;
    if (busy && !busy_d) begin busy_rise <= cyc; v_at_start <= vin; end
  end

  always @(posedge clk) if (rst_n && valid) begin
    n_conv++;
    check(sample == sample_t'(expected_code(v_at_start)),
          $sformatf("code %0d for %f V, expected %0d", sample, v_at_start, expected_code(v_at_start)));
    check(cyc - busy_rise == SAMPLE_W, $sformatf("conversion took %0d clocks", cyc - busy_rise));
    if (last_valid >= 0) check(cyc - last_valid == SAMPLE_CYCLES,
                               $sformatf("sample period %0d clocks", cyc - last_valid));
    last_valid = cyc;
    // next input: random, with the extremes now and then
    case (n_conv % 10)
      3: vin = -2.6;
      4: vin = 2.6;
      5: vin = -2.5 + 0.5 * LSB;
      6: vin = 2.5 - 0.5 * LSB;
      default: vin = -2.5 + 5.0 * (real'($urandom % 1000000) / 1000000.0);
    endcase
  end

  initial begin
    vin = 1.234;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (n_conv == 200);
    @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(1000 * 60 * 260);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
