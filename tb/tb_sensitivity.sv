// tb_sensitivity: how the derivative trigger's sensitivity depends on where a
// transient lands in the cycle.
//
// A 50 Hz, 1.4 V sine carries one sinusoidal transient B*sin(2*pi*(t-t0)/Tp),
// Tp = 14 ms, starting at sine phase gamma; the threshold is 540 V/s
// (LVL = 540 * 60 us / 1.22 mV = 27 codes). For a continuous signal the
// transient is caught when B >= beta*Tp/(2*pi) - A*f*Tp*cos(gamma), i.e.
// from 0.22 V at a rising zero crossing to 2.18 V at a falling one.
// The bound concerns the slope at the transient's onset, so it is compared
// with triggers in the first 0.5 ms of the transient ("caught at onset");
// later parts of the transient, where its falling half meets the sine's
// slope, can trigger as well and are only compared with the sampled model.
// For every (gamma, B) pair the unit's trigger must agree with an
// independent sampled model (quantise, difference, compare); where the
// continuous bound is more than 25 % away from B, the onset trigger must
// agree with that bound, and at least one amplitude must be caught at
// gamma = 0 but not at gamma = 180 degrees.
`timescale 1ns / 1ns
module tb_sensitivity;
  import das_pkg::*;
  localparam real LSB = 5.0 / 4096.0;
  localparam real PI  = 3.14159265358979;
  localparam real A = 1.4, F = 50.0, TP = 0.014, BETA = 540.0;
  localparam int  N_G = 12, N_B = 6;

  logic clk = 0, rst_n = 0;
  sample_t dac_code, data;
  logic comp, busy, we, trig, hit, dec_valid;
  logic [15:0] stored;
  real vin;
  int checks = 0, failures = 0;

  always #500 clk = ~clk;

  fpga_apparatus dut (
    .clk, .rst_n, .mode_i(MODE_HIGH_SLOPE), .lvl_i(12'd27), .win_i(12'd10), .comp_i(comp),
    .dac_code_o(dac_code), .data_o(data), .we_o(we), .trig_o(trig), .stored_o(stored),
    .hit_o(hit), .dec_valid_o(dec_valid), .conv_busy_o(busy)
  );
  sar_analog_model u_ana (.vin_i(vin), .hold_i(busy), .code_i(dac_code), .comp_o(comp));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  real b_list[N_B] = '{0.15, 0.3, 0.6, 0.9, 1.2, 1.5};
  real t0, bamp;
  bit  active = 0;

  always begin
    real t, v;
    t = $realtime * 1.0e-9;
    v = A * $sin(2.0 * PI * F * t);
    if (active && t >= t0 && t < t0 + TP) v = v + bamp * $sin(2.0 * PI * (t - t0) / TP);
    vin = v;
    #1000;
  end

  // sampled reference and the unit's answer
  logic busy_d = 0;
  int prev_code = -1;
  bit ref_hit = 0, dut_hit = 0, dut_onset = 0, any_false = 0;
  always @(posedge clk) begin
    busy_d <= busy;
    if (rst_n && busy && !busy_d) begin
      int code, mag;
      code = $rtoi($floor((u_ana.v_held + 2.5) / LSB));
      if (code < 0) code = 0;
      if (code > 4095) code = 4095;
      if (prev_code >= 0) begin
        mag = (code > prev_code) ? code - prev_code : prev_code - code;
        if (mag >= 27) begin
          if (active) ref_hit = 1; else any_false = 1;
        end
      end
      prev_code = code;
    end
    if (rst_n && dec_valid && hit && active) begin
      dut_hit = 1;
      if ($realtime * 1.0e-9 < t0 + 0.0005) dut_onset = 1;
    end
  end

  bit caught[N_G][N_B];

  initial begin
    int n_caught = 0, n_bound = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    #(40_000_000);
    for (int g = 0; g < N_G; g++)
      for (int k = 0; k < N_B; k++) begin
        real gamma, now, bmin;
        gamma = 2.0 * PI * real'(g) / real'(N_G);
        now = $realtime * 1.0e-9;
        t0 = ($floor(now * F) + 1.0 + gamma / (2.0 * PI)) / F;
        bamp = b_list[k];
        ref_hit = 0; dut_hit = 0; dut_onset = 0;
        #(int'((t0 - now) * 1.0e9) - 2_000_000);
        active = 1;
        #(2_000_000 + int'(TP * 1.0e9) + 1_000_000);
        active = 0;
        check(dut_hit == ref_hit, $sformatf("gamma %0d deg B %f: unit %b, sampled model %b",
                                            g * 360 / N_G, bamp, dut_hit, ref_hit));
        bmin = BETA * TP / (2.0 * PI) - A * F * TP * $cos(gamma);
        if (bamp > 1.25 * bmin || bamp < 0.75 * bmin) begin
          n_bound++;
          check(dut_onset == (bamp >= bmin), $sformatf("gamma %0d deg B %f: onset %b, bound %f V",
                                                      g * 360 / N_G, bamp, dut_onset, bmin));
        end
        caught[g][k] = dut_onset;
        n_caught += dut_onset;
        #(20_000_000);
      end
    begin
      bit differs;
      differs = 0;
      for (int k = 0; k < N_B; k++) if (caught[0][k] && !caught[N_G/2][k]) differs = 1;
      check(differs, "sensitivity at a rising zero crossing not above that at a falling one");
    end
    check(!any_false, "trigger on the undisturbed sine");
    check(n_caught > 0 && n_caught < N_G * N_B && n_bound > N_G, "coverage");
    for (int g = 0; g < N_G; g++) begin
      string row;
      row = $sformatf("gamma %3d deg:", g * 360 / N_G);
      for (int k = 0; k < N_B; k++) row = {row, $sformatf("  B=%.2f %s", b_list[k], caught[g][k] ? "onset " : "-     ")};
      $display("%s", row);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(64'd8_000_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
