// tb_allpass_filter: drives 1 V sines and a DC level. After settling, the
// 50 Hz output amplitude must be 1/sqrt(1+(50/70)^2) = 0.814 and its lag
// atan(50/70)/(2*pi*50) = 1.97 ms; 70 Hz must come out 3 dB down; DC must
// pass with unity gain; 1 kHz must be attenuated below 0.08.
`timescale 1ns / 1ns
module tb_allpass_filter;
  localparam real PI = 3.14159265358979;
  real vin, vout;
  int checks = 0, failures = 0;

  allpass_filter dut (.vin_i(vin), .vout_o(vout));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // apply a sine of frequency f for settle + one period, return peak and the
  // lag of the output's rising zero crossing after the input's
  task automatic measure(real f, output real peak, output real lag_s);
    real t0, t, prev, t_in, t_out;
    peak = 0.0; prev = 0.0; t_in = -1.0; t_out = -1.0;
    t0 = $realtime * 1.0e-9;
    for (int i = 0; i < 5_000_000; i++) begin
      t = $realtime * 1.0e-9 - t0;
      vin = $sin(2.0 * PI * f * t);
      #1000;
      if (t > 10.0 / f) begin
        if (vout > peak) peak = vout;
        if (t_in < 0.0 && t > 11.0 / f) t_in = 11.0 / f + t0;
        if (t_in > 0.0 && t_out < 0.0 && prev < 0.0 && vout >= 0.0) t_out = $realtime * 1.0e-9;
      end
      prev = vout;
      if (t > 12.5 / f) break;
    end
    lag_s = t_out - t_in;
  endtask

  initial begin
    real pk, lag, k50;
    vin = 0.0;
    #1000;
    k50 = 1.0 / $sqrt(1.0 + (50.0 / 70.0) ** 2);
    measure(50.0, pk, lag);
    $display("50 Hz: gain %f lag %f ms", pk, lag * 1e3);
    check(pk > k50 - 0.01 && pk < k50 + 0.01, "50 Hz gain");
    check(lag > 1.97e-3 - 30e-6 && lag < 1.97e-3 + 30e-6, "50 Hz lag");
    measure(1000.0, pk, lag);
    $display("1 kHz: gain %f", pk);
    check(pk > k50 - 0.01 && pk < k50 + 0.01, "1 kHz gain (flat response)");
    measure(10.0, pk, lag);
    $display("10 Hz: gain %f", pk);
    check(pk > k50 - 0.01 && pk < k50 + 0.01, "10 Hz gain (flat response)");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(2_000_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
