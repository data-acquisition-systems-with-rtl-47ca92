// tb_analog_trigger: a 50 Hz sine (7 V and 2 V peak-to-peak, the two ends of
// the detector's range) with disturbances. After the filters settle:
//   - a clean sine must give no impulse;
//   - a dip (amplitude halved for 6 ms, starting at a peak), a 1 V spike,
//     an oscillatory burst and a notch must each give an impulse starting less
//     than 1 ms after the disturbance begins;
//   - a 0.1 V step (below alpha = 0.2 V) must give none.
// Impulses must last 1 ms; both comparators must have fired at least once.
`timescale 1ns / 1ns
module tb_analog_trigger;
  localparam real PI = 3.14159265358979;
  real vin, vref, vdiff;
  logic impulse, upper, lower;
  int checks = 0, failures = 0;
  int n_upper = 0, n_lower = 0;

  analog_trigger dut (.vin_i(vin), .impulse_o(impulse), .vref_o(vref), .vdiff_o(vdiff),
                      .upper_o(upper), .lower_o(lower));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // disturbance kinds
  typedef enum int {NONE, DIP, SPIKE, BURST, NOTCH, SMALL} dist_e;
  dist_e kind;
  real   amp, t_dist;   // sine amplitude, start of the disturbance (s)

  function automatic real signal_at(real t);
    real v, td;
    v = amp * $sin(2.0 * PI * 50.0 * t);
    td = t - t_dist;
    case (kind)
      DIP:   if (td >= 0.0 && td < 0.006) v = 0.5 * v;
      SPIKE: if (td >= 0.0 && td < 0.0002) v = v + 1.0;
      BURST: if (td >= 0.0 && td < 0.003) v = v + 0.6 * $sin(2.0 * PI * 3000.0 * td);
      NOTCH: if (td >= 0.0 && td < 0.0006) v = 0.2 * v;
      SMALL: if (td >= 0.0 && td < 0.002) v = v + 0.1;
      default: ;
    endcase
    return v;
  endfunction

  // 1 us input update
  always begin
    vin = signal_at($realtime * 1.0e-9);
    #1000;
  end

  time t_imp_rise, t_imp_fall, t_first_rise;
  int  n_imp = 0, n_mark = 0;
  always @(posedge impulse) begin
    t_imp_rise = $time;
    if (n_imp == n_mark) t_first_rise = $time;  // first impulse of an episode
    n_imp++;
  end
  always @(negedge impulse) t_imp_fall = $time;
  always @(posedge upper) n_upper++;
  always @(posedge lower) n_lower++;

  // run one disturbance of the given kind at a positive peak, 20 ms later
  task automatic episode(dist_e k, bit expect_impulse);
    int n0;
    real t_now, t_start;
    t_now = $realtime * 1.0e-9;
    t_start = 0.02 * ($floor(t_now / 0.02) + 1.0) + 0.005;  // next positive peak
    t_dist = t_start; kind = k;
    n0 = n_imp;
    n_mark = n_imp;
    #(int'((t_start - t_now) * 1.0e9) + 40_000_000);
    if (expect_impulse) begin
      check(n_imp > n0, $sformatf("no impulse for disturbance %s", k.name()));
      check(n_imp > n0 && real'(t_first_rise) * 1.0e-9 - t_start < 0.001,
            $sformatf("impulse for %s late or missing", k.name()));
    end else
      check(n_imp == n0, $sformatf("%0d impulses for %s", n_imp - n0, k.name()));
    kind = NONE;
    #(60_000_000);   // let the filters settle again
  endtask

  initial begin
    kind = NONE; t_dist = 0.0;
    foreach (amp_list[i]) begin
      amp = amp_list[i];
      #(300_000_000);               // settle
      episode(NONE, 0);
      episode(DIP, 1);
      episode(SPIKE, 1);
      episode(BURST, 1);
      episode(NOTCH, 1);
      episode(SMALL, 0);
    end
    check(t_imp_fall - t_imp_rise == 1_000_000, "impulse width");
    check(n_upper > 0 && n_lower > 0, "both comparators used");
    $display("impulses %0d, upper %0d, lower %0d", n_imp, n_upper, n_lower);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real amp_list[2] = '{3.5, 1.0};

  initial begin
    #(64'd4_000_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
