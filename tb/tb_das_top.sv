// tb_das_top: end-to-end run of both trigger units at their default sizes.
//
// The monitored signal is a 50 Hz, 2 V-peak sine. After 200 ms of settling it
// carries a voltage dip and an oscillatory burst (digital unit in high-slope
// mode, LVL = 127 = 2583 V/s, WIN = 83 samples = 5 ms), then the digital unit
// is switched to low-slope mode and three periodic notches follow.
// Checked:
//  - digital unit: every write against an independent model of the chain
//    (quantise, difference, magnitude, relation, window), 16 clocks after its
//    conversion started, and the sample period of 60 clocks;
//  - analog unit: an impulse less than 1 ms after each disturbance begins and
//    none away from the disturbances.
// Each mechanism (conversion, high-slope trigger, post-trigger record,
// low-slope discard window, mode switch, analog impulse from either
// comparator) is counted and must have occurred.
`timescale 1ns / 1ns
module tb_das_top;
  import das_pkg::*;
  localparam real LSB = 5.0 / 4096.0;
  localparam real PI = 3.14159265358979;

  logic clk = 0, rst_n = 0;
  trig_mode_e mode;
  sample_t lvl, win, dac_code, data;
  logic comp, busy, we, trig, hit, dec_valid;
  logic [15:0] stored;
  real vin, vref, vdiff;
  logic impulse, upper, lower;
  int checks = 0, failures = 0;

  always #500 clk = ~clk;   // 1 MHz

  das_top dut (
    .clk, .rst_n, .mode_i(mode), .lvl_i(lvl), .win_i(win), .comp_i(comp),
    .dac_code_o(dac_code), .conv_busy_o(busy), .data_o(data), .we_o(we), .trig_o(trig),
    .stored_o(stored), .hit_o(hit), .dec_valid_o(dec_valid),
    .vin_i(vin), .impulse_o(impulse), .vref_o(vref), .vdiff_o(vdiff),
    .upper_o(upper), .lower_o(lower)
  );
  sar_analog_model u_ana (.vin_i(vin), .hold_i(busy), .code_i(dac_code), .comp_o(comp));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---------------------------------------------------------------- stimulus
  localparam int N_DIST = 5;
  // start times (s) of the disturbances, each at a positive peak (5 ms + k*20 ms)
  real t_dist[N_DIST] = '{0.205, 0.265, 0.345, 0.365, 0.385};
  localparam real T_SWITCH = 0.320;
  localparam real T_END    = 0.420;

  function automatic real signal_at(real t);
    real v, td;
    v = 2.0 * $sin(2.0 * PI * 50.0 * t);
    td = t - t_dist[0];
    if (td >= 0.0 && td < 0.006) v = 0.5 * v;                                   // dip
    td = t - t_dist[1];
    if (td >= 0.0 && td < 0.003) v = v + 0.4 * $sin(2.0 * PI * 3000.0 * td);   // burst
    for (int k = 2; k < N_DIST; k++) begin
      td = t - t_dist[k];
      if (td >= 0.0 && td < 0.0006) v = 0.2 * v;                                // notch
    end
    return v;
  endfunction

  always begin
    vin = signal_at($realtime * 1.0e-9);
    #1000;
  end

  // ------------------------------------------------ digital unit reference
  typedef struct { int code; bit trig; longint start; } wr_t;
  wr_t exp_q[$];
  longint cyc = 0, last_start = -1;
  logic busy_d = 0;
  int n = 0, prev_code = 0, last_event = -100000;
  bit prev_store = 0;
  int n_conv = 0, n_hi_trig = 0, n_hi_writes = 0, n_lo_events = 0, n_lo_dropped = 0,
      n_lo_writes = 0, n_switch = 0;
  trig_mode_e mode_seen;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    busy_d <= busy;
    if (rst_n && busy && !busy_d) begin
      int code;
      n_conv++;
      if (last_start >= 0) check(cyc - last_start == 60, "sample period");
      last_start = cyc;
      if (mode != mode_seen) n_switch++;
      mode_seen = mode;
      code = $rtoi($floor((u_ana.v_held + 2.5) / LSB));
      if (code < 0) code = 0;
      if (code > 4095) code = 4095;
      if (n > 0) begin
        int mag, wl;
        bit ev, st;
        mag = (code > prev_code) ? code - prev_code : prev_code - code;
        wl = (win == 0) ? 1 : int'(win);
        ev = (mode == MODE_HIGH_SLOPE) ? (mag >= int'(lvl)) : (mag > int'(lvl));
        if (ev) last_event = n;
        st = (mode == MODE_HIGH_SLOPE) ? (n - last_event < wl) : (!ev && n - last_event >= wl);
        if (st) exp_q.push_back('{code, st && !prev_store, cyc});
        if (mode == MODE_HIGH_SLOPE) begin
          n_hi_trig += (st && !prev_store);
          n_hi_writes += st;
        end else begin
          n_lo_events += ev;
          n_lo_dropped += !st;
          n_lo_writes += st;
        end
        prev_store = st;
      end
      prev_code = code;
      n++;
    end
    if (rst_n && we) begin
      if (exp_q.size() == 0) check(0, $sformatf("unexpected write of %0d", data));
      else begin
        wr_t e;
        e = exp_q.pop_front();
        check(int'(data) == e.code && trig == e.trig,
              $sformatf("write %0d trig %b, expected %0d trig %b", data, trig, e.code, e.trig));
        check(cyc - e.start == 16, "write latency");
      end
    end
  end

  // ------------------------------------------------- analog unit checks
  int n_imp = 0, n_upper = 0, n_lower = 0;
  real first_imp[N_DIST];
  always @(posedge upper) if ($realtime > 200e6) n_upper++;
  always @(posedge lower) if ($realtime > 200e6) n_lower++;
  always @(posedge impulse) begin
    real t;
    bit near;
    t = $realtime * 1.0e-9;
    if (t > 0.2) begin
      n_imp++;
      near = 0;
      for (int k = 0; k < N_DIST; k++)
        if (t >= t_dist[k] && t < t_dist[k] + 0.015) begin
          near = 1;
          if (first_imp[k] < 0.0) first_imp[k] = t;
        end
      check(near, $sformatf("impulse at %f s away from any disturbance", t));
    end
  end

  initial begin
    foreach (first_imp[k]) first_imp[k] = -1.0;
    mode = MODE_HIGH_SLOPE; mode_seen = MODE_HIGH_SLOPE; lvl = 12'd127; win = 12'd83;
    repeat (3) @(posedge clk);
    rst_n = 1;
    #(T_SWITCH * 1.0e9);
    mode = MODE_LOW_SLOPE;
    #((T_END - T_SWITCH) * 1.0e9);
    repeat (100) @(posedge clk);
    check(exp_q.size() == 0, "writes missing at the end");
    for (int k = 0; k < N_DIST; k++)
      check(first_imp[k] >= t_dist[k] && first_imp[k] - t_dist[k] < 0.001,
            $sformatf("analog impulse for disturbance %0d at %f s", k, first_imp[k]));
    $display("conversions %0d | high-slope triggers %0d, recorded %0d | low-slope events %0d, dropped %0d, kept %0d | mode switches %0d | impulses %0d (upper %0d, lower %0d) | memory count %0d",
             n_conv, n_hi_trig, n_hi_writes, n_lo_events, n_lo_dropped, n_lo_writes, n_switch,
             n_imp, n_upper, n_lower, stored);
    check(n_conv > 0,        "no conversion");
    check(n_hi_trig >= 2,    "high-slope trigger did not occur for both disturbances");
    check(n_hi_writes > 0,   "no post-trigger record");
    check(n_lo_events >= 3,  "low-slope relation not violated by the notches");
    check(n_lo_dropped >= 3 * 83, "low-slope discard window");
    check(n_lo_writes > 0,   "nothing kept in low-slope mode");
    check(n_switch == 1,     "mode switch");
    check(n_imp >= N_DIST,   "analog impulses");
    check(n_upper > 0 && n_lower > 0, "both analog comparators");
    check(int'(stored) == n_hi_writes + n_lo_writes, "memory write count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(600_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
