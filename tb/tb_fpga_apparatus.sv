// tb_fpga_apparatus: the derivative-trigger chain on a 50 Hz, 2 V sine with a
// voltage dip and an oscillatory burst, first with the high-slope relation,
// then (without reset) with the low-slope relation, LVL = 127 (2583 V/s at
// 60 us and 1.22 mV per code) and WIN = 83 samples (5 ms).
// A reference quantises the held input, differentiates and decides every
// sample on its own; each write must carry the expected sample and trigger
// mark, 16 clocks after its conversion started, and nothing else may be
// written.
`timescale 1ns / 1ns
module tb_fpga_apparatus;
  import das_pkg::*;
  localparam real LSB = 5.0 / 4096.0;
  localparam real PI = 3.14159265358979;

  logic clk = 0, rst_n = 0;
  trig_mode_e mode;
  sample_t lvl, win, dac_code, data;
  logic comp, we, trig, hit, dec_valid, busy;
  logic [15:0] stored;
  real vin;
  int checks = 0, failures = 0;

  always #500 clk = ~clk;

  fpga_apparatus dut (
    .clk, .rst_n, .mode_i(mode), .lvl_i(lvl), .win_i(win), .comp_i(comp),
    .dac_code_o(dac_code), .data_o(data), .we_o(we), .trig_o(trig), .stored_o(stored),
    .hit_o(hit), .dec_valid_o(dec_valid), .conv_busy_o(busy)
  );
  sar_analog_model u_ana (.vin_i(vin), .hold_i(busy), .code_i(dac_code), .comp_o(comp));

  // test signal, t in seconds
  function automatic real signal_at(real t);
    real v, tp;
    tp = t - 0.080 * $floor(t / 0.080);      // the same disturbances every 80 ms
    v = 2.0 * $sin(2.0 * PI * 50.0 * t);
    if (tp >= 0.025 && tp < 0.027) v = v - 1.0;                          // dip
    if (tp >= 0.055 && tp < 0.058) v = v + 0.5 * $sin(2.0 * PI * 2000.0 * t);  // burst
    return v;
  endfunction

  always @(posedge clk) vin <= signal_at($realtime * 1.0e-9);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // reference model
  typedef struct { int code; bit trig; longint start; } wr_t;
  wr_t exp_q[$];
  longint cyc = 0;
  logic busy_d = 0;
  int n = 0, prev_code = 0, last_event = -100000;
  bit prev_store = 0;
  int n_hi_events = 0, n_lo_events = 0, n_runs = 0, n_dropped = 0, n_writes = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    busy_d <= busy;
    if (rst_n && busy && !busy_d) begin
      real v;
      int code;
      v = u_ana.v_held;
      code = $rtoi($floor((v + 2.5) / LSB));
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
        if (ev && mode == MODE_HIGH_SLOPE) n_hi_events++;
        if (ev && mode == MODE_LOW_SLOPE) n_lo_events++;
        if (st && !prev_store) n_runs++;
        if (!st) n_dropped++;
        prev_store = st;
      end
      prev_code = code;
      n++;
    end
    if (rst_n && we) begin
      n_writes++;
      if (exp_q.size() == 0) check(0, $sformatf("unexpected write of %0d", data));
      else begin
        wr_t e;
        e = exp_q.pop_front();
        check(int'(data) == e.code && trig == e.trig,
              $sformatf("write %0d trig %b, expected %0d trig %b", data, trig, e.code, e.trig));
        check(cyc - e.start == 16, $sformatf("write %0d clocks after conversion start", cyc - e.start));
      end
    end
  end

  initial begin
    mode = MODE_HIGH_SLOPE; lvl = 12'd127; win = 12'd83; vin = 0.0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    #(80_000_000);
    mode = MODE_LOW_SLOPE;        // switch relation while running
    #(80_000_000);
    repeat (100) @(posedge clk);
    check(exp_q.size() == 0, "writes missing at the end");
    check(int'(stored) == n_writes, "write counter");
    check(n_hi_events > 0 && n_lo_events > 0 && n_runs >= 3 && n_dropped > 100, "coverage");
    $display("high-slope events %0d, low-slope events %0d, runs %0d, dropped %0d, written %0d",
             n_hi_events, n_lo_events, n_runs, n_dropped, n_writes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(200_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
