// tb_control: random derivative magnitudes around a random level, in both
// modes and with random window lengths (including 0 and 1). The expected
// decision is computed from the distance to the last event sample:
//   high-slope: store when that distance is below max(win,1);
//   low-slope:  store when the sample is no event and the distance is at
//               least max(win,1).
// trig must mark the first stored sample of each run, hit every event.
`timescale 1ns / 1ns
module tb_control;
  import das_pkg::*;
  logic clk = 0, rst_n = 0;
  trig_mode_e mode;
  sample_t lvl, win, mag;
  logic vin = 0;
  logic store, trig, hit, vout;
  int checks = 0, failures = 0;
  int n_store = 0, n_trig = 0, n_hit = 0, n_skip = 0;

  always #500 clk = ~clk;
  control dut (.clk, .rst_n, .mode_i(mode), .lvl_i(lvl), .win_i(win), .mag_i(mag),
               .valid_i(vin), .store_o(store), .trig_o(trig), .hit_o(hit), .valid_o(vout));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic run_case(trig_mode_e m, int l, int w, int n);
    int last_event;
    bit prev_store;
    int wl;
    last_event = -100000;
    prev_store = 0;
    wl = (w == 0) ? 1 : w;
    // reset between cases so every case starts with an empty window
    @(negedge clk); rst_n = 0; @(negedge clk); rst_n = 1;
    mode = m; lvl = sample_t'(l); win = sample_t'(w);
    for (int i = 0; i < n; i++) begin
      int v;
      bit ev, st;
      // mostly near the level, sometimes far off, sometimes exactly on it
      case ($urandom % 6)
        0: v = l;
        1: v = int'($urandom % 4096);
        default: v = l + int'($urandom % 41) - 20;
      endcase
      if (v < 0) v = 0;
      if (v > 4095) v = 4095;
      ev = (m == MODE_HIGH_SLOPE) ? (v >= l) : (v > l);
      if (ev) last_event = i;
      st = (m == MODE_HIGH_SLOPE) ? (i - last_event < wl) : (!ev && i - last_event >= wl);
      @(negedge clk); mag = sample_t'(v); vin = 1;
      @(posedge clk); #1;
      check(vout && store == st && hit == ev && trig == (st && !prev_store),
            $sformatf("mode %0d lvl %0d win %0d i %0d mag %0d: store %b/%b trig %b hit %b",
                      m, l, w, i, v, store, st, trig, hit));
      n_store += st; n_trig += (st && !prev_store); n_hit += ev; n_skip += !st;
      prev_store = st;
      @(negedge clk); vin = 0;
      repeat ($urandom % 3) @(posedge clk);
    end
  endtask

  initial begin
    mag = '0; lvl = '0; win = '0; mode = MODE_HIGH_SLOPE;
    repeat (2) @(posedge clk);
    rst_n = 1;
    run_case(MODE_HIGH_SLOPE, 127, 83, 600);  // the document's beta and 5 ms window
    run_case(MODE_LOW_SLOPE, 127, 83, 600);
    run_case(MODE_HIGH_SLOPE, 127, 5, 400);
    run_case(MODE_LOW_SLOPE, 127, 5, 400);
    run_case(MODE_HIGH_SLOPE, 1000, 0, 200);
    run_case(MODE_LOW_SLOPE, 30, 1, 200);
    for (int k = 0; k < 10; k++)
      run_case(trig_mode_e'(k % 2), int'($urandom % 4096), int'($urandom % 20), 200);
    check(n_store > 100 && n_skip > 100 && n_trig > 10 && n_hit > 100, "coverage");
    $display("stored %0d dropped %0d runs %0d events %0d", n_store, n_skip, n_trig, n_hit);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(1000 * 40000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
