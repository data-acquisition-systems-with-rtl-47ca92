// tb_cntrlmem: a new sample every 60 clocks, a random decision 3 clocks later
// (as in the full chain). Each "store" must produce exactly one write strobe,
// one clock after the decision, carrying that sample and its trigger mark;
// the counter must count the writes; a "drop" must write nothing.
`timescale 1ns / 1ns
module tb_cntrlmem;
  import das_pkg::*;
  logic clk = 0, rst_n = 0;
  sample_t sample, data;
  logic sv = 0, dv = 0, st = 0, tr = 0;
  logic we, trig;
  logic [15:0] stored;
  int checks = 0, failures = 0, n_we_expected = 0, n_we_seen = 0;

  always #500 clk = ~clk;
  cntrlmem dut (.clk, .rst_n, .sample_i(sample), .sample_valid_i(sv), .dec_valid_i(dv),
                .store_i(st), .trig_i(tr), .data_o(data), .we_o(we), .trig_o(trig),
                .stored_o(stored));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(posedge clk) if (rst_n && we) n_we_seen++;

  initial begin
    sample = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      sample_t s;
      bit do_store, do_trig;
      s = sample_t'($urandom % 4096);
      do_store = ($urandom % 3) != 0;
      do_trig  = do_store && (($urandom % 4) == 0);
      @(negedge clk); sample = s; sv = 1;
      @(negedge clk); sv = 0; sample = sample_t'($urandom % 4096);  // input moves on
      repeat (2) @(negedge clk);
      st = do_store; tr = do_trig; dv = 1;
      @(negedge clk); dv = 0; st = 0; tr = 0;
      n_we_expected += do_store;
      check(we == do_store, $sformatf("we %b for store %b", we, do_store));
      if (do_store) begin
        check(data == s, $sformatf("data %0d expected %0d", data, s));
        check(trig == do_trig, "trigger mark");
      end
      check(stored == 16'(n_we_expected), $sformatf("count %0d expected %0d", stored, n_we_expected));
      @(negedge clk);
      check(!we, "strobe longer than one clock");
      repeat (54) @(negedge clk);
    end
    check(n_we_seen == n_we_expected, "number of writes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(1000 * 30000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
