// tb_monostable: short and long trigger pulses, and extra edges during an
// impulse. Every impulse must last exactly 1 ms from its triggering edge,
// whatever the trigger's own width, and edges during an impulse must not
// extend it.
`timescale 1ns / 1ns
module tb_monostable;
  logic trig = 0, pulse;
  int checks = 0, failures = 0;
  time t_rise, t_fall;
  monostable dut (.trig_i(trig), .pulse_o(pulse));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(posedge pulse) t_rise = $time;
  always @(negedge pulse) t_fall = $time;

  initial begin
    #5000;
    check(pulse == 0, "idle low");
    for (int i = 0; i < 20; i++) begin
      time t0;
      int w;
      w = (i % 2) ? 200 : 300_000 + int'($urandom % 500_000);  // trigger width in ns
      t0 = $time;
      trig = 1;
      #1;
      check(pulse == 1, "impulse starts at the edge");
      #(w - 1);
      trig = 0;
      if (i % 3 == 0) begin   // extra edges inside the impulse
        #(100_000); trig = 1; #(1000); trig = 0;
      end
      wait (pulse == 0);
      #1;
      check(t_fall - t0 == 1_000_000, $sformatf("impulse width %0d ns", t_fall - t0));
      #(200_000 + int'($urandom % 100_000));
      check(pulse == 0, "single impulse");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #(100_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
