// tb_or_gate: exhaustive truth table, repeated.
`timescale 1ns / 1ns
module tb_or_gate;
  logic a, b, y;
  int checks = 0, failures = 0;
  or_gate dut (.a_i(a), .b_i(b), .y_o(y));
  initial begin
    for (int i = 0; i < 16; i++) begin
      {a, b} = 2'(i);
      #10;
      checks++;
      if (y !== (i[0] | i[1])) begin failures++; $display("FAIL %b|%b=%b", a, b, y); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
