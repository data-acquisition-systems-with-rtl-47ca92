// tb_diff_amp: random input pairs; the output must be 3 * (vp - vn), clipped
// at +/-12 V.
`timescale 1ns / 1ns
module tb_diff_amp;
  real vp, vn, vout;
  int checks = 0, failures = 0;
  diff_amp dut (.vp_i(vp), .vn_i(vn), .vout_o(vout));
  initial begin
    for (int i = 0; i < 300; i++) begin
      real e;
      vp = 10.0 * (real'($urandom % 20001) / 10000.0 - 1.0);
      vn = (i % 3 == 0) ? vp - 0.1 : 10.0 * (real'($urandom % 20001) / 10000.0 - 1.0);
      #10;
      e = 3.0 * (vp - vn);
      if (e > 12.0) e = 12.0;
      if (e < -12.0) e = -12.0;
      checks++;
      if (vout > e + 1e-9 || vout < e - 1e-9) begin
        failures++; $display("FAIL %f - %f gave %f", vp, vn, vout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
