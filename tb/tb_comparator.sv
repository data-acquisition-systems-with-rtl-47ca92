// tb_comparator: the window-comparator pair of the detector: upper fires for
// x > +0.6 V, lower for x < -0.6 V, neither in between (including the
// thresholds themselves).
`timescale 1ns / 1ns
module tb_comparator;
  real x, th_p, th_n;
  logic up, dn;
  int checks = 0, failures = 0;
  comparator u_up (.vp_i(x), .vn_i(th_p), .out_o(up));
  comparator u_dn (.vp_i(th_n), .vn_i(x), .out_o(dn));
  initial begin
    th_p = 0.6; th_n = -0.6;
    for (int i = 0; i < 400; i++) begin
      case (i)
        0: x = 0.6;  1: x = -0.6;  2: x = 0.6001;  3: x = -0.6001;  4: x = 0.0;
        default: x = 2.0 * (real'($urandom % 20001) / 10000.0 - 1.0);
      endcase
      #10;
      checks++;
      if (up !== (x > 0.6) || dn !== (x < -0.6)) begin
        failures++; $display("FAIL x=%f up=%b dn=%b", x, up, dn);
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
