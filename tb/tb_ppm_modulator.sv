// tb_ppm_modulator: pulse position of the 2-PPM modulator model.
//
// A DATA rising edge with DIR = 0 must reach the output at once; with
// DIR = 1 it must arrive after the delay-cell delay for VCTRL_PPM, checked
// at 0.6 V (120 ns), 0.85 V (sqrt(120*2) ns) and 1.1 V (2 ns). In standby
// the delayed position produces no edge while the direct one still does.
module tb_ppm_modulator;
  timeunit 1ns; timeprecision 1ps;

  int checks = 0, failures = 0;
  logic data = 0, dir = 0, sb = 0, out;
  real v = 0.85;

  ppm_modulator dut (.data(data), .dir(dir), .vctrl(v), .standby(sb), .out(out));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s v=%f at %0t", what, v, $time); end
  endtask

  task automatic symbol(input logic d, input real exp_ns);
    real t0, dt;
    dir = d; #300;
    t0 = $realtime; data = 1;
    @(posedge out); dt = $realtime - t0;
    check(dt > exp_ns - 0.002 && dt < exp_ns + 0.002, d ? "late position" : "early position");
    #300; data = 0; #300;
  endtask

  initial begin
    real vs [3] = '{0.6, 0.85, 1.1};
    real ds [3];
    ds[0] = 120.0; ds[1] = $sqrt(240.0); ds[2] = 2.0;
    #10;
    for (int k = 0; k < 3; k++) begin
      v = vs[k];
      symbol(1'b0, 0.0);
      symbol(1'b1, ds[k]);
    end
    // standby
    sb = 1; dir = 1; #300;
    data = 1; #300;
    check(out == 1'b0, "no delayed edge in standby");
    data = 0; dir = 0; #300;
    data = 1; #1;
    check(out == 1'b1, "direct edge in standby");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
