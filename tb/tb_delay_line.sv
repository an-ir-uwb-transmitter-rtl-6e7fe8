// tb_delay_line: tap timing of the 8-stage delay line model.
//
// Each stage gets its own bias; the rising edge at tap i must arrive after
// the sum of the stage delays 0..i (0.5 ns * (0.2)^x per stage,
// x = (v - 1.1)/0.7), taps must be non-inverting, line_out must follow the
// last tap, and changing one stage's bias must shift only the taps after it.
module tb_delay_line;
  timeunit 1ns; timeprecision 1ps;

  int checks = 0, failures = 0;
  logic in = 0, sb = 0, line_out;
  logic [7:0] tap;
  real vdc [8];

  delay_line dut (.in(in), .vctrl_dc(vdc), .standby(sb), .tap(tap), .line_out(line_out));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic real stage(real vv);
    real x;
    x = (vv - 1.1) / 0.7;
    if (x < 0) x = 0;
    if (x > 1) x = 1;
    return 0.5 * $exp(x * $ln(0.2));
  endfunction

  task automatic run_edge();
    real t0, acc, tol;
    real t [8];
    bit seen [8];
    t0 = $realtime;
    for (int i = 0; i < 8; i++) seen[i] = 0;
    in = 1;
    for (int n = 0; n < 8; n++) begin
      @(tap);
      for (int i = 0; i < 8; i++) if (tap[i] && !seen[i]) begin seen[i] = 1; t[i] = $realtime - t0; end
    end
    acc = 0;
    for (int i = 0; i < 8; i++) begin
      acc += stage(vdc[i]);
      tol = 0.001 * (i + 2);   // each stage rounds to the 1 ps precision
      check(seen[i] && t[i] > acc - tol && t[i] < acc + tol, "tap delay");
      if (!(seen[i] && t[i] > acc - tol && t[i] < acc + tol)) $display("tap %0d seen %0d t %f exp %f", i, seen[i], t[i], acc);
    end
    check(line_out == tap[7], "line_out follows the last tap");
    #20 in = 0; #20;
    check(tap == '0, "taps non-inverting");
  endtask

  initial begin
    for (int i = 0; i < 8; i++) vdc[i] = 1.1 + 0.1 * i;
    #10;
    check(tap == '0 && !line_out, "static taps");
    run_edge();
    vdc[3] = 1.8;
    run_edge();
    for (int i = 0; i < 8; i++) vdc[i] = 1.45;
    run_edge();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
