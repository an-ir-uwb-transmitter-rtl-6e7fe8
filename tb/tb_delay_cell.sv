// tb_delay_cell: delay versus control voltage of the delay-cell model.
//
// For control voltages across and beyond the model's range, a rising and a
// falling input edge are applied and the time to the inverted output edge is
// measured against D_LO * (D_HI/D_LO)^x, x = (v - V_LO)/(V_HI - V_LO)
// clamped to [0, 1]. The delay must also fall as the voltage rises, and in
// standby the output must not rise.
module tb_delay_cell;
  timeunit 1ns; timeprecision 1ps;

  int checks = 0, failures = 0;
  logic in = 0, sb = 0, out;
  real v = 1.1;

  delay_cell #(.V_LO(0.6), .V_HI(1.1), .D_LO_NS(120.0), .D_HI_NS(2.0)) dut
    (.in(in), .vctrl(v), .standby(sb), .out(out));

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

  function automatic real expected(real vv);
    real x;
    x = (vv - 0.6) / 0.5;
    if (x < 0) x = 0;
    if (x > 1) x = 1;
    return 120.0 * $exp(x * $ln(2.0 / 120.0));
  endfunction

  initial begin
    real t0, d, prev;
    prev = 1.0e9;
    #10;
    check(out == 1'b1, "static output is the inverse");
    for (int k = 0; k <= 12; k++) begin
      v = 0.5 + 0.05 * k;
      #1;
      t0 = $realtime; in = 1;
      @(negedge out); d = $realtime - t0;
      check(d > expected(v) - 0.002 && d < expected(v) + 0.002, "falling output delay");
      check(d <= prev, "delay falls with voltage");
      prev = d;
      #200;
      t0 = $realtime; in = 0;
      @(posedge out); d = $realtime - t0;
      check(d > expected(v) - 0.002 && d < expected(v) + 0.002, "rising output delay");
      #200;
    end
    // standby: the output goes low and stays low
    in = 1; #200; sb = 1; in = 0; #300;
    check(out == 1'b0, "no rising edge in standby");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
