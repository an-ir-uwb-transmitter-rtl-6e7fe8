// tb_glitch_generator: pulse width of the glitch generator model.
//
// A rising input edge must give one pulse starting at the edge, as wide as
// the delay cell's delay at VCTRL_GG (0.2 ns * (0.5)^x, x = (v - 1.1)/0.7):
// narrower for a higher voltage. A falling edge gives no pulse, and in
// standby a rising edge gives none either.
module tb_glitch_generator;
  timeunit 1ns; timeprecision 1ps;

  int checks = 0, failures = 0;
  logic in = 0, sb = 0, out;
  real v = 1.1;
  int pulses = 0;

  glitch_generator dut (.in(in), .vctrl(v), .standby(sb), .out(out));

  always @(posedge out) pulses++;

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

  initial begin
    real t0, w, ew, prev;
    prev = 1.0;
    #10;
    for (int k = 0; k <= 13; k++) begin
      int p0;
      v = 1.1 + 0.05 * k;
      #5;
      p0 = pulses;
      t0 = $realtime; in = 1;
      #0.001;
      check(out == 1'b1, "pulse starts at the edge");
      @(negedge out); w = $realtime - t0;
      ew = 0.2 * $exp(((v > 1.8 ? 1.8 : v) - 1.1) / 0.7 * $ln(0.5));
      check(w > ew - 0.002 && w < ew + 0.002, "pulse width");
      check(w <= prev, "narrower at higher voltage");
      prev = w;
      #5; in = 0; #5;
      check(pulses == p0 + 1, "one pulse per rising edge");
    end
    sb = 1; #5;
    in = 1; #5; in = 0; #5;
    check(pulses == 14, "no pulse in standby");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
