// tb_pulse_gen_pa: one sub-pulse path, glitch generator to unit PAs.
//
// For random PA enable patterns, a rising edge must make exactly the enabled
// units pull up, starting one buffer delay (0.05 ns) after the edge, for the
// glitch width at VCTRL_GG (0.2 ns * 0.5^x, x = (v - 1.1)/0.7); between
// pulses the enabled units pull down and the others stay off. With no unit
// enabled nothing drives the node, and standby suppresses the pulse.
module tb_pulse_gen_pa;
  timeunit 1ns; timeprecision 1ps;

  int checks = 0, failures = 0;
  logic in = 0, sb = 0, pulse;
  logic [7:0] en = 8'hFF;
  logic [3:0] n_up, n_down;
  real v = 1.45;

  pulse_gen_pa dut (.in(in), .vctrl_gg(v), .standby(sb), .pa_enable(en), .pulse(pulse),
    .n_up(n_up), .n_down(n_down));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s en=%b at %0t", what, en, $time); end
  endtask

  initial begin
    real t0, ts, te, ew;
    ew = 0.2 * $exp((1.45 - 1.1) / 0.7 * $ln(0.5));
    #10;
    for (int k = 0; k < 40; k++) begin
      en = (k == 0) ? 8'h00 : 8'($urandom);
      #5;
      check(n_up == 0 && n_down == 4'($countones(en)), "idle: enabled units pull down");
      t0 = $realtime; in = 1;
      if (en != 0) begin
        @(posedge (n_up != 0)); ts = $realtime - t0;
        check(n_up == 4'($countones(en)) && n_down == 0, "enabled units pull up");
        @(negedge (n_up != 0)); te = $realtime - t0;
        check(ts > 0.049 && ts < 0.052, "buffer delay");
        check(te - ts > ew - 0.002 && te - ts < ew + 0.002, "pulse width");
      end else begin
        #2;
        check(n_up == 0 && n_down == 0, "no unit enabled: high-Z");
      end
      #5; in = 0; #5;
    end
    en = 8'hFF; sb = 1; #5;
    in = 1; #2;
    check(n_up == 0, "no pulse in standby");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
