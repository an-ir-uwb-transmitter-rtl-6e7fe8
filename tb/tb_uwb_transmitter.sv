// tb_uwb_transmitter: the whole transmitter model, symbol in, pulse out.
//
// Biases: VCTRL_PPM 0.85 V (late-position delay sqrt(120*2) ns), all
// VCTRL_DC 1.45 V (stage delay 0.5 * 0.2^0.5 ns), all VCTRL_GG 1.45 V
// (sub-pulse width 0.2 * 0.5^0.5 ns), random PA enables per slice. For each
// symbol the combined drive must show eight sub-pulses, sub-pulse i
// starting at ppm + (i+1) * stage + 0.05 ns and raising the node by twice
// the number of enabled units of slice i (from pulling down to pulling up).
// DIR = 1 must delay the whole pulse by the PPM delay, delay_line_out must
// follow after eight stages, and standby must suppress the pulse.
module tb_uwb_transmitter;
  timeunit 1ns; timeprecision 1ps;

  int checks = 0, failures = 0;
  logic data = 0, dir = 0, sb = 0, dl_out;
  logic [7:0] sub;
  logic [7:0] en [8];
  real vppm = 0.85;
  real vdc [8];
  real vgg [8];
  int drive;

  uwb_transmitter dut (.data(data), .dir(dir), .standby(sb), .vctrl_ppm(vppm),
    .vctrl_dc(vdc), .vctrl_gg(vgg), .pa_enable(en), .drive(drive),
    .delay_line_out(dl_out), .sub_pulse(sub));

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

  int idle_drive;
  real t_rise [$];
  int  step [$];
  int  prev_drive;
  always @(drive) begin
    if (drive > prev_drive && prev_drive == idle_drive) begin
      t_rise.push_back($realtime); step.push_back(drive - prev_drive);
    end
    prev_drive = drive;
  end

  initial begin
    real stage, ppm, t0, tdl;
    int total;
    stage = 0.5 * $exp(0.5 * $ln(0.2));
    ppm = $sqrt(240.0);
    for (int i = 0; i < 8; i++) begin vdc[i] = 1.45; vgg[i] = 1.45; end
    for (int s = 0; s < 20; s++) begin
      total = 0;
      for (int i = 0; i < 8; i++) begin
        en[i] = (s == 0) ? 8'hFF : 8'($urandom) | 8'h01;
        total += $countones(en[i]);
      end
      dir = 1'(s % 2);
      #50;
      idle_drive = -total; prev_drive = drive;
      check(drive == -total, "idle node pulled down");
      t_rise.delete(); step.delete();
      t0 = $realtime; data = 1;
      @(posedge dl_out); tdl = $realtime - t0;
      check(tdl > (dir ? ppm : 0.0) + 8 * stage - 0.012 && tdl < (dir ? ppm : 0.0) + 8 * stage + 0.012,
            "delay_line_out after eight stages");
      #5;
      check(t_rise.size() == 8, "eight sub-pulses");
      for (int i = 0; i < 8 && i < t_rise.size(); i++) begin
        real e;
        e = (dir ? ppm : 0.0) + (i + 1) * stage + 0.05;
        check(t_rise[i] - t0 > e - 0.012 && t_rise[i] - t0 < e + 0.012, "sub-pulse position");
        check(step[i] == 2 * $countones(en[i]), "sub-pulse amplitude");
      end
      #50; data = 0; #100;
    end
    // standby: no pulse
    sb = 1; #50;
    t_rise.delete();
    data = 1; #100;
    check(t_rise.size() == 0, "no pulse in standby");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
