// tb_uwb_tx_chip: end-to-end test of the whole chip at its nominal clocks.
//
// The top is used as is, with no parameter overrides: clk_prf runs at 7 MHz
// (142.857 ns), clk_tgran at 1/190 us, so one 16-step window lasts 3.04 ms.
// Biases: VCTRL_PPM 0.85 V, VCTRL_DC and VCTRL_GG 1.45 V on all slices.
//
// Eight LC-ADC channels are driven window by window:
//   window 0  the reference vectors (0000, 0000, 0000, 0800, 0200, 2000,
//             0400, 3FFF) in lossless mode with the reset delimiter;
//   window 1  lone crossings at positions whose GCD with 15 is 1, in lossy
//             mode, so every one is moved by one step;
//   window 2  random data with compression off, after new PA enables and a
//             new delimiter;
//   window 3  lossless again, with the transmitter in standby;
//   window 4  lossless, with the external DATA/DIR pins selected.
// The symbol stream at tx_data/tx_dir is compared with one built here from
// the packet rule, and every DATA=1 symbol must produce one pulse at rf_drive:
// eight sub-pulses, the first within 1 ns of the edge for DIR = 0 or about
// 15.5 ns later for DIR = 1, the first sub-pulse lifting the node by twice
// the enabled units of slice 0. In standby no pulse may appear. With the
// external source selected the pulses follow the external pins. A final
// phase clocks TGRAN far faster than specified, with compression off, so
// that a window ends before its frame is out and the overrun flag is seen.
// Each mechanism is counted, and one that never occurred is a failure.
module tb_uwb_tx_chip;
  import gcd_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  localparam int    N = WINDOW;
  localparam real   T_PRF = 1000.0 / 7.0;    // ns
  localparam real   T_TGRAN = 190000.0;      // ns
  int checks = 0, failures = 0;

  logic clk = 0, clk_tgran = 0, rst_n = 0, we = 0;
  logic [NUM_CH-1:0] ld = '0, lr = '0;
  logic [7:0] wdata = 0;
  logic [3:0] addr = 0;
  logic ext_data = 0, ext_dir = 0;
  real  vppm = 0.85;
  real  vdc [NUM_CH];
  real  vgg [NUM_CH];
  int   rf_drive;
  logic dl_out, tx_data, tx_dir, busy, frame_done, overrun;

  uwb_tx_chip dut (.clk_prf(clk), .clk_tgran(clk_tgran), .rst_n(rst_n),
    .lcadc_data_in(ld), .lcadc_dir_in(lr), .address_in(addr), .data_in(wdata),
    .write_enable(we), .ext_data(ext_data), .ext_dir(ext_dir), .vctrl_ppm(vppm),
    .vctrl_dc(vdc), .vctrl_gg(vgg), .rf_drive(rf_drive), .delay_line_out(dl_out),
    .tx_data(tx_data), .tx_dir(tx_dir), .busy(busy), .frame_done(frame_done),
    .overrun(overrun));

  always #(T_PRF / 2) clk = !clk;

  initial begin
    #(8 * 16 * T_TGRAN);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $time); end
  endtask

  // Mechanism counters.
  int n_empty = 0, n_lossless = 0, n_lossy_move = 0, n_raw = 0, n_mode_none = 0;
  int n_delim_change = 0, n_pulse_early = 0, n_pulse_late = 0, n_standby_quiet = 0;
  int n_ext = 0, n_ext_blocked = 0, n_pa_change = 0, n_overrun = 0;

  // Settings as this testbench wrote them.
  logic [7:0] pa [NUM_CH];
  logic       sb = 1, src_ext = 0;

  task automatic write_reg(input logic [3:0] a, input logic [7:0] v);
    @(negedge clk); addr = a; wdata = v; we = 1;
    @(negedge clk); we = 0;
    if (a < 4'(NUM_CH)) pa[a] = v;
    if (a == ADDR_CTRL) begin sb = v[0]; src_ext = v[3]; end
  endtask

  // Expected packet bits, oldest first, with the stride-1 move in lossy mode.
  task automatic expect_packet(input logic [N-1:0] d, input logic [N-1:0] r, input int mode,
                               inout logic q_d [$], inout logic q_r [$]);
    int ones, p, gg, l, q, g1, g2;
    logic dirbit;
    ones = $countones(d); p = 0;
    for (int i = 0; i < N; i++) if (d[i]) p = i;
    dirbit = r[p];
    gg = 1;
    if (mode != 0 && ones == 0) begin gg = N; n_empty++; end
    else if (mode != 0 && ones == 1) begin
      gg = gcd_u(p, 15);
      if (gg == 1 && mode == 2) begin
        g1 = (p >= 1) ? gcd_u(p - 1, 15) : 1;
        g2 = (p <= 14) ? gcd_u(p + 1, 15) : 1;
        if (g1 >= g2 && g1 > 1) begin p = p - 1; gg = g1; n_lossy_move++; end
        else if (g2 > 1) begin p = p + 1; gg = g2; n_lossy_move++; end
      end else if (gg > 1) n_lossless++;
    end
    if (gg == 1) begin
      if (mode == 0) n_mode_none++; else n_raw++;
      for (int i = N - 1; i >= 0; i--) begin q_d.push_back(d[i]); q_r.push_back(r[i]); end
    end else begin
      l = (N - 1) / gg + 1;
      q = (ones == 0) ? -1 : p / gg;
      for (int i = l - 1; i >= 0; i--) begin
        q_d.push_back(i == q); q_r.push_back((i == q) ? dirbit : 1'b0);
      end
    end
  endtask

  logic [N-1:0] wd [NUM_CH];
  logic [N-1:0] wr [NUM_CH];
  logic exp_d [$];
  logic exp_r [$];
  logic got_d [$];
  logic got_r [$];
  int   frames_seen = 0;
  logic capture = 1;

  // Symbol capture from the controller's frames.
  initial begin
    wait (rst_n);
    forever begin
      @(posedge clk);
      if (busy && capture) begin
        while (1) begin
          @(negedge clk);
          got_d.push_back(tx_data); got_r.push_back(tx_dir);
          @(negedge clk);
          if (frame_done) break;
        end
        frames_seen++;
      end
    end
  end

  // Pulse observer: rising steps of the drive node out of its idle level.
  real t_rise [$];
  int  step_up [$];
  int  prev_drive = 0;
  always @(rf_drive) begin
    if (rf_drive > prev_drive) begin t_rise.push_back($realtime); step_up.push_back(rf_drive - prev_drive); end
    prev_drive = rf_drive;
  end

  // Each rising edge of tx_data must be followed by one pulse (eight
  // sub-pulses) whose position carries tx_dir, or by nothing in standby.
  real ppm_ns;
  always @(posedge tx_data) begin
    real t0;
    logic d;
    t0 = $realtime; d = tx_dir;
    t_rise.delete(); step_up.delete();
    #(T_PRF * 0.9);
    if (sb) begin
      check(t_rise.size() == 0, "no pulse in standby");
      if (t_rise.size() == 0) n_standby_quiet++;
    end else begin
      check(t_rise.size() == 8, "eight sub-pulses per symbol");
      if (t_rise.size() > 0) begin
        real dt;
        dt = t_rise[0] - t0;
        if (d) begin
          check(dt > ppm_ns && dt < ppm_ns + 1.0, "late pulse position for DIR = 1");
          n_pulse_late++;
        end else begin
          check(dt > 0.0 && dt < 1.0, "early pulse position for DIR = 0");
          n_pulse_early++;
        end
        check(step_up[0] == 2 * $countones(pa[0]), "first sub-pulse amplitude");
      end
      if (src_ext) n_ext++;
    end
  end

  task automatic tgran_step(input int step, input real half);
    for (int c = 0; c < NUM_CH; c++) begin
      ld[c] = wd[c][N - 1 - step];
      lr[c] = wr[c][N - 1 - step];
    end
    #(half); clk_tgran = 1;
    #(half); clk_tgran = 0;
  endtask

  int frame_end [6];
  logic [2:0] cur_dd = 3'b111, cur_dr = 3'b101;
  task automatic queue_window(input int mode);
    for (int c = 0; c <= NUM_CH; c++) begin
      for (int i = 2; i >= 0; i--) begin exp_d.push_back(cur_dd[i]); exp_r.push_back(cur_dr[i]); end
      if (c < NUM_CH) expect_packet(wd[c], wr[c], mode, exp_d, exp_r);
    end
  endtask

  initial begin
    int mode;
    ppm_ns = 120.0 * $exp(0.5 * $ln(2.0 / 120.0));   // log-linear delay at 0.85 V
    for (int c = 0; c < NUM_CH; c++) begin vdc[c] = 1.45; vgg[c] = 1.45; pa[c] = 8'hFF; end
    for (int c = 0; c < NUM_CH; c++) begin wd[c] = '0; wr[c] = '0; end
    wd[3] = 16'h0800; wd[4] = 16'h0200; wd[5] = 16'h2000; wd[6] = 16'h0400; wd[7] = 16'h3FFF;
    wr[3] = 16'h0800; wr[7] = 16'h2AAA;
    #(3 * T_PRF) rst_n = 1;
    // leave standby, lossless mode
    write_reg(ADDR_CTRL, {5'b0, 2'(COMP_LOSSLESS), 1'b0});
    mode = 1;
    for (int w = 0; w < 6; w++) begin
      for (int step = 0; step < N; step++) begin
        if (step == 8) begin
          check(!busy, "frame out within half a window");
          case (w)
            1: begin
              mode = 2;
              write_reg(ADDR_CTRL, {5'b0, 2'(COMP_LOSSY), 1'b0});
            end
            2: begin
              mode = 0;
              write_reg(ADDR_CTRL, {5'b0, 2'(COMP_NONE), 1'b0});
              cur_dd = 3'b101; cur_dr = 3'b011;
              write_reg(ADDR_DELIM, {2'b0, cur_dr, cur_dd});
              n_delim_change++;
              for (int c = 0; c < NUM_CH; c++) write_reg(4'(c), 8'(8'h0F << (c % 5)));
              n_pa_change++;
            end
            3: begin
              mode = 1;
              write_reg(ADDR_CTRL, {5'b0, 2'(COMP_LOSSLESS), 1'b1});
            end
            4: write_reg(ADDR_CTRL, {4'b0, 1'b1, 2'(COMP_LOSSLESS), 1'b0});
            default: ;
          endcase
        end
        tgran_step(step, T_TGRAN / 2);
      end
      // this window's packets go out at the start of the next one
      queue_window(mode);
      frame_end[w] = exp_d.size();
      check(!overrun, "no overrun at nominal rates");
      // next window's data
      for (int c = 0; c < NUM_CH; c++) begin
        case (w)
          0: begin   // lone crossings at gcd(p,15) = 1 positions
            int ps [8] = '{1, 2, 4, 7, 8, 11, 13, 14};
            wd[c] = N'(1) << ps[c]; wr[c] = (c % 2) ? wd[c] : '0;
          end
          1: begin wd[c] = N'($urandom); wr[c] = N'($urandom) & wd[c]; end
          default: begin
            wd[c] = (c % 3 == 0) ? '0 : N'(1) << (5 * (c % 3));
            wr[c] = (c % 2) ? wd[c] : '0;
          end
        endcase
      end
    end
    // window 5's frame (window 4's data) is sent with the external source
    // selected; the external pins carry a few pulses of their own
    repeat (4) begin
      @(negedge clk); ext_dir = 1'($urandom); ext_data = 1;
      @(negedge clk); ext_data = 0;
      repeat (4) @(negedge clk);
    end
    repeat (400) @(posedge clk);
    // stream check: every frame sent so far
    check(frames_seen == 6, "one frame per window");
    // The first four frames reach the transmitter; the last two are sent
    // while the external source is selected, so the pins show the idle
    // external inputs instead.
    check(got_d.size() == exp_d.size(), "number of symbols");
    if (got_d.size() != exp_d.size()) $display("got %0d expected %0d symbols", got_d.size(), exp_d.size());
    for (int k = 0; k < exp_d.size() && k < got_d.size(); k++) begin
      if (k < frame_end[3]) begin
        check(got_d[k] == exp_d[k] && got_r[k] == exp_r[k], "symbol stream");
        if (got_d[k] != exp_d[k] || got_r[k] != exp_r[k])
          $display("symbol %0d: got %b/%b expected %b/%b", k, got_d[k], got_r[k], exp_d[k], exp_r[k]);
      end else if (k < frame_end[4]) begin
        check(!got_d[k], "controller stream blocked by external source");
        if (exp_d[k]) n_ext_blocked++;
      end
    end
    // overrun: TGRAN far faster than a frame, compression off, dense data
    capture = 0;
    write_reg(ADDR_CTRL, {5'b0, 2'(COMP_NONE), 1'b0});
    for (int c = 0; c < NUM_CH; c++) begin wd[c] = 16'hA5A5; wr[c] = '0; end
    for (int k = 0; k < 3 * N; k++) begin
      tgran_step(k % N, 3 * T_PRF);
      if (overrun) n_overrun++;
    end
    repeat (400) @(posedge clk) if (overrun) n_overrun++;

    $display("empty %0d lossless %0d lossy-moved %0d raw %0d mode-none %0d delimiter %0d pa %0d",
             n_empty, n_lossless, n_lossy_move, n_raw, n_mode_none, n_delim_change, n_pa_change);
    $display("pulses early %0d late %0d standby-quiet %0d external %0d (blocked %0d) overrun %0d frames %0d symbols %0d",
             n_pulse_early, n_pulse_late, n_standby_quiet, n_ext, n_ext_blocked, n_overrun, frames_seen, got_d.size());
    check(n_empty > 0, "empty packet seen");
    check(n_lossless > 0, "lossless compressed packet seen");
    check(n_lossy_move > 0, "lossy move seen");
    check(n_raw > 0, "uncompressible packet seen");
    check(n_mode_none > 0, "compression-off packet seen");
    check(n_delim_change > 0, "delimiter changed");
    check(n_pa_change > 0, "PA enables changed");
    check(n_pulse_early > 0, "DIR = 0 pulse seen");
    check(n_pulse_late > 0, "DIR = 1 pulse seen");
    check(n_standby_quiet > 0, "standby suppressed pulses");
    check(n_ext > 0, "external source drove the transmitter");
    check(n_ext_blocked > 0, "controller symbols blocked while external source selected");
    check(n_overrun > 0, "overrun flagged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
