// tb_digital_controller: the controller from LC-ADC bits to symbol stream.
//
// The TGRAN clock is run at 1/200 of the PRF clock to keep the run short (the
// controller only needs it to be much slower). Window 1 repeats the
// controller's reference test: lossless mode, DATA of channels 0..7 =
// 0000, 0000, 0000, 0800, 0200, 2000, 0400, 3FFF, DIR all zero, delimiter
// DATA 111 / DIR 101; the expected symbol stream is built here from the
// packet rule (empty -> one 0; a lone crossing at bit p with g = gcd(p, 15)
// > 1 -> (15/g)+1 bits with the crossing at p/g; otherwise 16 bits as
// recorded). Further windows use random sparse packets with random DIR in
// lossless, lossy (stride-1 move) and no-compression modes, a changed
// delimiter and register read-back of PA enables, standby and the external
// source bit. Settings change half-way through a window; every frame must
// be complete by then, without overrun.
module tb_digital_controller;
  import gcd_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  localparam int N = 16, TG = 200;
  int checks = 0, failures = 0;

  logic clk = 0, clk_tgran = 0, rst_n = 0, we = 0;
  logic [7:0] ld = 0, lr = 0, wdata = 0;
  logic [3:0] addr = 0;
  logic tx_data, tx_dir, standby, src_ext, busy, frame_done, overrun;
  logic [7:0] sel [NUM_CH];

  digital_controller dut (.clk_prf(clk), .clk_tgran(clk_tgran), .rst_n(rst_n),
    .lcadc_data_in(ld), .lcadc_dir_in(lr), .address_in(addr), .data_in(wdata),
    .write_enable(we), .tx_data(tx_data), .tx_dir(tx_dir), .select_reg(sel),
    .standby(standby), .tx_src_ext(src_ext), .busy(busy), .frame_done(frame_done),
    .overrun(overrun));

  always #5 clk = !clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic write_reg(input logic [3:0] a, input logic [7:0] v);
    @(negedge clk); addr = a; wdata = v; we = 1;
    @(negedge clk); we = 0;
  endtask

  // Expected packet, with the stride-1 move for lossy mode.
  task automatic expect_packet(input logic [N-1:0] d, input logic [N-1:0] r, input int mode,
                               inout logic q_d [$], inout logic q_r [$]);
    int ones, p, gg, l, q, g1, g2;
    logic dirbit;
    ones = $countones(d); p = 0;
    for (int i = 0; i < N; i++) if (d[i]) p = i;
    dirbit = r[p];
    gg = 1;
    if (mode != 0 && ones == 0) gg = N;
    else if (mode != 0 && ones == 1) begin
      gg = gcd_u(p, 15);
      if (gg == 1 && mode == 2) begin
        g1 = (p >= 1) ? gcd_u(p - 1, 15) : 1;
        g2 = (p <= 14) ? gcd_u(p + 1, 15) : 1;
        if (g1 >= g2 && g1 > 1) begin p = p - 1; gg = g1; end
        else if (g2 > 1) begin p = p + 1; gg = g2; end
      end
    end
    if (gg == 1) begin
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

  // Symbol capture: the first symbol appears the cycle after busy rises,
  // then one every two cycles.
  initial begin
    wait (rst_n);
    forever begin
      @(posedge clk);
      if (busy) begin
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

  task automatic run_window(input int mode, input logic [2:0] dd, input logic [2:0] dr);
    // the window's packets go out in the next window; build the expected stream
    for (int c = 0; c <= NUM_CH; c++) begin
      for (int i = 2; i >= 0; i--) begin exp_d.push_back(dd[i]); exp_r.push_back(dr[i]); end
      if (c < NUM_CH) expect_packet(wd[c], wr[c], mode, exp_d, exp_r);
    end
  endtask

  // One TGRAN step: present the bits, then a full TGRAN clock period.
  task automatic tgran_step(input int step);
    for (int c = 0; c < NUM_CH; c++) begin
      ld[c] = wd[c][N - 1 - step];
      lr[c] = wr[c][N - 1 - step];
    end
    repeat (TG / 2) @(posedge clk);
    clk_tgran = 1;
    repeat (TG / 2) @(posedge clk);
    clk_tgran = 0;
  endtask

  initial begin
    int fr;
    for (int c = 0; c < NUM_CH; c++) begin wd[c] = '0; wr[c] = '0; end
    wd[3] = 16'h0800; wd[4] = 16'h0200; wd[5] = 16'h2000; wd[6] = 16'h0400; wd[7] = 16'h3FFF;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // window 0 is the reference test with the reset settings
    for (int w = 0; w < 13; w++) begin
      int mode;
      logic [2:0] dd, dr;
      mode = (w == 0) ? 1 : w % 3;          // then none, lossless, lossy in turn
      dd = (w == 0) ? 3'b111 : 3'($urandom);
      dr = (w == 0) ? 3'b101 : 3'($urandom);
      if (w > 0)
        for (int c = 0; c < NUM_CH; c++) begin
          case ($urandom_range(0, 2))
            0: wd[c] = '0;
            1: wd[c] = N'(1) << $urandom_range(0, N - 1);
            default: wd[c] = N'($urandom);
          endcase
          wr[c] = N'($urandom) & wd[c];
        end
      for (int step = 0; step < N; step++) begin
        // settings change mid-window, after the previous frame has gone out
        if (step == 8) begin
          check(!busy, "previous frame done within half a window");
          write_reg(ADDR_CTRL, {5'b0, 2'(mode), 1'b0});
          write_reg(ADDR_DELIM, {2'b0, dr, dd});
        end
        tgran_step(step);
      end
      run_window(mode, dd, dr);
      check(!overrun, "no overrun");
    end
    fr = frames_seen;
    repeat (2000) @(posedge clk);
    check(frames_seen == 13, "one frame per window");
    check(got_d.size() == exp_d.size(), "number of symbols");
    if (got_d.size() != exp_d.size()) $display("got %0d expected %0d symbols", got_d.size(), exp_d.size());
    for (int k = 0; k < exp_d.size() && k < got_d.size(); k++)
      check(got_d[k] == exp_d[k] && got_r[k] == exp_r[k], "symbol stream");
    // register read-back through the controller's outputs
    write_reg(4'd5, 8'h3C);
    write_reg(ADDR_CTRL, 8'b0000_1010);
    @(negedge clk);
    check(sel[5] == 8'h3C && sel[0] == 8'hFF, "PA enables");
    check(!standby && src_ext, "standby and source");
    $display("frames %0d, symbols %0d", frames_seen, got_d.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
