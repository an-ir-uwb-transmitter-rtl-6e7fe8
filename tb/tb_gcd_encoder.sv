// tb_gcd_encoder: one channel, shift registers through output registers.
//
// A stream of random windows (biased towards the sparse packets the
// compressor detects) is shifted in one bit per tick, oldest bit first. For
// each window the test checks: valid rises exactly two clocks after the
// window's last tick, the length is 1, (15/g)+1 or 16 as the window's
// content requires, and expanding the packet the way a receiver does (every
// zero stands for g zeros, g recovered from the length) gives back the
// window in lossless mode; DIR bits follow their crossings. It also checks
// that rd_ack clears valid and that an unread packet raises overrun.
module tb_gcd_encoder;
  import gcd_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  localparam int N = 16;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0, tick = 0, din = 0, dirin = 0, rd_ack = 0;
  comp_mode_e mode = COMP_LOSSLESS;
  logic [N-1:0] dout, dirout;
  logic [4:0] len;
  logic valid, overrun;

  gcd_encoder #(.N(N)) dut (.clk(clk), .rst_n(rst_n), .tick(tick), .mode(mode),
    .data_in(din), .dir_in(dirin), .rd_ack(rd_ack), .data_out(dout), .dir_out(dirout),
    .len(len), .valid(valid), .overrun(overrun));

  always #5 clk = !clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL %s dout=%h len=%0d", what, dout, len); end
  endtask

  function automatic logic [N-1:0] expand(logic [N-1:0] d, int l);
    logic [N-1:0] o;
    int gg, k;
    o = '0; k = N - 1;
    gg = (l == 1) ? N : (l == N) ? 1 : (N - 1) / (l - 1);
    for (int i = l - 1; i >= 0; i--) begin
      if (d[i]) begin o[k] = 1'b1; k--; end
      else k -= gg;
    end
    return o;
  endfunction

  task automatic send_window(input logic [N-1:0] w, input logic [N-1:0] wd, input bit ack);
    for (int i = N - 1; i >= 0; i--) begin
      @(negedge clk);
      din = w[i]; dirin = wd[i]; tick = 1;
      @(negedge clk);
      tick = 0;
      if (i == 0) begin
        // last tick was in the previous cycle: valid after one more edge
        check(!valid || !ack, "valid too early");
        @(negedge clk);
        check(valid, "valid two clocks after the last tick");
      end else begin
        repeat (2) @(negedge clk);
      end
    end
  endtask

  initial begin
    logic [N-1:0] w, wd, ex;
    int gg;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      case ($urandom_range(0, 3))
        0: w = '0;
        1: w = N'(1) << $urandom_range(0, N - 1);
        2: w = N'(1) << (3 * $urandom_range(0, 5));
        default: w = N'($urandom);
      endcase
      wd = N'($urandom) & w;
      mode = (t % 5 == 4) ? COMP_NONE : COMP_LOSSLESS;
      send_window(w, wd, 1'b1);
      // expected length from the zero runs
      begin
        int ones, pos;
        ones = $countones(w); pos = 0;
        for (int i = 0; i < N; i++) if (w[i]) pos = i;
        if (mode == COMP_NONE) gg = 1;
        else if (ones == 0) gg = N;
        else if (ones == 1) begin
          int a, b;
          a = pos; b = N - 1 - pos;
          while (b != 0) begin int tt; tt = a % b; a = b; b = tt; end
          gg = a;
        end else gg = 1;
      end
      check(int'(len) == ((gg == 1) ? N : (N - 1) / gg + 1), "length");
      check(expand(dout, int'(len)) == w, "expand data");
      check(expand(dirout, int'(len)) == wd, "expand dir");
      @(negedge clk);
      rd_ack = 1;
      @(negedge clk);
      rd_ack = 0;
      check(!valid, "valid cleared by rd_ack");
    end
    // Two windows without reading: the second one reports an overrun.
    send_window(16'h0000, '0, 1'b1);
    begin
      bit seen;
      seen = 0;
      for (int i = N - 1; i >= 0; i--) begin
        @(negedge clk); din = 0; tick = 1;
        @(negedge clk); tick = 0;
        repeat (2) begin @(negedge clk); if (overrun) seen = 1; end
      end
      check(seen, "overrun on an unread packet");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
