// tb_gcd_compressor: exhaustive test of the combinational GCD compressor.
//
// Every 16-bit DATA pattern is applied in each of the three modes with a
// random DIR word. The reference, written independently of the design,
// follows the algorithm literally: list the zero runs of the packet (oldest
// step first), take their GCD, and, for a packet the hardware is meant to
// detect (empty, or one crossing), rebuild the compressed word by emitting
// one zero per g zeros and every crossing as it is. For lossy mode a lone
// crossing with GCD 1 is moved one step (later step tried first) to the
// position with the larger GCD. Every compressed output is also expanded
// again, receiver-style, and must give back the (possibly moved) packet. The
// examples of the design description (0x0040 -> 0x0004/6, 0x0020 ->
// 0x0002/4, 0xFFF8 unchanged/16) and the sizes of the detected sets (9
// lossless, 17 lossy) are checked explicitly.
module tb_gcd_compressor;
  import gcd_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  localparam int N = 16;
  int checks = 0, failures = 0;

  comp_mode_e  mode;
  logic [N-1:0] din, dirin, dout, dirout;
  logic [4:0]   len, g;
  logic         moved;

  gcd_compressor #(.N(N)) dut (.mode(mode), .data_in(din), .dir_in(dirin),
    .data_out(dout), .dir_out(dirout), .len(len), .g(g), .moved(moved));

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int gcd_ref(int a, int b);
    while (b != 0) begin int t; t = a % b; a = b; b = t; end
    return a;
  endfunction

  // GCD of the zero runs; bit N-1 is the oldest step.
  function automatic int runs_gcd(logic [N-1:0] d);
    int r = 0, gg = 0;
    for (int i = N - 1; i >= 0; i--) begin
      if (d[i]) begin gg = gcd_ref(gg, r); r = 0; end
      else r++;
    end
    gg = gcd_ref(gg, r);
    return gg;
  endfunction

  // Compress by walking the packet oldest first.
  task automatic compress_ref(input logic [N-1:0] d, input logic [N-1:0] r, input int gg,
                              output logic [N-1:0] od, output logic [N-1:0] orr, output int ol);
    logic [N-1:0] bd = '0, br = '0;
    int i = N - 1, n = 0;
    while (i >= 0) begin
      bd = {bd[N-2:0], d[i]};
      br = {br[N-2:0], r[i]};
      n++;
      if (d[i]) i--; else i -= gg;
    end
    od = bd; orr = br; ol = n;
  endtask

  function automatic logic [N-1:0] expand(logic [N-1:0] d, int l, int gg);
    logic [N-1:0] o = '0;
    int k = N - 1;
    for (int i = l - 1; i >= 0; i--) begin
      if (d[i]) begin o[k] = 1'b1; k--; end
      else k -= gg;
    end
    return o;
  endfunction

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s mode=%0d din=%h dout=%h len=%0d g=%0d", what, mode, din, dout, len, g);
    end
  endtask

  initial begin
    int n_ll = 0, n_ly = 0;
    for (int m = 0; m < 3; m++) begin
      mode = comp_mode_e'(m);
      for (int v = 0; v < (1 << N); v++) begin
        logic [N-1:0] ed, er, pd, pr;
        int el, eg, ones;
        logic emoved;
        din = N'(v);
        dirin = N'($urandom) & din;
        #1;
        ones = $countones(din);
        pd = din; pr = dirin; emoved = 1'b0;
        eg = runs_gcd(din);
        if (m == 2 && ones == 1 && eg == 1) begin
          // stride-1 move: later step first, keep the first maximum
          int p, best, bp;
          p = 0; best = 1; bp = -1;
          for (int i = 0; i < N; i++) if (din[i]) p = i;
          if (p >= 1 && runs_gcd(N'(1) << (p - 1)) > best) begin best = runs_gcd(N'(1) << (p - 1)); bp = p - 1; end
          if (p + 1 < N && runs_gcd(N'(1) << (p + 1)) > best) begin best = runs_gcd(N'(1) << (p + 1)); bp = p + 1; end
          if (bp >= 0) begin
            pd = N'(1) << bp; pr = dirin[p] ? pd : '0; eg = best; emoved = 1'b1;
          end
        end
        if (m == 0 || ones > 1 || eg == 1) begin
          ed = din; er = dirin; el = N; eg = 1; emoved = 1'b0;
        end else begin
          compress_ref(pd, pr, eg, ed, er, el);
        end
        if (el < N) begin
          if (m == 1) n_ll++;
          if (m == 2) n_ly++;
        end
        check(dout == ed && len == 5'(el) && g == 5'(eg) && moved == emoved, "compress");
        check(dirout == er, "dir");
        if (len < 5'(N)) check(expand(dout, int'(len), int'(g)) == pd, "expand");
      end
    end
    check(n_ll == 9, "lossless set size");
    check(n_ly == 17, "lossy set size");
    $display("detected packets: lossless %0d, lossy %0d", n_ll, n_ly);

    mode = COMP_LOSSLESS; dirin = '0;
    din = 16'h0040; #1 check(dout == 16'h0004 && len == 6, "example 0x0040");
    din = 16'h0020; #1 check(dout == 16'h0002 && len == 4, "example 0x0020");
    din = 16'hFFF8; #1 check(dout == 16'hFFF8 && len == 16, "example 0xFFF8");
    din = 16'h0000; #1 check(dout == 16'h0000 && len == 1, "empty packet");
    // A crossing one step after the oldest moves to the oldest step (lossy).
    mode = COMP_LOSSY;
    din = 16'h4000; #1 check(dout == 16'h0002 && len == 2 && moved, "lossy move");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
