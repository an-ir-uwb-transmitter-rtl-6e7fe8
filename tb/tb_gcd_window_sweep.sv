// tb_gcd_window_sweep: the GCD compressor at the other window sizes of the
// window-size study (10 to 30 TGRAN steps), next to the default 16.
//
// The on-chip controller uses 16-step windows; the compressor builds its
// detection table from N at elaboration, so other sizes need no new logic.
// For N = 10, 12, 16, 20, 24 and 30 this bench instantiates one compressor
// each and applies, in lossless and lossy mode, the empty packet, every
// one-crossing packet and 2000 random packets. The reference is written
// from the rule alone: the GCD g of the zero runs, compression only for the
// empty packet and single crossings with g > 1, every zero run divided by g,
// the stride-1 move for lossy mode (neighbour with the larger g, the later
// step on a tie), unchanged length N otherwise. Each compressed output must
// also expand back to the (possibly moved) packet. The bench prints the
// number of packets each size detects and the mean compressed length of a
// sparse random stream (crossing probability 1/20 per step), a rough
// measure of how the compression ratio moves with N.
module tb_gcd_window_sweep;
  import gcd_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  localparam int NS = 6;
  localparam int SIZES [NS] = '{10, 12, 16, 20, 24, 30};
  int checks = 0, failures = 0;

  initial begin
    #50_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int gcd_ref(int a, int b);
    while (b != 0) begin int t; t = a % b; a = b; b = t; end
    return a;
  endfunction

  task automatic check(logic cond, string what, int n);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL %s N=%0d at %0t", what, n, $time); end
  endtask

  int done = 0;

  for (genvar s = 0; s < NS; s++) begin : g_n
    localparam int N = SIZES[s];
    localparam int LW = $clog2(N + 1);
    comp_mode_e   mode;
    logic [N-1:0] din, dirin, dout, dirout;
    logic [LW-1:0] len, g;
    logic         moved;

    gcd_compressor #(.N(N)) dut (.mode(mode), .data_in(din), .dir_in(dirin),
      .data_out(dout), .dir_out(dirout), .len(len), .g(g), .moved(moved));

    function automatic int runs_gcd(logic [N-1:0] d);
      int r, gg;
      r = 0; gg = 0;
      for (int i = N - 1; i >= 0; i--) begin
        if (d[i]) begin gg = gcd_ref(gg, r); r = 0; end
        else r++;
      end
      return gcd_ref(gg, r);
    endfunction

    task automatic apply(input logic [N-1:0] d, input logic [N-1:0] r, inout int n_det, inout longint sum_len);
      logic [N-1:0] pd, pr, ed, er, o;
      int eg, el, ones, p, k;
      logic emoved;
      din = d; dirin = r; #1;
      ones = $countones(d); pd = d; pr = r; emoved = 1'b0;
      eg = runs_gcd(d);
      p = 0;
      for (int i = 0; i < N; i++) if (d[i]) p = i;
      if (mode == COMP_LOSSY && ones == 1 && eg == 1) begin
        int gl, gh;
        gl = (p >= 1) ? runs_gcd(N'(1) << (p - 1)) : 1;
        gh = (p + 1 < N) ? runs_gcd(N'(1) << (p + 1)) : 1;
        if (gl > 1 && gl >= gh) begin pd = N'(1) << (p - 1); eg = gl; emoved = 1'b1; end
        else if (gh > 1) begin pd = N'(1) << (p + 1); eg = gh; emoved = 1'b1; end
        if (emoved) pr = r[p] ? pd : '0;
      end
      if (ones > 1 || eg == 1) begin
        ed = d; er = r; el = N; eg = 1; emoved = 1'b0;
      end else begin
        // one output bit per crossing, one per g zeros, oldest first
        int i;
        ed = '0; er = '0; el = 0; i = N - 1;
        while (i >= 0) begin
          ed = {ed[N-2:0], pd[i]}; er = {er[N-2:0], pr[i]}; el++;
          i -= pd[i] ? 1 : eg;
        end
        n_det++;
      end
      check(dout == ed && dirout == er && len == LW'(el) && g == LW'(eg) && moved == emoved,
            "compressed packet", N);
      // receiver-side expansion
      o = '0; k = N - 1;
      for (int i = int'(len) - 1; i >= 0; i--) begin
        if (dout[i]) begin o[k] = 1'b1; k--; end
        else k -= int'(g);
      end
      check(o == pd, "expands back", N);
      if (o != pd) $display("  d=%b pd=%b dout=%b len=%0d g=%0d mode=%0d", d, pd, dout, len, g, mode);
      sum_len += el;
    endtask

    initial begin
      int n_ll, n_ly;
      longint sl;
      wait (done == s);   // one size at a time
      n_ll = 0; n_ly = 0; sl = 0;
      for (int m = 1; m <= 2; m++) begin
        int nd;
        nd = 0;
        mode = comp_mode_e'(m);
        apply('0, '0, nd, sl);
        for (int p = 0; p < N; p++) apply(N'(1) << p, N'($urandom) & (N'(1) << p), nd, sl);
        if (m == 1) n_ll = nd; else n_ly = nd;
        for (int t = 0; t < 2000; t++) begin
          logic [N-1:0] d;
          d = '0;
          case (t % 3)
            0: d = N'($urandom);
            1: d = N'(1) << $urandom_range(0, N - 1);
            default: for (int i = 0; i < N; i++) d[i] = ($urandom_range(0, 19) == 0);
          endcase
          apply(d, N'($urandom) & d, nd, sl);
        end
      end
      // mean compressed length of a sparse stream, lossless
      begin
        int nd;
        longint tot;
        nd = 0; tot = 0; mode = COMP_LOSSLESS;
        for (int t = 0; t < 3000; t++) begin
          logic [N-1:0] d;
          for (int i = 0; i < N; i++) d[i] = ($urandom_range(0, 19) == 0);
          apply(d, '0, nd, tot);
        end
        $display("N=%0d: lossless set %0d packets, lossy set %0d, sparse-stream ratio %0.2f",
                 N, n_ll, n_ly, real'(3000 * N) / real'(tot));
      end
      if (N == 16) begin
        check(n_ll == 9, "16-step lossless set", N);
        check(n_ly == 17, "16-step lossy set", N);
      end
      done++;
    end
  end

  initial begin
    wait (done == NS);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
