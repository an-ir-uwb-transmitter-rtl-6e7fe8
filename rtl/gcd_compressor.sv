// gcd_compressor: combinational GCD compression of one LC-ADC packet.
//
// A packet is N bits of DATA (1 = a level crossing in that TGRAN step) and the
// matching N bits of DIR (1 = upward crossing). Bit N-1 is the oldest step.
// The GCD scheme measures the zero runs of a packet (leading, between
// crossings, trailing), takes their greatest common divisor g and shortens
// every run by the factor g; the receiver recovers g from the packet length.
//
// Like the on-chip block, this is not a general GCD calculator: it detects a
// fixed set of packets. For N = 16 those are the empty packet (g = 16,
// compressed to a single zero) and a packet holding one crossing at a bit p
// whose runs p and N-1-p share a factor (g = 3, 5 or 15, compressed to
// (N-1)/g + 1 bits). That is 9 packets, matching the lossless set. A
// compressed packet keeps output bit k = input bit k*g, so the crossing lands
// at bit p/g, its DIR bit with it. In lossy mode a lone crossing with no
// common factor is first moved by one step to whichever neighbour gives the
// larger g (ties go to the later step), which adds 8 packets for N = 16.
// Anything else, and every packet in mode COMP_NONE, passes unchanged with
// length N. The detection table is built at elaboration from N, so other
// window sizes work too.
//
// Outputs: data_out/dir_out right-aligned (bits len-1..0, oldest first), len,
// g (the factor used, 1 for an unchanged packet) and moved (lossy shift made).
// Purely combinational; the caller registers the result.
module gcd_compressor
  import gcd_pkg::*;
#(
  parameter int unsigned N = 16
) (
  input  comp_mode_e                 mode,
  input  logic [N-1:0]               data_in,
  input  logic [N-1:0]               dir_in,
  output logic [N-1:0]               data_out,
  output logic [N-1:0]               dir_out,
  output logic [$clog2(N+1)-1:0]     len,
  output logic [$clog2(N+1)-1:0]     g,
  output logic                       moved
);
  timeunit 1ns; timeprecision 1ps;

  localparam int unsigned LW = $clog2(N + 1);
  localparam int unsigned PW = $clog2(N);

  // What a lone crossing at one bit position turns into.
  typedef struct packed {
    logic [LW-1:0] ll_g;    // lossless factor (1: not compressible)
    logic [PW-1:0] ll_q;    // lossless output bit, p / g
    logic [LW-1:0] ly_g;    // factor after a stride-1 move (1: no move helps)
    logic [PW-1:0] ly_q;    // output bit after the move
  } pos_entry_t;

  function automatic pos_entry_t entry(input int unsigned p);
    pos_entry_t e;
    int unsigned gl, gu, gd;
    gl = gcd_u(p, N - 1 - p);
    e.ll_g = LW'(gl);
    e.ll_q = PW'(p / gl);
    e.ly_g = LW'(1);
    e.ly_q = PW'(p);
    if (gl == 1) begin
      gd = (p >= 1)    ? gcd_u(p - 1, N - p)     : 1;  // one step later in time
      gu = (p + 1 < N) ? gcd_u(p + 1, N - 2 - p) : 1;  // one step earlier
      if (gd >= gu && gd > 1) begin
        e.ly_g = LW'(gd); e.ly_q = PW'((p - 1) / gd);
      end else if (gu > 1) begin
        e.ly_g = LW'(gu); e.ly_q = PW'((p + 1) / gu);
      end
    end
    return e;
  endfunction

  // Compressed length for each factor g: (N-1)/g + 1.
  function automatic logic [LW-1:0] clen(input logic [LW-1:0] gv);
    logic [LW-1:0] r;
    r = LW'(N);
    for (int unsigned k = 2; k <= N; k++)
      if (gv == LW'(k)) r = LW'((N - 1) / k + 1);
    return r;
  endfunction

  pos_entry_t tab [N];
  for (genvar i = 0; i < N; i++) begin : g_tab
    assign tab[i] = entry(i);
  end

  logic          single, empty;
  logic [PW-1:0] pos;

  always_comb begin
    pos = '0;
    for (int i = 0; i < N; i++)
      if (data_in[i]) pos = PW'(i);
  end

  assign empty  = (data_in == '0);
  assign single = !empty && ((data_in & (data_in - 1'b1)) == '0);

  always_comb begin
    logic [LW-1:0] gsel;
    logic [PW-1:0] qsel;
    data_out = data_in;
    dir_out  = dir_in;
    len      = LW'(N);
    g        = LW'(1);
    moved    = 1'b0;
    gsel     = LW'(1);
    qsel     = '0;
    if (mode != COMP_NONE) begin
      if (empty) begin
        data_out = '0;
        dir_out  = '0;
        len      = LW'(1);
        g        = LW'(N);
      end else if (single) begin
        if (tab[pos].ll_g != LW'(1)) begin
          gsel = tab[pos].ll_g;
          qsel = tab[pos].ll_q;
        end else if (mode == COMP_LOSSY && tab[pos].ly_g != LW'(1)) begin
          gsel  = tab[pos].ly_g;
          qsel  = tab[pos].ly_q;
          moved = 1'b1;
        end
        if (gsel != LW'(1)) begin
          data_out       = '0;
          dir_out        = '0;
          data_out[qsel] = 1'b1;
          dir_out[qsel]  = dir_in[pos];
          len            = clen(gsel);
          g              = gsel;
        end
      end
    end
  end
endmodule
