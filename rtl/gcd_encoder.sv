// gcd_encoder: one LC-ADC channel of the compression data path.
//
// The channel's DATA and DIR bits are shifted into two N-bit shift registers
// once per TGRAN step (tick). A small window FSM counts the steps; when the
// N-th bit of a window has been shifted in, the next clock loads the output
// registers from the combinational gcd_compressor and raises valid. The
// registers (data_out, dir_out, len) then hold the packet until the
// serializer pulses rd_ack, while the shift registers already fill with the
// next window. A new window overwrites an unread packet and sets overrun for
// one cycle.
//
// Shift registers, compressor, output registers and FSM follow the
// structure of the on-chip block; the one-cycle load delay, the rd_ack
// handshake and overrun are this design's choices. Bit N-1 of a packet is
// the oldest TGRAN step.
//
// Timing: a tick in cycle t shifts at the end of t; for the N-th tick of a
// window the packet is in the output registers, valid high, after the clock
// edge ending cycle t+1.
module gcd_encoder
  import gcd_pkg::*;
#(
  parameter int unsigned N = 16
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   tick,       // one TGRAN step
  input  comp_mode_e             mode,
  input  logic                   data_in,    // LC-ADC DATA (crossing happened)
  input  logic                   dir_in,     // LC-ADC DIR (1 = upward)
  input  logic                   rd_ack,     // serializer has read the packet
  output logic [N-1:0]           data_out,
  output logic [N-1:0]           dir_out,
  output logic [$clog2(N+1)-1:0] len,
  output logic                   valid,
  output logic                   overrun
);
  timeunit 1ns; timeprecision 1ps;

  localparam int unsigned LW = $clog2(N + 1);

  logic [N-1:0]         sr_data, sr_dir;
  logic [$clog2(N)-1:0] step;
  logic                 load;

  logic [N-1:0]  c_data, c_dir;
  logic [LW-1:0] c_len, c_g;
  logic          c_moved;

  gcd_compressor #(.N(N)) u_comp (
    .mode    (mode),
    .data_in (sr_data),
    .dir_in  (sr_dir),
    .data_out(c_data),
    .dir_out (c_dir),
    .len     (c_len),
    .g       (c_g),
    .moved   (c_moved)
  );

  // Shift registers and window FSM.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr_data <= '0;
      sr_dir  <= '0;
      step    <= '0;
      load    <= 1'b0;
    end else begin
      load <= 1'b0;
      if (tick) begin
        sr_data <= {sr_data[N-2:0], data_in};
        sr_dir  <= {sr_dir[N-2:0], dir_in};
        if (step == ($clog2(N))'(N - 1)) begin
          step <= '0;
          load <= 1'b1;
        end else begin
          step <= step + 1'b1;
        end
      end
    end
  end

  // Output holding registers.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      data_out <= '0;
      dir_out  <= '0;
      len      <= '0;
      valid    <= 1'b0;
      overrun  <= 1'b0;
    end else begin
      overrun <= load && valid && !rd_ack;
      if (load) begin
        data_out <= c_data;
        dir_out  <= c_dir;
        len      <= c_len;
        valid    <= 1'b1;
      end else if (rd_ack) begin
        valid <= 1'b0;
      end
    end
  end

  // The factor and the lossy flag are observed in the compressor's own test.
  logic unused;
  assign unused = ^{c_g, c_moved};
endmodule
