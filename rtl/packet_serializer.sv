// packet_serializer: turns one window of compressed channel packets into the
// symbol stream that drives the transmitter.
//
// When every channel reports a valid packet (start), the serializer copies
// all NCH packets into its own registers and pulses rd_ack, so the channel
// encoders are free for the next window at once. It then sends, one symbol
// at a time, a start/stop symbol, packet 0, a start/stop symbol, packet 1,
// ..., packet NCH-1 and a closing start/stop symbol, so every packet is
// bracketed by the programmable DL-bit delimiter (delim_data on DATA,
// delim_dir on DIR, most significant bit first). Each packet sends its len
// bits from bit len-1 (oldest TGRAN step) down to bit 0.
//
// A symbol takes two clock cycles: in the first, tx_data carries the DATA bit
// and in the second it returns to 0, so that consecutive 1s still give the
// PPM modulator a rising edge each; tx_dir is held for both cycles. A frame
// of NCH packets with lengths L_i therefore lasts 2*(sum L_i + (NCH+1)*DL)
// cycles. Bracketing every packet, the two-cycle return-to-zero symbol and
// channel 0 first are this design's choices; the delimiter values are set by
// the control registers. busy is high from capture to the last symbol;
// frame_done pulses after the last symbol.
module packet_serializer #(
  parameter int unsigned N   = 16,
  parameter int unsigned NCH = 8,
  parameter int unsigned DL  = 3
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  logic [N-1:0]           pk_data [NCH],
  input  logic [N-1:0]           pk_dir  [NCH],
  input  logic [$clog2(N+1)-1:0] pk_len  [NCH],
  input  logic [DL-1:0]          delim_data,
  input  logic [DL-1:0]          delim_dir,
  output logic                   rd_ack,
  output logic                   tx_data,
  output logic                   tx_dir,
  output logic                   busy,
  output logic                   frame_done
);
  timeunit 1ns; timeprecision 1ps;

  localparam int unsigned LW = $clog2(N + 1);
  localparam int unsigned CW = $clog2(NCH + 1);
  localparam int unsigned IW = (LW > $clog2(DL + 1)) ? LW : $clog2(DL + 1);

  typedef enum logic [1:0] {S_IDLE, S_DELIM, S_PACKET} state_e;

  state_e        state;
  logic [N-1:0]  buf_data [NCH];
  logic [N-1:0]  buf_dir  [NCH];
  logic [LW-1:0] buf_len  [NCH];
  logic [CW-1:0] ch;
  logic [IW-1:0] idx;
  logic          phase;      // 0: symbol cycle, 1: return-to-zero cycle
  logic          sym_data, sym_dir;

  always_comb begin
    sym_data = 1'b0;
    sym_dir  = 1'b0;
    if (state == S_DELIM) begin
      sym_data = delim_data[idx[$clog2(DL)-1:0]];
      sym_dir  = delim_dir[idx[$clog2(DL)-1:0]];
    end else if (state == S_PACKET) begin
      sym_data = buf_data[ch[$clog2(NCH)-1:0]][idx[$clog2(N)-1:0]];
      sym_dir  = buf_dir[ch[$clog2(NCH)-1:0]][idx[$clog2(N)-1:0]];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      ch         <= '0;
      idx        <= '0;
      phase      <= 1'b0;
      rd_ack     <= 1'b0;
      tx_data    <= 1'b0;
      tx_dir     <= 1'b0;
      frame_done <= 1'b0;
      for (int i = 0; i < NCH; i++) begin
        buf_data[i] <= '0;
        buf_dir[i]  <= '0;
        buf_len[i]  <= '0;
      end
    end else begin
      rd_ack     <= 1'b0;
      frame_done <= 1'b0;
      case (state)
        S_IDLE: begin
          tx_data <= 1'b0;
          tx_dir  <= 1'b0;
          if (start) begin
            buf_data <= pk_data;
            buf_dir  <= pk_dir;
            buf_len  <= pk_len;
            rd_ack   <= 1'b1;
            ch       <= '0;
            idx      <= IW'(DL - 1);
            phase    <= 1'b0;
            state    <= S_DELIM;
          end
        end
        default: begin
          if (!phase) begin
            tx_data <= sym_data;
            tx_dir  <= sym_dir;
            phase   <= 1'b1;
          end else begin
            tx_data <= 1'b0;
            phase   <= 1'b0;
            if (idx != '0) begin
              idx <= idx - 1'b1;
            end else if (state == S_DELIM) begin
              if (ch == CW'(NCH)) begin
                state      <= S_IDLE;
                frame_done <= 1'b1;
              end else begin
                state <= S_PACKET;
                idx   <= IW'(buf_len[ch[$clog2(NCH)-1:0]] - 1'b1);
              end
            end else begin
              state <= S_DELIM;
              ch    <= ch + 1'b1;
              idx   <= IW'(DL - 1);
            end
          end
        end
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  // A packet length is never zero and never longer than the window.
  a_len_range: assert property (@(posedge clk) disable iff (!rst_n)
    start && state == S_IDLE |-> pk_len[0] != '0 && pk_len[0] <= LW'(N));
endmodule
