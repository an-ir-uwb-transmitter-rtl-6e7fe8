// digital_controller: acquisition, compression and serialization for the
// NUM_CH LC-ADC channels, plus the register file that configures the chip.
//
// The system clock is the PRF clock (clk_prf, 7 MHz nominal). The LC-ADC
// DATA/DIR bits arrive from off chip, one bit per channel, and are sampled
// once per rising edge of the slow TGRAN clock (clk_tgran, 1/190 us), which
// edge_sync brings into the clk_prf domain. Each channel has a gcd_encoder
// (shift registers, window FSM, combinational GCD compressor, output
// registers). All channels share reset and the TGRAN tick, so their windows
// end together; the packet_serializer then copies all packets and emits
// them as a delimited symbol stream on tx_data/tx_dir while the next window
// is recorded. control_regfile holds the PA enables, standby, compression
// mode, test-multiplexer select and the start/stop symbol.
//
// Timing: a window of WINDOW TGRAN steps; the packets are ready 2 to 4 PRF
// cycles after the synchronised edge of the window's last step, and the
// serializer sends each symbol in two PRF cycles. A window of 16 steps lasts
// 16 * 1330 PRF cycles at the nominal clocks, far longer than the worst
// frame of 2 * (8*16 + 9*3) = 310 cycles. overrun reports a window that ended
// before its predecessor had been taken.
// The block split follows the controller description; the clocking scheme
// (one clock domain, TGRAN sampled through a synchroniser) is this design's
// choice.
module digital_controller
  import gcd_pkg::*;
(
  input  logic       clk_prf,
  input  logic       clk_tgran,
  input  logic       rst_n,
  input  logic [NUM_CH-1:0] lcadc_data_in,
  input  logic [NUM_CH-1:0] lcadc_dir_in,
  input  logic [3:0] address_in,
  input  logic [7:0] data_in,
  input  logic       write_enable,
  output logic       tx_data,
  output logic       tx_dir,
  output logic [7:0] select_reg [NUM_CH],
  output logic       standby,
  output logic       tx_src_ext,
  output logic       busy,
  output logic       frame_done,
  output logic       overrun
);
  timeunit 1ns; timeprecision 1ps;

  localparam int unsigned LW = LEN_W;

  logic       tick;
  comp_mode_e comp_mode;
  logic [DELIM_LEN-1:0] delim_data, delim_dir;

  logic [WINDOW-1:0] pk_data [NUM_CH];
  logic [WINDOW-1:0] pk_dir  [NUM_CH];
  logic [LW-1:0]     pk_len  [NUM_CH];
  logic [NUM_CH-1:0] pk_valid, pk_overrun;
  logic              rd_ack;

  edge_sync u_tgran_sync (
    .clk     (clk_prf),
    .rst_n   (rst_n),
    .async_in(clk_tgran),
    .tick    (tick)
  );

  control_regfile u_regs (
    .clk         (clk_prf),
    .rst_n       (rst_n),
    .address_in  (address_in),
    .data_in     (data_in),
    .write_enable(write_enable),
    .select_reg  (select_reg),
    .standby     (standby),
    .comp_mode   (comp_mode),
    .tx_src_ext  (tx_src_ext),
    .delim_data  (delim_data),
    .delim_dir   (delim_dir)
  );

  for (genvar c = 0; c < NUM_CH; c++) begin : g_ch
    gcd_encoder #(.N(WINDOW)) u_enc (
      .clk     (clk_prf),
      .rst_n   (rst_n),
      .tick    (tick),
      .mode    (comp_mode),
      .data_in (lcadc_data_in[c]),
      .dir_in  (lcadc_dir_in[c]),
      .rd_ack  (rd_ack),
      .data_out(pk_data[c]),
      .dir_out (pk_dir[c]),
      .len     (pk_len[c]),
      .valid   (pk_valid[c]),
      .overrun (pk_overrun[c])
    );
  end

  packet_serializer #(.N(WINDOW), .NCH(NUM_CH), .DL(DELIM_LEN)) u_ser (
    .clk       (clk_prf),
    .rst_n     (rst_n),
    .start     (&pk_valid),
    .pk_data   (pk_data),
    .pk_dir    (pk_dir),
    .pk_len    (pk_len),
    .delim_data(delim_data),
    .delim_dir (delim_dir),
    .rd_ack    (rd_ack),
    .tx_data   (tx_data),
    .tx_dir    (tx_dir),
    .busy      (busy),
    .frame_done(frame_done)
  );

  assign overrun = |pk_overrun;
endmodule
