// control_regfile: the controller's register file, written from off chip.
//
// An external master (a test FPGA on the board) presents a 4-bit address and
// an 8-bit value and raises write_enable for one clock; the addressed register
// takes the value at that clock edge. The registers drive the transmitter's
// digital control points and the controller's own settings:
//   0..7  select_reg[i]   PA enables of pulse generator i (one bit per unit PA)
//   8     control         [0] standby, [2:1] compression mode, [3] transmitter
//                         fed from the external DATA/DIR pins instead of the
//                         controller
//   9     delimiter       [2:0] start/stop DATA bits, [5:3] start/stop DIR bits
// Unused addresses and bits are ignored. After reset every unit PA is on, the
// transmitter is in standby, compression is lossless, the controller feeds
// the transmitter and the delimiter is DATA 3'b111 / DIR 3'b101.
// Which registers exist follows the controller description (PA selection,
// standby, compression mode, test multiplexer, start/stop symbol); the
// addresses, bit fields and reset values are this design's choices.
module control_regfile
  import gcd_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [3:0] address_in,
  input  logic [7:0] data_in,
  input  logic       write_enable,
  output logic [7:0] select_reg [NUM_CH],
  output logic       standby,
  output comp_mode_e comp_mode,
  output logic       tx_src_ext,
  output logic [DELIM_LEN-1:0] delim_data,
  output logic [DELIM_LEN-1:0] delim_dir
);
  timeunit 1ns; timeprecision 1ps;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM_CH; i++) select_reg[i] <= 8'hFF;
      standby    <= 1'b1;
      comp_mode  <= COMP_LOSSLESS;
      tx_src_ext <= 1'b0;
      delim_data <= 3'b111;
      delim_dir  <= 3'b101;
    end else if (write_enable) begin
      if (address_in < ADDR_CTRL) begin
        select_reg[address_in[2:0]] <= data_in;
      end else if (address_in == ADDR_CTRL) begin
        standby    <= data_in[0];
        comp_mode  <= (data_in[2:1] == 2'd3) ? COMP_LOSSLESS : comp_mode_e'(data_in[2:1]);
        tx_src_ext <= data_in[3];
      end else if (address_in == ADDR_DELIM) begin
        delim_data <= data_in[2:0];
        delim_dir  <= data_in[5:3];
      end
    end
  end
endmodule
