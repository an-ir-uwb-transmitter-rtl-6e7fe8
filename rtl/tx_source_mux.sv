// tx_source_mux: test multiplexer in front of the transmitter.
//
// Chooses what drives the transmitter's DATA and DIR inputs: the symbol
// stream of the digital controller (sel_ext = 0) or the chip's external
// DATA/DIR pins (sel_ext = 1), so that the transmitter can be triggered and
// characterised directly. While the controller is selected the external pins
// are ignored and vice versa. Purely combinational. The multiplexer itself is
// part of the chip; its select coming from a control register bit is this
// design's choice.
module tx_source_mux (
  input  logic sel_ext,
  input  logic ctrl_data,
  input  logic ctrl_dir,
  input  logic ext_data,
  input  logic ext_dir,
  output logic tx_data,
  output logic tx_dir
);
  timeunit 1ns; timeprecision 1ps;

  always_comb begin
    if (sel_ext) begin
      tx_data = ext_data;
      tx_dir  = ext_dir;
    end else begin
      tx_data = ctrl_data;
      tx_dir  = ctrl_dir;
    end
  end
endmodule
