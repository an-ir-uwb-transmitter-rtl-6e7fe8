// gcd_pkg: types and constants shared by the compression data path and the
// digital controller.
//
// WINDOW is the recording window (packet width) in TGRAN steps; 16 is the
// value the design is built around. LEN_W is the width of a packet length
// (1..WINDOW), NUM_CH the number of LC-ADC channels on the controller (8).
// The compression mode encoding and the register map of the control register
// file are this design's own choices.
package gcd_pkg;
  timeunit 1ns; timeprecision 1ps;

  localparam int unsigned WINDOW = 16;
  localparam int unsigned LEN_W  = $clog2(WINDOW + 1);
  localparam int unsigned NUM_CH = 8;

  // Compression mode, selected by the control register.
  typedef enum logic [1:0] {
    COMP_NONE     = 2'd0,   // send every packet as recorded
    COMP_LOSSLESS = 2'd1,   // exact GCD reduction only
    COMP_LOSSY    = 2'd2    // also move a lone crossing by one TGRAN (stride 1)
  } comp_mode_e;

  // Control register addresses (address_in[3:0]).
  localparam logic [3:0] ADDR_PA0   = 4'd0;  // 0..7: PA enables of pulse generator 0..7
  localparam logic [3:0] ADDR_CTRL  = 4'd8;  // [0] standby, [2:1] mode, [3] external TX source
  localparam logic [3:0] ADDR_DELIM = 4'd9;  // [2:0] start/stop DATA, [5:3] start/stop DIR

  localparam int unsigned DELIM_LEN = 3;

  // Greatest common divisor of two non-negative integers, gcd(0, x) = x.
  function automatic int unsigned gcd_u(input int unsigned a, input int unsigned b);
    int unsigned x, y, t;
    x = a; y = b;
    while (y != 0) begin
      t = x % y; x = y; y = t;
    end
    return x;
  endfunction
endpackage
