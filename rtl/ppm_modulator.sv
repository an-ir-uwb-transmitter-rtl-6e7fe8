// ppm_modulator: behavioural model (not synthesizable) of the 2-PPM
// modulator.
//
// A rising edge on DATA asks for one UWB pulse. The modulator passes the
// edge to its output either straight through (DIR = 0, the "-1" input of its
// multiplexer) or through a current-starved delay cell (DIR = 1, the "+1"
// input), so the symbol is carried only by the time of the edge, never by
// the pulse shape. The delayed path's delay is set by the bias voltage
// vctrl (VCTRL_PPM); the straight path has only gate delay, modelled as zero.
// STANDBY switches off the delay cell's supply, so the delayed path cannot
// produce an edge in standby.
// The two-path structure, the input/output inverters and the DIR-driven
// multiplexer follow the circuit; the delay curve end points of the delay
// cell (120 ns at 0.6 V down to 2 ns at 1.1 V) are model values within the
// circuit's reported range.
//
// Interface: data, dir, vctrl (volts), standby; out follows data.
// Timing: out rises at the data edge (dir = 0) or delay(vctrl) later (dir = 1).
module ppm_modulator #(
  parameter real V_LO    = 0.6,
  parameter real V_HI    = 1.1,
  parameter real D_LO_NS = 120.0,
  parameter real D_HI_NS = 2.0
) (
  input  logic data,
  input  logic dir,
  input  real  vctrl,
  input  logic standby,
  output logic out
);
  timeunit 1ns; timeprecision 1ps;

  logic data_n;      // first inverter
  logic data_buf;    // second inverter, feeds the delay cell
  logic path_slow;   // "+1" input: inverted and delayed
  logic path_fast;   // "-1" input: inverted only
  logic mux_out;

  assign data_n   = !data;
  assign data_buf = !data_n;
  assign path_fast = data_n;

  delay_cell #(
    .V_LO(V_LO), .V_HI(V_HI), .D_LO_NS(D_LO_NS), .D_HI_NS(D_HI_NS)
  ) u_dly (
    .in     (data_buf),
    .vctrl  (vctrl),
    .standby(standby),
    .out    (path_slow)
  );

  // In standby the unpowered delay cell reads as a held-low node after the
  // output inverter, i.e. the slow path gives no edge.
  assign mux_out = dir ? (path_slow || standby) : path_fast;
  assign out     = !mux_out;
endmodule
