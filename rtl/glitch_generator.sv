// glitch_generator: behavioural model (not synthesizable) of the pulse
// generator that makes one sub-pulse.
//
// The input edge is split in two: one copy goes straight to an AND gate, the
// other through a current-starved delay cell that turns the rising edge into
// a falling edge VCTRL_GG-controlled time later. The AND of the two is high
// only between the edge and the delayed opposite edge: a short pulse whose
// width is the cell delay (about 150 ps, a half period of the 4 GHz centre
// frequency; a higher VCTRL_GG gives a narrower pulse). STANDBY switches off
// the delay cell's supply, which holds its output low, so no pulse is made.
// Rising-edge triggering, the delay cell plus AND structure and the standby
// behaviour follow the circuit; the delay curve end points (0.2 ns at 1.1 V
// down to 0.1 ns at 1.8 V) are model values.
//
// Interface: in (edge), vctrl (volts), standby, out (pulse).
// Timing: out rises with in and falls delay(vctrl) later.
module glitch_generator #(
  parameter real V_LO    = 1.1,
  parameter real V_HI    = 1.8,
  parameter real D_LO_NS = 0.2,
  parameter real D_HI_NS = 0.1
) (
  input  logic in,
  input  real  vctrl,
  input  logic standby,
  output logic out
);
  timeunit 1ns; timeprecision 1ps;

  logic delayed_n;

  delay_cell #(
    .V_LO(V_LO), .V_HI(V_HI), .D_LO_NS(D_LO_NS), .D_HI_NS(D_HI_NS)
  ) u_dly (
    .in     (in),
    .vctrl  (vctrl),
    .standby(standby),
    .out    (delayed_n)
  );

  assign out = in && delayed_n;
endmodule
