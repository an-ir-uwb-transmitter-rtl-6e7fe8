// unit_pa: behavioural model (not synthesizable) of one unit power
// amplifier.
//
// A unit PA is a tri-state output stage: when selected (sel = 1) it drives
// the shared antenna node to VDD while its input is high and to VSS while it
// is low; when not selected both output transistors are off (high-Z), so an
// unused unit draws no current. The two-state model reports the state of its
// two output transistors instead of a tri-state net: pull_up (PMOS on) and
// pull_down (NMOS on); both low means high-Z. Never both high: the input
// gating avoids shoot-through. Gate-level detail and device sizes are not
// modelled.
//
// Interface: sel, in; pull_up, pull_down. Timing: zero delay.
module unit_pa (
  input  logic sel,
  input  logic in,
  output logic pull_up,
  output logic pull_down
);
  timeunit 1ns; timeprecision 1ps;

  logic en;
  assign en        = sel && in;     // high only when selected and the input is high
  assign pull_up   = en;
  assign pull_down = sel && !in;

  always_comb a_no_shoot_through: assert (!(pull_up && pull_down));
endmodule
