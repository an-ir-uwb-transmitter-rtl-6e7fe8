// delay_line: behavioural model (not synthesizable) of the transmitter's
// delay line.
//
// The PPM modulator's output edge runs through NSTAGE stages in series.
// Each stage is a current-starved delay cell with its own bias voltage
// (VCTRL_DC<i>), followed by a minimum-size inverter that restores a sharp
// edge and drives the next stage, so each stage is non-inverting. Tap i
// (the output of stage i) triggers pulse generator i; the last tap also
// leaves the chip through a buffer as DELAYLINEOUT. Eight stages, one bias
// per stage and the restoring inverter follow the circuit; the delay curve
// end points are model values (0.5 ns at 1.1 V down to 0.1 ns at 1.8 V).
//
// Interface: in, vctrl_dc[NSTAGE] (volts), standby, tap[NSTAGE], line_out.
// Timing: tap[i] follows in after the sum of the delays of stages 0..i.
module delay_line #(
  parameter int unsigned NSTAGE  = 8,
  parameter real         V_LO    = 1.1,
  parameter real         V_HI    = 1.8,
  parameter real         D_LO_NS = 0.5,
  parameter real         D_HI_NS = 0.1
) (
  input  logic              in,
  input  real               vctrl_dc [NSTAGE],
  input  logic              standby,
  output logic [NSTAGE-1:0] tap,
  output logic              line_out
);
  timeunit 1ns; timeprecision 1ps;

  logic [NSTAGE:0]   node;
  logic [NSTAGE-1:0] cell_out;

  assign node[0] = in;

  for (genvar i = 0; i < NSTAGE; i++) begin : g_stage
    delay_cell #(
      .V_LO(V_LO), .V_HI(V_HI), .D_LO_NS(D_LO_NS), .D_HI_NS(D_HI_NS)
    ) u_cell (
      .in     (node[i]),
      .vctrl  (vctrl_dc[i]),
      .standby(standby),
      .out    (cell_out[i])
    );
    assign node[i+1] = !cell_out[i];   // restoring inverter
    assign tap[i]    = node[i+1];
  end

  assign line_out = node[NSTAGE];
endmodule
