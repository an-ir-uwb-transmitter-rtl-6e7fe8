// delay_cell: behavioural model (not synthesizable) of the current-starved
// inverter delay cell.
//
// The real cell is an inverter whose pull-up and pull-down currents are set
// by two current mirrors biased from one control voltage VCTRL, with a PMOS
// header switched off by STANDBY to stop leakage. A higher VCTRL lets more
// current through and gives a shorter delay. The model inverts its input
// after a delay that falls log-linearly from D_LO_NS at V_LO to D_HI_NS at
// V_HI (clamped outside that range), and in standby its output cannot rise.
// The same cell, with the same transistor sizes, is used in the PPM
// modulator, the delay line and the glitch generators; each instance sets the
// four curve points. The PPM modulator's range (0.6 V to 1.1 V, up to about
// 120 ns) and the pulse generator's range (1.1 V to 1.75 V, about 150 ps)
// come from the circuit's simulations; the exact shape of the curve between
// the end points is this model's simplification.
//
// Interface: in (edge), vctrl (volts), standby, out (inverted, delayed).
// Timing: transport delay, so pulses shorter than the delay still pass.
module delay_cell #(
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

  function automatic real delay_ns(input real v);
    real x;
    x = (v - V_LO) / (V_HI - V_LO);
    if (x < 0.0) x = 0.0;
    if (x > 1.0) x = 1.0;
    return D_LO_NS * $pow(D_HI_NS / D_LO_NS, x);
  endfunction

  // Settle to the static value shortly after time zero.
  initial begin
    out = 1'b0;
    #0.001 out = !in && !standby;
  end

  always @(in or standby) begin
    out <= #(delay_ns(vctrl)) (!in && !standby);
  end
endmodule
