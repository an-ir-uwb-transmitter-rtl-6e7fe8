// uwb_transmitter: behavioural model (not synthesizable) of the
// edge-combination IR-UWB transmitter.
//
// One UWB pulse is built from NSUB sub-pulses instead of a gated oscillator.
// The PPM modulator turns a rising DATA edge into an edge that is early
// (DIR = 0) or late by the VCTRL_PPM delay (DIR = 1). That edge runs down a
// delay line of NSUB stages with individual biases VCTRL_DC<i>; each tap
// fires its own glitch generator (pulse width from VCTRL_GG<i>) and bank of
// NUNIT unit PAs (enabled by PA_ENABLE<i>). All PA outputs are tied to one
// node, so the sub-pulses add up in time into one pulse of about
// NSUB * stage delay (8 x 0.25 ns = 2 ns for a 4 GHz, 500 MHz pulse). That
// node then goes to an off-chip series capacitor and the antenna, which are
// outside this model: drive reports the node as the number of unit PAs
// pulling up minus those pulling down. The last delay-line tap is brought
// out as delay_line_out. STANDBY stops the modulator's delayed path and all
// glitch generators, so no pulse is produced.
// The block structure follows the transmitter architecture; delay curves are
// the model values of the sub-blocks.
//
// Interface: data, dir, standby, vctrl_ppm, vctrl_dc[NSUB], vctrl_gg[NSUB]
// (volts), pa_enable[NSUB] (NUNIT bits each); drive, delay_line_out,
// sub_pulse[NSUB] (glitch generator outputs, for observation).
module uwb_transmitter #(
  parameter int unsigned NSUB  = 8,
  parameter int unsigned NUNIT = 8
) (
  input  logic             data,
  input  logic             dir,
  input  logic             standby,
  input  real              vctrl_ppm,
  input  real              vctrl_dc [NSUB],
  input  real              vctrl_gg [NSUB],
  input  logic [NUNIT-1:0] pa_enable [NSUB],
  output int               drive,
  output logic             delay_line_out,
  output logic [NSUB-1:0]  sub_pulse
);
  timeunit 1ns; timeprecision 1ps;

  localparam int unsigned CW = $clog2(NUNIT + 1);

  logic            ppm_out;
  logic [NSUB-1:0] tap;
  logic [CW-1:0]   n_up   [NSUB];
  logic [CW-1:0]   n_down [NSUB];

  ppm_modulator u_ppm (
    .data   (data),
    .dir    (dir),
    .vctrl  (vctrl_ppm),
    .standby(standby),
    .out    (ppm_out)
  );

  delay_line #(.NSTAGE(NSUB)) u_dl (
    .in      (ppm_out),
    .vctrl_dc(vctrl_dc),
    .standby (standby),
    .tap     (tap),
    .line_out(delay_line_out)
  );

  for (genvar i = 0; i < NSUB; i++) begin : g_sub
    pulse_gen_pa #(.NUNIT(NUNIT)) u_pg (
      .in       (tap[i]),
      .vctrl_gg (vctrl_gg[i]),
      .standby  (standby),
      .pa_enable(pa_enable[i]),
      .pulse    (sub_pulse[i]),
      .n_up     (n_up[i]),
      .n_down   (n_down[i])
    );
  end

  always_comb begin
    drive = 0;
    for (int i = 0; i < NSUB; i++)
      drive = drive + int'(n_up[i]) - int'(n_down[i]);
  end
endmodule
