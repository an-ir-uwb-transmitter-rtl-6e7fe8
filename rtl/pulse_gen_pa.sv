// pulse_gen_pa: behavioural model (not synthesizable) of one sub-pulse path
// of the transmitter: glitch generator, buffer chain and NUNIT unit PAs.
//
// A rising edge from the delay line makes the glitch generator emit a short
// pulse; a chain of growing buffers (modelled as a fixed delay T_BUF_NS)
// drives the inputs of NUNIT unit PAs in parallel. pa_enable selects which
// units take part, so the number of enabled units sets the drive strength,
// and with it the amplitude, of this sub-pulse. The outputs count the unit
// PAs currently pulling the shared antenna node up (n_up) and down
// (n_down); between pulses the enabled units hold the node low. The
// structure and the 8-bit PA enable follow the circuit; the buffer delay is
// a model value.
//
// Interface: in, vctrl_gg (volts), standby, pa_enable[NUNIT]; pulse (glitch
// output), n_up, n_down. Timing: the pulse appears T_BUF_NS after in rises.
module pulse_gen_pa #(
  parameter int unsigned NUNIT    = 8,
  parameter real         T_BUF_NS = 0.05
) (
  input  logic                       in,
  input  real                        vctrl_gg,
  input  logic                       standby,
  input  logic [NUNIT-1:0]           pa_enable,
  output logic                       pulse,
  output logic [$clog2(NUNIT+1)-1:0] n_up,
  output logic [$clog2(NUNIT+1)-1:0] n_down
);
  timeunit 1ns; timeprecision 1ps;

  logic             buffered;
  logic [NUNIT-1:0] up, down;

  glitch_generator u_gg (
    .in     (in),
    .vctrl  (vctrl_gg),
    .standby(standby),
    .out    (pulse)
  );

  // Buffer chain: transport delay.
  initial buffered = 1'b0;
  always @(pulse) buffered <= #(T_BUF_NS) pulse;

  for (genvar u = 0; u < NUNIT; u++) begin : g_unit
    unit_pa u_pa (
      .sel      (pa_enable[u]),
      .in       (buffered),
      .pull_up  (up[u]),
      .pull_down(down[u])
    );
  end

  always_comb begin
    n_up   = '0;
    n_down = '0;
    for (int u = 0; u < NUNIT; u++) begin
      n_up   = n_up + ($clog2(NUNIT+1))'(up[u]);
      n_down = n_down + ($clog2(NUNIT+1))'(down[u]);
    end
  end
endmodule
