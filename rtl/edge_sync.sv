// edge_sync: brings a slow clock or strobe (the TGRAN clock) into the
// system clock domain and marks each of its rising edges.
//
// Two flip-flops synchronise the input; a third remembers the previous
// synchronised value, and tick is high for one system clock cycle after each
// rising edge, two to three cycles after the edge at the pin. The input must
// stay high and low for at least two system clock cycles each.
module edge_sync (
  input  logic clk,
  input  logic rst_n,
  input  logic async_in,
  output logic tick
);
  timeunit 1ns; timeprecision 1ps;

  logic [2:0] sync_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sync_q <= '0;
    else        sync_q <= {sync_q[1:0], async_in};
  end

  assign tick = sync_q[1] && !sync_q[2];
endmodule
