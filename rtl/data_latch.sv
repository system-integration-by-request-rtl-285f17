// data_latch: the wrapper's input data latch. It is transparent while DLE is
// high and holds DATA_L while DLE is low, so the registers of the locally
// synchronous module never see the input bus change while it is being
// clocked by the local oscillator. The wrapper opens it while ACK_A is high
// (the broad four-phase protocol keeps DATA_IN valid until ACK_A falls);
// the next INT_CLK edge then captures the held token.
`timescale 1ns/1ps
module data_latch #(
  parameter int unsigned DATA_W = 16
) (
  input  logic              dle,
  input  logic [DATA_W-1:0] d,
  output logic [DATA_W-1:0] q
);
  import gals_pkg::*;
  logic [DATA_W-1:0] q_l;
  always_latch begin
    if (dle) q_l <= d;
  end
  assign #(T_LATCH) q = q_l;
endmodule
