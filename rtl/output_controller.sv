// output_controller: burst-mode asynchronous state machine of the wrapper's
// output port, written as its published hazard-free logic equations. When
// the LS module marks the current cycle as carrying data (DOV), it raises
// REQ_B towards the next GALS block together with the internal acknowledge
// ACK_INT, and lowers both after ACK_B has risen and DOV has fallen. When
// the cycle carries no data (DONV) it only answers the internal handshake.
// Z0 is the extra state variable that records "output handshake still
// waiting for ACK_B to fall". One gate delay per equation; the feedback is
// the machine's state and is intended. A power-on reset POR forces
// the idle state (our addition).
`timescale 1ns/1ps
module output_controller (
  input  logic por,     // power-on reset: forces the idle state
  input  logic dov,
  input  logic donv,
  input  logic ack_b,
  output logic req_b,
  output logic ack_int
);
  import gals_pkg::*;
  wire req_b_q, ack_int_q, z0;

  assign #(T_GATE) req_b_q   = !por & ((!ack_b & req_b_q) | (dov & !z0) | (!ack_b & dov));
  assign #(T_GATE) ack_int_q = !por & ((!ack_b & req_b_q) | (dov & !z0) | (!ack_b & dov) | (!ack_b & donv));
  assign #(T_GATE) z0        = !por & ((ack_b & z0) | (ack_b & !dov) | (!dov & !donv & z0));

  assign req_b   = req_b_q;
  assign ack_int = ack_int_q;
endmodule
