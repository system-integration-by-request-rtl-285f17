// input_controller: burst-mode asynchronous state machine of the wrapper's
// input port, written as its hazard-free logic equations. It has three
// modes. Request-driven (states 1 and 2 of the specification): every
// arbitrated input request REQ_A1 raises REQ_INT, which is the LS clock, and
// ACK_A and RST; the internal acknowledge ACKC closes the cycle. Time-out
// (state 3): ST is high, the local oscillator clocks the LS module and the
// controller only waits; STOP (pipeline flushed) ends in idle through state
// 4 with RST pulsed. Transitional (states 5 to 9): a request that arrives in
// time-out mode first pauses the oscillator (REQI1/ACKI1), lets one more
// local cycle finish (seen on ACKC once ACKEN is set), then acknowledges the
// token and pulses RST so that ST falls and the request line takes over the
// clock again. Z0 is the extra state variable that keeps the machine
// hazard-free.
//
// The equations are the published ones with two readings of our own: the
// third product of REQ_INT uses ACKEN inverted (as the matching products of
// ACK_A and RST do), and the pause request REQI1 = REQ_A1.ACKC'.ST.ACKEN'.
// Every equation has one gate delay. The feedback loops are the state of an
// asynchronous machine and are intended. A power-on reset POR forces
// every state variable low (idle state 0); the published circuit shows none.
`timescale 1ns/1ps
module input_controller (
  input  logic por,     // power-on reset: forces the idle state
  input  logic req_a1,
  input  logic ackc,
  input  logic st,
  input  logic stop,
  input  logic acki1,
  output logic req_int,
  output logic ack_a,
  output logic rst,
  output logic reqi1,
  output logic acken
);
  import gals_pkg::*;
  wire req_int_q, ack_a_q, rst_q, reqi1_q, acken_q, z0;

  assign #(T_GATE) req_int_q = !por & ((req_a1 & req_int_q) | (!ackc & req_int_q)
                                     | (req_a1 & !ackc & !acken_q & !st));
  assign #(T_GATE) ack_a_q   = !por & ((!ackc & req_int_q) | (req_a1 & rst_q)
                                     | (!ackc & st & !acki1 & acken_q & !z0)
                                     | (req_a1 & !ackc & !st & !acken_q));
  assign #(T_GATE) acken_q   = !por & (acki1 | (req_a1 & acken_q) | (st & acken_q));
  assign #(T_GATE) rst_q     = !por & (stop | (!ackc & req_int_q) | (req_a1 & rst_q) | (st & rst_q)
                                     | (!ackc & st & !acki1 & acken_q & !z0)
                                     | (req_a1 & !ackc & !st & !acken_q));
  assign #(T_GATE) reqi1_q   = !por & req_a1 & !ackc & st & !acken_q;
  assign #(T_GATE) z0        = !por & (acki1 | (!req_a1 & ackc) | (!req_a1 & !st & z0)
                                     | (!ackc & acken_q & z0) | (ackc & !acken_q & z0));

  assign req_int = req_int_q;
  assign ack_a   = ack_a_q;
  assign rst     = rst_q;
  assign reqi1   = reqi1_q;
  assign acken   = acken_q;
endmodule
