// gals_pkg: delays shared by the self-timed parts of the request-driven GALS
// wrapper. The asynchronous controllers are written as their logic
// equations with feedback; every such equation carries one gate delay so
// that the feedback settles in event-driven simulation and hazards that
// depend on ordering stay visible. Synthesis ignores the delays. The values
// are this design's own choice (the original circuit was characterised in a
// 0.25 um process, about 120 Msps in request-driven mode).
`timescale 1ns/1ps
package gals_pkg;
  localparam realtime T_GATE  = 0.10; // one gate of an AFSM equation
  localparam realtime T_MUTEX = 0.15; // mutual-exclusion element grant
  localparam realtime T_FF    = 0.10; // flip-flop clock-to-output
  localparam realtime T_LATCH = 0.10; // data latch
  localparam realtime T_DLE   = 0.35; // data-latch enable delay after ACK_A, beyond the clock tree
  localparam realtime T_PULSE = 0.15; // data-latch enable pulse width
  localparam realtime T_TREE  = 0.20; // clock tree of the LS module
endpackage
