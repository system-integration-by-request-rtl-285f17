// async_wrapper: request-driven asynchronous wrapper (AW) around one locally
// synchronous (LS) module. The LS module is clocked by INT_CLK, which is
//   INT_CLK = REQ_INT OR LCLKM   (then the LS clock tree),
//   LCLKM   = LCLK AND ST.
// Request-driven mode: each four-phase input token (REQ_A/ACK_A, broad
// protocol on DATA_IN) produces one REQ_INT pulse, so the LS module runs at
// the sender's token rate without synchronisation. Local clock generation:
// when no handshake has occurred for TIMEOUT_N local-oscillator cycles, ST
// rises and the pausable ring oscillator clocks the LS module to flush its
// pipeline; after FLUSH_K such cycles the clock control stops the oscillator
// and the block is idle until the next request. Transitional mode: a request
// arriving while the oscillator runs pauses it, lets the current local cycle
// finish and hands the clock back to the request line. Output: DATAV_OUT
// from the LS module (valid for the data registered at the coming edge)
// drives a four-phase output handshake REQ_B/ACK_B on the LS module's
// DATA_OUT; while it is open the local clock is stretched.
// A power-on reset POR (not part of the published circuit) puts every
// controller and flip-flop into the idle state with the oscillator stopped.
// The input data reach the LS module through a latch (DATA_L), one token
// behind the handshake: a token is captured by the INT_CLK edge following
// its own handshake, with DATAV_IN high.
// Structure, mode sequence and controller equations follow the published
// wrapper; delays, default counts and the oscillator period are this
// design's choices. The wrapper contains self-timed logic (handshake-clocked
// flip-flops, state-holding gates) and a behavioural oscillator.
`timescale 1ns/1ps
module async_wrapper #(
  parameter int unsigned DATA_W       = 16,
  parameter int unsigned TIMEOUT_N    = 8,
  parameter int unsigned FLUSH_K      = 8,
  parameter realtime     RING_HALF_NS = 6.0
) (
  input  logic              por,      // power-on reset, active high
  // input channel from the predecessor GALS block
  input  logic              req_a,
  output logic              ack_a,
  input  logic [DATA_W-1:0] data_in,
  // output channel to the successor (DATA_OUT comes from the LS module)
  output logic              req_b,
  input  logic              ack_b,
  // LS module side
  output logic              int_clk,
  output logic [DATA_W-1:0] data_l,
  output logic              datav_in,
  input  logic              datav_out,
  // observation of the wrapper's mode (ST: time-out/local clock active;
  // lclk_run: oscillator not stopped)
  output logic              st,
  output logic              lclk_run
);
  import gals_pkg::*;
  logic req_a1, stop, stoph, stopi, rst, req_int, reqi1, acki1, acki2;
  logic dle, lclk, lclkm, int_clk_root, ack_int, stretch;

  timeout_gen #(.TIMEOUT_N(TIMEOUT_N)) u_timeout (
    .por, .lclk, .rst, .req_a, .stoph, .req_a1, .st, .stop
  );

  input_port u_in (
    .por, .req_a1, .stop, .st, .acki1, .ack_int, .lclkm, .int_clk,
    .req_int, .ack_a, .rst, .reqi1, .dle, .datav_in
  );

  data_latch #(.DATA_W(DATA_W)) u_latch (.dle, .d(data_in), .q(data_l));

  pausable_clock #(.HALF_NS(RING_HALF_NS)) u_clk (
    .reqi1, .acki1, .reqi2(stretch), .acki2, .stopi, .lclk
  );

  clock_control #(.FLUSH_K(FLUSH_K)) u_cc (
    .por, .st, .ack_int, .rst, .stop, .req_int, .stoph, .stopi
  );

  assign #(T_GATE) lclkm        = lclk & st;
  assign #(T_GATE) int_clk_root = req_int | lclkm;
  assign #(T_TREE) int_clk      = int_clk_root;

  output_port u_out (
    .por, .lclkm, .req_int, .int_clk, .datav_out, .ack_b, .req_b, .ack_int, .stretch
  );

  assign lclk_run = !stopi;

  // Input channel rules, checked in simulation once POR has been applied:
  // REQ_A falls only after ACK_A has risen (four-phase), and DATA_IN does
  // not change while the input latch is open.
  logic armed = 1'b0;
  always @(negedge por) armed = 1'b1;
  always @(negedge req_a)
    if (armed) assert (ack_a) else $error("REQ_A fell before ACK_A rose");
  always @(data_in)
    if (armed) assert (!dle) else $error("DATA_IN changed while the input latch was open");
endmodule
