// clock_control: decides when the local clock may stop. Counter_k counts the
// local clock cycles the wrapper has completed in time-out mode: it advances
// on each falling edge of (ST AND ACK_INT), i.e. once per internal handshake
// while the local oscillator clocks the LS module, and is reset
// asynchronously by RST (pulsed by every input handshake and on stop).
// When it reaches FLUSH_K, the number of cycles the LS pipeline needs to
// empty, STOPH rises and is arbitrated against REQ_A in the time-out
// generator. The arbitrated STOP sets the STOPI flip-flop (D tied high),
// which halts the ring oscillator; the next REQ_INT clears it
// asynchronously. FLUSH_K is fixed per instance (e.g. 72 for the Tx3 block).
// Counter_k's clock is a gated handshake signal: this is self-timed logic.
`timescale 1ns/1ps
module clock_control #(
  parameter int unsigned FLUSH_K = 8
) (
  input  logic por,
  input  logic st,
  input  logic ack_int,
  input  logic rst,
  input  logic stop,
  input  logic req_int,
  output logic stoph,
  output logic stopi
);
  import gals_pkg::*;
  localparam int unsigned CW = $clog2(FLUSH_K + 1);
  logic          cclk;
  logic [CW-1:0] cnt = '0;
  logic          stopi_q = 1'b1;   // power-up: oscillator stopped

  assign #(T_GATE) cclk = st & ack_int;

  always_ff @(negedge cclk or posedge rst or posedge por) begin
    if (rst || por)                   cnt <= '0;
    else if (cnt != CW'(FLUSH_K)) cnt <= cnt + 1'b1;
  end
  assign #(T_FF) stoph = (cnt == CW'(FLUSH_K));

  always_ff @(posedge stop or posedge req_int or posedge por) begin
    if (por)          stopi_q <= 1'b1;
    else if (req_int) stopi_q <= 1'b0;
    else         stopi_q <= 1'b1;
  end
  assign #(T_FF) stopi = stopi_q;
endmodule
