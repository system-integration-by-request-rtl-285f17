// input_port: the wrapper's input side, built around the input controller.
// Supporting logic:
//   ACKC     = ACK_INT while the controller may see it: always in
//              request-driven mode (ST low) and, in time-out mode, only once
//              the transitional sequence has set ACKEN. The local-clock
//              acknowledges of plain time-out mode are hidden from the AFSM.
//   DLE      = data-latch enable, a pulse of T_PULSE that starts T_DLE after
//              ACK_A rises. The delay puts it behind the LS clock tree, so the
//              INT_CLK edge of a handshake still captures the token latched
//              by the previous handshake; the new token is picked up by the
//              next INT_CLK edge, whether that comes from the next request or
//              from the local oscillator. The sender must keep DATA_IN valid
//              until T_DLE + T_PULSE after ACK_A rises, which the broad
//              four-phase protocol of the input channel guarantees.
//   DATAV_IN = set while DLE is open (a token is in the latch), cleared by a
//              flip-flop with D tied low clocked by LCLKM AND INT_CLK: the
//              first local-clock edge consumes the last token and later local
//              edges see no valid data.
// The controller and the flip-flop follow the published structure; the
// gate functions around ACKC and DLE are this design's reading of it.
`timescale 1ns/1ps
module input_port (
  input  logic por,
  input  logic req_a1,
  input  logic stop,
  input  logic st,
  input  logic acki1,
  input  logic ack_int,
  input  logic lclkm,
  input  logic int_clk,
  output logic req_int,
  output logic ack_a,
  output logic rst,
  output logic reqi1,
  output logic dle,
  output logic datav_in
);
  import gals_pkg::*;
  logic ackc, acken, vclk;
  logic datav_q = 1'b0;

  assign #(T_GATE) ackc = ack_int & (acken | !st);
  logic ack_d1 = 1'b0, ack_d2 = 1'b0;   // transport-delayed copies of ACK_A
  always @(ack_a) begin
    ack_d1 <= #(T_DLE) ack_a;
    ack_d2 <= #(T_DLE + T_PULSE) ack_a;
  end
  assign dle = ack_d1 & !ack_d2;
  assign #(T_GATE) vclk = lclkm & int_clk;

  input_controller u_ctrl (
    .por, .req_a1, .ackc, .st, .stop, .acki1,
    .req_int, .ack_a, .rst, .reqi1, .acken
  );

  always_ff @(posedge vclk or posedge dle or posedge por) begin
    if (por)      datav_q <= 1'b0;
    else if (dle) datav_q <= 1'b1;
    else     datav_q <= 1'b0;
  end
  assign #(T_FF) datav_in = datav_q;
endmodule
