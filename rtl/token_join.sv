// token_join: join of two four-phase token streams A and B into one. The
// output request is the C-element of both input requests, so a token leaves
// only when one token from each side is present; the output acknowledge is
// returned to both sides. Output data is {data_a, data_b}. With EN_B low the
// join degenerates to a buffer for stream A (B is neither waited for nor
// acknowledged, its data field reads zero); the receiver uses this for the
// first OFDM symbol, for which no fed-back tokens exist. EN_B must only
// change while both channels are idle. Standard asynchronous join; the
// enable is this design's addition.
`timescale 1ns/1ps
module token_join #(
  parameter int unsigned W_A = 16,
  parameter int unsigned W_B = 16
) (
  input  logic               por,
  input  logic               en_b,
  input  logic               req_a,
  output logic               ack_a,
  input  logic [W_A-1:0]     data_a,
  input  logic               req_b,
  output logic               ack_b,
  input  logic [W_B-1:0]     data_b,
  output logic               req_o,
  input  logic               ack_o,
  output logic [W_A+W_B-1:0] data_o
);
  import gals_pkg::*;
  logic req_b_eff;
  assign #(T_GATE) req_b_eff = en_b ? req_b : req_a;
  c_element u_c (.por, .a(req_a), .b(req_b_eff), .q(req_o));
  assign ack_a  = ack_o;
  assign ack_b  = ack_o & en_b;
  assign data_o = {data_a, (en_b ? data_b : W_B'(0))};
endmodule
