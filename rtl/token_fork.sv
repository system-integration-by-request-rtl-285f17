// token_fork: fork of one four-phase token stream to two sinks. The request
// and data go to both sinks; the input is acknowledged through a C-element
// once both sinks have acknowledged (and released only when both have
// released), so each token is delivered exactly once to each sink.
// Standard asynchronous fork.
`timescale 1ns/1ps
module token_fork #(
  parameter int unsigned DATA_W = 16
) (
  input  logic              por,
  input  logic              req_i,
  output logic              ack_i,
  input  logic [DATA_W-1:0] data_i,
  output logic              req_o0,
  input  logic              ack_o0,
  output logic              req_o1,
  input  logic              ack_o1,
  output logic [DATA_W-1:0] data_o
);
  assign req_o0 = req_i;
  assign req_o1 = req_i;
  assign data_o = data_i;
  c_element u_c (.por, .a(ack_o0), .b(ack_o1), .q(ack_i));
endmodule
