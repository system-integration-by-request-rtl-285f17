// hs_source: testbench producer of a four-phase, broad-protocol token
// stream. send() puts a value on DATA, raises REQ, waits for ACK, lowers REQ
// and waits for ACK to fall; DATA stays valid until then.
`timescale 1ns/1ps
module hs_source #(
  parameter int unsigned DATA_W = 16
) (
  output logic              req,
  input  logic              ack,
  output logic [DATA_W-1:0] data
);
  initial begin req = 1'b0; data = '0; end
  task automatic send(input logic [DATA_W-1:0] v);
    data = v;
    #0.05 req = 1'b1;
    wait (ack);
    #0.05 req = 1'b0;
    wait (!ack);
  endtask
endmodule
