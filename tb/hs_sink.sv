// hs_sink: testbench consumer of a four-phase token stream. It records every
// token in a queue at REQ rising, answers with ACK after DLY ns and releases
// ACK after REQ falls. Data is read at REQ rising. Requests before START are ignored.
`timescale 1ns/1ps
module hs_sink #(
  parameter int unsigned DATA_W = 16,
  parameter realtime     DLY    = 0.5,
  parameter realtime     START  = 30.0  // ignore power-up transients before this
) (
  input  logic              req,
  output logic              ack,
  input  logic [DATA_W-1:0] data
);
  logic [DATA_W-1:0] got [$];
  realtime           t_got [$];
  initial begin
    ack = 1'b0;
    #(START);
    forever begin
      wait (req);
      got.push_back(data);
      t_got.push_back($realtime);
      #(DLY) ack = 1'b1;
      wait (!req);
      #(DLY) ack = 1'b0;
    end
  end
endmodule
