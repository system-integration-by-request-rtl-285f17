// ls_pipe_model: testbench model of a locally synchronous module inside a
// GALS wrapper. A DEPTH-stage register pipeline clocked by INT_CLK carries
// (valid, data) from (DATAV_IN, DATA_L) to DATA_OUT. The word entering the
// pipeline is (low DATA_W bits XOR the bits above them) + ADD, so a wider
// input (IN_W = 2*DATA_W, as for a joined stream) combines both halves.
// DATAV_OUT is the valid bit that will reach the last stage at the next
// edge, as the wrapper's output port expects ("valid for the data registered
// at this edge"). POR empties the pipeline (asynchronous reset).
`timescale 1ns/1ps
module ls_pipe_model #(
  parameter int unsigned DATA_W = 16,
  parameter int unsigned IN_W   = DATA_W,
  parameter int unsigned DEPTH  = 2,
  parameter int unsigned ADD    = 0
) (
  input  logic              clk,
  input  logic              por,
  input  logic [IN_W-1:0]   data_l,
  input  logic              datav_in,
  output logic [DATA_W-1:0] data_out,
  output logic              datav_out,
  output int unsigned       edges
);
  logic [DATA_W-1:0] d [DEPTH+1];
  logic              v [DEPTH+1];
  bit                live = 1'b0;   // count edges only after power-on reset
  initial #25 live = 1'b1;
  initial begin
    for (int i = 1; i <= DEPTH; i++) begin d[i] = '0; v[i] = 1'b0; end
  end
  always_comb begin
    d[0] = (data_l[DATA_W-1:0] ^ DATA_W'(data_l >> DATA_W)) + DATA_W'(ADD);
    v[0] = datav_in;
  end
  always_ff @(posedge clk or posedge por) begin
    for (int i = 1; i <= DEPTH; i++) begin
      d[i] <= por ? '0 : d[i-1];
      v[i] <= por ? 1'b0 : v[i-1];
    end
  end
  initial edges = 0;
  always @(posedge clk) if (live) edges++;
  assign datav_out = v[DEPTH-1];
  assign data_out  = d[DEPTH];
endmodule
