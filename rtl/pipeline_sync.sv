// pipeline_sync: asynchronous-to-synchronous interface (used as Tx_int in
// front of the DACs and as Rx_int at the receiver output). A four-phase
// producer writes into a DEPTH-entry FIFO; a synchronous consumer reads one
// word per clock cycle whenever the FIFO is not empty and flags it with
// dout_v.
// Write side (self-timed): a write happens when REQ_A is high, the previous
// token has been acknowledged and released, and the FIFO is not full; the
// write edge stores the word, advances the write pointer and raises ACK_A,
// which falls after REQ_A falls. Full is judged against the read pointer,
// which only moves on towards freeing space.
// Read side: the gray-coded write pointer is brought into the consumer clock
// domain through two flip-flops; the read pointer is kept in gray code for
// the write side. Latency is two to three consumer cycles.
// The published design uses pipeline synchronisation for these blocks but
// does not describe it; this FIFO is the simplest equivalent, and DEPTH is
// our choice. por is an asynchronous, active-high reset.
`timescale 1ns/1ps
module pipeline_sync #(
  parameter int unsigned DATA_W = 16,
  parameter int unsigned DEPTH  = 8
) (
  input  logic              por,
  input  logic              req_a,
  output logic              ack_a,
  input  logic [DATA_W-1:0] data_in,
  input  logic              clk,
  output logic [DATA_W-1:0] dout,
  output logic              dout_v
);
  import gals_pkg::*;
  localparam int unsigned AW = $clog2(DEPTH);
  localparam int unsigned PW = AW + 1;

  function automatic logic [PW-1:0] bin2gray(input logic [PW-1:0] b);
    return b ^ (b >> 1);
  endfunction
  function automatic logic [PW-1:0] gray2bin(input logic [PW-1:0] g);
    logic [PW-1:0] b;
    b[PW-1] = g[PW-1];
    for (int i = PW - 2; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  logic [DATA_W-1:0] mem [DEPTH];
  logic [PW-1:0] wptr, wptr_g, rptr, rptr_g, wsync1, wsync2;
  logic          full, wr_go, ack_q, ack_clr;

  // write side
  assign full = (wptr - gray2bin(rptr_g)) == PW'(DEPTH);
  assign #(T_GATE) wr_go   = req_a & !ack_q & !full;
  assign #(T_GATE) ack_clr = por | !req_a;

  always_ff @(posedge wr_go) mem[wptr[AW-1:0]] <= data_in;

  always_ff @(posedge wr_go or posedge por) begin
    if (por) begin
      wptr   <= '0;
      wptr_g <= '0;
    end else begin
      wptr   <= wptr + 1'b1;
      wptr_g <= bin2gray(wptr + 1'b1);
    end
  end

  always_ff @(posedge wr_go or posedge ack_clr) begin
    if (ack_clr) ack_q <= 1'b0;
    else         ack_q <= 1'b1;
  end
  assign #(T_FF) ack_a = ack_q;

  // read side
  always_ff @(posedge clk or posedge por) begin
    if (por) begin
      wsync1 <= '0; wsync2 <= '0; rptr <= '0; rptr_g <= '0; dout_v <= 1'b0; dout <= '0;
    end else begin
      wsync1 <= wptr_g;
      wsync2 <= wsync1;
      if (rptr != gray2bin(wsync2)) begin
        dout   <= mem[rptr[AW-1:0]];
        dout_v <= 1'b1;
        rptr   <= rptr + 1'b1;
        rptr_g <= bin2gray(rptr + 1'b1);
      end else begin
        dout_v <= 1'b0;
      end
    end
  end
endmodule
