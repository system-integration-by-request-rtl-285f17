// fifo_ta: token-rate adaptation FIFO of the receiver's feedback path, a
// latch-based asynchronous FIFO (four-phase bundled-data Muller pipeline).
// Each stage is a C-element and a data latch; the latch is transparent while
// its C-element is low and holds when it rises. In a four-phase Muller
// pipeline tokens alternate with empty stages, so DEPTH tokens need
// 2*DEPTH stages. A request is delayed by a matched delay (one latch plus
// one gate) before it reaches the next C-element so the data are settled
// first. The output stage keeps its latch closed until ACK_B has fallen, so
// the output obeys the broad four-phase protocol the wrapper input expects
// (data valid from REQ_B rising until ACK_B falls). The FIFO accepts a burst from Rx3 at the Rx3 token rate and hands
// the tokens out as fast as the join in front of Rx2 takes them. DEPTH = 48
// tokens per OFDM symbol as published; the stage circuit is the standard one.
`timescale 1ns/1ps
module fifo_ta #(
  parameter int unsigned DATA_W = 16,
  parameter int unsigned DEPTH  = 48
) (
  input  logic              por,
  input  logic              req_a,
  output logic              ack_a,
  input  logic [DATA_W-1:0] data_in,
  output logic              req_b,
  input  logic              ack_b,
  output logic [DATA_W-1:0] data_out
);
  import gals_pkg::*;
  localparam int unsigned N = 2 * DEPTH;
  logic              c    [N+1];   // c[0] = input request
  logic              rd   [N+1];   // matched-delay copies of c
  logic              nack [N+1];   // inverted acknowledge into stage i
  logic [DATA_W-1:0] q    [N+1];   // q[0] = input data

  assign c[0] = req_a;
  assign q[0] = data_in;
  initial for (int i = 0; i <= N; i++) rd[i] = 1'b0;

  for (genvar i = 1; i <= N; i++) begin : g_stage
    always @(c[i-1]) rd[i-1] <= #(T_LATCH + T_GATE) c[i-1];
    if (i < N) begin : g_mid
      assign nack[i] = !c[i+1];
    end else begin : g_last
      // matched delay so the output latch settles before the next request
      logic nack_d = 1'b1;
      always @(ack_b) nack_d <= #(T_LATCH + T_GATE) !ack_b;
      assign nack[i] = nack_d;
    end
    c_element u_c (.por, .a(rd[i-1]), .b(nack[i]), .q(c[i]));
    logic [DATA_W-1:0] l;
    logic              open_l;
    if (i < N) begin : g_en_mid
      assign open_l = !c[i];
    end else begin : g_en_last
      assign open_l = !c[i] & !ack_b;
    end
    always_latch if (open_l) l <= q[i-1];
    assign #(T_LATCH) q[i] = l;
  end

  assign ack_a    = c[1];
  assign req_b    = c[N];
  assign data_out = q[N];
endmodule
