// timeout_gen: time-out generator and input arbitration of the wrapper.
// 1. Time-out: a self-resetting flip-flop turns every falling edge of the
//    local clock LCLK into a short pulse; a mutex passes either the pulse to
//    COUNTER_N or RST to the counter's reset, never both. After TIMEOUT_N
//    local cycles without a handshake (no RST) the counter's terminal output
//    sets the time-out flip-flop.
// 2. Arbitration: a mutex decides between REQ_A and the time-out; the
//    time-out grant sets the ST flip-flop (reset by RST) and clears the
//    time-out flip-flop again. A second mutex decides between the
//    surviving request and STOPH from the clock control, giving REQ_A1 for
//    the input controller or STOP. REQ_A therefore never races ST or STOP
//    inside the controller.
// Structure follows the published block diagram; TIMEOUT_N is this design's
// default (the period is set per wrapper). Self-timed logic: flip-flop
// clocks are handshake signals.
`timescale 1ns/1ps
module timeout_gen #(
  parameter int unsigned TIMEOUT_N = 8
) (
  input  logic por,
  input  logic lclk,
  input  logic rst,
  input  logic req_a,
  input  logic stoph,
  output logic req_a1,
  output logic st,
  output logic stop
);
  import gals_pkg::*;
  localparam int unsigned CW = $clog2(TIMEOUT_N + 1);
  logic pls_q = 1'b0, pls, pls_rst;
  logic g_pls, g_rst;
  logic [CW-1:0] cnt = '0;
  logic tc, to_q = 1'b0, to_set, to_clr;
  logic g_req, g_st;
  logic st_q = 1'b0;

  // pulse generator on the falling local clock edge
  always_ff @(negedge lclk or posedge pls_rst or posedge por) begin
    if (pls_rst || por) pls_q <= 1'b0;
    else         pls_q <= 1'b1;
  end
  assign #(T_FF)   pls     = pls_q;
  assign #(T_GATE) pls_rst = pls;

  mutex u_mx_cnt (.r1(pls), .r2(rst), .g1(g_pls), .g2(g_rst));

  always_ff @(posedge g_pls or posedge g_rst or posedge por) begin
    if (g_rst || por)                      cnt <= '0;
    else if (cnt != CW'(TIMEOUT_N))  cnt <= cnt + 1'b1;
  end
  assign #(T_FF) tc = (cnt == CW'(TIMEOUT_N));

  assign #(T_GATE) to_clr = g_rst | g_st;
  always_ff @(posedge tc or posedge to_clr or posedge por) begin
    if (to_clr || por) to_q <= 1'b0;
    else        to_q <= 1'b1;
  end
  assign #(T_FF) to_set = to_q;

  mutex u_mx_req (.r1(req_a), .r2(to_set), .g1(g_req), .g2(g_st));

  always_ff @(posedge g_st or posedge rst or posedge por) begin
    if (rst || por)st_q <= 1'b0;
    else     st_q <= 1'b1;
  end
  assign #(T_FF) st = st_q;

  mutex u_mx_stop (.r1(stoph), .r2(g_req), .g1(stop), .g2(req_a1));
endmodule
