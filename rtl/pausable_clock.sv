// pausable_clock: behavioural model of the wrapper's pausable ring-oscillator
// clock generator (the Muttersbach structure). The ring is
//   RCLK  = NOR(LCLK, STOPI)
//   RCLKD = RCLK through the delay line (HALF_NS, transport delay)
//   LCLK  = C-element(clk_grant, RCLKD)
// clk_grant is the AND of the ring-side grants of two mutexes, one per
// requester, each arbitrating RCLK against REQIx. A granted request (ACKIx)
// holds RCLK's next rising phase from reaching the C-element, so the clock
// is stretched in its low phase until the request is withdrawn. STOPI high
// stops the ring with LCLK low. Requester 1 is the input port (clock
// hand-over), requester 2 the output port's stretch request. The period is
// about 2*(HALF_NS + 3 gate delays). The delay line is a parameter rather
// than the tunable line of silicon; this is a simulation model.
`timescale 1ns/1ps
module pausable_clock #(
  parameter realtime HALF_NS = 6.0
) (
  input  logic reqi1,
  output logic acki1,
  input  logic reqi2,
  output logic acki2,
  input  logic stopi,
  output logic lclk
);
  import gals_pkg::*;
  logic rclk, rclkd = 1'b0, gr1, gr2, clk_grant;

  assign #(T_GATE) rclk = !(lclk | stopi);
  always @(rclk) rclkd <= #(HALF_NS) rclk;

  mutex u_arb1 (.r1(rclk), .r2(reqi1), .g1(gr1), .g2(acki1));
  mutex u_arb2 (.r1(rclk), .r2(reqi2), .g1(gr2), .g2(acki2));
  assign clk_grant = gr1 & gr2;

  c_element u_c (.por(1'b0), .a(clk_grant), .b(rclkd), .q(lclk));
endmodule
