// output_port: the wrapper's output side. At every rising edge of INT_CLK
// two flip-flops sample the LS module's DATAV_OUT (which announces that the
// data registered at this edge is valid) into DOV and its complement into
// DONV; both are reset while the clock sources REQ_INT and LCLKM are low, so
// each is a pulse lasting the high phase. The output controller turns DOV
// into an output handshake (REQ_B/ACK_B) and either pulse into the internal
// acknowledge ACK_INT. While an output handshake is open (REQ_B or ACK_B
// high) the port requests a clock stretch from the pausable clock, so the
// local oscillator cannot advance the LS module and change DATA_OUT.
// Structure as published; DONV is taken straight from its flip-flop.
`timescale 1ns/1ps
module output_port (
  input  logic por,
  input  logic lclkm,
  input  logic req_int,
  input  logic int_clk,
  input  logic datav_out,
  input  logic ack_b,
  output logic req_b,
  output logic ack_int,
  output logic stretch
);
  import gals_pkg::*;
  logic clr, dov, donv;
  logic dov_q = 1'b0, donv_q = 1'b0;

  assign #(T_GATE) clr = por | !(lclkm | req_int);

  always_ff @(posedge int_clk or posedge clr) begin
    if (clr) begin
      dov_q  <= 1'b0;
      donv_q <= 1'b0;
    end else begin
      dov_q  <= datav_out;
      donv_q <= !datav_out;
    end
  end
  assign #(T_FF) dov  = dov_q;
  assign #(T_FF) donv = donv_q;

  output_controller u_ctrl (.por, .dov, .donv, .ack_b, .req_b, .ack_int);

  assign #(T_GATE) stretch = req_b | ack_b;
endmodule
