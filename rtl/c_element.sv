// c_element: Muller C-element. The output goes high when both inputs are
// high, low when both are low, and otherwise keeps its value. Written as the
// set/clear process on a state variable plus one gate delay; a C-element is a
// state-holding gate, so the combinational loop is intended. INIT sets the
// value the element starts with and returns to while POR is high (the
// reset input is this design's addition for simulation start-up).
// Lint reports the held state as an inferred latch: holding its value when
// the inputs disagree is exactly what a C-element does, so it stays.
`timescale 1ns/1ps
module c_element #(
  parameter bit INIT = 1'b0
) (
  input  logic por,   // power-on reset: forces the output to INIT
  input  logic a,
  input  logic b,
  output logic q
);
  import gals_pkg::*;
  logic qi = INIT;
  always @(a or b or por) begin
    if (por)           qi = INIT;
    else if (a && b)        qi = 1'b1;
    else if (!a && !b) qi = 1'b0;
  end
  assign #(T_GATE) q = qi;
endmodule
