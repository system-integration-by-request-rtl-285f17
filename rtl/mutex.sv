// mutex: behavioural model of a two-way mutual-exclusion element (the
// analog arbiter with a metastability filter used throughout the wrapper).
// g1 follows r1 and g2 follows r2, but never both at once: a grant is held
// until its own request falls, and a waiting request is granted after the
// holder releases. The model has no metastability; requests that arrive in
// the same time step go to r1. Grants appear T_MUTEX after the deciding
// event. Interface and behaviour follow the standard element; the tie rule
// and the delay are this model's choice.
`timescale 1ns/1ps
module mutex (
  input  logic r1,
  input  logic r2,
  output logic g1,
  output logic g2
);
  import gals_pkg::*;
  logic s1 = 1'b0, s2 = 1'b0;   // internal grant state

  always @(r1 or r2) begin
    if (s1 && !r1) s1 = 1'b0;
    if (s2 && !r2) s2 = 1'b0;
    if (!s1 && !s2) begin
      if (r1)      s1 = 1'b1;
      else if (r2) s2 = 1'b1;
    end
  end

  assign #(T_MUTEX) g1 = s1;
  assign #(T_MUTEX) g2 = s2;
endmodule
