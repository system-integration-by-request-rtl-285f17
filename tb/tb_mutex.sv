// tb_mutex: random request patterns on both inputs. Checks that the two
// grants are never high together, that a grant is only given to a pending
// request, and that a lone request is granted within the element's delay.
// Grants are only checked once the start-up values have passed the output
// delay.
`timescale 1ns/1ps
module tb_mutex;
  logic r1 = 0, r2 = 0, g1, g2;
  int checks = 0, failures = 0;
  mutex dut (.*);

  always @(g1 or g2) begin
    checks++;
    if (g1 && g2 && $realtime > 0.5) begin failures++; $display("FAIL both grants at %t", $realtime); end
  end

  initial begin
    #1;
    r1 = 1; #1;
    checks++; if (!(g1 && !g2)) begin failures++; $display("FAIL lone r1"); end
    r2 = 1; #1;
    checks++; if (!(g1 && !g2)) begin failures++; $display("FAIL r2 must wait"); end
    r1 = 0; #1;
    checks++; if (!(g2 && !g1)) begin failures++; $display("FAIL r2 granted after release"); end
    r2 = 0; #1;
    checks++; if (g1 || g2) begin failures++; $display("FAIL idle"); end
    for (int i = 0; i < 500; i++) begin
      #($urandom_range(0, 40) * 0.01);
      if ($urandom_range(0, 1)) r1 = !r1; else r2 = !r2;
      #0.5;
      checks++;
      if ((g1 && !r1) || (g2 && !r2)) begin failures++; $display("FAIL grant without request r=%b%b g=%b%b s=%b%b t=%t", r1, r2, g1, g2, dut.s1, dut.s2, $realtime); end
      checks++;
      if ((r1 || r2) && !(g1 || g2)) begin failures++; $display("FAIL no grant for a pending request"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #10000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
