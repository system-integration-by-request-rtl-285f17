// tb_data_latch: random data; checks that the latch follows D while DLE is
// high and holds the last value while DLE is low.
`timescale 1ns/1ps
module tb_data_latch;
  localparam int W = 16;
  logic dle = 0;
  logic [W-1:0] d = '0, q, held;
  int checks = 0, failures = 0;
  data_latch #(.DATA_W(W)) dut (.*);
  initial begin
    for (int i = 0; i < 100; i++) begin
      dle = 1; d = W'($urandom); #1;
      checks++; if (q !== d) begin failures++; $display("FAIL transparent"); end
      held = d; dle = 0; #0.5; d = W'($urandom); #1;
      checks++; if (q !== held) begin failures++; $display("FAIL hold"); end
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
