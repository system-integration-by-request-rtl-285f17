// tb_rx_tra: writes bursts of BURST words at a low rate (one every third
// clock) and checks that nothing is sent before a whole burst is stored,
// that the burst is then sent on consecutive clocks, in order, and that
// a second burst after a gap (pointer wrap) behaves the same.
`timescale 1ns/1ps
module tb_rx_tra;
  localparam int W = 16, B = 12;
  logic clk = 0, por = 0, din_v = 0, datav_out;
  logic [W-1:0] din = '0, dout;
  int checks = 0, failures = 0, written = 0, nout = 0, run = 0, max_run = 0;
  logic [W-1:0] expq [$];
  rx_tra #(.DATA_W(W), .BURST(B)) dut (.*);
  always #5 clk = !clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // output monitor: datav_out marks the data registered at this edge
  always @(posedge clk) begin
    if (datav_out && !por) begin
      check(written >= B * (nout / B + 1), $sformatf("word %0d sent before its burst was complete", nout));
      #1;
      check(expq.size() > 0 && dout == expq[0], $sformatf("word %0d = %h", nout, dout));
      if (expq.size() > 0) void'(expq.pop_front());
      nout++; run++;
      if (run > max_run) max_run = run;
    end else run = 0;
  end

  initial begin
    #1 por = 1; #12 por = 0;
    for (int b = 0; b < 2; b++) begin
      for (int i = 0; i < B; i++) begin
        @(negedge clk); din = W'(16'h1000 + b * B + i); din_v = 1; expq.push_back(din);
        @(negedge clk); din_v = 0; written++;
        @(negedge clk);
      end
      repeat (2 * B) @(negedge clk);   // gap between symbols
    end
    check(nout == 2 * B, $sformatf("%0d words out", nout));
    check(max_run == B, $sformatf("longest back-to-back run %0d", max_run));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #20000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
