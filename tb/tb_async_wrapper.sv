// tb_async_wrapper: end-to-end test of one GALS block (wrapper plus a
// two-stage LS pipeline that adds 1). Bursts of tokens are sent at a fixed
// token period; the test checks that every token comes out once, in order
// and incremented, and that the wrapper passes through all of its modes:
// request-driven clocking (one LS edge per token), time-out, local-clock
// flushing, oscillator stop and the transitional hand-over (a burst that
// starts while the local clock is flushing).
`timescale 1ns/1ps
module tb_async_wrapper;
  localparam int W = 16;
  logic req_a, ack_a, req_b, ack_b, int_clk, datav_in, datav_out, st, run;
  logic [W-1:0] data_in, data_l, ls_out;
  int unsigned edges;
  logic por = 1'b0;
  initial begin #1 por = 1'b1; #19 por = 1'b0; end
  int checks = 0, failures = 0;
  int n_timeout = 0, n_stop = 0, n_trans = 0;
  bit live = 1'b0;                     // count events only after power-on reset
  initial #25 live = 1'b1;

  async_wrapper #(.DATA_W(W), .TIMEOUT_N(8), .FLUSH_K(6), .RING_HALF_NS(6.0)) dut (
    .por, .req_a, .ack_a, .data_in, .req_b, .ack_b, .int_clk, .data_l, .datav_in,
    .datav_out, .st, .lclk_run(run)
  );
  ls_pipe_model #(.DATA_W(W), .DEPTH(2), .ADD(1)) ls (.por,
    .clk(int_clk), .data_l, .datav_in, .data_out(ls_out), .datav_out, .edges
  );
  hs_source #(.DATA_W(W)) src (.req(req_a), .ack(ack_a), .data(data_in));
  hs_sink   #(.DATA_W(W)) snk (.req(req_b), .ack(ack_b), .data(ls_out));

  always @(posedge st) if (live) n_timeout++;
  always @(negedge run) if (live) n_stop++;
  always @(posedge req_a) if (live && st && run) n_trans++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int sent = 0;
  task automatic burst(input int n, input realtime period);
    realtime t0;
    for (int i = 0; i < n; i++) begin
      t0 = $realtime;
      src.send(W'(16'h100 + sent));
      sent++;
      if ($realtime - t0 < period) #(period - ($realtime - t0));
    end
  endtask

  initial begin
    int unsigned e0;
    #40;
    // burst 1: request-driven, then time-out, flush and stop
    e0 = edges;
    burst(12, 15.0);
    check(edges - e0 == 12, $sformatf("request mode: %0d LS edges for 12 tokens", edges - e0));
    check(!st, "no time-out inside a burst");
    #1000;
    check(!run, "oscillator stopped after flushing");
    check(snk.got.size() == 12, $sformatf("burst 1 delivered %0d of 12", snk.got.size()));
    // burst 2, then a new burst while the local clock is flushing
    burst(10, 15.0);
    #130;
    check(st && run, "local clock running before the transitional burst");
    burst(10, 15.0);
    #1500;
    check(!run, "oscillator stopped at the end");
    check(snk.got.size() == 32, $sformatf("delivered %0d of 32", snk.got.size()));
    for (int i = 0; i < snk.got.size() && i < 32; i++)
      check(snk.got[i] == W'(16'h101 + i), $sformatf("token %0d = %h", i, snk.got[i]));
    check(n_timeout >= 3, $sformatf("time-outs %0d", n_timeout));
    check(n_stop >= 2, $sformatf("stops %0d", n_stop));
    check(n_trans >= 1, $sformatf("transitional hand-overs %0d", n_trans));
    $display("modes: timeout=%0d stop=%0d transitional=%0d", n_timeout, n_stop, n_trans);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #50000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
