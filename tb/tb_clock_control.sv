// tb_clock_control: gives FLUSH_K internal acknowledge cycles in time-out
// mode and checks that STOPH rises exactly after the FLUSH_K-th, that cycles
// outside time-out mode are not counted, that RST clears the count, and that
// STOP sets STOPI while REQ_INT clears it.
`timescale 1ns/1ps
module tb_clock_control;
  localparam int K = 5;
  logic por = 0, st = 0, ack_int = 0, rst = 0, stop = 0, req_int = 0, stoph, stopi;
  int checks = 0, failures = 0;
  clock_control #(.FLUSH_K(K)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  task automatic cyc();
    #5 ack_int = 1; #5 ack_int = 0;
  endtask

  initial begin
    #1 por = 1; #5 por = 0; #2;
    check(stopi, "oscillator stopped after power-on");
    req_int = 1; #2; req_int = 0; #2;
    check(!stopi, "REQ_INT clears STOPI");
    repeat (3) cyc();           // request-driven: not counted
    #2 check(!stoph, "no count outside time-out mode");
    st = 1; #2;
    for (int i = 1; i <= K; i++) begin
      cyc(); #1;
      check(stoph == (i == K), $sformatf("after %0d local cycles STOPH=%b", i, stoph));
    end
    stop = 1; #2;
    check(stopi, "STOP sets STOPI");
    rst = 1; #2;
    check(!stoph, "RST clears the counter");
    rst = 0; stop = 0; st = 0; #2;
    check(stopi, "STOPI held until the next request");
    req_int = 1; #2;
    check(!stopi, "REQ_INT clears STOPI");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #10000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
