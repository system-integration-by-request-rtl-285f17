// tb_gals_baseband: end-to-end test of the GALS baseband integration at its
// default parameters. Testbench pipeline models stand in for the WLAN LS
// modules (each adds a constant; Rx2's model XORs the activation word with
// the fed-back word). It runs
//  - the transmitter: two 8-token symbols from an 80 Msps Tx1 stream through
//    Tx2 (which collects each symbol, then sends it with its own ~20 MHz
//    clock) and Tx3 (72 local cycles of flushing) into the 20 MHz DAC domain,
//    the second symbol arriving while Tx3 still flushes (transitional mode);
//  - the receiver: three 48-token OFDM symbols at 20 Msps through the join,
//    Rx2, Rx_TRA (burst rate adaptation to ~80 Msps), Rx3, the fork, Rx_int
//    and FIFO_TA; symbols 2 and 3 are joined with the fed-back tokens of the
//    previous symbol;
//  - Rx1 on its own stream.
// It checks every output word against values computed here, the order, the
// rate adaptation, the exact 72-cycle flush of Tx3, and that each mechanism
// happened: time-out, oscillator stop, transitional hand-over, clock
// stretch, join with feedback, fork.
`timescale 1ns/1ps
module tb_gals_baseband;
  localparam int W = 16;
  localparam int NSYM = 3, BURST = 48, TXN = 8;
  int checks = 0, failures = 0;
  logic por = 1'b0;
  initial begin #1 por = 1'b1; #19 por = 1'b0; end

  logic dac_clk = 1'b0, host_clk = 1'b0;
  always #25   dac_clk  = !dac_clk;
  always #6.25 host_clk = !host_clk;

  logic tx1_req, tx1_ack, rx1a_req, rx1a_ack, act_req, act_ack, fb_en, rx1_req_b, rx1_ack_b;
  logic [W-1:0] tx1_data, rx1a_data, act_data;
  logic tx2_clk, tx2_dvi, tx2_dvo, tx3_clk, tx3_dvi, tx3_dvo;
  logic rx1_clk, rx1_dvi, rx1_dvo, rx2_clk, rx2_dvi, rx2_dvo, rx3_clk, rx3_dvi, rx3_dvo;
  logic [W-1:0] tx2_dl, tx2_do, tx3_dl, tx3_do, rx1_dl, rx1_do, rx2_do, rx3_dl, rx3_do;
  logic [2*W-1:0] rx2_dl;
  logic [W-1:0] dac_data, rx_data;
  logic dac_valid, rx_valid;
  logic [5:0] st, run;
  int unsigned e_tx3, e_rx1, e_rx2, e_rx3;

  gals_baseband dut (
    .por,
    .tx1_req, .tx1_ack, .tx1_data,
    .tx2_int_clk(tx2_clk), .tx2_data_l(tx2_dl), .tx2_datav_in(tx2_dvi), .tx2_data_out(tx2_do), .tx2_datav_out(tx2_dvo),
    .tx3_int_clk(tx3_clk), .tx3_data_l(tx3_dl), .tx3_datav_in(tx3_dvi), .tx3_data_out(tx3_do), .tx3_datav_out(tx3_dvo),
    .dac_clk, .dac_data, .dac_valid,
    .rx1a_req, .rx1a_ack, .rx1a_data, .act_req, .act_ack, .act_data, .fb_en,
    .rx1_int_clk(rx1_clk), .rx1_data_l(rx1_dl), .rx1_datav_in(rx1_dvi), .rx1_datav_out(rx1_dvo),
    .rx1_req_b, .rx1_ack_b,
    .rx2_int_clk(rx2_clk), .rx2_data_l(rx2_dl), .rx2_datav_in(rx2_dvi), .rx2_data_out(rx2_do), .rx2_datav_out(rx2_dvo),
    .rx3_int_clk(rx3_clk), .rx3_data_l(rx3_dl), .rx3_datav_in(rx3_dvi), .rx3_data_out(rx3_do), .rx3_datav_out(rx3_dvo),
    .host_clk, .rx_data, .rx_valid, .st, .run
  );

  // Tx2 model: collects a whole 8-token symbol in request-driven mode, then
  // sends it with the wrapper's own oscillator (the same burst FIFO as Rx_TRA)
  rx_tra #(.DATA_W(W), .BURST(TXN)) m_tx2 (.clk(tx2_clk), .por, .din(tx2_dl), .din_v(tx2_dvi), .dout(tx2_do), .datav_out(tx2_dvo));
  ls_pipe_model #(.DATA_W(W), .DEPTH(3), .ADD(3)) m_tx3 (.por, .clk(tx3_clk), .data_l(tx3_dl), .datav_in(tx3_dvi), .data_out(tx3_do), .datav_out(tx3_dvo), .edges(e_tx3));
  ls_pipe_model #(.DATA_W(W), .DEPTH(2), .ADD(5)) m_rx1 (.por, .clk(rx1_clk), .data_l(rx1_dl), .datav_in(rx1_dvi), .data_out(rx1_do), .datav_out(rx1_dvo), .edges(e_rx1));
  ls_pipe_model #(.DATA_W(W), .IN_W(2*W), .DEPTH(2), .ADD(1)) m_rx2 (.por, .clk(rx2_clk), .data_l(rx2_dl), .datav_in(rx2_dvi), .data_out(rx2_do), .datav_out(rx2_dvo), .edges(e_rx2));
  ls_pipe_model #(.DATA_W(W), .DEPTH(2), .ADD(1)) m_rx3 (.por, .clk(rx3_clk), .data_l(rx3_dl), .datav_in(rx3_dvi), .data_out(rx3_do), .datav_out(rx3_dvo), .edges(e_rx3));

  hs_source #(.DATA_W(W)) s_tx1 (.req(tx1_req), .ack(tx1_ack), .data(tx1_data));
  hs_source #(.DATA_W(W)) s_rx1 (.req(rx1a_req), .ack(rx1a_ack), .data(rx1a_data));
  hs_source #(.DATA_W(W)) s_act (.req(act_req), .ack(act_ack), .data(act_data));
  hs_sink   #(.DATA_W(W)) k_rx1 (.req(rx1_req_b), .ack(rx1_ack_b), .data(rx1_do));

  // ---- observation ----
  bit live = 1'b0;                     // count events only after power-on reset
  initial #25 live = 1'b1;
  logic [W-1:0] dac_got [$], host_got [$];
  always @(posedge dac_clk)  if (live && dac_valid) dac_got.push_back(dac_data);
  always @(posedge host_clk) if (live && rx_valid) host_got.push_back(rx_data);

  int n_timeout = 0, n_stop = 0, n_trans = 0, n_stretch = 0, n_join_fb = 0, n_fork = 0;
  always @(posedge st[0] or posedge st[1] or posedge st[2] or posedge st[3] or posedge st[4] or posedge st[5]) if (live) n_timeout++;
  always @(negedge run[0] or negedge run[1] or negedge run[2] or negedge run[3] or negedge run[4] or negedge run[5]) if (live) n_stop++;
  always @(posedge dut.u_aw_tx3.u_in.reqi1) if (live) n_trans++;
  always @(posedge dut.u_aw_rx2.u_in.reqi1) if (live) n_trans++;
  always @(posedge dut.u_aw_rxtra.u_out.stretch) if (live && st[4]) n_stretch++;
  always @(posedge dut.j_req) if (live && fb_en) n_join_fb++;
  always @(posedge dut.rx3_ack_b) if (live) n_fork++;
  // Tx2 tokens sent while its own oscillator runs (after the burst is collected)
  int tx2_sent = 0, tx2_sent_local = 0;
  always @(posedge dut.tx2_req_b) if (live) begin
    tx2_sent++;
    if (st[0]) tx2_sent_local++;
  end
  // local clock cycles of each Tx3 flush (from time-out to oscillator stop)
  int tx3_lc = 0;
  int tx3_flush [$];
  always @(posedge dut.u_aw_tx3.lclkm) if (live) tx3_lc++;
  always @(posedge st[1]) tx3_lc = 0;
  always @(negedge run[1]) if (live) tx3_flush.push_back(tx3_lc);
  realtime tra_first, tra_last;
  int tra_cnt = 0;
  always @(posedge dut.tra_req_b) if (live) begin
    if (tra_cnt % BURST == 0) tra_first = $realtime;
    tra_cnt++;
    if (tra_cnt % BURST == 0) tra_last = $realtime;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // pace a source: one token per period
  task automatic paced_tx1(input logic [W-1:0] v, input realtime period);
    realtime t0 = $realtime;
    s_tx1.send(v);
    if ($realtime - t0 < period) #(period - ($realtime - t0));
  endtask
  task automatic paced_act(input logic [W-1:0] v, input realtime period);
    realtime t0 = $realtime;
    s_act.send(v);
    if ($realtime - t0 < period) #(period - ($realtime - t0));
  endtask
  task automatic paced_rx1(input logic [W-1:0] v, input realtime period);
    realtime t0 = $realtime;
    s_rx1.send(v);
    if ($realtime - t0 < period) #(period - ($realtime - t0));
  endtask

  function automatic logic [W-1:0] act_word(int s, int j);
    return W'((s << 8) | j);
  endfunction

  bit tx_done = 0, rx_done = 0, rx1_done = 0;
  realtime rx_burst_in;

  initial begin
    fb_en = 1'b0;
    #40;
    fork
      begin : tx
        for (int s = 0; s < 2; s++) begin
          for (int j = 0; j < TXN; j++) paced_tx1(W'(16'h4000 + s * 16 + j), 12.5);
          #2000;     // next symbol arrives while Tx3 is still flushing
        end
        tx_done = 1;
      end
      begin : rx
        realtime t0;
        for (int s = 0; s < NSYM; s++) begin
          fb_en = (s > 0);
          t0 = $realtime;
          for (int j = 0; j < BURST; j++) paced_act(act_word(s, j), 50.0);
          rx_burst_in = $realtime - t0;
          #1600;
        end
        rx_done = 1;
      end
      begin : r1
        for (int j = 0; j < 16; j++) paced_rx1(W'(16'h2000 + j), 50.0);
        rx1_done = 1;
      end
    join
    #6000;
    // ---- transmitter ----
    check(dac_got.size() == 2 * TXN, $sformatf("DAC words %0d of %0d", dac_got.size(), 2 * TXN));
    for (int i = 0; i < dac_got.size() && i < 2 * TXN; i++)
      check(dac_got[i] == W'(16'h4000 + (i / TXN) * 16 + (i % TXN) + 3), $sformatf("DAC word %0d = %h", i, dac_got[i]));
    // ---- receiver ----
    check(host_got.size() == NSYM * BURST, $sformatf("host words %0d of %0d", host_got.size(), NSYM * BURST));
    begin
      logic [W-1:0] prev [BURST];
      logic [W-1:0] exp_w;
      for (int j = 0; j < BURST; j++) prev[j] = '0;
      for (int s = 0; s < NSYM; s++)
        for (int j = 0; j < BURST; j++) begin
          exp_w = ((act_word(s, j) ^ prev[j]) + W'(1)) + W'(1);
          if (s * BURST + j < host_got.size())
            check(host_got[s * BURST + j] == exp_w, $sformatf("rx sym %0d word %0d = %h, expected %h", s, j, host_got[s * BURST + j], exp_w));
          prev[j] = exp_w;
        end
    end
    check(k_rx1.got.size() == 16, $sformatf("Rx1 words %0d of 16", k_rx1.got.size()));
    for (int i = 0; i < k_rx1.got.size() && i < 16; i++)
      check(k_rx1.got[i] == W'(16'h2000 + i + 5), $sformatf("Rx1 word %0d = %h", i, k_rx1.got[i]));
    // ---- rate adaptation: Rx_TRA resends a 48-token burst faster than it came in
    check(tra_cnt == NSYM * BURST, $sformatf("Rx_TRA tokens %0d", tra_cnt));
    check(tra_last - tra_first < rx_burst_in / 2.0,
          $sformatf("Rx_TRA burst %0.1f ns vs input burst %0.1f ns", tra_last - tra_first, rx_burst_in));
    // ---- Tx3 flush: 72 local cycles after each symbol (edges beyond the tokens)
    check(e_tx3 >= 2 * TXN + 72, $sformatf("Tx3 LS edges %0d", e_tx3));
    check(tx2_sent == 2 * TXN && tx2_sent_local == 2 * TXN,
          $sformatf("Tx2 sent %0d tokens, %0d of them with its local clock", tx2_sent, tx2_sent_local));
    check(tx3_flush.size() >= 1, "Tx3 completed a flush");
    foreach (tx3_flush[i])
      check(tx3_flush[i] == 72, $sformatf("Tx3 flush %0d ran %0d local cycles, expected 72", i, tx3_flush[i]));
    // ---- mechanisms ----
    check(n_timeout >= 6, $sformatf("time-outs %0d", n_timeout));
    check(n_stop >= 6, $sformatf("oscillator stops %0d", n_stop));
    check(n_trans >= 1, $sformatf("transitional hand-overs %0d", n_trans));
    check(n_stretch >= 1, $sformatf("clock stretches %0d", n_stretch));
    check(n_join_fb >= BURST, $sformatf("joined tokens with feedback %0d", n_join_fb));
    check(n_fork == NSYM * BURST, $sformatf("forked tokens %0d", n_fork));
    $display("mechanisms: timeout=%0d stop=%0d transitional=%0d stretch=%0d join_fb=%0d fork=%0d",
             n_timeout, n_stop, n_trans, n_stretch, n_join_fb, n_fork);
    $display("Rx_TRA burst %0.1f ns for %0d tokens (input burst %0.1f ns)", tra_last - tra_first, BURST, rx_burst_in);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
