// gals_baseband: GALS integration of an IEEE 802.11a baseband processor
// using request-driven asynchronous wrappers. All datapath blocks keep their
// synchronous design; each GALS block is a wrapper (async_wrapper) whose LS
// module is clocked by the incoming token stream while a burst arrives and by
// its own pausable oscillator to flush its pipeline afterwards.
//
// Transmitter (point to point):
//   Tx1 (synchronous, 80 MHz, outside) -> AW Tx2 (pilot insertion, collects
//   at 80 Msps, sends at ~20 Msps) -> AW Tx3 (IFFT, guard and preamble
//   insertion, 72 local cycles per symbol) -> Tx_int -> DAC clock domain.
// Receiver (token ring, see the dataflow below):
//   activation stream -> AW Rx1 (synchroniser tracking)
//   activation stream + FIFO_TA -> join -> AW Rx2 (synchroniser, FFT,
//   channel estimator; 20 Msps) -> AW Rx_TRA (48-token FIFO, 20 -> 80 Msps)
//   -> AW Rx3 (demapper .. descrambler, re-encoder; 80 Msps) -> fork ->
//   Rx_int (host clock domain) and FIFO_TA (48 tokens, 80 -> 20 Msps back
//   to the join, aligned with the next symbol).
// The LS modules of Tx2, Tx3, Rx1, Rx2 and Rx3 (the WLAN signal processing)
// are not part of this RTL: each wrapper's LS-side signals are ports
// (<blk>_int_clk, _data_l, _datav_in out; _data_out, _datav_out in). The
// Rx_TRA FIFO is inside. fb_en enables the join's feedback input (low for
// the first symbol of a frame). Oscillator periods, time-out and flush
// counts are per-block parameters below; the rates, the 72-cycle flush of
// Tx3 and the 48-token bursts are the published values, the rest are ours.
// st and run report each wrapper's time-out state and oscillator activity
// (bit order: tx2, tx3, rx1, rx2, rx_tra, rx3).
`timescale 1ns/1ps
module gals_baseband #(
  parameter int unsigned DATA_W      = 16,
  parameter int unsigned BURST       = 48,   // tokens per OFDM symbol in the receiver
  parameter int unsigned TX3_FLUSH_K = 72,   // local cycles of Tx3 per symbol
  parameter realtime     HALF_20     = 24.6, // ring half period for ~20 Msps
  parameter realtime     HALF_80     = 6.0   // ring half period for ~80 Msps
) (
  input  logic              por,
  // Tx1 output stream (synchronous producer: request follows its clock)
  input  logic              tx1_req,
  output logic              tx1_ack,
  input  logic [DATA_W-1:0] tx1_data,
  // LS module of Tx2
  output logic              tx2_int_clk,
  output logic [DATA_W-1:0] tx2_data_l,
  output logic              tx2_datav_in,
  input  logic [DATA_W-1:0] tx2_data_out,
  input  logic              tx2_datav_out,
  // LS module of Tx3
  output logic              tx3_int_clk,
  output logic [DATA_W-1:0] tx3_data_l,
  output logic              tx3_datav_in,
  input  logic [DATA_W-1:0] tx3_data_out,
  input  logic              tx3_datav_out,
  // DAC side of Tx_int
  input  logic              dac_clk,
  output logic [DATA_W-1:0] dac_data,
  output logic              dac_valid,
  // activation interface: stream to Rx1 and stream to Rx2
  input  logic              rx1a_req,
  output logic              rx1a_ack,
  input  logic [DATA_W-1:0] rx1a_data,
  input  logic              act_req,
  output logic              act_ack,
  input  logic [DATA_W-1:0] act_data,
  input  logic              fb_en,
  // LS module of Rx1 and its output stream (the stream's data is the LS
  // module's own output word)
  output logic              rx1_int_clk,
  output logic [DATA_W-1:0] rx1_data_l,
  output logic              rx1_datav_in,
  input  logic              rx1_datav_out,
  output logic              rx1_req_b,
  input  logic              rx1_ack_b,
  // LS module of Rx2 (input is {activation word, fed-back word})
  output logic                rx2_int_clk,
  output logic [2*DATA_W-1:0] rx2_data_l,
  output logic                rx2_datav_in,
  input  logic [DATA_W-1:0]   rx2_data_out,
  input  logic                rx2_datav_out,
  // LS module of Rx3
  output logic              rx3_int_clk,
  output logic [DATA_W-1:0] rx3_data_l,
  output logic              rx3_datav_in,
  input  logic [DATA_W-1:0] rx3_data_out,
  input  logic              rx3_datav_out,
  // host side of Rx_int
  input  logic              host_clk,
  output logic [DATA_W-1:0] rx_data,
  output logic              rx_valid,
  // wrapper status
  output logic [5:0]        st,
  output logic [5:0]        run
);
  // ---------------- transmitter ----------------
  logic tx2_req_b, tx2_ack_b, tx3_req_b, tx3_ack_b;

  async_wrapper #(.DATA_W(DATA_W), .TIMEOUT_N(4), .FLUSH_K(16), .RING_HALF_NS(HALF_20)) u_aw_tx2 (
    .por, .req_a(tx1_req), .ack_a(tx1_ack), .data_in(tx1_data),
    .req_b(tx2_req_b), .ack_b(tx2_ack_b),
    .int_clk(tx2_int_clk), .data_l(tx2_data_l), .datav_in(tx2_datav_in), .datav_out(tx2_datav_out),
    .st(st[0]), .lclk_run(run[0])
  );

  async_wrapper #(.DATA_W(DATA_W), .TIMEOUT_N(4), .FLUSH_K(TX3_FLUSH_K), .RING_HALF_NS(HALF_20)) u_aw_tx3 (
    .por, .req_a(tx2_req_b), .ack_a(tx2_ack_b), .data_in(tx2_data_out),
    .req_b(tx3_req_b), .ack_b(tx3_ack_b),
    .int_clk(tx3_int_clk), .data_l(tx3_data_l), .datav_in(tx3_datav_in), .datav_out(tx3_datav_out),
    .st(st[1]), .lclk_run(run[1])
  );

  pipeline_sync #(.DATA_W(DATA_W)) u_tx_int (
    .por, .req_a(tx3_req_b), .ack_a(tx3_ack_b), .data_in(tx3_data_out),
    .clk(dac_clk), .dout(dac_data), .dout_v(dac_valid)
  );

  // ---------------- receiver ----------------
  async_wrapper #(.DATA_W(DATA_W), .TIMEOUT_N(4), .FLUSH_K(8), .RING_HALF_NS(HALF_20)) u_aw_rx1 (
    .por, .req_a(rx1a_req), .ack_a(rx1a_ack), .data_in(rx1a_data),
    .req_b(rx1_req_b), .ack_b(rx1_ack_b),
    .int_clk(rx1_int_clk), .data_l(rx1_data_l), .datav_in(rx1_datav_in), .datav_out(rx1_datav_out),
    .st(st[2]), .lclk_run(run[2])
  );

  logic                fb_req, fb_ack;
  logic [DATA_W-1:0]   fb_data;
  logic                j_req, j_ack;
  logic [2*DATA_W-1:0] j_data;

  token_join #(.W_A(DATA_W), .W_B(DATA_W)) u_join (
    .por, .en_b(fb_en),
    .req_a(act_req), .ack_a(act_ack), .data_a(act_data),
    .req_b(fb_req), .ack_b(fb_ack), .data_b(fb_data),
    .req_o(j_req), .ack_o(j_ack), .data_o(j_data)
  );

  logic rx2_req_b, rx2_ack_b;
  async_wrapper #(.DATA_W(2*DATA_W), .TIMEOUT_N(4), .FLUSH_K(8), .RING_HALF_NS(HALF_20)) u_aw_rx2 (
    .por, .req_a(j_req), .ack_a(j_ack), .data_in(j_data),
    .req_b(rx2_req_b), .ack_b(rx2_ack_b),
    .int_clk(rx2_int_clk), .data_l(rx2_data_l), .datav_in(rx2_datav_in), .datav_out(rx2_datav_out),
    .st(st[3]), .lclk_run(run[3])
  );

  // Rx_TRA: wrapper plus its FIFO
  logic              tra_clk, tra_dv_in, tra_dv_out, tra_req_b, tra_ack_b;
  logic [DATA_W-1:0] tra_dl, tra_dout;
  async_wrapper #(.DATA_W(DATA_W), .TIMEOUT_N(8), .FLUSH_K(BURST + 2), .RING_HALF_NS(HALF_80)) u_aw_rxtra (
    .por, .req_a(rx2_req_b), .ack_a(rx2_ack_b), .data_in(rx2_data_out),
    .req_b(tra_req_b), .ack_b(tra_ack_b),
    .int_clk(tra_clk), .data_l(tra_dl), .datav_in(tra_dv_in), .datav_out(tra_dv_out),
    .st(st[4]), .lclk_run(run[4])
  );
  rx_tra #(.DATA_W(DATA_W), .BURST(BURST)) u_rx_tra (
    .clk(tra_clk), .por, .din(tra_dl), .din_v(tra_dv_in), .dout(tra_dout), .datav_out(tra_dv_out)
  );

  logic rx3_req_b, rx3_ack_b;
  async_wrapper #(.DATA_W(DATA_W), .TIMEOUT_N(8), .FLUSH_K(8), .RING_HALF_NS(HALF_80)) u_aw_rx3 (
    .por, .req_a(tra_req_b), .ack_a(tra_ack_b), .data_in(tra_dout),
    .req_b(rx3_req_b), .ack_b(rx3_ack_b),
    .int_clk(rx3_int_clk), .data_l(rx3_data_l), .datav_in(rx3_datav_in), .datav_out(rx3_datav_out),
    .st(st[5]), .lclk_run(run[5])
  );

  // fork: Rx3 output to Rx_int and to the feedback FIFO
  logic              fk_req0, fk_ack0, fk_req1, fk_ack1;
  logic [DATA_W-1:0] fk_data;
  token_fork #(.DATA_W(DATA_W)) u_fork (
    .por, .req_i(rx3_req_b), .ack_i(rx3_ack_b), .data_i(rx3_data_out),
    .req_o0(fk_req0), .ack_o0(fk_ack0), .req_o1(fk_req1), .ack_o1(fk_ack1), .data_o(fk_data)
  );

  pipeline_sync #(.DATA_W(DATA_W)) u_rx_int (
    .por, .req_a(fk_req0), .ack_a(fk_ack0), .data_in(fk_data),
    .clk(host_clk), .dout(rx_data), .dout_v(rx_valid)
  );

  fifo_ta #(.DATA_W(DATA_W), .DEPTH(BURST)) u_fifo_ta (
    .por, .req_a(fk_req1), .ack_a(fk_ack1), .data_in(fk_data),
    .req_b(fb_req), .ack_b(fb_ack), .data_out(fb_data)
  );
endmodule
