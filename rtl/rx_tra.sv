// rx_tra: locally synchronous part of the receiver's token-rate adaptation
// block (20 -> 80 Msps), a synchronous FIFO of BURST entries clocked by the
// wrapper's INT_CLK. In request-driven mode every valid input token
// (DATAV_IN) is written. Once a complete burst of BURST tokens (one OFDM
// symbol's 48 samples) is stored, the block starts sending: each following
// clock edge moves one entry into the output register, until the FIFO is
// empty. The wrapper's time-out has by then switched INT_CLK to the local
// oscillator, so the burst leaves at the local rate. DATAV_OUT is high
// before the edge that loads a valid word into DATA_OUT, as the wrapper's
// output port requires. Writes during sending are accepted while there is
// room. The FIFO organisation and the "burst complete" trigger follow the
// published block description; the counters and pointer scheme are ours.
// por is an asynchronous, active-high reset.
`timescale 1ns/1ps
module rx_tra #(
  parameter int unsigned DATA_W = 16,
  parameter int unsigned BURST  = 48
) (
  input  logic              clk,
  input  logic              por,
  input  logic [DATA_W-1:0] din,
  input  logic              din_v,
  output logic [DATA_W-1:0] dout,
  output logic              datav_out
);
  localparam int unsigned AW = $clog2(BURST);
  localparam int unsigned CW = $clog2(BURST + 1);
  logic [DATA_W-1:0] mem [BURST];
  logic [AW-1:0]     wp, rp;
  logic [CW-1:0]     cnt;
  logic              sending, do_send, do_write;

  assign do_send   = sending && (cnt != '0);
  assign do_write  = din_v && ((cnt != CW'(BURST)) || do_send);
  assign datav_out = do_send;

  function automatic logic [AW-1:0] inc(input logic [AW-1:0] p);
    return (p == AW'(BURST - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_write) mem[wp] <= din;
    if (do_send)  dout    <= mem[rp];
  end

  always_ff @(posedge clk or posedge por) begin
    if (por) begin
      wp <= '0; rp <= '0; cnt <= '0; sending <= 1'b0;
    end else begin
      if (do_write) wp <= inc(wp);
      if (do_send)  rp <= inc(rp);
      cnt <= cnt + CW'(do_write) - CW'(do_send);
      if (!sending && (cnt + CW'(do_write) == CW'(BURST))) sending <= 1'b1;
      else if (sending && (cnt - CW'(do_send) == '0) && !do_write) sending <= 1'b0;
    end
  end
endmodule
