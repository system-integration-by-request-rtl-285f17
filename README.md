# Request-driven GALS wrappers for a WLAN baseband processor

A synchronous signal-processing block normally runs from a free-running
clock, whether or not it has anything to do. Here, each block keeps its
synchronous design but is placed inside an **asynchronous wrapper**. The
wrapper clocks the block only when there is work:

- **While a burst of data tokens arrives**, each incoming four-phase
  handshake produces exactly one clock edge. The block runs at its
  sender's pace, with no synchronisers and no idle clock.
- **When the input goes quiet**, a local pausable ring oscillator takes
  over for a fixed number of cycles to push the last data out of the
  block's pipeline.
- **After that flush**, the oscillator stops and the block draws no clock
  power until the next token arrives.

This RTL contains the wrapper and the asynchronous glue that ties several
wrapped blocks into a GALS (globally asynchronous, locally synchronous)
IEEE 802.11a baseband transmitter and receiver. The WLAN signal-processing
blocks themselves (FFT, Viterbi decoder, synchroniser, and so on) are not
included. Each wrapper exposes its locally synchronous (LS) side as ports,
so real or model blocks can be attached.

## The wrapper (`async_wrapper`)

```
            REQ_A/ACK_A/DATA_IN                    REQ_B/ACK_B (+ DATA_OUT of LS)
                   |                                         ^
   timeout_gen --- input_port --REQ_INT--+--INT_CLK--> LS --- output_port
        |   ST         |  DLE            |                    | stretch
        |          data_latch            |                    v
        +--- clock_control --STOPI--> pausable_clock --LCLK-- AND ST = LCLKM
```

The LS clock is `INT_CLK = REQ_INT | (LCLK & ST)`, delayed by a clock-tree
delay. The wrapper has four modes of operation.

### Request-driven mode

- The input controller answers each input request with an internal pulse,
  `REQ_INT`, which is the LS clock edge.
- The edge is completed when the output side returns `ACK_INT`. That
  happens at once if the LS module has no valid output this cycle, or
  after an output handshake if it has.
- Every handshake resets the time-out counter.

### Time-out and flush mode

- `timeout_gen` counts local-oscillator cycles since the last handshake.
  After `TIMEOUT_N` of them it raises `ST`.
- `LCLK` then reaches the LS module through `LCLKM`.
- `clock_control` counts the local cycles. After `FLUSH_K` of them it asks
  for a stop (`STOPH`).
- Once the stop is arbitrated against a possible new request, `STOPI`
  halts the ring. The next `REQ_INT` restarts it.

### Transitional mode

- A request that arrives while the local clock runs must not collide
  with a local edge.
- The input controller pauses the oscillator (`REQI1`/`ACKI1`), lets the
  current local cycle finish, acknowledges the sender, and drops back to
  request-driven mode.
- The local clock's acknowledges are kept from the controller while this
  is set up (the gate `ACKC = ACK_INT & (ACKEN | !ST)`).

### Output stretching

While an output handshake is open (`REQ_B | ACK_B`), the output port holds
the oscillator's second pause request. A slow receiver therefore stretches
the local clock instead of losing data.

### The controllers

The input and output controllers are burst-mode asynchronous state
machines. They are written as their next-state equations, one gate delay
each, with the state held in feedback nets:

- The output controller's equations are used as published.
- Two of the input controller's equations are read in a particular way;
  see "Departures" below.

### Arbitration

All races between independent events go through mutual-exclusion
elements (`mutex`):

- request against time-out
- request against stop
- each pause request against the ring

`pausable_clock` is the classic pausable ring:

- a NOR with `STOPI`
- a delay line of `HALF_NS`
- a C-element that combines the ring phase with the grants of the two
  arbiters

Its period is `2*(HALF_NS + 3 gate delays)`. The default half period of
6.0 ns gives about 80 MHz; 24.6 ns gives about 20 MHz.

## Data timing: the hardest part

The input is a *broad* four-phase channel: the sender keeps `DATA_IN`
valid from `REQ_A` rising until `ACK_A` falls.

**Latch enable.** The wrapper does not open its input latch on the
request. The latch-enable signal `DLE` is a short pulse (`T_PULSE`,
0.15 ns) starting `T_DLE` (0.35 ns) after `ACK_A` rises. It captures the
data while they are guaranteed stable and sets `DATAV_IN`. The next local
clock edge clears `DATAV_IN`.

**Pipeline lag.** Because of this, the LS module sees each token at the
clock edge *after* the one its own handshake produced. The request-driven
clock is therefore always one token behind the data, and the last token
of a burst is taken in by the first edge of the flush. Consequences:

- Every burst must be followed by a flush, which the wrapper always does.
- An LS model must treat `DATAV_IN` as "the latched data are new at this
  edge".

**Output side.** On the output side, `DATAV_OUT` must say whether the
data that the coming edge registers into `DATA_OUT` are valid. The output
port samples it on `INT_CLK`, and the output handshake then carries
`DATA_OUT` straight from the LS module.

**Timing assumptions.** The design relies on these to be correct:

1. Senders hold data for at least `T_DLE + T_PULSE` after `ACK_A` rises.
   Every producer in this design does: the wrappers' own outputs, the
   FIFO_TA output stage, and the join.
2. The LS clock tree (`T_TREE`) is longer than the gate that releases the
   output flip-flops' reset.
3. The asynchronous controllers see their inputs change one burst at a
   time. Each equation is one gate, so inputs should not change faster
   than a few gate delays.

The wrapper checks rule 1 and the four-phase order of its input channel
with simulation assertions.

All delays are in `gals_pkg`. They are placeholders, not characterised
values: changing them changes the margins above, and the testbenches are
the way to re-check them.

## The baseband processor (`gals_baseband`)

**Transmitter.** Tokens from the synchronous Tx1 front end (80 Msps) go
to the following wrappers in turn:

1. **AW Tx2**: pilot insertion; ring about 20 MHz; flushes 16 cycles.
2. **AW Tx3**: IFFT and guard/preamble insertion; 72 local cycles per
   symbol after its last input.
3. **Tx_int**: a pipeline synchroniser into the DAC clock domain, one
   word per DAC clock.

**Receiver.** The receiver is a ring:

- The activation stream (ADC samples, one token per sample) feeds
  **AW Rx1**.
- Through a **join**, it also feeds **AW Rx2** (about 20 Msps).
- Rx2 feeds **AW Rx_TRA**, which wraps `rx_tra`. This synchronous FIFO
  collects a 48-token symbol at 20 Msps and resends it with its own
  80 MHz oscillator once the whole burst is in.
- Rx_TRA feeds **AW Rx3** (80 Msps).
- A **fork** sends Rx3's output both to **Rx_int** (a pipeline
  synchroniser into the host clock domain) and to **FIFO_TA**.
- FIFO_TA is a latch-based asynchronous FIFO of 48 tokens. It holds the
  re-encoded symbol and returns it through the join, aligned with the
  next symbol's samples. The join therefore sets the receiver's pace to
  the activation rate.

**First symbol.** The first symbol of a frame has no fed-back tokens. The
input `fb_en` (low for the first symbol) lets the join pass the
activation stream alone.

**Ports.**

- The LS modules of Tx2, Tx3, Rx1, Rx2 and Rx3 are outside this RTL. For
  each one, the top brings out the module's side of the wrapper:
  `<blk>_int_clk`, `<blk>_data_l`, `<blk>_datav_in` (outputs), and
  `<blk>_data_out`, `<blk>_datav_out` (inputs).
- `st[5:0]` and `run[5:0]` show each wrapper's time-out state and whether
  its oscillator runs. Bit order: tx2, tx3, rx1, rx2, rx_tra, rx3.

Top-level parameters:

| Parameter | Default | Meaning |
|---|---|---|
| `DATA_W` | 16 | token width (own choice) |
| `BURST` | 48 | tokens per OFDM symbol: Rx_TRA depth and FIFO_TA depth (published) |
| `TX3_FLUSH_K` | 72 | local cycles Tx3 runs after a symbol (published) |
| `HALF_20`, `HALF_80` | 24.6, 6.0 ns | ring half periods for about 20 and 80 MHz (own choice) |

## Power-on reset

Self-timed state machines have no defined start state. `por` (active
high) forces every controller equation to its idle value, resets every
flip-flop and C-element, and leaves the oscillators stopped.

Assert `por` with a rising edge after time zero: pulse it 0 → 1 → 0. The
flip-flops use asynchronous reset on the edge of `por`, so a `por` that
starts at 1 has no edge and resets nothing. All handshake inputs must be
low during reset.

## Departures from the published design, and own choices

- **`REQ_INT` equation.** The third term of the input controller's
  `REQ_INT` equation uses `!ACKEN`. This matches the same term in the
  `ACK_A` and `RST` equations and the state graph, where the first
  request raises `REQ_INT` with `ACKEN` low.
- **`REQI1` equation.** The pause-request equation is
  `REQI1 = REQ_A1 & !ACKC & ST & !ACKEN`.
- **`ACKC` gating.** The gating `ACKC = ACK_INT & (ACKEN | !ST)` and the
  `DLE` pulse scheme are this design's choice; only the gates' presence
  is published.
- **Power-on reset.** `por` is added throughout.
- **Counts and delays.** Time-out and flush counts other than Tx3's 72,
  ring periods, and all delays are own choices.
- **Decoupling circuitry.** The published design mentions extra
  decoupling circuitry in Tx2 and Rx_TRA to guarantee that tokens from
  a strictly synchronous source are always absorbed. It is not
  described, so it is not built. Here every producer waits for its
  acknowledge.
- **Pipeline synchroniser.** `pipeline_sync` is a simple equivalent of
  pipeline synchronisation: a small FIFO with a Gray-coded write pointer
  and a two-flop synchroniser. Its full flag compares against the
  unsynchronised Gray-coded read pointer. Only one bit of that pointer
  changes per read, so the flag sees either the old value (still full,
  which is safe) or the new one. A flip-flop that samples it near the
  change could still go metastable, so this is a functional model rather
  than a hardened clock-domain crossing.
- **FIFO_TA stages.** FIFO_TA uses 2 × 48 Muller stages (a four-phase
  Muller pipeline holds one token per two stages). Its last latch stays
  closed until `ACK_B` falls.
- **Models.** `mutex` and `pausable_clock` are behavioural models. The
  mutex has no metastability, and ties go to `r1`. The ring has a fixed,
  not tunable, delay. They are written with delays and are not meant for
  synthesis.
- **Lint warnings.** Verilator reports `UNOPTFLAT`, `LATCH` and
  `PROCASSINIT` warnings on these parts. They are expected: the
  controllers are combinational loops by design, the data path uses
  latches, and the behavioural elements start from an initial value.

## Testbenches

Every block has a self-checking testbench `tb/tb_<module>.sv`. It prints
`TB_RESULT checks=N failures=M` and has a watchdog. `tb/ls_pipe_model.sv`,
`tb/hs_source.sv` and `tb/hs_sink.sv` are shared models: a pipelined LS
module, and a four-phase source and sink.

**`tb_async_wrapper`** covers:

- request-driven bursts (one LS edge per token)
- time-out, flush and stop
- a burst that arrives during the flush (transitional mode)

It checks order and values of all tokens.

**`tb_gals_baseband`** runs the whole processor at its default
parameters.

- *Transmitter:* two 8-token symbols at 80 Msps. The Tx2 model collects
  each symbol in request-driven mode and sends it to Tx3 with its own
  ~20 MHz clock; all 16 tokens must leave Tx2 in local-clock mode. The
  second symbol arrives while Tx3 still flushes its 72 cycles.
- *Receiver:* three 48-token symbols at 20 Msps through the ring.
- *Rx1:* a 16-token stream.
- *Checks:* every word at the DAC and host ports against a reference
  computed from the LS models.
- *Flush length:* an uninterrupted Tx3 flush must run exactly 72 local
  cycles from time-out to oscillator stop.
- *Rates:* Rx_TRA must resend a 48-token burst in less than half the time
  it took to arrive. In simulation it takes about 0.58 µs against 2.4 µs.
- *Mechanisms:* it counts how often each one happened, and counts a
  failure if any never did: time-out, oscillator stop, transitional
  hand-over, output clock stretch, join with feedback, and fork.

It simulates 18 µs in about one second.

## Simulating

With Verilator 5:

```
verilator --binary --timing -Wno-fatal --top-module tb_gals_baseband \
  -y rtl -y tb +libext+.sv rtl/gals_pkg.sv tb/tb_gals_baseband.sv
./obj_dir/Vtb_gals_baseband +verilator+rand+reset+2 +verilator+seed+7
```

Replace the testbench name to run any other block. Always list
`rtl/gals_pkg.sv` first. `+verilator+rand+reset+2` starts every
uninitialised variable at a random value. The designs are meant to pass
with any seed, which is a useful check on the reset logic.
