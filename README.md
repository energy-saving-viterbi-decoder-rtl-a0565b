# A switching Viterbi receiver for a K=7, rate-1/2 convolutional code

A Viterbi decoder does the same large amount of work for every received bit:
64 add-compare-select operations, a 64-bit survivor column and a traceback.
It does that even when the channel is clean and there is nothing to correct. A
mobile receiver often sees long error-free stretches. During those stretches
this receiver decodes with a much cheaper circuit, a **Simple Decoder** made of
six flip-flops and a few XOR gates. The full Viterbi datapath is switched on
only when that circuit sees an error. The Viterbi decoder then gives control
back once its path metric shows that errors have stopped.

The RTL here is the whole transmit and receive chain for one packet:

- a random data source with a zero tail;
- the (171,133) K=7 convolutional encoder;
- the switching receiver: the Simple Decoder, an adapted hard-decision
  traceback Viterbi decoder, the controller that moves decoding between them,
  and the buffers they share.

Modulation, the radio channel and demodulation are not part of it. The
receiver takes hard-decision code symbols, one per slot.

## The code and the state convention

Each data bit `u` meets six flip-flops, FF1 (the previous bit) to FF6. Each
bit gives two code bits:

| output | taps                  | octal | order on the line |
|--------|-----------------------|-------|-------------------|
| lower  | u, FF1, FF2, FF3, FF6 | 171   | first             |
| upper  | u, FF2, FF3, FF5, FF6 | 133   | second            |

The trellis state is `{FF1,...,FF6}` with FF1 as the most significant bit.
The successor of state `s` for bit `u` is `{u, s[5:1]}`. State `n` has two
predecessors, `{n[4:0],0}` and `{n[4:0],1}`. In the state after a slot, FF1
(the MSB) is the bit that was decoded for that slot. All of this lives in
`vit_pkg`, which also holds the packet size: 10,000 data bits plus six zero
tail bits, so 10,006 slots.

A code symbol is a packed `sym_t {upper, lower}`, and both bits of a slot
travel together. The 1:2 demultiplexer of a serial line is therefore just the
bit order of this struct.

## The Simple Decoder: inverting the encoder

An encoder output bit is `u XOR f(FF)`, where `f` is the XOR of the taps. If
the receiver's flip-flops hold the same values as the transmitter's, then
`rx XOR f(FF)` gives `u` back. The Simple Decoder does this for both code
bits of a slot:

- If the two results agree, the lower one is the decoded bit. It is shifted
  into FF1, so the flip-flops keep tracking the encoder.
- If they disagree, a bit error has happened. It may be in this slot or up to
  six slots earlier, because a wrong bit fed back into FF1 only shows up when
  the taps reach it.

Some error patterns flip both outputs the same way and are never noticed. On
a K=7 code such a pattern needs more errors in a short window than a
hard-decision Viterbi decoder could correct anyway. Missing it therefore
costs nothing that a Viterbi decoder would have saved.

The decoder also keeps the encoder state of each of the last seven slots in
`hist[0..7]` (`hist[0]` is the present state). With that record the
controller can restart the Viterbi decoder seven slots back without redoing
any work.

## Handing over: the seven-slot wind-back

When the Simple Decoder flags a mismatch, the controller (`switching_controller`):

1. Winds back `min(bits decoded in this run, 7)` slots.
2. Reads the state the Simple Decoder recorded for that slot (`rewind_state`).
3. Starts the Viterbi decoder at that slot from that state.

The bits the Simple Decoder wrote for those slots stay in the output buffer
until the Viterbi decoder writes over them. Seven slots is the reach of the
code's memory, so the Viterbi decoder sees every symbol that could hold the
error.

If the Simple Decoder ran for fewer than seven bits, the wind-back stops at
the point where it was loaded. That point's state is exactly the state the
Viterbi decoder handed over at its last switch back.

## The adapted Viterbi decoder

`adapted_viterbi_decoder` is a textbook hard-decision traceback decoder with
two changes:

- **Start state.** A run starts at any slot from a given state. That state
  gets path metric 0 and all others the saturated maximum. This is the same as
  the usual "state 0 has metric 0, the rest infinity" rule, but placed
  mid-packet.
- **It can stop itself.** See the next section.

The datapath is built from these blocks:

- `branch_metric_unit`: four Hamming distances (0..2), one for each possible
  code symbol.
- `acs_array`: 64 add-compare-select units.
  - On a tie the higher predecessor survives.
  - Metrics are 8-bit and saturating.
  - Each slot, the minimum is subtracted, so the stored minimum is always 0.
- `global_winner`: a linear search for the least metric, with the lowest
  index winning ties. Its output serves two purposes: it is the normalisation
  value, and it is the start of the traceback.
- `survivor_memory`: a circular buffer of 34 decision columns. It is addressed
  relative to the newest column.
- `traceback_unit`: walks the window from the global winner, one column per
  cycle, and emits each path state's MSB as the bit of that slot.

A run has three phases:

| phase  | what happens                                          | cycles |
|--------|-------------------------------------------------------|--------|
| fill   | ACS only, until 34 decision columns are held          | 1 per slot (34 in all) |
| steady | ACS, then a full traceback; emits the oldest slot's bit | 36 per slot (1 + 34 + 1) |
| flush  | at the packet end, one last traceback emits the rest of the window | about 35 |

The traceback depth is 35 trellis states, five times the constraint length,
so it spans 34 decision columns.

The decoder reads symbols by slot number from the receive buffer. It stalls
(`vd_stall`) whenever it needs a slot that has not arrived yet.

## Deciding that the errors have stopped

After the first decode of a run, `metric_monitor` counts consecutive slots in
which the global winner's metric did not grow. Because metrics are
normalised, that growth is simply the minimum of the new metrics. On an
error-free channel the correct path gains nothing, so the count climbs.
Any growth resets it.

The threshold is 21 slots. With 7 slots (as in the first description of the
scheme) the receiver went back too early and passed wrong states on at low
SNR. Waiting 35 slots matched a plain Viterbi decoder but switched less
often. 21 slots kept the plain decoder's error rate.

When the count reaches 21, the run ends with `switch_back`. The Simple
Decoder is loaded with the traceback state that produced the last decoded bit
(`end_state`). It resumes at the next slot (`end_pos`).

The switch-back criterion can be fooled by long error bursts that keep the
minimum metric flat. In that case the Viterbi decoder was not correcting that
stretch anyway, so nothing is lost.

## Packet ends

The end of a packet is decoded by the Viterbi decoder in every case:

- The controller hands over to the Viterbi decoder as soon as fewer than
  `SD_GUARD` = 29 slots would remain (decoded position + 29 > packet length). In the
  statistics this counts as an end hand-over.
- The Viterbi decoder switches back only while more than `END_GUARD` = 41
  slots (traceback depth + tail) remain after its position. This way, an
  error near the end always finds a full traceback window.

When the last slot has been read, the decoder flushes its window from the
global winner. The six zero tail bits end the packet in state 0.

## Buffers, stalls and activity

- `rx_symbol_buffer` holds a whole packet of symbols, 10,006 × 2 bits.
  - It has two read ports, one per decoder.
  - The packet has to be held because the Viterbi decoder is up to 36 times
    slower than the line, and because a wind-back reads slots again.
  - A symbol beyond the buffer's size raises `rx_overflow`.
- `decoded_buffer` holds one decoded bit per slot, and a flag telling which
  decoder produced it (`rd_by_sd`). It is written by slot number, so the
  Viterbi decoder can overwrite bits after a wind-back.
- Only one decoder works at a time. `sd_on` and `vd_on` show which one; the
  idle one holds its state. The saving comes from how rarely `vd_on` is high
  for bits the Simple Decoder could have handled. A Simple Decoder slot costs
  one cycle on a few gates. A Viterbi slot costs 36 cycles through 64 ACS
  units and a 64-bit survivor column.

The per-packet `stats` output (`sw_stats_t`) has six counters:

- `sd_calls` and `vd_calls`: runs of each decoder;
- `sd_bits` and `vd_bits`: bits kept from each;
- `full_rewinds`: wind-backs of the full seven slots;
- `end_switches`: hand-overs forced by the packet end.

## Top level and interface

`viterbi_fec_top` places the transmitter and the receiver side by side.

**Transmitter:**

- `tx_start` with `tx_data_bits` and `tx_seed` sends a packet.
- `tx_sym` and `tx_valid` give one symbol per cycle while `tx_ready` is high.
- `tx_data_bit` and `tx_data_valid` expose the data bits for checking.

**Receiver:**

- `rx_start` with `rx_pkt_len` (data bits + 6) begins a packet.
- Symbols are then written with `rx_valid` and `rx_sym` at any rate up to one
  per cycle.
- After `rx_done`, the decoded bits are read with `rx_rd_addr`, `rx_rd_bit`
  and `rx_rd_by_sd`.
- Reset is active-low and asynchronous (`rst_n`). There is one clock.

Synthesised with yosys (coarse synthesis, memories kept as memory cells), the
top comes to about 1,430 cells, 870 flip-flop bits and 42,200 bits of memory.
Nearly all of the memory is the two packet buffers.

## Where this RTL departs from the reference model

The scheme was worked out as a software model. The RTL keeps its decoding
rules and settings, and changes the following:

- **The Simple Decoder keeps the last seven states, not the last 14 received
  bits.** The hand-over state is then available at once.
- **The whole packet is buffered**, because the Viterbi decoder is a
  multi-cycle circuit here. A software call has no such limit.
- **ACS with unreachable states.** In the reference model, a comparison
  against an "infinite" metric could set a decision bit the wrong way.
  Here, unreachable candidates are just large saturated values, and the
  decisions are those of a standard decoder.
- **Flush bookkeeping.** The decoder flags of the final bits are set simply
  (every bit the Viterbi decoder writes is flagged as its own). The reference
  model marks one boundary bit differently. The decoded bits are the same.
- **Tie rules.** The higher predecessor wins in the ACS, as in the reference.
  The lowest state index wins for the global winner, which the reference does
  not specify.
- **Threshold reading.** The written description says "more than 21" slots,
  while the reference code switches at a count of 21. The code is followed.
- **Worked example.** The nine-error worked example of the Simple Decoder has
  an entry for slot 7 that does not follow the XOR rule. The test bench uses
  the value the rule gives.

Not built: the QPSK modulator and demodulator, the AWGN channel, and the
energy and timing measurements of the original study. They are signal-domain
or measurement parts; the receiver's interface starts at hard decisions.

## Verification

Every module has a self-checking test bench in `tb/`. Each one compares the
module with a model written independently of the RTL, and each ends with a
`TB_RESULT checks=N failures=M` line and a watchdog:

- **Encoder.** Checked against generator-mask encoding and a worked example
  (message `11101010` → `1101101011001011`).
- **Simple Decoder.** Checked on a nine-error pattern that it cannot detect,
  plus random error-free and single-error runs, and its wind-back states.
- **ACS array.** Checked against a forward-trellis model with unbounded
  metrics.
- **Traceback.** Checked against a predecessor walk.
- **Adapted Viterbi decoder.** It must:
  - switch back exactly 22 slots after a clean start, with the true state;
  - take 36 cycles per steady-state slot;
  - flush correctly near the packet end;
  - correct isolated errors across restarts;
  - stall when symbols are missing.
- **Controller.** Driven through a scripted packet: full and short
  wind-backs, an error right after a switch back, the end hand-over, and a
  stall.
- **Receiver.** Four 1,006-slot packets with isolated correctable error
  events at random symbol rates. Every bit must decode correctly.
- **`tb_viterbi_fec_top`.** The full-size end-to-end test, at default
  parameters.
  - The first packet is 10,000 bits with error events in its middle third.
  - Three 1,000-bit packets follow, with errors spread through them.
  - Every decoded bit is compared with the transmitted data, and the encoder
    with a reference encoder.
  - It counts each mechanism and fails if one never happens: mismatch
    hand-overs, full and short wind-backs, switch backs, end hand-overs, and
    stalls of both decoders.

  In the 10,000-bit packet, the Simple Decoder decodes 8,848 bits and the
  Viterbi decoder 1,158, in 51,738 cycles. Decoding the whole packet with the
  Viterbi decoder would take about 360,000 cycles. The whole test runs in a
  few seconds.

Each test bench was also run against a copy of its module with one deliberate
bug. Every such bug made checks fail.

**Forced switching (`tb_forced_switching`).** The controller has a test mode,
`FORCE_EVERY` = N, which is 0 (off) by default. In this mode the Simple
Decoder hands over after every N bits as if it had seen an error. With N = 7
on an error-free channel, every hand-over in both directions is exercised.

- Each Simple Decoder run of seven bits is wound back.
- The Viterbi decoder then decodes 22 slots and returns.
- The 10,006-slot packet therefore takes 453 Viterbi runs,
  (10,006 − 41) / 22.
- Every bit comes out right, which shows that the state hand-over itself
  loses nothing.

**Channel sweep (`tb_channel_sweep`).** This test compares the switching
receiver with a decoder that never switches off. Each packet is 10,000 bits.
It passes through a binary symmetric channel, which inverts each code bit
independently with probability p; this is the hard-decision view of a noisy
channel. The reference is a plain traceback Viterbi decoder written in the
test bench, with the same depth and tie rules, running over the same received
symbols.

| code-bit error rate p | about Eb/N0 (hard-decision QPSK) | bit errors, switching | bit errors, reference | bits that differ | decoded by Simple Decoder | Viterbi runs | cycles |
|------|--------|----|----|---|--------|-----|---------|
| 0     | –       | 0  | 0  | 0 | 99.65% | 1   | 10,122  |
| 0.001 | 9.8 dB  | 0  | 0  | 0 | 95.81% | 18  | 24,276  |
| 0.005 | 8.2 dB  | 0  | 0  | 0 | 79.55% | 84  | 83,968  |
| 0.01  | 7.3 dB  | 0  | 0  | 0 | 64.11% | 135 | 140,162 |
| 0.02  | 6.3 dB  | 0  | 0  | 0 | 33.90% | 189 | 248,120 |
| 0.04  | 4.9 dB  | 9  | 9  | 0 | 11.30% | 138 | 325,075 |
| 0.06  | 3.8 dB  | 77 | 77 | 0 | 1.78%  | 74  | 355,749 |

The Eb/N0 column uses the usual relation p = Q(√(Eb/N0)) for rate 1/2 with
hard decisions. It is only a guide.

- **Output.** At every rate the two decoders produce the same bits, so
  switching cost no error correction.
- **Simple Decoder share.** Its share of the bits falls steadily as the
  channel gets worse.
- **Cycle count.** It falls from about 36 per bit toward 1 per bit as the
  channel gets cleaner.
- **Checks.** The test requires that:
  - every packet completes;
  - a clean channel is decoded exactly, with the Viterbi decoder only at the
    packet end;
  - the Simple Decoder's share does not rise with p;
  - over the sweep, the switching receiver makes at most 5% (+5 bits) more
    errors than the reference.

The same symbols also go to two more receivers with the other switch-back
settings, 7 and 35 quiet slots. All three make exactly the same bit errors at
every rate (86 in total across the sweep). Where errors are sparse
(p ≤ 1%), the Simple Decoder's share of the bits falls as the wait grows:

| wait before switching back | bits decoded by the Simple Decoder |
|----------------------------|------------------------------------|
| 7 slots                    | 37,493                             |
| 21 slots                   | 33,933                             |
| 35 slots                   | 32,830                             |

Above 1% the Viterbi decoder dominates and this order no longer holds.

The original evaluation, on a modulated noisy channel, reported a few errors
with the 7-slot setting at low SNR. That result does not show up here. A
likely reason is the hand-over state: it is taken from the oldest end of the
35-state traceback window, where the survivor paths have already merged, so
it is right even after a short quiet spell. The 21-slot default is kept
because that was the evaluated choice.

The error-rate curves over a real modulated channel with soft noise were not
simulated. The receiver has no soft-decision input.

## Simulating

Any test bench builds with plain verilator 5. List the package first:

```
verilator --binary --timing -Wno-fatal --top-module tb_viterbi_fec_top \
    rtl/vit_pkg.sv $(ls rtl/*.sv | grep -v vit_pkg) tb/tb_viterbi_fec_top.sv
./obj_dir/Vtb_viterbi_fec_top
```

Replace `tb_viterbi_fec_top` with `tb_<module>` for one block. These are the
parameters worth changing:

| parameter | where | default | meaning |
|-----------|-------|---------|---------|
| `SWITCH_BACK` | `switching_decoder`, `adapted_viterbi_decoder` | 21 | quiet slots before handing back |
| `DEPTH` | `adapted_viterbi_decoder` | 35 | traceback depth in trellis states |
| `END_GUARD` | `adapted_viterbi_decoder` | 41 | no switch back this close to the end |
| `SD_GUARD` | `switching_controller` | 29 | Viterbi takes over this close to the end |
| `DEPTH` | `switching_decoder`, buffers | 10,006 | packet size in slots |
| `PM_W` | metric path | 8 | path-metric width |
| `FORCE_EVERY` | `switching_decoder`, `switching_controller` | 0 | test mode: hand over after every N Simple Decoder bits |

`MAX_SLOTS` and `LEN_W` in `vit_pkg` bound the packet size; raise them
together.
