# Convolutional encoder and folded Viterbi decoder (K = 4, rate 1/2)

A forward-error-correction link in SystemVerilog: a rate-1/2 convolutional
encoder with constraint length 4 on the transmit side, and a hard-decision
Viterbi decoder on the receive side that reconstructs the data from a
corrupted symbol stream. Two ideas shape the hardware:

* the encoder is an explicit 8-state finite state machine whose transition
  table *is* the code trellis, instead of a shift register with XOR trees;
* the decoder's add-compare-select (ACS) work is **folded**: the eight ACS
  operations of a trellis stage are time-multiplexed onto a small number of
  hardware ACS nodes (one by default), trading throughput for area.

The design follows a published description of such a system for its block
structure, code and folding idea; widths, framing, handshakes, memory
organisation and timing were not specified there and are choices of this
implementation (listed under "Design choices and departures").

## The code

Generator polynomials, with Z the one-clock delay:

    G1 = 1 + Z + Z^2 + Z^3      (octal 17)
    G2 = 1 + Z^2 + Z^3

The state is the three previous input bits, written `{newest, middle, oldest}`.
Input bit `b` moves state `s` to `{b, s[2:1]}` and emits the symbol
`{c1, c2}` with `c1 = b^s2^s1^s0` (G1, upper bit) and `c2 = b^s1^s0`
(G2, lower bit). The full state diagram:

| state | in 0: symbol -> next | in 1: symbol -> next |
|-------|----------------------|----------------------|
| 000   | 00 -> 000            | 11 -> 100            |
| 001   | 11 -> 000            | 00 -> 100            |
| 010   | 11 -> 001            | 00 -> 101            |
| 011   | 00 -> 001            | 11 -> 101            |
| 100   | 10 -> 010            | 01 -> 110            |
| 101   | 01 -> 010            | 10 -> 110            |
| 110   | 01 -> 011            | 10 -> 111            |
| 111   | 10 -> 011            | 01 -> 111            |

The free distance of this code is 6, so isolated pairs of bit errors are
always corrected; denser errors may not be.

## Blocks

```
 tx_bit --> conv_encoder --> enc_code ==> [ channel, outside ] ==> rx_code
                                                                      |
             +--------------------- viterbi_decoder ------------------v-----+
             |  bmu --> acsu <--> pmm          acsu --> tbu --> dec_bit     |
             +--------------------------------------------------------------+
```

| file | role |
|------|------|
| `rtl/viterbi_pkg.sv` | code constants, `state_t`/`code_t`/`bm_t`, trellis and Hamming functions |
| `rtl/conv_encoder.sv` | FSM encoder, table above as a `case` over an enumerated state |
| `rtl/bmu.sv` | branch metric unit: Hamming distance to 00/01/10/11, registered |
| `rtl/acsu.sv` | folded add-compare-select, `ACS_UNITS` nodes |
| `rtl/pmm.sv` | path metric memory, two banks of 8 metrics |
| `rtl/tbu.sv` | survivor memory, trace-back, output buffer |
| `rtl/viterbi_decoder.sv` | the decoder and its controller |
| `rtl/conv_viterbi_system.sv` | top: encoder and decoder side by side |

The channel (the medium and its noise) is not hardware, so the top brings out
the encoder output (`enc_valid`, `enc_code`) and the decoder input
(`rx_valid`, `rx_ready`, `rx_code`) as separate ports; connect them directly
for a loopback, or through a channel model.

## How the folded decoder works

### One trellis stage

For every received symbol the decoder performs one trellis stage:

1. **BMU.** The symbol is accepted (`sym_valid && sym_ready`) and the four
   Hamming distances to 00, 01, 10, 11 are registered. They stay constant for
   the rest of the stage.
2. **Folded ACS.** New state `n` has the predecessors `p0 = {n[1:0],0}` and
   `p1 = {n[1:0],1}`, both entered with input bit `n[2]`. The ACS for `n`
   computes `PM[p0] + BM(code(p0,n[2]))` and `PM[p1] + BM(code(p1,n[2]))`,
   keeps the smaller (p0 on a tie) as the new `PM[n]` and outputs the survivor
   bit (0 for p0, 1 for p1). With `ACS_UNITS = U` hardware nodes the eight
   states are served in `8/U` fold steps: in fold step `j`, node `u` serves
   state `j*U + u`. With the default `U = 1` the stage takes 8 clocks and one
   adder pair, one comparator and one multiplexer do all the work.
3. **Survivor row.** Survivor bits from the earlier fold steps are collected in
   a register; in the last fold step the full 8-bit row, including that step's
   bits, is written to the survivor memory at the stage index, and the path
   metric banks are swapped.

So a symbol is taken at most once every `1 + 8/U` clocks (9 at the default).

### Why the path metric memory has two banks

Folding spreads one stage over several clocks. State 0's new metric is written
in fold step 0, but the old metric of state 0 is still needed later in the
same stage (it is a predecessor of state 4). In folding terms, the value
produced by node X in step x of iteration l is consumed by node Y in step y of
iteration l+1, which needs `D = M*1 - P + y - x` storage clocks with fold
factor M = 8 and no pipelining (P = 0): up to 15 clocks, longer than a stage.
The simplest storage that covers every such arc is a second bank: ACS reads
only the current bank and writes only the other one, and `swap` at the end of
the stage exchanges them. 2 x 8 metrics of `PM_W` bits.

### Frames and trace-back

The decoder works on frames of `FRAME_LEN` symbols (default 64). Each frame
must start in encoder state 000: the sender either ends each frame with three
zero data bits (trellis termination, which also protects the last data bits),
or pulses the encoder's `clear` between frames. The path metric memory is
initialised with 0 for state 000 and `INIT_PM` (8) for all others.

After the last stage of a frame the controller picks the state with the
smallest path metric (lowest state number on a tie), reports that metric on
`best_pm_o` with `best_pm_valid`, and starts the trace-back unit. When
decoding succeeds the best metric is exactly the number of channel bit errors
that were corrected, which makes it a useful link-quality figure.

The trace-back walks the survivor memory from the last stage to the first,
one stage per clock: the decoded bit of stage t is the top bit of the current
state, and the previous state is `{state[1:0], row[t][state]}`. The survivor
memory has a registered read port (it maps onto a block RAM); the controller
reads one row ahead of the walk. Because the bits come out last-first, they
are put into a 64-bit buffer and then sent in order, one per clock, on
`out_bit` with `out_valid`, `out_last` on the last one.

While the survivor memory is being traced, `sym_ready` is low. The output
phase of one frame overlaps the reception of the next frame.

Path metrics are not normalised; `PM_W = clog2(INIT_PM + 2*FRAME_LEN + 1)`
(8 bits by default) is wide enough that no metric can overflow within a frame.

### Timing summary (defaults)

| event | clocks |
|-------|--------|
| encoder: input bit to code symbol | 1 |
| decoder: per received symbol | 1 accept + 8 fold steps |
| end of frame: best-state pick | 1 |
| trace-back | 64 |
| output of the frame's 64 bits | 64, starting 65 clocks after the trace starts |
| frame period with symbols offered back to back | 64 x 9 + 1 + 64 = 641 |

## Parameters

| parameter | default | where | meaning |
|-----------|---------|-------|---------|
| `ACS_UNITS` | 1 | decoder, top | hardware ACS nodes; 1, 2, 4 or 8 (8 = no folding) |
| `FRAME_LEN` | 64 | decoder, top, tbu | symbols per frame (any value >= 2) |
| `INIT_PM` | 8 | decoder, top, pmm | start metric of the states other than 000 |

Constraint length, polynomials and rate are constants of `viterbi_pkg`; the
encoder's table is written for this code only.

## Design choices and departures

Taken from the description this design implements: constraint length 4,
rate 1/2, the two generator polynomials, the 8-state FSM encoder and its
transition labels, the decoder's split into BMU, ACSU, PMM and TBU with
the ACSU/PMM loop, the use of trace-back, and time-multiplexing of the ACS
operations onto shared hardware (folding).

Choices of this implementation:

* hard decision (Hamming distance); no soft-decision (Euclidean) metric;
* one ACS node by default; no folding factor was specified;
* frame-based decoding with trace-back over the whole frame from the best
  state; no sliding-window trace-back and no register-exchange survivor
  management;
* two-bank path metric memory; no metric normalisation;
* valid/ready input handshake on the decoder, no backpressure on its output
  or on the encoder;
* synchronous active-low reset in every block, encoder `clear` input.

Reported results of the original design that this RTL does not reproduce:
decoded failure rates of 0.13-0.20 % at channel bit error rates of 0-20 %.
A K = 4 hard-decision code cannot reach that: the included BER test measures
0 decoded errors at 0 %, about 6-7 % residual bit errors at 10 % and about
30 % at 20 % channel bit errors (300 frames of 61 data bits each). Results
quoted against SNR cannot be related to this decoder, since the modulation
and channel behind them are not known. FPGA resource, delay and power figures
were not re-measured; after generic synthesis the default design has about 61
flip-flop bits and 704 memory bits (512 survivor, 128 path metric, 64 output
buffer).

## Verification

Every testbench is self-checking and ends with a `TB_RESULT checks=N
failures=M` line. Testbench helpers in `tb/`: `tb_ref_pkg.sv` holds a
shift-register reference encoder and a register-exchange reference Viterbi
decoder (same tie rules as the RTL, different survivor method); `vd_harness.sv`
drives and checks one decoder configuration.

| testbench | what it shows |
|-----------|---------------|
| `tb_conv_encoder` | FSM equals the polynomial encoder on random input with gaps and clears; all 16 arcs used |
| `tb_bmu` | all four distances for every symbol; hold while not loading |
| `tb_acsu` | every state's metric and survivor bit for 1 and 4 nodes, with frequent ties; each state served once per stage |
| `tb_pmm` | init values, writes hidden until swap, read ports |
| `tb_tbu` | trace-back along a planted path among random survivor bits; order, `out_last`, latency FRAME_LEN + 1 |
| `tb_viterbi_decoder` | 1, 2 and 8 nodes with 32, 24 and 20-symbol frames; error-free, sparse-error and 6 % noisy frames; exact agreement with the reference decoder; symbol spacing 1 + 8/U; stalls and corrections happen |
| `tb_conv_viterbi_system` | whole link at default parameters, 24 frames with tail termination and with encoder clear, channel errors; counts fold steps (8 per stage), stalls, trace-backs, corrected frames |
| `tb_ber_workload` | default decoder at 0 %, 10 %, 20 % channel bit error rate; reports residual error rates |

Simulating one of them with Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
        rtl/viterbi_pkg.sv tb/tb_ref_pkg.sv tb/tb_conv_viterbi_system.sv \
        --top-module tb_conv_viterbi_system -o sim
    ./obj_dir/sim

Replace the last file and `--top-module` for another testbench. All of them
finish in well under a second.
