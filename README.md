# Rate-compatible (491,3,6) LDPC convolutional codec with on-chip self-test

This is a pipelined decoder for a rate-1/2 LDPC convolutional code (LDPC-CC), plus its encoder and a complete built-in test chain. The code is the period-3, time-varying (491,3,6) code that was proposed for mobile WiMAX (IEEE 802.16m). Puncturing extends it to rates 2/3, 3/4, 4/5 and 5/6 without changing the decoder.

The decoder has five identical processors, one per decoding iteration. They are chained like a shift register. Each clock that the decoder is enabled, 12 channel-LLR pairs go in and 12 decoded information bits come out, so the decoder produces 12 bits per clock. At a 198 MHz clock that is 2.37 Gb/s.

The test chip wraps the decoder:

```
lfsr_rng -> ldpccc_encoder -> puncture -> awgn_engine -> depuncture -> llr_buffer -> ldpccc_decoder -> compare
 (3 b/clk)   (fold 3)          (mask)     (BPSK+noise)   (LLR := 0)   (3 -> 12 lanes)  (5 processors)    ^
                                                                                                        |
                                                              second lfsr_rng (12 b/step) -------------+
```

A `test_ctrl` state machine runs the chain. It also provides the test modes: normal, noiseless, uncoded, test input from pins, external control, and repeat. The chip counts compared bits and bit errors on its own.

## The code

Time `t` carries one information bit `u(t)` and one parity bit `v(t)`. The phase of time `t` is `t mod 3`. The check at time `t` uses the polynomial pair of that phase:

```
u(t) ^ u(t-a1) ^ u(t-a2) ^ v(t) ^ v(t-b1) ^ v(t-b2) = 0

phase 0: a = 56, 373   b = 218, 406
phase 1: a = 197, 457  b = 22, 491
phase 2: a = 70, 485   b = 181, 236
```

- Every bit is in 3 checks and every check has 6 bits.
- The syndrome-former memory is 491, so a check reaches 491 time units back.
- The encoder is systematic. It solves the equation above for `v(t)`, using the last 491 bits of `u` and `v` (`ldpccc_encoder`).
- The code is not terminated. A run starts from the all-zero state and simply continues. Both the encoder and the decoder are reset to that state at the start of each run.

Rate compatibility comes from the puncturing patterns below. A 1 means the bit is sent, and each pattern repeats every `L` bits. The receiver gives every unsent bit an LLR of 0, which means no information.

| rate | information | parity | L |
|------|-------------|--------|---|
| 1/2  | 1           | 1      | 1 |
| 2/3  | 110100      | 111111 | 6 |
| 3/4  | 010111      | 111010 | 6 |
| 4/5  | 1011        | 0110   | 4 |
| 5/6  | 1110001110  | 0100110111 | 10 |

## Folding: 12 time units per clock

Folding factor ρ means time `t = ρX + p` travels in lane `p` of block `X`. ρ is 12 in the decoder and 3 in the encoder.

ρ is a multiple of the period, so lane `p` always uses the check of phase `p mod 3`. A check on lane `p` with delay `k` reads:
- lane `(p - k) mod ρ`
- block position `ceil((k - p)/ρ)` behind the newest block.

For ρ = 12 the deepest read is position 41. The time-varying code therefore becomes a fixed wiring pattern with no multiplexers. `ldpccc_pkg` computes these positions at elaboration time from the six exponent pairs (`tap_lane`, `tap_depth`, `tap_map`). Changing the exponents or ρ rewires the processor.

## One processor: a sliding window with an on-demand schedule

A processor is a window of `NP = 43` block positions, with 2 × 12 rows (u and v, one per lane). Each enabled clock:
- every variable moves one position deeper;
- a new block enters at position 0;
- the oldest block leaves at position 42 to feed the next processor.

In the same clock, twelve check node units (CNUs) process the 12 checks of the newest block. Each CNU reads its six variables at fixed positions.

So each check runs exactly once per processor, in time order. Each variable takes part in its 3 checks at 3 different depths as it moves through the window. This is the on-demand variable-node activation schedule: a variable's message is updated just before a check reads it. It is not updated in one place at the end of the iteration. A check therefore already sees the results of the checks earlier in the same iteration. For the same BER this needs about half the iterations of the classic pipeline schedule, which is why 5 processors are enough.

### What a variable carries (channel value concealed)

A window position holds one *slot* `{s, a, b, hd}`:

| field | width | contents |
|-------|-------|----------|
| `a`   | 6     | newest check-to-variable message |
| `b`   | 6     | the one before it |
| `s`   | 8     | a running sum, described below |
| `hd`  | 1     | hard decision after the latest check |

The channel LLR `L` has no field of its own; it is hidden in `s`. A slot enters the first processor as `s = L, a = b = 0`. Two small adders per tap keep `s` correct:

1. **Post-add on the way into a tap position**, `s := s + a`. `s` is now the full variable-to-check message `n`. That is `L` plus every check message the variable holds, minus the one from the check it is about to meet. The decoder has two messages per variable, and that check's previous message has already been subtracted.
2. **At the check**, the CNU returns `m`, and the slot leaves the tap as:
   - `hd = sign(n + m)`
   - `s = n - b` (pre-subtraction of the oldest message)
   - `b = a`, `a = m`

   Between checks, `s` is therefore `L` plus one message.

Doing the addition on the transfer into the tap position is the retiming step. The wide `n` exists only in the one register in front of a check.

Leaving out a separate channel-value row, and giving most stages the narrow sum, is what saves storage in this schedule. The iteration after the last check of a variable needs none of this bookkeeping: the slot keeps the same meaning from one processor to the next.

Hard decisions are refreshed at every check, so any processor can supply the output. FINAL uses this.

### Check node unit

`ldpccc_cnu` implements normalized min-sum with degree 6. It works as follows:
1. Saturate the inputs to ±31.
2. Find the smallest and second-smallest magnitude, and the sign product.
3. For each edge, take the smaller magnitude among the other five edges and scale it by ALPHA/8, truncating. The default ALPHA = 7 gives a factor of 0.875.
4. Attach the sign product without that edge's own sign.

LLRs and messages are 6-bit two's complement with 2 fraction bits, so +31 means +7.75.

### Hybrid-partitioned FIFO (memory banks)

Most window positions are not read by any check. A *plain* position is one that has no tap and does not feed a tap position through the post-adder. Through a run of plain positions a slot just moves unchanged, so that run can be a memory instead of registers.

At elaboration time the processor does the following:
1. It finds the longest plain run of every row (`run_len`, `run_start`).
2. It assigns each row to the deepest bank that fits inside that run. Bank depths are `{36, 32, 20}`.
3. Rows whose longest run is shorter than 20 stay entirely in registers.

With the default code and ρ = 12, the banks hold 8, 4 and 8 rows. That is 576 of the 1032 slots (56 %). Four u rows (lanes 2, 5, 8, 11) have runs of only 14–15 and stay in registers.

Each bank is one `circ_buffer`. It is a two-port memory addressed by a single wrapping pointer: the write port stores the slot entering the run, and the read port returns the slot written DEPTH enabled clocks earlier. The read is asynchronous, so a bank behaves exactly like DEPTH register stages. Only the first write and last read positions of a run are wired up; the register chain on either side is unchanged.

### Start-up

The encoder starts from zeros, so every position of the window is initially known to be zero. After reset, or at the start of a run, the controller asserts `flush` for 43 clocks. During flush, every processor shifts in slots with `s = +31` (a certain zero), which fills all registers and banks. The check-node updates are held off during flush, so whatever the memories held before, the window then contains nothing but these slots.

## Decoder (`ldpccc_decoder`)

The five processors are chained. Latency is 43 enabled clocks per processor, so 215 with all five. Two test controls reconfigure the chain:
- `bypass[i]` routes processor `i`'s input straight to its output, so a faulty processor can be skipped.
- `final_sel` chooses which processor's hard decisions form the output.

For example, with processor 1 bypassed and processor 3 as FINAL, three processors decode and the latency is 129.

## Test chip (`ldpccc_testchip`)

- **Source.** `lfsr_rng` is a PRBS31 LFSR (x³¹ + x²⁸ + 1) that advances 3 bits per clock. It feeds the ρ = 3 encoder.
- **Reference.** An identical LFSR advances 12 bits per step. It regenerates the same bits in step with the decoder output, so no FIFO is needed to hold transmitted data for comparison.
- **Puncturer.** Produces a per-bit keep mask for the selected rate.
- **Channel.** `awgn_engine` maps bit 0 to +8 (+2.0) and bit 1 to −8, then adds noise. Each noise sample is the sum of four uniform signed bytes, a central-limit approximation to a Gaussian, taken from its own LFSR. It is scaled by `sigma`, giving a standard deviation of about 0.072·`sigma` LSB.
- **De-puncturer.** Zeroes the LLRs of unsent bits.
- **Buffer.** `llr_buffer` packs four 3-lane words into one 12-lane word and queues 16 such words. `afull` stalls the source, and the decoder runs only while the buffer holds a word.

The source supplies 3 bits per clock and the decoder consumes 12. In the self-test loop the decoder is therefore enabled about one clock in four. A decoder fed from a faster source is enabled on every clock.

Controller (`test_ctrl`):
- `start` clears the chain, then flushes for 43 clocks, then runs.
- After `frame_blocks` decoded blocks it goes to `done`. `start` again returns it to idle.
- `stop` aborts.
- `repeat_en` keeps decoding frame after frame, for long power measurements, and counts frames in `frame_count`.

Modes (`mode`):

| mode | behaviour |
|------|-----------|
| `MODE_NORMAL` | full chain with noise |
| `MODE_NO_NOISE` | noise adder off; a working codec makes no errors |
| `MODE_UNCODED` | rate 1/2, decoder stopped; output is the hard decision of the received information LLRs (raw channel BER) |
| `MODE_TEST_IN` | source off; LLR pairs from `ext_llr_u/v` (with `ext_llr_valid`) enter the de-puncturer |
| `MODE_EXT_CTRL` | the source and decoder strobes come from the `ext_src_en` and `ext_dec_en` pins |

Outputs:
- `tx_*`: the transmitted stream and its puncturing mask.
- `dec_valid` / `dec_bits`: the decoded blocks.
- `bit_count` / `err_count`: cleared at `start` and counted while busy.

## Interfaces and timing in brief

| module | in → out | notes |
|--------|----------|-------|
| `ldpccc_encoder` | 1 clock, registered | `clear` resets it to the zero state |
| `puncture`, `depuncture`, `awgn_engine` | 1 clock each | |
| `ldpccc_processor` | 43 enabled clocks | `en` and `flush` advance the window |
| `ldpccc_decoder` | 215 enabled clocks | 12 bits per enabled clock |
| `llr_buffer` | asynchronous read of the head word | `rd_en` pops |
| `ldpccc_cnu` | combinational | |

Shared types and the elaboration-time tables are in `ldpccc_pkg`. Check node units and adders sit between the window registers. The post-addition is done on the transfer into the position in front of a check, not behind the CNU. The critical path is therefore one CNU plus the pre-subtraction.

## Where this design departs from the published one

- **Slot width.** A slot is 21 bits. `s` is 8 bits on every stage, where the original narrows it to 7 bits between checks. There is also an extra hard-decision bit. A processor holds 1032 × 21 = 21 672 bits, against 19 680 in the original's register count. The bank words are therefore 168 / 84 / 168 bits wide, against 144 / 76 / 144, with the same depths and row counts.
- **Scaling factor.** The fixed-point result uses 0.875 and the floating-point studies use 0.75. ALPHA = 7 (0.875) is the default; set ALPHA = 6 for 0.75.
- **Memory read.** Banks are modelled as arrays with a synchronous write and an asynchronous read. A synchronous-read SRAM macro would need the read address one clock earlier.
- **Choices where the original gives only the function:** the AWGN engine, the LFSRs, the puncturing-mask form, the buffer depth and packing, the flush, the controller's state machine and port list, and the error counters.
- **Uncoded mode.** The encoder keeps running and its parity bits are ignored.
- **Stale data after `stop`.** Channel words still in the pipeline when a run is stopped are dropped during the next flush.

## Simulation

There are no scripts and no files to read: every testbench generates its own data. Compile the package first, then the other RTL files, then one testbench:

```
verilator --binary --timing -j 8 -Wno-fatal --top-module tb_ldpccc_testchip \
    rtl/ldpccc_pkg.sv $(ls rtl/*.sv | grep -v ldpccc_pkg) tb/tb_ldpccc_testchip.sv
./obj_dir/Vtb_ldpccc_testchip
```

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_ldpccc_cnu` | the CNU against a reference min-sum |
| `tb_circ_buffer` | that a bank is an exact DEPTH-clock delay under random enables |
| `tb_ldpccc_encoder` | the folded encoder against a bit-serial encoder written from the equations |
| `tb_puncture`, `tb_depuncture` | all five patterns |
| `tb_lfsr_rng` | the step sizes against a 1-bit reference |
| `tb_awgn_engine` | mean and standard deviation of the noise |
| `tb_llr_buffer` | ordering and flow control |
| `tb_test_ctrl` | the modes and the flush length |
| `tb_ldpccc_processor` | one iteration: weak errors corrected, latency 43, stalls; under heavy noise, every field of every slot leaving the window matches a sequential software model of the schedule bit for bit |
| `tb_ldpccc_decoder` | noiseless and noisy codewords decoded error free, latency 215, and the bypass/FINAL configuration |
| `tb_ldpccc_testchip` | the full-size chip end to end (see below) |

`tb_ldpccc_testchip` runs the chip at its default size in a few seconds. It covers:
- every rate, with and without light noise, error free;
- uncoded against coded at a 3 % raw error rate;
- test input, external control with buffer-full stalls, repeat mode, and bypass/FINAL with their latencies.

It counts each of these mechanisms and fails if any never occurs.
