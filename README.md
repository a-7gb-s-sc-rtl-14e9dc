# 4-parallel SC-FDE / OFDM MMSE equalizer for 60 GHz receivers

Multi-gigabit 60 GHz links (IEEE 802.15.3c / 802.11ad style) send either single-carrier
blocks with a cyclic prefix (SC-FDE) or OFDM symbols. Both are equalized the same way. Each
512-sample block is moved to the frequency domain, and every bin is multiplied by a
regularised inverse of the channel frequency response (CFR). SC-FDE then goes back to the
time domain with an IFFT; OFDM is demapped directly from the bins. This RTL builds that
receiver back end:

- a Golay-correlator channel estimator;
- one 512-point FFT, shared by the estimator and the payload;
- an MMSE one-tap equalizer;
- a 512-point IFFT;
- BPSK/QPSK/16QAM demapping;
- a PRBS built-in test;
- a two-lane serial output multiplexer;
- a 3-wire configuration interface.

The whole datapath is 4-parallel. Four samples (lane `j` carries sample `4n+j`) are
processed every core clock. A 1.76 GS/s stream therefore needs only a 440 MHz core clock,
and 16QAM then carries 4 bits x 1.76 GS/s = 7.04 Gb/s.

## Packet and data flow

A packet as seen by `eq_top`:

```
| CES a: 256 + 128 postfix | CES b: 256 + 128 postfix | CP | 512 data | CP | 512 data | ...
  ces_on = 1 ------------------------------------------|  ces_on = 0
```

- The cyclic prefix (CP) is 64 samples (1/8) or 128 samples (1/4), set by configuration.
- Synchronisation is done upstream. `ces_on` must rise with the first CES a sample.
- `rx_valid` must be high on every cycle of the CES part. Payload samples may arrive with
  gaps (bubbles).
- Payload must not start while `ces_busy` is high. The estimator owns the FFT for about 328
  core cycles after the CES starts.

```
rx --+-- golay_corr4 --window--+                        +-- golay_chest -- cfr_sram (H)
     |                         +-- fft512_4p --+--------+                      |
     +-- drop CP --------------+               +-- mmse_eq <-------------------+
                                                     |
                       OFDM: bins ------------------+--> qam_demod --> prbs_chk
                       SC-FDE: ifft512_4p ----------+               --> out_mux --> lvds_data[1:0]
```

## The 4-parallel 512-point FFT

`fft512_4p` splits the 512-point DFT across the four lanes:

- Lane `j` holds every fourth sample, `x(4n+j)`.
- Each lane has its own 128-point radix-2 single-path delay feedback (SDF) FFT, which gives
  `Y_j(k)`. The FFT is `fft128_sdf`, made of seven `sdf_stage` stages with register FIFOs of
  depth 64..1.
- Lanes 1..3 are multiplied by `W512^(jk)`. There are three complex multipliers, and their
  twiddles are computed at elaboration time, so there are no table files.
- A radix-4 butterfly across the lanes then gives `X(k + 128m)` on output lane `m`.

The SDF FFTs work in decimation in frequency, so the output comes in bit-reversed order:

- output position `p` (0..127) holds bin group `k = bitrev7(p)`;
- `out_pos`/`out_k` give both numbers.

Nothing reorders the output. The estimator memory is addressed by `p`, the equalizer works
bin by bin in any order, and `ifft512_4p` is built as the mirror image:

1. an inverse radix-4 butterfly;
2. conjugate twiddles;
3. four 128-point decimation-in-time SDF IFFTs, which take bit-reversed input and produce
   natural order.

Output lane `j` of IFFT cycle `n` is the time sample `x(4n+j)`. The whole FFT -> EQ -> IFFT
path therefore needs no reorder RAM.

**Timing.** Both processors are valid-gated pipelines:

- They move only on cycles with `in_valid`.
- Latency is 136 valid cycles from a frame's first input to its first output. Of this, 134
  is the 128-point SDF chain and 2 is the twiddle multiply and radix-4 stage.
- The latency is longer than a frame (128 cycles), so a frame is pushed out by the data
  behind it.
- At the end of a burst the source sends trailing blocks, which are ignored:
  - OFDM needs 2, because it goes through the FFT only;
  - SC-FDE needs 3, because it goes through the FFT and then the IFFT.
- `clear` restarts the frame counters and drops everything in flight. `eq_top` pulses it at
  the first CES sample of every packet.

**Word lengths.**

| Processor | Input | Output | Internal | Scaling |
|---|---|---|---|---|
| FFT | 7 bits | 11 bits | 11 bits | The first four SDF stages grow and the last three halve. The radix-4 unit divides by 4. Payload output is therefore DFT/32. |
| IFFT | 11 bits | 8 bits | 14 bits | Output is 8 x the true inverse DFT. |

Frames flagged `in_noscale` skip every halving and come out as the exact DFT. The
channel-estimation frames use this, because they are sparse impulse responses.

## Channel estimation with the Golay pair

CES a and CES b are a complementary Golay pair `Ca`, `Cb` of length L = 256. The sum of
their autocorrelations is `2L * delta`. Correlating the received CES a with `Ca` and the
received CES b with `Cb`, and adding the two, gives the channel impulse response with no
multiplier.

**Correlator (`golay_corr4`).** This is the classic cascade of N = 8 stages with delays
1, 2, 4, ..., 128. Each stage adds and subtracts a delayed copy of the v path. In the
4-parallel form:

- A delay of D samples becomes, for output lane `j`, input lane `(j - D) mod 4` taken
  `ceil((D - j)/4)` cycles back.
- The total number of delay words stays at 255, the same as the serial correlator. Only the
  adders are replicated per lane.
- Each stage halves its result (a 1-bit shift), so the word length does not grow.
- The internal word carries 4 guard bits below the input LSB, so the 8 halvings lose little
  precision. Every stage is registered, giving 8 cycles of latency.

The outputs are `C'_ra = (r * Ca)/L` and `C'_rb = (r * Cb)/L`.

**Window and FFT.** `eq_top` takes a 128-lag window of each correlation, starting at its
peak, and sends it zero-padded to 512 through the shared FFT:

- The CES a window becomes frame `FC_ra`; the CES b window becomes frame `FC_rb`.
- The CES b window is ready 96 core cycles after CES a's, but a frame lasts 128 cycles. CES b
  therefore waits in a 32-cycle register delay line.
- After a CES the correlator keeps running while the estimator is busy, so the last lags of
  the CES b window are complete.

**Back end (`golay_chest`).** It does four things:

1. It stores `FC_ra` in a memory (`cfr_sram`).
2. As `FC_rb` arrives, it forms `H = (FC_ra + FC_rb)/2` and writes H into the CFR memory.
3. It accumulates the signal power `S = (1/512) sum |H|^2` and the noise power
   `N = (1/1024) sum over a,b of |H - FC_rx|^2`.
4. It computes `N/S` with the same reciprocal table the equalizer uses.

The noise estimator has a built-in bias. `H - FC_ra = (FC_rb - FC_ra)/2` contains the
receiver noise, but also the autocorrelation sidelobes of `Ca` and `Cb` applied to the
channel. These cancel in the sum that forms H, but not in the difference. N therefore
includes a term proportional to the signal power. With the test channel used here it
reads about 0.17 S even with little noise. The regulariser shift (below) exists to scale it.

## MMSE equalizer

`mmse_eq` computes `Z = 256 * Y * conj(H) / (|H|^2 + N')` for four bins per cycle.

- `N' = N >> shift`. The shift comes from the configuration register.
- `shift = 7` turns the regulariser off, which is zero forcing.
- The more usual form `conj(H)/(|H|^2 + S/SNR)` with normalised H is the same expression
  multiplied through by S. This way no per-bin multiply by the inverse SNR is needed.
  `snr_inv` is still computed and readable.

The division is done by `recip_lut`:

- The divisor is normalised to `m * 2^e`.
- Six mantissa bits address a 65-entry table of `1/m`, and four more bits interpolate
  linearly between entries. These are the 10 mantissa bits in use.
- A multiplier follows. The latency is 2 cycles.
- The table is computed at elaboration time.

The scale of 256 makes a unit channel map an FFT output of `y` to about `8y` in the 11-bit
bin word. The IFFT then gives `8 * IDFT`. For a transmitter with 16QAM levels 16/48 through
the whole chain, the equalized levels are about 21/64. The demapper threshold therefore
defaults to 43.

## Demapping, built-in test and output

- **`qam_demod`** makes Gray-coded hard decisions:
  - The sign gives bit 0 (I) and bit 2 (Q).
  - `|x| < thr` gives bit 1 and bit 3 for 16QAM.
  - Each cycle gives 4, 8 or 16 bits.
- **`prbs_gen`** is an unrolled PRBS-15 (`x^15 + x^14 + 1`) generator. It feeds `qam_mod`,
  which makes an on-chip test signal on `tst_*`.
- **`prbs_chk`** runs the same generator as a reference and counts words and bit errors of
  the demodulated stream. Both are restarted together by a configuration bit.
- **`out_mux`** runs on the input clock and sends each word over two serial lanes (low half
  on lane 0, high half on lane 1, LSB first). The bit rate per lane depends on the
  modulation:

  | Modulation | Shifts on |
  |---|---|
  | 16QAM | every input-clock cycle |
  | QPSK | every 2nd cycle |
  | BPSK | every 4th cycle |

  The lanes are meant for LVDS drivers, which are analog and not part of this RTL.
  `lvds_data`/`lvds_valid` are the pins they would take.

## Clocks

There are four clock domains:

| Clock | Domain |
|---|---|
| `clk_in` | high-speed input clock, which drives the output multiplexer |
| `clk_core = clk_in / 8` | the DSP core, from `clk_div8` |
| `sclk` | the 3-wire interface, sub-MHz |
| LVDS clock | outside this RTL |

The core needs the symbol rate / 4, and `clk_in / 8` provides it. These agree if the input
clock runs at half the symbol rate, i.e. samples are delivered on both clock edges. The
divide-by-8 is kept as stated for the original chip.

`clk_core` is a flip-flop output. A real implementation would use a clock-divider cell and
proper clock-tree constraints. `out_mux` captures each core word at `phase == 6`, three input
cycles after the core edge.

## 3-wire interface

A frame is 24 bits, sent MSB first on rising `sclk` while `sen` is high:

- bit 23: read (1) or write (0);
- bits 22:16: register address;
- bits 15:0: data.

A read shifts the register out on `sdo` during the last 16 bits. When `sen` goes low the
frame is cleared.

| Address | Register |
|---|---|
| 0x00 | control: `[0]` mode (0 = SC-FDE, 1 = OFDM), `[2:1]` modulation (0 BPSK, 1 QPSK, 2 16QAM), `[3]` CP 1/4, `[4]` PRBS restart, `[7:5]` regulariser shift (7 = ZF) |
| 0x01 | 16QAM threshold (reset value 43) |
| 0x10..0x15 | read only: S, N, N/S, PRBS errors, PRBS words, `[0]` estimate done |

Configuration crosses into the core through two-flop synchronisers. It is meant to be
static while a packet is received. Status words are sampled when a read is decoded.

## Departures and limits

- **3-wire test path to the memories.** The original chip could also write test samples into
  the memories through the 3-wire interface and read computed samples back. That path is not
  built; only configuration and status registers exist.
- **Memory size.** The memories are register arrays (`cfr_sram`): 2 x 128 words x 88 bits,
  2.75 KB. The original chip had 24 KB of SRAM. What else it stored is not known, and
  nothing here needs more.
- **Multipliers.** All complex multipliers are general multipliers with rounding and
  saturation. The last four SDF stages have only a few distinct twiddles, so synthesis may
  reduce them to shift-and-add, as a canonical signed digit (CSD) design would.
- **Design choices made here.** These are reasonable choices, not copies of a known chip:
  - the Golay pair (delays 1..128, all weights +1);
  - the 128-lag channel window;
  - internal word lengths and scaling;
  - the QAM mapping and the PRBS polynomial;
  - the 3-wire register map;
  - the flush requirement.
- **Not built.** There is no synchronisation (SYNC preamble) and no carrier or timing
  recovery. The sample stream is assumed aligned and frequency-corrected.
- **Noise estimate.** As explained above, N is biased upward by the sequences' sidelobes,
  which makes MMSE (`shift = 0`) more conservative than ideal. Larger shifts scale the
  regulariser down.

## Verification

Every module in `rtl/` has a self-checking testbench `tb/tb_<module>.sv`. Each one:

- compares the module against a behavioural model;
- checks the latencies in cycles;
- has a watchdog;
- ends with a line `TB_RESULT: ... checks=<n> failures=<m>`.

The checks include:

- FFT and IFFT against floating-point DFTs;
- the correlator against direct correlation;
- the equalizer and reciprocal against real arithmetic within stated error bounds;
- the serial interface through real bit-level frames.

`tb_eq_top` runs the complete chip with every parameter at its default. It configures the
chip over the 3-wire interface and checks the on-chip test mapper. It then sends four
packets through the channel `h = 0.8 + (0.2+0.12j) z^-2 + (-0.08+0.06j) z^-5` with noise and
payload bubbles:

| Packet | Mode | Modulation | CP | Equalizer |
|---|---|---|---|---|
| 1 | SC-FDE | 16QAM | 1/8 | ZF |
| 2 | OFDM | QPSK | 1/4 | MMSE |
| 3 | SC-FDE | QPSK | 1/4 | MMSE |
| 4 | SC-FDE | BPSK | 1/8 | MMSE, regulariser / 4 |

Packet 3 arrives right after the OFDM packet, with stale frames still in the pipelines. Packets 3
and 4 reuse a 16QAM signal and check the QPSK/BPSK decisions (the signs). The
testbench checks:

- every demodulated bit;
- the PRBS checker;
- the serial output lanes, reassembled into words;
- the status registers;
- the rms error of the equalized symbols.

It also counts each mechanism and fails if any never occurred. The mechanisms are: channel
estimation, both modes, both CP lengths, bubbles, ZF and MMSE, all three modulations, stale-frame
drop, serial output, and register reads. It runs in well under a minute.

To run a testbench with Verilator (5.x):

```
verilator --binary --timing -Irtl rtl/eq_pkg.sv $(ls rtl/*.sv | grep -v eq_pkg) \
          tb/tb_eq_top.sv --top-module tb_eq_top -o sim && ./obj_dir/sim
```

Replace `tb_eq_top` with any other testbench name. All the RTL can be compiled together,
since the unused modules do no harm.
