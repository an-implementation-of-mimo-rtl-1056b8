# 2x2 MIMO-OFDM transmitter modulator for IEEE 802.11n

This is the baseband transmit path of an 802.11n (HT) station with two antennas. It takes
a PSDU, the MAC frame as a byte stream, and produces the frequency-domain input of two
IFFTs, one per transmit chain, one OFDM symbol at a time. It covers MCS 0-15, 20 and 40 MHz
channels, the long (800 ns) guard interval, one stream (SISO), two spatially multiplexed
streams (SDM) and Alamouti space-time block coding (STBC). At MCS 15 in a 40 MHz channel that
is 270 Mbit/s. The whole design runs on a single 40 MHz clock.

The main idea is to process the data path several bits at a time, so one slow clock is
enough:

* the scrambler works on 16 bits per clock;
* the convolutional encoder takes 8 data bits per clock and gives out 16 coded bits;
* the interleaver writes up to 16 coded bits per clock, each one straight to its final
  position. Its RAM is organised so that one read gives a whole subcarrier.

A 40 MHz-channel symbol has 1080 data bits at MCS 15. It passes the encoder in 135 clocks,
which fits inside the 160 clocks of a 4 µs symbol.

## Data path

```
 PSDU bytes
   │
 tx_ctrl ──16b──> scrambler ──16b──> converter ──8b──> conv_enc ──≤16 coded bits──>
 interleaver (stream parser + ping-pong subcarrier RAM) ──2 × 6b per subcarrier──>
 mapper ──2 × complex──> mimo_enc (+ pilot_gen) ──2 × complex, bin order──>
 cyclic_shift ──> ifft_ctrl ──> IFFT1 / IFFT2 inputs (13-bit re/im + enable)
```

Each stage has a registered output and a valid/ready handshake. Stalls therefore travel
backwards through the pipeline by themselves. Assertions check one handshake rule: an
output that has been offered stays unchanged until it is taken. Stalls happen for these
reasons:

* pilot and null bins, where the MIMO encoder or the IFFT controller takes no data;
* the STBC pairing;
* a full interleaver, when both of its symbol buffers are waiting to be read.

| module | what it does |
|---|---|
| `tx_pkg` | Shared types, MCS tables (N_BPSCS, code rate, N_DBPS), subcarrier maps and constellation levels. |
| `tx_ctrl` | Captures the configuration on `start` and pulses `init` to every stage. Emits the DATA field as 16-bit words: one zero SERVICE word, the PSDU bytes two per word, then zero words until the converter says stop. |
| `scrambler` | Scrambler with generator x^7+x^4+1, unrolled 16 bits per clock. `sel`=0 loads the seed; `mode` selects scrambling or pass-through. |
| `converter` | Width converter from 16 to 8 bits. Cuts the bit stream into chunks that never cross a symbol boundary, so the last chunk of a symbol holds N_DBPS mod 8 bits. Forces the six tail bits to zero after scrambling. Pads to a whole symbol (to an even number of symbols with STBC). Flags the last chunk. |
| `conv_enc` | K=7 code with generators 133/171 octal, 8 bits per clock. Punctures to 2/3, 3/4 or 5/6 and packs the kept bits at the bottom of a 16-bit word, with their count. |
| `interleaver` | Stream parser plus the three HT interleaver permutations (see below). Two symbol buffers. |
| `mapper` | Gray-coded BPSK, QPSK, 16-QAM and 64-QAM mapping for both streams. |
| `pilot_gen` | HT pilot patterns Ψ for one or two space-time streams, multiplied by the 127-long polarity sequence. |
| `mimo_enc` | SISO, SDM or STBC encoding. Inserts the pilots and puts the subcarriers in IFFT bin order. |
| `cyclic_shift` | Cyclic shift of −400 ns on chain 2, done in the frequency domain. |
| `ifft_ctrl` | Bin counter that writes 64 or 128 bins per symbol to both IFFTs, with zeros at DC and at the guard bins. |
| `mimo_tx_top` | Connects all of the above. |

## Framing: what enters the encoder

The DATA field is built in this order:

1. 16 SERVICE bits;
2. 8·LENGTH PSDU bits, least significant bit of each byte first;
3. 6 tail bits;
4. pad bits up to N_SYM·N_DBPS.

N_SYM = ⌈(22 + 8·LENGTH)/N_DBPS⌉. With STBC it is rounded up to an even number.

The scrambler runs over the whole field. The converter then replaces the scrambled tail
bits with zeros, so the encoder ends in the zero state. The converter does not need N_SYM
in advance: it keeps framing until the current symbol holds the end of the tail and, with
STBC, until the symbol count is even. It then raises `stop`. `tx_ctrl` keeps offering zero
words until that point.

Within a symbol the puncturing phase starts again at zero. This gives the same result as
the standard's continuous puncturing, because N_DBPS is always a whole number of puncturing
periods. The code state is carried from one symbol to the next.

## The interleaver (the part that takes most explaining)

The standard describes the interleaver as a read/write of a table. This design computes,
for every coded bit, the exact place where it ends up, and writes it there. Up to 16 bits
are placed per clock, each with its own small address calculator. Coded bit c (counted
within the symbol) goes through these steps:

1. **Parser**, two streams only. Blocks of s = max(1, N_BPSCS/2) bits go to the two
   streams in turn: stream = ⌊c/s⌋ mod 2, k = ⌊c/2s⌋·s + c mod s.
2. **First permutation.** With a = k mod N_COL and q = ⌊k/N_COL⌋: i = N_ROW·a + q.
3. **Second permutation.** The standard writes
   j = s·⌊i/s⌋ + (i + N_CBPSS − ⌊N_COL·i/N_CBPSS⌋) mod s. Because N_CBPSS = N_COL·N_ROW,
   the floor term is just a, so this reduces to j = i − (q mod s) + ((q − a) mod s). Only
   divisions by small constants (1, 2 or 3) remain.
4. **Third permutation**, second stream only. r = (j − 2·N_ROT·N_BPSCS) mod N_CBPSS.
5. **Store.** The bit is written to word ⌊r/N_BPSCS⌋, bit r mod N_BPSCS.

| channel | N_COL | N_ROW | N_ROT |
|---|---|---|---|
| 20 MHz | 13 | 4·N_BPSCS | 11 |
| 40 MHz | 18 | 6·N_BPSCS | 29 |

The memory holds one 6-bit word per data subcarrier: 128 words per stream, the same as two
64×6 blocks. A read therefore returns the complete constellation label of one subcarrier
for both streams, and the mapper needs nothing else.

There are two symbol buffers. One is filled while the other is read. `NBUF` sets the
number of buffers. With a single buffer, MCS 15 at 40 MHz would need 135 clocks to write
plus 108 to read, which does not fit in 160 clocks.

Subcarriers are read in IFFT bin order: the upper half of the data subcarriers (positive
frequencies) first, then the lower half. Because of this, none of the later stages needs a
reorder buffer.

The price of writing 16 bits per clock is area. After coarse synthesis the interleaver is
the largest block, because of its sixteen address calculators with their divisions by 13
or 18.

## Spatial encoding, pilots and cyclic shift

`mimo_enc` sends one occupied subcarrier of both chains per clock, in bin order:

* 20 MHz: k = 1…28, then −28…−1;
* 40 MHz: k = 2…58, then −58…−2.

The pilots are at ±7 and ±21 (20 MHz) and at ±11, ±25 and ±53 (40 MHz). At a pilot bin
the encoder sends the pilot and takes no data. The pilot on pilot number j in HT-data
symbol n is Ψ(iSTS, (n+j) mod N_SP)·p(n+3). The offset 3 counts the L-SIG and two HT-SIG
symbols of the mixed-format preamble.

The three modes:

* **SISO:** chain 1 carries the stream and chain 2 is idle.
* **SDM:** each chain carries one stream.
* **STBC** (MCS 0–7 with `cfg_stbc`): symbols are handled in pairs (2m, 2m+1).

| chain | symbol 2m | symbol 2m+1 |
|---|---|---|
| 1 | d(2m) | d(2m+1) |
| 2 | −d*(2m+1) | d*(2m) |

The STBC hardware works in three phases:

1. Symbol 2m is stored in buffer A. Nothing is sent.
2. While symbol 2m+1 arrives, it is stored in buffer B and output symbol 2m is sent.
3. Output symbol 2m+1 is sent from the two buffers while the input is held.

Cyclic shift: the −400 ns shift of chain 2 is applied before the IFFT, as a phase ramp
e^{jπk/4}. This ramp is the same for both bandwidths: 8 of 64 samples, or 16 of 128. It is
built from quarter turns, plus one multiplication by (1+j)/√2 (constant 23170/2^15,
rounded) for odd k.

There is no further spatial mapping or 1/√N_TX scaling.

## Number format and interface

Samples are 13-bit two's complement, with 1.0 = 2048. The constellation levels are
n·2048/√E, rounded, with E = 1, 2, 10 or 42. The largest 64-QAM level is 2212 and the
largest rotated value is about 3130, so nothing overflows.

To send a packet:

* Pulse `start` with `cfg_mcs`, `cfg_bw40`, `cfg_stbc`, `cfg_length` (bytes) and
  `cfg_seed` (7-bit scrambler state, `seed[i]` = register stage x(i+1)).
* Deliver the bytes on `psdu_data/valid/ready`.

The outputs:

* `ifft1_*` and `ifft2_*` give 64 or 128 bins per symbol, in natural order. Each is marked
  by `ifft*_en`, and `sym_start` marks bin 0.
* `ifft2_en` stays low in SISO.
* `done` pulses after the last bin of the packet. `busy` is high from `start` to `done`.

The IFFT controller starts a symbol only when its first sample is available. The bins of a
symbol then normally follow one per clock.

Measured symbol periods with a steady input, in the end-to-end test:

* MCS 15 at 40 MHz: 135 clocks (budget 160);
* MCS 15 at 20 MHz: 65 clocks. This also fits the 80 clocks of a 4 µs symbol if the design
  is clocked at 20 MHz.

## Departures from the source design and limits

* **Interleaver memory.** The source design uses one set of four 64×6 memories, described
  elsewhere as two block RAMs. This design keeps the 64×6 subcarrier organisation but
  doubles it for ping-pong operation.
* **Interleaver control.** The separate 20 MHz and 40 MHz interleaver controllers and their
  output multiplexer are merged into one controller.
* **IFFT controller input.** The source IFFT controller has a single sample input that it
  demultiplexes to the two IFFTs. Here each chain has its own input, and both IFFTs are
  written in the same clock.
* **Scrambler state.** The source scrambler keeps a 19-bit register for its unrolled state.
  Here the state is just the last 7 sequence bits.
* **Encoder taps.** The tap positions of the parallel encoder were not available and are
  the standard's generators.
* **Not generated.** Preamble (L-STF, L-LTF, L-SIG, HT-SIG, HT training fields), guard
  interval insertion, windowing, the IFFT and the RF.
* **Options not supported.** Short guard interval, more than two streams, spatial mapping,
  greenfield format.
* **Headline rate.** The source quotes 260 Mbit/s at 40 MHz, which is twice the 20 MHz rate.
  With 108 data subcarriers the standard gives 270 Mbit/s, and that is what this design
  delivers.
* **Area and power.** Nothing here has been synthesised to a cell library, so the source's
  gate counts and power figures cannot be compared. The interleaver is certainly larger than
  in the source design.
* **Receiver.** The receiver-side phase tracking and compensation logic is not part of this
  transmitter.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog. The expected values come from
`tb/tx_ref_pkg.sv`, a separate bit-level model written straight from the standard's
formulas:

* continuous puncturing;
* the parser in its "gather" form;
* the original second permutation, with its floor term;
* constellation levels and the cyclic shift in real arithmetic.

It shares none of the shortcuts used in the RTL.

`tb_mimo_tx_top` sends 20 packets through the whole design:

* all 16 MCS, both bandwidths, SISO, SDM and STBC;
* lengths from 0 to 1500 bytes;
* random gaps in the byte stream.

It compares every bin of both chains with the model: chain 1 exactly, chain 2 within one
LSB because of the rounding in the rotation. It checks the symbol-period limits above. It
also counts how often pilot insertion, STBC pairing, interleaver back-pressure, IFFT
controller waits, partial encoder chunks, odd-step rotations and whole pad symbols happen,
and fails if any of them never does.

Each block's testbench was also run against a copy of the block with one deliberate error,
and it reported failures every time.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/tx_pkg.sv tb/tx_ref_pkg.sv tb/tb_mimo_tx_top.sv --top-module tb_mimo_tx_top
./obj_dir/Vtb_mimo_tx_top
```

Replace `tb_mimo_tx_top` with any other `tb_<module>` to test one block. The end-to-end
test runs the top with its defaults (it has no parameters) and takes a few seconds.

To change the design:

* The mode tables and the fixed-point levels are in `tx_pkg`.
* The interleaver's buffer count is the `NBUF` parameter.
* Every stage keeps its handshake local, so a stage can be replaced or pipelined further
  without touching the others.
