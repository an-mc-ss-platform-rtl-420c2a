# MC-SS modem and MAC hardware for a short-range personal-network link

This RTL implements the digital part of a network interface card for a
short-range wireless link of up to about 130 Mbit/s. The air interface is
multicarrier spread spectrum (MC-SS): OFDM with 256 subcarriers, plus
multicode spreading. Each group of eight data symbols is spread with
eight orthogonal Walsh-Hadamard codes of length 8 across eight adjacent
subcarriers. Every subcarrier then carries a mix of all eight symbols,
which gives frequency diversity without a loss in rate.

The design has three parts. The first is the **MAC hardware**: registers,
FIFOs, AES-128, CRC-32, frame parsing and address filtering. It sits
between a software MAC (an IEEE 802.15.3-style stack on an embedded CPU)
and the baseband. The second is the **baseband transmitter**: coding,
puncturing, interleaving, QAM mapping, spreading, OFDM framing, IFFT,
preamble and cyclic prefix. The third is the **baseband receiver**: time
synchronisation, carrier frequency offset correction, FFT, least-squares channel estimation with zero-forcing
equalisation, despreading, soft demapping, de-interleaving, de-puncturing
and Viterbi decoding.

The top level, `mhdr_top`, has three sides. Software sees a 32-bit
register bus and an interrupt. The radio gets 12-bit I/Q samples on a
DAC port and delivers them on an ADC port.

```
 software bus ──► hwmac_regs ─► TX FIFO ─► hwmac_ctrl (AES-CTR, CRC-32) ─► packet FIFO ─► tx_baseband ─► DAC I/Q
     irq ◄──────┘            ◄─ RX FIFO ◄─ hwmac_ctrl (parse, address, CRC, AES) ◄────────── rx_baseband ◄─ ADC I/Q
```

## Modes

Six modes are selected by `CTRL[6:4]`. The code is the K = 7 rate-1/2
convolutional code with generators 133 and 171 (octal). It is punctured
to 2/3 or 3/4.

| mode | modulation | code rate | info bits / OFDM symbol | coded bits / OFDM symbol | bit rate at 40 Msample/s |
|------|-----------|-----------|-------------------------|--------------------------|------------------------|
| 0 | QPSK   | 1/2 | 192 | 384  | 28.9 Mbit/s |
| 1 | QPSK   | 3/4 | 288 | 384  | 43.3 Mbit/s |
| 2 | 16-QAM | 1/2 | 384 | 768  | 57.7 Mbit/s |
| 3 | 16-QAM | 3/4 | 576 | 768  | 86.6 Mbit/s |
| 4 | 64-QAM | 2/3 | 768 | 1152 | 115.5 Mbit/s |
| 5 | 64-QAM | 3/4 | 864 | 1152 | 129.9 Mbit/s |

One OFDM symbol lasts 256 + 10 = 266 samples, which is 6.65 µs at
40 Msample/s. Each symbol has 192 data subcarriers. The spreading factor
and the number of codes are both 8, so the chip rate equals the symbol
rate.

## Frame formats

**MAC frame** (what software writes into the TX FIFO and reads from the RX
FIFO):

- 10 header bytes. Byte 4 is the destination device id; `0xFF` means
  broadcast. The other header bytes are passed through unchanged.
- `TX_LEN` payload bytes, up to 4095. Payloads can be encrypted with AES-128
  in counter mode: payload block *j* (16 bytes) is XORed with
  AES(key, nonce + *j*), and byte 0 of a block uses bits 127:120 of the
  keystream.
- A 4-byte CRC-32 (IEEE 802 polynomial, reflected, preset to all ones,
  complemented). It covers the payload as sent and goes least significant
  byte first. The header is not covered.

**Bit stream** in front of the encoder (`tx_baseband`):

- a 16-bit length field giving the MAC frame length in bytes, LSB first;
- the frame bytes, each LSB first;
- 6 zero tail bits;
- zero padding of at least `PAD_MIN` = 40 bits, rounded up to a whole number
  of OFDM symbols.

The receiver's Viterbi decoder releases a bit only after 39 newer pairs
have arrived, so the padding is what pushes the last data bit out.

**PHY burst** (samples):

1. Preamble: 256 samples, four repetitions of a 64-sample pattern. Each
   sample is ±256 on I and on Q. The signs come from a 7-bit LFSR (seed
   0x01 for I, 0x4D for Q).
2. One full-pilot symbol. All 211 used subcarriers carry known BPSK values
   ±4096. The receiver estimates the channel from this symbol.
3. The data symbols.

Every OFDM symbol, including the pilot symbol, is sent as its last 10
samples (the cyclic prefix) followed by all 256.

**Subcarrier map** (FFT index *k*):

- *k* = 0 (DC) and 106..149 (the band edges) are null.
- The 211 used bins are *k* = 150..255 followed by 1..105. This is used-bin
  order *u* = 0..210.
- Bins with *u* mod 11 = 5 are pilots, 19 in total: ±4096 with a fixed
  LFSR sign pattern.
- The other 192 bins carry data chips in index order.

The receiver does not use the pilots in data symbols; they are there for
tracking that this design does not do.

## Transmitter (`tx_baseband`)

The stages are linked by valid/ready handshakes. The DAC sets the pace by
pulling samples with `dac_ready`.

| stage | module | what it does |
|-------|--------|--------------|
| bit source | inside `tx_baseband` | length field, frame bytes, tail and padding, one bit per cycle |
| encoder | `conv_encoder` | one pair {a, b} per input bit |
| puncturer | `puncturer` | keeps a b (1/2), a1 b1 a2 (2/3) or a1 b1 a2 b3 (3/4) |
| serial to parallel | `bit_packer` | packs N = 2, 4 or 6 coded bits into one symbol word, first bit in the MSB |
| interleaver | `sym_interleaver` | permutes the 192 words of an OFDM symbol through a 16 × 12 block (write rows, read columns), ping-pong buffered |
| mapper | `qam_mapper` | Gray QPSK/16-QAM/64-QAM on an odd-integer grid, scaled by 1024, 448 or 224 |
| spreader | `mc_spreader` | chip *c* = Σ_k (−1)^popcount(k & c) · sym_k over a group of 8 symbols |
| framer | `ofdm_framer` | 256 bins per symbol in FFT order: pilot symbol first, then data symbols |
| FIFO | `sync_fifo` (512) | absorbs the IFFT's load/compute/unload time |
| IFFT | `fft_core` (INVERSE) | 256-point radix-2, divides by 256 |
| multiplexer | `tx_multiplex` | preamble, then cyclic prefix plus symbol; two-symbol ping-pong buffer so samples leave without gaps |
| DAC format | inside `tx_baseband` | saturation to 12 bits |

The interleaver works on whole symbol words, not single bits. Its width
therefore follows the modulation, and it runs at the symbol rate.

## Receiver (`rx_baseband`)

### Time synchronisation (`sync_detector`)

This is the most delicate part of the receiver. It works in two steps and
updates a state machine on every input sample.

1. **Flat region.** A running lag-64 autocorrelation
   *C(n)* = Σ r(n)·r*(n−64) is kept over a 64-sample window, next to the
   window energy *P(n)*. While the repeating preamble passes,
   |Re C| + |Im C| stays near *P*. Once it has been at least `thr_pct`
   percent of *P* for 64 samples in a row (default 68 %), the receiver opens
   a search window. An energy floor (`PMIN`) stops idle noise from
   qualifying.
2. **Peak.** Inside the window the newest 64 samples are cross-correlated
   with the known preamble sign pattern. A sample counts as a peak when
   |Re X| + |Im X| ≥ ¾ of the window's |re|+|im| energy. A peak marks the end
   of one preamble period. When the flat region ends, the last peak fixes
   the symbol timing.

All magnitudes use |re|+|im|, so the synchroniser has no square roots and
only one multiplier per product term.

The samples pass through a delay line of `DLY` = 128 samples. This lets
the timing decision apply to samples that have not left yet. From the
first symbol on, the module drops each cyclic prefix and passes 256
samples per symbol, with `out_first` on the first. The window is placed
`ADV` = 3 samples early, inside the prefix, which leaves margin for
timing error and channel echoes. The FFT sees this as a linear phase
ramp, and the equaliser removes it together with the channel.

### Frequency offset correction (`cfo_corrector`)

The preamble repeats every 64 samples, so a carrier frequency offset of
ε cycles per sample turns the lag-64 autocorrelation *C* by 2π·64·ε. At
every cross-correlation peak the synchroniser hands *C* over. A 16-step
CORDIC takes its angle, and the step −angle/64 is kept in units of
2^-24 cycle per sample. The last peak before synchronisation sets the
step. It is readable on `rx_cfo_step`.

While the receiver is synchronised, a 24-bit phase accumulator advances by
the step on every received sample, dropped prefix samples included. Each
sample passed on is rotated back using a 1024-entry sine/cosine table. The
phase restarts at zero for each frame. The range is ±1/128 cycle per sample
(±312 kHz at 40 Msample/s).

There is no pilot tracking afterwards. The estimate is typically within
about 0.5 % of the offset. Over the tens of thousands of samples of a
maximum-length 64-QAM frame, that residual can still turn the
constellation too far. Short frames, and frames in the lower modes,
tolerate it easily.

### FFT and equalisation

- `sync_fifo` (1024 words) holds samples while `fft_core` works. The
  transform is forward and unscaled, with 20-bit data.
- `chan_est_eq` treats the first symbol after synchronisation as the pilot
  symbol. For each bin it stores the zero-forcing coefficient
  W = X·conj(Y)/|Y|², where X is the known ±4096 and Y is the received bin.
  W is kept as a 12-bit Q2.9 number; null bins get W = 0.
- Every later symbol is multiplied bin by bin by W. This removes gain,
  phase, multipath and the timing offset together.

The estimate is taken once per frame and is not updated afterwards.

### Demodulation and decoding

- `ofdm_deframer` keeps the 192 data bins.
- `mc_despreader` applies the inverse Walsh-Hadamard transform and divides
  by 8.
- `soft_demapper` turns each symbol into N soft bits of 4 bits each. It uses
  piecewise-linear max-log metrics, and a positive value means 1.
- `sym_interleaver` (INVERSE = 1) undoes the permutation on the soft words.
- `depuncturer` serialises the words and inserts zero metrics (erasures)
  where bits were punctured.
- `viterbi_decoder` is a 64-state soft-decision decoder. All states run
  add-compare-select in one cycle, and survivors are kept by register
  exchange with depth 40.

A byte assembler inside `rx_baseband` then reads the 16-bit length and
emits that many bytes. The first byte carries `out_first` and `out_len`.
After the last byte every stage is cleared and the synchroniser searches
again.

The receiver mode comes from the configuration register; there is no
signal field in the burst. AGC is not included (see the last section).

## MAC hardware (`hwmac`)

`hwmac_regs` is the register file. It decodes byte addresses on a 32-bit
bus with one access per cycle; read data is combinational.

| addr | name | bits |
|------|------|------|
| 0x00 | CTRL | [0] start TX (write 1; the pulse is issued the cycle after the write), [1] TX encrypt, [2] RX enable, [3] RX decrypt, [6:4] mode |
| 0x04 | STATUS (RO) | [0] TX busy, [1] frame received, [2] CRC ok, [3] address ok, [31:16] received payload length |
| 0x08 | TX_LEN | [11:0] payload bytes |
| 0x0C | DEV_ID | [7:0] own id |
| 0x10–0x1C | AES key | 0x10 = key[127:96] … |
| 0x20–0x2C | AES nonce | initial counter block, 0x20 = [127:96] … |
| 0x30 | TX_FIFO (WO) | push byte [7:0] |
| 0x34 | RX_FIFO (RO) | [7:0] byte, [8] valid; the read pops the byte |
| 0x38 | IRQ | [0] pending; write 1 to clear |
| 0x3C | SYNC_THR | [6:0] flat-region threshold in percent, reset value 68 |
| 0x40 | LEVELS (RO) | [15:0] TX FIFO level, [31:16] RX FIFO level |

`hwmac_ctrl` is the global controller.

- **Transmit.** On start it copies the frame from the TX FIFO into the
  packet FIFO: the header, then the payload (encrypted if requested), then
  the FCS. When the whole frame is in the packet FIFO it requests
  transmission with the frame length.
- **Receive.** It parses the header and checks the destination id. Frames
  for other ids are dropped without an interrupt. Accepted frames go to the
  RX FIFO, decrypted if requested; the FCS is checked, and STATUS and the
  interrupt are updated.

One iterative AES-128 core (`aes128_core`, one round per cycle, S-box
computed from the GF(2⁸) inverse) serves both directions, and transmit
has priority. There are two `crc32` units, one per direction. All three
FIFOs are `sync_fifo` instances of `FIFO_DEPTH` = 4096 bytes. That holds
the largest host payload of 2048 bytes with room to spare.

To send a frame, software:

1. writes the 10 header bytes and the payload into TX_FIFO;
2. writes TX_LEN;
3. writes CTRL with bit 0 set.

To receive, software waits for the interrupt, reads STATUS, reads the
header and payload from RX_FIFO, and writes 1 to IRQ.

## Clocking and throughput

Everything runs on one clock, and data moves under valid/ready.

- The receiver has no back-pressure on its sample input.
- Both FFTs take 1536 cycles per 256-point transform: 256 to load, 1024
  for the butterflies, 256 to unload.
- One symbol lasts 266 samples, so the clock must be at least about 6× the
  sample rate. The testbenches use 8 clocks per sample.
- For full-rate operation at 40 Msample/s this means a clock of about
  240–320 MHz. The alternative is a faster FFT: radix-4, or a pipelined
  FFT per direction.

## Files

- `rtl/mhdr_pkg.sv` holds the shared constants, the mode and rate enums,
  and the functions that build the subcarrier map, pilot signs and
  preamble signs at elaboration.
- Each other file in `rtl/` holds one module. Each starts with a header
  comment on its function, interface and timing.
- `rtl/mhdr_top.sv` is the top level. Its parameters are `FIFO_DEPTH`
  (4096) and `PAD_MIN` (40).

Synthesis with a generic yosys flow gives about 10 k cells and 2.2 k
flip-flops, plus about 240 kbit of memory arrays. The largest arrays are
the three 4096-byte MAC FIFOs, the FFT working memories and the symbol
buffers.

## Verification

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each one
compares against values computed in the testbench itself and ends with a
`TB_RESULT checks=… failures=…` line. Highlights:

- `tb_fft_core` compares both transform directions with a direct DFT.
- `tb_viterbi_decoder` encodes with its own encoder. It decodes clean
  frames, punctured frames, frames with isolated bit errors and noisy
  frames.
- `tb_chan_est_eq` applies a random complex gain per bin and checks the
  equalised output.
- `tb_sync_detector` checks the window position and that idle noise does
  not trigger synchronisation.
- `tb_crc32` uses the standard check values. `tb_aes128_core` uses the
  FIPS-197 vectors.
- `tb_tx_baseband` checks the preamble, the cyclic prefixes and the sample
  counts. It also takes a DFT of the output to check the pilot magnitudes
  and the empty null bins.
- `tb_rx_baseband` runs the transmitter into the receiver, directly and
  over a three-tap multipath channel, in every mode.
- `tb_mhdr_top` is the end-to-end test at default parameters. Software
  tasks on the bus send frames in all six modes, encrypted and in clear,
  a frame for another id, a broadcast frame and a 2048-byte frame. The
  DAC is looped back to the ADC with noise and a carrier offset of
  0.0015 cycle per sample, which the estimate must match within 1 %. The
  2048-byte frame is sent without offset (see the frequency offset
  section). The test counts synchronisations, channel estimates, CRC
  passes, encrypted frames and dropped frames.
- `tb_cfo_corrector` checks the estimated step for offsets in all four
  quadrants of the autocorrelation angle. It also checks the de-rotation of
  an offset tone sample by sample.

To run a testbench with Verilator, for example:

```
verilator --binary --timing --assert -y rtl rtl/mhdr_pkg.sv tb/tb_mhdr_top.sv --top-module tb_mhdr_top
./obj_dir/Vtb_mhdr_top
```

The package must come first on the command line. `tb_mhdr_top` runs in
well under a minute.

## Where this design departs from the original platform

Taken from the original platform: the numbers and the structure.

- The 256-point FFT, the 10-sample cyclic prefix, 192 data and 19 pilot
  subcarriers, and spreading factor 8.
- The K = 7 (133, 171) code with 2/3 and 3/4 puncturing, and the six
  modes with their bits per symbol.
- The symbol-wide interleaver and a serial-to-parallel converter in front
  of it.
- The two-step synchroniser (autocorrelation flat region against a
  threshold whose default is 68 %, then a cross-correlation peak in a
  window).
- Carrier frequency offset estimated and corrected in the time domain,
  before the FFT.
- Least-squares channel estimation on a full-pilot symbol, zero forcing
  with 12-bit coefficients, and soft demapping into a Viterbi decoder.
- On the MAC side: TX, RX and packet FIFOs, memory-mapped configuration
  and status registers, an AES-128 unit, CRC, parsing, address check and
  the interrupt.

This design's own choices:

- the exact subcarrier positions and pilot signs;
- the preamble;
- the length field and padding rule;
- the 10-byte MAC header layout and the use of counter mode for AES;
- the register map;
- all internal widths and architectures (iterative FFT, register-exchange
  Viterbi, iterative AES, the CORDIC-based offset estimator).

Not built:

- **Multiple clock domains.** The original uses several DCM-generated
  clocks, each matching a stage's rate. Here one clock and handshakes do
  the same job.
- **AGC.** Its algorithm is not specified well enough to build. The
  receiver therefore assumes the radio delivers the signal at a sensible
  level.
- **Pilot-based tracking in data symbols.** The pilots are transmitted but
  not used.
- **The 20 MHz (128-point) configuration.** Only the 40 MHz, 256-point
  configuration is built.
- **MAC timers.** They are only named in the original, so superframe timing
  is left to software.
- **Everything outside the FPGA logic:** the software MAC on the
  processor, the USB host interface, the RF transceiver with its control
  bus, and the converters. These appear as ports.
