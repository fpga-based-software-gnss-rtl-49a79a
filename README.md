# FFT offload for GNSS signal acquisition on an SoC FPGA

A GPS receiver must find which satellites are in view before it can track
them. For each satellite (PRN) and each trial Doppler frequency it must find
where, within the 1 ms C/A-code period, the received code starts. The
parallel-code-phase method does this with Fourier transforms. It mixes the
samples to baseband, takes their FFT, multiplies by the conjugate of the FFT of
a local code replica, and transforms back. The peak of the result gives the
code phase, and the peak's height says whether the satellite is present.

On an embedded processor these transforms take most of the acquisition time.
This RTL is the FPGA half of an SoC receiver: a processor core with an FPGA
fabric beside it. The software keeps everything except the transforms. It
hands each transform to one FFT/IFFT core in the fabric through four small
parallel-I/O (PIO) registers on the processor's lightweight bus bridge. FIFOs
on either side of the core absorb the speed difference between slow
processor bus writes and the fabric clock.

The partition follows the FPGA design of the thesis *FPGA-Based Software GNSS
Receiver Design for Satellite Applications*. That design uses:

- a 32768-point transform (2 ms of samples at 16.3676 MHz, zero-padded);
- 8-bit real and imaginary samples with a 6-bit block exponent;
- FIFOs 32768 words deep;
- four PIOs at fixed bridge offsets.

The FFT engine, the control-register encoding and the bus timing are this
implementation's own. The section [Departures and open points](#departures-and-open-points) lists them.

```
 processor bus (lightweight bridge, 32-bit, offsets from its base)
        |
   lw_decoder ----+---------------+----------------+-----------------+
        |         |               |                |                 |
  pio_out       pio_out         pio_in           pio_in
  hps2fftcontrol1 input_data2   output_data      fft2hpscontrol
  (8 bit, 0x10070) (16 bit, 0x100D0) (16 bit, 0x200A0) (8 bit, 0x200C0)
        |         |               ^                ^
        +---- fft_ctrl (commands, packet framing, backpressure, status)
                  |               |                |
              FIFO1 (16) --> fftmod --> FIFO2 (16: {imag, real})
                                    \-> FIFO3 (6: exponent)
```

## Using it from software

All four registers are 32-bit words at offset 0 of their 16-byte window. The
address is the bridge base plus the offset shown. Samples and results are
packed as `{imag[15:8], real[7:0]}`, two's complement, so the 2-bit sample
values -3, -1, 1, 3 are 0xFD, 0xFF, 0x01, 0x03 in each byte.

`hps2fftcontrol1`: commands

| bits | name | action |
|---|---|---|
| 6:5 = `11` (write 0x60) | write request | push `input_data2` into FIFO1, once |
| 2 | START | stream N words from FIFO1 into the core as one block |
| 1 | INVERSE | read at START: 0 = FFT, 1 = IFFT |
| 3 | READ | pop one result from FIFO2 and FIFO3 |
| 0 | CLEAR | level: empty all FIFOs and stop streaming (reset also empties them) |

The fabric acts once per rising edge of a command bit, not while the bit is
held. A processor store holds the register value for as long as the
software leaves it, often hundreds of fabric clocks. If commands were level
sensitive, one write request would then fill FIFO1 with copies of one sample.
So every command is written and then cleared: for example write 0x60, then
0x00.

`fft2hpscontrol`: status

| bits | meaning |
|---|---|
| 5:0 | signed block exponent of the word now in `output_data` |
| 6 | a result is waiting (FIFO2 not empty) |
| 7 | busy: a block is being streamed, or the core has no room for another block |

`output_data` always shows the oldest unread result. A complete result
value is `real * 2**exp` and `imag * 2**exp`.

One transform goes as follows:

1. For each sample, write it to `input_data2` and pulse the write request.
   Fewer than N samples may be written: at START the missing tail of the
   block is streamed as zeros. This gives the zero padding of 32735 samples
   to 32768 without extra bus writes.
2. Write START, with INVERSE set for an IFFT, then clear it.
3. Poll `fft2hpscontrol` until bit 6 is set. For each of the N results, read
   `output_data` and `fft2hpscontrol`, then pulse READ.

FIFO1 is free once START has streamed it out. The next block can therefore be
loaded and started while earlier results still sit in FIFO2. If FIFO2 or
FIFO3 fills, the core waits, holding its output. So a slow reader loses
nothing.

One acquisition cell takes three transforms: FFT of the samples, FFT of the
replica (reused for every Doppler bin of that PRN), and IFFT of the product.
The product X·conj(C) is formed in software. Software must also rescale it
into 8 bits before the IFFT, because the core's inputs are 8-bit integers.
This scaling is the main accuracy limit of the scheme: small spectral
components are truncated away.

## The FFT core (`fftmod`)

The core is a buffered burst engine. It loads a whole block, computes, then
unloads. Its working memory has two banks: while one bank's block is computed
and unloaded, the next block is loaded into the other bank. `sink_ready` is
low only while both banks hold blocks.

- **Load (N cycles).** Samples arrive on an Avalon-ST-style sink with `sink_valid`,
  `sink_sop` and `sink_eop`, and `sink_ready` high while a bank is free. Each sample is
  stored at the bit-reversed address in the loading bank, N words. Each
  bank is organised as N/P rows of P words (P = 8 by default). Each word is two
  16-bit values (IW). The sample is placed 7 bits up, so the word
  keeps 7 fraction bits below the sample's integer LSB.
- **Compute (LOG2N·N/(2P) cycles).** There are LOG2N radix-2
  decimation-in-time passes, done in place. Each clock reads two rows, runs
  P butterflies on their 2P words and writes both rows back. In the first
  passes (span up to P) the two rows are adjacent and hold a whole group of
  butterflies. In the later passes the rows are span/P apart and are paired
  column by column. P is a parameter, any power of two up to N/2; P = 1
  gives a plain one-butterfly-per-clock engine. The twiddle factors come
  from a ROM filled at elaboration with
  `tw[k] = round(2^14·cos(2πk/N)) - j·round(2^14·sin(2πk/N))`, k < N/2.
  The inverse uses the conjugate. The inverse is not divided by N; the
  exponent carries the scale.
- **Block floating point.** A radix-2 butterfly can grow a component by at
  most 1+√2. Before each pass, the largest magnitude m written in the
  previous pass picks the pass's right shift:
  - 0 if m < 2^13;
  - 1 if m < 2^14;
  - otherwise 2.

  This keeps every result below 0.61 of full scale, so no overflow is
  possible. The exponent starts at -7, for the 7 fraction bits, and adds each
  shift. After the last pass, one normalisation cycle picks the smallest
  extra shift that fits the block into 8 bits. The output is then
  `value = source_real · 2^source_exp`, with a signed exponent.
- **Unload (N cycles).** Results leave in natural order with `source_sop`,
  `source_eop` and `source_exp`. `source_ready` gives backpressure with
  zero ready latency.

Rounding is by truncation throughout. Against a floating-point DFT, the error
stays within about one output LSB (2^exp) for random, 2-bit and full-scale
tone inputs. The impulse and constant inputs transform exactly.

Framing errors are reported on `source_error` until the next good block:

- 01: data arrived without a start of packet;
- 10: a new start of packet came, or the N-th sample had no `sink_eop`;
- 11: `sink_eop` came early.

The faulty block is dropped, and a non-zero `sink_error` also drops the block
being loaded.

**Speed.** With N = 32768 and P = 8 the compute takes 15 × 2048 = 30 720
cycles. The vendor buffered-burst core of the original design takes 28 796
cycles to compute a block. When the core is idle, the first result comes
LOG2N·N/(2P) + 2 cycles after the edge that accepts `sink_eop`: one start
cycle, the compute, and one normalisation cycle. Back-to-back blocks leave
N + 30 720 + 2 = 65 490 cycles apart. Loading is hidden behind the previous
block, but unloading does not overlap computing. The vendor core sustains
36 864 cycles per block, so this engine is about 1.8 times slower per block.
That is the main piece of the original behaviour this RTL does not
reproduce.

**Memory.** The design infers 3 866 624 memory bits (about 3776 K):

- FIFOs: 3 × 32768 × (16 + 16 + 6) bits;
- FFT working memory: 2 banks × 32768 × 32 bits;
- twiddle ROM: 16384 × 32 bits.

This is below the 5662 K block-memory bits of the Cyclone V SoC the original
targets. The FFT core's share is 2560 K, against 2281 K for the vendor
buffered-burst core it stands in for. The original design could fit only one FFT core, not the two FFTs,
multiplier and IFFT of a fully parallel datapath, and the same holds here.
The working memory reads and writes two rows of P words per clock, and
the twiddle ROM is read at P addresses per clock. The FIFO
output is an asynchronous read. Both map directly to simulation and generic
synthesis. A block-RAM target would need a pipelined, registered-read schedule and
replicated twiddle tables; that restructuring is not done.

## Other modules

- `fifo`: a single-clock, show-ahead FIFO (`q` shows the oldest word; `rdreq`
  pops it), with the FIFO port set `aclr`, `wrreq`, `rdreq`, `full`, `empty`,
  `almost_full`, `almost_empty` and `usedw`. `usedw` is 15 bits wide and
  saturates at 32767 when all 32768 words are used. The almost thresholds are
  parameters.
- `pio_out` and `pio_in`: PIO registers with data at word offset 0; the other
  three words of each window read as zero. `pio_in` samples its input every
  clock.
- `lw_decoder`: decodes the 21-bit byte offset into the four windows,
  forwards the write, and returns registered read data one cycle later with
  `readdatavalid`. Unmapped offsets read zero.
- `fft_ctrl`: edge-detects the commands, streams FIFO1 into the core with
  the packet markers and zero padding, routes results into FIFO2 and FIFO3
  while they have room, and forms the status byte.
- `gnss_fft_pkg`: shared widths, the address map, the bit assignments, the
  sample struct and the bus request struct.
- `gnss_fft_accel`: the top. Its bus port is a plain request struct
  (`read`, `write`, 21-bit `address`, 32-bit `writedata`) with no wait states.
  It has no AXI interface: the bridge itself is part of the SoC's hard
  processor system.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=… failures=…` and has a cycle watchdog.

| testbench | what it shows |
|---|---|
| `tb_fifo` | 20 000 random read/write cycles against a queue model: every word and flag, over- and underflow, and aclr |
| `tb_pio_out`, `tb_pio_in` | register write and read-back, offsets, and the sampling delay |
| `tb_lw_decoder` | chip selects and read data for all windows, for their edges, and for random addresses |
| `tb_fft_ctrl` | a held write code stores exactly one sample; START framing and zero padding; INVERSE latch; backpressure when the output FIFO is full; one pop per READ; CLEAR |
| `tb_fftmod` | a 256-point core against a floating-point DFT: impulse, constant, 2-bit, random and tone blocks, forward and inverse; compute latency; back-to-back blocks through both banks, their period, and the stall of a third; random backpressure; all three framing errors |
| `tb_gnss_fft_accel` | the full-size design in a complete acquisition (below) |

The top-level test uses the default parameters: 32768 points and 32768-word
FIFOs. It acts as the processor, over the bus port only:

- It generates 2 ms of 2-bit samples: PRN 1 delayed by 5000 samples, at
  IF + 1.5 kHz, in noise.
- It wipes off the carrier and writes 32735 samples, so the last 33 are
  zero-padded.
- It loads and starts the replica FFT before reading the first result. This
  forces about 800 000 cycles of output backpressure.
- While that replica's result waits in the core, it loads a second replica
  (PRN 3), which goes into the core's other bank.
- It forms the product, runs the IFFT, and finds the correlation peak.

Results:

- The sample FFT agrees with a floating-point FFT to within 2 output LSBs
  plus 1 % of full scale.
- The PRN 1 peak lands within half a chip of the true delay, with a peak
  about 400 times the mean.
- An absent PRN (3) gives a peak about 14 times the mean.
- It counts write requests, zero-padded samples, backpressure cycles, FFT
  and IFFT blocks, non-zero exponents and samples loaded into the second
  bank, and fails if any of these never occurs.

About 2.7 million cycles run in a few seconds.

Running a testbench with Verilator 5:

```
verilator --binary --timing -Irtl -y rtl rtl/gnss_fft_pkg.sv tb/tb_gnss_fft_accel.sv \
          --top-module tb_gnss_fft_accel -Mdir build && build/Vtb_gnss_fft_accel
```

For another testbench, swap its name in both places. The package must come
first; the other modules are found through `-y rtl`.

## Departures and open points

- **FFT engine.** The original uses a vendor buffered-burst FFT core, described
  only by its interface and cycle counts. `fftmod` does the same job behind
  the same port names. It adds `sink_ready`, because the feeding logic must
  know when the core can take a block. Its compute time is close to the
  original's, and it buffers the next block's input, but it is about 1.8
  times slower per block because unloading does not overlap computing.
- **Exponent.** The exponent is signed, and a result equals
  `output * 2**exp`. The original only says that the exponent scales the
  output.
- **Control encoding.** Only the write-request code 0x60 is taken from the
  original. START, READ, INVERSE, CLEAR and the status byte layout are
  choices made here, as is acting on rising edges.
- **Zero padding.** The original pads in software; here `fft_ctrl` pads in
  hardware whenever FIFO1 holds fewer than N samples at START.
- **Show-ahead FIFOs.** The FIFOs show the head word without a read cycle,
  and `usedw` saturates at 32767 when full.
- **No processor side.** The processor, the AXI bridge, the RF sampler and
  all acquisition, tracking and navigation software are outside this RTL.
  The testbench models only the processor's bus accesses and the
  acquisition arithmetic around the transforms.
- **No clock target.** No clock frequency is targeted or constrained.
