# T-DMB receiver SoC in SystemVerilog

This is a receiver for Terrestrial Digital Multimedia Broadcasting (T-DMB). T-DMB is the Korean
mobile-TV system built on the Eureka-147 DAB radio layer. The design takes the raw 10-bit
samples of an ADC that sub-samples a 2.048 MHz-wide IF channel at 8.192 MHz. From them it
recovers the MPEG-2 transport stream that the channel carries, packet by packet. On the way
it finds the transmission frame and locks onto the carrier frequency and symbol timing. It
then undoes the OFDM modulation and the 384 ms time interleaving, decodes the inner
convolutional code and the outer Reed-Solomon code, and hands the transport-stream packets
to a host processor and a DMA engine that filters them by PID.

Around that baseband chain sit some smaller multimedia engines:

- an I2S transmitter for decoded audio;
- a mailbox that passes audio-stream descriptors to an audio DSP;
- three parts of an H.264 decoder: an Exp-Golomb variable-length decoder, the inverse
  transforms with de-quantisation, and picture reconstruction.

The audio decoder, the processors, the memory and display controllers, and the other H.264
stages are not included. The top level brings out the ports where they would connect.

All RTL is synthesizable SystemVerilog. The one exception is `psram.sv`, a behavioural model
of the external de-interleaving memory that is used only by the testbenches.

## Signal chain at a glance

```
adc_data ─ down_converter ─ dco ─ agc ─┬─ fft ── qpsk_demod ── time_deinterleaver ══ PSRAM
 8.192 MS/s   (fs/4 mix, /4)  (CORDIC)  │   │                         │
                                        │   ├─ coarse_freq_sync       sync_fifo
           frame_sync, fine_freq_sync ──┘   └─ fine_timing_sync ─ fft (inverse, CIR)
                     │                                                │
                 sync_ctrl  (symbol timer, acquisition sequence, DCO word)
                                                                      │
 depuncturer ─ viterbi_decoder ─ descrambler ─ ts_sync ─ conv_deinterleaver ─ rs_decoder ─ ts_buffer_pid ─ DMA / uP
```

Source files, one module each in `rtl/`:

| Stage | Files |
|---|---|
| Clocks | `clk_rst_ctrl` |
| Front end | `down_converter`, `dco` (uses `cordic_rotate`), `agc` |
| Synchronisation | `frame_sync`, `fine_freq_sync` (uses `cordic_vector`), `coarse_freq_sync`, `fine_timing_sync`, `sync_ctrl` |
| Demodulation | `fft`, `qpsk_demod` |
| Inner decoding | `time_deinterleaver`, `sync_fifo`, `depuncturer`, `viterbi_decoder`, `descrambler` |
| Outer decoding | `ts_sync`, `conv_deinterleaver`, `rs_decoder` |
| Transport stream | `ts_buffer_pid` |
| Multimedia | `i2s_tx`, `dsp_if`, `h264_vld`, `h264_transform`, `h264_recon` |
| Top level | `tdmb_soc` |
| Shared package | `tdmb_pkg` |

Each file opens with a comment covering:

- what the module computes;
- its handshake and latency;
- which choices are the design's own.

## Clocking

The receiver runs at eight rates: 2.048, 4.096, 8.192, 16.384, 24.576, 13.5, 27 and 54 MHz.
The first five are all divisions of 49.152 MHz, so the baseband runs on one master clock
`clk` at 49.152 MHz. `clk_rst_ctrl` produces one-cycle clock enables from it:

| Enable | Divisor | Rate | Blocks it drives |
|---|---|---|---|
| `ce[0]` | /2 | 24.576 MHz | FFT butterflies |
| `ce[1]` | /3 | 16.384 MHz | Reed-Solomon correction |
| `ce[2]` | /6 | 8.192 MHz | ADC sample strobe, output as `adc_sample` |
| `ce[3]` | /12 | 4.096 MHz | |
| `ce[4]` | /24 | 2.048 MHz | complex baseband samples |

The multimedia side runs on a second clock `clk_mm` at 54 MHz, with 27 MHz and 13.5 MHz
enables. The two domains exchange no data inside this design; they would meet only in the
shared SDRAM.

Using enables means there is only one clock tree per domain and no clock-domain crossings
inside the baseband. The cost is that a few blocks do their arithmetic at the master rate.
The Viterbi add-compare-select step and the TS packet buffer are examples.

## Front end: from real IF samples to complex baseband

With an 8.192 MHz sample rate, every allowed IF (2.048 MHz + n·4.096 MHz) folds down to
fs/4. Mixing to DC is therefore a multiplication by the sequence 1, −j, −1, +j, which needs no
multiplier. `down_converter` does this mixing. It then sums each group of four mixed samples,
which is a boxcar decimation to 2.048 MS/s. `INVERT` flips the spectrum for the IF positions
that arrive mirrored.

`dco` removes the carrier frequency offset. It rotates each sample by a phase that a 24-bit
accumulator advances by the frequency word `fw`. The word is in units of 2⁻¹⁰ of the
subcarrier spacing, so the steps are finer than a thousandth of a carrier. The rotation is a
16-stage pipelined CORDIC.

`agc` sits before the FFT so that the fixed-point FFT cannot overflow. Over each block of
`LEN` samples it measures the mean magnitude and moves the gain by 1/16 steps toward
`TARGET`. It has a dead band so that the gain does not chatter.

## Synchronisation: the hardest part to follow

A DAB mode-I frame has two parts:

1. a null symbol of 2656 samples with (nearly) no signal;
2. 76 OFDM symbols of 2048 + 504 samples. Symbol 0 is the phase reference symbol (PRS), whose
   carriers are known.

The receiver must find four things, in an order where each step relies on the ones before it.
`sync_ctrl` owns that order. It also runs the symbol timer that tells every other block where
the FFT windows are. Its states are:

| State | When | What happens |
|---|---|---|
| `SY_FRAME` | start | `frame_sync` compares a 64-sample moving power average with a long-term average. A dip below 1/4 that lasts at least `MIN_NULL` samples is a null symbol. Its end (power back above 1/2) gives the frame start. From then on the symbol timer free-runs frame after frame. |
| `SY_FINE_FREQ` | every symbol from the first frame on | `fine_freq_sync` correlates each symbol's cyclic prefix with the symbol's tail. The angle of that correlation, found with a vectoring CORDIC, is the fractional frequency offset in the same 2⁻¹⁰-spacing units. `sync_ctrl` adds it to the DCO word, so this is a first-order loop. |
| `SY_COARSE` | third frame | By now the fractional offset is gone, but an integer number of carriers may still be off. `coarse_freq_sync` stores the FFT of the PRS. For every trial shift it correlates the products of neighbouring received carriers with those of the known PRS. Comparing neighbours makes the test immune to a timing offset. The best shift adds ±1024 per carrier to the DCO word. |
| `SY_TIMING` | fourth frame | `fine_timing_sync` divides each received PRS carrier by the known one. For QPSK this is a multiplication by the conjugate. The result goes through an inverse FFT, which gives the channel impulse response. The position of its largest peak is the timing error; positions above N/2 count as early. The symbol timer moves the next frame by that many samples. |
| `SY_TRACK` | every frame after that | Fine frequency keeps running on each symbol and fine timing on each frame, to follow drift. Payload decoding starts with the next whole frame. |

Some consequences worth knowing:

- **Sign conventions must agree.** The DCO word, the fine estimate and the coarse shift all
  share one sign convention. Getting them to agree is what makes the loop converge. In the
  end-to-end test a 2.3-carrier offset settles at `fw` ≈ 2.3·1024.
- **The FFT is used twice.** The design uses a second `fft` instance (run inverse) for the
  impulse response, so the demodulating FFT never has to stop for it. A single shared,
  time-multiplexed FFT would save that memory. It is the first thing to fold back if area
  matters.
- **The PRS is not built in.** The PRS and frame-length constants come from the DAB standard
  and are passed in, not derived. The top exposes the PRS as a lookup port
  (`prs_idx` → `prs_code`), so that a ROM or the host can supply it.
- **Carrier order.** Carrier index c = 0..KC−1 stands for frequencies −KC/2..−1, +1..KC/2. The
  top maps FFT bins to that index.

## FFT

`fft` is a memory-based radix-2 decimation-in-time transform with one butterfly per
24.576 MHz enable. Each stage halves the result, so a full-scale input cannot overflow.

It has two sample banks. One symbol is written in bit-reversed order while the previous one
is transformed in place and read out in natural order. Every input symbol carries an 8-bit
tag (the symbol number) that reappears on its outputs. `overflow` flags a third symbol
arriving while both banks are busy.

A 2048-point symbol takes 11264 butterfly steps plus 2048 output steps: 26,624 master clocks.
A symbol lasts 61,248 master clocks, so the FFT is idle more than half the time.

## Differential demodulation

`qpsk_demod` keeps the previous symbol's value for every active carrier. It multiplies each
carrier by the conjugate of that value and turns the real and imaginary parts into 4-bit
signed soft bits: +7 means a confident 0, −8 a confident 1. `SH` sets the scaling.

Two parts of the DAB receiver are left out:

- **Frequency de-interleaving.** Carriers are taken in FFT bin order, and the transmitter model
  in the testbench matches this. A full DAB receiver must add the carrier permutation here.
- **The Fast Information Channel.** Its symbols (1..`NFIC`) are skipped. Only Main Service
  Channel symbols go on.

## Time de-interleaving in external PSRAM

The transmitter delays bit i of every 55,296-bit common interleaved frame (CIF) by P(i mod 16)
frames, with P = 0, 8, 4, 12, 2, 10, 6, 14, 1, 9, 5, 13, 3, 11, 7, 15. Undoing that means
holding 15 frames of soft bits, which is 384 ms of data.

`time_deinterleaver` keeps 16 slots of one CIF each in the external PSRAM. Each 16-bit word
packs four consecutive 4-bit soft values. For every four values that arrive, it does the
following:

- writes one word into the slot of the current CIF;
- reads the four words that hold the matching bits of the four older CIFs, whose slot numbers
  follow from P;
- emits the four de-interleaved values in order.

Values with P = 15 come straight from the input. That is 5 PSRAM accesses per 4 soft values.
A small FIFO (`FIFO_D`) absorbs the bursts in which the demodulator delivers a whole symbol.

`out_ok` rises once 15 whole CIFs are stored. The top only passes data on from then. At the
defaults the storage is 16 × 13,824 words = 3.54 Mbit, which fits in a 4 Mbit PSRAM with
`MEM_AW` = 18.

The PSRAM port (`mem_ce_n`, `mem_we_n`, `mem_oe_n`, `mem_addr`, `mem_wdata`, `mem_rdata`) is a
simple synchronous interface with read data one clock after the address. A real
pseudo-SRAM may need a wrapper that adds wait states.

## Inner code: de-puncturing, Viterbi, energy dispersal

- **De-puncturing.** `depuncturer` walks a 32-bit puncturing vector (`punct_pv`, set by the
  host) and puts back an erasure (soft 0) for each removed code bit. It emits groups of four
  for the rate-1/4 mother code.
- **Viterbi.** `viterbi_decoder` is the 64-state decoder for generators 133, 171, 145, 133
  (octal). It has 4-bit soft inputs, a 12-bit metric and truncation length 128. All 64
  add-compare-select operations happen in one clock. Survivors use register exchange:
  64 × 128 flip-flops, which is the largest register block in the design. The output bit is
  taken from the best state's survivor, 128 steps back. The decoder runs continuously across
  frames and does not use the 6 tail bits.
- **Energy dispersal.** `descrambler` XORs the decoded bits with the x⁹+x⁵+1 sequence. The
  sequence restarts every `lf_bits` bits. `lf_bits` is the logical-frame length of the
  selected sub-channel; the host writes it, because sub-channel organisation is decoded in
  software.

## Outer code: finding packets, convolutional de-interleaving, Reed-Solomon

Nothing in the bit stream marks where the 204-byte RS codewords begin. `ts_sync` finds them.
For every one of the 1632 bit positions of a packet it keeps a 2-bit count of how often the TS
sync byte 0x47 has appeared there in a row. It locks where the count reaches `CONFIRM`. It
drops lock after `MISS_MAX` packets without a sync byte.

`conv_deinterleaver` is the I = 12, M = 17 byte de-interleaver. Branch j delays bytes by
(11 − j)·17 packets' worth of slots, held in one shared RAM. Its total delay is 2244 bytes,
exactly 11 packets, so packet starts come out where they went in. The top relies on that and
does not search for packets a second time.

`rs_decoder` decodes the shortened RS(204,188) code over GF(2⁸), with p(x) = x⁸+x⁴+x³+x²+1
and generator roots α⁰..α¹⁵. Two codewords are in flight. While one arrives and its 16
syndromes are built by Horner's rule, the other goes through these steps:

1. Berlekamp-Massey (16 steps);
2. the evaluator polynomial;
3. a 204-position Chien search with Forney correction;
4. output.

All of these run on the 16.384 MHz enable. Up to 8 wrong bytes are corrected. More than that
sets `out_err` for the packet, which also sets the transport-error bit downstream.

## Transport-stream buffer and PID filter

`ts_buffer_pid` captures each 188-byte packet in one of two packet buffers.

- **Processor path.** For packets the processor asked for, it raises `ts_irq` and holds the
  packet readable at `ts_rd_addr`/`ts_rd_data` until `ts_irq_ack`.
- **DMA path.** Independently, it compares each PID with up to 8 programmed PIDs. Matching
  packets are streamed with a valid/ready handshake to `dma_addr`, a byte address that walks a
  ring in SDRAM.

The registers are written through `ts_reg_we`/`ts_reg_addr`/`ts_reg_wdata`. The address map
is in the module's header comment. Counters report matched, interrupted and dropped packets.

## Multimedia engines

- **`i2s_tx`**: sends 16-bit stereo samples to an external DAC in standard I2S framing (data
  one bit after the word-select edge). It counts underruns when no sample is ready.
- **`dsp_if`**: a descriptor FIFO. The processor pushes the address and length of an audio
  stream stored in SDRAM, and the DSP sees `dsp_irq` until it has taken every descriptor.
- **`h264_vld`**: reads a 32-bit-word bit stream and executes commands: ue(v), se(v) and
  fixed-length u(n). CAVLC is **not** implemented.
- **`h264_transform`**: covers the 4×4 inverse integer transform and the 4×4 luma-DC and 2×2
  chroma-DC Hadamard transforms, with flat-matrix de-quantisation by QP.
- **`h264_recon`**: adds a 4×4 residual to the prediction and clips to 0..255.

## Parameters of the top level

| Parameter | Default | Meaning |
|---|---|---|
| `NFFT`, `GUARD`, `NULLN`, `NSYM` | 2048, 504, 2656, 76 | DAB mode I frame |
| `KC`, `NFIC` | 1536, 3 | active carriers, FIC symbols |
| `CIFB` | 55296 | bits per CIF |
| `QPSK_SH` | 12 | soft-bit scaling shift |
| `CFS_S` | 8 | coarse search range ±8 carriers |
| `MEM_AW` | 18 | PSRAM word address width |
| `TDI_FIFO` | 1024 | time de-interleaver input FIFO |
| `I2S_DIV` | 16 | I2S bit-clock divisor |

Smaller values of the first four rows give a scaled system with the same structure. The
testbenches use that to keep simulation short.

## Where this design goes its own way

Some of these choices fill gaps where no algorithm was given:

- the null-symbol detector;
- the AGC law;
- the coarse-frequency estimator;
- the way packet boundaries are found.

Others simplify the architecture:

- a second FFT for the impulse response;
- one master clock with enables instead of separate clock trees;
- a Viterbi decoder that runs continuously.

Three parts of a complete T-DMB receiver are left to the host or to later work:

- frequency de-interleaving;
- FIC decoding;
- deriving the puncturing vector and logical-frame length.

The behaviour was checked against its intended function by the testbenches below, not
against silicon.

## Simulating

Every block has a self-checking testbench `tb/tb_<module>.sv`. Each one ends by printing
`TB_RESULT checks=<n> failures=<m>`. Simulate one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_rs_decoder \
    rtl/tdmb_pkg.sv -y rtl -y tb tb/tb_rs_decoder.sv
./obj_dir/Vtb_rs_decoder
```

Replace `tb_rs_decoder` with any other testbench name. `-y rtl -y tb` lets Verilator find the
other modules by file name. The testbenches draw their stimulus from `$urandom`. Add
`+verilator+seed+<n>` and `+verilator+rand+reset+2` to try other seeds and random initial
states.

The system-level testbench is `tb_tdmb_soc`. It uses `tdmb_tx.sv`, a behavioural transmitter
that builds the whole signal:

1. TS packets with two PIDs and injected byte errors;
2. RS encoding, convolutional interleaving and energy dispersal;
3. K = 7 convolutional coding and time interleaving;
4. DQPSK on the carriers, with a PRS and a null symbol;
5. a frequency offset, an arbitrary start time and noise;
6. the real fs/4 IF signal sampled for the ADC.

It runs a scaled system: 256-point FFT, 64-sample guard, 12 symbols per frame, 192 carriers,
768-bit CIFs and a 4096-word PSRAM. It takes about 20 seconds. It checks that the received
packets match the sent ones byte for byte, on both the DMA and the interrupt path. It also counts
18 mechanisms and fails if any never happens: frame detection, each sync state, fine and coarse
DCO updates, AGC action, TDI fill, TS lock, RS correction, PID DMA, processor interrupt, I2S
output, the DSP mailbox, the VLD, and transform plus reconstruction.

That scaled configuration is the largest one simulated end to end. At the default sizes
(2048-point FFT, 76 symbols, 3.5 Mbit de-interleaver), fifteen 96 ms frames must pass before
the first payload bit leaves the de-interleaver. With Verilator that takes far longer than ten
minutes, and no full-size run has been completed. Some block testbenches also use reduced
sizes: the FFT at 256 points and the time de-interleaver with 64-bit CIFs. The Viterbi
decoder, the Reed-Solomon decoder and the convolutional de-interleaver are tested at their
real sizes.
