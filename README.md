# Real-time 16-channel FFT for tokamak MHD analysis

This is the FPGA data path of a PCIe acquisition card that watches magnetohydrodynamic
(MHD) activity in a tokamak (KSTAR) in real time. Sixteen magnetic probe signals are
sampled at 250 kHz with 16-bit resolution. Every 512 samples, which is every 2.048 ms,
each channel gets a 512-point FFT. The real-time computer then receives one *frame*: the
512 raw samples of all 16 channels together with their 16 spectra.

The main idea is to save FPGA resources by sharing one streaming FFT core among all
channels. The core runs at 100 MHz and transforms the 16 blocks one after another in
about 82 µs, a small part of the 2.048 ms between frames. The rest of the logic is
buffering, organised as two ping-pong pairs:

```
 adc_data[0..15] @ 250 kHz (clk_wr)
      |
      v                 per channel: channel_buffer
  +----------+  input switch: 512 samples to A, next 512 to B, ...
  |FIFO A|FIFO B|  (dual-clock, 1024 x 16 each)
  +----------+  MUX switch: reads the FIFO holding the oldest complete block
      |
      v  16 channels                                  @ 100 MHz (clk_rd)
  parallel_to_serial  -- ch0[0..511], ch1[0..511], ... ch15[0..511] -->  sink_*  (FFT core)
      |  same stream = raw data                                              |
      v                                                                       v
  result_pingpong: RAM 1 / RAM 2 (16384 x 32 each)  <---------------------  source_*
      |  output MUX switch
      v
  pcie_* read-out stream (to the card's PCIe DMA)       fft_dac_monitor -> dac_* (scope)
```

The FFT core, the ADC front end and the PCIe endpoint are vendor parts of the card.
They are not in this RTL: `kstar_fft_top` brings their signals out as ports.

## Frame timing

| quantity | value |
|---|---|
| sample clock `clk_wr` | 250 kHz, one sample per channel per edge qualified by `adc_valid` |
| processing clock `clk_rd` | 100 MHz |
| block | 512 samples per channel = 2.048 ms = 204 800 `clk_rd` cycles |
| frame into the FFT | 16 × 512 = 8192 samples, one per clock: 81.92 µs when never stalled |
| frame in a result RAM | 8192 raw words + 8192 FFT words = 16384 words of 32 bit |
| frame read-out | 16384 clocks = 163.84 µs if the host always accepts |

A frame starts streaming into the FFT a few `clk_rd` cycles after the last sample of its
block is written, if a result RAM is free. The delay is the two-flop pointer synchroniser
of the FIFOs. The testbench requires it to be under 100 ns.

## Crossing from the sample clock: the input ping-pong

Each channel (`channel_buffer`) has two dual-clock FIFOs, A and B. On the sample-clock
side a counter sends 512 samples to A, the next 512 to B, and so on (`wr_sel`). No
handshake with the read side is needed, because each FIFO is independent.

The read side keeps its own selection (`rd_sel`, the MUX switch). It starts on A and
moves to the other FIFO after 512 reads. It reports `block_ready` when the selected
FIFO's fill level, computed from the synchronised Gray-coded write pointer, reaches 512.
Because that fill level can only lag the true one, a block is never reported before all
its samples are in the memory.

The FIFOs are 1024 deep, twice a block. A complete block can therefore stay unread for
one more block period while its FIFO starts filling again. The design uses this room to
survive a slow host (see *Flow control*). `rd_data` is the read register of the FIFO that
delivered the last word. It holds until the next read, and it does not change when the
MUX moves on to the other FIFO.

`dual_clock_fifo` is a conventional design: binary and Gray pointers one bit wider than
the address, two-flop synchronisers, and a registered non-show-ahead read. A write into a
full FIFO is dropped and sets a sticky `overflow`.

## One FFT for sixteen channels

`parallel_to_serial` waits until all 16 channels have `block_ready` high and the result
side has a free RAM (`frame_go`). It then reads channel 0's 512 samples, then channel
1's, and so on up to channel 15. The output beat is the channel buffer's own read
register, so there is no extra pipeline stage. A new read is issued whenever the output
is empty or being taken (`out_valid && out_ready`). This gives one sample per clock, and
`sink_ready` from the FFT core can stall the stream at any beat. `sop` and `eop` mark
samples 0 and 511 of each channel block. An assertion checks that a stalled beat does not
change.

The FFT core is expected to behave like a block-floating-point streaming FFT with a
packet interface:

* **Sink.** It takes `sink_valid`/`sink_sop`/`sink_eop`/`sink_real`/`sink_imag` under
  `sink_ready`. `sink_imag` is always 0.
* **Source.** It delivers each channel's 512 bins in natural order on
  `source_valid`/`source_sop`/`source_eop`/`source_real`/`source_imag`.
* **Block exponent.** `source_exp` carries the block exponent and must be valid at
  `source_eop`.
* **No backpressure.** The source side has none: the result RAMs always accept.

The blocks must come out in the order they went in, which is how a streaming FFT works.
The channel number of an FFT block is found by counting blocks.

## Result RAMs and their three cycles

`result_pingpong` holds two 16384 × 32 bit RAMs (`result_ram`). A frame lives entirely in
one of them:

| addresses | content | word format |
|---|---|---|
| 0 … 8191 | raw samples, channel c sample s at c·512 + s | sample sign-extended to 32 bit |
| 8192 … 16383 | FFT results, channel c bin k at 8192 + c·512 + k | `{real[15:0], imag[15:0]}` |

Each RAM cycles through these states (`bank_state_t`, shown on `ram_state`):

1. **`BANK_RAW`** takes the serial raw stream through port A.
2. **`BANK_FFT`** is entered when all 8192 raw words are in. The RAM waits for the rest
   of the FFT results.
3. **`BANK_READOUT`** is entered when all 8192 FFT words are in. All 16384 words are
   shifted out on the `pcie_*` stream, address 0 first. `pcie_bank` says which RAM is
   being read. `pcie_exp[c]` gives the block exponent of channel c's transform: the true
   spectrum is the stored value × 2^`pcie_exp[c]`.
4. **`BANK_FREE`** is entered after the last word has been taken (`pcie_last`).

A streaming FFT delivers the spectra of the first channels while the samples of later
channels are still going in. FFT words are therefore accepted in `BANK_RAW` already,
through port B, while raw words use port A. In `BANK_READOUT`, port B reads instead.

Raw frames and FFT frames each have their own RAM pointer. Both alternate between RAM 1
and RAM 2, so FFT results always land in the RAM that holds their raw data. The
`fft_ram0_wr_address`/`fft_ram1_wr_address` ports show where each RAM is being written.

The read-out stream is valid/ready. `pcie_data`, `pcie_addr`, `pcie_last` and `pcie_bank`
belong to the beat and hold while `pcie_ready` is low.

## Flow control and data loss

* The host reads a RAM while the other one fills. If both RAMs still wait for the host
  when the next frame is complete, that frame stays in the FIFOs (`frame_wait` = 1) and
  is sent as soon as a RAM is freed. Nothing is lost.
* A frame can wait for about one more block period. After that the input FIFOs fill up
  and samples are dropped. `fifo_overflow` (sample-clock domain, sticky until reset)
  reports this. After an overflow the channels are no longer block-aligned: reset the
  design.
* The FFT core can stall its input with `sink_ready`. Such stalls only stretch the
  81.92 µs streaming time.

## D/A monitor

`fft_dac_monitor` is for bench testing with an oscilloscope. It shows the real part of
the spectrum of one channel (`mon_ch`) on a 16-bit D/A output:

* **Capture.** The channel's 512 real parts are captured into one of two buffers as the
  FFT delivers them. When the block is complete, the buffers swap.
* **Playback.** The new spectrum plays from bin 0, one bin every `DAC_DIV` = 400 clocks.
  That is one bin per 4 µs sample period, so one sweep lasts exactly one frame.
* **Indicator.** `dac_marker` is high on bins 0 and 511, marking the start and end of the
  FFT on the scope.
* **Between blocks.** The sweep repeats until the next block arrives.

With a 20 kHz input the peak appears at bin 20/250 × 512 ≈ 41, and its mirror image at
bin 471.

## Files

| file | content |
|---|---|
| `rtl/rtfft_pkg.sv` | sizes, RAM-state enum |
| `rtl/dual_clock_fifo.sv` | 1024 × 16 dual-clock FIFO |
| `rtl/channel_buffer.sv` | FIFO A/B ping-pong of one channel |
| `rtl/parallel_to_serial.sv` | 16-channel to single-stream converter |
| `rtl/result_ram.sv` | one 16384 × 32 dual-port RAM |
| `rtl/result_pingpong.sv` | two RAMs, their cycles, read-out MUX, exponent table |
| `rtl/fft_dac_monitor.sv` | spectrum to D/A with start/end indicator |
| `rtl/reset_sync.sv` | reset synchroniser, one per clock domain |
| `rtl/kstar_fft_top.sv` | the whole path |
| `tb/tb_*.sv` | one self-checking testbench per block, one for the system, one for the single-channel D/A test |
| `tb/fft512_model.sv` | behavioural streaming FFT (floating-point DFT, block scaling), testbench only |

All parameters default to the sizes above: 16 channels, 512 points, 1024-word FIFOs,
16384-word RAMs. `result_pingpong` requires `DEPTH = 2·CH·N`.

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and ends with `$finish`. For
example, the system test at full size:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_kstar_fft_top \
    -y rtl -y tb +libext+.sv -Irtl rtl/rtfft_pkg.sv tb/tb_kstar_fft_top.sv -o sim
./obj_dir/sim
```

It simulates about 27 ms, 13 frames, in a few seconds. The block testbenches build the
same way with their own `--top-module` and file.

`tb_kstar_fft_top` drives a 20 kHz sine wave with a DC offset and noise on channels 1, 3,
…, 15 (indices 0, 2, …) and zero on the others. It uses the FFT model with random
`sink_ready` stalls and a model host. Its run has three phases:

1. **Host off.** Frames 0 and 1 fill both RAMs and frame 2 has to wait.
2. **Host reading.** The host reads with random stalls up to frame 7.
3. **Host stopped.** The host stops until the FIFOs overflow.

It checks:

* every read word against the sample or FFT value that went in for that address;
* frame order and the RAM alternation;
* the block exponents;
* the start latency and streaming time of a frame;
* the 20 kHz peak at bin 41.

It also counts each mechanism (FIFO switch, RAM switch, FFT stall, host stall, frame
wait, overflow, each RAM state, D/A markers) and fails if one never happened.

`tb_single_channel_dac` repeats the single-channel bench test: a 20 kHz sine wave on
channel 1 only, with the D/A monitor on that channel. It computes its own DFT of the
first frame and checks every bin of the first D/A sweep against it, within one LSB
after block scaling. It also checks the 4 µs update pacing and the start/end indicator.
Near 20 kHz it checks the typical leakage shape of the real part: a positive extreme
followed by a negative one across bins 40 to 42, since 20 kHz lies between bins 40
and 41.

## How far it has been checked, and what is not here

* Every file passes Verilator lint (`-Wall`) and Yosys/slang elaboration. Every testbench
  passes. For each block, a deliberately broken copy was shown to fail its testbench.
* **Not covered:**
  * synthesis and timing on the target FPGA (an Arria V);
  * formal checking of the clock-domain crossing (it is simulated only, with unrelated
    clock periods);
  * the real FFT core's interface timing, which the model approximates;
  * the PCIe DMA, the ADC interface and the host software.
* **Remaining lint warnings, by design.** Verilator reports `SYNCASYNCNET`: the resets
  are used asynchronously by the flip-flops and synchronously by the `disable iff` of
  the assertions. It also reports unused package constants and unused outputs that are
  left unconnected on purpose. The top's `sink_imag` is a constant 0.

### Design choices made here

The overall structure, the sizes, the two clocks, the 512-sample FIFO switching, the
channel serialisation, the two result RAMs with their raw, FFT and read-out cycles, and
the D/A test output are those of the original system. The following are this
implementation's own choices:

* **FIFO internals.** The pointer scheme and the read-side "block complete" rule.
* **Handshakes.** The valid/ready handshakes and the rule that a frame starts only when
  all channels are ready and a RAM is free.
* **RAM port use.** Port A for raw words, port B for FFT words or read-out. FFT words are
  accepted during the raw cycle.
* **RAM memory map and word layout.**
* **Exponent table.** The per-RAM block-exponent table. The original RAM layout has no
  room for exponents.
* **Overflow reporting.** The sticky overflow flag and the `frame_wait` status.
* **D/A pacing.** The monitor's double buffer, its 400-clock pacing and the exact marker
  bins.
* **Resets.** The reset scheme: asynchronous assert, synchronous release per domain.
* **Exponent width.** The 6-bit block exponent.
