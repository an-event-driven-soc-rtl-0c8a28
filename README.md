# Event-driven 64-channel neural recording SoC: digital core

Recording from many electrodes at once produces more data than a small implant can afford to send. This chip records 64 channels, but a channel does not have to stream every sample. Each channel is set to one of four modes:

| mode | code | what is sent |
|---|---|---|
| EAP streaming | 0 | every sample (action-potential band) |
| spike events | 1 | only 16-sample windows around detected spikes |
| LFP streaming | 2 | every 8th sample (local field potential band) |
| combined | 3 | every sample, wide analogue band (LFP + EAP) |

Spike detection happens on chip. Every sample is high-pass filtered, then compared in absolute value with a threshold, so spikes of either polarity count. Three crossings in a row validate a spike. Data leave the chip as packets over an SPI slave port. The external controller is the SPI master and pulls the packets when the chip signals that it has some.

This repository holds synthesizable SystemVerilog for the digital part of the chip. It also holds a behavioural model of the SAR ADC and self-checking testbenches for every module. The analogue front ends, the PLL and the bias circuits are not included. The module interfaces show where they connect.

## Architecture

```
 afe_vin[64] ──► 16 × ┌────────────────────────────── rec_block ───────────────────────────┐
 (AFE outputs)        │ sar_adc ─► iir_hpf ─► thresh_detect ─► spike_engine ×4 ─► req/info │
                      │ (4:1 mux,  (shared by   (|y| > thr)       (validation, window,     │
                      │  S&H, SAR)  4 channels)                    decimation, latency)    │
                      │ 64-bit config shift register ─► AFE controls                       │
                      └──────────────┬───────────────────────────────────────────┬─────────┘
   adc_timing ── trigger bus ───────►│ msb/lsb bytes                             │ 64 requests
   (rate, channel, frame, row)       ▼                                           ▼
                               sram_wr_seq ─► sram_8b (8-bit, ring) ─► packetizer ◄─ rr_scheduler
                                                                          │ words
                               spi_slave ◄──────── chip_fsm ◄─────────────┘
                              (SCLK/CS/MOSI/MISO)  (IDLE/ARST/CHPF/CSR/CFG/RO)
```

`neural_soc` is the top. The 64 channels form 16 blocks of 4 channels. Each block has one 10-bit ADC. The ADC converts the block's four channels in turn, so each channel is sampled at a quarter of the ADC rate.

### Timing: periods, frames and the trigger bus

All 16 ADCs share one trigger bus (`adc_timing`), so they sample at the same moments. The timing has two units:

* A **conversion period** lasts `47 + csr` clock cycles. In one period, every block converts the same channel (`ch_sel`).
* A **frame** is four periods, one per channel. A frame fills one row of the SRAM ring, and latencies are counted in frames.

The 8-bit `csr` code is set with the CSR command. The specified ADC rate range is 85 kHz down to 13.245 kHz, and a 4 MHz clock fits both ends exactly: 4 MHz/47 = 85.1 kHz and 4 MHz/302 = 13.245 kHz. The design therefore assumes a 4 MHz clock. `PERIOD_MIN` holds the 47.

Within one period:

| cycle | event |
|---|---|
| 0 | `conv_start`: each ADC samples its channel |
| 1–10 | SAR bit decisions |
| 11 | ADC `done` |
| 12 | HPF result; threshold decision; spike engine updated |
| 13 | block bytes offered (`smp_valid`); `sram_wr_seq` starts |
| 14–45 | 32 SRAM writes (16 blocks × 2 bytes) |
| 46 | `commit`: requests for these samples may now be raised |

A period of 47 cycles is therefore the shortest that works. Assertions in `neural_soc` check that the ADCs and the SRAM writer are idle at every `conv_start`.

### Samples in the SRAM

The SRAM is an ordinary memory with 8-bit words. A 10-bit sample does not fit in one word. Each block's part of a frame row therefore takes 5 bytes:

| byte | contents |
|---|---|
| 0..3 | bits [9:2] of channels 0..3 |
| 4 | `{ch3[1:0], ch2[1:0], ch1[1:0], ch0[1:0]}` |

Byte address = `(row × 16 + block) × 5 + byte`; see `nr_pkg::row_addr`. After each period the writer stores the converted channel's MSB byte for every block. It also rewrites the packed LSB byte, holding every LSB pair known so far. A channel's two bits are therefore correct as soon as its own period has ended.

The ring has `RING_ROWS` = 64 frames, 5120 bytes. Samples are kept for 64 frames and then overwritten. This ring is what allows the chip to send the 4 samples that came *before* a spike was recognised.

### Filtering and detection (`iir_hpf`, `thresh_detect`)

The high-pass filter is first order, in direct form II, with pole `1 - 2^-k`:

    w[n] = x[n] + w[n-1] - (w[n-1] >>> k)        y[n] = x[n] - (w[n-1] >>> k)

`w[n-1] >>> k` is a running estimate of the DC level, and the filter subtracts it. Multipliers are not needed: each step of `k` moves the corner by about 6 dB (fc ≈ fs/(2π·2^k)). There are nine settings, `k = 1..9`. There is a single adder datapath, shared by a block's four channels in time. Each channel keeps its own 21-bit state `w`. The output `y` is saturated to 10 bits, and `y` is what the SRAM stores. A powered-down channel's state is held at zero.

`thresh_detect` outputs `|y| > thresh`, where `thresh` is the channel's 7-bit threshold.

### Spike engine: validation, windows, requests and latency

Each channel has its own `spike_engine`.

* **Spike mode**
  * A run counter counts consecutive threshold crossings.
  * The third crossing in a row is the *validation point*. The window is the 4 samples before it plus 12 samples starting at it: 16 samples.
  * Once the 12th sample has been taken, the engine waits for the SRAM commit of that sample and then raises its request.
  * While a window is being collected, crossings are ignored. After the window, three new crossings are needed for the next spike.
* **EAP streaming and combined modes** raise a request for every sample.
* **LFP streaming** raises a request for every 8th sample. This is plain decimation: the other samples are stored but not sent.

A request carries:

* the ring row of its newest sample (`end_row`),
* the channel's mode,
* a latency counter: the number of frames the request has waited since it became ready. The header sends this so the receiver can place the samples in time,
* a *lost* flag.

A request can be lost in two ways:

* A new one becomes due while the old one is still waiting. The new one is dropped.
* A request has waited `LAT_LIMIT` = 32 frames. Its oldest samples are then close to being overwritten in the ring, so it is dropped.

Either case sets *lost*. The next header of that channel shows the flag, and sending that header clears it.

### Scheduler and packets (`rr_scheduler`, `packetizer`)

The scheduler serves only channels that have a request pending. It serves them in index order, starting after the channel served last and wrapping from 63 to 0, so no channel can starve the others. The packetizer takes one granted request at a time and produces the packet's words:

```
header  [15]=1 | [14:13] mode | [12:7] channel | [6] lost | [5:0] latency (frames, saturating)
data    [15:10]=0 | [9:0] sample, two's complement, oldest first
```

A spike packet has one header and 16 data words. A streaming packet has one header and one data word. Each data word is rebuilt from two SRAM reads, the MSB byte and the packed LSB byte.

### Command interface (`spi_slave`, `chip_fsm`)

SPI is mode 0, MSB first, with 16-bit words. `spi_slave` samples SCLK, CS_n and MOSI with the system clock, so SCLK must be at most clk/16, with 8 clocks per half period. Leave CS_n high for at least 4 clocks between words.

Each word is answered in the *next* transfer by its bit-wise inverse, so the master can check the link. The chip-level FSM has six states. The opcode sits in bits [15:12]:

| opcode | command | effect |
|---|---|---|
| `0` | NOP | nothing, in any state |
| `1` | ARST | hold AFEs in reset until STOP; scope in [11:10]: 0 = chip, 1 = block [3:0], 2 = channel [5:0] |
| `2` | CHPF | the next word's [4:0] becomes `hpf_dac`, the global code of the AFE high-pass bias DAC; back to IDLE |
| `3` | CSR | the next word's [7:0] becomes the sample-rate code; back to IDLE |
| `4` | CFG | block in [3:0]; the next 4 words are shifted into its configuration register; back to IDLE |
| `5` | RO | readout: replies are packet words, or `0000` when none is ready; only STOP is obeyed |
| `F` | STOP | back to IDLE from ARST or RO |

`data_req` is high in RO while anything is waiting to be sent. The master should then keep clocking words.

**Configuration.** Each block holds a 64-bit shift register: one 16-bit word per channel (`nr_pkg::ch_cfg_t`).

| bits | field |
|---|---|
| [15:14] | mode |
| [13] | enable |
| [12:11] | AFE gain |
| [10:7] | HPF select (`k = min(sel,8)+1`) |
| [6:0] | threshold |

The four CFG data words go to channels 0, 1, 2, 3 in that order. The old words come back in the replies: the reply to the first data word is the CFG acknowledge, and the old words 0..3 follow, the last one in the transfer after the CFG sequence. Because it is a shift register, a block passes through mixed settings during the four shifts. Configure a block while its data does not matter, or stop its channels first.

After reset every channel is powered down and in mode 0.

The AFE controls follow the configuration:

| output | meaning |
|---|---|
| `afe_pd` | `!enable` |
| `afe_hp_low` | sub-hertz high-pass pole, in LFP and combined modes |
| `afe_lp_low` | 220 Hz low-pass corner, in LFP mode only |
| `afe_gain` | the gain field |

## Parameters

| where | parameter | default | meaning |
|---|---|---|---|
| `neural_soc` | `RING_ROWS` | 64 | SRAM ring depth in frames (SRAM = `RING_ROWS`×80 bytes) |
| `neural_soc`, `rec_block`, `spike_engine` | `LAT_LIMIT` | 32 | frames a request may wait before it is dropped |
| `neural_soc`, `adc_timing` | `PERIOD_MIN` | 47 | clock cycles per conversion at `csr` = 0 |
| `nr_pkg` | `NBLK`, `CH_PER_BLK` | 16, 4 | block structure (not meant to be changed) |
| `nr_pkg` | `PRE_SAMP`, `POST_SAMP`, `VALID_RUN`, `LFP_DECIM` | 4, 12, 3, 8 | spike window and decimation |

`LAT_LIMIT` must stay below `RING_ROWS - 16`.

## How far to trust it, and where it departs from the specification

Taken from the specification:

* 64 channels in 16 blocks of 4, with one time-multiplexed 10-bit ADC per block on a common trigger bus.
* A direct-form-II IIR high-pass filter shared by the four channels and tuned by shifts.
* Absolute-value threshold detection.
* Three-crossing validation and the 4 + 12 sample window.
* LFP decimation by 8.
* An 8-bit SRAM with MSBs and LSBs stored apart.
* Readout of pending channels in index order, with a latency counter.
* The six-state FSM with its command set, the inverted-copy acknowledge, CFG returning the old words, and the 5-bit CHPF and 8-bit CSR codes.

This design's own choices:

* the 4 MHz clock and the `47 + csr` divider, inferred from the rate range;
* every binary encoding: opcodes, the command fields, the configuration word, the packet layout;
* the SPI mode and oversampling;
* the SRAM size and its one-write/one-read port arrangement;
* the sample-writing order and the commit rule;
* round-robin rather than fixed priority;
* the drop policy, lost flag and latency unit;
* the mapping from mode to analogue band;
* CHPF and CSR taking their value in the word after the command.

Not implemented:

* **Clock gating of the readout path.** The readout logic is simply idle when nothing is waiting.
* **The analogue front end, PLL and bias circuits.** These are analogue. The ADC is included only as a behavioural model (`sar_adc`), an ideal quantiser that resolves one bit per clock.

The readout bandwidth is limited, so plan a recording with it in mind:

* The SPI link of this implementation moves at most clk/16 bits per second: 250 kbit/s at 4 MHz, or about 15 600 words/s.
* A streaming sample costs two words.
* So even one channel in EAP streaming at the fastest sample rate (21 kS/s per channel) overruns the link. The lost flag then shows that samples were dropped.
* Spike mode and LFP streaming are what scale to many channels.

Verification: every module has a self-checking testbench, and `tb_neural_soc` runs the whole chip at its default size. Its checks:

* every packet's samples are compared with a filter model;
* the latency in the header is compared with the frames that really passed;
* spike windows must have their three validating crossings at positions 2..4;
* LFP packets must come 8 frames apart;
* powered-down channels must stay silent;
* the commands must take effect.

The test also counts that streaming, spike, LFP and combined packets, latency, lost packets, competing requests and every command all occurred. `tb_spike_block` covers the single-block spike-output scenario:

1. Four channels stream training data.
2. The testbench sets each channel's threshold from that data.
3. Every injected biphasic spike, of either polarity, must then come back as exactly one correctly placed 16-sample packet.

## Simulating

Every file is one module, package or testbench named after the file. Add the package first:

```
verilator --binary --timing --assert -Irtl rtl/nr_pkg.sv tb/tb_neural_soc.sv -y rtl \
          --top-module tb_neural_soc -Mdir obj_top
./obj_top/Vtb_neural_soc
```

Swap in any other `tb/tb_<module>.sv` and its top to test a single module. Each testbench prints `TB_RESULT checks=N failures=M` and stops itself with a watchdog if it hangs. The full-chip test takes about a second of simulation time.
