# Four-channel pipelined time digitizer with a PLL-locked ring oscillator

This design turns the arrival time of logic edges into numbers with no dead time. It does this by taking 32 samples of each input in every clock period. The sampling instants are spread evenly across the period. A phase-locked loop (PLL) locks a 32-tap ring oscillator to the system clock, and each tap's falling edge is one sampling instant.

At 40 MHz this gives a bin of 25 ns / 32 = 781 ps. Each period's 32 samples are reduced to two records: one for the first rising edge and one for the first falling edge. A record is a hit tag plus a 5-bit position.

The records are written every clock into a 128-word ring buffer. This keeps the whole timing history of the last 128 periods (3.2 µs at 40 MHz). That is long enough for a trigger that arrives a few microseconds after the event to read back the matching words. Recording never stops while data are read.

The chip the design follows has four channels. The channels are grouped in two pairs, and each pair shares a 24-bit × 128-word dual-port memory. Four control/status registers (CSRs) set the pointers and modes. Read-out runs in one of three modes:

- **Synchronous:** every word is sent.
- **Zero-suppressed:** only words with a hit are strobed.
- **Slow:** a 12-bit bus is read after recording stops.

The digital part is synthesizable RTL. The analog parts are written as behavioural models that produce the right timing, not as transistors:

- the ring oscillator
- the phase-frequency detector's reset delay
- the charge pump with its loop filter

## Block map

```
tmc_teg3 (top)
 ├─ tmc_csr                 CTRL / WPTR / RPTR / RX registers, both pointers
 ├─ tmc_pair  (channels 0,1)
 │   ├─ tmc_channel ×2
 │   │   ├─ pll             pfd → charge_pump_lpf → asym_ring_osc → vco_div4 → pfd
 │   │   ├─ tmc_sampler     32 first latches + synchronizing stage → B0..B31, NB0
 │   │   ├─ latch33         33-bit register clocked at Tsync
 │   │   └─ edge_encoder ×2 rising and falling
 │   ├─ dual_port_mem       24 bit × 128 words, registered read
 │   └─ output_control      strobes, zero suppression, slow-bus words
 └─ tmc_pair  (channels 2,3)
```

`tmc_pkg` holds the shared sizes and types:

- `NTAP` = 32
- `CODE_W` = 5
- `DEPTH` = 128
- the record struct `enc_t` = {hit, code}
- the 12-bit channel word `ch_word_t` = {rise, fall}
- the CSR map

## Ring oscillator and its 32 taps

An ordinary inverter ring has an odd number of stages, so it gives an odd number of phases. The oscillator in the original design is asymmetric: one element makes the low half of the cycle pass through one odd number of stages and the high half through another. This gives an even number of equally spaced taps from 33 delay elements. Only the fall delay of each element is set by the control voltage VGN.

`asym_ring_osc` models the outputs, not the transistors:

- Tap k falls at k·T/32 after tap 0 (node A). It rises half a period after its fall.
- The tap spacing is the delay of one two-element stage: `d = D_MIN_PS·(VDD−VT)/(VGN−VT)`.
- VGN is limited to VT+0.1 V … VDD.

With `D_MIN_PS` = 600 ps the shortest period is 19.2 ns. At VGN = 1.2 V the period is 100 ns (10 MHz). The 600 ps is the original's shortest stage delay. The 1/(VGN−VT) law and VT = 0.7 V are this design's own choices.

The model integrates phase: every change of VGN is applied to the rest of the current stage. A slowly moving control voltage therefore produces a smooth frequency change rather than steps.

## PLL

`pll` wires four parts into a loop:

- **`pfd`:** a sequential phase-frequency detector. UP is set on a reference edge and DN on a feedback edge. Both clear after a short delay once both are set.
- **`charge_pump_lpf`:** a 64 µA pump into the external capacitor Cvg (default 100 pF) with a 6.25 kΩ series resistor. The output is `VGN = Vcap + I·R`.
- **`asym_ring_osc`:** the VCO described above.
- **`vco_div4`:** a 2-bit counter on node A. In ×4 mode the PFD compares the reference with node A ÷ 4, so the ring runs at four times the clock.

Reset discharges Cvg and clears the PFD.

The pump current and resistor values are not from the original. They were chosen so that the loop is damped over the whole range: 10–50 MHz, and 2.5–12.5 MHz in ×4 mode. From reset the loop locks in about 4–9 µs, and the edge of node A ends within 150 ps of the reference.

## Sampling, synchronizing stage and Tsync

`tmc_sampler` has one cell per tap. The cell's first latch stores the input on the falling edge of its tap. This is the PASS output.

Bits 0–15 are sampled in the first half of the period. They are re-registered half a period later, on the rising edge of node A, which gives the BIT outputs. Bits 16–31 use PASS directly. NB0 is the PASS of cell 0 from the next period: the first sample of the next period, which is needed to see an edge between bit 31 and the next bit 0.

All 33 bits are then stable together. `latch33` stores them at Tsync. The original only says that the data are stable at Tsync. This design puts Tsync at the falling edge of tap 8 (`TSYNC_TAP = N/4`) in the next period, a quarter period after NB0 has been sampled.

The original's latches are modelled as edge-triggered flip-flops.

## Edge encoding (hit tag + 5 bits)

Each `edge_encoder` searches B0…B31, NB0 for the first rising (or falling) transition. A transition between bit N and bit N+1 gives `hit = 1, code = N`, and later transitions in the period are ignored.

Without a transition, `hit = 0` and the code is a spare:

- 0 when all 33 samples are at the encoder's idle level (all low for the rising encoder, all high for the falling encoder)
- 1 when the period began at the other level. The rising encoder then sees either no edge or only a falling one.

In short, the spare code is B0 for the rising encoder and NOT B0 for the falling encoder.

One period's result per channel is therefore 12 bits: `{rise.hit, rise.code, fall.hit, fall.code}`. A pulse that rises and falls inside one period is recorded completely. A second pulse needs the next period, so the double-pulse resolution is one clock period.

## Pipeline timing

Period p is the period whose bit k is sampled at (p + ½ + k/32) clock periods after the edge taken as time 0. That period's record is written to memory at pipeline clock edge p + 2.

The pipeline clock is `clk` in ×1 mode. In ×4 mode it is node A of channel 0, so one record is still written per oscillator period. Specifications such as "time range = 128 × clock period" refer to this clock.

Read side:

- `raddr` is the read pointer.
- The memory read is registered (1 clock).
- The output control is registered (1 clock).

The word at read pointer value p therefore appears on `out_data`/`out_strobe`/`bus_data` two pipeline clocks after `raddr = p`. It appears together with `rd_addr = p`.

## Ring buffer and CSRs

`tmc_csr` holds four 8-bit registers, written through `csr_addr`/`csr_we`/`csr_wdata` and read combinationally on `csr_rdata`.

| addr | name | contents |
|---|---|---|
| 0 | CTRL | bit 0 `rec_en`, 1 `rd_sync`, 2 `zero_supp`, 3 `slow_mode`, 5:4 `slow_ch` |
| 1 | WPTR | write pointer: a write loads it, a read returns it |
| 2 | RPTR | read pointer: a write loads it, a read returns it |
| 3 | RX   | receiver mode bits (bit c = channel c differential, bit 4 = clock), out on `rx_diff` |

The write pointer advances, and the memory is written, on every pipeline clock while all three of these hold:

- `rec_en` is set
- the `write_ctrl` pin is high
- `slow_mode` is clear

The read pointer advances every clock when `rd_sync` is set. Otherwise it advances once per rising edge of the `read_inc` pin.

To read with a trigger latency of L periods, load `RPTR = WPTR − L` and set `rd_sync`. For example, L = 120 is 3 µs at 40 MHz. The register map, widths and zero reset values are this design's own.

## Read-out modes

`output_control` (one per pair) has four outputs, each a 5-bit code with a strobe, in this order: A rise, A fall, B rise, B fall. At the top level these are `out_data[0..7]` and `out_strobe[0..7]`: channel 0 rise, channel 0 fall, channel 1 rise, and so on.

- **Synchronous:** every word read while `read_en` is high is strobed.
- **Zero suppression (`zero_supp`):** an output is strobed only when its own hit tag is set.
- **Slow (`slow_mode`):** recording stops and the strobes are off. The 12-bit word of the channel selected by `slow_ch` is driven on `bus_data`, and `read_inc` steps through the buffer.

## Top-level ports (`tmc_teg3`)

| port | dir | width | meaning |
|---|---|---|---|
| clk | in | 1 | system clock (10–50 MHz; 2.5–12.5 MHz in ×4 mode) |
| rst_n | in | 1 | asynchronous reset, active low |
| div4_mode | in | 1 | ×4 mode (divide-by-4 counter in every PLL) |
| tin | in | 4 | measured signals |
| csr_addr, csr_we, csr_wdata, csr_rdata | in/out | 2, 1, 8, 8 | CSR port |
| write_ctrl | in | 1 | recording enable pin |
| read_en | in | 1 | output strobe enable |
| read_inc | in | 1 | external read-pointer step |
| rd_addr | out | 7 | read address of the word on the outputs |
| out_data / out_strobe | out | 8×5 / 8 | codes and strobes |
| bus_data | out | 12 | slow read-out bus |
| rx_diff | out | 5 | receiver mode bits |
| pclk | out | 1 | pipeline clock |
| vgn0..vgn3 | out | real | PLL control voltages, for observation |

Parameters: `N` = 32 taps, `NWORDS` = 128, `PTR_W` = 7, `CVG_PF` = 100.

## What is not modelled, and where this departs from the original

- **Input receivers:** the clock and signal receivers (single-ended CMOS or differential) are analog and are not modelled. `clk` and `tin` are logic inputs, and the RX register bits are simply brought out.
- **Analog blocks:** the ring oscillator, PFD reset delay and charge pump are behavioural models. Jitter, noise, supply dependence, and the resulting differential and integral nonlinearity are not modelled. A simulated measurement is exact to the bin, so the 250 ps rms resolution of the real chip cannot be reproduced.
- **Own choices** (not given by the original):
  - the Tsync position
  - the latch type
  - the write instant after Tsync
  - the ×4-mode pipeline clock
  - the read-out latency
  - the CSR map
  - reset
  - the pump current and resistor
  - the VCO law
  - the bit order in the 24-bit word
- **PLL settling:** the original settles in about 4 µs with either a 100 pF or a 1000 pF capacitor. This model needs about 7 µs with 100 pF and about 77 µs with 1000 pF. The pump current and resistor were tuned for 100 pF only, so scale the `ICP_UA`/`R_OHM` parameters of `charge_pump_lpf` when changing `CVG_PF`.
- **Behavioural files:** the three analog models use `real` values and delays. Verilator and slang accept them, but synthesis does not.

## Testbenches and simulation

Every module has a self-checking testbench in `tb/`. Each prints `TB_RESULT checks=… failures=…` and contains a watchdog.

`tb_tmc_teg3` runs the whole chip at its default size. It runs both modes: 40 MHz ×1, and a 10 MHz clock in ×4 mode. In each mode it:

- records random edges at bin centres on all four channels
- reads them back 120 words behind the writer
- compares every word with an independent timing model
- switches on zero suppression part-way
- finally reads each channel through the slow bus

Some periods contain three edges, and the third must be ignored.

It counts each mechanism and fails if any did not occur: ignored later edges, rising and falling hits, spare codes, suppressed strobes, buffer wrap-around, slow-bus words and ×4-mode words.

`tb_tmc_teg3_range` runs the same operation at the two ends of the clock range in ×1 mode:

- 50 MHz: 625 ps bins, 2.56 µs of history
- 10 MHz: 3.125 ns bins, 12.8 µs of history

In both it reads 124 words behind the writer, close to the full 128-word depth.

Simulate with Verilator 5 (`--timing` is needed for the analog models):

```
verilator --binary --timing -Wno-fatal --top-module tb_tmc_teg3 \
    -Irtl -y rtl +libext+.sv rtl/tmc_pkg.sv tb/tb_tmc_teg3.sv
./obj_dir/Vtb_tmc_teg3
```

Use the same command with another `tb_<block>` for a single block. All files use `timescale 1ns/1fs`, because the 781.25 ps tap spacing is not a whole number of picoseconds.
