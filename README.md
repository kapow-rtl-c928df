# Per-module power estimation by counting activity: FPGA instrumentation RTL

A supply regulator can tell you how much power a whole FPGA draws, but not
how that power divides among the accelerators inside it. This design
provides the hardware half of an answer. Every module gets a set of small
counters on its busiest internal nets. Host software reads the counts at the
same moments that it reads total power from the regulator, and fits a linear
model online:

    P_total ≈ a_s·x_s + Σ_m a_mᵀ·x_m

Here `a_m` is module m's vector of activity counts, `x_m` is its vector of
learned coefficients, and `a_s·x_s` is a constant term for static power.
The fit uses recursive least squares with a forgetting factor, so it keeps
adapting as voltage, temperature or the workload change. Each product
`a_mᵀ·x_m` is then module m's share of the power. The RTL here implements
the counters, the logic that reads them out, and an instrumented benchmark
system of seven 2-D FIR filter modules. The model itself runs in software
and is not part of the RTL (see "What the host does").

Default sizes are those of the reference system:

- M = 7 modules
- N = 512 counters per module
- W = 9 bits per counter
- 240×160 8-bit greyscale frames
- 5×5 kernels in Q4.8 fixed point

## The activity counter (`rtl/activity_counter.sv`)

Each monitored net feeds one counter:

```
sig ─► [d1] ─► [d2]          edge = d1 & ~d2
                              ce   = (edge | scan_en) & enable
          first stage input = scan_en ? scan_in : XNOR(taps)
  [q0] ─► [q1] ─► … ─► [q(W-1)] ─► scan_out
```

- **LFSR, not a binary counter.** An LFSR needs no carry chain, so it is
  smaller and faster. On the target FPGA family four LFSR bits fit in one
  logic module, against two bits of a binary counter. The cost is that the
  states are not consecutive. Software decodes a state with a table of
  2^W entries: state k is what the LFSR holds after k events, starting
  from zero.
- **Only synchronous rising edges count.** Glitches do not count. The model
  absorbs glitch power into the learned coefficients.
- **XNOR feedback.** The taps are the standard maximal-length set listed in
  `kapow_pkg::lfsr_taps`, for example stages 9 and 5 when W = 9. With XNOR
  feedback the all-zero state lies on the cycle, so a counter that was just
  read out (and so cleared to zero) can count from there. The cycle has
  2^W−1 states, so up to 2^W−2 events can be counted without ambiguity.
- **Choosing the measurement window.** A net can rise at most once every two
  clocks. A window of `2·(2^W−2)` module clocks therefore gives the most
  dynamic range that can never overflow. For W = 9 this is 1020 cycles.
  Shorter windows emulate narrower counters: 12 cycles behaves like W = 3.
- **Scan mode.** With `enable=1` and `scan_en=1`, every clock shifts the
  LFSR one stage toward `scan_out` and loads `scan_in` into the first stage.
  In the FPGA this 2:1 selection uses the register's second data input
  (synchronous load), so it costs no LUT.

## Reading a module out (`rtl/instr_template.sv`)

This part takes the most care to use correctly.

All N counters of a module form one scan chain. The chain head is tied to
`0`, so shifting the counts out fills every counter with zeros. Reading a
measurement therefore also clears the counters for the next one.

There are two clock domains:

| part | clock |
|---|---|
| control registers, measurement timer, FIFO read side | bus clock |
| counters, deserialiser, FIFO write side | module clock |

The open window and the scan-enable bit reach the module clock through
3-flop synchronisers. The counts return through a dual-clock Gray-pointer
FIFO. Each module can run at its own frequency (10–200 MHz in the reference
system) while the bus runs at 50 MHz.

A measurement, as the host sees it:

1. **Write `MEAS_PER` = P.** The counters are enabled for P bus cycles.
   P is given in bus cycles, so scale the ideal window:
   `P = 2·(2^W−2) · f_bus / f_module`. Reading `MEAS_PER` returns the cycles
   left; poll it until it reads 0.
2. **Write `SCAN_EN` = 1.** The counters stay enabled and the chain shifts
   one bit per module clock. A deserialiser takes the first N·W bits and
   writes N words of W bits into the FIFO. The chain keeps shifting while
   `SCAN_EN` stays 1, but after N·W shifts it only moves zeros. The
   read-out takes N·W module clocks plus about 3 clocks of synchroniser
   latency.
3. **Poll `FIFO_FULL`** until bit 0 is 1. All N counts are now waiting.
4. **Read `FIFO_DATA` N times.** Each read pops one word. Word 0 is the
   counter at the tail of the chain (probe N−1). Word N−1 is the counter at
   the head (probe 0).
5. **Write `SCAN_EN` = 0** before the next read-out. Each rising edge of
   the synchronised scan enable starts one new read-out.

Things to know:

- The counters count only while the window is open, and never while
  scanning.
- The two edge-detector registers sample the net on every clock, whether
  or not the counter is enabled. Only edges inside the window count, and
  nothing carries over from one window to the next.
- If the FIFO still holds words from an earlier read-out, the new words
  that do not fit are dropped. Always drain the FIFO before the next
  read-out.

## Register map of one module

Each module occupies a 64-byte window. Module m starts at byte address
m·64 of the system bus.

| offset | name | access | meaning |
|---|---|---|---|
| 0x00 | FIR_CTRL | W | bit 0: run |
| 0x00 | FIR_CTRL | R | `{frames completed[30:0], run}` |
| 0x04 | FIR_COEF | W | stream one Q4.8 coefficient (13-bit two's complement in bits 12:0). 25 writes load a kernel; the first write is the top-left tap |
| 0x04 | FIR_COEF | R | sum of all output pixels of the last completed frame |
| 0x08 | RAM_ADDR | R/W | image RAM write pointer |
| 0x0C | RAM_DATA | W | store bits [7:0] at the pointer, then increment the pointer |
| 0x10 | MEAS_PER | W | start a measurement window of the written number of bus cycles |
| 0x10 | MEAS_PER | R | bus cycles left in the window |
| 0x14 | SCAN_EN | R/W | bit 0: scan enable |
| 0x18 | FIFO_FULL | R | bit 0: all N counts of a read-out are in the FIFO |
| 0x1C | FIFO_DATA | R | pops one count (W bits, zero-extended) |
| 0x20 | INST_N | R | N |
| 0x24 | INST_W | R | W |

The reference design specifies which registers exist: four accelerator
words at 0x00–0x0C, then six instrumentation words (measurement period,
scan enable, FIFO full, FIFO data, N, W). The contents of the four
accelerator words are this implementation's choice. So are the offsets of
the six instrumentation words.

## The benchmark module (`rtl/fir5x5.sv`, `rtl/image_ram.sv`, `rtl/fir_module.sv`)

The filter takes one pixel per clock in raster order. Four line buffers and
a 5×5 register window hold the neighbourhood. A new output is produced for
every input pixel at row ≥ 4 and column ≥ 4, so a frame gives
(240−4)×(160−4) outputs. The output is

    out = clamp_0..255( (Σ win[r][c]·coef[5r+c]) >>> 8 )

Here `win[0][0]` is the oldest (top-left) pixel. The filter is a 4-stage
pipeline: window, 25 products, sum, and scale with clamping. The output for
input pixel (r, c) is the window centred on (r−2, c−2), and it appears 4
clocks later.

- **Image RAM.** The host fills the dual-clock image RAM over the bus. While
  `run` is set, the filter reads it cyclically, frame after frame.
- **Changing the kernel.** While the module is stopped, its clock domain
  copies the coefficient bank continuously. While it runs, the copy is
  frozen. To change kernels: stop, stream 25 coefficients, start.
- **Frame results.** At the end of each frame the checksum and a frame count
  return to the bus side by a toggle handshake.

**Monitored nets.** The reference flow picks each module's N nets after
place and route: a vendor power analyser estimates switching rates, and the
N most active nets get counters. RTL cannot do that. Instead, `fir5x5`
exposes a 777-bit probe vector and the module monitors its first N bits:

| probe bits | content |
|---|---|
| 0–549 | the 25 products |
| 550–576 | the sum |
| 577–776 | the window pixels |

The products and the sum are the nets with the most switching, which is
roughly what the analyser would choose. Changing the selection means
changing the `probes` connection in `fir_module.sv`.

The reference system makes its seven filters differ only in how synthesis
maps the multipliers, from all in DSP blocks to all in LUTs. That gives
each module different power behaviour. The RTL does not express it: all
seven modules are the same RTL. Apply per-instance multiplier-mapping
constraints in synthesis to reproduce it.

## The system (`rtl/kapow_system.sv`)

The top holds M `fir_module`s behind one simple bus:

- The bus has a byte address, write and read strobes, and 32-bit data.
- A request is taken in the cycle it is presented.
- Read data returns one cycle later with `bus_rvalid`.
- Addresses past the last module read as zero.

Each module has its own clock input. In the reference system a
runtime-adjustable PLL generates these clocks. Each module also has its own
reset and its own filtered-pixel output stream.

## What the host does (not in the RTL)

The host software:

- Decodes each W-bit count with the LFSR table. It can be built by stepping
  `kapow_pkg::lfsr_next` from 0: entry k is the state after k events.
- Forms `a = [a_s, a_0ᵀ … a_(M−1)ᵀ]ᵀ` with a constant `a_s`.
- Reads total FPGA power from the supply regulator.
- Updates the model with recursive least squares:

      k = λ⁻¹P·a / (1 + λ⁻¹aᵀP·a)
      P ← λ⁻¹P − λ⁻¹k·aᵀP
      x ← x + (y − aᵀx)·k

  λ is the forgetting factor; 0.999 works well. Start with P = 1000·I and
  x = 0.
- Reports `a_mᵀx_m` as module m's power and `a_s·x_s` as the static
  share.

Two refinements also run on the host:

- **Pruning.** Coefficients more than 10⁴ times smaller than the largest are
  dropped from the model. The hardware keeps counting them.
- **Task mapping.** The model's coefficients guide which task runs on which
  module.

Also outside the RTL:

- the compile-time net-selection flow
- the host CPU
- the power regulator
- the PLL

## How far to trust it, and where it departs

Taken from the reference design:

- the counter structure: edge detector, gated clock enable, scan selection
  into the first stage, and a W-bit LFSR
- the grounded chain head that clears the counters on read-out
- the measurement timer in the bus domain
- the window formula `2·(2^W−2)`
- the read-back FIFO between the clock domains
- the six instrumentation registers
- N = 512, W = 9, M = 7, the frame size and the Q4.8 5×5 kernels

Choices made in this implementation:

- the LFSR taps and XNOR feedback
- edge-detector registers that sample on every clock
- 3-flop synchronisers (three registers are drawn on those paths)
- the counters' Enable held high during scanning, since a counter must be
  enabled to shift
- start-on-write for the timer
- W-bit FIFO words and the `FIFO_FULL` meaning
- the FIFO depth: the next power of two ≥ N
- register offsets and the accelerator registers
- the bus protocol
- the filter's pipeline, border policy (full windows only), rounding and
  clamping, and window orientation
- the probe selection

Not modelled:

- net selection by switching-activity ranking
- differences between modules in multiplier mapping
- per-module clock gating. The reference system gates a module's clock to
  measure true per-module power when checking the model.
- the second benchmark system, which is built from vendor arithmetic IP
  cores

Synchronous, active-high resets clear all control state. The image RAM and
the line buffers are not reset.

## Size

At the defaults (7 modules, 512 × 9-bit counters each), a generic coarse
synthesis gives for the whole system:

- about 46,000 flip-flops, about 37,700 word-level cells
- 2.24 Mbit of memory: one 307,200-bit frame store, the line buffers and a
  4,608-bit FIFO per module

One instrumentation template with N = 512 is about 5,800 flip-flops. Most
of those are the 512 × (9 + 2) counter registers.

## Simulating

Every testbench in `tb/` checks its own results and prints
`TB_RESULT checks=<n> failures=<n>`. With Verilator 5:

```sh
verilator --binary --timing --assert --timescale 1ns/1ps \
  rtl/kapow_pkg.sv tb/kapow_tb_pkg.sv $(ls rtl/*.sv | grep -v kapow_pkg) \
  tb/activity_ref.sv tb/tb_kapow_system.sv --top-module tb_kapow_system -o sim
./obj_dir/sim
```

The two packages must come before the files that import them.

| testbench | what it covers |
|---|---|
| `tb_activity_counter` | random edge counting against a reference LFSR; no counting while disabled; the worst case of a net toggling every clock for 1020 cycles without wrapping; scan-out order and clear; scan-in |
| `tb_measurement_timer` | exact window length, countdown, restart, stop |
| `tb_async_fifo` | unrelated clocks; order and data; full and empty |
| `tb_image_ram` | dual-clock write and read-back |
| `tb_fir5x5` | 12×8 frames against a reference convolution, with gaps in the input; identity kernel; outputs per frame; 4-clock latency |
| `tb_instr_template` | N = 8: window length in bus cycles, counts against a reference edge count, word order, clear on read-out, N and W registers, read-out length |
| `tb_fir_module` | one module over its bus port: kernel streaming, image load, output pixels, frame count and checksum, counts of the real filter nets, kernel change |
| `tb_kapow_system` | 3 modules with 5, 7 and 25 ns clocks against a 20 ns bus, two rounds. It also counts how often each mechanism happened: window, read-out, clear, FIFO full, frame, kernel reload, restart, unmapped read |
| `tb_kapow_full` | the same flow at the default size: 7 modules, N = 512, W = 9, 240×160 frames. It runs in well under a minute |
| `tb_fir_workloads` | the default system running ten kernels (zero, identity, two edge detectors, two box blurs, two Gaussians, sharpen, unsharp mask) over six synthetic image types, with random module clocks of 10–200 MHz over three rounds. It checks every count against the reference, every frame checksum, zero activity under the all-zero kernel, a 12-cycle window that emulates 3-bit counters, and that different workloads give different activity |

`tb/activity_ref.sv` is the reference edge counter that the module-level
and system-level tests attach to the monitored nets. `tb/kapow_tb_pkg.sv`
holds the reference LFSR, which is written independently of the RTL's tap
masks, and the reference filter.

## Changing it

- **N, W, M and the frame size** are parameters of `kapow_system`, with
  defaults in `kapow_pkg`.
  - N must not exceed the filter's 777 probe nets.
  - W may be 2–16 (the tap table's range).
- **Instrumenting another accelerator:** instantiate `instr_template`, give
  it the accelerator's N nets as `probes`, and decode six words of the
  accelerator's address space into `reg_sel`, `reg_wr` and `reg_rd`.
  `fir_module.sv` shows the pattern.
