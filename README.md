# ECG denoising and QRS-detection accelerators for a Zynq-class SoC

This design speeds up part of an ECG pipeline that runs mostly in firmware on
an ARM processor. The pipeline removes mains interference and baseline drift
with a DxN comb filter, then finds the R peaks of the QRS complexes. A
mid-size FPGA is too small to hold the whole pipeline: the complete DxN filter
alone needs more slices than a 4400-slice device offers. So only the inner
averaging loops move into programmable logic, as three small register-mapped
accelerators on the processor's AXI bus:

| instance     | module     | base address | job |
|--------------|------------|--------------|-----|
| `avg_dxn_0`  | `avg_dxn`  | `0x43c0_0000` | mean of 42 samples spaced 6 apart, subtracted from the current sample |
| `ecg_avgr_0` | `ecg_avgr` | `0x43c1_0000` | mean of 4 values for the QRS detector |
| `ecg_avgr_1` | `ecg_avgr` | `0x43c2_0000` | a second, independent 4-value mean |

The processor keeps the sample array in its own memory. For each output sample
it loads the needed samples into an accelerator's registers, starts it, and
reads back the result. The accelerators do not save time over well-optimised
firmware on a fast core. They move a fixed, repetitive piece of work into
hardware with a simple and stable register interface.

## The DxN filter, and why the accelerator's sum removes 60 Hz exactly

The filter is a moving average of N samples taken D samples apart. It is
subtracted from the sample in the middle:

    y[i] = x[i] - ( x[i-126] + x[i-120] + ... + x[i+114] + x[i+120] ) / 42

This is a sum over j = -21 .. 20 of x[i + 6j], divided by N = 42.

* **D = 6** is the sample rate divided by the mains frequency (360 Hz / 60 Hz).
  All 42 taps therefore see the same phase of the mains sine. Their average
  contains exactly the mains value at sample i, and subtracting it from x[i]
  cancels that value. The comb has zeros at 60 Hz and its multiples.
* **N = 42** sets the high-pass corner. With f3dB ≈ 0.75 · 60 Hz / N, the corner
  is close to 1 Hz, which suppresses baseline wander and keeps the QRS
  complexes.
* The window reaches 126 samples back and 120 forward. In a record of L
  samples, only i = 126 .. L-121 have a full window. Firmware writes 0 for the
  other outputs.

The division truncates toward zero, as C integer division does. Hardware and
firmware therefore produce bit-identical results. When mains noise is added as
`trunc(2048 · sin(2π · 60/360 · T))`, the filtered result differs from the
filtered clean signal by at most one count. That count comes from the
truncation. The end-to-end testbench checks this for every output.

## Register interface

Every accelerator is a 64 KiB window of 32-bit registers behind an AXI4-Lite
slave. The registers keep their values, so firmware may rewrite only the inputs
that change. Offsets are in bytes.

`avg_dxn` (N_TAPS = 42):

| offset       | register       | access | meaning |
|--------------|----------------|--------|---------|
| `0x00`       | control_reg    | RW | writing a value with bit 0 = 1 starts one computation |
| `0x04`       | status_reg     | RO | bit 0 = 1: output_reg holds the result of the last start |
| `0x08`       | iterator_reg   | RW | current sample x[i] |
| `0x0c + 4k`  | input_reg[k]   | RW | x[i - 126 + 6k], k = 0 .. 41 |
| `0xb4`       | output_reg     | RO | y[i] |

`ecg_avgr` (N_IN = 4):

| offset       | register       | access | meaning |
|--------------|----------------|--------|---------|
| `0x00`       | control_reg    | RW | bit 0 = 1 starts |
| `0x04`       | status_reg     | RO | bit 0: result ready |
| `0x08`       | id_reg         | RO | always `0x0000000d` |
| `0x0c + 4k`  | input_reg[k]   | RW | k = 0 .. 3 |
| `0x1c`       | output_reg     | RO | (sum of inputs) >>> 2 |

All values are signed two's complement. Unmapped offsets read 0 and ignore
writes. Byte strobes are honoured. Every access gets an OKAY response.

A typical firmware sequence for one filtered sample is:

1. write the 42 input registers and iterator_reg;
2. write 1 to control_reg;
3. read status_reg until bit 0 is set;
4. read output_reg.

The write to control_reg clears bit 0 of status_reg. The bit is set again two
clock cycles after the write is accepted. By the time the processor can issue
its status read, the result is already there, so one poll normally suffices.

### Rounding in the 4-value averager

`ecg_avgr` divides by shifting right by two bits. The shift is arithmetic. For
non-negative sums this equals C's `sum / 4`. For a negative sum that is not a
multiple of four, it rounds down (-5 → -2), where C division gives -1. The
detector's amplitudes and intervals are non-negative, so the difference does
not arise there.

## Inside the blocks

* `dxn_avg_core` is the DxN datapath. A start pulse registers the 42-input sum
  (38 bits, so it cannot overflow) and the current sample. On the next edge it
  registers `sample - trunc(sum / 42)` and pulses `done`. The latency is 2
  cycles and the core accepts one start per cycle. The constant divider is
  left to synthesis. This divider is the long combinational path of the design:
  if it misses 100 MHz, pipeline it or replace it with a
  multiply-by-reciprocal.
* `ecg_avg_core` works the same way for N_IN values (a power of two), with a
  shift in place of the divider.
* `axi4l_regif` is the shared AXI4-Lite front end. It accepts AW and W
  together, with registered ready signals. It turns each write into a one-cycle
  `wr_en` strobe, with offset, data and strobes. For a read, it registers the
  owner's combinational `rd_data`. One write and one read can be outstanding.
  BVALID and RVALID come 2 clock edges after the request valid signals. The
  front end holds them until the master accepts them; assertions check this
  and the master's obligation to hold its requests.
* `avg_dxn` and `ecg_avgr` hold the registers and the read multiplexer. They
  start their core when control_reg is written with bit 0 set.
* `ecg_pl_top` instantiates the three accelerators under their system instance
  names, on one clock (100 MHz in the system) and one synchronous active-low
  reset. Each accelerator's AXI port is a request/response struct pair
  (`axi4l_pkg::axi4l_req_t` / `axi4l_rsp_t`).
* `axi4l_pkg` holds the AXI types. `ecg_ip_pkg` holds the register offsets,
  the system base addresses and the filter constants D and N.

## What is outside this RTL

The surrounding system consists of vendor parts. They are not in this RTL:

* the processing system (ARM Cortex-A9 with UART, DDR3 controller and the
  general-purpose AXI master);
* the AXI interconnect that decodes the addresses above;
* the reset generator that produces `aresetn`;
* an AXI GPIO (4 buttons and 4 LEDs, at `0x4120_0000`), used to toggle a pin
  for timing measurements with an oscilloscope.

To integrate the design, connect each struct pair of `ecg_pl_top` to one
master port of the interconnect, with the base addresses above and 64 KiB
windows.

The QRS detector itself is firmware. It uses adaptive amplitude and slope
thresholds, and its algorithm is not part of this design. The two `ecg_avgr`
instances only provide the averaging it calls twice.

## Design choices beyond the source description

These points were chosen for this design. The original description does not
fix them:

* **Start semantics.** The original IPs recompute for as long as control bit 0
  is set. Here a write with bit 0 set launches exactly one computation, and
  status bit 0 marks its completion.
* **Register order of `ecg_avgr`.** id_reg occupies the slot that `avg_dxn`
  uses for its iterator.
* **Pipelining.** Both averagers register the sum before the division or
  shift, so the latency is 2 cycles. The DxN computation was originally
  written as a single clocked step.
* **Number of DxN input registers.** The processor-side register structure in
  the source lists ten input registers, while its hardware sums 42, N is 42,
  and this design has 42.
* **Signedness, sum widths, byte strobes, the AXI4-Lite handshake timing and
  synchronous reset.**

## Verification

Each block has a self-checking testbench in `tb/`. Each one computes its
expected values independently of the RTL, for example from magnitudes and
remainders rather than the simulator's signed division. Each ends with a
`TB_RESULT checks=N failures=M` line and has a watchdog.

| testbench | what it covers |
|-----------|----------------|
| `tb_dxn_avg_core` | 300 random windows (12-bit and full 32-bit), truncation of negative sums, 2-cycle latency, back-to-back starts |
| `tb_ecg_avg_core` | 300 random sets, rounding of negative sums, latency, back-to-back starts |
| `tb_axi4l_regif`  | channel timing, strobes, AW waiting for W, held responses, random traffic with stalled BREADY/RREADY |
| `tb_avg_dxn`      | reset values, read-back of all 42 inputs, byte strobes, start and status behaviour, 40 computations |
| `tb_ecg_avgr`     | id register, read-only behaviour, 200 computations with stalled responses |
| `tb_ecg_pl_top`   | the whole system at default sizes, see below |

`tb_ecg_pl_top` plays the firmware on one 1000-sample record. The record is a
synthetic ECG with slow drift and beats at samples 225, 488, 690 and 960, plus
±1773-count 60 Hz interference. The testbench:

* filters all 754 samples with a full window through `avg_dxn_0`, and checks
  each one against both the exact model and the mains-free model;
* runs a simple R-peak detector on the filtered record. The detector is a
  testbench stand-in for the firmware: a local maximum over ±8 samples, above
  half the mean of the last four R amplitudes, with a 72-sample refractory
  period. It takes the amplitude mean from `ecg_avgr_0` and the R-R interval
  mean from `ecg_avgr_1`.

The three beats inside the filtered range are found at their positions. With
the testbench's bus model the filter pass takes about 140,600 cycles, about
1.4 ms at 100 MHz. Almost all of that time is bus traffic.

The testbenches use `tb/axi4l_master_bfm.sv`, a small AXI4-Lite master with
optional random response stalls.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert --timescale 1ns/1ps -y rtl -y tb \
        rtl/axi4l_pkg.sv rtl/ecg_ip_pkg.sv tb/tb_ecg_pl_top.sv \
        --top-module tb_ecg_pl_top
    ./obj_dir/Vtb_ecg_pl_top

For another block, swap in its testbench name. The packages must come first on
the command line. The full-size system test runs in well under a second.

## Changing the design

* `N_TAPS` on `avg_dxn` and `dxn_avg_core` sets the number of averaged samples.
  The output register moves to `0x0c + 4·N_TAPS`.
* `N_IN` on `ecg_avgr` and `ecg_avg_core` must be a power of two. An elaboration
  check enforces this.
* Base addresses, offsets, D and N live in `ecg_ip_pkg`.
* The tap spacing D does not appear in the hardware. It only decides which
  samples firmware loads.
