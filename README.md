# 1 Tbit/s interposer PHY for a logic die and an embedded DRAM

This RTL models the physical layer between a logic die (SOC) and an embedded-DRAM die. Both
dies sit side by side on a silicon interposer. The link is 1024 data lines wide. Each line
carries double-data-rate data on a 500 MHz clock (1 Gbit/s per line), which adds up to
1 Tbit/s.

The main idea is that the memory-side PHY has no PLL and no DLL. All timing correction happens
on the SOC side:

* **Closed loop.** Two DLLs in each SOC-side slice measure the memory side's clock-tree delay
  through spare calibration clocks on the interposer. They then pre-shift the strobes so that
  every receiver samples in the middle of each bit.
* **Training.** A sweep refines the result on top of the DLLs. Each receiver gets a 1-0-1-0
  pattern while a delay code is swept. An edge detector marks where sampling is stable, and
  the middle of that stable window becomes the code.

## Organisation

```
cowos_ehp_top               4 slices (NS), each one eDRAM channel
 ├─ phyc_slice              SOC side: PLL, WRITE-DLL, READ-DLL, CA path, trainer
 │   ├─ pll                 quadrature 500 MHz clocks (behavioural)
 │   ├─ dll ×2              phase_detector + dll_ctrl + dcdl
 │   ├─ train_seq           four training steps, each run by train_sweep
 │   ├─ minislice_c ×8      32 DQ + write-valid + WDQS out, DQ + read-valid + RDQS in
 │   └─ data_align          joins the 8 mini-slice receive FIFOs into one 512-bit word
 ├─ sii_channel ×3          interposer traces: DQ (bidirectional), SOC→memory, memory→SOC
 └─ phym_slice              memory side: clock tree only, no PLL/DLL
     ├─ minislice_m ×8
     └─ data_align
```

Each mini-slice has the same parts on both sides:

* A transmitter: the near-pad serializer `npl_tx`, which turns two 32-bit beats per clock into
  DDR.
* A receiver: the pair of clocked sense amplifiers `lsio_rx`, then `npl_rx`. `npl_rx`
  re-pairs the rising and falling samples and moves them to the core clock through
  `async_fifo`.
* Clock trees: each transmit and receive clock passes through a delay line (`dcdl`, 6-bit
  coarse at 40 ps and 4-bit fine at 5 ps) and a 1:34 clock tree (`anacts`).
* An `edge_detector` on each receiver, used in training.

One clock carries 22 command/address bits (7 command, 15 address). The eDRAM itself is not
part of the RTL. The testbenches use a small memory model (`tb/edram_model.sv`).

## Closed-loop timing correction

Writes:

* DQ and WDQS leave the SOC centre-aligned: WDQS comes from the PLL's 90° phase.
* The memory side then delays WDQS through its own clock tree of latency L (1300 ps here),
  which destroys the alignment.
* To restore it, `phyc_slice` sends two calibration clocks:
  * CAL_NDW returns unchanged as CAL_NDR.
  * CAL_ADW passes through a replica of the memory-side tree and returns as CAL_ADR.
* The WRITE-DLL takes CAL_NDR as reference and CAL_ADR as feedback. Its delay line sits in
  the CAL_ADW path, so it converges to a code d with d + L ≡ 0 (mod one clock period).
* Every WDQS delay line gets the same code. After the memory-side tree, WDQS is again a
  quarter period after the data. CAL_NDW also leaves through a code-0 delay line, so the
  delay line's fixed delay cancels out.

Reads:

* The memory side sends RDQS edge-aligned with its data.
* The READ-DLL compares the PLL's 90° phase with its own output after a replica of the SOC
  receive tree. It converges to intrinsic + d + L ≡ T/4.
* Every RDQS delay line gets this code, so the received strobe lands in the middle of each
  bit.

DLL controller (`dll_ctrl`):

* It first raises the coarse code until the phase detector flips, then steps back by one.
* The fine loop then starts at 1000 and moves one 5 ps step per decision. At the end of the
  fine range it trades 8 fine steps for one coarse step.
* It reports lock after four direction changes.
* The tree latency may exceed half a period. The loop then locks to the next edge, which
  gives the same sampling phase.

## Data sampling alignment training

`train_seq` runs four steps in a fixed order. Each step drives `train_sweep`, which steps a
9-bit index through the delay codes (5 ps per index). The index maps to coarse = idx[8:3] and
fine = idx[2:0].

For every lane (mini-slice), the sweep:

1. waits for a transition region;
2. records where the following stable region starts;
3. ends at the next transition.

The result is the middle of the stable region, or its first code for the step that wants edge
alignment.

| step | moves | watches | result |
|---|---|---|---|
| 1 | CK delay line | memory-side CMD/ADR edge detector (CA pattern) | centre |
| 2 | WDQS delay lines | memory-side DQ edge detectors (write pattern) | edge |
| 3 | RDQS delay lines | SOC-side DQ edge detectors (read pattern) | centre |
| 4 | write-DQ delay lines | memory-side DQ edge detectors (write pattern) | centre |

An edge detector outputs 1 in either of two cases:

* the rising-edge samples of all 32 bits are 1;
* the falling-edge samples are all 0.

During a step, the affected delay lines take the sweep index instead of the DLL code. After
the step they keep the trained code (the "individual adjustment" mode of each mini-slice).
`train_ok` reports which steps found a window.

## Clocking and clock-domain crossings

* The SOC core runs on the PLL's 0° clock (`p2c_ck`).
* The memory core runs on SII_CK after the memory-side clock tree (`p2l_ck`).
* Each receiver writes its FIFO with its own strobe-derived clock. The core side reads it.
* `data_align` pops all eight mini-slice FIFOs of a slice together, only when none is empty.
  This removes the lane-to-lane skew.
* The valid IOs (SII_WD_VLD and SII_RD_VLD) travel as a 33rd data bit. Only valid pairs enter
  the FIFO.
* The 34th IO of a mini-slice carries the pad output enable, which turns the DQ bus around
  between writes and reads.

## Behavioural models

`dcdl`, `anacts`, `pll`, `lsio_rx` and `sii_channel` stand for analog circuits. Their delays
use `#` delays: ps resolution, `timescale 1ps/1ps`. A synthesis tool that ignores delays
reduces them to wires, latches, or an oscillator loop in the PLL's case.

* Long delays are built from several short stages, so several edges can be in flight, as a
  real delay line allows.
* A pulse shorter than one stage is not carried. The shortest stage is 650 ps; the shortest
  pulse in the design is 1000 ps.
* Interposer traces are 60–80 ps with a fixed per-trace mismatch. An undriven trace reads 0.
* Differential pairs are represented by their true line.
* Low-swing electrical behaviour is not modelled: the driver's two supplies, the receiver
  reference voltage, and power.

## Departures and own choices

* **Not described in detail, built simply here:**
  * data alignment (pop when all lanes hold data);
  * the receive FIFOs (8-deep Gray-code FIFOs);
  * the phase detector (a flop sampling the feedback on the reference edge);
  * DLL settle and lock counts;
  * a 2-cycle read latency in the memory model.
* **How training results travel.** The memory-side edge-detector results and the pattern
  requests use side-band wires. How they really travel is not specified.
* **Training step 2.** It should align WDQS with CK. No receiver compares those two directly,
  so this design sweeps WDQS against the write-data pattern and keeps the first transition
  edge.
* **CK and command/address.** CMD/ADR leaves through a fixed code-0 delay line. CK is sent
  from the 90° phase through a delay line that the closed loop sets (write-DLL code) or
  training sets. Command and address are sent on both beats and captured on the rising one.
* **Delays not specified, assumed here:**
  * delay-line intrinsic delay 100 ps;
  * clock-tree latency 1300 ps;
  * trace delays 60–80 ps.
* **Not built:**
  * the low-swing transmitter and the reference voltage (analog only);
  * the BIST, scan and boundary-scan features (only named);
  * the eDRAM and the SOC logic.

## Simulating

Every file in `rtl/` and `tb/` holds one module or package. Pass the package first, and let
verilator find the rest:

```
verilator --binary --timing -Irtl rtl/ehp_pkg.sv tb/tb_cowos_ehp_top.sv \
  --top-module tb_cowos_ehp_top -y rtl -y tb
./obj_dir/Vtb_cowos_ehp_top
```

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself with a watchdog.

Two start-up rules:

* Resets are asynchronous, and some clock domains only start running after reset is
  released. The testbenches therefore start `rst_n` high and pull it low at 1 ps, so every
  flop sees a reset edge.
* The PLL model starts oscillating on a rising `pll_en`.

End-to-end tests:

* `tb_cowos_ehp_top` runs one slice of two mini-slices: DLL lock and residual check, writes
  and reads, training, then writes and reads with the trained codes. It counts every mechanism
  and fails if one never happened.
* `tb_cowos_ehp_full` runs the same sequence on the top with all parameters at their
  defaults: 4 × 8 mini-slices, 1024 DQ. It takes about 7 minutes.
* Both tests ignore the read path until the DLLs have locked: at start-up the receive strobes
  are still moving and a few spurious read-valid pulses can appear.

Block-level tests:

* `tb_phyc_slice` and `tb_phym_slice` pair the two slices with different trace lengths and
  manual delays.
* Every other block has its own `tb_<module>`.

To change the size, set `NS`, `NM` and `DQW` on `cowos_ehp_top`. The clock period is
`PERIOD_PS` on `pll`; at 1818 ps it gives 550 MHz (1.1 Gbit/s per line). The sweep timing is
set by `SETTLE` and `DWELL`.
