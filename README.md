# ATC1: an RGB-to-YCrCb kernel behind an asynchronous host link, plus a body-bias inverter-chain array

ATC1 is a small 180 nm test chip that holds two unrelated experiments.

- **The digital experiment.** A deeply pipelined colour-space conversion kernel turns 24-bit RGB pixels into 24-bit YCrCb pixels. A host running on its own clock drives it through a narrow, self-timed link, AHIP (asynchronous host interface protocol). Each test writes two input pixels and the two results the host expects, then reads the two results back. An on-chip comparator also flags any mismatch on a dedicated pin. On silicon this test was used to find the fastest clock at each supply voltage: some chips passed at 400 MHz and 1.8 V.
- **The analog experiment.** An array of 38 ring oscillators, each made of 61 stages, whose transistor bodies are biased from external pins. It was used to study how forward body bias trades speed against leakage.

This repository is the RTL of the digital part and a behavioural timing model of the oscillator array, with self-checking testbenches.

```
             ext_clk ─────────────┬──────────────────┬───────────────────┐
                                  │                  │                   │
 ext_req ──►┌────────────┐ wr_en, addr, wdata ┌──────┴───────┐ k_pix  ┌───┴───────────┐
 ext_ack ◄──│ ahip_slave │───────────────────►│ test_harness │───────►│ rgbycc_kernel │
 ext_rst ──►│            │◄───────────────────│ in0 in1      │◄───────│ 7-stage pipe  │
 ahip_i  ──►│            │       rdata        │ test0 test1  │ kr_pix └───────────────┘
 ahip_o  ◄──│            │                    │ out0 out1 =? │──► rgbyccout
 ahip_oe ◄──└────────────┘                    └──────────────┘
 sel[1:0] ──► invchain (38 rings × 61 stages) ──► invout
```

## The AHIP link

The host and the chip do not share a clock. They share an 8-bit bidirectional bus and two wires: `ext_req`, driven by the host, and `ext_ack`, driven by the chip. The chip is always the slave. The published chip gives only this much. The rest of this section is this design's own protocol.

**One byte = one four-phase handshake.**

| step | host | chip |
|---|---|---|
| 1 | host-to-chip byte: drive the byte, then raise `req`. Chip-to-host byte: release the bus (`host_oe` low), then raise `req` | |
| 2 | | sees `req` (after a 2-flop synchronizer). Host-to-chip byte: takes the byte and raises `ack`. Chip-to-host byte: drives the byte (`ahip_oe` high) and raises `ack` one clock later |
| 3 | sees `ack` (after its own synchronizer), samples the bus if reading, drops `req` | |
| 4 | | sees `req` low, drops `ack` and releases the bus |
| 5 | waits for `ack` low before starting the next byte | |

Because of this ordering, the two ends never drive the bus at the same time. Both testbenches check this on every cycle. Data only needs to be stable while `req` or `ack` is high, so it crosses the clock domains safely without being synchronized itself.

**A transaction is four bytes.**

- byte 0 is the command: bit 7 is 1 for a write and 0 for a read; bits 6:0 are the register address;
- bytes 1 to 3 are the 24-bit data word, most significant byte first.

After the last byte of a write, `ahip_slave` pulses `wr_en` for one chip clock, with `addr` and `wdata`. For a read, it latches `rdata` (the harness's combinational read mux on `addr`) when the command byte's handshake completes. It then returns that word.

**Cost.** Each byte costs about two synchronizer delays on each side. With the test clocks (host 7.3 ns, chip 2.5 ns), one four-byte transaction takes about 30 host cycles. `ahip_slave_tb` requires a write to finish within 64 host cycles.

**Reset.** `ext_rst` (active high) passes through a 2-flop synchronizer inside `ahip_slave`. The result, `rst_core`, is the synchronous reset for the whole digital core.

Concurrent assertions in `ahip_slave` check the handshake rules:
- `ack` rises only while the synchronized `req` is high;
- `ack` falls only while it is low;
- the chip drives the bus only during the data bytes of a read.

## Register map and the test harness

Only the low two address bits are decoded:

| `addr[1:0]` | write | read |
|---|---|---|
| 00 | `in0` (RGB) | `out0` |
| 01 | `in1` (RGB) | `out0` |
| 10 | `test0` (expected YCC for `in0`) | `out1` |
| 11 | `test1` (expected YCC for `in1`) | `out1` |

The kernel never stops. On even cycles it is fed `in0`, on odd cycles `in1`. Its results are written back to `out0` and `out1` on alternate cycles in the same way. Each pixel travels through the pipeline with a one-bit tag, and the result is steered by that tag. So `out0` is always the conversion of `in0`, whatever the pipeline depth. After the host writes `in0`, `out0` holds the new result within 10 chip cycles. That is far less than one AHIP transaction, so the host never has to wait for the kernel.

The comparator compares the output register selected by `addr[1]` (the word a read would return) with the test register of the same pair: `test0` with `out0`, `test1` with `out1`. Its registered result drives the `rgbyccout` pin: 1 means equal. So during the read of `out0`, the pin reports whether `out0 == test0`. The same holds for `out1` and `test1`.

## The colour conversion kernel

These are the conversion equations, in fixed point with scale 2^16, `>>` an arithmetic shift:

```
Y  =  (0x4c8b·R + 0x9646·G + 0x1d2f·B) >> 16
Cr = (((0x8000·R − 0x6b2f·G − 0x14d1·B) >> 16) + 128) mod 256
Cb = (((−0x2b33·R − 0x54cd·G + 0x8000·B) >> 16) + 128) mod 256
YCC = {Y, Cb, Cr}          (Y in bits 23:16, Cb in 15:8, Cr in 7:0)
```

The RGB word is `{R, G, B}`, with R in bits 23:16. The Y coefficients add up to exactly 0x10000, so Y never overflows 8 bits.

The original chip used "hundreds of adders, highly pipelined". Its exact structure is not published, so this RTL builds the constant multiplications from adders:

- Each of the 9 constant multiplications becomes 8 partial products. Partial product *i* is the coefficient shifted left by *i* when bit *i* of the colour byte is set, and zero otherwise.
- Each output channel is the sum of 24 such terms in 26-bit signed arithmetic.
- A binary adder tree (`adder_tree_pipe`) adds them up, with a register after each of its five levels.
- The top byte of the sum is the shifted result; Cr and Cb then get +128.

Latency is 7 cycles: input register, five tree levels, output register. Throughput is one pixel per cycle. The longest path between registers is one 26-bit addition.

## The inverter chain array (`invchain`, behavioural)

The array has 38 rings. Each ring is a NAND followed by 60 inverters, fed back to the NAND. The NAND's other input is the ring's enable: low puts the ring to sleep, high makes it oscillate. Two select bits set how many rings run. The mapping chosen here is:

| `sel` | rings running |
|---|---|
| 0 | none |
| 1 | 1 |
| 2 | 19 |
| 3 | 38 |

`invout` is ring 0.

The model lumps each ring into one delayed NAND. Its delay is 61 × `STAGE_NS`, which gives the same period as the stage-by-stage ring. With the default `STAGE_NS` of 55 ps, the period is 6.71 ns (149 MHz). The chip's rings measured between 6.0 ns and 7.7 ns. The loop through each ring is the oscillator and is intentional.

The body-bias pins VPB and VNB and the array's supply are analog and are not modelled. Because of its `#` delays, this file is for simulation only.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops on its own. Each has a watchdog. Build and run one with Verilator 5, for example the end-to-end test:

```
verilator --binary --timing --assert -Wno-fatal --top-module atc1_top_tb \
  -y rtl -y tb rtl/atc1_pkg.sv tb/ycc_ref_pkg.sv tb/atc1_top_tb.sv
obj_dir/Vatc1_top_tb
```

| testbench | what it checks | run time |
|---|---|---|
| `rgbycc_kernel_tb` | 3,008 pixels (corners and random) against the reference model; exact 7-cycle latency; tag kept with its pixel | < 1 s |
| `test_harness_tb` | alternating feed; `out0`/`out1` pairing; all four read addresses; comparator high and low; update time of at most 10 cycles | < 1 s |
| `ahip_slave_tb` | 300 writes and 300 reads over the handshake with unrelated clocks; one strobe per write; no bus contention; write cost | < 1 s |
| `invchain_tb` | number of rings running for each `sel`; period 6.71 ns | < 1 s |
| `atc1_top_tb` | the whole chip with default parameters, at a 400 MHz chip clock: 40,000 random vectors; a corrupted test value every 50th vector, which `rgbyccout` must flag; a reset in mid-run; every `sel` setting. Counts each mechanism and fails if one never happens | about 50 s |

The expected values come from `tb/ycc_ref_pkg.sv`. It evaluates the equations in 64-bit integers, with its own copy of the constants. `tb/ahip_host_model.sv` is the host side of the link (write, read, reset tasks). Reuse it to drive the chip from any other test.

## Where this RTL departs from, or goes beyond, the published chip

These points come from the published chip:
- the register map;
- the alternating feed;
- the conversion equations and constants;
- the 8-bit bus with req/ack;
- the pin names;
- the 38 × 61-stage ring structure and the measured period band.

These are choices of this design:
- **AHIP protocol details:** the four-phase handshake, the synchronizers, the command byte layout, the three-byte data order and the separate in/out/enable bus signals. A host built for the original chip's protocol will not necessarily talk to this RTL.
- **Kernel structure:** partial products and a 5-level pipelined adder tree, 7-cycle latency. The original's pipeline depth is not known.
- **Comparator pairing** (output selected by `addr[1]` against its own test register) and a 1-bit `rgbyccout`.
- **Tag-based steering** of kernel results to `out0`/`out1`.
- **Reset:** synchronous, active high. It clears every register and the pipeline valid bits.
- **Inverter chains:** the `sel` mapping, the choice of ring 0 for `invout`, the lumped delay, and no body-bias modelling.

Not included: the I/O pads, the tester board (FPGA controller, PCI card, DRAM, clock, supplies) and the host software. Power, leakage and maximum-frequency results belong to the silicon and cannot be reproduced from RTL.

## Files

| file | contents |
|---|---|
| `rtl/atc1_pkg.sv` | pixel structs `rgb_t`/`ycc_t`, register address enum, conversion coefficients |
| `rtl/atc1_top.sv` | chip top: wires the blocks below |
| `rtl/ahip_slave.sv` | AHIP handshake, framing, reset and request synchronizers, assertions |
| `rtl/test_harness.sv` | in/test/out registers, alternating feed, read mux, comparator |
| `rtl/rgbycc_kernel.sv` | partial-product conversion kernel |
| `rtl/adder_tree_pipe.sv` | generic pipelined adder tree (N operands, one register per level) |
| `rtl/invchain.sv` | behavioural ring-oscillator array |
| `tb/*_tb.sv` | testbenches (above) |
| `tb/ahip_host_model.sv`, `tb/ycc_ref_pkg.sv` | host model and reference model |
