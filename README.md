# 2D convolver peripheral for an AHB-Lite SoC

This is a small memory-mapped accelerator that computes 3×3 convolutions for a
CPU on an AHB-Lite bus. The CPU loads a 3×3 kernel of 4-bit unsigned
coefficients once. It then streams the image through the peripheral one column
of three 4-bit samples at a time. After every column that completes a 3×3 window, the
peripheral multiplies the window by the kernel, adds the nine products, and
queues the result in a 1352-entry FIFO. The CPU drains the FIFO by reading a
single address. The peripheral does not walk the image. The CPU chooses which
columns to send and when a new row band starts. All handshaking is done by the
CPU polling a status register.

```
            AHB-Lite                 +------------------+  col 16   +------------------+
  hsel,haddr[3:0],htrans[1:0] ------>|                  |---------->| sample_shift_reg |--36--+
  hsize[2:0],hwrite,hwdata[15:0] --->|  ahb_lite_slave  |           +------------------+      |
  hrdata[15:0],hready,hresp <--------|  (+ address      | coeff 16  +------------------+      v
                                     |   decoder)       |---------->|    coeff_reg     |--36->[mult_adder_tree]
                                     |                  |<--+       +------------------+      | result 16
                      commands, modwait, sample_stream |   | coeff_sel/coeff_ld              | result_ready
                                     |                  |   |                                  v
                                     |                  |<--+--[conv_controller]        +-------------+
                                     |                  |<---- empty, full, result_out -| result_fifo |
                                     |                  |----- read_enable ------------>|  1352 x 16  |
                                     +------------------+                               +-------------+
```

## Programming model

The peripheral occupies 16 bytes: a 4-bit byte address and 16-bit data buses.
Data is little-endian. A byte at an even address travels on `hwdata[7:0]` and a
byte at an odd address on `hwdata[15:8]`.

| Address | Size | Access | Register |
|---|---|---|---|
| 0x0 | 2 | R | Status: bit 0 busy, bit 7 FIFO empty, bit 8 streaming, bit 9 FIFO full |
| 0x2 | 2 | R | Result: each read pops one result from the FIFO; reads as 0 when empty and pops nothing |
| 0x4 | 2 | R/W | New sample column (bits 11:0 used) |
| 0x6 | 2 | R/W | Coefficient column R0, the left-most kernel column |
| 0x8 | 2 | R/W | Coefficient column R1 |
| 0xA | 2 | R/W | Coefficient column R2, the right-most kernel column |
| 0xC | 1 | R/W | Command byte |

A 12-bit column holds row 0 in bits 3:0, row 1 in bits 7:4 and row 2 in bits
11:8. This applies to both sample and coefficient columns.

Command byte values:

| Value | Meaning |
|---|---|
| 0x01 | Load coefficients: copy R0, R1 and R2 into the kernel |
| 0x02 | Load sample column: shift register 0x4 into the window |
| 0x04 | New row: the next three columns refill the window before results resume |
| 0x06 | Sample complete: ends streaming mode |

The software sequence is:

1. Write R0, R1 and R2, then write 0x01 to 0xC. Poll status bit 0 until it is 0.
2. For each column of the current three-row band, write the column to 0x4, then
   write 0x02 to 0xC, then poll bit 0.
3. The first two columns of a band only fill the window. Every later column
   produces one result.
4. At the start of each further band, write 0x04. Write 0x06 when the image is
   done.
5. Read 0x2 until status bit 7 (empty) is set.

An image of H rows and W columns gives (H−2)·(W−2) results. A 28×54 image
therefore fills the FIFO exactly.

## Bus behaviour

This is the part that most needs care when changing the RTL.

**Pipelining.** An AHB-Lite transfer has an address phase and a data phase in
the following cycle. The address phase of the next transfer may overlap the
data phase of the current one. The slave handles transfers as follows:

- It accepts an address phase at the rising edge where `hready` is high.
- It latches the register select, byte lanes and direction for the data phase.
- It performs a write at the edge that ends the write's data phase.

**Registered read data.** `hrdata` comes straight from a flip-flop. The read
value is therefore worked out during the *address* phase and captured at the
edge that ends it. It is then stable for the whole data phase.

**Forwarding.** A read may overlap the data phase of a write to the same
register. The read mux looks at each register's next value, so the read returns
the data being written.

**Reading the result register.** A read of 0x2 pulses `read_enable` in its
address phase. The FIFO shows its oldest word combinationally, so this word is
captured into `hrdata` at the same edge that advances the FIFO.

**Error response.** Every good transfer completes with no wait states. The
slave answers a bad access with a two-cycle error:

- First cycle: `hresp` = 1 and `hready` = 0. Both are decoded combinationally in
  the address phase, and the low `hready` holds the address phase.
- Second cycle: `hresp` = 1 and `hready` = 1.

The bad transfer is never carried out. A master normally replaces it with IDLE
in the second cycle. If the master does not, the transfer is still dropped.
While `hready` is low, a write in its data phase waits and completes one cycle
later. The following accesses are bad:

- a write to 0x0–0x3, which are read-only;
- an address of 0xE or 0xF, or a byte at 0xD;
- a size wider than 16 bits;
- a half-word at an odd address.

Two assertions in `ahb_lite_slave` check the handshake:

- `hready` is low only together with `hresp`.
- A first error cycle is always followed by the second one.

The slave has no `hready` input. It treats its own `hready` output as the bus
ready signal, as the sole slave on these ports. In a multi-slave fabric, add an
`hready` input and qualify address-phase acceptance with it.

**Command handshake.** A written command byte stays in register 0xC until the
controller is idle. The byte clears itself in the cycle the controller takes
it, so it reads back as 0 once it has been taken. The status busy bit is the
OR of three things:

- the controller's `modwait`;
- a pending command;
- a command being written in the current data phase.

So a status read that overlaps the command write already reports busy. Software
can poll right after issuing a command without a race.

## Datapath and controller

- **`sample_shift_reg`** has three 12-bit column positions. A shift moves
  columns one place left and puts the new column in position 2. After three
  shifts, the first column written lines up with R0.
- **`coeff_reg`** has three addressable 12-bit columns. `coeff_ld` writes
  column `coeff_sel`.
- **`mult_adder_tree`** contains nine 4×4 unsigned multipliers and an adder
  tree.
  - The largest possible sum, 15·15·9 = 2025, fits in 11 bits. It is stored
    zero-extended in a 16-bit result register, so bits 15:12 of a result are
    always 0.
  - `result_ready` is high in the cycle after `convolve_en` and drives the FIFO
    write enable directly.
- **`conv_controller`** is a 7-state machine. It takes a command only in
  `S_IDLE`. If several command bits are set, the priority is: sample complete,
  then coefficient load, then new row, then sample load. Its states, with the
  number of busy cycles for each:

  | Command | States | Busy cycles |
  |---|---|---|
  | coefficient load | `S_LOAD_C0`–`S_LOAD_C2`, with `coeff_sel` = 0, 1, 2 | 3 |
  | sample shift, window not yet full | `S_SHIFT` | 1 |
  | sample shift that completes a window | `S_SHIFT` → `S_CONV` → `S_STORE` | 3 |

  - In `S_STORE` the result enters the FIFO. `modwait` stays high through
    this cycle, so the empty bit is already current when busy drops.
  - A 2-bit counter of columns since the row started drives `sample_stream`,
    which is high while the window is full.
  - New row and sample complete only clear that counter. Neither makes the
    controller busy.
- **`result_fifo`** is a single-clock FIFO, 1352 × 16 by default
  (`FIFO_DEPTH` on the top, `DEPTH` on the FIFO).
  - It has wrapping read and write pointers and an occupancy counter that
    drives the empty and full flags.
  - A write while full is dropped, unless a read in the same cycle frees a
    place. A read while empty is ignored.
  - The memory array has no reset.

All flip-flops other than the FIFO memory use the asynchronous active-low reset
`n_rst` and clear to 0. The target clock is 100 MHz. No timing analysis has been
run. The likely critical paths are:

- the multiplier/adder tree into the result register;
- the FIFO memory read into `hrdata`.

## What follows the specification and what was chosen here

These parts follow the specification:

- the block structure and the nets between the blocks;
- the register map and command/status bit positions;
- the 16-bit bus width and the registered `hrdata`;
- error-only use of `hready`;
- the automatic FIFO pop on reads of 0x2;
- 3×12-bit sample and coefficient storage, the 4-bit unsigned arithmetic, and
  the 1352×16 result buffer.

These are this design's own choices:

- the controller's states and timing;
- the command priority;
- what "sample complete" does beyond ending streaming;
- the self-clearing command byte;
- the extended busy bit;
- read-after-write forwarding;
- the size and alignment errors, and the 3-bit `hsize`;
- the order of samples inside a column and of columns inside the window;
- the FIFO's full flag (status bit 9), its show-ahead output and its overflow
  behaviour;
- the value 0 returned by a read of an empty FIFO.

One point in the specification is contradictory. The address map gives command
bit 0 for "load coefficients" and bit 1 for "load sample column". The software
walkthrough has them the other way round. This RTL follows the address map.

Not built:

- HBURST burst transfers, which are not part of this configuration.
- The CPU and bus master. The testbenches use their own behavioural master,
  `tb/ahb_lite_master_bfm.sv`.

## Verification

Every module has a self-checking testbench in `tb/`, named `tb_<module>.sv`.
Each one compares against values computed independently in the testbench. Each
prints `TB_RESULT checks=N failures=M` and has a cycle watchdog.

- `tb_mult_adder_tree` checks:
  - the worked example, samples 1..9 times coefficients 1..9 = 285;
  - the maximum, 2025;
  - each product position, and random windows;
  - the one-cycle latency.
- `tb_ahb_addr_decoder` checks all 256 combinations of address, size and
  direction.
- `tb_result_fifo` checks the full 1352-deep FIFO against a queue model:
  - filling it and an overflow;
  - a simultaneous read and write while full;
  - random traffic that wraps both pointers.
- `tb_conv_controller` checks every command cycle by cycle.
- `tb_ahb_lite_slave` uses the bus master with small controller and FIFO models
  to check:
  - overlapped transfers and byte lanes;
  - forwarding;
  - command delivery and busy;
  - FIFO pops;
  - every error case and its stall count.
- `tb_conv_ahb_top` runs the whole peripheral at its default size. It loads
  three kernels and convolves three images:
  - the worked example;
  - a 6×7 image, drained after each band;
  - a 28×54 image whose 1352 results fill the FIFO, plus one extra window that
    must be dropped.

  It compares every result with a 2-D convolution computed in the testbench. It
  also counts each mechanism and fails if any never happened: coefficient
  loads, shifts, convolutions, new rows, sample completes, FIFO reads, empty
  reads, busy and streaming status, FIFO full, overflow, bus errors, stalls and
  overlapped transfers. The run takes about 30,000 clock cycles.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
    -Irtl -y rtl -y tb +libext+.sv rtl/conv_pkg.sv \
    tb/tb_conv_ahb_top.sv --top-module tb_conv_ahb_top
./obj_dir/Vtb_conv_ahb_top
```

To run another testbench, replace `tb_conv_ahb_top` with its name. Always list
`conv_pkg.sv` first. The FIFO depth is the `FIFO_DEPTH` parameter of
`conv_ahb_top`. Address, status and command bit positions, and the controller
state encoding, are in `rtl/conv_pkg.sv`.

## Files

- `rtl/conv_pkg.sv`: widths, register selects, status and command bits, state
  enum.
- `rtl/conv_ahb_top.sv`: the top level.
- `rtl/ahb_lite_slave.sv` and `rtl/ahb_addr_decoder.sv`: the bus interface.
- `rtl/conv_controller.sv`, `rtl/sample_shift_reg.sv`, `rtl/coeff_reg.sv`,
  `rtl/mult_adder_tree.sv` and `rtl/result_fifo.sv`: the convolver.
- `tb/ahb_lite_master_bfm.sv`: the behavioural AHB-Lite master.
- `tb/tb_*.sv`: the testbenches.
