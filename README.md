# 2-D vector register file for block-based video processing

Video kernels such as the DCT, 2-D filtering and the H.264 deblocking
filter work on small pixel blocks first along the rows and then along the
columns. A conventional DSP register file stores one 32-bit word per
register: four 8-bit pixels of one row of a 4x4 block. Reading a column needs
one byte from each of four registers, so between the row pass and the column
pass the block is usually stored to memory, transposed and loaded again.

This design removes that round trip. Eight 32-bit registers are split into
thirty-two independently addressed 8-bit elements. The elements are
arranged as two 4x4 banks, and every register address carries one extra
**mode bit**:

* **row mode** reads or writes a row register, R0..R7;
* **column mode** reads or writes a column of a bank, C0..C7.

A 4x4 block loaded into a bank as four rows can therefore be processed
along its rows and then, straight away, along its columns. The register file
keeps the port count of the scalar file it replaces: two read ports and one
write port. The only extra cost is one more select bit on each port's
multiplexer or demultiplexer.

The RTL has these parts:

* the register file;
* the element-level forwarding logic that a row/column register file needs;
* an H.264 edge filter as the execution unit;
* a two-read, one-write data SRAM;
* a small datapath, `vreg_dsp_top`, that deblocks a macroblock with it.

## Register organisation and addressing

```
           bank 0                          bank 1
        C0   C1   C2   C3              C4   C5   C6   C7
  R0  [ a ][ b ][ c ][ d ]       R4  [   ][   ][   ][   ]
  R1  [ e ][ f ][ g ][ h ]       R5  [   ][   ][   ][   ]
  R2  [ i ][ j ][ k ][ l ]       R6  [   ][   ][   ][   ]
  R3  [ m ][ n ][ o ][ p ]       R7  [   ][   ][   ][   ]
```

A register address is a `vreg_addr_t`: `{mode, num}`, with `mode` 0 for rows
and 1 for columns, and `num` 3 bits wide.

| access          | elements touched, lane k = 0..3                   |
|-----------------|---------------------------------------------------|
| row `num` = n   | element k of row register n                       |
| column `num` = n| row register 4*(n/4) + k, column n % 4            |

So R0 reads `a b c d`, and C0 reads `a e i m`. Lane 0 is the most
significant byte of the 32-bit word (`vword_t` is `logic [0:3][7:0]`). That
is, lane 0 is the leftmost pixel of a row, or the top pixel of a column.

The sizes are constants in the package `vreg_pkg`: `NUM_REGS = 8`,
`LANES = 4` and `ELEM_W = 8`. The address and bank logic is written in terms
of them. Setting `NUM_REGS = 16` gives four banks (sixteen 32-bit registers,
4-bit register numbers). The register-file testbenches and the macroblock
and random-program top testbenches also pass at that size.

Modules:

* `vreg_read_mux`: one read port, with a 4-bit select.
* `vreg_write_demux`: the write port. It produces one enable per element and
  routes each byte. In column mode, byte k goes to the k-th row of the bank.
* `vreg_file`: 32 byte registers, two read muxes and one write demux.
  * Reads are combinational.
  * A write lands at the rising edge. A read in the same cycle returns the
    old value.
  * An asynchronous active-low reset clears every element.

## Hazards when switching between rows and columns

This is the subtle part of the design. In a pipelined datapath an
instruction may read a register that an older instruction has not yet
written. With a row/column register file the overlap is not all-or-nothing:

* a row and a column of the same bank share exactly **one** element;
* two rows, or two columns, share either all four elements or none;
* registers in different banks share nothing.

Take a row write to R4 followed by a column read of C5. The two overlap in
one byte only, R4's lane 1. The reader needs that byte from the pending
write and the other three bytes from the file.

`vreg_bypass` therefore works per element:

1. For every lane of the read, it computes which element (row register,
   column) that lane reads.
2. It checks whether the pending write covers that element, and in which
   lane of the write word.
3. If the write covers it, the byte is replaced.

It outputs:

* the corrected word;
* a per-lane hit mask;
* `xmode`, which flags a hit between a write and a read of different modes.

When more than one write is pending, the instances are chained oldest
first.

The datapath supports both remedies for these hazards, chosen by the
parameter `BYPASS`:

* `BYPASS = 1` (the default): forward the overlapping bytes.
* `BYPASS = 0`: hold the instruction in the read stage until the write has
  reached the file. This is the "insert delays" remedy.

In the macroblock workload below, every cross-mode hazard is the same case:
a LOAD writes the last row of a neighbour block, and the next instruction, a
column-mode FILT, reads that block's columns. Forwarding removes the 24
stall cycles this costs without it (832 against 856 cycles).

## The datapath (`vreg_dsp_top`)

Instructions arrive as a decoded struct, `vinstr_t`, on a valid/ready
handshake. One instruction is accepted per cycle at most.

| op      | effect                                                                       |
|---------|------------------------------------------------------------------------------|
| `LOAD`  | `reg[ra] <- mem[addr]`                                                        |
| `STORE` | `mem[addr] <- reg[ra]`                                                        |
| `FILT`  | `{reg[ra], reg[rb]} <- filter(p = reg[ra], q = reg[rb], ctrl)`               |

`ra` and `rb` are full register addresses, so they include the mode bit:

* A FILT with two row addresses filters a **vertical** edge. The p register
  holds the four pixels left of the edge, and the q register the four to the
  right.
* A FILT with two column addresses filters a **horizontal** edge, with p
  above the edge and q below.

`ctrl` carries the boundary strength `bs`, the chroma flag, `alpha`, `beta`
and `tc0`.

Pipeline, two stages:

1. **RD.** Both read ports are read through the bypass network. A LOAD sends
   its address to the synchronous SRAM.
2. **EX.**
   * LOAD writes the SRAM word into its register.
   * STORE writes the SRAM.
   * FILT runs the edge filter and writes the p word. The q word is held in a
     register and written in the next cycle, because the file has a single
     write port. The RD stage is held for that one cycle (`instr_ready` low).

Forwarding sources are the EX-stage write and the held q word.

The SRAM has its own read-after-write case. A LOAD issued right behind a
STORE to the same word sends its read address in the same cycle in which the
STORE writes, and the SRAM returns the old word. The datapath detects the
equal addresses and hands the stored word to the LOAD directly. This happens
for either setting of `BYPASS`.

Timing:

* LOAD, STORE and NOP each take one issue cycle.
* FILT takes two issue cycles.
* A LOAD's data may be used by the very next instruction.

Other ports:

* **Host port.** `host_we/host_waddr/host_wdata` write the SRAM, and
  `host_raddr` / `host_rdata` read it with one cycle of latency. A host write
  must not coincide with an executing STORE; an assertion checks this.
* **`busy`.** High while an accepted instruction is still in flight.
* **`ev`.** One-cycle event flags: issue, mode switch, bypass, cross-mode
  bypass, write-port stall, hazard stall, the three filter outcomes, and
  store-to-load forwarding. With
  `BYPASS = 1`, `ev.hazard_stall` is constant 0.

Restriction: the p and q registers of a FILT must not share an element,
because the q word is written last. Any real edge meets this, since p and q
are in different banks.

## Edge filter (`dbf_filter`)

One call filters one line of eight pixels across an edge:
`p3 p2 p1 p0 | q0 q1 q2 q3`. The p word holds `{p3,p2,p1,p0}` and the q word
`{q0,q1,q2,q3}`, so p0 and q0 are the lanes next to the edge. The block is
combinational and implements the H.264 equations:

* **Edge test.** The line is filtered only if all of these hold: `bs != 0`,
  `|p0-q0| < alpha`, `|p1-p0| < beta` and `|q1-q0| < beta`.
* **`bs` 1 to 3: normal filter.**
  * p0 and q0 move by a clipped delta, with
    `tc = tc0 + (|p2-p0|<beta) + (|q2-q0|<beta)` for luma and `tc0 + 1` for
    chroma.
  * For luma, p1 and q1 are also adjusted when their side is smooth.
* **`bs` = 4: strong filter.** For luma, when a side is smooth and
  `|p0-q0| < (alpha>>2)+2`, that side's p0..p2 (or q0..q2) are rewritten.
  Otherwise only p0 (or q0) is replaced by a 3-tap average. Chroma always
  takes the 3-tap form.

The unit takes `tc0` directly. The tables that turn QP into alpha, beta and
tc0 are not included, and neither is the boundary-strength derivation; both
are inputs to the datapath.

## Deblocking a macroblock

The end-to-end testbench deblocks one macroblock: the 16x16 luma block and
two 8x8 chroma blocks, together with the neighbouring sub-blocks above and to
the left. Sub-blocks are visited in raster order. The current sub-block stays
in one bank, and each neighbour is loaded into the other bank, filtered
against and stored again:

1. The left vertical edge, using rows. This is done only for the first
   sub-block of a row; later left edges were already filtered as the previous
   block's right edge.
2. The upper horizontal edge, using **columns of the same registers**.
3. The right vertical edge, using rows. The right neighbour then becomes the
   current sub-block, so the two banks alternate.

Per macroblock this is:

| operation                  | count |
|----------------------------|-------|
| loads                      | 224   |
| stores                     | 224   |
| vertical-edge line filters | 96    |
| horizontal-edge line filters | 96  |
| total                      | 640   |

These match the published load/store counts for this register organisation.
A scalar register file needs 384 loads and 384 stores for the same work,
because every block is stored, transposed and reloaded.

The datapath issues one operation per cycle and runs the macroblock in 832
cycles. That is 640 instructions plus one held cycle for each of the 192
FILTs. The published figure of 329 cycles assumes two operations issued per
cycle, which this datapath does not do.

Edge order inside a sub-block: left, upper, right. An alternative order that
filters two vertical edges before the first horizontal one would need more
than two sub-blocks resident in the register file.

This interleaved order is not the order of the H.264 standard, which filters
all vertical edges of a macroblock before any horizontal edge. Pixels near
sub-block corners therefore come out differently from a standard decoder.
The order is a property of the program, not of the hardware: the same
instructions in the standard order run on this datapath unchanged, at the
cost of more loads and stores.

## What is not included, and where this RTL makes its own choices

* **Dual issue.** The system the register file was evaluated in issues two
  operations per cycle, except that stores cannot pair. This datapath is
  single-issue.
* **Boundary strength and thresholds.** The derivation of `bs` from coding
  information, and of alpha, beta and tc0 from QP, is not included. These
  values come in with each FILT.
* **Instruction encoding.** The 32-bit instruction encoding is not defined.
  Instructions are a decoded struct.
* **Pipeline, handshake and host port.** The pipeline depth, the
  valid/ready handshake, store-to-load forwarding and the SRAM host port are
  this design's own.
* **Element-level forwarding.** Forwarding element by element, rather than
  whole registers, is this design's choice. The need for some hazard
  handling on mode switches is inherent to the organisation.
* **Data SRAM.** The SRAM depth (1024 words) is chosen here, as are the
  one-cycle synchronous read and the read-first collision rule. The memory
  is written as an array; a real implementation would use an SRAM macro.
* **Size.** Eight registers (two banks) is the size used throughout. A
  four-bank variant (`NUM_REGS = 16` in `vreg_pkg`) would hold four
  sub-blocks at once. It passes the same tests, but the macroblock program
  still keeps only two sub-blocks resident.

## Files

| file | contents |
|------|----------|
| `rtl/vreg_pkg.sv` | sizes, address/word types, instruction and event structs |
| `rtl/vreg_read_mux.sv` | read port multiplexer, row or column |
| `rtl/vreg_write_demux.sv` | write port decoder, per-element enables |
| `rtl/vreg_file.sv` | the 2-D vector register file |
| `rtl/vreg_bypass.sv` | element-granular hazard detection and forwarding |
| `rtl/dbf_filter.sv` | H.264 edge filter for one 8-pixel line |
| `rtl/data_sram.sv` | 2-read 1-write data memory |
| `rtl/vreg_dsp_top.sv` | the datapath (top) |
| `tb/tb_ref_pkg.sv` | reference models: matrix register file, integer edge filter |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_dsp_harness.sv` | macroblock program, picture and checks for the top |
| `tb/tb_vreg_dsp_top.sv` | top at default parameters (forwarding) |
| `tb/tb_vreg_dsp_top_stall.sv` | top with `BYPASS = 0` (stalls) |
| `tb/tb_vreg_dsp_top_random.sv` | random programs on both top variants against a sequential model |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends itself. Each
also has a watchdog that counts a failure if the simulation hangs. From the
folder that holds `rtl/` and `tb/`, run:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/vreg_pkg.sv tb/tb_ref_pkg.sv tb/tb_vreg_dsp_top.sv \
    --top-module tb_vreg_dsp_top -o sim
./obj_dir/sim
```

For another testbench, replace the last file and the top module name, for
example `tb/tb_vreg_bypass.sv` and `tb_vreg_bypass`.

The default-parameter top test runs in well under a second. It prints:

* the instruction mix and the cycle count;
* how often each mechanism occurred: forwarding, cross-mode forwarding,
  write-port stalls, mode switches, and normal, strong and skipped filter
  lines.

What the tests check:

* **Unit testbenches.** Each compares against models written independently
  of the RTL:
  * a plain byte matrix for the register file, its read mux and its write
    demux;
  * the matrix after the write is applied, for the bypass unit;
  * an integer version of the filter equations, over 5000 random lines with
    every filter path covered.
* **Top testbenches.** They compare every SRAM word of the processed
  macroblock with a reference picture filtered line by line in the same
  order. They also check the cycle count and that each mechanism occurred.
* **Random-program testbench.** It runs 3000 random LOAD, STORE and FILT
  instructions with random row and column addresses on both variants of the
  top, with dense back-to-back dependences. The final memory and registers
  are compared with a sequential reference model. Every forwarding case
  occurs: same-mode, cross-mode, from the held q word, and store-to-load.
