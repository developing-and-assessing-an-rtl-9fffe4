# En-Com: an energy-compressed SRAM subarray

Large on-chip SRAMs that hold images or video frames spend most of their
energy on leakage while they simply keep data. Ordinary power gating cannot
be used on them, because switching a cell off loses its value. En-Com
("energy compression") uses one property of such data: many bits are '0',
and the '0's cluster. If every cell in a small group holds '0', that
group can be switched off. A switched-off cell still reads '0', so no data
is lost and the read path needs no change.

This repository holds synthesizable SystemVerilog for one En-Com subarray:

- 16 rows by 32 columns, 512 bits in all.
- One byte is read or written per access.
- A 4:16 row decoder and a 2:4 column decoder.
- The array is split into two segments of eight rows each.
- In each segment, every column is one *compress group* of eight cells. The
  array therefore has 64 groups.

The RTL models the transistor-level ideas (the 7-transistor cell, the power
gate, the Zero-Switch Cell) as logic. Its purpose is to reproduce the
behaviour and the cycle cost of the scheme, not its analog circuits.

## Compress groups and Zero-Switch Cells

The array is compressed by column. A compress group is the eight cells of
one column within one segment. Each group owns one extra cell, its
*Zero-Switch Cell*. The array therefore has one extra row of 32 such cells
per segment: 64 extra cells on top of 512, which is 12.5 %.

| Zero-Switch Cell | meaning                          | group supply | what the group reads |
|------------------|----------------------------------|--------------|----------------------|
| `0`              | all eight cells hold `0`         | gated off    | `0`                  |
| `1`              | the group may hold a `1`         | on           | the stored bits      |

- **The Zero-Switch Cell.** It is a plain 6T cell followed by an inverter.
  The inverter output (`enable_zero`) does two jobs. It drives the group's
  PMOS power gate. It also enables the extra transistor in each 7T cell.
- **The 7T cell.** The extra transistor pulls the cell's storage node to '0'
  while the group is gated. A gated cell therefore gives a clean '0' to the
  sense amplifier instead of floating. In the RTL (`encom_cell_7t`), the
  read output is the stored bit ANDed with the group's power state.
- **Start state.** After reset, every Zero-Switch Cell and every cell holds
  '0'. The whole array starts switched off and reads all zeros.

Invariant: *a Zero-Switch Cell that holds '0' means that all eight of its
cells hold '0'*. `encom_compress_group` checks this with an assertion.
Between the two cycles of a dual write (next section), the group briefly
holds a '1' while still gated. The assertion therefore requires that the
Zero-Switch Cell becomes '1' on the very next cycle.

## The dual write

Writing is the one operation that changes. A Zero-Switch Cell must become
'1' as soon as any cell of its group receives a '1'. Every column of the
written byte lies in a different group, so one byte write can switch up to
eight groups on. A write whose byte holds at least one '1' therefore takes
two array cycles:

1. **Write cycle** (`we`). The addressed word line is raised. The eight data
   bits are driven onto the bit lines that the column decoder selected.
   This is an ordinary SRAM write. The cells take the new byte, even in a
   group that is still gated.
2. **Dual-write cycle** (`dwp`, the dual write pulse). No row word line is
   raised. Instead, the row decoder raises the Zero-Switch word line of the
   segment that holds the row:
   - `zs_wl[0]` (top) = `~row_addr[3] & dwp`, for rows 0-7;
   - `zs_wl[1]` (bottom) = `row_addr[3] & dwp`, for rows 8-15.

   The write circuit drives only the *true* bit line of each data bit that
   is '1' (`set = data & (we | dwp)`). The complement bit line stays idle
   (`clr = ~data & we & ~dwp`). As a result, the Zero-Switch Cells of the
   columns written with '1' are set, and the Zero-Switch Cells of columns
   written with '0' are left untouched.

A write of `8'h00` needs no second cycle and takes one cycle. Reads never
use the pulse and always take one cycle.

While the write drivers own the bit lines, the sense amplifier must be
isolated from them. The sequencer raises `sa_iso` in every write cycle, so
the isolation lasts two cycles for a dual write. The top brings this signal
out as `sense_isolate` for a sense amplifier outside the RTL.

The access sequencer (`encom_dwpg`) has the states IDLE, READ, WRITE and
DUAL. It also generates the pulse. It pulls `req_ready` low during a WRITE
cycle that will be followed by DUAL. A requester that issues back-to-back
accesses therefore loses one cycle per write that holds a '1', and no cycle
otherwise.

**Groups do not switch back off.** A Zero-Switch Cell is set by writing
'1', but nothing clears it when the group is later overwritten with zeros.
This matches the write mechanism as described: only a '1' triggers the
second write. So the RTL stays correct but conservative. A group that once
held a '1' stays powered until reset, even if it holds all zeros again. A
real system would regain that leakage saving by resetting the array or by a
re-compression pass. Neither is defined here.

## Read path

A read raises one word line. It connects each data bit to one of its four
bit-line pairs through the column multiplexer (`encom_column_mux`). It
registers the result as the response. Data bit *i* lives on columns
`4*i .. 4*i+3`, and the column address chooses among them. Gated groups
need no special handling because their cells already read '0'.

The voltage-based sense amplifier and the bit-line precharge are analog and
are not modelled. In this two-state RTL, the sensed value is simply the
multiplexer output.

## Interface and timing (`encom_sram`)

| port                | dir | width  | meaning                                                   |
|---------------------|-----|--------|-----------------------------------------------------------|
| `clk`, `rst_n`      | in  | 1      | clock; asynchronous active-low reset                      |
| `req_valid`         | in  | 1      | request present                                           |
| `req_ready`         | out | 1      | request accepted on a rising edge when both are high      |
| `req_we`            | in  | 1      | 1 = write, 0 = read                                       |
| `req_addr`          | in  | 6      | `[5:2]` row (4:16 decoder), `[1:0]` byte in row (2:4)     |
| `req_wdata`         | in  | 8      | write data                                                |
| `rsp_valid`         | out | 1      | one-cycle strobe with read data                           |
| `rsp_rdata`         | out | 8      | read data                                                 |
| `group_on`          | out | 2 x 32 | `[segment][column]`, 1 = group powered                    |
| `dual_write`        | out | 1      | high during a dual-write cycle                            |
| `sense_isolate`     | out | 1      | sense-amplifier isolation, high in every write cycle      |

- **Acceptance.** A request accepted on edge *k* uses the array during
  cycle *k → k+1*.
- **Reads.** Read data is registered on edge *k+1* and is visible with
  `rsp_valid` until edge *k+2*.
- **Holding a request.** A requester must hold a request that has not been
  accepted yet (`req_valid`, `req_addr` and `req_we` stay stable). An
  assertion in the top checks this.
- **Throughput.** Reads and zero-byte writes run at one byte per cycle. A
  write holding a '1' costs two cycles.

Parameter `INVERT_DATA` (default `0`) stores every byte inverted. This
suits data that is mostly '1': all-ones bytes are then stored as zeros and
keep their groups switched off. The inversion is a static choice for the
whole subarray.

Shared constants live in `encom_pkg`:

| constant     | value |
|--------------|-------|
| `ROWS`       | 16    |
| `COLS`       | 32    |
| `BYTE_W`     | 8     |
| `GROUP_SIZE` | 8     |

The package also defines the sequencer state type `seq_state_e`.

## Module hierarchy

```
encom_sram                   top: request port, address/data registers, response register
├── encom_dwpg               access sequencer and dual write pulse generator
├── encom_row_decoder        4:16 word lines + top/bottom Zero-Switch word line
├── encom_col_decoder        2:4 column select
├── encom_write_driver       bit-line / bit-line-bar drivers with dual-write gating
├── encom_column_mux         4:1 column multiplexer, both directions
└── encom_sram_array         2 segments x 32 columns
    └── encom_compress_group     (x64) power gate and assertion
        ├── encom_zs_cell        Zero-Switch Cell (6T cell + inverter)
        └── encom_cell_7t        (x8) storage cell with hold-'0' transistor
```

Every cell is a flip-flop with asynchronous reset. There are 576 cell
flip-flops in all, so the array synthesizes to registers and not to a
memory macro. That is deliberate: each cell needs its own power-gated read
behaviour.

## Where this RTL follows the published scheme and where it chooses

These parts follow the scheme as published:

- array size, segmentation and group size;
- decoder sizes;
- one Zero-Switch Cell per column per segment, reset to '0';
- the 7T cell reading '0' while gated;
- the dual write being triggered by a '1' and costing one extra cycle;
- the Zero-Switch word line being chosen by the row-address MSB with one
  inverter and two AND gates;
- the three-input gating of the true bit line by the pulse;
- the sense-amplifier isolation held for both cycles of a dual write;
- optional data inversion.

These are this design's own choices:

- **Handshake and address layout.** The valid/ready handshake, the address
  split and the registered read response.
- **Reset.** The reset of the storage cells as well as the Zero-Switch
  Cells.
- **Which AND gate takes the inverted MSB.** It is taken so that the top
  Zero-Switch row serves rows 0-7.
- **Bit order within a row.** Bit *i* sits on columns `4i..4i+3`.
- **Exact write-driver gating.** The gating of `clr` is chosen so that no
  Zero-Switch Cell is ever written with '0'. A literal two-gate reading of
  the published write circuit would either block ordinary writes of '1' or
  clear Zero-Switch Cells of neighbouring groups.
- **Pulse width.** The dual write pulse is one clock cycle wide.

These parts are not modelled:

- the dynamic (precharged NAND) decoder circuits;
- the sense amplifier itself (only its isolation control is generated);
- precharge;
- the electrical timing of the power gate;
- anything above one subarray (banks, bank decoding).

The published operating point is 1.2 V and 500 MHz in a 130 nm process. It
is a property of a circuit implementation and is not checked here.

## Capacity

One subarray stores 64 bytes. A raw benchmark image of about 1 MB would
need on the order of 16,000 subarrays, and their bank organisation is not
defined here. The intended mapping is one line of pixels per row. A row
holds four 8-bit pixels, so each compress group covers one bit position of
one pixel column over eight consecutive lines.

## Simulating

Every testbench is self-checking, prints
`TB_RESULT checks=<n> failures=<m>`, and has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/encom_pkg.sv tb/tb_encom_sram.sv --top-module tb_encom_sram -o sim
./obj_dir/sim
```

| testbench                  | what it covers |
|----------------------------|----------------|
| `tb_encom_sram`            | Full design at default size, against a reference memory and a reference group-power map. Random reads and writes with image-like bytes. It checks the read latency (two edges after acceptance), 64 reads in 64 cycles, and a 1-cycle zero write versus a 2-cycle write holding a '1'. It checks that the sense amplifier is isolated for both cycles of every dual write and never during a read. It also counts gated-group reads, dual writes, stalls, zero writes, two-cycle isolations and power-ups, and fails if any of these never happened. |
| `tb_encom_image_tile`      | Writes a 16-line by 4-pixel gradient tile. It checks that the number of gated groups equals the count computed from the tile, and that the write cost equals 64 cycles plus one per non-zero pixel. It then reads the tile back. |
| `tb_encom_sram_inv`        | `INVERT_DATA = 1`. All-ones bytes must leave every group gated and need no dual write. Random data must read back correctly. |
| `tb_encom_sram_array`, `tb_encom_compress_group`, `tb_encom_cell_7t`, `tb_encom_zs_cell` | Storage hierarchy against bit-level references. |
| `tb_encom_dwpg`            | Sequencer states, control outputs and `ready`, cycle by cycle. |
| `tb_encom_row_decoder`, `tb_encom_col_decoder`, `tb_encom_write_driver`, `tb_encom_column_mux` | Exhaustive or random checks of the combinational blocks. |

To change the size, edit the constants in `encom_pkg`. `ROWS` must be a
multiple of `GROUP_SIZE`, and `COLS` a multiple of `BYTE_W`. The top-level
testbenches take their address widths from the package. The
decoder-specific Zero-Switch selection (`zs_wl`) assumes exactly two
segments.
