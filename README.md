# A configurable system-bus slave column for an embedded programmable logic core

A programmable logic core (PLC) embedded in a system-on-chip has to talk to
software, and the usual way is as a slave on the system bus: a block of
memory-mapped control, status and data registers. Two obvious ways to build
that slave both fail:

* **Built from the PLC's own LUTs**, the slave is flexible but slow. The
  PLC's path can become the critical path of the whole bus. A 64-byte APB
  slave takes roughly 11 ns in LUTs against about 1 ns in standard cells.
* **Built as one fixed block**, it is fast, but its register set and bus
  protocol are frozen when the chip is made. Every register bit also needs
  its own wire into the fabric, and that many wires in one spot swamp the
  routing.

This RTL implements the middle road. The slave interface is mostly fixed
logic with *just enough* configuration to fit the common on-chip buses
(AMBA APB and AHB, CoreConnect OPB and DCR, Wishbone). It is cut into
CLB-sized pieces that sit in one column of modified logic tiles:

* **Five control tiles** hold the interface control: address decode,
  byte-lane logic and protocol timing.
* **One register tile per byte** holds eight configurable register bits.

Byte enables and the 32-bit write and read data buses run hard-wired along
the column. The only connections that use the programmable routing are the
bus signals and each register bit's single input and output. Every tile
keeps its normal LUT cluster as a *shadow*: a tile whose interface part is
not needed works as an ordinary CLB.

## The column

```
        ^ write data (32)       | read data (32), OR chain
        |                       v
  +-----------------------------------+
  | register tile 63   byte 63 lane 3 |  <- in_j[7:0] / out_j[7:0] to fabric
  |   ...                             |
  | register tile 1    byte 1  lane 1 |
  | register tile 0    byte 0  lane 0 |
  +-----------------------------------+   write_en[63:0], read_en[63:0]
  | control tiles 0..4 (sbus_if_ctrl) |  <- select, read, write, byte_enable,
  |                                   |     address, size, din   (50 pins)
  |                                   |  -> dout, byte_ack, trans_ack (40 pins)
  +-----------------------------------+
```

Register tile `j` holds byte address `j`: word `j/4`, byte offset `j%4`. The
tile's bits are wired to one fixed lane of the data buses, lane `j%4`
(bits `8*(j%4)+7 .. 8*(j%4)`). The write data enters at the control and
passes up through every tile unchanged. Read data works without a
multiplexer. Each tile ANDs its bits with its read enable and ORs the
result into its lane of the bus coming down from the tile above. Only the
addressed bytes drive non-zero data, so the bus that reaches the control is
the read word.

With the default 6-bit address the column has 64 register tiles, which is
512 register bits. A real core would have as many register tiles as it has
rows left above the control tiles. A second column would be added where one
is not enough. `NUM_REGS` may be set below `2**ADDR_W`; the bytes above it
are then simply absent.

## Register bits: five behaviours from three multiplexers

Register bits do not behave in one fixed way. They take one of five types:

| type | master read     | master write              | user design (in the fabric)         |
|------|-----------------|---------------------------|-------------------------------------|
| RW   | stored value    | stores the data           | sees the value on `out_j`           |
| RO   | design's input  | no visible effect         | drives the value on `in_j`          |
| WIC  | stored value    | writing 1 clears to 0     | a 1 on `in_j` sets it (interrupt)   |
| RWS  | stored value    | stores the data           | a 1 on `in_j` sets it (sticky flag) |
| IND  | reads 0         | writing 1 fires an action | sees a one-cycle pulse on `out_j`   |

Each bit (`sbus_reg_bit`) is one flip-flop with a set input driven by
`in_j[k]`, plus three configuration-selected multiplexers (`bit_cfg_t`):

* `wr_clear` chooses what a write does:
  * 0: enable = `write_en`, d = `data_in`. This is a normal write.
  * 1: enable = `write_en & data_in`, d = `~data_in`. Writing 1 clears the
    bit; writing 0 does nothing.
* `rd_input` chooses what a read returns: the flip-flop (0) or `in_j[k]`
  directly (1).
* `out_pulse` chooses what drives `out_j[k]`: the flip-flop (0) or the
  flip-flop's enable (1), which gives a one-cycle pulse on a write.

The types are combinations of these selects; `sbus_pkg::bit_type_cfg()`
maps each type to them:

| type | wr_clear | rd_input | out_pulse | note                                          |
|------|----------|----------|-----------|-----------------------------------------------|
| RW   | 0        | 0        | 0         | the design holds `in_j` low                   |
| RWS  | 0        | 0        | 0         | the design pulses `in_j` to set the flag      |
| RO   | 0        | 1        | 0         |                                               |
| WIC  | 1        | 0        | 0         |                                               |
| IND  | 1        | 0        | 1         | write-1 pulses; the flip-flop stays 0        |

RW and RWS are the same hardware. The only difference is whether the user
design connects anything to the bit's input.

The set from `in_j` is synchronous and takes priority over a write in the
same cycle. An interrupt event that coincides with the master clearing the
register is therefore kept, not lost. The read value is ANDed with the
byte's `read_en`, which is what makes the OR chain work.

## Interface control

`sbus_if_ctrl` turns a generic request into byte enables:

* **Inputs:** `select`, `read`, `write`, `byte_enable[3:0]`,
  `address[5:0]`, `size[1:0]` and `din[31:0]`.
* **Outputs:** one write enable and one read enable per register byte, the
  write data for the column, the read data `dout`, the per-lane
  acknowledge `byte_ack` and the transfer acknowledge `trans_ack`.

Seven settings adapt it to a protocol (`ctrl_cfg_t`):

| field        | range     | effect                                                       |
|--------------|-----------|--------------------------------------------------------------|
| `ctrl_dly`   | 0..3      | register stages on select/read/write/byte_enable/address/size |
| `wdata_dly`  | 0..3      | register stages on the write data                             |
| `rd_wait`    | 0..3      | wait cycles before a read is performed and acknowledged       |
| `wr_wait`    | 0..3      | the same for writes                                           |
| `addr_mode`  | BE / SIZE | lanes from `byte_enable` (address word-aligned), or from `address[1:0]` and `size` (00 byte, 01 half-word, 10 word) |
| `big_endian` | 0/1       | byte offset 0 lies on lane 3; data bytes are swapped          |
| `rd_reg`     | 0/1       | read data and its acknowledge leave through a register, one cycle after the read |

### Timing

A request is the delayed `select` together with the delayed `read` or
`write`.

* **No wait cycles:** the request is performed in the cycle in which it
  appears. In that cycle:
  * the byte enables are high;
  * the read data comes combinationally through the OR chain onto `dout`;
  * `trans_ack` and `byte_ack` are high.

  Consecutive request cycles are consecutive transfers, so a burst runs at
  one transfer per clock.
* **N wait cycles:** the request is captured and performed N cycles later.
  The control inputs are ignored until then. This suits both kinds of
  master:
  * a master that holds its request until it sees the acknowledge (APB
    access phase, Wishbone) gets exactly one access;
  * a master that shows its address for only one cycle (AHB) is not lost.

The write data is sampled in the access cycle. A request that is both read
and write counts as a write.

With `rd_reg` set, a read still fires its read enables in the access cycle,
but `dout`, `byte_ack` and `trans_ack` come from registers one cycle later.
The control ignores its inputs in that cycle. This option takes the path
from the register flip-flops through the OR chain out of the bus's
read-data timing, at the cost of one cycle per read. An access to an address with no register byte
behind it is still acknowledged: writes are dropped and reads return 0.

Lanes and endianness:

* `off_mask` is the set of byte offsets touched inside the word. With byte
  enables it is the enables, reversed in big-endian mode. With a size it is
  the byte, the half-word or the whole word at `address[1:0]`.
* `bus_lanes` is the set of data-bus lanes those offsets use, and is what
  `byte_ack` reports.
* In big-endian mode, `din` and `dout` are byte-swapped in the control. The
  fixed lane wiring of the register tiles is unchanged.

### Protocol recipes

The bus signals reach the control tiles through the ordinary routing. A
LUT or two in the fabric can therefore adapt a protocol's signals before
they enter the control.

| bus                    | glue in the fabric                                  | settings |
|------------------------|-----------------------------------------------------|----------|
| APB                    | `select = PSEL & PENABLE`, `write = PWRITE`, `read = ~PWRITE`, `byte_enable = 1111`; `PREADY = trans_ack` | ctrl_dly 0, BE mode, waits as needed |
| AHB                    | `select = HSEL & HTRANS[1] & HREADY`; `HREADYOUT` high unless a captured transfer is waiting | ctrl_dly 1, SIZE mode, waits 0 for single-cycle bursts |
| OPB                    | byte enables straight through; `xferAck = trans_ack` | BE mode, big endian |
| Wishbone classic / registered feedback | `select = CYC & STB`, `byte_enable = SEL`; `ACK = trans_ack` | BE mode, waits 0..3, `wdata_dly` 1 and `rd_reg` 1 for registered data paths |
| DCR                    | `select` = address match on the DCR address, `read = DCR_Read`, `write = DCR_Write`, `byte_enable = 1111`; `DCR_Ack = trans_ack`; `dout` ORed into the daisy-chained read data | BE mode, big endian, waits as needed |

All five recipes are exercised in `tb_sbus_plc_column`. The testbench plays
each protocol's master and glue at the level of the control's inputs; it
does not model the complete signal set of each bus standard.

## Shadow clusters

Each tile contains a normal cluster (`lut_cluster`): four 4-input LUTs,
each with an optional flip-flop, ten input pins and four output pins. Every
LUT input picks one of the ten pins or one of the four flip-flops through
a local multiplexer. Select codes 14 and 15 give a constant 0.

A modified tile has eight output pins instead of four, and one
configuration bit, `sbus_en`:

* `sbus_en = 0`:
  * the tile is an ordinary CLB on pins 3..0;
  * pins 7..4 are low;
  * the interface part is inert: a register tile never answers the bus,
    and its bits are never set;
  * the control sees an idle bus.
* `sbus_en = 1`:
  * the cluster's inputs are held at zero;
  * the interface part owns the pins.

The five control tiles share one `sbus_en`. Each register tile has its own,
so register tiles the user design does not need stay usable as logic.

## Pins

The control tiles, 50 inputs and 40 outputs, `ADDR_W` = 6:

| pins     | signal            | pins   | signal       |
|----------|-------------------|--------|--------------|
| in 0     | select            | out 31..0  | dout     |
| in 1     | read              | out 35..32 | byte_ack |
| in 2     | write             | out 36     | trans_ack|
| in 6..3  | byte_enable[3:0]  | out 39..37 | low      |
| in 12..7 | address[5:0]      |        |              |
| in 14..13| size[1:0]         |        |              |
| in 46..15| din[31:0]         |        |              |
| in 49..47| unused            |        |              |

The address field grows with `ADDR_W`, which must stay at or below 9 to
fit the 50 input pins.

A register tile uses input pins 7..0 as `in_j[7:0]` and output pins 7..0 as
`out_j[7:0]`. Pins 9..8 are unused in interface mode.

## Configuration

The configuration memory appears as static input ports of `sbus_plc_column`:

* `ctrl_sbus_en` and `ctrl_cfg` (11 bits);
* `ctrl_lut_cfg`, `reg_lut_cfg` (`clb_cfg_t`, 132 bits per cluster: input
  selects, truth tables, flip-flop use);
* `reg_sbus_en` (one bit per register tile);
* `reg_bit_cfg` (3 bits per register bit).

A real core loads these bits through its configuration chain. That loading
is not modelled. The settings are meant to change only while the interface
is idle.

All flip-flops have an asynchronous active-low reset, `rst_n`, that clears
them.

## Parameters

| module             | parameter | default | meaning                                  |
|--------------------|-----------|---------|------------------------------------------|
| `sbus_plc_column`, `mod_ctrl_clbs`, `sbus_if_ctrl` | `ADDR_W`   | 6  | byte address width (control's `address[5:0]`) |
| same               | `NUM_REGS` | 64 | register tiles (bytes)                     |
| `mod_reg_clb`, `sbus_reg_clb` | `LANE` | 0 | data lane of the tile (set to `j % 4` by the column) |
| `cfg_delay`        | `W`, `MAX_DLY` | 1, 3 | width and depth of a configurable delay line |

The data width (32), the cluster shape (4 LUTs of 4 inputs, 10 inputs) and
the eight outputs of a modified tile are constants in `sbus_pkg`.

## What follows the original architecture, and what was chosen here

These parts follow the published proposal:

* the column of modified tiles and the five control tiles;
* one byte of eight bits per register tile, with shared byte write and read
  enables;
* the signal set and widths of the control, and the eight outputs per
  modified tile;
* the five register-bit types and the flip-flop-plus-multiplexers structure
  of a bit;
* hard-wired write data through the column and an OR-combined read path;
* configurable delays, byte enables and size indications, configurable
  address interpretation, burst support, and shadow LUT clusters.

These are choices of this RTL:

* the delay ranges (0..3), the separate read and write wait counts, and
  the single-cycle read-data register as the form of read-data delay;
* capturing a request that has to wait;
* the size encoding and the endianness handling by byte swapping;
* the pin order;
* the reading of RWS as "master read/write, design sets" and of IND as
  "write 1 gives a one-cycle pulse, reads 0";
* one shared select for the enable and data multiplexers of a bit;
* the set winning over a clearing write;
* the cluster's fully connected local multiplexers, with feedback taken
  from the flip-flops so that no configuration makes a combinational loop;
* the gating of the unused half of a tile;
* the reset.

Not part of this RTL:

* the routing fabric, including the extra connection-block switches that
  carry a modified tile's eight outputs onto the routing tracks;
* the rest of the PLC array;
* the bus master;
* the user designs.

The tile pins are the top-level ports, standing in for the routing.

## Sizes against the evaluated circuits

The evaluation attaches 20 MCNC benchmark circuits to an APB interface.
Their register needs run from 10 bits (s298) to 459 bits (des). In every
case one default column of 64 bytes (512 bits) holds the register map. The
user circuits themselves run in the rest of the core, which this RTL does
not model.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog.

| testbench            | what it checks |
|----------------------|----------------|
| `tb_sbus_reg_bit`    | all five bit types against a reference model; set versus clear priority |
| `tb_sbus_reg_clb`    | lane placement, OR chain, write-data pass-through, mixed bit types |
| `tb_lut_cluster`     | random cluster configurations, including feedback and flip-flops |
| `tb_mod_reg_clb`     | CLB mode against interface mode of a register tile |
| `tb_sbus_if_ctrl`    | held and pipelined masters, all delay and wait settings, both address modes, both endiannesses, exact enables, ack latency, one-per-clock bursts |
| `tb_mod_ctrl_clbs`   | pin map in both modes |
| `tb_sbus_plc_column` | the whole default-size column through APB, AHB (bursts), OPB (big endian), Wishbone (registered data, waits) and DCR, with a small user design, interrupts, sticky flags, action pulses and a tile in CLB mode; counts every mechanism |
| `tb_apb_benchmark`   | the benchmark-style use: a random mix of input (RW), output (RO) and interrupt (WIC) bits over the whole column, driven only over APB |

To run one with Verilator 5:

```
verilator --binary --timing --timescale 1ns/1ps -Irtl -y rtl rtl/sbus_pkg.sv \
    tb/tb_sbus_plc_column.sv --top-module tb_sbus_plc_column -Mdir obj
./obj/Vtb_sbus_plc_column
```

Each testbench finishes in well under a second of simulation time.
