# Table-lookup ditherer for an MPEG-1 decoder

An MPEG-1 decoder produces pictures as YCbCr: an 8-bit luminance (Lum) per
pixel and one 8-bit Cb and Cr pair per 2 x 2 block of pixels. To show such a
picture on an 8-bit palette display, each pixel has to be turned into a
colour-map index, and an ordered dither hides the banding that a coarse
palette would cause. The software decoder this hardware was taken from does
that with a large pointer-based lookup structure and spends more of its time
there than anywhere else. This RTL does the same job as a small piece of
hardware. A 64 KB translation table is loaded once. After that, every pixel
takes one table read.

The design has two halves. A **datapath** has four units: the address unit
TT, the dither-array counter DACAL, the table memory MEM and the load counter
CNT. It also has input registers for Lum, Cb and Cr. A **controller** drives
the datapath. Each unit answers a request (REQ) with an acknowledge (ACK), and
the controller runs these exchanges in a fixed order.

## Why 64 KB is enough

Indexing naively by Lum, Cb, Cr and dither array would need
16 x 256 x 256 x 256 bytes (256 MB). Most of that is duplication:

* **Chroma is coarse.** In the table, an 8-bit Cb value only matters through
  the section it falls into. The same holds for Cr. The sections are:

  | section | value range |
  |---------|-------------|
  | 0 | 0 - 32 |
  | 1 | 33 - 96 |
  | 2 | 97 - 160 |
  | 3 | 161 - 255 |

  Each chroma component therefore contributes 2 address bits. Three
  comparators per component find the section (`dith_pkg::chroma_section`).
* **Luminance is kept in full**: 8 bits.
* **16 dither arrays** (DA), one per position in a 4 x 4 pixel tile: 4 bits.

The table address, `dith_pkg::tt_addr_t`, is

```
 15    12 11    10 9      8 7            0
+--------+--------+--------+--------------+
|   DA   | Cb sec | Cr sec |     Lum      |
+--------+--------+--------+--------------+
```

That is 4 x 4 x 256 = 4096 entries per dither array and 65,536 bytes in all.
The field order is a choice made here. Whatever loads the table must use the
same layout, because the hardware only turns addresses into bytes and never
looks at what the entries mean.

## The dither-array order and the two XOR gates

This is the least obvious part of the design. The pixels of a 4 x 4 tile use
the dither arrays in this pattern:

```
 0   8 |  2  10
12   4 | 14   6
-------+-------
 3  11 |  1   9
15   7 | 13   5
```

The hardware walks the tile one Cb/Cr pair at a time. It takes the four Lum
values of each 2 x 2 quadrant in the order top-left, top-right, bottom-left,
bottom-right. The quadrants are taken in the order top-left, top-right,
bottom-left, bottom-right. So DACAL must produce the sequence

```
0, 8, 12, 4,   2, 10, 14, 6,   3, 11, 15, 7,   1, 9, 13, 5
```

and then start again at 0. `dacal` does not store this sequence. It keeps a
plain 4-bit binary count `k` and rearranges the bits with two XOR gates:

```
DA = { k[1]^k[0], k[1], k[3]^k[2], k[3] }
```

The low two bits of `k` give the position inside a quadrant, and they set the
high half of DA. The high two bits of `k` give the quadrant, and they set the
low half. Reset points the counter at DA 0.

The counter knows nothing about where a pixel sits in the picture. The
software must therefore send every frame as a stream of whole 4 x 4 tiles, in
the order above. Correct output for frames wider than one tile depends on the
software keeping to that order.

## Handshakes and the controller

Every link between the controller and a datapath unit is a four-phase
exchange with bundled data:

1. The data is set up.
2. REQ rises.
3. The unit does its work, and ACK rises.
4. REQ falls, then ACK falls.

Inside each unit, a `matched_delay` makes ACK wait until the unit's result is
certainly stable. In an asynchronous circuit this would be a chain of
buffers. Here it is a counter: ACK rises `DELAY` cycles after REQ is first
seen high, and falls one cycle after REQ is seen low. Every unit stores its
result on the first cycle of REQ, so any `DELAY >= 1` is safe. An assertion in
`matched_delay` checks that REQ never falls before ACK.

The controller (`ditherer_ctrl`) is a state machine with two modes.

**Load mode.** The design enters this mode at reset: the memory is in write
mode and CNT is at 0. For every byte the software offers on `din`, the
controller goes through three steps:

1. A MEM handshake writes `din` at address CNT.
2. A CNT handshake moves CNT to the next address.
3. `din_ack` tells the software the byte has been taken.

If CNT pointed at the last address (`full`) during the write, the controller
switches the memory to read mode and raises `loaded`. It stays in read mode
until the next reset.

**Run mode.** The software sends a Cb/Cr pair, which is latched. Then it sends
four Lum values. For each one the controller goes through five steps:

1. It latches Lum and acknowledges it.
2. A TT handshake forms the address.
3. A MEM handshake reads the byte onto `dout`.
4. `out_req`/`out_ack` hands the byte to the software.
5. A DACAL handshake moves to the next dither array.

After the fourth Lum value, the controller waits for the next Cb/Cr pair.

The handshakes run one after another and never overlap. With the default
delays, and a software side that answers at once, one pixel takes about 20
clock cycles and one table byte about 13. A handshake with delay `d` costs
`d + 3` cycles.

## Interface of the top, `ditherer`

| port | dir | width | use |
|------|-----|-------|-----|
| `clk`, `reset` | in | 1 | clock; synchronous reset, active high |
| `din`, `din_req` / `din_ack` | in / out | 8 | table load channel, 65,536 transfers |
| `loaded` | out | 1 | table complete, run mode |
| `cb`, `cr`, `chroma_req` / `chroma_ack` | in / out | 8 | one Cb/Cr pair per 2 x 2 block |
| `lum`, `lum_req` / `lum_ack` | in / out | 8 | four Lum values per pair |
| `dout`, `out_req` / `out_ack` | out / in | 8 | colour-map index, one per Lum |

All four channels are four-phase. The sender keeps its data stable from just
before REQ rises until ACK rises. `dout` is valid while `out_req` is high.

Parameters: `TT_DELAY`, `DACAL_DELAY`, `CNT_DELAY` (default 1) and `MEM_DELAY`
(default 2). Each is the matched delay, in clock cycles, of one unit. The
table size follows from `dith_pkg` (16-bit address, 8-bit data).

After a reset the table has to be loaded again. The memory contents are not
cleared, but the controller returns to load mode and CNT returns to 0.

## Where this RTL is its own

The overall scheme comes from an asynchronous design: the datapath and
controller split, the units and their signal names, the chroma sections, the
dither order with its XOR implementation, and the order of the handshakes.
Some parts of that design are not fully specified, and some have been changed
here:

* **One clock.** The original datapath and controller are clockless, with
  delay lines matched by hand. Here all handshakes are sampled on one clock,
  and the delays are counters. This keeps the protocol but makes it
  synthesizable and easy to simulate. It also removes the hard part of the
  original: choosing delays that are long enough but not too long.
* **Controller as a state machine** in place of a speed-independent circuit.
* **Software channels.** `din`, `chroma`, `lum` and `out` with their REQ/ACK
  pairs are additions. The original shows only the data buses.
* **Latch strobes and the end-of-table flag.** `lat_chroma`, `lat_lum` and
  CNT's `full` are additions, needed to say when the input registers load and
  when loading ends. The Lum/Cb/Cr "latches" are edge-triggered registers.
* **Table layout.** The bit order of the address fields and the read/write
  encoding of `mem_rw` (1 = read) are choices made here.

## Files

Package and units, leaves first:

| file | contents |
|------|----------|
| `rtl/dith_pkg.sv` | widths, types, address struct, section and DA functions |
| `rtl/matched_delay.sv` | REQ to ACK delay element |
| `rtl/data_latch.sv` | input register for Lum, Cb, Cr |
| `rtl/tt.sv` | address unit TT |
| `rtl/dacal.sv` | dither-array counter DACAL |
| `rtl/addr_cnt.sv` | load-address counter CNT |
| `rtl/tt_mem.sv` | 64K x 8 table memory MEM |
| `rtl/ditherer_datapath.sv` | the datapath |
| `rtl/ditherer_ctrl.sv` | the controller |
| `rtl/ditherer.sv` | top: controller plus datapath |

Each `tb/<module>_tb.sv` is a self-checking testbench for the module of the
same name. Each one prints `TB_RESULT checks=N failures=M`. The expected
values are computed in the testbench from the section ranges and from the
dither order written out as a list, not with the package functions.

`tb/ditherer_tb.sv` is the end-to-end test, run at the default sizes. It
loads all 65,536 entries (entry `a` is `(a*11 + (a>>12)*29 + (a>>8)*3) mod
256`). Then it sends the 4 x 4 example tile with one Cb and one Cr value in
each section, followed by 60 random tiles. Every software handshake has
random delays, and the output side sometimes holds off its acknowledge.
Finally the test resets the design in the middle of a tile, loads a different
table and checks one more tile. It counts table writes, mode switches, chroma
reuse, DACAL wrap-arounds, every Cb and Cr section, every DA, output stalls
and reset-with-reload, and it fails if any of them never happened. It
simulates about 1.9 million cycles in roughly a second.

## Simulating

```
verilator --binary --timing --assert -Irtl -Itb rtl/dith_pkg.sv \
    tb/ditherer_tb.sv --top-module ditherer_tb -o sim
./obj_dir/sim
```

Replace `ditherer_tb` with any other testbench name to run that one. The
testbenches reset everything they read, so the result does not depend on
verilator's random initial values.

## Known limits

* Frames must be sent as whole 4 x 4 tiles in the order given above. No
  hardware tracks the row and column of a pixel.
* Only one handshake is in flight at a time, so there is no pipelining
  between pixels.
* The table contents come from the software decoder. Nothing in the hardware
  computes them.
