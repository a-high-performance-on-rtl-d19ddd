# Static-segment on-chip SRAM and approximate full adders

Image data tolerates small numeric errors: a pixel that is off by a few
levels out of 255 is hard to see. This design uses that in two places.

* **The SSOC SP SRAM** (Static Segment On-Chip, Single-Port SRAM) stores
  only the `m` most significant bits of every `n`-bit word. Its storage array
  is `m/n` the size of a conventional memory. On a read it rebuilds an
  `n`-bit word that is at most half a step of the lowest stored bit away
  from the value written. The default is 1K words of 8-bit pixels with a
  4-bit segment. That halves the array, and no pixel is off by more than 8
  levels.
* **Four approximate full-adder cells**, AFAL1 to AFAL4 (Approximate Full
  Adder Logic). Each is a one-bit adder that is wrong for one or two of its
  eight input patterns. In exchange it has fewer gates or a shorter carry
  path than an exact full adder.

The two parts are independent. The top module `ssoc_afal_top` places one
memory and one cell of each adder side by side, with separate ports.

## The static-segment memory

### Storing a segment

A word `p` of `n = DATA_W` bits is cut at the write port. Only the bits
`p[n-1 : n-m]` (`m = SEG_W`) reach the array. Nothing else of the word is
kept.

On a read, the output register puts the stored segment back at the top of
an `n`-bit word. It then sets the bit directly below the segment to 1 and
every lower bit to 0:

```
written   p   = s s s s x x x x        (n = 8, m = 4, s = stored, x = dropped)
read back     = s s s s 1 0 0 0
```

The 1 places the result in the middle of the `2^(n-m)` values that share
the segment. This has two consequences:

* The error `|read - written|` is never more than `2^(n-m-1)`. It is 8 for
  the default 8/4 memory.
* For uniformly spread low bits the mean error is about `2^(n-m-2)`.

Padding with zeros would double the worst case. With `m = n` nothing is
dropped and the block is an ordinary SRAM.

Measured over a generated 32 x 32 test image (`tb_ssoc_workloads`):

| word n | segment m | stored bits / word | max error | mean error |
|-------:|----------:|-------------------:|----------:|-----------:|
| 16 | 16 | 16 | 0  | 0      |
| 16 | 14 | 14 | 2  | 1.03   |
| 16 | 12 | 12 | 8  | 4.05   |
| 16 | 10 | 10 | 32 | 15.98  |
| 8  | 8  | 8  | 0  | 0      |
| 8  | 7  | 7  | 1  | 0.52   |
| 8  | 6  | 6  | 2  | 0.97   |
| 8  | 5  | 5  | 4  | 1.96   |
| 8  | 4  | 4  | 8  | 3.98   |

The published evaluation of this memory, on a 90 nm standard-cell flow,
reports these savings:

* 4-bit against 8-bit: about 49 % less area, 50 % less power and 17 %
  shorter access time.
* 10-bit against 16-bit: 37 % less area.

These figures belong to that flow. They are not reproduced by this RTL.

### Blocks and timing

```
 ADDRESS --> ssoc_addr_decoder (address latch + k-to-2^k decode) --wl--+
 EN, WE/RE -> ssoc_control (registered write / read strobes) --arr_we-+--> ssoc_seg_array
 DATA_IN --> ssoc_in_reg (keeps the m MSBs) ------------------wdata---+    (2^k x m)
                                                   out_ld                     | rdata
                                                     +--> ssoc_out_reg <------+
                                                          (m -> n rebuild) --> DATA_OUT
```

| port  | width  | meaning |
|-------|--------|---------|
| `clk` | 1 | clock, rising edge |
| `rst_n` | 1 | asynchronous active-low reset of the strobes and the output register |
| `en`  | 1 | EN: an edge with `en` high issues an access |
| `we`  | 1 | WE/RE: 1 = write, 0 = read |
| `addr`| `ADDR_W` | word address |
| `din` | `DATA_W` | write data |
| `dout`| `DATA_W` | read data, held until the next read completes |

The memory accepts one access per clock, and each access takes two edges:

1. **Issue edge** (`en` high). The decoder latches the address, the input
   register latches the segment of `din` if this is a write, and the control
   logic registers which operation it is.
2. **Next edge.** A write stores the segment in the selected word, or a read
   loads the rebuilt word into the output register.

So read data appears on `dout` two rising edges after the read was issued.
A read issued on the edge right after a write to the same address returns
the new data. On an edge with `en` low nothing is issued, so the array and
`dout` do not change on the edge that follows.

The array contents are not initialised: a word reads back what was last
written to it. Addresses come from outside the memory. Image data is
normally written in raster order, pixel `(x, y)` of a `W`-wide image at
address `y*W + x`, and the testbenches do the same.

### Parameters

| parameter | default | meaning |
|-----------|--------:|---------|
| `ADDR_W` | 10 | address bits; 2^10 = 1K words |
| `DATA_W` | 8  | `n`, width of `din` / `dout` |
| `SEG_W`  | 4  | `m`, stored bits per word, 1..`DATA_W` |

The evaluated configurations are all 1K words:

* `DATA_W = 16` with `SEG_W` = 16, 14, 12 or 10;
* `DATA_W = 8` with `SEG_W` = 8, 7, 6, 5 or 4.

The defaults are the 8/4 memory, which gives the largest saving and is
offered as the result for image processing.

### Where the memory follows the reference design and where it does not

These points follow the reference design:

* the block structure (decoder, control logic, input register, array,
  output register);
* taking the segment from the MSB end;
* the 1-then-zeros padding;
* EN gating every access;
* the sizes.

These are choices made here, because the reference design does not give
them:

* the two-edge access timing and the latching of the address;
* the polarity of WE/RE;
* the reset;
* the one-hot word-line interface of the array, with its AND-OR read path.

One consequence of the two-edge timing differs from the rule that nothing
changes while EN is low. An access issued on the last edge with EN high is
still completed on the following edge, even if EN has dropped by then.
From that edge on, the memory and `dout` stay unchanged for as long as EN
stays low.

The array is written as a register array, not as an SRAM macro for a
particular process. Area, power and delay therefore depend entirely on
how it is mapped.

## The approximate full adders

All four cells have inputs `a`, `b` and `c` (`c` is the carry in) and
outputs `sum` and `carry`. All are purely combinational. The error is
`(2*carry + sum) - (a + b + c)`.

| cell | carry | sum | wrong inputs {a,b,c} (error) |
|------|-------|-----|------------------------------|
| AFAL1 | majority(a,b,c) (exact) | NOT carry | 000 (+1), 111 (-1) |
| AFAL2 | a & b | carry ? c : (a\|b\|c) | 011 (-1), 101 (-1) |
| AFAL3 | a | a ? (b&c) : (b\|c) | 011 (-1), 100 (+1) |
| AFAL4 | a & (b\|c) | carry ? (b&c) : (a\|b\|c) | 011 (-1) |

Each cell trades accuracy for hardware in its own way:

* **AFAL1** keeps an exact carry and replaces the two XORs of the sum with
  one inverter.
* **AFAL2 and AFAL4** make the sum with a 2:1 multiplexer steered by the
  approximate carry. When the carry is 1, the multiplexer chooses the input
  that makes the two-bit result right for most patterns.
* **AFAL3** wires `a` straight through as the carry, which gives the
  shortest possible carry chain. Its multiplexer picks the sum that partly
  makes up for the wrong carry.
* **AFAL4** is built from two copies of `and_or_gate` (an OR and an AND on
  the same two inputs). It is the most accurate cell, with one error in
  eight cases.

Not included:

* a multi-bit error-tolerant adder made from these cells (a 16-bit adder
  built from AFAL1 is mentioned, but its structure is not given);
* a reconfigurable variable-accuracy adder (only proposed as future work).

## Files

| file | contents |
|------|----------|
| `rtl/ssoc_pkg.sv` | operation type shared by the memory blocks |
| `rtl/ssoc_sp_sram.sv` | the memory |
| `rtl/ssoc_control.sv`, `rtl/ssoc_addr_decoder.sv`, `rtl/ssoc_in_reg.sv`, `rtl/ssoc_seg_array.sv`, `rtl/ssoc_out_reg.sv` | its blocks |
| `rtl/afal1.sv` ... `rtl/afal4.sv`, `rtl/and_or_gate.sv` | adder cells |
| `rtl/ssoc_afal_top.sv` | top: memory and adders side by side |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_ssoc_workloads.sv` | the nine evaluated memory configurations on one image |

## Simulation

Every testbench checks itself and ends by printing
`TB_RESULT checks=N failures=F`. For example, with Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/ssoc_pkg.sv \
          --top-module tb_ssoc_afal_top tb/tb_ssoc_afal_top.sv -y rtl -y tb
./obj_dir/Vtb_ssoc_afal_top
```

Put `rtl/ssoc_pkg.sv` first on the command line. `-y rtl` lets Verilator
find the other modules by name.

What the testbenches cover:

* **`tb_ssoc_afal_top`** runs the top at its default parameters.
  * It writes a 1024-pixel image in raster order and reads all of it back.
  * It mixes in idle cycles and reads that follow a write to the same
    address, and it checks the two-edge read latency.
  * It runs all eight input patterns through every adder cell.
  * It counts that each of these mechanisms occurs: writes, reads, idle
    hold, read-after-write, rounding error, and each adder's error cases.
* **`tb_ssoc_sp_sram`** compares the memory cycle by cycle with a model.
  It also runs an exact (`SEG_W = DATA_W`) instance on the same traffic.
* **The unit testbenches** check each block against values worked out
  independently. The adder cells are checked exhaustively against their
  truth tables.

All testbenches finish in well under a second.
