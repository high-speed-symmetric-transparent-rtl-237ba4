# Symmetric transparent BIST for a word-organised RAM

A RAM inside a running chip has to be tested periodically without destroying
what the system stored in it. A *transparent* march test does this: instead
of writing fixed 0/1 patterns, it reads each word and writes back the word or
its complement, so the RAM ends the test with its original contents. The
catch is that nobody knows in advance what the reads should return. Classic
transparent BIST therefore runs an extra read-only pass first, just to
predict the signature, which adds a large share to the test time.

This design avoids that pass. It uses a *symmetric* transparent march test,
in which every word is fed to the response compactor as often in true form as
in complemented form, and a compactor that is an accumulator built on a
**1's complement adder**. Since `d + ~d` is the all-1 word for any `d`, and
adding the all-1 word to an all-1 accumulator leaves it all-1, a fault-free
RAM always leaves the accumulator at **all-1**, whatever the RAM held. Addition
is order-independent, so the up/down addressing of the march elements does
not matter. A fault that changes a read word almost always leaves some other
value. The pass criterion is a constant, so no signature has to be learnt.

The same adder/subtractor also makes the data the test writes back, so the
datapath is one N-bit adder, one N-bit register and some OR gates.

## The march test

The controller runs the symmetric transparent version of the C- march test.
`a` is a word's original content, `^c` is the complement, and up/down is the
address order:

| element | order | operations      | word holds before | compactor gets | write-back   |
|---------|-------|-----------------|-------------------|----------------|--------------|
| M0      | up    | (r_a)^c         | a                 | subtract a     | none         |
| M1      | up    | r_a, w_a^c      | a                 | add a          | ~a           |
| M2      | up    | r_a^c, w_a      | ~a                | add ~a         | a            |
| M3      | down  | r_a, w_a^c      | a                 | add a          | ~a           |
| M4      | down  | r_a^c, w_a      | ~a                | add ~a         | a            |
| M5      | down  | r_a             | a                 | add a          | none         |

In 1's complement arithmetic, subtracting `a` is the same as adding `~a`. Per
word, the compactor therefore sees `~a, a, ~a, a, ~a, a`: three
complementary pairs. Two points simplify the hardware:

* Every write in the test stores **the complement of the word just read**:
  w_a^c after r_a, and w_a after r_a^c. So the controller only needs one
  "write back the inverse" operation.
* The read kinds differ for the compactor only in add versus subtract.

In M2 the design reads the word as `r_a^c`, because M1 has just complemented
it. This is the only reading that gives the symmetric read sequence the test
needs.

## Datapath: the adder/subtractor with `inv`

`ones_comp_addsub` computes `a ± b` in 1's complement. It is an N-bit adder
with `b` inverted for subtraction, and the carry out of the top bit is added
back in at the bottom (the end-around carry). Operand `a` is the accumulator
and `b` is the RAM read word.

To produce write-back data, a row of OR gates driven by `inv` forces operand
`a` to all-1, and the unit subtracts. `all-1 − d` is `~d`, so the adder's
output is fed straight to the RAM's write-data input. The accumulator
register does not load in that cycle.

One detail is this design's own: **`inv` also forces the end-around carry**.
In plain 1's complement, all-1 minus all-1 gives all-1, the "negative zero",
and not 0. Without the forced carry, a RAM word of all ones would be written
back unchanged instead of inverted, and the test would corrupt it. With the
forced carry the output is exactly `~d` for every `d`. When `inv` is low the
unit is an ordinary 1's complement adder/subtractor.

The accumulator (`accumulator`) is cleared to all-0 when a test starts. It
then loads the adder output on every accumulate cycle. Note that all-1 acts
as zero in this arithmetic: adding all-1 to a non-zero value `x` gives `x`.

## Controller timing

`march_controller` is a five-state FSM: idle, read, accumulate, write and
finish. It holds an element index (0..5) and a word address. For each word:

1. **read**: `mem_rd` for the word.
2. **accumulate**: the word is on the RAM output. The accumulator adds it, or
   subtracts it in M0.
3. **write** (M1 to M4 only): `inv` and `sub` are high, and the inverted word
   is written to the same address.

A read-only element takes 2 cycles per word and a read/write element takes 3.
For 2^ADDR_W words the march therefore takes **16 cycles per word**. It is
followed by one cycle in which the signature is captured. `busy` stays high
for 16·2^ADDR_W + 1 cycles, which is 257 cycles for the default 16 words.
The controller relies on a RAM that has **one cycle of read latency** and
holds its read data until the next read. Reads and writes are not overlapped
between words.

## Register interface

The host sees the BIST through `bist_regs`. Writes take one cycle. Reads
return data one cycle after `reg_rd` is sampled, and the data holds after
that.

| address | name   | access | contents                                                    |
|---------|--------|--------|-------------------------------------------------------------|
| 0       | CTRL   | write  | bit 0 = 1 starts a test (byte 0 must be enabled); reads 0   |
| 1       | STATUS | read   | bit 0 busy, bit 1 done, bit 2 pass, bit 3 fail              |
| 2       | SIG    | read   | accumulator contents at the end of the last test            |

A start written while a test is running is ignored. `done`, `pass` and `fail`
are cleared by the next start. A test passes when SIG is all-1. If the word is
narrower than 4 bits, the status bits above the word width are dropped.

## Sharing the RAM with the system

`stbist_top` connects `bist_module` to `two_port_ram`. The RAM has a write
port A (`en`, `wa`, `wa_data`, `adda`) and a registered read port B (`rb`,
`addb`, `b_data_out`). Both ports are also brought out for the system.

While `o_bist_busy` is high, a multiplexer gives both RAM ports to the BIST,
and system reads and writes are ignored. The system must hold its accesses
off for those 257 cycles. `o_ram_b_data_out` always shows the RAM's read
register, so during a test it shows the BIST's reads.

The RAM's two clocks are tied to `i_clk` in the top. `i_rst` resets the BIST
and the RAM's read register, but never the RAM contents.

## Modules

| file                     | role                                                       |
|--------------------------|------------------------------------------------------------|
| `rtl/stbist_pkg.sv`      | march-element table, read-kind enum, register map          |
| `rtl/ones_comp_addsub.sv`| 1's complement adder/subtractor with the `inv` OR gates    |
| `rtl/accumulator.sv`     | N-bit register around the adder/subtractor                 |
| `rtl/march_controller.sv`| FSM generating addresses, strobes and accumulator controls |
| `rtl/bist_regs.sv`       | host registers                                             |
| `rtl/bist_module.sv`     | the BIST: registers, controller and accumulator            |
| `rtl/two_port_ram.sv`    | RAM under test (array, one write and one read port)        |
| `rtl/stbist_top.sv`      | BIST and RAM with the system/BIST port multiplexer         |

Parameters: `DATA_W` is the word width and the accumulator width (default
32). `ADDR_W` sets the RAM depth to 2^ADDR_W words (default 4, so 16 words).
`REG_ADDR_W` is the register address width (default 4). The defaults are
this design's own choice. Any `DATA_W` of 2 or more works; below 4 bits the status
register loses its upper bits (below 3 bits, the pass flag). With `DATA_W = 1`
the accumulator carries no information, so bit-organised RAMs are not
covered by this compactor.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`.

* `tb_ones_comp_addsub`: add, subtract and `inv`, checked against a
  modulo-(2^N−1) reference, including the all-0 and all-1 corner words.
* `tb_accumulator`: symmetric read sequences end at all-1; random add and
  subtract steps match the reference; `clr`, hold, and the inverse output are
  checked.
* `tb_march_controller`: the full cycle-by-cycle trace (strobes, address,
  element, add/subtract, `inv`) is compared with a trace built from the table
  above. The 16-cycles-per-word length is checked, and so is a start while
  busy.
* `tb_two_port_ram`, `tb_bist_regs`: compared against models.
* `tb_bist_module`: runs on a behavioural RAM (`tb/faulty_ram_model.sv`) that
  can inject a stuck-at bit. Fault-free runs must pass, give all-1 and
  restore the RAM. Faulty runs must report exactly the signature of a
  reference march run over the faulty RAM, and fail whenever that signature
  is not all-1. In the runs made, every injected fault was detected.
* `tb_stbist_top`: the whole design at its default sizes. The system fills
  the RAM and the BIST runs while the system keeps trying to write. The test
  checks that the data survives. Stuck-at read bits are then forced for some
  runs. It counts each mechanism (every march element, both address orders,
  subtracted reads, inverted write-backs, blocked system writes, passing and
  failing runs) and fails if any of them never occurs.
* `tb_example_4x3`: a 4-word, 3-bit RAM with a 3-bit accumulator, run for all
  4096 possible contents. Every run must pass with signature `111`, take
  16 cycles per word and leave the contents unchanged.

To run one with Verilator, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    --top-module tb_stbist_top rtl/stbist_pkg.sv tb/tb_stbist_top.sv
./obj_dir/Vtb_stbist_top
```

Verilator's lint reports a few unused signals and bits. These are the unused
bits of register write data and byte enables, and the element index, which
only testbenches observe.

## What is and is not taken from the source description

These parts follow the source description:

* the symmetric transparent C- test and its read sequence;
* the accumulator built on a 1's complement adder that starts from all-0 and
  ends at all-1;
* the use of subtraction for `(r_a)^c`;
* the OR gates driven by `inv` that force an all-1 operand so that the
  adder/subtractor outputs the inverted read word as write data;
* the port names of the BIST module and the two-port RAM.

These are choices made for this implementation:

* word width and depth;
* the forced end-around carry under `inv`;
* the FSM's state split and its 16-cycles-per-word timing;
* the register map, read latency and byte-enable use;
* the RAM's one-cycle registered read and its reset behaviour;
* the single clock;
* the way system and BIST share the RAM ports, including the extra
  `o_busy` output.

The reference FPGA implementation was a Spartan-3 xc3s200. Its sizes are
not known, so its reported resource counts (191 flip-flops, 274 LUTs,
123 I/Os) cannot be compared with this RTL.
