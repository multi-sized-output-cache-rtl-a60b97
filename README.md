# Multi-sized output cache controller

A small single-level cache system whose CPU port can read **1, 2, 4, 8 or 16 bytes**
in one request. The cache stores 16-byte lines, the main memory 32-bit words and
the CPU writes 8 bytes at a time. Most of the design's work is reconciling these
three widths. A controller built as a finite-state machine (FSM) assembles 16-byte
lines from four memory words, and splits each 8-byte write into two memory words.
A chain of multiplexors then cuts the requested number of bytes out of a cached
line.

Several agents, for example processor cores, share the one port. They take turns
through a `busy` flag: an agent may only request while `busy` is low.

```
            +--------------------+      tag/set/word/byte, size, re/we, line
 CPU  ----> |  cache_controller  | <--------------------------------> cache (2 KiB, 16-way)
 port <---- |   (FSM, 16-byte    |                                     ways, hit encoder,
            |   temp register)   |      word address, data, we         way select, size select
            +--------------------+ <--------------------------------> main_memory (4 KiB)
```

## Address fields

A 32-bit byte address is split as follows:

| bits    | width | field        | use                                      |
|---------|-------|--------------|------------------------------------------|
| [31:7]  | 25    | tag          | compared with each way's tag register    |
| [6:4]   | 3     | set          | one of 8 sets in every way               |
| [3:2]   | 2     | word select  | one of the four 32-bit words of a line   |
| [1:0]   | 2     | byte select  | byte within a word, for 1- and 2-byte reads |

So `0x00` and `0x08` share one line, and `0x80` falls in the same set with tag 1.
`cache_pkg::cache_addr_t` is this split as a packed struct.

## The cache (`cache`)

The cache has 16 ways × 8 sets × 16 bytes, which is 2 KiB.

* **Ways (`cache_way`).** Each way holds, per set, a valid bit, a 25-bit tag
  register and a 128-bit line. The addressed set's tag is compared with the
  request tag. The result is ANDed with the valid bit to give that way's hit.
* **Hit encoder (`hit_encoder`).** The 16 way hits are ORed into the cache `hit`.
  They are also encoded into the number of the hitting way. Tags within a set
  are unique, so at most one way hits. An assertion in `cache` checks this.
* **Data multiplexor.** The hitting way's number selects which line goes on to
  the size selector.
* **Size select (`size_select`).** This is a chain of multiplexors that halves the
  width at each step:
  16 → 8 bytes (address bit 3) → 4 bytes (bit 2) → 2 bytes (bit 1) → 1 byte (bit 0).
  `szsel` picks which stage drives the output. The output is always 128 bits,
  with the chosen bytes at the low end and zeros above. For example, 4 bytes of
  word 1 of `aaaaaaaa_aaaaaaaa_22222222_20202020` reads as `…0000_22222222`. A
  16-byte read returns the whole line, whatever the low address bits are.

  | szsel | size     |
  |-------|----------|
  | 001   | 1 byte   |
  | 010   | 2 bytes  |
  | 011   | 4 bytes  |
  | 100   | 8 bytes  |
  | 101   | 16 bytes |
  | 000, 110, 111 | no data (zero); this design's own choice |

* **Way select (`way_select`).** This is a replacement counter rather than LRU.
  A write goes to the hitting way if the line is already cached, so it is
  overwritten in place. Otherwise it goes to the way the counter names. A
  decoder turns that way number into one write enable per way.

  The design uses a single counter for the whole cache, not one per set. It
  moves to the next way after every write that allocates a line, and wraps from
  15 to 0. Because of this, writes to different sets also advance the way that
  the next allocation in a given set will use.

Reads are combinational: `hit` and `dout` follow the address inputs in the same
cycle, and `dout` is zero unless `re` is high and a way hits. Writes happen on
the clock edge. With `wfull=1` the whole line `din` is written. With `wfull=0`,
8 bytes (`din[63:0]`) go into the half of the line chosen by address bit 3. If
such a half write allocates a new line, the other half is cleared to zero. The
controller always writes whole lines, so this case only arises when the cache
is used on its own. Reset clears the valid bits and the counter. It does not
clear the tags or data.

## The main memory (`main_memory`)

The main memory holds 4096 bytes as 1024 words of 32 bits, at word-aligned byte
addresses. Address `0x0` is word 0 and `0x4` is word 1. Reads are combinational
and there is no read enable. A write happens on the clock edge while `we` is
high.

Address bits above bit 11 are ignored, so the memory repeats every 4 KiB. The
cache, however, treats `A` and `A + 4096` as different lines. Keep all addresses
below `0x1000`, or the cache can hold stale copies. The memory contents are not
reset.

## The controller (`cache_controller`)

The controller is an FSM with six main states. Two of them contain sub-states
that step through memory words. `control` shows the main state's code.

| code | state        | what happens                                                              | next |
|------|--------------|---------------------------------------------------------------------------|------|
| 0    | Fetch Data   | idle, `busy` low, temporary line register cleared; latches a request       | Write Memory on `we` (a write wins if both are high), Read Cache on `re` |
| 1    | Read Cache   | looks up the latched address; on a hit captures the sized data in `dout`   | Give Data on a hit, Read Memory on a miss |
| 2    | Give Data    | `dvalid` high for one cycle                                                | Fetch Data |
| 3    | Read Memory  | 4 sub-states read words 0-3 of the line (address +4 each) into the 16-byte temporary register | Write Cache |
| 4    | Write Cache  | writes the temporary register to the cache as a whole line                 | Read Cache after a read miss, Fetch Data after a write |
| 5    | Write Memory | 2 sub-states write the lower word of `din` to `addr[31:3]*8`, then the upper word 4 bytes above | Read Memory |

A CPU write is **write-through with write-allocate**. Both memory words are
written first. Then the whole line is read back from memory and written into the
cache, so a cached line always matches memory. The description this design
follows goes from Write Memory straight to Write Cache. Here the refill through
Read Memory is added so that a newly allocated line is complete, not half empty.

Timing is counted from the rising edge that samples the request in Fetch Data.

| request        | result                                         | cycles |
|----------------|------------------------------------------------|--------|
| read, hit      | `dvalid` and `dout`                            | 2      |
| read, miss     | `dvalid` and `dout` (4 memory reads, line write, lookup again) | 8 |
| write (8 bytes)| `busy` falls, controller back in Fetch Data    | 7      |

`busy` is high in every state except Fetch Data. `dout` and `hit` keep their
values until the next read completes. Requests made while `busy` is high are
ignored, and an assertion flags them. For a write, `addr_in[2:0]` is ignored,
because the 8 bytes always land on an 8-byte boundary.

## Sharing the port among agents

The top (`cache_system`) has one request port. Each agent must wait until `busy`
is low, raise `re` or `we` for one cycle, and then leave the port to the next
agent. The design has no arbiter. If two agents raise a request in the same
idle cycle, the collision must be resolved outside the design. The system
testbench models this with three agents that take turns under a semaphore.

## Interfaces

`cache_system` ports:

| port      | dir | width | meaning |
|-----------|-----|-------|---------|
| `clk`     | in  | 1     | clock, all state changes on the rising edge |
| `rst`     | in  | 1     | synchronous reset |
| `re`      | in  | 1     | read request, sampled only while `busy` is low |
| `we`      | in  | 1     | write request, sampled only while `busy` is low |
| `addr_in` | in  | 32    | byte address (keep below `0x1000`) |
| `din`     | in  | 64    | write data: bytes 0-7 of the 8-byte-aligned block |
| `szsel`   | in  | 3     | read size code |
| `dout`    | out | 128   | read data, zero-extended |
| `hit`     | out | 1     | the last read's lookup hit (after a miss it hits on the second lookup) |
| `busy`    | out | 1     | controller is working |
| `dvalid`  | out | 1     | one-cycle pulse when `dout` is new |
| `control` | out | 3     | main state code, see the table above |

Sizes live in `cache_pkg`: `WAYS=16`, `SETS=8`, `LINE_W=128`, `TAG_W=25`,
`WORD_W=32`, `MEM_BYTES=4096`. The leaf modules (`cache_way`, `hit_encoder`,
`way_select`, `size_select`, `cache`, `main_memory`) take these sizes as
parameters. The controller's address split is fixed to the field widths above.

## Choices this design makes

Each of the following points is either left open in the description this design
follows, or is resolved here in one particular way:

* The field positions are word select [3:2] and set [6:4], as in the address
  diagram and the worked example (`0x80` has tag 1 in set 0). A textual
  description of bits 2-4 and 5-7 does not fit a 16-byte line.
* A line is filled by reading four memory words.
* Write-through with refill, as described in the controller section above.
* There is one global replacement counter, which advances on allocation only.
* Reads of an unused size code return zero, and `dout` is zero on a miss.
* Reset clears the cache's valid bits and the counter, and the controller's
  registers. It does not clear the memory, tags or data.
* `dvalid` and the state codes in `control` belong to this design.
* There is no "clear all data" function, that is, a clear separate from reset.
  The description drops it from its design.

## Verification

Each module has a self-checking testbench in `tb/` that ends with a
`TB_RESULT checks=N failures=M` line:

| testbench            | what it checks |
|----------------------|----------------|
| `main_memory_tb`     | reference words 20202020 / 22222222 at 0x0 / 0x4, old data during a write, 4 KiB aliasing, random traffic against a word array |
| `cache_way_tb`       | half and whole writes, clearing on allocation, tag compare, valid reset, random traffic against a model |
| `hit_encoder_tb`     | every single-way hit and no hit |
| `way_select_tb`      | decoder one-hot, counter advance on allocation only, wrap, reset |
| `size_select_tb`     | every size code × every byte offset on random lines, against a byte-by-byte reference |
| `cache_tb`           | reference writes to 0x00/0x08/0x80 and the rewrite of 0x08 (way contents inspected), reference reads, random traffic with evictions against a full model |
| `cache_controller_tb`| FSM against stand-in cache and memory: memory addresses and data, line assembly, every state's `busy`/`control`, latencies 2/8/7 |
| `cache_system_tb`    | whole design at default sizes, three agents, 4000 random requests checked for data, hit flag and latency; fails unless hits, misses, writes to cached lines, allocating writes, evictions, every size, busy stalls and every agent all occur |

To run one with plain Verilator from the repository root:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/cache_pkg.sv tb/cache_system_tb.sv --top-module cache_system_tb -o sim
./obj_dir/sim +verilator+rand+reset+2
```

Replace `cache_system_tb` with the name of any other testbench. The system test
runs in well under a second.

## Files

* `rtl/cache_pkg.sv` holds the sizes, the `szsel` and state-code enums, and the
  address struct.
* `rtl/cache_system.sv` is the top.
* `rtl/cache_controller.sv` is the FSM.
* `rtl/cache.sv` is the cache.
* `rtl/cache_way.sv`, `rtl/hit_encoder.sv`, `rtl/way_select.sv` and
  `rtl/size_select.sv` are the parts of the cache.
* `rtl/main_memory.sv` is the word memory.
* `tb/*_tb.sv` are the testbenches.

All RTL is synthesizable. The memories are plain arrays. The main memory has one
clocked write port and one combinational read port, which suits distributed RAM
on an FPGA. The cache ways read one entry combinationally and reset their valid
bits, so they synthesize to registers.
