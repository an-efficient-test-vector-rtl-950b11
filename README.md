# Selective Huffman decompressor for scan test data

Testing a system-on-chip means shifting large sets of scan vectors from a
tester into the chip. Tester memory and channel bandwidth are limited, so the
vectors are stored compressed and expanded on the chip by a small decoder
placed at the serial input of each scan chain. This RTL implements such a
decoder for a *selective Huffman* code. The code is chosen so that:

* the decoder stays tiny: only the `n` most frequent `b`-bit blocks are
  Huffman-coded, and every other block is sent as it is;
* the decoder always keeps up with the tester, so test time falls by as much
  as the data volume does.

The scheme and its main example come from the published work on selective
Huffman coding of test vectors. The RTL, its interfaces and the details noted
below under "Design choices" are this implementation's own.

## The code

The scan data is cut into fixed blocks of `b` bits. Each block becomes one
codeword, and the first bit of a codeword is a flag:

| flag | rest of the codeword | length |
|------|----------------------|--------|
| `1`  | Huffman code of one of the `n` most frequent blocks | 1 + code length |
| `0`  | the `b` bits of the block, unchanged | `b + 1` |

The Huffman tree is built over the `n` coded blocks only. A full Huffman
decoder for `b`-bit blocks needs `2^b - 1` states. This one needs about
`n + b`: the inner nodes of the small tree, plus a counter for the raw bits.

The default code, used throughout as the reference, has `b = 4` and `n = 3`:

| block | frequency in the 60-block reference set | codeword |
|-------|------------------------------------------|----------|
| `0010` | 22 | `1 0` |
| `0100` | 13 | `1 10` |
| `0110` | 7  | `1 11` |
| any other `xxxx` | 18 in total | `0 xxxx` |

Coded this way, the 240-bit reference set takes 22·2 + 13·3 + 7·3 + 18·5 =
194 bits. That is 19% less data, and the same saving in tester time.

Bit order: the leftmost (most significant) bit of a block is sent first and
is also the first to enter the scan chain. This holds for coded and uncoded
blocks alike.

### The rate rule

The decoder takes one compressed bit per tester clock. The serializer shifts
one bit into the scan chain per scan clock. A decoded block of `b` bits needs
`b` scan clocks to leave. The next block may arrive no sooner than its
codeword's length in tester clocks. So the shortest codeword `L_min` must
satisfy

    L_min >= b * f_T / f_sys      i.e.   f_sys / f_T >= b / L_min

Examples:

* The default code has `L_min = 2` and `b = 4`, so it needs `f_sys = 2·f_T`.
* A `b = 12` code whose best block has a 1-bit Huffman code (`L_min = 2`)
  needs `f_sys = 6·f_T`.

When the rule holds, the tester never waits. When it is broken, a block
arrives while the previous one is still being shifted out. The serializer then
raises its sticky `overrun` flag, and the scan data is wrong from that point
on. Choose the code, or the clock ratio, so that this never happens.

## How a chain is decoded

```
 tester bit ──► shd_channel_dist ──► sh_fsm_decoder ──par/ser──► shd_serializer ──► scan_in, scan_en
 (t_valid,t_bit)   (round robin)      (or sh_ram_decoder)          (b-bit buffer)       of the chain
```

### Decoder (`sh_fsm_decoder`)

The decoder has three phases:

* **FLAG** reads the flag bit.
* **CODED** walks the Huffman tree. It keeps the code bits received so far in
  a shift register, together with their count, and compares them with every
  entry of the code table. When an entry of that length matches, the decoder
  has reached a leaf. It pulses `par_load` with the entry's block on
  `par_data`, and returns to FLAG.
* **RAW** passes each of the next `b` bits straight on with `ser_load`
  and `ser_bit`. It then returns to FLAG.

The code is a set of parameters, so a synthesis tool turns each code into its
own fixed decoder. All outputs are registered: a load appears one clock after
the bit that completed it. If the tables do not form a complete tree, a bit
sequence can match no codeword. That sets the sticky `code_error` flag.

### Serializer (`shd_serializer`)

The serializer is a `b`-bit register that empties from its head, one bit per
clock, for as long as it holds bits. `scan_en` is high in exactly those
clocks. It is the enable of the scan clock, so the chain shifts only when a
real bit is present. This is how the decoder "gates" the fast clock.

* **Parallel load:** fills all `b` places. It is accepted in the clock in
  which the last waiting bit leaves, so back-to-back blocks flow without a gap.
* **Serial load:** writes its bit into the first free place behind the bits
  still waiting. An uncoded bit can therefore arrive while a decoded block is
  still draining, and it follows that block into the chain. One bit leaves per
  clock and at most one arrives, so there is always room. This is why the rate
  rule above is the only rule: uncoded codewords (`b + 1` bits) never add a
  constraint of their own.

From the clock that completes a codeword to the first scan shift of its block
takes two clocks: one for the decoder's output register and one for the load.

## Clocking set-ups

Everything runs on one clock, `clk`, which is the scan clock. A tester bit is
marked by `t_valid`. Two set-ups are supported:

1. **Fast scan clock** (`NUM_CHAINS = 1`, the default). `clk` runs at
   `f_sys`, and the tester presents a bit every `f_sys/f_T` clocks.
2. **One channel, several chains** (`NUM_CHAINS = n`). The scan clock equals
   the tester clock and `t_valid` is high every clock. `shd_channel_dist`
   hands bit `k` to the decoder of chain `k mod n`, starting with chain 0
   after reset. Each decoder therefore sees `f_T / n` while its chain shifts at
   `f_T`, and the rate rule reads `n >= b / L_min`. The tester interleaves the
   compressed streams of the `n` chains bit by bit.

A real tester clock that is separate from the scan clock would need a
synchronizer that produces `t_valid`. That synchronizer is not part of this
RTL.

## Table-lookup variant (`sh_ram_decoder`, `USE_RAM = 1`)

If the code has only two codeword lengths, the tree is not needed:

* `0` + `b` raw bits: the block is passed on as in the RAW phase above.
* `1` + `a` index bits: the index selects one of the `2^a` words of a RAM,
  and that word is the decoded block.

With `b = 8` and `a = 4`, the 16 most frequent of the 256 possible blocks get
5-bit codewords and the other 240 get 9-bit codewords. The RAM is written
through `tbl_we`, `tbl_waddr` and `tbl_wdata`, so one decoder can serve
several cores by reloading the table between their tests. The table is read
synchronously when the last index bit arrives. Words that have not been
written are not initialised.

## Modules

| module | role |
|--------|------|
| `shd_pkg` | default code (the `b = 4`, `n = 3` example), decoder state type |
| `sh_fsm_decoder` | tree-walking decoder for a selective Huffman code |
| `sh_ram_decoder` | decoder for the two-length code with a lookup RAM |
| `shd_serializer` | `b`-bit buffer feeding the scan chain, `overrun` flag |
| `shd_chain` | decoder plus serializer for one chain; `USE_RAM` picks the decoder |
| `shd_channel_dist` | round-robin sharing of one tester channel |
| `shd_top` | distributor plus `NUM_CHAINS` chain decompressors |

The ports of `shd_top`:

* **Inputs:** `clk`, `rst_n` (asynchronous, active low), `t_valid`, `t_bit`,
  and the table write port `tbl_we[NUM_CHAINS]`, `tbl_waddr[A]`,
  `tbl_wdata[B]`. The table write port is unused when `USE_RAM = 0`.
* **Outputs, one bit per chain:** `scan_en`, `scan_in`, `cw_done` (a
  codeword was completed), `code_error` and `overrun`.

The core, its scan chains and the compactor of its responses (for example a
MISR) are outside this design.

### Giving it a code

These parameters are shared by `shd_top`, `shd_chain` and `sh_fsm_decoder`:

* `B`: the block size.
* `N`: the number of coded blocks, at least 2.
* `MAX_CL`: the longest Huffman code, not counting the flag.
* `CODE_BITS[N][MAX_CL]`: each Huffman code, right-aligned, with the first
  bit received as its most significant bit.
* `CODE_LEN[N][8]`: the length of each code.
* `PATTERN[N][B]`: the block that each code stands for.

Entry `i` of the three tables belongs to the same block. For a canonical
Huffman code, list the codes by increasing length. The first code is 0, and
each next code is the previous one plus one, shifted left by the growth in
length. `tb/tb_shd_b12.sv` builds a `b = 12`, `n = 16` code this way, in a
constant function.

The code itself comes from the core's test set. Divide the test set into
`b`-bit blocks, fill the don't-care bits so that a few blocks become very
frequent, and build a Huffman tree over the `n` most frequent blocks. Pad each
vector at its start (the first bits shifted) to a multiple of `b`. This is
done offline and is not part of the RTL.

## Design choices

* **One clock domain.** Decoder and serializer share the scan clock, and the
  tester rate is expressed by `t_valid`, not by a second clock.
* **Clock enable.** The scan clock is gated by an enable (`scan_en`) rather
  than by gating the clock itself.
* **Tree walk as a comparison.** The walk is a prefix register compared with a
  table, not a hand-drawn state graph. The two behave the same.
* **Serial bits queue behind a block.** They are not held back until the
  buffer is empty.
* **Error flags.** `overrun` and `code_error` have been added.
* **Shared code tables.** All chains of `shd_top` use the same code tables.
  With the RAM decoder, each chain has its own RAM.

## Simulating

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog.

| testbench | what it shows |
|-----------|---------------|
| `tb_sh_fsm_decoder` | every load and bit for the reference set and 400 random blocks, with idle gaps; load latency |
| `tb_shd_serializer` | random parallel and serial loads, including serial bits queued behind a block; `overrun` on an early block |
| `tb_sh_ram_decoder` | `b = 8`, `a = 4` decode, and a table rewrite |
| `tb_shd_channel_dist` | rotation for 2 and 3 chains |
| `tb_shd_chain` | one chain at `f_sys = 2·f_T`, no tester stall; `overrun` at `f_sys = f_T` |
| `tb_shd_full` | the top at its defaults on the 60-block reference set: 194 tester bits for 240 scan bits, 42 parallel loads, 72 serial loads, gap-free loads, `overrun` when the clock ratio is too low |
| `tb_shd_top` | the three set-ups end to end (default, two chains on one channel, RAM decoder); counts every mechanism |
| `tb_shd_b12` | `b = 12`, `n = 16` at `f_sys/f_T = 6` (passes) and `5` (`overrun`) |

`tb/shd_tb_pkg.sv` holds the reference set and a reference encoder that is
written independently of the RTL. To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/shd_pkg.sv tb/shd_tb_pkg.sv rtl/*.sv tb/tb_shd_full.sv \
    --top-module tb_shd_full -o sim
./obj_dir/sim
```

## Limits

* **Only the default code is verified end to end.** The example `b = 4`,
  `n = 3` code is the only complete code given with the scheme. For real
  cores, the code tables must be derived from each core's test set. The
  published results are for ISCAS'89 benchmarks at `b = 8` to `12` with
  `n = 5` to `21`, and the RTL takes those sizes through its parameters.
  However, only a synthetic `b = 12`, `n = 16` code has been simulated.
* **No tool for checking a code.** No check is made that a code given in the
  parameters is prefix-free and complete. A code that is not complete can set
  `code_error`. A code that is not prefix-free decodes its shorter codeword
  first.
