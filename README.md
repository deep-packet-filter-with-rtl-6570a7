# Deep packet filter: multi-pattern payload search in logic and ROM

A deep packet filter has to find any of a large set of attack strings
(signatures such as `.ida?` or `/etc/passwd`) anywhere in a packet payload,
at line rate. This RTL does it in fully parallel hardware. The payload arrives
as one 32-bit word per clock. Every pattern is checked at all four byte
alignments of every word, so throughput depends only on the bus width and the
clock. At 100 MHz that is 3.2 Gbit/s, whatever the number of patterns or the
packet length.

The design follows the architecture in *Deep Packet Filter with Dedicated Logic
and Read Only Memories*. It has two kinds of filter that run side by side on
the same stream:

* **RDL filter** (reconfigurable discrete logic). Each pattern gets its own
  pipelined chain of comparators. To keep this small, all chains share one
  8-to-256 decoder per byte lane. A pruned priority tree turns the flags of
  all patterns into the number of the pattern that matched.
* **ROM filter**. This works for pattern sets that follow a few rules. Logic
  matches only the first word of each pattern (its *prefix*). The prefix's
  number then addresses a ROM that holds the rest of the pattern (its
  *suffix*) and the suffix length. A comparator lines the later stream words
  up with the suffix and compares them. For large sets this needs much less
  logic per pattern than the RDL filter.

`deep_packet_filter` (the top) contains one RDL filter and five ROM filters.
The first ROM filter uses the folded, higher-utilisation ROM.

## Conventions

* **Byte order.** `in_word[0]` (bits 7:0) is the first byte in stream order and
  `in_word[3]` the last.
* **Flow.** One word is taken every clock. There is no valid signal and no
  stall. A gap in the stream has to be filled with bytes that are not part of
  any pattern, or the search restarted by reset.
* **Reset.** `rst_n` is an asynchronous, active-low reset that clears every
  pipeline and match register. ROM contents are constants.
* **Pattern parameters.** Patterns are written as SystemVerilog string
  literals in `MAXLEN`-byte slots, for example `128'("ABCDE")` with
  `MAXLEN = 16`. Each pattern has a separate length in `LEN`. The literal is
  right-aligned, so character `j` of a pattern of length `L` is slot byte
  `L-1-j`. The lengths are given explicitly so that patterns may contain
  `8'h00`.

## RDL filter

### One pattern, four alignments (`rdl_pattern_matcher`)

A pattern can begin in any of the four lanes. The matcher therefore holds four
comparator chains, one per starting lane `a`. For chain `a`, character `j` of
the pattern is expected in word `(a+j)/4` after the starting word, lane
`(a+j)%4`. Stage `s` of the chain is one AND gate over the decoder bits of the
characters that fall into word `s`.

The stages are linked by 1-bit registers. Stage `s+1` only counts if stage `s`
matched on the previous word. So a pattern of any length costs one AND gate
and one flip-flop per word it spans, per alignment. No byte of the stream is
ever stored in the chain.

Example: `ABCDE` starting in lane 2 checks `AB` in lanes 2-3 of word t, then
`CDE` in lanes 0-2 of word t+1. The register after the last stage of each
chain is ORed into a 1-bit `match` register.

Timing: `match` rises at the second clock edge after the word with the last
character is presented.

### Shared byte comparators (`byte_decoder`)

Each of the four lanes has a single 8-to-256 decoder. "Lane 2 holds `A`" is
one wire, used by every stage of every pattern that needs it. So the chains
contain no 8-bit comparators at all, only ANDs of decoder bits.

Two patterns can need the same segment at the same alignment, for example
`BAB` in both `BABAB` and `ABAB`. Their identical AND terms are plain common
logic, and synthesis merges them. The RTL does not build a separate table of
shared substrings.

### Pruned priority tree encoder (`priority_encoder`)

Several patterns can match in the same cycle, so the encoder has to pick one.
Flag `N-1` has the highest priority. The flags are padded with zeros to `2^AW`
and summed by a binary OR tree. Each address bit is an OR of products, taken
from the tree's upper branches:

* For the MSB, take the upper child of the root.
* For each lower bit, take every upper-half node at that tree level. AND each
  node with the inverted upper sibling of every ancestor it is reached
  through by a lower branch.

For 16 flags D15..D0 the node names are:

* A1/A2: the upper/lower halves.
* B1..B4: the quarters, from the top.
* C1..C8: pairs of flags.

The address bits are then:

```
bit3 = A1
bit2 = B1 + B3·~A1
bit1 = C1 + C3·~B1 + C5·~A1 + C7·~A1·~B3
bit0 = D15 + D13·~C1 + D11·~B1 + D9·~B1·~C3 + D7·~A1
     + D5·~A1·~C5 + D3·~A1·~B3 + D1·~A1·~B3·~C7
```

This is exactly "index of the highest set flag". Nodes on the lower edge of
the tree feed no address bit, and synthesis removes them. The root OR is kept
as the `any` output, because otherwise "pattern 0 matched" and "nothing
matched" look the same.

Timing: both outputs are registered, one edge after the flags. The longest
path is the product terms of the LSB, about `log2(N)` gate levels.

### Filter assembly (`rdl_filter`)

The filter is built as follows:

1. The input word is registered.
2. The four lane decoders decode it.
3. Each pattern gets an `rdl_pattern_matcher`.
4. The flags go to the priority encoder.

Latency, with E being the clock edge that samples the word holding a
pattern's last character:

| Output | Valid after edge |
|---|---|
| `flags` | E+2 |
| `alert`, `idx` | E+3 |

## ROM based filter

### Prefix, suffix and the set rules

A ROM can hand out only one suffix per clock. A set of patterns therefore has
to be chosen so that at most one (prefix, alignment) pair can ever be seen in
a cycle. Then no priority logic is needed. With a 4-byte prefix (one bus word)
the rules for a set are:

1. Every pattern is longer than 4 bytes.
2. No prefix can be seen at two alignments. Its byte 1 differs from byte 4,
   bytes 1-2 differ from bytes 3-4, and bytes 1-3 differ from bytes 2-4.
   A prefix such as `ABAB` or `%c0%` breaks this rule.
3. For every two prefixes of the set, they are different, and the tail of
   either one never equals the head of the other at any shift.

`prefix_match` checks rules 2 and 3 while the design elaborates, and
`rom_filter` checks rule 1. A set that breaks a rule stops elaboration with
an error. Splitting a rule set into valid sets is done in software, before the
hardware is built. Patterns that fit no set belong in the RDL filter. The
default configuration shows this: `ABAB`, `BABAB`, `%c0%af` and the short
`ABC` are in the RDL filter.

### Prefix match module (`prefix_match`)

Every prefix is matched at every alignment in the same way as an RDL pattern:

* lanes `a..3` of word t are checked against prefix characters `0..3-a`, and
  the result is registered;
* lanes `0..a-1` of word t+1 are checked against the remaining characters.

The per-prefix alignment bits are ORed into a 2-bit byte alignment. The
one-hot prefix hits are ORed into a binary suffix index. This encoder is not a
priority encoder, since the set rules guarantee at most one hit. A concurrent
assertion checks that guarantee in simulation.

The result (`hit`, `align`, `index`) is registered. It is valid two cycles
after the word where the prefix starts. `align` is the lane of the next word
at which the suffix begins.

### ROM entry layout (`suffix_rom`)

Entry `i` of the ROM belongs to pattern `i`:

```
bits LB-1 : 0          suffix length in bytes (LB = clog2(MAXS+1))
bits LB+8k+7 : LB+8k   suffix character k, k = 0 .. MAXS-1
unused bits            zero
```

Here `MAXS = MAXLEN-4`. The depth is the next power of two of `N`. The read is
synchronous (one edge), like an FPGA block RAM. The contents are computed from
the pattern parameters while the design elaborates. The array is generic, and
synthesis decides how to map it onto memory blocks.

### Folded ROM (`folded_rom`)

Sorted by length, a set's suffixes fill the top of a plain ROM and leave the
bottom half nearly empty. The folded ROM stores 2R logical entries in R
physical rows. Each row is one bit wider than the plain ROM:

* Even entry `2r` goes into row `r` unchanged, in the low bits.
* Odd entry `2j+1` goes into row `R-1-j` bit-reversed, so it fills the row
  from the top.

A long even entry therefore shares a row with a short odd one. Reading takes
one register and two multiplexers:

1. Address bit 0 selects even or odd.
2. The other address bits go to the memory as they are for an even entry, and
   inverted for an odd one (`~j = R-1-j`).
3. Address bit 0 is registered next to the synchronous read.
4. The registered bit selects the row or the row with its bits reversed.

The entry's unused high bits then hold its row partner, reversed. This does no
harm, because the comparator only looks at the bytes within the length. A row
whose two entries would overlap stops elaboration with an error. A set is
folded only when its entries, in order, pair up this way.

### Lining up and comparing (`suffix_comparator`, `rom_filter`)

The suffix begins in the word after the prefix's first word. It may run up to
`ceil((MAXS+3)/4)` words further.

`rom_filter` keeps the stream in a pipeline of NW words. NW is
`max(3, ceil((MAXS+3)/4))`, which is 4 for `MAXLEN = 16`. The prefix result is
delayed by `NW-3` cycles before it addresses the ROM. The suffix then comes out
of the ROM in the same cycle as the last data word it needs.

The comparator does the following:

1. It joins the NW words into a window, oldest word first.
2. It shifts the window by `align` with one level of 4-to-1 multiplexers.
3. It turns the stored length into a byte mask.
4. It XNORs the valid bytes against the suffix.

On a match, the ROM address (the pattern's number within the set) is
registered to `idx`, together with `match`.

Latency: with E being the edge that samples the word where the pattern
*starts*, `match`/`idx` are valid after edge `E+NW+1`. For the default
`MAXLEN = 16` that is E+5.

## Top level (`deep_packet_filter`)

| Output | Meaning | Valid after |
|---|---|---|
| `rdl_flags[i]` | RDL pattern i ended in the word sampled at E | E+2 |
| `rdl_alert`, `rdl_idx` | some RDL pattern / the highest-numbered one | E+3 |
| `rom_match[s]`, `rom_idx[s]` | pattern `rom_idx[s]` of ROM set s started in the word sampled at E | E+NW+1 |
| `alert` | OR of `rdl_alert` and all `rom_match`, registered | one edge after those |

The RDL results count from the word with a pattern's *last* character. The ROM
results count from the word with its *first* character.

`alert` is not re-aligned to one stream position. `rom_idx[s]` is
`clog2(ROM_NMAX)` bits wide for every set, so sets with fewer patterns leave
the upper bits zero.

Default configuration:

* **RDL filter:** `ABC`, `ABCDE`, `BABAB`, `ABAB`, `%c0%af`.
* **ROM set 0 (folded):** `/etc/passwd`, `xp_cmdshell`, `root.exe`,
  `/bin/sh`.
* **ROM sets 1-4:** `.ida?`/`GET /scripts`, `USER root`/`PASS `,
  `wget `/`chmod 777`, `<script>`/`passwd=`.

These are examples. A real deployment generates the parameters from its rule
set.

Sizes the architecture is meant for:

| | Patterns | Bytes |
|---|---|---|
| Full rule set, RDL only | 1519 | 19,021 |
| ROM set 1 | 495 | 6,805 |
| ROM set 2 | 212 | 2,776 |
| ROM set 3 | 134 | 1,828 |
| ROM set 4 | 94 | 1,056 |
| ROM set 5 | 64 | 774 |

The parameters scale to these sizes. The testbenches `tb_rdl_full_set` and
`tb_rom_full_set` run an RDL filter with 1519 patterns / 19,021 bytes and a
folded ROM filter with 495 patterns / 6,805 bytes. Their pattern contents are
synthetic but the sizes are real.

## How far it can be trusted, and where it departs

**Verified.** Each module has a self-checking testbench. Each testbench
compares against a reference search over the byte stream, written
independently in the testbench, and checks the exact latency with one word per
clock. The two full-size testbenches above run the same kind of check at the
target sizes.

Each testbench counts the mechanisms it must exercise and fails if one never
happens:

* matches at all four alignments;
* several RDL patterns matching at once, where the priority decides;
* even and odd entries of the folded ROM;
* near misses, where the prefix is right but the suffix is wrong;
* a match in each ROM set.

**Not built:**

* The header checks (protocol, IP address, port, MAC) that enable each rule,
  and the control unit. They are only named in the architecture, not
  specified, and are outside the content matcher. The same goes for the error
  multiplexer on the alert output.
* A pipelined priority encoder. Faster operation would need one, or smaller
  sets with smaller address spaces.
* A pipelined (multi-level) shifter in the suffix comparator.
* Other bus widths, such as the 8-bit and 64-bit RDL versions. `BUS_BYTES`
  is fixed at 4 in `dpf_pkg`. The 2-bit alignment and the 3-word minimum ROM
  pipeline both assume it.

**Design choices of this RTL.** The following are not part of the source
architecture:

* the handshake-free stream;
* the byte order;
* the reset;
* the registers at the outputs of `prefix_match` and `suffix_comparator`;
* the ROM entry layout;
* where the lookup delay sits (before the ROM, so the wide suffix is never
  re-registered);
* keeping the root OR of the priority tree;
* sharing of identical substring terms left to synthesis instead of a
  pre-processing generator;
* elaboration-time checks in place of the rule-set pre-processing;
* a generic ROM array in place of vendor memory primitives;
* `MAXLEN`.

The folded ROM gets one extra bit of width over the plain one. A row fits
when the used bits of entry `2r` plus those of entry `2R-1-2r` are at most
`DW`. Each of the two entries brings its own length field, so the two
suffixes of a row can hold at most `MAXS-1` bytes together.

**Tool notes.** Lint reports `SYNCASYNCNET` on `rst_n`: it is the
asynchronous reset of the flops and also the `disable iff` of the assertion in
`prefix_match`, which is intended. It reports one unused ROM bit (the extra
folded-ROM bit, which carries partner data only). Synthesis of a 1519-input
`priority_encoder` on its own is slow with yosys, because the product terms
unroll into many small gates. It simulates quickly.

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and ends itself.
Any of them runs with plain Verilator from the project root:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/dpf_pkg.sv tb/tb_deep_packet_filter.sv --top-module tb_deep_packet_filter
./obj_dir/Vtb_deep_packet_filter
```

| Testbench | What it runs |
|---|---|
| `tb_deep_packet_filter` | complete filter at its default parameters, all five ROM sets and the RDL set |
| `tb_rdl_filter`, `tb_rdl_pattern_matcher`, `tb_byte_decoder`, `tb_priority_encoder` | RDL parts |
| `tb_rom_filter` | plain and folded ROM filter on the same set |
| `tb_prefix_match`, `tb_suffix_comparator`, `tb_suffix_rom`, `tb_folded_rom` | ROM parts |
| `tb_rdl_full_set`, `tb_rom_full_set` | full-size pattern sets |

The full-size builds take a few minutes in Verilator, because thousands of
comparator chains are unrolled.

## Changing the pattern sets

Set the parameters of `deep_packet_filter`:

* `RDL_N`, `RDL_PAT`, `RDL_LEN` for the logic filter;
* `ROM_SETS`, `ROM_NMAX`, `ROM_N`, `ROM_PAT`, `ROM_LEN`, `ROM_FOLD` for the
  ROM sets. Slot `k` of set `s` is `ROM_PAT[s][k]`, and only the first
  `ROM_N[s]` slots are used.

All lengths must be at most `MAXLEN`. RDL pattern numbers double as
priorities: give the most important pattern the highest number.

A ROM set is folded only if its entries are sorted so that each even entry and
its row partner fit in one row. Otherwise elaboration stops and says so.

## Files

| Path | Contents |
|---|---|
| `rtl/dpf_pkg.sv` | bus types, `cdiv`/`addr_w`, prefix rule functions |
| `rtl/byte_decoder.sv` | shared 8-to-256 lane decoders |
| `rtl/rdl_pattern_matcher.sv` | per-pattern 4-alignment comparator chains |
| `rtl/priority_encoder.sv` | pruned priority tree address encoder |
| `rtl/rdl_filter.sv` | RDL filter |
| `rtl/prefix_match.sv` | prefix matcher with alignment and index |
| `rtl/suffix_rom.sv`, `rtl/folded_rom.sv` | plain and folded suffix ROM |
| `rtl/suffix_comparator.sv` | data pipeline, shifter, masked compare |
| `rtl/rom_filter.sv` | ROM based filter |
| `rtl/deep_packet_filter.sv` | top |
| `tb/` | the testbenches listed above |
