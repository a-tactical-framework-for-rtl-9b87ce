# A bit-sliced copying garbage collector, and the small circuits around it

The main design here is a hardware garbage collector for a Lisp/Scheme-style
heap. The heap lives in one of two equal memories, called semispaces. The
other memory is empty. On a start pulse the collector copies every object
reachable from a root word into the empty memory, packed together, and then
exchanges the roles of the two memories. Anything not copied is garbage and
is dropped. The whole collector is a small register-transfer machine:

- five registers: H, D, U, A and C;
- a control state S;
- a one-bit flag W that says which memory is live.

The machine is built the way a 1980s prototype on programmable logic would
be. One selector turns the control state and twelve status bits into one of
34 command numbers. Every other block decodes that number for itself. The
data path is cut into 24 identical address-bit slices and 8 tag-bit slices.

The same code base also holds the smaller examples that go with this style
of design:

- a single pulser, in three forms: selector-based, a two-flip-flop PAL equation set, and
  the fully reduced form;
- a toggle flip-flop;
- a parameterised ripple adder built from full-adder cells;
- a combinational example in which two outputs share one adder and one up/down unit,
  and the same example factored instead into one component per output.

These designs are unrelated. They stand side by side in the top module
`tactical_top` and share only clock and reset.

## How a collection runs

The algorithm is Cheney's breadth-first copy. Two pointers run through the
new memory (the to-space):

- **U** is the scan pointer: the next copied word whose contents still need fixing.
- **A** is the allocation pointer: the first free word.

At the start the root word is placed in H. The start command sets U = 0 and
A = 1. The first word written is the relocated root, at to-space address 0.
After that the collector repeats one step until U catches up with A:

1. `driver`: H := to[U]. If U == A, the collection is done. R rises, W flips,
   and the machine returns to `idle`.
2. `next`: if H is a pointer, read the object's first word into D from the
   old memory (the from-space).
   - If H is the header of a raw byte vector, skip U past that vector's data.
   - Otherwise skip one word.
3. `obj`: decide on D and on H's tag.
   - **D already a forwarding word.** The object was copied earlier, so write
     H's tag with the new address into to[U] and advance U.
   - **Pair.** Copy both words to A and A+1, rewrite to[U] to point at A, and
     leave a forwarding word at the old place. This uses states `pair1` and
     `pair2`.
   - **Vector of L words.** Copy the header and then the L words in a loop.
     C counts down from L-1, and the loop ends when C reaches -1. Then A
     advances by L+1. This uses states `vec` and `vloop`.
   - **Byte vector of n bytes.** Copy it the same way but do not scan the
     data. The count is ceil(n/4) words, computed by BYTETOWORD. This uses
     states `bvec` and `bloop`.
   - **Fixed (non-relocatable) segment.** Leave the pointer unchanged.

Both memories work in the same clock. The copy loops read the from-space
and write the to-space at once. Each control state takes one clock.

| Object scanned at U | Clocks |
|---|---|
| Immediate word | 2 (`driver`, `next`) |
| Pointer to an already-copied object | 3 |
| Pair | 5 |
| Vector of L words | L + 5 |
| Byte vector of n bytes | ceil(n/4) + 5 |
| Finishing | 1 clock, plus the `idle` cycle that accepts GO |

`tb_gc_ref_pkg` predicts the exact count, and the testbenches check it
cycle for cycle.

### Word format

A word is 32 bits. The low 24 bits are the ADDRESS field (`ptr`). The upper
8 bits are the tag. The 24/32 split comes from the original design. The tag
values are this design's own choice, set in `gc_pkg`:

| Tag | Value | Meaning |
|---|---|---|
| IMM | 00 | immediate data, and any unlisted tag |
| PAIR | 01 | two words at ptr, ptr+1 |
| VEC | 02 | header (VHDR, ptr = L) followed by L words |
| BVEC | 03 | header (BHDR, ptr = n bytes) followed by ceil(n/4) raw words |
| FBVEC | 04 | fixed segment; not moved |
| VHDR / BHDR | 05 / 06 | headers |
| FWD | 80 | forwarding word left in the from-space |

### W and the semispace flip

Every memory operation has two forms, one for each value of W. When W = 1,
memory 1 holds the live heap and memory 2 is the to-space. When W = 0 the
roles are swapped. So, apart from a few commands, the command numbers come
in pairs that differ only in W. The full table, v0 to v33, is in the header
of `rtl/gc_pkg.sv`. After a collection, W has flipped and the live heap sits
packed at the bottom of the other memory, starting with the relocated root at
address 0. Running GO again with that word (to-space word 0) as the root
collects back the other way.

## The control: selector and broadcast command

`gc_status` forms the twelve predicates from the registers and the state. It
looks at:

- whether H is a pointer, and of which kind;
- whether D is a forwarding word;
- whether U == A;
- whether C == -1;
- GO and W.

`gc_palsel` is a pure selector tree. Per state it tests those predicates in a
fixed order and returns the number of the chosen alternative as the 6-bit CMD.

Every other block receives CMD and decodes it with the one shared function
`gc_pkg::gc_decode`. That function returns:

- the next state;
- the load source of each register;
- the instruction of each component;
- the address and data selections of the two memories.

The original design gives each programmable part its own copy of this
decoding. Here one function keeps all the copies in agreement. The decoding
is checked against the original's factored memory-instruction, address and
data lists.

`gc_palinst` holds S, R and W. It produces the instructions for:

| Component | Instructions |
|---|---|
| MEMORY | `@` (hold), `R` (read), `W` (write) |
| ALU1 | `C` (clear), `AI` (add then increment), `I` (increment), `A` (add), `IA` (increment then add) |
| ALU2 | `C`, `I`, `A` |
| COUNT | `@`, `L` (load), `D` (decrement) |
| BYTETOWORD | `C`, `B` |

## The data path as bit slices

`gc_slice_addr` is one bit of the address field. It holds bit *k* of the
ptr fields of H and D, and of U and A. It produces bit *k* of:

- the address and write data of both memories;
- the operands of ALU1 and ALU2;
- the counter's load value;
- the BYTETOWORD input.

`gc_collector` instantiates it 24 times. The slices are identical except
for one constant: the start command loads A with 1, so only slice 0 loads a
one.

`gc_slice_tag` is one tag bit. It holds bit *k* of H and D and selects the
tag of each memory write:

- `cell(H, x)` takes H's tag;
- `cell(fwd, A)` takes the forwarding constant.

It is instantiated 8 times. The original used one part for bits 24-27 and
one for each of bits 28-31. Here a single parameterised module stands for
all of them.

The arithmetic units sit outside the slices:

- `gc_alu1` and `gc_alu2`: 24-bit adders and incrementers;
- `gc_count`: the C register with load and decrement;
- `gc_btow`: byte count to word count, ceil(n/4);
- `gc_memory`: two instances, one per semispace.

## The host port

The original design does not describe how the host loads the heap. This
design adds a simple port. While `r` is 1 (idle), `host_en` with `host_mem`
(0 = memory 1, 1 = memory 2), `host_addr`, `host_we` and `host_wdata` read
or write either memory. `host_rdata` is combinational. During a collection
the port is ignored. An assertion in `gc_collector` checks that R is low in
every state except `idle`.

## Single pulser

For each run of 1s on a synchronised input, the single pulser makes a
one-clock output pulse. It is built in three ways.

- `single_pulser`: one state bit C and two four-way selectors (`sp_select`).
  - C holds "the previous input was 1" (nak) or "was 0" (ack).
  - The output is 1 only when C is ack and the input is 1.
  - The output is combinational in the input and rises in the same clock.
  - INPUT and OUTPUT are the identity, so they are plain wires.
- `sp_pal`: the reduced two-flip-flop PAL equations, with C and O both
  registered (C ← I, O ← ¬C ∧ I). Its pulse comes one clock later.
- `sp_reduced`: the form both of the above reduce to. C is the input
  delayed by one clock, and O = I ∧ ¬C. The output is combinational, like
  `single_pulser`'s.

A transistor-level version also exists (a pass transistor with a pull-down).
It has the same logic and is not built.

## Toggle, adder and the factoring example

- `toggle`: at each clock Q becomes 0 when C is 1. Otherwise it inverts when
  T is 1 and holds when T is 0. It has no reset, since the original leaves
  the initial value open.
- `adder`:
  - An N-bit ripple adder of `bitsum` cells. Each cell makes sum = parity and
    carry = majority of its three inputs.
  - The output is {carry, sum}.
  - N is 8 by default.
- `factor_example` computes U = p ? A+B : C+1 and X = p ? D−1 : E+F:
  - one shared adder;
  - one shared up/down unit (`updn`);
  - input multiplexers on p.

  Width 8, modular arithmetic.
- `factor_alt` computes the same U and X, factored per output instead of
  per operation:
  - U comes from `fx_addinc`, which adds its operands or increments the
    first;
  - X comes from `fx_dcradd`, which decrements its first operand or adds;
  - p picks the instruction and the first operand of each.

  This form has two adders. Both forms are built so they can be compared.

## Files

| File | Contents |
|---|---|
| `rtl/gc_pkg.sv` | types, tags, state and instruction enums, command table and decoder |
| `rtl/gc_status.sv`, `gc_palsel.sv`, `gc_palinst.sv` | predicates, selector, control registers |
| `rtl/gc_slice_addr.sv`, `gc_slice_tag.sv` | bit slices |
| `rtl/gc_memory.sv`, `gc_alu1.sv`, `gc_alu2.sv`, `gc_count.sv`, `gc_btow.sv` | components |
| `rtl/gc_collector.sv` | the collector (parameter `MEM_AW`, default 24) |
| `rtl/sp_select.sv`, `single_pulser.sv`, `sp_pal.sv`, `sp_reduced.sv` | single pulser |
| `rtl/toggle.sv`, `bitsum.sv`, `adder.sv`, `updn.sv`, `factor_example.sv` | small examples |
| `rtl/fx_addinc.sv`, `fx_dcradd.sv`, `factor_alt.sv` | per-output factoring of the example |
| `rtl/tactical_top.sv` | everything side by side |
| `tb/tb_gc_ref_pkg.sv` | reference collector in software, and a random heap generator |
| `tb/tb_*.sv` | one self-checking testbench per block |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops. Each also
has a watchdog. Compile with the packages first and let `-y` find the rest:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/gc_pkg.sv tb/tb_gc_ref_pkg.sv tb/tb_tactical_top.sv \
  --top-module tb_tactical_top -y rtl -y tb -o sim
./obj_dir/sim
```

Substitute any other `tb/tb_<name>.sv` for another block.

**`tb_tactical_top`** runs the top at its default parameters, including two
memories of 2^24 words. It compiles in about 20 s and runs in under a second.
It:

- loads random heaps through the host port;
- runs collections in both directions of W;
- compares the to-space word for word against the software reference;
- checks the clock count;
- counts each mechanism and fails if one never happened. The mechanisms are
  forwarding hits, pairs, vectors, byte vectors, fixed segments, skipped
  byte-vector data and both flips;
- also drives the single pulsers with a fixed pattern, and Toggle, Adder
  and both forms of the factoring example with random values.

**`tb_gc_collector`** uses `MEM_AW=12`. It checks six collections and that
all 34 commands occurred.

The smaller testbenches compare against independent formulas, or against
the original's tables for the slices and selector. `tb_adder` is exhaustive
at 8 bits.

## What follows the original and what does not

These parts follow the original design:

- the algorithm and its state-by-state specification;
- the 34-entry command selection and its selector tree;
- the W-duplicated memory operations;
- the component instruction sets;
- the 24-bit address and 32-bit word;
- the bit-slice partitioning;
- the single pulser's three forms;
- Toggle, the BitSum adder and both factorings of the example.

These are this design's own choices:

- **Tags.** The tag encoding and the forwarding tag value.
- **Start.** The root comes from an input word, and A starts at 1, so that
  to-space word 0 holds the relocated root. A zero start for A would let the
  first copy overwrite it.
- **Arithmetic.** `addinc` and `incadd` both compute A+B+1. BYTETOWORD
  rounds up with 4 bytes per word.
- **Memory.** Each memory is a plain array with a combinational read and a
  clocked write. It spans the whole 24-bit address (`MEM_AW` can shrink it).
  The original used hand-built dynamic RAM. Its refresh and access timing
  are not modelled.
- **Host port.** As above.
- **Reset.** Reset puts the state in `idle` with R = 1 and W = 0. The
  original leaves reset open. The single pulsers' resets are also additions.
- **Selector leaf.** The selector's one don't-care leaf, an object pointer
  whose tag matches no kind, is sent to the "skip word" command.
- **Widths.** The widths of the adder and the factoring examples, and the
  one-bit instruction encodings of `fx_addinc` and `fx_dcradd`.

The original build collected about 5 Mbyte/s, at a clock frequency that is
not given. In this design one step is one clock, with the costs shown in the
table above. On the random mixed heaps of `tb_tactical_top`, it copies about
1.1 to 1.3 bytes per clock. At that rate a clock of roughly 4 to 4.5 MHz
would match 5 Mbyte/s.
