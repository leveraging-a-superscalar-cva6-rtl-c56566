# Butterfly instructions in a dual-issue RISC-V back end

The lattice signature scheme ML-DSA spends most of its time in number-theoretic transforms
(NTT) over 256-coefficient polynomials modulo q = 8 380 417. Each NTT layer is made of
butterflies, and each butterfly is a modular multiplication plus an addition and a
subtraction. On a plain RISC-V core a butterfly takes a dozen instructions. This design adds
three instructions to the issue, execute and commit stages of a dual-issue, in-order core of
the CVA6 family:

| instruction | computes | used by |
|---|---|---|
| `btf.ct rd, rs1, rs2` | a' = a + mont(z·b), b' = a − mont(z·b) | forward NTT (Cooley-Tukey) |
| `btf.gs rd, rs1, rs2` | a' = a + b, b' = mont((a − b)·z) | inverse NTT (Gentleman-Sande) |
| `btf.mm rd, rs1, rs2` | rd = mont(rs1·rs2) | pointwise product, final scaling |

In this table a = `rd`, b = `rs1` and z = `rs2`, and mont(x) = x·2⁻³² mod q is the signed
Montgomery reduction of the ML-DSA reference code.

A butterfly reads three registers and writes two, which a normal instruction cannot do. The
dual-issue core can read four operands and write two results per cycle, because it can issue
two instructions at once. The butterfly uses those spare ports. It still leaves one read port
and one scoreboard slot for a load in the same cycle. An NTT then runs at about one butterfly
per cycle, with the twiddle-factor loads hidden beside the butterflies.

## Instruction encoding

All three instructions use the custom opcode `1110111` and funct7 = 0. The fields are in the
usual R-type places.

| funct3 | instruction | reads | writes |
|---|---|---|---|
| `100` | `btf.ct` | rd (a), rs1 (b), rs2 (z) | rd ← a', rs1 ← b' |
| `101` | `btf.gs` | rd (a), rs1 (b), rs2 (z) | rd ← a', rs1 ← b' |
| `011` | `btf.mm` | rs1, rs2 | rd |

`btf.ct` and `btf.gs` are an "R-btf" form. `rd` is also a source, and `rs1` is also a
destination. Neither ever writes x0.

Besides the three new instructions, the decoder (`btf_decoder`) accepts `lw`, `sw`, `addi`,
`add`, `sub` and `xor`. This is enough to write the kernels. Any other encoding is illegal; it
issues as a no-op that takes one scoreboard entry and writes nothing.

## Pipeline overview

```
instr_i[0..1] → 2× btf_decoder → issue_stage ─┬→ alu   (slot 0) ─┐ bus B (mux 3)
                    ▲   ▲                     ├→ alu2  (slot 1) ─┤ bus A (mux 4)
           regfile ─┘   └─ scoreboard          ├→ btf_unit ───────┘ (drives both buses)
           (4R/3W)         (lookup, free)      └→ lsu ── scratchpad ── bus L
                                ▲   │
                 buses A, B, L ─┘   └→ commit_stage → regfile writes / store to scratchpad
```

`btf_backend` is the top level. It receives two instructions per cycle on `instr_i`; entry 0 is
the older. `issue_cnt_o` reports how many of them were taken, and the instruction source shifts
its stream by that amount. The back end has no fetch, no branches and no exceptions, so nothing
is ever flushed.

A host port (`host_*`) reads and writes the data scratchpad, with read data one cycle after the
request. `idle_o` is high when the scoreboard is empty.

## Issue: pairing rules and read-port routing

`issue_stage` looks at two decoded instructions each cycle.

**Slot 0** issues when three conditions hold:
- its sources are available: either no older instruction writes them, or the result is already
  in the scoreboard;
- its unit is free;
- the scoreboard has enough free entries.

**Slot 1** issues only together with slot 0, and must also meet these rules:

- A `btf.ct`/`btf.gs` in slot 0 may pair only with a `lw` in slot 1.
- A `btf.ct`/`btf.gs` in slot 1 never issues; it moves to slot 0 next cycle.
- `btf.mm` is an ordinary three-register instruction. It pairs like an ALU instruction, but never
  with another butterfly instruction, because there is one butterfly unit.
- There is at most one memory instruction per cycle.
- Slot 1 may not read a register that slot 0 writes. There is no same-cycle forwarding.

The register file has four read ports. Ports 0 and 1 serve slot 0's `rs1` and `rs2`, and port 2
serves slot 1's `rs1`. Port 3 normally serves slot 1's `rs2`. When slot 0 holds a
`btf.ct`/`btf.gs`, port 3 instead reads operand a (the instruction's `rd`). This is possible
because the paired `lw` needs only its base register, on port 2. Each operand is taken from the
youngest older scoreboard entry that writes the register, or from the register file if there is
none.

Scoreboard entries are allocated as follows:
- a `btf.ct`/`btf.gs` takes two entries: one for a' (written to `rd`) and one for b' (written to
  `rs1`);
- every other instruction takes one entry;
- a butterfly paired with a load therefore takes three entries in one cycle.

Hazards that the underlying instruction set leaves open are handled as follows:
- **Write after write.** Results commit in order, so later writes simply win.
- **Bus sharing.** The ALUs wait while the butterfly's second stage drives their buses
  (`alu_block_i`).
- **gs behind ct.** A `btf.gs` waits while a `btf.ct` is in the second stage (`btf_gs_block_i`),
  because both would drive bus A in the same cycle.

## The butterfly unit (`btf_unit`)

This is the part that needs the most care. The unit is two stages deep and has no result ports
of its own. It drives the ALU result buses, with a multiplexer in front of each bus.

```
 stage 1 (issue cycle)                         │ stage 2 (next cycle)
 a ─┬──────────────────────────────────────────┼─ a (kept for ct) ─┬──(+)── bus A: ct a'
    └─(−)─ a−b ─┐                              │                   └──(−)── bus B: ct b'
 b ─────────────┴ mux1 ── × z (64-bit) ── REG ─┼─ mont reduce ─────────── bus B: gs b', mm
 a,b ──(+)── bus A: gs a' (same cycle)         │
```

**Multiplier.**
- Mux 1 selects the multiplier input: b for `ct` and `mm`, a − b for `gs`.
- The product with z is the full signed 64-bit value.
- A register sits between the multiplier and the Montgomery reduction. It keeps the multiply and
  the reduction out of one clock cycle.

**Reduction.** `montgomery_reduce` is combinational, and q is built as a sparse constant:
q = 2²³ − 2¹³ + 1, so t·q = (t≪23) − (t≪13) + t with no multiplier. It computes
t = (x·q⁻¹ mod 2³²), taken as signed, and returns (x − t·q) / 2³². The result lies in (−q, q).

**One shared adder.**
- In stage 2 of a `ct`, it adds a and mont(z·b).
- In the issue cycle of a `gs`, it adds a and b.

**Timing.**

| instruction | bus A | bus B |
|---|---|---|
| `btf.ct` | a' one cycle after issue | b' one cycle after issue |
| `btf.gs` | a' in the issue cycle | b' one cycle after issue |
| `btf.mm` | – | result one cycle after issue |

Because the gs additive result is ready early, a following instruction that needs it can issue
sooner.

**Value range.** Additions are plain 32-bit two's-complement, as in the reference software.
Results are therefore correct modulo q, with the Montgomery factor 2⁻³² on every product, but
they are not fully reduced. The software keeps coefficients in a range where eight layers
cannot overflow, as the ML-DSA reference NTT does.

## Scoreboard and triple commit

`scoreboard` is a circular reorder buffer with 8 entries (`NR_SB_ENTRIES`). Each cycle it
accepts:
- up to three allocations (butterfly plus load);
- up to three results: bus A, bus B and the LSU bus;
- up to three retirements.

**Full rule.** An entry that commits in the current cycle counts as free for allocation in that
same cycle. Without this rule, every entry would sit empty for one cycle between uses. A
butterfly–load pair needs three entries every cycle, so that lost cycle would be costly.

**Result timing.** A result may arrive in the same cycle as its allocation. This happens with the
combinational ALU and with the early gs sum, and the result is kept.

**Retirement.** `commit_stage` retires the longest run of finished entries among the three oldest
(triple commit). The limit is one store per cycle, because the scratchpad has one core port.

## Loads and stores

`lsu` computes base + offset.
- A load reads the scratchpad at issue and returns the word the next cycle.
- A store only returns its address and data to the scoreboard. Memory is written when the store
  commits.

A load therefore waits while an uncommitted store has no address yet or writes the same word. It
also waits in a cycle when a committing store is using the memory port. Only aligned word
accesses are allowed; an assertion checks this.

## Performance

Measured with the end-to-end testbench at the default sizes: 8 scoreboard entries and a
2048-word scratchpad.

| kernel (256 coefficients) | instructions | cycles | published figure for the original design |
|---|---|---|---|
| forward NTT, `btf.ct` | 2528 | 1952 | 1913 |
| pointwise product, `btf.mm` | 1024 | 896 | 807 |
| inverse NTT, `btf.gs`, with scaling by `btf.mm` | 2785 | 2209 | 1892 |

**Test schedule.** The testbench uses a radix-16 ("4+4") schedule:
- each block of sixteen coefficients lives in x1..x16 while four butterfly layers run in
  registers;
- pass 0 of the forward NTT uses the strided sets {b + 16i}, and pass 1 uses the runs of 16;
- a block needs 15 distinct twiddle factors, each loaded once into one of x17..x24 (rotating);
- coefficient and twiddle loads are emitted in the order the butterflies need them, one load
  after each butterfly, so that the two issue in the same cycle;
- the block is stored back; in the last inverse pass each scaling `btf.mm` issues beside the
  store of an earlier coefficient.

**Where the cycles go.** Per block there are 32 butterflies and 31 loads, which issue in about
33 cycles, plus 16 stores that nothing can overlap. A store is a memory instruction, so it can
only share a cycle with an ALU or `btf.mm` instruction. The rest is load-use waits at the start
of a block and loads held back behind uncommitted stores to the same words at the pass
boundary. The schedule, not the hardware, decides most of the gap to the published numbers.

**No full-scoreboard stalls.** The original design reports its forward NTT as slower than the
inverse, because two-cycle `btf.ct` instructions filled its scoreboard. That does not happen
here. Every unit finishes within two cycles, three entries retire per cycle, and an entry that
commits can be reallocated in the same cycle, so the test never finds the 8-entry scoreboard
full. The inverse is slower here only because of its extra scaling instructions.

## Departures from the original design

- **Only the back end.** Only the issue, execute and commit stages are built, for the
  instruction subset listed above. Fetch, branch prediction, CSRs, exceptions, the rest of the
  integer instruction set, the multiplier's normal pipelined path and the OBI bus are absent.
  A simple two-port scratchpad takes the place of the data memory.
- **Scoreboard size.** The original does not state it; 8 entries are used here. The entry tag is
  `SB_ID_W` = 3 bits in `btf_pkg`, so a larger scoreboard also needs a wider tag.
- **Own choices.** These are this design's rules:
  - the bus-conflict rules (ALUs and gs held back by the butterfly's second stage);
  - the load/store ordering rule;
  - one store commit per cycle;
  - issuing illegal instructions as no-ops;
  - the detail of which adder is shared.
- **No reduction inside the instructions.** Additions wrap at 32 bits rather than reducing
  mod q. Software must bound coefficient growth, as ML-DSA software already does.

## Files

| file | contents |
|---|---|
| `rtl/btf_pkg.sv` | constants (q, q⁻¹, opcodes), instruction, scoreboard and result-bus types |
| `rtl/btf_backend.sv` | top level: wiring, result-bus multiplexers 3 and 4, memory-port sharing |
| `rtl/btf_decoder.sv` | decoder for the R-btf form and the supporting instructions |
| `rtl/issue_stage.sv` | hazard checks, pairing, read-port routing, scoreboard allocation |
| `rtl/btf_unit.sv` | two-stage butterfly unit |
| `rtl/montgomery_reduce.sv` | combinational signed Montgomery reduction mod q |
| `rtl/alu.sv` | add, sub, xor (also `addi`) |
| `rtl/lsu.sv` | word load/store unit |
| `rtl/scoreboard.sv` | reorder buffer with forwarding, full rule and store-conflict check |
| `rtl/commit_stage.sv` | triple commit, one store per cycle |
| `rtl/regfile.sv` | 32×32 register file, 4 read and 3 write ports |
| `rtl/scratchpad.sv` | two-port data memory, synchronous read |
| `tb/tb_util_pkg.sv` | reference arithmetic (mod q, Montgomery, twiddles) and instruction encoders |
| `tb/tb_<block>.sv` | self-checking testbench for each block |

`tb_btf_backend` is the end-to-end test. It runs NTT(A), NTT(B), the pointwise product and the
inverse NTT, in about 7 000 cycles. It checks the results in three ways:
- after every program, the whole memory image against an instruction-by-instruction reference
  execution of the same program;
- the NTT output against direct evaluation of the polynomial at the roots 1753^(2·brv8(i)+1);
- the final result against a schoolbook negacyclic product.

It also counts how often each pipeline mechanism fired: pairing, slot-1 waiting, triple commit,
same-cycle entry reuse, forwarding, early gs result, bus-conflict holds and load/store waits. A
mechanism that never fired counts as a failure.

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and stops itself after a fixed cycle
budget.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/btf_pkg.sv tb/tb_util_pkg.sv tb/tb_btf_backend.sv --top-module tb_btf_backend
./obj_dir/Vtb_btf_backend
```

Replace `tb_btf_backend` with any other `tb_<block>` to run that block's test. Packages must come
first on the command line; the other modules are found through `-y`. The butterfly kernels are
generated as straight-line code by tasks in `tb_btf_backend.sv` (`gen_ntt`, `gen_intt`,
`gen_pointwise`), so a different schedule can be tried by editing those tasks.
