# CIRCE — a CV-X-IF instruction-set extension for the CROSS signature

CROSS is a code-based post-quantum signature scheme. On a small 32-bit
RISC-V core, its run time is spent in two kinds of kernel:

* **Hashing.** SHAKE is built on the Keccak-f[1600] permutation. Keccak-f[1600]
  works on twenty-five 64-bit lanes, and a 32-bit core has to keep each lane as
  two 32-bit words. Each 64-bit rotation then costs a handful of shifts and ORs.
* **Small-field arithmetic.** The syndrome and restricted-vector computations
  are multiply-accumulates and reductions modulo small primes.

CIRCE is a tightly coupled coprocessor that removes these hot spots with five
custom instructions. The core offloads them through the OpenHW Core-V
eXtension Interface (CV-X-IF). CIRCE receives the instruction with its three
register operands, computes the result in one cycle, and writes it back to
the core's register file. Software stays ordinary C: the instructions are
issued from inline assembly inside the existing CROSS code. The same hardware
serves both CROSS variants and all parameter sets:

* R-SDP, with p = 127 and z = 7
* R-SDP(G), with p = 509 and z = 127

The design is very small. It has about 75 flip-flops, one rotator, one
16×16 multiplier and four constant-modulus remainders.

## Instruction set

All five instructions use the R4 format of the RISC-V **custom-0** opcode
(`0001011`). This encoding is this implementation's own choice. It is defined
in `rtl/circe_pkg.sv`.

```
 31   27 26 25 24  20 19  15 14 12 11   7 6      0
[  rs3  | f2  | rs2  | rs1  | f3  |  rd  | 0001011 ]
```

| f3    | mnemonic | result written to rd                                  |
|-------|----------|-------------------------------------------------------|
| `000` | ROLLO    | low 32 bits of rotl64({rs2, rs1}, rs3[5:0])           |
| `001` | ROLHI    | high 32 bits of rotl64({rs2, rs1}, rs3[5:0])          |
| `010` | ANDNXOR  | rs1 ^ (~rs2 & rs3)                                    |
| `100` | FPMAC    | (rs1[15:0] · rs2[15:0] + rs3) mod m(f2)               |
| `101` | FPRED    | rs1 mod m(f2)                                         |

For ROLLO, ROLHI and ANDNXOR, `f2` is ignored. For FPMAC and FPRED it picks
the modulus m:

| f2   | m   | use                  |
|------|-----|----------------------|
| `00` | 127 | p of R-SDP           |
| `01` | 7   | z of R-SDP           |
| `10` | 509 | p of R-SDP(G)        |
| `11` | 127 | z of R-SDP(G)        |

Any other instruction offered to CIRCE is rejected in the same cycle. The
core can then raise an illegal-instruction trap.

## How Keccak-f[1600] maps onto the instructions

This mapping is the least obvious part of the design. The testbench
`tb/tb_circe.sv` runs exactly this sequence, so it is a working reference.

A lane `A[x,y]` is held as two registers, `lo` (bits 31:0) and `hi` (bits
63:32). For each of the 24 rounds:

1. **θ (theta).** The core XORs the columns itself, computing `C[x]` as two
   words. `D[x] = C[x-1] ^ rotl(C[x+1], 1)` then needs one 64-bit rotation,
   done as a ROLLO and a ROLHI. Both take `rs1 = C.lo`, `rs2 = C.hi` and
   `rs3 = 1`. That is 10 instructions per round.
2. **ρ and π (rho and pi).** Each lane is rotated by its fixed offset:
   ROLLO and ROLHI again, with the offset in `rs3`. π only moves lanes to
   new positions, so it costs nothing. That is 50 instructions.
3. **χ (chi).** `A[x,y] = B[x,y] ^ (~B[x+1,y] & B[x+2,y])` is bitwise, so it
   splits into two ANDNXORs per lane, one per half. That is 50 instructions.
4. **ι (iota).** The core XORs the round constant into lane 0.

Rotation needs both halves of the lane as inputs, because bits cross
between them. This is why ROLLO and ROLHI read both `rs1` and `rs2`. Only
the offset's low six bits are used, so any offset from 0 to 63, including
0, works without special cases.

## Modular arithmetic

The fp-unit computes `x mod m`. For FPMAC, x is the 33-bit value
`rs1[15:0]·rs2[15:0] + rs3`; for FPRED, x is the 32-bit `rs1`. The unit
computes x modulo each of the four moduli in parallel and selects one by
`f2`.

The 16-bit factor fields and the full 32-bit accumulator mean that
unreduced operands are also handled correctly. A dot product such as a
syndrome entry `s = Σ h_i·e_i mod p` is a chain of FPMACs: each takes the
previous result as `rs3`. The result is always fully reduced, below m.

The remainders are written as `%` by a constant. Synthesis maps each one to
a constant-divider circuit. If timing at the target clock matters, this is
the place to substitute a Barrett or Mersenne-style reducer. 127 is 2^7 − 1,
and 509 is 2^9 − 3.

## Datapath and handshake

```
            rs1 rs2 rs3, op
 issue ──► decoder ──────────────► fp-unit ─────── res ──┐
   ▲          │  └───────────────► keccak-unit ─── res ──┤
   │          │ done (one bit per unit) ─────────────────┤
   │          ├─ id ──► REG ─────────────────────────────┤
   │          └─ rd ──► REG ─────────────────────────────┤
   │                                                     ▼
   └─────────────── result_taken ◄──────────────── committer ──► result
```

**Issue (`circe_decoder`).** A CIRCE instruction is taken in a cycle where
`issue_valid && issue_ready`. `issue_ready` is held low in two cases:

* **Operand wait.** An operand the instruction reads has `rs_valid` low.
  FPRED reads only rs1; every other instruction reads all three.
* **Stall.** The previous result is still waiting on the result interface
  and is not being taken in this cycle.

`issue_resp.accept` and `issue_resp.writeback` are high for CIRCE
instructions. A foreign instruction sees `issue_ready = 1` and
`accept = 0` at once.

**Execute.** On the handshake, exactly one unit loads its result register.
The `id` and `rd` registers load the instruction's tags. The unit's bit
in `done` is set.

**Result (`circe_committer`).** The committer offers the result of the unit
named by `done` in the next cycle. It is tagged with the held `id` and `rd`,
with `we = 1`. It holds everything stable until `result_ready`. The
handshake (`result_taken`) clears `done`.

**Timing.** If instruction i is taken in cycle t, its result is valid in
cycle t+1. One instruction is in flight at a time. When the core takes
every result at once, the next instruction can be taken in the same cycle,
so the throughput is one instruction per clock.

Assertions check three rules of this handshake:

* `done` is one-hot or zero.
* The committer takes a result only when one is pending.
* An offered result stays stable until it is taken.

## Files

| file | block |
|------|-------|
| `rtl/circe_pkg.sv` | encoding, moduli, CV-X-IF bundle structs |
| `rtl/circe.sv` | top: wires the blocks below |
| `rtl/circe_decoder.sv` | issue side: decode, accept/reject, operand wait, stall, `done` |
| `rtl/circe_keccak_unit.sv` | ROLLO / ROLHI / ANDNXOR |
| `rtl/circe_fp_unit.sv` | FPMAC / FPRED with four moduli |
| `rtl/circe_pipe_reg.sv` | the id and rd holding registers |
| `rtl/circe_committer.sv` | result side: select, tag, hold until taken |

The top's ports are the CV-X-IF issue and result bundles, as packed
structs:

* `x_issue_req_t`: instruction word, `rs[3]`, `rs_valid[3]`, `id`
* `x_issue_resp_t`: `accept`, `writeback`
* `x_result_t`: `id`, `data`, `rd`, `we`

The reset, `rst_ni`, is asynchronous and active low.

## What follows the published design and what is this implementation's own

The published design fixes the following:

* The block structure: a decoder feeding an fp-unit and a keccak-unit with
  rs1, rs2 and rs3, id and rd held in registers, and a committer on the
  result interface.
* Attachment through CV-X-IF to a 32-bit RISC-V core.
* The keccak-unit's operations: two rotate-half primitives with the offset
  in the third register, and the fused `A ^ (~B & C)`.
* An fp-unit providing modular multiply-accumulate and reduction for both
  CROSS variants with one instruction set.

This implementation chose the following:

* The instruction encoding.
* The exact FPMAC and FPRED semantics and operand widths.
* The moduli table. Its values come from the CROSS specification.
* Per-instruction modulus selection, so one build serves both variants.
* The one-cycle latency and the one-in-flight rule.
* Operand waiting and the valid/ready details.
* `ID_WIDTH = 4`.
* The one-hot `done` vector.

Some parts of a full coprocessor are not modelled:

* The CV-X-IF commit interface, with its speculative kill. Every accepted
  instruction is treated as committed. This is correct for a core that
  offloads only non-speculatively. A core that kills offloaded instructions
  would need a commit port that clears `done` and drops the result.
* The CV-X-IF register and memory interfaces. All data passes through core
  registers.
* The host core, the SoC and the CROSS software. The testbench plays the
  core.

The decoder passes the units a decoded operation rather than the raw
instruction word.

FPGA resource and cycle figures reported for the original implementation
were not reproduced. This RTL has not been synthesised for an FPGA or run
against the CROSS software.

## Verification

Each block has a self-checking testbench in `tb/`. Each compares against
values computed independently in the testbench and prints
`TB_RESULT checks=N failures=M`.

* **`tb_circe`** is the end-to-end test at default parameters. It plays the
  core and runs two complete Keccak-f[1600] permutations through the
  custom instructions:
  * on the all-zero state, checked against the known first lane
    `0xF1258F7940E1DDE7`;
  * on a random state.

  Every lane is compared with a 64-bit reference permutation. The round
  constants and rotation offsets come from their defining LFSR and the
  (t+1)(t+2)/2 walk. The test then runs FPMAC dot products and FPMAC/FPRED
  batches for all four moduli.

  The core side inserts random gaps, late operands, foreign instructions
  and result back-pressure. The test counts, and requires at least once
  each: rejection, operand wait, stall, back-to-back issue, back-pressure,
  every operation and every modulus. It also checks the one-cycle latency
  and the id/rd tags of every result. It runs in about 10,000 cycles.
* **`tb_circe_decoder`** checks the decode table, rejection, operand wait,
  stall and back-to-back issue.
* **`tb_circe_keccak_unit`** checks every offset 0–63 for both halves, plus
  random operations, and that the result holds while the unit is idle.
* **`tb_circe_fp_unit`** checks hand-worked values, accumulator extremes and
  random field-sized and full-range operands for all moduli.
* **`tb_circe_committer`** and **`tb_circe_pipe_reg`** check the result
  selection and tags, and the holding registers.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_circe \
    rtl/circe_pkg.sv tb/tb_circe.sv -o sim && ./obj_dir/sim
```

Replace `tb_circe` with any other testbench name. The `-I` paths let
Verilator find the other modules by file name.

## Changing the design

* **Moduli.** Edit the `MOD_*` constants in `circe_pkg.sv`. The reference
  model in `tb_circe_fp_unit` uses the same four values.
* **Adding an instruction.** Add an `F3_*` code in `circe_pkg.sv`. Decode it
  in `circe_decoder.sv`, including the operands it needs. If the instruction
  needs a new unit, also add a `done` bit and a committer input.
* **More instructions in flight.** Turn the single `done`, id and rd
  registers into a small FIFO, and let `issue_ready` depend on its
  fullness.
