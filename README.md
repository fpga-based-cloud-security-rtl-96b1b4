# ECC scalar-multiplication accelerator ([k]P over prime fields)

This RTL computes Q = [k]P, the core operation of elliptic-curve key
generation, Diffie-Hellman and signatures, on any short-Weierstrass curve
y² = x³ + ax + b over a prime field F_p of up to NN bits (NN = 256 by
default). A processor hands it the curve, the point and the scalar over
AXI4-lite, starts it, and reads back the affine result. It is meant as a
memory-mapped peripheral next to an application processor (a Zynq-class
SoC), for example as the key generator of a cloud security front end.

The main idea is that the accelerator is itself a tiny programmable
machine. A microcoded CPU runs the scalar-multiplication algorithm from a
read-only program memory. Its ALU works on 32 whole field-size numbers.
Modular multiplications go to a pool of Montgomery multipliers that run in
the background. Changing the algorithm means changing microcode, not
hardware. Constant-time behaviour comes from two hardware hooks: a
conditional write-back and operand patching. Operand patching also
re-shuffles where the two ladder points are stored at every step, driven
by the on-chip random-number generator. The sections below explain these
mechanisms.

The block structure and most names follow a published description of
this architecture (an FPGA-based cloud security solution for 5G networks
built around an open ECC IP). That description stops at block level. The
instruction encoding, the microcode, the register map and every width not
named below are this implementation's own.

## Block hierarchy

```
ecc_ip                      top; AXI4-lite slave, irq, busy
 ├─ ecc_axi                 register bank, big-number transfer, debug access
 ├─ ecc_scalar              main FSM: IDLE -> CST (curve constants) -> KP
 ├─ ecc_curve               microcoded CPU: fetch, decode, wait-for-ALU
 │   └─ ecc_curve_iram      512 x 32-bit microcode memory, computed at elaboration
 ├─ ecc_fp                  ALU + scoreboard + multiplier dispatch
 │   ├─ ecc_fp_dram         32 x (NN+2)-bit large-number memory
 │   └─ mm_ndsp  (x NBMM=2) digit-serial Montgomery multipliers
 ├─ ecc_trng                raw FIFO, IRN assembler, 4 client FIFOs
 │   └─ sync_fifo
 └─ es_trng  (x NTRNG=2)    entropy-source stand-in (seeded PRNG)
```

`ecc_pkg` holds the instruction format, the opcodes, the flag struct, the
slot map and the microcode entry points.

## The microcoded CPU and its instruction set

`ecc_curve` has no stack and no general registers. Its only state is the
program counter, one link register, two patch bits and a mask bit (see
operand patching below), and the flags (Z, N, ODD) of
the last synchronous ALU instruction. Each instruction goes through three
stages: fetch, decode and execute. In the execute stage the CPU waits for
the ALU's `ins_done`. Fetch overlaps execute: while an ALU instruction
runs, the next word is already being read, so the next instruction is
decoded as soon as the ALU is done. Decode does not overlap execute, so a
branch always sees the flags of the instruction before it. An ALU
instruction takes 4 cycles: decode plus 3 in `ecc_fp`. A control
instruction takes 2, because the instruction after it must be fetched from
the new pc.

Instruction word: `op[31:27] dst[26:22] sa[21:17] sb[16:12] ext[11:0]`.

| op | mnemonic | effect |
|----|----------|--------|
| 1 | NNADD d,a,b | d = a + b (integer, no reduction) |
| 2 | NNSUB d,a,b | d = a − b |
| 3 | NNIADD d,a,#i | d = a + sign-extended 12-bit immediate |
| 4 | NNXOR | d = a ^ b |
| 5/6 | NNSLL / NNSRL | d = a << 1 / a >> 1 (logical) |
| 7 | TESTPAR a | flags from a, nothing written |
| 8 | NNRND d | d = random number of NN−1 bits (waits for the TRNG) |
| 9 | FPREDC d,a,b | d = a·b·R⁻¹ mod p, **asynchronous** |
| 10 | BARRIER | wait until no FPREDC is outstanding |
| 11 | NNDIV2 d,a,p | d = a/2 mod p: a + p if a is odd, then shift right (no branch) |
| 16–20 | J, JZ, JNZ, JN, JODD | jumps, target in ext[8:0] |
| 21/22 | JL / RET | jump and link / return (one level) |
| 23 | PATCH | read patch ← N ⊕ mask, write patch ← N ⊕ s, mask ← s (s = fresh random bit) |
| 24 | STOP | end of routine; Z flag reported to ecc_scalar |

For arithmetic instructions `ext = {cond[1:0], pd, pa, pb, 7'b0}`:

* **Conditional write-back (on-the-fly correction).** `cond = GE0` writes the
  result only if it is ≥ 0. `cond = IFN` writes only if the previous
  flag-setting instruction left N = 1. The instruction takes the same time
  either way. Modular addition is therefore `NNADD d,x,y ; NNSUB.GE0 d,d,p`.
  Modular subtraction is `NNSUB d,x,y ; NNADD.IFN d,d,p`. Neither has a
  data-dependent branch.
* **Operand patching and coordinate shuffling.** The two ladder points sit
  in slot pairs that differ only in bit 0: X0/X1 = 8/9, Y0/Y1 = 10/11,
  Z0/Z1 = 12/13. A mask bit m records which slot of each pair holds R0
  (R0 is in slot 8+m). If pa or pb is set, bit 0 of that source address is
  XORed with the *read patch*. If pd is set, bit 0 of the destination is
  XORed with the *write patch*.
  `PATCH` runs after the next scalar bit b has been shifted into N. It pops
  one random bit s from the shuffling FIFO, sets read patch = b ⊕ m and
  write patch = b ⊕ s, and sets m ← s. Reading "slot 8, patched" therefore
  reads R_b wherever it currently is. Writing "slot 8, patched" puts the new
  R_b into slot 8+(b ⊕ s). Two things follow:
  1. The roles of R0 and R1 follow the scalar bit without a branch.
  2. The physical order of the points is re-drawn at random every step.
     Which slot is touched thus tells nothing about the scalar.

  This only works if a step has read both old points before it writes
  either new one, and the ladder microcode is ordered that way. When no
  random bit is available, PATCH waits in decode. With the parameter
  `SHUFFLE = 0` the random bit is taken as 0, so the write patch equals the
  read patch.

Numbers are NN+2 bits wide, in two's complement. That leaves room for an
unreduced sum of two field elements and for the sign of a difference.

### Slot map (ecc_fp_dram)

| slot | content | slot | content |
|------|---------|------|---------|
| 0 | p | 14–16 | addition input/output A (X,Y,Z) |
| 1 | a (must be < p) | 17–19 | addition input B (X,Y,Z) |
| 2 | b | 20–25 | temporaries t0..t5 |
| 3, 4 | Px, Py | 26 | a·R mod p |
| 5 | k | 27 | 3b·R mod p |
| 6, 7 | result Qx, Qy | 28 | R² mod p |
| 8–13 | ladder points R0, R1 | 29 | loop counter |
| 30 | constant 1 | 31 | constant 0 |

## The microcode (ecc_curve_iram)

The program is built by the constant function `build_prog()` when the
design is elaborated. It is the same for every NN and is sized by the
parameters NN and RBITS. A debug write port can patch single words at run
time.

* **ENTRY_CST (0x000), curve constants.** Sets slots 31 and 30 to 0 and 1.
  Computes R² mod p by 2·RBITS modular doublings of 1. Then computes a·R and
  3b·R mod p. This routine runs only when p, a or b was written since the
  last run.
* **ENTRY_KP (0x020), [k]P.**
  1. Draws λ = NNRND + 1 and loads R1 = (λ·Px : λ·Py : λ) in Montgomery form.
     This randomises the projective coordinates.
  2. Sets R0 = O = (0 : 1 : 0).
  3. Runs a Montgomery ladder over all NN bits of k, most significant bit
     first. At each bit b it computes R₁₋b ← R_b + R₁₋b and then R_b ← 2·R_b.
     Both steps call the same point-addition routine. The order within a
     step is:
     * copy R_b and R₁₋b into A and B, then add;
     * copy R_b into B;
     * write the sum out as R₁₋b in the new random order;
     * copy B into A, then double;
     * write the result out as R_b.

     A final PATCH with N = 0 then points the reads at wherever R0 ended up.
  4. Inverts Z by Fermat, Z^(p−2), using square-and-multiply in which the
     multiply is kept by a conditional write.
  5. Converts to affine coordinates and out of the Montgomery domain.
  6. Sets the Z flag if Z = 0, which means the result is the point at
     infinity.

  The sequence of instructions does not depend on k. The cycle count is
  identical for every scalar; the testbenches check this.
* **ENTRY_PADD (0x100), point addition.** This is the complete projective
  addition of Renes, Costello and Batina for curves with any a: 12 general
  products, 3 products by a, 2 by 3b and 23 additions. It is in place on
  A ← A + B. Being complete, it also doubles (A = B) and handles O, so the
  ladder needs no special cases. The 17 products are issued back to back and
  overlap on the two multipliers.

## Asynchronous multiplication and the scoreboard (ecc_fp)

Synchronous instructions take two ALU cycles: one to read the operands and
one to compute and write. FPREDC reads its operands and hands them to a
free `mm_ndsp`. It then completes at once and records its destination slot
as busy. Finished products are written back in the ALU's idle cycles. Any
later instruction that reads or writes a busy slot stalls until the product
lands. `BARRIER` waits until no product is outstanding. So independent work
overlaps with multiplications, dependent work is always correct, and the
microcode only needs a BARRIER before it hands results to software or
returns from the addition routine. With NBMM = 1 the design still works,
only more slowly.

Software reaches the memory through an external port. It is enabled only
while the CPU is idle. Writes to slot 0 also update a shadow copy of p that
the multipliers use.

## Montgomery multiplier (mm_ndsp)

This is a radix-2^W digit-serial REDC with R = 2^(W·S) and S = ⌈NN/W⌉. One
digit of a is consumed per cycle, using u = T + aᵢ·b, m = u·p′ mod 2^W and
T = (u + m·p)/2^W. The constant p′ = −p⁻¹ mod 2^W is computed from p by
Newton iteration at each start. T stays below 2p, so one final subtraction
gives a result below p. The latency is S + 2 cycles from the start cycle to
`res_valid`. The result is held until `res_ack`. W is the stand-in for the
number of DSP multiplier-accumulators per unit. Each cycle forms two
W × NN products.

## Random numbers (ecc_trng, es_trng)

The random-number path has four stages:

1. The entropy sources are pooled into a raw FIFO of single bits. Pooling
   uses a binary tree of 2:1 nodes. Each node passes on whichever child has
   a bit. When both children have one, the node's priority bit picks one
   and then flips, so contending sources take turns. The losing bit is
   dropped.
2. An assembler pulls raw bits and builds internal random numbers of
   per-client width. The first bit becomes the most significant.
3. The assembler serves four client FIFOs in round-robin order and skips
   the full ones.
4. Client 3 feeds NNRND. Client 1 (2-bit numbers, bit 0 used) feeds the
   ladder coordinate shuffle in `ecc_curve`. Clients 0 and 2 are meant for
   scalar blinding and for memory shuffling. Those two countermeasures are
   not part of this RTL, so their streams appear as `irn_*[0]` and
   `irn_*[1]` ports of the top.

No post-processing is applied. It would go between the raw FIFO and the
assembler. In debug mode software can pop raw bits through the RAW register
to assess entropy.

`es_trng` is a **stand-in** for the entropy source. A real ES-TRNG samples
the jitter between free-running ring oscillators, which is a
technology-specific circuit and is not portable RTL. The stand-in keeps the
same interface: one bit every PERIOD cycles, given as a one-cycle valid
pulse. Its bits come from a 32-bit xorshift generator seeded by the SEED
parameter, so every source gets its own sequence. The output is
deterministic. It is fine for simulation and lets the whole top synthesize,
but it must be replaced by a real source in a product.

## Software interface (ecc_axi)

32-bit AXI4-lite, byte offsets:

| offset | dir | register |
|--------|-----|----------|
| 0x00 | W | CTRL: bit0 starts [k]P |
| 0x00 | R | STATUS: bit0 busy, bit1 done/irq, bit2 result is infinity, bit3 raw bit available |
| 0x04 | W | NUM_ADDR: slot to write (0 p, 1 a, 2 b, 3 Px, 4 Py, 5 k) |
| 0x08 | W | NUM_DATA: next 32-bit limb, least significant first; the NN/32-th limb commits the number |
| 0x0C | W | RD_ADDR: slot to read (6 Qx, 7 Qy) |
| 0x10 | R | NUM_RDATA: next limb of the number being read |
| 0x14 | W | IRQ_ACK |
| 0x18 | R | RAW (debug): {valid, 30'b0, bit}, pops a raw random bit |
| 0x1C / 0x20 | W | IRAM_ADDR / IRAM_DATA (debug): patch microcode, address auto-increments |
| 0x24 | R | CAPS: NN |

Number and microcode writes while busy get SLVERR and are ignored. A
typical run has five steps:

1. Write p, a and b. This is needed once per curve.
2. Write Px, Py and k.
3. Write 1 to CTRL.
4. Wait for `irq`, then read STATUS.
5. Read Qx and Qy, and write IRQ_ACK.

Inputs must be reduced: a, b, Px and Py must be below p. p must be an odd
prime with exactly NN bits.

## Performance (simulated)

| configuration | cycles per [k]P |
|---------------|-----------------|
| NN = 256, W = 16, 2 multipliers (P-256 or secp256k1) | 233,635 after the curve constants; 240,866 including them |
| NN = 32, W = 8, 2 multipliers | 21,611 (22,558 with curve constants) |
| NN = 16, W = 1, 1 / 2 / 4 multipliers | 17,146 / 14,754 / 14,358 |

Cycles are clock cycles of `s_axi_aclk`. The ladder is constant-time, so
the figure does not depend on k. It can grow by a few cycles when a random
number is requested (NNRND, or PATCH for the shuffle) while its FIFO is
empty, for example right after software has drained raw bits in debug
mode. That delay depends on the random source, not on k.

## Parameters

| module | parameter | default | meaning |
|--------|-----------|---------|---------|
| ecc_ip | NN | 256 | field size in bits |
| ecc_ip | W | 16 | multiplier digit width |
| ecc_ip | NBMM | 2 | number of Montgomery multipliers |
| ecc_ip | NTRNG | 2 | entropy sources |
| ecc_ip | DEBUG | 1 | raw-bit read and microcode patching over AXI |
| ecc_trng | RAW_DEPTH / IRN_DEPTH | 64 / 4 | FIFO depths |
| ecc_curve_iram | DEPTH | 512 | microcode words (9-bit pc) |
| ecc_curve | SHUFFLE | 1 | random R0/R1 slot order in the ladder (0: off) |

The 32-word memory and the two multipliers come from the architecture
description. NN, W, the FIFO sizes and the number of sources are this
implementation's choices.

## Where this design departs from the architecture it follows

* The scalar multiplication uses a Montgomery ladder with complete
  projective formulas, not the Co-Z ladder of the original IP. The
  inversion uses Fermat, not a binary extended Euclid. The microcode is
  this design's own and is not binary-compatible with the original.
* The CPU's three stages only partly overlap: the fetch of the next
  instruction overlaps execution, but decode waits for execution to end.
* The on-the-fly correction is carried as a condition field in the
  instruction and applied where the result is written (in `ecc_fp`).
* Two side-channel countermeasures are not built: scalar blinding and the
  shuffled memory `ecc_fp_dram_sh`. Their random-number streams are
  exported. The countermeasures present are the randomised projective Z
  and the R0/R1 shuffle. The shuffle moves all three coordinates of a
  point together, using one random bit per ladder step; X and Y are not
  shuffled independently.
* The entropy source itself is a seeded PRNG stand-in (see `es_trng`). A
  real ring-oscillator source must be put in its place.
* There is a single clock. The separate multiplier clock and the hardware
  debug ports of the original IP (breakpoint and trace signals) are not
  present.
* The exact NNIADD semantics of the original instruction set are not
  reproduced. NNIADD here adds a 12-bit signed immediate. NNDIV2 is
  provided (modular halving, as a binary extended-Euclid inversion needs)
  but the built-in microcode does not use it.

## Simulating

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. Testbenches that need the reference model
also compile `tb/ec_ref_pkg.sv`, an affine chord-and-tangent model for p
below 2^62. The other modules are found through the library paths. For
example:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
    -y rtl -y tb +libext+.sv \
    rtl/ecc_pkg.sv tb/ec_ref_pkg.sv tb/tb_ecc_ip.sv \
    --top-module tb_ecc_ip -o sim && ./obj_dir/sim
```

`-Wno-fatal` keeps width and unused-signal lint warnings from stopping the
build. The design has none of verilator's circuit warnings (latches,
combinational loops, multiple drivers).

* `tb_ecc_ip` runs the IP end to end over AXI on a 32-bit curve. It checks
  each result against the model and counts every mechanism: the
  curve-constant run and skip, both multipliers, stalls, both patch
  values, ladder points moved and left in place by the shuffle,
  corrections taken and skipped, NNRND, irq, infinity, SLVERR, raw-bit
  reads, a microcode word patched over AXI (and restored), and constant
  time.
* `tb_ecc_nbmm` runs [k]P on the core with 1, 2 and 4 multipliers (through
  the harness `kp_harness`). It uses 1-bit digits so that several products
  overlap. With 4 units, at most 3 are busy at once, because the addition
  formula never has four independent products ready together.
* `tb_ecc_ip_full` uses the default parameters on NIST P-256 and then on
  secp256k1 (a = 0), loading new curve constants in between. For each curve
  it runs one random 256-bit k against a 512-bit reference, and k = n, which
  must give infinity. Both curves take the same number of cycles. It takes
  about four seconds.
* The block testbenches are `tb_mm_ndsp`, `tb_ecc_fp`, `tb_ecc_fp_dram`,
  `tb_ecc_curve`, `tb_ecc_curve_iram`, `tb_ecc_scalar`, `tb_ecc_axi`,
  `tb_ecc_trng` and `tb_es_trng`.

The simulator has two states, so every register that is read is reset or
written first. The large-number memory has no reset. The microcode writes
slots 30 and 31 before it uses them, and software writes the inputs.

## Changing it

* **Another algorithm.** Edit `build_prog()` in `ecc_curve_iram.sv`.
  Routines start at fixed entry points (`ENTRY_*` in `ecc_pkg`). Only
  backward jumps use labels computed in the function.
* **Larger fields.** Raise NN. RBITS follows as W·⌈NN/W⌉. The loop counts
  2·RBITS and NN must fit a 12-bit signed immediate, which allows NN up to
  about 1000.
* **More or fewer multipliers.** Set NBMM. The scoreboard and dispatch are
  generic.
