# A SIMD datapath for lattice-based post-quantum cryptography on a small RISC-V core

Kyber and Dilithium spend most of their time in three kernels: the number-theoretic transform (NTT) over
256 coefficients, sampling of random polynomials (rejection sampling and centered-binomial sampling), and the
Keccak permutation behind SHAKE. On a plain 32-bit microcontroller core these kernels are slow because each
coefficient is handled by several scalar instructions and Keccak's 64-bit lanes do not fit 32-bit registers.

This design adds a SIMD extension to a 4-stage in-order RV32IMC core of the CV32E40P kind. The extension
provides:

- **Wide registers.** There are five 64-bit register files PR1..PR5 with 16 rows each. One row read across
  the files is a SIMD register:
  - 256 bits (eight 32-bit lanes) for arithmetic;
  - 320 bits (five 64-bit Keccak lanes) for Keccak.
- **Constant registers.** A two-entry constant file, FIX, holds the modulus q and q^-1 mod 2^32.
- **A parallel ALU (PALU).** It has eight 32-bit cores for arithmetic. In Keccak mode it forms ten 32-bit
  cores that act as five 64-bit lanes.
  - It contains shuffling networks for NTT butterflies.
  - It has a first stage for binomial sampling.
  - It has instructions that fuse the steps of a Keccak round.
- **A 128-bit load/store path** and a 64 kB data SRAM.
- **Dual issue.** The core fetches 64 bits (two instructions) per cycle from a 40 kB instruction SRAM. A
  load/store and a computation can issue together, which hides most of the cost of moving 256-bit registers
  through a 128-bit port.

The RTL covers the SIMD extension and both memories. The scalar core (its fetch unit, general-purpose
registers, scalar ALU, multiplier, CSRs and controller) is not included. The top level exposes the places
where it connects: the program counter, the GPR read for load/store base addresses, the branch outcome of
`bgeuv`, and a shared data-memory port.

## Register layout: one row, two views

Everything else depends on how data sits in the register files, so it comes first.

```
            PR1 (64b)        PR2 (64b)        PR3 (64b)        PR4 (64b)        PR5 (64b)
row r:   [lane1|lane0]    [lane3|lane2]    [lane5|lane4]    [lane7|lane6]     (unused in 256-bit mode)
256-bit:  32-bit lanes 0..7, lane 2p in PR(p+1)[31:0], lane 2p+1 in PR(p+1)[63:32]
320-bit:  A[1,y]           A[2,y]           A[3,y]           A[4,y]           A[0,y]
```

- **Arithmetic.** A register `xN` of an arithmetic instruction is row N mod 16 of PR1..PR4.
- **Keccak.** A row holds one plane y of the 5×5 state, with lane x in PR(x) for x = 1..4 and lane 0 in PR5.
- **Loads and stores.** The 128-bit port reaches half a row at a time:
  - `lv`/`sv` move a row's (PR1,PR2) half or its (PR3,PR4) half. Bit 4 of the register field selects the
    half, so `x17` is the upper half of row 1.
  - `lw64`/`sw64` move PR5.
  - `lwf` loads FIX[rd[0]].

In the RTL a row is the type `vec320_t` (`logic [4:0][63:0]`). Index 0..3 is PR1..PR4 and index 4 is PR5.

## Instruction set

All instructions read and write rows. `q` is FIX[0] and `q'` is FIX[1] = q^-1 mod 2^32.

| Group | Instruction | Per lane / effect |
|---|---|---|
| arithmetic (custom-0, funct3=0, funct7 = index) | `addv subv andv xorv` | a+b, a−b, a&b, a^b |
| | `addvm subvm` | modular add/sub with q (inputs in [0,q)) |
| | `addvmt subvmt` | same, then output order 0,2,4,6,1,3,5,7 |
| | `addvti subvti` | input order 0,8,1,9,…: lane 2j = rs1[j]±rs1[j+4], lane 2j+1 = rs2[j]±rs2[j+4] |
| | `mulv mulvh` | low / high 32 bits of the signed product |
| | `mulvm mulvhf` | low 32 bits of a·q', high 32 bits of a·q |
| | `cbd2 cbd3` | centered binomial sample from the low 32/48 bits of rs1 |
| | `sllvi sravi` | shift by the rs2 field |
| branch (custom-0, B-type, funct3=7) | `bgeuv rs1, rs2, off` | taken if any lane of rs1 ≥ the lane of rs2 (unsigned) |
| Keccak (custom-1, funct3 selects, imm in instr[27:25]) | `xorv3` | rs1 ^ rs2 ^ row(rs1<<1) |
| | `xorv2`, `xorv2rc` | rs1 ^ rs2 on all lanes, or on lane 0 only (round constant) |
| | `xorrv` | D[x] = C[x−1] ^ rotl(C[x+1], 1) |
| | `rxorv k` (k = 0..4) | rotl(rs1[x] ^ rs2[x], ρ-offset from a fixed 5×5 table) |
| | `xornavi i` | gathers π-permuted lanes from rs1, rs2 and rows 11, 12, 13 and applies χ |
| | `shufflev i` | rotates the five lanes of rs1 by i positions |
| loads (custom-2) | `lv lw64 lwf` | 128 / 64 / 32 bits, address = GPR[rs1] + imm12 |
| stores (custom-3) | `sv sw64` | 128 / 64 bits |

The encoders in `tb/pqc_asm_pkg.sv` show the exact bit layout of each instruction.

### Montgomery multiplication in five instructions

A signed Montgomery product r ≡ a·b·2^-32 (mod q), with |r| < q, is computed as:

```
mulv   lo, a, b      ; lo = (a*b) mod 2^32
mulvh  hi, a, b      ; hi = (a*b) >> 32
mulvm  m,  lo        ; m  = lo * q'  mod 2^32
mulvhf t,  m         ; t  = (m * q) >> 32
subv   r,  hi, t     ; r  = hi - t
```

An NTT butterfly adds `addvm` and `subvm`, which makes seven instructions. In the middle NTT layers,
`addvmt`/`subvmt` and `addvti`/`subvti` rearrange lanes so that butterfly partners end up in the same lane
positions without extra moves.

### Keccak-f[1600] with five-lane rows

The state is five rows, one per plane. One round uses 15 instructions:

| Step | Instructions | Computes |
|---|---|---|
| θ, column parity | 2 × `xorv3` | parity C |
| θ, column effect | `xorrv` | D from C |
| θ + ρ | 5 × `rxorv k` | each plane XORed with D and rotated by row k of the offset table |
| π + χ | 5 × `xornavi i` | output plane 2i mod 5, gathering its lanes from the five rotated planes |
| ι | `lw64` + `xorv2rc` | the round constant is loaded into PR5 and XORed into lane 0 |

How the table maps to lanes:
- PALU core j of `rxorv k` serves Keccak lane x = 4 − j.
- `xornavi` reads its first two planes from rs1/rs2. The other three come from the fixed rows x11, x12 and
  x13, where `rxorv` has left them.

Rounds alternate between two sets of five rows, so no copy is needed. The `lw64` of the round constant
dual-issues with the next computation.

A full 24-round permutation, with state load and store, takes **391 cycles** in the end-to-end test. The
published figure is 404 cycles, measured with a loop instead of the straight-line code used here.

### Complete NTTs for Dilithium and Kyber

`tb/tb_ntt_workload.sv` generates and runs complete forward NTTs. The same program generator serves two
sizes:
- **Dilithium:** one 256-point NTT, q = 8380417, root of unity 1753, 8 layers.
- **Kyber:** the 256 coefficients are split into even and odd halves. Each half is a 128-point NTT with
  q = 3329 and root of unity 17, so it has 7 layers. The two halves run one after the other.

A 256-point polynomial is 32 SIMD words, twice what the register file holds, so it is processed in two
phases.

**Layers with distance N/2 down to 8 coefficients.** The butterfly partners are whole SIMD words. Each
butterfly:
- loads a, b and a broadcast twiddle (six `lv`);
- runs the five-instruction Montgomery product, then `addv` and `subv`;
- stores the two results (four `sv`).

The program software-pipelines the butterflies. The loads of the next butterfly and the stores of the
previous one alternate with the arithmetic of the current one, so most of them dual-issue. Two sets of seven
rows alternate between consecutive butterflies.

**Layers with distance 4, 2 and 1.** Sixteen coefficients (two words P, Q) stay in the registers for all
three layers:
- a Montgomery product multiplies lanes 4..7 by their twiddles and lanes 0..3 by 2^32 mod q (that is, by
  one);
- `addvti`/`subvti` then form the sums and differences of lanes j and j+4.

Their input shuffle interleaves the results, so the next layer again finds its partners four lanes apart.
The final coefficient order is a fixed permutation, which the testbench tracks.

Coefficients are left unreduced between layers. They stay below 9q in magnitude, well inside the range of
the signed Montgomery product. Every coefficient is checked modulo q against a reference NTT.

| Transform | Cycles | Dual issues | Load-use stalls |
|---|---|---|---|
| Dilithium, 256 points | 1632 | 707 | 75 |
| Kyber, one 128-point half | 734 | 294 | 28 |
| Kyber, both halves | 1468 | 588 | 56 |

The published design reports 1750 cycles for a 256-point NTT.

The butterflies here multiply first and then add (Cooley-Tukey form). The published NTT adds first and
multiplies afterwards (Gentleman-Sande form). Both forms use the same instructions and the same
input-shuffle data flow for the last three layers.

## Pipeline and timing

```
 pc ─► instr_sram (64-bit, any word address) ─► simd_decoder ×2 ─► dual_issue ─┬─► PALU ─► PR write port a
                                                                               └─► LSU ──► data_sram ─► PR write port b / FIX
```

**Issue rule.** Two instructions issue together only when all of these hold:
- one is a load/store and the other a computation;
- neither is a branch or jump;
- the second does not read or write a PR row, FIX entry or GPR that the first writes.

Otherwise only the first issues. The scalar core outside must advance its PC by 4 × `issue_cnt`.

**Computation.** A computation reads its rows, runs through the purely combinational PALU and writes at the
end of its issue cycle. Back-to-back dependent computations therefore need no forwarding.

**Loads.** A load sends its request in the issue cycle. The SRAM answers one cycle later, and the data is
written in that cycle through the second write port.
- If the first instruction of the next packet reads that row or FIX entry, nothing issues for one cycle
  (`stall`).
- If only the second instruction reads it, the first issues alone.

**Stores.** A store writes the SRAM in its issue cycle.

**bgeuv.** It is decided in its issue cycle and reported on `br_valid`/`br_taken`/`br_offset`.

**Shared data SRAM.** The scalar core's own loads/stores use the `host_*` port, which is granted whenever the
SIMD LSU is idle. Read data returns one cycle after the grant.

**Reset.** `rst_n` is asynchronous and active low. It clears FIX and the pending-load state. The PR files
and the SRAMs have no reset, so software writes them before reading.

## Module map (`rtl/`)

| Module | Role |
|---|---|
| `pqc_pkg` | types (`vec320_t`, `dec_t`, …), opcode constants, ρ-offset table, lane-slot mapping |
| `pqc_simd_top` | top: fetch, two decoders, issue logic, register files, PALU, LSU, both SRAMs |
| `pr_regfile` | PR1..PR5: 16 × 64 bit each, 6 row-wide read ports, 2 masked write ports |
| `fix_regfile` | FIX: 2 × 32 bit |
| `palu` | mode selection, operand pre-processing, result post-processing, write mask, bgeuv compare |
| `palu_lane` | one 32-bit core: add/sub/logic, modular add/sub, 32×32 multiply, shifts, compare |
| `shuffle_in`, `shuffle_out` | the two lane-permutation networks |
| `cbd_unit` | bit spreading and partial sums of cbd2/cbd3 |
| `keccak_unit` | the 320-bit Keccak instructions |
| `simd_decoder` | instruction → `dec_t` (operation, class, rows read/written, FIX/GPR use) |
| `dual_issue` | pairing rule and load-use interlock |
| `lsu128` | address generation, store data/byte enables, load write-back |
| `data_sram` | 64 kB, 128-bit word, synchronous read, byte enables |
| `instr_sram` | 40 kB as even/odd banks, two consecutive instructions per cycle |

## What follows the published design and what does not

**Taken from the published design:**
- the register-file sizes (5 × 16 × 64 bit, FIX 2 × 32);
- the 8/10-core PALU and the instruction list with its operands;
- the two shuffle orders;
- the CBD bit grouping;
- the ρ-offset table;
- the rs3 = rs1<<1 rule of `xorv3`;
- the field positions of `xornavi`/`shufflev`;
- the 128-bit load/store path to (PR1,PR2), (PR3,PR4) or PR5;
- the 64-bit fetch and the load/store + compute pairing rule;
- the 40 kB and 64 kB memories.

**This design's own choices:**
- **Encoding.** All opcode, funct3 and funct7 values.
- **Row numbers.** The use of bit 4 of the register field to pick the half of a row for `lv`/`sv`. The fixed
  rows 11, 12 and 13 used by `xorv3`'s partners and `xornavi`.
- **`xornavi` lane gather.** Chosen so that π is absorbed. It was verified against a reference permutation.
- **Timing.** The timing described above: single-cycle compute, one-cycle load latency and the load-use
  interlock.
- **No pipeline registers on the SIMD path.** The published pipeline has ID/EX and EX/WB registers. This RTL
  reads, executes and writes back a SIMD computation in its issue cycle, which matches the throughput of a
  staged pipeline with full forwarding. It does not match that pipeline's clock period.
- **Dependency check.** Dependencies are checked on whole rows.
- **Arbitration.** The host/LSU arbitration of the data SRAM.
- **`bgeuv` uses ≥.** Its description says "greater than", but its name and its use in rejection sampling
  (reject a value ≥ k·q) call for ≥.
- **Modular add/subtract inputs.** These are specified here for inputs in [0, q). The published text
  assumes inputs in (−q, q), but its datapath applies a single conditional correction, which reduces only one
  side. Here, addition subtracts q when a + b ≥ q, and subtraction adds q when a − b < 0.
- **Lane resources.** The published design has three core types:
  - cores 0–4 have a 64-bit rotator, a multiplier, a carry-save adder and two adders;
  - cores 5–7 have the same without the rotator;
  - cores 8–9 have only a carry-save adder.

  Here, the eight arithmetic lanes are identical. The Keccak instructions use a separate unit with its own
  rotators and XOR/AND logic, so no units are shared. Every instruction computes the same result either way.
- **Storage and clocking.** The register files are flip-flops where the published chip uses latches. Neither
  clock gating nor the 200/500 MHz timing closure of the published 28 nm implementation is modelled.

## Verification (`tb/`)

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog. References are written independently of the RTL.
`tb/pqc_asm_pkg.sv` holds:
- the instruction encoders;
- a bit-exact Keccak-f[1600] model (round constants from the LFSR definition, ρ offsets from the (x,y) walk);
- Montgomery helpers.

Highlights:
- **`tb_pqc_simd_top`** is the end-to-end test. It runs at the default sizes, and the testbench plays the
  scalar core. It runs, and checks against references:
  - a full Keccak-f[1600] permutation (cycle budget ≤ 404);
  - a Kyber NTT butterfly with dual-issued loads and a load-use stall;
  - `addvmt`, `subvti` and `cbd2`;
  - two `bgeuv` branches, one taken and one not.

  It also counts dual issues, single issues, stalls, taken and not-taken branches and host accesses, and
  fails if any of them never happens.
- **`tb_ntt_workload`** runs the Dilithium and Kyber NTTs described above. It checks each against the
  1750-cycle budget; for Kyber the budget covers both halves.
- **`tb_pqc_pkg`** checks the rotation table against the Keccak ρ offsets, which it derives from the (x, y)
  walk of the Keccak definition.
- **`tb_keccak_unit`** runs all 24 rounds of the permutation through the unit's instructions, plus random
  single-instruction checks.
- **`tb_palu`** checks the Montgomery sequence for q = 3329 and q = 8380417, and every other instruction class.
- **`tb_dual_issue`** compares the issue decision with a reference model over 20 000 random instruction pairs.
- **`tb_lsu128`** checks the LSU against a byte-level memory model.

To run one testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/pqc_pkg.sv tb/pqc_asm_pkg.sv rtl/*.sv \
          tb/tb_pqc_simd_top.sv --top-module tb_pqc_simd_top -o sim
./obj_dir/sim
```

Replace the testbench name to run any other. Every testbench finishes in seconds.

## Limits

- **The scalar core is not included.** Complete Kyber or Dilithium runs therefore cannot be simulated here.
  Only the kernels above have been exercised: the Keccak permutation, the forward NTTs, one butterfly with
  the shuffled variants, `cbd2` and `bgeuv`. The INTT, polynomial multiplication and the sampling loops are
  not simulated as programs.
- **Memory sizes.** The published program sizes (24–40 kB of code) fit the 40 kB instruction SRAM. The largest
  is 39.8 kB, which leaves about 200 bytes. Their data fits the 64 kB data SRAM.
- **Alignment.** Misaligned SIMD loads/stores are not supported. Assertions in `lsu128` flag them in simulation.
- **Interrupts and exceptions** in the middle of a dual-issued pair are not modelled.
