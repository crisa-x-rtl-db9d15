# CrISA-X execute-stage extension for lightweight symmetric cryptography

Software versions of the NIST lightweight-cryptography finalists spend most of their
time in a few permutations: Ascon-p, Keccak-f[200], Xoodoo, Sparkle, the TinyJAMBU and
Grain shift registers, and the GIFT and PHOTON S-box layers. A 32-bit embedded core runs
each of these as long chains of XOR, AND, NOT and rotate instructions. Each instruction
does little work, and the state is shuffled between memory and a small register file.

The extension in this repository attacks that cost at three levels of specialisation.
Each level is a class of instructions, and all three share one large register file.

| class | what one instruction does | latency | examples |
|---|---|---|---|
| Generic-Atomic (GA) | a fused bitwise expression on up to five 32-bit registers | 1 cycle | `XORNOTAND`, `XORROT`, `XOR5`, `ROTOR`, `SWAPMOVE` |
| Specific-Block (SB) | one layer or step of one algorithm, on a window of registers | 2 cycles | Ascon S-box layer, Keccak theta, Xoodoo chi, GIFT S-box |
| Specific-Procedure (SP) | a whole permutation, or many rounds of it | 2 cycles | Ascon p12, Keccak-f[200], Xoodoo[12], Sparkle-256 |

GA instructions are algorithm-agnostic. The SB and SP instructions are per algorithm and
keep the whole cipher state in registers. A single SP instruction replaces the full
permutation loop.

The RTL models the part of the processor that the extension adds: the execute stage
with its units, a 64 x 32-bit extended register file, two load/store units and a 16 KiB
dual-ported data memory. The base core is not included. It is assumed to fetch and
decode a three-slot VLIW bundle, and to move data into and out of the extended
registers over a side port.

## The bundle and the slots

`crisax_top` takes one decoded bundle per cycle (`bundle_t`, three `slot_t`). Each slot
is of one kind:

| slot | may carry |
|---|---|
| 0 | a load or store (`LD32`, `ST32`, `LD128`, `ST128`) through LSU 0 |
| 1 | a load or store through LSU 1, or one GA instruction |
| 2 | one GA instruction, or one SB/SP instruction |

Assertions in the top check these slot rules. A `slot_t` holds the instruction kind,
the three opcode fields (`mop`, `gop`, `bop`), two destination register indices, five
source register indices and four 32-bit immediates.

- **GA:** uses `rs[0..4]`, `rd[0..1]` and `imm[0..3]`.
- **Memory:** uses `rs[0]` as the address register, `imm[0]` as the byte offset,
  `rd[0]` as the first load destination and `rs[1]` as the first store source.
- **SB/SP:** uses `rd[0]` as the first register of its window and `imm[0]` as a round
  index or round count.

There is no binary instruction encoding in this design. A front end that decodes a real
instruction format would drive `bundle_t`.

## Register windows

SB and SP instructions do not name their operands one by one. They name the first
register of a window of consecutive registers, read the whole window in the issue cycle,
and write the result back over it. The register file therefore has 23 read ports:
1 for the host, 5 for each of slots 0 and 1, and 12 for the slot-2 window. It has 25
write ports: 1 host, 4 GA results, 8 load words and 12 window words. Every instruction
of a bundle reads and writes its registers in one cycle.

| unit | window | layout |
|---|---|---|
| Ascon | 10 | x0..x4 bit-interleaved: even bits of x_i in register 2i, odd bits in 2i+1 |
| Keccak-f[200] | 7 | lane x+5y in byte (i mod 4) of register i/4; the top 24 bits of the 7th register pass through |
| Xoodoo | 12 | lane x of plane y in register 4y+x |
| TinyJAMBU | 5 or 8 | state s0..s3 (s0 = state bits 0..31), then one key word (`ROTORBLOCK`) or four (`STATE_UPDATE`) |
| GIFT | 4 | four bit slices; `SWAPMOVE` uses {a, b, mask, shift} |
| Sparkle-256 | 8 | x0, y0, x1, y1, x2, y2, x3, y3 |
| Grain-128AEAD | 5 or 9 | LFSR words 0..3, NFSR words 4..7 (bit 0 is the oldest), keystream word 8 |
| PHOTON | 4 or 8 | two groups of four bit-planes; group g holds rows 4g..4g+3, bit j of cell (4g+r, c) is bit 8r+c of register 4g+j; the blocks take one group, the permutation both |

## Two-cycle instructions and the interlock

GA units are combinational. Their results are written at the end of the issue cycle
(E1), so the next bundle can use them without waiting.

Each SB/SP unit has two halves separated by one pipeline register. The first half runs
in E1 and the second half in E2. The result is written at the end of E2. Procedures
split their rounds evenly between the two halves:

| procedure | rounds in E1 | rounds in E2 |
|---|---|---|
| Ascon p12 | 0-5 | 6-11 |
| Keccak | 0-8 | 9-17 |
| Xoodoo | 0-5 | 6-11 |
| Sparkle | steps 0-4 | steps 5-9 |
| PHOTON-256 | 0-5 | 6-11 |
| TinyJAMBU | half of the 128-step blocks | the other half |
| Grain | clocks 0-15 | clocks 16-31 |

Block steps run in one half and pass through the other. Loads also return in E2,
because the data memory reads synchronously.

Because the units are pipelined, independent two-cycle instructions can be issued in
consecutive cycles. There is no forwarding. The top keeps a 64-bit mask of the
registers still waiting for an E2 write. A bundle that reads or writes one of those
registers is held for one cycle with `bundle_ready` low. This is the only stall in
the design. `busy` is high while such a write is pending.

Stores write the data memory at the end of E1. A load in the next bundle sees the
stored data.

## The algorithm units

All units share one interface. `in_valid`, `in_op`, `in_imm` and the window `in_st`
go in. `out_valid` and `out_st` come out exactly one cycle later.

- **`crisax_ascon_unit`.** Converts the interleaved window to five 64-bit words inside
  the unit; the conversion is wiring only.
  - `ASCON_NONLINEAR imm=r`: adds the constant of round r, then applies the S-box layer.
  - `ASCON_LINEAR`: the linear diffusion layer.
  - `ASCON_PERM imm=n`: the last n rounds, for p6, p8 or p12.
- **`crisax_keccak200_unit`.** Steps `KEC_THETA`, `KEC_RHO`, `KEC_PI`, and `KEC_CHI imm=r`
  (chi, then iota of round r). `KEC_PERM imm=n` runs the last n of the 18 rounds. The
  rho offsets and round constants are computed at elaboration from their definitions:
  the triangular numbers along the (x, y) → (y, 2x+3y) walk, and the degree-8 LFSR.
- **`crisax_xoodoo_unit`.** Steps `XOO_THETA`, `XOO_RHOWEST imm=r` (rho-west, then
  iota), `XOO_CHI` and `XOO_RHOEAST`. `XOO_PERM imm=n` runs the last n of 12 rounds.
- **`crisax_tinyjambu_unit`.** `TJ_ROTORBLOCK imm=j` advances the state 32 steps by
  rewriting word j from words j+1..j+3 (taps 47, 70, 85, 91) and one key word.
  `TJ_STATE_UPDATE imm=m` runs 128·m steps: m = 5 for 640 steps, m = 8 for 1024 steps.
- **`crisax_gift_unit`.** `GIFT_SBOX` is the bitsliced GIFT S-box on 32 cells in
  parallel. `GIFT_SWAPMOVE` is the two-word SWAPMOVE with a register mask and shift.
- **`crisax_sparkle_unit`.** `SPK_ARX imm=s` adds the step constants and applies the
  Alzette ARX-box to all four branches. `SPK_LINEAR` applies the Feistel linear layer.
  `SPK_PERM imm=n` runs n steps: 7 for the slim permutation, 10 for the big one.
- **`crisax_grain_unit`.** `GRAIN_BLOCKROTXOR` XORs the four 32-bit extractions of the
  keystream taps into an accumulator word. `GRAIN_KEYSTREAM` clocks the LFSR and NFSR
  32 times in keystream mode and collects the 32 output bits.
- **`crisax_photon_unit`.** `PHOTON_SBOX` applies the 4-bit S-box to the 32 cells of
  one register group in parallel. `PHOTON_SHIFTROR imm=g` rotates each row of group g
  left by its row index. `PHOTON_PERM imm=n` runs the last n of the 12 PHOTON-256
  rounds on all eight registers. Each round is AddConstant, SubCells, ShiftRows and
  MixColumnSerial. MixColumnSerial is eight applications of the serial matrix with
  last row (2, 4, 2, 11, 2, 8, 5, 6) over GF(2^4).
- **`crisax_ga_unit`** holds all the Generic-Atomic instructions. Its header lists
  their exact semantics. Two copies sit in the top, one for slot 1 and one for slot 2.

## Memory path

Each `crisax_lsu` turns a slot's address register plus offset into a line address and
word enables for one port of `crisax_dtcm`. The data memory has 1024 lines of 128 bits
(16 KiB) and two ports with per-word write enables, and it reads before writing.

- `LD128` and `ST128` move four consecutive registers in one access.
- `LD32` and `ST32` move one register.
- The low address bits are ignored: 4-byte alignment for 32-bit accesses, 16-byte for
  128-bit accesses.

## Files

| file | contents |
|---|---|
| `rtl/crisax_pkg.sv` | sizes, opcode enums, slot and bundle structs, window widths, unit selection |
| `rtl/crisax_top.sv` | slot decoding, interlock, register-file port map, unit instances, result write-back |
| `rtl/crisax_ext_regfile.sv` | 64 x 32 register file, 23R/25W |
| `rtl/crisax_ga_unit.sv` | Generic-Atomic unit |
| `rtl/crisax_*_unit.sv` | the eight algorithm units |
| `rtl/crisax_lsu.sv`, `rtl/crisax_dtcm.sv` | load/store unit and data memory |
| `tb/crisax_ref_pkg.sv` | reference models, written in a different form from the RTL |
| `tb/tb_*.sv` | one self-checking testbench per module |

The reference models are deliberately built differently from the RTL:

- Ascon works directly on interleaved words.
- Keccak uses literal offset and constant tables.
- TinyJAMBU and Grain are stepped one bit at a time.
- The S-boxes are table lookups.
- PHOTON uses the precomputed MixColumn matrix instead of the serial form.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. A watchdog ends
any run that hangs. With Verilator 5:

    verilator --binary --timing --assert rtl/crisax_pkg.sv tb/crisax_ref_pkg.sv \
        rtl/crisax_ascon_unit.sv tb/tb_crisax_ascon_unit.sv --top-module tb_crisax_ascon_unit
    ./obj_dir/Vtb_crisax_ascon_unit

For the whole design, list every `rtl/*.sv` file (package first) with
`tb/tb_crisax_top.sv`.

`tb_crisax_top` runs the top at its default size:

- It loads random states through the host port.
- It runs every unit, including Ascon p12, Keccak-f[200], Xoodoo[12], Sparkle-256 with
  10 steps, TinyJAMBU with 1024 steps, a Grain keystream word and the PHOTON-256
  permutation.
- It compares the whole register file against the reference models after each phase.

It also counts the mechanisms below. Any mechanism that never happens counts as a
failure:

- the one-cycle stall on a pending register;
- the result being invisible one cycle after issue and visible two cycles after;
- back-to-back issue of independent procedures;
- dependent GA instructions in consecutive cycles;
- 32- and 128-bit loads and stores on both slots;
- full three-slot bundles.

The unit testbenches check each instruction against the models for random states and
every round index. They also check the one-cycle output latency and back-to-back issue.

## Where this design departs from, or goes beyond, the source description

- **Operand counts.** The instruction table of the source gives smaller operand counts
  for several instructions than the windows used here:
  - Ascon blocks: 5 registers;
  - Keccak and Sparkle blocks: 4;
  - Xoodoo blocks: 3, and 6 for its procedure;
  - PHOTON S-box: 8, where this design uses one 4-register group.

  Here every SB/SP instruction reads and writes the whole algorithm state in one cycle.
  The window widths are in `blk_width()` in the package.
- **Block steps are whole-state steps.** For example, `KEC_PI` is a block instruction
  here, where the source does pi with register moves. Iota is folded into `KEC_CHI` and
  `XOO_RHOWEST`.
- **128-bit bus for every algorithm.** The source uses 128-bit loads and stores only
  for Grain and PHOTON. Here `LD128`/`ST128` are available to every algorithm.
- **Interlock instead of forwarding.** The host core of the source forwards results.
  This execute stage stalls a dependent bundle for one cycle instead.
- **Slot placement.** SB/SP instructions and the second GA unit are placed in slot 2.
  The two-register forms of `ROTOR` and `ROTXOR`, and the forms of `INTLV`, `DEINTLV`
  and `BSWAP`, are this design's.
- **Missing GIFT procedure.** GIFT's quintuple-round procedure (fixsliced GIFT-128) is
  not built. Only the GIFT S-box and SWAPMOVE blocks are.
- **No SKINNY-128-384+ unit.** Romulus has no SB/SP unit. Its GA instructions are
  covered by `crisax_ga_unit`.
- **Round counts come from the algorithm specifications.** Keccak-f[200] runs 18 rounds;
  any smaller count can be requested with the immediate.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `crisax_top` | `DTCM_BYTES` | 16384 | data memory size |
| `crisax_ext_regfile` | `NR`, `NRP`, `NWP` | 64, 23, 25 | registers, read ports, write ports |
| `crisax_dtcm` | `BYTES`, `DW` | 16384, 128 | size, line width |
| `crisax_keccak200_unit` | `ROUNDS` | 18 | rounds of the full permutation |
| `crisax_tinyjambu_unit` | `MAXBLK` | 8 | largest step count, in blocks of 128 |

The register count, data-memory size and bus width follow the source. The split of
every procedure into two equal halves is this design's choice.

## Size

Yosys generic synthesis of `crisax_top`, before technology mapping, gives about 32,600
coarse cells (many of them 8- to 384-bit wide operators) and 2,473 flip-flop bits. Of
those cells, about 23,000 belong to the unrolled 12-round PHOTON-256 procedure. There
are also 192,608 bits of memory arrays: the 16 KiB data memory, the register file and
constant tables. The longest combinational paths are in the procedures. Each
half of PHOTON-256 is six full rounds, and each half of TinyJAMBU is up to 512 steps of
its shift register. Sparkle and Grain also unroll long ARX and LFSR chains. The design has not been
timed against a clock target.
