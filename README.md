# A RISC-V core with a Kogge-Stone / Galois-field ALU

The execute stage of a processor is dominated by its adder: a ripple-carry
adder needs time proportional to the word width, because every carry waits
for the one below it. This design replaces the adder of a small 32-bit RISC-V
(RV32I) core with a **Kogge-Stone parallel-prefix adder**, whose carries
settle in log2(N) levels, and adds a second arithmetic unit next to it, a
**GF(2^32) Galois-field multiplier**, for the carry-free multiplications used
in error-correcting codes and cryptography. Both sit inside the core's ALU;
software reaches the multiplier through one custom instruction, `GFMUL`.

Everything is synthesizable SystemVerilog-2017. The two arithmetic blocks are
parameterised and were verified at 4, 8, 16 and 32 bits.

## Block structure

```
riscv_core
├── control_unit      stage sequencer + decoder, drives RCL / MCL / ALUCL / BUCL
├── datapath          pc, ir, A, B, ALU-out, MDR registers; immediates; load/store lanes
│   ├── regfile       32 x 32, x0 = 0
│   ├── alu           RV32I operations + GFMUL
│   │   ├── ks_adder  (N = 32) add, sub, slt, sltu
│   │   └── gf_mult   (M = 32) GF(2^32) product
│   ├── ks_adder      pc + 4
│   └── ks_adder      pc + immediate (branch / JAL target)
└── mem_unit          4 KiB, instructions and data, plus a host port
```

The memory's write strobe (`ctrl.mcl.we`) goes from the control unit
straight to `mem_unit`. The data path supplies the address, the
lane-aligned store data and the byte enables.

`rv_pkg` holds the shared types: the ALU operation enum, the stage enum, the
four control-line structs and the default field polynomials.

## The Kogge-Stone adder (`ks_adder`)

The adder has three sections.

1. **Pre-processing.** For each bit it forms propagate `p_i = a_i ^ b_i`
   and generate `g_i = a_i & b_i`.
2. **Prefix (carry look-ahead) network.** It has `log2(N)` levels. At level
   `l`, every bit `i >= 2^l` merges its group `(G, P)` with the group `2^l`
   bits below:

       G_new = G_hi | (P_hi & G_lo)
       P_new = P_hi & P_lo

   Bits below `2^l` pass through unchanged. After the last level, `G` of bit
   `i` is the carry out of bit `i`. Every bit position gets a cell at every
   level where it has a partner. That is what makes Kogge-Stone the fastest
   prefix adder: the depth is minimal and the fan-out is 2. It also makes it
   the largest: `N*log2(N) - N + 1` cells, 129 for N = 32.
3. **Post-processing.** Each sum bit is `sum_i = p_i ^ c_(i-1)`.

The carry-in is folded into bit 0's generate (`g_0 | p_0 & cin`), so the
prefix tree stays unchanged. The carry-out is the final `G` of the top bit.
The core needs these two ports: the ALU subtracts as `a + ~b + 1` on the same
adder and reads its compares from the result. `SLTU` is "no carry out".
`SLT` is the sign of the difference XOR the signed overflow.

## The Galois-field multiplier (`gf_mult`)

This is the block that is least like ordinary arithmetic. An element of
GF(2^M) is an M-bit vector of polynomial coefficients over GF(2). Adding two
elements is XOR. Multiplying them is a polynomial product taken modulo an
irreducible polynomial `p(x)` of degree M. No carries are involved anywhere.

The block works in two steps.

1. **Polynomial product.** Each partial product is an AND, `a_i & b_j`. The
   M rows `a & {M{b_j}}`, shifted by `j`, are summed with XOR into
   `d(x) = a(x) b(x)`. `d(x)` has 2M-1 bits, so its degree is at most 2M-2.
2. **Reduction.** The loop walks from coefficient `2M-2` down to `M`. Each
   time coefficient `k` is set, `p(x)` shifted left by `k-M` is XORed in.
   This clears bit `k` and changes only bits below it. The low M bits that
   remain are `a(x) b(x) mod p(x)`.

A 4-bit worked example: `d = X6..X0`. Subtract `p` aligned under `X6..X2`,
which gives `X'5..X0`. Subtract `p` under `X'5..X1`, which gives `X''4..X0`.
Subtract `p` once more under `X''4..X0`, which leaves `R3..R0`.

Both loops unroll into a fixed network of AND and XOR gates. The block is
combinational and finishes in one ALU cycle.

`POLY` holds the low M coefficients of `p(x)`; the `x^M` term is implied. By
default, `rv_pkg::gf_default_poly` selects a primitive polynomial with few
terms:

| M  | p(x)                         | `POLY`        |
|----|------------------------------|---------------|
| 4  | x^4 + x + 1                  | `4'h3`        |
| 8  | x^8 + x^4 + x^3 + x^2 + 1    | `8'h1D`       |
| 16 | x^16 + x^12 + x^3 + x + 1    | `16'h100B`    |
| 32 | x^32 + x^22 + x^2 + x + 1    | `32'h00400007`|

For other widths, pass `POLY` yourself. An elaboration-time assertion
rejects a polynomial with no constant term, because such a polynomial is
divisible by x and so is not irreducible. The polynomials are this design's
choice. For another field, such as AES's GF(2^8) with `x^8+x^4+x^3+x+1`,
set `POLY = 8'h1B`.

## The core

### Stages and timing

Each instruction goes through fetch, decode, execute, memory and write-back,
one clock per stage. Only one instruction is in flight at a time, so there
are no hazards, forwarding or stalls. Stages an instruction does not need are
skipped:

| instruction class                          | stages    | clocks |
|--------------------------------------------|-----------|--------|
| OP, OP-IMM, LUI, AUIPC, JAL, JALR, GFMUL   | F D E W   | 4      |
| loads                                      | F D E M W | 5      |
| stores                                     | F D E M   | 4      |
| branches, FENCE                            | F D E     | 3      |
| ECALL, EBREAK, unknown encoding            | F D → HALT| 2      |

The work done in each stage:

- **Fetch:** the memory is addressed by `pc` and the word is loaded into
  `ir`.
- **Decode:** `rs1` and `rs2` are read into A and B.
- **Execute:** the ALU result is loaded into ALU-out. A branch decides here,
  from the ALU's `zero` flag or result bit 0, and writes the PC.
- **Memory:** the memory is addressed by ALU-out. A store writes. A load
  aligns and extends the data into MDR.
- **Write-back:** ALU-out, MDR or `pc+4` goes to `rd`. The PC takes `pc+4`,
  the JAL target `pc+imm`, or the JALR target `ALU-out & ~1`.

### Control lines

The control unit drives the data path and memory through four bundles
(`rv_pkg::ctrl_t`). All of them are combinational functions of the stage
register and `ir`.

| bundle  | fields                                                        |
|---------|---------------------------------------------------------------|
| `rcl`   | register loads: `ir_we`, `ab_we`, `aluout_we`, `mdr_we`, `rf_we`, `wb_sel` |
| `mcl`   | memory access: `we`, `size`, `load_unsigned`                  |
| `alucl` | `op`, A source (rs1/pc), B source (rs2/imm), immediate format |
| `bucl`  | bus control: address source (pc/ALU-out), `pc_we`, `pc_sel`   |

### Instruction set

The core implements all of RV32I except the following:

- FENCE is a no-op.
- ECALL and EBREAK halt the core.
- There are no CSRs, interrupts or traps.
- An unknown encoding halts the core with `illegal` set.
- Misaligned halfword and word accesses are not trapped. The byte lanes wrap
  inside the addressed word.

One custom instruction is added in the custom-0 opcode space:

    GFMUL rd, rs1, rs2    opcode 0001011, funct3 000, funct7 0000000
    rd = rs1 * rs2 in GF(2^32) mod x^32 + x^22 + x^2 + x + 1

### Memory and the host port

`mem_unit` is a single 4 KiB (`MEM_BYTES`) memory for code and data. It is
organised as 32-bit words with byte strobes. Reads are combinational and
writes happen on the clock edge. Addresses wrap modulo the size.

The host port (`host_we/addr/wdata/rdata`) reads and writes whole words at
any time. To run a program:

1. Hold `rst_n` low and write the program from address 0.
2. Release reset.
3. Wait for `halted`.
4. Read the results back through the host port.

Registers reset to zero; memory contents do not.

## Where this design departs from a textbook or leaves choices open

These parts follow the usual structure of such a design:

- the three-section Kogge-Stone adder;
- the AND/XOR product with top-down reduction;
- the five named stages;
- the control unit / data path / memory split, and the four control-line
  bundle names.

These are this design's own choices:

- **Multi-cycle instead of pipelined.** The five stages run in sequence
  rather than overlapping. This trades throughput (3–5 clocks per
  instruction) for a core with no hazard logic. Pipelining it means adding
  stage registers, forwarding and stall logic; `alu`, `ks_adder` and
  `gf_mult` carry over unchanged.
- **Extra adders.** `pc+4` and the branch/JAL target use two more
  `ks_adder` instances, so every adder in the core is a Kogge-Stone adder.
- **The `GFMUL` encoding and the field polynomials.**
- **Memory size, single shared memory and host port.**

No timing or power figures are claimed here. The RTL has no clock-gating or
other low-power features beyond what a synthesis tool infers.

## Simulating

Each testbench in `tb/` checks itself. It prints one line,
`TB_RESULT checks=N failures=F`, then calls `$finish`. A watchdog ends a run
that hangs. Example with Verilator 5:

    verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl \
        rtl/rv_pkg.sv tb/tb_riscv_core.sv --top-module tb_riscv_core
    ./obj_dir/Vtb_riscv_core

| testbench         | what it checks |
|-------------------|----------------|
| `tb_ks_adder`     | N = 4, 8, 13, 16, 32: full carry chains, every single-bit carry source, and 3000 random triples against `a+b+cin` |
| `tb_gf_mult`      | M = 4, 8, 16, 32 against a bit-serial multiply; `x^M` reduction by hand; x has order 15 and 255 in GF(2^4) and GF(2^8), so those polynomials are primitive |
| `tb_alu`          | every operation on corner operands and random operands, against SystemVerilog operators and a bit-serial GF multiply |
| `tb_regfile`      | reset, x0, random traffic against a shadow copy |
| `tb_mem_unit`     | host fill, byte-strobed writes, wrap-around |
| `tb_control_unit` | the stage sequence, the clock count and the control lines of each instruction class; branches both ways; halts |
| `tb_datapath`     | the testbench plays the control unit and runs one instruction of each kind |
| `tb_riscv_core`   | see below |

`tb_riscv_core` runs a 62-instruction program at the default size. The
program includes carries, overflow, every branch kind both ways, a GFMUL
loop, byte, half and word memory accesses, JAL, JALR and AUIPC, and ends in
ECALL. An instruction-set model in the testbench runs the same program. The
test then compares all registers, the data area and the exact clock count
with the model, and checks a few results worked out by hand. It fails if any
stage, taken or untaken branch, load, store, GFMUL, adder carry-out, signed
overflow or jump never occurred.

To write your own programs, the assembler helper functions at the top of
`tb_riscv_core.sv` (`r_t`, `i_t`, `s_t`, `b_t`, `u_t`, `j_t`) build the
encodings.
