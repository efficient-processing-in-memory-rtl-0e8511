# RISC-V processing-in-memory system

A small RV32I system in which simple arithmetic on memory operands is done
next to the data memory instead of in the core. A convolution written for an
unoptimising compiler spends most of its instructions moving operands: two
loads, one ALU instruction and a store per multiply or add. Here the two loads
and the ALU instruction become a single *PIM instruction*. The core issues it
as if it were a `lw`. The data-memory controller reads both operands in one
cycle from a dual-read-port SRAM, combines them in a small processing unit
(PU) and returns only the result to the core, which writes it to `rd` like
load data.

The core stays almost unchanged. A PIM control unit (PCU) in the decode and
execute stages recognises the new instructions. It hands the rest of the
pipeline the control word of a `lw`, and it produces the PIM command and two
addresses. No new pipeline stage is needed and a PIM instruction never stalls
more than a `lw` would.

## The PIM instructions

The PIM-type format keeps the I-type (load) positions of opcode, funct3, rd
and rs1. The 12-bit immediate is split into two signed 6-bit offsets:

```
 31      26 25      20 19   15 14  12 11   7 6       0
[  imm6 b  |  imm6 a  |  rs1  |funct3|  rd  | opcode  ]
```

| instruction                  | funct3 | result written to rd                    |
|------------------------------|--------|-----------------------------------------|
| `add.p  rd, a(rs1), b(rs1)`  | 000    | `M[rs1+a] + M[rs1+b]`                   |
| `mul.p  rd, a(rs1), b(rs1)`  | 001    | low 32 bits of `M[rs1+a] * M[rs1+b]`    |
| `slli.p rd, a(rs1), n`       | 010    | `M[rs1+a] << n[4:0]`                    |
| `addi.p rd, a(rs1), n`       | 011    | `M[rs1+a] + sext(n)`                    |

- The opcode is custom-0 (`0001011`). Other funct3 values are not PIM
  instructions and are reported as unknown.
- The offsets `a` and `b` count words: byte offset = `sext(imm6) * 4`.
  An offset can therefore reach -128 to +124 bytes from `rs1`. Both
  operands must lie in that window around the same base register.
- For `slli.p` and `addi.p`, field b carries the immediate `n`, not an
  address. `addi.p` sign-extends `n`. `slli.p` uses its low five bits.
- All PIM operands are aligned 32-bit words in the data memory. They never go
  to the peripheral range.

An example, with locals addressed from `x8` and `x9`:

```
mul.p x15, -32(x8), -56(x8)    # x15 = M[x8-32] * M[x8-56]
sw    x15, -40(x9)
add.p x15, -88(x9), -40(x9)    # x15 = M[x9-88] + M[x9-40]
sw    x15, -88(x9)
```

Without PIM, the same work takes eight more instructions: `lw, lw, mul` and
`lw, lw, add`.

## How a PIM instruction moves through the pipeline

This is the part of the design that takes the most care. The core has five
stages. Instruction and data SRAMs both have a registered read, so an address
presented in one cycle returns data in the next.

| cycle | stage   | ordinary `lw`                          | PIM instruction                                                        |
|-------|---------|----------------------------------------|------------------------------------------------------------------------|
| 1     | decode  | main decoder: load control word        | main decoder: *unknown*; PCU replaces the word by that of `lw` (`pipeCtrl_pim2lw`, lw flags raised) |
| 2     | execute | ALU forms `rs1+imm`; LSU sends it to SRAM port 1 | PCU (opcode/funct3/immediates registered from decode) forms `rs1+4a` and `rs1+4b` from the forwarded rs1 value; LSU sends them to ports 1 and 2 with `pim_en`, `pim_sel`, `pim_imm` |
| 3     | memory  | SRAM returns Q1; PU bypass mux passes Q1; LSU aligns and extends it | SRAM returns Q1 and Q2; the PU's phase registers now hold `pim_en`/`pim_sel`/`pim_imm` of cycle 2; the PU's ALU combines Q1 and Q2; the bypass mux selects the result |
| 4     | write-back | `rd` written                        | `rd` written                                                           |

The phase registers in the PU are what make this work: the command arrives
with the address, one cycle before the data. When `pim_en` was low, the bypass
mux passes Q1 unchanged, so ordinary loads see no difference. The product in
`mul.p` is the one long combinational path added to the memory stage.

Because the rest of the pipeline sees a PIM instruction as a `lw`, it follows
the same hazard rules. Its result can be forwarded from write-back. An
instruction that uses the result right away waits one cycle, exactly as after
a load. Independent PIM instructions issue one per cycle; the core testbench
checks that eight of them take eight cycles.

## Blocks

```
pim_soc                      top
├── rv32i_core               five-stage RV32I pipeline
│   ├── fetch                PC, next-address selection
│   ├── instr_decoder        fields and immediates
│   ├── control_logic        main decoder -> pipe_ctrl_t
│   ├── pcu                  PIM control unit (PIM Ctrl Gen + PIM Decoder)
│   ├── regfile              32 x 32, x0 = 0, write-through
│   ├── alu                  RV32I ALU + MUL, branch comparator
│   ├── hazard_unit          forwarding, load-use stall, flushes
│   └── lsu                  routing, byte enables, load alignment
├── sram_ctrl_imem           SRAM controller 1 (instruction side)
├── imem                     instruction SRAM, 4096 x 32
├── sram_ctrl_dmem           SRAM controller 2 (data side)
│   └── pim_pu               phase registers, PIM ALU, bypass mux
└── dmem                     data SRAM, 262144 x 32, two read ports
```

`pim_pkg` holds the shared types: opcodes, `pim_op_e`, `alu_op_e`, and
`pipe_ctrl_t` (the pipeline control word). Each file begins with a comment
describing the block's interface and timing.

### Core details

- **Fetch.** Fetch presents the *next* address to the instruction SRAM.
  During a stall it presents the current address again.
- **Branches and jumps.** These resolve in execute. A taken branch or jump
  flushes the two younger instructions; there is no prediction.
- **Forwarding.** Operands are forwarded into execute from memory (ALU and
  link results) and from write-back (all results, loads included).
- **Load-use.** A load or PIM instruction followed by a reader of its `rd`
  costs one stall cycle. This includes a store of the loaded value, because
  store data is needed in execute, when the SRAM write is issued.
- **MUL.** The `MUL` instruction of the M extension is decoded: the
  conventional code it is compared with uses it. Other M instructions are
  unknown.
- **Unknown instructions.** FENCE is a no-op. ECALL, EBREAK, CSR accesses
  and anything unknown pulse `illegal_instr` and retire as no-ops. There are
  no CSRs, no exceptions and no interrupts.
- **Alignment.** Accesses must be naturally aligned. An assertion in the LSU
  reports misaligned ones.

### Memory map and ports of the top

The system uses separate instruction and data address spaces.

- **Instruction space.** The byte address selects a word of `imem`. The core
  starts at `RESET_PC` (0).
- **Data space, bit 31 = 0.** Goes to `dmem`: bits `[19:2]` are the word
  address at the default size.
- **Data space, bit 31 = 1.** Goes to the peripheral port `p_*`. There,
  `p_req` is a single-cycle request with `p_we` and `p_be`, and `p_rdata` is
  sampled one cycle later.
- **Host ports.** `host_i_*` and `host_d_*` are word-addressed ports into the
  two memories. They take priority over the core, and read data arrives one
  cycle after the request. Hold `rst` while loading the instruction memory.
  This is where a system-bus bridge would connect.

## What is specified and what is chosen here

The following follow the description this design implements:

- the organisation: PCU in the core, PU in the data-side SRAM controller,
  dual-read-port data memory;
- the PIM-type field layout and the four operations;
- that a PIM instruction travels as a `lw`, with lw flags to keep it from
  being flagged as unknown;
- the PU's two phase registers, its ALU on Q1/Q2 and its bypass mux.

The following are choices made here:

- **Encoding.** The opcode and funct3 values.
- **Word-scaled offsets.** Offsets of -32 to -88 bytes are needed by the
  intended use, and a plain 6-bit byte offset cannot reach them.
- **Immediate transport.** A third phase register carries the `slli.p` and
  `addi.p` immediate to the PU.
- **Hazards.** The forwarding and stall policy, and branch resolution in
  execute.
- **Memory sizes.** 16 KiB of instruction memory and 1 MiB of data memory.
  The data memory holds a 224 x 224 x 3 image of 32-bit words, a 7 x 7 x 3
  kernel and the output.
- **Address map and host/peripheral ports.** These stand in for the
  system bus.
- **MUL.**
- **Fetch path.** Fetch drives SRAM controller 1 directly, not through the
  LSU. The LSU handles only data accesses.

The following are not built:

- the AXI4 bus and its interface;
- the peripherals (interrupt controller, SPI, UART, timer, GPIO);
- the "state" outputs of the SRAM controllers;
- a single-port-RAM variant that would take an extra cycle per PIM
  instruction.

The memories are behavioural arrays, not SRAM macros.

## Measured cycle counts

The test program is a convolution in locals-in-memory style, generated by
`tb/conv_prog_pkg.sv`. Each multiply-accumulate copies pixel and weight into
two locals. The program then either combines them with PIM instructions or
with `lw/lw/mul/sw` and `lw/lw/add/sw`. Loop counters and the output index
also live in memory, so `addi.p` and `slli.p` are used too. Cycles are
counted from reset release to the completion store.

| input          | kernel | PIM cycles | conventional cycles | reduction | data-memory requests, PIM / conventional |
|----------------|--------|-----------:|--------------------:|----------:|-------------------------------:|
| 224 x 224 x 3  | 3x3x3  | 29,768,666 | 36,520,574          | 18.5 %    | 14,045,941 / 16,707,277 (-15.9 %) |
| 224 x 224 x 3  | 5x5x3  | 76,860,320 | 95,107,120          | 19.2 %    | 37,316,401 / 44,576,401 (-16.3 %) |
| 224 x 224 x 3  | 7x7x3  | 145,044,358 | 180,069,546        | 19.5 %    | 71,143,429 / 85,115,485 (-16.4 %) |
| 32 x 32 x 3    | 3x3x3  | 543,770    | 667,070             | 18.5 %    | 256,501 / 305,101 (-15.9 %)    |
| 32 x 32 x 3    | 5x5x3  | 1,245,152  | 1,540,720           | 19.2 %    | 604,465 / 722,065 (-16.3 %)    |
| 32 x 32 x 3    | 7x7x3  | 2,063,302  | 2,561,514           | 19.4 %    | 1,011,973 / 1,210,717 (-16.4 %) |

A PIM request counts as one data-memory request, although it reads two
words.

`tb_conv_full` runs the first row. The 5x5x3 and 7x7x3 rows at full size come
from the same testbench with the kernel argument of `run` changed to 5 or 7
and the watchdog raised to 400,000,000 cycles; every output was checked. The
7x7x3 run takes about four minutes of simulation.

The reduction depends on the code. In this program, the copies into locals,
the loop overhead and the load-use stalls are the same in both versions. The
ideal case is three instructions becoming one, a saving of up to two thirds
of those instructions. Code that keeps more operands addressable from one base
register gains more.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. Build and run one with Verilator 5:

```
verilator --binary --timing --assert --top-module tb_pim_soc \
  -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/pim_pkg.sv tb/rv_asm_pkg.sv tb/conv_prog_pkg.sv tb/tb_pim_soc.sv
./obj_dir/Vtb_pim_soc
```

| testbench            | what it runs                                                                    |
|----------------------|---------------------------------------------------------------------------------|
| `tb_<block>`         | one block against a reference model (random and directed)                       |
| `tb_rv32i_core`      | directed program covering ISA, hazards, PIM instructions, peripheral port; checks back-to-back PIM issue and the one-cycle load-use stall |
| `tb_pim_soc`         | whole system at default sizes: 8x8x3 convolution, PIM and conventional, checks every output and that every mechanism occurred |
| `tb_conv_workload`   | 3x3x3, 5x5x3 and 7x7x3 kernels on a 32x32x3 input, both code versions (about 15 s) |
| `tb_conv_full`       | 224x224x3 input with a 3x3x3 kernel, both versions, default sizes (about 1 min) |

Test programs are built in the testbench from the encoder functions in
`tb/rv_asm_pkg.sv`. The data is generated with `$urandom`.

## Changing it

- **Memory sizes.** `pim_soc` parameters `IMEM_WORDS` and `DMEM_WORDS`
  (powers of two). The data map uses `[log2(DMEM_WORDS)+1:2]` of the byte
  address.
- **PIM opcode.** `OP_PIM` in `pim_pkg`, or the `PIM_OPCODE` parameter of
  `pcu`.
- **A new PIM operation.** Add a `pim_op_e` value, a case in `pim_pu`, and
  widen the funct3 check in `pcu` (it currently accepts funct3 000 to 011).
- **Offset scaling.** `pim_addr1` and `pim_addr2` in `pcu`.
