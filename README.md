# TinyMIPS: a two-bus, multi-cycle MIPS subset

TinyMIPS runs eight instructions of the 32-bit MIPS instruction set: `addu`, `subu`, `lw`,
`sw`, `j`, `jr`, `beq` and `bltz`. That is enough to write loops over arrays in memory. The
processor is built the classic textbook way, as a **datapath** and a **controller**:

- The datapath is a small set of storage elements and function units. They are the PC, the
  instruction register (IR), a 32-entry register file, a sign extender and one adder.
- Everything moves between them over just two shared buses: an address bus **A** and a
  data bus **D**.
- Each transfer happens because one named *control point* is asserted, such as `pc2A`
  ("PC drives A"), `m2D` ("memory drives D") or `ld_reg` ("register file loads D").
- The controller is a three-state FSM. Each cycle it chooses which control points to
  assert, based on the current instruction and two conditions reported by the datapath.

Every instruction is written as a register transfer, for example
`R[rt] := Mem[R[rs] + signEx(im16)]`. Implementing an instruction means finding the set of
control points that makes that transfer happen in one clock cycle on this datapath.

```
             +--------------------------- RAM (program + data) --------+
             |  addr <- A bus        data <-> D bus      wrt, m2D       |
             +---------------------------------------------------------+
  A bus  ====#==========================================================  <- pc2A (PC), s2A (sum)
  D bus  ====#==========================================================  <- m2D (RAM), b2D (R[rt]),
             |         |            |                                        s2D (sum), i2D (IR)
        next-PC logic  IR        register file                 adder unit
        (+4, ||, D, +)  |       A=R[rs]  B=R[rt]      A + (R[rt] | signEx(im16)), optional ~B+1
             |          |       write R[rt|rd] := D
            PC       op/funct/rt ----------> controller FSM <---- eq, neg (branch comparator)
```

## Instruction set and encoding

| instruction | register transfer | encoding (standard MIPS) |
|---|---|---|
| `addu rd, rs, rt` | R[rd] := R[rs] + R[rt] | op 0x00, funct 0x21 |
| `subu rd, rs, rt` | R[rd] := R[rs] - R[rt] | op 0x00, funct 0x23 |
| `lw rt, im(rs)` | R[rt] := Mem[R[rs] + signEx(im16)] | op 0x23 |
| `sw rt, im(rs)` | Mem[R[rs] + signEx(im16)] := R[rt] | op 0x2b |
| `j addr` | PC := PC[31:28] &#124;&#124; addr &#124;&#124; 00 | op 0x02 |
| `jr rs` | PC := R[rs] | op 0x00, funct 0x08, rt = 0 |
| `beq rs, rt, im` | PC := (R[rs] == R[rt]) ? PC + signEx(im16) : PC + 4 | op 0x04 |
| `bltz rs, im` | PC := (R[rs] < 0) ? PC + signEx(im16) : PC + 4 | op 0x01, rt = 0 |

The field layout is the usual MIPS one:
- R format: op[31:26] rs[25:21] rt[20:16] rd[15:11] shamt[10:6] funct[5:0].
- I format: op, rs, rt, im16[15:0].
- J format: op, addr[25:0].

Three rules follow the register transfers as written and differ from production MIPS:

- **Branch targets are byte offsets from the branch itself.** The target is
  `PC + signEx(im16)`. PC is the branch's own address, and the offset is not multiplied by 4.
  A MIPS assembler would emit `(target - (PC+4)) / 4`, so branch offsets must be encoded
  by hand or by a patched assembler.
- **There are no delay slots.** The instruction after a jump or a taken branch does not run.
- **Every other encoding is a no-op.** It takes three cycles and only advances the PC.

R0 always reads 0, and writes to it are dropped. Only whole words are loaded and stored.
The two low address bits are ignored, so misaligned addresses are rounded down.

## The buses and their drivers

| bus | driver | control point | used by |
|---|---|---|---|
| A | PC | `pc2A` | instruction fetch |
| A | adder sum | `s2A` | lw/sw effective address |
| D | RAM read word | `m2D` | fetch, lw |
| D | register port B (R[rt]) | `b2D` | sw store data |
| D | adder sum | `s2D` | addu/subu result, jr target |
| D | IR | `i2D` | j address field, branch offset |

In the original drawing the bus drivers are tri-state. Here each bus is an AND-OR
multiplexer (`tinymips_bus`), which is friendlier to synthesis and to two-state simulation.
Assertions in `tinymips_datapath` check that no bus ever has two drivers in the same cycle.
If no driver is enabled, a bus reads 0.

The D bus is what everything loads from:
- the IR (`ld_ir`);
- the register file's write port (`ld_reg`, at index rt when `rt_sel` is high, else rd);
- the RAM's write port (`wrt`);
- the next-PC logic.

The register file's read ports are wired straight to IR.rs (port A) and IR.rt (port B).

The adder unit (`tinymips_alu`) works like this:
- Operand A is always R[rs].
- `sx_sel` picks operand B: R[rt], or the sign-extended immediate.
- `comp` inverts operand B and also drives the carry-in. So the same adder produces A + B
  or A - B (A + ~B + 1).

The next-PC multiplexer (`tinymips_pc_unit`, select `npc_sel`) has four inputs:
- PC + 4;
- the jump concatenation PC[31:28] || D[25:0] || 00;
- the D bus itself;
- PC + signEx(D[15:0]).

The jump and branch inputs take their fields from D, not straight from the IR. The IR
reaches them by driving the D bus (`i2D`).

## Sequencing: what happens in each cycle

The controller has three states: FETCH, EXEC and INCPC. An instruction retires in its
last cycle, when the `done` output pulses.

| instruction | FETCH | EXEC | INCPC | cycles |
|---|---|---|---|---|
| all | `pc2A m2D ld_ir` (IR := Mem[PC]) | | | |
| addu | | `s2D ld_reg` | `ld_pc` (PC+4) | 3 |
| subu | | `comp s2D ld_reg` | `ld_pc` | 3 |
| lw | | `sx_sel s2A m2D rt_sel ld_reg` | `ld_pc` | 3 |
| sw | | `sx_sel s2A b2D wrt` | `ld_pc` | 3 |
| j | | `i2D ld_pc npc_sel=JUMP` | | 2 |
| jr | | `s2D ld_pc npc_sel=DBUS` | | 2 |
| beq | | `i2D ld_pc npc_sel = eq ? BRANCH : INC` | | 2 |
| bltz | | `i2D ld_pc npc_sel = neg ? BRANCH : INC` | | 2 |
| other | | nothing | `ld_pc` | 3 |

Some points that are easy to miss:

- **lw uses both buses in one cycle.** The sum drives A and the RAM's word comes back on
  D, into register rt. This is why the RAM read is combinational. Instruction fetch relies
  on it too.
- **jr goes through the adder.** The only path from a register onto D, other than port B,
  is the adder. So jr computes R[rs] + R[rt], puts it on D and loads the PC from D. That is
  correct because jr's rt field is 0, and R0 is 0. A hand-made jr with a non-zero rt field
  would jump to R[rs] + R[rt].
- **Branches decide within the cycle.** The comparator (`tinymips_branch_cmp`) looks at the
  two register read ports during EXEC:
  - `eq` means R[rs] == R[rt];
  - `neg` is R[rs]'s sign bit.

  `npc_sel` is the only control output that depends on these datapath conditions. All other
  outputs depend only on the state and the instruction.
- **PC + 4 is a cycle of its own** for instructions that do not load the PC in EXEC. It
  cannot overlap the next fetch, because the fetch needs the updated PC.

## Modules

| module | role |
|---|---|
| `tinymips_pkg` | shared types: `ctrl_t` (all control points), `npc_sel_t`, `state_t`, opcodes |
| `tinymips_top` | controller + datapath + RAM |
| `tinymips_controller` | the FSM above |
| `tinymips_datapath` | PC unit, IR, register file, rt/rd write-select mux, sign extender, adder unit, comparator, A and D buses |
| `tinymips_pc_unit` | PC register and next-PC multiplexer |
| `tinymips_ir` | instruction register and field split |
| `tinymips_regfile` | 32 x 32 registers, 2 read ports, 1 write port, R0 = 0 |
| `tinymips_sext` | 16-to-32-bit sign extension |
| `tinymips_alu` | operand-B mux, complementer, adder with carry-in |
| `tinymips_branch_cmp` | `eq` and `neg` conditions |
| `tinymips_bus` | an N-driver shared bus |
| `tinymips_ram` | unified program/data RAM: combinational read, clocked write |

Top-level parameters:
- `RAM_AW` (default 30) sets the number of byte-address bits the RAM decodes. The default
  gives 2^28 words (1 GiB). The architecture addresses 2^32 bytes, but 30 bits is the
  largest RAM array Verilator accepts. Higher address bits are ignored, so memory repeats.
- `RESET_PC` (default 0) is the address of the first instruction fetched.

Reset (`rst_n`, active low, asynchronous) does three things:
- clears the PC to `RESET_PC`;
- clears the IR and all registers;
- puts the controller in FETCH.

RAM contents are not reset. Load them before releasing reset. The testbenches do this by
writing `dut.u_ram.mem[...]` hierarchically.

## Simulating

Every file is one module or package, named after it. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/tinymips_pkg.sv \
          tb/tb_tinymips_top.sv --top-module tb_tinymips_top -o sim
./obj_dir/sim
```

Run any other testbench the same way by swapping the testbench file and top-module name.
Each testbench prints `TB_RESULT checks=N failures=M` and stops.

The top-level test at the default 1 GiB RAM needs about 1 GB of host memory and takes a
few seconds. Most of that time goes into initialising the array. For a smaller model, give the
`tinymips_top` instance a smaller `RAM_AW`, for example `#(.RAM_AW(16))`. The testbench's
`RAM_AW` localparam must match.

## Verification

- **`tb_tinymips_top`** runs the whole processor at its default sizes on a program that:
  - sums a random array with a `lw`/`addu`/`subu`/`beq`/`j` loop, then stores the sum;
  - takes and falls through `bltz`;
  - writes R0;
  - jumps through a loaded address with `jr`;
  - uses a negative load offset.

  An instruction-set model in the testbench steps once per retired instruction. After every
  instruction the testbench checks:
  - the fetched word, the PC and all 32 registers;
  - every stored word;
  - the cycle count (3 or 2).

  It also fails if any instruction kind, either branch outcome or any bus driver was never
  exercised.
- **`tb_tinymips_random`** runs ten random 200-instruction programs on a 4 KiB RAM. The
  programs mix `addu`, `subu`, `lw`, `sw`, `beq`, `bltz` and forward `j`. The testbench
  makes the same per-instruction comparisons with its reference model.
- **One self-checking testbench per module.** The controller's test compares every cycle's
  control points with a hand-written table for each instruction, including both branch
  outcomes and undefined encodings. The datapath's test plays the controller's role cycle
  by cycle.
- **Each test has been shown to fail** against a deliberately broken copy of its module.
  Examples: zero extension instead of sign extension, R0 made writable, a missing
  `rt_sel`, swapped branch conditions.

## Limits and departures

- Only the eight TinyMIPS instructions exist. These are not implemented:
  - the rest of the MIPS integer set: logic ops, `slt`, shifts, immediates, byte and
    halfword accesses, `jal`/`jalr`, the other branches;
  - the HI/LO registers and the floating-point registers.
- There are no exceptions, interrupts or overflow traps. `addu`/`subu` wrap, as they do on
  MIPS.
- The RAM has a combinational read. A real SRAM macro with a registered read would need an
  extra wait cycle in FETCH and in lw's EXEC.
- Branch-offset scaling and the missing delay slots, as described above.
- Synthesise the processor with the RAM mapped to a memory macro, or with a small
  `RAM_AW`. A generic synthesis flow that tries to build the default 1 GiB array out of
  logic runs out of memory.
