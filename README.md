# Object Coprocessor for an ARM7 core

Object-oriented code spends a lot of time on method calls. A virtual call has to:

- load the target instance's address (its *Self*);
- follow the pointer at that address to the class's Virtual Method Table (VMT);
- index the VMT to find the method;
- save the caller's Self and the return address;
- jump.

A return has to restore the caller's Self. Software can't tell whether a call stayed inside one instance or crossed to another, so every return restores Self from the stack, even when that's wasted work.

This design adds an **Object Coprocessor (OCP)** next to an ARM7 core. The core's instruction set gains seven *Object Instructions* (OIs): six method calls and one unified return. While an OI runs, the OCP does the memory work itself, on a bus the core is cut off from. At the same time it feeds the core a short, generated instruction sequence that ends in the jump. The OCP also counts how many calls are open inside the same instance. That lets the single return instruction, RETM, decide alone whether Self has to be restored.

The core is not part of the RTL. It is treated as a macrocell. Its bus and coprocessor handshake are ports of the top, and the testbenches drive them with a behavioural ARM7-class model.

## System organisation (`oo_system`)

```
            internal bus                        external bus
 ARM7 core ─────────────┬──[ ocp_separator ]──┬── mem_wait_ctrl ── memory / I/O
   cpi ──►              │                     │
   ◄── cpa, cpb    ┌────┴─────────────────────┴───┐
                   │  ocp (Object Coprocessor)    │
                   └──────────────────────────────┘
```

- **ocp_separator** connects or cuts the core's internal bus from the external bus. The design has no tri-states, so each direction is a multiplexer:
  - `drv_ext` lets the core's request through to the external bus; otherwise the OCP's own request goes out.
  - `drv_int` returns the external reply to the core; otherwise the OCP's reply goes back.
  - `bus_split` on the top is `!drv_ext`.
- **ocp** sits on both sides. While the bus is split:
  - it answers the core's internal bus itself;
  - it masters the external bus in its place.
- **mem_wait_ctrl** is the memory access controller. It adds `BASE_WAITS` (1) wait cycles to every external access, plus `extra_waits` (0–15, a port). An access therefore takes `1 + 1 + extra_waits` cycles with zero-wait memory. "1 wait state" in the tables below means `extra_waits = 0`.

Both busses use one struct pair from `ocp_pkg`:

- `bus_req_t {addr, wdata, mreq, rw, opc}`: `opc` marks an opcode fetch.
- `bus_rsp_t {rdata, ready}`.

A request is held until a cycle in which `ready` is high. The reply is combinational in that cycle.

## The Object Instructions

| OI | Call kind | New Self comes from | Target |
|---|---|---|---|
| METVM | virtual, other instance | memory (`LDR R10,...` ancillary) | VMT[index] |
| METVR | virtual, other instance | core register (`MOV R10,Rn` ancillary) | VMT[index] |
| METVI | virtual, same instance | unchanged | VMT[index] |
| METSM | static, other instance | memory | PC-relative |
| METSR | static, other instance | core register | PC-relative |
| METSI | static, same instance | unchanged | PC-relative |
| RETM  | unified return | restores the caller's Self if needed | R14 |

**Encoding.** Each OI is a CDP instruction to coprocessor 6:

- opcode1 holds the OI number (0–6).
- The 15-bit field `{CRn, CRd, opcode2, CRm}` holds the VMT index or the signed word offset of a static target. A static target is `OI address + 8 + 4*offset`.
- R10 is reserved as **RSelf**, the core's copy of `CRSelf`.

**The ancillary instruction.** The instruction that follows an OI is its *ancillary instruction*, and the core always executes it:

- **METVM / METSM:** it must be an unconditional `LDR R10,[...]`. This is how the new Self is fetched.
- **METVR / METSR:** it must be an unconditional `MOV R10,Rn`.
- **METVI, METSI and RETM:** it can be any unconditional data-processing or single load/store that writes neither PC nor R10. Typical uses are a NOP or `ADD SP,SP,#n`.

If the ancillary instruction breaks these rules, the OCP refuses the OI with `cpa` and the core takes the Undefined Instruction trap. Conditional ancillaries are refused because the coprocessor cannot see the core's flags. The same trap happens when CRControlB bit 0 is clear (OIs disabled).

## How an OI runs: two sequences in step

The OCP keeps a copy of the core's pipeline (`ocp_pipe`), loaded from the core's opcode fetches:

- Pipe 0 is decode (the ancillary instruction).
- Pipe 1 is execute.
- Pipe 2 is the instruction that just left execute.

When the core offers an instruction for coprocessor 6 in execute (`cpi`), `oi_decoder` classifies it and checks the ancillary instruction in Pipe 0. `ocp_control` then accepts or refuses it in the same cycle.

From the accept on, two sequences run side by side.

**Core side.**
- The core keeps fetching. The ancillary instruction is already in its pipe, and its data cycles pass through the separator to memory.
- Every later opcode fetch is answered by the **Instruction Sequence Generator** (`ocp_isg`). It builds each word from a table indexed by OI, return mode and slot number (R10 = RSelf; R0 is only a dummy base, because the OCP answers these loads and stores itself):

| OI | generated words |
|---|---|
| METVM/VR/SM/SR | `STR R10,[R0]` · `SUB R14,PC,#k` · `LDR PC,[R0]` |
| METVI/SI | `SUB R14,PC,#k` · `LDR PC,[R0]` |
| RETM, restoring Self | `LDR R10,[R0]` · `MOV PC,R14` |
| RETM, same instance | `MOV PC,R14` |

- Later slots are NOPs, which the jump flushes.
- `k` is computed at run time (`fetch_addr - oi_addr`), so R14 receives the address after the ancillary instruction.
- When the core executes a generated word, the OCP answers its data cycle:
  - `STR R10` hands the new Self to the OCP. It is captured into CRSelf, and the old CRSelf goes to CRSavedSelf.
  - `LDR PC` receives the method address.
  - `LDR R10` receives the caller's Self.

**External side.** While the core is fed, the OCP is master of the external bus:

- **METVM/METVR:** wait for the new Self from the `STR`, read `[Self]` into CRVmt, then read `[CRVmt + 4*index]` into RTemp.
- **METVI:** the same two reads, starting from the current CRSelf.
- **METSx:** the ALU computes the PC-relative target into RTemp at accept, so there is no memory access.
- **Same-instance calls** push CRSavedSelf first if its counter is full (see below).
- **RETM** pops CRSavedSelf if needed.

**Synchronisation and reconnecting.**

- The only point where the two sequences wait for each other is the jump, held with `ready` low until the external side is done. For a call, `LDR PC` is fetched at once and its data cycle waits for the method address, so the pipeline refills while the tables are walked. For RETM, the fetch of `MOV PC,R14` waits.
- The separator closes again when the core fetches the jump's target. `busy` drops in that cycle.

## CRSavedSelf: saved Self and call counter

CRSavedSelf is 32 bits:

- `COUNT_W = 8` bits of counter on top;
- `SELF_W = 24` bits of saved Self below.

Instance addresses must therefore fit in 24 bits (16 MB).

| event | CRSavedSelf |
|---|---|
| call to another instance (METVM/VR/SM/SR) | `{0, old CRSelf}` |
| call inside the instance (METVI/SI) | count + 1 |
| RETM with count 0 | Self restored from it into CRSelf and R10 |
| RETM with count ≠ 0 | count − 1; Self untouched |

**Overflow.** The counter overflows after 255 open same-instance calls. This scheme is this design's own:

1. On the 256th call, the OCP pushes CRSavedSelf to a full-descending stack at **CRControlA** (`[CRControlA-4]`, CRControlA −= 4).
2. It then sets the register to `{1, 24'hFFFFFF}`, where the all-ones Self is a marker.
3. A RETM that finds count 1 over the marker pops the word back instead of decrementing.

So any nesting depth works, at the cost of one memory word per 255 calls.

**Non-leaf methods.** A method that calls *another* instance overwrites CRSavedSelf, so it must save and restore CRSavedSelf around that call. This is the job of the service instructions.

## Service instructions and control registers

| instruction | encoding (coprocessor 6) | effect | time |
|---|---|---|---|
| MCR | opcode1 0, CRn = register | core register → OCP register | single cycle; data rides the internal bus |
| MRC | opcode1 0, CRn = register | OCP register → core register | single cycle; data rides the internal bus |
| PUSH | CDP opcode1 8, CRn = register | store the register at `[CRControlA-4]`, then CRControlA −= 4 | one external access, then accept |
| POP | CDP opcode1 9, CRn = register | load the register from `[CRControlA]`, then CRControlA += 4 | one external access, then accept |

Register numbers:

| number | register | notes |
|---|---|---|
| 0 | CRSelf | |
| 1 | CRSavedSelf | |
| 2 | CRVmt | |
| 3 | CRControlA | stack pointer of the OCP stack |
| 4 | CRControlB | bit 0 enables OIs; reset value `CTRLB_RESET = 1` |

RTemp is internal and has no number.

PUSH and POP hold the core with `cpb`. The core leaves its bus idle while it waits, so the OCP splits the bus and makes its access from the first cycle. It accepts the instruction in the cycle after the access. A PUSH+POP pair costs 9 cycles at one wait state (8 in the published design). Overflow pushes and the service instructions share the stack.

## Timing against the published figures

`tb_oo_system` measures each sequence from the fetch of its first word to the fetch of its target. The ancillary instruction is included, and all parameters are at their defaults. Published numbers are in brackets:

| wait states | SW call | METVM | METVI | SW return | RETM (other inst.) | RETM (same inst.) | PUSH+POP |
|---|---|---|---|---|---|---|---|
| 1 | 20 (23) | 14 (15) | 12 (12) | 8 (10) | 10 (10) | 8 (7) | 9 (8) |
| 2 | 30 (33) | 19 (20) | 17 (16) | 12 (15) | 13 (12) | 11 (9) | 13 |
| 3 | 40 (43) | 24 (25) | 22 (20) | 16 (20) | 16 (14) | 14 (11) | 17 |

The software columns run on the test core model, whose own timing is a little faster than a real ARM7. That is why they come out 2–4 cycles under the published ones.

**What holds:**

- METVM and METVI are clearly faster than software, and the gain grows with wait states: 30–40 % for METVM (about 40 % published) and 40–45 % for METVI (about 50 % published).
- METVI is faster than METVM.
- A same-instance RETM never costs more than the software return, and its advantage grows with wait states.

**Where the OCP sequences are slower than published:** the calls are within 2 cycles of the published figures. The returns are 1–3 cycles slower. Answers from the sequence generator have no wait states. But each wait state lengthens:

- the OCP's external reads;
- the core's fetches of the OI, of the ancillary instruction and of the target.

This implementation overlaps those less tightly than the published one.

## Design choices

The following are choices made here, because the architecture leaves them open:

- the OI and service-instruction encodings, and the choice of R10 as RSelf;
- the generated instruction sequences and the cycle-level handshake (`cpi`/`cpa`/`cpb` follow the ARM7 coprocessor interface);
- the overflow stack at CRControlA, the marker convention, and the meaning of the CRControlA/B bits;
- the ancillary-instruction legality rules;
- the separator as two multiplexers instead of a bidirectional buffer;
- the memory access controller as a per-access wait counter.

**Where it departs from the published design:**

- **PUSH/POP:** the published design runs its register↔memory service transfers without touching the bus connection. Here PUSH/POP briefly split the bus, because the OCP forms the address itself from CRControlA. The core is idle in the busy-wait, so a program cannot tell the difference.
- **Interrupts:** the published sequences include one extra cycle, needed because the ARM7 has no interrupt-acknowledge signal. Interrupts arriving during an OI are not handled here, and the test core has none.
- **Decode timing:** the OI is recognised in the execute stage, in the cycle the core offers it, rather than being prepared while it is still in decode.

**What the OCP does not do:** build stack frames or pass parameters, and it has no exception or context-switch logic of its own. At a context switch, software saves CRSelf and CRSavedSelf with PUSH/POP or MRC/MCR.

**Lint warnings that remain:** they are unused-signal warnings only:

- pipe fields and Pipe 2 (kept because the pipe copies all three stages);
- the condition bits of the execute word;
- the upper bits of CRControlB;
- decoder outputs that only the testbenches read.

## Files

`rtl/`, in dependency order:

| file | contents |
|---|---|
| `ocp_pkg.sv` | widths, enums, bus structs, fixed ARM words, OI encoder |
| `ocp_separator.sv` | internal/external bus separator |
| `ocp_pipe.sv` | Pipe 0/1/2 |
| `oi_decoder.sv` | OI / MCR / MRC / PUSH / POP decode and ancillary check |
| `ocp_isg.sv` | Instruction Sequence Generator |
| `ocp_alu.sv` | address ALU: VMT index, PC-relative target, stack ±4 |
| `ocp_regs.sv` | CRSelf, CRVmt, RTemp, CRControlA/B |
| `ocp_saved_self.sv` | CRSavedSelf with its Inc/Dec logic |
| `ocp_control.sv` | Timing & Control: handshake, bus split, both sequences |
| `ocp.sv` | the coprocessor |
| `mem_wait_ctrl.sv` | memory access controller |
| `oo_system.sv` | top: OCP, separator, wait controller |

`tb/`:

- Models: `arm7_core_model.sv` (a 3-stage ARM subset with the coprocessor handshake), `ext_mem_model.sv`, and `arm_asm_pkg.sv` (an instruction encoder for test programs).
- One self-checking testbench per block (`tb_<block>.sv`). Each prints `TB_RESULT checks=N failures=M`.
- **`tb_oo_system`** runs a program at 1, 2 and 3 wait states. The program covers:
  - all seven OIs and all three RETM modes;
  - a 300-deep METSI recursion, which overflows the counter;
  - a refused OI;
  - MCR/MRC and PUSH/POP;
  - software-only call and return sequences for comparison.

  It checks the Self values, the counters, the latencies and the mechanism counts.
- **`tb_ocp`** runs the coprocessor directly on a memory with 0–3 wait states. It uses random recursion depths up to 400 and a non-leaf method that saves CRSavedSelf with PUSH/POP.
- **`tb_oo_calltree`** runs random call trees on the top. The trees are up to 6 deep and 150 calls. One method body is shared by four instances and follows a random script in memory: return, a same-instance METVI call, or a METVM call to a named instance. The method logs Self at entry, after each call and at return. The testbench compares that log word by word with the log it works out from the script. It also checks the OI count and that both stacks end balanced.

## Simulating

With Verilator 5, from the repository root:

```
verilator --binary --timing -Wno-fatal -Irtl -Itb rtl/ocp_pkg.sv tb/arm_asm_pkg.sv \
          tb/tb_oo_system.sv --top-module tb_oo_system -o sim
./obj_dir/sim
```

Any other testbench works the same way: replace the file and top name. Lint-only, for the synthesizable top:

```
verilator --lint-only -Wall -Wno-fatal -Irtl rtl/ocp_pkg.sv rtl/oo_system.sv --top-module oo_system
```

Parameters:

- `ocp_saved_self`: `COUNT_W` and `SELF_W` (package constants, 8/24).
- `mem_wait_ctrl`: `BASE_WAITS` (1).
- `ocp`: `CTRLB_RESET` (1).
- The top itself has no parameters.
