# Interface circuits between a configurable processor core and hardware IPs

In an IP-based system-on-chip, the software part of an application runs on a
processor core generated for that application. The hardware part runs on IP
blocks taken from a library. Each IP block has its own pin-level protocol, and
the processor core changes with every configuration. The glue between the two
is an **interface circuit (IFC)**: one per hardware IP, sitting on the shared
bus.

The IFC makes the IP look like a **coprocessor** of the core. The core issues
ordinary coprocessor instructions, and the IFC turns each one into the exact
cycle-by-cycle waveform the IP expects:

| instruction | meaning |
|---|---|
| `CDP cp, op` | run operation `op` inside the IP |
| `LDC cp, n` | move `n` words from memory into the IFC's input register |
| `STC cp, n` | move `n` words from the IFC's result register to memory |
| `MCR cp, CRn, Rd` | move one word from core register `Rd` into input register word `CRn` |
| `MRC cp, CRn, Rd` | move one word from result register word `CRn` into core register `Rd` |

The handshake with the core is the ARM7TDMI coprocessor handshake:

- `nCPI` comes from the core. It is low while the core executes a coprocessor instruction.
- `CPA` goes back to the core. It means "coprocessor absent".
- `CPB` goes back to the core. It means "coprocessor busy".

This RTL follows the IFC architecture of the paper *An Interface-Circuit
Synthesis Method with Configurable Processor Core in IP-Based SoC Designs*. In
that method a generator tool writes the IFC from templates. The RTL here is
the IFC that method would produce for its worked example: an IP described by
one interface word, `proc`. It is written as parameterised SystemVerilog
rather than generated.

## System view

```
            BUS (shared)  ─────────┬───────────────┬──────────── ...
 processor  nCPI ──────────────────┼──►            ┼──►
   core     CPA ◄── AND ◄──────────┤               │
            CPB ◄── AND ◄──────────┤               │
                                ┌──┴───┐        ┌──┴───┐
                                │ IFC 1│        │ IFC 2│  ...   (ifc)
                                └──┬───┘        └──┬───┘
                                 HW IP 1         HW IP 2
```

`ifc_soc` holds `NUM_IFC` IFCs (3 by default: the example system has three IPs,
RGB-to-YCrCb, DCT/IDCT and ME/MC). IFC *i* answers to coprocessor number
*i*+1.

- **Shared lines.** Every IFC watches the same bus and the same `nCPI`.
- **Combining the answers.** An IFC that does not own the current instruction
  holds both `CPA` and `CPB` high. The core's lines are therefore the AND of
  all IFCs' lines, so the owning IFC's answer passes through.
- **Bus split.** The bus is split into an inbound word (`bus_din`) and an
  outbound word with an enable (`bus_dout`/`bus_doe`). The outbound word is the
  OR of the IFCs' words, and each IFC's word is zero unless it drives the bus.
- **Outside this RTL.** The processor core, the memory and the IPs are not
  included. Their ports are brought out.

## Inside one IFC

```
  CPB CPA nCPI                                  BUS
   ▲   ▲   │                                     ▲│
 ┌─┴───┴───┴─┐   ┌───────────┐   ┌─────────┐   ┌─┴▼──────┐
 │ HANDSHAKE │◄──┤INST_QUEUE │◄──┤ DECODER │◄──┤ BUS_I/O │
 └─────┬─────┘   └─────┬─────┘   └─────────┘   └────┬────┘
       │               │                       ┌────┴──────────┐
 ┌─────┴───────────────▼┐                      │REGISTER       │
 │     CONTROLLER       │── control lines ───► │ input │ result│
 └──────────┬───────────┘   to all units       └───┬───────▲───┘
            ▼ EN, CONT                          ADR ▼  DATA │
                        hardware IP
```

| unit | module | what it does |
|---|---|---|
| BUS_I/O | `ifc_bus_io` | Steers the bus: fetched instruction words go to DECODER, inbound transfer words go to the input register, result words go out. Direction comes from the CONTROLLER line `BUS_IO_S`. |
| DECODER | `ifc_decoder` | Turns each fetched word into a decoded vector `dec_t {valid, op, opcode, crn, count}`. `valid` is set only for a coprocessor instruction with this IFC's number. |
| INST_QUEUE | `ifc_inst_queue` | Shadows the core's pipeline (see below). Its head is the instruction the core is executing now. |
| HANDSHAKE | `ifc_handshake` | Drives `CPA`/`CPB` from `nCPI`, the queue head and the CONTROLLER's busy lines. It also produces `start`. |
| REGISTER | `ifc_register` | Holds two word arrays. The 16-word input register is filled from the bus; its selected word's low 8 bits drive the IP address. The 16-word result register is filled from the IP's `DATA`. |
| CONTROLLER | `ifc_controller` | Has one state per instruction, made of sub-states. Each sub-state fixes every control line for one cycle. |

## The pipeline follower (INST_QUEUE)

The core fetches instructions over the shared bus, and `bus_ifetch` marks each
fetch cycle. The core executes a coprocessor instruction several cycles after
fetching it, when the instruction reaches the last pipeline stage, and only
then lowers `nCPI`. By that time the core has already fetched other words.

The IFC therefore decodes every fetched word and shifts the decoded vector
into INST_QUEUE. The queue is `PIPE_STAGES - 1` entries deep:

- 4 entries for the 5-stage RISC core (core A, the default);
- 2 entries for the 3-stage DSP core (core B).

With that depth, the queue head is the decoded form of the instruction the core
is executing. This holds across branches, because the queue and the core's
pipeline move on the same fetch strobe.

When `nCPI` is low and the head is valid (ours), `CPA` goes low. Then:

- If the CONTROLLER is busy (`HANDSHAKE_RUN` or `HANDSHAKE_TR` set), `CPB`
  stays high and the core waits.
- Otherwise `CPB` is low. At the clock edge the instruction is accepted: the
  CONTROLLER loads the head, and the queue marks the head used so it cannot
  start twice.

## The CONTROLLER and where its states come from

The method builds the CONTROLLER from the IP's interface description, written
in the CWL language. For the example IP the description is:

```
port:     CLK, EN, CONT[1:0], ADR[7:0]  (inputs of the IP),  DATA[31:0] (output)
alphabet: I     = {EN=1, CONT=01}
          N     = {EN=1, CONT=00}
          R(Xa) = {EN=1, CONT=10, ADR=Xa}
          O(Xd) = {EN=1, CONT=11, DATA=Xd}
word:     proc(Xa,Xd) = (R(Xa) N[2])[1,2] O(Xd)[3]
```

The method derives the CONTROLLER in four steps:

1. **Ports.** The IP's ports become IFC ports: `ip_en`, `ip_cont`, `ip_adr`
   and `ip_data`.
2. **States.** Each instruction that uses the IP becomes a state. The word
   `proc` belongs to `CDP 1, 2`, which gives state `S_CDP_2`.
3. **Sub-states.** Each distinct symbol run in the word becomes a sub-state:
   - `S_CDP_2_1` drives R, with `ADR` taken from the input register;
   - `S_CDP_2_2` drives N;
   - `S_CDP_2_3` drives O and writes `DATA` into the result register.
4. **Transitions.** A cycle counter steers the moves between sub-states.

The counter is 1 in the first R cycle and advances every cycle:

- In `S_CDP_2_2`, the CONTROLLER goes back to `S_CDP_2_1` when the counter
  reaches 3 (start of the next repetition).
- It goes on to `S_CDP_2_3` when the counter reaches 6.
- `S_CDP_2_3` lasts three cycles, then the CONTROLLER returns to idle.

So `CDP 1, 2` produces exactly this trace:

```
cycle  1 2 3 4 5 6 7 8 9
CONT   R N N R N N O O O
ADR    a0    a1                 a0, a1 = low bytes of input register words 0, 1
DATA               d0 d1 d2     -> result register words 0, 1, 2
```

This takes 9 cycles, and `HANDSHAKE_RUN` is high throughout. In general the
operation takes `PROC_REPS*(1+PROC_WAIT)+PROC_OUTS` cycles. The grammar allows
one or two repetitions; the IFC always issues `PROC_REPS` = 2.

The remaining states are simpler:

- `CDP 1, 1` issues the single symbol I for one cycle.
- Any other CDP opcode is accepted and does nothing.
- `S_LDC_1` / `S_STC_1` assert `HANDSHAKE_TR` and move one word per data
  cycle (`bus_dstb`). They use register words 0, 1, …, wrapping at 16, and
  stop after `count` words. A count of 0 is accepted and moves nothing.
- `S_MCR_1` / `S_MRC_1` move one word to input register `CRn`, or from result
  register `CRn`.

**Concurrency.** A CDP does not hold up the core. The core goes on with its
program while the IP works; only the next instruction for the same IFC waits
on `CPB`. IPs behind different IFCs therefore run in parallel.

**Adapting to another IP.** An IP with a different description needs a
different `ifc_controller`. Write one state per instruction and one sub-state
per symbol run, with the control lines read from the alphabet. The other five
units do not depend on the IP:

- BUS_I/O depends on the bus width.
- DECODER and INST_QUEUE depend on the core's encoding and pipeline depth.
- HANDSHAKE is fixed.
- REGISTER depends on the transfer lengths.

## Instruction encoding

The core's instruction encoding belongs to the generated core. This RTL uses
the ARM coprocessor formats, with the coprocessor number in bits [11:8]:

| kind | bits |
|---|---|
| CDP | `[27:24]=1110`, `[4]=0`, opcode `[23:20]` |
| MCR / MRC | `[27:24]=1110`, `[4]=1`, `[20]` = 1 for MRC, CRn `[19:16]`, core register `[15:12]` |
| LDC / STC | `[27:25]=110`, `[20]` = 1 for LDC, base `[19:16]`, **word count** `[7:0]` |

The LDC/STC low byte is the transfer length, not an address offset as in ARM,
because these instructions carry the number of words they move. To change the
encoding, edit `ifc_decoder`; nothing else decodes instruction bits.

## Timing summary

| event | timing |
|---|---|
| accept | clock edge ending the cycle with `nCPI`=0, instruction ours, `CPB`=0 |
| first CONTROLLER sub-state | the cycle after accept |
| `CDP 1, 2` | 9 cycles of IP activity; a following instruction to the same IFC sees `CPB`=1 for all 9 |
| LDC/STC/MCR/MRC word | in the same cycle as `bus_dstb`; STC/MRC drive `bus_dout` combinationally |
| `CPA`/`CPB` | combinational from `nCPI` and IFC state |

## Parameters

| parameter | default | where |
|---|---|---|
| `NUM_IFC` | 3 | `ifc_soc`: one IFC per hardware IP |
| `PIPE_STAGES` | 5 | `ifc_soc`, `ifc`: core pipeline depth; set 3 for the DSP core |
| `BUS_W` | 32 | bus width (not fixed by the method; matches the IPs' 32-bit data) |
| `IN_WORDS`, `RES_WORDS` | 16 | `ifc`, `ifc_register`: register sizes, from the 16-word transfers; indices are 4 bits, so 16 is the maximum |
| `PROC_REPS`, `PROC_WAIT`, `PROC_OUTS` | 2, 2, 3 | `ifc_controller`: the `proc` word |
| `CP_NUM` | 1 | `ifc`, `ifc_decoder`: coprocessor number |

Reset is asynchronous and active low (`rst_n`), and clears all state.

## Choices made here, and limits

These points are not fixed by the method and were chosen for this RTL:

- **Handshake stage.** The handshake happens in the core's last pipeline stage,
  hence queue depth `PIPE_STAGES-1`.
- **Busy rule.** HANDSHAKE keeps `CPB` high exactly while the CONTROLLER's
  `HANDSHAKE_RUN` or `HANDSHAKE_TR` is set.
- **Data strobes.** Data cycles are marked by a separate strobe `bus_dstb`.
  Instruction fetches are marked by `bus_ifetch`.
- **Bus structure.** The bus is split in/out rather than tri-state.
- **Register mapping.**
  - The two R addresses come from input words 0 and 1.
  - The three O results go to result words 0 to 2.
  - Register transfers start at word 0.
  - The method's own worked example shows register enables in groups
    (`REG_1_12_EN`, `REG_13_24_EN`). That grouping is not reproduced.
- **`CDP 1, 1`.** Its meaning (the I symbol) is an interpretation.
- **Control lines.** The method names the CONTROLLER's outputs `BUS_IO_S`,
  `HANDSHAKE_RUN`, `HANDSHAKE_TR`, `REG_EN`, `IP_EN` and `IP_CONT`. Here they
  are the fields of `ctrl_t`. `REG_EN` becomes explicit register word indices
  and write enables.
- **Core configuration.** The defaults describe the 5-stage core. For the
  3-stage core set `PIPE_STAGES = 3`. An IFC built for one pipeline depth does
  not follow a core of another depth.
- **Other IPs.** The three application IPs are not modelled. Their interface
  descriptions are not available, so every IFC in `ifc_soc` carries the example
  CONTROLLER.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog.

| testbench | covers |
|---|---|
| `tb_ifc_decoder` | all instruction kinds, foreign coprocessor numbers, 2000 random words against a mask-based reference |
| `tb_ifc_inst_queue` | random push/pop against a reference shift register; a vector reaches the head after exactly `DEPTH` fetches |
| `tb_ifc_handshake` | all combinations of `nCPI`, ownership and busy lines |
| `tb_ifc_bus_io` | all strobe/direction combinations with random data |
| `tb_ifc_register` | random writes/reads against a reference copy |
| `tb_ifc_controller` | cycle-exact sub-state sequences: the 9-cycle `R N N R N N O O O` trace, I, LDC with gaps, STC 16, MCR, MRC, zero-length LDC |
| `tb_ifc` | one IFC with a core model and an IP model; checks data end to end, the 9-cycle busy stall and the absent answer |
| `tb_ifc_soc` | the whole fabric at default parameters |
| `tb_ifc_soc_dsp` | the same program on a 3-stage core |
| `tb_ifc_soc_random` | 25 random 60-instruction programs over the three IFCs at default parameters, compared with in-order execution of the same program on a reference copy of memory, core registers and IFC registers |

`tb_ifc_soc` runs a 17-instruction program over three IPs:

- a 16-word LDC;
- two IPs working at once;
- STC and MRC that stall on a busy IFC;
- MCR/MRC moves;
- the I command;
- a zero-length LDC;
- an instruction for a coprocessor nobody owns.

It checks memory and register contents, and counts that each mechanism
happened: busy stall, absent answer, parallel IPs, transfers in both
directions, proc and I operations. It takes about 100 cycles.

The core, memory and IP used by the testbenches are behavioural models in
`tb/`:

- `cpu_model`: an in-order pipeline that fetches one word per cycle and
  executes coprocessor instructions with the handshake above;
- `proc_ip_model`: an IP obeying the example alphabet, whose result table is
  `(x+1)*0x9E3779B9`.

These models are stand-ins, not real cores or IPs.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/ifc_pkg.sv tb/ifc_tb_pkg.sv tb/tb_ifc_soc.sv --top-module tb_ifc_soc
./obj_dir/Vtb_ifc_soc
```

Replace `tb_ifc_soc` with any other testbench name. To lint the RTL alone:

```
verilator --lint-only -Wall -Irtl -y rtl +libext+.sv rtl/ifc_pkg.sv rtl/ifc_soc.sv
```

The remaining lint warnings are harmless:

- unused bits of the instruction word and of the decoded vector, which some
  units do not need;
- `SYNCASYNCNET`, because the asynchronous reset also disables the
  concurrent assertions.
