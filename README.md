# A 32-lane transport-triggered processor for binaural speaker localization

Hearing aids that steer a beamformer towards a talker first need to know where the
talker is. A probabilistic localizer does this from the two ear microphones. It runs
the audio through a 32-channel gammatone filterbank and a neural-transduction stage
(half-wave rectification and square-root compression). It then computes interaural
time and level differences per channel and scores them with a Gaussian mixture model
trained per azimuth. That means a lot of per-channel fixed-point arithmetic (CORDIC
square roots, logarithms and exponentials) and a large constant table, all within a
few milliwatts.

This RTL is a programmable processor for that job. Two ideas shape it:

* **One SIMD lane per gammatone channel.** All 32 channels go through identical
  arithmetic, so the datapath works on 32 x 32-bit vectors (1024 bits). A single
  operation then advances the whole filterbank, transduction or classifier step.
* **Transport-triggered architecture (TTA).** An instruction does not name
  operations. It names data transports (*moves*) between function-unit ports and
  registers. An operation starts when its trigger port is written. Results can go
  straight from one unit to the next without touching a register file
  ("software bypassing"). This saves most of the energy of the very wide vector
  register files.

## Datapath

| Unit | Role | Ports (sockets) |
|---|---|---|
| `ALU_SIMD` (`simd_alu`) | 32 x 32-bit vector ALU | operand A, operand C, trigger (B + opcode) -> result |
| `AUX` (`aux_unit`) | vector <-> scalar: extract, insert, broadcast | vector V, scalar S, trigger -> result |
| `LSU` (`lsu`) | load, store, **gather** to the external data memory | data/offsets D, trigger (address + opcode) -> result |
| `ALU` (`scalar_alu`) | 32-bit scalar ALU (addresses, loop counters, conditions) | operand A, trigger (B + opcode) -> result |
| `RF_SIMDA` (`regfile`) | 16 x 1024 bit, 1 write / 2 read | |
| `RF_SIMDB` (`regfile`) | 16 x 1024 bit, 1 write / 1 read | |
| `RF` (`regfile`) | 16 x 32 bit, 1 write / 2 read | |
| `IU` (`imm_unit`) | long-immediate register | -> value |
| `GCU` (`gcu`) | fetch, jump, call, boolean guard register, global lock | trigger (target + opcode) -> return address |
| `IMEM` (`imem`) | 2048 x 64-bit instruction memory | |
| `IC` (`tta_ic`) | four 1024-bit transport buses, plus a direct ALU_SIMD result -> operand path | |

`tta_core` wires these together. The data memory is outside the core: a 400 kB
on-package eDRAM that holds the Gaussian-mixture parameters (32 channels x 15
components x 37 azimuths x 5 values = 355,200 bytes) and the audio input queue. The
core reaches it through a word-addressed request/grant port.

### Vector operations (`simd_alu`)

Every operation works lane by lane on signed 32-bit integers. B is the value moved
into the trigger port.

| op | result per lane | use |
|---|---|---|
| add sub and or xor | A op B | |
| shl shr | A << B[4:0], A >>> B[4:0] (arithmetic) | fixed-point scaling |
| abs | \|B\| | |
| clz | leading zeros of B (32 for 0) | normalising before CORDIC |
| eq gt lt | 1 if true, else 0 | |
| max min | | rectification: max(x, 0) |
| cas | C < 0 ? A - B : A + B | one CORDIC iteration, all modes |
| mulsh | (A x B) >>> C[5:0] on the 64-bit product | fixed-point multiply (gammatone filters) |
| sel | C != 0 ? A : B | conditional element select |

### Gather load (`lsu`)

The gammatone filters have different group delays. To align the channels, each lane
loads its sample from its own offset in the input queue:
`result[i] = mem[base + D[i]]`, for i = 0..31, one word per memory access in lane
order. The trigger carries `base`. The offset vector D is moved into the LSU's data
port once and stays there. `ld` returns one word in lane 0. `st` writes lane 0 of D.

## Programming model

This part is the hardest to get right when writing code for the core.

### Instruction word (64 bits, defined in `tta_pkg`)

```
[63]        template: 0 = four moves, 1 = long immediate
[62:61]     direct SIMD path: 0 none, 1 ALU_SIMD.result -> ALU_SIMD.A, 2 -> ALU_SIMD.C
[60]        unused (template 0) / immediate bit 30 (template 1)
[15k+14:15k] move slot k = {guard[1:0], src[5:0], dst[6:0]}, k = 0..3
```

A long-immediate instruction executes slots 0 and 1 only. It loads the IU with the
sign-extension of `{ins[60], ins[59:30]}`.

Guard: `0` always, `1` if the boolean register is 1, `2` if it is 0, `3` empty slot.

| src | meaning | dst | meaning |
|---|---|---|---|
| 0-15 | RF_SIMDA[i] | 0-15 | RF_SIMDA[i] |
| 16-31 | RF_SIMDB[i] | 16-31 | RF_SIMDB[i] |
| 32-47 | RF[i] | 32-47 | RF[i] |
| 48 | LSU result | 48 | boolean register (bit 0) |
| 49 | ALU result | 49 | LSU data / offsets |
| 50 | ALU_SIMD result | 50 | ALU operand A |
| 51 | AUX result | 51, 52 | ALU_SIMD operand A, operand C |
| 52 | IU | 53, 54 | AUX vector, AUX scalar |
| 53 | return address | 64+op | LSU trigger (ld 0, st 1, gather 2) |
| 54 | boolean register | 68+op | AUX trigger (extract 0, insert 1, broadcast 2) |
| | | 72+op | GCU trigger (jump 0, call 1) |
| | | 80+op | ALU trigger (add, sub, and, or, xor, shl, shr, shru, eq, gt, gtu, mul = 0..11) |
| | | 96+op | ALU_SIMD trigger (opcodes of `simd_op_e`) |

Scalar values travel in bits [31:0] of a bus. Scalar sources are zero-extended.

### Timing rules

* All moves of an instruction read their sources at the start of the cycle. They
  write their destinations at the end of it.
* An operand moved in the same instruction as the trigger is used by that operation.
* Results of ALU, ALU_SIMD and AUX can be read by the **next** instruction. A result
  register keeps its value until the unit's next trigger, so it can be read many times.
* A register-file write is visible to the next instruction.
* **LSU:** the instruction after an `ld`, `st` or `gather` trigger waits. The whole
  core is locked (no fetch, no moves) until the memory has answered. That instruction
  can then read the LSU result. With a zero-wait memory, a load takes 3 cycles and a
  gather 96 cycles (3 per lane).
* **Jumps and calls have one delay slot.** The instruction after the jump always
  executes. A call stores the address after its delay slot in the return address.
  Return by moving source 53 to the jump trigger.
* A move into the boolean register can guard moves from the next instruction on.
* The IU value can be read from the instruction after the long immediate.
* Port limits per instruction: RF_SIMDA at most 2 reads, RF_SIMDB 1, RF 2; at most one
  write into each register file and into each unit port. Read ports are handed out in
  slot order. An instruction that breaks these rules raises `prog_err`, and an
  assertion in `tta_core` fails.

`tb/tb_tta_core.sv` has a small assembler (`mv`, `mvg`, `li`, `ins`) and a complete
program written with it. It is the best starting point for new code.

## Interfaces of `tta_core`

* `imem_we`, `imem_waddr[10:0]`, `imem_wdata[63:0]`: load the program while `rst_n`
  is low. Execution starts at address 0 when `rst_n` rises.
* Data memory port:
  * `dmem_req`, `dmem_we`, `dmem_addr[16:0]` (32-bit words) and `dmem_wdata` are held
    until `dmem_gnt`.
  * Read data comes with `dmem_rvalid`, one or more cycles after the grant.
  * Only one access is in flight at a time.
* `pc`, `exec`, `lock`, `prog_err`: observation.

Reset is asynchronous and active low, and clears all registers and register files.

## What follows the source design and what does not

Taken from the design description:

* The unit set and names.
* The 32 x 32-bit vectors.
* The two 16-entry vector register files with 2 and 1 read ports.
* Four transport buses plus the direct ALU_SIMD feedback path.
* The 64-bit instruction width and the 2048-word instruction memory.
* The SIMD operation list, including conditional add/subtract, count leading zeros,
  multiply-shift, select, extract, insert, broadcast and the gather load.
* The dedicated LSU to a 400 kB on-package data memory.

Choices of this implementation, where the description is silent:

* The whole instruction encoding and the operand/opcode assignment of each port.
* Latency 1 for the computing units, and the LSU stalling the core through a global lock.
* One jump delay slot and a single boolean guard register.
* The scalar RF size (16 x 32, two read ports) and the scalar ALU's operation set.
* That extract, insert and broadcast live in AUX, and that CLZ lives in ALU_SIMD.
* The exact semantics of `cas`, `mulsh` and `sel`.
* The memory handshake.

Departures to be aware of:

* **The interconnect is fully connected.** The original buses were pruned by hand to
  a subset of socket connections, and that pruning is what made 64-bit instructions
  possible there. Here every bus reaches every port, and the encoding is chosen so
  that four moves still fit in 64 bits. Code written for this core is therefore not
  binary-compatible with a pruned network.
* **The direct ALU_SIMD path reaches operands A and C only.** It does not reach the
  trigger port, whose moves must carry an opcode. A chained result that should be
  operand B still travels over a bus, which costs a move slot but no extra cycle.
* **Gathers are not pipelined.** The LSU has one outstanding access, so latency cannot
  be hidden inside the unit. The intended way to hide memory latency is to preload
  parameters into registers in software, ahead of their use.
* **No application program is included.** Timing and power figures quoted for the
  original design depend on its compiled localization program and on a 28 nm
  implementation. Neither can be reproduced here, so the 751,549-cycle frame budget
  (of 800,000 cycles at 50 MHz) is not demonstrated.
* **The data memory and the audio codec are external** and are not part of the RTL.
  `tb/dmem_model.sv` is a behavioural memory with random wait states, for
  simulation only.

## Verification

Every unit has a self-checking testbench. Each one compares against a reference
model written independently in the testbench and prints
`TB_RESULT checks=N failures=M`:

| testbench | covers |
|---|---|
| `tb_simd_alu` | all 17 vector operations, random and corner values, operand-before/with-trigger, latency |
| `tb_scalar_alu` | all 12 operations, corner values |
| `tb_aux_unit` | extract/insert at every lane, broadcast |
| `tb_lsu` | ld/st/gather with a zero-wait memory (exact cycle counts) and a random-wait memory |
| `tb_regfile` | the three register-file configurations, write-then-read timing, reset |
| `tb_imm_unit` | sign extension, hold |
| `tb_imem` | all 2048 words, hold during stall |
| `tb_gcu` | fetch, jump, call, guard, lock against a cycle model |
| `tb_tta_ic` | 20,000 random instructions against a reference decoder, including invalid ones |
| `tb_tta_core` | full-size core running a 78-instruction program |
| `tb_gmm_frame` | full-size core scoring one frame against the full Gaussian-mixture table |

The `tb_tta_core` program processes one 512-sample frame on all 32 channels:

1. It builds per-channel offsets with `ld` and `insert`.
2. For every sample it does a gather, `mulsh`, `max` with 0 and an accumulate,
   chained through the direct SIMD path.
3. It runs `clz`, `cas`, `gt` and `sel`.
4. It stores both result vectors lane by lane from a subroutine called twice.

The test takes about 69,500 cycles. It also counts stalls, gathers, direct-path
moves, squashed guarded moves, long immediates, calls and dual vector-register reads.
It fails if any of these never occurs.

### Classifier workload and the frame budget

`tb_gmm_frame` runs the classification stage at full size. It streams the whole
Gaussian-mixture table once, in storage order:

* 37 azimuths x 15 components x 5 parameters (the ITD and ILD means and inverse
  variances, and a log weight);
* one 32-channel vector per parameter, loaded by a gather with offsets 0..31;
* 88,800 words in all.

For each component it computes
`s = logw - (mulsh(mulsh(d_itd, d_itd), ivar_itd) + mulsh(mulsh(d_ild, d_ild), ivar_ild))`
and keeps the per-channel maximum over components. It then sums the channels per
azimuth and stores the best azimuth and its score. Taking the maximum instead of a
log-sum-exp is a simplification made for the test. The program is 138 instructions
long.

| memory | cycles | of which LSU stalls |
|---|---|---|
| 0-1 wait states | 369,286 | 355,040 |
| zero wait states (lower bound) | at least 2,775 gathers x 96 = 266,400 | |

The original frame budget is 800,000 cycles at 50 MHz for the whole algorithm. The
one-word-per-access gather therefore spends a third to a half of that budget on the
classifier's memory traffic alone. A faster LSU is the first thing to change if the
front end does not fit in the rest.

Running a testbench with plain Verilator, for example:

```
verilator --binary --timing -Irtl -Itb rtl/tta_pkg.sv tb/tb_tta_core.sv \
          --top-module tb_tta_core -Mdir obj_core -o sim
./obj_core/sim
```

Replace `tb_tta_core` with any testbench above. `tb_lsu`, `tb_tta_core` and
`tb_gmm_frame` also need `tb/dmem_model.sv`; the `-Itb` option finds it. Each
testbench finishes within a minute.
