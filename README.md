# A VLIW core that checks every ALU result in the cycle it is computed

This is a 32-bit VLIW processor whose ALU data path tolerates faults. The
target faults are transient ones that may hit several ALUs at once, and
faults that arrive while an earlier one is still being recovered. The
protection rests on two rules:

* **Check at once.** The result of every ALU instruction is checked in the
  same cycle it is produced. Two ALUs compute it and a comparator checks
  them, or three ALUs compute it and a voter checks them. An error can never
  leave the execute stage unnoticed. Only the instruction that failed has to
  be redone, and no rollback or checkpoint is needed.
* **Retry at once.** A failed instruction is re-executed right away, alone,
  on three ALUs with a voter. Each retry uses a different group of three
  ALUs. The instruction gets up to four retries. If all of them fail, the
  core stops in a declared *fail-safe* state rather than write a result it
  cannot vouch for.

The original machine issues up to three ALU instructions per packet, on
three ALUs. Checking them needs more ALUs, so a fourth (spare) ALU is added.
With four ALUs, a packet of two ALU instructions is checked in one cycle,
each instruction by its own pair. A packet of three is split over two
cycles. The register file has its own protection, an error-correcting code
on every stored word. Loads, stores and the memories are not protected.

## Machine overview

| Item | Value |
|---|---|
| Data width | 32 bits |
| Registers | 32 × 32 bit, 12 read and 6 write ports, stored as 39-bit SEC-DED codewords; `r0` reads as zero |
| Packet | 6 slots of 32 bits: slots 0–2 ALU/control, slots 3–5 load/store |
| ALUs | 4 identical ALUs (3 + 1 spare), each with a 32×32 multiplier (low 32 bits kept) |
| Load/store | 3 address units, no checking |
| Data memory | 1K × 32, 3 ports for the core, plus a host port |
| Instruction memory | 1024 packets × 192 bits, written through a load port |
| Pipeline | IF&ID, DRF (decode/register fetch), EXE, MEM, WB |
| Retries per failed instruction | 4 (`R_NO`) |

The constants are in `rtl/ftv_pkg.sv`. `N_ALU` = 3 and `N_SPARE` = 1 are
fixed by the structure of the checker; the schedule below assumes four ALUs.

## Checking an ALU packet

The number of ALU instructions in a packet, *m*, decides how the packet is
checked. The four ALUs are numbered 1–4 below; in the RTL they are indices 0–3.

| m | How it is checked | EXE cycles (no error) |
|---|---|---|
| 0 | nothing to check | 1 |
| 1 | I1 on ALUs 1, 2 and 3, with a voter (TMR(1,2,3)) | 1 |
| 2 | I1 on ALUs 1 and 2, compared by CP1. I2 on ALUs 3 and 4, compared by CP2 | 1 |
| 3 | cycle 1 as for m = 2 (I1, I2). Cycle 2: I3 on TMR(1,2,3) | 2 |

Rules:

* Three instructions need six ALUs to be compared in one cycle, and there are
  only four. So an m = 3 packet costs one extra cycle, which the design calls
  the *extra slot*.
* The voter compares whole 32-bit words.
* If one ALU disagrees with the other two, its result is simply outvoted. The
  error is *masked* and costs no time.
* If no two ALUs agree, the voter reports a multiple error. The instruction
  then goes to recovery, exactly as after a comparator mismatch.

### Recovery

Recovery runs after the packet's normal checks. Rules:

* Each failed instruction is retried alone, in the order I1, I2, I3, one try
  per cycle.
* Try *k* uses TMR(*i*, *i*+1, *i*+2). *i* starts at 1 and moves to the next
  value after each failed try. It wraps from 2 back to 1. So the tries run
  TMR(1,2,3), TMR(2,3,4), TMR(1,2,3), TMR(2,3,4).
* A try succeeds when the voter finds a majority. The majority value becomes
  the instruction's result.
* After four failed tries of one instruction, `ALU_Control` enters fail-safe.
  It then never completes the packet again. `safe_failure` rises and stays
  high until reset.

Each retry adds one cycle. A packet with m = 2 where both instructions fail
once costs 1 + 2 = 3 cycles. Results that were already checked are kept in
the hold registers of `result_select` until the whole packet is done.

### The checked ALU cluster (`ft_alu_cluster`)

| Block | File | Role |
|---|---|---|
| Schedule | `alu_schedule.sv` | routes instruction I1, I2 or I3 (function and operands) to each of the four ALUs, or idles an ALU |
| ALU ×4 | `ft_alu.sv` | add, sub, logic, shifts, set-less-than, multiply, pass; with stuck-at fault-injection masks on the output |
| CP1, CP2 | `comparator.sv` | ALU1 = ALU2 and ALU3 = ALU4 |
| TMR_MV | `tmr_voter.sv` | majority of three words; reports a single error (and which input was outvoted) or a multiple error. A multiplexer feeds it ALUs 1–3 or 2–4 |
| Select | `result_select.sv` | for each of I1..I3, takes the result from ALU1 (checked by CP1), ALU3 (checked by CP2) or the voter; holds it until the packet ends |
| ALU_Control | `alu_control.sv` | the state machine: phases *first*, *second* (extra slot), *recover* and *failed* |

`ALU_Control` gets *m* and the checker outputs. It drives the schedule, the
voter group, the Select controls, `done` and `busy`. `done` is
combinational. It is high in the cycle in which the last result of the
packet is on the Select outputs.

## Pipeline (`ftvliw_top`)

* **IF&ID** (`instr_dispatch`, `instr_mem`, `next_addr_sel`):
  * the PC register and the synchronous packet read;
  * the IF/ID register;
  * decoding of all six slots. Control instructions are kept only in slot 0.
    Only loads and stores are kept in slots 3–5.
  * The next-address priority is jump, then taken branch, then hold (stall),
    then PC + 1.
* **DRF** (`regfile`): two source reads per slot. A write in the same cycle
  is bypassed to a read of the same register. See the register-file section
  below for its code.
* **EXE**:
  * `forwarding` picks the newest of nine result buses, in priority order:
    1. the three write-backs from WB, oldest;
    2. the three ALU results in MEM;
    3. the three loads in MEM, newest.
  * `instr_partition` packs the ALU slots into I1..I3 and computes *m*.
  * The ALU cluster checks the results.
  * Branches are resolved here, from slot 0.
  * `ls_unit` computes the three load/store addresses.
* **MEM** (`data_mem`): three ports. Writes are ordered by slot, so the
  highest slot wins.
* **WB**: three ALU results and three load results.

`main_control` handles pipeline control:

* **Stall.** While the EXE packet is not `done`, or after fail-safe, the
  whole pipeline freezes. This covers the extra slot and recovery.
* **Flush.** A taken branch, a jump or HALT flushes the two younger packets
  when the EXE packet advances.
* **Halted.** It keeps a `halted` flag.
* **Counters.** It counts extra-slot cycles (`extra_cycles`) and recovery
  cycles (`recovery_cycles`).

Hazards the software must respect:

* **Load delay of one packet.** A load's value can be forwarded from MEM
  only at the end of the cycle. So the packet right after a load must not
  use the loaded register. Nothing stalls for this.
* **Branch penalty of two packets.** No delay slots: the two fetched packets
  are discarded.
* **No dependences within a packet.** All slots read the register file
  before any slot of the same packet writes it.

## Instruction set

Encoding: `[31:27]` opcode, `[26:22]` rd, `[21:17]` rs1, `[16:12]` rs2,
`[16:0]` 17-bit immediate.

| Group | Instructions | Notes |
|---|---|---|
| Register | ADD SUB AND OR XOR NOR SLL SRL SRA SLT SLTU MUL | `rd = rs1 op rs2`; shifts use `rs2[4:0]`; MUL keeps the low 32 bits |
| Immediate | ADDI ANDI ORI XORI SLTI LUI | ADDI/SLTI sign-extend, ANDI/ORI/XORI zero-extend; LUI loads `instr[15:0] << 16` |
| Memory | LW SW | address `rs1 + imm` (word address, low 10 bits); SW stores the register in the rd field |
| Control | BEQ BNE J HALT | slot 0 only. BEQ/BNE compare rd-field and rs1 registers, target `pc + 1 + imm`. J jumps to the absolute packet address `imm`. HALT stops the core |
| — | NOP | opcode 0; an all-zero slot |

That makes 25 instructions. `ftv_pkg::enc_r` and `enc_i` build instruction
words. The testbenches write their programs with these functions.

## Top-level interface

Loading and running:

* Hold `rst_n` low. Write packets through `imem_we/imem_waddr/imem_wdata`.
  Write data through `host_we/host_addr/host_wdata`.
* Release reset. The core starts at packet 0.
* `halted` rises when a HALT leaves EXE. After two more cycles, all stores
  have reached memory. Read results through `host_addr/host_rdata`, which has
  a one-cycle latency.

Fault injection:

* `fi_sa0[k]` and `fi_sa1[k]` force output bits of ALU *k* to 0 or 1.
* Tie them to zero in normal use.

Monitoring outputs:

* `retire` pulses when a packet leaves EXE. `stall` is the freeze signal.
* `ev_extra_slot`, `ev_detect`, `ev_masked`, `ev_retry`, `ev_recovered`,
  `ev_fail`, `ev_forward` and `ev_branch` are one-cycle event strobes.
* `extra_cycles` and `recovery_cycles` count cycles.
* `safe_failure` reports fail-safe.
* `rf_ecc_corrected` and `rf_ecc_uncorrectable` flag a register read, in a
  valid DRF packet, whose stored word had one flipped bit (corrected) or
  two (reported only).

## Register-file code

Every register is stored as a 39-bit codeword of an extended Hamming code.
The code corrects one flipped bit and detects two (SEC-DED):

* **Encoding** (`secded_enc`, one per write port). Codeword bits 1–38 are
  Hamming positions. The check bits sit at positions 1, 2, 4, 8, 16 and 32.
  The 32 data bits fill the other positions in ascending order. Check bit
  2^k makes the XOR over all positions whose index has bit *k* set equal to
  zero. Bit 0 gives the whole word even parity.
* **Decoding** (`secded_dec`, one per read port, 12 in all). The six check
  sums form the syndrome. With odd parity, the syndrome is the position of
  the single bad bit, which is flipped back. With even parity and a non-zero
  syndrome, two bits are bad, and the decoder reports it.
* **What the core does.** Corrected data goes on as if nothing happened. An
  uncorrectable read is only reported: the core has no recovery path for
  it. A read does not rewrite the array, so a corrected error stays stored
  until the register is next written.
* **Bypass.** A value bypassed from a same-cycle write never passes through
  the code.

The 12 decoders are the largest addition in area. In synthesis they make up
most of the register file's logic.

## Measuring error coverage

`tb/ftvliw_workload_tb.sv` runs a fault-injection workload. Twelve programs
run in a random order: N! (N = 10), a 5×5 integer matrix product and
2·Σ AᵢBᵢ, each four times. The workload is 113 packets and runs in 1676
cycles fault-free. 312 of those packets have m = 3, and each costs one extra
cycle.

The campaigns:

* Each campaign injects NF transient stuck-at faults. Each fault hits one
  random bit of one random ALU output, lasts 5 cycles and starts at a random
  cycle.
* NF is 100, 500, 1000, 1500 and 2000 faults per 4384 cycles, scaled to this
  workload's length. Faults overlap more often as NF grows, so multi-ALU
  errors and faults during recovery do occur.

A monitor in the testbench compares each used ALU output with the correct
value. It also compares each delivered result with the correct one. From
these comparisons it counts:

* *Ne*: instructions with an erroneous ALU output;
* *Ne-det*: errors detected;
* *Ne-esc-det*: errors that escaped detection;
* *Ne-rec*: errors recovered or masked;
* *Ne-nrec-f-s*: errors not recovered, ending in fail-safe;
* *Ne-nrec-f-uns*: errors not recovered and not caught, so a wrong result
  was committed.

It prints these coverage figures:

* detection coverage Ce-det = Ne-det / Ne;
* recovery coverage Ce-rec = Ne-rec / Ne-det;
* overall coverage Ce = Ne-rec / Ne;
* Pf-s = Ne-nrec-f-s / Ne;
* Pf-uns = (Ne-esc-det + Ne-nrec-f-uns) / Ne, the chance of failing without notice.

It also prints how the last two split up:

* the transition probabilities from "detected" to fail-safe and to
  fail-unsafe (Ne-nrec-f-s and Ne-nrec-f-uns over Ne-det);
* the share of unsafe failures due to escaped detection (Ne-esc-det / Ne)
  and due to recovery (Ce-det times the fail-unsafe transition
  probability).

A campaign that reaches fail-safe stops there. The results of the programs
that had not yet run are then missing, and are counted as wrong in the
printout.

A typical run detects every error. Nothing fails unsafely. Fail-safe
appears only at the higher fault rates, where four consecutive retries all
hit faulty ALUs. The counting is done in the testbench, not in hardware.

On fault start times: with its shape parameter at 1 the Weibull
distribution is the exponential one. For a fixed number of faults, that
process places the start times uniformly, which is what the testbench does.

## Cost of checking on benchmarks

Without faults, the only time the checking costs is the extra slot of each
m = 3 packet. `tb/ftvliw_bench_tb.sv` measures it on three hand-scheduled
programs. Each program packs up to three ALU and three load/store
instructions per packet. The testbench checks the results against a
reference model. It also checks that the cycle count is exactly: packets
issued + extra cycles + 2 per taken branch + 3.

| Program | Packets | Cycles | Extra cycles | Cost |
|---|---|---|---|---|
| 5×5 matrix product | 17 | 370 | 26 | 7.6 % |
| 8×8 IDCT, 12-bit fixed point, as two 8×8 matrix products | 43 | 2742 | 386 | 16.4 % |
| heapsort, 32 signed words | 37 | 2270 | 0 | 0 % |

The cost depends only on how often a packet holds three ALU instructions. A
scheduler that avoids them when it can trades a little parallelism for
fewer extra slots.

## Simulating

Every block has a self-checking testbench in `tb/` that ends with a
`TB_RESULT checks=… failures=…` line. With Verilator 5:

    verilator --binary --timing -Irtl rtl/ftv_pkg.sv tb/ftvliw_top_tb.sv \
        -y rtl +libext+.sv --top-module ftvliw_top_tb
    ./obj_dir/Vftvliw_top_tb

Replace the testbench file and `--top-module` to run another one, for
example `ftvliw_workload_tb`, `ftvliw_bench_tb` or `alu_control_tb`. The testbenches reset or
initialise everything they read, so they also pass with random initial
values (`+verilator+rand+reset+2`).

`tb/ftvliw_top_tb.sv` runs the full core at its default sizes in five runs:

1. **Fault-free program.** It covers a loop computing 10!, loads and stores,
   a dot product, a jump, forwarding, and the LUI/ORI/SLT/SRA/XOR
   instructions.
2. **Transient faults.** The same program runs 20 times with random
   transient faults on single ALUs. The results must be unchanged, and the
   cycle count must grow by exactly the number of retries.
3. **Permanent faults.** Permanent faults on three ALUs must lead to
   fail-safe.
4. **One flipped register bit.** One stored bit of a long-lived register is
   flipped during the run. The read must be corrected and every result must
   stay exact.
5. **Two flipped register bits.** Two stored bits are flipped. The read must
   be reported as uncorrectable.

It counts each mechanism and fails if one never happens. The mechanisms are:

* the extra slot;
* a masked single error;
* detection;
* retry;
* recovery;
* fail-safe;
* forwarding;
* a taken branch;
* the stall;
* a register-file correction.

## Departures and limits

* **Register-file code.** The register file is meant to be protected by an
  error-correcting code, but no particular code is specified. The extended
  Hamming code here is this design's own choice. So is the choice to report
  uncorrectable reads without acting on them.
* **Results.** The Select block delivers up to three checked results per
  packet, one for each ALU instruction, with hold registers. The
  instruction-level description of the scheme does not fix this number.
* **Pipeline.** The whole pipeline freezes during extra-slot and recovery
  cycles. A finer-grained stall is possible but is not done.
* **Choices not fixed by the scheme.** These are this design's own:
  * the instruction encoding and the exact list of 25 instructions;
  * branch resolution in EXE from slot 0 only;
  * the load delay;
  * the instruction-memory depth;
  * `r0` reading as zero;
  * the host and fault-injection ports.
* **Error-analysis counter.** This block is a measurement aid. Here it exists
  only as the testbench monitor, not as hardware.
* **Fault-injection tool.** The stuck-at masks model only stuck-at-0 and
  stuck-at-1 faults. High-impedance and unknown faults cannot be represented
  in a two-state simulation.
* **Fault targets.** Faults are injected on the four ALU outputs only. The
  comparators, voter, schedule and forwarding logic of EXE receive no faults.
  So the measured coverage describes the ALU checking alone.
* **Performance and area.** The design has no timing constraints, and no
  area or clock figures are given here. The extra-slot cost of a program is
  the number of its m = 3 packets, which `extra_cycles` reports directly.
