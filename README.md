# Dynamic TMR on an interleaved-multithreading RISC-V core

A lockstep dual core finds a fault by comparing two cores. It then has to save checkpoints and roll back, and both cost time and hardware. This core gets the same detection from one pipeline. It also recovers from a fault in a few cycles, with no checkpoint routine at all.

The pipeline is a small in-order RV32IM core with three hardware threads. The threads take turns in the pipeline, one cycle each (interleaved multithreading, IMT). Each thread has its own program counter and register file.

Two of the threads, **Thread 2** and **Thread 1**, run the same program. Every instruction therefore passes through the pipeline twice, one cycle apart. Neither copy changes anything until the two copies agree:

- register results wait in per-thread write-back buffers;
- load/store requests wait in per-thread buffers inside the load-store unit.

The third thread, **Thread 0**, is idle in normal operation. Its program counter serves as the checkpoint: it always holds the address of the oldest instruction not yet committed. This costs nothing, because the checkpoint moves forward with every committed instruction.

When the two copies disagree, the core recovers in four steps:

1. It flushes the pipeline.
2. Thread 0 re-executes that one instruction.
3. A bitwise two-out-of-three vote is taken between Thread 0's copy and the two retained copies.
4. The vote result is committed, and both main threads restart from the voted next address.

This is why the scheme is called dynamic triple modular redundancy (dTMR). It is dual redundancy in normal operation, and the third copy is made only when it is needed. Both memories also store every word as a SEC-DED codeword, so single-bit upsets in memory are corrected on every read.

## Threads and modes

| Mode | Who runs | What happens |
|---|---|---|
| Normal (detection) | Threads 2 and 1 alternate: T2, T1, T2, T1 … | The Thread 1 copy of each instruction is compared with the Thread 2 copy in write-back (PC, next PC, result, destination) and in the load-store unit (the whole request). If they agree, the result is committed. |
| Restore | Thread 0 fetches once, from its PC (the checkpoint). Threads 2 and 1 do not fetch. | The one uncommitted instruction is re-executed. Its result goes to a third write-back buffer or load/store buffer. |
| End-of-Restore (2 cycles) | Cycle 1: vote. Cycle 2: Thread 2 fetches again. | The three copies are voted bit by bit. The voted result is written to the register files one cycle later, through a vote register, or sent to memory as one access. The voted next address is loaded into all three PCs. |

The pipeline starts a restore when any of these detectors fires:

- `restore_fault_pc`: the PC or next PC differs between the two copies.
- `restore_fault_rf`: the write-back buffers differ.
- `restore_fault_lsu`: the load/store requests differ.

The design assumes that no second fault arrives during the few cycles a restore takes. A detector that fires outside Normal mode is ignored.

## Pipeline

Four stages hold one instruction each. Because Threads 2 and 1 alternate, the two copies of an instruction are always one stage apart.

- **FETCH**: the PC unit sends `pc[harc]` to the program memory, which reads in one cycle (`harc` is the hardware-thread number).
- **DECODE**: ECC correction of the instruction word, RV32IM decode, and register read with bypass.
- **EXEC**: the ALU with branch resolution, the multiply/divide unit, or the load-store unit.
  - A taken branch or jump redirects only the thread that executed it. It also kills that thread's instruction now in FETCH.
  - The other thread's instruction is unaffected. That thread resolves the same branch one cycle later, in its own slot.
- **WRITE-BACK**: the instruction's entry goes into its thread's write-back buffer.
  - When the Thread 1 copy arrives, the two buffers are compared, and so are the PCs carried with them.
  - If they agree, the Thread 1 entry is written to all three register files, and Thread 0's PC (the checkpoint) takes the agreed next PC.

A Thread 1 or Thread 0 load/store holds the EXEC stage while its access is voted and carried out. While it does, FETCH and DECODE stand still, and bubbles go into WRITE-BACK.

A committed `WFI` puts Threads 2 and 1 to sleep, with their PCs after the `WFI`. They stay asleep until `wake_i`.

## Multiply and divide

- **Multiplications** (`MUL`, `MULH`, `MULHSU`, `MULHU`) take one cycle, like an ALU operation.
- **Divisions** (`DIV`, `DIVU`, `REM`, `REMU`) use a restoring divider. It works on the operand magnitudes, one quotient bit per cycle, and applies the signs at the end.
  - Each copy of a division stalls the pipeline for 33 cycles, the same way a load/store does. The result leaves EXEC in the cycle after.
  - Division by zero and `-2^31 / -1` give the results RISC-V defines.
- Each thread runs its own copy of a division. The results are compared in the write-back buffers like any other result.
- An upset inside a running division therefore shows up as a write-back mismatch. The restore flushes the pipeline, and Thread 0 runs the whole division again (33 more stall cycles) before the vote.
- A flush abandons a division that is still running.
- The Thread 2 copy of a division is compared only after the Thread 1 copy has run, about 35 cycles later. A division is therefore exposed for longer than other instructions to a second upset hitting the other copy, which the vote cannot correct.

## Write-back buffers, commit and bypass

This is the part of the design that needs the most care.

A result may reach a register file only after both copies exist. A thread's own previous result can therefore still be sitting in its write-back buffer when the thread's next instruction is in DECODE.

Here is the case with `lw x5; add x3,x3,x5`:

1. Thread 2's `lw` is in write-back, waiting for Thread 1's copy.
2. Meanwhile, Thread 2's `add` is in DECODE and needs `x5`.

The bypass logic handles this. It compares the source registers of the instruction in DECODE with the destination held in the **same thread's** pending buffer, and raises `rs1_bypass` / `rs2_bypass`. Each buffer has a `pending` flag. The flag is set when the buffer is written, and cleared when that entry is committed or voted.

A load's buffer entry holds only its destination. Its value comes from the single `LS_WB` register of the load-store unit.

Each buffer entry holds: PC, next PC, write enable, `rd`, value, and the load and WFI flags.

- **Comparison.** The write-back unit compares everything except the PCs. The PC unit compares the PCs.
- **Commit.** The write is made to all three register files, so Thread 0 always sees the committed state when it is woken.
- **On a mismatch.** Both buffers keep their contents. In the first End-of-Restore cycle, the write-back unit captures the majority of buffers 2, 1 and 0 in a vote register (`WB_buf_voted`), and the PC unit loads the majority of their next PCs. The voted result reaches the register files at the end of the second cycle, before the restarted Thread 2 reads any register.

## Load-store unit

A load/store must not simply run twice. Two accesses would be harmful for a memory-mapped device, and two stores would let the second overwrite the first unchecked. So the unit buffers the complete request of each copy: address, write data, byte enables, and the load/store flags.

| State | Meaning |
|---|---|
| `NORMAL` | Idle. A Thread 2 request is buffered and the unit goes to `WAIT_T1`; the pipeline is not held. A Thread 1 or Thread 0 request is buffered and the unit goes to `VOTING`, holding the pipeline. |
| `WAIT_T1` | The Thread 2 request is buffered (`load_valid` / `store_valid`). |
| `VOTING` | Compares buffer 2 with buffer 1. On a mismatch it raises `restore_fault_lsu` for one cycle, makes no access, keeps the buffers, and returns to `NORMAL`. If the copies agree, it raises `data_req` until `data_gnt`. In Restore mode, the request sent is the two-out-of-three vote of all three buffers. |
| `DATA_VALID_WAITING` | Waits for `data_rvalid`. A load's data is aligned and sign- or zero-extended into `LS_WB`. |
| `DONE` | Releases the pipeline. |

Timing and limits:

- With the included memory (grant in the same cycle, response one cycle later), a Thread 1 load/store spends 4 cycles in EXEC.
- `LS_WB` is not replicated, because the load is performed once. An upset in it between the load and its commit is not detected.
- Misaligned addresses are aligned down to the access size.

## PC unit

The PC unit holds the three PCs:

- Threads 2 and 1 each advance by 4 on their own fetch, or jump on their own taken branch.
- Thread 0's PC only ever moves on a commit, or at the end of a restore.

The unit also contains:

- the PC comparison (`restore_fault_pc_o`);
- the vote of the three next PCs (`pc_voted_o`);
- the sleep flag.

`checkpoint_pc_o` is Thread 0's PC.

## Restore timing

Here is one restore, from a write-back mismatch on an ALU instruction. Cycle 0 is the cycle the Thread 1 copy is compared.

| cycle | mode | event |
|---|---|---|
| 0 | Normal | Mismatch: `restore_fault_*`, flush of FETCH, DECODE and EXEC |
| 1 | Restore | Thread 0 fetches from the checkpoint PC |
| 2 | Restore | Thread 0 in DECODE |
| 3 | Restore | Thread 0 in EXEC; its result goes into buffer 0 |
| 4 | End-of-Restore | Vote into `WB_buf_voted` (or the voted memory access has already been made); load the voted next PC into all PCs |
| 5 | End-of-Restore | `WB_buf_voted` written to the three register files; Thread 2 fetches the next instruction |
| 6 | Normal | Thread 1 fetches |

Restore mode therefore lasts 3 cycles for an ALU instruction. Fetching resumes 5 cycles after detection. For a load or store, the Thread 0 copy also goes through the load-store unit, and Restore mode lasts 6 cycles. The workload test runs under a steady stream of upsets. It checks that no Restore mode lasts longer than 8 cycles, the published design's upper bound; the longest it sees is 6. It also checks that every End-of-Restore lasts 2 cycles.

The exception is a division. Thread 0 must run the whole division again, so Restore mode lasts 3 + 33 = 36 cycles.

## ECC memories

Both memories store 39-bit codewords:

- Bits at positions 1, 2, 4, 8, 16 and 32 are Hamming check bits.
- The 32 data bits fill the other positions from 3 upwards.
- Bit 0 is the overall parity.

The decoder (`dtmr_ecc_dec`) corrects any single flipped bit and flags any two flipped bits. The core counts corrections (`ecc_corrected_count_o`) and latches double errors (`ecc_double_err_o`). It does nothing else about a double error.

The memories themselves:

- **Program memory.** One-cycle synchronous read.
- **Data memory.** A request/grant/valid interface with byte enables. It grants at once and answers one cycle later. A partial store merges the decoded old word with the new bytes, then re-encodes the result.
- **Host port.** Both memories have a host port that writes plain data and encodes it on the way in. The data memory's host port also reads, decoded.

## Top-level interface (`dtmr_core`)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk_i`, `rst_ni` | in | 1 | clock; asynchronous active-low reset |
| `boot_addr_i` | in | 32 | all three PCs start here |
| `fetch_enable_i` | in | 1 | start executing |
| `wake_i` | in | 1 | wake Threads 2 and 1 after `WFI` |
| `host_we_i`, `host_sel_i` | in | 1 | host write; 0 selects the program memory, 1 the data memory |
| `host_addr_i`, `host_wdata_i` | in | 32 | host byte address and data |
| `host_rdata_o` | out | 32 | data memory word at `host_addr_i` (combinational) |
| `mode_o` | out | 2 | Normal / Restore / End-of-Restore |
| `sleep_o` | out | 1 | Threads 2 and 1 asleep |
| `restore_count_o` | out | 32 | completed restores |
| `ecc_corrected_count_o` | out | 32 | corrected single-bit errors (instruction fetches and loads) |
| `ecc_double_err_o` | out | 1 | an uncorrectable word was read (sticky) |

Parameters: `IMEM_WORDS` and `DMEM_WORDS`, both 1024 (4 KiB each). Addresses wrap within each memory.

## Differences from the published Klessydra-dfT03 design

- **Not built:** control/status registers, exceptions and interrupts of the base core. CSR, system, `FENCE` and unknown instructions execute as no-operations. How these parts would be checked, voted and restored under dTMR is left open.
- **Where the PCs are compared.** The PCs are compared in write-back, using the PC and next PC that travel with each copy. They are not compared between the decode and execute stages.
- **Restore length.** Restore mode lasts 3 cycles for an ALU instruction, 6 for a load/store and 36 for a division. End-of-Restore lasts 2 cycles. The published design reports "usually 2, at most 8" cycles for Restore mode and a typical recovery of about 4 cycles.
- **Load/store FSM.** The FSM has five states rather than three. Waiting for the Thread 1 copy and releasing the pipeline are states of their own.
- **Load/store latency.** A Thread 1 load/store takes 4 cycles in EXEC. Counted from the Thread 2 copy entering EXEC, the pair takes 5 cycles.
- **Repeated memory access.** A load/store whose copy is re-executed after a write-back or PC mismatch accesses memory again, as part of the voted access.
- **Memory sizes and interfaces** are this design's own.
- **Divider.** The published design names integer division as its example of a long-latency operation, but does not describe the divider or how recovery works in that case. The divider, its 33-cycle latency and the re-execution by Thread 0 are this design's choices.
- **Register-file upsets.** The three register files are not compared with each other. A bit flipped in one thread's register file is detected only when an instruction reads that register. The restore then repairs the instruction's result, but not the flipped register, so every later read of that register triggers another (correct) restore, until the register is overwritten.

## Simulating

Each `tb/tb_*.sv` file is a self-checking testbench. It prints `TB_RESULT checks=N failures=M` and stops itself if it hangs. The shared RV32I/RV32M instruction encoders are in `tb/rv_asm_pkg.sv`.

With Verilator 5:

```
verilator --binary -j 4 -Irtl -Itb --top-module tb_dtmr_core \
    rtl/dtmr_pkg.sv tb/rv_asm_pkg.sv tb/tb_dtmr_core.sv
./obj_dir/Vtb_dtmr_core
```

The other testbenches are built the same way. Replace the top module and the last file. Add `tb/rv_asm_pkg.sv` only where the testbench imports it.

| Testbench | What it checks |
|---|---|
| `tb_dtmr_core` | Runs a program with the core at its default sizes, while faults are injected (details below). |
| `tb_dtmr_workloads` | Two benchmark kernels under a steady stream of upsets (details below). |
| `tb_dtmr_lsu` | Thread 2 then Thread 1 requests against a memory model with random grant delay. It checks the 4-cycle EXEC time of the Thread 1 copy, every load width and sign, a mismatch followed by a Thread 0 vote, and abandoning on flush. |
| `tb_dtmr_wb_rf` | Commit to all three register files, mismatch detection, the vote, and bypass of ALU and load results. |
| `tb_dtmr_pc_unit` | Interleaving, redirects, commit, the WFI sleep, and the restore reload. |
| `tb_dtmr_restore_ctrl` | The mode sequence and its durations. |
| `tb_dtmr_ecc_dec` | Every single-bit and double-bit error on random words. |
| `tb_dtmr_muldiv` | All eight RV32M operations on corner-case and random operands against a reference model. It also checks the 33-cycle divide stall, the single-cycle multiply, and abandoning on flush. |
| `tb_dtmr_decoder`, `tb_dtmr_exec` | Against reference models written in the testbench. |
| `tb_dtmr_imem`, `tb_dtmr_dmem` | The memories. |

The `tb_dtmr_core` program sums an array, stores a scaled copy, does byte and half-word stores and loads, takes a jump, divides, takes the remainder and multiplies back, and ends with `WFI`. While it runs, the testbench injects these upsets:

- a bit of a stored instruction;
- a bit of a stored data word;
- a bit of the Thread 2 write-back buffer;
- a bit of Thread 2's PC;
- a bit of a buffered Thread 2 store;
- a bit of the Thread 2 result of the `SUB` just before the first division, so the mismatch is found while that division waits in EXEC and it is flushed;
- a bit of the quotient while Thread 2's division is running, after the `SUB` before it has committed.

It checks that:

- memory ends up correct;
- five restores happened;
- the divider stalled for exactly 165 cycles: two divisions, two copies each, plus Thread 0's re-run of the corrupted one;
- the first restore lasted 3 cycles;
- every mechanism was exercised at least once: bypass, redirect, load/store stall, divider stall, each kind of restore, ECC correction, and sleep.

About 620 cycles.

`tb_dtmr_workloads` runs three kernels, one after the other, each after a reset:

- **CRC-32** of 48 bytes, computed bit by bit.
- **8-tap FIR filter**, 12 outputs. It multiplies with a shift-and-add subroutine, so that calls and returns (`jal`/`jalr`) run under upsets too.
- **2D convolution**: a 3×3 kernel of signed coefficients over an 8×8 image, giving 36 outputs. Each output is a sum of `MUL` products, scaled by a signed `DIV`.

While they run, one random bit is flipped at most every 30 to 40 cycles, in one of these places:

- a write-back buffer holding an uncommitted copy;
- the PC of Thread 2 or Thread 1;
- the Thread 2 load/store buffer;
- the partial remainder or quotient of a running division (convolution only);
- a register of Thread 2 or Thread 1, each register at most once per kernel;
- a program-memory or data-memory word.

Only one upset is outstanding at a time. The injector waits until the previous one has been detected and restored, or has been masked. It also waits while a division is running, because a corrupted Thread 2 division is only compared after the Thread 1 copy has run too. Flipping both copies would be a double fault, which the scheme does not cover.

A flipped register is different. It stays wrong until the program overwrites it, and every read of it causes a restore that outvotes it. No other upset is injected while it lasts. If the program has not overwritten it after 300 cycles, the testbench repairs it, as a scrub would.

Together, the three kernels take about 33,000 cycles and receive about 330 upsets, which lead to about 200 restores. All results must match values computed in the testbench. Every Restore mode must last at most 8 cycles, or 8 + 33 when it re-runs a division, and every End-of-Restore exactly 2.

`LS_WB` is not targeted, because it is not replicated.
