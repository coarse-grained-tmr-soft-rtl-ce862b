# Run-time repair of a triplicated NEO430 CPU

An SRAM-based FPGA can lose a circuit to a single configuration upset. A common
defence is coarse-grained triple modular redundancy (TMR): three copies of a
processor run the same program in lock step, and majority voters on everything
they send out mask a single bad copy. Masking alone does not last: the bad copy
has to be rewritten (partial dynamic reconfiguration of its region), and then it
comes back in its power-up state while the other two have moved on. Before it can
vote again its state has to be made identical to theirs.

This RTL implements that whole loop for an MSP430-compatible 16-bit CPU in the
style of the NEO430:

1. voters that both mask and **name** the copy that disagrees;
2. a recovery sequencer that "reconfigures" that copy and asks for synchronization;
3. a **software/hardware handshake** that lets the running program decide *when*
   it is safe to stop; and
4. a hardware **synchronization controller** that copies every architectural and
   internal CPU register (PC, SP, SR, CG, R4–R15, and the hidden MAR, IR, SRC,
   DST) from a working copy into the repaired one, then wakes all three with one
   interrupt so they carry on in lock step.

Registers that software cannot reach (IR, MAR, the ALU operand latches) are the
reason a purely software context save/restore is not enough, and why the CPU
here has a dedicated synchronization port.

## System structure

```
                                   PRM error vector (OR of the voters' err flags)
              +-------------------------------------------------------------+
              |                                                             v
              |        +-------------+  sync_enable, target   +-------------------+
              |        |  sync_ctrl  |<-----------------------|    gpdrc_ctrl     |
              |        |             |----- sync_done ------->|   (sequencer)     |
              |        +-------------+                        +-------------------+
              |          | addr, data, we[i], hold[i], solo, irq    | prm_reset[i]
              |          v                                          v
              |   +-------------------------------------------------------+
              |   |   CPU 0 (PRM 0)    CPU 1 (PRM 1)    CPU 2 (PRM 2)       |
              |   +-------------------------------------------------------+
              |          | three bus requests (addr, wdata, be, re, we)
              |          v  address decode, per copy
              |     +---------+       +---------+       +---------+
              +-----|  voter  |-------|  voter  |-------|  voter  |
                    +---------+       +---------+       +---------+
                         |                 |                 |
                       IMEM              DMEM              GPIO <-- test_in, sync_enable
                         |                 |                 |---> test_out (bit 15 = ready)
                         +--------+--------+--------+--------+
                                  voted read data -> all copies, except:
                       IMEM port B + GPIO registers -> private read data -> the
                                  copy that restarts after a repair ("solo")
```

In normal operation every copy receives exactly the same inputs (read data,
interrupt). Every output of a copy reaches the shared world only through a
voter, so shared memories and peripherals never see the faulty copy and need no
synchronization of their own. The one exception to identical inputs is the
short stretch after a repair, when the restarted copy reads on its own path
(see below).

| Module | Role |
|---|---|
| `neo430_tmr_top` | the system above |
| `neo430_cpu` | one CPU copy: control FSM + IR, and the three data-path blocks below |
| `neo430_regfile` | R0..R15 (PC, SP, SR, CG, R4–R15) |
| `neo430_addrgen` | address adder (+0/+1/+2/−2/index) and MAR |
| `neo430_alu` | ALU with SRC/DST operand registers, byte mask and flags |
| `tmr_voter` | bitwise majority, `err[i]` = copy i differs from the result |
| `neo430_imem`, `neo430_dmem` | shared program memory (with a second read port for the restarted copy) and data memory |
| `neo430_gpio` | shared digital inputs/outputs |
| `gpdrc_ctrl` | picks the faulty region, runs the reconfiguration window, raises sync enable |
| `sync_ctrl` | lets the restarted copy run alone, then hardware register copy and wake-up |
| `neo430_pkg` | shared constants, opcodes, address map, bus struct |

## The recovery sequence

This is the part that needs the most care, because hardware and the running
program cooperate. Cycle numbers refer to the default parameters.

1. **Detection.** An upset makes one copy's bus request differ (address, data,
   strobes). The voter of the resource it targets flags that copy; the OR of the
   three voters' flags is the 3-bit PRM error vector. The shared resources only
   see the voted request, so nothing wrong is written. Note that a voter compares
   the whole request every cycle, so a corrupted register is caught as soon as it
   reaches the bus, even in data that is not being written. An upset that never
   reaches the bus stays latent and is not repaired.
2. **Reconfiguration.** `gpdrc_ctrl` registers the error vector, takes the
   lowest flagged index and holds that copy in reset for `RECONF_CYCLES` cycles.
   This window stands for the partial-bitstream rewrite; afterwards the copy is
   in its power-up state. Mismatches are ignored while a repair runs.
3. **Request and restart.** In the cycle the reset ends, `sync_enable` rises;
   it appears on digital input bit 15 of the GPIO. The repaired copy starts
   from address 0 with `solo` set, so it reads on its private path. The startup
   code at address 0 tests input bit 15, finds the request and puts the copy
   to sleep (`GIE | CPUOFF`) within a few instructions.
4. **Safe point chosen by software.** The program on the working copies polls
   input bit 15. When it sees the request at a point where it can stop, it sets
   output bit 15 (ready) and then sets `GIE | CPUOFF` in SR, which puts the CPU
   to sleep in `IFETCH_0`.
5. **Copy.** When ready is set and all three copies report `sleep_o`, the
   controller ends `solo` and asserts `hold` on the repaired copy. It then
   walks `sync_addr` through 0..19, one register per clock, taking
   each value from the first working copy and writing it into the repaired one.
   The second working copy is compared on the way; a difference sets `sync_err`.
6. **Wake-up.** One cycle after the last write the controller releases the hold
   and pulses `irq` to all three copies at once, 21 cycles after it saw
   ready+sleep. All three latch the interrupt in the same cycle, now with
   identical state. They take it together: push PC and SR, clear SR, jump
   through the vector at 0xC000.
7. **Resume.** The interrupt routine clears CPUOFF in the stacked SR and returns
   with RETI. The program clears ready, waits for input bit 15 to fall (the
   sequencer drops `sync_enable` after `sync_done`) and carries on. From here the
   three copies are bit-identical and the voters see no mismatch.

The software side of the handshake, in MSP430 assembly. The system testbench
runs this program, with a counting loop as the application work:

```
reset:  bit   #0x8000, &0xFFB0    ; restarted after a repair?
        jeq   start
        bis   #0x0018, SR         ; yes: sleep until the registers are copied
start:  ...                       ; normal initialisation
loop:   ...                       ; application work
        bit   #0x8000, &0xFFB0    ; sync request?
        jeq   loop
        bis   #0x8000, &0xFFB2    ; ready
        bis   #0x0018, SR         ; GIE | CPUOFF -> sleep until the wake-up IRQ
        bic   #0x8000, &0xFFB2    ; resumed: clear ready
wait:   bit   #0x8000, &0xFFB0
        jne   wait
        jmp   loop
isr:    bic   #0x0010, 0(SP)      ; leave SLEEP on return
        reti
```

### How the restarted copy reaches its own sleep

All reads of the working copies go through the voted bus, and the voters follow
the two working copies. A copy that restarts at address 0 would therefore get
read data belonging to someone else's address. While `solo` is set, the top level
gives that copy a private read path:

* instruction and constant fetches from IMEM use a second read port of
  `neo430_imem`, with the same one-cycle latency;
* reads of GPIO_IN/GPIO_OUT return the pin values directly;
* any other read (DMEM in particular) returns 0.

The restarted copy's requests still go into the voters with the other two. There
they lose 2-to-1, so any write it makes has no effect. Its voter mismatches are
ignored because the sequencer is busy. The startup check must therefore use only
IMEM and the GPIO, which the three-instruction sequence above does. Once the copy
sleeps it stays in `IFETCH_0`. Its registers (including the PC left at `start`)
are then overwritten, and `hold` keeps it idle while that happens.

## The CPU copy

A multi-cycle, non-pipelined MSP430-compatible core. The control FSM holds IR
and steps through micro-operations:

| Instruction class | Cycles |
|---|---|
| register → register | 4 (`IFETCH_0`, `IFETCH_1`, `DECODE`, `EXECUTE`) |
| jump (taken or not) | 3 |
| each index/absolute/immediate word or memory operand | +2 |
| PUSH | 5 + source; CALL 5 + source; RETI 7 |
| interrupt entry | 6 |

* Instructions: MOV ADD ADDC SUBC SUB CMP DADD BIT BIC BIS XOR AND; RRC SWPB RRA
  SXT PUSH CALL RETI; JNE JEQ JNC JC JN JGE JL JMP. Word and byte forms, all
  seven addressing modes, and the R2/R3 constant generator (0, 1, 2, 4, 8, −1).
  Undefined opcodes do nothing.
* SR bits: C0 Z1 N2 GIE3 CPUOFF4 V8. Writes to R3 (CG) are discarded, as on the
  MSP430, so it always reads 0 on the sync port.
* SLEEP is SR.CPUOFF: the FSM stays in `IFETCH_0` until an enabled interrupt is
  pending. One interrupt input, latched as pending; vector word at 0xC000.
* Bus: one request per cycle (`bus_req_t`: addr, wdata, be, re, we). Read data
  comes one cycle after `re`. Byte data is placed on both lanes for writes, and
  the addressed lane is picked for reads (the "swap" stages).
* Reset (synchronous, active low) clears every register; PC starts at 0, so the
  program begins at address 0.

**Synchronization port** (`sync_addr`, `sync_we`, `sync_wdata`, `sync_rdata`):

| sync_addr | 0..15 | 16 | 17 | 18 | 19 |
|---|---|---|---|---|---|
| register | R0..R15 | MAR | IR | SRC | DST |

Reads are combinational; a write takes priority over the CPU's own update in the
same cycle. The FSM state and the pending-interrupt flag are not on the port:
the protocol guarantees both are equal (all copies idle in `IFETCH_0`, no
interrupt pending) whenever the port is used.

## Address map and I/O

| Range | Resource |
|---|---|
| 0x0000 – IMEM_SIZE−1 | IMEM (read only to the CPUs; loaded through `imem_ld_*` while in reset) |
| 0xC000 – 0xC000+DMEM_SIZE−1 | DMEM; word 0xC000 is the interrupt vector |
| 0xFFB0 | GPIO_IN: bit 15 = sync enable, bits 14:0 = `test_in` |
| 0xFFB2 | GPIO_OUT: bit 15 = ready, all bits on `test_out` |

## Parameters (`neo430_tmr_top`)

| Name | Default | Meaning |
|---|---|---|
| `IMEM_SIZE` | 4096 | program memory, bytes |
| `DMEM_SIZE` | 2048 | data memory, bytes |
| `RECONF_CYCLES` | 1000 | length of the reconfiguration window |

None of these numbers is fixed by the architecture; they are this design's
choices. `sync_ctrl.NREGS` = 20 is the length of the register list above.

Other top-level ports: `seu_we/seu_cpu/seu_addr/seu_mask` flip bits in one
register of one copy (through its sync port) to emulate an upset; the status
outputs (`prm_err_vec`, `prm_reset`, `sync_enable`, `sync_ready`, `sync_irq`,
`sync_err`, `cpu_sleep`, `recovery_busy`, `repairs`) expose the recovery.

## How far this follows the original architecture

Taken from the published NEO430 TMR architecture: three CPU copies in
separate reconfigurable regions; shared IMEM, DMEM and peripherals behind
majority voters that also identify the faulty copy; a reconfiguration
controller that raises "sync enable"; a software poll of that request, a
software ready flag and SLEEP; a controller that copies PC, SP, SR, CG,
R4–R15, MAR, IR, SRC and DST into the repaired copy; an external interrupt that
wakes all copies; the CPU's division into control FSM (with `IFETCH_0` as start
and sleep state), address generator with MAR, ALU with SRC/DST, and register
file.

This design's own choices, where the architecture leaves things open:

* the whole MSP430 micro-architecture: state sequence, cycle counts, one
  interrupt, bus timing;
* one CPU bus decoded to per-resource voters (instead of separate instruction
  and data ports), the address map and the GPIO register layout;
* the digital inputs and outputs used by the handshake form a shared peripheral
  behind the peripheral voter, so no separate fourth voter is needed for the
  test outputs;
* the private read path (second IMEM port, direct GPIO reads) that lets the
  restarted copy run its start-up check while the others keep working, and the
  `hold` input that keeps it idle while its registers are written;
* one register copied per clock, with data from the first working copy and a
  cross-check against the second;
* lowest index wins when several copies are flagged; mismatches are ignored
  during a repair;
* memory sizes and the reconfiguration time.

Not built:

* the configuration-port primitive, the flash controller and the partial
  bitstreams: reconfiguration is represented only by the reset window of
  `gpdrc_ctrl`;
* ECC on the memories, and the fault tolerance of the static part (voters,
  memories, controllers are single points of failure here, as in the
  experimental original);
* peripherals other than the GPIO;
* relocation of a copy after a permanent fault.

## Simulating

Every testbench is self-checking and prints `TB_RESULT checks=N failures=M`.
With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
    rtl/neo430_pkg.sv tb/neo430_asm_pkg.sv tb/tb_neo430_tmr_top.sv \
    --top-module tb_neo430_tmr_top -o sim
./obj_dir/sim
```

Replace the testbench name for the others; Verilator finds the remaining modules
through `-I`. `-Wno-fatal` keeps width warnings in the testbenches' reference
arithmetic from stopping the build.

| Testbench | What it shows |
|---|---|
| `tb_neo430_tmr_top` | whole system at default parameters: a program keeps a counter and a running sum in DMEM through a subroutine; upsets are injected into R4 of copy 1, SP of copy 2 and PC of copy 0. Each is detected with the right index and repaired; the restarted copy runs the startup check alone and is asleep at `start` before any register is copied; 20 registers are copied per repair; all 20 are equal in the three copies after the wake-up; the wake-up interrupt comes 21 cycles after ready+sleep; after each repair no mismatch occurs; each counter step is +1 and the sum is always n(n+1)/2. Then 24 single-bit upsets from a fixed-seed generator hit random copies and registers (PC, SP, R4–R6, MAR, IR, SRC, DST). With the default seed, 20 are repaired the same way. The other 4 are overwritten before they reach the bus; the test checks that they leave the three copies identical and start no repair. |
| `tb_neo430_cpu` | one copy with a behavioural memory: every ALU op, flags, all addressing modes, byte lanes, jumps, CALL/RET, PUSH/POP, sleep, interrupt and RETI against hand-computed results; reads and writes through the sync port; hold blocks wake-up; 4-cycle register and 3-cycle jump timing. Then 40 random programs of 200 instructions (all double-operand operations, RRC/SWPB/RRA/SXT, PUSH, conditional jumps; word and byte; every source addressing mode) run on the CPU and on an instruction-level reference model in the testbench. All 16 registers are compared at every instruction boundary, and the data area at the end of each program. |
| `tb_neo430_alu` | random operands against an integer reference model, word and byte |
| `tb_neo430_regfile`, `tb_neo430_addrgen` | random traffic against reference models |
| `tb_tmr_voter` | masking and faulty-copy identification |
| `tb_neo430_imem`, `tb_neo430_dmem`, `tb_neo430_gpio` | data, byte lanes, read latency (both IMEM read ports) |
| `tb_gpdrc_ctrl` | index choice, reconfiguration window length, ignoring errors during a repair; 100 repairs with random error vectors and timing |
| `tb_sync_ctrl` | solo then hold, waiting for ready and sleep, copy into the right copy only, IRQ timing, `sync_err`; fixed and 50 random runs |

`tb/neo430_asm_pkg.sv` is a small MSP430 instruction encoder that the
testbenches use to build their programs; to change the system test, edit the
`assemble` task in `tb_neo430_tmr_top.sv`.

## Known limits

* Only upsets that change a copy's bus traffic are detected. An upset in a
  register that the program overwrites first is harmless and disappears. An upset
  in a register the program keeps but does not touch for a long time stays
  latent until it is used. If a second upset hits another copy in the meantime,
  two copies can be wrong at once, which a 2-of-3 vote cannot mask. The
  system test only injects into registers that its program uses within one
  loop iteration.
* A second upset during a repair is not handled: the sequencer ignores
  mismatches until the current repair ends.
* The program has to follow the handshake above. If it never reaches its safe
  point, the repair waits forever. The same holds if its startup code does
  not sleep when input bit 15 is set.
* `sync_ctrl` and `gpdrc_ctrl` contain concurrent assertions for their
  protocol rules. Examples: one region at a time; register writes only into the
  held copy; no wake-up while a copy is held. Simulate with `--assert` to
  enable them.
