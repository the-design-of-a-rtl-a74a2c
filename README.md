# A 7-stage in-order pipeline for a subset of 32-bit x86

This is a small x86 computer: a processor core that runs a subset of the
32-bit x86 instruction set, two 512-byte caches, and one system bus. The bus
connects 32 KB of main memory, a keyboard and a monitor. The core is an
in-order, seven-stage pipeline with precise exceptions:

```
fetch -> decode -> register read -> address generation -> D-cache access -> execute -> writeback
```

Two x86 features make this harder than a textbook RISC pipeline:

- Instructions vary in length (1 to 15 bytes), so fetch cannot know where
  the next instruction starts.
- Many instructions both read memory and write registers.

The design deals with them in three ways:

- A 32-byte instruction buffer decouples fetch from decode.
- Memory operands get their own pipeline stages (address generation, then
  D-cache access), placed before execute.
- A tag-based scoreboard lets several in-flight instructions target the
  same register without a write-after-write stall.

## What is and is not here

Everything from the instruction buffer onward is RTL:

- the stages after decode, with the scoreboard, forwarding, branches,
  exceptions and interrupts, and the REP MOVS engine;
- the caches, the TLB, the bus arbiter, and the memory, keyboard and
  monitor controllers.

The instruction *decoder* is not included. In the original design it is a
microcode ROM plus a control-signal decoder; its contents and control-word
layout are not available. Instead, the top level `x86_system` takes the
decoded control word on its `dec_*` ports, one micro-op per cycle. What the
decoder needs is brought out as ports:

- the first 16 bytes of the instruction buffer;
- its valid count and the current EIP;
- the result of the built-in instruction-length decoder.

Three other things are also inputs rather than state the processor builds
for itself:

- segment bases and limits;
- the interrupt descriptor table base;
- the TLB contents (`tlb_ld_*`).

Treat the core as "datapath and control without the decoder". The
end-to-end testbench `tb/tb_x86_system.sv` contains a small decoder and
operating-system model showing how the ports are driven.

## The front end: instruction buffer and length decoding

`fetch_unit` holds a 32-byte instruction register (IR). Byte 0 is always the
first byte of the instruction being decoded, and a 5-bit counter tracks how
many bytes are valid.

Each cycle:

- The I-cache delivers up to 16 bytes, aligned to the fetch address.
- They are appended only if the IR held fewer than 16 bytes *at the start
  of the cycle*. The decision uses the registered count, not this cycle's
  consumption, because the decoder reports the instruction size late in
  the cycle.
- The concatenated buffer is shifted down by the decoded size.

Three address latches are kept:

| Latch | Contents |
|---|---|
| `EIP` | The architectural EIP. |
| `EIP+CS` | The linear address, so fetch never adds the CS base. |
| `VIP+CS` | A 28-bit line address that runs one cache line ahead and drives the I-cache. |

A redirect reloads all three latches and empties the IR.

`insn_length` measures the instruction at the head of the IR. It handles:

- up to three prefixes (operand size, REP, segment overrides);
- one- and two-byte opcodes;
- ModR/M, SIB, displacement and immediate fields;
- the operand-size prefix, which changes the size of 16/32-bit immediates.

It raises `not_enough` when the IR does not yet hold the whole instruction.

## Register read: scoreboard with tags

`regfile_sb` is an 8 x 32-bit register file with 4 read and 3 write ports.
Each register carries a valid bit and an 8-bit tag:

- When an instruction leaves register read, it clears the valid bit of each
  register it will write and stores its own tag there.
- At writeback the value is always written, but the valid bit is set again
  only if the writer's tag is still the stored one.

So a younger writer to the same register simply takes over; there is no
write-after-write stall.

A read that finds its register invalid is satisfied by forwarding when the
execute or writeback stage holds that register with the awaited tag.
Otherwise register read stalls.

Reads and writes are always 32 bits wide. An 8- or 16-bit result is merged
into the old value at writeback (AL..BL in bits 7:0, AH..BH in bits 15:8).

## Address generation and the exception checks

`agu` computes:

- the ModR/M/SIB address, `base + index*scale + displacement + segment base`,
  using two 3-input adders (`add3_32`) built on carry-save rows and a
  carry-select adder (`cs_adder32` over 8-bit carry-lookahead groups,
  `cla8`);
- the stack address for PUSH/POP, plus the highest and lowest bytes the
  access touches;
- the interrupt-table entry address.

The D-cache access stage checks every address the instruction can touch:

- against the segment limit (`seg_limit_check`);
- in the 8-port `tlb`, which raises a page fault (miss or not present) or a
  general protection fault (write to a read-only page).

Exceptions travel with the instruction and are acted on only at writeback.

The TLB has 8 fully associative entries with these bits: valid, present,
read-only, non-cacheable, and a 2-bit device id. In the intended setup, six
entries map memory and two non-cacheable entries map the keyboard and the
monitor. Pages are 4 KB.

## Branches

- **Direct JMP and Jcc** resolve when the branch reaches the D-cache access
  stage. The flags of the preceding instruction are forwarded there from
  execute or writeback. Register read holds everything behind an unresolved
  branch, so a taken branch costs **4 bubbles**. A taken branch whose target
  lies past the code-segment limit does not redirect. It carries a general
  protection fault to writeback instead.
- **Indirect jumps** and the jump into an interrupt handler resolve at
  writeback, with a 7-cycle bubble.

There is no branch prediction.

## Memory ordering and the shared D-cache port

The D-cache has one port, shared by two stages:

- the read of the instruction in the D-cache access stage;
- the write of the instruction in writeback.

`mem_order` gives the write priority. It also holds back any read while an
older instruction in execute or writeback will still write memory. That
rule compares no addresses, so it is deliberately conservative. While the
read is held, the front stages freeze and execute receives a bubble.

A D-cache miss freezes the whole pipeline.

## REP MOVS

`rep_movs_unit` sits in the address-generation stage and copies one element
per cycle:

- The first iteration reads ECX, ESI and EDI from the register file.
- Later iterations use private copies, so the loop never waits on the
  scoreboard.
- Each iteration issues a read and a write, and writes the updated ECX, ESI
  and EDI back.
- A zero count ends the loop.

The sequencer is: first, then iterate, then three bubble states, then
done. The front end is held until the sequence finishes.

## Exceptions and interrupts

Only the writeback stage acts on exceptions. Priority, highest first:

| Event | Vector |
|---|---|
| Page fault | 14 |
| General protection | 13 |
| Keyboard interrupt (INT1) | 0 |
| Second interrupt pin (INT2) | 1 |

When one is taken, the writeback stage:

1. suppresses the instruction's updates;
2. saves its EIP, CS and EFLAGS;
3. flushes every pipeline latch;
4. clears the scoreboard;
5. reports the vector on `exc_vector` (valid while `exc_flush` is high).

`exc_stall` then stays high until the decoder signals `dec_handler_done`.

The decoder is expected to insert four micro-ops:

- push of EFLAGS, CS and EIP (the saved values, on `exc_saved_*` from the
  cycle after the flush);
- a jump through the interrupt table (`dec_idt` with `dec_jmp_ind`).

The table read fetches one doubleword at `idtr_base + 8*vector`; that
doubleword is the handler's EIP.

Exceptions and interrupts stay disabled until a POP-EFLAGS micro-op (the
last of IRETD) commits. The interrupt pins are ignored meanwhile.

## Memory system and bus

| Part | Behaviour |
|---|---|
| `icache` | 512 B, direct mapped, 16-byte lines; virtually indexed (bits 8:4), physically tagged (6-bit tag). |
| `dcache` | Same organisation, write-back and write-allocate with a dirty bit. Splits unaligned accesses into two. Passes non-cacheable accesses straight to the bus. |
| `bus_arbiter` | Centralised and synchronous; the D-cache wins over the I-cache. |
| Bus | Same clock as the core: 128-bit data, 15-bit address, BBSY, 2-bit device id, BRW, ACK. |
| `mem_ctrl` | 32 KB in 8 banks of 128-bit words; a countdown timer decides when data is ready. |
| `keyboard_ctrl` | 256-byte buffer; raises INT1 on each key, lowers it when the processor reads. |
| `monitor_ctrl` | Buffers bytes written to it, dropping the oldest when full. |

The bus uses these conventions:

- The bus is modelled as OR-combined structs (`bus_m_t` from the masters,
  `bus_s_t` from the slaves) rather than tri-state wires.
- Device ids: memory 1, keyboard 2, monitor 3.
- BRW is 1 for a write.
- Memory ACKs `LATENCY + 2` cycles after a request appears (`LATENCY` = 4
  by default). The keyboard and monitor ACK after 2 cycles.

## Parameters of `x86_system`

| Parameter | Default | Meaning |
|---|---|---|
| `MEM_BYTES` | 32768 | main memory size |
| `MEM_LATENCY` | 4 | memory timer start value (cycles) |
| `CACHE_BYTES` | 512 | size of each cache |
| `LINE_BYTES` | 16 | cache line size |
| `KB_DEPTH`, `MON_DEPTH` | 256 | keyboard and monitor buffer entries |
| `RESET_EIP`, `RESET_EIP_CS` | 0 | start address after reset |

## Departures and choices to be aware of

- **No decoder.** The control word is an input (see above). Segment
  registers are not loaded by instructions; their bases and limits are
  inputs.
- **Interrupt-table entry.** The entry is a single doubleword holding the
  handler EIP. The CS half of an x86 gate is not reloaded, and the two
  table-read micro-ops of the original scheme are merged into one.
- **Flag forwarding.** Flags are forwarded from execute and writeback, but
  only to resolve a Jcc. Otherwise flags, like segment values, are not
  forwarded.
- **Where direct branches resolve.** They resolve one stage later than
  address generation, which still gives the 4-bubble cost.
- **Unspecified details chosen here:**
  - the memory timer value;
  - the 4 KB page size;
  - the monitor buffer depth;
  - vector numbers 13, 14 and 1;
  - the device ids of memory and keyboard;
  - all handshake signal names.
- **Other limits:**
  - A fetch from a non-present page waits rather than faulting.
  - REP MOVS addresses are not checked against the segment limit.
  - Only direct branch targets are checked against the code-segment limit;
    indirect jump and return targets are not.
  - The INT2 pin must be held until the interrupt is taken.
- **Observation ports.** `stat_*` outputs pulse on each pipeline event
  (commit, miss, stall, forward, taken branch, copy, bus grant, eviction).

## Files and simulation

`rtl/` has one module or package per file. `x86_pkg.sv` holds the shared
types: bus structs, operation ids and vector numbers.

`tb/` has one self-checking testbench per block. Each one:

- drives random or directed stimulus;
- compares the block's outputs against an independent model;
- checks cycle counts where the design fixes them;
- ends by printing `TB_RESULT checks=N failures=M`.

`tb/tb_x86_system.sv` runs the whole machine with default parameters. It
acts as decoder and operating system, and runs a program with:

- a dependent ALU chain and a store loop;
- a load right behind a store;
- REP MOVSD;
- writes to the monitor, and a keyboard interrupt whose handler echoes the
  key;
- a page fault that the handler fixes by loading the TLB, then a retry;
- a jump past the code-segment limit, whose general protection handler
  raises the limit before the jump is retried;
- IRETD.

It checks:

- the final registers and the monitor output;
- that each mechanism happened at least once;
- that taken branches cost exactly 4 bubbles.

To run a testbench with Verilator 5:

```
verilator --binary --timing -Wno-fatal --top-module tb_x86_system \
    -y rtl -y tb rtl/x86_pkg.sv tb/tb_x86_system.sv
./obj_dir/Vtb_x86_system
```

Replace the top module and file name to run any other block's testbench.
