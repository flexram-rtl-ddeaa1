# FlexRAM chip in SystemVerilog

FlexRAM is an intelligent-memory chip meant to replace ordinary DRAM chips in a
workstation. To the host processor (the *P.Host*) it is a plain 64-Mbyte memory.
Programs written for it can also run on the chip's own processors, right next to
the data. Each chip has two kinds of processor:

- **64 P.Arrays.** These are small 32-bit integer engines. Each one sits beside its
  own 1-Mbyte DRAM bank and can also reach the banks of its left and right
  neighbours, so the P.Arrays form a logical ring.
- **One P.Mem.** This is a larger processor that can see all of the chip's memory.
  It loads the P.Arrays' code, starts them, hands them parameters, collects their
  results and talks to the P.Host and to other chips.

This RTL models one chip at its full size: 16 basic blocks, 64 P.Arrays and
64 banks of 1 Mbyte each. It includes all of the on-chip glue. The P.Mem
processor core is not included. Its bus is a port of the top module, and a
testbench or an external core drives it.

## Block map

| Module | Role |
|---|---|
| `flexram_chip` | Top level. It connects everything below. |
| `basic_block` | Holds 4 P.Arrays, 4 banks with their switches, one 4-port instruction memory and one multiplier. |
| `pa_core` | The P.Array: a 4-stage RISC with 16 registers, 16-bit instructions, a TLB and a store buffer. |
| `pa_tlb` | The P.Array's 8-entry, fully associative data TLB. |
| `imem` | 8 Kbytes of instruction memory (4096 × 16 bits) with 4 read ports and 1 load port. |
| `mult_shared` | One 32-bit multiplier shared by 4 P.Arrays, with round-robin arbitration. |
| `dram_bank` | A 1-Mbyte bank with 3 row buffers of 2 Kbytes each. Hit latency is 10 ns and miss latency is 20 ns. |
| `bank_switch` | The FSM that chooses which of 4 sources drives a bank's single port. |
| `pa_ring` | Routes each P.Array's requests to its own bank or to a neighbour's bank. |
| `global_bus` | Connects the P.Host interface and the P.Mem to all 64 banks. |
| `host_if` | The P.Host side: plain memory accesses at Rambus-like timing, plus the START and STATUS registers. |
| `pmem_mmio` | The P.Mem's memory-mapped view of the chip. |
| `sync_unit` | The notify register with its pattern interrupt, and the broadcast to all P.Arrays. |
| `refresh_ctrl` | Issues periodic refresh commands over all banks. |
| `net_if` | The In and Out queues and the message packaging for the inter-chip network. |
| `flexram_pkg` | Shared widths, request and response structs, and opcodes. |

Everything runs on a single clock, nominally 400 MHz. Every latency below is
counted in cycles of that clock. Reset is synchronous and active low (`rst_n`).

## How a job runs

1. **P.Host writes the data.** It uses ordinary memory writes. Address bits 25:20
   select the bank.
2. **P.Host starts the P.Mem.** It writes the address of the P.Mem code into the
   START register of `host_if`. The chip then pulses `pmem_start` and presents the
   address on `pmem_start_addr`.
3. **The P.Mem sets up the P.Arrays.**
   - It writes the P.Array program into each basic block's instruction memory.
   - It writes a mapping table into each bank (see the next section).
   - It sets the notify mask and writes START, which starts every P.Array at the
     given instruction index.
4. **The P.Mem passes parameters.** It writes BCAST. The word reaches every
   P.Array's broadcast register one cycle later, and each P.Array's broadcast flag
   is set.
5. **The P.Arrays run and report.** Each one polls its flag (`BCF`) and reads the
   word (`BCR`). It then works mostly in its own bank, sometimes in a neighbour's.
   When finished it sets its notify bit (`NTF`) and halts.
6. **The P.Mem collects the results.**
   - When every masked notify bit is set, `pmem_irq` rises.
   - The P.Mem can also poll NOTIFY or STATUS.
   - It combines the results and writes DONE.
7. **The P.Host waits for DONE.** Its reads of the STATUS register return with
   `h_rsp_retry` set until DONE has been written. On a real system the memory
   controller would keep retrying such reads, so the P.Host never sees the retries.

## P.Array data addressing

A P.Array uses virtual data addresses. Instruction fetches are not translated.

The virtual page number (VPN) is address bits 31:12, so pages are 4 Kbytes. The
8-entry TLB maps a VPN to a physical page number (PPN) of 10 bits:

- The upper 2 bits say which bank: own (0), left (1) or right (2).
- The lower 8 bits give the 4-Kbyte page within that bank.

On a TLB miss, the P.Array walks a small table in its own bank at `MAP_BASE`
(default `0xFF000`). The table describes each data structure by its base and
limit pages:

| Location | Contents |
|---|---|
| `MAP_BASE + 0` | Number of entries N. |
| `MAP_BASE + 16·(k+1) + 0` | vbase: the first VPN of data structure k. |
| `MAP_BASE + 16·(k+1) + 4` | vlimit: the last VPN of data structure k. |
| `MAP_BASE + 16·(k+1) + 8` | pbase: the PPN of the first page. |

The walker reads entries in order. For the first entry that holds the page, it
loads `PPN = pbase + (VPN − vbase)` into the TLB and retries the access. If no
entry holds the page, the P.Array stops with `fault` set. Each table read is one
bank access, so a walk costs one bank latency per entry examined. Starting the
P.Arrays flushes every TLB.

For example, with three entries `{0x400, 0x400, own:0}`, `{0x401, 0x401, left:0}`
and `{0x402, 0x402, right:0}`:

- virtual address `0x400000` is page 0 of the own bank;
- `0x401000` is page 0 of the left neighbour's bank;
- `0x402000` is page 0 of the right neighbour's bank.

## P.Array instruction set

Instructions are 16 bits wide:

- bits [15:11] hold the opcode;
- bits [10:7] hold register A;
- bits [6:3] hold register B;
- the low bits hold `off3` ([2:0]), a signed `imm7` ([6:0]) or a signed `off11` ([10:0]).

| Opcode | Instructions | Meaning |
|---|---|---|
| 0 | HALT | Stop. The P.Array waits for the next start. |
| 1–11 | ADD SUB AND OR XOR SLL SRL SRA SLT MOV MUL | rA = rA op rB. MUL stalls until the shared multiplier returns. |
| 12–15 | ADDI LI ORI SLLI | rA = rA op imm7. LI loads the sign-extended imm7. |
| 16–19 | LW SW LB SB | Load or store rA at rB + off3. The offset is scaled by 4 for words. LB zero-extends. |
| 20–21 | BEQZ BNEZ | If rA is zero (BEQZ) or non-zero (BNEZ), pc += imm7. |
| 22–24 | J JAL JR | pc += off11. JAL also sets r15 = pc + 1. JR sets pc = rA. |
| 25–26 | BCR BCF | BCR reads the broadcast word and clears the flag. BCF reads the flag. |
| 27 | NTF | Set the notify bit to imm7[0]. |

**Pipeline.** The stages are IF, ID, EX and WB. WB results are bypassed into EX,
and the register file is write-through, so ALU sequences never stall. Branches
resolve in EX. A taken branch costs 2 cycles.

**Stalls.** Loads, multiplies and TLB walks hold EX until they complete. Stores go
into a 1-entry store buffer and EX moves on. Three things wait for that buffer to
drain:

- a second store;
- a load or a table walk;
- `NTF` and `HALT`.

So the P.Mem sees every store before it sees the notify bit or the halt.

A tiny assembler made of encoder functions is in `tb/pa_asm_pkg.sv`.

## Memory banks and the bank switch

Each bank has a single port with a 128-bit data line and byte enables.

**Row buffers.** The 1-Mbyte array is viewed as 512 rows of 2 Kbytes. Three row
buffers hold recently used rows.

- A hit answers exactly 4 cycles after it is accepted (10 ns).
- A miss answers after 8 cycles (20 ns). The miss loads the row into the first
  free buffer, or otherwise into a buffer chosen by an LFSR (random replacement).
- A dirty buffer is written back to the array when it is evicted.
- The response's `hit` bit says which case occurred.

**Refresh.** A refresh request takes the bank for 8 cycles at its next idle
moment. The row buffers keep their contents.

**Bank switch.** Four sources share the bank's port:

- the global bus;
- the bank's own P.Array;
- the left P.Array;
- the right P.Array.

The global bus always wins, because to the P.Host the chip must behave as plain
DRAM. The three P.Array sources take turns round-robin. A grant lasts until the
bank answers.

## P.Host interface

`h_valid`/`h_ready` carry a word request.

**Memory accesses** (`h_ctrl = 0`) go over the global bus. The response is padded
so that it arrives exactly 8 cycles after acceptance on a row hit (20 ns) and
16 cycles on a miss (40 ns).

**Register accesses** (`h_ctrl = 1`) answer in 8 cycles:

| `addr[2]` | Access | Register |
|---|---|---|
| 0 | write | START. Starts the P.Mem at the written address and clears DONE. |
| 1 | read | STATUS. Returns 1 with no retry once the P.Mem has written DONE. Before that it returns 0 with `h_rsp_retry` set. |

## P.Mem address map (`pmem_mmio`)

The P.Mem has one access outstanding at a time. DRAM accesses answer when the bank
answers. Everything else answers in the next cycle.

| Address | Access | Function |
|---|---|---|
| `0x0xxx_xxxx` | read/write | Chip DRAM. Bits 25:20 select the bank. |
| `0x1000_0000` / `_0004` | read | NOTIFY, bits 31:0 and 63:32. |
| `0x1000_0008` / `_000C` | read/write | Interrupt MASK, bits 31:0 and 63:32. |
| `0x1000_0010` | write | BCAST: broadcast the word to all P.Arrays. |
| `0x1000_0014` | write | START: start all P.Arrays at the instruction index written. |
| `0x1000_0018` | read | STATUS: bit 0 all halted, bit 1 any fault, bit 2 irq. |
| `0x1000_001C` | write | DONE: makes the P.Host's STATUS read succeed. |
| `0x1000_0020` | write | NET_TX: push a word into the Out queue. |
| `0x1000_0024` | write | NET_SEND: send `{type[23:16], len[15:8], dest[7:0]}`. |
| `0x1000_0028` | read | NET_RX: pop the In queue. Returns 0 when the queue is empty. |
| `0x1000_002C` | read | NET_STAT: `{in_count[31:16], send_busy[15], out_count[14:0]}`. |
| `0x2000_0000 + bb·8K + 4·w` | write | Instruction pair w of basic block bb. The low half is the even instruction. |

`pmem_irq` is high when the mask is non-zero and every masked notify bit is set.

## Inter-chip network interface

Each chip holds only the queues and the message packaging. Routing is left to an
off-chip router.

- **Queues.** The Out and In queues are each 32 words of 32 bits, which is two
  64-byte lines.
- **Sending.** The P.Mem pushes a payload into the Out queue, then issues a send.
  The chip transmits a header word `{dest, src, len, type}`, where `src` is
  `chip_id`, followed by `len` payload words.
- **Receiving.** Arriving header and payload words go into the In queue. The link
  is held off while that queue is full.
- **Link format.** Each link moves one word per cycle as two 16-bit beats, low half
  first. This matches 16 pins at twice the core clock. The double-rate pin circuit
  itself is not modelled.

## Refresh

Refresh at 16,000 commands per 128 ms works out to one command every 8 µs, which
is 3200 cycles. The chip has 64 × 512 = 32,768 rows, so each command refreshes one
row in each of 2 neighbouring banks, walking round all banks in turn.

## Departures and simplifications

- **P.Mem.** The two-issue P.Mem core and its caches are not included. Its word bus
  is a port.
- **Remote memory.** The P.Mem reaches other chips' memory only through explicit
  messages in the network queues. There is no hardware remote load or store.
- **Physical circuits not modelled:** the Rambus physical interface, the PLL and
  the per-block DLLs, power-save clocking, and DRAM row and column redundancy.
- **Broadcast.** The broadcast is one registered 32-bit value, not a set of
  physical bus segments.
- **This design's own choices.** The instruction encoding and the exact set of 28
  instructions are this design's own, as are the page size, the mapping-table
  layout, both address maps, the network header format and all handshakes.
- **Ring ends.** The ring wraps round: P.Array 63's right neighbour is P.Array 0.
- **Global bus.** It carries one transaction at a time, and the P.Host has
  priority over the P.Mem.
- **Bank storage.** The DRAM array is modelled as a plain memory of 512 rows of
  2 Kbytes per bank. A full chip therefore holds 64 Mbytes of simulation state.

## Simulating

Each block has a self-checking testbench `tb/tb_<module>.sv`. It prints
`TB_RESULT checks=N failures=M` and has a watchdog. With Verilator 5:

```
verilator --binary --timing -Irtl -Itb rtl/flexram_pkg.sv tb/pa_asm_pkg.sv \
          tb/tb_flexram_chip.sv --top-module tb_flexram_chip
./obj_dir/Vtb_flexram_chip
```

Use the same command for any other testbench. Leave out `tb/pa_asm_pkg.sv` where
the testbench does not use it. Verilator finds the modules from `rtl/` by name.

**`tb_flexram_chip`** runs the whole chip at its default size through one
complete job:

- host writes, hits and misses;
- START;
- STATUS retries;
- instruction loading and mapping tables;
- broadcast;
- 64 P.Arrays summing their arrays and multiplying values from both neighbours;
- the notify interrupt and the results;
- a looped-back network message;
- DONE.

It also counts the mechanisms it exercised: row-buffer hits and misses, retries,
TLB walks, left and right neighbour accesses, multiplier and bank contention,
refreshes and network words. It fails if any count is zero. It needs about
100 MB of memory and runs in seconds.

**`tb_workload_mme`** runs a reduced motion-estimation kernel on the full chip.
Each P.Array computes, with byte loads, the sum of absolute differences (SAD)
between a 16-pixel block and a reference strip at 6 displacements. It keeps the
best match. The bench checks every result and the total cycle count.

**`tb_workload_bsom`** runs rounds of broadcast, multiply-accumulate and
reduction, as in the self-organizing-map workload. It uses the shared multipliers.
The notify bits flip every round, so the barrier alternates between waiting for the
interrupt and polling NOTIFY for all zeros.

**`tb_basic_block`** closes a single basic block into a 4-wide ring and runs the
same kind of program.

The smaller testbenches check their blocks against reference models, cycle counts
included.
