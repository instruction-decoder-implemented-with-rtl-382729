# Instruction fetch and decode front end for a pipelined 8051

The 8051 instruction set is awkward to pipeline. Instructions are one to three
bytes long, and the length is known only after the first byte has been
decoded. Branch targets come in three forms (relative, 11-bit absolute, 16-bit
long), and some targets are known only after execution (returns,
`JMP @A+DPTR`). This RTL is the front end of a five-stage 8051 pipeline (IF,
ID, OF, EXE, WB). It solves the problem with two ideas:

* **Fetch a byte at a time from small prefetch buffers.** The fetch stage
  serves one-byte requests out of two 32-byte buffers. The buffers refill
  themselves from program ROM, so a straight run of code and short loops
  never wait for the ROM.
* **Split decode in two.** ID1 reads only the first byte. From it, ID1 decodes
  everything, including how many operand bytes follow. ID2 then fetches those
  0-2 bytes, builds the operands and the branch target, and decides where the
  next instruction starts. ID1 does not fetch the next first byte until ID2
  has handed back that address. So the two sub-stages never compete for the
  fetch port and never fetch from a wrong-path address.

The original design is self-timed, with every stage talking over four-phase
bundled-data handshakes. This version is clocked and synchronous. Every
stage-to-stage link is still a handshake, though, so any stage may take as
long as it needs, and the timing of one stage never has to be known by
another.

## What is in the RTL

```
                 +---------------------------- if_stage ------------------------------+
 program ROM     |                      +-----------+                                 |
 rom_req/addr <--+-- mem_interface <----| buffer 0  |<--- READ/WRITE --+              |
 rom_ack/data -->+   (round robin)  --->| 32 bytes  |---- byte ------->|              |
                 |                  |   +-----------+                  | fetcher_ctrl |<-- byte request
                 |                  |   +-----------+                  | (hit check)  |--> byte
                 |                  +-->| buffer 1  |<--- READ/WRITE --+              |
                 |                      | 32 bytes  |---- byte ------->|              |
                 |                      +-----------+                                 |
                 +--------------------------------------------------------------------+
                                                        ^ f_req/f_addr   | f_ack/f_data
                 +------------------- id_stage ---------|----------------v------------+
                 |   ID1: first byte, decode  --ctrl-->  ID2: operand bytes, target   |--> o_valid/o_pkt (to OF)
                 |   owns the PC              <--next PC--  branch handling           |<-- j_valid/j_taken/j_addr
                 +--------------------------------------------------------------------+
```

| module | role |
|---|---|
| `if_id_top` | Top: `if_stage` feeding `id_stage`. Brings out the ROM port, the decoded-instruction port to the operand-fetch stage, and the branch-outcome port. |
| `if_stage` | Fetch stage: `fetcher_ctrl`, `NBUF` × `fetch_buffer` and `mem_interface`. |
| `fetcher_ctrl` | Checks each requested address against the buffers. Reads from the buffer that hits, flushes all buffers on a miss, and prefetches after the last byte of a buffer is read. |
| `fetch_buffer` | One buffer of `SIZE` bytes. Takes READ and WRITE (refill from an address) commands. |
| `mem_interface` | Round-robin arbiter that gives the buffers their turns at the single ROM port. |
| `id_stage` | Decode stage: `id1` and `id2`, sharing one fetch port. |
| `id1` | Fetches the first byte, splits regular from irregular opcodes, decodes. |
| `id2` | Fetches the remaining bytes, forms operands, computes targets, handles branches. |
| `i8051_pkg` | Types, the control-word encodings and the first-byte decoder. |

The operand-fetch, execute and write-back stages, the data RAM and its
interface, and the program ROM itself are not part of this RTL. Their
connection points are ports of `if_id_top`. The testbenches supply a ROM model
and a small back end that executes the decoded instructions.

## Handshake conventions

There is one clock `clk` and a synchronous active-low reset `rst_n`. Two kinds
of channel are used.

* **Request/acknowledge** (byte fetches, buffer commands, ROM reads). The
  requester raises `req` with its address and holds both steady. The request
  completes on the rising edge where `ack` is high; the data is valid in that
  cycle. Holding `req` into the next cycle starts a new request. `ack` may come
  in the same cycle as `req`; the buffers' WRITE and a buffer READ of a byte
  already present both do.
* **Valid/ready** (ID1 to ID2, ID2 to OF, the branch outcome into ID2). A
  transfer happens on an edge where both are high. The sender holds `valid`
  and the data until then.

Assertions in the modules check the holding rules, that the two decode
sub-stages never request a byte at once, and that returns and
`JMP @A+DPTR` are always answered as taken.

## The fetch stage

Each buffer holds `SIZE` consecutive bytes, starting at any address (blocks are
not aligned), plus a valid bit and a count of the bytes already arrived. The
fetch stage answers one decoder request like this:

1. **Hit check.** The controller looks for a valid buffer with
   `addr - base < SIZE`, taking the lowest-numbered buffer if several match.
2. **Hit.** A READ goes to that buffer. If the byte has already arrived it
   comes back at once. Otherwise the READ waits until the refill delivers it.
   From request to byte, a hit takes two clock edges.
3. **Last byte.** If the byte read was the buffer's last
   (`addr - base == SIZE-1`), a WRITE follows. It refills that buffer from
   `base + NBUF*SIZE`. With two buffers holding blocks B and B+1, the buffer
   that held B is reloaded with B+2, while the code carries on from the other
   buffer.
4. **Miss.** Every buffer is flushed. Buffer `i` is refilled from
   `addr + i*SIZE`, so the buffers again hold consecutive blocks starting at
   the new address. The request is then checked again, hits buffer 0, and
   waits for its first byte.

A WRITE is acknowledged at once. It replaces the start address and restarts
the fill. The buffer reads its bytes from ROM one at a time, in address order,
through `mem_interface`. If a WRITE arrives while a ROM read is outstanding,
that read is allowed to finish and its byte is thrown away, so the ROM
handshake is never broken off. `mem_interface` serves one ROM read at a time
and passes the turn round-robin among the buffers that are asking.

Worked example with the defaults, for straight-line code from 0100h. A request
for 0100h misses. Buffer 0 is refilled from 0100h and buffer 1 from 0120h, and
the two fills share the ROM alternately. Bytes 0100h-011Fh come from
buffer 0. Reading 011Fh makes buffer 0 reload from 0140h. Execution carries on
at 0120h from buffer 1, whose bytes arrived during the earlier fill.

## The decode stage

### ID1: first byte and the regular/irregular split

ID1 holds the program counter, which is 0000h after reset. Its cycle is:
fetch the byte at PC, decode it, offer the result to ID2, and wait for ID2 to
return the next PC.

The first byte is decoded by one of two paths, so that no single 256-way table
is needed.

* **Regular opcodes: low nibble 5-F.** These are the direct (`x5`), indirect
  `@Ri` (`x6`, `x7`) and register `Rn` (`x8`-`xF`) columns of the opcode map.
  The high nibble gives the operation (INC, DEC, ADD, ADDC, ORL, ANL, XRL,
  MOV #imm, MOV dir, SUBB, MOV from dir, CJNE, XCH, DJNZ/XCHD, MOV A, MOV to
  A). The low nibble gives the operand and the register number. A few cells
  are handled as exceptions: `A5` (reserved), `B5`, `D5`, `D6`/`D7` and
  `85` (`MOV dir,dir`, whose source byte comes first).
* **Irregular opcodes: low nibble 0-4.** These are the jumps, calls, returns,
  bit operations, accumulator-only operations, immediates, MOVX/MOVC and so
  on. They are decoded one by one.

The decoded control word `id_ctrl_t` carries:

| field | meaning |
|---|---|
| `op` | operation (opcode control), e.g. `OP_ADD`, `OP_CJNE`, `OP_LCALL` |
| `src1`, `src2` | read control: where the operands come from (`LOC_A`, `LOC_RN`, `LOC_IRI`, `LOC_DIR`, `LOC_IMM`, `LOC_BIT`, `LOC_C`, `LOC_DPTR`, `LOC_STACK`, ...) |
| `dst` | write control: where the result goes (`LOC_DIR2` = second direct address of `MOV dir,dir`) |
| `fmt` | layout of the operand bytes: `FMT_DIR`, `FMT_IMM`, `FMT_REL`, `FMT_ABS`, `FMT_LONG`, `FMT_IMM16`, `FMT_DIR_IMM`, `FMT_IMM_REL`, `FMT_DIR_REL`, `FMT_BIT_REL`, ... |
| `rem` | number of operand bytes still to fetch, 0-2 (follows from `fmt`) |
| `br` | branch class (see below) |
| `regular`, `reg_idx` | which path decoded it; `n` of `Rn` or `i` of `@Ri` |

### ID2: operand bytes, targets and the next PC

ID2 accepts ID1's word and fetches the `rem` bytes at PC+1 and PC+2. From
them it forms the fields of the decoded instruction, `of_pkt_t`:

* `dir_addr`, `dir2_addr`, `imm`, `bit_addr` and `imm16`, each placed
  according to `fmt`;
* `pc`, `opcode` and `next_pc` (= `pc` + length, which is also the return
  address of a call);
* `target`, computed as follows:

| form | instructions | target |
|---|---|---|
| relative | SJMP, JC/JNC/JZ/JNZ, JB/JNB/JBC, CJNE, DJNZ | `next_pc + sign_extend(last byte)` |
| absolute | AJMP, ACALL | `{next_pc[15:11], opcode[7:5], byte1}` |
| long | LJMP, LCALL | `{byte1, byte2}` |

The next PC goes back to ID1 according to the branch class. This is the part
that decides the stage's throughput.

| class | instructions | next PC sent to ID1 | when |
|---|---|---|---|
| `BR_NONE` | everything else | `next_pc` | as soon as the operand bytes are in, before the instruction is passed to OF |
| `BR_JUMP` | SJMP, AJMP, LJMP, ACALL, LCALL | `target` | as soon as the operand bytes are in: the PC changes inside the decoder |
| `BR_COND` | Jcc, JB/JNB/JBC, CJNE, DJNZ | `target` if `j_taken`, else `next_pc` | after the instruction has gone to OF and the outcome has come back on the jmp port |
| `BR_INDIRECT` | JMP @A+DPTR, RET, RETI | `j_addr` | after the outcome has come back on the jmp port |

In the first two cases ID1 fetches the next instruction while ID2 is still
offering the current one to OF. This overlap is where the pipeline gains.
Conditional and indirect branches stall decode until the back end answers, so
no wrong-path instruction is ever decoded, and there is nothing to squash.

Because ID1 waits for the next PC, ID2's operand fetches are always finished
before ID1 fetches again. `id_stage` therefore joins the two fetch ports with
a plain multiplexer.

### The branch-outcome port

`j_valid`/`j_ready` carry `j_taken` and `j_addr`, from the stage that resolves
the condition or the return address. `j_ready` is high only while ID2 is
waiting for an outcome. For a conditional branch only `j_taken` matters; ID2
already has the target. For an indirect branch `j_taken` must be 1, and
`j_addr` is the address to continue from.

## Parameters

| parameter | default | where | meaning |
|---|---|---|---|
| `NBUF` | 2 | `if_id_top`, `if_stage`, `fetcher_ctrl`, `mem_interface` | number of prefetch buffers (at least 1) |
| `SIZE` | 32 | `if_id_top`, `if_stage`, `fetcher_ctrl`, `fetch_buffer` | bytes per buffer, a power of two of at least 2 |
| `RESET_PC` | 16'h0000 | `if_id_top`, `id_stage`, `id1` | first instruction address |

Addresses are 16 bits, covering the 8051's 64 KB of program memory.

## Measured behaviour

`config_sweep_tb` runs the same GCD + Fibonacci program (265 instructions)
on several configurations. The ROM takes 3 cycles per byte. Two settings are
used:

* **spread**: main at 0100h, gcd at 0800h, fib at 1000h, with a back end that
  takes an instruction every cycle;
* **compact**: the whole program below 00B0h, with a back end that is busy 4
  cycles after each instruction, which stands in for the later pipeline
  stages.

| configuration | spread: cycles | relative | compact: cycles | relative |
|---|---|---|---|---|
| 1 × 32 bytes | 1440 | 0.90 | 1632 | 0.89 |
| **2 × 32 bytes** (default) | 1601 | 1.00 | 1838 | 1.00 |
| 3 × 32 bytes | 1917 | 1.20 | 2150 | 1.17 |
| 2 × 8 bytes | 2165 | 1.35 | 2309 | 1.26 |
| 2 × 16 bytes | 1800 | 1.12 | 2027 | 1.10 |
| 2 × 64 bytes | 1732 | 1.08 | 2064 | 1.12 |

Each call and return in this program leaves the buffered window, so misses
dominate. After a miss, all buffers refill at once and take turns at the one
ROM port. The buffer the decoder is waiting for therefore gets only 1/NBUF of
the ROM bandwidth, and a single buffer comes out about 10 % faster.

The original self-timed design reported two buffers as clearly best (a single
buffer 1.58 times slower, three buffers 1.33 times slower) and buffer size as
a small effect. This clocked model reproduces the ranking of three buffers
against two, and the small effect of size from 16 bytes up. It does not
reproduce the advantage of two buffers over one. More buffers pay off only
where straight runs are long enough for the look-ahead block to be used
before the next miss.

## Where this RTL departs from, or goes beyond, the original description

* **Clocked, not self-timed.** Handshakes are kept at every stage boundary,
  but each step takes at least one clock.
* **Choices made here, where the original is silent:** the exact
  regular/irregular split; all control-word encodings; the refill start
  addresses for a miss and for a last-byte prefetch; round-robin arbitration;
  a READ waiting for a byte still being filled; the PC being held in ID1 and
  returned by ID2; and the content of the branch-outcome port.
* **One fetch port for both decode sub-stages.** ID2's operand-byte fetches
  use the same port as ID1.
* **No zero-buffer configuration.** `NBUF` must be at least 1.
* **Not built, because they are not described:** the OF, EXE and WB stages,
  the RAM interface and data RAM (including the RAM path into the decode
  stage), and the program ROM.
* `OP_ILLEGAL` marks the reserved opcode A5h. It is passed on as a one-byte
  instruction.

## Simulating

Every testbench checks itself and ends by printing
`TB_RESULT checks=N failures=M`. Build one with Verilator 5; the package is
named first, and everything else is found in `rtl/` and `tb/` by module name:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
    rtl/i8051_pkg.sv tb/if_id_top_tb.sv --top-module if_id_top_tb -Mdir obj
./obj/Vif_id_top_tb
```

| testbench | what it exercises |
|---|---|
| `if_id_top_tb` | The whole front end at its defaults. It runs the GCD and Fibonacci program with a back end that executes each decoded instruction. It checks every instruction address and the program results, and counts that every mechanism occurred: hit, miss/flush, last-byte prefetch, ROM arbitration, regular and irregular decode, 0/1/2 operand bytes, jumps/calls in ID2, conditional branches taken and not taken, returns, OF back-pressure, and ID1 waiting on ID2. |
| `config_sweep_tb` | The same program, checked for correctness, on the 12 runs of the table above. |
| `if_stage_tb` | Fetch stage: data, hit latency, ROM traffic of a straight run, far jumps. |
| `fetcher_ctrl_tb` | Hit/miss/prefetch decisions and WRITE addresses, against a reference model. |
| `fetch_buffer_tb` | Refill, READs waiting on a fill, flush in mid-fill. |
| `mem_interface_tb` | Data routing and round-robin order under contention. |
| `id_stage_tb` | ID1 + ID2 following the control flow through random code. |
| `id1_tb` | All 256 opcodes: length, regular/irregular split, branch class, sample controls. |
| `id2_tb` | All opcodes with random operands: operand fields, targets, next PC, and branch ordering. |

`tb/rom_model.sv` is a behavioural 64 KB ROM with a fixed latency. Bytes that
a testbench does not write read as `addr[7:0] ^ addr[15:8] ^ 5Ah`.
