# An expansible, fault-tolerant instruction cache chip with a Remote PC

This is RTL for an off-chip instruction cache built for a RISC II-style
processor (32-bit instructions, 30-bit word address, 400 ns cycle). The
cache chip has three ideas, and they shape most of the design:

1. **Cache size is bought chip by chip.** Identical chips share the CPU bus.
   They work either *direct mapped*, where an external decoder selects the
   one chip a word can live in, or *associative*, where every chip looks up
   every address and a token going round a ring names the chip that refills
   on the next miss.
2. **Guess the next address before it arrives.** Each chip keeps a 7-bit
   *Remote Program Counter* (RPC), a copy of the low PC bits. It starts
   reading its array at the guessed index while the CPU's real address is
   still crossing the pads. This nearly doubles the time available for the
   array read. The tag is always compared with the *real* address, so a wrong
   guess costs one cycle and never returns a wrong instruction.
3. **Faulty blocks are switched off, not thrown away.** Each block has a
   second invalid bit, the *fault bit*. Fault bits are shifted in at power-up
   and make a defective block a permanent miss. The word then comes from
   main memory around the cache. A chip with a few bad memory cells is still
   usable, which raises yield.

One chip holds 64 blocks of 64 bits (two instructions) and is direct mapped
internally.

## One chip

```
 cpu_addr[29:0] = | tag [29:7] (23) | index [6:1] (6) | word [0] |

 remote_pc --rpc[6:0]--+
                       v  (PREDICT: RPC index, otherwise CPU index)
             icache_array  64 x {valid, tag[22:0], data[63:0]}
             fault_chain   64 fault bits (shift register)
                       |  tag, valid, fault, word
             tag_compare --hit--> icache_ctrl --> ready, mem_req, token_out
```

| module | role |
|---|---|
| `icache_pkg` | sizes, address split, instruction fields, controller states |
| `icache_array` | tag, data and valid storage, row decoder, word multiplexer |
| `fault_chain` | one fault bit per block, loaded serially, daisy-chainable |
| `tag_compare` | hit = enabled, valid, not faulty, tag equal to the CPU's tag |
| `remote_pc` | 7-bit register, adder and multiplexer that predict the next index |
| `icache_ctrl` | controller that sequences each fetch |
| `icache_chip` | one complete chip |
| `chip_select_dec` | external decoder for direct mapping across chips |
| `icache_system` | top: `NCHIPS` chips (default 4), decoder, token ring, shared buses |

An entry is 23 tag bits and 64 data bits. The 30-bit word address splits into
tag `[29:7]`, block index `[6:1]` and word-in-block `[0]`. The RPC covers
bits `[6:0]`, which are exactly the chip's 128 words. It never needs more
bits, because the tag check against the real address catches any guess that
lands in the wrong place.

## Fetch timing and the Remote PC

This is the hardest part of the design. Each clock is one CPU cycle. The CPU
raises `cpu_req` with `cpu_addr` and holds both until `cpu_ready`. The
controller (`icache_ctrl`) goes through these states:

| state | array read at | what happens |
|---|---|---|
| PREDICT | RPC index | If the RPC equals the CPU's low 7 bits and the tag hits, the instruction is sent in this cycle. If the index was right but the tag missed, go to MISS. If the index was wrong, go to RETRY. |
| RETRY | CPU index | The extra cycle a misprediction costs. A hit is sent; otherwise go to MISS. |
| MISS | CPU index | No chip hit. The responsible chip (the selected chip when direct mapped, the token holder when associative) starts the memory read. The other chips wait. |
| FILL | – | Reads the block's two 32-bit words, lowest first, one `mem_req`/`mem_ack` per word, and writes the entry after the second one. If the block is faulty, only the requested word is read and nothing is written. |
| DELIVER | – | Sends the word from the refill buffer. When associative, it also passes the token. |

Latency, counting the request cycle and the delivery cycle, with `L` the
memory's cycles per word:

| case | cycles |
|---|---|
| hit, index predicted | 1 |
| hit, index mispredicted | 2 |
| miss, refill | p + 1 + 2(L+1) + 1, where p = 1 (predicted) or 2 |
| miss, faulty block (bypass) | p + 1 + (L+1) + 1 |

Each time the CPU takes an instruction (`bus_ready`), the RPC loads the guess
for the next fetch. The guess is built from the low bits of the address just
fetched and the instruction itself:

* a PC-relative call, or a PC-relative jump with condition "always": that
  address plus the jump offset;
* a PC-relative conditional jump with its *likely* bit set: the same;
* anything else: the next word.

The guess is built from the real address of the last fetch, not from the
old RPC value. A misprediction therefore corrects the RPC on the very next
fetch. Interrupts and register-indirect jumps cannot be predicted. They
simply take the RETRY cycle.

**Instruction encodings are this design's own choice.** Only the behaviour
above is specified for the original design; no bit patterns are. The values
are set in `icache_pkg`: opcode in `[31:25]`, `OP_JMPR = 7'h13`,
`OP_CALLR = 7'h09`, condition in `[22:19]` with "always" = `4'hF`, likely bit
at `[24]`, and a 19-bit signed byte offset in `[18:0]`. Change them there to
match a real instruction set. The predictor also assumes that a jump takes
effect on the next fetch. A CPU with a branch delay slot would need one more
step of delay in `remote_pc`.

## Several chips: direct mapped or associative

`icache_system` puts `NCHIPS` chips on one bus, and `assoc_mode` selects the
mapping:

* **Direct (`assoc_mode = 0`).** `chip_select_dec` decodes the address bits
  just above the chip's 7 bits (`[8:7]` for four chips) into one-hot chip
  selects. Only the selected chip can hit or refill. Chip `field mod N` is
  chosen, so non-power-of-two counts also work, though powers of two suit
  this mode best.
* **Associative (`assoc_mode = 1`).** Every chip compares every
  address. A word can sit in any chip at its index, so the chips together act
  as an `NCHIPS`-way set-associative cache. On a miss the token holder
  refills, then passes the token (`token_out` of chip i feeds `token_in` of
  chip i+1, and the last chip feeds chip 0). Each chip has a `start_token`
  pin; set exactly one. The token makes sure a word is never loaded into two
  chips.

Every chip runs the same state sequence in lockstep. They all see the same
address, the same `bus_ready` and the same instruction on the bus. That is
also how the RPCs of unselected chips keep following the program. Instruction
and memory outputs are OR-ed onto shared buses, and assertions check that at
most one chip drives each bus in a cycle. **Invalidate (`inval`) before
changing `assoc_mode`.** Otherwise a word cached under one mapping can be
found in two chips under the other.

## Faulty blocks

The fault bits of all chips form one shift register, chip 0 first. While
`ft_shift` is high, each clock moves `ft_in` into chip 0 block 0, moves every
bit one block up, and carries chip i block 63 into chip i+1 block 0.
`ft_out` is the last chip's block 63. After `NCHIPS*64` shifts, the first
bit shifted in belongs to the last chip's block 63. The bits have no reset:
load them before use.

A faulty block never hits and is never written. On a miss to it, the word is
read from memory and handed to the CPU directly (bypass). In associative
mode, a token holder whose block is faulty bypasses and still passes the
token. A later miss on that address then lands in another chip. An address
stays uncached only if every chip is faulty at that index.

`inval` (and reset) clears the ordinary valid bits. It is meant for start-up
and process switches.

## Interfaces of `icache_system`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `assoc_mode` | in | 1 | 0 direct mapped, 1 associative |
| `start_token` | in | NCHIPS | start-token pin of each chip |
| `inval` | in | 1 | clear all valid bits |
| `ft_shift`, `ft_in` / `ft_out` | in / out | 1 | fault-bit chain |
| `cpu_req`, `cpu_addr` | in | 1, 30 | fetch request, word address (held until ready) |
| `cpu_ready`, `cpu_instr` | out | 1, 32 | instruction delivered this cycle |
| `mem_req`, `mem_addr` | out | 1, 30 | memory word read (held until ack) |
| `mem_ack`, `mem_rdata` | in | 1, 32 | memory word available |
| `ev_mispredict`, `ev_fill`, `ev_bypass`, `ev_jump` | out | 1 | one-cycle event pulses for measurement |

A single `icache_chip` can be used alone. Tie `bus_ready` to `ready`,
`bus_instr` to `instr_out` and `token_in` to `token_out`, and set `cs = 1`.

## Where this departs from the original design

* **16-bit short instructions are not supported.** The original chip was
  meant to supply 16-bit as well as 32-bit parcels to a CPU that expands
  them. Neither that delivery nor the short format is specified, and the
  expander was never built in the original either. Everything here works on
  32-bit words.
* **Bus widths and handshakes are assumed.** This covers the CPU
  request/ready pair, the 32-bit memory word reads (two per block, so the
  miss cost resembles two memory accesses), and the shared OR buses.
* **Skipping RETRY** when the index was guessed right but the tag missed is
  this design's choice. So are the word order of a refill and delivering
  only after the whole block is in.
* **Instruction encodings** for jumps, calls and the likely bit are
  placeholders (see above).
* Array timing (combinational read, clocked write) is a functional model of
  the original 7-transistor memory cell array, not of its circuit timing.

## Simulating

Each module has a self-checking testbench in `tb/` that ends with a
`TB_RESULT checks=N failures=M` line. To run the full-size system test with
plain Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/icache_pkg.sv tb/tb_icache_pkg.sv tb/tb_icache_system.sv \
    --top-module tb_icache_system
./obj_dir/Vtb_icache_system
```

* `tb_icache_system`: four chips at default size. It loads random fault
  bits, with one index faulty in every chip. It runs a pseudo-random program
  with jumps, calls, likely and unlikely branches, interrupts and idle cycles
  in direct mode, invalidates, and then runs it in associative mode. It
  checks every instruction and every fetch's cycle count against its own
  model of tags, token and RPC, and fails if any mechanism (predicted hit,
  retry hit, refill, bypass, token pass, jump prediction, hit in a non-zero
  chip, invalidation) never happened.
* `tb_icache_chip`: the same for one chip, plus a check that an unselected
  chip stays silent.
* `tb_expansion_sweep`: 1, 2, 4 and 8 chips in both mappings on one
  synthetic program, with full checking, printing miss fractions. On that
  program (8000 fetches over 4096 words) the miss fraction falls from 0.167
  with one chip to about 0.13 with eight, and 95% of addresses are
  predicted. The program is synthetic, so only the trend means anything.
* Unit tests: `tb_icache_array`, `tb_fault_chain`, `tb_tag_compare`,
  `tb_remote_pc`, `tb_icache_ctrl` (cycle-by-cycle state checks),
  `tb_chip_select_dec`.

`tb_icache_pkg` defines the test program: `prog_word(addr)` is a fixed hash
of the address, shaped into jumps, calls or ordinary instructions. Memory
(`tb_mem_model`) therefore needs no storage.
