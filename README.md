# SCH — a 16-bit pipelined signal processor for speech work

SCH ("Speech Communication Hardware") is a fixed-point 16-bit signal processor
built for real-time speech processing, such as linear-prediction vocoders and
formant synthesis. Its main idea is to get signal-processor speed without a
micro-programmed, bit-slice machine. It has a plain,
microprocessor-like instruction set, where every instruction is one 16-bit word.
It still reaches one instruction per 200 ns cycle (5 MIPS) because it has:

* a three-level pipeline,
* separate program and data memories,
* a single-cycle 16 x 16 multiplier-accumulator.

A host minicomputer loads, starts, stops and single-steps the processor. The
host can also read and write its memories while a program runs, by stealing
single memory cycles. Samples move in and out over a modular I/O system. Each
connection in that system is a 20-line link with a simple handshake, buffered
by 256-word FIFO modules and paced by programmable sampling-rate generators.

This repository holds synthesizable SystemVerilog for the processor, its
memories, host interface, I/O board, links and FIFO modules. It also holds a
behavioural model of the analog converters and self-checking testbenches for
every block.

## Where this RTL departs from the published machine

The published description gives the architecture: the pipeline levels, the
memory sizes, the register set, the addressing modes, the size of each
instruction group, the subroutine depth, the 20-line link, the contents of the
I/O board and the host functions. It does **not** give:

* the instruction encoding,
* the exact list of operations,
* flag rules,
* the link handshake timing,
* port maps or register layouts,
* the cable signals.

Everything in those areas is this design's own choice. Treat it as one
consistent reading of the architecture, not as a reproduction of the
original machine. In particular:

* **Encoding and operation set.** The 30 memory-register and 31
  register-register operations listed below were chosen to fill the published
  counts with the operation kinds the description names: load, store, add,
  subtract, logical, multiply-accumulate, transfers and shifts. Binary code
  written for the original machine will not run here.
* **Multiplier-accumulator.** It keeps exactly 32 bits (P:MLSB) and wraps on
  overflow. The guard bits of the commercial part are not modelled.
  Multiply-subtract and accumulator shifts were added.
* **Pipeline effects.** The original machine let the pipeline show through
  in a few known instruction and addressing combinations, but these are not
  listed. This design keeps one (see below) and hides the rest.
* **Link signal directions.** The published line list can be read as giving
  Acknowledge to either end. Here the acceptor drives Ask and the source
  answers with Acknowledge. Init and Error are driven from both ends and
  combined as a wired OR.
* **I/O instructions** (IN/OUT on register A) and the I/O port map are
  invented. The description does not say how programs reach the board.
* **Analog converters** are a behavioural model with `real` ports. They
  cannot be synthesized.

## The processor core (`sch_core`)

### Registers

| register | width | use |
|---|---|---|
| A | 16 | main accumulator; first multiplier operand; I/O register |
| B | 16 | second accumulator |
| X | 16 | index register (the low 12 bits address data memory) |
| P | 16 | upper half of the 32-bit multiply-accumulate result |
| MLSB | 16 | lower half of that result |
| PC | 10 | program counter (1K words) |
| CC | 4 | N, Z, C, V |

A separate 4-entry stack holds return addresses (`sch_call_stack`). A fifth
nested CALL overwrites the oldest entry and pulses `overflow`.

### Instruction formats (`sch_pkg`)

```
00 cccc tttttttttt      Jcc target     16 conditions, see below
0100 00 tttttttttt      CALL target
0100 01 ----------      RET
0101 nnnn --- ooooo     register-register op o, shift count n (0..15)
0110 d -------- ppp     IN A,port (d=0)   OUT A,port (d=1)
1 ooooo 0 i aaaaaaaa    memory-register op o
                        i=0: address a (first 256 words)
                        i=1: address X + a (12-bit wrap)
```

The 16 jump conditions are: always, EQ, NE, MI, PL, CS, CC, VS, VC, LT, GE,
GT, LE, *flag set*, *flag clear* and never. The last two flag tests give the
program a way to test the flag it shares with the host.

The memory-register operations are:

* LDA, LDB, LDX, LDP, LDM
* STA, STB, STX, STP, STM
* ADDA, ADDB, SUBA, SUBB, ADCA, SBCA
* ANDA, ORA, XORA, ANDB, ORB
* CMPA, CMPB, TSTM
* ADDX
* MPY, MAC, MSU: P:MLSB = A·M, += A·M, −= A·M
* INCM, DECM: read-modify-write of the memory word

The register-register operations are:

* NOP
* TAB, TBA, TAX, TXA, TBX, TXB, TPA, TMA, TAP, TAM, XAB
* CLA, CLB, CLP
* NEGA, NOTA, INCA, DECA, INX, DEX, ABA, SBA
* ASL, ASR, LSR, ROL on A (by n places)
* ASLP, ASRP on the 32-bit accumulator
* SETF, CLRF on the shared flag

`sch_pkg` has encoder functions (`i_mr`, `i_rr`, `i_jmp`, `i_call`, `i_ret`,
`i_in`, `i_out`) that serve as a small assembler in testbenches.

Flag rules:

* Arithmetic operations set N, Z, C and V. C is the carry of an add, or the
  borrow of a subtract, i.e. set when the unsigned result would go below 0.
* Loads, logic operations and transfers into A or B set N and Z, clear V and
  keep C.
* Shifts also set C to the last bit shifted out.
* INX and DEX set N, Z and V but keep C, so loops can count down on X.
* Stores, multiply operations, transfers into X/P/MLSB, and I/O instructions
  leave CC alone.

### Pipeline timing

| level | work |
|---|---|
| 1 fetch | the instruction at PC is read (program memory read combinationally) and clocked into the decode register |
| 2 decode | decode; form the data address (direct or X + offset); read the operand; resolve jumps, CALL and RET; push/pop the return stack |
| 3 execute | ALU or MAC; write A, B, X, P/MLSB and CC; write data memory; IN/OUT |

One instruction completes per cycle. A straight run of N instructions takes
N + 2 cycles from reset.

Control flow finishes in level 2. A taken jump, CALL or RET uses its own
decode slot, and the instruction fetched behind it is discarded: one bubble. A
conditional jump tests the condition code that the instruction in level 3 is
producing in the same cycle. So "compare, then branch" works with no gap. The
flag tests see a SETF/CLRF in level 3 the same way.

Two situations are handled so the programmer never sees them:

* **Store then load of the same word.** Level 3 writes memory at the end of the
  cycle in which level 2 reads it. The core compares the addresses and feeds
  the stored value straight to the reader (`ev_bypass`).
* **Register reads.** A, B, P and MLSB are only read in level 3, so back-to-back
  use is always exact.

**One effect is visible.** X is read in level 2, to form an indexed address,
but it is written in level 3. An indexed instruction placed directly after an
instruction that changes X (LDX, ADDX, TAX, TBX, INX, DEX) still uses the
**old** X. Put one other instruction in between. A jump in between also counts,
since it only occupies level 2.

The pipeline holds in three cases:

* `run_en` is low, because the processor is halted or between single steps;
* the host steals a memory cycle;
* an IN finds no word waiting, or an OUT finds its source still busy.

While held, no register changes. Holding on I/O is how a program paces itself
on the converters: it simply waits in IN for the next sample.

## Memories and the host (`sch_pmem`, `sch_dmem`, `sch_host_if`)

Program memory is 1K x 16 and data memory is 4K x 16. The 1K variant of the
data memory is `DMEM_WORDS = 1024`. Both are static-RAM style: combinational
read and clocked write. Data memory does one operand read (level 2) and one
result write (level 3) per cycle. The read sees the memory as it was before
that cycle's write, which is why the bypass above exists.

The host side of `sch_host_if` takes:

* **Commands** (`h_cmd` with `h_cmd_stb`):
  * RESET pulses the core reset and leaves it halted.
  * RUN and HALT start and stop the core.
  * STEP gives exactly one clock of pipeline advance while halted. It is a
    cycle step, not an instruction step.
  * SETF and CLRF write the shared flag. The program can also set, clear and
    test the flag.
* **Memory access**, as a 4-phase request:
  1. The host raises `h_req` with `h_space` (0 program, 1 data), `h_addr`,
     `h_we` and `h_wdata`.
  2. The interface latches the request. In the next cycle it takes the chosen
     memory: the `p_en` or `d_en` strobe is high for exactly one cycle, and
     the core holds during it.
  3. It then raises `h_ack`, with the word read on `h_rdata`, until the host
     drops `h_req`.

  This works the same whether the processor runs or is halted. So coefficients
  and even instructions can be changed while a program runs.

## Links, the I/O board, FIFOs and converters

### The 20-line link (`sch_link`, `sch_link_src`, `sch_link_acc`)

Every connection has a source and an acceptor:

* 16 data lines and Acknowledge come from the source.
* Ask comes from the acceptor.
* Init and Error are shared: each end drives its own copy, and both ends see
  the OR.

The handshake is 4-phase:

```
acceptor: ask=1  ──►  source: data valid, ack=1  ──►  acceptor: latch, ask=0
          ──►  source: ack=0 (word delivered)  ──►  acceptor may ask again
```

With both ends always ready, a word takes 4 cycles (800 ns), far faster
than any audio rate. Interface assertions check that data stays stable while
ack is high, and that ack only rises while ask is high. Init empties the
holding registers at both ends. Error is a plain level that the converters use
to report overrun and underrun. The FIFO passes it through.

### Standard I/O board (`sch_io_board`)

The board has three acceptors (words into the processor), three sources (words
out of it) and two rate generators. The processor sees these ports:

| port | IN | OUT |
|---|---|---|
| 0–2 | word from acceptor n (waits until one has arrived) | word to source n (waits while the previous one is undelivered) |
| 4, 5 | period of generator 0 / 1 | set period (restarts the count) |
| 6 | control | bit0 enable gen 0, bit1 enable gen 1, bit2 gen 1 counts gen 0 ticks |
| 7 | status `{src_err, acc_err, acc_valid, src_busy}` (3 bits each) | bits 5..3 / 2..0 pulse Init on acceptors / sources |

A generator with period N ticks every N clocks, or every N ticks of generator
0 when cascaded. Two examples at a 5 MHz clock:

* 8 kHz is N = 625;
* 16.4 kHz is N = 305 (16.39 kHz).

### FIFO module (`sch_fifo`) and converters (`sch_converter`)

A FIFO module holds 256 words. It has an acceptor link at its input and a
source link at its output. It asks for words while it has room and offers its
oldest word while it holds one. Counting its two link registers, up to 258
words can be inside it.

The converter model works on two links:

* **A/D:** at each tick it quantises `vin` (±1.0 full scale, saturating) to a
  16-bit word and offers it on a source link. If the previous word has not been
  taken yet, it counts an overrun.
* **D/A:** at each tick it takes a word from an acceptor link and drives
  `vout` and `dac_code`. If no word is waiting, it counts an underrun.

## The system top (`sch_system`)

```
            host ── sch_host_if ──┬── sch_pmem (1K)
                                  ├── sch_dmem (4K)
                                  └── sch_core ── sch_io_board ─┬─ acc0 ◄─ sch_fifo ◄─ A/D ┐
                                                               ├─ src0 ─► sch_fifo ─► D/A ┤ sch_converter
                                                               ├─ acc1, acc2, src1, src2 ─► ports xin_*/xout_*
                                                               └─ gen0 ─► converter ticks, gen1 ─► subrate_tick
```

Link 0 carries the analog path. Links 1 and 2 are brought out as plain signals
(`xin_*`, `xout_*`), so two systems can be joined wire to wire, with or without
a FIFO module in between.

Parameters:

* `PMEM_WORDS` (1024),
* `DMEM_WORDS` (4096),
* `FIFO_WORDS` (256).

The `ev_*` outputs pulse on:

* retired instructions,
* discarded fetches,
* bypasses,
* I/O stall cycles,
* stolen cycles,
* stack overflow.

## Fit to the intended applications

* **LPC vocoder** (10 predictors, 8 kHz sampling, a new frame every 10 ms).
  The program is about 800 instructions, which fits the 1K program memory. The
  data needs roughly 700 words (320-point pitch frame, 200-point analysis
  frame, down-sampled frame, coefficients), well inside 4K. The work is 9.6 ms
  per 10 ms frame at 5 MIPS, about 48,000 of the 50,000 cycles. Taken jumps
  cost one extra cycle each here, so a tight program must keep inner loops
  short on branches. The analysis front end runs in `tb_lpc_analysis`: 8 kHz
  input from the A/D, a 200-sample window slid by 80 samples per frame, and
  R[0..10] from the multiplier-accumulator. That part takes 14,233 of the
  50,000 cycles of a frame. The correlation alone is about 13,000 cycles
  (2.6 ms), against 2.0 ms in the published timing. The simple loop there
  spends 6 cycles per product: load, MAC, index step, count, jump and the
  jump's bubble. Unrolling it would close most of the gap. The rest of the
  analysis (the recursion for the predictors, pitch detection and coding)
  has no test program.
* **Formant synthesizer** at 16.4 kHz. One sample period is 305 cycles.
  `tb_formant_synth` runs the vocal/nasal canal and the noise canal:
  * an impulse-train source through a nasal pole/zero pair and five cascaded
    formants;
  * a pseudo-random source through two formants.

  Each resonator is a call to one shared subroutine. The whole sample takes
  154 cycles, about 15 cycles (3 µs) per resonator including call and
  return. That leaves about half the period for other work, such as
  computing coefficients from new host parameters. Part way through the run,
  the host rewrites one instruction (it removes the call to the nasal zero)
  and the pitch period, while the program runs. The output follows the
  change from the next sample on.

## Verification

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`, and each has a cycle watchdog.

* `tb_sch_alu`, `tb_sch_mac`: random operands against integer reference
  arithmetic, all flags.
* `tb_sch_call_stack`: nesting, overflow and underflow against a queue model.
* `tb_sch_pmem`, `tb_sch_dmem`: every word, plus host/core port priority.
* `tb_sch_core`: an instruction-set model in the testbench runs the same
  programs as the core. It checks:
  * 40 random programs covering all operations, forward conditional jumps,
    nested calls and I/O with random delays;
  * random holds and stolen cycles;
  * final registers, flags, memory and output stream must match;
  * N instructions take N + 2 cycles;
  * a taken jump costs exactly one bubble.
* `tb_sch_link`, `tb_sch_fifo`, `tb_sch_io_board`, `tb_sch_rate_gen`,
  `tb_sch_converter` cover:
  * ordering under random pauses;
  * the 4-cycle word time;
  * FIFO capacity;
  * Init and Error;
  * port waits;
  * generator periods and cascade.
* `tb_sch_system` runs the whole system at full size, driven like the host:
  1. It loads a one-formant resonator program through the cycle-stealing port
     and single-steps it.
  2. It runs the program, which reads A/D samples, filters them, writes D/A
     samples and loops each sample round link 1.
  3. While the program runs, the host examines memory, halts and resumes it,
     and changes the filter gain.
  4. It stops the program through the shared flag.

  Every D/A word is compared with a reference filter. The testbench counts
  each mechanism (I/O stall, bypass, discarded fetch, stolen cycle,
  sub-rate tick, D/A underrun) and requires each to occur.
* `tb_formant_synth` and `tb_lpc_analysis` run the two application kernels
  above on the full-size system. Each checks every output word, bit for bit,
  against a model in the testbench. Each also checks that the work per
  sample or per frame fits the real-time budget and prints the cycles used.
* `tb_two_sch` joins two full-size systems in two ways: link 1 wire to wire,
  and link 2 through a FIFO module. One processor sends a pseudo-random
  burst into the FIFO while the other is halted, then a stream over the
  direct link. The test checks:
  * every word the second processor receives;
  * the FIFO fill level during the burst;
  * that the sender stalls on the direct link while no one reads it;
  * the receiver's running sum, read back through its host port;
  * that no word is spaced closer than the 4-cycle handshake.

## Simulating

All code is IEEE 1800-2017. With Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/sch_pkg.sv rtl/sch_link.sv \
          tb/tb_sch_system.sv --top-module tb_sch_system -Mdir obj -o sim
./obj/sim
```

Replace the testbench name to run another one. The package must come first.
`sch_link.sv` is needed by anything that uses links. Add
`-Wno-fatal` if your Verilator treats lint warnings as errors. Everything
except `sch_converter` (real-valued ports) is synthesizable. To synthesize the
system, replace the converter with real converter interfaces.
