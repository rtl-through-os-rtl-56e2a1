# An eight-stage RV32IA soft processor with DRAM, VGA text mode and PS/2

This is a small complete computer for an FPGA board. It has an in-order RISC-V core (RV32I plus
the A extension, machine mode only) with an eight-stage pipeline. Main memory is external DRAM
reached over AXI4, through a 4 KB direct-mapped cache. There is a dual-ported video memory that
feeds a colour text-mode VGA display. A PS/2 keyboard delivers ASCII characters by interrupt, and
a machine timer gives a second interrupt source. The aim is a machine on which small kernels
(games, a keyboard echo loop, benchmark programs) run in real time.

The design is written for a board where the DRAM is shared with a hard Arm processor. The Arm
side loads the program into DRAM and keeps the lowest 128 MB for itself. The RISC-V side starts
at address 0 once reset is released.

## Clocks

| Clock | Rate on the board | Drives |
|---|---|---|
| `clk` | 50 MHz | the core, the memory system, the timer, the keyboard and the DRAM controller |
| `clk_vga_mem` | 100 MHz | the VGA controller and the second port of video memory |

The 25 MHz pixel rate is one quarter of `clk_vga_mem`. It is produced by a four-phase counter
inside the VGA controller, so it is not a separate clock input. The only signals that cross
between the two clock domains are:

- the reset, which is synchronised into the video domain;
- video memory, which is a true dual-clock RAM.

## Address map and software interface

| Range | What |
|---|---|
| `0x0000_0000` – `0x7FFF_FFFF` | Main memory, cached. Address A appears on AXI as A + `DRAM_BASE` (`0x0800_0000`). On a 512 MB board, A up to `0x17FF_FFFF` (384 MB) reaches DRAM. |
| `0x8000_0000` + 4·w | Video memory word w, 0 ≤ w < 4096. Loads, stores and AMOs only; instructions cannot be fetched from here. |

All accesses are assumed to be naturally aligned; the low address bits only choose bytes inside
the word.

The timer and keyboard are reached through CSRs, not through memory:

| CSR | Name | Access |
|---|---|---|
| `0x300 0x301 0x304 0x305 0x340–0x344 0xF14` | mstatus, misa, mie, mtvec (direct mode), mscratch, mepc, mcause, mtval, mip, mhartid | standard machine CSRs |
| `0xC01 / 0xC81` | time, timeh | read |
| `0x7C0 / 0x7C1` | mtimecmp low / high | read and write; reset to all ones |
| `0xFC0` | keyboard | read gives `{valid, char[7:0]}`; any CSR instruction naming it consumes the character when it retires |
| `0xB00+N / 0xB80+N`, `0xC00+N / 0xC80+N` | performance counter N, low / high | read only |

The interrupt sources are:

- **Timer:** cause 7 (mip.MTIP). It is pending while time ≥ mtimecmp. time counts core cycles.
- **Keyboard:** cause 11 (mip.MEIP). It is pending while a character waits to be read.

The keyboard interrupt has priority over the timer. Both need mstatus.MIE and their bit in mie.

The performance counters count at write-back. They are numbered as follows:

| N | Counts |
|---|---|
| 0 | cycles |
| 2 | instructions retired |
| 3, 4 | forward conditional branches: total, predicted correctly |
| 5, 6 | backward conditional branches: total, predicted correctly |
| 7, 8 | forward jumps: total, predicted correctly |
| 9, 10 | backward jumps: total, predicted correctly |
| 11, 12 | instruction fetches: total, cache hits |
| 13, 14 | data accesses: total, cache hits |

"Backward" means the target is below the instruction's own pc.

## The core pipeline

The core is `rtl/core.sv`, built from `decoder`, `alu`, `fwd_regfile`, `csr_file`,
`branch_predictor`, `control_flow`, `interrupt_controller` and `perf_counters`.

| Stage | Work |
|---|---|
| IF1 | Sends the pc to the fetch port. Reads the branch predictor. |
| IF2 | Waits for the instruction word. If it is a conditional branch or JAL whose counter says taken, IF2 sends IF1 to the target. This costs one bubble. |
| ID | Decodes and reads operands through the forwarding register file. Raises a stall request if an operand is not computed yet. |
| EX1 | ALU operation. CSR read. |
| EX2 | Works out the real next pc. Trains the predictor. On a misprediction, ECALL, EBREAK, an illegal instruction or MRET, it flushes IF2, ID and EX1 and reloads the pc. |
| MEM1 | Issues the data access. Stalls while the data port is not ready. Holds the LR/SC reservation. |
| MEM2 | Waits for the data response. Stalls until it arrives. |
| WB | Writes the register file. Applies CSR writes. Enters traps. Does the mstatus part of MRET. Counts performance events. |

### Forwarding

A result can be forwarded into ID from the end of any of EX1, EX2, MEM1, MEM2 or WB, as soon as
it has been computed:

- An ALU result can be forwarded from EX1 onwards.
- A load result, an SC result or an AMO result can be forwarded only from WB, once MEM2 has
  received it.

When several stages write the same register, the youngest one wins. The WB entry is also the
register file's write port. ID asks for a stall only when a needed operand is still being
computed.

### Control flow

`control_flow` turns three kinds of request into actions. The oldest request always wins:

- A **stall request** from stage j holds stages IF1 to j and lets a bubble into stage j+1.
- A **flush** from EX2 invalidates IF2, ID and EX1, and loads the correct pc. It only acts when
  EX2 itself is not held by an older stall.
- A **drain** for a pending interrupt stops IF1 from fetching. When IF2 to WB are all empty, the
  interrupt is taken. mepc is set to the pc that would have been fetched next, and the pc is set
  to mtvec.

A fetch that was in flight when a flush or drain came is marked. Its response is discarded when
it arrives.

### SYSTEM instructions

Only one SYSTEM instruction (a CSR access, ECALL, EBREAK or MRET) may be in the pipeline at a
time. ID stalls a SYSTEM instruction while another one is in EX1 to WB. Because of this:

- a CSR can be read in EX1 and written in WB without any forwarding;
- a trap can be resolved in EX2 but committed to the CSRs in WB.

### Branch prediction

The predictor has 128 two-bit saturating counters, indexed by pc[8:2], with no tags. They reset
to weakly not-taken. Only conditional branches and JAL can be predicted taken, because their
target can be worked out in IF2. JALR is always predicted not-taken and corrected in EX2.

### Instruction set

- RV32I.
- From the A extension: LR.W, SC.W and the AMO*.W instructions. AMOs are carried out inside the
  memory, which returns the old word. LR/SC use a one-word reservation.
- Zicsr, ECALL, EBREAK and MRET.
- FENCE, FENCE.I and WFI run as no-ops.
- Anything else traps as an illegal instruction (cause 2).

Not implemented:

- The M extension. Software has to emulate multiply and divide.
- Supervisor mode and virtual memory.

## Memory system

### Ports

The fetch port and the data port follow the same rules:

- A request is accepted when `req_valid` and `req_ready` are both high.
- Each request gets exactly one `resp_valid` pulse in return. The response also carries a hit
  flag, which the performance counters use.
- A port has at most one operation outstanding.
- On a cache hit, the response comes in the cycle after the request was accepted. `req_ready`
  is high again in that same cycle, so a stream of hits runs at one access per cycle.

### Routing (`memory_subsystem`)

- Fetches always go to main memory.
- Data addresses at or above `0x8000_0000` go to video memory. All other data addresses go to
  main memory.
- The VGA controller reads video memory through its own port and never reaches main memory.
- Video memory answers a load or store in the next cycle. An AMO takes one more cycle.
- A data request is not accepted while an earlier request to the other target has not been
  answered.

### Main memory and the cache (`main_memory`, `cache`)

The cache holds 4 KB in 64 lines of 64 bytes. It is direct mapped, and the address splits into
tag [31:12], index [11:6] and offset [5:0]. It has two ports: a read port for fetches and a
read/write port for data. Both ports look up their line combinationally.

The cache is write-back and write-allocate, with a dirty bit per line. A store or AMO hit is
written in the cycle it hits, as a read-modify-write. There are three state machines: fetch
control, data control and DRAM control. On a miss, both ports give the cache to the DRAM state
machine, and neither port answers until the line is in. The DRAM state machine then:

1. writes the victim line back if it is dirty;
2. reads the new line;
3. installs it in the cache.

Then the waiting port looks the line up again and hits. If both ports miss, the data miss is
served first.

There is no address translation. A TLB in this position would only pass addresses through.

### DRAM controller (`dram_controller`)

The DRAM controller is an AXI4 master with 32-bit data. It moves one line at a time, as a single
INCR burst of 16 four-byte beats. A write-back uses AW, then W, then B. A refill uses AR, then
R. `DRAM_BASE` is added to every address. The response codes are not checked.

## Video (`vram`, `vga_controller`)

Video memory is 4096 32-bit words with two ports:

- port A, on the core clock, reads and writes with byte enables;
- port B, on the video clock, only reads.

Both ports are synchronous and return the old word when written.

The display is 640×480 at 60 Hz, showing 80×30 character cells of 8×16 pixels.

- **Line timing:** 800 pixels per line: 640 visible, 16 front porch, 96 sync, 48 back porch.
- **Frame timing:** 525 lines per frame: 480 visible, 10 front porch, 2 sync, 33 back porch.
- **Syncs:** both are active low.

Video memory layout:

| Location | Content |
|---|---|
| word row·80+col (0 … 2399) | one cell: bits [7:0] the character, [11:8] the foreground colour, [15:12] the background colour |
| words 3072 … 4095 | the character generator: 16 bytes per character (one per pixel row, bit 7 = leftmost pixel), four bytes per word, little-endian |

Software must load the character generator; nothing is stored there at reset. Colours are 4-bit
IRGB. A set colour bit gives level 0xA on its channel, and the I bit adds 5.

Each pixel takes four video-clock phases:

| Phase | Action |
|---|---|
| 0 | Present the cell address. |
| 1 | Take the cell and present the glyph-row address. |
| 2 | Pick the glyph bit. |
| 3 | Register the colour and the syncs, and step the counters. |

## Keyboard (`keyboard_controller`)

The keyboard controller receives PS/2 frames on the falling edges of the synchronised PS/2 clock.
A frame is a start bit, 8 data bits, odd parity and a stop bit. Frames with bad framing or bad
parity are dropped. A frame left incomplete for `TIMEOUT` core cycles is abandoned.

Scan codes are from set 2, which keyboards send by default:

- `F0` marks a key release.
- `E0` extended keys are ignored.
- Both Shift keys are tracked.

Pressing a printable key gives its ASCII code, including Enter (0x0A), Backspace, Tab and Esc.
One character is held until a CSR instruction on `0xFC0` retires. Characters that arrive in
the meantime are lost.

## Where this RTL departs from, or fills in, the original design

The block structure follows the original design:

- the chip wrapper;
- the memory subsystem with VRAM and main memory;
- fetch, data and DRAM state machines around a 4 KB direct-mapped cache with 64-byte lines;
- the eight-stage pipeline;
- forwarding from five stages;
- the 128-entry two-bit predictor;
- interrupts by drain;
- one SYSTEM instruction at a time;
- performance counters at write-back;
- the 50 and 100 MHz clocks;
- ASCII keyboard input by interrupt.

The original does not describe the following, so they are choices made here:

- the address map;
- the custom CSR numbers for the timer compare and the keyboard;
- the write-back policy of the cache;
- the order in which misses are served;
- the AXI burst format;
- the video memory size and layout;
- the display mode and the palette;
- the PS/2 key map;
- trap resolution in EX2;
- prediction in IF2;
- the numbering of the performance counters.

The original also depends on things outside this RTL:

- The program is loaded by an Arm core, which is not part of this RTL. Testbenches preload a DRAM
  model instead.
- The original used an existing PS/2 receiver. The receiver here is new.

Two smaller departures:

- The original counts three clock domains, one of them the 25 MHz VGA interface. Here the pixel
  rate is a phase count inside the 100 MHz domain.
- The original built the M extension in simulation but left it out of the synthesized processor.
  It is left out here as well.

## Files

- `rtl/rv_pkg.sv`: the shared types (memory request and response structs, the decoded
  instruction, enums), the CSR numbers, and the AMO and byte-merge functions.
- `rtl/chip.sv`: the top level. Every other file in `rtl/` holds one block; `decoder` and `alu`
  are parts of the core.
- Parameters all default to the sizes above: `CACHE_BYTES`, `LINE_BYTES`, `VRAM_WORDS`,
  `BP_ENTRIES`, `DRAM_BASE`, `RESET_PC`, and the keyboard's `TIMEOUT`.
- Assertions check:
  - AXI signal stability;
  - that a write-back is only requested for a dirty line;
  - that only one SYSTEM instruction is in flight;
  - that responses arrive only when expected.

## Verification

Every block has a self-checking testbench `tb/tb_<block>.sv`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog. The helper models are:

- `tb/tb_line_mem.sv`: a line memory with a set latency;
- `tb/axi_dram_model.sv`: an AXI4 DRAM slave with random wait states;
- `tb/tb_prog_pkg.sv`: an instruction encoder and the test program.

| Testbench | What it checks |
|---|---|
| `tb_core` | The core against an ideal memory with random latency. It runs a test program covering ALU, branches, jumps, loads and stores of every width, LR/SC, AMOs, CSRs, ECALL/MRET, and timer and keyboard interrupts. It counts stalls, flushes, predictions, forwarding and interrupts. |
| `tb_chip` | The whole chip at its default parameters, running the same program from the DRAM model through the cache. It requires fetch and data misses, dirty write-backs, video memory accesses, ID stalls, MEM1 and MEM2 waits, flushes, IF2 redirects, a discarded fetch and both interrupts to happen at least once. It also checks the VGA line period of 3200 video clocks. |
| `tb_echo` | The keyboard echo demo on the whole chip. A program copies a character generator from DRAM into video memory and enables the keyboard interrupt. The testbench types "hi!" with Shift. The handler writes each character to the screen. The testbench checks the three cells and every pixel of the three characters on the VGA pins in the next frame. |
| `tb_bench` | A loop kernel on the whole chip. It runs 1000 iterations of load, add and store over a 64-word array, with a forward branch taken three times in four and a forward jump in every iteration. Then it reads the performance counters. It checks the array against a model. It checks the branch, jump, instruction, fetch and data counts the kernel must give, and the forward-branch predictions against a two-bit counter model. It prints an IPC of 0.61 for this kernel, which has a load-use dependence in every iteration. Backward branches are 99.8% correct, forward branches 74.9% and forward jumps 99.9%. |
| block testbenches | Random stimulus against reference models: predictor saturation, forwarding priority and hazards, stall/flush/drain priorities, cache hit/miss/dirty/victim, main-memory coherence against a model memory with random latency, AXI burst format, video-memory routing and AMO latency, sync timing and glyph pixels, PS/2 decoding with Shift and break codes. |

To run one testbench with verilator:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_chip \
    rtl/rv_pkg.sv tb/tb_prog_pkg.sv tb/tb_chip.sv -y rtl -y tb +libext+.sv
./obj_dir/Vtb_chip
```

What this verification does not cover:

- Only the test program has been run on the core; no compiled RISC-V software has been run.
- Timing closure at 50 MHz has not been checked.
- The VGA output has been checked for timing and pixel values, not on a monitor.
