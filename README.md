# Frame-level redundancy scrubber with CRC-guided voting

An SRAM-based FPGA keeps its configuration (the bits that define lookup-table
contents and routing) in SRAM cells. A particle strike can flip one of those
cells. Such a single event upset silently changes the implemented circuit and
stays there until the cell is rewritten. A scrubber repairs these cells by
rewriting the configuration in the background.

Frame-level redundancy keeps three copies of each configuration module, and
the scrubber repairs a cell by a 2-of-3 vote across the copies. Voting every
frame on every pass costs time and energy. This design votes only after a
cheap check asks for it. Each configuration frame has a 16-bit CRC check word,
and the scrubber first scans copy 1 frame by frame, comparing the recomputed
CRC with the stored one. Bit-level voting starts only when a check word
differs, or after a clean scan, so that upsets in copies 2 and 3 are repaired
as well. A golden copy of the configuration handles the rare frame that voting
cannot repair, because the same cell was upset in two or three copies.

This RTL is a synthesizable model of that scheme. It includes a random
configuration generator and a fault injector, so the whole flow runs in
simulation: generate a configuration, inject upsets, scrub, and read it back.

## Data organisation

| Item | Size (default) | Held in |
|------|----------------|---------|
| frame | `FRAME_BITS` = 126 cells | one word of a memory |
| module (one copy of the configuration) | `N_FRAMES` = 39 frames | `config_mem`, three copies side by side |
| golden copy | 39 frames | `golden_mem` |
| frame header K (check word) | 16 bits per frame | `crc_header` |

A cell is one bit: cell *i* of a frame is bit *i*. A single frame address
selects the same frame in all three modules, the golden copy and the header
store, and all five are read at once. Reads are combinational and writes
happen on the clock edge. So reading a frame, voting it and writing it back
takes a single cycle. The memory cells are not reset.

The default of 126 cells by 39 frames is the module size used for the main
comparison of the algorithm. Both sizes are parameters of every block, and
`tb_table1_workloads` builds the scrubber at ten sizes, from 42 x 13 up to
420 x 130.

## How a scrub runs

`flr_scrub_ctrl` is a five-state machine: `ST_IDLE`, `ST_GEN`, `ST_HDR`,
`ST_SCAN` and `ST_VOTE`. A round counter decides what a pass does.

1. **Generate and triplicate (`ST_GEN`).** Each frame that arrives from the
   generator is written into the three modules and into the golden copy.
2. **Headers (`ST_HDR`).** The CRC of every frame of module 1 is stored as
   that frame's header K, at one frame per cycle. This ends the `gen_start`
   command.
3. **Round 1, odd: scan (`ST_SCAN`).** `scrub_start` sets the round to 1 and
   goes to frame 0. Each cycle recomputes the CRC J of `SCAN_LANES`
   consecutive frames of module 1 (one frame by default) and compares each
   with its K.
   - The first frame where J differs from K (the lowest one, if several lanes
     fail in the same cycle) ends the scan. `err_detected` and
     `err_frame` record it, and voting starts **at that frame**.
   - If all frames match, the round becomes 2 (even) and voting starts
     **at frame 0**. Module 1 is known to be clean, but modules 2 and 3 were
     not checked, so every frame is voted.
4. **Vote (`ST_VOTE`).** This runs one frame per cycle, from the start frame
   to the last frame. For each frame:
   - `majority_voter` forms the 2-of-3 value of every cell.
   - The CRC of the voted frame is compared with K. If they match, every
     module whose frame differs from the vote is rewritten with the vote
     (`frames_voted` counts these frames). A frame where all three copies
     agree is not written at all.
   - If they do not match, voting has failed: two or three copies share an
     upset in the same cell. The frame is then restored from the golden copy
     in all three modules (`golden_restores`).
5. After the last frame, `done` pulses and the controller goes back to idle.

The CRC check of the voted frame is what detects a failed vote. Without it, an
upset shared by two copies would be "voted in" and spread to the third copy.

Two consequences follow from starting the vote at the failing frame:

- **Upsets behind the failing frame wait.** An upset in module 2 or 3 in a
  frame *before* the first failing module-1 frame is not touched by this
  scrub. The next scrub then finds module 1 clean, runs a full vote, and
  repairs it. The end-to-end test exercises this case on purpose.
- **Detection and correction time depend on where the upset is.** With one
  scan lane, detection takes f + 1 cycles and correction takes N_FRAMES − f
  cycles, where f is the first failing frame.

### Scan lanes

`SCAN_LANES` sets how many frames the scan checks per cycle. Each lane has its
own CRC unit. Module 1 and the header store each get a second, read-only port
that returns `SCAN_LANES` consecutive words starting at the current frame.

- `SCAN_LANES = 1` (the default) is the frame-by-frame loop of the flow chart.
- `SCAN_LANES = N_FRAMES` checks every frame at once. Detection then takes one
  cycle at any module size, which matches the claim that detection time does
  not depend on the number of frames. The cost is one 16-bit CRC tree per
  frame, plus a read port as wide as the whole module.

Voting stays at one frame per cycle whatever the lane count.

### Cycle counts

| Operation | Cycles |
|-----------|--------|
| `gen_start`, with the built-in generator | N_FRAMES·(FRAME_BITS+1) to generate, + N_FRAMES for the headers |
| scrub, first module-1 error at frame f | ⌊f/SCAN_LANES⌋+1 scan, + N_FRAMES−f vote |
| scrub, module 1 clean | ⌈N_FRAMES/SCAN_LANES⌉ scan, + N_FRAMES vote |
| fault injection over frames lo..hi | hi−lo+1 |

`done` rises in the cycle after the last frame. `detect_cycles` and
`correct_cycles` report the scan and vote cycle counts of the last scrub.
Energy per scrub is the correction time multiplied by the core power (core
voltage times core current). It is not computed in hardware. For example, at
1.0 V and 10 mA one microsecond of correction costs 10 nJ.

## Frame CRC

`crc16_frame` computes the plain polynomial remainder R(x) = x^16·M(x) mod
G(x). The frame's most significant bit is the highest-order coefficient. The
initial value is zero and there is no final inversion. G(x) is the CCITT
polynomial x^16 + x^12 + x^5 + 1 (0x1021), a parameter of the module.
Together these choices make it the CRC-16/XMODEM function, whose check value
for the ASCII string "123456789" is 0x31C3. The bit-serial shift-and-XOR step
is unrolled across the whole frame, so the CRC of a frame is ready in the same
cycle the frame is read. This is what makes the scan run at one frame per
clock. The controller holds one instance to compute the headers, one to
check voted frames, and one per scan lane.

## Test aids built in hardware

- **`config_gen`** fills the memory with a random configuration. For every
  cell it draws r in [0, 1) and sets the cell to 1 when r > eta. Here r is the
  top byte of a 32-bit xorshift generator (shifts 13, 17, 5) divided by 256,
  and eta is an 8-bit fraction `eta/256`. A higher eta gives fewer ones. The
  generator produces one cell per cycle and hands over a finished frame with a
  valid/ready handshake.
- **`fault_injector`** emulates upsets. It inverts every cell of a rectangle
  (cells `cell_lo..cell_hi` × frames `frame_lo..frame_hi`, 0-based) in the
  modules selected by `mod_mask`. It does a read-modify-write of one frame per
  cycle. A `frame_hi` beyond the last frame is clamped to the last frame.

## Top level: `flr_scrubber_top`

| Parameter | Default | Meaning |
|-----------|---------|---------|
| `FRAME_BITS` | 126 | cells per frame |
| `N_FRAMES` | 39 | frames per module |
| `SCAN_LANES` | 1 | frames CRC-checked per scan cycle, 1 to `N_FRAMES` |

The number of modules (3), the CRC width (16) and the polynomial are fixed in
`scrub_pkg`.

| Port group | Ports | Use |
|-----------|-------|-----|
| clock, reset | `clk`, `rst_n` (asynchronous, active low) | |
| generation | `seed_load`, `seed[31:0]`, `eta[7:0]`, `gen_start` | load a seed, then build the configuration and its headers |
| injection | `inj_start`, `inj_mod_mask[2:0]`, `inj_frame_lo/hi`, `inj_cell_lo/hi` → `inj_busy`, `inj_done` | flip a rectangle of cells |
| scrubbing | `scrub_start` → `busy`, `ctrl_state`, `done`, `err_detected`, `err_frame`, `round`, `detect_cycles`, `correct_cycles`, `frames_voted`, `golden_restores` | run one scrub; statistics hold until the next one |
| readback | `rb_addr` → `rb_frames[3]`, `rb_golden`, `rb_header` | inspect any frame while nothing runs |

All three commands share one frame port. A command is accepted only while the
other side (the injector or the controller) is idle. A command given while the
other side is busy is dropped, not queued. When both `gen_start` and
`scrub_start` arrive together, `gen_start` wins. An assertion checks that the
injector and the controller never own the port at the same time.

Typical sequence: `seed_load` → `gen_start` → wait for `done` → one or more
`inj_start` → `scrub_start` → wait for `done` → read back.

Synthesis at the default size gives about 2,800 word-level cells and 456
flip-flops, plus 25,194 memory bits: four 126 × 39 arrays and one 16 × 39
array.

## Design choices and departures

The scrubbing flow is this design's reading of the algorithm, which is defined
as a flow chart. The points below are choices made here, not fixed by the
algorithm.

- **Where voting starts.** The flow chart joins the "CRC mismatch" exit and
  the "even round" exit at the same voting step. Here voting runs from the
  current frame to the last one. That is the failing frame in the first case,
  and frame 0 in the second.
- **Frame by frame by default.** Detection time is meant to be roughly
  independent of the number of frames, because the CRC runs on all frames
  concurrently. The flow chart, however, loops over the frames one at a time.
  The default (`SCAN_LANES = 1`) follows the flow chart, so detection time
  grows with the position of the first failing frame. `SCAN_LANES = N_FRAMES`
  gives the concurrent behaviour.
- **Golden restore trigger.** A golden copy of the configuration is part of
  the scheme, but how a failed vote is detected is not fixed. Here it is
  detected by the CRC of the voted frame.
- **CRC polynomial and bit order:** CCITT with the MSB first, as described
  above.
- **Generator.** The defining rule is "cell = rand > eta", but the scheme is
  also described as giving more ones for a higher eta. The two conflict; this
  design follows the rule.
- **Fault rectangles** invert every cell in the rectangle. Addresses are
  0-based.
- **Separate commands.** Generation, injection and scrubbing are separate
  commands, so that a scrub can be repeated on the same configuration.
- **Not modelled:** the device's own configuration access port (readback
  through the FPGA's configuration interface) and the energy computation.
  The scrubber's memory here is a plain frame port.

Time figures of the original algorithm (microseconds, per frame count) come
from a software model, and cannot be compared with the cycle counts here.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops itself through a watchdog if it
hangs.

| Testbench | What it checks |
|-----------|----------------|
| `tb_crc16_frame` | XMODEM check value 0x31C3; 300 random 126-bit frames against polynomial long division |
| `tb_majority_voter` | vote, per-module error masks and disagree flag, counted bit by bit |
| `tb_config_mem`, `tb_golden_mem`, `tb_crc_header` | random writes and reads against a shadow copy |
| `tb_config_gen` | every cell against a reference xorshift, FRAME_BITS cycles per frame, frame held without ready, density |
| `tb_fault_injector` | contents of all modules after random rectangles, one cycle per frame, clamping |
| `tb_flr_scrub_ctrl` | controller (built with four scan lanes) on real memories against a reference scrub model: contents, every statistic, exact cycle counts, lowest failing frame within a lane group, shared-cell cases, deferred repair, dropped commands |
| `tb_flr_scrubber_top` | the whole design at its default size, end to end, against the reference model; counts every mechanism and fails if one never occurs |
| `tb_table1_workloads` | ten module sizes (42·K cells × 13·K frames, K = 1..10), each built with one scan lane and with one lane per frame, each with a 12·K × 6·K fault rectangle in one, two and three modules; checks the error frame, the scan cycles (5·K+1, or 1 with a lane per frame), 8·K vote cycles and full repair. Takes about a minute |

To run one with Verilator:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
  rtl/scrub_pkg.sv tb/tb_flr_scrubber_top.sv --top-module tb_flr_scrubber_top
./obj_dir/Vtb_flr_scrubber_top
```

The package `rtl/scrub_pkg.sv` must come first on the command line. Every
other file is found by its module name through `-y`. To change the size,
override `FRAME_BITS`, `N_FRAMES` and `SCAN_LANES` on `flr_scrubber_top`,
as `tb_table1_row` does.

## Files

- `rtl/scrub_pkg.sv`: shared constants (three modules, 16-bit CRC, polynomial) and the controller state type
- `rtl/flr_scrubber_top.sv`: the top level and frame-port arbitration
- `rtl/flr_scrub_ctrl.sv`: the scrub controller
- `rtl/crc16_frame.sv`: single-cycle frame CRC
- `rtl/majority_voter.sv`: bit-level 2-of-3 voter
- `rtl/config_mem.sv`: the three configuration modules
- `rtl/golden_mem.sv`: the golden copy
- `rtl/crc_header.sv`: the per-frame check words
- `rtl/config_gen.sv`: random configuration generator
- `rtl/fault_injector.sv`: upset emulation
- `tb/`: the testbenches listed above, plus `tb_table1_row`, one size of the sweep
