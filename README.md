# Failure-reason capture IP for processors under radiation test

When a processor is exposed to a particle beam, a single upset flip-flop can
crash the program. A crash may come from an illegal instruction, a wild jump,
an endless loop, or a trap. The crash itself says little about which register
was hit. This IP sits next to the core and keeps a short history of what the
core did. It stops that history at the moment the program goes wrong, so the
history ends with the error spreading through the core. A remote controller
then reads the history out over a debug bus. Off-line, the history can be
compared with fault-injection runs to guess which register took the upset.

The IP does not depend on one processor. It only needs a small probe bundle
from the core:

- the retired PC and its instruction word;
- three pipeline registers: the stack pointer (x2), the main ALU result, and
  the second ALU result, which carries jump targets;
- the address of each data access.

Three parts work in parallel:

| part | job |
|---|---|
| trace encoder + circular buffer | record the program flow and two of the three registers into a ring of the last 1024 events, protected by SECDED ECC |
| error detector + external trigger | check the PC and the data addresses with programmable assertions; on a violation, stop the recording and/or freeze the core |
| observation interface | debug-bus slave: configuration, status, a log bank for the firmware, and a read window onto the ring |

```
 probes[0] ─┐                  ┌──────────────┐   ┌──────────────────┐
 probes[1] ─┴─ core select ──┬─┤ trace_encoder├──►│ circular_buffer  │
                             │ └──────────────┘   │ 1024 x 4 x (32+7)│
                             │       ▲ en         └────────┬─────────┘
                             │       │ !stop_rec           │ read window
                             │ ┌─────┴────────┐  ┌─────────┴─────────┐
                             └►│error_detector├─►│ trigger_unit      │──► halt[core]
                               └──────────────┘  └───────────────────┘
                                          ▲ config       │ flags
                               ┌──────────┴──────────────▼──────────┐
                   debug bus ◄►│ obs_interface (TMR config, log bank)│
                               └─────────────────────────────────────┘
```

Everything runs in the processor clock domain. The SoC this was designed for
has two RV32IMC cores. The IP observes one of them at a time, chosen by a
control bit.

## How a capture unfolds

1. At start-up, the firmware (or a JTAG controller) programs the assertions:
   - the allowed PC ranges;
   - watchpoints on trap handlers;
   - checkpoints on benchmark functions;
   - a watchdog refreshed at the top of the benchmark loop;
   - the allowed data address ranges.

   It chooses which assertions stop recording and which halt the core, then
   sets `rec_en` and `det_en`.
2. While the benchmark runs, each retired instruction (or, with the jump
   filter on, each jump target) becomes a 128-bit event in the ring. The
   oldest event is overwritten. The firmware writes a run counter into the log
   bank, and the controller polls it.
3. An upset makes the flow diverge. Within one clock of the first violated
   assertion, recording stops (`stop_rec`), the core is frozen (`halt`), and
   the sticky `FLAGS` register shows which assertion fired.
4. The controller reads the ring oldest-first, plus the flags, the checkpoint
   counts and the log bank. Frozen state is preserved until `CMD` clears it.

Timing at the point of failure:

- For a PC or data assertion, the hit is combinational in the cycle the
  instruction retires. `stop_rec` rises at the next edge. That edge still
  lets the encoder take the failing instruction, and the buffer writes the
  event already in flight. So the failing instruction is the newest entry.
  - Exception: with the jump filter on, a sequential instruction that
    violates a data assertion has no event of its own.
- Checkpoints and watchdogs flag from registered counters, one cycle later.
  One more instruction may then be recorded.

## The trace event and the jump filter

Each event is 128 bits (16 bytes), so 1024 events make a 16 KB trace. In the
buffer window, each event is four 32-bit words:

| word | bits | content |
|---|---|---|
| 0 | [31:28] | type: 0 INSTR, 1 JUMP, 2 START |
| 0 | [27:0] | clock cycles since the previous event (saturating) |
| 1 | | PC of the instruction |
| 2 | | register A of the selected pair |
| 3 | | register B of the selected pair |

Register pairs are set by `reg_sel`: 0 = SP/ALU, 1 = SP/ALU2, 2 = ALU/ALU2.

The encoder predicts the next sequential PC:

- PC + 2 when `instr[1:0] != 2'b11` (a compressed instruction);
- PC + 4 otherwise.

A retired PC that differs from the prediction is a discontinuity. This covers
jumps, taken branches, calls, returns and traps without decoding any opcode.

- **Filter off:** every retired instruction is an event.
- **Filter on:** only START (the first instruction after enable) and JUMP
  events are written. Between two events the code ran sequentially, so the
  program image and these events rebuild the flow.

The timestamp gives the cycle distance, which exposes stalls and loops.

This is simpler than the packet formats of the RISC-V trace specification,
which the original design follows. There are no branch maps, no packet
compression and no periodic sync packets.

## Error detector

The counts are set in `obs_pkg`. Each assertion owns one bit of the 20-bit
flag vector.

| kind | count | flags when | flag bits |
|---|---|---|---|
| watchpoint | 4 | retired PC == address | 3:0 |
| checkpoint | 4 | number of retirements at an address ≥ threshold (0 = off) | 7:4 |
| PC range | 4 | retired PC inside [lo, hi] (e.g. init code that must not run again) | 11:8 |
| PC scope | 1 | retired PC outside every range selected in `SCOPE[7:0]` | 12 |
| data range | 4 | data address inside [lo, hi] (e.g. an unused peripheral) | 16:13 |
| data scope | 1 | data address outside every range selected in `SCOPE[15:8]` | 17 |
| watchdog | 2 | cycles since the core last retired the refresh address ≥ threshold | 19:18 |

Further rules:

- A range checker can be used on its own (exclusion), as part of a scope
  (allowed region), or both.
- A scope with no range selected is off.
- `ASSERT_EN` gates every flag. It also starts the watchdogs.
- `STOP_MASK` and `HALT_MASK` choose which flags stop recording and which
  freeze the core.
- Flags, stop and halt are sticky until `CMD[0]` is written. That write also
  restarts the checkpoint counters.

## Radiation hardening in the RTL

- **Buffer:** each 32-bit word carries 7 check bits of an extended Hamming
  code (`secded_codec`). That makes 156 stored bits per event.
  - A single upset in a word is corrected on readout.
  - A double upset is flagged.
  - `ECC_CNT` counts both kinds of read.
- **Configuration registers and log bank:** held in `tmr_reg`, three copies
  with a majority vote. All three copies are rewritten with the voted value
  every cycle, so a single upset is repaired at the next edge. `STATUS[4]`
  shows a disagreement between copies.
  - A synthesis flow must not merge the three copies. Generic synthesis does
    merge them, so hardening needs a keep or don't-touch constraint, or
    hardened cells.
- **Log bank:** it has no reset, so the firmware's records survive a reset of
  the system.

## Register map (debug bus)

The bus is APB-style:

- 16-bit byte address, 32-bit data;
- `pready` is always 1;
- `pslverr` is set for an unmapped address;
- a buffer read starts the memory read in the setup phase, so it also has no
  wait state.

Concurrent assertions in `obs_interface` check the master's side of the
protocol. An access phase must follow a setup phase, and the address,
direction and data must hold through it. Further assertions check the buffer
pointers and that stop and halt only come from masked flags. Build with
`--assert` to enable them.

| address | name | access | content |
|---|---|---|---|
| 0x0000 | CTRL | rw | [0] rec_en, [1] jump_filter, [3:2] reg_sel, [4] core_sel, [5] det_en |
| 0x0004 | CMD | w | [0] clear flags/stop/halt and counters, [1] empty the buffer |
| 0x0008 | STATUS | r | [0] recording, [1] halt, [2] stopped, [3] buffer full, [4] TMR copies disagree |
| 0x000C | FLAGS | r | sticky assertion flags |
| 0x0010 | ASSERT_EN | rw | per assertion |
| 0x0014 | STOP_MASK | rw | per assertion |
| 0x0018 | HALT_MASK | rw | per assertion |
| 0x001C | BUF_INFO | r | [15:0] events held, [31:16] write pointer |
| 0x0020 | ECC_CNT | r | [15:0] corrected reads, [31:16] uncorrectable reads |
| 0x0024 | SCOPE | rw | [7:0] PC scope ranges, [15:8] data scope ranges |
| 0x0100 + 4i | WP_ADDR[i] | rw | |
| 0x0120 + 4i | CP_ADDR[i] | rw | |
| 0x0140 + 4i | CP_THR[i] | rw | |
| 0x0160 + 4i | CP_CNT[i] | r | |
| 0x0180 + 4i | PCR_LO[i] | rw | |
| 0x01A0 + 4i | PCR_HI[i] | rw | |
| 0x01C0 + 4i | DR_LO[i] | rw | |
| 0x01E0 + 4i | DR_HI[i] | rw | |
| 0x0200 + 4i | WD_KICK[i] | rw | |
| 0x0220 + 4i | WD_THR[i] | rw | |
| 0x0400 + 4i | LOG[i] | rw | 16 words, TMR, not reset |
| 0x4000 + 16e + 4w | BUF | r | word w of event e; e = 0 is the oldest event held |

All configuration registers reset to 0, which leaves the IP idle.

## Sizes and parameters

`obs_ip_top` has the following parameters:

| parameter | default | meaning |
|---|---|---|
| `DEPTH` | 1024 | events in the buffer |
| `N_CORES` | 2 | cores whose probes can be observed |
| `N_LOG` | 16 | words in the log bank |

- **`DEPTH`:** the default is the 16 KB size built into the first test chip.
  The evaluation found that 64 events (1 KB) keep the same diagnostic value,
  so `DEPTH = 64` is the resource-optimised setting. Any depth from 2 up to
  3072 fits the address map; it need not be a power of two.
- **Assertion counts:** `N_WP`, `N_CP`, `N_PCR`, `N_DR` and `N_WD` are
  constants in `obs_pkg`. The register map allows 8 at most of each kind and
  32 assertions in total.
- **Size at the defaults:** after generic synthesis, about 2300 flip-flops
  and a 1024 x 156-bit memory.

## Where this RTL departs from or adds to the original design

These are choices of this implementation, where the original description
gives the function but not the details:

- **Trace format:** a discontinuity-based encoder and a fixed 128-bit event,
  not RISC-V trace packets. The 28-bit saturating timestamp and the event
  layout are this design's own.
- **Probe timing:** probes are taken at retirement, with all fields valid in
  the same cycle. On the original core the PC and instruction probes sit in
  the fetch stage and the register probes in the execute stage and register
  file. Wiring to a real core needs a small alignment stage that this RTL
  does not include.
- **Ranges and thresholds:** range bounds are inclusive. A threshold of 0
  disables a checkpoint or a watchdog.
- **Watchdog refresh:** a watchdog is refreshed when the core retires the
  instruction at a programmed address. The original gives no refresh
  mechanism.
- **Bus interface:** the bus protocol, the register map, the ECC counters and
  the TMR-disagreement status bit are this design's own.
- **ECC granularity:** one SECDED codeword per 32-bit word.
- **Outside this RTL:** the rest of the SoC (cores, buses, SRAM, JTAG debug
  unit, peripherals) is not included. So is the off-line classifier that
  infers the upset location from the dumped trace. The top brings the probe
  bundles, halt lines and the debug-bus port out as plain ports.

## Files

`rtl/`:

| file | content |
|---|---|
| `obs_pkg.sv` | probe bundle, event, configuration types, flag layout, register map |
| `obs_ip_top.sv` | the IP |
| `trace_encoder.sv` | trace encoder |
| `circular_buffer.sv` | ring buffer |
| `secded_codec.sv` | ECC code |
| `error_detector.sv` | assertion set |
| `range_checker.sv`, `checkpoint_counter.sv`, `watchdog_timer.sv` | building blocks of the error detector |
| `trigger_unit.sv` | external trigger |
| `obs_interface.sv` | debug-bus slave |
| `tmr_reg.sv` | TMR register |

`tb/` has one self-checking testbench per module (`tb_<module>.sv`) and two
system-level ones:

- `tb_obs_ip_top.sv` runs the IP at its default size with two behavioural
  cores. There is one capture per assertion kind, with the jump filter on and
  off, all register pairs, core switching, ring wrap-around, and an upset
  injected into the buffer memory. A reference model of the encoder checks
  every dumped event.
- `tb_depth_sweep.sv` (with `depth_capture.sv`) repeats a capture at depths
  16, 64 and 992. It checks that exactly the last `DEPTH` instructions are
  held.

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself with a
watchdog.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb \
    rtl/obs_pkg.sv tb/tb_obs_ip_top.sv --top-module tb_obs_ip_top -o sim
./obj_dir/sim
```

Replace the testbench name to run any other one. The end-to-end test at full
size runs in well under a second. The testbenches use only two-state values.
Whatever they read is reset or written first, except the buffer memory, which
is only read where it has been written.
