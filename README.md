# BIST boundary scan for a pipelined 16-bit multiplier

A chip with an IEEE 1149.1 test access port already has a flip-flop pair
next to every pin. This design reuses those boundary-scan cells as the chip's
own built-in self-test (BIST) hardware:

* The **update flip-flops of the input cells** form a linear feedback shift
  register. It is the test pattern generator (TPG) that drives the core inputs.
* The **capture flip-flops of all cells** form a multiple-input signature
  register (MISR). The output cells XOR the core outputs into it.
* The **TAP controller** runs the self-test, using new instructions
  (BIST-BSR, BFT, BST, SYNC) on top of the standard ones. A test is: load a
  seed, stay N cycles in Run-Test/Idle, then shift the signature out
  through TDO.

The core is a 16-stage pipelined multiplier, so it is sequential. Each
pattern needs 16 clocks to reach the outputs. Normally this would call for
scan or BILBO flip-flops inside the core. Here the core is instead treated as
its *combinational equivalent*:

* A SYNC instruction switches the core clock to TCK.
* A small programmable control unit (PCU) lets the TPG and the MISR act only
  once every *d* TCK cycles, where *d* is the core's sequential depth.
* Each pattern therefore has time to pass through the whole pipeline before
  its response is compacted.

The core's own registers are not touched.

A second BIST style is also supported. Two groups of BILBO registers (G1 and
G2) form a user-defined data register, and they can be tested in two
sessions (the BFT and BST instructions). The combinational logic around them
is not part of this design: their system-side signals are ports of the top.

## Block structure

```
             TCK TMS TRST_n                     Chip_CK
                 |                                 |
            +----v----+   state   +-----------+    |
            | tap_fsm |---------->|tapc_decoder|   |
            +---------+   op(3)   +-----+-----+    |
                 ^                      | 19 control signals
  TDI --+--> instruction_register ------+ (op, address P3..P0)
        |                               v
        +--> bypass_register        +--------+  cut_ck = DivRun ? TCK : Chip_CK
        |                           |  pcu   |----------------------------+
        |                           +---+----+                            |
        |            DR_CapShf, DR_Shf, | BIST_mode_O/I, HOLD_BILBO_in    |
        |                               v                                 v
        +--> bist_bsr: 32 input cells ---- cin[31:0] ----> pipelined_multiplier
        |       (A = cells 0..15, B = 16..31)                   (16 x mult_stage)
        |    32 output cells  <--------- cout[31:0] --------------+
        |       -> p_pin[31:0]
        +--> bilbo_register G1 -> bilbo_register G2   (clocked by cut_ck)
                    TDO mux (IR / BSR / BILBO / BYR), re-timed on falling TCK
```

| File | Block |
|---|---|
| `rtl/bist_bs_pkg.sv` | State encoding, opcodes, instruction codes, control-bus struct |
| `rtl/tap_fsm.sv` | 16-state TAP state machine |
| `rtl/tapc_decoder.sv` | Decoder from (state, opcode) to the 19 control signals, with latches |
| `rtl/instruction_register.sv` | 7-bit IR: shift stage and shadow stage |
| `rtl/bypass_register.sv` | 1-bit bypass register |
| `rtl/bsr_input_cell.sv`, `rtl/bsr_output_cell.sv` | BIST boundary-scan cells |
| `rtl/bist_bsr.sv` | 64-cell chain with the TPG and MISR feedback |
| `rtl/bilbo_cell.sv`, `rtl/bilbo_register.sv` | BILBO register and its distributed decoder |
| `rtl/pcu.sv` | Programmable control unit, SYNC flags, core clock multiplexer |
| `rtl/mult_stage.sv`, `rtl/pipelined_multiplier.sv` | Core: 16x16 pipelined multiplier |
| `rtl/bist_bs_multiplier.sv` | Top level |

## Instructions

The instruction register is seven bits. The upper three bits are the
operation field, which selects the behaviour. The lower four bits are the
address field.

| Instruction | Code | Register on TDI to TDO | Pin permission | In Run-Test/Idle |
|---|---|---|---|---|
| SAMPLE/PRELOAD | `000xx00` | BSR | no | nothing |
| EXTEST | `001xx00` | BSR | yes | nothing |
| BIST-BSR | `010xx00` | BSR | yes | BSR runs as TPG + MISR |
| BFT (BILBO, first session) | `011xx01` | G1 -> G2 | yes | G1 TPG, G2 MISR; BSR also runs |
| BST (BILBO, second session) | `100xx01` | G1 -> G2 | yes | G2 TPG, G1 MISR; BSR also runs |
| SYNC | `101 P3P2P1P0` | bypass | yes | loads the PCU with P = ~(d-1) |
| INTEST | `110xx00` | BSR | yes | nothing |
| BYPASS | `1111111` | bypass | no | nothing |

Notes on the instruction set:

* The all-ones code is BYPASS. It is also the reset value of the IR.
  The decoder looks only at the operation field, so every `111xxxx` code
  (for example `111xx11`) acts as BYPASS.
* The data register is chosen from the operation field. The address field
  of SYNC carries P3..P0, so it cannot also name a register.
* `bist_bs_pkg` holds the seven-bit constants (`INSTR_*`). For SYNC, OR
  in P: `INSTR_SYNC | 4'b0000` gives d = 16.

## The TAP controller decoder

`tapc_decoder` produces a `tap_ctrl_t` struct with the 19 control signals.
In table order they are:

* RESET, Enable, Select, Enable_Sync
* IR_Cap, IR_Cap_Shf, IR_Update
* BSR_CapShf, BSR_Shf, BSR_Update
* BYP_Shf, BYP_CapShf
* Mode_Test, BIST_mode, BIST_Inst_enable
* Hold_BILBO, B1_BILBO, B2_BILBO
* Run-Test-Idle

RESET and Enable are active low: RESET is low in Test-Logic-Reset, and
Enable is low while TDO is driven.

The registers use the signals the same way:

* `*_CapShf` is a clock enable.
* `*_Shf` chooses between shifting (1) and capturing (0).

The decoder is written as a few rules rather than a 128-row table (see the
header of `tapc_decoder.sv`). Points that are easy to miss:

* **BIST-BSR does not capture in Capture-DR.** The path from Run-Test/Idle
  to Shift-DR passes through Capture-DR. A capture there would overwrite
  the signature.
* **In Run-Test/Idle, BIST-BSR, BFT and BST all raise BIST_mode.** They also
  raise BSR_CapShf and BSR_Shf there. So the BSR runs its TPG and MISR in
  both BILBO sessions as well.
* **BILBO controls.** Under BFT and BST, the groups:
  * scan in Shift-DR: (B1, B2, HOLD) = (1, 1, 0);
  * hold in every other state: HOLD = 1;
  * run in Run-Test/Idle: (1, 0, 0) for BFT, (0, 1, 0) for BST.

  G2 receives B1 and B2 swapped. This is why one pair of signals makes G1
  the generator in one session and the compactor in the other.
* **Timing.** All outputs are latched on the falling edge of TCK, except
  IR_Update and BSR_Update.
  * A signal decoded from state S is therefore stable around the rising
    edge that leaves S. That is the edge at which the data registers act.
  * IR_Update and BSR_Update are latched on the rising edge, from the state
    being entered. They cover the whole Update state, so the update
    flip-flops, clocked on the falling edge, see a settled strobe.

## The BIST boundary-scan cells

**Input cell.** This is a standard cell plus one multiplexer in front of the
UPD flip-flop.

* While `bist_mode_i` is high, UPD loads `cin_p`. That is the core-side value
  of the previous input cell.
* So the 32 UPD flip-flops shift on every falling TCK edge.
* Cell 0 receives the XOR of the stages selected by `TPG_TAPS`. The default
  is x^32+x^22+x^2+x+1, a Fibonacci LFSR.
* Mode_Test is high in all BIST instructions, so the LFSR state is exactly
  what the core sees.

**Output cell.** This is a standard cell plus a multiplexer and an XOR in
front of the CAP flip-flop.

* While `bist_mode_o` is high, CAP loads `si ^ cout`.
* The input cells' CAP flip-flops have no XOR. They simply shift.
* The whole 64-bit chain is therefore one MISR: 32 stages that only shift,
  followed by 32 stages that compact.
* In BIST, the first cell takes the MISR feedback instead of TDI. The
  feedback uses `MISR_TAPS`, default x^64+x^4+x^3+x+1.
* The output cells' UPD flip-flops are not updated during BIST. So the
  output pins hold the values that were preloaded.

After the run, the signature leaves through TDO under BIST-BSR. Bits come
out last cell first: output cell 31 first, input cell 0 last.

## Single-clock test with the PCU (the hard part)

### Switching the core to TCK

The SYNC instruction sets Enable_Sync. Then:

1. The next rising TCK edge sets the **SyEnable** flag.
2. The falling edge after that sets **DivRun**.
3. DivRun switches the multiplexer M1. The core (and the BILBO groups) now
   run on TCK instead of Chip_CK.
4. Both flags stay set until Test-Logic-Reset, so the clock stays switched
   under the BIST-BSR instruction that follows.

M1 is written as a plain clock multiplexer, with no glitch-free switching.
Switch it only while the core's state does not matter.

### The programmable counter

* While SYNC is the instruction and the TAP is in Run-Test/Idle, the PCU
  stores P3..P0 and loads them into the 4-bit counter PC.
* P is the one's complement of d-1. For example, P = 0000 gives d = 16, and
  P = 1101 gives d = 3.
* While BIST_mode is high, PC counts up on every rising TCK edge. At 1111 it
  raises **carry** for one cycle and then reloads P. Carry is therefore high
  one cycle in d.
* DR_CapShf, DR_Shf and BIST_mode_O reach the BSR only in the carry cycle.
  HOLD_BILBO_in freezes the BILBO groups in the other d-1 cycles.
* BIST_mode_I is BIST_mode_O registered half a cycle later, on the rising
  edge.

### Schedule with d = 16

Let T0 be the seed and T1, T2, … the following LFSR states. For each period
of d cycles:

1. **Rising edge with carry:** the MISR compacts the current multiplier
   output.
2. **Falling edge half a cycle later:** the TPG moves to the next pattern.
3. **The next d-1 cycles:** nothing happens in the BSR while the core
   pipeline keeps running on TCK.

The multiplier output at a rising edge is the product of the operands it
sampled 16 edges earlier. So the j-th capture compacts:

* for j = 1 and j = 2: the product of T0;
* for j ≥ 3: the product of T(j-2).

Every pattern is compacted exactly once, except the seed, which is compacted
twice. The testbench's reference model is built on this schedule.

### Counting captures

The PC counts every rising edge on which BIST_mode is latched high. That
includes the single edge that leaves Run-Test/Idle while the TAP passes
through it between two IR loads. Such a pass advances PC by one but captures
nothing, unless it is a carry cycle.

To get an exact number of captures, either:

* load SYNC again just before the run (this reloads PC), or
* count edges as the end-to-end testbench does.

### Test procedure

The procedure used by the testbench:

1. Reset the TAP.
2. SAMPLE/PRELOAD: shift the 64-bit seed and update.
3. SYNC with P = 0000.
4. BIST-BSR, loaded twice. The second load gives the seed time to pass
   through the pipeline.
5. Stay in Run-Test/Idle for 16·N cycles.
6. Go to Shift-DR and shift the signature out.

## Two-session BILBO test

The BILBO register supports these modes:

| HOLD, B1, B2 | Mode |
|---|---|
| 1, x, x | hold |
| 0, 0, 0 | normal register |
| 0, 1, 1 | scan |
| 0, 1, 0 | LFSR pattern generator |
| 0, 0, 1 | MISR over the parallel input |

G1 is first in the scan chain (TDI → G1 → G2 → TDO).

* **Session 1 (BFT):** G1 generates patterns and G2 compacts what C1
  delivers.
* **Session 2 (BST):** G2 generates patterns and G1 compacts.

While one session's signature is shifted out, the next seed is shifted in.

The BILBO groups are system registers, so they run on the core clock.
Load SYNC first (P = 1111, d = 1, for no holding) so that they are clocked by
TCK while the TAP scans them.

The rising edge that leaves Run-Test/Idle still belongs to the session. If
the TAP passes through Run-Test/Idle under BFT before BST is loaded, this
gives one extra BFT step.

## Multiplier core

The core has 16 `mult_stage` blocks. Stage i:

* ANDs A with B[i];
* adds the result into bits [i+15:i] of the running sum, using a 16-bit
  adder whose carry goes to bit i+16;
* registers A, B and the sum.

A new operand pair can enter on every clock. The product appears 16 clocks
later: for example, 1D1C × 009C = 0011BD10.

Input cells 0–15 carry A and cells 16–31 carry B. Output cell k carries
product bit k.

## Using and simulating it

Every file carries its interface and timing in its header comment. Each
block has a self-checking testbench in `tb/tb_<block>.sv`. Each testbench
prints `TB_RESULT checks=N failures=M` and includes a watchdog. To build and
run one with Verilator:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl +libext+.sv \
          rtl/bist_bs_pkg.sv tb/tb_bist_bs_multiplier.sv --top-module tb_bist_bs_multiplier
./obj_dir/Vtb_bist_bs_multiplier
```

`tb_bist_bs_multiplier` runs the full design at its default sizes, in about
a second. It acts as the external test master and covers:

* normal multiplication;
* IR capture and BYPASS;
* SAMPLE, EXTEST and INTEST;
* two SYNC + BIST-BSR runs of 16 cycles per pattern: 8 patterns (128 cycles
  in Run-Test/Idle) and 200 patterns;
* both BILBO sessions.

It checks that the product pins hold their preloaded values during BIST. It
also checks that the PCU carry pulses exactly once per 16 cycles. It counts
each of these mechanisms and fails if any of them never happens.

The unit testbenches compare each block with an independent model written in
the testbench:

* the TAP transition table;
* the decoder table, written column by column;
* vector-level LFSR and MISR models;
* the multiplier product.

Parameters that can be changed:

* `WIDTH` (multiplier width; the BSR has 4·WIDTH cells);
* `BILBO_W` (width of each BILBO group);
* `TPG_TAPS` and `MISR_TAPS` on `bist_bsr`;
* `W` and `TAPS` on `bilbo_register`.

The PC is four bits wide, so d can be at most 16.

## Design choices not fixed by the architecture

These points are this design's own, where the architecture leaves them
open:

* The feedback polynomials of the BSR's TPG and MISR, and the MISR feedback
  entering at the first cell in place of TDI.
* Chain order: input cells (A, then B) followed by output cells.
* The IR capture value `0000001`, and IR reset to BYPASS.
* TDO re-timed on the falling edge.
* The SYNC flags held until Test-Logic-Reset.
* P stored inside the PCU, because the IR no longer holds SYNC when BIST-BSR
  runs.
* BIST_mode_I produced as a rising-edge copy of the carry-gated BIST_mode_O.
* The BILBO width (8 bits) and polynomial.
* The BILBO groups clocked by the core clock.
* Asynchronous active-low resets everywhere.
* The clock multiplexer M1 is a plain multiplexer, with no glitch
  protection.

### Known differences from a gate-level implementation

* **Pipeline width.** The multiplier keeps a full 32-bit running sum in every
  stage. A design that shifts finished product bits out of a 16-bit sum
  register would need fewer flip-flops for the same function and latency.
* **Decoder table entries.** Where the decoder tables leave a value open, the
  decoder drives a fixed level:
  * Hold_BILBO is 0 outside BFT and BST;
  * Select is 1 in Test-Logic-Reset.
* **Not built.** The combinational blocks C1, C2 and C3 around the BILBO
  groups. The testbench uses stand-ins for them.
