# Semi-bundled delay (SBD) wrappers for domino logic: a 12-bit self-timed adder

Dynamic domino logic is fast, but it has a clock-like rhythm of its own. Each
gate has to be pre-charged, then allowed to evaluate, and its result has to be
caught before the next pre-charge wipes it out. A self-timed (asynchronous)
system has no clock to drive that rhythm. What it has instead is a request /
acknowledge handshake on every function block.

The *semi-bundled delay* (SBD) wrapper closes that gap. It puts a domino
function block behind a standard four-phase REQ/ACK interface. Inside, it
sequences pre-charge and evaluation, detects completion and latches the
outputs. Completion detection is the part the name refers to:

* **Bundled delay.** A conventional bundled-data block signals completion
  after a matched delay. That delay models the worst-case path through the
  logic, so every operation pays the worst case.
* **Early completion.** A domino output is monotonic: during evaluation it can
  only go from 0 to 1, and once it has risen it is final. So an output that
  has switched needs no further waiting. The SBD wrapper gives each output a
  worst-case matched delay and also watches the output itself. Whichever comes
  first, the delay or the switch, counts as that output's completion.

This repository holds a SystemVerilog model of the wrapper and of the adder
built with it: a 12-bit adder made of four three-bit slices.

## How the RTL models an asynchronous circuit

The real circuit has no clock, and its delays are analogue quantities. The
RTL simulates it in **discrete time**:

* `clk` is a time base, not a system clock. One tick stands for 10 ps.
* Every state-holding gate is a **generalized C-element** (`gc_element`). Its
  output moves to 1 when its set function is true, moves to 0 when its reset
  function is true, and otherwise holds. A change only happens once the new
  value has been requested for `DELAY` ticks. This is an inertial gate delay,
  so glitches shorter than the gate delay are swallowed.
* A domino evaluation network is modelled by `domino_eval`. You give it the
  logic function of each output. The output is 0 during pre-charge. During
  evaluation it rises `EVAL` ticks after its function becomes true, and then
  stays high (the keeper). After PC falls it returns to 0 after `PRE` ticks.

Everything is synthesizable, flop-based logic. Real hardware would be
transistor-level gC and domino circuits. The model exists to check the
protocol, the data function and the relative timing, including the bundling
constraints. It is not a netlist to tape out.

All timing constants live in `rtl/sbd_pkg.sv`.

## The wrapper (`sbd_wrapper`)

The wrapper is built from five sub-blocks. For a block with N outputs:

| sub-block | module | rule (read as a gC where it is one) |
|---|---|---|
| pre-charge / evaluate control SBD_PC | `sbd_pc` | PC set by `EREQ & LACK`, reset by `~LACK` |
| worst-case matched delay SBD_MDelay, one per output | `sbd_mdelay` | MD_ACK set by `REQ & (REQ delayed | output switched)`, reset by `~REQ` (one tick) |
| output latch with completion detection | `sbd_latch` | loads when all MD_ACK are high; LACK' = loaded, LACK = ~LACK' |
| pre-charge matched delay MD_PC | `md_pc` | PCd set by `PC`, reset by `~PC & (PC-low delayed | all outputs back at 0)` |
| completion signal SBD_ACK | `sbd_ack` | ACK set by `EREQ & LACK'`, reset by `~EREQ & ~PCd` |

One handshake runs as follows:

1. The environment sets the data and raises REQ. SBD_PC raises PC, and the
   domino network evaluates.
2. Each output's MD_ACK rises at the earlier of two times: when its matched
   delay expires, or when the output switches. The matched delay is counted
   from REQ, so it includes the REQ-to-PC gate.
3. When all MD_ACKs are high, the latch captures the outputs and raises LACK'.
   Two things then happen: PC falls, so the network pre-charges, and ACK
   rises.
4. The environment lowers REQ. MD_ACK and the latch release within two ticks.
   ACK falls once PCd is low, that is, once the network is pre-charged. A new
   request may then follow.

The rise of MD_ACK takes one gate delay. Its fall takes a single tick (the
falling edge of REQ passes "without any additional delay"), so the latch
always releases before ACK can fall. Assertions in the wrapper check three
rules:

* ACK rises only after REQ.
* ACK falls only after REQ has fallen.
* The latch loads only while the network is evaluating.

**Single-rail and dual-rail outputs.** With single-rail outputs (the common
case), an output that evaluates to 0 never switches, so it always waits for
its matched delay. Early completion therefore pays off for the outputs that
rise. This is why each output has its own matched delay: a slow output that
happens to rise frees the block from its long worst case. A dual-rail pair
(true and false rail) is treated as one output that has completed when either
rail rises, so it always completes early. The wrapper's `ch_done[i]` input
carries this per-output "has switched" signal. For a dual-rail output, the
caller drives it with the OR of the two rails.

## The adder (`sbd_adder12`)

```
 a[11:0] b[11:0] REQ
   |  slice 3     slice 2     slice 1     slice 0
 [ADD3d]      [ADD3c]      [ADD3b]      [ADD3a]        all slices add at once
   | ack,s,c     |            |            |
 [INC3reg_4]<-[INC3reg_3]<-[INC3reg_2]<-[INC3reg_1]<-- Cin (true rail), ~Cin (false rail)
   |  \ Cout/Cout', ACK_co     |            |
   +------------+--------------+------------+--> 4-input C-element --> ACK
   Sum[11:0]
```

* **ADD3 (`add3_sbd`)** adds a three-bit slice of a and b in one domino gate,
  inside its own SBD wrapper. It has four single-rail outputs (s0, s1, s2, c),
  each with its own evaluation time and matched delay. The carry output is the
  slowest. If the slice produces a carry, that output rises and the slice
  finishes early; otherwise it waits for the carry's full matched delay. With
  the default constants, the domino core takes 47..68 ticks (470..680 ps), and
  REQ to ACK takes 147..168 ticks (1.47..1.68 ns). The testbench checks both,
  exactly, for all 64 operand pairs.
* **INC3reg (`inc3_sbd`)** adds the carry from the slice below to the ADD3
  result. Its request is the ADD3 slice's ACK (PACK). It holds two SBD
  wrappers:
  * The **carry wrapper** evaluates the carry-out on two rails. When the ADD3
    slice generates a carry (c = 1) or kills it (s ≠ 111), the carry-out is
    known without the carry-in, and the slice finishes at once. Only a
    propagating slice (s = 111) waits for the carry. The latched carry rails
    feed the next slice and return to 0 when PACK falls. The wrapper's ACK is
    `ack_co`.
  * The **sum wrapper** evaluates three single-rail sum bits
    `s[i] ^ (cin & all lower bits of s are 1)`. Its ACK goes to the
    C-element.
* A **C-element** joins the four sum acknowledges into the adder's ACK.
  `ack_co` of the top slice comes out as `ACK_co`, together with the dual-rail
  carry-out (`cout`, `cout_n`).

### Bundling constraint on the carry chain

An INC3 slice's matched delay starts when its own PACK rises. Its carry-in,
however, can arrive up to k carry hops later, where k is the slice's position
in the chain. So the matched delays grow with position:

* `MD_SUM(k) = 97 + 94·k` ticks
* `MD_CO(k) = 70 + 94·k` ticks

The 94-tick hop is the carry gate, one gC stage, the latch and a little
slack. The delays also include 25 ticks for the spread between ADD3
acknowledges and a 10-tick margin. `sbd_pkg::inc3_md_sum` and
`sbd_pkg::inc3_md_co` compute these values.

If you change any delay in the package, keep this constraint. Otherwise a
matched delay can expire before the carry arrives, and the slice will latch a
wrong sum. The end-to-end testbench includes operands that ripple the carry
through all four slices.

### Using the adder

The adder uses a four-phase, return-to-zero handshake:

1. Drive `a`, `b` and `cin`, then raise `req`.
2. `sum` is valid once `ack` is high; `cout`/`cout_n` are valid once `ack_co`
   is high.
3. Lower `req`.
4. Wait until `ack` and `ack_co` are both low before the next request.

The operands must stay steady until `ack` falls. Reset is asynchronous and
active-low (`rst_n`) and leaves every handshake signal low. `WIDTH` may be any
multiple of three.

## Where the model departs from, or goes beyond, its source

The following points are this design's own decisions:

* **Time scale and delays.** The tick size and every delay value are chosen
  here. The gC delay is 15 ticks, so the three gC stages on the REQ-to-ACK
  path add about 450 ps, the quoted wrapper overhead. The latch delay of
  55 ticks is what remains of the ADD3's 1465 ps after core and wrapper.
  Evaluation times and matched delays per output are chosen so that the ADD3
  core spans 470..680 ps.
* **Transistor circuits read as gate equations.** The three published
  transistor circuits (SBD_PC, SBD_MDelay, SBD_ACK) are modelled as
  set/reset equations. MD_PC is only described as "similar" to SBD_MDelay,
  so it is built as its mirror: the falling edge is delayed, with an early
  exit once all outputs are back at 0.
* **Combining per-output completions.** The per-output completion signals
  are combined with an AND before the latch.
* **Carry between slices.** The carry between INC3 slices is dual-rail and
  latched. INC3reg is split into a carry wrapper and a sum wrapper, matching
  its two acknowledges. The source describes the carry path only as a chain
  of domino gates.
* **Latch.** The TSPC latch is modelled as a register with a fixed delay.
* **Not built.** The purely static comparison circuit and a DCVSL-based
  wrapper variant are not modelled.

## Files

| file | content |
|---|---|
| `rtl/sbd_pkg.sv` | tick type, delay constants, INC3 matched-delay functions |
| `rtl/gc_element.sv`, `rtl/c_element.sv` | generalized and Muller C-elements |
| `rtl/sbd_pc.sv`, `rtl/sbd_mdelay.sv`, `rtl/md_pc.sv`, `rtl/sbd_latch.sv`, `rtl/sbd_ack.sv` | wrapper sub-blocks |
| `rtl/domino_eval.sv` | domino evaluation-network timing model |
| `rtl/sbd_wrapper.sv` | the SBD wrapper |
| `rtl/add3_sbd.sv`, `rtl/inc3_sbd.sv` | ADD3 and INC3reg slices |
| `rtl/sbd_adder12.sv` | the 12-bit adder (top) |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_sbd_adder_wide.sv` | the adder extended to 24 bits (eight slices) |

Every testbench prints `TB_RESULT checks=N failures=M` and ends by itself. A
watchdog stops it if the design hangs. `tb_sbd_adder12` runs the adder at its
default parameters through 607 additions. It counts each mechanism and fails
if any never occurs:

* ADD3 early and worst-case completion;
* carry generate, kill and propagate;
* a carry rippling through all four slices;
* INC3 early and worst-case completion;
* `cin` = 1 and `cout` = 1.

To simulate one testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/sbd_pkg.sv tb/tb_sbd_adder12.sv \
          --top-module tb_sbd_adder12 -o sim && ./obj_dir/sim
```

To lint a module:

```
verilator --lint-only -Wall -Irtl rtl/sbd_pkg.sv rtl/sbd_adder12.sv
```

Lint reports `SYNCASYNCNET` because `rst_n` is both the asynchronous reset of
the flops and the `disable iff` condition of the assertions. This is
intended.
