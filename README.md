# A mesh router that exercises its own critical paths while idle

Transistors age. NBTI (negative bias temperature instability) is the
dominant aging mechanism in on-chip network routers. It slowly raises the
threshold voltage of a PMOS transistor for as long as its gate is held low.
A node that sits at one logic value nearly all the time therefore ages
fastest. Once the slowest critical path no longer meets the clock, the
router fails. In a chip multiprocessor, one failed router can cut off a
memory controller or deadlock the whole network.

Real workloads keep routers almost idle: a few hundredths of a flit per
cycle. Idle routers are the worst case for NBTI, because the allocation
logic holds the same values for long stretches. This design turns idle time
into a remedy:

* when the router has been quiescent for 16 cycles, it enters **exercise
  mode**;
* in exercise mode, the inputs of the allocation stage (the pipeline stage
  that holds every critical path) come from a small ROM of **exercise
  vectors** instead of from the registers that normally feed it;
* the vectors are chosen so that, across the set, every critical node is
  driven to both logic values;
* the flip-flops after the allocator are disabled, so nothing the exercise
  computes reaches router state;
* the vector changes only every 2,048 exercise cycles, which balances duty
  cycles while adding very little switching activity.

The RTL is a complete five-port, four-VC wormhole router for an 8x8 mesh
with that exercise logic built in. The exercise logic is also provided
stand-alone, at the size reported for the published router netlist.

## Exercise mode in detail

### When it is on

`exercise_ctrl` watches one signal, `busy`. In the router, `busy` is high
while a flit is arriving on any port or any input VC buffer holds a flit.
Exercise mode works like this:

* It rises after `busy` has been low for `QUIET_CYCLES` (16) consecutive
  cycles.
* It falls at the first clock edge at which `busy` is high.
* A flit written into a buffer at edge *n* is routed at edge *n+1* and
  requests allocation only in the cycle after that. Exercise mode has
  already ended by then, so it never delays traffic. The router testbench
  checks this: a head flit that arrives in exercise mode still crosses the
  router in the zero-load time of 4 edges.

### What is applied

A rotation counter counts exercise-mode cycles. After every `TOGGLE_PERIOD`
(2,048) of them, it pulses `toggle` and steps `vec_idx` through the eight
stored vectors. The counter keeps its value while the router is busy, so
short idle gaps still add up to full rotations. At 0.05 flits/cycle, the
router spends about 70% of its cycles in exercise mode. That is enough to
use all eight vectors several times in 100,000 cycles (measured by
`tb_router_rates`). The ROM output is registered, so a new vector reaches
stage 2 one cycle after the index changes. This keeps the ROM off the
critical path.

### Compacting the vectors

An exercise vector only needs to fix the inputs that set a target node. All
other bits are don't-care. Over the whole vector set, each input of the
critical logic falls into one of four classes:

| class   | values over all vectors     | hardware                       |
|---------|-----------------------------|--------------------------------|
| MUX_X   | don't-care in every vector  | no multiplexer at all          |
| MUX_1   | 1 or don't-care             | 2:1 mux with a constant 1      |
| MUX_0   | 0 or don't-care             | 2:1 mux with a constant 0      |
| MUX_ROM | both 0 and 1 occur          | 2:1 mux fed by one ROM column  |

Only MUX_ROM inputs cost ROM bits. In the published router netlist, 1,435
inputs reduce to 730 unmuxed, 487 tied to 1, 38 tied to 0 and 180 ROM
columns. That is an 8 x 180 ROM and 705 multiplexers.
`exercise_logic`, `exercise_mux` and `exercise_rom` default to exactly
these sizes.

`exercise_mux` takes three masks as parameters: `MASK_ROM`, `MASK_CONST`
and `CONST_VAL`. It hands the ROM bits to the MUX_ROM inputs in ascending
input order. Inputs with neither mask bit set are plain wires.

### The vectors of this router

Stage 2 starts at registers and ends at registers. Its combinational logic
is the small cloud in each input VC that forms Request and Route, plus the
allocator. The exercise muxes sit on every register output that feeds this
logic: 225 bits, packed as `noc_pkg::crit_in_t`.

| field                  | width     | meaning                                          |
|------------------------|-----------|--------------------------------------------------|
| VC status              | p x v x 2 | idle, waiting for an output VC, or active        |
| VC has flit            | p x v     | a flit still waits for allocation                |
| VC output port         | p x v x 3 | output port of its packet                        |
| VC output VC           | p x v x 2 | output VC held by its packet                     |
| credit                 | p x v     | per output port and VC: downstream has a credit  |
| VC-free                | p x v     | per output port and VC: free, with a credit      |
| input-arbiter pointer  | p x 2     | priority register of each input-port arbiter     |
| output-arbiter pointer | p x 3     | priority register of each output-port arbiter    |

The input VCs bring their stage-2 registers out as `st`. The function
`noc_pkg::vc_request` is the cloud that turns them into Request, Route and
need-VC. Each input VC uses it for its own outputs, and the router applies
it again after the muxes (`noc_pkg::alloc_inputs`). The arbiter pointers
are registers inside the allocator. Each `rr_arbiter` therefore arbitrates
from a `prio` input and brings its register out as `prio_q`. The router
loops `prio_q` back to `prio` through the muxes. An assertion checks that
outside exercise mode the allocator sees exactly the functional values.

`noc_router` defines its own eight vectors in the function `ex_vector(k)`:

* the status of VC *v* at port *i* is idle, waiting, active, active as
  `(i+v+k) mod 4` is 0, 1, 2, 3;
* port `k mod 5` has no flit in vector *k*; all other VCs have one;
* the output port of a VC is `(i+v+k) mod 5` and its output VC is
  `(v+k) mod 4`;
* output VC 0 is always available; VC *ov* of port *o* is available unless
  `(o+ov+k) mod 3 = 0`, and has a credit unless `(o+ov+k) mod 3 = 1`;
* the input-arbiter pointer of port *i* is `(i+k) mod 4`, and the
  output-arbiter pointer of port *o* is `(o+3k) mod 5`, so every pointer
  takes each of its values.

Across these vectors every Request line and every input-port grant line
takes both values. So does every register bit except five: output VC 0 of
each port is always available. Those five become constant muxes. At
elaboration, the functions `rom_mask`, `const_mask`, `const_val` and
`rom_content` apply the class rule above. The result is 220 ROM columns
and 5 constant inputs. To use other vectors, change `ex_vector`; the
masks, ROM width and contents follow automatically.

The vectors behind the published 8 x 180 ROM came from an ATPG-style
justification run on that router's gate netlist. They are not reproduced.
The stand-alone `exercise_rom` instead defaults to a Walsh pattern: bit *j*
of word *k* is `parity(k & (j mod 7 + 1))`, so every column is 1 in exactly
four of the eight words.

### Keeping exercise invisible

While `exercise_mode` is high, `exercise_logic.out_en` is low. That signal
disables:

* the stage-2/3 register `alloc_q`;
* every state update driven by the allocator: input-VC status, output-VC
  busy flags, credit counters and the round-robin arbiter pointers.

The router enters exercise mode only after 16 idle cycles, so `alloc_q`
then holds no grant. An assertion checks this.

## The router

### Pipeline

| stage | what happens                                                        |
|-------|---------------------------------------------------------------------|
| 1     | flit written into its VC buffer; one cycle later, a head flit is routed with X-Y dimension order (`route_xy`) |
| 2     | combined VC and switch allocation (`vc_sw_allocator`); grants update VC state and credits and are captured in `alloc_q` |
| 3     | granted flits leave their buffers, cross the `crossbar` and are written to the output register of an `output_channel`; a credit goes upstream |

Zero-load latency is 4 clock edges from `flit_in` to `flit_out` for a head
flit, and 3 for body flits. With no contention, each output port moves one
flit per cycle.

### Input VCs

Each `input_vc` is a FIFO with three pointers:

* write: arrival;
* allocate: the next flit that still has to win stage 2;
* read: the flit leaving in stage 3.

Its status is *idle*, *waiting for an output VC* or *active*. A small
combinational block derives the one-bit request, the one-hot route and the
need-VC bit from that status. An active VC requests only while its
downstream VC has a credit.

### Allocation

`vc_sw_allocator` is a separable, input-first allocator:

1. A request is eligible if its VC already owns an output VC, or if some VC
   of its output port is free and has a credit.
2. A round-robin arbiter per input port picks one eligible VC.
3. A round-robin arbiter per output port picks one input.
4. A winning head flit gets the lowest-numbered free output VC in the same
   cycle.

The arbiters keep their round-robin pointers in registers that the
allocator brings out as `prio_q`. They arbitrate from the pointers in
`ain.prio`. Outside exercise mode, those are the same values.

### Output channels

Each output channel tracks, for every downstream VC:

* a busy flag, set from the head grant until the tail flit leaves;
* a credit counter, reset to the buffer depth of 4.

### Interfaces

Link types are in `noc_pkg`:

* `flit_t`: `valid`, `head`, `tail`, `vc[1:0]`, `dest_x[2:0]`,
  `dest_y[2:0]`, `data[31:0]`, 47 bits in all;
* `credit_t`: `valid`, `vc[1:0]`.

Ports are numbered 0 local, 1 east (+x), 2 west (-x), 3 north (+y),
4 south (-y). An upstream sender may send into a VC only while it holds a
credit for it. It gets 4 credits per VC after reset and one back for each
`credit_out` pulse.

## Files

| file | content |
|------|---------|
| `rtl/noc_pkg.sv` | router sizes, `flit_t`, `credit_t`, `port_e`, allocator in/out structs |
| `rtl/exercise_pkg.sv` | exercise sizes and helper functions |
| `rtl/noc_router.sv` | top: router, its exercise vectors and their compaction |
| `rtl/input_vc.sv`, `rtl/route_xy.sv` | input VC buffer and status; X-Y routing |
| `rtl/vc_sw_allocator.sv`, `rtl/rr_arbiter.sv` | stage-2 allocator and its arbiters |
| `rtl/crossbar.sv`, `rtl/output_channel.sv` | stage 3 |
| `rtl/exercise_logic.sv` | controller + ROM + muxes + flip-flop enable |
| `rtl/exercise_ctrl.sv`, `rtl/exercise_rom.sv`, `rtl/exercise_mux.sv` | its parts |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_router_rates.sv` | router under loads from 0.0005 to 0.085 flits/cycle |
| `tb/tb_router_periods.sv` | four routers with rotation periods 16 to 2,048 on the same traffic |

## Parameters

| parameter | default | origin |
|-----------|---------|--------|
| ports p, VCs per port v | 5, 4 | published design |
| mesh size, routing | 8 x 8, X-Y | published design |
| packet length | any (tested 1 and 5 flits) | published: 1 or 5 |
| quiet cycles before exercise | 16 | published design |
| vector rotation period | 2,048 | published design (16 to 2,048 evaluated) |
| exercise vectors | 8 | published design |
| stand-alone exercise logic | 1,435 inputs, 8 x 180 ROM, 487/38/730 | published design |
| buffer depth | 4 flits per VC | own choice |
| payload | 32 bits | own choice |
| router position `MY_X`, `MY_Y` | 3, 3 | own choice |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops by itself.
For example, with Verilator 5:

```
verilator --binary --timing --assert -Irtl --top-module tb_noc_router \
  rtl/noc_pkg.sv rtl/exercise_pkg.sv tb/tb_noc_router.sv
./obj_dir/Vtb_noc_router
```

The two packages go first. `-Irtl` lets Verilator find each module in
`rtl/<name>.sv`. Use the same command with another `tb_` name for the
other testbenches. All of them run in seconds.

## What the testbenches establish

`tb_noc_router` runs the router at its default parameters. It checks:

* the X-Y output port of every flit;
* in-order delivery per source VC;
* each packet staying whole on one output VC;
* no overflow of the modelled downstream buffers;
* the 4-edge head latency;
* that nothing leaves the router during exercise mode;
* that every ROM-driven stage-2 input, every Request line and every grant
  line toggles over the eight vectors.

It also counts switch contention, VC-allocation stalls, credit stalls,
exercise entries, exercise cut short by traffic, vector rotations, and
1-flit and 5-flit packets. Each of these must occur at least once.

`tb_router_rates` offers 100,000 cycles of random traffic at each of five
loads. 0.0005 and 0.085 flits/cycle are the lowest and highest per-router
rates of the PARSEC benchmarks that the technique targets.

| load (flits/cycle) | time in exercise | vector rotations | highest duty cycle of an exercised input |
|--------------------|------------------|------------------|------------------------------------------|
| 0.0005             | 99.5%            | 48               | 0.872                                    |
| 0.001              | 99%              | 49               | 0.868                                    |
| 0.02               | 87%              | 42               | 0.775                                    |
| 0.05               | 70%              | 34               | 0.816                                    |
| 0.085              | 55%              | 27               | 0.877                                    |

At every load, all eight vectors are applied and no exercised stage-2
input stays at one value. The duty-cycle check allows 7/8 plus the share
of cycles spent on traffic. With exercise on almost all the time, the
highest duty cycle approaches 7/8: each such input is 1 in at most seven
of the eight vectors.

`tb_router_periods` runs five routers side by side on the same 0.02
flits/cycle traffic for 131,072 cycles. Four are identical except for
`TOGGLE_PERIOD`. The fifth has a quiet threshold of 2^20 cycles, so it
never exercises and serves as the baseline. All five must produce the same
flit and credit outputs in every cycle, and they do.

| router          | rotations | activity factor of the exercised inputs | inputs at one value >99% of the time |
|-----------------|-----------|-----------------------------------------|--------------------------------------|
| period 16       | 7,109     | 0.0368                                  | 0 of 220                             |
| period 128      | 888       | 0.0094                                  | 0                                    |
| period 512      | 222       | 0.0065                                  | 0                                    |
| period 2,048    | 55        | 0.0057                                  | 0                                    |
| no exercise     | 0         | 0.0003                                  | 135                                  |

The average duty cycle of an exercised input varies by at most 0.0030
between periods. So the period sets the extra switching activity and
hardly affects duty-cycle balance. What is left at long periods comes from
the switches between traffic and exercise.

Each block testbench was also run against a deliberately broken copy of its
module, and every one of them detected the fault.

## Where this differs from the published design, and limits

* **What the multiplexers drive.** The published exercise muxes sit on the
  1,435 inputs of a critical-path logic cone cut from a synthesized netlist
  of another router. Here, the muxes drive the 225 register bits that
  feed this router's stage 2, at RTL. The boundary is the same: the
  registers in the input VCs, output channels and arbiters.
* **Which nodes are exercised.** The published vectors target every critical
  net of a gate netlist. This design's vectors target the stage-2 register
  outputs, Request lines and grant lines at RTL. Which gates end up on the critical paths depends
  on the synthesis of this RTL and is not analysed here.
* **Allocator.** The published router derives from a different RTL code
  base. Its allocator internals, buffer depth and flit format are not
  described, so those here are this design's own.
* **Not evaluated.** Lifetime, activity factor, power and area were
  evaluated with a commercial 45 nm flow and are not reproduced.
* **Not built.** The rest of the 64-core system around the router, and the
  design-time tools (logic-cone extraction, vector generation), are not
  part of this RTL.
