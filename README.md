# A microprogrammed asynchronous control engine

An asynchronous (self-timed) datapath has no clock to keep its units in step. Its
control is usually a hand-built state machine, which is fast but has to be redone for
every change of algorithm. This design is a programmable alternative that is still
self-timed. Each cycle, a small microprogram word tells every datapath unit three things:

- whether it runs at all;
- whether it starts at once, in parallel with the others, or waits for the units it
  depends on;
- which operands and operation it uses.

A cycle ends when every active chain of units has finished, and then the next word takes
over. Units that a word does not use cost no time. Dependent operations chain directly
from one unit to the next, with no round trip through the controller. To keep the fetch
off the critical path, the next word is prefetched while the current one executes, and
conditional branches are predicted.

The RTL implements this engine for a worked example: forward-Euler integration of
`y'' + 3xy' + 3y = 0`:

```
while (x < a) { x1 = x + dx; u1 = u - 3*dx*(u*x + y); y1 = y + u*dx; x = x1; u = u1; y = y1 }
```

The datapath has seven units: two multipliers, two adders and registers X/Y, T/U, plus a
comparator. A four-word, 24-bit microprogram controls them. The top module is
`diffeq_microengine`.

## The parts of one cycle

```
 ext_req/ext_ack          +-----------+   req    +--------------------+  req_dp
 ---------------------->  |    ECU    | -------> | microprogram memory | -------+
                          | (join of  |          | + register array    |        |
      acks of XY,TU,CMP   |  acks)    | <------- | ack (fetch done)    |        v
      +-----------------> +-----------+          +--------------------+   +---------+
      |                                            ^      |  ui           |  RAS    |--> unit
      |                                  curr_addr |      v               | blocks  |<-- ack
      |                                  +-------------+  BDU  <-- lt --  | (7)     |
      |                                  | next address|<- clear          +---------+
      |                                  +-------------+                       |
      +------------------------------------------------------------------------+
```

- **ECU (execution control unit), `ue_ecu`.** The ECU waits until every acknowledge it
  watches is high. It then drops the global request `req`, waits until all of them are
  low, and raises `req` again for the next cycle. The acknowledges come from the memory
  (fetch done) and from the units that end a chain: XY, TU and CMP. When the latched
  word has its `done` bit set, the ECU finishes the four-phase handshake with the
  environment (`ext_req`/`ext_ack`) instead of starting another cycle.
- **Memory, `ue_memory`.** The next word is always being fetched. The rising `req`
  latches it into the register array, which holds the microinstruction `ui` that drives
  the datapath. The datapath sees `req_dp`, which is `req` delayed so that it arrives
  after the new control bits. The fetch acknowledge comes from a matched delay.
- **Next address, `ue_next_addr`.** The next address is either the current address
  plus one, or the word's `next_addr` field, chosen by `sel_addr`. This is what gets
  prefetched while the current word executes.
- **BDU (branch detection unit), `ue_bdu`.** When a word's `bdu` bit is set, the BDU
  compares the comparator flag with the word's predicted outcome `bra_pred`. A mismatch
  raises `clear`. See the branch section below.
- **RAS blocks and datapath units.** There is one request/acknowledge/sequence (RAS)
  block per unit; see the next section.

## RAS blocks: execute, chain or skip

Every datapath unit sits behind a RAS block (`ue_ras`). The current word gives it two
kinds of control bit:

- `se` (set-execute): whether the unit runs in this cycle.
- `ss` (set-sequence): one bit per possible predecessor.

What the block does:

- **Parallel** (`se=1`, no `ss` bit set): the unit's request is the global request.
- **Chained** (`se=1`, some `ss` bits set): the request waits until the global request
  *and* every selected predecessor's acknowledge are high. A keeper holds the result
  until the global request falls. Predecessors that are not selected are ignored.
- **Skipped** (`se=0`): the unit gets no request. The block acknowledges at once by
  passing the global request through as its own acknowledge. Any unit chained after a
  skipped unit therefore starts immediately. This is the key to sharing one datapath
  between microinstructions that use different chains.

A unit's acknowledge goes both to the ECU and, as a sequence request, to the RAS blocks
that may chain after it. The chains of the solver are:

```
MUL2 --> ALU2 --> XY --> CMP          (XY chains on ALU2 via ss1 and on ALU1 via ss2)
MUL1 --> ALU1 --> TU        \--> XY
```

Only XY, TU and CMP are ever last in a chain, so only they report to the ECU, together
with the memory.

ALU1, TU and CMP always run chained, so they have no separate `ss` field: their `se` bit
serves as both. For example, word 1 loads U from a port through TU while ALU1 is skipped.
ALU1's bypass acknowledge is then the global request, so TU starts at once.

## The microprogram

Fields, most significant bit first (`ue_pkg::uinstr_t`):

| unit  | fields                                 |
|-------|----------------------------------------|
| MUL2  | se                                     |
| MUL1  | sm se                                  |
| ALU2  | sm ss se                               |
| ALU1  | op se                                  |
| XY    | sm ss1 ss2 se eny enx                  |
| TU    | sm se en                               |
| CMP   | se                                     |
| flow  | done, next_addr[1:0], bdu, bra_pred, sel_addr (done is the MSB) |

What each field group does:

| unit  | behaviour                                                                  |
|-------|----------------------------------------------------------------------------|
| MUL1  | `sm=0`: X·U; `sm=1`: 3dx·T                                                 |
| MUL2  | U·dx                                                                       |
| ALU1  | `op=0`: Y+MUL1; `op=1`: U−MUL1                                             |
| ALU2  | `sm=0`: dx+X; `sm=1`: MUL2+Y                                               |
| XY    | `sm` selects the ports or ALU2; `enx`/`eny` pick which register(s) load    |
| TU    | `en=0`: T ← ALU1; `en=1`: U ← (`sm` ? U port : ALU1)                       |
| CMP   | latches the flag X < A                                                     |

The program (`ue_pkg::DIFFEQ_PROGRAM`). Addresses are written 1..4 and encoded 0..3:

| addr | hex    | what it does |
|------|--------|--------------|
| 1    | 000FFE | Loads X and Y from the ports and U from its port. CMP tests X < A. Predicts "taken" (the loop continues) and prefetches word 2; the alternative is word 4. |
| 2    | 5EFC80 | Y ← Y + U·dx through MUL2→ALU2→XY. In parallel, T ← X·U + Y through MUL1→ALU1→TU. XY waits for ALU1 as well (ss2), so Y is not overwritten before ALU1 has read it. |
| 3    | 33EAEF | U ← U − 3dx·T through MUL1→ALU1→TU. In parallel, X ← X + dx through ALU2→XY→CMP. Predicts "taken" again and prefetches word 2 (`sel_addr`); the alternative is word 4. |
| 4    | 800001 | `done`: hands Y to the environment. Prefetches word 1 for the next run. |

`prog_we`/`prog_addr`/`prog_data` rewrite words while the engine is idle. The
end-to-end testbench uses this to swap in a version of word 3 that predicts "not taken".

## Branch prediction and the clear

Prefetching means the next word is already chosen before the comparison is done. A
branching word carries its prediction in `bra_pred`. When it executes, the BDU computes
`clear = (bdu & flag) ^ bra_pred`. If `clear` is set, the prefetched word is wrong:

- The register array does not load its fields. Instead it clears every `se`, `ss`,
  `bdu` and `bra_pred` bit, so the next cycle executes nothing.
- The array toggles `sel_addr`, so the address logic now fetches the other successor.
- The incremented-address register is frozen, so the "next + 1" path is not disturbed.

A misprediction therefore costs exactly one empty cycle. With the default program, a run
of *n* loop iterations takes `2n + 3` global-request cycles: word 1, *n* times words 2
and 3, one empty cycle at the loop exit, and word 4. If word 3 instead predicts "not
taken", every iteration but the last mispredicts. The cost is then `3n + 1` cycles
(or 3 when *n* = 0). The testbenches check both formulas.

## Control-structure variants (`ARCH`)

The top's `ARCH` parameter (`ue_pkg::arch_e`) selects between four control structures.
All four compute the same results.

- **`ARCH_BASIC`** (default). This is the structure described above: the word is
  latched on the rising request.
- **`ARCH_OPT4`.**
  - The word is latched when the global request *falls*. Control bits, the prefetch and
    the datapath's return to zero then overlap.
  - The RAS (`ue_ras_opt4`) has no keeper. The request passes straight through a gate
    that was set up during the previous return-to-zero phase.
  - The acknowledge is `dpu_ack | (!se & req)`.
  - After reset, the first cycle only fetches word 1. The first run is therefore one
    cycle longer.
- **`ARCH_DECOUPLED`.** For units whose operations may span several microengine cycles.
  - The ECU (`ue_ecu_dec`) watches all seven units plus the memory. A unit not set to
    execute is ignored by the join, so no always-acknowledge is needed.
  - A unit with `sd` (set-decoupled) high is ignored in both phases, until a later word
    clears `sd` to resynchronise with it.
  - The RAS (`ue_ras_dec`) holds a decoupled unit's request across later global and
    sequence requests, so the unit is not restarted.
  - The solver's word has no `sd` field, so the top ties `sd` low. `ss` is derived from
    the chain: ALU1 after MUL1, TU after ALU1, CMP after XY. The unit testbenches
    exercise the `sd` paths directly.
- **`ARCH_TWO_PHASE`.** The basic structure with transition signalling: every edge of a
  request is an event, and there is no return to zero.
  - The ECU (`ue_ecu_2ph`) toggles `req` once every acknowledge has reached the level of
    `req`. `ext_req` and `ext_ack` are two-phase too: toggle `ext_req` to start a run,
    and the run is finished when `ext_ack` equals `ext_req`.
  - A unit's request cannot simply be gated, because a two-phase block must remember the
    level it last passed on. `ue_ras_2ph` therefore replaces the gates of the basic RAS:
    - The sequence gate becomes a C-element (Muller element). Its output takes the
      level of `req` once every selected sequence request has that level too.
    - A SELECT element routes each event either to the unit, toggling `dpu_req`, or to
      a bypass toggle, depending on `se`.
    - An XOR of the unit acknowledge and the bypass toggle forms `ack`. It therefore
      changes exactly once per cycle whether or not the unit ran.
  - The memory, the next-address register and the matched delays
    (`TWO_PHASE` parameters) act on every transition.
  - Cycle counts equal the basic ones, counted in transitions.

## Timing model: self-timed logic on a clock

The engine is written as synthesizable clocked RTL with a free-running `clk` and a
synchronous active-low `rst_n`. The clock only samples the handshakes; no behaviour
depends on its rate.

- **Bundled-data delays.** Each datapath unit is combinational. `ue_bd_delay` gives it a
  matched delay. The acknowledge rises `DELAY` cycles after the request, and a
  one-cycle `fire` strobe loads result registers. The acknowledge falls one cycle after
  the request falls. With `TWO_PHASE` set, each transition of the request is answered,
  `DELAY` cycles later, by the acknowledge taking the same level.
- **Delay parameters.** The top sets the delays with `MUL_DELAY`, `ALU_DELAY`,
  `REG_DELAY`, `CMP_DELAY` and `FETCH_DELAY`. Any positive values are valid, and the
  cycle counts above do not depend on them.
- **Data path.** Operands are 16-bit signed fixed point with 8 fraction bits
  (`ue_pkg::fx_mul` truncates the product toward minus infinity).
- **Handshakes.** All handshakes are four-phase, except in `ARCH_TWO_PHASE`. Bundled
  data is assumed at the ports: keep them stable while a run is in progress, and read
  `yout_port` when `ext_ack` changes.
- **Assertions.** Assertions check the handshake rules: requests held until
  acknowledged, and acknowledges only after requests.

## Where the design departs from, or fills in, its source

- **Built from the description.** The microword layout, the four program words, the RAS
  behaviours, the BDU gate, the next-address structure and the clear semantics come
  from the description of the engine. The `ARCH_OPT4`, `ARCH_DECOUPLED` and
  `ARCH_TWO_PHASE` structures also come from it.
- **Own choices.**
  - Clocked emulation with counter delays.
  - Data width and fixed-point format.
  - Address encoding 0..3.
  - The program-write port.
  - `3*dx` comes in on its own port; it is not computed.
  - The comparator latches its flag.
  - In the four-phase variants, the ECU holds `ext_ack` until `ext_req` falls.
- **Mux readings.** Operand-mux numbering and the T/U enable polarity were read from the
  datapath drawing. Each reading was checked against the arithmetic each word must do.
- **Figure readings in the variants.** The gate-level drawings of the optimized RAS and
  of the decoupled ECU are only partly legible. The variants implement the behaviour
  their text states, not a transistor netlist.
- **Not built.**
  - The optimized two-phase structure. In it, each unit latches its own part of the
    next word as soon as it finishes, and per-unit logic clears a mispredicted word.
    Only the basic two-phase structure is built.
  - The "external address" input of the address logic.
  - The second application discussed with this architecture, a CD-player error decoder
    (nine 30-bit words): its datapath is not specified in enough detail.

## Files

| file | contents |
|------|----------|
| `rtl/ue_pkg.sv` | widths, microword struct, clear mask, program, fixed-point multiply |
| `rtl/diffeq_microengine.sv` | top |
| `rtl/ue_ecu.sv`, `rtl/ue_ecu_dec.sv`, `rtl/ue_ecu_2ph.sv` | ECU: basic, decoupled, two-phase |
| `rtl/ue_ras.sv`, `rtl/ue_ras_opt4.sv`, `rtl/ue_ras_dec.sv`, `rtl/ue_ras_2ph.sv`, `rtl/ue_ras_sel.sv` | RAS variants and the wrapper that picks one by `ARCH` |
| `rtl/ue_memory.sv`, `rtl/ue_next_addr.sv`, `rtl/ue_bdu.sv` | fetch, address and branch logic |
| `rtl/ue_mul1.sv` … `rtl/ue_cmp.sv`, `rtl/ue_bd_delay.sv` | datapath units and matched delay |
| `tb/tb_<module>.sv` | a self-checking testbench for each module except the package and the RAS wrapper |
| `tb/tb_diffeq_microengine.sv` | end-to-end test at default parameters: random start values and bounds, results checked against a bit-exact reference model, cycle counts, reprogramming, and counters for every mechanism (parallel, chained, cross-chain, bypass, prediction hit/miss, done, reprogram) |
| `tb/tb_diffeq_arch.sv` | the four `ARCH` variants side by side on the same runs, plus a basic engine with very different delays (same results and cycle counts) |

## Simulating

With Verilator 5 (timing support needed for the testbench clocks):

```
verilator --binary --timing --assert -Irtl -y rtl -y tb \
    rtl/ue_pkg.sv tb/tb_diffeq_microengine.sv --top-module tb_diffeq_microengine
./obj_dir/Vtb_diffeq_microengine
```

Every testbench ends with a line `TB_RESULT checks=N failures=M`. Replace the testbench
name to run any other. To change the program, edit `DIFFEQ_PROGRAM` in `ue_pkg`, or write
words through the `prog_*` port. To run another algorithm on the same control, change the
datapath units and their field groups in `uinstr_t`, together with the clear mask
`CLR_FIELDS`.
