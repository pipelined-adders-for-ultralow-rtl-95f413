# Asynchronous dual-rail pipelined adder

This is a small adder datapath for very low-power signal processing. It is
built from a dual-rail domino full adder and has no global clock. Each bit
travels on two wires. One pulls high for "1", the other pulls high for "0", and
both low means "no data yet". So every stage can tell on its own when its
result is complete. Stages are chained as a **PS0 pipeline**: each stage's
completion detector tells the stage before it when to precharge and when to
evaluate. Each stage runs at its own speed, and a new addition can enter while
earlier ones are still rippling through.

The RTL contains two designs that share the same full-adder cell:

* **`ps0_pipeline`**: a three-stage asynchronous pipeline. Stage *k* adds bit
  *k*, so three stages give a 3-bit pipelined ripple-carry adder with carry in
  and carry out.
* **`serial_adder`**: a bit-serial adder. One dual-rail full adder takes the
  operands least significant bit first, one bit per clock edge. Its carry goes
  around through a **double-edge-triggered** flip-flop.

`adder_top` instantiates both side by side, each with its own ports.

## Dual-rail encoding

Every data bit is a `dr_pkg::dr_bit_t`, a packed struct `{t, f}`:

| t f | meaning |
|-----|---------|
| 0 0 | null (spacer, precharged) |
| 1 0 | valid 1 |
| 0 1 | valid 0 |
| 1 1 | illegal, never produced |

A word is *complete* when every bit is valid and *empty* when every bit is
null. Between two data words the wires always go back through null. This is
four-phase, return-to-zero signalling. `dr_enc`, `dr_is_valid` and
`dr_is_null` in `dr_pkg` convert and test bits.

## The full-adder cell (`dr_full_adder`)

The cell has four domino gates, one per output rail. Each rail of each output
has its own pull-down network:

* carry-true conducts for `cin.t·(a.t + b.t) + a.t·b.t`. Carry-false is the
  same network on the false rails, so both are the majority function.
* sum-true conducts for the four minterms with an odd number of ones, and
  sum-false for the four with an even number.

`ackpre` is the precharge control:

* **`ackpre = 0`**: all dynamic nodes are precharged, so every output is null.
* **`ackpre = 1`**: a node can only discharge. An output rises once its inputs
  are valid, and then **stays** valid even if the inputs go back to null, until
  the next precharge.

That hold is what a PS0 pipeline needs (see below). The cell also offers
`comb_sum` / `comb_cout`. They give the same evaluation without the hold, and
`ackpre = 0` still forces them to null. The bit-serial adder uses them because
its carry is stored in a flip-flop instead.

## The PS0 pipeline (`ps0_pipeline`, `ps0_stage`)

### Stage

A stage (`ps0_stage`) has two parts:

* a functional block: the full-adder cell plus domino buffers for the other
  bits of the token;
* a completion detector (`completion_detector`).

A token is one whole addition: `a` and `b` (`STAGES` dual-rail bits each) and
a carry. Stage *k* replaces `a[k]` with sum bit *k* and `c` with its carry out.
It copies the other bits unchanged. After the last stage the `a` field holds
the sum, `c` the carry out, and `b` comes out unchanged.

The completion detector puts a two-input NOR on each dual-rail output bit of
the stage; the output is 1 while the bit is null. A C-element merges all the
NOR outputs. Its output `acknxt` is:

* 0 once every output bit is valid (the stage has evaluated);
* 1 once every output bit is null (the stage has precharged);
* unchanged in between.

### Handshake

The PS0 rule: **the detector output of stage k+1 is the `ackpre` of stage k.**
So:

1. Stage *k* evaluates, and its outputs become valid.
2. Stage *k+1* evaluates, and its detector falls.
3. That makes stage *k* precharge. Stage *k+1* keeps its token thanks to the
   domino hold.
4. Stage *k* evaluates again only after stage *k+1* has itself precharged.

As a result, tokens sit in every other stage. With three stages and a stalled
sink, stages 1 and 3 each hold a token while stage 2 is empty.

At the two ends of the pipeline:

* **Source side:** `in_ack` is stage 1's detector. The source may drive a new
  valid token while `in_ack = 1`. It must return its wires to null after
  `in_ack` falls, and must do so within 3 clk. PS0 relies on this. A source
  that keeps data valid longer would have the same token evaluated twice.
* **Sink side:** the sink drives `out_ackpre` as if it were a fourth stage.
  Once it sees `out_done_n = 0` (result valid) and has taken the result, it
  drives 0. It drives 1 again after `out_done_n` has returned to 1. The sink
  may delay either step as long as it likes. Holding `out_ackpre` high is a
  stall, and the pipeline backs up safely behind it.

### Timing model

The real circuit has no clock. In the RTL every state-holding node is a
register on `clk`: the domino dynamic nodes and the C-elements. One `clk`
period stands for one gate delay and carries no meaning in the handshake. The
code is synthesizable and simulates deterministically. Apart from that time
base, all sequencing is done by the handshake signals.

In model time:

* evaluation takes 1 clk per stage;
* a detector reacts 1 clk after its last bit;
* precharge takes 1 clk.

The PS0 cycle is 3 evaluations + 1 precharge + 2 detections, so a new token
can be accepted every **6 clk**. The testbenches measure exactly 6 clk with a
source and sink that respond at once. Latency from the source register to the
last detector is `STAGES + 2` clk.

### Assertions

`ps0_stage` and `ps0_pipeline` carry concurrent assertions for the protocol:

* no output bit ever shows the illegal code 11;
* a stage is null one clk after its `ackpre` falls;
* an output rail that has risen during evaluation stays high until precharge;
* a valid input bit keeps its value until it returns to null;
* a new input token starts only while `in_ack` is 1.

Run simulations with `--assert` to enable them.

## Bit-serial adder (`serial_adder`, `det_dff`)

One full-adder cell adds operand bit *i* to the stored carry. The true rail of
its carry out goes to a double-edge-triggered D flip-flop. That flip-flop's
`Q` and `Q'` become the carry-in true and false rails for bit *i+1*.

The flip-flop stores on **both** clock edges, so the adder takes one bit per
clock edge, two bits per clock period. A *W*-bit addition takes *W* edges, and
after the last edge `carry_q` holds the carry out. To run it:

* keep `ackpre` high while adding;
* for a new word, reset the carry with `rst_n`, or clock in one `0 + 0` bit;
* note that pulling `ackpre` low makes the carry output null, so the stored
  carry clears at the next edge.

`det_dff` keeps one register per clock edge and stores the value XOR-encoded
across them (`p <= d ^ n` on the rising edge, `n <= d ^ p` on the falling edge,
`q = p ^ n`). `Q` therefore changes only when a register updates. A flip-flop
whose output is a clock-steered multiplexer would let `D = f(Q)` race at the
clock edge in this feedback loop.

## Top level (`adder_top`)

| port group | signals |
|------------|---------|
| pipeline | `p_clk`, `p_rst_n`, `p_a`, `p_b`, `p_cin`, `p_acknxt`, `p_sum`, `p_b_out`, `p_cout`, `p_done_n`, `p_ackpre` |
| serial | `s_clk`, `s_rst_n`, `s_ackpre`, `s_a`, `s_b`, `s_sum`, `s_cout`, `s_carry_q` |

Parameter `STAGES` (default 3) sets the pipeline depth and the operand width.
All resets are active low and asynchronous.

## How far to trust it, and where it departs from the circuit it models

* **Circuit-level properties are absent.** The original is a transistor-level
  design in 65 nm CMOS, characterised for delay, power, PDP and area across
  0.8–1.2 V. None of that exists in RTL. The one timing property kept is the
  *shape* of the PS0 cycle (6 model clk).
* **Pipeline stages use the full-adder cell alone.** The adder cell with its
  double-edge carry flip-flop is described as the pipeline's functional block.
  Inside a clockless four-phase stage, though, no clock is given for that
  flip-flop, and the stage's handshake signals change twice per token. So the
  flip-flop version is provided as the separate `serial_adder`.
* **How the work is split between stages is this design's choice:** one bit
  per stage, and the token carries the remaining operand bits and the finished
  sum bits along.
* **The C-element** is modelled by its behaviour, not its transistor
  structure. The detector merges all bits with one many-input C-element
  instead of a tree.
* **The double-edge flip-flop's transistor circuit is not reproduced**, only
  its behaviour.
* **Resets, the `comb_*` outputs of the adder cell, `p_done_n`, and the source
  timing constraint** are additions of this design.
* **Metastability** of the real carry node cannot be shown in a two-state
  simulation and is not modelled.
* **Pads and layout** are outside the RTL.

## Files

`rtl/`:

* `dr_pkg.sv`: dual-rail type and helpers
* `dr_full_adder.sv`, `c_element.sv`, `completion_detector.sv`: cells
* `ps0_stage.sv`, `ps0_pipeline.sv`: the asynchronous pipeline
* `det_dff.sv`, `serial_adder.sv`: the bit-serial adder
* `adder_top.sv`: the top

`tb/`: one self-checking testbench per module, `tb_<module>.sv`. Each prints
`TB_RESULT checks=N failures=M`.

* `tb_adder_top` runs the whole design at its default size:
  * 600 random pipelined additions against an eager, then a randomly stalling,
    source and sink;
  * 300 random 16-bit serial additions;
  * it counts sink stalls, source back-pressure, several tokens in flight,
    carries rippling through every stage, carry out, precharges and carries
    stored on each clock edge, and fails if any of them never happened.
* `tb_ps0_pipeline` also checks the 6-clk token period and the latency.
* `tb_dr_full_adder` and `tb_serial_adder` walk all 8 combinations of a, b and
  carry.

## Simulating

Each testbench builds with Verilator 5, for example:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl rtl/dr_pkg.sv tb/tb_adder_top.sv \
          --top-module tb_adder_top -y rtl +libext+.sv
./obj_dir/Vtb_adder_top
```

Pass `rtl/dr_pkg.sv` first, because every module imports it. For lint only:

```
verilator --lint-only -Wall -Irtl rtl/dr_pkg.sv rtl/adder_top.sv -y rtl
```
