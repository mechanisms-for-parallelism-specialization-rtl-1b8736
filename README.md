# DySER block: a configurable dataflow fabric with vector ports and fast reconfiguration

DySER (Dynamically Specializing Execution Resources) is an accelerator that sits beside a
processor pipeline. Its main idea: a program region is not run as a stream of instructions. It is
mapped once onto a grid of functional units (FUs) joined by configurable switches. Operands flow
through that hardware datapath like data through a circuit: an FU fires when its inputs have
arrived, and no decode, issue or register traffic is involved. The host sends operands into named
input ports and reads results from named output ports.

This SystemVerilog implements one 64-FU DySER block. It includes the three mechanisms that make the
fabric useful for data-parallel code:

* **Vector ports.** One wide host access is spread over several fabric ports, or gathered from
  them, by a per-port *vector map*.
* **Several configurations stored in every tile**, so the block can hold more than one datapath.
* **Fast configuration switching.** The fabric moves from one stored configuration to the next
  while results of the old one are still draining, using in-band RESET and SET tokens and a 1-bit
  *free* signal between neighbours.

The host processor, its wide load/store path and the compiler that produces configurations are not
part of this RTL. Their side of the block is brought out as request ports on `dyser_top`.

## 1. The fabric

```
  in 0    in 1    in 2          in 8         (input ports 0..8 enter from the north)
   |       |       |              |
in 9 -S(0,0)---S(0,1)---S(0,2) ... S(0,8)- out 9     (inputs 9..17 enter from the west,
   |  FU(0,0) | FU(0,1) |           |                 outputs 9..17 leave to the east)
in10 -S(1,0)---S(1,1)---S(1,2) ... S(1,8)- out 10
   |  FU(1,0) | ...
   :          :
     -S(8,0)---S(8,1)--- ...     S(8,8)- out 17
   |       |                      |
 out 0   out 1                  out 8        (output ports 0..8 leave to the south)
```

There are 9 x 9 switches. There is an FU in each of the 8 x 8 squares between them.

**FUs.** FU (r,c) can take each operand from any of its four corner switches: (r,c), (r,c+1),
(r+1,c) or (r+1,c+1). It always delivers its result to the south-east corner, switch (r+1,c+1).

**Switches.** Each switch has five inputs:

* its north, east, south and west neighbour switches;
* the FU to its north-west.

It has eight outputs: the four neighbour switches and the four FUs around it. A configured
switch connects each used output to one input. One input may feed several outputs (fan-out), and
then a token leaves only when all of those outputs can take it. One switch hop costs one cycle.

**FU mix.** The mix is fixed by `dyser_pkg::fu_kind_at`:

| Kind | Operations | Count | Latency (cycles) | Pipelined |
|---|---|---|---|---|
| INT-ADD | add, subtract | 16 | 1 | yes |
| INT-MUL | multiply (low 32 bits) | 12 | 5 | yes |
| FP-ADD | add, subtract | 16 | 4 | yes |
| FP-MUL | multiply | 12 | 7 | yes |
| FP-DIV/SQRT (one unit does both) | divide, square root | 8 | 12 | no |

Columns 0 and 4 are INT-ADD, columns 2 and 6 are FP-ADD, and column 7 is divide/square-root.
Columns 1, 3 and 5 alternate between INT-MUL and FP-MUL from row to row. The original
description gives the counts and latencies but not the placement, so the placement is this
design's own choice.

The pipelined kinds compute the result combinationally, then delay it by their latency in a shift
register. That stands in for a real pipelined unit of that depth. The divide/square-root unit
is iterative and takes one new operation every 12 cycles.

### Links and credits

Every connection carries a `link_t` beat of three fields:

* `valid`;
* `kind`: DATA, RESET or SET;
* 32-bit `data`.

Flow control is credit-based:

* The sender starts with as many credits as the receiver's buffer has entries (`LINK_DEPTH`,
  default 2).
* It spends one credit per beat.
* The receiver (`link_fifo`) returns a one-cycle credit pulse whenever it frees an entry.

A beat written in cycle t is at the head of the receiving buffer in cycle t+1.

An FU spends its output credit when it issues. The result therefore always has a place to go,
even from a 7-stage pipeline.

## 2. Configurations

Each switch and each FU holds `NUM_CFG` (4) configuration slots:

* **Switch word (`sw_cfg_t`):** for each of the 8 outputs, an enable bit and the 3-bit number of
  the input that drives it.
* **FU word (`fu_cfg_t`):** an enable bit, an opcode, and the corner switch (`FS_NW`, `FS_NE`,
  `FS_SW`, `FS_SE`) for operands A and B. Square root uses only A.

The host writes one tile per cycle. A tile is a switch and the FU to its south-east. It gives
`cfg_row_i`, `cfg_col_i`, `cfg_slot_i`, `cfg_sw_i` and `cfg_fu_i` with `cfg_we_i` high. A whole
slot takes 81 cycles. A slot can be written while another is running.

`act_valid_i` with `act_slot_i` makes a slot active in every tile at once. That is the plain way to
start, and it assumes the fabric is empty.

Opcodes a tile's hardware does not implement are caught by an assertion (`a_op_supported`).

## 3. Vector ports

A host vector access carries `VEC_LEN` (4) words. It names one of `NUM_VP` (8) vector ports. The
input and output sides each keep a vector map per vector port and per configuration slot. Entry
k of the map names the DySER port for word k, or is masked off.

**Input side (`dyser_in_if`).**

* A mapping FSM walks the map one entry per cycle, word 0 first, and pushes word k into the FIFO
  of the named input port.
* A masked entry drops its word but still takes its cycle, so a vector always takes `VEC_LEN`
  cycles.
* If the named port's FIFO is full, the FSM waits; `in_stall_o` shows this.
* A new vector is accepted in the cycle the previous one finishes, so back-to-back vectors
  stream at one every `VEC_LEN` cycles.

Each input port is a FIFO of `PORT_DEPTH` (4) words. Its head is forwarded into the edge switch
under credit control.

**Output side (`dyser_out_if`).**

* The gathering FSM works the same way: one entry per cycle, waiting while the named output port
  is empty (`out_stall_o`).
* A masked word reads as zero.
* The response appears on `resp_data_o` for one cycle, the cycle after the last word is gathered.

**Two ways to use a map.**

* **Within one invocation.** The map `[9, 1, 10, x]` sends the three words of one vector to three
  different ports: three operands of the same computation.
* **Across invocations.** The map `[3, 3, 3, 3]` sends four words to one port: four successive
  invocations of a lane.

The end-to-end test uses both.

**Scalar access.** A scalar send or receive names a port directly. A scalar send costs one cycle.
A scalar receive is accepted only when the port holds a word, and the word comes back in the next
cycle.

## 4. Fast configuration switching

This is the part that is hardest to reason about. The goal is to move the fabric to the
configuration in slot `s` without draining it first. Tiles that have finished with the old
datapath switch over at once. Tiles still carrying old results keep doing so.

**State.** Every switch output, and every FU, is either *active* in some slot or *off*. A tile
reports **free** to its neighbours when nothing in it is still active in a slot other than the
target slot (`tgt_slot_i`). Output ports always count as free.

**Starting a switch.** The host raises `fcs_valid_i` with `fcs_slot_i`. Then:

* in that cycle, the target slot and the vector maps in use change to the new slot;
* as soon as no input port FIFO is full, every input port enqueues one RESET token, and in a
  later cycle one SET token, behind the data already waiting there.

Everything sent afterwards belongs to the new configuration.

**RESET tokens follow the old configuration.**

* At a switch, a RESET leaves through every active output that its input drives, and turns each
  of those outputs off.
* At an FU, RESETs must be waiting at all of its old operand inputs, and no result may still be
  in its pipeline. The FU then consumes the RESETs, sends one RESET on, and turns off.
* Because RESET travels behind the data, a tile turns off only after its last old result has
  passed.
* A RESET that reaches a tile where nothing active takes it is dropped.

**SET tokens follow the new configuration.**

* At a switch, a SET leaves through the outputs that the new slot connects to its input. It
  waits until those outputs are off and the neighbours they lead to report free. Those outputs
  then become active in the new slot.
* At an FU, SETs must be waiting at all of the new slot's operand inputs, and the switch it
  delivers to must be free. The FU then becomes active in the new slot and sends one SET on.
* An input port hands its SET to the fabric only while the edge switch it feeds is free.
* A SET that nothing in the new slot takes is dropped.

**Data in between.** New data can follow the SET immediately. It can reach a tile only along
links that the SET has already turned on, so it can never run into the old datapath.

The active/off state is kept per switch output, not per whole switch. A switch can therefore
carry an old route and a new route through different outputs during the change-over.

**At the output ports.** RESET and SET tokens that reach the output ports are removed there and
counted on `ctl_count_o`. A receive never returns them.

## 5. Floating point

Data is IEEE-754 single precision.

* `fp_add` and `fp_mul` are combinational. They round toward zero and flush denormal inputs and
  results to zero. Overflow gives infinity. NaN inputs are not treated specially.
* `fp_divsqrt` uses restoring digit recurrence for division and the digit-by-digit method for
  square root. It produces two result bits per cycle, 24 bits in 12 cycles. The first two bits
  are formed in the start cycle, and the result is valid in the 12th cycle after it.
* Special cases: x/0 gives infinity, 0/x gives 0, and the square root of a negative number gives
  a quiet NaN.

The original unit is described as Taylor-series based. Only its latency is kept here.

## 6. Top-level interface (`dyser_top`)

| Group | Signals | Notes |
|---|---|---|
| Configuration | `cfg_we_i`, `cfg_row_i`, `cfg_col_i`, `cfg_slot_i`, `cfg_sw_i`, `cfg_fu_i` | One tile per cycle |
| Vector maps | `vmap_we_i`, `vmap_out_i`, `vmap_slot_i`, `vmap_vp_i`, `vmap_i` | `vmap_out_i` selects the output-side map |
| Activation | `act_valid_i`, `act_slot_i` | Immediate; fabric must be idle |
| Fast switch | `fcs_valid_i`, `fcs_slot_i`, `fcs_ready_o` | Issue only while `fcs_ready_o` is high |
| Sends | `send_valid_i`/`send_ready_o`, `send_vec_i`, `send_port_i`, `send_data_i` | Valid/ready; word 0 is the scalar |
| Receives | `recv_valid_i`/`recv_ready_o`, `recv_vec_i`, `recv_port_i`, `resp_valid_o`, `resp_data_o` | Response is a one-cycle pulse |
| Status | `cur_slot_o`, `in_stall_o`, `out_stall_o`, `ctl_count_o` | |

Reset is asynchronous and active low. Configuration and vector-map storage is not reset: write a
slot before activating it.

**Parameters and defaults.**

| Parameter | Default | Meaning |
|---|---|---|
| `FU_ROWS`, `FU_COLS` | 8, 8 | FU grid size |
| `NUM_CFG` | 4 | Configuration slots per tile |
| `NUM_VP` | 8 | Vector ports |
| `VEC_LEN` | 4 | Words per vector |
| `PORT_DEPTH` | 4 | Input port FIFO depth |
| `LINK_DEPTH` | 2 | Link buffer depth |

## 7. What differs from the original description, and what is missing

* **Configuration time.** Configuring takes 81 cycles per slot, one tile per cycle. The original
  quotes about 64 cycles.
* **Unspecified choices.** The slot count, vector port count, vector length, port and buffer
  depths, data width, token encoding and FU placement are not given in the original. They are
  this design's choices.
* **Opcodes.** There are no compare, select, logic, shift, sine or cosine operations. Kernels
  that need them (a merge/sorting network, or sine/cosine-heavy code) cannot be mapped as they
  stand.
* **Divide/square root.** Digit recurrence is used instead of a Taylor-series unit, with the same
  12-cycle latency.
* **Not modelled.** There is no host pipeline, wide memory interface or compiler. There is no
  energy or area model.

**How the workloads used to motivate DySER would map** onto the default block. Operation counts
are this design's estimates.

| Workload | Fits? | Why |
|---|---|---|
| 8-wide convolution with one multiply-add per lane | Yes | 8 FP-MUL of 12, 8 FP-ADD of 16, 16 input ports of 18 |
| One n-body interaction lane | Yes | About 9 FP-ADD, 7 FP-MUL and 2 divide/square-root |
| 4-wide complex multiplier | Yes, in two slots | Needs 16 FP-MUL, more than one slot's 12 FP-MUL; splits into two 2-wide slots joined by a fast switch. One lane is simulated (`tb_workload_rdr`); two lanes per slot were not routed |
| 4x4 merge network | No | Needs compares |

## 8. Verification

Each block has a self-checking testbench in `tb/`. Each prints `TB_RESULT checks=N failures=M`
and has a watchdog.

| Testbench | Size | What it checks |
|---|---|---|
| `tb_fp_add`, `tb_fp_mul` | n/a | About 3000 random and edge-case operands each, against a real-number reference computed in the testbench |
| `tb_fp_divsqrt` | n/a | Quotients and roots; latency of exactly 12; not ready while busy |
| `tb_link_fifo` | n/a | Ordering, credits and the no-overflow rule under random push/pop |
| `tb_dyser_switch` | n/a | One-cycle hop; routing and fan-out under back-pressure; RESET/SET handling, free gating, dropping of unused control tokens |
| `tb_dyser_fu` | INT-ADD, INT-MUL and divide/square-root tiles | Latency 1/5/12; results under back-pressure; the divider not pipelined; RESET/SET with the downstream free signal |
| `tb_dyser_in_if` | 6 ports, 2 vector ports | Scalar and vector sends with a masked entry; one vector per `VEC_LEN` cycles; stall on a full port; RESET/SET injection; SET held while the switch is not free |
| `tb_dyser_out_if` | 4 ports | Scalar and vector receives; masked word reads 0; `VEC_LEN`+1 cycle gather; stalls; control tokens counted |
| `tb_dyser_fabric` | 2x2 FUs | A two-operand lane and a 3-hop route (3 cycles); a fast switch with results in flight; ordering of old results, RESET, SET and new results at the outputs |
| `tb_dyser_top` | Default parameters (8x8) | See below |
| `tb_workload_rdr` | Default parameters (8x8) | One complex-multiply lane (re = ac - bd, im = ad + bc) on four FP-MUL and two FP-ADD tiles, hand-routed; 24 products through two input vector ports and one output vector port with masked words |

**`tb_dyser_top`.** This is the end-to-end test, and it runs at the default parameters. It
configures two slots, runs invocations through vector ports in both styles, switches
configuration with the fast switch while results are in flight, and ends with scalar sends and
receives. It counts each mechanism and fails if any of them never happened:

* masked vector element;
* vector FSM stalls on both sides;
* switch fan-out;
* busy divider;
* fast switch with control tokens reaching the outputs;
* scalar access.

**Limits of the testing.** Only a few FU positions and routes are exercised at full size. FP-ADD
tiles are covered by the `fp_add` unit test rather than inside the fabric. Rounding is toward zero
and is not IEEE round-to-nearest.

To simulate a block with Verilator (5.x):

```
verilator --binary --timing --assert -Irtl rtl/dyser_pkg.sv tb/fp_ref_pkg.sv rtl/*.sv \
  tb/tb_dyser_top.sv --top-module tb_dyser_top -Mdir obj -o sim -j 8
./obj/sim
```

Replace `tb_dyser_top` with any other testbench name. The full-size build takes about a minute to
compile, and the run takes a few seconds.

## 9. Files

| File | Contents |
|---|---|
| `rtl/dyser_pkg.sv` | Shared types: link beat, token kinds, configuration words, opcodes, FU kinds and latencies, FU placement |
| `rtl/dyser_top.sv` | The block: input interface, fabric, output interface, target-slot register |
| `rtl/dyser_fabric.sv` | Switch grid, FU grid, edge ports, free-signal wiring |
| `rtl/dyser_switch.sv` | Switch |
| `rtl/dyser_fu.sv` | FU tile (wraps the datapath for its kind) |
| `rtl/link_fifo.sv` | Credit-returning link buffer |
| `rtl/dyser_in_if.sv` | Input ports and vector mapping FSM |
| `rtl/dyser_out_if.sv` | Output ports and vector gathering FSM |
| `rtl/fp_add.sv`, `rtl/fp_mul.sv`, `rtl/fp_divsqrt.sv` | Floating-point datapaths |
| `tb/fp_ref_pkg.sv` | Real-number reference helpers for the testbenches |
| `tb/tb_*.sv` | Testbenches |

**Synthesis.** Every file elaborates in Yosys through its slang front end. Coarse synthesis of
each tile module is quick: the switch is about 1,000 word-level cells and the FU tile about 200,
before its arithmetic unit. Flattened synthesis of the whole 64-FU block was not completed. A 4x4
fabric takes a little over two minutes, about 69,000 cells and 2.3 GB of memory, and the full
size needs several times that.
