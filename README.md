# Matrix multiplication as CSP process networks

This repository holds four hardware networks that compute the same thing,
C = A · B, starting from one functional definition:

    mmult   ass bss = map (vmmult ass) bss          -- one result column per column of B
    vmmult  bs  ass = map (scalarp bs) ass          -- one result element per row of A
    scalarp as  bs  = sum (zipWith (*) as bs)       -- scalar product

Every higher-order function in that definition (`map`, `zipWith`, a fold
for `sum`) has a ready-made hardware form: a set of small processes that
talk over channels, as in Hoare's CSP. The only decision left is how each
list is sent:

* as a **vector**: one channel per element, all elements at once, or
* as a **stream**: one element after another on a single channel, closed by
  an end-of-transmission (EOT) message, so the length need not be known in
  advance.

Making a list a vector copies the hardware that works on it. Making it a
stream reuses one copy over time. The four networks are four choices of
vector or stream for the lists, and they span fully parallel to pipelined.
All four are instantiated side by side in `mmult_top`, and they share only the
clock and reset.

| network | A (N×M, rows) | B (M×K, columns) | C | scalar-product units | multipliers |
|---|---|---|---|---|---|
| `mmult_d1` | vector of vectors | vector of vectors | vector (K×N elements) | N·K | N·K·M |
| `mmult_d2` | stream of row vectors | vector of column vectors | K streams, one per column | K | K·M |
| `mmult_d3` | fixed per-stage wires | stream of column vectors | one stream of column streams | N | N·M |
| `mmult_d4` | fixed per-stage wires | stream of column vectors | N streams, one per row | N | N·M |

The defaults are N = M = K = 4 with 16-bit signed elements. Results are
`ACC_W = 2·DATA_W + clog2(M)` bits wide (34 by default), so no sum overflows.

## Channels, vectors and streams

Everything below is built on one convention, and it is the key to reading
the RTL.

**A channel** is a `*_valid` / `*_ready` pair with a data bus. A message
passes on a rising edge where both are high. This is the hardware form of a
CSP rendezvous (`c!x` meeting `c?y`). A sender keeps its message on the bus
until it is taken. Every process in the design is at least a one-place buffer,
so a channel never has a combinational path from `valid` to `ready`.

**A vector of n values** is n independent channels: arrays `x_valid[n]`,
`x_ready[n]`, `x_data[n]`. The elements do not move in lock-step. Element 3
of a vector may arrive long after element 0, and each consumer process waits
only for the elements it needs. A vector of vectors is a 2-D array of
channels, e.g. `ass_valid[N][M]`.

**A stream** is a single channel with an extra `*_eot` flag beside the data.
A message with `eot` set ends the stream and carries no value. Because EOT
travels on the same handshake as the values, it can never overtake them. A
stream of vectors carries a whole M-element vector in each message. For
example, `mmult_d2`'s row stream is `ass_valid`, `ass_ready`, `ass_eot`,
`ass_data[M]`.

**A stream of streams** (the output of `mmult_d3`) uses a 2-bit tag,
`csp_pkg::tag_e`:

* `TK_VALUE`: the message is a value.
* `TK_EOS`: the current inner stream (one column of C) is over.
* `TK_EOT`: the outer stream (the whole matrix) is over.

**Arguments** of a process, meaning the values that CSP fixes when the process
is built, are plain input wires. The pipelined networks receive A this way.
They expect `ass` to stay stable while columns are inside them. Change A only
when the network has given back the final EOT.

## The building processes

| module | process | what it does |
|---|---|---|
| `csp_add` | ADD | `(in1?a ‖ in2?b); out!(a+b)`: takes both operands in either order, then sends the sum |
| `csp_mul` | MUL | the same with a product |
| `vzip` | VZIP_n(F) | n copies of F side by side, lane i zips element i of two vectors. `OP` selects F (`OP_MUL` or `OP_ADD`) |
| `vfold` | VFOLD_n(ADD) | binary tree of ADD processes (details below) |
| `csp_broadcast` | BROADCAST | a one-word buffer that offers its word to FANOUT consumers and takes the next word only after all of them have the current one |
| `vscalarp` | VSCALARP | `VZIP_M(MUL)` piped into `VFOLD_M(ADD)`: the scalar product of two M-vectors |

`vfold` numbers its channels like a heap. The inputs are c(N)…c(2N−1). Adder
i reads c(2i) and c(2i+1) and writes c(i). c(1) is the result. For N = 8 this
gives seven adders in three levels, with leaves c8…c15. Any N ≥ 1 works,
including values that are not powers of two. Leaves are sign-extended to the
output width.

`csp_broadcast` is how a list that many processes need is shared without
being copied at its source. If one consumer is slow, the broadcast holds back
its source, and with it every other consumer's *next* word. The testbenches
make this happen on purpose.

## The four networks

### `mmult_d1`: everything as vectors

`BROADCAST_K(A) ▷ VMAP_K(VMMULT)`. Each of A's N·M element channels passes
through its own broadcast of fan-out K, one copy per column of B. Column k
goes into `vmmult_vec` instance k. Inside it, each of the M elements of that
column is broadcast again, with fan-out N, to N `vscalarp` units. Unit i also
gets row i of A. This gives an N × K grid of scalar-product units.
`css_data[k][i]` is C[i][k].

Latency: with every operand offered at once and every output ready, all of C
appears **3 + 2·⌈log2 M⌉ cycles** (7 by default) after the operands are taken.
That is one cycle in the broadcasts, two in the multipliers and two per adder
level. Several products can be in flight one behind the other.

### `mmult_d2`: rows of A as a stream

`vmmult_stream` implements `MAP(VSCALARP(bs))` with a single scalar-product
unit:

1. It takes its column bs once, into a register. This register plays the role
   of the producer process `PRD(bs)` and resends bs with every row.
2. Each row of A is issued to the unit as soon as the unit has taken the
   previous row, so several rows are in flight at once.
3. Results leave in row order, followed by EOT once nothing is in flight.
4. After that EOT the bs register is emptied, and the next column can be
   loaded.

`mmult_d2` puts K of these side by side and feeds the single row stream of A
to all of them through one broadcast, which also carries the EOT. Stream k of
the output is column k of C, then EOT. The number of rows is not fixed by the
hardware. An empty stream (EOT alone) yields an EOT alone. Each result is
offered 3 + 2·⌈log2 M⌉ cycles after its row was taken, and a new row can enter
every second cycle.

### `mmult_d3`: a pipeline that builds each column

This is the pipelined form of `map (vmmult A)`:

* **Entry** (`MAP(initial)`): each column b of B enters paired with an all-zero
  partial column.
* **Stages**: there are N `pipe_stage`s. The first holds row N−1 of A and the
  last holds row 0. A stage takes the pair (b, partial column), computes its
  row · b with its own `vscalarp`, writes the result into its element of the
  partial column, and passes the pair on.
* **Exit**: `pipe_final` (`MAP(final)`) drops b and sends the finished column
  as `TK_VALUE` × N (row 0 first), then `TK_EOS`.
* **End of input**: the EOT of B's stream goes through every stage and leaves
  as `TK_EOT`.

Up to N columns are in the pipe at once, one per stage. A value pair spends
exactly 4 + 2·⌈log2 M⌉ cycles in a stage when the next stage is ready.

### `mmult_d4`: a pipeline with a tap per stage

This design has the same chain, but it drops the travelling partial column.
Each `tap_stage` takes a column b and then does two things in parallel:

* it forwards b to the next stage;
* it sends its row · b on its own output stream.

It takes the next column once both are done. Output stream i is row i of C,
one element per column of B, then EOT. The column stream that leaves the last
stage is brought out as `tail_*`. It repeats the input stream, and it must be
consumed, because otherwise the chain stalls. A stage offers the column to
the next stage one cycle after taking it, and its result 4 + 2·⌈log2 M⌉ cycles
after taking it.

## Where this follows the source and where it does not

These parts follow the derivation that the design was built from:

* the process structure of every module;
* the broadcast factoring of A (first design) and of bs;
* the heap numbering of the fold tree;
* the order of rows in the pipelines (first stage = last row);
* the stream/vector choice of every list in each network.

These are this design's own choices, because the source leaves them open:

* The valid/ready handshake, the registering of every process, and all
  latencies.
* Word widths. The source types everything as `Int`. Here results are wider
  than operands so that nothing overflows.
* The default sizes N = M = K = 4 and DATA_W = 16. The source gives no numbers.
* Vector elements have independent handshakes. The source describes a vector
  as one channel per item but also as sent "in a single step". Here elements
  whose senders and receivers are all ready do pass in the same cycle, but no
  element waits for the others.
* EOT is a flag on the value channel. The source describes EOT on a separate
  channel next to the value channel. A single handshake keeps the order of
  values and EOT without any extra protocol.
* The tag encoding of a stream of streams.
* Passing A to the pipelines as static wires rather than as a message.
* The inner workings of the broadcast buffer.
* The in-flight counter of `vmmult_stream`, and the parallel forward/compute
  of `tap_stage`.
* The count of adders in the fold tree. The source's formula for the fold
  process counts n adders for n inputs, while its drawing of the tree has
  n−1. This design follows the drawing: a binary tree needs n−1.

These are not modelled: the producer process `PRD` as a separate block (the
broadcast takes its place), the FPGA board and host interface the networks
were meant to run on, and any performance figures. The source reports none.

Coarse synthesis of `mmult_top` at the defaults with yosys gives about 5,400
word-level cells and 18,700 flip-flop bits. Most of that is `mmult_d1`
(about 3,000 cells and 9,900 flip-flop bits), because it has 64 multipliers
where the others have 16.

## Files

* `rtl/csp_pkg.sv`: the shared enums (`op_e`, `tag_e`) and the function
  `acc_width`.
* `rtl/csp_add.sv`, `csp_mul.sv`, `vzip.sv`, `vfold.sv`, `csp_broadcast.sv`,
  `vscalarp.sv`: the building processes.
* `rtl/vmmult_vec.sv`, `mmult_d1.sv`: the first network.
* `rtl/vmmult_stream.sv`, `mmult_d2.sv`: the second network.
* `rtl/pipe_stage.sv`, `pipe_final.sv`, `mmult_d3.sv`: the third network.
* `rtl/tap_stage.sv`, `mmult_d4.sv`: the fourth network.
* `rtl/mmult_top.sv`: all four networks side by side.
* `tb/tb_<module>.sv`: one self-checking testbench per module.

Each file opens with a comment on its interface and timing.

## Simulating

The testbenches need Verilator 5 with timing support. For example, the
end-to-end test:

    verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
        rtl/csp_pkg.sv tb/tb_mmult_top.sv --top-module tb_mmult_top
    ./obj_dir/Vtb_mmult_top

Each testbench ends with `TB_RESULT checks=<n> failures=<m>` and has a
watchdog. All of them:

* drive random data with random gaps on every input channel;
* put random back-pressure on every output;
* compare against a reference computed in the testbench.

The extra checks of each testbench:

* `tb_csp_add`, `tb_csp_mul`: the cycle on which each result must appear.
* `tb_vfold` (N = 8), `tb_vscalarp`, `tb_pipe_stage`, `tb_mmult_d1`,
  `tb_vmmult_vec`, `tb_vmmult_stream`, `tb_tap_stage`: the exact latencies
  quoted above.
* `tb_csp_broadcast`: every consumer gets every word in order, and the source
  never runs more than one word ahead of the slowest consumer.
* `tb_vmmult_stream`, `tb_mmult_d2`: streams of random length, including an
  empty one, and reloading of the column between streams. They require that
  several rows were in flight or that the broadcast stalled.
* `tb_mmult_d3`, `tb_mmult_d4`, `tb_tap_stage`: several matrices A in turn.
  They require overlap in the pipeline or of forwarding and computing.
* `tb_mmult_top`: runs all four networks at the default size on 25 random
  4×4 pairs and checks all four results. It fails unless each of these
  happened at least once: a broadcast stall in d1 and d2, EOTs in d2 and d4,
  column and matrix markers in d3, pipeline overlap in d3 and d4, and output
  back-pressure.

Every parameter has a default and can be changed at instantiation. The
pipelines need N ≥ 1 and the fold needs M ≥ 1. The testbenches of the
building blocks are written for the sizes they state at their top.
