# Parameterized Kahn process network for target edge detection

This is a streaming hardware pipeline that measures vertical edges inside one
rectangular *target*: a region of a camera image where an obstacle, such as a
car in front of a vehicle, may be. The size of the target changes from one
target to the next and is known only at run time. The pipeline is therefore
built as a **process network whose loop bounds, Height and Width, are run-time
parameters**. Each target is one *run* of the network. New parameters can be
sent at any time. They take effect only between two runs, so a run never sees
a mix of old and new sizes, and the network keeps the deterministic behaviour
of a Kahn process network.

For a target of `H x W` pixels the network returns `W` numbers, one per
column:

```
out(i) = sum_{j=1..H} | (p(j-1,i+1) + 2 p(j,i+1) + p(j+1,i+1))
                      - (p(j-1,i-1) + 2 p(j,i-1) + p(j+1,i-1)) |     i = 1..W
```

This is the absolute horizontal Sobel gradient (the vertical-edge response),
summed down each column. The host sends the target with a one-pixel border,
`(H+2) x (W+2)` pixels in row-major order. It receives the `W` column sums in
column order. In the obstacle-detection application these column profiles
support or reject the hypothesis that an object is present.

## The network

Six processes, called *nodes*, run concurrently. They exchange tokens (32-bit
words) only through eleven point-to-point FIFO *channels*. No node follows a
global schedule. Each node walks through its own loop nest and blocks when an
input channel is empty or an output channel is full.

```
               ED_1..ED_6          ED_7         ED_10
   pixels --> INIT ======> SOBEL -------> ABS -------> VSUM --ED_11--> OUT --> column sums
                                                  ED_9 ^  |  ^
                                        ZERO ----------+  |  | ED_8 (partial sums of the
                                                          +--+       previous row)
   host  --> control-bus controller ==> shift / update / start to every unit of every node
```

| node  | iteration space        | reads                                   | computes                       | writes |
|-------|------------------------|-----------------------------------------|--------------------------------|--------|
| INIT  | j=0..H+1, i=0..W+1     | pixel stream                            | pixel                          | ED_1..ED_6: each channel that needs this pixel |
| ZERO  | i=0..W-1               | nothing                                 | 0                              | ED_9 |
| SOBEL | j=1..H, i=1..W         | ED_1..ED_6, all six                     | gradient (signed)              | ED_7 |
| ABS   | j=1..H, i=1..W         | ED_7                                    | absolute value                 | ED_10 |
| VSUM  | j=0..H-1, i=0..W-1     | ED_9 in row 0, else ED_8; and ED_10     | partial sum + value            | ED_8, or ED_11 in the last row |
| OUT   | i=0..W-1               | ED_11                                   | column sum                     | result stream |

Channel `ED_k`, for k = 1..6, carries the k-th Sobel operand, in SOBEL's
order of iterations. The operands are p(j-1,i-1), p(j-1,i+1), p(j,i-1),
p(j,i+1), p(j+1,i-1) and p(j+1,i+1). INIT writes pixel (j,i) to channel k
exactly when that pixel is the k-th operand of some Sobel iteration, and it
writes all those channels in the same cycle. A channel therefore never holds
a token that nobody will read, and SOBEL needs no line buffers: the FIFOs
*are* the line buffers. The price is the size of channel ED_1. It must hold
two full rows plus three pixels (`2W+3` tokens) before SOBEL can fire for
the first time.

VSUM accumulates a column through its own loop channel ED_8. Row 0 takes the
initial 0 from ZERO. Each later row takes the partial sum that VSUM wrote one
row earlier. Only the last row's sums leave through ED_11.

## Inside a node

Every node (`kpn_node`) has the same four parts. `KIND` selects the node's
schedule and its core.

* **Read unit** (`read_unit`). It holds the node's *local schedule* for
  reading: which input channels to use at each iteration. It offers the
  operands to the execution unit only when every channel that the current
  iteration needs is non-empty. This is the blocking read. It pops those
  channels in the cycle the operands are taken. The channels are
  fall-through FIFOs, so the operands are the FIFO outputs themselves, and
  reading adds no delay.
* **Execution unit** (`exec_unit`). It wraps the IP core (`ip_sobel`,
  `ip_abs`, `ip_vsum`). ZERO, INIT and OUT are too small for a core of their
  own and are built into the wrapper. Every core has an *Enable* input, a
  *Ready* output and a registered result, so a node adds exactly one cycle to
  the data path. No combinational path runs from one FIFO to the next. The
  wrapper fires the core when the operands are there, the node is running,
  and the previous result has been taken or is being taken. With free-flowing
  data a node fires every cycle.
* **Write unit** (`write_unit`). It holds the local schedule for writing. It
  stores the result into every selected output channel at once, and only when
  none of them is full. This is the blocking write.
* **Control unit** (`ctrl_unit`). It starts the read and write units when a
  run begins. It allows the core to fire only during a run. It ends the
  node's run when both schedules are finished and no result is left.

### The three-stage schedule pipeline

Each read unit and each write unit owns a `sched_pipe`. This is a three-stage
elastic pipeline:

1. stage 1 is the loop counter (j,i);
2. stage 2 is the registered index;
3. stage 3 is the registered channel mask for that index, taken from the
   schedule functions in `kpn_pkg`.

The schedule does not depend on data. All 12 pipelines therefore start filling
in the same cycle that a run starts, and the first iteration reaches stage 3
three cycles later in every unit. These three cycles are paid once per run,
not once per node. After that, a unit can complete one iteration per cycle.
The read side and the write side of a node run independently of each other.
They are coupled only through the one result register of the execution unit.

## Run-time parameters: when they may change

This is the part that needs the most care. A parameter that changed in the
middle of a run would give some nodes the old loop bounds and others the new
ones. The nodes would then disagree on how many tokens pass through a
channel, and the network could deadlock or produce wrong results. Three rules
prevent this:

* each interaction with the host is one complete run;
* parameters are changed only before a run begins;
* each new parameter set starts a new run.

The hardware applies these rules with a **double buffer in every unit**
(`param_buffer`):

* **Shift register.** Parameter words arrive one per cycle on the common
  control bus and are shifted into the shift register of *every* unit. Every
  unit stores all parameters, including ones it does not use, so that one
  serial broadcast serves everyone. Shifting may happen at any time, also
  during a run.
* **Register file.** The values the schedules actually use (P1 = Height,
  P2 = Width). They are loaded from the shift registers all at once, on the
  bus's `update` strobe.

The control-bus controller (`cpn_ctrl`) issues `update` only when no node is
running. It issues `start` in the following cycle. A `run_req` that arrives
during a run is remembered and served as soon as the run ends. Several
requests made while one is already waiting are merged, because the shift
registers can hold only the latest parameter set anyway.

Host protocol, as seen at the top-level ports of `kpn2_edge_detect`:

1. Wait until `req_pending` is low.
2. Send Height, then Width: one cycle each, with `param_valid` high and the
   value on `param_data`.
3. Pulse `run_req` for one cycle. Do not send parameters in that same cycle.
4. Stream the `(H+2)(W+2)` pixels on `pix_valid`/`pix_data`/`pix_ready`. The
   pixels of the next target may follow directly, because INIT takes exactly
   one target's worth per run.
5. Collect `W` results on `res_valid`/`res_data`/`res_ready`. `run_done`
   pulses when the whole network has finished.

The next target can be prepared (step 2) while the current run is still busy.
Both streams use valid/ready handshakes. `pix_ready` depends on `pix_valid`,
and `res_valid` depends on `res_ready`, because the blocking read and the
blocking write look at the flags in the same cycle. The source and the sink
must not wait for the other side of the handshake first.

## Timing

A run takes about `(H+2)(W+2) + 14` cycles when pixels arrive every cycle and
results are taken at once. INIT consumes one pixel per cycle and is the
bottleneck. The fixed 14 cycles are made of:

* 1 cycle to load the parameters (`update`);
* 3 cycles to fill the schedule pipelines;
* the register of each node on the path;
* the end-of-run detection.

Measured at the default sizes:

| target (H x W) | cycles here | N(2M+1)+12 (published count) | targets/s at 66 MHz here |
|----------------|-------------|-------------------------------|--------------------------|
| 58 x 60        | 3733        | 7030                          | 17 680 |
| 40 x 45        | 1987        | 3652                          | 33 215 |
| 180 x 110      | 20397       | 39792                         | 3 235 |

The published implementation needed `N(2M+1)+12` cycles for an `N x M`
target, which is about two cycles per pixel. This design needs about one.
The testbenches use the published count as an upper bound. That bound holds
for targets of 5 x 4 pixels and larger. For smaller targets the fixed
overhead of this design, 14 cycles against 12, is larger than the saving.

## Sizes and limits

* Tokens are 32 bits. Pixels are 8-bit grey levels. Parameter words are 16
  bits.
* There are eleven channels of `FIFO_DEPTH = 512` words each. This is one
  512 x 32 block-RAM FIFO per channel, as in the published implementation.
  The FIFO here reads its memory asynchronously to get fall-through
  behaviour. A block-RAM mapping would need a small look-ahead register.
* Valid targets need `1 <= H`, `1 <= W <= (FIFO_DEPTH-3)/2`. That is
  W <= 254 at the default size, because of channel ED_1 and the W partial sums
  held in ED_8. H is limited only by the 16-bit parameter width and by the
  32-bit column sums (H x 1020 must fit). The largest published target,
  180 x 110, fits whichever way round it is read.
* The nodes never write a full FIFO or read an empty one. Assertions in
  `kpn_fifo`, `sched_pipe` and `ctrl_unit` check these rules, and also that
  no start reaches a running node.

## What follows the published design, and what is this design's own

Taken from the published design:

* the network itself: six processes, eleven channels and the loop program
  they come from;
* the node's split into read, execution, write and control units;
* blocking read and blocking write;
* IP cores with Enable/Ready and registered outputs;
* three-stage schedule pipelines in the read and write units;
* the shift-register / register-file double buffer in every unit;
* the rule that parameters change only between runs;
* 512 x 32 channels;
* the operations inside the cores: the absolute value is a comparison, a
  negation and an addition, and VSUM is one addition.

This design's own choices:

* **Bit widths:** 8-bit pixels and 16-bit parameter words.
* **Sobel kernel:** the kernel is the standard [-1 0 1; -2 0 2; -1 0 1]. The
  published text only names additions, a subtraction and shifts.
* **ED_1..ED_6:** which operand each of these channels carries.
* **VSUM loop:** the partial sum is read back through the loop channel ED_8.
  The network graph has this self-loop, and the loop program's
  accumulation needs it.
* **Multi-channel writes:** a result goes to all its channels in one cycle.
* **Pipeline stages:** what each of the three schedule stages does.
* **Control unit:** its two-state form.
* **Control bus:** registered, with `update` one cycle before `start` and
  merged requests.
* **Reset:** asynchronous, active-low reset everywhere.
* **Host side:** pixel input and result output are valid/ready streams. In
  the published system the host wrote the target into board memory over PCI
  and read the results back from it. That interface logic, the board memory
  and the host software that finds the targets are not part of this RTL.
* **ZERO core:** the constant zero is built into the execution unit's
  wrapper, like INIT and OUT, instead of being a separate core.
* **Execution units:** they get no parameter buffer, because no core uses a
  parameter.
* **Timing:** this design is about twice as fast per pixel as the published
  cycle count.

## Files

`rtl/`:

| file | content |
|------|---------|
| `kpn_pkg.sv` | types, sizes, control-bus struct, node kinds, iteration spaces and channel-selection functions |
| `kpn2_edge_detect.sv` | top level: six nodes, eleven channels, control-bus controller |
| `cpn_ctrl.sv` | control-bus controller (parameter broadcast, update/start between runs) |
| `kpn_node.sv` | one node: control, read, execution and write units |
| `ctrl_unit.sv`, `read_unit.sv`, `exec_unit.sv`, `write_unit.sv` | the four parts of a node |
| `sched_pipe.sv` | three-stage schedule pipeline |
| `param_buffer.sv` | shift register plus register file |
| `kpn_fifo.sv` | fall-through FIFO channel |
| `ip_sobel.sv`, `ip_abs.sv`, `ip_vsum.sv` | IP cores |

`tb/`: one self-checking testbench per module (`tb_<module>.sv`), plus:

* `tb_kpn2_full.sv`: the three published target sizes at default sizes;
* `edge_ref_pkg.sv`: the reference model and image generator the
  testbenches share.

To change the network, start with `kpn_pkg.sv`:

* `node_bounds` holds each node's loop nest;
* `read_sel` and `write_sel` give the channels used per iteration;
* `n_in`, `n_out` and `arg_of_port` give the port counts and the
  operand wiring.

A new core goes into `exec_unit.sv`.

## Simulating

Verilator 5 with `--timing`. Packages first; the rest is found by module
name:

```
verilator --binary --timing --assert -y rtl -y tb \
    rtl/kpn_pkg.sv tb/edge_ref_pkg.sv tb/tb_kpn2_edge_detect.sv \
    --top-module tb_kpn2_edge_detect -Mdir obj -o sim
./obj/sim
```

Use the same command for any other testbench. Each one prints
`TB_RESULT checks=<n> failures=<m>` and stops by itself. A watchdog counts a
failure if the simulation hangs.

* `tb_kpn2_edge_detect` runs 40 targets of random size through a network with
  15-word channels. The first six run without stalls and are timed. The rest
  stall both streams at random, and most of them send the next target's
  parameters and run request while the previous run is still busy. The
  testbench counts, and requires at least once each:
  * a wait on the pixel stream;
  * a wait of SOBEL on an empty channel;
  * a wait of INIT on a full channel (Width 6 fills the 15-word ED_1);
  * back-pressure from the result stream;
  * a deferred run request;
  * reads of both the ZERO channel and the loop channel.
* `tb_kpn2_full` uses the default 512-word channels. It runs the three
  published target sizes, 58x60, 40x45 and 180x110 (read as Height x Width),
  and checks every column sum and the run time. It takes well under a second.
* The module testbenches cover the rest:
  * FIFO wrap-around and flags;
  * the order of the parameter words and that the register file holds them
    until `update`;
  * the schedules, checked against brute-force enumeration of the Sobel
    operands, including the three-cycle fill latency;
  * blocking read and blocking write on random empty and full flags;
  * the execution unit's hand-over;
  * the cores, against the textbook formulas;
  * the controllers, against small reference models.
