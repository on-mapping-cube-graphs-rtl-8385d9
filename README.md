# Cube-graph programs on a linear systolic array

Many systolic algorithms, matrix multiplication among them, are naturally laid
out on a two-dimensional mesh of processors. A linear chain of processors is
much easier to attach to an existing computer: it has one input and one output
end, and the host's memory bandwidth stays the same however long the chain
is. This design runs such a "2-D" algorithm on a linear chain.

The algorithms covered are those whose dataflow graph is a *cube graph*. Its
computation vertices sit on an `h1 x h2 x h3` integer grid. Every vertex has
three inputs and three outputs, labelled `l1`, `l2` and `l3`, and an edge
labelled `l` steps by one along axis `l`. Matrix multiplication `C = C0 + A*B`
is the standard case. Take `A` as `h2 x h3` and `B` as `h3 x h1`. Then vertex
`<x1,x2,x3> = <j,i,k>` adds `a(i,k)*b(k,j)` to the partial sum of `c(i,j)`.
Along `l1` the `a` values travel unchanged, along `l2` the `b` values, and
along `l3` the growing partial sums.

The key idea is to cut the cube into *diagonals*, the planes
`w1*x1 + w2*x2 + w3*x3 = const` with each `w` equal to ±1. Each diagonal is
given to one processor. Every edge then joins neighbouring processors. The
remaining work is to pick, per stream, a direction and a speed (a delay of
`d_l` cycles per hop) so that:

- every vertex's three operands meet at its processor in the same cycle;
- no two values of a stream ever arrive at the same port in the same cycle.

The RTL is the processor array. The mapping that sizes and wires it is
evaluated at elaboration time from six parameters.

## The array

```
            in_l1 ─►┌───┐ d1 ┌───┐ d1       ┌───┐ d1 ─► out_l1
            in_l2 ─►│ 1 │ d2 │ 2 │ d2  ...  │ N │ d2 ─► out_l2
            in_l3 ─►└───┘ d3 └───┘ d3       └───┘ d3 ─► out_l3      (all n_l = +1)
```

* **Processor** (`systolic_pe`). The processor has no state and no control.
  Every cycle it computes `so.l1 = si.l1`, `so.l2 = si.l2` and
  `so.l3 = si.l3 + si.l1*si.l2`. It cannot tell real data from padding. A
  partial sum that passes a processor where it has no work comes out
  unchanged only if a zero arrives on `l1` or `l2` in that cycle.
* **Links** (`delay_line`). Each processor has one link per label behind its
  output port. A link is a chain of `d_l` registers. A value computed by
  processor `p` in cycle `t` is therefore at the input of processor `p + n_l`
  in cycle `t + d_l`, so stream `l` moves at `1/d_l` processors per cycle.
  The direction `n_l` is +1 (towards processor N) or -1 (towards processor 1).
  One stream can run against the others.
* **Host ports.** A stream enters at processor 1 if `n_l = +1` and at
  processor N if `n_l = -1`. The host's input drives that processor's input
  port directly, in the same cycle. The stream leaves through the far end's
  link: a value the exit processor computes in cycle `t` is on `out_lX` in
  cycle `t + d_l`.

The number of processors is the number of diagonals, `N = h1 + h2 + h3 - 2`.

## The mapping (`cube_map_pkg`)

All constants come from `H1..H3` and `W1..W3` through the package's constant
functions. These rules are the subtle part of the design.

**Directions and placement.**

- Normally `n_l = w_l`. If `w1 = -1` the whole factor is negated, so the `l1`
  stream always flows from processor 1 towards processor N.
- Vertex `v` runs on the processor whose number is the rank of its weight
  `w·v` among all the weights, counting from 1.
- When `w1 = -1` the numbering is reversed: processor `N + 1 - rank`.

**Delays and times.**

- `d1 = 1`. `d2 = 2` if `n2 = +1`, otherwise `d2 = 1`.
- Vertex `<x1,x2,x3>` runs in cycle `t1 + x1*d1 + x2*d2 + x3*d3`, where `t1`
  is the cycle of vertex `<0,0,0>`.
- For fixed `x3` this makes every `l1` and `l2` edge take exactly its delay.
  The `h3` layers are then spaced `d3` cycles apart.

`d3` is chosen from the grid size, in one of four cases:

| streams l1, l2 | condition              | d3              |
|----------------|------------------------|-----------------|
| same direction | `h1 - h2 + n3 >= 0`    | `h1 + 2*n3`     |
| same direction | `h1 - h2 + n3 < 0`     | `h2 + n3`       |
| opposite       | `h2 - h1 + n3 >= 0`    | `2*h2 - 1 + n3` |
| opposite       | `h2 - h1 + n3 < 0`     | `2*h1 - 1 - n3` |

These values keep values of one stream from colliding at a port. That claim
was checked by a cycle-level model of the array for all eight factors `w` and
every `h1, h2, h3` from 1 to 5. Some published correctness arguments for this
mapping use `h1 + n3` in the second row and `2*h2 - 1 - n3` in the third.
Those variants produce port collisions and are not used.

A few combinations give `d3 < 1`, for example `h1 = h2 = 1` with `n3 = -1`.
The array refuses these at elaboration.

## Worked example: the default configuration

The defaults are `H = 3,2,2` and `W = 1,1,1`. The array multiplies a 2x2
matrix `A` by a 2x3 matrix `B` on 5 processors, with delays `d = 1, 2, 5` and
all three streams flowing from processor 1 to processor 5. Vertices `p_ij`
(`k = 1`) and `q_ij` (`k = 2`) are placed as follows:

| processor | vertices (cycle − t1)                  |
|-----------|----------------------------------------|
| 1         | p11 (0)                                |
| 2         | p12 (1), p21 (2), q11 (5)              |
| 3         | p13 (2), p22 (3), q12 (6), q21 (7)     |
| 4         | p23 (4), q13 (7), q22 (8)              |
| 5         | q23 (9)                                |

The host pumps each value in so that it reaches its first vertex at the right
time. A value needs `p*d_l` cycles to cover `p` hops. All times below are
relative to `t1`:

- `a(i,k)` enters `in_l1` at `t1 + 0, 1, 4, 5` for `a11, a21, a12, a22`.
- `b(k,j)` enters `in_l2` at `3k - j`, with `k` and `j` counted from 0:
  `b13` at −2, `b12` at −1, `b11` at 0, `b23` at 1, `b22` at 2, `b21` at 3.
- The initial partial sum `c0(i,j)` enters `in_l3` at `-3i - 4j`, from
  `c23` at −11 to `c11` at 0.
- The finished `c(i,j)` appears on `out_l3` at `25 - 3i - 4j`: `c23` first,
  at `t1 + 14`, and `c11` last, at `t1 + 25`.

Every other input cycle carries a zero. A partial sum moves slowly, one
processor every 5 cycles. On its way it crosses processors that are doing
other work for other sums. Each of those crossings coincides with a pumped
zero on `l1`. For example, `c23` passes processors 1, 2 and 3 at `t1 − 11`,
`t1 − 6` and `t1 − 1`, before its vertex `p23` on processor 4. Setting
`W3 = -1` gives the second configuration:

- `d = 1, 2, 1`;
- the partial sums enter at processor 5 and leave from processor 1, flowing
  against `A` and `B`;
- one product takes 16 cycles from first input to last output, against 37 in
  the default configuration.

## Interface and timing (`linear_systolic_array`)

| port                 | dir | width | meaning                                    |
|----------------------|-----|-------|--------------------------------------------|
| `clk`                | in  | 1     | single global clock                        |
| `rst_n`              | in  | 1     | synchronous, active low; clears all links  |
| `in_l1`, `in_l2`, `in_l3`    | in  | 32 | host input of each stream                 |
| `out_l1`, `out_l2`, `out_l3` | out | 32 | host output of each stream                |

Parameters:

| parameter  | default | meaning                                                |
|------------|---------|--------------------------------------------------------|
| `H1`, `H2`, `H3` | 3, 2, 2 | grid size: `C` is `H2 x H1`, inner dimension `H3` |
| `W1`, `W2`, `W3` | 1, 1, 1 | diagonalisation factor, each +1 or −1             |

Timing:

- A value offered on `in_lX` in cycle `t` is at the `p`-th processor from the
  entry end (the entry processor is 0) in cycle `t + p*dX`.
- It leaves on `out_lX` in cycle `t + N*dX`, unless a processor has added a
  product to it on the way.
- Every cycle is live. There is no valid signal and no stall: the host owns
  the schedule.

The word width is `cube_map_pkg::DATA_W`, 32 bits by default. Arithmetic
wraps modulo 2^32.

The array's cost:

- `N` multiply-adders;
- `32 * N * (d1 + d2 + d3)` flip-flops: 1280 in the default configuration
  and 640 with `W3 = -1`.

## Using and changing it

The array has no valid bits, so the host must schedule the streams exactly.
For each stream:

- Compute the first vertex of every row of values along the stream, with
  `proc_of` and `time_of` from the package.
- Pump the value `(processor − entry processor) * n_l * d_l` cycles before
  that vertex's time.
- Pump zero in every other cycle.

Zeros are only needed where a partial sum crosses a processor that has no
work for it, and one zero on `l1` per crossing is enough. In the default
configuration the `l1` cycles `t1 − 11 … t1 − 3` and `t1 + 8 … t1 + 16` cover
every crossing. With `W3 = -1` the cycles `t1 − 7 … t1 − 2` and
`t1 + 3 … t1 + 8` do. Every other idle slot on any stream may hold anything.
The end-to-end test checks this with random values in those slots. Without
the zero at `t1 − 3` in the default configuration, results come out wrong.

The testbench host `tb/matmul_host.sv` does exactly this and can serve as a
reference.

The processor function is confined to `systolic_pe`. The mapping depends only
on the graph's shape, not on the function at the vertices. Another cube-graph
algorithm with three streams can therefore reuse the array by replacing that
module. Its padding value must leave a passing value unchanged, as zero does
for multiply-add.

## Verification

Each testbench prints `TB_RESULT checks=N failures=M`.

| testbench | covers |
|-----------|--------|
| `tb_systolic_pe` | The processor function on random, corner and wrap-around inputs, including zeros that must hold a partial sum. |
| `tb_delay_line` | Lengths 1, 2 and 5: exact latency, and clearing at reset and mid-run. |
| `tb_cube_map_pkg` | Processor and cycle of every vertex in both worked examples, the delays of all four `d3` cases, and a `w1 = -1` placement. |
| `tb_linear_systolic_array` | Random matrix products end to end in eight configurations: both examples, the other three `d3` cases, `w1 = -1`, and both examples again with random values in idle slots and zeros only in the minimal `l1` windows. It counts multiply-adds and partial sums held across idle processors, and fails if either never happens. |
| `tb_full_size` | The default array through one complete product. It also probes inside the array: all 12 vertices must see their operands in their cycle, and all 16 passages of partial sums through idle processors must leave them unchanged. |
| `tb_example2` | The same inside-the-array checks for `W3 = -1` (12 vertices, 18 passages of partial sums). Random values fill the idle slots, and `l1` carries zeros only in the minimal windows. |

The testbenches need the package first on the command line. The other
modules are found through `-y`:

```
verilator --binary --timing -y rtl -y tb rtl/cube_map_pkg.sv tb/tb_full_size.sv --top-module tb_full_size
./obj_dir/Vtb_full_size
```

Every testbench runs in well under a second.

## Departures and limits

* **Processor function.** Only the multiply-add of the matrix-product
  examples is built. The array model allows any function of the three inputs.
* **Stationary streams.** A label with `n_l = 0` would be a register preloaded
  in every processor. It is not built, because the mapping never produces
  one.
* **Cube graphs only.** The mapping covers three-label cube graphs. Graphs of
  more than three dimensions are not covered.
* **Own choices.** The following are not specified by the method:
  - the word width;
  - wrap-around arithmetic;
  - the reset;
  - the extra link in front of each host output;
  - the same-cycle host input.
* **The host.** It is outside the design. `tb/matmul_host.sv` is a
  behavioural model of it. By default it pumps zeros in every idle cycle.
  It can also pump only the minimal zero windows described above.
