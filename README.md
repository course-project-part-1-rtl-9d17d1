# Matrix-arbitrated input port for a virtual-channel NoC router

A router in a network on chip gives each physical input port several
virtual channels (VCs), each with its own flit buffer, so that one blocked
packet does not block the others. Flits can arrive on several VCs in the same
cycle, but only one of them can cross the port's single link into the router
per cycle. Something has to choose, and the choice has to be fair.

This RTL builds that input port: four VC FIFOs, a **4:1 matrix arbiter** that
picks one non-empty VC per cycle, and the input multiplexer that forwards the
winning VC's head flit together with its VC identifier. The matrix arbiter
is the main part. It is a least-recently-served arbiter built from six
flip-flops and a few gates per requester.

```
 in_valid[k], in_flit[k] ──► vc_fifo k ──head[k]──►┐
                    ◄── in_ready[k] = !full       │
                        empty[k]                  ▼
                           │                  input_mux ──► out_flit
        req[k] = !empty[k] & out_ready            ▲
                           ▼                      │ gnt (one-hot)
                      matrix_arbiter ─────────────┴──► out_valid = |gnt
                      (grant_circuit + priority_matrix)   out_vcid = index of gnt
                                                  gnt[k] also pops vc_fifo k
```

## How the matrix arbiter decides

The arbiter keeps a binary priority matrix `p` over its `n` requesters. For a
pair `i`, `j`, the bit `p_ij = 1` means "i beats j", and `p_ji` is always its
complement. The diagonal means nothing. So an `n:1` arbiter only stores the
`n(n-1)/2` bits above the diagonal: six for `n = 4`. The matrix always holds
a strict total order of the requesters.

**Grant.** Requester `k` wins when it requests and no requester that beats it
also requests. With only the upper triangle stored, a lower-numbered
requester `i < k` beats `k` when `p_ik = 1`. A higher-numbered requester
`i > k` beats `k` when `p_ki = 0`:

```
gnt[k] = req[k] & AND over i<k of !(req[i] &  p[i][k])
                & AND over i>k of !(req[i] & !p[k][i])
```

Because the matrix is a total order, exactly one grant is high whenever any
request is. The grant is combinational.

**Update.** The winner drops to the lowest priority. Its row is cleared, so
it beats no one. Its column is set, so everyone beats it. The order of the
others does not change. Each stored bit therefore needs only the grants of its
own two requesters:

```
p_ij(next) = reset ? 0 : gnt_i ? 0 : gnt_j ? 1 : p_ij
```

Example, requesters numbered 1..4, with the bits listed as
`p12 p13 p14 p23 p24 p34`. Granting requester 2 turns `0 0 1 1 0 0` into
`1 0 1 0 0 0`: `p12` (column 2) is set, `p23` and `p24` (row 2) are cleared,
and the rest are unchanged.

**Element circuit.** Each stored bit is a `matrix_element`. It is an S-R
flip-flop whose `Q` output is `p_ij` and whose `Q̅` output is `p_ji`. It is
driven by the update value

```
u_ij = !reset & !gnt_i & (gnt_j | p_ij),   S = u_ij,  R = !u_ij
```

so the flip-flop loads `u_ij` at every rising edge.

**Fairness.** A winner always goes to the back of the order. A requester that
keeps its request up is therefore served after at most `n-1` grants to
others. With all four VCs busy, the grants simply rotate.

**Reset.** Reset is synchronous, because it enters the update value. It
clears every stored bit. The order after reset is therefore 3 > 2 > 1 > 0:
VC 3 has the highest priority and VC 0 the lowest.

## The input port around it

* **VC buffers** (`vc_fifo`). Each is a circular buffer, 4 flits of 32 bits
  by default. The head flit is always on `rd_data` (first-word
  fall-through). A push and a pop in the same cycle both take effect, even
  when the buffer is full. A push to a full buffer and a pop from an empty
  one are ignored. Assertions flag both, since the port never issues them.
* **Requests.** VC `k` requests when its buffer is not empty **and**
  `out_ready` is high. When the router side stalls, no request is made. So a
  stalled cycle grants nothing, pops nothing and leaves the priorities
  unchanged.
* **Input MUX** (`input_mux`). It is steered directly by the one-hot grant
  lines and built as AND-OR: each head flit is masked by its grant bit, and
  the masked flits are ORed. With no grant the output is zero.
* **Output.** `out_valid = |gnt`. `out_vcid` is the number of the granted
  VC. The granted buffer is popped at the same clock edge at which the
  router takes the flit. `out_valid` is only high while `out_ready` is high.

## Interface and timing of `input_port`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `reset` | in | 1 | rising-edge clock; synchronous active-high reset |
| `in_valid` | in | `NUM_VCS` | VC `k` offers `in_flit[k]` this cycle |
| `in_flit` | in | `NUM_VCS × W` | one flit per VC |
| `in_ready` | out | `NUM_VCS` | buffer `k` not full; the flit is taken when `in_valid[k] & in_ready[k]` |
| `out_valid` | out | 1 | a flit is on the link into the router |
| `out_flit` | out | `W` | head flit of the granted VC |
| `out_vcid` | out | `clog2(NUM_VCS)` | its VC number |
| `out_ready` | in | 1 | the router takes the flit this cycle |
| `arb_gnt` | out | `NUM_VCS` | the arbiter's grant lines, for observation |

Parameters: `NUM_VCS = 4`, `W = 32` and `DEPTH = 4`. The package `noc_pkg`
also holds these defaults (`NUM_VC`, `FLIT_W`, `VC_DEPTH`). It also holds the
helpers `num_pairs(n)` and `pair_idx(i,j,n)`, which give the size of the
packed upper triangle and the position of `p_ij` in it. The order is
`(0,1) (0,2) … (0,n-1) (1,2) … (n-2,n-1)`.

Timing:

* A flit written at a rising edge is visible at the buffer head after that
  edge. It can leave in the next cycle, so the port adds one cycle of
  latency.
* The output path is combinational from the buffer heads, the priority
  flip-flops and `out_ready`. The path runs through the grant logic and the
  MUX.
* The port can sustain one flit per cycle.
* Synthesised size at the defaults: 34 flip-flop bits, 512 bits of buffer
  memory and about 200 word-level cells. The arbiter itself is 6 flip-flops.

## What is fixed and what was chosen

These parts follow the course specification:

* the structure of the port (four VC buffers, the arbiter, the MUX steered by
  the grant lines);
* the 4:1 size;
* the matrix representation with only the six upper-triangle bits stored;
* the grant rule and the row-clear/column-set update;
* the S-R element with the grants and a reset feeding its update value.

These are this design's own choices:

* the flit width and buffer depth;
* the valid/ready handshakes and the `out_vcid` output;
* gating the requests with `out_ready`;
* the reset state of the matrix (all stored bits 0);
* first-word fall-through buffers;
* the AND-OR multiplexer.

The rest of the router is not included: routing logic, the demultiplexer
behind this port, the 5:1 output arbiters of a 6-port router, and the output
multiplexers, demultiplexers and buffers. The specification draws these but
does not define their function. The port's `out_flit`/`out_vcid`/`out_valid`/
`out_ready` are where an input demultiplexer would connect.

## Files

| file | contents |
|---|---|
| `rtl/noc_pkg.sv` | shared constants and triangle-index helpers |
| `rtl/matrix_element.sv` | one priority bit with its update circuit |
| `rtl/priority_matrix.sv` | `n(n-1)/2` elements wired to the grant lines |
| `rtl/grant_circuit.sv` | combinational grant logic |
| `rtl/matrix_arbiter.sv` | grant circuit + priority matrix, with one-hot assertions |
| `rtl/vc_fifo.sv` | VC flit buffer |
| `rtl/input_mux.sv` | one-hot AND-OR multiplexer |
| `rtl/input_port.sv` | top level: the complete input port |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M`. A watchdog ends any
run that hangs. For example:

```
verilator --binary --timing --assert -y rtl -y tb rtl/noc_pkg.sv \
          tb/tb_input_port.sv --top-module tb_input_port -Mdir obj_port
./obj_port/Vtb_input_port
```

Replace `tb_input_port` with any other testbench name. The package has to be
listed first, because the modules import it.

What the testbenches establish:

* `tb_grant_circuit` tries all 16 request vectors against all 64 priority
  vectors, including orders the arbiter never reaches.
* `tb_matrix_element` checks the update rule under random stimulus. It also
  checks the six-element example shown above.
* `tb_priority_matrix` and `tb_matrix_arbiter` compare the RTL with a model
  that keeps the requesters in a list, ordered from highest to lowest
  priority. They check the rotation 3, 2, 1, 0 of four busy requesters and
  the `n-1` waiting bound. `tb_matrix_arbiter` also runs a five-requester
  instance, to check that the parameterised structure holds beyond `n = 4`.
* `tb_vc_fifo` checks the buffer against a queue, including push and pop
  while full and the one-cycle latency.
* `tb_input_port` runs the default-size port end to end against a model of
  per-VC queues plus the arbiter order. It checks every flit, its VC, its
  order and its latency. It also counts the events it has to see:
  simultaneous arrivals, several busy VCs competing, router-side stalls,
  full buffers pushing back on a source, and idle cycles.

Power, area and timing against a target clock depend on the cell library
and were not evaluated.
