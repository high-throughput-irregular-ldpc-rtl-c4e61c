# Parallel layered LDPC decoder for the WiMax rate-1/2, 2304-bit code

This is a decoder for the irregular quasi-cyclic LDPC code of IEEE 802.16e
with rate 1/2 and length 2304 (expansion factor 96). It uses layered
normalised min-sum decoding. Layered decoding normally processes the 12
layers (block rows of H) one after another. Here all 12 layers work at the
same time, and the updates still go from layer to layer as in layered
decoding.

- Each layer has its own processing unit, which handles one check row per clock.
- Each variable's a-posteriori (APP) value exists in exactly one place at a
  time: the private memory of the layer that will use it next.
- When a layer has updated a value, it forwards it over a fixed wire to the
  next layer of that block column.
- Nothing is shared and nothing is arbitrated. The design has no crossbar.

One iteration takes 96 clock cycles: every layer sweeps its 96 rows once. A
frame of 10 iterations takes 96 load cycles, then 960 decode cycles, then 5 more.

## The code

`rtl/ldpc_pkg.sv` holds the 12 x 24 base matrix `HB`. Entry `s >= 0` is a
96 x 96 identity matrix cyclically shifted by `s`: in row `r` of that block, the
one is in column `(r + s) mod 96`. An entry of -1 is an all-zero block. The matrix
has 76 non-zero blocks:

- 8 rows have degree 6 and 4 rows have degree 7.
- The last 12 block columns have the usual dual-diagonal parity structure.
- Block column 12 has shifts 7, 0 and 7.

All indices in the RTL count from 0. Where this text counts layers from 1, it
says so.

## How a message travels

Layer `i` processes row `(t + ROW_START[i]) mod 96` at decode cycle `t`. In
block column `j`, that row touches the variable at column
`(row + HB[i][j]) mod 96`. Define the *phase* of block `(i,j)` as
`e(i,j) = (HB[i][j] + ROW_START[i]) mod 96`. Then layer `i` reaches column `c` at
the cycles `t ≡ c - e(i,j) (mod 96)`.

Take two layers `i` and `k` that share block column `j`. Both reach the same
variable, and `k` does so `(e(i,j) - e(k,j)) mod 96` cycles after `i`.
When layer `i` has updated the variable's APP value, it sends the value to the
layer that needs it soonest. That layer is the one whose phase is the largest
value cyclically below `e(i,j)` (`succ_layer` in the package). So each block
column has a fixed cyclic order of layers.

- In block column 0, layers 4, 9 and 12 (counting from 1) have shifts 61, 12
  and 43.
- The order is 4 -> 12 -> 9 -> 4.
- Layer 12 meets a variable 18 cycles after layer 4.

The receiving memory is `Mem k-j`. It is indexed by the row at which layer `k`
will meet the variable. The write address is therefore
`(row_i + HB[i][j] - HB[k][j]) mod 96`. This is a constant adder on a fixed
wire (`conn_network`). Layer `k` then simply reads its memories with its own
row number.

**Start rows.** Suppose every layer started at row 0. The two layers that
share a dual-diagonal parity column would then reach the same variable in the
same cycle. Some degree-6 columns would also leave a message only a few cycles
to arrive. The start rows

    ROW_START = 0, 42, 89, 1, 17, 52, 90, 45, 58, 27, 1, 36

were found by a search that maximises the smallest gap over all 76 blocks.
The search itself is not part of this repository. With these rows, every
message has at least 8 cycles between leaving one layer and being read by the
next. The layer pipeline needs 5 of them. With these rows, block column 0
still follows 4 -> 12 -> 9 -> 4.

To use other start rows or a deeper pipeline, keep `min_gap() > PIPE_LAT`.
The top-level testbench checks this. Because of this gap, the hardware is
exactly equivalent to applying each row's update instantly. The reference
model in the testbench relies on that.

## First iteration

The channel LLR of each variable is loaded into every memory of its block
column. All layers start at cycle 0, so within the first sweep each layer
reaches each of its variables once:

- The first layer to reach a variable reads the channel value.
- Each later layer reads what its predecessor has just written. That value has
  overwritten the copy loaded into its memory before the read happens.

So only one copy of each variable is ever live. This is what makes the
decoder exactly layered from the first cycle.

## Layer pipeline (`layer_unit`)

| cycle | work |
|---|---|
| t | row number -> read address of the layer's APP memories and CTV memory |
| t+1 | `vnu`: rebuild old r from the compressed CTV word, q = sat(Λ − r_old) |
| t+2 | `cnu` stage A: the two smallest \|q\| (saturated to 31), index of the smallest, output signs |
| t+3 | `cnu` stage B: r_new = ±floor(0.75·min), Λ_new = sat(q + r_new) |
| t+4 | writes at the end of the cycle: CTV word, Λ_new through `conn_network` into the successor memories, hard decisions (`decision_unit`) into `decision_buffer` |

The CTV memory keeps one compressed word per row: the sign of each lane's r,
the two smallest scaled magnitudes, and the lane of the smallest (20 bits).

Number formats:

- Channel LLRs are 6 bits.
- APP values are 8 bits, saturated to ±127.
- CTV magnitudes are 5 bits.

The hard decision is x = 1 when Λ ≤ 0.

## Stopping

The `decision_buffer` always holds the latest decision for each of the 2304
bits. During the load, each bit is set from the sign of its channel value.

At cycle `96n + 4`, the buffer holds exactly the result of n iterations:
every row of sweep n has been written, and no row of sweep n+1 has been. In
that cycle the controller checks `syndrome_check`, a parallel XOR over all
1152 equations. It stops if H x = 0, or if n equals `max_iter`. The rows
already in flight are cancelled in the same cycle.

## Interface (`ldpc_decoder`)

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock, asynchronous active-low reset |
| `llr_valid`, `llr_in[24]` | in | load beat c (0..95): `llr_in[j]` is the 6-bit LLR of code bit 96·j + c, where positive means 0 |
| `max_iter[6]` | in | iteration limit; 0 counts as 1 |
| `in_ready` | out | beats are accepted, i.e. the decoder is not decoding |
| `busy` | out | a frame is being loaded or decoded |
| `done` | out | result valid; stays high until the next frame's first beat |
| `converged` | out | H x = 0 was reached |
| `iter_count[6]` | out | number of iterations run |
| `hard_bits[2304]` | out | decoded word, bit n = x_n |

Decoding starts right after beat 95. `done` rises 96·n + 5 cycles after the
clock edge that took the last beat. The next frame can be loaded as soon as
`done` is high. Loading is not overlapped with decoding. At 10 iterations a
frame therefore takes 1061 cycles: 2.06 Gbit/s of code bits at 950 MHz.

## Files

- `rtl/ldpc_pkg.sv`: the matrix, start rows, types and the elaboration-time functions that derive the routing (`succ_layer`, `pred_edge`, `dest_offset`, ...).
- `rtl/ldpc_decoder.sv`: the top level. It holds 12 `layer_unit`s, `app_mem_bank` (76 `app_mem`), `decision_buffer`, `syndrome_check` and `decoder_ctrl`.
- `rtl/layer_unit.sv`: one layer, made of `ctv_mem`, `vnu`, `cnu`, `conn_network` and `decision_unit`.
- `tb/tb_<module>.sv`: one self-checking testbench per module.

`tb_ldpc_decoder` runs the complete decoder at full size:

1. It encodes random words.
2. It adds Gaussian noise.
3. It compares every decoded word, iteration count and convergence flag bit
   for bit with an integer reference model of the same schedule.
4. It checks the done latency.
5. It checks that early stopping, stopping at the limit, error correction and
   back-to-back frames all occurred.

Example, with plain Verilator:

    verilator --binary --timing -Irtl rtl/ldpc_pkg.sv tb/tb_ldpc_decoder.sv \
        -y rtl --top-module tb_ldpc_decoder && ./obj_dir/Vtb_ldpc_decoder

The full-size build takes several minutes; the simulation takes under a second.

## What the tests show

Every module has its own testbench, and each one compares the module against
values it computes independently. For the full decoder, the run at
amplitude 8 and noise σ = 5...7 (in LLR units) gives these results:

- With 114–210 channel errors, the decoder converges in 2–5 iterations.
- With about 280 errors, it needs up to 10 iterations.
- At σ = 7, a frame with 293 errors does not converge in 10 iterations.

In every case the decoder matches the reference model bit for bit.

## Size

A generic coarse synthesis of the whole decoder gives:

- about 13,000 word-level cells
- 4,936 flip-flops, of which 2,304 are in the decision buffer
- 80,640 memory bits: 76 × 96 × 8 for the APP memories and 12 × 96 × (19..20) for the CTV memories

The fully parallel syndrome check accounts for nearly half of the cells.

## Departures and open points

Several parts of this design are its own choices, not taken from a published
description:

- word lengths
- the compressed CTV word
- the 4-cycle pipeline split
- the start rows
- the frame interface
- the controller

The base matrix is the one in the 802.16e standard.

Frame loading is sequential, so throughput at 10 iterations is about 6% below
a design that hides the load. No clock frequency or area claims are checked
here.

The "loosely coupled" message-passing reduction that such decoders sometimes
use is not included. The messages stay full 8-bit APP values.
