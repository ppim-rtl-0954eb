# pPIM: a look-up-table processor inside a DRAM bank

Convolutional networks spend most of their time on 8-bit multiply-and-accumulate
(MAC) operations, and on a conventional processor most of that time goes into
moving operands between DRAM and the compute units. This design puts the compute
into the DRAM bank itself and builds it from nothing but look-up tables: every
processing core is a 256-entry table of 8-bit results addressed by two 4-bit
operands. Loading a different table ("function-word") reprograms the core, so
the same hardware multiplies, adds, compares or applies an activation function.
Nine such cores form a cluster that runs an 8-bit MAC as a short sequence of
4-bit table look-ups; 256 clusters sit along the row buffers of one DRAM bank.

A second idea is precision scaling: if both 8-bit operands are truncated to their
upper four bits, the MAC needs one table look-up for the product and three for
the accumulation, which halves the MAC time (4 core-steps instead of 8).

The RTL here is a cycle-level, synthesizable model of that architecture at its
main configuration (256 clusters in one bank, 9 cores per cluster, eighteen
8:1 4-bit router multiplexers). Where the architecture fixes only what a part
does, the simplest structure that does it was chosen; those choices are listed in
"Where this RTL makes its own choices".

## Hierarchy

```
ppim_bank                 top: 16 subarrays x 16 clusters, command port
├── dram_subarray  x16    cell array + row buffer, row read, RowClone/multicast
└── ppim_cluster   x256   one MAC engine
    ├── ppim_cluster_ctrl micro-program sequencer (one micro-op per core-step)
    ├── ppim_router       eighteen 8:1 4-bit multiplexers
    └── ppim_core     x9  two 4-bit operand registers + function-word LUT
ppim_pkg                  shared types, router table, built-in MAC programs
```

## The core

`ppim_core` holds operand registers A and B (4 bits each) and a register file of
four function-words (`NFW`). The active word is indexed with `{A,B}`, so the
result is `word[A*16+B]`, 8 bits wide. For the built-in programs:

| word | entry {A,B}       | used as |
|------|-------------------|---------|
| 0    | `A*B`             | 4x4-bit multiplier, 8-bit product |
| 1    | `A+B`             | 4-bit adder: sum in bits [3:0], carry in bits [7:4] |
| 2    | `B[3] ? 0 : {B,A}` | sign gate: passes A (and B) unless B is a negative top nibble |

The words are not built in. They are written one entry per cycle through the
`fw_*` port, which is how the architecture programs its cores (by memory writes).
A 2:1 multiplexer in front of each operand register chooses between the router
and the core's own result (lower nibble into A, upper nibble into B); the built-in
programs do not use this feedback path, but custom programs can.

Timing: operands load on a clock edge and the result is combinational from the
registers, so one clock cycle is one *core-step*.

## The cluster and its MAC schedule

This is the part that takes most thought. `ppim_cluster` computes

* exact: `Y <= Y + a*b` (a, b 8-bit, Y 16-bit, modulo 2^16), in 8 core-steps
* precision-scaled: `Y <= Y + (a[7:4]*b[7:4]) << 8`, in 4 core-steps
* activation: `Y <= (Y < 0) ? 0 : Y` (ReLU, Y read as signed), in 2 core-steps

The operation is chosen with the `op` input (`OP_MAC8`, `OP_MAC4`, `OP_RELU`).

The cluster reads a 32-bit data-word `{Y, b, a}`, latched at `start`.
With `aL, aH, bL, bH` the nibbles of the operands, the four partial products
`V0=aL*bL, V1=aL*bH, V2=aH*bL, V3=aH*bH` are computed by four cores in the first
step. The 16-bit sum `Y + V0 + (V1+V2)<<4 + V3<<8` is then reduced column by
column (4-bit columns), using only two-input 4-bit additions whose carry comes out
as the upper nibble of the result and is added into the next column later:

| step | core operations (core: A + B, or A * B)                              | captured |
|------|----------------------------------------------------------------------|----------|
| 1 | c0: aL*bL, c1: aL*bH, c2: aH*bL, c3: aH*bH                              | |
| 2 | c4: Y0+V0l, c5: Y1+V0h, c6: V1l+V2l, c7: Y2+V1h, c8: V2h+V3l, c0: Y3+V3h | |
| 3 | column-1 sums, column-2 sums, carry pairs of columns 2 and 3             | Y0 |
| 4 | column 1 + carry (final), column 2 + carries, column 3 + carries         | |
| 5 | remaining carries of columns 2 and 3                                     | Y1 |
| 6 | column 2 final, column 3 + carry                                         | |
| 7 | column 3 final                                                           | Y2 |
| 8 | —                                                                        | Y3 |

The exact program uses 4 multiplications and 18 additions; at most six cores are
busy in any step. A value stays on a core's output until that core is given a new
operation, so the schedule assigns cores such that nothing is overwritten before
it is read. The full program, with the name of every intermediate value, is
`build_prog()` in `rtl/ppim_pkg.sv`.

The scaled program is: step 1 `V = aH*bH`; step 2 `Y2+Vl` and `Y3+Vh` in two
cores; step 3 add the carry into the upper nibble; step 4 capture. `Y[7:0]` passes
unchanged.

The ReLU program shows the same cores doing something other than arithmetic: in
step 1 three cores apply the sign-gate word to `(Y0,Y3)`, `(Y1,Y3)` and
`(Y2,Y3)`; step 2 captures the four gated nibbles.

**Router.** Each core operand comes from one of eighteen 8:1 4-bit multiplexers
(`ppim_router`). They select from a 27-entry source bus: zero, the eight nibbles
of the data-word and the two result nibbles of each of the nine cores. Eight
inputs cannot reach all 27 sources, so each multiplexer's inputs are fixed by
`ROUTE_TABLE` (built by `build_route()`): zero, then every connection the built-in
programs need, then results of the following cores. A new program has to respect
that table; `route_sel(port, source)` returns the select for a connection, or 0
(zero) if it does not exist.

**Sequencer.** `ppim_cluster_ctrl` holds a 16-entry micro-program store; each
entry (`uop_t`, 124 bits) gives, for every core, load/feedback/function select and
the two router selects, plus up to four result-nibble captures and a `last` flag.
It resets to the exact program at address 0, the scaled one at address 8 and the
ReLU at address 12, and can be rewritten through the `ucode_*` port. `done` pulses N cycles after `start`
for an N-step program; `result` is valid when `done` is high.

## The bank

`ppim_bank` models one DRAM bank of `NSUB=16` subarrays of `ROWS=512` rows. Each
row buffer is 512 bits and feeds `NCL=16` clusters; cluster `c` owns bits
`[32c +: 32]` as its data-word and writes its MAC result back into the Y half of
that slice. Data moves only vertically, as in the architecture: inside a
subarray by RowClone (row read into the row buffer, row buffer written into up
to three rows at once: the multicast), between subarrays by a LISA-style
row-buffer copy.

Commands arrive one at a time with a `cmd_valid`/`cmd_ready` handshake
(`bank_op_e` in `ppim_pkg`). The cycle counts are from the edge that takes a
command to the first edge that can take the next one, at 0.8 ns per cycle (the
core delay of the reference 28 nm implementation):

| command     | effect | cycles |
|-------------|--------|--------|
| `BK_ACT`    | row buffer of `cmd_sub` <= row `cmd_row` | 1 |
| `BK_HOSTWR` | row buffer of `cmd_sub` <= `cmd_data` (chip I/O) | 1 |
| `BK_CLONE`  | rows `cmd_dst_row[i]` with `cmd_dst_valid[i]` <= row buffer | 79 (63 ns) |
| `BK_LISA`   | row buffer of `cmd_sub` <= row buffer of `cmd_src_sub` | 176 + 10 per hop (140.5 ns + 8 ns/hop) |
| `BK_MAC`    | MAC in every cluster of the subarrays in `cmd_sub_mask`; `cmd_approx` scaled; `cmd_chain` takes Y from the cluster's previous result | 10 exact, 6 scaled |
| `BK_RELU`   | ReLU of Y in every cluster of `cmd_sub_mask` (Y from the row buffer, or the previous result with `cmd_chain`), written back like a MAC | 4 |
| `BK_FWLOAD` | one function-word entry into the `cmd_fw_core_mask` cores of all clusters | 1 |

A MAC costs its 8 (or 4) core-steps, one cycle to write the results into the row
buffer and one to return to idle. `cmd_chain` lets a dot product accumulate over
successive rows: activate row k, MAC with chain, repeat. `rd_sub`/`rd_data` read
a row buffer out; `n_act`, `n_clone`, `n_lisa`, `n_mac` count commands.

## Where this RTL makes its own choices

The architecture fixes the core organisation, the 3x3 cluster, the router's
eighteen 8:1 4-bit multiplexers, the 8 and 4 core-step MAC, the three-row
multicast, the 256-cluster bank and the RowClone/LISA latencies. Not fixed, and
chosen here:

* register-file depth (4 function-words), the entry-per-cycle write port, the
  LUT address order `{A,B}` and the carry-in-upper-nibble add word;
* the meaning of the operand 2:1 multiplexers (router or own result);
* the wiring of the router (a table, not a SPIN network) and the core-to-step
  assignment of the MAC (the operation counts per step differ from the
  reference data-flow drawing; the step totals match);
* the micro-program sequencer and its encoding; a final step that only
  captures the last result nibble;
* ReLU as the supplied activation function, with its sign-gate word;
* the 16-bit wrapping accumulator and the `{Y,b,a}` data-word layout;
* 16 subarrays x 16 clusters, 512 x 512-bit subarrays, one command at a time,
  1-cycle ACT, chip I/O write and function-word load, the `cmd_chain` option,
  function-words supplied over the command port rather than from a DRAM row;
* LISA as a direct copy with hop-dependent latency (intermediate row buffers
  untouched).

Not modelled: the DRAM cells, sense amplifiers, decoders and their timing beyond
the latencies above, the memory controller, the transmission-gate circuit of the
multiplexers, power and area. Pooling and other activation functions are
possible with other function-words and custom programs, but only the ReLU
program is supplied.

## Simulating

Every testbench is self-checking and prints `TB_RESULT checks=N failures=M`.
With Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/ppim_pkg.sv rtl/*.sv \
    tb/tb_ppim_bank.sv --top-module tb_ppim_bank -Mdir obj && obj/Vtb_ppim_bank
```

| testbench | what it covers |
|-----------|----------------|
| `tb_ppim_core` | all four words (A*B, A+B, max, random table), operand hold, feedback path |
| `tb_ppim_router` | source-bus numbering, every select of every multiplexer, all connections the programs need |
| `tb_ppim_cluster_ctrl` | 8-, 4- and 2-step programs, done/busy timing, rewritten program, start while busy |
| `tb_ppim_cluster` | 300 random exact MACs, scaled MACs and ReLUs plus corner cases, latency 8 / 4 / 2 |
| `tb_dram_subarray` | row write/read, three-row multicast, bitwise row-buffer write, priorities |
| `tb_ppim_bank` | 4x4-cluster bank end to end: function-word load, RowClone, multicast, LISA over 1 and 3 hops, exact and scaled MACs, chained dot product, ReLU, all latencies |
| `tb_ppim_bank_full` | the bank at its default size (256 clusters): one exact and one scaled MAC in all clusters |
| `tb_ppim_conv_workload` | a 3x3 convolution tile: 16 output pixels in parallel, 9 chained MACs each, at both precisions, then ReLU |

The full-size bank builds in about half a minute and simulates in well under a
second. Its function-word register files are 2304 x 8 Kbit, so logic synthesis of
the whole bank is large; the cluster alone synthesizes quickly.

## Capacity against the evaluated networks

The networks the architecture was evaluated with (AlexNet, ResNet 18/34/50,
VGG 16) have between about 12 and 138 million weights, far more than the 4 Mbit
of rows in this single-bank model; running them means streaming layers through
the bank under an external controller. At the default size the compute rate is
256 MACs per 10 cycles (8-bit) or per 6 cycles (4-bit): 32 or 53 GMAC/s at a
0.8 ns cycle, before any data movement.
