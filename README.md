# ESN accelerator on DSP slices

An echo state network (ESN) is a recurrent network whose hidden layer, the
*reservoir*, has fixed random weights. Only the linear readout is trained.
Each time step n computes

    x(n) = tanh( W · x(n-1) + Win · u(n) )        reservoir, N neurons
    y(n) = Wout · { x(n) ; u(n) }                  readout, L outputs

This RTL computes such a step with very little general-purpose logic. Every
physical neuron is built from **nine DSP48E1-style multiply-accumulate
slices**. The same nine slices do three jobs:

- the sum of products;
- the reduction of nine partial sums to one;
- the multiply-add of a piece-wise linear tanh.

The tanh slope and intercept come from two small tables. One table pair is
shared by two neurons. A reservoir larger than the number of physical
neurons is computed in batches. A small cache holds the new states until the
whole step is finished.

The default build is a 100-neuron reservoir on 20 physical neurons, with one
input and one output (the NARMA10 setting). A 16-neuron, 4-input, 2-output
symbol detector is a parameter setting of the same RTL.

## Numbers and formats

| quantity | format `<bits,fraction>` | note |
|---|---|---|
| state z = {x; u} | `<20,19>` | range [-1, 1) |
| reservoir / input weight | `<16,13>` | range [-4, 4) |
| sum of products s | `<48,32>` | the P register of a slice |
| tanh slope | `<10,10>` unsigned | per table entry |
| tanh intercept | `<19,19>` unsigned | per table entry |
| output weight | `<32,14>` | range ±131072 |
| output y | `<32,16>` | saturates at ±32768 |

The types live in `esn_pkg`, together with the OPMODE codes and the
`nctrl_t` phase-command struct.

## The DSP slice (`dsp_slice`)

This is a behavioural model of the subset of a DSP48E1 that the neuron needs:

- a 25×18 signed multiplier;
- a three-input 48-bit adder with X/Y/Z multiplexers that select M, P,
  A:B, C, PCIN or zero;
- A/B/C/OPMODE input registers, an M register and a P register;
- a PCOUT cascade output.

A command given in cycle t shows in P at cycle t+3. The neuron and the
sequencer count on that three-cycle pipeline throughout.

## The neuron: four phases on a 3×3 slice array (`reservoir_neuron`)

The nine slices are numbered DSPrc (row r, column c). The global state memory
sends one *row* of nine state words per cycle, and the local weight memory
sends the nine matching weights. Word k of the row goes to DSP(k mod 3)(k/3).

1. **MACC.** Each slice multiplies its word and accumulates in P. The first
   row of a batch loads P instead of adding to it. After ZROWS cycles each
   slice holds a partial sum over one ninth of z.
2. **Compression I** (one command, three cycles later). In every column,
   DSP1c adds three values: P0c through its C port, P2c through the PCIN
   cascade, and its own P. The other slices are fed zeros, so their P does
   not change.
3. **Compression II.** DSP12 adds P10 through the A:B concatenation (A =
   P[47:18], B = P[17:0]), P11 through C, and its own P. Its P is now the
   full sum s.
4. **tanh.**
   - Take |s|. Bits [34:25] address the tables: the 2^10 pieces of [0, 8).
     Bits [24:17] are an 8-bit offset δ inside the piece.
   - A cycle later the table returns slope and intercept. DSP22, idle
     since compression I, computes `slope·δ + (intercept << 6)`.
   - x is `P[24:6]`. |s| ≥ 8 gives 1 − 2⁻¹⁹. Negative s negates the result.

Only the sign, the absolute value, a few multiplexers and the saturation
compare are logic outside the slices.

The local weight memory has nine banks, one per slice. Bank k, row
`batch·ZROWS + j/9` holds the weight of z word j (with j mod 9 = k) for the
neuron that physical neuron p computes in that batch.

## Piece-wise linear tanh (`tanh_lut`)

For piece i, starting at s_i = 8i/1024:

- `slope_i = (tanh(s_{i+1}) − tanh(s_i)) · 128`, stored as `<10,10>`;
- `intercept_i = tanh(s_i) + offset_i`, stored as `<19,19>`.

The plain chord lies below tanh over the whole piece, because tanh is
concave on [0, 8). So offset_i lifts the line by half the sum of the largest
and smallest error. The error then swings evenly around zero. The tables are
evaluated exactly as the hardware uses them, over all 256 values of δ.

They are computed with `$tanh` by a constant function at elaboration time,
one call per entry, so no data file is needed and synthesis infers an
initialised ROM.

- Measured against tanh over the whole range: maximum error 5.5·10⁻⁶,
  mean error 9.5·10⁻⁷. That is about three LSBs of `<20,19>`.
- Without the offset, the maximum error roughly doubles. The fault test of
  `tb_tanh_lut` uses exactly that version.

Both read ports are registered, with a one-cycle latency like a block RAM.
In `esn_top` port 0 serves neuron 2g and port 1 serves neuron 2g+1.

## Time multiplexing: global state memory and state cache

`global_state_mem` holds the extended state z = {x(n−1); u(n)} as ZROWS rows
of nine 20-bit words. There is one synchronous read port and one masked row
write port. Reset clears it.

Within a step the physical neurons are used NB = ⌈N/P⌉ times. Batch b
computes reservoir neurons bP … bP+P−1, all reading the *old* x. Their
results go to `state_cache`, a register file with the same row layout.
Indices ≥ N in a partial last batch are dropped.

After the last batch the cache is copied into the global memory, one row per
cycle, with word masks. The u words that share the last row are not touched.
The new x therefore never mixes with the old x within a step. That is the
point of the cache.

## Sequencer (`esn_ctrl`) and step timing

With D = ZROWS = ⌈(N+M)/9⌉, each batch runs this schedule (cycle numbers
relative to the batch start):

| cycle | action |
|---|---|
| 0 … D−1 | read z row r and weight row bD+r |
| 1 … D | MACC (first row loads P) |
| D+3 | compression I |
| D+6 | compression II |
| D+9 | tanh table read |
| D+10 | DSP22 slope·δ + intercept |
| D+13 | capture x |
| D+14 | write the P states into the cache |

After NB batches the controller copies XROWS = ⌈N/9⌉ cache rows and then
starts the readout. `done` comes

    NB·(D+15) + XROWS + (11·D + 2) + 2

cycles after the cycle in which start was seen. At the defaults (N=100,
P=20, M=1, L=1) that is 5·27 + 12 + 134 + 2 = **283 cycles per time step**.
The testbenches check this count for every step.

## Readout (`readout`)

`y_l = Σ_j Wout[l][j]·z_j` over all N+M words of z, one word per cycle from
a fetched row, with a 64-bit accumulator per output. The result is shifted
to `<32,16>` and saturated. Each output weight sits in a small memory,
addressed by (l, j).

## Host interface (`esn_regif`, `esn_top` ports)

`esn_top` has a 32-bit write-only bus (`cfg_we`, `cfg_addr`, `cfg_wdata`),
plus `busy`, a `done` pulse and `y`.

| `addr[31:28]` | meaning | fields |
|---|---|---|
| 0 | reservoir weight | [27:20] physical neuron, [19:4] weight row, [3:0] bank; data[15:0] `<16,13>` |
| 1 | output weight | [27:20] output l, [19:0] z index j; data `<32,14>` |
| 2 | input u_m | [19:0] m; data[19:0] `<20,19>`, stored at z index N+m |
| 3 | control | data[0]=1 starts one step |

A step is used like this:

1. Load all weights.
2. For each n, write u(n), write start, and wait for `done`.
3. Read `y`.

Weight and input writes are ignored while `busy` is high.

The reservoir weight for neuron i and z word j goes to:

- physical neuron i mod P;
- row (i / P)·D + j / 9;
- bank j mod 9.

Input weights are the columns j ≥ N.

## What follows the source design and what does not

These parts follow the published architecture:

- nine DSP slices per neuron and the 3×3 arrangement;
- the four phases, including which slice adds what, through which port
  (C, PCIN, A:B);
- tanh on DSP22, with a 10-bit table address taken from |s|[34:25];
- saturation at 8, and negation for negative s;
- the `<20,19>` state, `<10,10>` slope and `<19,19>` intercept formats;
- the centred ("improved") intercept table;
- one two-port table pair per two neurons;
- 20 physical neurons with a cache for larger reservoirs;
- the NARMA10 and symbol-detection sizes.

This design makes its own choices in these places:

- **δ field.** The source gives the offset inside a piece both as 7 bits
  and as 8 bits. Here it is the 8 bits |s|[24:17], right under the table
  address. That is the only reading that fits a `<10,10>` slope, a
  `<19,19>` intercept and a final shift by 6.
- **Tanh output width.** 20 bits for every build. The source uses 16 bits
  for NARMA10 and 20 bits for symbol detection.
- **Weight format.** `<16,13>` for reservoir and input weights. The source
  gives only the 16-bit width.
- **Schedule.** The exact cycle schedule, the three-cycle phase spacing,
  the word-to-slice mapping and the weight-memory layout.
- **Readout.** One serial MAC per output. The source does not describe the
  readout's structure.
- **Output formats.** The y and Wout formats, and saturation of y.
- **Host interface.** The register map and the drop-while-busy rule. The
  source mentions only that a register interface exists.
- **No bias, no feedback.** There is no bias input. There is no output
  feedback W_fb·y(n−1) either: the general ESN has it, but the neuron
  architecture is laid out for a network without it.
- **Not built.** The software-defined-radio testbed, the host processor
  and the training all sit outside the accelerator.

## Verification

Each block has a self-checking testbench in `tb/` that compares with values
worked out independently. Each was also run against a deliberately broken
copy of its module, and each such run failed.

| testbench | what it checks |
|---|---|
| `tb_dsp_slice` | every OPMODE used, the cascade and the 3-cycle latency, against an arithmetic model |
| `tb_tanh_lut` | the whole [0,8) range against `$tanh`: max and mean error bounds, entry formats, read latency |
| `tb_reservoir_neuron` | two neurons and a table, driven through all phases; s against the exact integer sum, x against the tanh model, saturation and negative sums |
| `tb_global_state_mem`, `tb_state_cache` | masked writes, batch placement, dropping of indices ≥ N |
| `tb_readout` | y against a 64-bit reference with clamping (both saturated and in-range results); cycle count |
| `tb_esn_ctrl` | every phase strobe at its scheduled cycle, partial last batch, copy masks, done time |
| `tb_esn_regif` | address decode, input placement, dropping while busy |
| `tb_esn_top` | N=14, P=4, M=4, L=2, 24 steps (partial batch, saturation, negative sums, dropped writes, each counted) |
| `tb_esn_full` | the default build, 10 steps |
| `tb_esn_symdet` | the symbol-detection build (N=16, M=4, L=2), 40 steps |
| `tb_esn_narma` | NARMA10 with 20, 50 and 100 neurons, trained in the testbench |

`tb_esn_top`, `tb_esn_full` and `tb_esn_symdet` share `tb_esn_driver`. It
runs a real-valued ESN on the same quantised weights and requires
|y − y_ref| ≤ 10⁻⁴·Σ|Wout| + 2 LSB. The largest errors seen:

- 7.6·10⁻⁵ in `tb_esn_top`;
- 1.9·10⁻⁴ in `tb_esn_full`;
- 0.2 with output weights up to ±3000 in `tb_esn_symdet`.

**NARMA10** (`tb_esn_narma`, about a minute of simulation):

- The testbench generates the series and loads a random reservoir with
  spectral radius ≈ 0.95.
- It finds Wout by ridge regression on the real-valued reference, solved by
  Gaussian elimination, and runs the accelerator over training plus test
  steps.
- It uses the published sequence lengths (1000/200, 2000/1000, 8000/1000).
  The ridge factors are 10⁻⁹, 10⁻⁸ and 2·10⁻⁷. The first is not 0, which
  keeps the solve well-conditioned.

Test NMSE (accelerator vs. real-valued model):

| reservoir | accelerator | reference |
|---|---|---|
| 20 | 0.658 | 0.658 |
| 50 | 0.378 | 0.379 |
| 100 | 0.1013 | 0.1015 |

The fixed-point hardware tracks the floating-point model closely. The
absolute NMSE at 20 and 50 neurons depends on the random reservoir and is
higher than the published figures (0.25 and 0.13), which came from tuned
reservoirs that are not available. At 100 neurons it matches (0.10).

The symbol-detection task needs channel data that cannot be generated here,
so `tb_esn_symdet` checks only the arithmetic of that build.

## Simulating

All files are plain SystemVerilog 2017. With Verilator 5, from the directory
that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Wno-fatal -o sim \
        --top-module tb_esn_full -y rtl -y tb +libext+.sv \
        rtl/esn_pkg.sv tb/tb_esn_full.sv
    ./obj_dir/sim

Replace `tb_esn_full` with any testbench name. Each prints
`TB_RESULT checks=<n> failures=<m>` and has a watchdog.

To change the size of the design, set `N_RES`, `N_PHYS`, `M_IN` and
`L_OUT` on `esn_top`. The memory depths follow from them.
