# PSAN: a parallel-serial datapath for small fixed-weight neural networks

A feed-forward network whose weights are fixed after off-line training can be
built in an FPGA fully in parallel (one multiplier per weight: fast, large)
or fully serially (one multiplier per neuron, one input per clock: small, but
every layer runs at the pace of the layer with the most inputs). The
Parallel-Serial Architecture (PSAN) gives every layer two independent knobs:

* **P**, the number of multipliers inside one neuron: a neuron takes P inputs
  per clock and needs `t_n = ceil(n_i / P)` clocks for one output;
* **S**, how many times each physical neuron is reused for one input vector:
  a layer of `N_n` neurons produces `N_n` outputs per pass and makes `S` passes.

One input vector then takes `t_c = S * t_n` clocks in a layer, and the layer
holds `P * N_n` multipliers. (`n_i` counts the constant offset input,
`n_o` the layer's outputs.) S=1, P=1 is the classic serial layer; S=1, P=n_i
the fully parallel one; S=n_o, P=1 a single multiply-accumulate unit. Picking
(S, P) per layer lets every layer of a network finish in the same number of
clocks `t` set by the system around it, so that no multiplier sits idle.

This repository is synthesizable SystemVerilog for that architecture,
parameterized in P, S and N_n per layer, with a 2-6-1 network as top.

## The 2-6-1 network at t = 3

`psan_nn` is a network with one variable input, five hidden neurons and one
output. Counting the offset inputs it is "2-6-1": layer 1 has n_i=2,
n_o=5; layer 2 has n_i=6, n_o=1. The defaults build it for one result every
3 clocks:

| layer | n_i | n_o | P | S | N_n | t_n | t_c | multipliers | accumulator |
|-------|-----|-----|---|---|-----|-----|-----|-------------|-------------|
| 1     | 2   | 5   | 2 | 3 | 2   | 1   | 3   | 4           | 17 bits     |
| 2     | 6   | 1   | 2 | 1 | 1   | 3   | 3   | 2           | 19 bits     |

Both layers need exactly 3 clocks, so in steady state both are busy every
clock. Layer 1 computes 6 result slots for 5 outputs; the sixth is padding
(zero weights) and is dropped, the only redundant work in the design.

```
in_x ──► psan_serializer ──► psan_layer (layer 1) ──────────────► psan_layer (layer 2) ──► out_y
         offset + x as        FIMFO ─► 2 neurons x 2 mult ─► AF     FIMFO ─► 1 neuron x 2 mult ─► AF
         1 beat of 2 words    ─► collect ─► converter:              ─► collect ─► converter:
                              3 beats of 2 words, offset first      1 beat of 1 word
```

Each arrow between blocks is a stb/ack stream of *beats*; a beat is P words
(one word per multiplier of the receiving neuron).

## How one layer is scheduled

This is the part that needs the most care. Take a layer with 6 inputs
(1 = offset), 3 outputs, P=2, S=3, N_n=1: a single neuron with two
multipliers computes all three outputs, 9 clocks per vector.

| clock | mult 0 input | mult 1 input | ROM address | weights of output | Load |
|-------|--------------|--------------|-------------|-------------------|------|
| 1     | 1            | 2            | 0           | 1                 | 1    |
| 2     | 3            | 4            | 1           | 1                 | 0    |
| 3     | 5            | 6            | 2           | 1                 | 0    |
| 4     | 1            | 2            | 3           | 2                 | 1    |
| 5..6  | 3,5          | 4,6          | 4,5         | 2                 | 0    |
| 7     | 1            | 2            | 6           | 3                 | 1    |
| 8..9  | 3,5          | 4,6          | 7,8         | 3                 | 0    |

General rules, used by every module:

* Multiplier `p` sees inputs `p, p+P, p+2P, ...`: beat `k` carries input
  words `k*P .. k*P+P-1`. Missing inputs at the end (when P does not divide
  n_i) are zero words with zero weights.
* Pass `s`, beat `k` reads ROM address `s*t_n + k`. Each multiplier has its
  own ROM of `S*t_n = t_c` words.
* In pass `s`, neuron `j` computes output `o = s*N_n + j`, so one pass of all
  neurons yields consecutive outputs. Slots with `o >= n_o` hold zero weights
  and their result is discarded.
* The accumulator is loaded with the sum of the P products on beat 0 and adds
  to it on the other beats (P two-input adders per neuron in all).

The beat and pass counters are not a separate controller: they are the read
counters of the layer's input buffer (below), so the ROM address and the
Load signal always belong to the data word being read.

## The FIMFO input buffer

With S > 1 and P < n_i the same input vector has to be presented S times,
not consecutively per word but as whole packets: for n_i=4, S=2 the stream
d00 d01 d02 d03 d10 ... must be read as d00 d01 d02 d03 d00 d01 d02 d03 d10 ...
`psan_fimfo` (First-In Multiple-First-Out) is a FIFO that does this: its read
address is a packet base pointer plus a beat counter; after the last beat of
a packet the counter returns to the base S-1 times, and only after the last
repetition is the packet's space released. With S=1 it is a plain FIFO.

Every layer has one at its input. Besides replaying, it decouples the
stb/ack handshake, so the ready path never crosses more than one layer. Its
depth is two whole input vectors (a power of two `>= 2*t_n`), enough for the
next vector to arrive while the current one is replayed.

## Between layers: collection, offset, format conversion

The next layer wants its inputs as beats of *its* P words, offset first. The
sending layer does the conversion:

1. At the end of each pass the neurons' results (after the activation
   function) are written into a collection register at positions
   `s*N_n + j`.
2. After the last pass the whole vector moves to `psan_serializer`, which
   puts the offset constant in front and sends `ceil((n_o+1)/P_next)` beats.
   It takes the next vector in the same clock as its last beat leaves, so
   back-to-back vectors flow without a gap.
3. If a new pass result is due while the collection register still waits for
   the converter, the whole layer (buffer read and both pipeline stages)
   holds for that clock.

The network input goes through the same converter (`in_x` plus the offset,
as beats of P1 words), so any P1/S1 can be used at the input.

**Where the activation functions sit.** A layer has `min(N_n, P_next)`
activation-function units. If the next stage takes at least as many words per
beat as there are neurons, each neuron has its own AF before the collection
register. Otherwise the collection register keeps the 12-bit AF inputs and
`P_next` AF units sit at the converter output, where the values already
pass one beat at a time (e.g. layer 1 with (S, P, N_n) = (2, 1, 3) feeding a
P=2 layer uses 2 AFs, not 3). The offset word (127) and padding (0) pass an
AF unchanged.

## Arithmetic

* Inputs, weights and activations: 8-bit two's complement; products 16 bits;
  accumulators 17 bits (layer 1) and 19 bits (layer 2), enough for the sums
  of this network without overflow.
* The offset input is the constant 127 (standing for 1.0). It is multiplied
  by its own weight like any other input, so no separate bias storage exists.
* Activation (`psan_af`): the 12 most significant accumulator bits
  (an arithmetic shift right by `ACC_W-12`) pass unchanged where they fit in
  8 bits and saturate at -128 / +127 outside that range.
* Weights: the trained values of a real network are not part of this
  design. `psan_pkg::psan_weight(layer, o, i)` defines a reproducible set in
  [-64, 63] from a 32-bit integer hash of (layer, output, input), the formula
  is in the package. The ROMs are computed from it at elaboration; putting a
  trained network in means replacing that one function (for example with a
  `case` table).

## Timing and interfaces

* All streams use stb/ack: the sender raises stb with valid data, the
  receiver raises ack when it can take it, and a word moves in a clock in
  which both are high. Once raised, stb stays high and the data stays stable
  until taken (checked by assertions in `psan_fimfo` and `psan_serializer`).
* Reset `rst_n` is asynchronous and active low; it empties every buffer.
* Neuron pipeline: products registered, then the adder tree and accumulator;
  a neuron output is ready 2 clocks after its last beat.
* Whole network at the defaults: one result every 3 clocks when inputs arrive
  at least that often; 15 clocks from an input vector being accepted to its
  result being offered on an empty pipeline. Inputs may come more slowly
  (t > t_c): the layers then idle.

## Choosing P, S and N_n

`psan_nn` is parameterized by the required time `T` (default 3). For each
layer it derives, at elaboration, with the functions in `psan_pkg`:

* `P` = `psan_opt_p(n_i, n_o, T)`: start from the smallest P that can meet
  T, `P0 = ceil(n_i/T)`, try each larger P up to n_i, skip a P that needs as
  many neurons as the previous one (it only adds multipliers), stop when S
  would exceed n_o, and keep the P with the fewest redundant
  multiplications `R_t = P*N_n*T - n_i*n_o` (the smaller P on a tie);
* `N_n` = `psan_neurons(n_i, n_o, P, T)` = `ceil(n_o / floor(T / t_n))`,
  the neurons needed to finish within T;
* `S` = `psan_reuse(n_o, N_n)` = `ceil(n_o / N_n)`.

Each of `P1, NN1, S1, P2, NN2, S2` can also be set directly. The other
designs of the 2-6-1 network:

| required t | layer 1 S, P, N_n | layer 2 S, P | clocks per result |
|------------|-------------------|--------------|-------------------|
| 1          | 1, 2, 5           | 1, 6         | 1 (fully parallel)|
| 2          | 2, 2, 3           | 1, 3         | 2                 |
| 3 (default)| 3, 2, 2           | 1, 2         | 3                 |
| 4          | 2, 1, 3           | 1, 2         | 4                 |
| 5          | 5, 2, 1           | 1, 2         | 5                 |
| 6 .. 9     | 5, 2, 1           | 1, 1         | 6, idle up to t   |
| 10         | 5, 1, 1           | 1, 1         | 10                |

With only `T` set, the derivation reproduces these rows except t=2 and
t=6..9, where it picks P1=1 for layer 1 (no more redundant multiplications
than P1=2, fewer multipliers) while the table keeps P1=2 so that the two
parallel inputs need no serial conversion; set `P1=2` to get the table's
choice. The `t=3` row with t=4 (one idle clock) is the same hardware as
the default.

The multiplications wasted per calculation cycle show why S and P are
chosen this way. At t=3 the default wastes 2 in layer 1 and 0 in layer 2.
Fully parallel layers (S=1, P=n_i) waste 20 and 12. One multiplier per
neuron in layer 1 with a fully parallel layer 2 wastes 5 and 12. That last
build (layer 1 S, P, N_n = 1, 1, 5; layer 2 S, P = 1, 6) gives one result
every 2 clocks and is also simulated.

A layer requires `1 <= P <= n_i`, `1 <= S <= n_o` and `N_n*S >= n_o`
(elaboration stops with an error otherwise). Choosing (S, P) so that
`n_o/N_n` and `n_i/P` divide evenly and `t_c` equals the required `t` avoids
redundant multiplications. `psan_layer` can also be used on its own for
networks of other shapes; a deeper network is a chain of layers, each
with `NEXT_P` set to the P of the layer after it.

## Files

| file | contents |
|------|----------|
| `rtl/psan_pkg.sv` | widths, offset constant, weight function |
| `rtl/psan_nn.sv` | top: input converter and two layers |
| `rtl/psan_layer.sv` | one layer: FIMFO, neurons, AFs, collection, output converter |
| `rtl/psan_neuron.sv` | P multipliers with ROMs, adder tree, accumulator |
| `rtl/psan_weight_rom.sv` | one multiplier's weight ROM |
| `rtl/psan_fimfo.sv` | FIFO / First-In Multiple-First-Out buffer |
| `rtl/psan_serializer.sv` | vector-to-beats converter with offset insertion |
| `rtl/psan_af.sv` | saturating activation function |
| `tb/psan_ref_pkg.sv` | reference model (direct dot products) for the testbenches |
| `tb/tb_*.sv` | self-checking testbenches, one per module |
| `tb/tb_psan_nn_configs.sv`, `tb/psan_nn_cfg_check.sv` | the network in all configurations above |
| `tb/tb_psan_params.sv` | the sizing functions against hand-worked cases |
| `tb/tb_psan_three_layer.sv`, `tb/psan_chain3_check.sv` | three-layer networks of equal layers in seven (S, P, N_n) settings |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends. With
Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Irtl -Itb rtl/psan_pkg.sv tb/psan_ref_pkg.sv \
    tb/tb_psan_nn.sv -y rtl -y tb --top-module tb_psan_nn -Mdir obj_nn
./obj_nn/Vtb_psan_nn
```

Replace `tb_psan_nn` by any other testbench name. `tb_psan_nn` runs the
network at its default parameters through a full-rate phase (checks every
result against the reference model and one result every 3 clocks), a phase
with random output back-pressure (stalls, held outputs) and a slow-input
phase (idle clocks), and reports how often each mechanism occurred.
`tb_psan_nn_configs` checks results and clocks-per-result for each row of
the configuration table and for two networks built from `T` alone;
`tb_psan_params` checks the sizing functions. The block testbenches cover the FIMFO replay order
and rate, every ROM word against the schedule, the full 17-bit AF transfer
curve, the neuron schedule above with stalls, the converter's beat order and
three stand-alone layers (with input and output padding and with AFs after
the converter). `tb_psan_three_layer` builds three-layer networks from equal layers (3
inputs plus the offset, 3 outputs). The time budget equals the layer size, 4 clocks, in three settings of
(S, P, N_n): (1,4,3), (1,1,3) and (3,4,1). The word-serial chain has a
single AF per layer. The (3,4,1) chain leaves one idle clock in every 4.
For a budget k times longer, S=1 becomes S=k and P=n_i becomes P=n_i/k;
(2,1,2) and (3,2,1) do this with k=2. For a budget k times shorter, P=1
becomes P=k and S=n_o becomes S=n_o/k, and each layer needs k AFs; (1,2,3)
and (2,4,2) do this with k=2.

## Limits and departures

* Weights are placeholders (see Arithmetic); outputs are therefore not
  those of any trained network.
* The exact activation curve is a reading of "a saturation function": slope 1
  on the 12-bit MSBs with clipping to 8 bits.
* A neuron's result appears 2 clocks after its last beat because the
  products are registered before the adder tree; a design with only the
  accumulator register would have it after 1 clock.
* Pipelining is fixed at two register stages per neuron; there is no
  parameter for inserting registers after a chosen number of logic levels.
  Multipliers are plain `*` operators: whether they map to LUT logic, DSP
  blocks or constant-coefficient multipliers (as a fully parallel layer
  allows) is left to synthesis.
* The fully parallel case (S=1, P=n_i) keeps one-word ROMs rather than
  wiring constants; synthesis folds them.
* The AF count is `min(N_n, P_next)`; the extra multiplexing needed to reach
  the absolute minimum `ceil(n_o/t)` in every case is not built.
* The last layer delivers its outputs as one parallel vector; a layer with
  many outputs can instead be given a narrow output (`NEXT_P` smaller than
  `NO`) to get them one by one through a single AF.
* The (S, P) search weighs redundant multiplications only; the cost of
  input/output format conversion, which can favour another pair, is left to
  the user (override the parameters).
* The offset input is a real word that costs one multiplier slot per
  vector. Loading the offset weight as the accumulator's starting value
  instead would save that slot, so `n_i` would equal `n_o` in equal-layer
  chains. That option is not built.
