# A weight-stationary CNN accelerator for keyword spotting

This is a small neural-network engine for always-on keyword spotting. The host
loads a convolutional network's weights and layer descriptions once. It then
sends one frame of speech features at a time, roughly every 10–20 ms. The
engine runs all layers of the network on an 8×8 array of processing elements
(PEs) and leaves the class scores in its activation memory, where the host
reads them.

The architecture is the one proposed in the thesis *Algorithms and Low Power
Hardware for Keyword Spotting*. That thesis fixes:

- the block diagram and the memory sizes;
- the PE structure and its sign-magnitude arithmetic;
- the way filters are mapped onto the array;
- the networks that deliver data to the PEs.

It does not specify the control sequencing, the host protocol, the
configuration format, the memory layouts or the cycle timing. Those are this
implementation's own, and the section "What is from the source design and what
is not" lists them.

## Block diagram

```
 host port ──► host_ifc ──┬─► weight memory   80 kB  (bytes)
                          ├─► config buffer    1 kB  (12 layer descriptors)
                          ├─► feature buffer   2 kB  (own write port, writable while running)
                          ├─► activation memory 3 × 16 kB banks
                          └─► control/status word
                                   │ start
                               top_ctrl ──► PE configuration (64 records)
                                   │  weights ──► wgt_noc  (unicast, row/column IDs)
                                   │  IA      ──► mc_bus   (multicast, configurable IDs)
                                   │  bias/psum ► mc_bus   (multicast, configurable IDs)
                                   ▼
                      pe_array: PE0 → PE1 → … → PE63  (spatial-sum chain)
                                   │ OA: chain tails selected by ID
                                   ▼
                         act_unit (ReLU / scale / to sign-magnitude)
                                   ▼
                          destination activation bank
```

Everything runs in one clock domain with one active-low asynchronous reset.
While the engine is busy, the controller owns the memories. The exception is
the feature buffer, which the host can fill with the next frame during a run.

## Number formats

Weights are 8 bits, sign-magnitude, in Q1.7 (a sign bit and seven fraction
bits). Activations are 16-bit sign-magnitude integers. Inside a PE the
accumulator is 16-bit 2's complement. `pe_mac` does one step of arithmetic per
cycle:

1. An unsigned 15×7 multiply of the magnitudes. The 22-bit product is rounded
   to nearest by `(p + 64) >> 7`.
2. The product's sign is the XOR of the two signs. It is forced to 0 when the
   rounded magnitude is 0.
3. The product is turned into 2's complement without a separate negation. The
   adder gets `{0, mag} XOR {16{sign}}` with carry-in equal to `sign`, so the
   same adder adds or subtracts.
4. The 17-bit sum is saturated to 16 bits.

A multiplexer in front of the adder can select the spatial sum from the
previous PE instead of the product.

Results stay in 2's complement while a layer is being accumulated. When the
last filter tap has been added, `act_unit` converts each result on its way to
memory:

- optional ReLU;
- optional scale by ×2 or ×0.5 (a shift);
- conversion to sign-magnitude, with the magnitude clamped to 32767.

The next layer therefore again sees sign-magnitude inputs. Sign-magnitude
weights are the point of the design: weights tuned to have few toggling bits
save power in the weight network and in the multipliers.

## Mapping a layer onto 64 PEs

The dataflow is weight-stationary with the output channels in parallel. Each
PE holds weights for up to 3 output channels × 4 input channels, in a
12-entry register file. For a layer with C input channels and M output
channels:

* **Chains.** An output channel's C inputs are split over `g = ceil(C/4)`
  neighbouring PEs. The first `C mod g` of them hold one element more than the
  rest. For C = 10 that gives 4, 3, 3. The g PEs form a *chain*. Each PE adds
  its own products to the result of the PE before it, over the spatial-sum
  link PE(p−1) → PE(p). Only the chain's last PE (the *tail*) delivers a
  result.
* **Channels per PE.** There are `floor(64/g)` chains. Channel `m` goes to
  chain `m mod chains`. A chain holds up to three channels: t, t+chains and
  t+2·chains. Used chains are packed against PE63, so unused PEs are the low
  numbers.
  * C = 10, M = 22 gives 21 chains of 3 PEs, with PE0 unused. The first chain
    holds two channels.
  * C = 1 gives 64 single-PE chains.
  * C from 129 to 256 gives a single chain of 33 to 64 PEs.
* **Blocks.** If M is larger than 3·chains, the layer is run in several
  *blocks* of output channels, and each block reloads the weights.
* **Taps.** Each filter tap (r, s) is a separate pass over all output pixels.
  * The first pass starts each chain head from the bias, or from zero if the
    layer has no bias.
  * Later passes start from the partial sum stored by the previous pass. That
    partial sum is read back from the destination bank.
  * Only the last pass goes through ReLU/Scale.

  Any R and S therefore work. A fully-connected layer is a 1×1 layer on a 1×1
  map. A fully-connected layer with C > 256 is run as a convolution whose
  filter covers the whole input map, with a channel count of 256 or less.

Each PE gets a configuration record (`pe_cfg_t`) at the start of every pass:

- `en`: whether the PE is used in this pass;
- `n_c` and `n_m`: how many input elements and output channels it holds;
- `init`: how the accumulator starts (bias, partial sum or zero);
- `use_spatial`: set on every PE of a chain except the head;
- `is_tail`: set on the chain's last PE;
- three network IDs:
  - `ia_id` = the PE's position j inside its chain;
  - `bias_id` and `oa_id` = the chain number.

## The controller's loop

`top_ctrl` reads the layer descriptor and computes g, the number of chains and
the split, then runs:

```
for each layer
  for each block of output channels
    for r in 0..R-1, s in 0..S-1
      write 64 PE configuration records
      stream W[m][r][s][c] to every used PE   (unicast, row/column tag)
      first tap: stream one bias per channel to the chain heads
      for every output pixel (e, f)
        later taps: stream the stored partial sums to the chain heads
        stream I[U·e+r][V·f+s][c], c = 0..C-1   (multicast to PE j of every chain)
        collect one result per channel from the chain tails, by OA ID,
        and write it to the destination bank (through act_unit on the last tap)
```

Each stream issues one memory read per cycle. The read data is pushed one
cycle later when the network is ready, and a stalled network holds the
pipeline. The controller is sequential: it sends a pixel's activations, then
collects that pixel's results before it moves on.

## Networks on chip

* **Weights** (`wgt_noc`). A two-level unicast network of unicast/multicast
  controllers (`mc_ctrl`). Each of 8 row controllers compares the row tag
  with its fixed row ID. Each of the 8 column controllers behind it compares
  the column tag with its fixed column ID. PE p has row ID p/8 and column
  ID p%8.
* **Input activations and bias/partial sums** (`mc_bus`). One controller per
  PE, each with an ID that is loaded with the PE configuration. A word is
  delivered only when every PE whose ID matches can accept it, so all
  receivers take it in the same cycle.
* **Outputs.** Each tail PE compares its OA ID with the tag the controller
  presents. The matching tail's output FIFO head is returned.

The `mc_ctrl` rule is:

```
match   = id_valid && id == tag
en_out  = match && en_in && rdy_in
rdy_out = !match || rdy_in
```

All PE inputs and outputs go through small FIFOs (`sync_fifo`, depth 4). The
FIFOs absorb delivery delay; the spatial-sum link is simply the previous PE's
output FIFO.

## PE timing

For each pixel, a PE:

1. takes n_c activations;
2. for each of its n_m channels, spends
   - 1 cycle for INIT,
   - n_c cycles for multiply-accumulate,
   - 1 cycle for the spatial add, if it is used,
   - 1 cycle to push the result.

From the last input activation to the last result of a PE this takes
`n_m·(n_c + 2 + sp) + 1` cycles, where `sp` is 1 when the spatial add is used.
`tb_pe` checks this count.

## Host port and memory map

The host port is a synchronous word bus: `h_we`, `h_re`, a 20-bit `h_addr`
and 16-bit data. `h_rvalid` comes one cycle after `h_re`. Address bits
[19:17] select the region:

| region | contents | address | notes |
|---|---|---|---|
| 0 | weight memory | byte [16:0], data [7:0] | weights and biases |
| 1 | configuration buffer | word [8:0] | 8 words per layer, layer i at 8·i |
| 2 | feature buffer | word [9:0] | writable while busy |
| 3–5 | activation banks 0–2 | word [12:0] | |
| 7 | control word 0 | | see below |

For the control word:

- A write with bit 15 set starts a run of `bits[3:0]` layers, 1–12.
- A read returns `{busy, done, 10'b0, layer count}`.

While the engine is busy, any access other than to the feature buffer or the
control word is dropped and `h_err` pulses.

Memory layouts:

- weights: byte `wbase + ((m·R + r)·S + s)·C + c`;
- biases: 16-bit 2's complement, in bytes `bbase + 2m` (low) and
  `bbase + 2m + 1` (high);
- input activations: word `(h·W + w)·C + c`;
- outputs: word `(e·F + f)·M + m`.

An output map is therefore laid out exactly as the next layer's input map.

### Layer descriptor (128 bits; word 0 holds bits 15:0)

| bits | field | meaning |
|---|---|---|
| 1:0 | src | 0–2 activation bank, 3 feature buffer |
| 3:2 | dst | destination bank 0–2 (must differ from src) |
| 4 | relu | apply ReLU on output |
| 6:5 | scale | 0 ×1, 1 ×2, 2 ×0.5 |
| 15:7 | C | input channels, 1–256 |
| 24:16 | M | output channels |
| 32:25 | H | input height |
| 40:33 | W | input width |
| 48:41 | R | filter height |
| 56:49 | S | filter width |
| 60:57 | U | vertical stride |
| 64:61 | V | horizontal stride |
| 65 | has_bias | start from bias (else zero) |
| 82:66 | wbase | weight byte address |
| 99:83 | bbase | bias byte address |

The output size is E = (H−R)/U + 1 by F = (W−S)/V + 1. No padding is applied.

## What is from the source design and what is not

The following follow the source design:

- an 8×8 array with a PE0→PE63 spatial-sum chain;
- a 12-entry weight register file and 3 or 4 elements per PE;
- 1, 2 or 3 output channels per PE and the chain split rule;
- 16-bit activations and 8-bit weights;
- the sign-magnitude multiply, with the sign used as the carry into a 2's
  complement adder-and-subtractor;
- an accumulator that starts from a bias, a partial sum or zero;
- FIFOs at every PE port;
- unicast weights through fixed row and column IDs;
- multicast activations and biases through configurable flat IDs;
- ReLU/Scale with the conversion back to sign-magnitude;
- the memory sizes (80 kB weights, 3 × 16 kB activations, 2 kB features,
  about 1 kB configuration for 12 layers);
- a feature buffer that the host fills while the engine runs.

These are this design's own choices:

- the controller's loop order and its block loop for large M;
- keeping partial sums in the destination bank;
- the host protocol and the address map;
- the descriptor format;
- the memory layouts;
- the FIFO depth;
- Q1.7 weights with round-to-nearest;
- saturation on adder overflow;
- the limited set of activation scales (×1, ×2, ×0.5);
- the timing of the PE state machine;
- the flattening of the multicast tree into one level.

Points where this design departs from the source, or leaves something out:

* **Clock and register gating.** In the source, unused PEs and registers are
  clock gated. Here an unused PE is only held idle, which gives the same
  results without the power saving.
* **No feature extraction or posterior handling.** The acoustic front end and
  the posterior smoothing are outside the accelerator. Features arrive through
  the host port, and the scores are read raw.
* **Custom memories.** All memories are plain synchronous arrays with a
  one-cycle read, standing in for SRAM macros.
* **PE numbering.** One example in the source gives PE14 column ID 7. This
  design numbers columns p mod 8, so PE14 has column ID 6.
* **Sequential controller.** The controller does not overlap a pixel's
  activation stream with the collection of the previous pixel's results. That
  overlap would be a straightforward speed-up.

## Performance

`tb_cnn1_decomp` runs the decomposed keyword-spotting network CNN-1-decomp:
11 layers, about 43 k weights, on a 10×49 feature input.

- One frame takes **390,194 cycles**. That is 15.6 ms at 25 MHz, within a
  16.5 ms real-time frame.
- The weights fit the 80 kB memory.
- The largest activation map is 7 × 40 × 28 = 7840 words, which fits a
  16 kB bank.

Larger variants of this network family do not fit:

- one with about 121 k weights exceeds the weight memory;
- one with a 40×98 input exceeds the 1024-word feature buffer.

## Files

`rtl/`, one module per file:

| file | contents |
|---|---|
| `kws_pkg.sv` | constants, `pe_cfg_t`, `layer_cfg_t`, saturation |
| `kws_accel.sv` | top level |
| `host_ifc.sv` | host port, control word |
| `top_ctrl.sv` | layer controller and mapping |
| `pe_array.sv` | 64 PEs, networks, spatial chain, output select |
| `pe.sv` | processing element |
| `pe_mac.sv` | sign-magnitude multiply, 2's complement add |
| `sync_fifo.sv` | first-word-fall-through FIFO |
| `mc_ctrl.sv` | unicast/multicast controller |
| `wgt_noc.sv` | row/column weight network |
| `mc_bus.sv` | flat multicast network |
| `act_unit.sv` | ReLU, scale, to sign-magnitude |
| `spram.sv` | single-port memory: weights, activation banks, configuration |
| `sdpram.sv` | feature buffer, one write and one read port |

`tb/`: each testbench checks its block against an independent reference model
and ends with a line `TB_RESULT checks=N failures=M`.

- `tb_kws_accel`: a 4-layer network over two frames, at default sizes. It
  covers:
  - C=1, C=10 with 3-PE chains and PE0 idle, C=22 with two channel blocks and
    2×2 taps, and C=160 as one 40-PE chain with four blocks;
  - partial sums, saturation and ReLU;
  - feature writes while busy and refused accesses.
- `tb_cnn1_decomp`: the full CNN-1-decomp frame and its cycle budget.
- One testbench per block. `tb_pe` includes the PE timing.
  `tb_pe_array`, `tb_mc_bus` and `tb_top_ctrl` exercise back-pressure.

To simulate with Verilator 5, for example the full network:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps -Irtl \
    rtl/kws_pkg.sv $(ls rtl/*.sv | grep -v kws_pkg) \
    tb/tb_cnn1_decomp.sv --top-module tb_cnn1_decomp
./obj_dir/Vtb_cnn1_decomp
```

The package is listed first because the other files import it. `-Wno-fatal`
keeps lint warnings, such as width extensions and unused bits, from stopping
the build.

Use the same command for any other testbench, with its file and top-module
name. All testbenches run at the RTL's default sizes except where a block
testbench sets its own small parameters. Each finishes in seconds.
