# Neural-network event selection for the COMET Phase-I cylindrical detector

COMET Phase-I looks for muon-to-electron conversion in aluminium: a single electron of
105 MeV that curls on a helix through a cylindrical drift chamber (CDC, about 5000 sense wires
in 20 layers) and then fires a cylindrical trigger hodoscope (CTH, 64 scintillator pairs at
each end). The hodoscope alone fires at up to ~200 kHz, almost entirely on background: low
energy electrons that spiral in a small region, and protons that curve strongly and deposit a
lot of charge. The data acquisition takes at most 26 kHz, and the decision has to be made
within 6.5 µs.

This RTL makes that decision in an FPGA from the drift chamber's hit pattern. It first cleans
the hits cell by cell, then compresses the hit map into a few dozen numbers and lets a small,
heavily quantized neural network (a multilayer perceptron, MLP) judge whether they look like a
signal track. The network has 4-bit weights so that all its products fit in LUT logic; the
target device (a Kintex-7 class FPGA) has 222,600 LUTs but only 1,440 DSP blocks.

## Processing chain

```
 100 ns bins of               +------------------+   +---------------------+   +-------------------+
 2-bit cell charges --------->| multi_hit_filter |-->| gbdt_hit_classifier |-->| hitmap_compressor |--+
                              +------------------+   +---------------------+   +-------------------+  |
                                 first hit per cell     score table + cut        3 areas x 24 counts   |
                                                                                                      v
 CTH counters  +-----------------+                  +------------------+     +----------------------+
 ------------->| cth_coincidence |----------------->| trigger_decision |<----| qmlp 24-50-26-1      |
               +-----------------+  4-fold per bin  +------------------+     | ReLU, ReLU, sigmoid  |
                                                        trigger             +----------------------+
```

`comet_nn_trigger` is the top. An event window is framed by `evt_start` and `evt_end`; each
100 ns bin in between presents one 2-bit charge code per cell (0 = no hit) and the hodoscope
counters, flagged by `bin_valid`. Eleven clocks after `evt_end` comes `dec_valid`. With it come
`trigger`, the two conditions behind it (`nn_accept`, `cth_seen`), and the best area score
with its area.

1. **One hit per cell** (`multi_hit_filter`). A drift cell can fire in several bins of one
   event. Only its first non-zero charge is kept, so that the next stage sees one charge per
   cell. All cells work in parallel; the finished map is copied out at `evt_end`, so the next
   window can open at once.
2. **Hit scoring** (`gbdt_hit_classifier`). A gradient-boosted decision tree ensemble judges
   each cell from four local features: its own charge, the charges of its left and right
   neighbours in the same layer, and its layer (radius). Low-energy electrons and protons leave
   different local charge patterns from signal tracks. Those features add up to 6 bits of
   charge plus the layer, so any trained ensemble reduces exactly to a table of 64 scores per
   layer. The hardware stores that table (8-bit scores), compares all of it with the score
   threshold (reset value 0.75), and every cell picks its own pass bit. Empty cells are never
   kept.
3. **Area extraction and compression** (`hitmap_compressor`). The kept-hit map (18 layers ×
   192 cells) is cut into three azimuthal thirds of 64 cells. A signal helix fits inside one
   third. Each third is tiled with 3-layer × 16-cell clusters, and each cluster is replaced by
   its number of kept hits. That gives 6 × 4 = 24 counts, flattened row group first. The three
   thirds leave on three consecutive clocks.
4. **Quantized MLP** (`qmlp`, built from `qdense_layer` and `sigmoid_act`). It has 24 inputs,
   dense layers of 50 and 26 neurons with ReLU, and one output neuron with a sigmoid. Every
   layer is unrolled and takes one clock, so the network accepts one third per clock and
   scores it four clocks later.
5. **Decision** (`trigger_decision`). The event is kept when at least one third scores at or
   above the cut and the hodoscope had a 4-fold coincidence during the window
   (`cth_coincidence`: inner and outer counters of two neighbouring pairs, at either end). The
   cut is a register. It is the knob that sets the output rate: the network was tuned to run
   at 26 kHz out of 200 kHz.

## Number formats

This is the part to read before changing widths. All values are fixed point, with
value = code / 2^fraction bits, and the quantization rules below are applied bit-exactly.

| signal | width | fraction bits | range | notes |
|---|---|---|---|---|
| MLP input (cluster count) | 16 unsigned | 0 | 0..48 in practice | |
| weight, bias | 4 signed | 3 | -1 .. 0.875 | bias aligned to the accumulator |
| layer-1/2 accumulator | exact | input + 3 | never overflows | |
| ReLU output | 8 unsigned | 3 | 0 .. 31.875 | truncated (floor), then saturated |
| output neuron z | 16 signed | 6 | ±512 | truncated, saturated |
| sigmoid score | 8 unsigned | 8 | 0 .. 255/256 | 1.0 saturates to 255 |
| GBDT score, threshold | 8 unsigned | 8 | 0 .. 255/256 | threshold 0.75 = 192 |

The sigmoid is the piecewise-linear "PLAN" approximation. Its slopes 1/4, 1/8 and 1/32 are
shifts, and its breakpoints are at |z| = 1, 2.375 and 5. It stays within 0.02 of the exact
logistic function. A network trained with a quantization-aware flow has to be exported to
these formats. If the training used different fraction positions, change `W_FRAC`, `A_FRAC`
and `Z_FRAC` in `comet_trig_pkg` and the `IN_FRAC`/`OUT_FRAC` parameters in `qmlp`.

## Configuration

Everything trained is loaded at run time over one write-only port (`cfg_we`, 16-bit
`cfg_addr`, 16-bit `cfg_wdata`). The algorithm can therefore be changed without rebuilding the
firmware. All registers reset to 0, except the two thresholds.

| address | content |
|---|---|
| `0x0000 + layer*64 + {qL,qC,qR}` | GBDT score of that charge pattern in that layer (8 bits) |
| `0x1000 + o*24 + i`, `0x1000 + 1200 + o` | layer 1 weight (input i → neuron o), bias of neuron o |
| `0x2000 + o*50 + i`, `0x2000 + 1300 + o` | layer 2 weight, bias |
| `0x3000 + i`, `0x3000 + 26` | output neuron weight, bias |
| `0xF000` | GBDT score threshold (reset 192 = 0.75) |
| `0xF001` | MLP score cut (reset 128 = 0.5) |

Weights and biases are the low 4 bits of `cfg_wdata`, in two's complement.

## Timing

| from | to | clocks |
|---|---|---|
| `evt_end` | filtered map | 1 |
| map | kept-hit map | 1 |
| kept-hit map | area 0 counts | 2, then areas 1 and 2 on the next clocks |
| counts | score | 4 |
| last score | `dec_valid` | 1 |
| **`evt_end`** | **`dec_valid`** | **11** |

At 100 MHz the decision comes 110 ns after the window closes. The complete latency budget of
the experiment, 3.4 µs expected against a 6.5 µs limit, is dominated by data transfer from the
readout boards, which this RTL does not include. Successive `evt_end` pulses must be at least
three clocks apart (`busy`); an assertion in `hitmap_compressor` checks this.

## What is assumed, and how far to trust it

The following are this design's own choices. The first few are reconstructions of a network
description that is only partly known.

- **Network shape.** The tuned network is taken to be 24 (16-bit) → 50 → 26 → 1 with 4-bit
  weights: 2603 parameters. That respects the limits used when it was tuned: at most 4 dense
  layers, at most 64 neurons in the first layer and 32 in later ones, fewer than 4096
  parameters. The ReLU and sigmoid precisions (8 bits each here) and all fraction positions are
  assumed.
- **Map geometry.** The chamber has 20 layers of about 250 cells. None of the cluster shapes
  tried during tuning turns 20 layers into 24 inputs, so the map is 18 layers by 192 cells
  (3 × 64), with 3 × 16 clusters. How cells of the real chamber are placed on this grid is
  left to the data source.
- **Hit counts as compression.** Compression counts the kept hits per cluster. Running all
  three thirds through the network and OR-ing the results is also this design's choice.
- **GBDT as a table.** This is exact for any ensemble over these features. The trained scores
  themselves are not part of the RTL.
- **Trigger logic.** The 4-fold coincidence is two neighbouring pairs, inner and outer
  counters each, at the same end. The trigger ANDs it with the network decision.
- **Interfaces.** The first hit in time is the one kept per cell. Charge code 0 means no hit.
  Cells are presented in parallel per 100 ns bin. The readout links and the board itself are
  not modelled.

Every module has a self-checking testbench that compares it with an independent reference. The
references use real arithmetic for the network, and a direct count for clusters and
coincidences. The end-to-end test runs the full-size design with random configuration and
events. It checks every decision and the 11-clock latency. It also counts that repeated hits,
GBDT keeps and rejects, coincidences, accepted events and both kinds of rejected events all
occur. Nothing here was checked against a trained network or recorded data.

## Files and simulation

`rtl/comet_trig_pkg.sv` holds the sizes, formats and address map; the modules are one per file
in `rtl/`, their testbenches `tb/tb_<module>.sv`. Each testbench prints
`TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_comet_nn_trigger \
    -y rtl -y tb +libext+.sv -Irtl rtl/comet_trig_pkg.sv tb/tb_comet_nn_trigger.sv -o sim
obj_dir/sim
```

The full-size end-to-end build takes a few minutes, because the map has 3456 cells in parallel;
the simulation itself takes well under a second. The block testbenches of `multi_hit_filter`
and `gbdt_hit_classifier` use small maps through their `LAYERS`/`COLS` parameters.
