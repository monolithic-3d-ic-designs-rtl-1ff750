# Coarse-grain-sparse DNN accelerator for speech recognition

This is a small, low-power engine for the acoustic model of a speech recognizer.
It runs a fully connected deep neural network with 440 inputs, four hidden layers
of 1,024 ReLU neurons and 1,947 outputs. The outputs are scores for the states of
the HMM that decodes phonemes. The main idea is **coarse-grain sparsification (CGS)**.
Every weight matrix is cut into 16×16 blocks, and only one block in eight is kept in
each block row. Each output neuron therefore depends on 128 of the 1,024 inputs. Those
128 inputs come in eight contiguous groups of 16. The chip stores only the kept blocks,
plus a few bits that say which blocks they are. It skips every multiplication by a
pruned block. All weights (6 Mb) fit in on-chip SRAM.

The architecture follows the one published in *Monolithic 3D IC Designs for
Low-Power Deep Neural Networks Targeting Speech Recognition*. That work uses this
accelerator to study two-tier monolithic 3D integration. The 3D part is physical
implementation (tier partitioning, inter-tier vias). It does not change the logic and is
not part of this RTL. The same goes for training, which was done offline on a GPU, and
for the HMM/Viterbi decoder that consumes the scores. The published work gives the block
structure and the sizes. The word widths, requantisation, pipeline, memory map and
host interface are choices made here; they are listed below.

## The compressed network

| weight layer | inputs | outputs | block rows | kept blocks / row | stored weights | SRAM bank(s) |
|---|---|---|---|---|---|---|
| 0: features → H1 | 440 (padded to 1,024) | 1,024 | 64 | 8 | 131,072 | 0 |
| 1: H1 → H2 | 1,024 | 1,024 | 64 | 8 | 131,072 | 1 |
| 2: H2 → H3 | 1,024 | 1,024 | 64 | 8 | 131,072 | 2 |
| 3: H3 → H4 | 1,024 | 1,024 | 64 | 8 | 131,072 | 3 |
| 4: H4 → scores | 1,024 | 1,947 (padded to 2,048) | 128 | 8 | 262,144 | 4, 5 |

Weights are 8-bit two's complement. The neurons are 8 bits too. Each MAC keeps a
24-bit sum, which cannot overflow over 128 terms. Hidden-layer results pass through
ReLU. Every result is requantised: it is shifted right arithmetically by a per-layer
amount (`qshift[layer]`) and saturated to 8 bits. The output layer has no ReLU. It
returns signed scores; a softmax or log-likelihood step belongs to the decoder.

The design also supports the published 64×64-block variant ("CGS-64"). Set `BS = 64`.
`KEEP` then defaults to 2 kept blocks per row, and each entry in the coefficient file
shrinks to two 4-bit indices. A CGS-64 pruning pattern is also a valid CGS-16 pattern,
so such a network also runs unchanged on the default configuration.

## How a layer is computed

The chip works on one layer at a time. It has 16 MAC lanes, and **each lane owns one
output neuron**. One block row of 16 output neurons is one *group* of 16 lanes. If
`BS > MACS`, as in CGS-64, a block row is worked off in `BS/MACS` groups. For a group,
the controller (`dnn_ctrl`) steps a counter `k` over the 128 selected inputs, one per
cycle:

* The coefficient entry of the block row holds eight 6-bit block indices `blk[0..7]`.
  The neuron select unit has eight block multiplexers. They place the eight chosen
  16-neuron blocks side by side, and input `k` of the group is
  `x[blk[k/16]*16 + k%16]`. That one neuron goes to all 16 lanes at once.
* In the same cycle, one 128-bit SRAM row is read. It holds the 16 weights that connect
  this input to the 16 output neurons of the group, with lane `m` in bits `[8m+7:8m]`.

A group therefore takes 128 cycles. A 1,024-output layer takes 64 × 128 = 8,192 cycles.
This equals the depth of one SRAM bank, which is why the weights of a layer fill exactly
one bank. The weight row address is a plain function of the loop counters:

    addr = layer*8192 + (block_row*GROUPS + group)*128 + k      (bank = addr/8192)

The coefficient entry is `layer*64 + block_row`. These two formulas are the whole
memory map. A host or weight compiler must lay out the compressed matrices the same way.
Let `W` be the dense matrix of a layer and `blk` the entry of block row `br`. The weight
for lane `m` of group `g` at step `k` is then
`W[br*BS + g*MACS + m][blk[k/BS]*BS + k%BS]`.

### Pipeline and timing

| stage | what happens |
|---|---|
| 0 | `dnn_ctrl` issues the SRAM read and the coefficient entry; `neuron_select` picks neuron `k`, which is registered |
| 1 | the SRAM row and the registered neuron meet in the 16 `mac_unit`s; `k = 0` loads the sum, later terms add |
| 2 | after the group's last term, the 16 sums go through `relu_quant` and are written to the output registers |

Groups and block rows stream back to back with no bubbles. The stage-2 write of one
group happens in the same cycle as the first MAC of the next group, which overwrites
the sum only at the clock edge. After a layer's last read there are two drain cycles
and one *swap* cycle. The swap copies output neurons 0-1,023 into the input registers,
and the next layer starts in the following cycle. A frame takes

    sum of layer rows + 3*(layers-1) + 3 = 49,152 + 15 = 49,167 cycles

counted from the cycle after `start` up to and including the `done` pulse. At the
400 MHz clock of the published implementation, that is about 123 µs per frame.

## Host interface (`dnn_top`)

1. **Coefficients.** Write each entry with `coef_we`/`coef_addr`/`coef_wdata`. An entry
   holds eight block indices; field `j` is in bits `[6j+5:6j]`. There are 384 entries.
2. **Weights.** Write rows with `w_valid`/`w_ready`/`w_addr`/`w_data`, one row per
   accepted cycle, in the layout above.
3. **Features.** Pulse `in_clear`. Then write the 440 features with
   `in_we`/`in_addr`/`in_data`. The inputs above 440 must stay zero. The input
   registers hold hidden-layer values after a frame, so reload them for every frame.
4. Set `qshift[0..4]`, pulse `start`, and wait for `done`. Then read the 1,947 scores
   with `out_addr`/`out_data`, which is combinational.

Coefficients and features must not be written while `busy` is high; assertions flag
this. **Weights may be written during a frame.** This is the weight-update phase of
the "pseudo-training" workload, where the chip classifies while new weights are
written. Each bank has a single port, so a write to the bank being read in that cycle
waits, with `w_ready` low. Writes to the other five banks go through at full rate.
A bank is read only while its layer runs. An update that starts with the frame
therefore lands after that layer's last read, and takes effect from the next frame.

## Modules

| file | role |
|---|---|
| `dnn_pkg.sv` | widths, neuron/weight/accumulator types, controller states |
| `dnn_top.sv` | top level: wires everything below, host ports |
| `dnn_ctrl.sv` | layer / block-row / group / neuron counters, three-stage pipeline control, drain and swap; holds the coefficient file |
| `coef_regfile.sv` | CGS block indices, 384 × 48 bits, combinational read (inside `dnn_ctrl`) |
| `neuron_select.sv` | eight block multiplexers and the per-cycle neuron pick |
| `weight_memory.sv` | six banks, flat address, read-priority arbitration of the write port |
| `sram_bank.sv` | 8,192 × 128-bit single-port SRAM with synchronous read (array, for macro mapping) |
| `mac_unit.sv` | 8×8-bit signed multiply, 24-bit accumulate (16 instances) |
| `relu_quant.sv` | shift, ReLU, saturate to 8 bits (16 instances) |
| `neuron_regs.sv` | 1,024 input and 2,048 output neuron registers, grouped write, swap |

## Where this departs from the published description

* **Coefficient file size.** The published architecture has six SRAM banks: four
  hidden layers plus an output layer of about twice the size. That requires five
  weight layers, with the output layer counted twice, which gives 6 × 64 block rows.
  This design stores 18,432 bits for that. The published text quotes 15,360 bits,
  which is five 1,024-output layers' worth. The banks and the bit count cannot both
  hold, and this design follows the banks. For CGS-64 the file is 768 bits instead of
  the quoted 640.
* **Padding.** The 440 features are padded to 1,024 inputs, and the 1,947 outputs are
  padded to 2,048. The padded outputs are computed but ignored.
* **Own choices.** These are not specified by the published work: the neuron and
  accumulator widths, the requantisation, the one-neuron-per-cycle broadcast to the
  lanes, the pipeline, the reset behaviour and the host ports. Reset is active-low
  and asynchronous. It clears the control and neuron registers, but not the SRAM or
  the coefficient file.

## Simulation

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`. For example, with Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
      rtl/dnn_pkg.sv tb/tb_dnn_full.sv --top-module tb_dnn_full
    ./obj_dir/Vtb_dnn_full

* `tb_dnn_full` runs the default-size design (no parameter overrides). It runs three
  frames, about 200k cycles, in well under a second:
  1. plain classification;
  2. classification while all 8,192 layer-0 weight rows are rewritten;
  3. classification that must see the new weights.

  It compares all 1,947 scores of every frame with a reference model. The model
  evaluates each layer straight from the kept blocks and their indices. It shares
  only the weight layout above with the design, not its counters or pipeline. The
  testbench also checks the 49,167-cycle frame time and counts the mechanisms
  listed below.
* `tb_dnn_top` runs the same sequence on a reduced network: 128 neurons, 8 lanes,
  two groups per block row. `tb_dnn_cgs64` runs it on a 64×64-block network with
  four groups per block row. All three count the mechanisms: layer swaps, second MAC
  groups, ReLU clamps, saturation, negative scores, blocked weight writes and writes
  during a run. A mechanism that never occurs counts as a failure.
* The other testbenches check each block on its own. `tb_dnn_ctrl` follows the exact
  address, neuron-index and write sequence, and the cycle count.
  `tb_weight_memory` covers the bank-conflict rule.

The shared end-to-end testbench body is `tb/tb_dnn_body.svh`. To try another size,
copy `tb_dnn_top.sv` and change its local parameters. `N/BS` must be a power of two
and at least 8, and `MACS` must divide `BS`.
