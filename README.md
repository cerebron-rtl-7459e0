# Cerebron: a reconfigurable accelerator for sparse spiking convolutional networks

Spiking neural networks carry information as binary spikes over time steps. Two kinds
of sparsity can be exploited in such a network:
- most neuron states (input spikes) are zero in any one time step;
- many synaptic weights are zero after pruning.

Cerebron is a layer engine for spiking convolutional networks, including the compact
depthwise-separable ones. It skips every zero spike and every zero weight. It serves
three layer types on one array of processing elements (PEs), each with a different
dataflow:
- standard and pointwise convolutions;
- depthwise convolutions;
- average pooling.

A workload scheduler balances the uneven spike counts of the channels across the
array. Its schedule is computed while the previous layer finishes.

All neurons are integrate-and-fire (IF) neurons with reset by subtraction. In each time
step a neuron adds the weights of its active inputs to its membrane potential `V`:

```
Vtemp = V + sum_i w_i * s_i        spike = (Vtemp >= Vth)        V' = spike ? Vtemp - Vth : Vtemp
```

The potentials stay in an on-chip buffer from one time step to the next.

The RTL is SystemVerilog-2017. It is synthesizable and has no vendor primitives. The
default size is 8 columns x 8 rows of computing units (CUs), with 4 PEs per CU, so 256
PEs.

## Block structure

```
             host / DMA ports
        +---------+-------------------+
        |         |                   |
  weight buffer   neuron state A    neuron state B   (A/B alternate as input/output)
        |         |                   ^  bit writes from every PE
        v         v                   |
  weight reg.   row register file     |
  files (one    (input rows of a      |
  per column)    band, reused)        |
        |         |                   |
        +----> CU array 8 x 8 ---------+--> VMEM buffer (one bank per PE)
               each CU = 4 PEs        +--> workload accumulator -> scheduler
        ^
  controller + address generator
```

| file | block |
|---|---|
| `rtl/cerebron_pkg.sv` | sizes, item / configuration structs, mode enums |
| `rtl/pe.sv` | processing element: sparse select, accumulate, forward, fire |
| `rtl/cu.sv` | computing unit: 4 PEs and their partial-sum chain |
| `rtl/cu_array.sv` | N x M CUs, systolic or unicast input delivery, weight bus |
| `rtl/data_collection.sv` | row register file, window extraction, weight register files |
| `rtl/addr_gen.sv` | row slots, padding, window pixels, weight tags, potential addresses |
| `rtl/controller.sv` | layer sequencing: weight load, row load, stream, drain |
| `rtl/workload_sched.sv` | spike-count accumulator, sorter, fine tuning, scheduling table |
| `rtl/ns_buffer.sv`, `rtl/vmem_buffer.sv`, `rtl/weight_buffer.sv` | on-chip buffers |
| `rtl/cerebron_top.sv` | the accelerator |

## The processing element and two-step sparsity

Data arrives as *items*. An item holds, for each PE:
- an 8-bit index vector: the spikes of 8 input channels, or 8 window pixels;
- the matching vector of 8 weights.

The PE does not touch zero entries. In one cycle it ANDs the index vector with the
nonzero mask of the weight vector, and keeps the result as a bit mask of "aligned
pairs". It then adds one aligned weight per cycle. The cost of an item is therefore
`max(1, popcount(idx & nz(w)))` cycles. An item with no aligned pair costs one cycle.

An output neuron is a sequence of items: the first one loads the membrane potential, and
the last one ends the sum. The PE has three modes:

- **cascade** (standard and pointwise convolution). The 4 PEs of a CU work on 4
  different channel groups of the same output neuron. When its sum is done, each PE
  passes it to the next PE. The PE there adds it to its own sum. The last PE of the
  chain (the *tail*) fires. The chain is a valid/ready handshake, so a PE that
  finishes early waits, and this is where the uneven PE loads show.
- **stand-alone** (depthwise convolution). Each PE computes its own output neuron:
  4 neighbouring output pixels of one channel. It fires on its own sum.
- **pooling**. Each PE counts the spikes in its window. The weights are ignored. The
  PE fires when the count reaches `Vth`. For average pooling the host sets `Vth` to
  the window area. This gives the average-pooling spike behaviour.

The potentials saturate at 16 bits signed. The accumulator has 24 bits. When the layer
is the first time step (`cfg.first_step`), the potential starts at zero instead of
being read from the buffer.

## Array modes

Every cycle the array either takes one step or stalls. It steps when the controller
presents an item and every CU is ready. A CU is ready when all its PEs are idle, or
are on their last aligned pair. The whole array therefore runs in lock step. The
slowest CU sets the pace. The stall count in the end-to-end test measures that cost.

- **Systolic** (standard and pointwise layers). Column `c` computes output channels
  `g*M + c` of filter group `g`. CU row `r` computes output row `r` of the current
  band. Items enter at the left edge, one per row, and move one column to the right
  each step. Every column therefore sees the same input spikes, one step later than
  its left neighbour. Each item carries a *tag* that moves with it: the index of its
  tap and channel round. Each column uses the tag of the item it holds to look up its
  own weights in its weight register file.
- **Unicasting** (depthwise and pooling layers). Every CU gets its own item, cut
  from the row register file:
  - column `c` processes channel `sched_ch[c]`;
  - row `r` processes output row `r`;
  - the 4 PEs process 4 adjacent output pixels.
  
  An item is one kernel row (`ky`). Its index vector holds the K pixels of the
  window along x. Its weight vector is kernel row `ky` of that channel.

The output spikes are written straight from each firing PE into the output neuron
state buffer, as single-bit writes. The updated potentials go to the PE's own VMEM
bank.

## Data reuse in the data collection unit

Input spikes are stored as 8-channel words. The word for pixel (y, x) and channel group
g is at `ibase + (y*W + x)*CG + g`. The controller works in *bands* of
`nb = min(N, (16-K)/S + 1)` output rows. One band needs `(nb-1)*S + K` input rows.
These rows live in a 16-row register file. Input row `y` is kept in slot `y mod 16`.

- **Vertical reuse.** Two bands that follow each other overlap by `K-S` input rows.
  Those rows are kept. Only the rows not yet held are read from the buffer.
- **Horizontal reuse.** A row is read from the buffer once. Every window that covers
  a pixel reads the pixel from the register file by address, so the buffer sees no
  second read.

The weight register files hold one entry set per column:
- standard layers: the `K*K*CG` weight vectors of the column's filter;
- depthwise layers: the K kernel rows of the column's channel.

They are loaded from the weight buffer only while the array is empty, because items in
flight still read the old entries.

Weight buffer layout:
- standard: word `wbase + (f*K*K + ky*K + kx)*CG + g` holds the weights of input
  channels `8g..8g+7` for filter `f`;
- depthwise: word `wbase + ch*K + ky` holds kernel row `ky`, with weight `kx` in lane
  `kx`.

The VMEM bank of PE `l` in CU (r, c) holds the potential of its neuron at these words:
- standard: `vbase + (b*Wo + x)*G + g`;
- depthwise and pooling: `vbase + (b*XG + xg)*G + g`.

Here `b` is the band, `x` or `xg` the pixel or pixel group, and `g` the filter group
or channel round. Using different `vbase` values lets several layers keep their
potentials at the same time.

## Controller loops

Innermost loop first:

- **standard / pointwise:** channel round `cgi` (4 channel groups per round, one
  per PE), `kx`, `ky`, output pixel `x`, band, filter group `g`. A filter group's
  weights are loaded once for the whole map.
- **depthwise / pooling:** `ky`, pixel group `xg`, channel round `g`, band. A band's
  rows are loaded once for all channel rounds.

At the map edges, convolutions are padded with zeros on each side by `P = (K-1)/2`
("same" output size at stride 1). Pooling is not padded. When no item can be taken,
the controller sends bubbles until the array has drained.

## Workload scheduling

The number of spikes a channel produces varies a lot. A depthwise layer gives each
column one channel per round. If the column channels are unbalanced, the busiest one
stalls the whole array.

While a layer runs, the scheduling unit counts the output spikes of each channel. When
the layer ends, the scheduling unit runs. The lists below have `M` channels each: the
channels one channel round of the next layer gives the `M` columns.

1. **Sort.** A serial full-comparison sorter ranks every count against all the
   others, `M` at a time. It takes `M` cycles per round of `M` elements. Ties are
   broken by channel number.
2. **Regroup.** The sorted channels are dealt into `F/M` lists. Neighbours in the
   sorted order go to the same list, so each list has channels of similar load.
3. **Fine tune** (`sched_iters` passes). Neighbouring lists are compared by their
   largest element. Two lists swap places when the first is strictly larger. After
   step 2 the lists are already in order, so the passes run but find nothing to
   swap. They are kept so that the latency is the same as in the full algorithm.
4. **Adjust.** The scheduling table is read in groups of `M`, one group per channel
   round of the next layer.

Latency: `R*M + T*M*(R+1)` cycles, with `R = F/M` rounds and `T` fine-tuning passes. A
following depthwise layer with `cfg.sched_en = 1` reads its column channels from the
table. The channel count must be a multiple of `M`. Otherwise the table stays in the
identity order.

## Using it

Configure a layer in `layer_cfg_t`, then follow this sequence:

1. Write the weights through `hw_*`, and the input spikes of the first layer through
   `hn_*` into buffer A.
2. For each layer, set `cfg` and `pp_sel`, and pulse `start`. Hold `cfg` until `done`.
   - `pp_sel = 0`: A is the input, B the output. Alternate it from layer to layer.
   - Every output neuron writes its spike bit, 0 or 1, so the output region needs no
     clearing.
3. For the next time step, run the same layers again with `first_step = 0`.
4. Read the spikes back through `hn_rdata` (one cycle latency). Read the spike counts
   through `cnt_idx` / `cnt_val`.

To simulate one block, for example the top:

```
verilator --binary --timing --assert -Irtl rtl/cerebron_pkg.sv rtl/*.sv \
          tb/tb_cerebron_top.sv --top-module tb_cerebron_top
./obj_dir/Vtb_cerebron_top
```

Every testbench prints `TB_RESULT checks=<n> failures=<m>`. `tb/tb_cerebron_top.sv` runs
the accelerator at its default size. It runs five layers:
- a 3x3 standard convolution over two time steps;
- a pointwise convolution;
- a depthwise convolution using the schedule;
- 2x2 average pooling;
- a stride-2 depthwise convolution.

It checks every output spike and every potential against a behavioural model in the
testbench. It also counts the mechanisms used: systolic and unicast steps, partial-sum
hand-overs, skipped zero spikes and zero weights, stalls, padding, kept rows, bubbles
and scheduler comparisons. It fails if any of these never happened. Building takes
about a minute and a half, and the run takes under a second.

## Limits and departures

- **No fully connected layer type.** A fully connected layer can run as a pointwise
  layer on a 1x1 map if its inputs fit in 127 channel groups.
- **Pooling only with stride = window.** Pooling uses unicast items of one kernel
  row, at most 8 wide.
- **Standard convolutions:** `K*K <= 15` (in practice K <= 3), and
  `K*K*ceil(CG/4)*4 <= 576` weight vectors per column.
- **Scheduling covers only depthwise layers.** It reorders their channel to column
  assignment. For standard layers the assignment of channel groups to PEs is fixed.
- **Output spikes go directly to the buffer.** Firing PEs write straight into the
  neuron state buffer and the VMEM bank. They are not shifted out through the right
  edge of the array.
- **The v/h FIFOs of the data collection are a row register file read by address.**
  Every input word is still read from the buffer only once per band pass.
- **Sizes are this design's own:**
  - neuron state buffers: 16384 x 8 bits each;
  - weight buffer: 65536 x 64 bits;
  - VMEM buffer: 256 banks x 2048 x 16 bits;
  - row register file: 16 rows x 2048 words;
  - weight register files: 576 entries.
  
  The largest layer of a 32x32 MobileNet-style network fits; a 160x80x32 feature map
  does not.
- **Accumulation rate.** The PE adds one aligned pair per cycle. Firing uses
  `Vtemp >= Vth`.
- **The DMA engine and the host processor are not part of the RTL.** Their data paths
  are the `hw_*` / `hn_*` ports.
