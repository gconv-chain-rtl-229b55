# A CNN accelerator that runs every layer as a chain of general convolutions

Convolution accelerators are very good at multiply-and-accumulate loops. Modern CNNs, however, are
full of other layers: pooling, batch normalisation, element-wise arithmetic, concatenation, ReLU and
so on. A convolution-only engine has to hand those layers to a host CPU or to dedicated side units,
and most of the run time and energy goes there. This design takes a different approach. Every layer
is written as one or more **GCONVs** (general convolutions). A GCONV is a convolution loop nest whose
multiply and add are replaced by programmable operators. A whole network then becomes a **GCONV
chain** that runs on one unmodified convolution engine.

The RTL in `rtl/` builds this idea on an Eyeriss-style array:

- 12 × 14 processing elements (PEs);
- per PE, a 12-entry input scratchpad (ILS), a 224-entry kernel-parameter scratchpad (KLS) and a
  24-entry output scratchpad (OLS);
- a 100 kB data global buffer and an 8 kB kernel-parameter global buffer;
- an instruction front end that decodes one GCONV while the previous one runs.

## The GCONV model

A 1-D GCONV has four loop parameters:

| parameter | meaning |
|-----------|---------|
| `g`   | groups: independent slices of input and output |
| `op`  | kernels per group: outputs that read the same inputs |
| `opc` | outputs per kernel: positions the kernel slides over |
| `ks`  | kernel size: inputs that reduce into one output |

A 4-D GCONV repeats these four loops in each data dimension B (batch), C (channel), H and W, for 16
loops in all. Each dimension also has a stride `s` and a padding `ps`. For one dimension, with indices
`g, op, opc, ks`:

```
input  position = g*Nipc + opc*s - ps + ks         Nipc = (Nopc-1)*s + Nks - 2*ps
kernel position = (g*Nop + op)*Nks + ks
output position = (g*Nop + op)*Nopc + opc
```

Four operators say what happens on this loop nest:

| operator | where it acts | built operations |
|----------|---------------|------------------|
| pre    | each input, as it is loaded into a PE     | none, `(x*imm)>>>sh`, `x+imm`, `x&imm`, `x*x`, LUT, `x>>>sh` |
| main   | input × kernel parameter, in each PE      | pass, mul, add, sub (input−parameter), and, square, max, min |
| reduce | combines main results of one output       | none (keep the latest), add, max, min |
| post   | each output, before it is written back    | same set as pre |

Some examples:

- A convolution is `main=mul, reduce=add`.
- 2×2 max pooling is `ks=2, s=2` in H and W with `reduce=max`.
- A channel mean is `ks=C` in dimension C, `reduce=add`, then `post=(x*85)>>>8` for C=3.
- A batch-norm subtraction takes the mean as its kernel parameters: `main=sub`, with kernel size 1
  and the channel loop as `opc`.

Widths:

- Stored data is 8 bit.
- Main results are 16 bit, saturated.
- Reduce and post results are 32 bit.
- The pre result, held in the ILS, is 16 bit, so that a squared input fits.
- Outputs are saturated to 8 bit on write-back.

## Mapping: unrolling lists

A compiler decides which loop runs where. It writes this as four **unrolling lists**, each an ordered
set of entries `{parameter, dimension, unrolling factor, argument}`:

| list | unrolled over |
|------|---------------|
| `py` | the PE rows (spatial) |
| `px` | the PE columns (spatial) |
| `LS` | time, with the operands kept in the local scratchpads |
| `GB` | time, outermost, with operands re-read from the global buffer |

One parameter may be split over several entries, even across lists. The decoder gives every entry an
index weight: the product of the factors of the earlier entries of the same parameter, in the order
py, px, LS, GB. The index of a parameter is then the sum, over its entries, of counter × weight. The
`argument` is the parameter's full extent. Loop points that the rounded-up factors reach beyond the
argument are suppressed.

Two properties of the array shape the mapping rules:

- **Vertical reduce.** Partial results can move only down the columns, over the row-to-row links.
  Kernel-size entries placed in `py` form groups of `red_rows` = (product of their factors)
  consecutive rows. The partial results of a group are folded into its last row. So `ks` entries
  must come first in the `py` list.
- **Scratchpad slots.** Inside a PE, the LS loops address the scratchpads. An LS entry moves the
  ILS slot unless it is an `op` loop, because inputs are shared by all kernels. It moves the KLS slot
  unless it is an `opc` loop, because parameters are shared by all positions. It moves the OLS slot
  unless it is a `ks` loop, because all kernel positions reduce into one output. The compiler must
  keep each product within the 12/224/24 entries.

`ks` entries in GB make partial sums persist across outer iterations. The OLS is cleared only when
every GB kernel-size counter is zero. Outputs are written only when every one of those counters is at
its maximum. GB `ks` entries must therefore be inside (listed before) every GB entry that changes the
outputs.

## Instruction formats

The host fills three instruction buffers. All of them are cleared by reset, and an all-zero entry is
a delimiter.

**Basic-information buffer, 64-bit entries.** Bits `[63:61]` give the entry kind. The payload sits
in the low bits:

| kind | payload |
|------|---------|
| 1 STRIDE | `{s_B,s_C,s_H,s_W, ps_B,ps_C,ps_H,ps_W}`, 4 bits each |
| 2 PRE, 3 MAIN, 4 REDUCE, 5 POST | `{opcode[2:0], imm[15:0], shift[4:0]}` |
| 6 PROD | `{in_id[5:0], k_id[5:0], out_id[5:0]}`: tensor IDs of the input, the kernel parameters and the output |
| 0 | end of this GCONV's basic information |

Fields that a GCONV does not set default to stride 1, padding 0 and no operator.

**Unrolling-list buffer, 32-bit entries.** The layout is
`{ud[31:29], p[28:27], d[26:25], uf[24:13], arg[12:1], 0}`:

- `ud` is the list: 1 py, 2 px, 3 LS, 4 GB.
- `p` is the parameter: 0 ks, 1 opc, 2 op, 3 g.
- `d` is the dimension: 0 B, 1 C, 2 H, 3 W.

Each GCONV has its four lists in the order py, px, LS, GB, each closed by a zero entry. An empty
list is a lone zero entry.

**Output-address buffer, 64 × 17 bit.** It is indexed by tensor ID. The host writes the addresses of
the external tensors. The decoder writes the address it allocates for each GCONV output. The
allocation is a bump pointer that starts at `alloc_start` and wraps back to it when an output would
run past the data region. Nothing is ever freed: the host must choose `alloc_start` and the chain so
that a live tensor is never overwritten.

The global buffer is one address space:

- bytes 0 … 102399 are the data region;
- bytes 102400 … 110591 are the kernel region.

A GCONV can read its kernel parameters from either region, so a result of an earlier GCONV can serve
as parameters. Tensors are stored densely in B, C, H, W order, with W innermost. Within each
dimension the order is `g`, then `op`, then `opc` or `ks`.

## How one GCONV executes

Set-up (`gconv_decoder`):

- It reads one instruction entry per cycle.
- It then spends four cycles deriving extents and strides, looking up the producers' addresses and
  allocating the output.
- A GCONV with `b` basic-information entries and `u` list entries takes `b + u + 4` cycles.
- The decoded configuration waits in a register stage (`cfg_valid`/`cfg_take`). The next GCONV is
  therefore decoded while the engine still runs the current one.

Execution (`gconv_engine_ctrl`) uses four programmable loop counters, one per list. A level wraps when
its counter reaches its unrolling factor; this is the comparison-driven state machine of the design.
For every GB iteration it runs:

1. **START.** Clear the OLS to the reduce identity (0, the minimum or the maximum) if a new set of
   outputs begins.
2. **FILL.** Walk LS × px × py, one loop point per cycle. For each point the data loader reads the
   input and the kernel parameter. It applies the pre operator to the input, and one cycle later
   writes both into the slots of that PE. Padding and out-of-range points write an invalid ILS
   entry, which the PE skips, so padding is neutral for every reduce operator.
3. **CMP.** Walk LS once. All PEs do `OLS[o] = reduce(OLS[o], main(ILS[i], KLS[k]))` in lock-step.
4. **DRAIN**, only when the outputs are complete and `red_rows > 1`. For each fold step and OLS slot,
   every row that is not the first of its group adds in the partial result of the row above. This
   takes one cycle per (step, slot).
5. **WB.** Walk LS × px × py again. For each point owned by the last row of its group, apply the post
   operator (the LUT included), saturate to 8 bit and write one byte to the global buffer.
6. **NEXT.** Advance the GB list. When it wraps, pulse `gconv_done` and take the next configuration.

A GCONV costs about `GB × (2·LS·px·py + LS + drain + 3)` cycles, plus its set-up when that cannot be
hidden. The end-to-end test runs a five-GCONV chain in 2,467 cycles.

## Module map

| module | role |
|--------|------|
| `gconv_pkg` | widths, enums, instruction entry structs, decoded configuration struct |
| `gconv_top` | the accelerator: host ports, buffers, decoder, engine, loader, array, LUT |
| `gconv_instr_mem` | one instruction buffer (used three times) |
| `gconv_decoder` | set-up state machine, weights, geometry, allocation |
| `gconv_engine_ctrl` | execution state machine, post operator, write-back |
| `gconv_loop_counter` | programmable loop nest of one unrolling list, with 16-way index routing |
| `gconv_addr_gen` | input / kernel / output addresses and range checks for a loop point |
| `gconv_data_loader` | global buffer → PE transfer, with the pre operator |
| `gconv_pe_array` | PY × PX PEs, data-bus write decode, vertical links, read-out mux |
| `gconv_pe` | ILS / KLS / OLS, main unit, reduce unit |
| `gconv_main_unit`, `gconv_reduce_unit`, `gconv_pointwise` | the operators |
| `gconv_lut` | 256 × 32-bit table for LUT pre/post operations (two read ports) |
| `gconv_glb` | global buffer: two synchronous read ports, one write port |

### Top-level interface (`gconv_top`)

All ports are synchronous to `clk`. `rst_n` is an asynchronous, active-low reset.

- `host_ib_we/sel/addr/wdata` write the instruction buffers: `sel` 0 selects basic information,
  1 the unrolling lists, 2 the output addresses.
- `host_lut_we/addr/wdata` write the LUT.
- `host_glb_we/re/addr/wdata/rdata` access the global buffer while `busy` is low. Read data arrives
  one cycle after `re`.
- `start` (a pulse) with `n_gconv` and `alloc_start` runs a chain.
- `busy` is high until the last GCONV is written back. `gconv_done` pulses after each GCONV.
  `chain_done` pulses at the end of the chain.

## Where this design departs from the architecture it follows

What the RTL takes from the architecture:

- the GCONV loop model and its four operators;
- the Eyeriss sizes listed above;
- three instruction buffers with all-zero delimiters;
- set-up at one entry per cycle, overlapped with execution;
- the comparison-driven loop controller with a 16-way index mux;
- vertical-only reduction;
- the data widths.

Own choices, and things not built:

- **Formats.** All instruction encodings, field widths and buffer depths are this design's own.
- **Nipc.** The input extent uses `Nipc = (Nopc−1)·s + Nks − 2·ps`, which makes a stride-1,
  one-output GCONV read exactly `Nks` inputs.
- **Temporal lists.** The architecture keeps one temporal list with separate boundaries for the
  input, output and kernel scratchpads. Here a single LS/GB split is used for all three operands.
- **Layout.** It is fixed at B, C, H, W. The architecture can move a dimension to the front of a
  tensor's layout, to match how its producer generated it. That is not built. Chains therefore have
  to be mapped so that they read the fixed layout.
- **Fill bandwidth.** The data bus writes one PE per cycle. There is no multicast to a row or
  column. There is no diagonal input sharing of the row-stationary dataflow, and a sliding window
  does not reuse its overlapping inputs. Results are the same; loading takes more cycles.
- **Global-buffer bandwidth.** It is one input, one parameter and one output per cycle. The
  reference configuration reads and writes outputs and parameters four words at a time.
- **Pre/post parameters.** Pre and post operators take one immediate. When layers are fused, a
  pre/post operator can need one parameter per element (for example a per-channel batch-norm
  scale). Reading those parameters from memory is not built.
- **Dimensions.** Only four dimensions (B, C, H, W) exist. Time (3-D CNNs) and capsule-vector
  dimensions would need a fifth set of loops.
- **Off-chip memory.** There is no off-chip memory interface. The host moves tensors in and out of
  the global buffer between chains. A full ImageNet-size network therefore has to be tiled by the
  host: a 224×224×3 input alone is larger than the 100 kB data region.
- **Field limits.** Loop arguments and unrolling factors are 12 bit (at most 4095). Strides and
  padding are 4 bit.

How far to trust it: each block has a self-checking testbench against an independent model. The
end-to-end test compares every output of a five-GCONV chain with a behavioural GCONV model written
straight from the loop definition above. That model does not share code with the RTL. The mapping
rules above are not checked in hardware: a list that breaks them gives wrong results without any
error flag.

## Simulating

Every testbench is self-checking. It prints `TB_RESULT checks=N failures=M` and ends with `$finish`.
With Verilator 5:

```
verilator --binary --timing -Irtl rtl/gconv_pkg.sv tb/tb_gconv_top.sv --top-module tb_gconv_top -y rtl
./obj_dir/Vtb_gconv_top
```

Replace `tb_gconv_top` with any testbench in `tb/`:

- `tb_gconv_main_unit`, `tb_gconv_reduce_unit`, `tb_gconv_pointwise`, `tb_gconv_lut`;
- `tb_gconv_pe`, `tb_gconv_pe_array`;
- `tb_gconv_glb`, `tb_gconv_instr_mem`;
- `tb_gconv_loop_counter`, `tb_gconv_addr_gen`, `tb_gconv_decoder`, `tb_gconv_data_loader`.

`tb_gconv_top` runs the accelerator at its full default size. It builds in well under a minute and
runs in a fraction of a second. It also counts the mechanisms it exercises:

- padding skips;
- partial sums carried across outer iterations;
- vertical drain steps;
- LUT post operations;
- cycles where decoding overlapped execution;
- write-backs.

It fails if any of them never happens.

`tb_gconv_mobilenet_block` runs a MobileNet-style block at full size, on a tile of 4 images × 4
channels × 6 × 6. The block is a depthwise 3×3 convolution, then batch normalisation over the
mini-batch as four GCONVs, then ReLU, then a 4→8 pointwise convolution. The four batch-norm GCONVs
are:

- the mean;
- the subtraction of the mean;
- a sum of squares with a 1/√ lookup;
- the scaling.

This chain takes 25,676 cycles.

`tb_gconv_bn_training` runs a batch-norm layer for training as ten GCONVs, on the same tile size.
There are four forward GCONVs: the mean, `t1 = x − mean`, `t2 = 1/√(Σt1²)` through the lookup
table, and `y = t1·t2`. There are six backward GCONVs, which compute the input gradient from the
output gradient. They include two more reductions over the batch and element-wise products and
differences. The operands of those element-wise steps are tensors produced earlier in the chain.
This chain takes 11,697 cycles.

To write a new chain, follow the tasks `emit_bi` and `ue` in `tb/tb_gconv_top.sv`. They show how a
GCONV description turns into buffer entries.
