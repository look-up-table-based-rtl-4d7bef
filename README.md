# Predict-slot extension for LUT-based neural network inference

Some binarized neural networks are built entirely from 6-input, 1-output neurons.
Each neuron is a Boolean function of six bits, so it can be stored as a 64-entry
truth table plus the addresses of the six bits it reads. Trained this way, a network
maps one-to-one onto FPGA 6-LUTs, but a large network needs more LUTs than a device
has. A general-purpose CPU does not have that limit, but it needs dozens of
instructions per neuron.

This RTL adds the hardware a VLIW processor needs to evaluate such networks
quickly:

* **IOMem**, a 4096 × 1-bit register file. It holds the network's binary inputs and
  the output of every neuron. A neuron's output goes back into IOMem, where the
  next layer's neurons read it.
* One **LUT data memory** per predict slot (2048 × 136 bits). Each word describes
  one neuron.
* **Predict slots.** Each slot evaluates one neuron per clock. It reads the neuron's
  configuration, fetches the neuron's six input bits from IOMem, looks up the
  output bit in the truth table, and writes it back to IOMem.
* A decoder for four added instructions: *predict*, *DM store*, *IOMem store* and
  *IOMem read*. All four sit in a 512-bit instruction word.

With 8 slots (the default), one instruction word evaluates 8 neurons. A 2580-neuron
network therefore needs 323 predict words and no stall cycles.

The host processor is not part of this RTL. That covers its fetch unit, program
memory and scalar datapath. Its fetch stage is represented by the 512-bit `instr_i`
input of the top module, `lutnn_asip`.

## Neuron configuration word (136 bits)

```
 135            64 63               0
+----------------+------------------+
| sel[5] .. sel[0]|  lut[63:0]       |
+----------------+------------------+
 sel[i] = IOMem address (12 bits) of input i, at bits [64+12i +: 12]
```

The output of a neuron is `lut[{in5, in4, in3, in2, in1, in0}]`, where `in_i` is
IOMem bit `sel[i]`. Input 0 is the least significant bit of the index. For example,
inputs (in5..in0) = 100101 select `lut[37]`.

In lutnn_pkg this word is the type `lut_cfg_t`. A data memory word holds exactly
this. A 256-bit memory alignment would leave 120 bits unused; those bits are not
stored here.

## Instruction word

The field widths follow the published design: 24-bit predict fields, so up to 21
fit in 512 bits, and DM stores made of three 64-bit groups. The header and the field
positions are this design's own. They are defined in `rtl/lutnn_pkg.sv`:

| bits | meaning |
|------|---------|
| 511:509 | opcode: 0 no-op, 1 predict, 2 DM store, 3 IOMem store, 4 IOMem read |
| 508:504 | `count`: fields 0 .. count-1 are active |
| 24k+23 : 24k | field k (predict / IOMem store / IOMem read) |

* **Predict**: field k = `{lutNumber[11:0], outputAddr[11:0]}`. Slot k reads
  configuration `lutNumber` from *its own* data memory and writes the neuron's
  output to IOMem bit `outputAddr`. The data memories are 2048 deep, so only the low
  11 bits of `lutNumber` are used.
* **DM store**: up to two stores per word (`count` = 1 or 2).
  * Store j's data is bits `[192j +: 192]`, made of `{dataH0, dataL1, dataL0}`. Its
    low 136 bits are the configuration; the rest are ignored.
  * Store j's target is field `[384 + 24j +: 24]`. Bits 20:16 give the DM number
    (the slot) and bits 11:0 the address.
  * If both stores name the same memory, store 1 is written.
* **IOMem store**: up to `IO_SLOTS` (8) fields. Each field holds `{value at bit 12,
  address[11:0]}`.
* **IOMem read**: up to 8 fields, each holding `address[11:0]`. The results come
  out on `rd_valid_o / rd_addr_o / rd_data_o`, one bit per field.

The builder functions in `tb/lutnn_tb_pkg.sv` (`hdr`, `set_predict`,
`set_dm_store`, `set_io_store`, `set_io_read`) show how to assemble words.

## Pipeline and the scheduling rule

There are five stages: IF, ID, EX, MEM and WB. The predict path uses them as
follows:

| stage | predict slot | IOMem store / read |
|-------|-------------|--------------------|
| IF  | `instr_i` latched into the instruction register | same |
| ID  | decode; data memory addressed by `lutNumber`; **DM stores written** | decode |
| EX  | configuration available; 6 IOMem read ports per slot | IOMem read (read instr.) |
| MEM | 64:1 predict multiplexer | — |
| WB  | **IOMem write** of the output bit | IOMem write (store); `rd_*` valid (read) |

Timing is counted from the cycle t in which a word is on `instr_i`:

* IOMem writes from predict and IOMem store happen at the end of cycle t+4. The new
  bit is visible to any instruction that reads IOMem from cycle t+5 on. That is the
  5-cycle latency.
* IOMem read results are on `rd_*` during cycle t+4.
* DM stores are written at the end of cycle t+1, so a predict in the very next word
  already sees them.
* A new word is accepted every cycle. Nothing ever stalls.

**There is no interlock and no forwarding.** An instruction reads IOMem in EX.
So a predict or read that needs a bit written by an earlier predict or store must be
issued **at least 3 words after it**; place no-ops or independent work in between.
This follows from the published cycle counts, which are exactly
⌈neurons / slots⌉, and matches the VLIW model of leaving scheduling to the compiler.

Evaluating a layered network in neuron order normally meets the rule without
no-ops. For example, take the 60 three-level classifiers described below and issue
their neurons in order: every neuron is at least 3 words after its inputs, even
with 21 slots.

If several slots write the same IOMem bit in one cycle, the highest-numbered slot
wins.

Simulation assertions in `lutnn_asip` catch program errors the hardware would
otherwise ignore silently: more active fields than slots, a DM store naming a
memory that does not exist, or an unknown opcode. The scheduling rule above is
not asserted, because reading a bit's old value shortly after a write is legal.

## Running a network

1. Put neuron g in data memory `g mod SLOTS` at address `g div SLOTS`. Load the
   memories with DM stores, two per word.
2. Load the input bits with IOMem stores, 8 per word.
3. Wait 3 words (the scheduling rule). Then issue predicts in neuron order:
   word w carries neurons `w·SLOTS … w·SLOTS+SLOTS-1`, with field k in slot k.
4. Wait 3 words. Then read the outputs with IOMem reads.

Both network testbenches use a network of 60 classifiers, giving 2580 neurons in
all. Each classifier has three levels:

* 36 first-level neurons, each reading six of 512 input features;
* 6 second-level neurons, each reading six first-level outputs;
* 1 output neuron.

The predict phase takes these numbers of words:

| SLOTS | predict words |
|-------|---------------|
| 2  | 1290 |
| 3  | 860  |
| 4  | 645  |
| 8  | 323  |
| 21 | 123  |

These counts are those reported for the published processor. With 21 slots, 21
predict fields of 24 bits use 504 of the 512 instruction bits.

## Parameters

| module | parameter | default | meaning |
|--------|-----------|---------|---------|
| `lutnn_asip` | `SLOTS` | 8 | predict slots (and data memories), 1 … 21 |
| `lutnn_asip` | `IO_SLOTS` | 8 | IOMem store / read fields per word, 1 … 21 |
| `lutnn_asip` | `IOMEM_DEPTH` | 4096 | IOMem bits (at most 4096: 12-bit addresses) |
| `lutnn_asip` | `DM_DEPTH` | 2048 | configurations per data memory (at most 4096) |

IOMem gets `6·SLOTS + IO_SLOTS` read ports and `SLOTS + IO_SLOTS` write ports.
It is built from flip-flops, because every slot needs six independent single-bit
reads per cycle. The data memories have one synchronous read port and one write
port each, so they map onto block RAM.

## Modules

| file | module | role |
|------|--------|------|
| `rtl/lutnn_pkg.sv` | package | widths, `lut_cfg_t`, opcodes, per-slot operation structs |
| `rtl/lutnn_asip.sv` | `lutnn_asip` | top: instruction register, decoder, slots, IOMem, store/read pipeline |
| `rtl/instr_decode.sv` | `instr_decode` | 512-bit word → per-slot operations |
| `rtl/predict_slot.sv` | `predict_slot` | one slot: its data memory, EX/MEM/WB registers, multiplexer |
| `rtl/lut_dm.sv` | `lut_dm` | 136-bit-wide data memory, 1R1W, synchronous read |
| `rtl/iomem.sv` | `iomem` | multi-ported 1-bit register file |
| `rtl/predict_mux.sv` | `predict_mux` | 64:1 truth-table lookup |

## Simulation

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and ends with `$finish`.

| testbench | what it checks |
|-----------|----------------|
| `tb_predict_mux` | every index of random truth tables |
| `tb_lut_dm` | fill and read back the whole depth; 1-cycle read; read-enable hold; old data on collision |
| `tb_iomem` | random multi-port traffic against a model, including same-bit write collisions; reset |
| `tb_predict_slot` | back-to-back predicts against a reference neuron; write-back exactly 3 cycles after ID |
| `tb_instr_decode` | random words of every kind against the layout |
| `tb_lutnn_asip` | default-size top: reset, 5-cycle latency, write priority, both stores to one memory, then the full 2580-neuron network in 323 words, every output and input bit read back |
| `tb_lutnn_slots` | the same network on 2-, 3-, 4- and 21-slot instances (uses `tb/lutnn_net_runner.sv`) |

To run one with Verilator (from the directory that holds `rtl/` and `tb/`):

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  --top-module tb_lutnn_asip -y rtl -y tb +libext+.sv -Irtl -Itb \
  rtl/lutnn_pkg.sv tb/lutnn_tb_pkg.sv tb/tb_lutnn_asip.sv
./obj_dir/Vtb_lutnn_asip
```

Replace the top module and the last file to run the others. Each testbench
builds in seconds and runs in well under a second.

## What follows the published design, and what does not

Taken from the published design:

* the four instructions;
* a 4096 × 1 IOMem, with each bit addressable on its own;
* one 1-read/1-write data memory per slot, 2048 × 136;
* the 136-bit configuration: 72 bits of input addresses above a 64-bit table;
* a 12-bit `lutNumber` and a 12-bit `outputAddr` per 24-bit predict field;
* two 192-bit DM stores per word;
* 8 IOMem store slots;
* 8 predict slots (a 21-slot build is described as the maximum);
* one neuron per slot per cycle;
* the 5-cycle latency and the stage in which each step happens.

Chosen here, because the published description does not give it:

* the instruction encoding: opcode header, `count` and field positions;
* the order of `lutNumber` and `outputAddr` inside a field;
* the placement of input i at configuration bits `64+12i`;
* the width and timing of the IOMem read instruction;
* the DM-number field of a DM store;
* write priority between slots;
* reset values;
* synchronous data-memory reads;
* the absence of hazard detection.

Two points of the published description disagree with each other:

* **Depth of the data memories.** The 12-bit `lutNumber` could address 4096
  configurations, but the data memories are drawn 2048 deep. 2048 is used here and
  `DM_DEPTH` can be raised to 4096.
* **Configuration width.** One passage says the top 64-bit group of a DM store
  carries 12 relevant bits, which would give 140 bits. Everywhere else the
  configuration is 136 bits, and 136 is used.

Not provided:

* the host VLIW processor (fetch, branch, scalar registers and memory);
* any compiler or assembler flow.

The published FPGA resource numbers (LUTs, flip-flops, BRAM) describe a whole
processor. They cannot be compared with this extension alone.
