# XpulpNN execute stage: sub-byte SIMD and threshold quantization for a RISC-V microcontroller core

Quantized neural networks run well with 4-bit or 2-bit weights and activations, but a
microcontroller whose smallest SIMD lane is 8 bits gains nothing from that. It has to
unpack every nibble to a byte before computing and pack results back afterwards, and
that overhead eats the savings. This RTL adds the missing hardware to the execute stage
of a small 4-stage in-order RISC-V core that already has 16-bit and 8-bit packed-SIMD
and dot-product instructions:

* **nibble (4-bit) and crumb (2-bit) SIMD arithmetic**: add, sub, avg, max, min,
  shifts and abs on 8 x 4-bit or 16 x 2-bit lanes of a 32-bit register;
* **nibble and crumb (sum-of-)dot products** in one cycle: 8 or 16 MACs per
  instruction, accumulated into a 32-bit register;
* **`pv.qnt.{n,c}`**, a multi-cycle instruction that turns two 16-bit MatMul results
  into two 4-bit (or 2-bit) activations. It compares each result against learned
  thresholds, which absorb bias and batch-norm, walking a binary search tree held in
  data memory.

With these, a quantized convolution's inner loop issues one dot-product instruction
per cycle at any precision, so 4-bit and 2-bit layers run 2x and 4x as many MACs per
cycle as 8-bit ones. The requantization step costs 9 (or 5) cycles per pair of outputs
instead of a branchy software tree search.

The block here is the execute-stage datapath, `xpulpnn_ex`. The rest of the core is
outside it: fetch, instruction decode and encodings, register file, load/store unit,
the baseline scalar units. It is reached through a decoded-operation port and a
data-memory port.

## Packed data and the operation set

A 32-bit register holds 2 x 16-bit (`VW_H`), 4 x 8-bit (`VW_B`), 8 x 4-bit (`VW_N`) or
16 x 2-bit (`VW_C`) elements, with element 0 in the least significant bits. The decode
stage hands the execute stage an `ex_op_t` (see `rtl/xpulpnn_pkg.sv`):

| field        | meaning                                                        |
|--------------|----------------------------------------------------------------|
| `unit`       | `EXU_ALU`, `EXU_DOTP` or `EXU_QNT`                             |
| `alu_op`     | add, sub, avg, avgu, max, maxu, min, minu, srl, sra, sll, abs  |
| `dotp_sign`  | `DOTP_UP` (u x u), `DOTP_USP` (rs1 unsigned x rs2 signed), `DOTP_SP` (s x s) |
| `accumulate` | sdot* form: result = dot product + rD                          |
| `scalar`     | `.sc` form: lane 0 of rs2 is copied to every lane              |
| `vw`         | lane width; `pv.qnt` uses `VW_N` or `VW_C`                     |

The field encodings are this design's own. They describe a decoded micro-operation,
not a RISC-V instruction word, and a decoder for the real instruction encodings still
has to be written.

ALU semantics per lane: add, sub and sll wrap within the lane. `avg` and `avgu` shift
the full carry-extended sum right by one, so they never overflow. Shift amounts use the
low log2(lane width) bits of the rs2 lane. `abs` of the most negative value returns
that value.

## Execute-stage pipeline (`xpulpnn_ex`)

```
 decode cycle                       | execute cycle(s)
 id_op/id_a/id_b/id_c               |
   .sc: replicate lane 0 of rs2 ----+--> ex_op/ex_a/ex_b --> simd_alu ----------+
   dot product: load ONLY the input |                    \-> quant_unit <-> mem |--> wb_result_o
   register of the selected width --+--> dotp region regs --> adder tree -------+
```

* Handshake: `id_valid_i`/`id_ready_o`. An operation moves into execute when both are
  high at a clock edge. Its result is on `wb_result_o` with `wb_valid_o` in the
  following cycle and is written back at the end of that cycle.
* ALU and dot-product operations occupy execute for one cycle and can issue back to
  back. A chain of `sdot` instructions into one register is a MatMul inner loop. The
  next `sdot`'s accumulator comes from the surrounding core's forwarding of
  `wb_result_o`, so there is no bubble.
* `pv.qnt` stays in execute until the quantizer is done and holds `id_ready_o` low
  meanwhile, which stalls the pipeline behind it. Its operands are rs1 = {act1, act0}
  (two signed 16-bit values) and rs2 = the address of act0's threshold tree.

## Dot-product unit (`dotp_unit`, `dotp_region`)

There is one region per lane width: 2, 4, 8 or 16 multipliers, each with its own adder
tree. No multiplier is shared between widths. Sharing would put operand
split-and-select logic in front of the multipliers. The nibble and crumb trees already
have the most partial products to add, and that path is close to the core-to-memory
critical path. The price is area.

Each element is extended by one bit, sign or zero by the op's signedness. The
multipliers therefore work on 17-, 9-, 5- and 3-bit two's-complement operands and the
signed, unsigned and mixed forms share one datapath. The sum, plus rD for `sdot*`,
wraps at 32 bits.

To keep the duplicated regions from burning power, each region has its own input
register, placed at the decode/execute boundary. That register loads only for
operations of its width, so idle regions see no operand toggles. In RTL this is a
load enable. On silicon it becomes an integrated clock-gating cell per region. Because
these registers *are* the pipeline register for dot products, they add no latency.

## Quantization unit (`quant_unit`)

### What it computes

A Q-bit output has 2^Q - 1 ascending thresholds t_0 <= ... <= t_(2^Q-2) per output
channel. The output is the number of thresholds the activation reaches:
`q = #{ i : act >= t_i }`, a staircase function. Binary search finds it in Q
comparisons, and the comparison results are the bits of q, most significant bit
first.

### Threshold layout in memory (software contract)

Each channel's thresholds are stored as a complete binary search tree in heap order,
as signed 16-bit halfwords:

```
node k (k = 1 .. 2^Q-1) at byte address  tree + 2*(k-1)
children of node k:                      2k (act <  thr) and 2k+1 (act >= thr)
node k at depth d = floor(log2 k) holds the sorted threshold of rank
        (2*(k - 2^d) + 1) * 2^(Q-1-d) - 1
```

For Q = 2 the tree is `[t1, t0, t2]`. For Q = 4 it is
`[t7, t3, t11, t1, t5, t9, t13, t0, t2, ...]`. The tree of the second activation
starts right after the first, at `entry + 2*(2^Q-1)`: 30 bytes on for nibble, 6 for
crumb. This fixed offset is wired into the unit, so one address operand serves both
activations. A kernel that quantizes output channels c and c+1 together stores their
two trees back to back. Both trees must fit in one 64-byte-aligned window:
`entry[5:0] + 4*(2^Q-1) <= 64`, which holds for any 64-byte-aligned entry. An
assertion checks it.

### Address update in 6 bits

The upper 26 address bits come straight from the entry operand. Only the low 6 bits
change. Going from node k to child 2k+b moves the address by
`2*(2k+b-1) - 2*(k-1) = 2*(k+b)` bytes, so the update is a 6-bit add of the node
index and the comparison bit.

### Pipelining and interleaving

Comparing a fetched threshold and forming the next address in the same cycle would
chain memory data, a 16-bit comparator, an adder and the memory address together, far
longer than the core's critical path. The unit splits them:

* **comparison region**: read data -> comparator -> result bit register;
* **address-update region**: result bit register -> 6-bit adder -> memory address.

That alone would halve throughput. The unit therefore processes two activations at
once and alternates between them. While one activation's threshold is being
compared, the other's next address is formed and requested. With a memory that grants
immediately and answers one cycle later, a nibble `pv.qnt` runs like this
(A = act0, B = act1, Lx = tree level):

| cycle     | 0     | 1     | 2     | 3     | 4     | 5     | 6     | 7     | 8     |
|-----------|-------|-------|-------|-------|-------|-------|-------|-------|-------|
| request   | A L1  | B L1  | A L2  | B L2  | A L3  | B L3  | A L4  | B L4  |       |
| compare   |       | A L1  | B L1  | A L2  | B L2  | A L3  | B L3  | A L4  | B L4  |
| `ready_o` |       |       |       |       |       |       |       |       | 1     |

That is 9 cycles for nibble and, by the same pattern, 5 for crumb. Cycle 0 is the
first execute cycle, which already sends the root request. The result comes out in
the last cycle, with act0's Q bits in `result_o[Q-1:0]` and act1's in
`result_o[2Q-1:Q]`.

### Control and stalls

A 3-bit state register (`IDLE`, `REQ_A`, `REQ_B`, `DRAIN`) records whose request is
next. Each activation also tracks:

* whether its request is outstanding;
* its tree level, node index and low address bits;
* its last comparison bit and its partial result.

Requests strictly alternate A, B, A, B, and each activation has at most one
outstanding, so in-order responses always belong to the activation whose turn it is.
A grant held low, for example by bank contention, just keeps the request and its
address stable until it is accepted. An assertion checks this. Comparator inputs are
forced to zero except in the cycle a threshold arrives (operand isolation), because
the comparator hangs directly off the load data path.

### Interface of `quant_unit`

`start_i` stays high, with `act_i`, `entry_i` and `crumb_i` stable, from the first
cycle until the cycle `ready_o` is high. The memory port is
`data_req_o/addr/we/be` with `data_gnt_i`, and `data_rvalid_i/data_rdata_i` come back
in order at least one cycle after the grant. Reads are 16-bit, with byte enables set
by address bit 1.

## Verification

Every testbench prints `TB_RESULT checks=<n> failures=<n>`.

| testbench        | what it does |
|------------------|--------------|
| `tb_simd_alu`    | every op x every width, corner operands and random ones, against an integer lane model |
| `tb_dotp_unit`   | 4000 back-to-back random dot/sdot products over all widths and signedness forms, checked in the cycle after issue. Also checks that an idle region's input register keeps its value |
| `tb_quant_unit`  | 800 random `pv.qnt.n`/`.c` with heap-ordered trees in a memory model, against a threshold count. Checks 9/5-cycle latency without stalls, correct results with 40 % grant stalls, and back-to-back issue |
| `tb_xpulpnn_ex`  | 20 000 random operations through the whole execute stage. Includes forwarded accumulator chains, pipeline stalls behind `pv.qnt` and memory grant stalls. Checks every result and the execute occupancy (1 cycle, or 9/5 for `pv.qnt`). Counts each mechanism and fails if one never happened |
| `tb_conv_layer`  | a full convolution layer: 16x16x32 input, 64 filters of 3x3x32, stride 1, pad 1, at 8, 4 and 2 bits. Checks all 16 384 outputs per width against a direct convolution plus threshold count, and the exact cycle count |

Cycle counts from `tb_conv_layer`, counting execute-stage cycles only: address
arithmetic, loads and loop control of a real kernel are not included.

| precision | dot products | `pv.qnt` | cycles    | MAC/cycle |
|-----------|--------------|----------|-----------|-----------|
| 8-bit     | 1 179 648    | -        | 1 179 648 | 4.0       |
| 4-bit     | 589 824      | 8 192    | 663 552   | 7.1       |
| 2-bit     | 294 912      | 8 192    | 335 872   | 14.0      |

`tb/tb_data_mem.sv` is a behavioural stand-in for the data memory: a word array with a
request/grant port, one-cycle read latency and optional random grant stalls.
`tb/tb_ref_pkg.sv` holds the reference models.

### Running with Verilator

From the repository root, for example the top-level test:

```
verilator --binary --assert -Wno-fatal --top-module tb_xpulpnn_ex \
  rtl/xpulpnn_pkg.sv rtl/simd_lanes.sv rtl/simd_alu.sv rtl/dotp_region.sv \
  rtl/dotp_unit.sv rtl/quant_unit.sv rtl/xpulpnn_ex.sv \
  tb/tb_ref_pkg.sv tb/tb_data_mem.sv tb/tb_xpulpnn_ex.sv
./obj_dir/Vtb_xpulpnn_ex
```

The unit testbenches need only the package and their unit's files, plus
`tb_data_mem.sv` for `tb_quant_unit`. `tb_conv_layer` takes about two seconds.

## Design choices and limits

Three parts follow the published description of the extension directly:

* the per-width multiplier regions with private adder trees, gated input registers
  and one-cycle latency;
* the instruction set;
* the quantizer's structure: split comparison and address-update regions, two
  interleaved activations, a fixed offset to the second tree, a 6-bit address update,
  a 3-bit state machine, operand isolation, and 9/5-cycle latency.

These were chosen here:

* decoded-operation format and handshake; no instruction decoder;
* usp means rs1 unsigned, rs2 signed, as the mnemonic reads. Each region has
  independent signedness inputs, so the opposite order needs only a decode change;
* heap-ordered tree layout, `>=` comparison, and result packing in the low 2Q bits;
* the 64-byte window rule for threshold placement;
* avg without overflow and shift amounts masked to the lane size;
* a request/grant/rvalid data port with in-order responses;
* asynchronous active-low reset.

Not included: the baseline core around the execute stage, its load/store unit (the
quantizer's port must be multiplexed into it), the instruction encodings, and the SoC
used for evaluation (memory, DMA, peripherals). Clock gating appears only as register
enables. Power and area were not characterized.
