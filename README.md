# A four-lane multiply-accumulate accelerator for neural-network layers

Almost all of the arithmetic in a fully connected neural-network layer is the
weighted sum of a neuron, `sum_i w_i * x_i`, evaluated once per neuron with the
same inputs `x` and a different set of weights `w`. This accelerator exploits
both facts:

* the **inputs of a layer are loaded once** into a dedicated 16-entry input
  register file and stay there while neuron after neuron is computed;
* **four multipliers work in parallel**, and their four 64-bit products are
  summed together with the running sum in a single 4-input adder, so one
  instruction evaluates four input-weight products of a neuron in one clock
  cycle.

An n-input neuron therefore takes `ceil(n/4)` multiply-accumulate (MAC)
instructions, against n for a processor that does one 32-bit MAC per
instruction:

| neuron inputs n | 2 | 4 | 6 | 8 | 10 | 12 | 14 | 16 |
|---|---|---|---|---|---|---|---|---|
| MAC instructions | 1 | 1 | 2 | 2 | 3 | 3 | 4 | 4 |

The testbench checks these counts and the resulting sums. As in the
published benchmark, the counts leave out loads. The activation function
that follows the weighted sum is not part of the accelerator.

## Register set and lanes

| registers | size | role |
|---|---|---|
| I0..I15 | 16 x 32 bit | layer inputs, four groups of four |
| W0..W3 | 4 x 32 bit | weights; Wk belongs to lane k |
| O0..O7 | 8 x 32 bit, also 4 x 64 bit | results; pair k is O(2k+1):O(2k), low half in the even register |
| address | 32 bit | memory word address for loads |

The datapath has four **lanes**. Lane k owns input group k (I(4k)..I(4k+3)),
weight Wk, multiplier k and output pair k. Only one register of each input
group is visible at a time. A 2-bit **input select `s`** picks it, so lane k
always sees `I(4k+s)`:

```
s = 0:  lane0 I0   lane1 I4   lane2 I8   lane3 I12
s = 1:  lane0 I1   lane1 I5   lane2 I9   lane3 I13
s = 2:  lane0 I2   lane1 I6   lane2 I10  lane3 I14
s = 3:  lane0 I3   lane1 I7   lane2 I11  lane3 I15
```

Every lane has a signed 32 x 32 -> 64-bit multiplier. One **split adder**
follows them and has two configurations:

* **lane mode**: four independent additions `I(4k+s) + Wk`. Each 33-bit
  result is sign-extended to 64 bits.
* **tree mode**: one 4-input 64-bit addition of the four products, plus the
  accumulator O1:O0 (or zero). The 64-bit sum wraps modulo 2^64.

In front of each output pair a selector picks either the lane's product or
the adder output.

## Operations

| op | effect | cycles |
|---|---|---|
| `OP_MOV_I` | `I[dst] <- I[src]` | 1 |
| `OP_MOV_W` | `W[dst] <- W[src]` | 1 |
| `OP_MOV_ADDR` | `address <- imm` | 1 |
| `OP_LD_I` | `count` words from `mem[address..]` into `I[dst], I[dst+1], ...` (wraps at 16); address steps by one per word | count x (latency + 1) |
| `OP_LD_W` | the same into `W[dst], ...` (wraps at 4) | count x (latency + 1) |
| `OP_MUL` | for each lane k in `lanes`: `O(2k+1):O(2k) <- I(4k+s) * Wk` | 1 |
| `OP_ADD` | for each lane k in `lanes`: `O(2k+1):O(2k) <- I(4k+s) + Wk` | 1 |
| `OP_MAC` | `O1:O0 <- (clr ? 0 : O1:O0) + sum_k I(4k+s) * Wk`, repeated `count` times with `s` stepping by one (mod 4) each step | count |

`s` is `src[1:0]`. The lane mask `lanes` is usually one bit (a single-lane
multiply or add) or `4'b1111` (all four lanes at once). Other masks also
work. A `count` of 0 means 1.

### How a neuron is mapped

The MAC step with select `s` multiplies `I(s), I(4+s), I(8+s), I(12+s)` by
`W0..W3`. To compute neuron input j in step `j/4`:

* place input `x_j` in register `I(4*(j%4) + j/4)`;
* before step `j/4`, load the four weights of that step into `W0..W3`, with
  weight `w_j` in `W(j%4)`.

A 16-input neuron is then:

```
MOV_ADDR inputs ; LD_I dst=0 count=16        (once per layer)
for s in 0..3:
    MOV_ADDR weights+4s ; LD_W dst=0 count=4
    MAC src=s count=1 clr=(s==0)
result: O1:O0
```

The **repeated MAC** (`count` > 1) steps through `s` while the weights stay
fixed. It computes `sum_k Wk * (I(4k+s0) + ... )` in `count` cycles, one
instruction for up to all sixteen inputs. This fits layers whose weights are
shared across input groups. For a general neuron, use one MAC per weight
load, as above.

## Instruction format and interfaces

Instructions are `ann_pkg::instr_t`, a packed 54-bit struct. From the most
significant bit down:

| field | bits | use |
|---|---|---|
| `op` | 4 | `opcode_e` |
| `dst` | 4 | destination or first load index |
| `src` | 4 | move source; `[1:0]` is `s` |
| `lanes` | 4 | lane mask of MUL and ADD |
| `count` | 5 | repeat count of loads and MAC |
| `clr` | 1 | the MAC starts from zero |
| `imm` | 32 | address immediate |

Ports of `ann_accel`:

* **Instructions**: `instr_valid` / `instr_ready` / `instr`. An instruction is
  accepted at the rising edge where both are high. `instr_ready` is high
  whenever the accelerator is idle. During a repeated MAC or a load it is low,
  and `busy` is high. Move, MUL and ADD complete at the accept edge. A MAC
  with count c accepts its next instruction c cycles later.
* **Memory**: `mem_req` is a one-cycle pulse with `mem_addr`. The memory
  answers with a one-cycle `mem_rvalid` and `mem_rdata`, any number of cycles
  later (at least one). Only one request is outstanding at a time. The
  controller asserts this protocol with two concurrent assertions. There is no
  store path: results are read from `out_regs`.
* **Observation**: `out_regs` shows O0..O7 and `addr` shows the address register.
* **Reset**: `rst_n`, asynchronous and active low, clears every register.

All sizes are parameters of the leaf modules. The top takes them from
`ann_pkg`: 4 lanes, 32-bit data, 16 inputs, 4 weights, 8 outputs and a
32-bit address.

## Where this RTL makes its own choices

The register set, the lanes, the split adder and the operation list follow
the published architecture. These points are this design's own:

* The instruction encoding, both handshakes, one-word address steps during
  loads, and reset.
* **The MAC result is 64 bits, held in O1:O0.** The operation table names
  O0..O3 as the MAC destination. The adder, however, is a 64-bit adder with a
  64-bit output bus, so O2 and O3 are left unchanged by a MAC.
* **The `clr` bit.** How a new sum starts is not specified, so a MAC can begin
  from zero.
* **Lane-mode adds are widened.** The adds are 32-bit, but their destination
  is a register pair, so the sum is stored sign-extended to 64 bits.
* **Each lane's weight is wired directly.** The block diagram draws a
  four-input selector in front of each multiplier on the weight side. Every
  listed operation uses Wk in lane k, so this RTL connects Wk to lane k and
  has no weight selector.
* **Arithmetic is signed two's complement.** The benchmark uses 32-bit signed
  integers.
* **A MAC step takes one cycle.** The multiplier, the 4-input adder and the
  accumulator form one combinational path. This path is long for a real
  target, and the RTL does not pipeline it.

## Files

| file | contents |
|---|---|
| `rtl/ann_pkg.sv` | sizes, opcodes, adder and output-source enums, `instr_t` |
| `rtl/ann_accel.sv` | top: wires the blocks below, operand and output selectors |
| `rtl/ann_controller.sv` | decoder and sequencer (idle, MAC repeat, load request, load wait) |
| `rtl/input_regfile.sv` | I0..I15 with four group read ports and a move port |
| `rtl/weight_regfile.sv` | W0..W3 |
| `rtl/output_regfile.sv` | O0..O7 as four 64-bit pairs |
| `rtl/address_register.sv` | load and step address register |
| `rtl/multiplier.sv` | signed 32 x 32 -> 64 |
| `rtl/split_adder.sv` | lane / tree adder |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/ann_mem_model.sv` | behavioural memory with random 1..3 cycle latency |

## Verification

Every testbench ends with `TB_RESULT checks=N failures=M`. Each has a
watchdog.

* Each block testbench compares its block with an independent model, using
  random and extreme operands.
* `tb_ann_controller` checks the control signals of every operation. It also
  checks the cycle-by-cycle sequence of a repeated MAC and of repeated loads.
* `tb_ann_accel` runs the whole accelerator at its default sizes, in three
  phases:
  * every row of the operation table;
  * 400 random instructions, a third of them issued back to back, so they
    stall behind repeated MACs and loads, against a memory with random
    latency;
  * the n-input neuron benchmark for n = 2..16, against the MAC counts in the
    table above.

  It checks O0..O7 and the address register against a reference model after
  each instruction. It checks the cycle count of every MAC, MUL and ADD. It
  counts each mechanism (moves, repeated loads, single- and all-lane
  operations, MAC clear, accumulate and repeat, memory waits, instruction
  stalls) and fails if any of them never happens.

To run one testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/ann_pkg.sv tb/tb_ann_accel.sv --top-module tb_ann_accel -Mdir obj
./obj/Vtb_ann_accel
```

Replace `tb_ann_accel` with any other `tb_*` name. The full run takes well
under a second.
