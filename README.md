# CliffoSor: a geometric-algebra coprocessor core in SystemVerilog

Geometric (Clifford) algebra describes points, lines, planes and rotations
with a single kind of object, the multivector, and a few products on it. In
four dimensions a general multivector has 16 coefficients, and one geometric
product between two of them costs 256 multiplications. This core does not try
to be general. It works on **homogeneous elements**: parts of a
multivector that hold blades of a single grade. These are the scalar, the
vector, the bivector, the trivector and the pseudoscalar. Any product of two
homogeneous elements needs at most 24 coefficient multiplications, and those
24 can be done side by side. Software splits a general multivector operation
into a sequence of such binary operations and sends them to the core one at
a time.

The core has two parts:

- The **Clifford Interface** fetches one instruction from SRAM on the board
  and writes the result back.
- The **Clifford ALU** executes the instruction. It has three functional
  units:
  - a *multiplier*, for the geometric product, the outer product, and the
    left and right contractions;
  - an *adder*, for sums and differences;
  - a *3D rotator*, which rotates a 3D vector by a rotor.

  A small controller starts the right unit and hands its result back.

## Elements, blades and the data format

A blade is named by a 4-bit mask, with bit 0 standing for e1. For example
`0110` is e2e3. Every element is stored as a 3-bit tag plus six 32-bit fields
A–F. The tag fixes which blade each field holds:

| tag | element      | A    | B    | C    | D    | E    | F    |
|-----|--------------|------|------|------|------|------|------|
| 000 | scalar       | 0000 |      |      |      |      |      |
| 001 | vector       | 0001 | 0010 | 0100 | 1000 |      |      |
| 010 | bivector     | 0011 | 0101 | 1001 | 0110 | 1010 | 1100 |
| 101 | trivector    | 1110 | 1101 | 1011 | 0111 |      |      |
| 100 | pseudoscalar | 1111 |      |      |      |      |      |

Three properties of this layout make the hardware small:

- **Duals differ by one bit.** An element and its dual differ only in the
  tag's top bit.
- **Complement masks.** Field k of a trivector holds the complement of the
  mask of field k of a vector. Multiplying by the pseudoscalar therefore
  never moves a vector or trivector coefficient to another field.
- **Reversal is complement for bivectors.** The bivector fields are ordered
  so that reversing them (A↔F, B↔E, C↔D) maps each blade to its complement:
  e12↔e34, e13↔e24, e14↔e23.

The mask of a product blade is the XOR of the operand masks. For example
e1 · e23 = e123, because 0001 XOR 0110 = 0111. The sign comes from counting
the swaps needed to bring the basis vectors into order. The algebra is
Euclidean: every e_i squares to +1.

Coefficients are two's-complement fixed point with `FRAC_BITS` = 16
fraction bits (Q16.16). A coefficient product is the full 64-bit product,
shifted right arithmetically by `FRAC_BITS` and truncated to 32 bits. Sums
wrap at 32 bits, and nothing saturates.

### Instruction and result vectors

An instruction is 15 words, stored in a 16-word slot:

| word | content |
|------|---------|
| 0    | INSTRUCTION: bits 31:28 unused, 27:20 B id, 19:12 A id, 11:4 result id, 3:0 opcode |
| 1    | operand A HEADER: bits 10:3 id, 2:0 tag |
| 2–7  | operand A fields A..F |
| 8    | operand B HEADER |
| 9–14 | operand B fields A..F |
| 15   | ignored |

Opcodes:

| code | operation |
|------|-----------|
| 0 | geometric product |
| 1 | outer product |
| 2 | left contraction |
| 3 | right contraction |
| 4 | sum |
| 5 | difference A − B |
| 6 | rotation of vector A by rotor B |

Any other code is rejected with the error flag.

A result holds up to two elements. A geometric product, sum or difference can
give two; a contraction, outer product or rotation gives one. The result slot
is laid out as follows:

| word  | content |
|-------|---------|
| 0     | header of part 1 |
| 1–6   | fields of part 1 |
| 7     | header of part 2 |
| 8–13  | fields of part 2 |
| 14    | status: bits 15:8 result id, 7:4 opcode, 2 error, 1:0 number of valid parts |
| 15    | zero |

Both part headers carry the result id.

## The multiplier (`clifford_multiplier`)

This is the largest and least obvious unit. Its core idea is that all 24
useful operand-pair types fit one datapath:

- One operand has at most 4 fields.
- The other has at most 6 fields.
- A bank of 4 × 6 = 24 multipliers therefore forms every coefficient
  sub-product at once.

Three small adder networks then route and add these products, depending on
the operand types. The stages, one clock each, are:

1. **Pre-swap and sign lookup.** The operands are loaded into a four-word
   register and a six-word register.
   - Normally A goes to the four-word register and B to the six-word one.
   - They swap when A is a bivector, or when A is a vector or trivector and
     B is a scalar or pseudoscalar.
   - Fields the tag does not use are cleared.

   At the same time `mask_generator` turns the two tags into a 24-bit sign
   mask. Bit 6i+j of the mask is set when the blade product of four-word
   field i and six-word field j is negative. The sign depends on the
   operand order, not on the register order. The mask is pure logic on the
   tags: the swap-counting rule above is evaluated for each bit, and there
   is no stored table.
2. **Multiply.** The 24 fixed-point products are formed.
3. **Sign.** Each product whose mask bit is set is negated.
4. **Route and add.** One of three sub-units is chosen from the tags:
   - **`scalar_unit`** handles any product with a scalar or pseudoscalar. It
     only routes: field j of the result is signed product j. The result
     keeps the other operand's tag, or takes the dual tag when the
     single-field operand is the pseudoscalar.
   - **`vector_unit`** handles vector and trivector in any combination.
     - Part 1 is Σ products (i,i). It is a scalar when the tags match and a
       pseudoscalar otherwise.
     - Part 2 is a bivector. Its field for the pair {i,j} is product (i,j)
       plus product (j,i).
   - **`bivector_unit`** handles a bivector with a vector or trivector. A
     bivector field stands for a pair {j,k} of basis indices, and a
     four-word field for index i.
     - If i is in the pair, the product lands on the other index of the pair.
     - If it is not, it lands on the index missing from {i,j,k}.

     The results are a vector part and a trivector part. When the four-word
     operand is a trivector, the two groups trade places.
5. **Post-swap.** The bivector part's fields are reversed for vector ×
   trivector, trivector × vector, bivector × pseudoscalar and
   pseudoscalar × bivector. The vector unit computes "vector × vector"
   coefficients. For a vector/trivector mix, each of those lands on the
   complementary bivector blade. Reversing the field order moves every
   coefficient to its complementary blade.
6. **Select** (combinational). A geometric product returns every part. The
   outer product returns the part of grade ga+gb. The left contraction
   returns grade gb−ga, and the right contraction ga−gb. When that grade is
   absent or negative, the result is a single zero element.

**Timing.** `product_ce` is sampled at one edge. Five clocks later the
post-swap register is loaded, and `product_we` rises.

**Bivector × bivector** needs 36 multiplications and is not executed. The
unit returns no parts and sets the error flag. Software is expected to split
that product into smaller ones.

## The adder (`clifford_adder`)

The adder has three stages: fetch, two's complement, and add.

- **Fetch** captures the operands and clears unused fields.
- **Two's complement** negates B for a difference.
- **Add** depends on the tags:
  - With equal tags, the fields are summed and the result is one element.
  - With different tags, the result is the two elements side by side: part
    1 is A, and part 2 is ±B.

`sum_we` rises three clocks after `sum_ce` is sampled.

## The 3D rotator (`clifford_rotator`)

The rotator computes the rotated vector v' = R v R~. Its inputs are:

- a vector v = x e1 + y e2 + z e3, in fields A–C of operand A;
- a rotor R = q0 + q1 e12 + q2 e13 + q3 e23, in fields A–D of operand B,
  whose tag is not checked.

Writing out the two geometric products gives v' = M v, where M is a 3 × 3
matrix of quadratic terms in q. The full formula is in the file header.

The unit has one bank of ten multipliers behind a multiplexer layer, and
uses it twice:

| clock | stage |
|-------|-------|
| 1 | The multiplexers pick the ten distinct products q_a q_b. |
| 2 | Multiply. |
| 3 | The multiplexers form the nine matrix entries (sums and doublings of those products) and pair each with x, y or z. |
| 4 | Multiply. |
| 5 | Add the three products of each output component. |

`rotation_we` follows in the next clock.

The rotor is not normalised, so a rotor of norm n scales the vector by n².
The result is a vector with field D = 0.

## The ALU and its controller (`clifford_alu`, `alu_controller`)

The controller is a three-state machine: idle, busy, done.

1. **Start.** The controller waits for `cs`. In the clock that samples it, it
   decodes the opcode, loads the operand and instruction registers, and
   raises one chip enable: `product_ce`, `sum_ce` or `rotation_ce`.
2. **Finish.** When that unit raises its write enable, the result register
   loads and `w_ack` rises.
3. **Release.** The enable and `w_ack` stay high until the interface drops
   `cs`.

An unknown opcode enables no unit. The error result loads at once.

Measured from the edge that samples `cs` to the edge where `w_ack` is first
seen high:

| operation | ALU clocks |
|-----------|------------|
| any product | 7 |
| sum/difference | 5 |
| rotation | 7 |
| unknown opcode | 2 |

Each unit's pipeline depth was chosen to give these counts. The input
`reset_alu` is an active-high synchronous reset of the controller. The board
connection that drives it is not known, so the top brings it out as a port.
It must only be raised while no operation is in flight; otherwise the
interface waits for a `w_ack` that never comes. `rst_n` resets the ALU
together with the rest of the core.

## The interface (`clifford_interface`)

The interface connects to four 32-bit SRAM banks that are accessed in
parallel. A 16-word slot therefore moves in four transfers: transfer t uses
word address base+t in every bank, and bank k carries slot word 4t+k. The
interface steps through five states:

| state  | what happens |
|--------|--------------|
| idle   | Wait for the control byte `CTRL_START` (0x01). The host sends it when the instruction is in SRAM. |
| read   | Four transfers from `INSTR_ADDR`. The reads are pipelined: read data is expected one clock after `sram_re`. |
| exec   | Hold `cs` high until `w_ack`. An assertion checks that `cs` is not dropped early. |
| write  | Four transfers of the result vector to `RESULT_ADDR`. |
| status | Pulse `status_valid` with `STATUS_DONE` (0x01), or `STATUS_ERROR` (0x03) when the ALU flagged the operation. |

The interface spends 13 clocks of its own per operation, most of them in
the four read and four write transfers. From the control byte to the status byte, that makes 20 clocks for a
product or rotation and 18 for a sum.

## Where this departs from the original design, and what is assumed

- **Host handshake.** The original core talks to the host through a board
  vendor's proprietary PCI handshake, which is not public. This design uses a
  one-clock byte strobe in each direction instead. The PCI controller, the
  host driver and the SRAM chips are outside the RTL. Their signals are the
  top-level ports, and `tb/sram_bank_model.sv` models one synchronous SRAM
  bank for simulation.
- **Interface latency.** The original spends 49 interface clocks per
  operation and does not say where they go. The proprietary handshake is
  the most likely place. This design spends 13. The ALU latencies (7/5/7) match the
  original's.
- **Choices made here where the original is silent:**
  - opcode values;
  - fixed-point format;
  - rotor operand layout;
  - result slot layout and status word;
  - byte values;
  - slot addresses;
  - what an absent grade or an unknown opcode returns;
  - the internal stage split of each unit.

  The header comment of each file says which parts follow the original and
  which are choices.
- **Bivector × bivector.** This product is rejected, as in the original,
  where software performs it.
- **Rotor tag.** The rotor's tag is not checked.
- **Rotation scope.** Only 3D rotation is supported; e4 plays no part in
  it.

## How far it can be trusted

Every module has a self-checking testbench in `tb/`. The results are compared
with `tb/ga_ref_pkg.sv`, a reference written separately from the RTL. It
multiplies blades by sorting basis vectors from literal mask tables, and
rotates with floating-point geometric products. Coverage by testbench:

| testbench | what it checks |
|-----------|----------------|
| `tb_mask_generator` | all 25 tag pairs and every one of the 24 sign bits |
| `tb_scalar_unit`, `tb_vector_unit`, `tb_bivector_unit` | every operand-type case they serve, with random signed products |
| `tb_clifford_multiplier` | random operands for all tag pairs and all four product opcodes; the latency; the error for bivector × bivector |
| `tb_clifford_adder` | all tag pairs, sum and difference |
| `tb_clifford_rotator` | random unit rotors against the floating-point reference, within 128 LSB of Q16.16 |
| `tb_alu_controller`, `tb_clifford_alu` | enables, latencies 7/5/7, unknown opcodes, IDs |
| `tb_clifford_interface` | transfer order, addresses and status bytes, with a stand-in ALU |
| `tb_cliffosor_top` | end to end at default parameters |
| `tb_workload_perf` | throughput streams through the whole core (see below) |

`tb_cliffosor_top` runs the whole core end to end with every parameter at its
default, over the SRAM model. It writes instruction slots the way a host
would and checks every result word and status byte. It also counts each
mechanism at least once:

- each sub-unit;
- the pre-swap and the post-swap;
- each selected grade;
- the same-type sum and the composed sum;
- the difference;
- the rotation;
- the error path;
- an ALU reset between operations.

`tb_workload_perf` runs four streams through the whole core, 500,000
operations each, and checks every result:

| stream | clocks per operation |
|--------|----------------------|
| random geometric products | 21 |
| random sums and differences | 19 |
| random unit-rotor rotations | 21 |
| raytracer-style mix, 2 sums for every 11 vector-bivector left contractions | 20.7 |

These counts include one clock of the host model between operations. Most
of each count is spent in the interface, not the ALU.

Each testbench was also run against a copy of its module with one deliberate
bug, and every one of those runs reported failures.

Not verified:

- Fixed-point overflow is not checked, beyond the fact that it wraps.
- The design has not been put on an FPGA or timed against a clock.

## Simulating

Everything is plain SystemVerilog-2017 that Verilator 5 accepts. To build and
run one testbench:

```sh
verilator --binary --timing -Wno-fatal -Irtl -Itb \
  rtl/cliffosor_pkg.sv tb/ga_ref_pkg.sv $(ls rtl/*.sv | grep -v _pkg) \
  tb/sram_bank_model.sv \
  tb/tb_cliffosor_top.sv --top-module tb_cliffosor_top -o sim
./obj_dir/sim
```

Replace `tb_cliffosor_top` by any other `tb/tb_*.sv` to run that testbench.
`tb_workload_perf` takes about a minute; the others take seconds.
Each testbench prints `TB_RESULT checks=N failures=M` at the end, and has a
watchdog that fails it if it hangs.

To change the design:

- **Number format.** `FRAC_BITS` (parameter of the top, the ALU and the
  units) moves the binary point.
- **Memory map.** `ADDR_W`, `INSTR_ADDR` and `RESULT_ADDR` place the slots
  in SRAM.
- **Encodings.** The opcode and tag encodings live in `rtl/cliffosor_pkg.sv`.

## Files

| file | content |
|------|---------|
| `rtl/cliffosor_pkg.sv` | types, encodings, blade masks and sign rule, fixed-point multiply |
| `rtl/cliffosor_top.sv` | the core: interface plus ALU |
| `rtl/clifford_interface.sv` | the SRAM and host side |
| `rtl/clifford_alu.sv` | operand/result registers and the three units |
| `rtl/alu_controller.sv` | decoder and enable sequencing |
| `rtl/clifford_multiplier.sv` | the product pipeline |
| `rtl/mask_generator.sv` | the product pipeline's sign mask |
| `rtl/scalar_unit.sv`, `rtl/vector_unit.sv`, `rtl/bivector_unit.sv` | the product pipeline's routing sub-units |
| `rtl/clifford_adder.sv` | sums and differences |
| `rtl/clifford_rotator.sv` | 3D rotation |
| `tb/ga_ref_pkg.sv` | independent reference model |
| `tb/sram_bank_model.sv` | SRAM bank model |
| `tb/tb_*.sv` | testbenches |
