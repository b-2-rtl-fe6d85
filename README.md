# B(2):P(4) dual radix logic

One set of gates that computes in radix 4 or in binary depending on a single
control line. In this design every wire carries a four-valued digit (0..3),
and the gates follow a four-valued algebra called P(4). Binary data travel on
the same wires as the two extreme levels: binary 0 is level 0 and binary 1 is
level 3. This is the "0,3 mapping", written B(2) → P(4)0,3. The design works
because the basic four-valued operators reduce to the binary ones on these
two levels:

* MAX is OR and MIN is AND, with no extra hardware.
* The complement 3 − x is NOT, with no extra hardware.

The operators that make P(4) complete keep a constant in the gate: the unary
inverter has k, cycling has r and the literal has a, b. These need a *mode*:

* in binary mode the constants are forced to the values that make the gate
  an inverter or a buffer;
* in P(4) mode they are free.

A binary-select line **Bs** does the forcing (0 for P(4), 3 for binary). The
main signal path is the same in both modes. Processor software could flip Bs
on the fly, much like enabling or disabling interrupts.

The RTL models the circuits at logic level. The original circuits are
current-mode I²L (integrated injection logic): a level is a number of unit
currents, a MAX joins currents, and a complement is a current mirror against a
three-unit source. Each module is the logic-level function of one such
circuit, built from the lower-level modules wherever the original circuit is
built that way.

## Levels and encoding

`dr_pkg` defines everything that is shared:

| item | meaning |
|---|---|
| `q4_t` | `logic [1:0]`, one P(4) digit, value = level |
| `Q_ZERO`, `Q_ONE`, `Q_TWO`, `Q_MAX` | the levels 0..3 (`Q_MAX` is the unit element) |
| `bs_binary(v)` | reads a mode or carry line: level 2 or 3 counts as "3", level 0 or 1 as "0" |

The encoding makes the two-bit value of a digit also its binary decode. So a
P(4)-to-binary decoder or encoder is just wiring (P(4) 0,1,2,3 ↔ AB 00,01,10,11).
This is exactly how the memory interface below uses it.

A second binary mapping puts binary on levels 1 and 2 (the "1,2 mapping"). The
complement, MAX and MIN also work there. Only the bus bridges use it.

## Gates

| module | function | binary behaviour |
|---|---|---|
| `dr_complement` | y = 3 − x | NOT in both mappings |
| `dr_max` | MAX(x1,x2) | OR in every mapping |
| `dr_min` | MIN(x1,x2), built as ¬MAX(¬x1,¬x2) | AND in every mapping |
| `dr_unary_inv` | y = k when x = 0, else 0 | gated inverter; an inverter when k = 3 |
| `dr_cycle` | y = (x + r) mod 4 | buffer when r = 0 |
| `dr_literal` | y = 3 when a ≤ x ≤ b, else 0 | inverter for a=b=0, buffer for a=b=3 |

`dr_cycle` is the universal cycling gate, with r as a signal. A successor gate
is `dr_cycle` with r = 1.

### Mode lines

* `dr_binary_select` sits in front of the unary inverter and cycling gates:
  * Bs = 0 passes the k and r lines through;
  * Bs = 3 forces k = 3 and all r = 0.
  * `NR` sets how many r lines it serves.
* `dr_literal_select` does the same for a literal:
  * Bs = 0 passes a and b;
  * Bs = 3 forces a = b = Fs.
  * The second mode line **Fs** ("function select") thus picks inverter
    (Fs = 0) or buffer (Fs = 3) for the binary case.

Mode lines are binary signals on the 0/3 levels. This design reads level 2 as
3 and level 1 as 0.

## Standard gates

There are two building blocks, one for each of two four-valued algebras. Each
realizes any two-variable function when several are combined.

* **`dr_pos_gate`**, the "product of sums" gate (Vranesic algebra):
  * `f2 = (x1A^r1A + x2A^r2A)·(x1B^r1B + x2B^r2B)`;
  * `f1 = [f2 · x3]^k`, where `^r` is cycling, `+` is MAX, `·` is MIN and
    `[ ]^k` is the unary inverter.
  * x3 is an expansion input: the f2 of one gate feeds x3 of the next when a
    term has more than two sums.
  * With Bs = 3, f2 is an OR-AND and f1 an OR-AND-INVERT.
* **`dr_sop_gate`**, the "sum of products" gate (Allen–Givone algebra):
  * four literals, one per input, each with its own a, b;
  * the products of pairs `pa`, `pb` and their MAX `f`.
  * One Bs/Fs pair serves all four literals, so with Bs = 3 it is an AND-OR,
    with inputs inverted when Fs = 0.

Two realizations of one example function f(x1,x2) show how the gates are used:

```
        x2=0 1 2 3
  x1=0:    2 2 2 3
  x1=1:    1 2 3 0
  x1=2:    1 0 0 0
  x1=3:    2 1 1 0
```

**`dr_table31_fn`** is the literal form: seven products of a constant weight
and one or two literals, joined by MAX. It has no binary use.

**`dr_table31_pos`** is the canonical "sum of products of sums" form:

* For each output value v it forms one product of sums that is zero exactly
  where f = v.
* A sum `x1^r1 + x2^r2` is zero at a single point, x1 = −r1 mod 4 and
  x2 = −r2 mod 4. So every point of the table is one sum with constant r lines.
* Each gate supplies two sums.
* Value 1 (4 points) uses two chained gates. Value 2 (5 points) uses three
  gates, whose first two f2 outputs are joined by a MIN because f2 does not
  include the gate's own x3. Value 3 uses one gate.
* The last gate of each value has k = v, and a MAX joins the three terms.
* Under Bs = 3 the same circuit becomes a binary NOR of x1 and x2. This shows
  that a P(4) circuit that is minimal does not give a minimal or meaningful
  binary function for free.

## Threshold operators

| module | function | binary default |
|---|---|---|
| `dr_monotone` | D_i(x) = 3 when x ≥ i, and its complement | i = 3: buffer / inverter |
| `dr_disjoint` | C_i(x) = 3 when x = i | i = 3: buffer |
| `dr_linear_sum` | x1·W1 + x2·W2 + x3·W3 as a plain number (weights 1, 2, 3) | none |

`dr_linear_sum` models joining collector currents: the result is not a P(4)
digit but an unbounded count (5 bits at the default weights). Thresholds on
that count are how the full adder finds its carry.

## The dual radix full adder

This is the least obvious part of the design. The adder has to add two P(4)
digits with a carry, and also add two binary bits with a carry, on the same
wires.

**The carry is binary in both modes.** A carry into a radix-4 digit is only
ever 0 or 1, so cin and cout use the levels 0 and 3. Inside the adder,
however, a carry in of 3 counts as *one unit*, since it adds 1 to the digit
sum. The P(4) path of `dr_full_adder` is:

```
s0   = (x1 + x2)   mod 4     cycling gate, r = x2
sum  = (s0 + c)    mod 4     cycling gate, r = c (1 when cin = 3)
cout = 3  if  x1 + x2 + c >= 4    weighted sum, then threshold
```

**Why binary needs a correction.** Feed binary bits (levels 0/3) into that
path with Bs = 3:

| x1 | x2 | cin | P(4) sum | binary sum needs | P(4) cout | binary cout |
|---|---|---|---|---|---|---|
| 0 | 0 | 0 | 0 | 0 | 0 | 0 |
| 0 | 3 | 0 | 3 | 3 | 0 | 0 |
| 3 | 3 | 0 | **2** | **0** | 3 | 3 |
| 0 | 0 | 3 | **1** | **3** | 0 | 0 |
| 0 | 3 | 3 | 0 | 0 | 3 | 3 |
| 3 | 3 | 3 | 3 | 3 | 3 | 3 |

The carry always agrees: carry exactly when at least two inputs are 1. The
sum is right in six of eight cases; the two bold rows are wrong.

Two correction terms fix them. Each is a MIN of two literals, the carry line
and Bs:

* `fix33 = 3x1_3 · 3x2_3 · ¬cin · Bs` forces sum = 0;
* `fix00 = 0x1_0 · 0x2_0 · cin · Bs` forces sum = 3.

Because they include Bs, they can never fire in P(4) mode. The module merges
them into the sum with an override: where a correction fires, its value
replaces the P(4) sum.

**The T-gate adder** (`dr_full_adder_tgate`) builds the same function from
thirteen 4:1 four-valued multiplexers, with the inputs on the select lines
instead of the data lines:

```
r_n   (n = 0..3) = (x1 + n) mod 4            4 muxes, select x1, constant data
t_n   (n = 1..3) = 3 if x1 >= 4 - n          3 muxes, select x1, constant data
s_c0  = r[x2],  s_c1 = r[x2 + 1]             2 muxes, select x2
co_c0 = {0,t1,t2,t3}[x2],  co_c1 = {t1,t2,t3,3}[x2]    2 muxes, select x2
sum   = {s_c0,s_c0,s_c1,s_c1}[cin]           1 mux,  select cin
cout  = {co_c0,co_c0,co_c1,co_c1}[cin]       1 mux,  select cin
```

Bs changes two constant data inputs:

* r1 at x1 = 0 becomes 3 instead of 1;
* r3 at x1 = 3 becomes 0 instead of 2.

With binary operands these entries are reached only by the two bold rows
above: x1 = x2 = 0 with a carry reads r1, and x1 = x2 = 3 without a carry reads
r3. So the corrections cost no gates, only two forced values.

If Bs = 3 but an operand is at level 1 or 2, the two adders may disagree. This
is not a binary input, so neither is wrong. Use binary levels in binary mode.

## Memory elements

Both elements step once per rising clock edge and reset asynchronously to 0
(`rst_n` low). Each has a complemented output.

* **`dr_sc_memory`**, set/clear (two cross-coupled MAX gates):
  * next state `Q+ = MAX(S, MIN(3 − C, Q))`.
  * `nondet` is raised when S + C ≥ 4. That is the four-valued counterpart of
    S = C = 1 in a binary latch, and the stored value there depends on
    circuit details. The module stores the value of the equation.
* **`dr_jk_memory`**, J-K (the set/clear element plus two MIN gates):
  * next state `Q+ = MAX(MIN(J, ¬Q), MIN(¬K, Q), MIN(J, ¬K))`.
  * With J and K both at binary 1 it toggles, in both mappings (0↔3 with
    J = K = 3, 1↔2 with J = K = 2).

Neither needs a mode line: the equations give the binary set/clear and J-K
behaviour on 0/3 and on 1/2.

## The four-valued bus

* **`dr_mux4`**, 4:1 T-gate multiplexer: `y = d[s]` while the enable `e` is
  not 0, and 0 (no current) while `e = 0`. Several multiplexers with enables
  can share one bus.
* **`dr_demux4`**: a 1:4 demultiplexer; the selected output copies d, and all
  others (or all outputs while disabled) are 0.
* **`dr_bridge_03_12`**, **`dr_bridge_12_03`**: move binary data between the
  two mappings:
  * 0 ↔ 1 and 3 ↔ 2.
  * The cut sits between levels 1 and 2, so a full P(4) signal on the input
    still produces only levels of the target mapping.

## Binary memory on a P(4) bus

`dr_mem_interface` hangs an ordinary binary RAM (`dr_b2_ram`, 256 words of
8 bits) on a four-digit P(4) address bus and a four-digit P(4) data bus:

* Under the two-bit encoding each digit is its own decode: digit i is bits
  2i+1:2i, digit 0 is least significant.
* The write strobe `we` is a P(4) line read as binary (level ≥ 2 writes).
* Writes happen on the rising clock edge.
* Reads are combinational.
* The RAM is not reset.

The parameters are `AW = 8`, `DW = 8` (binary widths) and the derived
`AD = AW/2`, `DD = DW/2` digits.

## Top level: `dr_system`

`dr_system` puts the parts around the bus:

```
src[0..3] --mux4--> bus --demux4--> dst[0..3]
                     |---> bridge 0,3->1,2 --> bus_12 --> bridge 1,2->0,3 --> bus_03
                     |---> J-K element (J = bus, K = reg_k) --> reg_q
                     |---> set/clear element (S = bus, C = sc_c) --> sc_q
     reg_q + bus + cin --> cycling adder  --> sum,   cout
                       \-> T-gate adder   --> sum_t, cout_t
mem_addr/mem_wdata/mem_we --> P(4) memory interface --> mem_rdata
```

Each of these sits beside the bus with its own ports:

* the product-of-sums gate;
* the sum-of-products gate;
* both realizations of the example function;
* the threshold operators;
* the weighted sum.

The single `bs` input drives every mode-sensitive part, and `fs` drives the
literals. With the register loaded from the bus and the bus fed by the
multiplexer, the top is a digit-serial adder: load a digit, put the other
digit on the bus, and keep the carry outside.

## Verification

Every module has a self-checking testbench `tb/tb_<module>.sv`:

* It compares against integer reference models written independently of the
  RTL, exhaustively wherever the input space allows.
* It prints `TB_RESULT checks=<n> failures=<n>`.
* A watchdog stops it if it hangs.
* Random stimulus starts from a fixed seed, so every run repeats the same
  vectors.

`tb_dr_system` runs the top at its default sizes:

* 8-bit additions, digit by digit in P(4), with operands and results
  written to and read back from the memory;
* 8-bit binary additions with Bs = 3;
* the bus with the multiplexer disabled, the demultiplexer, the bridges, a
  J-K toggle and a non-deterministic set/clear input;
* both standard gates in both modes, both example-function realizations, the
  thresholds and the weighted sum.

It counts each mechanism (P(4) add, binary add, carry out, binary sum
correction, bus disabled, bridge, toggle, non-determinism, memory read and
write) and fails if any count is zero.

## Simulating

With Verilator 5:

```
verilator --binary --timing -y rtl rtl/dr_pkg.sv tb/tb_dr_system.sv \
          --top-module tb_dr_system -o sim
./obj_dir/sim
```

Replace `tb_dr_system` with any other testbench name. The package must come
first, and `-y rtl` finds the rest. All logic is combinational except the two
memory elements and the RAM.

## Departures and open points

* **Logic level, not currents.** The I²L current mirrors, injectors and
  level-generating current sources are not modelled. Neither are speed,
  fan-out limits or collector counts.
* **Clocked memory elements.** The original elements are asynchronous
  cross-coupled gates working in fundamental mode. Here they are edge-clocked
  registers with the same next-state equations, plus a reset that the
  original does not have.
* **Adder sum joint.** The binary corrections are merged by an override, where
  the original ties the correction outputs to the sum.
* **T-gate adder internals.** The thirteen-multiplexer count follows the
  original; their arrangement is this design's.
* **Mode-line levels.** Levels 1 and 2 on Bs, Fs and carry lines are read as
  0 and 3. The original treats these lines as two-level.
* **Product-of-sums f2.** f2 is taken after the cycling stage, the same value
  that feeds f1.
* **Sum-of-products gate in binary.** The binary output is x1A·x2A + x1B·x2B,
  one Bs/Fs pair per gate.
* **Disjoint operator default.** The binary value of i for the disjoint
  operator is taken as 3, making it a buffer; 0, an inverter, would also fit.
* **Example function forms.** The literal form uses a minimal cover of seven
  products. The product-of-sums form is the full canonical form, not a
  minimized circuit.
* **Memory interface.** It has separate read and write data buses instead of
  one bidirectional bus.
* **Not built.** There is no control unit and no complete ALU, only the
  adder digit; instruction sequencing lives in the testbench. The digit width
  is fixed at P(4): radix 8 or 16 would need wider digits and other level
  constants throughout.
