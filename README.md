# Configurable folded bit-plane FIR filter

This is a FIR filter, y_n = Σ c_i · x_{n−i}, built as a small ring of bit-serial-in-coefficient
processing rows. Its number of taps k_c and coefficient length m_c can both be changed at run
time. A bit-plane array has one row of AND gates and full adders per coefficient *bit*. Each
row adds one partial product 2^j · c_i^j · x to a running sum. For k_c coefficients of m_c bits
that is L = k_c · m_c rows. This design folds those L row-operations onto only **K** physical rows,
called *sections*. Each section is time-shared over **N** clock cycles, so L = K · N. Because L is
fixed by the hardware, the same coefficient register can hold two 6-bit coefficients or one 12-bit
coefficient, for example. Only the bookkeeping of bit weights and input words changes between
the two.

At the default size, K = 3 sections and N = 4, so L = 12 coefficient bits. The filter produces
one output every N = 4 clock cycles.

## Operations, chains and the folding map

Each output is one *chain* of L operations, numbered p = 0 … L−1:

* Operation p belongs to coefficient block i = ⌊p / m_c⌋ and uses coefficient c_{k_c−1−i}.
* It uses bit j = p mod m_c of that coefficient, with weight 2^j.
* A chain starting with input word x_a multiplies x_a by c_{k_c−1}, then x_{a+1} by c_{k_c−2}, and
  so on, and ends as y_{a+k_c−1}.

Operation p runs in **section s = p mod K**, in **slot r = p mod N**, where r = T mod N and T is
the clock cycle. For this map to be one-to-one, K and N must be coprime (gcd(K, N) = 1).
Operation p+1 runs exactly one cycle after operation p, in the next section. The sections
therefore form a ring:

```
           +--------------------------------------------------------------+
           |   IDEM ring: x words move with their sums                    |
 x_in --[switch]--> S_0 --D--> S_1 --D--> ... --D--> S_{K-1} --D--+      |
           ^                                                       |      |
           +-------------------------------------------------------+      |
                                                                          |
   0 / fb --> [S_0 row]--D--> [S_1 row]--D--> ... --> [S_{K-1} row]--D--+--> y
       ^                                                                |
       +----------------------- feedback (slots 1..N-1) ----------------+
```

A chain goes around the ring N times. K chains are in flight at once, one in each section. In
slot 0 of every N-cycle period, the chain in the last register is complete. It leaves as y and
S_0 starts a fresh chain from zero. In every other slot, the last section's sum is fed back to S_0.

For K = 3, N = 4, section S_0 runs operations 0, 9, 6, 3 in slots 0, 1, 2, 3. S_1 runs 4, 1, 10, 7
and S_2 runs 8, 5, 2, 11. The table below shows what the sections compute in the first clock
cycles when k_c = 2 and m_c = 6. Clock 1 is the first cycle; y_0 = c_0 x_0 leaves after clock 8.

| clk | S_0            | S_1            | S_2            |
|-----|----------------|----------------|----------------|
| 1   | 2^0 c_1^0 x_0  |                |                |
| 2   |                | 2^1 c_1^1 x_0  |                |
| 3   | 2^0 c_0^0 x_0  |                | 2^2 c_1^2 x_0  |
| 4   | 2^3 c_1^3 x_0  | 2^1 c_0^1 x_0  |                |
| 5   | 2^0 c_1^0 x_1  | 2^4 c_1^4 x_0  | 2^2 c_0^2 x_0  |
| 8   | 2^3 c_1^3 x_1  | 2^1 c_0^1 x_1  | 2^5 c_0^5 x_0  |

Each section holds N coefficient bits and N weight exponents, one per slot. It picks the pair for
the current slot. The coefficient bit gates the input word, the weight shifts it, and a row of
full adders adds it to the incoming sum. The result goes into the section's register.

## Input words: the IDEM

A sum must meet the right input word in every section. The input data entering module (IDEM)
solves this with a second ring of registers that moves each word together with its partial sum.
A switch in front of S_0 decides which word S_0 sees:

* **fresh word**: the input currently being presented. S_0 gets it when it executes the first bit
  of a coefficient (j = 0). This happens at the start of every chain, and at every coefficient
  boundary inside a chain.
* **circulating word**: the word that left S_{K−1}, so the chain keeps the word it had.

Input words arrive one per N cycles. `x_take` marks the cycle in which the next word must be on
`x_in`. The IDEM copies the word into a hold register, so a coefficient boundary later in the same
period still sees it.

### Which (k_c, m_c) splits work

The switch sits only in front of S_0, and it can only offer the word of the current period. A split
k_c · m_c = K · N therefore runs correctly only if both of these hold:

1. **m_c is a multiple of K.** Every coefficient boundary then falls in section S_0.
2. **⌊i · m_c / N⌋ = i for every coefficient i < k_c.** Coefficient i of a chain starting at
   period a begins at cycle aN + i·m_c. At that cycle the IDEM offers word x_{a+⌊i·m_c/N⌋}, but the
   chain needs x_{a+i}.

The `cfg_ok` output reports whether the configured m_c satisfies these conditions. The conditions
are worked out from the structure of the array; they are not stated as such with it. Examples:

| array (K × N) | supported m_c (k_c)       |
|---------------|---------------------------|
| 3 × 4         | 6 (2), 12 (1)             |
| 3 × 2         | 3 (2), 6 (1)              |
| 5 × 4         | 5 (4), 20 (1)             |
| 7 × 6         | 7 (6), 42 (1)             |

Any other setting leaves `cfg_ok` low, and the outputs are then meaningless.

## Interface and timing (`fbpa_fir`)

| port        | dir | width  | meaning |
|-------------|-----|--------|---------|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `run`       | in  | 1      | high: filter runs; low: array cleared and stopped |
| `cfg_we`    | in  | 1      | write `cfg_mc` and `cfg_coef` (ignored while `run` is high) |
| `cfg_mc`    | in  | ⌈log2(L+1)⌉ | coefficient length m_c; k_c = L / m_c |
| `cfg_coef`  | in  | L      | `{c_0, c_1, …, c_{k_c−1}}`, c_{k_c−1} in the m_c LSBs |
| `cfg_ok`    | out | 1      | the stored m_c is a supported split |
| `x_in`      | in  | DW     | input word, unsigned |
| `x_take`    | out | 1      | `x_in` is taken this cycle (every N cycles, the first in the first running cycle) |
| `y`         | out | DW + L | output, unsigned, full precision; holds its value between outputs |
| `y_valid`   | out | 1      | a new output is on `y` this cycle |

The coefficient register is simply the L coefficient bits in operation order. That is why one
packing serves every split.

A run goes like this:

1. With `run` low, write the configuration.
2. Raise `run`.
3. Present x_0, x_1, … in the cycles where `x_take` is high.

y_0 appears (K + 1 − k_c) · N cycles after x_0 was taken. That equals k_c·m_c − (k_c−1)·N, which
is 2·m_c − N for two coefficients (8 cycles in the 3 × 4 example). After that, one output follows
every N cycles. Chains already running when x_0 arrived see zero words, so y_n treats x_{<0} as 0.
Lowering `run` clears the array.

## Files

| file | contents |
|------|----------|
| `rtl/fbpa_pkg.sv` | default sizes; folding map `op_index(s, r)`; `gcd`; `mc_supported` |
| `rtl/fbpa_basic_cell.sv` | AND gate plus full adder |
| `rtl/fbpa_section.sv` | one section: slot selection, weight alignment, row of W basic cells, register |
| `rtl/fbpa_idem.sv` | input switch, hold register and ring of word registers |
| `rtl/fbpa_coef_bank.sv` | coefficient bits and m_c; weight exponent of every operation; k_c; `cfg_ok` |
| `rtl/fbpa_controller.sv` | slot counter; input take; IDEM switch; new chain; output-valid timing |
| `rtl/fbpa_output_switch.sv` | feedback or zero into S_0; output and hold register |
| `rtl/fbpa_fir.sv` | top level: wires section s, slot r to operation `op_index(s, r)` |

Parameters of `fbpa_fir`:

* `K` = 3 and `N` = 4 are the sizes of the worked example.
* `DW` = 8 is a free choice.
* `L`, `W`, `SW` and `MW` are derived from the others.

Elaboration stops with an error if K and N are not coprime, or if N < 2.

## Verification

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=… failures=…`.

* `tb_fbpa_fir` runs the default 3 × 4 array. For k_c = 2, m_c = 6 it compares the weight, input
  word and coefficient bit in every section in clocks 1–11 with the schedule above. It streams
  random data and compares every output with a direct-form FIR model, for m_c = 6 (including
  all-ones coefficients) and m_c = 12. It also checks the latency of y_0, the spacing of N cycles,
  `cfg_ok` for m_c = 0…14, and that a configuration write is ignored while running. It counts
  chain starts, feedback cycles, coefficient-boundary loads, reconfigurations and rejected
  settings, and fails if any of them never occurs.
* `tb_fbpa_fir_sizes` (with driver `tb_fbpa_fir_run`) runs the 3 × 2, 5 × 4 and 7 × 6 arrays in
  both splits listed above, against the same model.
* `tb_fbpa_pkg`, `tb_fbpa_basic_cell`, `tb_fbpa_section`, `tb_fbpa_idem`, `tb_fbpa_coef_bank`,
  `tb_fbpa_controller` and `tb_fbpa_output_switch` test the single blocks against independent
  models. The basic cell is tested exhaustively; the others use random stimulus.

To simulate with Verilator, run this from the directory above `rtl/` and `tb/`:

```
verilator --binary --timing -Irtl -y rtl -y tb rtl/fbpa_pkg.sv tb/tb_fbpa_fir.sv --top-module tb_fbpa_fir
./obj_dir/Vtb_fbpa_fir
```

Replace `tb_fbpa_fir` with any other testbench name. Every testbench finishes in well under a
second.

## Departures and open points

* **No LSB truncation.** A bit-plane array can drop low-order bits of intermediate sums without
  losing accuracy, but the method is not given here. Sums are kept at full precision instead,
  W = DW + L bits, which cannot overflow. The weight 2^j is applied as a left shift of the input
  word inside each section.
* **Unsigned arithmetic only.** Inputs and coefficients are unsigned, since the basic cell is a
  plain AND gate and full adder. Two's-complement operation would need sign handling, and none is
  defined.
* **Restricted splits.** Only the (k_c, m_c) splits in the section above are supported. Splits with
  m_c < N, or with coefficients that start outside S_0, would need a buffer of past input words in
  front of the array. That buffer is not part of this structure.
* **Own interface choices.** The configuration interface (a parallel write while stopped), the
  `run`/`x_take`/`y_valid` handshake, the hold registers on input and output, the reset values and
  the suppression of the all-zero outputs before y_0 are all choices of this implementation.
* **Switch timing.** The output switch changes in slot 0, when the finished sum is already in the
  last section's register. That is one cycle after the slot in which the last section computed it.
* **Not included.** Folded arrays of this kind can be extended to raise throughput, but that
  extension is not described in enough detail to build, so it is not included.
* **Carry chain.** Each row ripples its carry through all W cells within one cycle. A carry-save
  or pipelined row would shorten the cycle but change the timing above.
