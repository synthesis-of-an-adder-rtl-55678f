# Carry-free adder of binary codes on a ring code system

An ordinary binary adder is slow because a carry may have to ripple, or be looked ahead,
across every digit. This design adds numbers with **no signal passing between digits at
all**. It gets there by changing what the bit patterns mean. The numbers are not
positional binary. Each number is a code taken from a *ring* of codes that a linear
recursion generates. Adding then means "move along the ring". Because the recursion is
linear over GF(2), every sum digit is a plain XOR of selected bits of one operand. The
other operand only chooses which bits are selected.

The RTL here contains:

* a complete 4-bit adder (decoder, coefficient memory, four digits), which is the main
  design;
* the first-digit circuits of an 8-bit adder (AND/XOR) and a 16-bit adder (OR/XAND);
* everything parameterised, so adders of other widths can be built.

## 1. Code systems that form a ring

Take the bit sequence defined by the key

    x_j = x_(j-4) XOR x_(j-1)

and start it from any non-zero 4-bit initial code `x1 x2 x3 x4`. The sequence repeats
every 15 bits. Every window of 4 consecutive bits is a code. Sliding the window one place
gives the next code, and after 15 slides the initial code comes back. The 15 codes form a
ring. They are all the non-zero 4-bit patterns, in an order fixed by the initial code.

The **number** a code stands for is how many slides it lies from the initial code. With
the initial code `1111` the ring is:

| number | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 | 9 | 10 | 11 | 12 | 13 | 14 |
|---|---|---|---|---|---|---|---|---|---|---|---|---|---|---|---|
| code | 1111 | 1110 | 1101 | 1010 | 0101 | 1011 | 0110 | 1100 | 1001 | 0010 | 0100 | 1000 | 0001 | 0011 | 0111 |

Any of the 15 non-zero initial codes gives a valid system. They all visit the same ring,
but each starts at a different place, so the same bit pattern stands for different
numbers in different systems. For example, 1111 is number 4 in the system of `1000`.

An n-bit system holds 2^n − 1 codes. The all-zero code is missing because it never
appears in the XOR sequence.

**The dual (XAND) family.** Replace XOR in the key with XNOR ("XAND") and start from
`0000`. Every code of that system is the bitwise complement of the XOR system of `1111`,
and the all-one code is the missing one. The same adder works on complemented signals if
the AND gates become OR gates and the XOR gates become XNOR gates. This is the family of
the 16-bit digit.

## 2. Why no carry is needed

**Adding.** Let A be the code with number p and D the code with number q. Their sum C is
the code with number p + q, which is A slid q places. One slide is a linear map of the
4 code bits, because every new bit is an XOR of old ones. So sliding by q places is a
fixed 4×4 GF(2) matrix D′(q), the "program" that D applies to A:

    S_i = XOR over j of ( d_ij AND a_j )          i, j = 1..n

Each sum digit S_i depends only on the bits of A and on row i of D′(q). No digit uses
another digit's result. All n digits are computed side by side, each by n AND gates and a
balanced tree of two-input XOR gates. The tree is a *pairing* tree: neighbours are added
first, then the pair results, and so on, in log2 n levels.

**The matrices.** D′(q) has a simple closed form. Write the window as symbols b1..b4 and
expand the recursion: x5 = b1⊕b4, x6 = b1⊕b2⊕b4, and so on. Then row i of D′(q) is the
expression for x_(q+i). For the 4-bit key:

| q | digit 1 | digit 2 | digit 3 | digit 4 |
|---|---|---|---|---|
| 0 | b1 | b2 | b3 | b4 |
| 1 | b2 | b3 | b4 | b1⊕b4 |
| 6 | b1⊕b2⊕b3⊕b4 | b1⊕b2⊕b3 | b2⊕b3⊕b4 | b1⊕b3 |
| 14 | b3⊕b4 | b1 | b2 | b3 |

These matrices are the same for every initial code. What changes with the system is which
code D has which number q.

**Worked example.** In the system of `1111`, A = `0101` (number 4) plus D = `0110`
(number 6) gives C = `0100` (number 10). The row D′(6) gives:

* S1 = a1⊕a2⊕a3⊕a4 = 0
* S2 = a1⊕a2⊕a3 = 1
* S3 = a2⊕a3⊕a4 = 0
* S4 = a1⊕a3 = 0

## 3. The adder circuit

```
   d1..dn ──► awc_decoder ──2^n one-hot lines──► awc_coeff_mem ──n*n coefficients d_ij──┐
                                                 (2^n rows x n*n bits)                 │
   a1..an ──────────────────────────────────────────────────────────────┬──────────────┤
                                                                        ▼              ▼
                                                  n x awc_digit:  n ANDs ► XOR pairing tree ► S_i
```

* **Decoder (`awc_decoder`).** It turns the code D into a one-hot line, `line[r] = (D == r)`.
  Each line is an AND of the D bits, each bit taken inverted or not.
* **Coefficient memory (`awc_coeff_mem`).** It has one row per possible D code. The row
  holds the n×n coefficients D′(q) for that code's number q. The selected row is read out
  as the OR over all rows of (line AND row). This is a wired-OR column per coefficient, so
  no multiplexer tree is needed. The row of the missing code holds zeros, so a sum with
  that code gives `0000`.
* **Digits (`awc_digit` + `awc_pair_tree`).** Each digit substitutes the A bits into its
  coefficient vector (AND gates) and reduces the result with the pairing tree. In the
  OR_XAND family it uses OR gates and XNOR gates, fed with complemented coefficients and
  codes.
* **The complete adder (`awc_adder`).** It wires these three together. `awc_top` holds the
  4-bit adder and, beside it, the first digits of the 8-bit and 16-bit schemes. Each has
  its own ports.

### Memory layout and recording

The memory is an array of one-bit static cells (`awc_sram_cell`). Each cell is chosen by
a line select and a column select. It drives its bit while chosen and read, and stores its
data input at the clock edge while chosen and recording. The decoder line of D is the
line select of every cell in that row. All columns are selected together, so a row is read
or recorded as a whole.

Row r of the memory belongs to the code value r of D. Bit `(j-1)*n + (i-1)` of a row
holds d_ij. So d11 is bit 0, d21 is bit 1, …, and d_nn is the top bit.

At reset, every cell loads its bit of the table for the parameters: `INIT` (the initial
code), `TAPS` (the key) and `LOGIC` (the family). The table is computed at elaboration by
walking the ring once. Nothing is read from a file.

The table can also be rewritten at run time. Recording uses the same decoder as reading:
put the row's code on `d`, drive the new row on `mem_wdata`, and raise `mem_we`. The row
is stored at the next rising clock edge. Rewriting all 2^n rows switches the adder to
another code system without touching the logic. Rows for the system of initial code c
and key K are found this way:

* take the code v with number q in that system (v is c slid q times);
* the row for code v holds D′(q);
* column j of D′(q) is the unit code "only digit j set", slid q times.

While recording, the sum output is not meaningful. A second reset restores the
built-in system.

### Timing

Only the memory has state. It uses a synchronous, active-low reset and is written on the
rising edge of `clk`. An addition is purely combinational from `a`, `d` to `s`. A new sum
is ready within the same clock cycle in which its operands are applied.

The logic depth on the path from D is set by three parts:

* the decoder: an inverter plus a K-input AND;
* the memory read-out: an AND and a 2^n-input OR;
* the digit: 1 AND plus ⌈log2 n⌉ XOR levels.

The 4-bit adder therefore has no path that grows with a carry chain. The original analysis
counts the depth of this adder as about 2·log2 n + 10 gates. A carry-look-ahead adder
needs about 2·log2 n + 4. Both grow logarithmically, for example 16 against 10 gates at
n = 8, and 32 against 26 at n = 2048. These depth figures are quoted, not measured on
this RTL.

## 4. Range of the adder

A sum is exact while the numbers satisfy p + q ≤ 2^n − 2, which is 0…14 for 4 bits. The
4-bit computation protocol that goes with this design lists exactly those pairs: 120 of
them (15 + 14 + … + 1).

Beyond that range the circuit does not overflow. It simply goes on round the ring, so the
result is the code of (p + q) mod (2^n − 1). There is no overflow or range flag. A user
who needs one must compare the numbers outside the adder.

## 5. Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `awc_adder`, `awc_coeff_mem` | `N` | 4 | code width |
| | `TAPS` | `4'b1001` | key: bit t−1 set means x_(j−t) enters the XOR. `4'b1001` is x_j = x_(j−4) ⊕ x_(j−1) |
| | `INIT` | `4'b1111` | initial code of the built-in system |
| | `LOGIC` | `AND_XOR` | `AND_XOR`, or `OR_XAND` for the complemented (XAND) family |
| `awc_digit` | `N`, `LOGIC` | 4, `AND_XOR` | one digit |
| `awc_pair_tree` | `N`, `INVERT` | 4, 0 | XOR (0) or XNOR (1) pairing tree |
| `awc_decoder` | `K` | 4 | code width |
| `awc_top` | `INIT4` | `4'b1111` | initial code of the 4-bit adder |

**Conventions.**

* Code ports of `awc_adder` and `awc_top` (`a4`, `d4`, `s4`) carry digit 1 (a1, the
  leftmost digit as written) in the most significant bit.
* The single-digit ports `a_dig`, `a8`, `a16`, `d_row`, `d8_1` and `d16_1` are in digit
  order: bit j is a_(j+1) or d_(1,j+1).
* For the 16-bit OR/XAND digit, drive the complemented coefficients and an XAND-system
  code. The output is then the XAND-system digit.

**Other widths.** These need a key that gives all 2^n − 1 codes, i.e. a maximal-length
recursion. The tests use these keys:

* 8 bits: x_j = x_(j−8)⊕x_(j−6)⊕x_(j−5)⊕x_(j−4), `TAPS = 8'hB8`;
* 16 bits: x_j = x_(j−16)⊕x_(j−14)⊕x_(j−13)⊕x_(j−11), `TAPS = 16'hB400`.

Memory grows as 2^n × n² bits: 256 bits at n = 4, 16 Kbit at n = 8, but 16.8 Mbit at
n = 16. A complete 16-bit adder of this form is therefore impractical as flip-flops and is
not instantiated.

## 6. Files

| file | content |
|---|---|
| `rtl/awc_pkg.sv` | `awc_logic_e` family type; ring step, coefficient matrix and ring-length functions |
| `rtl/awc_pair_tree.sv` | pairing XOR/XNOR tree |
| `rtl/awc_digit.sv` | one sum digit |
| `rtl/awc_decoder.sv` | code to one-hot decoder |
| `rtl/awc_sram_cell.sv` | one bit of the static memory |
| `rtl/awc_coeff_mem.sv` | coefficient memory: array of cells, reset-loaded table, recording |
| `rtl/awc_adder.sv` | complete n-bit adder |
| `rtl/awc_top.sv` | 4-bit adder plus 8-bit and 16-bit first digits |
| `tb/awc_tb_pkg.sv` | reference model: plain shift-register stepping, no matrices |
| `tb/*_tb.sv` | one self-checking testbench per module |

## 7. Simulation

Every testbench prints `TB_RESULT checks=N failures=M` and ends with `$finish`. Each also
has a watchdog that counts a failure if the test hangs. To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/awc_pkg.sv tb/awc_tb_pkg.sv rtl/awc_pair_tree.sv rtl/awc_digit.sv \
    rtl/awc_decoder.sv rtl/awc_sram_cell.sv rtl/awc_coeff_mem.sv rtl/awc_adder.sv rtl/awc_top.sv \
    tb/awc_top_tb.sv --top-module awc_top_tb
./obj_dir/Vawc_top_tb
```

For a different testbench, replace the last file and the `--top-module`. Packages must
come first on the command line.

All testbenches compare against `awc_tb_pkg`. This reference never uses coefficient
matrices: it finds numbers by stepping a shift register and adds them as integers modulo
2^n − 1.

* **`awc_top_tb`** runs the top at its default parameters:
  * the whole 120-line computation protocol;
  * all 256 input pairs, including sums that wrap and sums with the missing code;
  * a switch to the system of `0111` by rewriting the memory, then back by reset;
  * the 8-bit and 16-bit first digits against 8-bit and 16-bit rings.

  It counts how often each of these happens and fails if any never happens.
* **`awc_adder_tb`** checks:
  * the 4-bit adder on all pairs in the systems of `1111`, `1000` and `1011`, plus the
    worked sums `0101+0110=0100` (system 1111), `1111+1101=0110` (system 1000) and
    `1100+0001=0111` (system 1011);
  * the 4-bit XAND adder on all pairs;
  * an 8-bit adder on random pairs.
* **`awc_pkg_tb`** checks all 15 matrices D′(q) of the 4-bit key against the algebraic
  table typed in from the original description, and the ring order against its code
  tables.

## 8. What is this design's own choice

These points follow the original description:

* the code systems and the 4-bit key;
* the rule "sum = slide A by D's number";
* the digit equation S_i = ⊕ (d_ij ∧ a_j) and its AND/XOR and OR/XAND gate forms;
* the pairing tree;
* the structure decoder → memory → digits;
* the 4-bit protocol and examples used in the tests.

The following are choices made here:

* **Memory behaviour.** The original says only that the coefficients are recorded in a
  static memory. It shows a latch cell with read, record and data-in lines and separate
  line and column decoders. Here the cell keeps those controls, but it stores its bit in a
  flip-flop, and all columns are selected together. Recording through the D decoder, the
  write-data bus and the reset that loads the table are choices made here.
* **Row width.** Rows are n² bits wide, one bit per coefficient d11…d_nn. The original
  text once calls this "2^k" bits. For k = 4 the two numbers are the same.
* **Decoder lines.** Line r is numbered by the binary value of D.
* **The missing code.** Its row is all zero, so a sum with it gives `0000`. In the XAND
  family the result is `1111`.
* **No range flag.** Nothing reports a sum outside the range.
* **Coefficient table.** The memory table is generated from the recursion, not copied
  from a bitmap table. It reproduces the algebraic table and all worked examples.
* **XAND family for wider keys.** For keys with more than two taps, it is defined as the
  complement of the XOR family.
* **Keys other than the 4-bit one.** The original gives none. The 8-bit and 16-bit keys
  above are standard maximal-length choices.
* **Wider adders.** Only the first digits of the 8-bit and 16-bit adders are drawn in the
  original, so only those digits are in the top. A complete 8-bit adder is `awc_adder`
  with `N = 8`, and it is tested.
