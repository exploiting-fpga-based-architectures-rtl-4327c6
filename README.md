# A reconfigurable combinatorial processor for logic matrices

Many problems in logic design and discrete optimisation can be written as
operations on logic matrices: covering, orthogonality and intersection tests
between rows, Boolean matrix equations `Z = X x Y`, searches for the row or
column with the most or fewest ones. A general-purpose CPU handles these poorly.
Its word size rarely matches the vector length, and every step is a loop over
bits. This processor keeps the matrices in on-chip RAM and processes a whole
row (or a gathered column) per clock. Two parts of it can be changed while it
runs:

* the **function unit** (RFU), whose element-wise operation is set by lookup
  tables, and
* the **control unit** (RCU), a finite state machine whose states, transitions
  and outputs all live in RAM.

So a new matrix operation needs new RAM contents, not new hardware.

The RTL follows a published architecture for such a co-processor. That
architecture fixes the block structure, the four-valued 2-bit elements, the
16x2 dual-port lookup-table primitives and the RAM-based FSM model of the
control unit. It does not give the control-word format, the encodings, the
sizes, the host interface or the special registers. Those are choices made
here, and the section on departures lists them.

## Four-valued elements

Every matrix element is 2 bits wide and takes one of four values:

| value | code | meaning as a literal of variable x |
|-------|------|-------------------------------------|
| `0`   | `00` | x inverted                          |
| `1`   | `01` | x itself                            |
| `-`   | `10` | x ignored (don't care)              |
| `+`   | `11` | x combined with its own inverse: the constant that `-` is not |

The fourth value `+` is what makes the scheme useful in hardware. It marks an
unused part of a matrix: padding, or a column that has already been chosen and
must no longer count. Only elements coded `01` count as ones. The code points
are defined in `rtl/cp_pkg.sv` (`E_ZERO`, `E_ONE`, `E_DC`, `E_PLUS`).

## Datapath

```
            host writes rows                      host reads rows
                 |                                      ^
        +--------v-------+   +----------------+   +-----+----------+
        | X  (matrix_ram)|   | Y (matrix_ram) |   | Z (matrix_ram) |<-- RFU result
        +--------+-------+   +-------+--------+   +-----+----------+
                 | row ri            | row ri           | Z[ri] fed back into X or Y
            row_reg X            row_reg Y
             |     \ element cj   |     \
             |   column_reg X     |   column_reg Y
             v      v             v      v
        operand mux A        operand mux B  (+ masks built from special registers)
                 \              /
                  +---- rfu ---+---> result, ones count, all-0/1/+ flags
                                         |
        rcu  <---- 16 logic conditions --+   rcu ----> 37-bit control word
```

* **Matrix RAMs** (`matrix_ram`). Each holds `ROWS` words, and each word is a
  row of `COLS` elements. Each RAM has the organisation of FPGA distributed
  dual-port RAM: a write port that also reads at its address, and a second
  read-only port. Both reads are asynchronous. X and Y are written by the host
  or, under program control, from Z (`Z[ri] -> X[ri]`, `Z[ri] -> Y[ri]`). This
  feedback lets a result become the next operand. Z is written by the RFU at
  row `ri`, or at row `cj` for column-ordered results, and the host reads it
  on the second port.
* **Row registers** (`row_reg`). A row register loads a whole row in one clock
  and exposes element `cj`.
* **Column registers** (`column_reg`). A row-organised RAM cannot deliver a
  column directly. A program reads rows 0..ROWS-1 in turn and shifts element
  `cj` of each into the column register. After `ROWS` shifts, element i of the
  register is row i's element.
* **Operand multiplexers.** Operand A comes from a row or column register of X
  or Y. Operand B can also be one of three generated masks, each `CW`
  elements long:
  * `+` at the selected column C and `-` elsewhere;
  * `+` at every removed row and `-` elsewhere;
  * all `-`;
  * all `+`.

  Vectors shorter than `CW = max(ROWS, COLS)` are padded with `+`.

### Special registers

These support search algorithms:

| register | operations | role |
|----------|------------|------|
| `ri`, `cj` | clear, increment (wraps) | row and column index |
| best count `bc` | set to max, set to 0, load the ones count | minimum or maximum search; compared with the current ones count |
| selected row | loaded from row register X | row R of a search; one of its elements is tested per column |
| selected column `C` | loaded from `cj` | column C of a search |
| removed-row register | clear, set bit `ri` | one bit per row |
| cover-set register | clear, set bit `C` | one bit per column; output as `cover_set` |

## Function unit (RFU)

`rfu` combines three parts:

1. **Operand registers** (`rfu_regs`). RA and RB each hold, load their
   operand, load the core result (to keep an intermediate value), or shift by
   one element to the left or right. The host can also write either register
   directly (`reg_we_a`/`reg_we_b`/`reg_wdata` at the top), with priority over
   the program's operation, and read both (`reg_a`, `reg_b`).
2. **Reconfigurable core** (`reconf_core`). One primitive per element position.
   Primitive i (`rfu_primitive`) is a 16x2 RAM addressed by `{a_i, b_i}`, so its
   2-bit output is any pair of Boolean functions of the four operand bits. The
   second port of each RAM rewrites its table. `cfg_sel` picks which primitives
   a write goes to: all of them, or a single one. The core is purely
   combinational from RA and RB.
3. **Flag circuits** (`rfu_flags`). These compute the number of elements equal
   to 1, and tests for all 0, all 1, all `+` and no ones.

Timing: an operand register loads on a clock edge. The result and flags are
valid in the same cycle after that edge, so the next state can test them or
write them to Z.

Examples of table contents (functions of the two operand codes):

* **XOR on 0/1 elements:** `r = a ^ b` when both are 0 or 1, otherwise `-`.
* **Mask:** `r = (b == +) ? + : a`. With B all `-` this is the identity. With
  a mask it overwrites chosen positions with `+`.

## Control unit (RCU): how programs are written

This is the part to understand before using the processor.

`rcu` is a Moore machine. Its program RAM has `M` words (default 64), one word
per state:

```
{ c[N-1:0], csel[3:0], next1[5:0], next0[5:0] }
```

Each state works like this:

* While the machine is in a state, `c` drives the datapath.
* The state tests the single logic condition `b[csel]`.
* On the next clock the machine goes to `next1` if that condition is 1, and
  to `next0` otherwise.
* Reset puts the machine in state 0. The program RAM is not reset.
* The host rewrites words through `prog_we/prog_addr/prog_data`. A rewritten
  word takes effect from the next clock on.
* One state lasts one clock.

In the processor `c` is the struct `cp_pkg::ctrl_t` (37 bits), so
`prog_data` is 53 bits wide. Every operation field uses 0 for "do nothing", so
a state only sets the fields it needs:

| field | effect |
|-------|--------|
| `ri_op`, `cj_op` | `CNT_CLR`, `CNT_INC` |
| `x_row_ld`, `y_row_ld` | row register <- `X[ri]` / `Y[ri]` |
| `x_col_sh`, `y_col_sh` | column register shifts in element `cj` of the row register |
| `y_col_flag`, `flag_sel` | column register Y shifts in a result flag instead: `FL_ANY` (some one), `FL_NONE` (no one), `FL_ODD` (odd number of ones), `FL_ALL` (all ones), as element 1 or 0 |
| `x_addr_cj` | X is read at row `cj` instead of `ri` |
| `ra_op`, `rb_op` | `REG_LOAD`, `REG_LDRES`, `REG_SHL`, `REG_SHR` |
| `a_src`, `b_src` | operand sources (`A_ROWX` ... , `B_MASKC`, `B_MASKDEL`, `B_DC`, ...) |
| `z_we`, `z_addr_cj` | write the result to `Z[ri]` (or `Z[cj]`) |
| `x_fb_we`, `y_fb_we` | `X[ri]` / `Y[ri]` <- `Z[ri]` |
| `bc_op` | `BC_MAX`, `BC_ZERO`, `BC_LOAD` |
| `r_ld`, `c_ld` | selected row <- row register X; C <- `cj` |
| `rowdel_op`, `cover_op` | `SET_CLR`, `SET_BIT` |
| `done`, `fail` | status outputs |

The conditions (`cp_pkg::COND_*`) are:

| index | condition |
|-------|-----------|
| 0 | true |
| 1 | `start` input |
| 2 | row `ri` removed |
| 3 | ones count < best count |
| 4 | ones count > best count |
| 5 | `ri` is the last row |
| 6 | `cj` is the last column |
| 7 | selected row has 1 at `cj` |
| 8 | row register X has 1 at C |
| 9 | best count is 0 |
| 10 | every row removed |
| 11 | result all 0 |
| 12 | result all 1 |
| 13 | result all `+` |
| 14 | result has no ones |
| 15 | false |

The usual convention is:

* State 0 idles until `start`.
* A final state with `done` loops on itself.
* The host pulses `rst_n` to go back to state 0. This clears the datapath
  registers but keeps all RAM contents.

A row loop looks like this (from the XOR program):

```
1: ri_op=CLR                                  -> 2
2: x_row_ld, y_row_ld                         -> 3
3: ra_op=LOAD a_src=ROWX, rb_op=LOAD b_src=ROWY -> 4
4: z_we                                       -> 5
5: y_fb_we              if ri_last -> 7 else -> 6
6: ri_op=INC                                  -> 2
7: done                                       -> 7
```

This takes 5 clocks per row. `Z = X xor Y` over 16 rows takes 81 clocks from
`start`.

### Example: minimal column cover

The greedy cover algorithm runs as one program of 38 states:

1. Pick the first row R with the fewest ones. If it has none, no cover exists.
2. Among the columns with a one in row R, pick the first column C with the
   most ones in the remaining rows.
3. Add C to the cover.
4. Remove C and every row it covers, then repeat until no rows remain.

The program realises the steps as follows:

* **Removing rows.** A removed row gets its bit set in the removed-row
  register.
* **Removing column C.** Each row is combined with the `+`-at-C mask, written
  to Z and fed back into X. A removed column is therefore `+` everywhere and
  no longer counts.
* **Counting a column.** The column is gathered in the column register and
  combined with the removed-row mask, so removed rows do not count.
* **Padding.** Before step 1, rows that are entirely `+` are marked removed.
  A small problem can therefore sit inside the 16 x 16 array padded with `+`.

On the matrix

```
      c1 c2 c3 c4
r1     1  1  0  0
r2     1  1  0  0
r3     0  1  0  1
r4     0  0  1  1
```

the program picks r1, then c2 (3 ones). That removes r1 to r3 and c2. It then
picks r4 and c3, and ends with `cover_set` = columns 2 and 3. The full program
is in `tb/tb_cp_top.sv` (`prog_cover`).

### Example: relation matrices and the Boolean matrix product

Some operations build a new matrix whose element (i, j) says something about
row i against row j. Such a program uses two loops:

* The outer loop runs over `cj`. It reads `X[cj]` (`x_addr_cj`) into RA.
* The inner loop runs over `ri`. It loads row `ri` of X or of Y into RB.
* For each inner step, column register Y takes one flag of the result as a
  0/1 element.
* After the inner loop the collected vector is passed through the core
  (B = all `+`, and each table passes `a` when `b` is `+`) into `Z[cj]`.

With this one program shape, only the primitive table and the flag change:

| table | flag | result |
|-------|------|--------|
| XOR (`-` where either side is `-`) | `FL_ANY` | `Z[i][j] = 1` when ternary rows i and j are orthogonal: they differ in a position where both are specified |
| XOR | `FL_NONE` | intersection matrix, the complement of the above |
| AND | `FL_ANY` | `Z = X x Y`, AND inside and OR outside, once Y has been transposed in place |
| AND | `FL_ODD` | `Z = X x Y`, AND inside and XOR outside |

The same idea evaluates a whole set of terms at once. Each row of X is a
product (or sum) of literals, and element j is the 2-bit literal of
variable j:

* `0` means the variable is inverted.
* `1` means the variable is taken as it is.
* In a product, `-` is the constant 1 and `+` is the constant 0.
* In a sum, `-` is the constant 0 and `+` is the constant 1.

The primitive table maps (literal, variable value) to the literal's value.
The input vector sits in `Y[0]` and is loaded into RB. Alternatively the host
writes it into RB directly. For each row the flag
`FL_ALL` (product) or `FL_ANY` (sum) is collected. `Z[0][i]` then holds the
value of term i. This is where the fourth value pays off: it gives every
variable all four one-variable functions: not x, x, 1 and 0.

The in-place transpose of Y is itself a program. It gathers the columns of Y
into Z, then copies Z back into Y through the feedback path. One relation
matrix of 16 x 16 takes about 16 x (16 x 4 + 4) clocks.

## Host interface

The host side works only while the RCU waits in an idle state or is held in
reset:

* `mat_we/mat_sel/mat_addr/mat_wdata` write one row of X (`mat_sel=0`) or
  Y (`mat_sel=1`) per clock.
* `z_raddr -> z_rdata` reads a row of Z combinationally.
* `cfg_*` writes one table entry of the selected primitives per clock.
* `prog_*` writes one RCU word per clock.
* `reg_we_a/reg_we_b/reg_wdata` write RA or RB of the function unit, for
  example to supply an input vector without storing it in Y.
* `start` is just condition 1.
* `done`, `fail`, `cover_set`, `best` and `state` are status outputs.

A program's feedback write into X or Y takes priority over a host write in
the same clock.

## Parameters and size

| module | parameter | default |
|--------|-----------|---------|
| `cp_top` | `ROWS`, `COLS` | 16, 16 |
| `cp_top` | `M` (RCU states) | 64 |
| `rcu` | `L`, `N`, `M` | 16, 32, 64 |
| `reconf_core`, `rfu*` | `W` | 16 |

`cp_top` sets `N` to 37, the width of `ctrl_t`. The derived widths are
parameters with computed defaults.

At the defaults the design holds 5440 RAM bits:

* X, Y and Z: 1536 bits
* the primitive tables: 512 bits
* the RCU program: 3392 bits (64 words of 53 bits)

It also has about 215 flip-flops. The 16-word depth matches the LUT RAM of the
older FPGAs the architecture was aimed at. Larger matrices only need larger
`ROWS`/`COLS` (and a larger `M` for longer programs). Transposition, the
relation matrices and the matrix product need `ROWS == COLS` for a full
result; otherwise the result rows are cut to `COLS` elements.

## Departures from the published architecture and open points

* **Sizes.** The element width (2 bits) and the 16x2 primitive RAM are given.
  The matrix size, the number of primitives, L, N and the number of states are
  not given. The values 16/16/16/16/37/64 used here are this design's choice.
* **Control-unit implementation.** The published design builds the RCU with a
  specific RAM-based FSM method that it does not describe. The one-condition,
  two-successor Moore word used here is a simple equivalent. It is not that
  method.
* **Special registers.** The published design only says that special
  registers keep extra information about the vectors. The index counters,
  best-count register, selected row and column, removed-row register,
  cover-set register and the masks are this design's own.
* **Function-unit registers.** The registers are two operand registers with
  load, load-result and shift. Their I/O port is a direct host write of RA or
  RB, plus the `reg_a`/`reg_b` outputs.
* **Flag circuits.** The all-`+` flag is an addition, used to skip padding.
* **Building result rows from flags.** Column register Y can collect one
  flag per step, and X can be read at `cj`. Both are additions. They give the
  relation matrices and the matrix product `Z = X x Y` a path through the
  fixed datapath. The published design names these operations but not how
  the hardware produces them. The product transposes Y in place first; that
  method is also this design's own.
* **Row/column exchange.** The published example of exchanging a row with a
  column only describes the access pattern: a parallel row read, then a
  column gathered by sequential reads. Here it is shown as a full transpose.
* **Tie-breaking.** In the cover search the first row with the fewest ones
  wins, as in the published worked example. The first column with the most
  ones also wins.
* **Not covered here.** The schematic-entry and VHDL-generation tool that
  accompanied the architecture is software and has no RTL here. The host
  computer is modelled only by the testbenches.

## Files

`rtl/`:

* `cp_pkg.sv`: element codes, control word, conditions.
* `cp_top.sv`: the processor.
* `rcu.sv`
* `rfu.sv`, `rfu_regs.sv`, `reconf_core.sv`, `rfu_primitive.sv`,
  `rfu_flags.sv`
* `matrix_ram.sv`, `row_reg.sv`, `column_reg.sv`

`tb/` has one self-checking testbench per module (`tb_<module>.sv`). Each
compares with a model written in the testbench and prints
`TB_RESULT checks=N failures=M`.

`tb_cp_top` runs the whole processor at its default size, every result
checked against a reference model:

* XOR with feedback into Y;
* a transpose;
* a shift;
* the orthogonality and intersection matrices of a random ternary matrix;
* the OR and XOR matrix products;
* product and sum terms for random input vectors;
* the cover example above and 40 random cover problems.

It also counts that every mechanism occurred.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/cp_pkg.sv tb/tb_cp_top.sv \
          --top-module tb_cp_top -Mdir obj_cp_top
./obj_cp_top/Vtb_cp_top
```

Replace `cp_top` with any other module name to run its testbench. Each full
run takes well under a second.
