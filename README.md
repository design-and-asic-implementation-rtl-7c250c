# Shift-and-add vector rotator with carry-free redundant adders

This is a small fixed-point vector rotator of the CORDIC family. A vector (x, y) goes through
three stages of shift-and-add rotators. Every adder and subtractor in those rotators is a
redundant-arithmetic adder/subtractor: it works on numbers in borrow-save form, so no carry
travels the length of the word, and its delay does not grow with the word width. A carry only
ripples once per rotator, when its result is converted back to a plain binary word.

```
            +-----------------------+
 x_in,y_in -+-> friend-angle rotator -+        +------------+       +-------------------+
            |  (5 adders, 7 muxes)    +------> | comparator | ----> |  nano-rotation    | --> x_out, y_out
            +-> USR rotator ---------+        | x and y,   |       |  rotator          |
               (2 adders, 2 muxes)             | separately |       |  (2 adders)       |
                                               +------------+       +-------------------+
     stage 1                        reg        stage 2        reg     stage 3            reg
```

Words are 16 bits, unsigned, and wrap modulo 2^16. One vector is accepted per clock cycle and
its result appears three clock edges later.

## Borrow-save arithmetic: the RA-PPM and RA-MMP cells

This is the part of the design that differs most from an ordinary datapath.

A borrow-save number is a pair of words (p, n) with value p - n. Every bit position therefore
holds a digit in {-1, 0, 1}, and a given value has many representations. That freedom is what
allows an addition without a carry chain. Two kinds of 1-bit cells do the work. Each is a full
adder with some of its pins inverted.

**RA-PPM (plus-plus-minus), `ra_ppm`.** Two positive input bits a and b and one negative bit m
give a positive carry c of weight 2 and a negative sum s:

    a + b - m = 2c - s          s = a ^ b ^ m
                                c = NAND( NAND(a,b), NAND(a^b, ~m) )

**RA-MMP (minus-minus-plus), `ra_mmp`.** Two negative input bits a and b and one positive bit p
give a positive sum s and a negative carry c of weight 2:

    -a - b + p = s - 2c         s = a ^ b ^ p
                                c = NAND(~a,~b) & NAND(a^b, p)

The cells use only XOR, NAND and inverters. A row of W cells has no connection between
positions: the carry of position i is simply wired to position i+1 of the next row.

**Adding two borrow-save numbers, `ra_addsub`.** To compute Z = X + Y, with X = (x.p, x.n) and
Y = (y.p, y.n):

1. An RA-PPM row takes x.p, y.p (plus) and x.n (minus). It gives plus carries c1 and minus
   sums s1.
2. An RA-MMP row takes s1, y.n (minus) and the carries c1 moved up one position (plus). The
   free bit 0 of that word is the constant input `cin`. The row gives plus sums s2 and minus
   carries c2.
3. The result is Z = (s2, c2 moved up one position).

Subtraction, Z = X - Y, is the same thing with the two rails of Y exchanged. The unit builds
both pairs of rows, two RA-PPM rows and two RA-MMP rows, and the control bit `ctrl` selects the
sum (0) or the difference (1). The carries that fall off the top of the word are given out as
`cout_p` and `cout_n`, so that

    X +/- Y + cin = (z.p - z.n) + 2^W * (cout_p - cout_n)

holds exactly. The testbench checks that identity. The critical path is two cell delays plus a
2:1 multiplexer, whatever the value of W.

**Back to binary, `bs_to_bin`.** It computes p - n with an ordinary subtractor. This is the only
carry-propagating step. Each rotator has one per output, because the stage-2 comparators work on
plain words.

Inside the friend-angle rotator, results pass from adder to adder still in borrow-save form. A
shift moves both rails. A multiplexer switches both rails.

## The rotators

The shift amounts, adder counts and multiplexer labels below come from the published block
diagrams. `<<` is a left shift within 16 bits.

**USR rotator (`usr_rotator`, stage 1).** Two adders and two 2:1 multiplexers:

    xout = (x << (2K-1)) -/+ (sel ? y << K : x)        dir = 1 subtracts
    yout = (y << (2K-1))  +  (sel ? x << K : y)

K = 4. With K = 4 and 16-bit wrap-around, this rotator reproduces the published example. Input
25 + i500 gives 3175 + i64500 when the multiplexers pick the unshifted operand, and
60736 + i64400 when they pick the crossed one, both with the x path subtracting.

**Nano-rotation rotator (`nano_rotator`, stage 3).** It has the same shape, but the y path
shifts by 3K-1:

    xout = (x << (2K-1)) -/+ (sel ? y << K : x)
    yout = (y << (3K-1))  +  (sel ? x << K : y)

The published description leaves K to be chosen from the range of input angles. K = 4 is this
design's default, and it is the `NANO_K` parameter of the top.

**Friend-angle rotator (`friend_angle_rotator`, stage 1).** Five adders and seven 2:1
multiplexers. A kernel setting k (0, 1 or 2) drives all seven multiplexers. Three of the adders
are add/subtract units, each with its own direction bit d[0..2]:

    T1 = 2x  -/+ (k==0 ? x : 2x)                               d[0]
    M  = (k==2 ? 4x : 32x) + y
    X  = (k==0 ? y : M) -/+ (k==1 ? 4*T1 : 8*T1)               d[1]
    Y  = 16y -/+ (k==0 ? 8y : x) + (k==2 ? 4M : (k==1 ? T1 : y))   d[2]

The following come from the diagram: the shift amounts, the kernel numbers on the multiplexer
inputs, and which adders have +/- control. Which of x and y feeds each internal line is this
design's reading of it. Treat it as the least certain part of the design. The published example
values for this rotator (625 + i10425 and 5500 + i16200 for input 25 + i500) are **not**
reproduced. Kernel setting 3 acts as 2.

## Stage 2: choosing between the two rotators

`compare_stage` uses two 16-bit magnitude comparators (`mag_comparator`). Each is an XNOR
equality chain with AND-OR greater-than and less-than terms. One compares the two x words and
the other the two y words. Each output word is chosen on its own:

- with `pick_large = 0`, the lower of the two words passes (the usual choice, for the smallest
  remaining angle);
- with `pick_large = 1`, the higher passes;
- on a tie, the friend-angle word passes.

The comparison is unsigned. In the published example 5500 counts as lower than 60736, which
would be false in two's complement.

## Interface and timing of `shift_add_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `in_valid` | in | 1 | `x_in`/`y_in` hold a vector |
| `x_in`, `y_in` | in | 16 | input vector |
| `sel` | in | 1 | selection line of the USR and nano multiplexers; 1 = unshifted operand |
| `fa_kernel` | in | 2 | friend-angle kernel setting |
| `fa_dir` | in | 3 | add (0) / subtract (1) of the friend-angle +/- units |
| `usr_dir`, `nano_dir` | in | 1 | add/subtract of the USR and nano x paths |
| `pick_large` | in | 1 | stage-2 policy (0: keep the lower word) |
| `out_valid` | out | 1 | result valid |
| `x_out`, `y_out` | out | 16 | result vector |
| `fa_x_taken`, `fa_y_taken` | out | 1 | stage 2 took that word from the friend-angle rotator |

There is a register after each stage. A vector sampled with `in_valid = 1` at clock edge n
appears with `out_valid = 1` after edge n+3. The control inputs are sampled with the vector and
travel through the pipeline beside it, so they may change every cycle. Reset clears the valid
bits and the data registers.

The published example gives one selection line, s, for the 2:1 multiplexers of all rotators,
and s = 1 selects the unshifted operand. The diagrams label that multiplexer input 0.
Internally, the rotators follow the diagram labels, and the top drives their `sel` pins with
`~sel`. The friend-angle rotator has three kernel settings, which cannot be coded on one bit, so
its setting is a separate input.

## How far this follows the published design

Taken from the published design:

- the three-stage organisation;
- the adder and multiplexer counts of each rotator;
- all shift amounts;
- the 16-bit comparators;
- the add/subtract control bit (0 = add);
- the use of plus-plus-minus and minus-minus-plus redundant cells, two of each per
  adder/subtractor, built from XOR, NAND and inverters.

This design's own choices:

- **Number format.** Borrow-save, value = p - n. The published design says only "redundant
  arithmetic".
- **Cell equations.** Derived from the cell names. The published schematics are not reproduced
  gate for gate.
- **Adder/subtractor structure.** One RA-PPM/RA-MMP pair for the sum and one for the
  difference, selected by the control bit. The published block diagram chains its four cells
  and has "garbage" outputs in the style of reversible logic; those outputs have no function
  here and do not exist.
- **Constant input.** Treated as a carry-in.
- **Conversion to binary.** A conversion at each rotator output.
- **Pipeline and handshake.** The pipeline registers, the valid handshake and the reset.
- **K values.** K = 4 for the USR rotator, derived from the published example, and K = 4 for
  the nano rotator, which has no published value.
- **Friend-angle wiring.** The internal wiring of the friend-angle rotator (see above).
- **Unsigned words.** Words are unsigned with wrap-around, following the example's numbers.

Not built:

- **Trivial-rotation stage.** The published text mentions a stage that rotates by ±90°/±180°
  as part of the six-stage design it starts from. The three-stage design and its example have
  no such stage, and no rule for it is given.
- **Angle accumulator and direction from the residual's sign.** The text mentions both, but
  gives no angle constants for the kernels, and the unsigned number convention of its example
  has no sign. The rotation directions are therefore inputs.

Published results that this RTL does **not** match: the friend-angle outputs of the worked
example (above), and its nano-rotator outputs, 49551 + i3257 and 19456 + i57344. No shift value
K from 1 to 8 with either multiplexer setting reproduces the latter. With this design's wiring,
the two example cases give:

| case | USR | friend-angle (`fa_kernel` = s, all adding) | stage 2 keeps | output (nano subtracting) |
|---|---|---|---|---|
| s = 1 | 3175 + i64500 | 1700 + i8125 | friend-angle, both words | 19292 + i1981 |
| s = 0 | 60736 + i64400 | 1100 + i12500 | friend-angle, both words | 6336 + i58560 |

The published example also has stage 2 keeping the friend-angle words in both cases.

## Files

| file | content |
|---|---|
| `rtl/ra_pkg.sv` | `DATA_W` = 16 |
| `rtl/ra_ppm.sv`, `rtl/ra_mmp.sv` | rows of redundant cells |
| `rtl/ra_addsub.sv` | integrated adder/subtractor |
| `rtl/bs_to_bin.sv` | borrow-save to binary |
| `rtl/friend_angle_rotator.sv`, `rtl/usr_rotator.sv`, `rtl/nano_rotator.sv` | rotators |
| `rtl/mag_comparator.sv`, `rtl/compare_stage.sv` | stage 2 |
| `rtl/shift_add_top.sv` | the three-stage pipeline |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_worked_example.sv` | the two published example cases through the whole design |

Each testbench compares the block against an integer model written independently of the RTL.
Each prints `TB_RESULT checks=N failures=M` and has a watchdog. `tb_shift_add_top` streams about
5000 random vectors with random idle cycles and a reset in the middle of the stream. It checks
every output and the exact three-cycle latency. It also counts that each mechanism occurred:
each kernel, both selection values, both stage-2 policies, each rotator winning each word,
idle cycles, wrap-around and reset.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing -Irtl -y rtl -y tb rtl/ra_pkg.sv tb/tb_shift_add_top.sv \
          --top-module tb_shift_add_top -o sim
./obj_dir/sim
```

Any other testbench runs the same way; replace the testbench file and top-module name. Every
module and testbench runs in well under a second.

## Changing it

- **Word width.** Change `W` on the top, or `DATA_W` in `ra_pkg`. All modules are
  parameterized. The testbenches' models assume 16 bits (`MASK`, `W`).
- **Shifts.** `USR_K` and `NANO_K` on the top set the USR and nano shifts. A shift of 3K-1 must
  stay below W, or y drops out of the nano rotator's y path.
- **Friend-angle rotator.** Its wiring is written as five adder instances with the multiplexers
  in `always_comb` blocks next to them. Rewiring it to a different reading of the kernel network
  only touches that file and the model in its testbench and in `tb_shift_add_top`.
