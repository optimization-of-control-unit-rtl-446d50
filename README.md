# CMCU U2: a microprogram control unit with three sources of class codes

This is the RTL of a *compositional microprogram control unit* (CMCU) for a
small example control algorithm, the flow chart Γ1 with 31 microinstructions.
It is organised so that the logic that a CPLD has to provide next to the
microprogram PROM stays small.

## The idea

A control algorithm that is mostly sequential splits into **operational
linear chains (OLC)**. A chain is a run of microinstructions with one exit,
its *output*, and it may be entered at any point. The components of a chain
sit at consecutive addresses, so inside a chain the address counter CT just
counts. The control memory marks this with the bit `y0 = 1`.

At a chain output (`y0 = 0`) the next address depends on the logical
conditions `x`. Chains whose outputs lead to the same successors form a class
of *pseudoequivalent* chains. The next-address logic (BMA, block of
microinstruction address) therefore only has to know the class, not the exact
output address.

In the classic organisation an *address transformer* (BAT) turns every
output address into a class code. This design takes the class code from
whichever of three sources is cheapest:

| source | classes | how |
|---|---|---|
| the counter value T itself | classes whose outputs all lie in one cube of the 5-bit address space | BMA decodes the cube from T directly |
| free outputs V of the PROM chips | as many classes as the unused PROM bits can code (`2^R3 − 1`) | the code is stored in the control-memory word at the chain outputs |
| address transformer Z = Z(T) | the rest | a small decoder of output addresses |

`V = 0, Z = 0` means "look at T". Only the classes that neither T nor V can
identify reach the transformer, so the transformer shrinks. In this example
it shrinks to a single two-term product sum.

## The example flow chart Γ1

| chain | vertices | addresses | output | class | class code |
|---|---|---|---|---|---|
| α1 | b1–b2 | 00000–00001 | 00001 | B1 | T ∈ 0000* |
| α2 | b3–b6 | 00010–00101 | 00101 | B2 | T ∈ 001** |
| α3 | b7–b8 | 00110–00111 | 00111 | B2 | T ∈ 001** |
| α4 | b9–b13 | 01000–01100 | 01100 | B3 | v1 = 1 |
| α5 | b14–b17 | 01101–10000 | 10000 | B3 | v1 = 1 |
| α6 | b18–b21 | 10001–10100 | 10100 | B4 | z1 = 1 |
| α7 | b22–b25 | 10101–11000 | 11000 | B4 | z1 = 1 |
| α8 | b26–b28 | 11100–11110 | 11110 | B5 | T ∈ 111** |
| α9 | b29–b31 | 11001–11011 | 11011 | end | yE = 1 |

The outputs of B3 (01100, 10000) and of B4 (10100, 11000) do not fit in one
cube without taking in outputs of other classes. They need another source.
There are 13 one-hot microoperations. With `y0` and `yE` a word has 15 bits,
so four PROM chips with 4 outputs each are needed, which leaves one bit free.
That bit is `v1` and codes B3. B4 then needs one transformer output, `z1`.

Transitions (`x[k-1]` is condition x_k):

```
B1 -> x4 b3  | ~x4 b7                       (this design's choice)
B2 -> x3 b9  | ~x3 b26
B3 -> x1 b18 | ~x1 x2 b20 | ~x1 ~x2 b26
B4 -> x5 b27 | ~x5 b5
B5 -> x2 b22 | ~x2 x3 b14 | ~x2 ~x3 b29     (this design's choice)
```

The published example gives the B2, B3 and B4 lines. The B1 and B5 lines are
this design's own. They were picked so that every chain can be reached and the
algorithm can finish. Replace them in `rtl/bma.sv` (and in the reference model
`tb/cmcu_ref_pkg.sv`) for a real algorithm.

## Blocks

| file | block | what it does |
|---|---|---|
| `rtl/cmcu_pkg.sv` | constants | sizes (R = 5, N = 13, t = 4, R0 = 4, R3 = 1, R4 = 1), chain addresses, the control-memory image `cm_word()` |
| `rtl/cmcu_u2.sv` | top | wires TF, CT, CM, BAT and BMA; holds three assertions |
| `rtl/fetch_ff.sv` | TF | set by `start`, cleared by `yE` (set wins) |
| `rtl/ct_counter.sv` | CT | `start` → 00000; with `fetch`: `y0` ? T+1 : Φ; holds when not fetching |
| `rtl/control_memory.sv` | CM | four `prom_chip`s, word `{v1, yE, y0, y13..y1}` |
| `rtl/prom_chip.sv` | PROM | 32 × 4-bit cells, asynchronous read, output enable = `fetch` |
| `rtl/bat.sv` | BAT | `z1 = (T == 10100) | (T == 11000)` |
| `rtl/bma.sv` | BMA | class from v1, z1 or the cube of T, then target by `x` |

The word layout, the microoperation of each vertex, and the reset are this
design's choices. Vertex b_q issues y_k with k = ((q−1) mod 13)+1. The source
leaves the microoperation content open.

## Timing

* `start` is sampled on a rising clock edge. It loads 00000 into CT and sets
  TF. b1 executes in the next cycle.
* One microinstruction per clock while `fetch = 1`. The PROM read is
  combinational, so `y`, `ye` and `t` belong to the same cycle.
* At a chain output, `x` is sampled at the edge that ends that cycle.
* The cycle of b31 shows `ye = 1`. At the following edge TF clears, and `y`
  is 0 from then on. CT stays where it is until the next `start`.
* `rst_n` is an asynchronous, active-low reset of CT and TF.

A run of the flow chart takes exactly as many clocks as vertices it executes.

## Deviations and readings of the source

* The published example has inconsistencies. This design follows the class
  assignment, Π_E = {B3} coded by v1 and Π_D = {B4} coded by z1. It also
  follows the transformer table (outputs 10100 and 11000).
* One sentence places v1 at 10100 and 11000, and the printed z1 equation
  covers 10000. Both contradict that class assignment and are not followed.
* α9's output is placed at 11011, following the listed addresses b29–b31.
  The printed Karnaugh map shows it at 11010.
* The B4 transition uses x5 throughout. One table line shows x4.
* The baseline unit U1 (full address transformer for all classes) is not
  built. The data path that consumes `y` and produces `x` is outside this RTL.
* Sizes are package constants, not module parameters. The control-memory
  image, BMA and BAT are specific to Γ1 and would not follow a size change.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/cmcu_pkg.sv tb/cmcu_ref_pkg.sv tb/tb_cmcu_u2.sv --top-module tb_cmcu_u2
./obj_dir/Vtb_cmcu_u2
```

`tb/cmcu_ref_pkg.sv` is an independent model of Γ1 at the vertex level:
chains, their first addresses, classes and transitions. The testbenches
derive every expected address and control-memory field from it.
`tb_cmcu_u2` executes Γ1 400 times with random conditions and checks the
address, microoperations and `yE` every cycle. It also checks one clock per
microinstruction. It counts each mechanism, and each must occur: counting
inside a chain, a class code from T, from V and from Z, the end by `yE`, and
a restart by `start` during a run. It also checks that all nine chains are
executed. The block testbenches (`tb_prom_chip`, `tb_control_memory`,
`tb_ct_counter`, `tb_fetch_ff`, `tb_bat`, `tb_bma`) test every address or
every input combination, or use random stimulus against a model.
