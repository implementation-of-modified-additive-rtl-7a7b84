# Modified additive lagged Fibonacci generator (MALFG)

A pseudorandom number generator that makes one 10-bit word per clock. It is
based on the additive lagged Fibonacci generator. That generator is fast,
but its output has poor statistics. This version adds one extra term, a
feedback bit formed from the newest word:

    Q_i = (Q_{i-3} + Q_{i-8} + a) mod 2^10
    a   = (b_0 & c_0) ^ (b_1 & c_1) ^ ... ^ (b_9 & c_9)

Here `b` is the previous word `Q_{i-1}` and `c` is a 10-bit control code
applied from outside. The generator's output is the newest word. The bit
stream that is normally tested is the least significant bit of each word.

The RTL follows the generator described in the article "Implementation of
modified additive lagged Fibonacci generator". That article evaluates it on a
Xilinx programmable device. It reports that the generator period exceeds 10^9
and that the LSB stream passes the NIST test suite. It also gives clock
limits for two versions of the XOR network. This RTL is an independent
implementation. Where the article gives no detail, this RTL makes its own
choices. They are listed under "Where this RTL departs from or adds to the
source".

## Structure

```
            +-------------------------------------------------------+
            |                          +---------------------+      |
            v                          |                     |      |
  seed --->[mux]--> 2_0 --> 2_1 --> 2_2 --> 2_3 --> ... --> 2_7     |
  load ----^  ^      |               (lag 3)                (lag 8) |
              |      +--> q_out, bit_out = q_out[0]                 |
              |      |                                              |
              |      v                                              |
              |   logical circuit: a = ^(b & c)   <-- c             |
              |      | a (carry-in)                                 |
              +--- adder: (2_2 + 2_7 + a) mod 2^10 <----------------+
```

| Module | Role |
|---|---|
| `malfg_top` | The generator. It joins the parts below and holds the seed-load multiplexer. |
| `malfg_regs` | The chain of `Q` registers, each `M` bits wide. On each enabled clock the chain shifts by one place. |
| `malfg_adder` | The adder. It computes `(x + y + cin) mod 2^M`, with the feedback bit as the carry-in. |
| `malfg_lc_chain` | Logical circuit, option 1. It gates each bit with `c`, then XORs the gated bits in a chain of two-input gates. |
| `malfg_lc_tree` | Logical circuit, option 2. It computes the same function through a balanced XOR tree. |
| `malfg_xor_tree` | The balanced tree of two-input XOR gates used by option 2. |
| `malfg_pkg` | The default sizes (`M_BITS = 10`, `P_LAG = 3`, `Q_LAG = 8`) and the `lc_option_e` type. |

## The register chain and the lags

This part is the easiest to get wrong. The chain has registers `2_0 .. 2_{Q-1}`,
which is eight registers at the defaults. `2_0` always holds the newest word.
Just before the clock edge that forms `Q_i`, register `2_j` holds `Q_{i-1-j}`.
So the two operands of the recurrence come from these registers:

* `Q_{i-P}` is in register `2_{P-1}`, which is `2_2` at the defaults;
* `Q_{i-Q}` is in register `2_{Q-1}`, which is `2_7`, the last register.

On the edge, the sum goes into `2_0` and every other word moves one place
down the chain. The oldest word is dropped.

The original block diagram draws the chain up to a register `2_q` and takes
the operands from `2_p` and `2_q`. Read literally, that would give
`Q_i = Q_{i-1-p} + Q_{i-1-q} + a`. That is one step off the recurrence the
article evaluates. This RTL follows the recurrence, `Q_i = Q_{i-3} + Q_{i-8} + a`,
with eight registers. The schematic of the evaluated circuit also shows
eight register stages. To match the drawing literally instead, set `P` and
`Q` one higher and change nothing else.

## The feedback bit and the control code

The control code `c` chooses which bits of the newest word go into the
feedback bit `a`. A set bit `c_k` includes bit `b_k`. The article defines `a`
as `b_0 ^ ... ^ b_S` for any `S` from 0 to `m-1`. That is the special case
`c = 2^(S+1) - 1`. With `c = 0`, `a` is always 0, and the circuit is a plain
additive lagged Fibonacci generator.

The feedback bit goes into the adder as its carry-in. The three-operand sum
therefore costs no more than an ordinary 10-bit adder. The carry out of bit
9 is dropped, and that drop is the `mod 2^10` of the recurrence.

`a` is combinational. It depends only on register `2_0` and on `c`. It is
brought out as `a_out`.

## Option 1 and option 2 of the logical circuit

The two options compute exactly the same `a`. They differ only in how the
XOR gates are arranged. The parameter `LC_OPTION` chooses between them when
the design is built.

* `LC_CHAIN` (option 1, the basic configuration and the default): AND gates,
  then `W-1` XOR2 gates in series. It uses the fewest gates, but it has the
  longest path: 9 XOR levels at `W = 10`.
* `LC_TREE` (option 2): AND gates, then a balanced XOR2 tree with
  `ceil(log2 W)` levels, which is 4 at `W = 10`. Each level XORs neighbouring
  pairs, and an odd value left over passes up unchanged. At 20 inputs this
  gives a 16-input full tree and a 4-input tree joined by the last gate.
  That is the arrangement of the published 20-input example.

The longest path of the generator runs from register `2_0`, through the
logical circuit, to the carry-in of the adder, and back into `2_0`. The tree
shortens the logical-circuit part of that path. On the original Xilinx part
this cut the minimum clock period from 16.8 ns to 9.1 ns (29.76 MHz against
54.95 MHz). Those figures belong to that device. This RTL does not
reproduce them or check them.

## Interface and timing (`malfg_top`)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk` | in | 1 | Clock. |
| `rst_n` | in | 1 | Asynchronous clear, active low. It sets every register to 0. |
| `ce` | in | 1 | Clock enable. While low, the state holds. |
| `load` | in | 1 | While high, register `2_0` takes `seed` in place of the sum. |
| `seed` | in | M | Seed word. |
| `c` | in | M | Control code of the feedback bit. |
| `q_out` | out | M | Word in register `2_0`, the newest number. |
| `bit_out` | out | 1 | `q_out[0]`, the output bit stream. |
| `a_out` | out | 1 | The feedback bit currently formed. |

Parameters: `M` (word width, 10), `P` (short lag, 3), `Q` (long lag, 8) and
`LC_OPTION` (`LC_CHAIN`). The lags must satisfy `1 <= P < Q`; the design
reports an error at elaboration otherwise.

Timing: every enabled clock produces one new word, with no pipeline and no
latency beyond the register itself. `q_out` and `bit_out` change only on
clock edges. `a_out` settles combinationally after `q_out` or `c` changes.

**Seeding is required.** After a clear, every register is zero. With every
word zero, `a` is 0 and the sum is 0, so the generator stays at zero for
ever. To start it, hold `load` high for `Q` enabled clocks with the seed
words on `seed`. The first seed word ends up in `2_{Q-1}` and the last in
`2_0`. Generation starts on the first clock with `load` low. At least one
seed word must be non-zero.

## Where this RTL departs from or adds to the source

* **Seed load.** The article gives no way to set the initial words. The
  `load`/`seed` multiplexer in front of `2_0` belongs to this RTL. The original
  schematic has a few AND/OR gates beside the adder whose role is not
  explained. They are not reproduced.
* **Clear and clock enable.** The article says nothing about reset. The
  original register primitives have a clock enable and a clear, and this RTL
  gives the chain the same two controls.
* **Lag indexing.** As explained above, the RTL follows the recurrence rather
  than the literal register labels of the block diagram.
* **Control code as a mask.** `c` is read as one enable bit per word bit.
* **Option 2 input.** The published option-2 example has 20 inputs. The word
  is 10 bits wide, so here the tree takes the 10 gated bits `b_k & c_k`. The
  AND gating is taken from option 1, so that both options compute the same
  function.
* **Adder.** The original circuit builds the adder from an 8-bit and a
  4-bit slice (12 bits, of which 10 are used). Here it is a single `M`-bit
  addition.
* **Period and statistics.** The article claims a period above 10^9 and a
  passing NIST run on 10^9 bits. The testbenches check a shorter run (below).
  They do not prove the claim.

## Verification

Each testbench checks its own results. Each prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog.

| Testbench | What it checks |
|---|---|
| `tb_malfg_adder` | Corner cases and 2000 random sums against integer arithmetic, including the wrap modulo 2^10. |
| `tb_malfg_regs` | Shifting against a queue model, with the clock enable held low at random and an asynchronous clear in mid-cycle. |
| `tb_malfg_lc_chain`, `tb_malfg_lc_tree` | `a` against a bit-counted parity, at widths 10 and 20. The codes include single-bit, prefix (`b_0..b_S`) and random codes. |
| `tb_malfg_top` | Three generators run side by side: chain and tree at the defaults, and a 16-bit generator with lags 5 and 17. Every clock is compared with a reference model (`malfg_model_pkg`). The run covers seed load, hold, reseed, `c = 0` (plain mode), the feedback bit set to 1, and adder wrap. Each of these is counted, and one that never happens is a failure. |
| `tb_malfg_full` | The default generator for 10^6 clocks, compared word by word with the model. It applies the NIST frequency and runs tests (significance 0.01) to the LSB stream. It checks that the state seen just after seeding does not recur. |
| `tb_malfg_longrun` | The default generator for 10^8 clocks (about a minute). It applies the same two tests and the same no-recurrence check, with no model. |

In a long run with all ten control bits set, about half of the output bits
are ones. The frequency and runs statistics stay well below their limits.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/malfg_pkg.sv tb/malfg_model_pkg.sv tb/tb_malfg_top.sv \
    --top-module tb_malfg_top -o sim
./obj_dir/sim
```

Replace `tb_malfg_top` with the name of any other testbench. The packages
must be listed ahead of the files that import them. The `rtl/` modules are
synthesizable, with no memories or vendor primitives. To change the
generator, set `M`, `P`, `Q` and `LC_OPTION` on `malfg_top`. The reference
model in `tb/malfg_model_pkg.sv` takes the same three sizes.
