# PDMUX4: a 1:4 phased clock demultiplexer and its XOR re-aggregation

A PDMUX4 cell takes one clock `clk` of period T. It gives out four clocks
`pclk[1..4]`, each with period 4T and 50 % duty cycle. Each phased clock lags the
one before it by T/2:

```
clk      _|‾|_|‾|_|‾|_|‾|_|‾|_|‾|_|‾|_|‾|_
pclk[1]  ‾‾|_______|‾‾‾‾‾‾‾|_______|‾‾‾‾‾
pclk[2]  ‾‾‾‾|_______|‾‾‾‾‾‾‾|_______|‾‾‾
pclk[3]  ‾‾‾‾‾‾|_______|‾‾‾‾‾‾‾|_______|‾
pclk[4]  ‾‾‾‾‾‾‾‾|_______|‾‾‾‾‾‾‾|_______
```

Every edge of `clk`, rising or falling, moves exactly one of the four outputs.
So the input clock is not lost. It is spread over four slower signals, and the
exclusive OR of the four gives back a signal that changes at every edge of
`clk`, a copy of the clock. Both the splitting and the recovery can be
repeated. Each phased clock can drive another PDMUX4 cell, and a tree of EXOR4
gates can fold the outputs back together.

The RTL is built in layers:

| module          | what it is                                                          |
|-----------------|---------------------------------------------------------------------|
| `pdmux4`        | the cell: `clk` → four phased clocks, plus a reset/invalid flag      |
| `exor4`         | a 4-input XOR gate                                                  |
| `pdmux4_exor4`  | primitive configuration: one cell, with an `exor4` on its outputs    |
| `pdmux4x4_exor` | top: the 2-level tree, 5 cells, 16 phased clocks, 5 XOR gates        |

`pdmux4_pkg` holds the shared codeword type, the codeword table and its helper
functions.

## The codeword cycle

Read as a 4-bit word `pclk[4:1]`, the outputs step through eight valid
codewords, one per half period of `clk`:

| index | 1    | 2    | 3    | 4    | 5    | 6    | 7    | 8    |
|-------|------|------|------|------|------|------|------|------|
| `pclk[4:1]` | 0000 | 0001 | 0011 | 0111 | 1111 | 1110 | 1100 | 1000 |

After index 8 the cycle returns to index 1. This is a twisted-ring (Johnson)
pattern. Each step changes one bit, and bit i is 1 at positions i … i+3 of the
cycle (counted 0…7). That formula is the reference model in every testbench.
The other eight 4-bit words are invalid.

## Inside the cell (`pdmux4`)

Two 4-bit state registers hold the words:

* `state_rise` is loaded on the **rising** edge of `clk` with the successor of
  `state_fall`.
* `state_fall` is loaded on the **falling** edge with the successor of
  `state_rise`.

`pclk` shows `state_rise` from a rising edge until the next falling edge, and
`state_fall` from a falling edge until the next rising edge. The register just
loaded always holds the successor of the word that was on show, so the output
advances one step per half period. This gives a double-data-rate counter built
from two single-edge register banks.

`next_codeword()` in the package looks up the successor in the table. An
invalid word has codeword 1 (0000) as its successor.

**Output select.** The select signal is not `clk` itself. It is a phase bit,
`phase = rise_tgl ^ fall_tgl`, made by two toggle flip-flops. One toggles on
the rising edge of `clk`, the other on the falling edge. The phase bit is 1
after a rising edge and 0 after a falling edge, so it has the same value as
`clk`, but it changes together with the state registers. If the mux were
selected directly by `clk`, it would switch to a register before that register
had loaded. For a moment after each edge, `pclk` would show a word from one
full clock period earlier. Since `pclk` clocks other cells, that brief wrong
word would give them false clock edges. With the phase bit, `pclk` changes
only when registers change. The two toggle flip-flops have no reset. They
settle on the first clock edge.

**Flip-flops per cell:** 4 with asynchronous reset (`state_rise`), 4 with
asynchronous set (`state_fall`), and 2 without reset (phase bit).

### Reset and `rstflag`

`reset` is asynchronous and active high. It loads 0000 into `state_rise` and
1111 into `state_fall`. While reset is held, the clock keeps running, so
`pclk` alternates between 0000 (clk high) and 1111 (clk low). When reset is
released, the next edge loads the successor of the word on show. The cycle
therefore starts without a jump, whatever the level of `clk` at release:

* released while clk is low (1111 on show): 1111 → 1110 → 1100 → …
* released while clk is high (0000 on show): 0000 → 0001 → 0011 → …

`rstflag = reset | (pclk is not a valid codeword)`. It is combinational. Its
job is to hold cells clocked from `pclk` in reset until this cell shows valid
words. A cell that finds itself on an invalid word recovers within one clock
period: the other register loads 0000, and the cycle resumes from there.

## Getting the clock back: XOR aggregation

In `pdmux4_exor4`, `clk_out = pclk[1] ^ pclk[2] ^ pclk[3] ^ pclk[4]`. One bit
of `pclk` flips per half period, so `clk_out` flips at every edge of `clk`. It
has the same frequency as `clk`.

**Polarity depends on when reset is released.** Both reset words, 0000 and
1111, have even parity. So does the word shown right after release. That word
is 0000 when release happens during clk high, and 1111 when it happens during
clk low. From then on, the words shown during one level of `clk` all have even
parity, and those shown during the other level all have odd parity. As a
result:

| reset released while | `clk_out`      |
|----------------------|----------------|
| clk low              | equal to `clk` |
| clk high             | `~clk`         |
| (reset held)         | 0              |

To get `clk_out == clk` as the identity CLK = CLK1⊕CLK2⊕CLK3⊕CLK4 describes
it, release reset while `clk` is low.

## The 2-level tree (`pdmux4x4_exor`, top)

```
              a_dout[1] ─► cell b1 ─► b_dout[1] ─► exor4 ─┐
clk ─► cell a ─ a_dout[2] ─► cell b2 ─► b_dout[2] ─► exor4 ─┤
reset ─►  │    a_dout[3] ─► cell b3 ─► b_dout[3] ─► exor4 ─┼─► exor4 ─► clk_out
          │    a_dout[4] ─► cell b4 ─► b_dout[4] ─► exor4 ─┘
          └─ rstflag_a ─► reset of b1..b4
```

Cell a splits `clk` into y1…y4 = `a_dout[1..4]` (period 4T, spaced T/2).
Second-level cell b_i is clocked by y_i. Its outputs have period 16T and are
spaced 2T (half of y_i's period). Interleaving the four second-level cells
gives 16 phased signals, each lagging the one before it by T/2:

```
w1..w16 = b1[1], b2[1], b3[1], b4[1], b1[2], b2[2], …, b4[4]
w[(j-1)*4 + i] = b_dout[i][j]
```

Together they form a 16-bit twisted-ring pattern of 32 half periods, in which
w_i is 1 at positions i … i+15. `clk_out` is the XOR of all sixteen, folded
through one `exor4` per second-level cell and a final `exor4`. Each
second-level XOR equals y_i or ~y_i, so the total equals the XOR of y1..y4.
The top therefore reproduces `clk` with the same polarity rule as the
first-level cell.

**Reset propagation.** `reset` goes to cell a only. Its `rstflag_a` is the
reset of the four second-level cells. They stay in reset while `reset` is
high, and also while cell a shows an invalid word. They all leave reset at
once. When `reset` is released between clock edges, which is the normal case,
the 16 phases come out in order, from all-0 (release while clk low) or all-1
(release while clk high). The second-level `rstflag` outputs drive nothing
inside the design. They are brought out as `rstflag_b`.

**Known limit: recovery from an invalid word in cell a.** `rstflag_a` falls at
the instant cell a's output changes to a valid word. That change is also an
edge on some of the y_i clocks. Second-level cells clocked by those y_i leave
reset and take a step on the same edge, so they can start one step ahead of
the others. After that, every cell cycles through valid words and `clk_out`
still changes at every clock edge. However, the 16-phase order w1…w16 is only
restored by a `reset` pulse. Similarly, an upset inside one second-level cell
is flagged on its `rstflag_b` bit and corrected by that cell alone, and the
phase order needs `reset` to be restored. Any reset released synchronously
with this cell's output has the same race. Avoiding it would need, for
example, a reset released between clock edges.

## Timing summary

| signal            | period | high / low width | lag behind previous |
|-------------------|--------|------------------|---------------------|
| `pclk[i]`, `a_dout[i]` | 4T | 2T / 2T         | T/2                 |
| `w_i`             | 16T    | 8T / 8T          | T/2                 |
| `clk_out`         | T      | T/2 / T/2        | in phase with `clk` or inverted (see above) |

Every output changes right after a `clk` edge, with no delay in simulation.
All logic between the registers and the outputs is combinational.

## Where this RTL departs from the reference description

* **Output select.** The mux is selected by a registered phase bit instead of
  `clk`. This costs 2 flip-flops per cell, or 10 in the tree (50 flip-flops in
  total instead of 40). The outputs are the same, without the false edges after
  each clock edge.
* **Next-state computation.** The reference description keeps a separate
  free-running index into the codeword table. Here the successor of the present
  word is looked up, so there is no extra state. The sequence is the same.
* **Invalid words.** The reference gives only the flag. The rule that an
  invalid word is followed by 0000 is this design's own choice.
* **`clk_out` polarity.** The reference states `clk_out = clk` without a
  condition. Here it holds when reset is released while `clk` is low.
* **Reset of the second level.** `rstflag_a` drives the resets of b1…b4, as
  described. The recovery race above is a property of that scheme, and this
  RTL does not correct it.

Signal names follow the reference's roles (CLK, RESET, PCLK[4..1], RSTFLAG,
aDOUT, biDOUTj, w1…w16, CLK_OUT), written in lower case.

## Verifying and simulating

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and ends with `$finish`.

| testbench           | covers |
|---------------------|--------|
| `tb_exor4`          | all 16 input combinations |
| `tb_pdmux4`         | reset words; release with clk low and with clk high; the word sequence against the formula; period 4T, widths 2T and lags T/2, timed on every edge; an invalid word forced into the register input, with the flag and the recovery |
| `tb_pdmux4_exor4`   | `clk_out` = 0 under reset; `clk_out == clk` or `~clk` for the two release cases; each phase equal to the clock XOR the other three phases |
| `tb_pdmux4x4_exor`  | the whole tree at its only size: reset hold, both release cases, 32-step order of w1..w16 and the 16T period, w ordering against `b_dout`, `clk_out`, an invalid word at cell a (second level held in reset, then recovery) and at cell b2, and re-alignment by reset. It counts each of these and fails if one never occurred. |

Run one with Verilator 5:

```
verilator --binary --timing --assert \
    rtl/pdmux4_pkg.sv rtl/exor4.sv rtl/pdmux4.sv rtl/pdmux4_exor4.sv \
    rtl/pdmux4x4_exor.sv tb/tb_pdmux4x4_exor.sv --top-module tb_pdmux4x4_exor
./obj_dir/Vtb_pdmux4x4_exor
```

Each testbench runs in well under a second. `tb_pdmux4` and
`tb_pdmux4x4_exor` inject invalid words by forcing the register input nets
`d_rise`. If you rename those nets, update the testbenches too.

## Changing the design

* The cycle is defined by `PHASED_OUTPUT` in `pdmux4_pkg`. `PHASES` is 4 and
  `NUM_CODEWORDS` is 2·PHASES. The table literal and the 4-bit words are
  written for four phases. A different phase count needs a new table, and
  `pdmux4x4_exor` instantiates an `exor4` gate, which has exactly four inputs.
* A deeper tree is built the same way: feed each `pclk` bit of a cell to the
  `clk` of a new cell, and drive that cell's `reset` from the upper cell's
  `rstflag`.
* Synthesis gives 10 flip-flops per cell and 50 for the tree. No latches are
  inferred. The design uses both edges of `clk`, and `pclk` is used as a clock
  downstream, so a real implementation needs a clock-tree plan for these
  derived clocks.
