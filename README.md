# Max-membership-principle defuzzifier

A fuzzy controller ends with a fuzzy set, not a number: each fired rule
contributes its consequent, cut off at the rule's firing strength, and the
union of those truncated sets is the controller's output. A defuzzifier turns
that union into one crisp value. This unit uses the **max membership
principle (MMP)**: the crisp output is a point z* at which the union's
membership is highest, μ(z*) ≥ μ(z) for every z.

This design handles two fired rules:

    IF X is A1 AND Y is B1 THEN Z is C1      (firing strength F1 = min(μA1, μB1))
    IF X is A2 AND Y is B2 THEN Z is C2      (firing strength F2 = min(μA2, μB2))

Once a consequent is truncated at its firing strength it has a flat top. The
flat top lies on the interval [CkX1, CkX2] of the output universe. The union of
the two truncated sets is highest on the flat top of the rule that fired more
strongly. The crisp value is the middle of that flat top. So the whole MMP
search reduces to one comparison, one selection, one addition and one halving,
with no search over the universe and no multiplier.

## Datapath

    F1 ─┐
        ├─ firing_comparator ── T1 ─────────┬──────────────┐
    F2 ─┘                                   │              │
    C1X1 ─┐                                 │              │
          ├─ endpoint_mux (left)  ── CX1 ─┐ │              │
    C2X1 ─┘          ▲ T1                 ├─ endpoint_adder ── R3 ── constant_divider (÷NUM2) ── O
    C1X2 ─┐                               │
          ├─ endpoint_mux (right) ── CX2 ─┘
    C2X2 ─┘          ▲ T1

| Stage | Module | Function |
|---|---|---|
| compare | `firing_comparator` | T1 = 1 if F1 < F2, else 0 |
| select | `endpoint_mux` ×2 | CX1 = T1 ? C2X1 : C1X1, CX2 = T1 ? C2X2 : C1X2 |
| add | `endpoint_adder` | R3 = CX1 + CX2 |
| halve | `constant_divider` | O = R3 / NUM2, NUM2 = 2 |

The top module `mmp_defuzzifier` only wires these stages together. The
intermediate nets keep the names T1, CX1, CX2 and R3, so they can be found in
a waveform viewer.

### Worked examples

Firing strengths are unsigned codes in which 14H means membership 1.0, so 0AH
is 0.5 and 05H is 0.25. End points are 4-bit positions on a 16-point output
universe.

| Case | F1 | F2 | C1 flat top | C2 flat top | T1 | CX1 | CX2 | R3 | O |
|---|---|---|---|---|---|---|---|---|---|
| model 1 | 14H | 0AH | 0..8 | 4..CH | 0 | 0 | 8 | 08H | 4H |
| model 2 | 05H | 14H | 0..8 | 6..EH | 1 | 6 | EH | 14H | 0AH |
| model 3 | 0FH | 05H | 1..9 | 7..CH | 0 | 1 | 9 | 0AH | 5H |

In model 1, rule 1 fires fully and rule 2 fires at one half. The union is
highest on C1's flat top 0..8, so the output is (0 + 8) / 2 = 4. In model 2,
rule 2 is stronger and the output is (6 + 14) / 2 = 10 = 0AH.

For model 3 only F2, C2's flat top and the results R3 = 0AH and O = 5H are
fixed by the reference case. F1 and C1's flat top were chosen here to give
those results.

## Timing and interface

The unit is purely combinational. It has no clock, no reset and no handshake.
O settles one comparator, one multiplexer, one adder and one wire shift after
the inputs change. Zero clock cycles of latency. To use it in a clocked
system, register its inputs or its output as the surrounding design requires.

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `f1`, `f2` | in | `F_W` = 8 | firing strengths of rules 1 and 2 |
| `c1x1`, `c1x2` | in | `Z_W` = 4 | left and right end of C1's flat top |
| `c2x1`, `c2x2` | in | `Z_W` = 4 | left and right end of C2's flat top |
| `o` | out | `D_W` = 8 | crisp output |

Parameters of `mmp_defuzzifier`, with defaults taken from `mmp_pkg`:

| Parameter | Default | Notes |
|---|---|---|
| `F_W` | 8 | strength width; 14H = 1.0 needs only 5 bits, 8 matches the byte-wide display of strengths |
| `Z_W` | 4 | end-point width (16-point universe) |
| `D_W` | 8 | width of CX1, CX2, R3 and O; must exceed `Z_W`, checked at elaboration, so R3 cannot overflow |
| `NUM2` | 2 | divisor; 2 gives the midpoint, and synthesis turns it into a shift |

With the default widths O never exceeds 0FH, so its upper four bits are
always zero. They are kept so that O has the datapath width.

## Design choices

These points are not fixed by the method itself. This implementation settles
them as follows:

- **Tie (F1 = F2).** The method defines the selection only when one strength is
  strictly larger. Here a tie keeps C1 (T1 = 0). Under a tie the true maximum
  set is the union of both flat tops, so O is then the midpoint of C1's flat
  top only, not of the whole maximum set. The difference matters only when the
  flat tops differ.
- **Rounding.** R3 / 2 is truncated. For an odd R3, such as a flat top 1..8,
  O is 4, not 4.5 rounded up.
- **No input checks.** The unit expects CkX1 ≤ CkX2 and does not check this.
  Strengths above 14H are compared like any other unsigned codes.
- **Upstream stages are not included.** The fuzzifier, the min operation of each
  rule and the step that finds each flat top's end points are outside this
  RTL. F1, F2 and the four end points arrive as primary inputs.
- **Pin count.** The ports take 8 + 8 + 4×4 + 8 = 40 pins. A 32-pin figure has
  been reported for an FPGA build of this architecture on a Spartan-3E
  XC3S100E (66 bonded I/Os). Its exact pin list is not known, so this port
  list may differ from that build. After generic synthesis the unit is 4
  word-level cells and no flip-flops. The figure reported for that device is
  11 four-input LUTs.

## Files

| File | Contents |
|---|---|
| `rtl/mmp_pkg.sv` | default widths, divisor, the code for membership 1.0 |
| `rtl/firing_comparator.sv` | T1 generation |
| `rtl/endpoint_mux.sv` | 2:1 end-point selector |
| `rtl/endpoint_adder.sv` | R3 adder |
| `rtl/constant_divider.sv` | divide by NUM2 |
| `rtl/mmp_defuzzifier.sv` | top level |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Verification

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself through
a clock-driven watchdog if it hangs.

- `tb_firing_comparator` and `tb_endpoint_adder` run all 65,536 operand pairs.
- `tb_endpoint_mux` runs all 4-bit operand pairs with both select values, plus
  random 8-bit operands.
- `tb_constant_divider` runs every 8-bit dividend at NUM2 = 2 and at NUM2 = 3.
  It checks the quotient against division by repeated subtraction.
- `tb_mmp_defuzzifier` runs at the default parameters. It applies the three
  models above and 20,000 random cases, with about one in eight being a tie.
  The reference model works independently of the RTL: it builds the union of
  the two flat tops point by point over the 16-point universe, finds the first
  and last points of maximum membership (on a tie, only C1 counts) and takes
  their midpoint. The test counts how often C1 wins, C2 wins and a tie occurs.
  A case that never occurs counts as a failure.

All testbenches pass. Each also fails against a deliberately broken copy of
its module: a swapped multiplexer, an OR in place of the adder, the tie sent to
C2, a divisor that is ignored, and a multiplexer select tied off.

Running one with Verilator:

    verilator --binary --timing -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/mmp_pkg.sv tb/tb_mmp_defuzzifier.sv --top-module tb_mmp_defuzzifier
    ./obj_dir/Vtb_mmp_defuzzifier

Use the same command for the other testbenches, changing the file name and the
top module.
