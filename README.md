# Path-delay Hardware Trojan detector on a 4-bit ripple-carry adder

A Hardware Trojan inserted into a combinational circuit needs at least one
extra gate on the path it tampers with: its payload. That gate is there whether
the Trojan has fired or not, so the tampered path is slower than it should be
even while the circuit still computes correct results. This design exploits
that. Several paths of identical structure are made to switch at the same
moment and are compared with an XOR; in a clean circuit they arrive together
and the XOR stays quiet, while a path slowed by a payload gate arrives late and
the XOR emits a short pulse. A clocked SR latch catches the pulse and raises an
Error flag. Because the reference is another path of the same circuit, no
"golden" Trojan-free chip is needed.

The circuit under test is a 4-bit ripple-carry adder whose four sum outputs
S0..S3 are the compared paths. Two detectors sit on them:

- a **multi-path detector**: one XOR over S0..S3 and one sensing latch, which
  says *whether* a Trojan is present;
- a **locating detector**: three pair detectors on neighbouring sums, which
  say *where* it is.

## How a skew becomes an Error

Test vector: B = 0, Cin = 0, and A stepping between 0000 and 1111. No carry is
ever generated, so every sum bit equals its A bit and all four change at once,
each after two XOR gates (80 ps with the default delays).

```
            clk  ____/‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾\________
              A  ======X 1111 =====================================
  S1..S3 (clean)  ______________/‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾
  S0 (+payload)   ____________________/‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾
   XOR of sums    ________________/‾‾‾‾\__________________________   (40 ps wide, 20 ps later)
          Error   ___________________/‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾\___   (held until clk falls)
```

With the Trojan in unit 0, S0 carries one more XOR and arrives 40 ps after the
others. The comparator output is high for exactly that skew. Two properties of
the gate model matter here:

- Every gate has an **inertial** delay: a pulse narrower than a gate's delay
  does not get through it. The comparator (20 ps) and sensor output gate
  (15 ps) are therefore faster than one payload XOR (40 ps); a slower
  comparator would hide the very skew it is meant to see. This is a physical
  limit of the method, not only of the model.
- The XOR over all four sums is 0 for any four equal values, so the test
  vector is quiet in both directions. For operands whose sum bits differ the
  comparators see unequal levels and flag regardless of Trojans: the Error
  outputs are only meaningful under the equal-sum test vector.

## The sensing latch

The sensor (`sensing_unit`) is an SR latch made of two cross-coupled NAND
gates. The comparator output, inverted, is the active-low set input of the
first NAND; the second NAND takes the first one's output and CLK. An output
gate combines the latch output Q with CLK. Working through the NAND pair:

| CLK | comparator | Q                          |
|-----|------------|----------------------------|
| 0   | 0 or 1     | follows the comparator      |
| 1   | 1 (pulse)  | set to 1                    |
| 1   | 0          | holds                       |

So the low phase of CLK clears the latch, and during the high phase any pulse
sets it and it stays set. Error = Q AND CLK: it rises T_SENSE after a pulse
in the high phase and falls when CLK falls. Consequences for use:

- Apply the test step early in the **high** phase and read Error before CLK
  falls. A pulse in the low phase is lost.
- The output gate is an AND. An XOR of Q and CLK would toggle with CLK even
  in a clean circuit, which would make the flag useless; AND is the reading
  under which a clean circuit shows a quiet Error line.

The RTL describes the NAND pair by its behaviour, as a level-sensitive latch
(`always_latch`), instead of as a combinational loop; synthesis tools will
report it as a latch, which it is.

## Locating the Trojan

Pair detector *i* (output `locate_error[i]`, called Error *i+1*) compares S*i*
with S*i+1*. A late path upsets the detectors on both sides of it, so, read as
Error1 Error2 Error3:

| Trojan in unit | Error1 Error2 Error3 | `locate_error` (bit 2..0) |
|----------------|----------------------|---------------------------|
| none           | 000                  | 000                       |
| 0 (A0, B0)     | 100                  | 001                       |
| 1 (A1, B1)     | 110                  | 011                       |
| 2 (A2, B2)     | 011                  | 110                       |
| 3 (A3, B3)     | 001                  | 100                       |

The multi-path detector flags all four cases.

## The Trojan model

`ht_trojan` is the attacker's circuit, kept in the design so that the
detector can be exercised. Its payload is one XOR on the unit's sum output:
`S = S_unit ^ fired`. Its trigger is sequential: a 2-bit state counts clock
edges on which the unit's own a, b and carry-in are all 1, and fires at
`TRIG_COUNT` (default 3) such edges, staying fired until reset. While dormant
the adder's results are exactly right; once fired the unit's sum bit is
inverted. The detector does not care which: dormant, the payload adds 40 ps of
skew; fired, the sum bit differs outright and the comparators flag it as a
level. The trigger condition and count are choices of this design; only the
XOR payload and a clocked trigger are given for it.

`HT_MASK` chooses the infected units (bit *i* puts a Trojan on S*i*). The
default, 4'b0001, infects the least significant unit; 0 gives the clean adder.

## Modules

| Module               | Role                                                        |
|----------------------|-------------------------------------------------------------|
| `ht_pkg`             | default gate delays (ps) and trigger count                  |
| `full_adder`         | one adder unit: two XORs for the sum, AND-AND-OR carry      |
| `ht_trojan`          | Trojan: counting trigger plus XOR payload                   |
| `ripple_carry_adder` | WIDTH units, carry rippling from Cin; Trojans per `HT_MASK` |
| `path_comparator`    | N-input XOR                                                 |
| `sensing_unit`       | SR latch sensor, Error = Q AND CLK                          |
| `path_detector`      | comparator + sensing unit (multi-path detector)             |
| `locating_detector`  | WIDTH-1 two-input path detectors on neighbouring sums       |
| `ht_detect_top`      | adder with both detectors on its sum outputs                |

Top-level ports of `ht_detect_top`: `clk`, `rst_n` (trigger reset, active
low, asynchronous), `a`, `b`, `cin`, `s`, `cout`, `detect_error`,
`locate_error[WIDTH-2:0]`, and `ht_fired[WIDTH-1:0]`, an observation port
showing which Trojans have fired (for testing only; a real Trojan would not
announce itself).

## Timing parameters

All delays are `int unsigned` parameters in picoseconds (`timescale 1ps/1ps`),
defaulted from `ht_pkg`:

| Parameter   | Default | Gate                                |
|-------------|---------|-------------------------------------|
| `T_XOR`     | 40      | adder XORs and the Trojan payload   |
| `T_AND`     | 25      | carry ANDs                          |
| `T_OR`      | 25      | carry OR                            |
| `T_CMP`     | 20      | comparator XOR                      |
| `T_SENSE`   | 15      | sensor output gate                  |

These values are not measured data; they are chosen to be plausible and to
respect `T_CMP, T_SENSE < T_XOR`. The testbenches use a 2 ns clock.

With these values each sum path of the step test vector takes 80 ps, 120 ps
when infected. The adder's worst case is the carry ripple: 200 ps to Cout,
and a Trojan changes it only when it sits on the slowest output (230 ps for a
Trojan in unit 3, unchanged for units 0 to 2). For scale, an FPGA build of
such an adder has been reported at 6.494 ns worst-case delay without a Trojan
and 6.893 ns with one in the least significant unit (6 vs 7 LUTs, 36.1 vs
36.8 mW); a gate-delay model like this one does not reproduce those figures,
and it shows why comparing matched paths is more sensitive than comparing an
adder's overall delay with a reference.

Delays are written as `assign #(T) ...`. Synthesis ignores them and builds
the plain adder, XORs and latch; simulation only shows the detection mechanism
with timing enabled (Verilator `--timing`). Without timing every path is
zero-delay, no skew exists, and the detectors only respond to a fired Trojan.

## Simulating

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/ht_pkg.sv tb/tb_ht_detect_top.sv \
          --top-module tb_ht_detect_top -o sim
./obj_dir/sim
```

Substitute any other testbench name. The main ones:

- `tb_ht_detect_top`: five copies side by side (clean, and a Trojan in each
  unit). Checks detection, all four location codes, a quiet clean adder,
  clearing in the low phase, correct sums over random operands, trigger
  firing, payload inversion and detection of fired Trojans, and counts how
  often each happened.
- `tb_ht_detect_top_full`: the top at its defaults through one full test
  (detect, locate as 100, add, fire, detect again).
- `tb_ripple_carry_adder`: all 512 operand combinations, and the 40 ps lag
  of the infected sum path measured to the picosecond.
- `tb_rca_delay_table`: times every output of a clean adder and of adders
  infected in each unit, for the step vector and for a full carry ripple, and
  prints the worst-case delay of each.

## Limits and choices

- The full-adder gate structure, all delays, the trigger logic, the reset and
  the test vector are this design's choices; the adder/comparator/latch
  structure, the neighbour pairing and the location codes are those of the
  method.
- The two detectors are shown separately in the method; here both are placed
  on one adder, which changes nothing about either.
- Detection depends on the skew (one payload gate) exceeding the inertial
  delay of the comparator and sensor gates, and on the test step falling in
  the high phase of `clk`. Real process variation between "identical" paths
  is not modelled; it would have to stay well below one gate delay.
- The multi-path XOR needs an even number of paths (four here).
