# Pipelined MIN-MAX fuzzy controller

A fuzzy controller maps crisp sensor values to a crisp actuator value through
a set of linguistic rules such as *"IF dU is positive AND T is high THEN I is
low"*. Done naively this is costly: every rule must look up the membership of
every input, every output membership function must be clipped and merged, and
the result must be reduced to one number by a centre-of-gravity (COG)
division. This design does all of it in a fixed rhythm of 256 clock cycles,
independent of the number of inputs and outputs, by exploiting three facts:

* the rules can be evaluated one per clock while the inputs stay fixed, so a
  rule base of 256 rules takes one 256-cycle *frame*;
* if only neighbouring membership functions (MFs) overlap, the eight MFs of a
  variable fit into **two** small RAMs addressed directly by the crisp value;
* the COG numerator `sum(e * I(e))` can be formed by adding up a running sum,
  so no multiplier is needed.

The controller is a three-stage pipeline with one frame per stage. A new input
vector is taken every frame: at a 5 MHz clock that is one result every
51.2 µs. The default configuration is 4 inputs, 1 output, 256 rules, 8 MFs per
variable and 8-bit values throughout.

```
 x_in ─► fuzzifier ×4 ─► MIN ─► register for ─┆─► compositional ──► repeated ─┆─► divider ─► y_out
           ▲   (MF RAMs)          activated     ┆    rule of          adder      ┆
           └──── rule base ───►   rules (MAX)   ┆    inference ◄─ cas_in        ┆
                (256 rules)                     ┆       └──► cas_out            ┆
        ◄──────────── stage 1 ─────────────────►┆◄────── stage 2 ──────────────►┆◄─ stage 3 ─►
```

## Number formats

* Crisp values and membership values are 8 bits. A membership of 255 means
  1.0, 0 means 0.0. Every input and output universe has 256 points.
* A variable has up to 8 MFs, numbered 0..7 (3 bits). MFs must be ordered so
  that MF *m* overlaps only MFs *m−1* and *m+1*: at any point at most one
  even-numbered and one odd-numbered MF may be non-zero.
* A rule is one word of 3-bit MF numbers, inputs first (input 0 in the most
  significant bits), then outputs. With 3 inputs and 1 output,
  *"A3, B4, C7 then X4"* is `011 100 111 100`. With the default 4 inputs and
  1 output a rule is 15 bits.

## Stage 1: fuzzification and rule evaluation

### Compressed membership-function storage (`mf_memory`, `fuzzifier`)

Each variable owns two RAMs of 256 words, one for the even MFs (0, 2, 4, 6)
and one for the odd MFs (1, 3, 5, 7). The crisp value is the address. A word is
`{mu[7:0], code[1:0]}`: the membership value of whichever even (odd) MF is
active at that point, and that MF's number shifted right by one. The full MF
number is recovered as `{code, 0}` for the even RAM and `{code, 1}` for the odd
one, which is why two bits per word suffice. Storage per variable is
2 × 256 × 10 = 5120 bits instead of 8 × 256 × 8.

To get the truth value of a subpremise "input *i* is MF *m*", the fuzzifier
compares both recovered numbers with *m* and selects:

| even matches | odd matches | alpha       |
|--------------|-------------|-------------|
| 0            | 0           | 0           |
| 1            | 0           | even `mu`   |
| 0            | 1           | odd `mu`    |

Example: at input 183 the even RAM holds `{128, 2'b11}` (MF 6) and the odd RAM
`{204, 2'b10}` (MF 5). A rule asking for MF 5 gets 204, MF 6 gets 128, every
other MF gets 0.

Where no MF of a bank is active, store `mu = 0`; the code is then irrelevant.

### Rule truth value and the register for activated rules (`premise_min`, `activated_rule_reg`)

During a frame the rule counter steps through rules 0..255. For each rule the
fuzzifiers deliver one alpha per input and `premise_min` takes their minimum,
the rule's truth value omega (fuzzy AND).

`activated_rule_reg` (one per output) performs the MAX over all rules with the
same conclusion. It holds eight registers Reg0..Reg7, split like the MF RAMs
into an even bank (Reg0/2/4/6) and an odd bank (Reg1/3/5/7). The LSB of the
rule's conclusion MF chooses the bank and the upper two bits the register. The
register is overwritten when omega is strictly greater than its current value.
A rule with omega = 0 therefore never contributes.

On the last rule of the frame the registers, including that rule's update, are
copied into a second set Reg0'..Reg7' and the first set restarts from zero.
Reg' stays constant for the whole next frame. Stage 2 reads it through one
4:1 multiplexer per bank.

All 256 rule slots are evaluated every frame. A smaller rule base fills the
spare slots with copies of one of its rules, which cannot change any maximum.
Fewer inputs than `N_IN` are handled by an MF that is 255 everywhere on the
unused input, named in every rule.

## Stage 2: inference and the repeated adder

### Compositional rule of inference (`inference`)

An 8-bit counter scans the output universe from e = 255 down to e = 0, one
point per clock, and addresses the output variable's even/odd MF RAMs (same
format as the inputs). The two codes select the matching truth values from
Reg'. Each membership value is clipped to its truth value (MIN) and the
results are merged (MAX):

```
I(e) = max( min(mu_even(e), omega_even), min(mu_odd(e), omega_odd), cas_in )
```

`cas_out` is this value, combinationally. Controllers that share the clock and
reset can be chained `cas_out → cas_in`; the last one in the chain then
defuzzifies the union of all their output sets. Tie an unused `cas_in` to 0.
`I(e)` is registered into a small stream (`fset_stream_t`: valid, first at
e = 255, last at e = 0, data) for the adder.

### Repeated adder (`repeated_adder`)

```
COG = sum_e e·I(e) / sum_e I(e)
```

The denominator accumulator D adds each `I(e)`. The numerator accumulator N
adds, at each step, the value D had *before* the current element. The stream
runs from e = 255 downwards, so at point e that value is `sum_{j>e} I(j)`.
Summed over all e, each `I(j)` is counted once for every e below j, which is
exactly j times:

```
N = sum_e sum_{j>e} I(j) = sum_j j·I(j)
```

D needs 16 bits (256 × 255 < 2^16) and N needs 24 bits
(255 × 255·256/2 < 2^24). The first element restarts both sums. On the last
element the finished sums are latched and `done` pulses.

## Stage 3: division (`cog_divider`)

A restoring divider produces one quotient bit per clock, MSB first, so it takes 8 clocks. The
quotient always fits 8 bits because N ≤ 255·D. It is truncated, not rounded.
If D = 0 (no rule fired), the output is 0.

## Timing (`fc_sequencer`)

A free-running 8-bit counter defines the frames. Its value is the rule
address. `sample` (the counter at 255) marks the last cycle of a frame. On
that cycle's closing edge:

* `x_in` is latched;
* Reg is copied to Reg';
* the inference counter reloads to 255.

`phi` is the counter's MSB, the frame-rate clock (main clock / 256).

| event                              | cycle (0 = sampling edge) |
|------------------------------------|---------------------------|
| stage 1 evaluates rules 0..255     | 1 .. 256                  |
| Reg' loaded                        | 256                       |
| stage 2 scans e = 255..0           | 257 .. 512                |
| sums latched, divider started      | 513 .. 514                |
| `y_valid` pulse, `y_out` updated   | 522                       |

Throughput is one result per 256 cycles. Three operations are in flight at any
time. `y_valid` is suppressed for the frames that start before the first
sample after reset. `y_out` holds its value between pulses.

## Configuration

All MF RAMs and the rule base are loaded through one write port:

| `cfg_target` | memory                        | address `cfg_addr` | data                         |
|--------------|-------------------------------|--------------------|------------------------------|
| `CFG_RULE`   | rule base                     | rule number        | `cfg_rule`                   |
| `CFG_IN_MF`  | MF RAM of input `cfg_var`     | crisp value        | `cfg_mf`, bank by `cfg_odd`  |
| `CFG_OUT_MF` | MF RAM of output `cfg_var`    | crisp value        | `cfg_mf`, bank by `cfg_odd`  |

The memories are not cleared by reset and may be loaded while reset is held.
Writes during operation take effect immediately and may mix old and new
contents within one frame.

## Files

| file                        | contents |
|-----------------------------|----------|
| `rtl/fc_pkg.sv`             | widths, `mf_word_t`, `fset_stream_t`, `cfg_target_e` |
| `rtl/fuzzy_controller.sv`   | top level: pipeline, input register, per-output stages 2–3 |
| `rtl/fc_sequencer.sv`       | frame counter, `phi` |
| `rtl/rule_base.sv`          | 256-word rule RAM, field split |
| `rtl/mf_memory.sv`          | even/odd MF RAM pair |
| `rtl/fuzzifier.sv`          | MF RAM pair + comparators + select |
| `rtl/premise_min.sv`        | N-input minimum |
| `rtl/activated_rule_reg.sv` | Reg0..7 with MAX update, Reg0'..7', read muxes |
| `rtl/inference.sv`          | output MF scan, MIN/MAX, cascade, stream register |
| `rtl/repeated_adder.sv`     | COG numerator/denominator |
| `rtl/cog_divider.sv`        | 24/16 → 8-bit restoring divider |

Each module has a testbench `tb/<module>_tb.sv` that checks it against values
computed independently in the testbench. In addition:

* `tb/fuzzy_controller_tb.sv` runs two default-size controllers chained through
  the cascade, with random MFs and rules and 14 operations. It checks every
  result against a direct MIN-MAX/COG model, and checks the latency (522) and
  the spacing (256).
* `tb/fuzzy_controller_multi_tb.sv` runs a 3-input, 2-output controller
  against the same kind of model. Both outputs must report in the same cycle.
* `tb/fuzzy_controller_battery_tb.sv` runs the three-rule battery-charging
  example (inputs dU and T, output current I). At the operating point the
  truth values are 0.85 / 0 for dU and 0.65 / 0.70 for T.

Every testbench prints `TB_RESULT checks=N failures=M`.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/fc_pkg.sv tb/fuzzy_controller_tb.sv \
          --top-module fuzzy_controller_tb -o sim
./obj_dir/sim
```

Replace the testbench name for any other test. The package must come first. The
other modules are found through `-Irtl`. The end-to-end test at full size runs
in a few seconds.

## Parameters and how far they go

* `fuzzy_controller #(N_IN, N_OUT)`: number of input and output variables
  (defaults 4 and 1). Stage 1 is shared. Each output gets its own register
  block, inference unit, adder and divider, so the frame time does not change.
  `cfg_var` is 4 bits, so at most 16 variables of each kind can be loaded.
* `fc_pkg` fixes the 8-bit resolution, 256 rules and 8 MFs per variable. The
  frame length equals both the rule count and the output universe size, so
  these cannot be changed independently without reworking the sequencer.

## Departures and design choices

These points are choices made for this RTL, not prescribed by the
architecture:

* **One chip, on-chip memories.** The architecture's prototype kept the rule
  base and MF tables in external asynchronous SRAMs and split the logic over
  two FPGAs. Here they are arrays with combinational read and synchronous
  write, inside one module. Mapping them to block RAM with a registered read would add a pipeline
  register in stage 1 and in stage 2.
* **Rule rate.** One rule is evaluated per main-clock cycle, and the
  "external" clock `phi` is the frame rate (main / 256). This is the reading
  that agrees with 256 rules and a 50 µs operation time at 5 MHz.
* **Scan direction and exact latency.** The output scan direction (downwards),
  the stream register between inference and adder, the 8-cycle divider and the
  resulting 522-cycle latency are all choices made here.
* **Arithmetic details.** Truncating division and 0 for an empty output set
  are choices made here.
* **Cascade timing.** `cas_out` is combinational, and chained controllers must
  run in lock step from the same clock and reset.
* **Not built.** There is no membership-function generator (an alternative to
  the RAM tables) and no board-level logic.

## Verification status

* All module testbenches and both system testbenches pass.
* Not verified: timing closure on an FPGA, and behaviour when the memories are
  written during operation.
