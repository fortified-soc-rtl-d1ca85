# Trojan-resilient reset path for an SoC

An "A2" hardware Trojan is a tiny analog circuit that a malicious foundry can
slip into the empty space of an ASIC layout, next to a sensitive wire such as the
chip reset. Each time a nearby signal toggles, it couples a small packet of charge
onto a payload capacitor on that wire. The charge leaks away when the signal is
quiet, so normal operation never fires it. A rare burst of toggling, which the
attacker can provoke from software, pumps the wire up past the logic threshold
instead. The SoC then sees a reset it never asked for, at a moment the attacker
chooses.

This design puts a small guard between the reset wire and the SoC:

```
              +-------------------------------+
 vwire ---+-->| comparator_inst               |
          |   |  result = enable &            |--+--> comparator_result (Y: 1 = Trojan)
 vref ----|-->|           (vwire > vref)      |  |
 enable --|-->|                               |  |
          |   +-------------------------------+  |
          |                                      | select
          |   +-------------------------------+  |
          +-->| d0   mux_inst                 |<-+
 logic_0 ---->| d1   y = select ? d1 : d0     |-----> mux_output (reset to the SoC)
              +-------------------------------+
```

* The **comparator** watches the level on the reset wire and compares it with a
  reference level `vref`. While `enable` is high, a wire level above `vref` is
  taken as charge built up by a Trojan, and `comparator_result` goes to 1.
* The **multiplexer** passes the reset wire to the SoC. While the comparator
  flags a Trojan, it passes the safe value on `logic_0` instead. `logic_0` is
  meant to be tied to 0, so the SoC stays out of reset.

## The protected window (`enable`)

`enable` decides when a rising reset wire counts as an attack. It should be
high for the whole period in which an unexpected reset would do damage, for
example while the SoC runs. With `enable` low, the comparator reports
nothing and the wire goes to the SoC unchanged. This is how a legitimate
reset, such as power-on or an external reset outside that period, still reaches
the SoC.

The guard cannot tell a Trojan from a legitimate reset on the same wire. Any
reset that arrives while `enable` is high is blocked, and the testbench checks
this explicitly. So a system that needs a reset during the protected window must
first drop `enable`.

## Voltages as level codes

The original circuit compares analog voltages in the 0 to 1 V range. Here,
`vwire` and `vref` are `WIDTH`-bit unsigned codes: 0 is ground and all ones is
the supply. With the default `WIDTH = 2`, each code step is 0.25 V. An analog
front end (a quantiser or a set of threshold buffers on the wire) has to deliver
these codes. That front end, and the source of `vref`, are not part of this RTL.

Detection is a strict comparison, `vwire > vref`: a wire that only equals the
reference is not flagged. The reset is active high, and the level passed to the
SoC is the wire's own code. An SoC that wants one reset bit would treat any
nonzero code, or only its top bit, as "in reset". That is its own choice.

## Modules

| file | module | what it is |
|------|--------|------------|
| `rtl/fortified_pkg.sv` | `fortified_pkg` | `VWIRE_W` (default width, 2), `level_t`, `SAFE_RESET` (0) |
| `rtl/comparator_2bit_with_enable.sv` | `comparator_2bit_with_enable` | Trojan detector, `result = enable && (vwire > vref)` |
| `rtl/multiplexer_2bit.sv` | `multiplexer_2bit` | `y = select ? d1 : d0` |
| `rtl/fortified_soc.sv` | `fortified_soc` | top: detector and multiplexer wired as above |

All of them are combinational, with no clock, reset or state. The delay from
`vwire` to `mux_output` is zero cycles. The only parameter is `WIDTH` (default
`fortified_pkg::VWIRE_W = 2`). The top carries an immediate assertion: whenever
`comparator_result` is 1, `mux_output` must equal `logic_0`.

Top ports:

| port | dir | width | meaning |
|------|-----|-------|---------|
| `logic_0` | in | WIDTH | safe reset value, tie to 0 |
| `vref` | in | WIDTH | reference level |
| `vwire` | in | WIDTH | level on the reset wire |
| `enable` | in | 1 | protected window |
| `mux_output` | out | WIDTH | reset delivered to the SoC |
| `comparator_result` | out | 1 | 1 = Trojan detected |

## Where this RTL departs from, or fills in, the original circuit

* **The protected SoC** is not included. Its reset input is the `mux_output` port.
* **The comparison direction** follows the described behaviour: Y = 1 when the
  wire rises above the reference. A schematic of the original puts `V_ref` on
  the comparator's `+` input and `V_wire` on `-`. Read literally, that is the
  opposite direction, so it was not followed.
* **The output while disabled** is 0, both for the flag and for the blocking.
  The original does not say what the comparator outputs with `enable` low.
* **The multiplexer data width** equals the level-code width, so the SoC
  receives the wire's code. The original labels the multiplexer input as
  "RST/V wire" and its block as 2-bit.
* **Quantisation, the strict `>`, and active-high reset** are this design's choices.
* **The A2 Trojan** is an analog attack circuit, not part of the design. It
  exists only as the simulation model `tb/a2_trojan_model.sv`. Each clock with a
  transition on its trigger adds 50 mV to the wire, and each quiet clock leaks
  5 mV. The wire saturates at 1000 mV and is reported both in mV and as a level
  code, `code = floor(mV * 2^WIDTH / 1001)`. The step and leak values are
  arbitrary. They set how fast the wire charges in the test, not what the guard
  does.

## Verification

| testbench | what it checks |
|-----------|----------------|
| `tb/comparator_2bit_with_enable_tb.sv` | all 32 combinations of `vref`, `vwire` and `enable` against `enable && vwire > vref`, plus the number of flagged cases |
| `tb/multiplexer_2bit_tb.sv` | all 32 combinations of `d0`, `d1` and `select` |
| `tb/fortified_soc_tb.sv` | end to end at default parameters, with the Trojan model charging the wire |

The end-to-end test uses `vref = 1`, i.e. it flags above 0.5 V. It checks both
outputs against a reference model every clock, and it walks through six phases:

1. a quiet wire, with nothing flagged;
2. an attack while protected;
3. leakage clearing the flag;
4. a legitimate reset with `enable` low, which passes;
5. an attack with `enable` low, which reaches the SoC as it would with no guard;
6. `enable` raised over a charged wire, which is blocked at once.

It also checks that detection comes after exactly the number of trigger toggles
that the model's charge step implies. At 50 mV per toggle and a threshold of
501 mV, that is 11 toggles. Each mechanism (pass-through, detection, blocking,
recovery, legitimate reset passed, unguarded attack, enable switch) is counted
and must occur at least once.

Every testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.
To run one with Verilator:

```
verilator --binary --timing --assert -Wall -Wno-fatal --top-module fortified_soc_tb \
    rtl/fortified_pkg.sv rtl/comparator_2bit_with_enable.sv rtl/multiplexer_2bit.sv \
    rtl/fortified_soc.sv tb/a2_trojan_model.sv tb/fortified_soc_tb.sv
./obj_dir/Vfortified_soc_tb
```

For the block testbenches, drop the files they do not use and change
`--top-module`.

## Changing it

* **Finer voltage resolution:** set `WIDTH` on `fortified_soc` (and on the
  testbench model) and `vref` accordingly. Everything scales.
* **A one-bit reset to the SoC:** reduce `mux_output` outside this block, or
  narrow the multiplexer. The detector must still see the full wire level.
* **Registered outputs:** the guard is combinational on purpose, so that it
  blocks the reset in the same instant the wire crosses the threshold. A flop
  would let a glitch through for a cycle.
