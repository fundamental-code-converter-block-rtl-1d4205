# 4-bit binary-to-thermometer decoder, two ways

A thermometer code represents the number *n* by setting the lowest *n* of its
bits and clearing the rest, like the mercury column of a thermometer. It is the
code a unary (segmented) digital-to-analog converter wants: each output bit
switches one equal unit current or capacitor, so stepping the input by one
switches exactly one element. This RTL converts a 4-bit binary value B4..B1
into the 15-bit thermometer code T15..T1:

    Tk = 1  exactly when  B4B3B2B1 >= k        (k = 1..15)

| input (B4..B1) | output (T15..T1)  |
|----------------|-------------------|
| 0000           | 000000000000000   |
| 0001           | 000000000000001   |
| 0010           | 000000000000011   |
| 0111           | 000000001111111   |
| 1111           | 111111111111111   |

A valid output never has a 1 above a 0 (…01101 is not a thermometer code).

The same conversion is built in two ways, and both are included:

* **Logic-based decoder** (`iglp_decoder`): each output bit is its own small
  sum-of-products gate, one per output, derived from Karnaugh maps of the
  truth table. It was designed for independent-gate FinFETs in low-power bias.
* **Multiplexer-based decoder** (`mux_decoder`): each output bit is a tree of
  one to three 2:1 multiplexers and nothing else. A multiplexer with one data
  input tied to a constant works as an AND or an OR gate, so each tree
  evaluates the same equation.

Both are purely combinational: no clock, no reset, no state.

## The fifteen output equations

With B1 the least significant input bit:

| output | equation              | output | equation               |
|--------|-----------------------|--------|------------------------|
| T1     | B1 + B2 + B3 + B4     | T9     | B4 (B1 + B2 + B3)      |
| T2     | B2 + B3 + B4          | T10    | B4 (B2 + B3)           |
| T3     | B1B2 + B3 + B4        | T11    | B4 (B1B2 + B3)         |
| T4     | B3 + B4               | T12    | B4B3                   |
| T5     | B3 (B1 + B2) + B4     | T13    | B4B3 (B1 + B2)         |
| T6     | B3B2 + B4             | T14    | B4B3B2                 |
| T7     | B1B2B3 + B4           | T15    | B4B3B2B1               |
| T8     | B4                    |        |                        |

The pattern: T8 is the top input bit. Below it every output is "B4 OR (the
condition on the lower three bits)". Above it every output is "B4 AND (that
condition)". The table was checked exhaustively against `b >= k`.

## How the multiplexer trees work

`mux2` passes `d1` when `sel` = 1 and `d0` when `sel` = 0. Two constant ties
turn it into a gate:

* `d0 = 0`: `y = sel AND d1`
* `d1 = 1`: `y = sel OR d0`

A multiplexer's select can be driven by another multiplexer's output, which is
how T1, T3, T13 and T15 combine two sub-terms. Each symbol's wiring lives in
one table, `NET`, in `rtl/mux_symbol.sv`. Each row gives one multiplexer as
(d0, d1, sel). A source is `C0`/`C1` (constant), `B1`..`B4` (input), or
`M1`/`M2` (the output of an earlier multiplexer in the same tree). The last
multiplexer drives the output. Two examples:

* T5 = B3 (B1 + B2) + B4
  * M1 = (B2, 1, sel B1) = B1 + B2
  * M2 = (0, M1, sel B3) = B3 M1
  * M3 = (M2, 1, sel B4) = M2 + B4
* T13 = B4B3 (B1 + B2)
  * M1 = (B2, 1, sel B1) = B1 + B2
  * M2 = (0, B4, sel B3) = B3B4
  * M3 = (0, M1, sel M2) = M1 M2

The trees are at most three multiplexers deep. T4, T8 and T12 need a single
one. T8 is a multiplexer whose select is tied to 0, so it passes B4 straight
through.

## Where this RTL makes its own choices

The circuits were designed and characterised at transistor level in an 18 nm
FinFET process. The RTL keeps their structure and logic function. Some points
were settled here:

* **Transistor level is not modelled.** The logic-based symbols are written as
  their Boolean equations. FinFET bias modes, supply voltage, power and analog
  delay have no RTL counterpart. The circuits were characterised from
  VDD = 0.1 V to 1.0 V. Their delays are in the hundreds of microseconds, and
  power ranges from about 0.02 µW to 11 µW. None of that applies to this
  model.
* **Equations for T6, T8 and T12** follow from the truth table and the
  symbol drawings. They are T6 = B3B2 + B4, T8 = B4 and T12 = B4B3.
* **Multiplexer polarity.** `sel = 1` passes the lower data input of the
  drawings (`d1`). This is the only reading under which the drawn trees give
  the equations.
* **T9 tree.** The first multiplexer's `d0` input is taken to be B2, which
  gives B1 + B2 + B3 under B4 as required.
* **Bit order.** B1 is the least significant bit. `b[0]` = B1, and
  `t[k-1]` = Tk.
* **Top level.** The two decoders are alternative implementations, not
  stages of one pipeline. `b2t_top` places them side by side, each with its
  own ports. To use just one decoder, instantiate `iglp_decoder` or
  `mux_decoder` on its own.

## Files

| file                  | contents                                                            |
|-----------------------|---------------------------------------------------------------------|
| `rtl/b2t_pkg.sv`      | widths (`N_BITS` = 4, `N_THERM` = 15), types `bin_t`/`therm_t`, `is_thermometer()` |
| `rtl/mux2.sv`         | 2:1 multiplexer cell                                               |
| `rtl/iglp_symbol.sv`  | one logic-based output bit; parameter `K` = 1..15 picks Tk          |
| `rtl/mux_symbol.sv`   | one multiplexer-tree output bit; parameter `K` = 1..15              |
| `rtl/iglp_decoder.sv` | 15 `iglp_symbol`s → logic-based decoder                             |
| `rtl/mux_decoder.sv`  | 15 `mux_symbol`s → multiplexer-based decoder                        |
| `rtl/b2t_top.sv`      | both decoders: `iglp_b`→`iglp_t`, `mux_b`→`mux_t`                   |

Both decoders carry a deferred immediate assertion that the settled output is
a valid thermometer code.

The widths are fixed at 4 → 15. The fifteen equations and trees are specific
to a 4-bit input, so changing `N_BITS` alone does not produce a wider decoder.

## Simulation

Each module has a self-checking testbench in `tb/`. Each one ends by printing
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench          | what it checks                                                      |
|--------------------|---------------------------------------------------------------------|
| `mux2_tb`          | all 8 input combinations; the AND and OR uses                       |
| `iglp_symbol_tb`   | all 15 symbols against `b >= K` on all 16 inputs; every output toggles |
| `mux_symbol_tb`    | the same for the multiplexer trees                                  |
| `iglp_decoder_tb`  | 16-code sweep plus 200 random codes against a reference built in the testbench; thermometer validity |
| `mux_decoder_tb`   | the same for the multiplexer-based decoder                          |
| `b2t_top_tb`       | whole design at default parameters (see below)                      |

`b2t_top_tb` first feeds both decoders the same input, counting 0..15 twice
with B1 toggling fastest. Then it feeds each decoder its own random codes.
It checks:

* every output against the reference;
* that the two decoders agree on equal inputs;
* coverage: every input code, every output bit rising and falling, and the
  all-zeros and all-ones outputs, all seen on both decoders.

Outputs are sampled one clock after the input changes. The testbench clock
exists only to pace the stimulus.

Running a testbench with Verilator:

    verilator --binary --timing --assert -Irtl -Itb \
        rtl/b2t_pkg.sv tb/b2t_top_tb.sv --top-module b2t_top_tb -Mdir obj
    ./obj/Vb2t_top_tb

Substitute any other testbench name; Verilator finds the other modules in
`rtl/` through the include path. Every testbench finishes in well under a
second.
