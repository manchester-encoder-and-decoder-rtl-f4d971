# Manchester encoder and decoder with clock recovery and invalid-code detection

Manchester coding puts a level change in the middle of every bit, so the line never sits at
one level for long and carries no DC component. In this convention a **rise** in mid-bit
(low, then high) carries a **1** and a **fall** (high, then low) carries a **0**. This RTL
holds both ends of such a link:

* an **encoder** that takes an 8-bit parallel word, serializes it and produces the Manchester
  line by XOR-ing the bit clock with the data bit through a chain of four gates;
* a **decoder** with no clock input that takes one Manchester symbol (its two half-bit levels),
  recovers the data bit, flags symbols without a mid-bit transition as invalid and reports
  whether a bit clock could be recovered;
* a **combined module** that places the two side by side and lets only one work at a time.

## Symbol notation

Throughout the decoder a symbol is a 2-bit value `code[1:0]`: `code[1]` is the level in the
first half of the bit period, `code[0]` the level in the second half.

| symbol | meaning                  | data | invalid | rclk |
|--------|--------------------------|------|---------|------|
| `01`   | rise in mid-bit          | 1    | 0       | `01` |
| `10`   | fall in mid-bit          | 0    | 0       | `01` |
| `00`   | steady low, no transition  | held | 1     | `00` |
| `11`   | steady high, no transition | held | 1     | `00` |

`rclk` uses the same two-half notation: `01` is a clock that rises in mid-bit, meaning a clock
was recovered for this bit. `00` means no clock was recovered. The constants are in
`rtl/manchester_pkg.sv`.

## Encoder

### The four-gate core (`manchester_enc_gates`)

```
code_dat = ((clk & clk_en) ^ data_in) & enc_en & enc_rst
            gate 1 (AND)   gate 2 (XOR)  gate 3   gate 4 (AND)
```

If the clock is high in the first half of every bit period, XOR-ing it with the bit gives
`10` for a 0 and `01` for a 1. That is exactly the rule above. Gate 1 gates the clock with
`clk_en`. Gate 3 applies the encoder enable. Gate 4 applies the reset, so the reset is
**active low**: `enc_rst = 0` forces the line to 0. The core is purely combinational, and the
clock is used as a data signal. In a real implementation `clk -> code_dat` is therefore a
clock-to-output path, and it can glitch at the rising edge where the bit changes, just as the
gates would. The raw XOR output `code_out` is also brought out.

### Serializer and timing (`manchester_serializer`, `manchester_encoder`)

`manchester_encoder` puts a parallel-to-serial converter in front of the core:

* While `rst_n` is low, `start` and `dout` are 0.
* The first rising edge of `clk` with `clken` high after reset samples `din` and raises
  `start`. Bit `din[7]` is presented for that clock period.
* Each further enabled rising edge presents the next lower bit, so the word goes out **MSB
  first**, one bit per clock period.
* After 8 bit periods the next enabled edge drops `start`. The encoder then stays idle, and
  `dout` stays 0, until the next reset. **One reset sends one word.**
* `start` drives the core's enable, so `dout` is non-zero only while `start` is high.
* Bits change on the rising edge, because the core needs the clock high in the first half of
  each period.

The first half of each symbol lasts as long as the clock is high and the second half as long as
it is low. A 50% duty cycle clock therefore gives even symbols. A 25% duty cycle clock gives a
short first half and a long second half, with the mid-bit transition at a quarter of the bit
period. Both cases are exercised in the tests.

If `clken` is dropped in the middle of a word, the serializer waits. The gated clock into the
XOR is then 0, so `dout` shows the plain bit level (NRZ) until `clken` returns. Keep `clken` high
during a conversion if the line must stay Manchester-coded.

## Decoder (`manchester_decoder`)

The decoder has no clock. Every output follows the input symbol combinationally, so it works at
any symbol rate. Whoever presents the symbols decides when they are sampled. Inside there are
four units:

* **Control unit** (`mdec_control_unit`): `active = rst_n & en`. It passes the symbol on only
  while active and otherwise presents `00` to the units behind it.
* **Transition detector** (`mdec_transition_detector`): this is the decoder's only storage, a
  single **level-sensitive latch**. The latch is transparent while the active decoder sees a
  valid symbol, and then loads `code[0]` (1 for `01`, 0 for `10`). It is also transparent while
  `rst_n` is low, and then loads 0. Otherwise it holds. So `data` keeps the last valid bit through
  invalid symbols and while the decoder is disabled. Lint and synthesis report this latch; it is
  intended.
* **Clock recovery unit** (`mdec_clock_recovery`): each half of `rclk` is the XNOR of that half
  of the symbol with the recovered bit. For a valid symbol, the first half always differs from
  the bit and the second half equals it, so `rclk = 01`. On an invalid symbol, or when the
  decoder is inactive, the output is forced to `00`. Without that forcing, `00` after a 0 or `11`
  after a 1 would come out as `11`.
* **Invalid code detector** (`mdec_invalid_detector`): `invalid = active & (code[1] XNOR
  code[0])`, taken from the symbol before the control unit.

Because the latch is transparent for a valid symbol, `data` and `rclk` settle in the same
delta as the input. A testbench should apply a symbol, let time advance, then read the outputs.

## Combined module (`main_manchester`, the top)

```
 rst_enco, clken, clk, datain[7:0] --> manchester_encoder --> start, codeout
                                                  |
                                               start --(NOT)--> en
 rst_deco, codein[1:0] ------------> manchester_decoder --> dataout, invalid, rclk[1:0]
```

The encoder and decoder have separate resets, both active low. The decoder's enable is
`!start`:

* While the encoder converts, the decoder is disabled: `rclk = 00`, `invalid = 0`, and `dataout`
  holds.
* While the encoder is idle or in reset, `start` and `codeout` are 0 and the decoder runs.

An immediate assertion checks that `codeout` is never high outside a conversion. `codein` is a
separate input; `codeout` is not looped back inside the module. To decode what the encoder sent,
sample `codeout` once in the clock's high time and once in its low time for each bit period. Then
present each pair on `codein` once `start` has fallen.

| port       | dir | width | meaning                                  |
|------------|-----|-------|------------------------------------------|
| `rst_enco` | in  | 1     | encoder reset, active low; a word is sent after each release |
| `clken`    | in  | 1     | encoder clock enable                     |
| `clk`      | in  | 1     | bit clock, one period per bit, high first |
| `datain`   | in  | WIDTH | word to send, MSB first                  |
| `start`    | out | 1     | high for the WIDTH bit periods of a word |
| `codeout`  | out | 1     | Manchester line                          |
| `rst_deco` | in  | 1     | decoder reset, active low, clears `dataout` |
| `codein`   | in  | 2     | symbol to decode, first half in bit 1    |
| `invalid`  | out | 1     | symbol has no mid-bit transition         |
| `dataout`  | out | 1     | recovered bit                            |
| `rclk`     | out | 2     | recovered clock, `01` or `00`            |

The single parameter `WIDTH` (default 8) sets the word length of the encoder.

## How far this follows the original design, and where it is its own

These parts follow the original design closely:

* the four-gate encoder core and its signal names;
* the 8-bit word and the `start` output;
* the decoder's structure of control unit, transition detector, clock recovery unit and
  invalid detector, with a clockless decoder;
* the symbol, invalid and `rclk` conventions;
* the combined module's ports and its rule that only one side works at a time.

The reference vectors used in the tests come from the original simulations:

* encoder words `10110010` and `10110011`, with 50% and 25% duty cycle clocks;
* decoder symbols `01 00 10 11 01`, giving `rclk 01 00 01 00 01`;
* combined-module word `10011010`.

These are this design's own choices:

* **Reset polarity.** Both resets are active low, as implied by the reset entering an AND gate.
* **Serializer.** MSB-first order, one word per reset, `clken` as the advance enable, and
  `start` driving the core's enable.
* **Transition detector.** It is a single latch whose reset value is 0. Holding the bit on
  invalid symbols was chosen because it reproduces the reference `rclk` values.
* **Clock recovery unit.** Its output is forced to `00` on every invalid symbol.
* **Invalid detector.** It is gated by reset and enable.
* **Decoder enable.** In the combined module it is `!start`.

Treat the clock recovery output with care. Given the rules above, `rclk` is `01` exactly when an
active decoder sees a valid symbol. It is a per-symbol "clock present" indication, not a
free-running regenerated clock.

## Simulating

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog if it hangs. For example, with
Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/manchester_pkg.sv tb/tb_main_manchester.sv --top-module tb_main_manchester
./obj_dir/Vtb_main_manchester
```

| testbench                     | what it covers |
|-------------------------------|----------------|
| `tb_manchester_enc_gates`     | all 32 input combinations; the 0/1 symbol table |
| `tb_manchester_serializer`    | bit order, length of `start`, random `clk_en` pauses, idle after a word |
| `tb_manchester_encoder`       | line sampled in each clock half, 50% and 25% duty cycle, decoded back to the word |
| `tb_mdec_control_unit`        | all reset/enable/symbol combinations |
| `tb_mdec_transition_detector` | fixed sequence and 400 random steps against a reference bit |
| `tb_mdec_clock_recovery`      | all 32 input combinations |
| `tb_mdec_invalid_detector`    | all 8 input combinations |
| `tb_manchester_decoder`       | reference symbol sequence, then 500 random symbols, resets and enables |
| `tb_main_manchester`          | end to end at the default size (see below) |

`tb_main_manchester` encodes 11 words and captures the line. It checks that the decoder is
disabled while the encoder converts, then decodes the captured symbols with invalid symbols
mixed in. It also runs a fixed decoder sequence. It counts each mechanism (decoder blocked, clock
recovered, invalid flagged, bit held, 25% duty clock, `clken` pause, encoder quiet while decoding)
and fails if any of them never happened.
