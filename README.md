# Multiplexer-based thermometer-to-binary encoder for a flash ADC

A flash ADC compares its input against 2^N − 1 reference levels at once. The
comparator outputs form a *thermometer code*: for an input that lies above k
of the levels, the lowest k outputs are 1 and the rest are 0. The encoder
behind the comparators must turn that code into the N-bit number k.

The usual ways to do that are a ones counter (a Wallace tree of full adders)
or a multiplexer tree driven by the thermometer bits plus their inverted
copies. The encoder here uses neither. It reads each bit of the
**Gray code** of k straight off the thermometer code with a short chain of
2:1 multiplexers. The last multiplexer of each chain has its data-1 input
tied to ground, which replaces the inverters of the classic MUX encoder. A
ripple chain of XOR gates then turns the Gray code into binary.

The RTL models the logic of that circuit and the analog front end around
it. The original circuit was designed at transistor level, with transmission
gates in an 18 nm FinFET process. Its reported gains are lower power and
shorter delay: about 0.37 ps against 0.47 ps for a conventional MUX encoder,
and roughly 80 % less power. Those are electrical properties, and an RTL
model does not show them.

## Data path

```
 vin, vref ──► flash_comparator_bank ──therm[14:0]──► therm2gray_enc ──gray[3:0]──► gray2bin ──► bin[3:0]
               (ladder + 15 comparators,               (7 x tg_mux2)                (3 x tg_xor2)
                behavioural)

 therm3[6:0] ──► therm2gray_enc3 ──► gray3[2:0]        (3-bit reference encoder, beside the main path)
```

Everything is combinational: there is no clock, register or reset. Bit
`k-1` of a thermometer vector is comparator `Tk`. Bit `i-1` of a Gray vector
is `Gi`. Bit `k` of a binary vector has weight 2^k.

## How the multiplexer chains produce Gray code

Gray bit `i` (counting from 0) of a count `k` is 1 when `k mod 2^(i+2)`
lies in `[2^i, 3·2^i)`. Along the thermometer code, that bit therefore
switches on at taps `s·(4j+1)` and off at taps `s·(4j+3)`, where `s = 2^i`.
A thermometer code is monotone, so a tap that is set tells you that all the
taps below it are set too. Each chain asks two questions. Which was the last
"off" tap the code reached? Did the code reach the "on" tap that follows it?

```
m_L = 0                                   (grounded input, L = 2^(N-2-i))
m_j = T(s·(4j+3)) ? m_(j+1) : T(s·(4j+1)) (j = L-1 … 0)
G(i+1) = m_0
```

The MSB needs no gate: `G_N = T(2^(N-1))`. For the 4-bit encoder this gives
seven multiplexers and no inverter:

| Gray bit | logic                                                       | muxes |
|----------|-------------------------------------------------------------|-------|
| G4       | `T8`                                                        | 0     |
| G3       | `T12 ? 0 : T4`                                              | 1     |
| G2       | `T6 ? (T14 ? 0 : T10) : T2`                                 | 2     |
| G1       | `T3 ? (T7 ? (T11 ? (T15 ? 0 : T13) : T9) : T5) : T1`        | 4     |

For N = 3 the same rule gives the 3-bit encoder: `G3 = T4`,
`G2 = T2·¬T6` and `G1 = T1·¬T3 + T3·(¬T7·T5)`. The 4-bit design was built
up from that 3-bit encoder.

The longest path is the G1 chain: 2^(N−2) multiplexers, four for N = 4. The
XOR stage adds N−1 gates in series:
`B4 = G4`, `B3 = B4 ⊕ G3`, `B2 = B3 ⊕ G2`, `B1 = B2 ⊕ G1`.

Thermometer codes with bubbles (a 0 below a 1) are not corrected. The
encoder returns whatever its netlist gives for them, and the testbenches pin
that response down for every one of the 2^15 input words.

## Modules

| file | what it is |
|------|------------|
| `rtl/flash_enc_pkg.sv` | package: `ADC_BITS = 4`, `REF_BITS = 3`, `therm_width(n) = 2^n − 1` |
| `rtl/tg_mux2.sv` | 2:1 multiplexer cell (transmission-gate pair in the original circuit) |
| `rtl/tg_xor2.sv` | two-input XOR cell |
| `rtl/therm2gray_enc3.sv` | 3-bit encoder, 7 → 3, written as an explicit three-multiplexer netlist |
| `rtl/therm2gray_enc.sv` | N-bit encoder, `N` default 4 (15 → 4), chains generated from the rule above |
| `rtl/gray2bin.sv` | N-bit Gray-to-binary XOR ripple, `N` default 4 |
| `rtl/flash_comparator_bank.sv` | **behavioural model** (uses `real`) of the resistor ladder and the 2^N − 1 comparators |
| `rtl/flash_adc_top.sv` | top: comparator bank → encoder → Gray-to-binary, plus the 3-bit encoder with its own ports |

Top-level ports of `flash_adc_top` (parameter `N = 4`):
`vin`, `vref` (real, inputs); `therm[14:0]`, `gray[3:0]` and `bin[3:0]`
(outputs); `therm3[6:0]` (input); `gray3[2:0]` (output).

## What follows the source circuit and what is this design's own

The following come from the published circuit:
- the multiplexer netlists of the 3-bit and 4-bit encoders, including which
  inputs are grounded;
- the XOR ripple of the Gray-to-binary stage;
- the 15-comparator flash front end.

These are choices made for this RTL:
- **Generic N.** The encoder and converter take any `N`. Only N = 3 and
  N = 4 reproduce drawn circuits. Larger N follows the same rule, is untested
  against any reference circuit and is tested here only for the converter
  (N = 6).
- **Comparator model.** `2^N` equal resistors, so tap k is at
  `vref·k/2^N`. A comparator outputs 1 when `vin > tap`. It has no offset,
  noise or delay.
- **No registers.** The source design is a combinational encoder, so no
  clock or output register was added.
- **Observability.** `therm` and `gray` are brought out as top-level ports.
- **Synthesis.** `flash_comparator_bank`, and therefore `flash_adc_top`, use
  `real` ports and will not synthesize. To synthesize the encoder, take
  `therm2gray_enc` and `gray2bin` on their own, or feed `therm` from real
  comparators.

The Wallace-tree encoder and the classic inverter-based MUX encoder are the
baselines the circuit was compared with. They are not included.

## Verification

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=<n> failures=<n>`. Each also has a watchdog.

| testbench | checks |
|-----------|--------|
| `tb_tg_mux2`, `tb_tg_xor2` | exhaustive truth tables |
| `tb_therm2gray_enc3` | the 8 valid codes against the 3-bit Gray table; all 128 inputs against the sum-of-products equations |
| `tb_therm2gray_enc` | the 16 valid codes against the 4-bit table and `k ^ (k>>1)`; all 32768 inputs against the Boolean form of the netlist; an N = 3 instance over all 128 inputs |
| `tb_gray2bin` | the 16-row conversion table; the round trip `b → b^(b>>1) → b` for N = 4 and N = 6 |
| `tb_flash_comparator_bank` | a fine sweep of `vin` around and between all taps, for two values of `vref` |
| `tb_flash_adc_top` | end to end at default parameters: `vin` swept from −0.1 V to 1.1 V; `therm`, `gray` and `bin` checked against the code computed from `vin`; the 3-bit encoder checked over its 8 codes |

`tb_flash_adc_top` also counts events and fails if any of them never occurs:
- each of the 16 output codes;
- underrange (code 0) and full scale (code 15);
- each grounded multiplexer input forcing its Gray bit to 0 (T15 on G1, T14
  on G2 and T12 on G3);
- each of the 8 codes of the 3-bit encoder.

The delay and power figures of the transistor-level circuit are not
checked, because the model has zero delay.

To run a testbench with Verilator 5:

```
verilator --binary --timing -Wall -Wno-fatal -Irtl -y rtl +libext+.sv \
    rtl/flash_enc_pkg.sv tb/tb_flash_adc_top.sv --top-module tb_flash_adc_top
./obj_dir/Vtb_flash_adc_top
```

Swap in another `tb/tb_*.sv` file and its module name to run a different
test. Each one finishes in well under a second.
