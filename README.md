# Multiplier-less 9/7 wavelet filter pair with ROM-less distributed arithmetic

This design computes one level of the 1-D discrete wavelet transform filter
pair for the 9/7 wavelet, the high-pass output `Y_H` and the low-pass output `Y_L`,
for every input sample. It uses no multipliers and no look-up ROM. Each
coefficient product is broken into its binary digits. The products are then
rebuilt from a small array of adders and a shift-and-add chain that are
fixed when the design is elaborated. One sample goes in per clock, and both
results come out one clock later.

## The arithmetic

### Symmetric taps first

Both 9/7 filters are symmetric, so two taps that share a coefficient are
added before any multiplication. With `Y(n)` the newest sample:

| filter | DA input | formed from | coefficient (x128) |
|---|---|---|---|
| high pass, 7 taps | r1 | Y(n) + Y(n-6) | g0 = 71 |
| | r2 | Y(n-1) + Y(n-5) | g1 = 38 |
| | r3 | Y(n-2) + Y(n-4) | g2 = 4 |
| | r4 | Y(n-3) | g3 = 6 |
| low pass, 9 taps | r1 | Y(n) + Y(n-8) | h0 = 77 |
| | r2 | Y(n-1) + Y(n-7) | h1 = 34 |
| | r3 | Y(n-2) + Y(n-6) | h2 = 10 |
| | r4 | Y(n-3) + Y(n-5) | h3 = 2 |
| | r5 | Y(n-4) | h4 = 3 |

The coefficients are the 9/7 values multiplied by 128 and rounded to 7-bit
integers. All of them are used as positive numbers. The high-pass pairing
is the published one, with the largest coefficient on the outermost pair.
The low-pass pairing follows the same order (h0 outermost, h4 on the centre
tap) and is this design's choice. A textbook 9/7 low-pass puts the largest
coefficient on the centre tap. To get that, reverse `LP_COEF` (see
"Changing it").

### Distributed arithmetic without a ROM

Each filter output is an inner product `y = sum_k C_k * r_k`, where the `C_k` are
fixed. Write each `C_k` in binary, `C_k = sum_i c_k,i * 2^i`, and swap the two
sums:

    y = sum_i 2^i * P_i,      P_i = sum of the r_k whose coefficient has bit i set

The 0/1 table `c_k,i` is the *DA matrix*. Row `i` tells which inputs make up
the bit-plane sum `P_i`. Because the coefficients are constants, each `P_i` is
a fixed set of additions. A classic DA unit would store every possible
`P_i` in a ROM; here the adders compute it directly.

For the high-pass set (71 = 1000111, 38 = 0100110, 4 = 0000100, 6 = 0000110),
with the least significant bit first:

| plane | weight | inputs | P for r = (1,2,3,4) |
|---|---|---|---|
| 0 | 1 | r1 | 1 |
| 1 | 2 | r1 r2 r4 | 7 |
| 2 | 4 | r1 r2 r3 r4 | 10 |
| 3 | 8 | none | 0 |
| 4 | 16 | none | 0 |
| 5 | 32 | r2 | 2 |
| 6 | 64 | r1 | 1 |

1 + 14 + 40 + 64 + 64 = 183 = 71·1 + 38·2 + 4·3 + 6·4. This example serves
as a check at every level of the test suite.

### Sharing additions between rows

Rows of the DA matrix often contain one another. In the example, plane 2 is
plane 1 plus r3, and plane 6 is the same as plane 0. `da_adder_array`
finds these cases when it is elaborated. For each row it picks a base row
whose set of inputs is contained in its own. The base must have fewer
inputs, or the same number of inputs and a lower plane number. Among those
it takes the one with the most inputs. The row then adds only the inputs
the base lacks. This ordering rules out cycles. The rule is greedy: it
reuses whole rows and does not look for common sub-sums that are not
themselves rows.

Resulting adder counts:

| | pre-adders | adder array | shift-add chain | total |
|---|---|---|---|---|
| high pass | 3 | 3 | 4 | 10 |
| low pass | 4 | 5 | 5 | 14 |

### Shift-and-add chain

`da_shift_add` passes only the planes that contain at least one set bit.
The running sum starts with the lowest used plane and adds each further used
plane at weight `2^i`. In hardware each weight is only a wiring shift. An
all-zero plane such as plane 3 or 4 above costs no adder. This is the
selection step of the DA unit: with fixed coefficients it reduces to
routing. The chain is combinational, so the unit produces a full result
every clock rather than one plane per clock.

## Blocks

| module | role |
|---|---|
| `dwt97_pkg` | coefficient tables and shared sizes |
| `tap_delay_line` | 8 registers holding Y(n-1) .. Y(n-8), shifted when a sample is accepted |
| `tap_pair_adder` | the symmetric pre-adders (3 for high pass, 4 for low pass) |
| `da_adder_array` | bit-plane sums P_i, with reuse between rows |
| `da_shift_add` | weights and adds the used planes |
| `da_unit` | adder array + shift-add, one per filter |
| `dwt97_da_top` | the complete filter pair with its output register |

## Interface and timing (`dwt97_da_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock |
| `rst_n` | in | 1 | asynchronous, active-low reset; clears the delay line and outputs |
| `in_valid` | in | 1 | `x_in` carries a new sample; low stalls the delay line |
| `x_in` | in | `DATA_W` (9) | sample Y(n), two's complement |
| `out_valid` | out | 1 | `y_h`/`y_l` hold the results of the sample accepted on the previous clock |
| `y_h`, `y_l` | out | `Y_W` (20) | high- and low-pass outputs, two's complement |

Latency is one clock. Throughput is one sample per clock, and every adder
works on every sample. The path from `x_in` to the output register goes
through a pre-adder, the adder array and the shift-add chain with no
pipeline register in between. At high clock rates this path limits the
speed.

Number formats:
- The default `DATA_W = 9` holds an 8-bit unsigned pixel (zero-extended) or
  a signed value from -256 to 255.
- The outputs are at full precision and 128 times the real filter gain. No
  rounding or truncation is applied.
- `Y_W = DATA_W + 1 + clog2(5) + 7` cannot overflow for any input.

The reset value of the delay line is zero, which is equivalent to zero
padding before the first sample.

The outputs are produced for every input sample. The wavelet transform keeps
every second low-pass and high-pass output. Selecting them, and feeding the
low-pass band to a further decomposition level, is left to the surrounding
logic; this design contains no level controller.

## Departures and choices

- **Coefficient signs and format.** The coefficients are unsigned 7-bit
  magnitudes, and the top bit plane has positive weight 64. A
  two's complement reading would make 77 and 71 negative and would not give
  183 in the example. The real 9/7 filters have alternating signs; this
  design, like the coefficient table it implements, uses all of them as
  positive. Because of that, and because of the rounding to 1/128, the
  outputs are not a perfect-reconstruction 9/7 transform. Put other
  constants in the tables if you need one: the DA structure handles any
  unsigned coefficients.
- **Low-pass pairing.** As described above, the coefficient order is this
  design's own choice.
- **Handshake, reset, widths and the missing decimation** are this design's
  own choices.
- **Redundancy removal.** The greedy row-reuse rule is this design's own; the
  structure it works on, a DA matrix with adders only, is the published one.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`. Each has a watchdog.

- `tb_tap_delay_line`: a random stream with random enable gaps. Every tap is
  compared each cycle with a software shift register. Also checks reset,
  including a reset in the middle of the stream.
- `tb_tap_pair_adder`: extreme and random operands, compared with integer
  sums.
- `tb_da_adder_array`: the example's plane sums 1,7,10,0,0,2,1, plus random
  and extreme inputs for both coefficient sets. The expected values use
  direct sums without reuse.
- `tb_da_shift_add`: the example gives 183. With random plane sums, the
  unused planes must not affect the result.
- `tb_da_unit`: the example, plus random and extreme inputs, checked against
  ordinary multiply-accumulate.
- `tb_dwt97_da_top`: end to end at the default parameters. It covers:
  - the example sequence (0,0,0,4,3,2,1 after reset gives `y_h = 183`);
  - an impulse, whose response must replay both coefficient tables;
  - full-scale negative and positive runs;
  - 3000 random samples with random stalls.

  It checks that every output comes exactly one clock after its input and
  that no result is lost or duplicated. It counts each of these mechanisms
  and fails if any of them never happened.

Run one with Verilator, for example:

    verilator --binary --timing --assert -Irtl -Itb rtl/dwt97_pkg.sv \
        tb/tb_dwt97_da_top.sv --top-module tb_dwt97_da_top -Mdir obj
    ./obj/Vtb_dwt97_da_top

## Changing it

- **Other coefficients.** Pass new `HP_COEF` / `LP_COEF` to `dwt97_da_top`.
  Index 0 multiplies the outermost tap pair, and the last index multiplies
  the centre tap. The adder array, the reuse and the shift-add chain all
  re-derive themselves from the constants. For example,
  `.LP_COEF({7'd77, 7'd34, 7'd10, 7'd2, 7'd3})` puts 77 on the centre tap.
- **Coefficient precision.** `COEF_W` in `dwt97_pkg` sets the coefficient
  width. More bits give more planes, and therefore more adders.
- **Sample width.** Set `DATA_W`; `Y_W` follows.
- **Filter length.** The pre-adder wiring in `dwt97_da_top` is written for
  the 9/7 pair. A different length needs a new tap wiring and new `HP_N` /
  `LP_N` / `DELAY_TAPS`.
