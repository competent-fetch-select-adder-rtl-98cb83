# Square-root carry-select adder with a multiplexer-only add-one stage

A carry-select adder (CSLA) cuts a wide addition into groups. Each group
computes its sum twice, once for an incoming carry of 0 and once for an
incoming carry of 1. When the real carry arrives from the group below, a row
of 2:1 multiplexers picks the right result. The carry therefore crosses each
group through a single multiplexer instead of rippling through every bit.
In the *square-root* variant (SQRT CSLA) the groups grow by one bit from the
bottom up, so the higher groups have more time to compute while the carry
comes up from below.

The classic CSLA pays for its speed with a second ripple-carry adder (RCA)
in every group. This design removes it. The carry-in-1 result is simply the
carry-in-0 result plus one. So each group has:

1. **level 1**: an N-bit RCA with carry-in 0, which gives `{c, s} = a + b`;
2. **level 2**: an (N+1)-bit add-one circuit called the **SHM** (Special
   Hardware using Multiplexers). It turns `{c, s}` into `a + b + 1` and is
   built only from inverters and 2:1 multiplexers;
3. **level 3**: N+1 output multiplexers. They pass the level-1 result when
   the previous group's carry is 0, and the SHM result when it is 1.

The circuit was designed for low power and small area. The SHM has fewer
transistors than the usual add-one circuit, a binary-to-excess-1 converter
(BEC) built from XOR and AND gates. The cost is a longer path through the
SHM.

## Group partition of the 16-bit adder

| group | bits      | structure                                  |
|-------|-----------|--------------------------------------------|
| 0     | `[1:0]`   | 2-bit RCA, carry-in = adder `cin`          |
| 1     | `[3:2]`   | 2-bit RCA + 3-bit SHM + 3 muxes            |
| 2     | `[6:4]`   | 3-bit RCA + 4-bit SHM + 4 muxes            |
| 3     | `[10:7]`  | 4-bit RCA + 5-bit SHM + 5 muxes            |
| 4     | `[15:11]` | 5-bit RCA + 6-bit SHM + 6 muxes            |

The carry out of group k selects the results of group k+1. The carry out of
group 4 is `cout`. `csla_pkg` computes the partition with constant
functions: group 0 is 2 bits, group k is k+1 bits, and the last group is
clipped to fit `WIDTH`. The 16-bit split comes from the circuit's
transistor budget (see below). The rule for other widths is this
implementation's own extension.

## The SHM add-one circuit

The SHM computes `x = b + 1`. Bit i of the result is bit i of `b`,
inverted if a carry reaches it. The carry into bit i is the AND of all
lower input bits. The SHM gets that AND from multiplexers alone:

```
x[0] = ~b[0]                          inverter
x[1] = x[0] ? b[1] : ~b[1]            mux 1, select = x[0]
for i >= 2:
  c[i] = x[i-1] ? 1'b0 : b[i-1]       carry mux, one input tied to ground
  x[i] = c[i]   ? ~b[i] : b[i]        bit mux, select = c[i]
```

The carry mux works because of what `x[i-1]` says about bit i-1:

- If `x[i-1]` is 0, then `b[i-1]` equals the carry into bit i-1. The AND of
  the two, which is the carry into bit i, is then just `b[i-1]`.
- If `x[i-1]` is 1, the two differ, so the carry into bit i is 0.

So the multiplexer chooses between `b[i-1]` and ground, and it needs no AND
gate.

For 3 bits this is the reference circuit: three inverters and three
multiplexers.

- Mux 1 picks `b1` or `~b1` for `x1`.
- Mux 2 picks `b1` or ground. This is the carry into bit 2.
- Mux 3 picks `b2` or `~b2` for `x2`.

An N-bit SHM uses N inverters and 2N-3 multiplexers. The carry runs through
2(N-1) multiplexer levels, which is why the SHM is slower than a BEC.
Figures reported for the 0.12 µm CMOS version:

| circuit    | transistors | path delay (ns) | area (µm²) | total power (µW) |
|------------|-------------|-----------------|------------|------------------|
| 2-bit RCA  | 56          | 1.900           | 1342       | 49.271           |
| 3-bit BEC  | 32          | 1.200           | 781        | 29.015           |
| 3-bit SHM  | 24          | 2.350           | 486        | 25.943           |

The cell costs are 28 transistors per full adder, 6 per multiplexer and 2 per
inverter. With them, the per-group totals of this RTL's structure are 56,
98, 146, 194 and 242 transistors. That adds up to 736 for 16 bits, against
792 for the same adder built with BECs. Group 1 alone (RCA + SHM + muxes) has
98 transistors against 106 with a BEC. It was reported at 299.6 µm² versus
346.5 µm², and 118.8 µW versus 127.0 µW, with a delay of 3.77 ns versus
3.24 ns. These numbers describe the transistor-level circuit. The RTL
reproduces its logic and its multiplexer and inverter counts: synthesis of
the 16-bit top gives 42 multiplexers, 3+3 + 5+4 + 7+5 + 9+6. The RTL does
not reproduce its timing, area or power.

## Modules

| module           | role |
|------------------|------|
| `sqrt_csla_shm`  | top: `WIDTH`-bit adder (default 16), `{cout, sum} = a + b + cin` |
| `csla_shm_block` | one carry-select group: RCA + SHM + output muxes (default N = 2) |
| `shm`            | N-bit add-one from inverters and muxes (default N = 3) |
| `rca`            | N-bit ripple-carry adder of full adders (default N = 2) |
| `full_adder`     | 1-bit full adder |
| `mux2`           | 2:1 multiplexer, `f = sel ? i1 : i0` |
| `csla_pkg`       | group-partition functions |

All modules are purely combinational. They have no clock, no reset and no
registers. Results are valid one carry-chain delay after the inputs settle.
The port list of the top is `a[WIDTH-1:0]`, `b[WIDTH-1:0]`, `cin`,
`sum[WIDTH-1:0]` and `cout`.

## Choices made in this implementation

- **Multiplexer polarity.** The reference schematic names the multiplexer
  pins `i0`, `i1`, `sel` and `f`, but it does not show which input passes at
  `sel = 1`. This RTL takes `i1`. With that choice the schematic's wiring
  adds one exactly.
- **SHM widths beyond 3 bits.** The circuit is only drawn for 3 bits. Wider
  SHMs repeat the carry-mux / bit-mux pair. This choice reproduces the
  reported transistor counts of groups 2 to 4.
- **RCA cells.** The RCAs are plain full-adder chains. The lowest cell is a
  full adder with its carry-in tied to 0, not a half adder.
- **Top-level carries.** The external `cin` and `cout` ports follow the
  usual carry-select adder interface.
- **Other widths.** `WIDTH` values other than 16 are this implementation's
  extension.
- **Not included.** The BEC variant is a baseline used for comparison and is
  not part of this design. The transistor-level CMOS circuit and its
  electrical figures are not modelled.

## Verification

Every testbench checks itself and prints `TB_RESULT checks=N failures=M`.

- `tb_mux2`, `tb_full_adder`: all input combinations.
- `tb_rca`: 2-bit and 5-bit adders, all inputs.
- `tb_shm`: 1- to 6-bit SHMs, all inputs, against `b + 1`, including
  wrap-around.
- `tb_csla_shm_block`: groups of 2, 3, 4 and 5 bits, all inputs. It also
  counts selections of the RCA result, of the SHM result, and of SHM
  increments that ripple through the whole group.
- `tb_sqrt_csla_shm`: the 16-bit top at its default size. It runs directed
  corner cases and 200,000 random vectors against integer addition. For
  each group it counts carry-0 selections, carry-1 selections and full SHM
  ripples, plus carries that cross every group. Each of these must happen
  at least once.
- `tb_sqrt_csla_shm_widths`: widths 1, 2, 5, 8, 24 and 32, random vectors
  plus an all-ones carry ripple.

To run one with Verilator:

```
verilator --binary --timing --assert rtl/csla_pkg.sv -y rtl \
          tb/tb_sqrt_csla_shm.sv --top-module tb_sqrt_csla_shm -o sim
./obj_dir/sim
```

Each testbench finishes in well under a second.
