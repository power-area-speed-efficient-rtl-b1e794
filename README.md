# Multiprecision 32x32 multiplier with Booth/4:2-compressor building blocks and voltage/frequency management

One block of hardware serves three precisions. It forms either one 32x32 product, three independent 16x16 products, or nine independent 8x8 products, all unsigned. The point is that short operands should not pay for a full-width multiplier. When the work fits into narrow lanes, the lanes run in parallel, and the clock, and with it the supply voltage, can come down for the same throughput.

Three ideas carry the design:

1. **Three sub-products instead of four.** A 2n-bit product is built from three n-bit products with the identity
   `U*V = UH*VH*2^2n + ((UH+UL)*(VH+VL) - UH*VH - UL*VL)*2^n + UL*VL`.
   A multiplier and an adder are traded for two small pre-adders and a subtractor. The identity is applied twice: 32 -> 16 -> 8 bits.
2. **Booth radix-4 building blocks with a 4:2-compressor tree.** Each small multiplier (a PE) recodes its multiplier in radix-4 Booth digits. It reduces the partial products with rows of 4:2 compressors and finishes with one carry-propagate adder.
3. **Voltage/frequency management.** A management unit turns a throughput request into a clock-frequency code and a supply-voltage code. It takes into account how many lanes work in parallel. A dithering controller turns the voltage code into the selection of supply rails.

## Modes and lane layout

The top, `main_block`, has 72-bit operand buses and a 144-bit result bus. Each result lane is twice as wide as its operand lane:

| `algorithm` | mode | lanes | operands | result |
|---|---|---|---|---|
| `2'b11` (and `2'b10`) | 32x32 | 1 | `input1[31:0]`, `input2[31:0]` | `result[63:0]` |
| `2'b01` | 16x16 | 3 | `input1[16k+15:16k]`, k = 0..2 | `result[32k+31:32k]` |
| `2'b00` | 8x8 | 9 | `input1[8j+7:8j]`, j = 0..8 | `result[16j+15:16j]` |

Result bits outside the active lanes read 0, and operand bits outside them are ignored. The mode names live in `mp_pkg::precision_e`. Only the code `2'b11` for the 32x32 mode comes from the original description. The other codes and the whole lane layout are choices of this implementation.

Example (32x32): `0x55555555 * 0x55555555 = 0x1C71C71C38E38E39`. This is the reference value of the original simulation, and both the multiplier and the top testbench check it.

## How the hardware is shared

```
main_block
 ├─ mp_multiplier            mode steering, 32-bit recombination
 │   ├─ mul16_3sub  x3       16x16 three-sub-block units (or 3 x 8x8 each)
 │   │   ├─ pe_booth_wallace #(8)  UH*VH
 │   │   ├─ pe_booth_wallace #(9)  (UH+UL)*(VH+VL)
 │   │   ├─ pe_booth_wallace #(8)  UL*VL
 │   │   └─ karatsuba_combine #(8)
 │   └─ karatsuba_combine #(16)
 ├─ vfmu                     throughput request -> frequency and voltage codes
 └─ vsu_dither               voltage code -> one-hot supply-rail enables
```

Nine PEs exist in total, three in each 16x16 unit. In 8x8 mode each PE takes one byte lane: unit u holds lanes 3u, 3u+1 and 3u+2. The middle PE of a unit is 9x9, because it must multiply the 9-bit sums UH+UL and VH+VL. In 8x8 mode it simply gets a zero-extended byte. So the "nine 8x8 multipliers" are, physically, six 8x8 and three 9x9 PEs.

In 16x16 mode each unit works on its own 16-bit lane.

In 32x32 mode the identity is applied once more with 16-bit halves:

- unit 0 forms UL*VL;
- unit 2 forms UH*VH;
- unit 1 forms the middle product.

The middle operands U1 = UH+UL and V1 = VH+VL are 17 bits wide, one bit more than a 16x16 unit takes. Unit 1 multiplies their low 16 bits, u and v. The 17th bits, u16 and v16, are added back afterwards:

`U1*V1 = u*v + 2^16*(u16 ? v : 0) + 2^16*(v16 ? u : 0) + 2^32*(u16 & v16)`

This correction is this implementation's own way of fitting the 17-bit middle product onto a 16x16 unit. The original names only the 34-bit subtraction at this level.

## Recombination network (`karatsuba_combine`)

With N the half width, the three sub-products ph = UH*VH, pl = UL*VL and pm = U1*V1 are combined by five blocks:

| block | width (N=8) | width (N=16) | produces |
|---|---|---|---|
| adder | 16 | 32 | ph + pl |
| subtractor | 18 | 34 | m = pm - (ph + pl), the middle term |
| adder | 8 | 16 | P[2N-1:N] = pl[2N-1:N] + m[N-1:0] |
| adder | 11 | 19 | P[2N+WA-1:2N] = ph[WA-1:0] + m[2N+1:N] + carry |
| adder | 5 | 13 | P[4N-1:2N+WA] = ph[2N-1:WA] + carry |

P[N-1:0] is pl[N-1:0], unchanged. The 16/18/8/11/5-bit widths of the 16x16 unit follow the original block diagram. The carries between the three output adders are needed for a correct product, so they are included. The widths of the 32-bit level are scaled by this implementation; the original gives only the 34-bit subtractor. `WA` is a parameter.

## The building block: Booth radix-4 PE with a 4:2-compressor tree

`pe_booth_wallace #(N)` multiplies two unsigned N-bit operands into a 2N-bit product. It works in three steps.

1. **Booth recoding (`booth_encoder`).** A 0 is appended below the LSB of the multiplier. The multiplier is then zero-extended until it has an even number of bits with a 0 sign bit. This gives N/2+1 overlapping 3-bit groups: 5 groups for both N = 8 and N = 9. Each group selects a digit by the usual table: `000:0, 001:+X, 010:+X, 011:+2X, 100:-2X, 101:-X, 110:-X, 111:0`. The digit is carried as (neg, one, two).
2. **Partial-product rows.** Row k is the digit times X, shifted by 2k. A negative row is written as its one's complement. The +1 that completes each two's complement is collected in one extra row, which has a single bit at each position 2k. All rows are 2N bits wide, and the arithmetic is modulo 2^2N, which still holds the full unsigned product.
3. **Reduction and final add (`csa_tree42`).** At each level the tree takes rows four at a time into a row of 4:2 compressors, which gives two rows. A leftover group of three rows goes through full adders. The 6 rows of an 8x8 or 9x9 PE therefore need two levels: 6 -> 4 -> 2. A plain `+` then adds the sum and carry rows.

**The 4:2 compressor (`compressor42`)** is two full adders in series. It takes four bits of weight j, plus a carry-in from the compressor of weight j-1. It returns a sum bit of weight j and two bits of weight j+1: `carry` and `cout`. `cout` comes from the first full adder only, so it never depends on `cin`. That is why a row of these compressors has no rippling carry chain, even though `cout` feeds the next bit's `cin`. The invariant is `x1+x2+x3+x4+cin = sum + 2*(carry+cout)`.

The original also discusses an *approximate* 4:2 compressor. That variant is not included: its logic equations are not given, and this multiplier is exact.

## Voltage and frequency management

These three units are less fully specified in the original than the arithmetic. Their rules below are the simplest that do what the original asks of each unit.

**`vfmu`** takes `perf_req`, the required throughput in units of the oscillator's frequency step, and the precision mode. Nine results per clock in 8x8 mode, or three in 16x16 mode, allow a slower clock:

- `fre_out = ceil(perf_req / lanes)`, with 9, 3 or 1 lanes;
- `vol_out` is the lowest level v with `FMAX[v] >= fre_out`.

The default `FMAX` table is linear (`8v+7`). Both outputs are registered. Reset gives the highest codes.

**`vsu_dither`** drives the enables of NRAILS = 5 supply-rail power switches as a one-hot `rail_sel`. The voltage code counts half rail steps. An even code selects rail code/2. An odd code dithers: a one-bit accumulator, updated every DIV = 4 clocks, alternates between rails code/2 and code/2+1, so the average supply sits halfway between them. Reset selects the top rail. An assertion checks that `rail_sel` stays one-hot. The rails and switches themselves are analog and not part of the RTL.

**`fsu_vco`** is a behavioural, non-synthesizable model of the voltage-controlled oscillator that generates the clock. It runs at `max(code,1) * STEP_MHZ` MHz (10 MHz per step by default) while `en` is high. It is used by the testbenches to close the loop: `fre_out` of the top drives the oscillator, and the oscillator clocks the top.

## Top-level interface and timing (`main_block`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | system clock (from the oscillator) |
| `rst_n` | in | 1 | asynchronous, active-low reset |
| `algorithm` | in | 2 | precision mode |
| `in_valid` | in | 1 | operands valid this cycle |
| `input1`, `input2` | in | 72 | operand lanes |
| `perf_req` | in | 6 | throughput request |
| `out_valid` | out | 1 | `in_valid` delayed by one clock |
| `result` | out | 144 | products of the operands presented one clock earlier |
| `fre_out` | out | 6 | frequency code for the oscillator |
| `vol_out` | out | 3 | voltage code |
| `rail_sel` | out | NRAILS | supply-rail switch enables |

**Datapath timing.** The multiplier is combinational. Its output is registered when `in_valid` is high, so the latency is one clock and the throughput one operation per clock. `result` holds its value through idle cycles.

**Management timing.** `fre_out` and `vol_out` follow a change of `perf_req` or `algorithm` one clock later. `rail_sel` updates every 4 clocks.

All units share one clock. A real chip would more likely run the management units from a fixed reference clock.

## Departures and open points

- **Signedness.** Operands are unsigned. Signed operation is not described.
- **No approximate compressor.** The approximate 4:2 compressor is not built; the tree uses exact compressors.
- **Chosen, not specified:** the mode codes other than `2'b11`, the lane layout, the output register and its latency, the 17th-bit correction at the 32-bit level, the steering of operands in 8x8 mode, the VFMU rule and table, the dithering scheme, the rail count and the oscillator law.
- **VFMU example not reproduced.** The original simulation shows a voltage code 101 turning into 001 and a frequency code 110010 into 001110 in 32x32 mode. The rule behind that mapping is not given, so this VFMU does not reproduce it. The separate "voltage" and "frequency" inputs of that simulation are replaced by the single `perf_req` request.
- **Baselines not included.** The fixed-width 32x32 multiplier and the four-sub-block variant are only comparison points of the original. They are not included, nor are its power and area figures.

## Verification

Each module has a self-checking testbench in `tb/` named `tb_<module>`. Each one prints `TB_RESULT checks=N failures=M` and has a watchdog.

- **Small blocks.** The full adder, the 4:2 compressor and the Booth encoder are checked exhaustively.
- **Arithmetic blocks.** These are checked against integer products:
  - the 8x8 and 9x9 PEs exhaustively, the 16x16 PE on random operands;
  - the compressor tree with 2, 5, 6 and 9 rows;
  - the recombination network at N = 8 and N = 16;
  - the 16x16 unit on corner bytes and random operands, in both modes;
  - the multiplier in every mode, including cases where both 17-bit middle operands overflow 16 bits.
- **`tb_main_block`.** Runs the complete system at its default parameters, clocked by the oscillator model. It goes through 24 phases of mode changes and throughput requests with idle cycles, and checks every result, the frequency and voltage codes, the measured clock period and the rail dithering. It fails if any of these mechanisms never occurs: the three modes, a mode switch, a 17-bit middle operand, an idle cycle, a clock lowered by parallel lanes, a frequency change, and dithering.

To simulate with Verilator 5 (run from the folder that holds `rtl/` and `tb/`):

```
verilator --binary --timing --assert -y rtl -y tb rtl/mp_pkg.sv tb/tb_main_block.sv \
          --top-module tb_main_block -o sim
./obj_dir/sim
```

Replace `tb_main_block` with any other testbench name. `mp_pkg.sv` must come first because the modules import it.
