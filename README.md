# Radix-2 SRT divider with a bit-reduced residual and a linear sequential array

This is synthesizable SystemVerilog for a fractional divider that produces one
quotient digit per clock. It uses the radix-2 SRT recurrence. Three ideas from
the paper *On Digit-Recurrence Division Implementations for Field Programmable
Gate Arrays* keep the clock period short and independent of precision:

1. **Quotient digit prediction.** The digit for the next step, q<sub>j+2</sub>,
   is selected in the same clock that forms the residual w[j+1]. So the digit
   that drives every residual bit comes straight from a register. Its wide
   fanout is never followed by more logic in the same cycle.
2. **Bit reduction in the top of the residual.** Only five bits are stored
   above weight 1/16, and they are partly assimilated. The bit of weight 2 is
   not stored at all, because it can be worked out from the stored digit. The
   next-state logic and the digit selection then fit in two levels of small
   lookup tables.
3. **Linear sequential array (LSA).** Below a chosen bit position, the residual
   is built from 4-bit modules. Each module runs one iteration behind the module
   above it. The digit is passed down the chain through one register per
   module, so adding precision does not make any fanout wider.

The RTL itself does not depend on any FPGA family. The lookup-table mapping
the paper derives for the Xilinx XC4010 is left to synthesis. This design
keeps the logic functions and the register placement of that mapping.

## Arithmetic

The divider computes q ≈ x/d with

    w[0] = x,   w[j+1] = 2·w[j] − q_{j+1}·d,   q_{j+1} ∈ {−1, 0, +1}
    q = Σ_{i=1..ITER} q_i·2^{−i}

The operand ranges are 1/2 ≤ d < 1 and |x| < d. After ITER steps,
|x/d − q| ≤ 2<sup>−ITER</sup>. Digits are selected from an estimate y of
2w[j]. The estimate keeps one fraction bit and satisfies y ≤ 2w[j] < y + 1:

| estimate y        | digit |
|-------------------|-------|
| 0 … 3/2           | +1    |
| −1/2              | 0     |
| −5/2 … −1         | −1    |

A digit is carried as a sign bit and a magnitude bit (`srt_pkg::qdigit_t`).
The subtraction of q·d is done by adding bits D<sub>i</sub>:

- D<sub>i</sub> = d<sub>i</sub> for q = −1
- D<sub>i</sub> = ~d<sub>i</sub> for q = +1
- D<sub>i</sub> = 0 for q = 0

For q = +1, the unit in the last place that completes the two's complement
enters as a carry at the least significant residual position.

Bit positions are numbered as fractions. Position p has weight 2<sup>−p</sup>.
Many internal vectors are indexed by position (`v[p]`), so the most significant
bit has the *lowest* index.

## Residual layout

At step j, the shifted residual 2w[j] is held in three parts:

    position:   0 . 1   2   3 | 4 … L−1 | L … N
    top slice:  w0. w1  s2  s3|         |
                    c1        |         |
    conventional carry-save:  | s, c    |
    LSA modules (lagging):    |         | s, c, D (per module)

### Top slice (`srt_msb_slice`)

This combinational block holds the hardest part of the design. For each
step it computes the following.

**Level 1**, from the stored bits, the digit q<sub>j+1</sub> and divisor bits
d<sub>2</sub>…d<sub>5</sub>:

- m1 = w1 ⊕ c1 ⊕ D1
- k1 k2 k3 = s2 s3 + D2 D3, a 2-bit add with carry-out k1
- 2·p3 + p4 = s4 + c4 + D4
- u4 = carry(s5, c5, D5)
- a 2-bit code F1F2 for the top bits h of c1/2 + (y − q·d), truncated at
  weight 1/2

**Level 2**:

- w0'' = m1 ⊕ k1 and w1'' = k2
- c1'' s2'' s3'' = 2·k3 + u4 + 2·p3 + p4. This value is at most 6, so the
  carry part stays below 1.
- q<sub>j+2</sub> = f(F1, F2, k1, k2):

| F1F2 | h            | q<sub>j+2</sub>                        |
|------|--------------|----------------------------------------|
| 00   | 0 or 1/2     | +1                                      |
| 01   | −1/2         | +1 if k1; 0 if ¬k1∧k2; else −1          |
| 10   | −1           | 0 if k1∧k2; else −1                     |
| 11   | −2 or −3/2   | −1                                      |

**Why the weight-2 bit can be dropped.** The stored w0.w1 equal the previous
estimate y modulo 2. The stored digit says which window y was in: [0, 3/2],
{−1/2} or [−5/2, −1]. Each window is narrower than 2, so y is fully known.
The slice rebuilds the missing bit before it forms h. h = 1 and h = 3/2 would
need |w| > d, so they never occur.

### Conventional carry-save bits (`srt_conv_residual`)

Positions 4 to L−1 use one full adder per position. Every adder gets the same
broadcast digit. The sum bit goes to position p−1 and the carry to position
p−2 of the next residual. Position 4 and the carry out of position 5 belong
to the top slice.

The register ends at s<sub>L−1</sub> and c<sub>L−2</sub>. The three bits
s<sub>L</sub>, c<sub>L−1</sub> and c<sub>L</sub> come in on the *seam* inputs.
If an LSA is attached, they come from it. If none is attached (L = N), they are
0, 0 and the +1 completion bit.

## Linear sequential array

`srt_lsa_module` covers positions B+1 … B+4 below a seam at B. When it holds
step j, it stores:

- s<sub>B+1</sub>, s<sub>B+2</sub>, s<sub>B+3</sub>
- c<sub>B+1</sub>, c<sub>B+2</sub>
- D<sub>B+1</sub>, D<sub>B+2</sub> (already formed from its digit)
- the digit q<sub>j+1</sub>

It works in two logic levels per clock.

- **Level 1** gives the module above the bits it needs for step j+1:
  s<sub>B</sub>, c<sub>B−1</sub> and c<sub>B</sub>. They come from the
  module's own positions B+1 and B+2. In parallel, the module forms
  D<sub>B+3</sub> and D<sub>B+4</sub> from its stored digit.
- **Level 2** computes its own step j+1. It uses s<sub>B+4</sub>,
  c<sub>B+3</sub> and c<sub>B+4</sub> of step j, which come from level 1 of the
  module below. It also latches D<sub>B+1</sub> and D<sub>B+2</sub> for step
  j+1 from the digit that arrives from above.

Positions s<sub>B+4</sub>, c<sub>B+3</sub> and c<sub>B+4</sub> are never
stored. They are recomputed every clock from the module below, which is one
step behind. This is what makes the one-step lag per module consistent.

`srt_lsa_array` chains K modules under the seam L, so N = L + 4K. Module k
runs k+1 steps behind the conventional part.

**Start-up.** On load, module k receives the residual of step −(k+1):
2x·2<sup>−(k+1)</sup>, with zero carries and a zero digit. The lowest module
also needs the dividend bits that this scaling pushed below position N. A
K-bit shift register feeds them in as s<sub>N</sub> during the first K clocks.

The quotient digits depend only on the top slice. The LSA delivers exactly the
bits a broadcast carry-save residual would, just later. So an LSA
configuration gives bit-for-bit the same quotient as the same width without
it. The configuration testbench checks this.

## The divider (`srt_divider`) and its interface

| port       | dir | width  | meaning |
|------------|-----|--------|---------|
| `clk`      | in  | 1      | clock |
| `rst_n`    | in  | 1      | asynchronous active-low reset |
| `start`    | in  | 1      | start a division; taken only while `busy` is low |
| `dividend` | in  | N+1    | signed, x = dividend·2<sup>−N</sup>, \|x\| < d |
| `divisor`  | in  | N      | d = divisor·2<sup>−N</sup>, top bit must be 1 |
| `busy`     | out | 1      | iterations in progress |
| `done`     | out | 1      | one-clock pulse: `quotient` is valid |
| `quotient` | out | ITER+2 | q·2<sup>ITER</sup>, two's complement, held until the next start |

**Timing.** The operands are sampled in the clock where `start` is accepted.
That same clock selects the first digit from 2x, truncated to one fraction
bit. After that, one digit is produced per clock. `done` rises ITER clocks
after the start clock. A new `start` can be given in the cycle where `done`
is high. A `start` while `busy` is high is ignored. Assertions check that the
divisor is normalised and that |x| < d.

**Quotient.** `srt_quotient_acc` shifts positive and negative digits into two
registers and subtracts them at the output.

| parameter     | default | meaning |
|---------------|---------|---------|
| `N`           | 32      | operand and residual precision |
| `LSA_MODULES` | 3       | 4-bit LSA modules; the seam is at L = N − 4·LSA_MODULES (must be ≥ 8) |
| `ITER`        | N       | quotient digits per division |

The default is the extended configuration: a 20-bit conventional design plus
three LSA modules, 32 bits in total. The single-precision configuration, for
a 24-bit mantissa scaled into [1/2, 1), is `N = 24, LSA_MODULES = 0`.

## Where this departs from, or adds to, the paper

The paper gives these parts, and the RTL follows them:

- the recurrence and the selection function;
- the register placement and equations of the top slice, and its F1F2 coding;
- the register placement and two-level split of the LSA, with its per-module
  digit register;
- the 20 → 32-bit extension.

This design adds or chooses the following:

- the start/busy/done interface, the operand formats, reset, and ITER = N;
- acceptance of negative dividends (the recurrence allows |x| < d);
- the selection of the first digit;
- the LSA start-up (pre-scaled load and low-bit feed);
- the digit-to-binary conversion;
- which LSA module forms D<sub>B+3</sub> and D<sub>B+4</sub>.

Not included:

- a remainder output, final rounding, or exponent and sign handling for
  floating point;
- the XC4010 lookup-table mapping. Cycle times and logic-block counts are
  device results that simulation cannot show.

## Verification

Every testbench checks itself and ends with a line
`TB_RESULT checks=<n> failures=<m>`.

| testbench | what it checks |
|-----------|----------------|
| `tb_srt_msb_slice` | Every legal top-slice state, digit and d<sub>2..5</sub> pattern. Checks value conservation, the digit against the selection rule, and the carry-part bound. |
| `tb_srt_conv_residual` | Value conservation of each carry-save step under random digits and seam bits, and which bits go to the top slice. |
| `tb_srt_lsa_module` | Value conservation of one module, the stored D terms, and the digit pipeline. |
| `tb_srt_lsa_array` | Seam bits of the lagging array against a plain broadcast carry-save model, step by step. |
| `tb_srt_quotient_acc` | Digit strings against an integer sum. |
| `tb_srt_divider` | Default size: about 300 random and corner-case divisions against the exact bound \|X·2<sup>ITER</sup> − Q·D\| ≤ D, plus latency. Counts each digit value, each F1F2 code, the completion bit, the LSA start-up feed, negative dividends, an ignored start and a back-to-back start, and fails if any never occurs. |
| `tb_srt_divider_configs` | The 24-bit, 20-bit, 32-bit-with-LSA and 32-bit-without-LSA configurations on the same operands. Checks the bound and latency of each, and that the LSA and non-LSA quotients are identical. |

To run one with Verilator 5:

    verilator --binary --timing --assert -Irtl rtl/srt_pkg.sv \
        rtl/srt_msb_slice.sv rtl/srt_conv_residual.sv rtl/srt_lsa_module.sv \
        rtl/srt_lsa_array.sv rtl/srt_quotient_acc.sv rtl/srt_divider.sv \
        tb/tb_srt_divider.sv --top-module tb_srt_divider -Mdir obj
    ./obj/Vtb_srt_divider

## Files

- `rtl/srt_pkg.sv`: digit type, D<sub>i</sub> and full-adder helpers,
  selection function
- `rtl/srt_msb_slice.sv`: bit-reduced top slice and digit prediction
- `rtl/srt_conv_residual.sv`: conventional carry-save positions 4…L−1
- `rtl/srt_lsa_module.sv`: one LSA module
- `rtl/srt_lsa_array.sv`: the chain of LSA modules and its start-up feed
- `rtl/srt_quotient_acc.sv`: signed-digit quotient to two's complement
- `rtl/srt_divider.sv`: top level (control, operand register, wiring)
- `tb/`: the testbenches listed above
