# CORDIC sine/cosine accelerator for a RISC-V core

A software-defined radio running on a general-purpose RISC-V core spends much of its
time on sine and cosine: modulation, demodulation and frequency conversion all need
them. This design takes that work off the core. The core issues one custom
instruction carrying an angle in degrees and gets back the sine or the cosine two clock
cycles later. The unit is a CORDIC rotator whose eight rounds are fully unrolled into
one combinational path. That path is built only from identical one-bit add/subtract
cells, and every shift in the algorithm is plain wiring. The accelerator sits beside
the core's register file, FPU, TLB and 16 kB L1 caches. It talks to the core over a
RoCC-style command/response port (RoCC is the Rocket core's coprocessor interface).
The core and the caches are not part of this RTL.

## How the core uses it

The instruction is a 32-bit word in the custom-2 opcode space:

| bits  | 31:20     | 19:15 | 14:12  | 11:7 | 6:0               |
|-------|-----------|-------|--------|------|-------------------|
| field | imm[11:0] | rs1   | funct3 | rd   | opcode            |
| value | 0         | angle | 0 = cos, 1 = sin | result | custom-2 (`1011011`) |

Register rs1 holds the angle in degrees as a 64-bit two's-complement fixed-point
number with 32 integer and 32 fraction bits (Q32.32): 30° is `0x0000_001E_0000_0000`.
The result comes back in the same Q32.32 format, sign-extended, in register rd. Any
funct3 value other than 1 gives the cosine.

Valid angles are those inside the CORDIC convergence range, roughly −99.88° to +99.88°.
That covers the 0–90° range the unit is meant for, plus negative angles. Larger angles
are not folded into this range and give wrong results. Only the low 40 bits of rs1 are
read.

## The CORDIC array (`cordic_systolic`, `cordic_round`)

Rotation-mode CORDIC turns the vector (K, 0) by the requested angle θ in steps of
±αᵢ, where αᵢ = atan(2⁻ⁱ). Round i does:

    d  = +1 if z ≥ 0, else −1
    x' = x − d·(y >>> i)
    y' = y + d·(x >>> i)
    z' = z − d·αᵢ            (αᵢ in degrees)

The array starts from x = K, y = 0, z = θ. After n rounds, x ≈ cos θ and y ≈ sin θ.
K = ∏ cos αᵢ over the n rounds is the gain that the unscaled rotations would otherwise
add. Starting x at K removes the need for any multiplier. For 8 rounds
K = 0.6072591 (`0x9B75554C` in Q.32).

Each round is three add/subtract rows: one each for x, y and z. Each row picks addition
or subtraction from the sign of z. `cordic_round` has no registers, so
`cordic_systolic` is one long combinational path of 8 rounds. Each round is three
ripple-carry chains in parallel, plus the sign of z that selects between them. This
path sets the clock rate. An iterative or pipelined CORDIC would clock faster but would
take eight cycles per result instead of one.

The constants come from two tables in `cordic_pkg`. Both are rounded to 32 fraction bits
and cover up to 16 rounds:

- `atan_deg(i)` = round(atan(2⁻ⁱ)·180/π·2³²)
- `k_gain(n)` = round(∏ᵢ₌₀ⁿ⁻¹ cos(atan(2⁻ⁱ))·2³²)

### Word widths

The two datapaths keep only the integer bits they need:

| path | integer bits | fraction bits | width | why |
|------|--------------|---------------|-------|-----|
| x, y (`XY_INT`) | 3 (sign included) | 32 | 35 | \|x\|, \|y\| stay below 1.7 |
| z (`Z_INT`) | 8 (sign included) | 32 | 40 | the angle is in degrees, up to ±127 |

The other 29 integer bits of the 64-bit x/y word are constant, so they carry no cells.
The z path has to keep more integer bits than x and y because its value is in degrees.

### Accuracy

Each round rotates by a fixed step, so after n rounds the angle can still be off by up
to αₙ₋₁ (0.45° for n = 8). Close to 0°, where the sine is small, this means large
*relative* errors. The largest relative sine error over 1°, 2°, …, 90° is:

| rounds | 4 | 6 | 8 | 10 |
|---|---|---|---|---|
| max relative sine error | 3.73 | 1.64 | 0.30 | 0.040 |

The testbench checks a tighter limit on the absolute error. For 8 rounds that limit is
1.5·atan(2⁻⁷) ≈ 0.012 for every angle in the supported range. `ROUNDS` is a parameter
(1–16) if more accuracy is needed. Each extra round adds 110 PE cells (35 + 35 + 40)
and makes the combinational path longer.

## The processing element (`cordic_pe`, `cordic_addsub`)

All arithmetic is done by one cell. Its inputs are X, Y, a carry C and an operation
select S; its outputs are Result and Carry:

    Y'     = Y ^ S
    Result = X ^ Y' ^ C
    Carry  = (X & Y') | (C & (X ^ Y'))

With S = 0 the cell is a full adder. With S = 1 it inverts Y. `cordic_addsub` chains W
cells into a ripple adder and feeds S into the carry of bit 0, so a row computes
x + y or x − y. Rows wrap modulo 2^W. No overflow can occur for angles in the
supported range.

## The RoCC port and timing (`cordic_rocc_accel`, top level)

Both channels use valid/ready handshakes: a transfer happens in a cycle where both are
high. The command and response are structs from `cordic_pkg`:

- `rocc_cmd_t`: the instruction word, the rs1 value and the rs2 value (rs2 is unused).
- `rocc_resp_t`: rd and the 64-bit data.

Timing:

- **cycle t:** the command is accepted and the array computes the result combinationally.
- **edge after t:** the result and rd are stored in the response register.
- **cycle t+1:** `resp_valid` is high.

A second command can be accepted in cycle t+1 while the first response leaves, so the
unit sustains one result per cycle. A burst of N instructions completes N + 1 cycles
after the first one issues. If the core holds `resp_ready` low, the response stays
unchanged and `cmd_ready` drops until the response is taken. `busy` is high while a
response is pending.

Reset (`rst_n`) is active low and synchronous; it only clears the response register.
Two assertions check the protocol:

- every accepted command carries the custom-2 opcode;
- a stalled response does not change.

The design also has no memory port, no interrupt and no status inputs.

## Where this design makes its own choices

The add/subtract behaviour, the start values (K, 0, θ), the 8 rounds, the single-cycle
array, the instruction format and the two-cycle answer follow the CORDIC accelerator
this RTL implements. These points are this design's own:

- **Carry of the processing element.** The cell is defined by its add/subtract
  behaviour. Its carry is therefore the standard full-adder carry: a carry formed as an
  AND of all three inputs would not propagate through a row.
- **Gain K.** Computed as the exact product for the chosen number of rounds. The value
  sometimes quoted for 8 rounds, 0.607261, is about 2·10⁻⁶ higher. Using the product
  keeps 4, 6 and 10 rounds consistent too.
- **Angle width.** Only 3 integer bits are kept for x and y. The angle path keeps 8
  because the angle is in degrees.
- **Choices not taken from elsewhere:**
  - z = 0 counts as positive;
  - rows are ripple-carry chains;
  - the response register is one entry deep, with its ready rule;
  - reset behaviour;
  - the `busy` output;
  - any funct3 other than 1 gives the cosine;
  - no range reduction beyond ±99.88°.

## Files

| file | contents |
|------|----------|
| `rtl/cordic_pkg.sv` | widths, instruction and RoCC structs, function codes, atan and gain tables |
| `rtl/cordic_pe.sv` | one-bit add/subtract processing element |
| `rtl/cordic_addsub.sv` | W-bit ripple row of PEs |
| `rtl/cordic_round.sv` | one CORDIC round: three rows plus shift wiring |
| `rtl/cordic_systolic.sv` | all rounds unrolled, function select |
| `rtl/cordic_rocc_accel.sv` | top: instruction decode, response register, handshake |
| `tb/cordic_ref_pkg.sv` | behavioural CORDIC reference; constants derived from `$atan`/`$cos` |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and ends with `$finish`. To run
one, for example the end-to-end test of the top level at its default parameters:

    verilator --binary --timing --assert --top-module tb_cordic_rocc_accel \
        rtl/cordic_pkg.sv tb/cordic_ref_pkg.sv rtl/cordic_pe.sv rtl/cordic_addsub.sv \
        rtl/cordic_round.sv rtl/cordic_systolic.sv rtl/cordic_rocc_accel.sv \
        tb/tb_cordic_rocc_accel.sv
    ./obj_dir/Vtb_cordic_rocc_accel

What each testbench covers:

- **`tb_cordic_pe`:** every input combination of the cell.
- **`tb_cordic_addsub`:** random and corner-case 40-bit sums and differences.
- **`tb_cordic_round`:** rounds 0, 3 and 7 against the reference, in both rotation
  directions.
- **`tb_cordic_systolic`:**
  - builds arrays of 4, 6, 8 and 10 rounds;
  - sweeps 0–90° in 1° steps, plus random angles within ±99°;
  - requires a bit-exact match with the reference and an error bound against the true
    sine and cosine;
  - prints the relative-error table above.
- **`tb_cordic_rocc_accel`** (the top level, at its default parameters):
  - runs the 0–90° sweep back to back;
  - sends random traffic with back-pressure;
  - times bursts of 1–44 sine instructions (N + 1 cycles each);
  - resets the unit with a response pending;
  - checks the one-cycle response latency and that a stalled response stays unchanged;
  - requires each of these events to occur at least once: sine, cosine, stall,
    back-to-back issue, negative angle, reset with a response pending.

All testbenches finish in well under a second.
