# A ten-stage binary64 gravitational force pipeline

Direct N-body simulation spends nearly all of its time on one small formula:
the force body *j* exerts on body *i*. This design computes it in hardware as a
fully pipelined datapath. The arithmetic is IEEE 754 double precision, the
pipeline is ten clocks deep, and it accepts a new pair of bodies on every
clock. The inverse square root is not computed by a divider or a square-root
unit. It uses the "fast inverse square root": an integer trick gives a first
guess, and one Newton–Raphson step refines it. Around the pipeline sits a small
FPGA test harness. A host sends the positions of two bodies over a UART, and
the two force components come back the same way.

The target is an Intel/Altera MAX 10 (DE10-Lite board) clocked at 50 MHz. The
RTL is plain synthesizable SystemVerilog with no vendor primitives.

## What is computed

For bodies *i* at (x_i, y_i) and *j* at (x_j, y_j), in two dimensions:

    dx = x_j - x_i          dy = y_j - y_i
    r  = dx^2 + dy^2        (the squared distance)
    fx = dx / sqrt(r^3)     fy = dy / sqrt(r^3)

`sqrt(r^3)` is |r_ij|^3, so (fx, fy) is the Newtonian force on *i* with the
factor G·m_i·m_j set to 1. The pipeline only takes positions, so a caller must
multiply by G·m_i·m_j itself. The total force on body *i* is the sum of these
pair forces over all *j*. That sum is also done outside the design.

## Pipeline structure

`force_pipeline` chains three sections. Each stage holds its own floating-point
units and an output register. Nothing is shared between stages, so there are no
structural hazards and no stall logic.

| section | stage | operation | units |
|---|---|---|---|
| `r3_unit` | 1 | dx = x_j − x_i, dy = y_j − y_i | 2 adders |
| | 2 | dx², dy² | 2 multipliers |
| | 3 | r = dx² + dy² | 1 adder |
| | 4 | r² = r·r | 1 multiplier |
| | 5 | r³ = r²·r | 1 multiplier |
| `inv_sqrt_unit` | 6 | y0 = MAGIC − (r³ >> 1) (integer); x2 = 0.5·r³ | integer subtractor, 1 multiplier |
| | 7 | p = y0·y0, q = x2·y0, h = 1.5·y0 | 3 multipliers |
| | 8 | s = p·q | 1 multiplier |
| | 9 | y = h − s ≈ 1/sqrt(r³) | 1 adder |
| `force_stage` | 10 | fx = y·dx, fy = y·dy | 2 multipliers |

The split into 5 + 4 + 1 stages and the total of ten are fixed by the
architecture. Which operation sits in which stage is this implementation's
choice. dx and dy are needed again in stage 10, so they travel beside the data
through shift registers inside `r3_unit` and `inv_sqrt_unit`.

`en_in` is a valid bit. It moves down a matching shift register and comes out
as `en_out` exactly ten clocks later, next to its `fx`/`fy`. Reset is
synchronous and active low. It clears only the valid bits, and data registers
keep whatever they hold.

The design has eleven double-precision multipliers. On a MAX 10, a 53×53
significand product takes nine 18×18 blocks, which is eighteen 9-bit elements.
Eleven multipliers therefore need 198 of the 288 elements on the 10M50. The
reference build of this engine reported exactly that number.

## The fast inverse square root, stage by stage

A binary64 bit pattern, read as an integer, is roughly a scaled and offset
log2 of the value. Shifting it right by one halves the log. Subtracting that
from a magic constant negates it and restores the offset:

    y0 = 0x5FE6EB50C7B537A9 - (bits(r3) >> 1)     (64-bit integer arithmetic)

This first guess is within a few percent of 1/sqrt(r3). One Newton–Raphson
step for f(y) = 1/y² − x then gives

    y = y0 · (1.5 − 0.5·x·y0²)

Written literally, that step is a chain of four dependent multiplies and one
subtract, which does not fit in four one-operation stages. The design expands
it to

    y = 1.5·y0 − (y0·y0)·(0.5·x·y0)

The three products 1.5·y0, y0·y0 and x2·y0 do not depend on each other. Stage 7
computes all three at once. Stage 8 multiplies two of them, and stage 9
subtracts. The expansion is exact algebra. After rounding it can differ from the
literal order in the last bit or so, which is far below the error of the method
itself.

Accuracy is set by the single Newton step. For every positive normal input the
relative error of 1/sqrt(x) stays below 0.18 %. The testbenches measure a worst
case of 1.75·10⁻³. The forces carry the same relative error: the 3-4-5 triangle
gives (0.0239593, 0.0319458) where the exact answer is (0.024, 0.032). The
binary64 format keeps the rest of the calculation exact to the last bit, but it
cannot recover the accuracy lost to the approximation. If better accuracy is
needed, a second Newton step (two more stages) is the natural extension.

Two inputs need care:

- **r³ = 0** (the two bodies coincide). The guess is a large finite number,
  and the force is that number times dx = 0, which is 0.
- **Very large or very small distances.** r³ is the sixth power of the
  distance, so it overflows binary64 once the distance passes about 10⁵¹. It
  underflows to zero (no subnormals, see below) once the distance falls below
  about 10⁻⁵¹. Coordinates should be scaled well inside that range.

## Floating-point units

`fp_add` and `fp_mul` are combinational and parameterised in `EXP_W` and
`MAN_W`, with binary64 (11, 52) as the default. Both round to nearest with ties
to even. For normal operands and results they match IEEE 754 bit for bit, and
the testbenches compare them against the simulator's own `real` arithmetic.
They simplify the standard in these ways:

- Subnormal inputs are treated as zero, and results below the normal range
  are flushed to a signed zero.
- Overflow gives infinity. Infinities propagate. Invalid operations and NaN
  inputs give the quiet NaN 0x7FF8000000000000.

The adder is the textbook single-path design:

1. Swap the operands by magnitude.
2. Align the smaller one with guard, round and sticky bits.
3. Add, or subtract when the signs differ.
4. Normalise with a leading-zero count.
5. Round.

The multiplier forms the full 106-bit significand product, normalises by at
most one place and rounds.

To build a narrower format, set `EXP_W`/`MAN_W` on `force_pipeline`. Also give a
`MAGIC` constant for that format, because the default is the binary64 one. For
binary32 the well-known value is 0x5F3759DF.

## Test harness: serial link to a host

`nbody_top` is the FPGA top:

    GPIO(0) ──► uart_in ──EN──► force_pipeline ──EN──► uart_out ──► GPIO(1)
    KEY(1)  ──► reset            clk_50: 50 MHz board oscillator

| pin | direction | use |
|---|---|---|
| `clk_50` | in | 50 MHz |
| `key1_n` | in | push button KEY(1), low when pressed; reset |
| `gpio0_rx` | in | serial data from the host (e.g. through a USB-serial adapter) |
| `gpio1_tx` | out | serial data to the host |

The protocol is this implementation's own choice:

- **Line settings.** 115200 baud, 8 data bits, no parity, 1 stop bit, LSB
  first, idle high.
- **Request.** 32 bytes: `rx_a`, `rx_b`, `ry_a`, `ry_b` as binary64, each least
  significant byte first. That is what a little-endian host gets by writing its
  `double` values as they are. Body *i* is (rx_a, ry_a) and body *j* is
  (rx_b, ry_b).
- **Reply.** 16 bytes: `fx` then `fy`, in the same byte order.
- **Framing.** There are no headers and no checksum. Every 32 received bytes
  form one request. If host and board lose step, pressing KEY(1) discards any
  partial request. A byte with a bad stop bit is dropped.

The board receives a request in 320 bit times (2.8 ms) and sends a reply in
160, so replies never pile up. `uart_out` takes no new result while it is
sending. An assertion (`a_no_overrun`) reports it if a result ever arrives
then. Over this link the pipeline handles one pair every 2.8 ms. The
one-pair-per-clock rate becomes useful only when an on-chip particle controller
feeds the pipeline directly. Such a controller is not part of this design.

The reset button is combined with a two-flip-flop synchroniser. Reset asserts
as soon as the key is pressed and releases two clocks after the key is let go.

## Files

| file | contents |
|---|---|
| `rtl/nbody_pkg.sv` | format widths, fast-inverse-square-root constant, stage counts |
| `rtl/fp_add.sv`, `rtl/fp_mul.sv` | combinational floating-point adder and multiplier |
| `rtl/r3_unit.sv` | stages 1–5 |
| `rtl/inv_sqrt_unit.sv` | stages 6–9 |
| `rtl/force_stage.sv` | stage 10 |
| `rtl/force_pipeline.sv` | the three sections chained |
| `rtl/uart_rx.sv`, `rtl/uart_tx.sv` | 8N1 byte receiver and transmitter |
| `rtl/uart_in.sv`, `rtl/uart_out.sv` | request assembler and reply serialiser |
| `rtl/nbody_top.sv` | board top |
| `tb/nbody_ref_pkg.sv` | reference model using `real`, in the hardware's operation order |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Verification

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself with a
watchdog if it hangs.

- **`tb_fp_add`, `tb_fp_mul`.** 40,000 random operations each, bit-exact
  against `real` arithmetic. They include heavy cancellation, wide alignment
  shifts, exact ties, and the special cases.
- **`tb_r3_unit`, `tb_inv_sqrt_unit`, `tb_force_stage`.** Random streams with
  gaps. Each checks bit-exact results against the reference model, the exact
  latency (5, 4, 1), ordering, and the valid bits clearing on reset.
  `tb_inv_sqrt_unit` also bounds the error against a true square root at 0.2 %.
- **`tb_force_pipeline`.** 2000 pairs on consecutive clocks, then 2000 with
  random gaps. It checks bit-exact results, a 10-clock latency, an unbroken
  2000-result output burst, and a 0.2 % bound on the error against the exact
  force.
- **`tb_uart_in`, `tb_uart_out`.** Run at 16 clocks per bit. They check byte
  and word order, one `en` per 32 bytes, a dropped bad-stop-bit frame, start
  and stop bits, `busy`, and the 160-bit reply length.
- **`tb_nbody_top`.** The whole design at its default parameters (50 MHz,
  115200 baud). A host model sends four pairs, one of them the 3-4-5 triangle,
  and checks every reply bit for bit. It also checks the in-pipeline latency,
  that receiving and sending overlap, and that pressing KEY(1) mid-request
  discards the partial request. The run takes under a second of simulator time.
- **`tb_force_pipeline_fp32`.** Builds the same pipeline in binary32
  (`EXP_W=8`, `MAN_W=23`, `MAGIC=32'h5F3759DF`) and feeds it 3000 pairs on
  consecutive clocks. It checks the 10-clock latency and a 0.21 % error bound
  against the exact force. The worst case measured is 1.75·10⁻³. This test
  shows that the format parameters work.

The design has been simulated only. It has not been placed and routed, and
it has not been run on a board.

### Running a testbench with Verilator

From the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
        rtl/nbody_pkg.sv tb/nbody_ref_pkg.sv tb/tb_nbody_top.sv \
        --top-module tb_nbody_top -Mdir obj_top
    ./obj_top/Vtb_nbody_top

Swap in any other `tb_<module>` the same way. `-y` lets Verilator find the
modules by file name. The packages go first on the command line.

## Departures and open points

- **Mass factor.** The pipeline returns the force for G·m_i·m_j = 1, because
  its only inputs are positions.
- **Number format.** Subnormals are flushed to zero and only round-to-nearest
  is supported.
- **Newton step.** It is regrouped as described above.
- **Serial link.** The line settings, byte order, word order and reset
  synchroniser are all this implementation's choice.
- **Pins.** The top brings out only the four pins the harness needs: clock,
  reset key, RX and TX. Any board indicators are left out.
- **Host side.** There is no on-chip particle memory or controller, and no
  accumulation over *j*. The host does that work.
