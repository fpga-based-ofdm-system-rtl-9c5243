# 8-point OFDM link with a multiplier-saving FFT

This is a complete baseband OFDM transmitter and receiver in synthesizable
SystemVerilog. It is small: 8 subcarriers, each carrying one 16-QAM symbol
(4 bits), so one OFDM symbol carries 32 data bits. The main idea sits in the
8-point IFFT/FFT. Its twiddle factors are fixed-point numbers scaled by 256.
Of the twelve twiddle positions in the radix-2 butterfly network, only two
(W^1 and W^3) need real multipliers: two multipliers each, **four in total**.
The other positions are 1 or ±j, which cost nothing but wiring, a swap and a
negation.

```
 data bits ─► s2p(32) ─► 8 × qam16_mod ─► fft8 (inverse) ─► p2s(256) ─► chan_tx_*
                                                                           │
                                                        (antennas / RF / channel,
                                                          not part of this RTL)
                                                                           │
 data bits ◄─ p2s(32) ◄─ 8 × qam16_demod ◄─ fft8 (forward) ◄─ s2p(256) ◄─ chan_rx_*
```

`ofdm_top` holds the transmitter (`ofdm_tx`) and the receiver (`ofdm_rx`)
side by side. The analog parts between them are not logic, so the
transmitter's serial output and the receiver's serial input are brought out
as ports. Connect `chan_tx_*` to `chan_rx_*` and you get an ideal channel: the
bits that come out equal the bits that went in.

## The transform (`fft8`, `twiddle_mul`, `butterfly`)

`fft8` is a radix-2 decimation-in-time FFT with three stages. The inputs
x(0)..x(7) enter the butterflies in bit-reversed order
(x0 x4 x2 x6 x1 x5 x3 x7). The outputs X(0)..X(7) leave in natural order.

| stage | twiddles before the butterflies | cost |
|-------|----------------------------------|------|
| I     | W^0 on all four pairs            | add/sub only |
| II    | W^0, W^2 in each half            | W^2 = ∓j: swap re/im, negate one |
| III   | W^0, W^1, W^2, W^3               | W^1, W^3: 2 multiplications by 181 each |

`INVERSE = 1` makes the IFFT and `INVERSE = 0` the FFT. They differ only in
the sign of the imaginary part of each twiddle.

**Scaling.** The twiddles are scaled by 256, so 0.7071 becomes 181. The W^0
and W^2 branches are shifted left by 8 to match. Neither direction divides
by N. Every output is therefore exactly

    X(k) = Σ_n x(n) · T[(n·k) mod 8],   T[m] = round(256 · e^(∓j2πm/8))

with no rounding anywhere, because the only inexact constant (181) enters
linearly. For the inverse, this reproduces a published reference vector
exactly. The input is (3+3j, 1−3j, 3−3j, 3+1j, 1−3j, −1−1j, −3−1j, 3+1j).
The expected output is (2560−1536j, 1748+3072j, 2560−512j, 0+724j,
−512−512j, 300+3072j, −512+2560j, 0−724j). `tb_fft8` checks it.

**Twiddle arithmetic** (`twiddle_mul`). For an input a + jb the multiplier
forms pa = 181a and pb = 181b, then adds or subtracts them:

| factor (forward)    | real      | imaginary  |
|---------------------|-----------|------------|
| W^1 = (1−j)/√2      | pa + pb   | pb − pa    |
| W^3 = (−1−j)/√2     | pb − pa   | −(pa + pb) |

The inverse uses the conjugates: W^-1 gives (pa − pb, pa + pb) and W^-3 gives
(−(pa + pb), pa − pb).

**Bit growth.** Each stage keeps every bit:

- stage I adds 1 bit;
- stage II adds 1 bit;
- the stage III twiddles add 9 bits (a factor of up to 362 = 181 + 181);
- the stage III butterflies add 1 bit.

So `OUT_W = IN_W + 12`. One detail keeps stage II at one bit of growth. The
value rotated by ±j there is always a stage I difference, and a difference
can never reach the most negative code. Negating it therefore never
overflows.

**Timing.** Each stage ends in a register. The latency is 3 cycles, and one
8-point vector is accepted per cycle. `in_valid/in_ready` and
`out_valid/out_ready` use a valid/ready handshake. The whole pipeline holds
while its last stage is full and `out_ready` is low.

## 16-QAM mapping (`qam16_mod`, `qam16_demod`)

The mapper converts the 4 data bits to gray code. The upper two gray bits
choose the imaginary (Q) level and the lower two choose the real (I) level:

| gray bits | 00 | 01 | 11 | 10 |
|-----------|----|----|----|----|
| level     | −3 | −1 | +1 | +3 |

For example, data 1100 → gray 1010 → I = +3, Q = +3. Levels are 4-bit two's
complement, so the transmitter IFFT has `IN_W = 4` and produces 16-bit
samples.

The demapper undoes this. It has to know the gain of the whole link. Both
transforms multiply by 256 (the twiddle scale) and the FFT also by 8 (no 1/N),
so a level L arrives at the receiver as L · 2^19. Each axis is sliced against
0 and ±2·2^19, mapped back to its gray bits, and converted back to binary.
Noise smaller than 2^19 per axis cannot change a decision. In practice that
means errors in the low bits of the channel samples.

## Serial converters and frame format (`s2p`, `p2s`)

`s2p` shifts bits into a temporary register from the top and counts them.
After N bits the word goes to an output register, with the first bit received
in bit 0. `p2s` loads a word into a shift register and sends bit 0 each cycle,
shifting right, so the word leaves LSB first. The two are inverses, so bit
order survives a round trip.

| instance             | N   | contents |
|----------------------|-----|----------|
| transmitter `s2p`    | 32  | subcarrier k = bits 4k..4k+3 |
| transmitter `p2s`    | 256 | sample k: real part in bits 32k..32k+15, imaginary part in 32k+16..32k+31 |
| receiver `s2p`       | 256 | same layout as above |
| receiver `p2s`       | 32  | same as the transmitter input |

**Flow control.** Collecting a symbol takes 32 input bits, but sending it
takes 256 channel bits. The transmitter therefore stalls its input:
`data_in_ready` drops while the output register of `s2p` is still full.
While the output register waits, `s2p` keeps filling its temporary register
and refuses only the bit that would complete the next word. `p2s` loads the
next word in the same cycle the last bit of the current one leaves, so frames
follow each other without a gap. The steady-state rate is one OFDM symbol per
256 cycles: 256 channel bits and 32 data bits.

## Ports of `ofdm_top`

Every port is one bit with a valid/ready handshake. A transfer takes place in
a cycle where both valid and ready are high.

| group          | direction of bits | meaning |
|----------------|-------------------|---------|
| `data_in_*`    | in                | data bits into the transmitter |
| `chan_tx_*`    | out               | serial OFDM samples towards the RF front end |
| `chan_rx_*`    | in                | serial OFDM samples from the RF front end |
| `data_out_*`   | out               | recovered data bits |

`clk` is the single clock. `rst` is a synchronous reset, active high, and
clears all state.

## Files

- `rtl/ofdm_pkg.sv`: shared constants (8 points, 4 bits per symbol, twiddle
  scale 256 and 181, sample widths) and the gray-code and level functions.
- `rtl/butterfly.sv`, `rtl/twiddle_mul.sv`, `rtl/fft8.sv`: the transform.
- `rtl/qam16_mod.sv`, `rtl/qam16_demod.sv`: mapper and demapper.
- `rtl/s2p.sv`, `rtl/p2s.sv`: serial converters.
- `rtl/ofdm_tx.sv`, `rtl/ofdm_rx.sv`, `rtl/ofdm_top.sv`: the chains and the top.
- `tb/tb_<module>.sv`: one self-checking testbench per module.
  `tb/ofdm_ref_pkg.sv` holds the reference model (QAM table, direct inverse
  DFT, frame layout) that the chain-level testbenches compare against.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. Each
one also has a watchdog. For example, with Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb \
    rtl/ofdm_pkg.sv tb/ofdm_ref_pkg.sv tb/tb_ofdm_top.sv --top-module tb_ofdm_top
./obj_dir/Vtb_ofdm_top
```

Replace the testbench name to run another one. Only the chain-level
testbenches (`tb_ofdm_tx`, `tb_ofdm_rx`, `tb_ofdm_top`) need
`tb/ofdm_ref_pkg.sv`.

What the testbenches establish:

- **`tb_ofdm_top`** runs the top at its default sizes.
  - At full rate it checks the rate: exactly 20 × 256 channel bits and
    20 × 32 data bits in 20 × 256 cycles.
  - It then adds random input gaps, channel gaps, output back-pressure and
    noise on the 3 low bits of the channel samples, and checks every output
    bit.
  - It counts each mechanism and fails if one never happens: input stall,
    IFFT and FFT pipeline holds, back-to-back frames, channel gaps, corrected
    noise, output back-pressure, and all 16 constellation points.
- **`tb_fft8`** checks:
  - the reference vector above;
  - the 3-cycle latency;
  - random streams in both directions, with random valid and ready, against
    the direct DFT formula.
- **`tb_twiddle_mul`** checks all eight twiddle variants exhaustively over
  6-bit inputs.
- **`tb_qam16_mod`** and **`tb_qam16_demod`** check:
  - all 16 points of each;
  - the thresholds of the demapper;
  - decisions under random noise.
- **`tb_s2p`** and **`tb_p2s`** check:
  - bit order;
  - latency and period at full rate;
  - behaviour under random back-pressure.

## Where this design makes its own choices

The block chain and the 16-QAM mapping come from the original description.
So do the 32-bit and 256-bit converter widths, the 16-bit IFFT samples, the
scale-256 twiddles with 181 for 0.707, and the three-stage butterfly network.
The following are this design's own choices:

- **Handshake and reset.** The valid/ready handshake on every block and the
  synchronous reset are added here. The original only says that the
  converters work "after n clock cycles".
- **Pipeline registers.** The FFT has a register after each stage. This gives
  the 3-cycle latency.
- **Bit order and frame layout.** Both are defined here, in the table above.
- **Receiver.** The original names the receiver blocks but gives no detail.
  The receiver reuses `fft8` in forward mode with 16-bit inputs (28-bit
  outputs). The demapper is a nearest-level slicer that uses the known link
  gain of 2^19.
- **Twiddle placement.** One passage of the original places only W^2 in the
  third stage. Its butterfly diagram puts W^0..W^3 there, and that diagram is
  followed. The two orderings give identical results.
- **Adder count.** The original counts 7 adders for the two multiplied
  twiddles. This design uses one adder and one subtractor per twiddle, plus a
  negation for W^3. The multiplier count (4) is the same.
- **Temporary register width.** The `s2p` temporary register holds N−1 bits
  rather than N+1. The last bit goes straight into the output word.

## Limits

- **Transform size.** It is fixed at 8 points. The twiddle placement and the
  bit-growth analysis are specific to 8 points.
- **Scaling.** There is no 1/N scaling and no rounding. Widths grow by 12 bits
  per transform: 4 → 16 in the transmitter, 16 → 28 in the receiver.
- **What is not built.** There is no cyclic prefix, no synchronisation, no
  channel estimation or equalisation, and no RF. The receiver expects the
  transmitter's sample stream bit-exactly framed, apart from small additive
  noise.
