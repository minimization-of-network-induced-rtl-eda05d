# Forward error correction for a jitter-free power-electronics link

A master controller that closes a current loop over a serial link to a power
module needs every duty-cycle update to arrive on time. Retransmission after a
bit error would fix the data but delay it by a variable amount. That jitter in
the loop delay can destabilise the controller. This design instead protects
each packet with a forward error correcting (FEC) code. The receiver repairs
what it can and throws away what it cannot. Either way it takes exactly the
same number of clocks, whatever the errors were. The extra delay is therefore
a constant that the control design can allow for.

The RTL contains the complete chain at a 100 MHz clock:

* the master: PI current controller, packet scheduling with a minimum packet
  rate, transmitter, and a fault injector that corrupts the line on purpose;
* the power module: receiver and a 40 kHz complementary PWM generator for a
  synchronous buck converter;
* three codings, selectable at run time: none (baseline), a shortened SECDED
  Hamming (47,40) code, and a Reed–Solomon RS(15,11) code over GF(16);
* a capture RAM that records every received packet and its flags, for
  bit-error-ratio (BER) measurement.

The two ends are joined by an internal loopback wire, the way such a link is
characterised on a single FPGA. Both ends therefore share one clock.

```
 setpoint, ADC ─► PI ─► scheduler ─► scrambler ─► encoder ─► serializer ─► fault ─┐
                  (master_controller)            (fec_transmitter)         injector│ line
                                                                                   ▼
 gate_hi/lo ◄─ PWM ◄─ duty hold ◄─ descrambler ◄─ decoder ◄─ deserializer ◄────────┘
                  (power_module)                 (fec_receiver)        └─► capture RAM
```

## Packets and framing

A packet carries a 40-bit payload, `{aux[23:0], duty[15:0]}`. The duty cycle
is an unsigned Q0.16 fraction. The 24 `aux` bits are spare and are passed
through unchanged. The coded word is 40 bits with no coding, 47 bits with
Hamming, or 60 bits with RS (15 four-bit symbols).

On the line, one bit is sent per clock:

* the line idles at 0;
* a frame starts with a single 1 (start bit);
* the code word follows, most significant bit first;
* at least `GAP` = 2 idle clocks follow before the next start bit.

Both ends know the frame length from the `mode` input. Change `mode` only
while the link is idle.

Real links recover the receive clock from the data edges. To keep enough
edges on the line, the payload is scrambled. The master also sends a packet at
least every `MIN_TX_PERIOD` = 2500 clocks (one PWM period). If no new ADC
sample has produced a packet by then, it repeats the last duty cycle as a
*keep-alive*. The clock-recovery PLL itself is not part of this RTL.

## Scrambler and the follow-on discard

`scrambler` and `descrambler` are multiplicative, self-synchronising:
s[n] = d[n] ⊕ s[n−39] ⊕ s[n−58]. All 40 bits of a word are computed in one
clock by unrolling the recursion. Only the payload is scrambled, ahead of the
encoder, so the decoder corrects the scrambled bits.

A self-synchronising descrambler multiplies errors. One wrong line bit in an
uncoded payload becomes up to three wrong payload bits (taps 0, 39 and 58).
The history of the descrambler also reaches back two words. So when the
decoder discards a word, the next two payloads are built partly from garbage
as well. The descrambler therefore flags those two words too (`out_drop`).
The power module treats them exactly like the discarded word. No silently
corrupted duty cycle ever reaches the PWM.

## Hamming SECDED (47,40)

The code uses positions 1..46 of a Hamming code, with parity bits at the
powers of two and data in the other positions in order. Bit 0 holds the
overall even parity.

* **`hamming_encoder`** is two pipeline stages. Stage 1 computes the six
  parity bits (sparse XOR trees), plus five partial checksums over 8 data bits
  each. The overall parity is a wide XOR, so splitting it keeps the fan-in per
  stage small. Stage 2 combines the partial checksums.
* **`hamming_decoder`** is also two stages. Stage 1 computes the 6-bit
  syndrome and the overall parity. In stage 2, a 64-entry table addressed by
  the syndrome gives the data bit to flip. The table is a constant computed by
  a function at elaboration time. The outcome depends on the syndrome and the
  overall parity:

  | syndrome | overall parity | result |
  |---|---|---|
  | zero | even | no error |
  | any valid position (zero = the parity bit itself) | odd | single error; correct it (`out_corr`) |
  | non-zero | even | double error; raise `out_uncorr` |
  | points outside the shortened code (47..63) | odd | three or more errors; raise `out_uncorr` |

## Reed–Solomon RS(15,11): the hard part

The field is GF(16) with primitive polynomial x⁴+x+1. The generator is
g(x) = (x−1)(x−α)(x−α²)(x−α³), so t = 2 symbol errors can be corrected. Code
word bits `[4i+3:4i]` are the coefficient of xⁱ. Parity occupies symbols
0..3. The message is in symbols 4..14. The top message symbol is always zero,
because the payload fills only 10 symbols. GF helpers (`gf_mul`, `gf_inv`,
`gf_alpha_pow`, generator coefficients) live in `fec_pkg`.

**`rs_encoder`** is the textbook LFSR. It has four 4-bit registers and four
constant multipliers by the generator coefficients. It takes one message
symbol per clock, so a code word is ready 12 clocks after the message.

**`rs_decoder`** follows the classic structure. The received word waits in a
FIFO (`sync_fifo`) while the following stages work out the correction:

1. **`rs_syndrome`** runs four Horner cells, one symbol per clock, and is
   done after 16 clocks. Each cell multiplies by a constant power of α. The
   α⁰ cell needs no multiplier at all. If all syndromes are zero, the word is
   passed through and the remaining stages are skipped.
2. **`rs_key_equation`** solves for the error locator Λ(x) and evaluator
   Ω(x) with the Euclidean algorithm. It starts from x⁴ and S(x), and
   iterates remainder divisions until deg(remainder) < t. For t = 2 that takes
   at most two iterations. It gives up, setting `fail`, when it meets a zero
   divisor or when Λ would need a degree above 2.
3. **`gf_divider`** does the polynomial division for each Euclid step.
   * Registers T4..T0 hold the dividend and D3..D0 the divisor.
   * Each step multiplies T4 by the inverse of D3 to get the quotient symbol
     Qi. It subtracts Qi·D from T (XOR), shifts T up by one symbol, and moves
     Qi into T0.
   * The divisor's leading coefficient may be zero, for example when the top
     syndrome is zero. The divider therefore first shifts the divisor up s
     places until D3 is non-zero, then runs 2+s steps.
   * Afterwards T holds the quotient in its low symbols and the remainder in
     its high symbols. The split point depends on the degrees, and the control
     logic unpacks both into `quot` and `rem`.
   * Latency is 3 + (3 − deg divisor) + 1 clocks.
4. **`rs_chien_search`** evaluates Λ at α⁻ⁱ for i = 0..14, one position per
   clock. A zero marks an error at symbol i.
5. **`rs_forney`** is combinational. Because the first generator root is
   α⁰, the error value at locator X reduces to e = (Ω₀·X + Ω₁) / Λ₁. A
   multiplexer writes e into an error vector at a hit and 0000 elsewhere.
   The vector is XORed onto the word leaving the FIFO.

The word is reported as uncorrectable (`out_fail`) in three cases:

* the key equation failed;
* Λ has degree 0 while a syndrome is non-zero;
* the Chien search found a number of roots different from deg Λ.

The last case is how most three-error words are caught. RS can still
mis-correct a word with three or more errors into another valid code word.
No decoder of this strength can detect that.

**Fixed latency.** The stages take different times for 0, 1 or 2 errors:
16 clocks with no errors, up to 52 in the worst case. A variable decoding time
is exactly the jitter this link exists to avoid. So `rs_decoder` holds its
result in a `D_HOLD` state and releases it exactly `OUT_LATENCY` = 56 clocks
after the word was accepted. An assertion checks that the worst case never
exceeds that. The stages process one word at a time rather than being
overlapped. A 60-bit frame plus start bit and gap needs 63 line clocks, more
than the decoder's worst case, so a new word can never arrive while the
previous one is still being decoded.

## Fault injection

`fault_injector` sits on the master's line output and flips code word bits
only. Start bits and gaps are never touched, so framing never breaks and the
only errors are bit flips. It has two sources of errors, which can be used
together:

* **Binary symmetric channel.** A 32-bit Galois LFSR (x³²+x²²+x²+x+1, seed
  `SEED`) advances 16 steps per bit. A bit is flipped when the low 16 bits are
  below `bsc_thresh`, so p = `bsc_thresh`/65536. For example, 7 gives
  ≈1.07×10⁻⁴, 66 gives 10⁻³ and 655 gives 10⁻². The 16 steps matter: with
  one step per bit, consecutive draws share 15 bits, and errors would arrive
  in pairs.
* **Forced positions.** With `force_en` set, bit i of `force_mask` flips the
  i-th code word bit sent. Bit 0 is the first bit on the line, which is the
  code word's most significant bit.

`err_count` counts the bits flipped.

## Control and PWM

* **`pi_current_controller`** has gains `KP`, `KI` in Q8.8 (`FRAC` = 8). Its
  integrator is clamped (anti-windup), and its output is limited to
  0..`DUTY_MAX` (95 %). It runs once per ADC sample.
* **`master_controller`** hands each new duty cycle to the transmitter. It
  sends a keep-alive repeat when `MIN_TX_PERIOD` clocks pass without a
  packet.
* **`pwm_modulator`** is an edge-aligned counter with `PERIOD` = 2500 clocks
  (40 kHz at 100 MHz). It has complementary outputs with `DEAD` = 50 clocks
  (500 ns) of dead time on both edges. A new duty cycle takes effect at the
  next period boundary. An assertion forbids both gates being on at once.
* **`power_module`** feeds only packets that were not discarded (neither
  uncorrectable nor follow-on) to the PWM. On a discard, the previous duty
  cycle stays in force.

## Timing and results

Measured at default parameters with `tb_latency`. TX is the width of
`tx_active`: payload accepted until the last frame bit. RX is the width of
`rx_active`: start bit until payload delivered. The reference column is the
published hardware this design follows.

| coding | TX clocks / ns | reference TX | RX clocks / ns | reference RX |
|---|---|---|---|---|
| none    | 44 / 440 | 460 | 41 / 410   | 450  |
| Hamming | 53 / 530 | 540 | 50 / 500   | 570  |
| RS      | 76 / 760 | 750 | 117 / 1170 | 1070 |

Compared with no coding, the coding adds 180 ns (Hamming) and 1080 ns (RS) to
a packet's trip. The reference figures are 200 ns and 910 ns. The widths are
identical for every error pattern, including corrected and discarded words:
the link adds no jitter. The RS receive figure is higher because the decoder
always waits for its worst case: the 56-clock hold covers the 52-clock
slowest path with a small margin. `OUT_LATENCY` can be
lowered towards it; the `a_fixed_latency` assertion fires in simulation if it
is set too low.

Block latencies:

| block | latency (clocks) |
|---|---|
| scrambler, descrambler | 1 |
| Hamming encoder, decoder | 2 each |
| RS encoder | 12 |
| RS decoder | 56, fixed |
| acceptance → first code word bit | none 2, Hamming 4, RS 14 |
| last bit → payload out | none 2, Hamming 4, RS 58 |

BER after correction, with packets sent back to back. Errors are counted in
every delivered payload bit, whether or not the packet was flagged.
`tb_ber_sweep` uses 1500 packets per point:

| p (line) | none | Hamming | RS |
|---|---|---|---|
| 1.07e-4 | 2.0e-4 | 0 | 0 |
| 1e-3    | 3.3e-3 | 0 | 0 |
| 1e-2    | 2.8e-2 | 1.1e-2 | 4.7e-3 |

The uncoded BER is about 3p because of descrambler error multiplication. RS
is best throughout. The gap to Hamming narrows at high error rates, where
both codes are often overwhelmed.

## Where this design departs from the reference

Choices of this design:

* **Run-time coding selection.** One build contains all three codings,
  selected by `mode`, instead of one build per coding.
* **Choices the reference leaves open:**
  * the scrambler polynomial 1+x³⁹+x⁵⁸;
  * framing: start bit, MSB first, 2-clock gap;
  * payload layout, PI gains and formats;
  * dead time, and the keep-alive period;
  * capture RAM size (1024 × 43);
  * Hamming bit order;
  * partial-checksum split (5 chunks).
* **RS decoder scheduling.** The decoder runs its stages one word at a time
  and pads to a fixed latency, instead of pipelining the stages. At this link
  rate both sustain one word per frame.
* **Divider register roles.** A prose description of the divider loads the
  divisor into T and the dividend into D. Its block diagram, and the fact that
  quotient and remainder end up in T, require the opposite. This design keeps
  the dividend in T.
* **Follow-on flagging.** Flagging the two words after a discard (see the
  scrambler section) is an addition.

Not in the RTL:

* the clock-recovery PLL;
* the board-to-board channel;
* the external ADC;
* the power stage.

The end-to-end testbench closes the loop through a first-order model of the
converter's output current.

## Simulating

Every testbench is self-checking. Each ends by printing
`TB_RESULT checks=N failures=M` and has a watchdog. They use two-state
simulation with all read state reset. Example with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
  rtl/fec_pkg.sv tb/tb_ref_pkg.sv rtl/*.sv tb/tb_fec_link_system.sv \
  --top-module tb_fec_link_system
./obj_dir/Vtb_fec_link_system
```

Notes on the testbenches:

* **`tb_ref_pkg`** is an independent model of the arithmetic, used by every
  testbench as the reference. It has log/antilog GF(16) tables, RS encoding by
  long division, polynomial evaluation, a bit-serial scrambler, and a Hamming
  encoder.
* **Block testbenches** are named `tb_<block>`.
* **`tb_fec_link_system`** runs the whole link at its defaults, in about
  86 ms of simulated time (a few seconds of Verilator run time). It covers:
  * closed-loop settling in all three modes and mode switches;
  * forced single and double errors: corrected, detected, and the duty cycle
    held;
  * RS two-symbol correction and three-symbol failure;
  * random errors at p = 10⁻²;
  * keep-alive packets;
  * capture-RAM contents.

  It fails if any of these mechanisms never occurred.
* **`tb_latency`** and **`tb_ber_sweep`** produce the tables above.

## Files

| file | contents |
|---|---|
| `rtl/fec_pkg.sv` | widths, mode enum, GF(16) and Hamming helper functions |
| `rtl/fec_link_system.sv` | top: master, loopback line, power module, capture RAM |
| `rtl/master_controller.sv` | master: PI, scheduler, transmitter, fault injector |
| `rtl/power_module.sv` | power module: receiver, discard/hold, PWM |
| `rtl/fec_transmitter.sv` | transmit chain |
| `rtl/fec_receiver.sv` | receive chain |
| `rtl/scrambler.sv`, `rtl/descrambler.sv` | scrambler pair |
| `rtl/serializer.sv`, `rtl/deserializer.sv` | line framing |
| `rtl/hamming_encoder.sv`, `rtl/hamming_decoder.sv` | SECDED code |
| `rtl/rs_encoder.sv`, `rtl/rs_decoder.sv` | RS code |
| `rtl/rs_syndrome.sv`, `rtl/rs_key_equation.sv`, `rtl/gf_divider.sv`, `rtl/rs_chien_search.sv`, `rtl/rs_forney.sv`, `rtl/sync_fifo.sv` | RS decoder stages |
| `rtl/fault_injector.sv` | fault injection |
| `rtl/pi_current_controller.sv`, `rtl/pwm_modulator.sv` | control and PWM |
| `rtl/rx_capture_ram.sv` | capture RAM |
| `tb/` | one testbench per block, plus the link, latency and BER benches |
