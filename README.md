# Programmable 16-bit serial CRC generator

A cyclic redundancy check (CRC) protects a message by appending the remainder
of a modulo-2 polynomial division. This design computes that remainder one bit
per clock in a linear feedback shift register (LFSR) and appends it to the
message as the message streams through. The generator polynomial is not fixed
in gates. Fifteen input lines switch the shift register's EXOR taps on or off,
so one circuit serves every degree-16 polynomial of the form

    G(x) = x^16 + p15 x^15 + ... + p2 x^2 + p1 x + 1

which is 2^15 polynomials. They include CRC-16, CRC-CCITT (SDLC) and the
reversed forms of both.

The circuit is small: a 16-bit CRC register, a 6-bit bit counter and a
three-state controller. A message is 64 bits long. It enters serially on
`mesin` and leaves unchanged on `z`, and the 16 CRC bits follow it on `z`
straight away. From the first message bit to the last CRC bit takes
64 + 16 = 80 clocks.

## The divide register

The CRC register `creg[15:0]` is an *internal-EXOR* LFSR. The EXOR gates sit
between the flip-flops, not in a single feedback network:

    Y = mesin ^ creg[15]                     feedback bit
    creg[0]  <= Y
    creg[i]  <= creg[i-1] ^ (p_i & Y)        i = 1 .. 15

Each clock this does one step of long division. If the bit about to leave the
register, combined with the incoming message bit, is 1, the divisor is
subtracted. In modulo-2 arithmetic subtracting means EXOR-ing `G(x)` into the
register. The `x^16` term of `G(x)` is the bit that drops out of the top. The
`+1` term is the unconditional feed of `Y` into stage 0. The terms in between
are the programmable taps, where `p_i = 1` puts an EXOR gate into the path to
stage `i`. Because the message enters at the top (it is EXOR-ed with
`creg[15]`), the register holds `M(x)·x^16 mod G(x)` after the last message
bit. That is the CRC. No 16 trailing zeros have to be fed in.

Read as a number, `creg` holds the remainder with the `x^15` coefficient in
bit 15. The CRC is sent most significant bit first, by shifting the register
toward `creg[15]` with zeros entering at `creg[0]`. The register starts each
message at zero, and the result has no final inversion. In the usual catalogue
terms the output is a non-reflected CRC with initial value 0 and output XOR 0
(the "XMODEM" flavour for the CCITT polynomial). The message's first bit is its
most significant.

### Programming word

`vec[i]` is `p_(i+1)`, the coefficient of `x^(i+1)`. With the polynomial
written in the usual hex form (the `x^16` term dropped, the `+1` term in bit
0), the programming word is that value shifted right by one:

| Polynomial           | Terms                  | Hex (x^15..x^0) | `vec`    |
|----------------------|------------------------|-----------------|----------|
| CRC-16               | x16 + x15 + x2 + 1     | 8005            | 16'h4002 |
| CRC-CCITT / SDLC     | x16 + x12 + x5 + 1     | 1021            | 16'h0810 |
| CRC-16 reverse       | x16 + x14 + x + 1      | 4003            | 16'h2001 |
| CRC-CCITT reverse    | x16 + x11 + x4 + 1     | 0811            | 16'h0408 |

`vec[15]` exists so that the bus is 16 bits wide, but no gate uses it. The
`+1` term cannot be switched off, so every polynomial has it.

**Reference result:** a message of 64 ones under CRC-CCITT gives the CRC
`A6E1`. On `z` this is `1010 0110 1110 0001` after the 64 ones.

## Sequence and timing

The controller (`crc_ctrl`) has three states. They are held one-hot, one
flip-flop per state, and the state vector reads `100`, `010`, `001`:

| State | Name   | What happens                                                          | `z`          | `cout` |
|-------|--------|-----------------------------------------------------------------------|--------------|--------|
| 1     | INIT   | clear the counter and the CRC register; leave when `start` is high    | 0            | 0      |
| 2     | GEN    | pass `mesin` to `z`, divide it into the register, count               | `mesin`      | 0      |
| 3     | SEND   | shift the CRC out, MSB first, count                                   | `creg[15]`   | 1      |

The bit counter (`crc_counter`) is cleared in INIT and counts up in GEN and
SEND. GEN ends when the counter reads all ones (63), after exactly 64 message
bits. The counter then wraps to 0 by itself. SEND ends when its low four bits
read all ones (15), after exactly 16 CRC bits. The machine then returns to INIT.

Number the clocks from the INIT clock in which `start` is seen high:

    clock      1      2 ........ 65     66 ........ 81     82
    state      INIT   GEN ...... GEN    SEND ...... SEND   INIT
    z          0      m63 ...... m0     c15 ....... c0     0
    cout       0      0 ........ 0      1 ......... 1      0

`mesin` is sampled on the rising edge that ends each GEN clock. The message
bit appears on `z` in the same clock, through a combinational path. The CRC
is ready in clock 66, and its 16th bit leaves in clock 81. If `start` is held
high, clock 82 is clock 1 of the next message, whose first bit follows in
clock 83. A 64-bit message therefore costs 81 clocks, including the one INIT
clock. `start` is looked at
only in INIT. Changing it during a message has no effect.

`reset` is asynchronous and active high. It acts on the three control
flip-flops only, and forces INIT at once, even in the middle of a message. The
counter and the CRC register have no reset, because INIT always clears them
before they are used.

## Interface

Top module `crc_generator`:

| Port    | Dir | Width | Meaning                                                      |
|---------|-----|-------|--------------------------------------------------------------|
| `clk`   | in  | 1     | clock, rising edge                                           |
| `reset` | in  | 1     | asynchronous reset of the controller to INIT                 |
| `start` | in  | 1     | begin a message (sampled in INIT)                            |
| `mesin` | in  | 1     | serial message bit (sampled in GEN)                          |
| `vec`   | in  | 16    | polynomial taps, `vec[i] = p_(i+1)`; `vec[15]` unused        |
| `z`     | out | 1     | message, then CRC                                            |
| `cout`  | out | 1     | CRC ready: high while the CRC bits are on `z`                |

Parameters: `CRC_WIDTH` (default 16) and `MSG_BITS` (default 64). Both must be
powers of two, with `2 <= CRC_WIDTH <= MSG_BITS`. This is because the state
exits are all-ones tests on a counter that wraps; elaboration stops with an
error otherwise. The counter is `log2(MSG_BITS)` bits wide.

## Design choices and limits

The register transfers, the state sequence, the clock counts and the one-hot
state code are those of the original chip. The following are this design's
own choices:

- **One clock edge.** The original standard-cell implementation ran from two
  clock phases. Here every flip-flop uses the rising edge of `clk`.
- **Reset polarity.** The original resets the control flip-flops
  asynchronously; its polarity is not specified. Active high was chosen.
- **`z` in INIT is 0.** The original drives its output only in the generate
  and send steps.
- **Sizes as parameters.** The original is fixed at 16 and 64. The message
  length is still fixed per instance: every message is exactly `MSG_BITS`
  long, as in the original, and there is no way to end one early.
- **Not included.** The chip's pad ring and the scan chain that its layout tool
  inserted are not part of this RTL. The core's signals are the top's ports.
  A word-parallel CRC generator was proposed as a follow-on. It is not built
  here, because its width and interface were never defined.
- **Other uses.** The same circuit can compress a stream of test responses into
  a 16-bit signature (signature analysis): feed the responses on `mesin` and
  read the CRC phase. Multiple-input (MISR) and test-pattern-generator
  variants would need changes to the register and are not provided.

## Modules

| File                   | Content                                                        |
|------------------------|----------------------------------------------------------------|
| `rtl/crc_pkg.sv`       | one-hot state type                                             |
| `rtl/crc_lfsr.sv`      | programmable CRC register (clear / divide / shift-out)         |
| `rtl/crc_counter.sv`   | bit counter with incrementer                                   |
| `rtl/crc_ctrl.sv`      | three-state controller, asynchronous reset, one-hot assertion  |
| `rtl/crc_generator.sv` | top: the three blocks and the `z` multiplexer                  |
| `tb/crc_ref_pkg.sv`    | reference CRC by polynomial long division, named polynomials   |
| `tb/tb_*.sv`           | one self-checking testbench per module                         |

## Verification

Each testbench checks its module against values worked out independently and
ends with a line `TB_RESULT checks=N failures=M`.

- `tb_crc_lfsr`: 304 messages of random length under the named and random
  polynomials, with idle clocks mixed in. The 16 shifted-out bits are compared
  with the long-division remainder, and the zero fill behind them is checked.
- `tb_crc_counter`: random clear and increment against a modulo-64 model,
  including wraps.
- `tb_crc_ctrl`: 20,000 clocks with random `start` and asynchronous resets
  between clock edges. Checks that the state stays one-hot, that GEN lasts 64
  clocks and SEND 16, and the legal transitions.
- `tb_crc_generator`: the whole chip at its default size. Runs the `A6E1`
  reference case, then about 400 random messages. Every bit of `z` and `cout`
  is checked, along with the clock-66 and clock-81 timing. It counts START
  waits, back-to-back messages and resets during a message, and fails if any
  of them never happened.

To run one with Verilator:

    verilator --binary --timing --assert -Irtl -Itb \
      rtl/crc_pkg.sv tb/crc_ref_pkg.sv rtl/crc_lfsr.sv rtl/crc_counter.sv \
      rtl/crc_ctrl.sv rtl/crc_generator.sv tb/tb_crc_generator.sv \
      --top-module tb_crc_generator -o sim
    ./obj_dir/sim

The same command with another `tb_*.sv` file and `--top-module` runs the unit
tests. Each one finishes in well under a second.
