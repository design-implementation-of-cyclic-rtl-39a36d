# CRC generator and checker

A cyclic redundancy check protects a block of data with a few extra bits. The
sender treats the message as a polynomial m(x) over GF(2), with addition as XOR
and no carries. It divides m(x)·x^k by a fixed generator polynomial g(x) of
degree k and appends the k-bit remainder r(x). The result,
c(x) = m(x)·x^k + r(x), is an exact multiple of g(x). The receiver divides what
arrives by the same g(x). A zero remainder means that no error occurred, or
that the error pattern was itself a multiple of g(x). A non-zero remainder
means the data was corrupted. With a suitable g(x) the check catches:

- every single-bit error;
- every odd number of flipped bits, when g(x) has x+1 as a factor;
- every burst no longer than k bits.

This RTL implements both ends of such a link for 8-bit messages. The
polynomial is a run-time input. Beside the link sits a classic bit-serial
shift-register CRC unit.

## Blocks

| module | role |
|---|---|
| `crc_divider` | combinational modulo-2 long division (shared helper) |
| `crc_generator` | encoder: message `a`, polynomial `b` → check bits `x`, codeword `t` |
| `crc_checker` | receiver: codeword `r`, polynomial `b` → remainder `rem`, `err` |
| `crc_serial` | one bit per clock shift-register divider, fixed polynomial |
| `crc_top` | sender + receiver of one link, plus the serial unit |
| `crc_pkg` | standard polynomials (CRC4 … CRC32) as constants |

## The parallel divider

The whole division happens in one clock. `crc_divider` takes the dividend and
walks from its top bit down to bit k. Wherever the running value holds a 1, it
XORs in g(x), aligned so that g's x^k term sits on that bit. That clears the
bit. After the last step only the low k bits can be non-zero, and they are the
remainder. The loop unrolls into `DIVIDEND_W − k` stages. Each stage is an
AND-gated XOR of k+1 bits, so the critical path grows linearly with the message
length. For 8-bit messages that is 8 stages.

The polynomial is an input, so the same hardware serves any g(x) of degree k:

- the leading coefficient `b[k]` and the constant `b[0]` must be 1;
- an assertion in the generator and the checker flags a polynomial without
  those two terms;
- the bits of `b` in between are free.

A CRC4 polynomial therefore needs an instance with `CRC_W = 4`. It cannot be
loaded into a degree-8 instance.

- **Generator.** The dividend is `{a, k zeros}`. The outputs are registered:
  `x <= rem` and `t <= {a, rem}`.
- **Checker.** The received word is divided as it stands, with no zeros
  appended. `rem` is registered, and `err` is the OR of its bits.

Both have one clock of latency and accept a new word every clock. Neither has
a reset or a handshake. The outputs are valid from the first clock edge after
the inputs are applied. In `crc_top`, a message applied before edge n yields
its codeword after edge n. If that codeword is looped straight back, the
verdict appears after edge n+1.

## The serial unit

`crc_serial` is the textbook circuit: CRC_W flip-flops with XOR gates at the
polynomial's non-zero coefficients. By default it has 16 bits and uses CRC16,
x^16+x^15+x^2+1. Message bits enter most significant first, one per clock while
`bit_valid` is high. The feedback bit is the register's top bit XOR the
incoming bit. Because the input joins at the top of the register, the register
already holds m(x)·x^16 mod g(x) after the last message bit. No 16 trailing
zeros need to be clocked in.

Shifting in a whole codeword instead leaves c(x)·x^16 mod g(x) in the
register. Because g(0)=1, this is zero exactly when c(x) is a multiple of
g(x). The same unit therefore also works as a checker, through the `zero`
output.

- `clear` (synchronous) and `rst_n` (asynchronous, active low) empty the
  register. `clear` has priority over `bit_valid`.
- The polynomial is the `POLY` parameter, because the taps are hard-wired.

## Top level and the channel

`crc_top` does not model the link between the two ends, because a channel is
not logic:

- the transmitted codeword leaves on `tx_t`;
- the received one comes back on `rx_r`;
- the sender and receiver share the polynomial input `b`.

The serial unit has its own ports (`ser_*`) and is not connected to the
parallel path.

Parameters and their defaults:

| parameter | default | meaning |
|---|---|---|
| `DATA_W` | 8 | message bits |
| `CRC_W` | 8 | polynomial degree (check bits) |
| `SER_W` | 16 | serial register width |
| `SER_POLY` | `crc_pkg::CRC16_POLY` | serial unit's polynomial |

## Worked examples

All three reproduce with the RTL (`tb/crc_cases_tb.sv`):

| polynomial | message | check bits | codeword |
|---|---|---|---|
| CRC4 x^4+x^3+1 (`11001`) | 10010011 | 0001 | 100100110001 |
| | 11001001 | 1001 | 110010011001 |
| CRC8 x^8+x^2+x+1 (`100000111`) | 10010011 | 11110000 | 1001001111110000 |
| | 11001001 | 01110001 | 1100100101110001 |
| CRC8-CCIT x^8+x^7+x^2+x+1 (`110000111`) | 10010011 | 00100111 | 1001001100100111 |
| | 11001001 | 10100100 | 1100100110100100 |

The default build (`CRC_W = 8`) runs the two CRC8 cases directly. The CRC4
case needs `CRC_W = 4`.

## Standard polynomials

`crc_pkg` holds the polynomials below, full form, with bit i the coefficient
of x^i:

| constant | polynomial | application |
|---|---|---|
| `CRC4_POLY` | x^4+x^3+1 | telephony |
| `CRC8_POLY` | x^8+x^2+x+1 | ATM header |
| `CRC8_CCIT_POLY` | x^8+x^7+x^2+x+1 | 1-wire bus |
| `CRC10_POLY` | x^10+x^9+x^5+x^4+x+1 | ATM AAL |
| `CRC16_POLY` | x^16+x^15+x^2+1 | HDLC/USB |
| `CRC16_CCIT_POLY` | x^16+x^12+x^5+1 | X.25 |
| `CRC32_POLY` | 0x104C11DB7 | Ethernet |

Two of these entries were taken from the standards they name:

- CRC16-CCIT is the X.25 polynomial x^16+x^12+x^5+1. A variant written as
  x^16+x^15+x^5+1 is sometimes listed for this entry.
- CRC32 is the Ethernet polynomial, including its x term.

The name `CRC8_CCIT` for x^8+x^7+x^2+x+1 follows the source design.

All of them are plain polynomial division. There is no bit reflection, initial
value or final XOR, so results differ from those protocols' checksums as
defined on the wire.

## What follows the source design and what does not

These parts follow the source design:

- the encoder and checker division algorithms;
- the ports of the generator (`a`, `b`, `clk`, `x`, `t`), which match its
  CRC8-CCIT build: 8+9+1+8+16 = 42 pins;
- the 8-bit messages;
- the CRC4/CRC8/CRC8-CCIT cases;
- a 16-bit shift-register CRC.

These are choices of this implementation:

- the unrolled single-cycle divider;
- the registered outputs and the absence of reset or handshake on the parallel
  path;
- the separate `err` output;
- the serial unit's feedback form, its default polynomial and its
  `clear`/`bit_valid`/`zero` control;
- splitting the top at the channel.

The source design's FPGA utilization figures (17–30 LUTs) are not reproduced
here and were not compared.

## Testbenches

Each testbench is self-checking. It prints `TB_RESULT checks=N failures=M`
and has a cycle watchdog. The reference arithmetic in `tb/crc_ref_pkg.sv` is a
bit-at-a-time shift-register division, independent of the RTL's unrolled form.

- `crc_generator_tb` runs the worked examples and a one-clock latency check.
  It also runs 400 random messages under random and standard polynomials at
  degrees 4, 8, 16 and 32.
- `crc_checker_tb` checks that clean codewords pass. It checks that every
  single-bit error and every burst of up to k bits is flagged. Random error
  patterns must give the reference remainder. Error patterns that are
  multiples of g(x) must go unseen.
- `crc_serial_tb` shifts in random 1–48-bit messages with idle cycles mixed
  in, and counts one bit per clock. Appending the check bits must give zero,
  and a flipped bit must not. It also tests clear and asynchronous reset.
- `crc_top_tb` runs the default-size top end to end. The testbench acts as the
  channel. It streams one message per clock in bursts, switching the
  polynomial between bursts and injecting errors. It checks every verdict, and
  the serial unit in parallel. It counts the following events and requires
  each to happen at least once:
  - clean pass;
  - detected error;
  - undetectable error;
  - polynomial switch;
  - serial encode;
  - serial clean check;
  - serial detection.
- `crc_cases_tb` runs the worked examples and every standard polynomial
  through `crc_top` instances of degree 4, 8, 10, 16 and 32.

To simulate one with Verilator, for example:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/crc_pkg.sv tb/crc_ref_pkg.sv rtl/crc_divider.sv rtl/crc_generator.sv \
  rtl/crc_checker.sv rtl/crc_serial.sv rtl/crc_top.sv tb/crc_top_tb.sv \
  --top-module crc_top_tb -o sim && obj_dir/sim
```

## Changing it

- **Message width or degree.** Set `DATA_W`/`CRC_W` on `crc_top` (or on the
  generator and checker). The divider scales as `DATA_W` stages of `CRC_W+1`
  XORs. For long messages, consider pipelining it.
- **A fixed polynomial.** Tie `b` to a `crc_pkg` constant. Synthesis then
  folds away the gating on the zero coefficients.
- **Serial unit.** Set `SER_W` and `SER_POLY`. `SER_POLY` must be `SER_W+1`
  bits with its top bit set.
