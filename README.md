# On-line byte-level pipelined floating point arithmetic

This is a floating point adder-subtractor and a floating point multiplier
that work on numbers one byte at a time. Each unit starts producing a
result before it has seen all of its operands. The mantissas are radix-8
*signed-digit* numbers, so a carry moves at most one digit to the left. An
adder or multiplier can therefore take the operand digits most significant
first and return result digits most significant first, a fixed few digits
behind. This is called *on-line* arithmetic.

Each unit is a chain of small modules:

- one module takes the exponents;
- one aligns the mantissas;
- one adds or multiplies;
- one normalises the result and packs it into bytes.

The modules pass bytes to each other over valid/ready handshakes. Several
operations are in flight at once. The next operand pair enters while the
previous result is still being normalised.

The units are meant to be functional units of a data-flow machine. Operand
packets arrive on one byte-wide port, and result packets leave on another.

## Number format

A packet is an exponent byte followed by `MANT_BYTES` mantissa bytes. The
default is 2 bytes, that is 4 digits.

- **Mantissa digits.** Each digit is in −7..7 and is stored as a 4-bit two's
  complement nibble. Each byte holds two digits, the more significant one in
  bits 7:4. The code 1000 (−8) is never used.
- **Mantissa value.** The mantissa is a fraction: digit *i* (from 1) has
  weight 8^−i.
- **Sign.** A number has no separate sign bit. Its sign is the sign of its
  leading digit.
- **Negation.** A number is negated by negating every digit.
- **Normalised numbers.** A normalised number has a non-zero leading digit.
- **Exponent byte.** The exponent byte is sign-magnitude: bit 7 is the sign
  and bits 6:0 the magnitude. It is a power of 8. Ordinary exponents lie in
  −120..+120.

The spare exponent codes mark special operands:

| exponent byte | meaning | packet (exp m1 m2) |
|---|---|---|
| +123 / −123 | +∞ / −∞ | `7B 10 00` / `FB F0 00` |
| +125 / −125 | +ε / −ε (underflow) | `7D 10 00` / `FD F0 00` |
| +127 | E (error, undefined result) | `7F 00 00` |
| 0 with zero mantissa | zero | `00 00 00` |

The ∞ and ε packets carry a leading digit of ±1. This keeps their sign
readable in the same way as for ordinary numbers. `sd_pkg.sv` holds these
constants and the digit helpers.

## Adder-subtractor (`fpas`)

```
 bytes in -> MPX -+-> exp pair ---> EXPFIX --(route, exponent)--> NORMOP -> bytes out
                  |                   | (delay, sub)                 ^  ^
                  +-> mantissa pairs -+-> MODOP -> ADDOP -> digits --+  |
                  +-> mantissa pairs (bypass) --------------------------+
```

**MPX** (`mpx`) collects the two operand packets. The first packet goes into
a byte FIFO (DEL) and the second into a register (REG). MPX then offers the
exponent pair. After that it offers the mantissa bytes as pairs, op1 byte *i*
together with op2 byte *i*. It takes the next packet pair only after the last
mantissa pair has gone. The subtract flag travels with the packet pair.

**EXPFIX** (`expfix`) classifies both exponents and forms x = exp1 − exp2.
There are three cases.

- **Normal operation.** This happens when |x| < 4, the mantissa length in
  digits. The operand with the smaller exponent is delayed by |x| digits,
  and the result exponent is the larger one.
- **Bypass.** This happens when |x| ≥ 4. Every digit of the smaller operand
  would fall beyond the truncated result. The larger operand is returned
  without passing through the adder. In a subtraction that returns op2, op2
  is negated.
- **Special.** This happens when an operand is ∞, ε or E. The special packet
  is sent, and the mantissa pairs are drained. An ε operand acts like a tiny
  number: ε + N returns N.

**MODOP** (`modop`) puts SFD zero digits in front of the delayed operand. An
odd delay rebuilds every byte from the low digit of one input byte and the
high digit of the next. MODOP negates op2 for a subtraction. It pads the
other operand at the end so that both streams have the same length.

**ADDOP** (`addop`) adds two digits per byte pair. Each digit position goes
through a ROM (`arom`) that returns the transfer digit t and the interim sum
w. The rule is:

- t = +1 if z + y > 6;
- t = −1 if z + y < −6;
- t = 0 otherwise;
- w = z + y − 8t.

Each sum digit is then w plus the transfer from the next position. The first
digit out is the overflow digit s0. With P byte pairs, ADDOP returns 2P + 1
digits.

**NORMOP** (`normop`) builds the result packet. It does this in one of three
ways:

- from the ADDOP digits, through the shared normalise/pack core;
- from the special-operand bank (`sop_bank`);
- from the bypassed mantissa bytes taken directly from MPX.

## Multiplier (`fpm`)

```
 bytes in -> MPX -+-> exp pair -------> EXOP ---(special code, x)--> PACKOP -> bytes out
                  +-> mantissa pairs -> MULTOP -> product bytes ------^
                  +-> first pair ----> EXOP (sign of a special result)
```

**EXOP** (`exop`) adds the exponents into a 10-bit sum x and sorts the case:

- **In range.** |x| ≤ 120.
- **Limited overflow or underflow.** x = ±121. The product may still
  normalise back into range, so the multiplication goes ahead and PACKOP
  makes the final decision.
- **Definite overflow or underflow.** The result is ±∞ or ±ε. The sign is
  read from the first mantissa byte of each operand, and the mantissas are
  discarded.

EXOP also handles special and zero operands:

- an E operand gives E;
- ∞ × 0 gives E;
- ∞ × ε gives E;
- ∞ × N gives ∞;
- ε × N gives ε;
- a zero operand gives zero.

**MULTOP** (`multop`) is an on-line multiplier with radix 64: each operand
byte is one radix-64 digit. At step *j* it keeps the partial operands X_j
and Y_j, which are the bytes received so far. It forms
w_j = 64·(w_{j−1} − d_{j−1}) + X_j·y_j + Y_{j−1}·x_j and emits
d_j = round(w_j) as one product byte.

The products X_j·y_j and Y_{j−1}·x_j come from `multsel`. It multiplies a
digit string by a byte using digit-product ROMs (`mrom`). A comparator puts
the larger digit first, so only the 15·16/2 = 120 unordered digit pairs are
stored.

After the last operand byte, the remainder follows as MANT_BYTES + 1 further
bytes. The product therefore has 2·MANT_BYTES + 1 bytes. Byte 0 is the
overflow position.

**PACKOP** (`packop`) normalises the product bytes with the same core as
NORMOP. For x = ±121 it checks the final exponent again after normalisation.

## Normalising on line (`normpack`)

Both units end in the same core. This is the part most unlike a
conventional floating point unit. It never shifts the mantissa:

- If the first digit (the overflow position, weight 8^0) is non-zero, the
  exponent goes up by one.
- Otherwise, each zero digit before the first non-zero digit takes one off
  the exponent.
- The first non-zero digit becomes the leading mantissa digit. The next
  three digits follow it.
- Later digits are accepted and thrown away.
- Missing digits are filled with zeros.
- If every digit is zero, the zero packet is sent.

The final exponent is known as soon as the leading digit is found. At that
point the exponent byte leaves, or ±∞ / ±ε if the exponent is out of range.
Each mantissa byte follows as soon as its two digits are in. The output packet
therefore overlaps the arrival of the digits.

The result is truncated, not rounded. The slowest case for the adder is heavy
cancellation after a 3-digit alignment. An example is
.(−1) 7 7 7 × 8^63 + .1 0 0 1 × 8^60. Its sum is .0000001 × 8^63, which
normalises to .1000 × 8^57. Here the normaliser passes the overflow digit and
six zeros before it finds the leading digit, taking one exponent step per zero.

## Handshakes and timing

Every link between modules is a valid/ready pair. A byte or command moves on
a rising clock edge where both signals are high. The top-level ports use the
same convention:

- `*_in_valid` / `*_in_ready` / `*_in_data`: operand bytes. Packet 1 is sent
  first, then packet 2, three bytes each.
- `as_in_sub`: held with the bytes; 1 = op1 − op2.
- `*_out_valid` / `*_out_ready` / `*_out_data` / `*_out_last`: result bytes.
  The exponent comes first, and `out_last` marks the last mantissa byte.

Reset (`rst_n`) is synchronous and active low.

Cycle counts measured at the default size, with no gaps and no output stalls:

| unit | latency, first operand byte to last result byte | back-to-back rate |
|---|---|---|
| adder-subtractor | about 16 cycles | 32 operations in about 323 cycles, about 10 per result |
| multiplier | about 15 cycles | about 10 cycles per result |
| MPX alone | – | 9 cycles per packet pair |

The rate is limited by MPX. It needs six cycles to read the six bytes of a
packet pair, one for the exponent pair, and two for the mantissa pairs. MPX
waits for the last mantissa pair to leave before it reads the next packet.

The original design is asynchronous TTL. Its estimates are a worst case of
one addition per 500 ns with a latency of about 800 ns, and one
multiplication per 395 ns with a latency of about 770 ns. A clock of 20–25 MHz
in this version gives the same rates.

## Where this version departs from the original design

- **Handshakes.** Clocked valid/ready handshakes replace the asynchronous
  ready/acknowledge pairs and their delay estimates.
- **AROM size.** The ADDOP ROM has 256 words (two 4-bit digit codes) instead
  of 225. Its contents are computed from the addition rule.
- **MULTOP datapath.** MULTOP keeps its residual, rounding and remainder in
  two's complement fixed point. It converts the result bytes back to signed
  digits. The original uses signed-digit adders inside the multiplier. The
  product digits have the same value, but the internal digit strings can
  differ.
- **ADDOP output length.** ADDOP returns 5 to 9 digits, not 5 to 8. For an
  odd delay the operands are padded to whole bytes, and this adds one zero
  position. The normaliser drops it.
- **Bypass negation.** In a subtraction that bypasses to op2, op2 is
  negated. The original rule only says that op2 is the result.
- **Choices of this version.** The following are not given in the original
  and were chosen here:
  - the mantissa codes of the special packets;
  - the zero packet;
  - the treatment of exponent 121 as an input (it is read as E);
  - the full table of special-operand products.
- **EXPFIX release.** EXPFIX takes the next exponent pair only after the
  last mantissa pair of the current operation has passed. The original
  releases it as soon as NORMOP has the exponent. MPX holds the next packet
  until then anyway, so the rate is the same.
- **MPX ordering.** The subtract flag enters with the operand bytes. MPX
  finishes one packet pair before it reads the next.
- **Shared normaliser.** NORMOP and PACKOP share one normalise/pack core
  (`normpack`).
- **Not included.** The data-flow machine around the units is not part of
  this design. This covers the instruction memory and the networks that
  route packets and operation codes. The two units are simply placed side by
  side in `olbp_top`.

## Files and simulation

`rtl/` has one module or package per file. The hierarchy is:

```
olbp_top -> fpas (mpx, expfix, modop, addop (arom), normop (normpack, sop_bank))
         -> fpm  (mpx, exop, multop (multsel (mrom)), packop (normpack, sop_bank))
```

The only parameter is `MANT_BYTES`, which defaults to 2. The design is
written to scale with it. It also passes Verilator lint at 1, 3 and 4
bytes, but only the default has been simulated.

`tb/` has one self-checking testbench per module, and `tb_sd_pkg.sv` holds
shared reference helpers. Each testbench works out the expected results by
itself, from the digit values. Each one applies random input gaps and output
back-pressure. Each one ends by printing `TB_RESULT checks=N failures=M`.
`tb_olbp_top` runs both units end to end at the default size. It makes every
mechanism happen at least once, including:

- every alignment delay;
- bypass;
- mantissa overflow;
- cancellation;
- zero results;
- overflow to ∞ and underflow to ε, including the limited cases;
- special operands;
- output stalls.

To run one testbench with Verilator 5:

```
verilator --binary --timing -Wall -Wno-fatal --top-module tb_olbp_top \
    rtl/sd_pkg.sv $(ls rtl/*.sv | grep -v sd_pkg) tb/tb_sd_pkg.sv tb/tb_olbp_top.sv
./obj_dir/Vtb_olbp_top
```

`rtl/sd_pkg.sv` must come first. To run another testbench, use the same
command with the other testbench file and top module.
