# Bit-serial CRC-8 encoder and checker (DVB-S2 generator)

A cyclic redundancy check protects a block of data with a few check bits. The
message is treated as a polynomial over GF(2), multiplied by x^W, and divided
by a fixed degree-W generator polynomial g(x). The W-bit remainder is appended
to the message. The resulting codeword is an exact multiple of g(x). The
receiver divides what it got by g(x): a non-zero remainder means the word was
corrupted on the way.

This RTL does that division in hardware with a shift register and XOR gates,
one message bit per clock. The default generator is the 8-bit polynomial of
DVB-S2 (Digital Video Broadcasting, Satellite, 2nd generation):

    g(x) = x^8 + x^7 + x^6 + x^4 + x^2 + 1      (lower coefficients 8'hD5)

The polynomial, the width and the message length are all parameters, so the
same modules serve any generator polynomial.

## The divider: `crc_lfsr`

Everything rests on an 8-stage shift register. Stage *i* holds the coefficient
of x^i of the running remainder:

```
   +--------------------+------------------+------------------+-----------+-----------+
   |                    v                  v                  v           v           |
   fb -> [x^0]->[x^1]->(+)->[x^2]->[x^3]->(+)->[x^4]->[x^5]->(+)->[x^6]->(+)->[x^7]->(+)--> fb
                                                                                      ^
                                                                           input data-+
```

- The feedback `fb` is the top stage XOR the incoming message bit.
- `fb` goes into stage 0.
- `fb` is also XORed into the input of each stage whose generator coefficient
  is 1. For the default generator these are the stages x^2, x^4, x^6 and x^7.
- So the circuit has eight flip-flops and five XOR gates: four taps plus the
  input XOR.

**Why no zeros are appended.** A textbook CRC appends W zeros to the message
and then divides. This divider feeds the message in at the x^W end of the
register instead of at x^0. Each input bit is therefore already multiplied by
x^W when it enters. After the last message bit, the register holds
`m(x)·x^W mod g(x)`, which is the check value. The encoder needs MSG_W clocks,
not MSG_W + W.

For a general `CRC_W`/`POLY`, the taps sit wherever `POLY` has a 1. `POLY[0]`
must be 1, because a generator needs a constant term; an elaboration-time
assertion checks this.

Ports: `clear` (synchronous, wins over `shift_en`), `shift_en`, `din`, and
`crc`, which is the register itself. Reset clears the register. The start value
is zero, with no bit reflection and no final XOR. This is plain long division,
so the results are the "CRC-8/DVB-S2" variant: the ASCII string `123456789`
gives `0xBC`.

## Encoder: `crc_encoder`

1. On `start`, the encoder captures `msg` and clears the divider.
2. It shifts the message in, most significant bit first, one bit per clock.
3. After MSG_W shifts, `done` pulses for one cycle.

`crc` then holds the check bits, and `codeword = {msg, crc}`: the message
followed by the check bits. Both stay valid until the next start.

```
cycle:     0        1 ... MSG_W        MSG_W+1
start   ___/‾‾\____________________________
busy    ______/‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾\_____________
done    ________________________/‾‾‾‾\______   crc, codeword valid from here
```

`start` is ignored while `busy` is high. It is accepted again in the `done`
cycle, so encodes can run back to back, one every MSG_W + 1 clocks.

## Checker: `crc_checker`

The checker takes a received word `rx = {message', check'}` and reports
`rem = rx(x) mod g(x)`, with `error = (rem != 0)`.

It does not divide all MSG_W + W bits. Instead it runs only the message part
through the same divider and XORs the received check bits onto the result.
This gives the same remainder for the following reason:

    rx(x) = m'(x)·x^W + c'(x),  deg c' < W
    rx mod g = (m'·x^W mod g) XOR c'

So `rem` is the true remainder of the whole received word, not merely a
syndrome that is zero at the same times. It is ready MSG_W + 1 clocks after
`start`, with the same handshake as the encoder.

## Encoder and checker together: `crc_codec_top`

The top connects encoder and checker through a model of the transmission
channel. The channel is an XOR with the `err_mask` input: each 1 in the mask
flips that codeword bit.

When the encoder raises `enc_done`, the checker starts on
`codeword ^ err_mask`. `err_mask` is sampled in that cycle. `chk_done` follows
MSG_W + 1 clocks later, which is 2·(MSG_W + 1) clocks after `start`. Then
`rem` and `error` hold the verdict. Set `err_mask` to zero for an error-free
channel.

### What the default generator detects

With g(x) = x^8+x^7+x^6+x^4+x^2+1 the following errors are always detected:

- **Any single-bit error.** x^i is never a multiple of g(x).
- **Any odd number of flipped bits.** g(x) has an even number of terms, so
  (x+1) divides it, and every multiple of g(x) has even weight.
- **Any burst of 8 bits or fewer.** Such an error is x^i·b(x) with
  deg b < 8 and b(0) = 1, which g(x) cannot divide.

In the end-to-end test, random double-bit errors within an 80-bit codeword
were also always flagged. That is an observation from the random test, not a
proof.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `CRC_W` | 8 | degree of the generator, i.e. number of check bits |
| `POLY`  | `8'hD5` | generator coefficients x^(CRC_W-1) .. x^0; the x^CRC_W term is implied |
| `MSG_W` | 72 | message length in bits (encoder, checker, top) |

The defaults live in `crc_pkg`. The generator polynomial and its degree are
fixed by the design. The message length is not: 72 bits is the length of the
DVB-S2 baseband header, which this CRC protects in that standard. Any
`MSG_W` ≥ 1 works.

Example of another configuration: the classic hand-worked division of the
message 1101011011 by 10011 (x^4 + x + 1) uses `MSG_W=10, CRC_W=4,
POLY=4'b0011`. It gives check bits 1110 and codeword 11010110111110. The
testbenches run exactly this case.

## Design choices

These are not fixed by the underlying description:

- the parallel message port and the `start`/`busy`/`done` handshake;
- the asynchronous active-low reset and the zero start value;
- MSB-first bit order;
- the default message length;
- the remainder computation in the checker (message part through the divider,
  then XOR with the received check bits);
- the error-mask channel in the top.

The divider structure, the generator polynomial and the codeword layout
(message, then check bits) are the ones described.

The design covers only this one serial architecture. There is no table-driven
or multi-bit-per-clock parallel CRC.

## Verification

Each testbench in `tb/` checks against `crc_ref_pkg`, a plain long-division
model that works like a hand calculation and does not use the shift register.

| testbench | what it checks |
|---|---|
| `tb_crc_lfsr` | register after every input bit vs. long division; `123456789` → `0xBC`; hold and clear; the 4-bit worked example (remainder 1110); a 32-bit instance (Ethernet generator `04C11DB7`, `123456789` → `89A1897F` with zero start value and no final inversion) |
| `tb_crc_encoder` | check bits and codeword for `123456789`, zero and random 72-bit messages; latency of exactly MSG_W+1 clocks; `busy` during the run; restart in the `done` cycle; the 4-bit worked example |
| `tb_crc_checker` | remainder and flag for clean words, every single-bit error position, bursts ≤ 8 bits, random error patterns; latency; the 4-bit worked example, clean and corrupted |
| `tb_crc_codec_top` | 301 end-to-end transfers at the default parameters, cycling through six error classes: none, single, double, odd weight, burst, random. It checks the codeword, the remainder, the flag, guaranteed detection and both latencies. It fails if any class never occurred. |

Each testbench ends by printing `TB_RESULT checks=N failures=M`. To run one
with Verilator 5, for example the full-size end-to-end test:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/crc_pkg.sv tb/crc_ref_pkg.sv rtl/crc_lfsr.sv rtl/crc_encoder.sv \
    rtl/crc_checker.sv rtl/crc_codec_top.sv tb/tb_crc_codec_top.sv \
    --top-module tb_crc_codec_top
./obj_dir/Vtb_crc_codec_top
```

All four testbenches pass. Each one also fails when a relevant piece of its
module is deliberately broken, for example:

- a missing feedback tap;
- an off-by-one bit count;
- the received check bits ignored;
- the channel mask not applied.

## Files

- `rtl/crc_pkg.sv`: default width, polynomial and message length; sequencer state type.
- `rtl/crc_lfsr.sv`: the shift-register divider.
- `rtl/crc_encoder.sv`: message in, check bits and codeword out.
- `rtl/crc_checker.sv`: received word in, remainder and error flag out.
- `rtl/crc_codec_top.sv`: encoder, channel mask and checker.
- `tb/crc_ref_pkg.sv`: long-division reference model for the testbenches.
- `tb/tb_*.sv`: the self-checking testbenches.
