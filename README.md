# Serial CRC (7,4) encoder

A cyclic redundancy check protects a data word sent over a noisy channel by
appending check bits: the remainder of a modulo-2 polynomial division. In this
(7,4) code a 4-bit data word `d3 d2 d1 d0` is extended by 3 zeros to make the
*augmented* data word. That word is divided by a 4-bit divisor `1 dv2 dv1 dv0`.
The 3-bit remainder replaces the three zeros, which gives the 7-bit code word.
The receiver divides the received code word by the same divisor. A zero
remainder (the *syndrome*) means no error was detected.

The encoder here does the division one bit per clock. It needs only three D
flip-flops, three AND gates and three XOR gates, and there is no counter,
no control logic and no wide arithmetic.

## How the shift register divides

Long division in modulo-2 arithmetic works like ordinary long division, with
one difference: subtraction is XOR. At each step you look at the leading bit
of the current partial dividend:

- If it is 1, you XOR the divisor into the partial dividend.
- If it is 0, you XOR in 0000, which changes nothing.

Either way the leading bit becomes 0 and is dropped. The next dividend bit is
then brought down.

The three flip-flops `rm[2] rm[1] rm[0]` hold the partial dividend without its
leading bit. On every rising clock edge:

```
rm[0] <= (rm[2] & dv[0]) ^ serial_in
rm[1] <= (rm[2] & dv[1]) ^ rm[0]
rm[2] <= (rm[2] & dv[2]) ^ rm[1]
```

The shift `serial_in -> rm[0] -> rm[1] -> rm[2]` brings down the next bit.
`rm[2]` is the bit that is about to leave the register, and it decides whether
the divisor is XORed in. The AND gates do that: each gates one divisor bit with
`rm[2]`. The divisor's leading 1 needs no gate. Its job is to cancel the
outgoing bit, and that bit is simply dropped.

After all 7 bits of the augmented word have been shifted in, the register holds
the remainder, with `rm[2]` as its most significant bit.

### Worked example

Data word `1001`, divisor `1011` (`dv = 3'b011`), augmented word `1001000`
entered most significant bit first:

| edge | bit in | rm[2] before (feedback?) | rm[2:0] after |
|------|--------|--------------------------|---------------|
| –    | –      | reset                    | 000           |
| 1    | 1      | 0                        | 001           |
| 2    | 0      | 0                        | 010           |
| 3    | 0      | 0                        | 100           |
| 4    | 1      | 1 (XOR 011)              | 010           |
| 5    | 0      | 0                        | 100           |
| 6    | 0      | 1 (XOR 011)              | 011           |
| 7    | 0      | 0                        | 110           |

The remainder is `110`, so the code word is `1001 110`.

### Codebook for divisor 1011

| data | code word | data | code word |
|------|-----------|------|-----------|
| 0000 | 0000000   | 1000 | 1000101   |
| 0001 | 0001011   | 1001 | 1001110   |
| 0010 | 0010110   | 1010 | 1010011   |
| 0011 | 0011101   | 1011 | 1011000   |
| 0100 | 0100111   | 1100 | 1100010   |
| 0101 | 0101100   | 1101 | 1101001   |
| 0110 | 0110001   | 1110 | 1110100   |
| 0111 | 0111010   | 1111 | 1111111   |

The same register checks a received word. Shift all 7 received bits in after a
reset: the remainder is 000 exactly when the word is in this table. With this
divisor, any single flipped bit leaves a non-zero syndrome.

## Interface and timing

`crc74_encoder` (top), parameters `N = 7` (code word bits) and `K = 4` (data
word bits). The register has `N-K` stages.

| port        | dir | width | meaning |
|-------------|-----|-------|---------|
| `clock`     | in  | 1     | the register updates on the rising edge |
| `reset`     | in  | 1     | active high, **asynchronous**: clears `rm` at once, with no clock edge needed |
| `serial_in` | in  | 1     | augmented word, MSB first, one bit per clock |
| `dv`        | in  | 3     | divisor bits below the leading 1 (`dv[2]` = dv2 … `dv[0]` = dv0); hold them steady for a whole word |
| `rm`        | out | 3     | remainder / partial dividend, `rm[2]` most significant |

Using it:

1. Pulse `reset`.
2. Present the 7 bits of the augmented word before 7 successive rising edges.
3. `rm` holds the remainder from the 7th edge until the 8th.

The reference timing uses a 20 s clock that rises first at 10 s, with reset
high from 0 s to 5 s. There the remainder is complete at 130 s and can be
sampled up to 150 s. Reset must be asynchronous because that reset pulse ends
before the first clock edge.

The encoder has no bit counter and no "done" output. Framing the 7 bits and
sampling `rm` is left to the logic around it. The data word itself is
transmitted as is, and `rm` is sent after it.

## Files

- `rtl/crc_pkg.sv`: code sizes (`CRC_N`, `CRC_K`, `CRC_R`), the example
  divisor, and `crc_remainder()`, a loop-based long-division reference used by
  the testbenches.
- `rtl/d_dff.sv`: rising-edge D flip-flop with pins `Clk Din Set Reset Dout
  Ndout`. Set and Reset are asynchronous and active high, and Reset wins when
  both are high. As usual for RTL flip-flops, they act on their rising edges:
  releasing `Reset` while `Set` stays high does not set the flop again until
  the next clock edge or Set pulse.
- `rtl/crc74_encoder.sv`: the encoder. It has three `d_dff` instances. The AND
  and XOR gates are written as one `always_comb` over the register vector, and
  all `Set` pins are tied low.
- `tb/tb_d_dff.sv`: tests the flip-flop with random data and asynchronous set
  and reset pulses.
- `tb/tb_crc74_encoder.sv`: end-to-end test at the default parameters. It
  covers:
  - the worked example, checked after every edge;
  - all 16 codebook entries;
  - the zero syndrome of each code word;
  - detection of every single-bit error;
  - random words for all 8 divisors, against two independent models;
  - asynchronous reset in the middle of a word.

  It also counts feedback steps, plain shifts, mid-word resets, accepted words
  and detected errors, and fails if any of them never happens.
- `tb/tb_crc74_paper_run.sv`: replays the reference run with its original
  timing (time unit 1 s) and checks `rm` once a second from 1 s to 149 s.

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<m>` and ends. For
example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    --top-module tb_crc74_encoder rtl/crc_pkg.sv tb/tb_crc74_encoder.sv
./obj_dir/Vtb_crc74_encoder
```

Replace the top module and file name to run `tb_d_dff` or
`tb_crc74_paper_run`. Each run finishes in well under a second.

## What follows the reference circuit and what is a choice here

Taken from the reference circuit:

- the (7,4) sizes and the three-flip-flop register;
- the three update equations and the gate structure (AND with `rm[2]`, XOR
  with the previous stage);
- the divisor as a run-time input with an implied leading 1;
- MSB-first serial entry;
- the bit order of the remainder;
- rising-edge clocking;
- an active-high reset that clears the register before the first edge;
- the flip-flop pin names.

Choices made here:

- **Set polarity and priority.** Set is active high like Reset, and Reset
  has priority over Set.
- **Set pins tied low.** The circuit this follows does not show clearly what
  drives the Set pins.
- **Parameters N and K.** These are added here. Only their difference (the
  register length) affects the logic. The equations in `always_comb` are
  written for any length, but the feedback is always taken from the last stage
  and the divisor input is `N-K` bits wide.
- **No analog interface.** The reference circuit passes its inputs through
  analog-to-digital bridges and drives its outputs into digital-to-analog
  bridges and 1 kΩ loads for plotting. None of that is logic, so the RTL has
  plain digital ports instead.
- **No receiver-side decoder.** A decoder is not part of this design. As shown
  above, the encoder itself computes the syndrome when a full code word is
  shifted in. Comparing that syndrome with zero, and accepting or discarding
  the word, is left to the user.
