# 64-bit Hamming single-error-correcting link

A 64-bit data word is protected by 7 even-parity redundancy bits, which makes
a 71-bit code word. The transmitter computes the redundancy bits and merges
them into the word. The receiver recomputes the parities over the received
71 bits. The result (the *syndrome*) is zero when the word arrived intact.
Otherwise it is the position of the single corrupted bit, and the receiver
inverts that bit before it strips the redundancy bits off again. The number of
redundancy bits is the smallest `r` with `2^r >= m + r + 1`; for `m = 64` data
bits that gives `r = 7`.

The RTL follows a published VHDL design of this 64-bit encoder/decoder pair. It
keeps its port names, its bit numbering and its worked example. Where the
published design leaves something open (mainly the receiver's exact ports and
timing), the choice made here is listed under "Departures and choices" below.

## Bit numbering: the part to get right first

Everything is numbered from 1, and element 1 is the **leftmost / most
significant** bit. For that reason the buses use ascending ranges:
`logic [1:64] datain`, `logic [1:71] hamout`. A hex literal therefore reads
left to right in position order.

Code word layout (positions 1..71):

| position | 1  | 2  | 3  | 4  | 5  | 6  | 7  | 8  | 9  | ... | 64  | 65  | ... | 71  |
|----------|----|----|----|----|----|----|----|----|----|-----|-----|-----|-----|-----|
| content  | R1 | R2 | D1 | R4 | D2 | D3 | D4 | R8 | D5 | ... | R64 | D58 | ... | D64 |

- The redundancy bit `R(2^r)` sits at position `2^r`, for r = 0..6 (positions 1, 2, 4, 8, 16, 32, 64).
- The data bits `D1..D64` fill the remaining positions in order.
- `R(2^r)` is the XOR of every data bit whose position has bit `r` set. This gives even parity over its group.
  For example, `R1 = D1^D2^D4^D5^D7^D9^D11^D12^D14^...^D64`.
- An equivalent way to say it: in a valid code word, XORing together the position numbers of all the 1 bits gives 0.
  The testbenches use this property as their independent reference.

Worked example, reproduced by the testbenches:

| | value |
|---|---|
| data | `64'h5555_5555_5555_5555` (binary `0101...01`) |
| code word | `71'h25AA5555AAAAAAAA55` |
| received with position 3 inverted | `71'h35AA5555AAAAAAAA55` |
| receiver result | syndrome `7'b0000011` (= 3), data `64'h5555_5555_5555_5555` |

## Transmitter: `hamenc`

- Combinational, no clock.
- Ports: `datain[1:64]` in, `hamout[1:71]` out.
- It places the data in the non-power-of-two positions. Then it fills each power-of-two position with the parity of its group.
- The XOR trees are written as loops over positions, parameterised by `DATA_W`. At 64 bits they are exactly the seven
  spelled-out parity equations of the published design.

## Receiver: `hamdec`

- Syndrome bit `r` is the XOR of all received positions whose index has bit `r` set. This includes the redundancy bit
  of that group.
- The syndrome is compared with every position. The one match inverts that bit, which is the "NOT gate" correction.
- Then the data positions are gathered back into `dataout[1:64]`.

| output | meaning |
|---|---|
| `dataout[1:64]` | corrected data |
| `errloc[6:0]` | the syndrome, which is the error position; `0` means no error. The MSB is the check of group 64. |
| `ded` | error detected (syndrome non-zero) |
| `ne` | no error (syndrome zero) |

Timing: the check and the correction are combinational, and all outputs are
registered on the rising edge of `clk`. A word presented before an edge appears
on the outputs right after that edge, which is one cycle of latency and one word
per cycle. `rst_n` is active-low and synchronous. It clears `dataout` and
`errloc`, clears `ded` and sets `ne`.

Limits of the code:

- **One error:** always corrected, whether it hits a data bit or a redundancy bit.
- **Two errors:** not recognised as such. The syndrome is the XOR of the two positions, so the receiver either inverts a
  third, innocent bit or (syndrome above 71) inverts nothing. In both cases it raises `ded`. This is a plain Hamming
  code, not the extended SEC-DED variant with an extra overall parity bit.

## The link: `hamming_link` (top)

The top holds the transmitter and the receiver side by side. The channel
between them is a physical, noisy medium, not logic, so it stays outside:
`tx_code` is the word sent into the channel and `rx_code` is the word taken from
it. Tie `rx_code` to `tx_code` for a noiseless link, or place a noise model in
between, as the end-to-end testbench does.

Ports:

| side | ports |
|---|---|
| clock and reset | `clk`, `rst_n` |
| transmit | `datain[1:64]` in, `tx_code[1:71]` out |
| receive | `rx_code[1:71]` in; `dataout[1:64]`, `errloc[6:0]`, `ded`, `ne` out |

## Files

| file | content |
|---|---|
| `rtl/hamming_pkg.sv` | the sizing rule `par_bits(m)` and the power-of-two position test |
| `rtl/hamenc.sv` | transmitter |
| `rtl/hamdec.sv` | receiver |
| `rtl/hamming_link.sv` | top |
| `tb/hamenc_tb.sv` | checks the worked example, the written-out `R1` equation, data placement and the zero-syndrome property on 2,000+ random words and all single-bit words |
| `tb/hamdec_tb.sv` | checks the receiver with its own reference encoder: each position corrupted in turn, random clean, single- and double-error words, the worked example, the reset values and the one-cycle latency |
| `tb/hamming_link_tb.sv` | end-to-end test at the default size. It acts as the channel (no error, or one bit inverted), checks recovered data, position and flags, and counts clean transfers, data-bit corrections and redundancy-bit corrections. A mechanism that never happened counts as a failure. |

Parameters (all modules): `DATA_W = 64`. The defaults `PAR_W = par_bits(DATA_W)`
and `CODE_W = DATA_W + PAR_W` are derived from it, giving 7 and 71. Other data widths elaborate too.
The testbenches, however, are written for 64 bits.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and ends itself. It also has a watchdog that ends a run that
hangs. For example:

```
verilator --binary --timing --assert -Wno-ASCRANGE \
  rtl/hamming_pkg.sv rtl/hamenc.sv rtl/hamdec.sv rtl/hamming_link.sv \
  tb/hamming_link_tb.sv --top-module hamming_link_tb
./obj_dir/Vhamming_link_tb
```

Replace the last file and the top module name to run `hamenc_tb` or `hamdec_tb`.
Each run takes well under a second.

`-Wno-ASCRANGE` only quiets Verilator's note about the ascending `[1:N]` ranges,
which are intentional.

## Departures and choices

What follows the published design:

- the 64/7/71 sizes;
- the interspersed placement at positions 1, 2, 4, ..., 64;
- even parity;
- the parity equations;
- the names `hamenc`, `datain`, `hamout`, `ded`, `ne`;
- the worked example;
- a combinational encoder and a clocked decoder.

Choices made here, where the published design is silent or unclear:

- **Receiver port list.** `errloc` is an output of its own, and `clk`/`rst_n` are included. The published design gives
  only the flag names and the fact that the decoder uses one clock.
- **Registered receiver outputs** with one cycle of latency, and a synchronous active-low reset.
- **Syndromes 72..127.** These cannot come from a single error. They raise `ded` and correct nothing.
- **The top module.** The published design builds transmitter and receiver as two separate designs. The top that
  joins them, with the channel left outside, is an addition.
- **Generic code.** The parity trees are generated by loops from `DATA_W`, not written out bit by bit.

Not reproduced:

- The published FPGA results: about 50 LUTs for the encoder and about 245 LUTs for the decoder, on a small Spartan-3
  part. This RTL has not been mapped to an FPGA.
- Both halves together have 281 port bits. That is more than the 173 user I/Os of that part, so the top as a whole is
  meant for simulation or for use inside a larger design, not as a stand-alone chip.
