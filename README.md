# CAN 2.0 CRC-15 error detection: generator, checker and link

A CAN data frame carries a 15-bit cyclic redundancy check (CRC) after its data
field. The sender divides the data, read as a binary polynomial, by a fixed
generator polynomial and appends the remainder. The receiver divides data plus
CRC by the same polynomial. An intact frame leaves remainder zero. A damaged one
almost always does not: every single-bit error and every burst of up to 15 bits
is caught.

This RTL builds that scheme as small bit-serial hardware. It has four parts:

* a **transmitter**: an LFSR, a bit counter and a CRC generator that latches
  the remainder and appends it to the data field;
* a **serial link** with an **error injector** that can invert any one bit;
* a **receiver checker**: the same LFSR, which answers ACK or NAK;
* **resend on NAK**: the transmitter sends the stored frame again.

A 5-stage pseudorandom LFSR, the textbook example of the same structure, sits
beside it in the top level with its own ports.

Generator polynomial (CAN 2.0):

    G(x) = x^15 + x^14 + x^10 + x^8 + x^7 + x^4 + x^3 + 1      (15'h4599 without x^15)

Reference results the design reproduces:

* Data byte `10101010`, one byte: CRC `100001110010001`, frame
  `10101010 100001110010001` (23 bits).
* The same frame with its 8th bit inverted on the link: receiver remainder
  `100010110011001`, error flagged.

## The division register (`crc_lfsr`)

This is the heart of the design and the part worth understanding first.

Dividing by G in modulo-2 arithmetic is subtraction by XOR. Done one bit per
clock, it becomes a shift register with XOR gates:

    crc_next = {crc[13:0], din} ^ (crc[14] ? 15'h4599 : 15'h0)

Each clock, the new message bit enters the LSB and the bit leaving the MSB is
fed back into every stage where G has a 1. For G above those are stages 0, 3,
4, 7, 8, 10 and 14, so seven two-input XORs.

This is the *appended-zeros* form of the division: the register holds the
running remainder of exactly the bits shifted in so far.

* **Sender.** Shift in the message, then 15 zero bits (multiplying by x^15).
  The register then holds the CRC.
* **Receiver.** Shift in message plus CRC, with no extra zeros. The register
  ends at zero exactly when the frame is a multiple of G.

Both sides therefore use the same module, started from all zeros.

The module is parameterized (`WIDTH`, `POLY`), so it can be checked against a
hand-worked division. With `WIDTH=5` and `POLY=5'b10101` (x^5+x^4+x^2+1), take
the message `11001011101` followed by five zeros. The register steps through:

| step | 2 | 3 | 4 | 5 | 6 | 7 | 8 | 9 | 10 | 11 | 12 | 13 | 14 | 15 | 16 | 17 |
|------|---|---|---|---|---|---|---|---|----|----|----|----|----|----|----|----|
| reg  |00001|00011|00110|01100|11001|00111|01111|11111|01010|10100|11100|01101|11010|00001|00010|00100|

The CRC is `00100`. Shifting `11001011101 00100` into a cleared register ends
at `00000`. `tb_crc_lfsr` checks every step.

An alternative form folds the zeros in by XORing the input with the MSB. It
gives the same CRC 15 clocks sooner but a different receiver behaviour. It is
*not* used here.

## Frame and data length code

The data field is 0 to 8 bytes. Its length is given by the 4-bit data length
code (DLC): codes 0..8 mean that many bytes. CAN forbids codes 9..15; here they
are read as 8 bytes.

* `data[63:0]` is left-aligned: byte 0 is in `data[63:56]`.
* Bits go out MSB first, byte 0 first.
* The frame is the first `8*bytes(dlc)` data bits followed by the 15 CRC bits,
  MSB first. That is `n = 8*bytes + 15` bits, between 15 and 79.
* `frame_out[78:0]` holds the frame left-aligned, with zeros below it.

Only the data field is covered by the CRC. The other fields of a full CAN frame
are not built: start of frame, identifier, control field, ACK slot, end of
frame, and bit stuffing.

## Transmitter (`crc_transmitter`)

A state machine runs three phases. The bit counter (`updown_counter`, counting
up) times each of them.

| phase  | clocks | what happens |
|--------|--------|--------------|
| `CALC` | n + 1  | The data bits, then 15 zeros, are shifted into the LFSR, one per clock. When the count reaches n, the counter compare raises `latch`: `crc_generator` stores the remainder and assembles the frame. |
| `SEND` | n      | `tx_bit` is frame bit `cnt`, with `tx_valid` high. The counter acts as a bit-select multiplexer over the stored frame. |
| `WAIT` | 1 or more | The transmitter waits for the receiver's `ack` or `nak`. |

Handling of the receiver's answer:

* **`ack`**: the frame ends with a `done` pulse.
* **`nak`**: the stored frame goes out again from `SEND`, with no new CRC
  computation. This happens at most `MAX_RETRY` times (default 3).
* **Another `nak` after the last resend**: `done` and `gave_up` pulse together.

`frame_start` pulses in the clock before each transmission's first bit. The
link and the receiver use it to clear their bit counts. `crc_done` stays high
from the latch until the next `start`. `dlc` and `data` are captured when
`start` is taken in the idle state.

`crc_generator` is the latch-and-append stage. It uses a DLC-controlled shift
to place the CRC directly after the data field, and masks out data bits past
the field.

## Receiver (`crc_checker`)

* **Start.** A `start` pulse clears the LFSR and the counter and loads the frame
  length from `dlc`.
* **Receive.** Every clock with `rx_valid` shifts `rx_bit` in. Gaps in
  `rx_valid` are allowed.
* **Result.** One clock after the n-th bit, `done` pulses together with either:
  * `ack`: the remainder is zero;
  * `nak`: the remainder is non-zero.

`crc_err` and `remainder` hold the result until the next `start`. The receiver
does not parse a DLC from the line: it is told the DLC, and the top level passes
the transmitter's.

## Link and error injector (`error_injector`)

The injector sits between `tx_bit` and `rx_bit`. It counts valid bits from
`frame_start`. While `inject_en` is high, it inverts the bit whose index equals
`inject_pos` (0 = first data bit) and pulses `injected`.

The path is combinational, so the link adds no latency. Holding `inject_en`
corrupts every resend as well, which is how retry exhaustion is exercised.

## Example pseudorandom LFSR (`lfsr5_example`)

This is a 5-stage Fibonacci LFSR. Stages 1 and 4 are XORed into stage 0, and
the output is stage 4. That is x^5 + x^2 + 1, a maximal-length polynomial.

From the seed `5'h1F`, the first clock loads 0 into stage 0 (`5'h1E`). The
register then runs through all 31 non-zero states. Reset and `load` restore the
seed. It is not connected to the CRC path.

## Top level (`crc_can`)

| group | ports |
|-------|-------|
| request | `start`, `dlc[3:0]`, `data[63:0]` |
| fault | `inject_en`, `inject_pos[6:0]` |
| transmitter | `crc_out[14:0]`, `frame_out[78:0]`, `crc_done`, `tx_busy`, `tx_done`, `gave_up`, `retries[3:0]` |
| link | `line_bit`, `line_valid`, `injected` |
| receiver | `rx_remainder[14:0]`, `crc_err`, `rx_done`, `rx_ack`, `rx_nak` |
| example LFSR | `prbs_load`, `prbs_en`, `prbs_state[4:0]`, `prbs_out` |

**Timing.** A clean frame of n bits takes 2n + 2 clocks from `start` to
`tx_done`: n + 1 to compute, n on the line, and 1 for the answer. For one data
byte that is 48 clocks. Each resend adds n + 1 clocks.

**Clocking.** The link carries one bit per clock, so a 250 kHz bit clock (or a
clock enable) gives a 250 kbit/s line. No bit-rate generator is included.

**Reset.** All flops reset asynchronously on `rst_n` low. All registers reset
to zero, except the example LFSR, which resets to its seed.

Shared constants, types, the transmitter state enum and the DLC helper functions
are in `can_crc_pkg`.

**Size.** After generic synthesis, the top has about 300 flip-flop bits. Most
are the 64-bit data register, its 64-bit shift copy and the 79-bit frame
register, which are sized for the full 8-byte data field. An implementation
limited to one data byte needs a fraction of that.

## Design choices and limits

These are not fixed by the CRC scheme itself:

* **Compute, then send.** The appended-zero division needs the 15 zero bits
  before the CRC exists. The transmitter therefore computes the CRC first and
  sends data and CRC afterwards, rather than sending data bits while they are
  being divided.
* **ACK/NAK and resends.** The handshake and the limit of 3 resends are this
  design's own. The NAK is a wire from receiver to transmitter, not the CAN
  ACK slot or error frame.
* **DLC.** Codes above 8 mean 8 bytes. The receiver is given the DLC rather
  than decoding it.
* **CRC scope.** The CRC covers the data field only. A complete CAN controller
  also includes the start-of-frame, arbitration and control fields in the CRC,
  and adds bit stuffing, error frames and error counters. None of these is
  built.
* **Counters.** The bit counters are 7 bits wide, enough for 79 + 1 counts.
  The up/down counter module is general, but it is used counting up only.

## Files

* `rtl/can_crc_pkg.sv` — constants, types, DLC helpers.
* `rtl/crc_lfsr.sv` — CRC division register.
* `rtl/updown_counter.sv` — bit counter.
* `rtl/crc_generator.sv` — CRC latch and frame assembly.
* `rtl/crc_transmitter.sv`, `rtl/crc_checker.sv`, `rtl/error_injector.sv`.
* `rtl/lfsr5_example.sv` — example pseudorandom LFSR.
* `rtl/crc_can.sv` — top level.
* `tb/tb_*.sv` — one self-checking testbench per module.
* `tb/tb_can_ref_pkg.sv` — the reference model the testbenches share. It
  computes the CRC by long division over an array of bits, independently of the
  shift-register form.

## Verification

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_crc_lfsr` | the 5-bit worked division step by step; the CRC of `10101010`; 200 random messages against the reference, each followed by a receiver pass that must end at zero |
| `tb_updown_counter` | 3-bit and 7-bit counters: up/down wrap sequences and random enable/direction/clear against an integer model |
| `tb_crc_generator` | CRC latch, frame placement for every DLC, hold and clear |
| `tb_crc_transmitter` | CALC length of n + 1 clocks; CRC values; the serial frame; resend on NAK; give-up after 3 resends; ACK |
| `tb_crc_checker` | intact and damaged frames (1 to 4 inverted bits) with random gaps in `rx_valid`; remainder against the reference; `done` one clock after the last bit; the `100010110011001` case |
| `tb_error_injector` | exactly one inverted bit at the chosen index; gaps in valid do not advance the index |
| `tb_lfsr5_example` | first state `1E`; 31 distinct states; period 31; hold and load |
| `tb_crc_can` | end to end at default parameters; details below |

`tb_crc_can` covers:

* the `10101010` frame, clean and with its 8th bit inverted;
* all 16 DLC codes;
* 60 random frames, with zero, one or two corrupted attempts;
* a persistent error until retries run out;
* the example LFSR.

It checks the 2n + 2 clock latency of clean frames. It also counts each
mechanism and fails if any never happened: clean frame, detected error, NAK
resend, give-up, DLC above 8, empty data field, and the example LFSR.

To run one testbench with Verilator 5:

    verilator --binary --timing --assert -y rtl -y tb \
        rtl/can_crc_pkg.sv tb/tb_can_ref_pkg.sv tb/tb_crc_can.sv \
        --top-module tb_crc_can -o sim
    ./obj_dir/sim

For a testbench that does not use `tb_can_ref_pkg`, drop that file. For every
testbench, change the file and the `--top-module` name.

Verilator's `-Wall` lint reports two non-circuit warnings:

* `SYNCASYNCNET`: `rst_n` is used both as the asynchronous reset and in the
  assertions' `disable iff`.
* `UNUSEDPARAM`: a package constant that some modules do not use.
