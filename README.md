# Densely packed decimal compression over a serial line

Plain BCD spends 12 bits on three decimal digits. Those 12 bits could hold
4096 codes, but three digits have only 1000 values. Densely packed decimal
(DPD) packs the same three digits into 10 bits (1024 codes), so only about
2.5 % of the code space goes unused. Every bit of the code is still a small
Boolean function of the BCD bits, with no binary arithmetic. This is the
encoding IEEE 754-2008 uses for decimal floating-point significands.

This RTL builds a DPD compressor and puts it in a small system. A user types
a decimal number on a serial terminal. The FPGA-style design receives the
characters over a UART, turns them into BCD digits and groups them by three.
It compresses each group to 10 bits and sends the compressed stream back over
the same serial link. Beside that path sit two smaller ones: a binary-to-BCD
converter feeding a second compressor ("fixed input"), and a DPD-to-BCD
expander.

## The encoding

Name the three BCD digits `abcd`, `efgh` and `ijkm`, with `a`, `e` and `i`
as their most significant bits. A digit is *small* (0–7) when its MSB is 0
and *large* (8 or 9) when its MSB is 1. A small digit carries three
significant bits. A large digit carries only one, its LSB (`d`, `h` or `m`).
The 10-bit result is `pqr stu v wxy`, with `p` as bit 9.

* `r = d`, `u = h`, `y = m` always: the digit LSBs never move.
* `v = a | e | i`. With `v = 0`, all three digits are small and the code is
  simply `bcd fgh 0 jkm`. So numbers 0–79 look the same in DPD and in BCD,
  right-aligned.
* With `v = 1`, the `wx` bits say which single digit is large (00: third
  digit, 01: second digit, 10: first digit). For `wx = 11`, the `st` bits
  say which two digits are large, or that all three are (11). The freed
  positions then carry the bits of the small digits.

| a e i | p q r | s t u | v | w x y |
|-------|-------|-------|---|-------|
| 0 0 0 | b c d | f g h | 0 | j k m |
| 0 0 1 | b c d | f g h | 1 | 0 0 m |
| 0 1 0 | b c d | j k h | 1 | 0 1 m |
| 1 0 0 | j k d | f g h | 1 | 1 0 m |
| 1 1 0 | j k d | 0 0 h | 1 | 1 1 m |
| 1 0 1 | f g d | 0 1 h | 1 | 1 1 m |
| 0 1 1 | b c d | 1 0 h | 1 | 1 1 m |
| 1 1 1 | 0 0 d | 1 1 h | 1 | 1 1 m |

`dpd_compressor` does not go through this table. It computes each output bit
as its own sum of products, with no product wider than four literals and no
sum wider than four terms:

```
p = b·a' + j·a·i' + f·a·e'·i
q = c·a' + k·a·i' + g·a·e'·i
s = f·e'·i' + f·a'·e' + j·a'·e·i' + e·i
t = g·a'·e' + g·e'·i' + k·a'·e·i' + a·i
w = j·a'·e'·i' + e·i + a
x = k·a'·e'·i' + a·i + e
v = a + e + i        r = d   u = h   y = m
```

Each output is one AND level and one OR level behind the input inverters.
The compressor registers its ten outputs on the clock edge when `enable` is
high, giving one clock of latency. It has no reset. Its ports are
single-bit, one per named bit (`a_in` … `m_in`, `p_out` … `y_out`).

Some examples:

| decimal | BCD            | DPD          |
|---------|----------------|--------------|
| 005     | 0000 0000 0101 | 000 000 0101 |
| 055     | 0000 0101 0101 | 000 101 0101 |
| 099     | 0000 1001 1001 | 000 101 1111 |
| 555     | 0101 0101 0101 | 101 101 0101 |
| 999     | 1001 1001 1001 | 001 111 1111 |

`dpd_expander` reverses the encoding. It is combinational and switches on
`v`, then `wx`, then `st`. 24 of the 1024 ten-bit codes are redundant
(`v = w = x = s = t = 1`, with `p` or `q` set). They decode as 999-class
codes, and `p` and `q` are ignored.

## From keystroke to compressed byte

```
rx ─► sync ─► uart_rx ─► ascii_to_bcd ─► input_appender ─► dpd_compressor ─► output_appender ─► uart_tx ─► tx
                 ▲                                                                                 ▲
                 └──────────────────────── baud_gen (16 ticks per bit) ────────────────────────────┘
```

**Serial link.** The link runs at 19200 baud, 8 data bits, one stop bit, no
parity and no flow control, from a 50 MHz clock. `baud_gen` is a mod-M
counter that pulses `tick` once every M = 163 clocks. That gives 16 ticks
per bit at 19200 baud; the rate is 0.15 % slow, well within UART tolerance.
M is computed in `dpd_pkg::baud_divisor` from the `CLK_HZ`, `BAUD` and
`OVERSAMPLE` parameters of the top. One generator serves both the receiver
and the transmitter.

**Receiver.** `uart_rx` has four states: IDLE, START, DATA and STOP. A
falling edge on the (synchronised) line starts it counting ticks. After 8
ticks it is in the middle of the start bit. From there it takes a sample
every 16 ticks, which lands in the middle of each data bit, LSB first. It
then waits 16 ticks for the stop bit and pulses `rx_done_tick` with the byte
on `dout`, about 9.5 bit times after the start edge. The stop bit's value is
not checked. A two-flop synchronizer in the top sits in front of the
receiver.

**Characters to digits.** `ascii_to_bcd` is a case map. It turns `'0'`–`'9'`
into BCD 0–9. Carriage return or line feed (the Enter key) ends the number
being typed. Every other character is ignored.

**Grouping.** `input_appender` collects digits in typing order: the first
digit of a group is the top nibble. The third digit releases the group to
the compressor. If the number ends with one or two digits still held, the
group is filled with zero digits *behind* them and released, marked as
padded. So `5⏎` is compressed as 500 and `42⏎` as 420. The receiving side
therefore has to know how many digits were typed. The appender also passes
the end-of-number on as `msg_end`.

**Compression.** The group goes into `dpd_compressor` with `enable` =
group-valid. The 10-bit word appears one clock later. The top delays the
valid and end flags by one clock to match.

**Fitting 10 bits into 8-bit frames.** `output_appender` appends each DPD
word, MSB first, to a 24-bit bit queue. Whenever the queue holds 8 or more
bits, it offers the first 8 to the transmitter. Four words therefore leave
as exactly five bytes. At the end of a number, the queue is topped up with
zero bits to the next byte boundary, so the last bits go out at once. A
3-digit number therefore returns as two bytes: ten code bits and six zero
bits.

**Transmitter.** `uart_tx` sends start bit, data LSB first and stop bit,
each 16 ticks long. It takes a new byte when `tx_ready` is high.

Latency from the stop bit of the third digit to the compressed word is three
clocks: appender, compressor, queue. After that the byte waits only for the
transmitter.

**Throughput and the `drop` output.** Nothing can stall the receiver. Three
typed digits (30 bit times on the line) produce 10 bits, which take 12.5 bit
times to send. The output is therefore normally far ahead of the input. The
worst case is a long run of one-digit numbers, each followed by Enter (two
characters in, two bytes out, at line rates within 0.2 %). A 24-bit queue
holds about two such numbers of backlog. If a word ever arrives while the
queue is too full to take it (more than 14 bits queued), the word is
discarded and the top pulses `drop`.

## Fixed-input path: binary to BCD

`bin2bcd` converts an unsigned binary number into BCD by shift-and-add-3
("double dabble"). The binary number is shifted left, one bit at a time,
into a row of 4-bit decimal columns. Before each shift, every column that
holds 5 or more gets 3 added, so the shift carries a decimal ten into the
next column. For 243 (`11110011`), the eight shifts leave
`0010 0100 0011`. The loop unrolls into a triangular array of
add-3-if-≥5 cells and is purely combinational. Its `WIDTH` parameter
defaults to 8 bits (three digits); the digit count follows from the width.

In the top, `bin_in` (BIN_W = 8 bits) goes through `bin2bcd` into a second
`dpd_compressor`, enabled by `bin_en`. `bin_bcd` shows the converted digits
directly, and `bin_dpd` shows the registered DPD word. The compressor takes
exactly three digits, so BIN_W is limited to 9.

## Files

| file | what it is |
|------|------------|
| `rtl/dpd_pkg.sv` | shared types (`bcd_digit_t`, `bcd3_t`, `dpd_t`), link constants, baud divisor function |
| `rtl/dpd_compressor.sv` | BCD → DPD, sum-of-products, registered |
| `rtl/dpd_expander.sv` | DPD → BCD, combinational |
| `rtl/bin2bcd.sv` | binary → BCD, shift-and-add-3 |
| `rtl/baud_gen.sv` | mod-M tick counter |
| `rtl/uart_rx.sv`, `rtl/uart_tx.sv` | 16x oversampling UART halves |
| `rtl/ascii_to_bcd.sv` | character → digit / end-of-number |
| `rtl/input_appender.sv` | digits → 12-bit groups with zero padding |
| `rtl/output_appender.sv` | 10-bit words → bytes |
| `rtl/dpd_uart_top.sv` | the system |
| `tb/dpd_ref_pkg.sv` | testbench reference models: the encoding table above, decimal → BCD |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

All resets are synchronous and active low (`rst_n`). The compressor has no
reset.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and finishes. It also
has a watchdog that fails the run if the test hangs. With Verilator 5, for
example:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/dpd_pkg.sv tb/dpd_ref_pkg.sv rtl/*.sv tb/tb_dpd_uart_top.sv \
  --top-module tb_dpd_uart_top -o sim && obj_dir/sim
```

To run a single block, replace `rtl/*.sv` with that block's file (plus any
modules it instantiates) and name its testbench.

What is checked:

* The compressor and the expander are checked on all 1000 digit triples,
  against a table model written independently of the RTL. The expander is
  also checked for valid BCD output on all 1024 codes.
* `bin2bcd` is checked against division: exhaustively at 8 and 10 bits, and
  randomly at 20 bits.
* The UART halves are checked against bit-level line models. This includes
  the 16-tick bit length, the receive-done timing, and ±3 % rate error on
  reception.
* The appenders are checked against queue models with random traffic,
  stalls and overflow.
* `tb_dpd_uart_top` runs the whole system at its real parameters (50 MHz,
  19200 baud). It types seven numbers, including a stray letter, CR LF, and
  numbers of 1, 2, 3, 5, 7 and 12 digits. It decodes what comes back on `tx`
  and compares the result byte for byte with a stream built from the typed
  text alone. It also checks the binary path on all 256 inputs and the
  expander on all 1000 codes. It counts that full groups, both kinds of
  padded group, an end with nothing pending, a padding flush, an ignored
  character and a byte waiting for a busy transmitter all occur. This takes
  under a second of simulation time.

## Where the design makes its own choices

The encoding, the compressor's equations, the shift-and-add-3 converter, the
16x oversampling receiver with its four states and counters, the shared tick
generator, and the link settings are the design's fixed points. The
following choices are this implementation's own and are the places to look
if it has to interoperate with something else:

* **End of a number** is CR or LF. Other non-digit characters are dropped
  silently.
* **Padding a short group** puts the zero digits after the typed digits
  (`5` → 500), not in front (005). A receiver that needs the value must be
  told the digit count. Swapping this is a two-line change in
  `input_appender`.
* **Output framing** is a continuous MSB-first bit stream cut into bytes,
  padded with zeros at each end of number. An alternative would be to send
  each 10-bit word as two bytes (6 + 2 zero bits and 8 bits), or as ASCII
  `'0'`/`'1'` characters for display on a terminal. Only `output_appender`
  would change.
* **Compressor timing**: exactly one register stage, on the outputs.
* **`bin2bcd` is combinational** at 8 bits. The conversion of wider inputs
  in byte-sized pieces is not modelled.
* **The expander** is not used by the serial path. It is brought out on its
  own ports.
* **No error handling**: no parity, framing-error or break detection, and no
  flow control. The queue overflow is only reported (`drop`).
* The RS-232 level shifter and connector, and the terminal program on the
  PC, are outside this RTL. `rx` and `tx` are logic-level signals.
