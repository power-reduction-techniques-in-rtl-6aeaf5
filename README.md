# 8b/10b serial link with ripple-counter clock division

This is a complete 8b/10b transmit/receive link in synthesizable SystemVerilog.
Each byte becomes a 10-bit code group. The code groups keep the serial line
DC-balanced and put a transition at least every five bits, so a receiver can
recover the clock from the data. The transmitter encodes a byte and shifts the
code group out one bit at a time. The receiver finds the word boundaries,
rebuilds the code groups and decodes them.

The power-related idea of the design is in the clocking. The encoder and
decoder do not run on the fast clock. Each is clocked by the last stage of a
3-bit **down ripple counter**. That is an asynchronous counter: only its first
flip-flop sees the input clock, and each later stage is clocked by the stage
before it. The character logic therefore toggles at one eighth of the input
clock rate. The stages also switch at slightly different moments instead of
all on one clock edge.

```
            tx_clk ──► ripple_down_counter ──► tx_word_clk (tx_clk / 8)
                                                    │
 tx_data,tx_k,tx_en ──► enc_8b10b ──10──► serializer_piso ──► serial_out
                                               ▲
                                          tx_bit_clk (10 per word)

 serial_in ──► deserializer_sipo ──10──► dec_10b8b ──► rx_data,rx_k,rx_valid,
                    ▲                        ▲          rx_code_err,rx_disp_err
               rx_bit_clk          rx_word_clk (rx_clk / 8)
                                             ▲
                               rx_clk ──► ripple_down_counter
```

## Clocking: the part to get right

Each side has two clocks, and they must be related exactly:

* **Word clock.** This is the input clock divided by 2^3 = 8 by the ripple
  counter (`tx_word_clk`, `rx_word_clk`). The encoder or decoder handles one
  character per word-clock cycle.
* **Bit clock.** This runs the serializer or deserializer, one line bit per
  cycle, so it needs ten cycles per character.

So the bit clock must run at **10/8 = 1.25 times** `tx_clk` (or `rx_clk`),
frequency-locked to it. For example, a 100 MHz `tx_clk` needs a 125 MHz
`tx_bit_clk`. Neither the description this design follows nor this RTL
includes a synchronizer between the two domains. The word crosses as a
mesochronous hand-off:

* The encoder changes its output on a word-clock edge.
* The serializer samples that output on every tenth bit-clock edge.
* The deserializer holds each word for ten bit clocks.
* The decoder samples the word once per word clock.

This works as long as no bit-clock edge falls on a word-clock edge. It is
safe only if the phase between the clocks is fixed and leaves setup and hold
margin. Phase-align the clocks in the clock generator. Do not treat them as
independent. The testbenches use 10 ns and 8 ns periods with a 2 ns offset,
so the edges never meet.

On the receive side, `rx_bit_clk` and `rx_clk` would come from clock and data
recovery. Clock and data recovery is a PLL that locks onto the transitions of
the line. It is analog and not part of this RTL. In a loopback test, all four
clocks can come from one source, as in the testbenches.

The ripple counter counts 0, 7, 6, … 1, 0. Its last stage rises on the
first `tx_clk` edge after reset, and after that on every eighth edge, with a
50 % duty cycle. In silicon each stage adds one clock-to-output delay, so the
word clock lags the input clock by three flip-flop delays. Static timing
analysis must treat it as a generated clock.

Reset (`rst`, active high) is applied asynchronously to every flip-flop on
both sides. The RTL has no reset synchronizers. In a real chip, release reset
synchronously to each clock, or hold it until the clocks are stable.

## The code

A byte is written `HGFEDCBA`, with H as the MSB. Let x = `EDCBA` and y =
`HGF`. The character is then named Dx.y for data or Kx.y for control.

* x is coded 5b/6b into `abcdei`.
* y is coded 3b/4b into `fghj`.
* The 10-bit symbol holds `a` in bit 0 and `j` in bit 9.
* The line sends `a` first.

Every sub-block has either equal numbers of ones and zeros, or a disparity of
±2. **Running disparity** (RD) is one bit of state: RD- or RD+. It chooses
between a code and its complement so that the running sum of the line never
drifts:

* Under RD-, an unbalanced sub-block is the one with more ones.
* Under RD+, an unbalanced sub-block is the one with more zeros.
* RD flips after every unbalanced sub-block.

Some details in `rtl/enc8b10b_pkg.sv` are easy to get wrong, and the
testbenches check each of them:

* **Balanced codes that still depend on RD.** D.7 (`111000`/`000111`) and
  x.3 (`1100`/`0011`) are balanced, but they use different forms under RD-
  and RD+.
* **A7 alternate.** Dx.7 normally uses `1110`/`0001`. It switches to
  `0111`/`1000` in these cases:
  * x = 17, 18 or 20 under RD-;
  * x = 11, 13 or 14 under RD+;
  * every Kx.7.

  Without the switch, five equal bits would be followed by more of the same
  across the sub-block boundary.
* **K28 alternates.** After K28's `110000`, the balanced 4-bit codes for
  y = 1, 2, 5 and 6 are complemented. This is why K28.1 under RD+ has the
  same 4-bit code as D.x.6. The decoder must take the K28 case into account
  when it looks up y.
* **The twelve control characters** are K28.0–K28.7, K23.7, K27.7, K29.7 and
  K30.7.

The sub-block tables are the standard Widmer–Franaszek ones.

**Decoding.** The decoder looks up x and y from the received sub-blocks,
allowing either disparity. It then re-encodes the character it found under its
tracked RD:

* **Exact match:** the character is good.
* **Match only under the other RD:** `disp_err` is set.
* **No match:** `code_err` is set. This covers 6b or 4b patterns that are not
  in the code, and an A7 used where P7 belongs.

After a bad symbol, RD follows the received sub-blocks, so one bad symbol does
not leave the tracker wrong. The first symbol after reset is accepted under
either disparity.

## Word alignment and idle fill

When `tx_en` is low, the transmitter sends **K28.5**, and its `op_en` output
stays low. K28.5 contains a *comma*, `0011111` or `1100000` in bits a–g. No
sequence of valid data characters produces a comma across a character
boundary. The deserializer uses this:

* When bits a–g of the 10 bits it has just assembled form a comma, it takes
  those 10 bits as a whole word and restarts its bit counter.
* `aligned` goes high with the first comma.
* `slip` pulses whenever a comma moves the boundary.

Until alignment, the decoder ignores the line. Afterwards it decodes every
word, including idle K28.5s. These arrive as `rx_valid` with `rx_k = 1` and
`rx_data = 8'hBC`. A K28.5 that the user sends deliberately looks the same.

**Usage rule.** K28.7 must not be followed by K28.x, D3.y, D11.y, D12.y,
D19.y, D20.y or D28.y. Those pairs form a false comma across the boundary,
and the receiver would realign on it. This is a property of the 8b/10b code,
not of this RTL. The end-to-end test enforces the rule on its random stream.

## Modules

| File | Module | What it is |
|---|---|---|
| `rtl/enc8b10b_pkg.sv` | package | Code tables, the `encode` and `decode` functions, and the symbol and result types |
| `rtl/ripple_down_counter.sv` | `ripple_down_counter #(WIDTH=3)` | Asynchronous down counter. `clk_div` is the last stage |
| `rtl/enc_8b10b.sv` | `enc_8b10b` | Registered encoder with RD state, idle fill and `k_err` |
| `rtl/serializer_piso.sv` | `serializer_piso #(W=10)` | Parallel-in serial-out register. Loads on every W-th bit clock and sends bit 0 first |
| `rtl/deserializer_sipo.sv` | `deserializer_sipo` | Serial-in parallel-out register with comma alignment |
| `rtl/dec_10b8b.sv` | `dec_10b8b` | Registered decoder with RD tracking and `code_err`/`disp_err` |
| `rtl/serdes_8b10b_top.sv` | `serdes_8b10b_top` | Transmitter and receiver. The line is left as ports (`serial_out`, `serial_in`) |

The enable names `ip_en` and `op_en` on the encoder and decoder are taken
from the original design's simulation traces. `ip` and `op` follow the same
pattern.

**Latency and rate.** The link carries one character per word clock in each
direction. Input to output latency:

| Path | Latency |
|---|---|
| Encoder | 1 word clock |
| Decoder | 1 word clock |
| Whole loopback link, at the testbench clock phases | 2 word clocks (160 ns at 80 ns per word) |

The end-to-end testbench checks that the loopback latency is constant.

**Size after coarse synthesis.** The encoder is about 120 cells with 13
flip-flops. The decoder is about 590 cells: its table search is unrolled into
comparators. The whole link has 71 flip-flops.

## Simulation

Each testbench checks itself. It prints `TB_RESULT checks=N failures=M` and
stops through a watchdog if it hangs. Build one with Verilator 5, for
example:

```
verilator --binary --timing --assert rtl/enc8b10b_pkg.sv rtl/*.sv \
    tb/tb_serdes_8b10b_top.sv --top-module tb_serdes_8b10b_top
./obj_dir/Vtb_serdes_8b10b_top
```

| Testbench | What it shows |
|---|---|
| `tb_ripple_down_counter` | The down sequence, divide-by-8 rate and duty cycle, and the asynchronous reset |
| `tb_enc_8b10b` | Written-out reference code groups under both RDs, including D.7, x.3, A7 and all K characters. Also, over all 256 bytes and a random stream: 4–6 ones per group, sub-block disparity allowed by RD, run length ≤ 5, no comma in data, unique code groups. Also idle fill, `k_err` and reset |
| `tb_dec_10b8b` | Reference code groups, a stream produced by the encoder, and the error cases: wrong disparity, a non-code, a misused A7, and a first symbol under either RD |
| `tb_serializer_piso` | Every line bit against words captured at the load edge, and load spacing |
| `tb_deserializer_sipo` | Alignment from a random bit offset, every word after it, strobe spacing, and realignment after an inserted bit |
| `tb_serdes_8b10b_top` | The whole link at its default parameters, looped back. It sends all data bytes, all twelve K characters, idle gaps and 3000 random characters. It checks data, order, constant latency, 8 clocks and 10 bits per word, run length and running-sum bounds, and detection of bits flipped on the line. It fails if idle fill, alignment, either RD, A7, `k_err` or error detection never occurred |
| `tb_fig42_stream` | The example stream D0.0, D31.5, D0.0, K28.5 from RD-. The exact 40 line bits (`100111 0100 101011 1010 011000 1011 110000 0101`) must appear, and the four characters must come back |

Every testbench runs in well under a second.

## Departures from the source design

* **Ripple counter or no ripple counter.** The source design is titled as
  working *without* a ripple counter. Its architecture and results, however,
  clock both the encoder and the decoder from a 3-bit down ripple counter.
  This RTL follows the architecture.
* **Clock gating and pulse triggering.** The source design names these as
  its power techniques but does not describe any gating cell or pulse
  generator. None is included here. The ripple-counter clock division is the
  only clock-side structure.
* **Code tables.** The source design names the Widmer–Franaszek 8b/10b code
  but does not print its tables. The standard tables are used.
* **Ten code bits.** One remark in the source design says only 8 of the 10
  bits carry data and 2 serve "as a clock". That contradicts its own
  description of the 6b/4b mapping, and the mapping is what is built: all ten
  bits are code.
* **Choices made here, where the source design is silent:**
  * idle fill with K28.5;
  * comma alignment in the deserializer;
  * the `k_err`, `code_err` and `disp_err` flags;
  * the reset values and asynchronous reset;
  * the accept-either-RD start-up of the decoder;
  * the 1.25× bit-clock relation and the fixed-phase hand-off between clock
    domains.
* **Not included.** Clock and data recovery (PLL) and the transmission medium
  are not part of the RTL. No power figures are reproduced. Whether the design
  would reach a USB 3.0 line rate of 5 Gbit/s (a 625 MHz word clock) depends
  on the target process and was not assessed.
