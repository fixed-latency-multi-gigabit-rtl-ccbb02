# Fixed-latency 2.5 Gb/s serial link over an FPGA transceiver

A multi-gigabit transceiver (SerDes) moves data reliably, but its latency is
not the same after every power-up or relock. On the transmit side, the word
clock of the serializer comes up at an arbitrary phase. On the receive side, the
clock-recovery loop (CDR) locks to an arbitrary bit of the word, and the usual
comma aligner then shifts the data to the right word boundary. That shift
leaves the recovered clock at whatever phase it happened to have. Systems that
distribute timing or trigger information over such links need the same
latency every time, to well under a bit period.

This design gets a fixed latency out of a Xilinx-GTP-style transceiver. It does
so without changing the transceiver, by how it configures it and by a little
logic in the FPGA fabric:

* **Transmitter.** After every lock, the transceiver's phase-alignment circuit
  (input `TXPHASE`) pulls the serializer's word clock into a fixed relation
  with the user clock. The user clock is made from the reference by a DLL, so
  it has a fixed phase too. The transmit FIFO is bypassed.
* **Receiver.** The transceiver's own comma aligner is switched off. A fabric
  block finds the comma in the raw 10-bit words and works out how many
  one-bit slides are needed. It accepts only locks that need an even number
  of slides; for an odd number it resets the transceiver and waits for a new
  lock. The reason is given below. The result is that the recovered clock
  always ends up at the same phase relative to the word boundary.

Everything is written in SystemVerilog. The transceiver, PLLs, DLL and CDR are
behavioural models. The fabric logic (comma aligner, 8b10b decoder,
phase-alignment sequencer and pattern generator) is synthesizable. So are the
8b10b encoder and the digital parts of the receive PMA model (SIPO, clock
divider/shifter, barrel shifter).

Beside the link sits the data path of the GBT system that such links serve.
It is described under *GBT frame and its Reed–Solomon protection* below, and
is fully synthesizable:

* the 120-bit frame builder;
* its Reed–Solomon encoder and two-error corrector;
* the 32 e-links at 80 Mb/s.

## The link

| Item | Value |
|---|---|
| Line rate | 2.5 Gb/s, 400 ps per bit |
| Line code | 8b10b; K28.5 is the comma |
| User clock | 250 MHz, one 10-bit word per cycle |
| Reference clocks | 62.5 MHz for each transceiver |
| Transmit bit clock | PLL × 40 |
| Transmit user clock | DLL × 4 from the transceiver's `REFCLKOUT` |
| Receive clocks | `RXRECCLK`, the recovered word clock. It also drives `RXUSRCLK2` and all receive fabric logic. |

Bit ordering throughout: bit 0 of a 10-bit word is 8b10b bit `a`, and it is
sent and received first. K28.5 is `0x17C` from negative disparity and `0x283`
from positive.

## Why odd slides are rejected: the bit-slip mechanism

In PMA mode, the transceiver moves the word boundary one bit per pulse of
`RXSLIDE`. This is modelled as follows (`gtp_rx_model`):

* The CDR (`cdr_model`) produces `HSCLK` at half the bit rate. Both of its edges
  sample the line.
* `sipo_ddr` collects ten bits on the two edges of `HSCLK` and hands the word
  over on `RXRECCLK`.
* `clk_div_shifter` divides `HSCLK` by 5 to make `RXRECCLK`. The divide-by-5
  feeds a 5-stage shift register, and a multiplexer picks one of the five taps.
  A modulo-10 counter `Q` counts `RXSLIDE` pulses; its bits `Q(3:1)` select
  the tap, so every second slide moves the recovered clock by one `HSCLK`
  period (2 bits).
* `barrel_shift1`, driven by `Q(0)`, adds a one-bit data shift on the odd
  counts.

So a given word boundary can be reached in two ways, from the clock phase
that the CDR offers: with an even number of slides (a pure clock move) or an odd
number (a clock move plus a one-bit data shift). The two differ by one bit
of latency. A receiver that accepts both parities has a one-bit ambiguity.
This design accepts only even counts. That pins the recovered clock to one
phase relative to the incoming word boundary.

The barrel shifter brings in bit 9 of the *previous* word, so its output is
always a contiguous 10-bit window of the stream. The shifter's diagram marks
the shifted input "8..0,9", which could also be read as a rotation of one
word. A rotation would corrupt the data, so it is not used.

## Comma detector and aligner (`comma_aligner`)

The aligner runs on `RXRECCLK` and sees the raw 10-bit words.

1. **Reset and relock.** Pulse the transceiver reset (`RESET_CYCLES`), then
   wait `RELOCK_CYCLES` for the CDR to lock again.
2. **Search.** Form the 20-bit window {current word, previous word} and look
   for the 7-bit comma `0011111` or `1100000` at offsets p = 0..9. The lowest
   offset wins. The symbols start p bits into each word, so
   n = (10 − p) mod 10 slides are needed.
3. **Odd n.** Strobe `reject` and go back to step 1.
4. **Even n.** Issue n single-cycle `RXSLIDE` pulses, `SLIDE_GAP` cycles apart,
   then raise `ALIGNED`. If n = 0, raise `ALIGNED` at once.
5. **Aligned.** A comma at a nonzero offset drops `ALIGNED` and restarts from
   step 1.

n is known from the first comma, so no trial slides are needed. Assertions
check two things: `RXSLIDE` is a one-cycle pulse, and it never coincides with
the transceiver reset.

## Transmit phase alignment (`phase_align_ctrl`, `gtp_tx_model`)

`phase_align_ctrl` waits for the PLL and DLL lock (through a two-flop
synchronizer) and then waits `WAIT_CYCLES`. It holds `TXPHASE` high for
`ALIGN_CYCLES` and then raises `tx_ready`. A loss of lock restarts the
sequence.

In `gtp_tx_model`, the serializer's divide-by-10 word clock takes a random
phase at each PLL lock. While `TXPHASE` is high, it is forced to load the
serializer `XCLK_OFFSET` bits after each user-clock edge. After that it
free-runs at that phase.

The transmit data path is:

1. the interface register;
2. `enc_8b10b`;
3. a single register standing for the bypassed FIFO;
4. the serializer.

## Latency

The end-to-end testbench takes the marker from the pattern generator's
output register to the decoder's output register. Without cable, the
measured latency is **63 085 ps (15.77 user-clock cycles)**. It is the same
after every one of 9 locks, with random CDR phases, slide counts of 0, 4, 6
and 8, and three transmitter power cycles. The figure agrees with a hand
count of the pipeline to the picosecond.

| Section | Reference budget (cycles) | This model |
|---|---|---|
| TX interface | 1 | 1 |
| TX 8b10b encoder | 1 | 1 |
| TX FIFO, bypassed | 1 | 1 |
| TX serial | 2 | 0.5 to the load, then 10 bits |
| RX serial | 1.5 | CDR, SIPO, barrel shifter, about 1 |
| RX comma detector, bypassed | 3 | 3 |
| RX FIFO | 5 | 5 |
| RX interface | 2 | 2 |
| RX 10b/8b decoder | 1 | 1 |
| **Total** | **17.5 (70 ns)** | **15.77 (63.1 ns)** |

The reference budget is for the real device. The difference is all in the two
serial sections, whose insides the models only approximate. The measured
hardware latency quoted for this kind of link (about 83 ns, 40 ps rms) includes
board traces and cables, which the model does not have. What the model does
show is the property that matters: the latency does not change from lock to
lock.

## GBT frame and its Reed–Solomon protection

Fixed-latency links like this one are meant to carry the GBT frame used in
detector readout: 120 bits per 25 ns bunch-crossing interval (4.8 Gb/s).
The frame is sent most significant bit first:

| Field | Width | Meaning |
|---|---|---|
| H | 4 | header, `0101` here |
| SC | 4 | slow control (160 Mb/s) |
| TTC | 16 | timing and trigger control (640 Mb/s) |
| D | 64 | data (2.56 Gb/s) |
| FEC | 32 | check symbols |

The FEC field carries two interleaved Reed–Solomon codewords. Each is
RS(15,11) over GF(16) (4-bit symbols) and corrects two symbol errors.
Together the two codewords hold exactly the 88 bits of H, SC, TTC and D,
plus 2 × 16 check bits. How the code is built:

* **Field.** GF(16) is built on x⁴ + x + 1.
* **Generator.** The generator polynomial has the roots α, α², α³ and α⁴.
* **Interleaving.** Symbol j, counted from the top, belongs to codeword
  j mod 2, in both the information part and the FEC field.

As a result, any burst of up to 13 wrong bits is corrected, or up to 16 wrong
bits if the burst starts on a symbol boundary.

The modules:

* `gbt_frame_tx` assembles the frame once per 40 MHz clock, with one clock of
  latency. It uses `gbt_rs_enc`, an unrolled division by the generator
  polynomial.
* `gbt_frame_rx` de-interleaves the frame and corrects each codeword with
  `gbt_rs_dec`, which works in three steps:
  1. the syndromes;
  2. the two-error locator, solved directly;
  3. a root search over the 15 positions, then Forney error values.

  `gbt_frame_rx` flags frames it corrected and frames it could not correct.

`gbt_elink` sends the 64-bit data field out over 32 e-links at 80 Mb/s, two
bits per link per 25 ns frame:

* link i carries bit 2i+1 of the field, then bit 2i;
* the return direction is gathered the same way.

A front-end chip that needs more than 80 Mb/s uses several adjacent links.

In the top, the frame builder, corrector and e-links stand beside the
2.5 Gb/s link with their own ports. The corrected data field drives the
e-links. A frame runs at 4.8 Gb/s, which the 2.5 Gb/s link cannot carry.

## Files

| File | What it is |
|---|---|
| `rtl/fl_link_pkg.sv` | Symbol type (`sym_t`: `is_k` + byte) and the 8b10b comma constants |
| `rtl/fl_link_top.sv` | Whole link: transmit side, receive side, the serial line as ports; beside it the GBT frame builder, corrector and e-links |
| `rtl/payload_gen.sv` | Programmable 16-entry pattern of data and control symbols |
| `rtl/phase_align_ctrl.sv` | `TXPHASE` sequencer |
| `rtl/enc_8b10b.sv`, `rtl/dec_8b10b.sv` | 8b10b encoder (inside the TX model) and fabric decoder |
| `rtl/comma_aligner.sv` | Fabric comma detector and aligner |
| `rtl/sipo_ddr.sv`, `rtl/clk_div_shifter.sv`, `rtl/barrel_shift1.sv` | Receive PMA bit-slip logic |
| `rtl/gtp_tx_model.sv`, `rtl/gtp_rx_model.sv` | Behavioural transceiver halves |
| `rtl/pll_model.sv`, `rtl/dll_model.sv`, `rtl/cdr_model.sv` | Behavioural clock models |
| `rtl/gbt_pkg.sv` | GBT frame widths and GF(16) arithmetic |
| `rtl/gbt_frame_tx.sv`, `rtl/gbt_rs_enc.sv` | GBT frame builder and RS(15,11) encoder |
| `rtl/gbt_frame_rx.sv`, `rtl/gbt_rs_dec.sv` | GBT frame unpacker and two-error RS decoder |
| `rtl/gbt_elink.sv` | 32 e-link ports at 80 Mb/s |
| `tb/<module>_tb.sv` | One self-checking testbench per module (the decoder is tested through `gbt_frame_rx_tb`) |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. For
example, for the whole link at its default parameters:

```
verilator --binary --timing --assert -Irtl rtl/fl_link_pkg.sv rtl/gbt_pkg.sv \
    tb/fl_link_top_tb.sv --top-module fl_link_top_tb
./obj_dir/Vfl_link_top_tb +verilator+rand+reset+2
```

The end-to-end run simulates about 150 µs, in a few seconds. It also
sends 100 GBT frames, loops each back with one symbol corrupted, and checks
that the receiver corrects it. It also loops the e-links back and checks
each word.

The cable in `fl_link_top_tb` is a delay line sampled every 10 ps, so
measured latencies are exact to one 10 ps step. The testbench also counts the
mechanisms of the design and fails if one never happened:

* transmit alignments;
* odd-n rejections;
* `RXSLIDE` pulses;
* alignments.

## Departures and open points

Parameters not fixed by the original design, each chosen here:

| Parameter | Value |
|---|---|
| `WAIT_CYCLES` | 32 |
| `ALIGN_CYCLES` | 8192 (the vendor's TXPHASE procedure is not reproduced) |
| `RESET_CYCLES` | 4 |
| `RELOCK_CYCLES` | 64 |
| `SLIDE_GAP` | 32 |
| `PATTERN_LEN` | 16 |
| `XCLK_OFFSET` | 5 |
| PLL/DLL lock times | see the model files |

Other departures:

* **Receive user clock.** `RXUSRCLK2` is taken straight from `RXRECCLK`.
* **Odd-slide data input.** The barrel shifter's odd-slide input is read as a
  window over two words (see above).
* **Direction of the clock step.** Each even slide makes the recovered clock
  sample two bits earlier, so the data moves towards bit 9. This matches the
  slide waveform `0000000001 → 0000000010 → 0000000100`.
* **Loss of alignment.** Dropping `ALIGNED` and resetting when a comma appears
  at a nonzero offset is this design's own rule.
* **CDR model.** The CDR is ideal: no jitter and no frequency offset. Its
  phase and lock time are random at each lock.
* **Serial sections.** The two serial sections are shorter than the
  reference budget (see *Latency*).
* **8b10b.** The code tables are the standard ones. The decoder does not flag
  disparity errors.
* **GBT code parameters.** Only the frame's field widths and "interleaved,
  double-error-correcting Reed–Solomon" are given for the GBT FEC. The
  following are this design's own reading:
  * the symbol size;
  * the field and generator polynomials;
  * the interleaving pattern;
  * the header value.

  A receiver built to another reading will not interoperate.
* **Not included.** The following parts of the GBT system are not included:
  * the 4.8 Gb/s serializer;
  * the e-links' packet protocol, which is left to their users;
  * Precision Time Protocol time distribution (a software protocol).
