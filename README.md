# Byte-stream baseband for an FPGA OFDM link

An OFDM receiver gets one complex value per subcarrier from its FFT.
Everything after that value is byte-level processing: the value is turned
back into bits, the bits into bytes, the bytes are put back in their
original order, and errors are corrected. This RTL implements that chain
and its mirror image on the transmit side:

```
 transmit   bytes -> rs_encoder -> interleaver -> parallel_serial -> qpsk_mod -> tx_sym  (to an IFFT)
 receive    rx_sym (from an FFT) -> qpsk_demod -> serial_parallel -> deinterleaver -> rs_decoder -> bytes
```

The design follows a published FPGA OFDM receiver built from these parts: an
FFT, a serial/parallel converter, a QPSK modem, a Reed-Solomon (RS) codec
and a block (de)interleaver. That design takes the FFT from a vendor IP
core. The FFT is therefore not part of this RTL: the top level
`ofdm_system` brings the IFFT input and the FFT output out as ports.

The source gives the structure, the 8-bit data path, the 6 x 6 interleaver
matrix and how the shift registers work. It does not give the RS code, the
QPSK constellation, any handshake, or the pin meanings. Those are this
implementation's choices. They are listed under "Departures and choices"
below, and each file's header comment says which parts are which.

## Frame structure: why the interleaver and the code fit together

With the default parameters:

| quantity | value |
|---|---|
| RS code | RS(12, 8) over GF(2^8), corrects T = 2 bytes per codeword |
| interleaver frame | 6 x 6 bytes = 36 bytes = 3 codewords |
| bits per frame | 288 |
| QPSK symbols per frame | 144 (2 bits each) |

On the transmit side the encoder writes codewords into the matrix row by
row. Codeword 0 fills rows 0-1, codeword 1 rows 2-3, codeword 2 rows 4-5.
The matrix is read column by column, so every six consecutive transmitted
bytes hold one byte from each row. That is two bytes from each codeword.

A channel burst that corrupts up to 6 consecutive bytes therefore puts at
most 2 errors into each codeword, and every codeword can still be
corrected. In QPSK symbols, any burst of up to 21 symbols touches at most 6
bytes. Without the interleaver, a burst of 3 bytes would already be too much
for one codeword. The end-to-end test checks exactly this: it counts frames
with more than T corrupted bytes that were still decoded without error.

Frame alignment:

* The transmit interleaver counts frames from reset. `tx_sym_sop` and
  `tx_sym_eop` mark symbols 0 and 143 of each frame.
* On the receive side, `rx_sym_sop` must mark the first symbol of a frame.
  It restarts the bit counter of the serial/parallel converter and the
  write address of the deinterleaver. Because a frame holds whole
  codewords, a frame start is also a codeword start for the RS decoder.
* `ofdm_system` refuses to elaborate if `IL_ROWS*IL_COLS` is not a multiple
  of `RS_N`.

## The Reed-Solomon decoder

`rs_decoder` is the largest block: about 1,500 of the 1,800 word-level
cells in the whole design, plus ROM copies of the 2-kbit inverse table. It accepts one byte per cycle, and codewords may
arrive back to back. It works in three overlapped stages.

1. **Syndromes, while the codeword arrives.** Each byte is stored in one of
   two buffer banks. At the same time the 2T syndromes
   `S_j = r(a^j)`, `j = 0..2T-1`, are accumulated by Horner's rule. Each
   step is a multiplication by the constant `a^j`, which is a fixed XOR
   network.
2. **Berlekamp-Massey, in one cycle.** In the cycle after the last byte,
   an unrolled combinational Berlekamp-Massey turns the syndromes into the
   error locator `L(x)`. The evaluator `W(x) = S(x) L(x) mod x^2T` is
   formed in the same cycle. Both are pre-multiplied by the Chien start
   values `a^(-j(N-1))`, because the first byte sent is the coefficient of
   `x^(N-1)`.
3. **Chien search and Forney correction, while the codeword leaves.** The
   stored bytes are read out one per cycle. Each Chien term is multiplied by
   its constant `a^j` per step, so the sums are `L` and `W` at the inverse
   location of the current byte. Where `L` is zero, the error value is
   `W / L_odd`, where `L_odd` is the sum of the odd-degree terms of `L`.
   This is Forney's rule for generator roots that start at `a^0`. The
   error value is XORed onto the byte.

A codeword is **decodable** when the number of roots found in the N real
positions equals the degree of `L`, and that degree is at most T.
`source_en` (top level: `rx_ok`) reports this together with the codeword's
last byte. If there are more than T errors, the codeword is usually flagged.
Occasionally it decodes into a different valid codeword, which no decoder
can detect. The testbenches accept that case only when the output really is
a codeword.

Timing: the first output byte appears 3 cycles after the last input byte,
and a codeword leaves in N consecutive cycles.

`sink_en` (top level: `rx_correct_en`) is sampled at the last byte of each
codeword. When it is low, that codeword passes through unchanged but is
still checked.

The encoder `rs_encoder` is the usual systematic LFSR. The generator is
`g(x) = (x + a^0)(x + a^1)...(x + a^(N-K-1))`. Its coefficients are
computed at elaboration time, so every tap is a constant multiplier. The
field is GF(2^8) with primitive polynomial `x^8 + x^4 + x^3 + x^2 + 1`
(0x11D) and `a = 0x02`. The shared functions live in `ofdm_pkg`.

## Blocks

| module | role | what comes from the source design |
|---|---|---|
| `serial_parallel` | bit -> byte: shifts left, new bit at the LSB, flags each full byte | the shift rule, 8 bits, pins clk/en/rst/cin/cout |
| `parallel_serial` | byte -> bit: load, then shift left, MSB first | the shift rule, 8 bits |
| `interleaver` | 6 x 6 block interleaver, row in / column out, double buffered | the row/column rule and matrix size, pin names |
| `deinterleaver` | the interleaver core on the transposed matrix | function only |
| `rs_encoder` | systematic RS(12,8) encoder | "RS code with fixed-form multipliers" |
| `rs_decoder` | RS(12,8) decoder, see above | function, pin names |
| `qpsk_mod` | two serial bits -> one I/Q point | function, pin names |
| `qpsk_demod` | I/Q -> two serial bits by sign | function |
| `ofdm_system` | both chains, with FFT/IFFT ports | block set and receive order |
| `ofdm_pkg` | widths, `iq_t`, GF(2^8) functions | - |

## Interfaces and timing

All blocks share one clock and use a synchronous, active-high reset.

**Byte streams.** The transmit byte streams use valid/ready handshakes:
`tx_valid`/`tx_ready` at the top, and `source_r`/`source_ready` between the
encoder, the interleaver and the P/S converter. The receive side has no
backpressure, because the stream arrives at channel rate.

**Frame markers.** The printed pin names `sink_r`, `sink_s` and `sink_t`
(and `source_r/s/t`) are used as valid, first-of-frame and last-of-frame.
The interleaver's output pins `source_cnt`, `source_cnt1` and
`source_cnt2` have the same roles.

**Transmit rate.** The P/S converter sends one bit per cycle, so a QPSK
symbol leaves every 2 cycles and a byte every 8 cycles. Upstream of the
P/S converter bytes move at up to one per cycle, so the encoder fills the
interleaver banks in bursts. `tx_ready` is low while both banks hold
unsent frames, and while the encoder sends its 4 parity bytes. On average
the chain takes K/N of a byte every 8 cycles.

**Receive rate.** Received symbols must be at least 2 cycles apart. This
is checked by an assertion in `qpsk_demod`. Each symbol yields two bits on
consecutive cycles.

**Latency.** The interleaver and the deinterleaver each hold one frame,
which gives one frame of latency each. The RS decoder adds 3 cycles.

**Symbols.** A symbol is `iq_t`, a pair of signed 16-bit values. The mapper
sends ±8192 on each axis: bit 0 gives +8192 and bit 1 gives -8192. The
first bit of a pair goes on I, the second on Q. This is a Gray mapping. The
demapper looks only at the signs, so any positive gain from the FFT is
harmless.

## Departures and choices

* **FFT/IFFT not included.** They are vendor cores in the source design.
  Their size, scaling and interface are unknown, so they are ports here.
* **RS(12, 8).** The source names an RS code but gives no parameters.
  RS(12, 8) was chosen so that three codewords fill one 36-byte frame, with
  two bytes of each codeword in every column (see above). The field and
  generator are the common 0x11D / roots from `a^0`.
* **Multipliers.** The source suggests look-up-table multipliers in fixed
  form. Constant multipliers are used wherever one operand is fixed: the
  encoder taps, syndromes and Chien steps. Berlekamp-Massey and Forney need
  general multipliers, built as shift-and-add logic. The field inverse they
  also need is a 256-entry look-up table, computed at elaboration from
  `a^-1 = a^254`.
* **Interleaver width.** The printed interleaver symbol shows a 2-bit data
  port, but the text states an 8-bit data path. 8 bits is used; `W` is a
  parameter.
* **Order of the receive chain.** The source's flow chart puts a P/S
  converter before and after the FFT and draws no de-interleaver. Here the
  serial/parallel step is at bit level after the QPSK demapper, as the
  source's shift-register description implies. The deinterleaver sits
  before the RS decoder, the inverse of the transmit order.
* **Transmit chain.** The source lists encoder, interleaver and modulator
  among its modules but shows only the receive flow. The transmit chain here
  mirrors the receive chain.
* **Handshakes, frame markers, pin meanings, constellation, demapper
  decision rule and reset polarity** are all this implementation's choices.
* **Shift-register outputs.** `serial_parallel` adds a word-complete pulse
  (`cout_vld`) and a frame flag to the printed `cout` port.
  `parallel_serial` has no printed symbol; its ports are this design's.

## Simulating

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=<n> failures=<n>` and stops itself after a fixed number
of cycles if the block hangs. `tb/tb_gf_pkg.sv` is a reference GF(2^8)/RS
model for the testbenches. It uses log/antilog tables and polynomial long
division, so it does not share the RTL's arithmetic.

| testbench | what it checks |
|---|---|
| `tb_serial_parallel` | word register and word pulse every cycle against a model; random enable and frame starts |
| `tb_parallel_serial` | rebuilt bytes, markers, 8 cycles per byte with no gaps |
| `tb_interleaver` | column-wise order of numbered frames (the first frame is 1..36), random stalls on both sides, realignment, full-rate streaming |
| `tb_deinterleaver` | restored order for 6x6 and for 3x5 matrices |
| `tb_rs_encoder` | every codeword against long division, with stalls |
| `tb_rs_decoder` | 0..T+2 random errors, back to back and with gaps; correction, detection, bypass, 3-cycle latency |
| `tb_qpsk_mod`, `tb_qpsk_demod` | mapping, bit order, markers, noisy inputs |
| `tb_ofdm_system` | end to end at default sizes, see below |
| `tb_ofdm_link` | receive chain fed by a real FFT, see below |

`tb_ofdm_system` sends 60 frames through the transmit chain. It checks
every transmitted symbol against its own encoder, interleaver and mapper.
It then loops the symbols back to the receiver through a channel model,
which stands in for the IFFT/FFT pair. The channel adds noise that keeps
the quadrant and, in selected frames, corrupts bursts of symbols. The
frames rotate through five cases:

* noise only;
* a short burst;
* a 21-symbol burst;
* a 64-symbol burst, which must be flagged;
* a burst with correction switched off.

Before the first frame, the receiver also gets some stray symbols without a
frame start, as if it had been switched on mid-stream. The first frame
start must realign it.

The testbench fails if any of these never occurs: clean, corrected,
flagged and bypassed codewords, corrected bursts of more than T bytes,
stray symbols, and transmit backpressure.

`tb_ofdm_link` replaces the loopback with an OFDM channel model. It places
each group of 48 transmitted symbols on the carriers of a 64-point OFDM
symbol: carriers 1..24 and 40..63, with DC and the band edges left empty.
It then takes the inverse DFT, adds Gaussian noise to the time samples,
takes the forward DFT and rounds the carriers to the 16-bit I/Q format.
One 36-byte frame fills exactly three OFDM symbols. The FFT size and the
carrier plan belong to this testbench, not to the RTL. The testbench makes
its own hard decisions to know which bytes arrive wrong. It checks that
every codeword with at most T wrong bytes is corrected, and it fails unless
some codewords needed correction.

Build and run one testbench with Verilator 5, from the directory that
holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/ofdm_pkg.sv tb/tb_gf_pkg.sv tb/tb_ofdm_system.sv --top-module tb_ofdm_system
./obj_dir/Vtb_ofdm_system
```

Replace the testbench name to run another one; `-y` finds the modules it
uses. Every testbench finishes in well under a second.

## Changing the design

* **Code strength.** Set `RS_N`/`RS_K` on `ofdm_system`, or `N`/`K` on
  the codec. `N-K` must be even, and `N <= 255`. The decoder's
  Berlekamp-Massey is unrolled over `N-K` steps, so its logic grows roughly
  with `(N-K)^2`.
* **Interleaver depth.** Set `IL_ROWS`/`IL_COLS`. Keep the frame a
  multiple of `RS_N`. To keep the burst protection, every column should hold
  at most T bytes of any one codeword.
* **Sample width and amplitude.** Set `IQ_W` and `QPSK_AMP` in `ofdm_pkg`.
