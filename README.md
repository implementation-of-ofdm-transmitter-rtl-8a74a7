# 16-QAM OFDM transmitter and receiver with an 8-point FFT

This is synthesizable SystemVerilog for a small baseband OFDM (orthogonal
frequency-division multiplexing) link. The transmitter turns each 4-bit input
value into one OFDM symbol. The receiver turns each symbol back into its
frequency-domain sub-carriers. The design follows a published FPGA OFDM
transceiver, "Implementation of OFDM transmitter and receiver on FPGA with
Verilog using Mixed Radix8-2 Algorithms". The last sections list where this
RTL departs from that description and what it fills in.

The idea: a 16-QAM point is copied onto four adjacent sub-carriers of an
8-point symbol. The remaining four sub-carriers are zero. An 8-point inverse
FFT turns the symbol into eight time samples. A 2-sample cyclic prefix goes
in front, and the 10 complex samples leave as 20 16-bit words. The receiver
drops the prefix, runs the forward FFT and returns the four data
sub-carriers. Each of them equals the transmitted QAM point to within a few
LSBs.

## Signal chain

```
 transmitter (ofdm_transmitter)
 in_data[3:0] --> qam16_mapper --> symbol_generator --> zero_padding --> tx_ifft --> cyclic_prefix --> output_module --> 16-bit words
   (FIFO)          1 point          4 copies            8 bins          2 x fft8      10 samples        20 words
      ^                                                                                                   |
      +------------------------------------- control_unit <------------- symbol_done --------------------+

 receiver (ofdm_receiver)
 16-bit words --> cp_removal --> serial_to_parallel --> fft8 (forward) --> rx_parallel_to_serial --> 4 sub-carriers
                  drop 4 words    8 complex samples      8 bins             bins 2..5, one per clock
```

`ofdm_transceiver` is the top. It holds both halves and feeds the
transmitter's word stream straight into the receiver, as an ideal channel.
The transmitter stream is also brought out on the top's `tx_*` ports.

## Symbol format

| stage | content (per symbol) |
|---|---|
| input | one 4-bit nibble `d` |
| QAM point | `S = I + jQ`, I from `d[3:2]`, Q from `d[1:0]`; Gray code 00→−3, 01→−1, 11→+1, 10→+3, times 2048 |
| frequency bins | `X = [0, 0, S, S, S, S, 0, 0]` (bins 0..7), for I and Q separately: 8 × 16 bits = 128 bits each |
| time samples | `x[n] = (1/8) Σ_k X[k]·e^{+j2πkn/8}`, n = 0..7, complex, 16 bits per part |
| with prefix | `x[6], x[7], x[0], …, x[7]` (10 samples) |
| output words | `re(x[6]), im(x[6]), re(x[7]), im(x[7]), re(x[0]), …, im(x[7])` (20 words) |

The largest time-domain value is about ±4350, so 16 bits leave ample
headroom. All arithmetic is two's complement. The package `ofdm_pkg` holds
the sizes, the sample types (`sample_t` is 16 bits; `cplx_t` packs the real
part above the imaginary part) and the QAM level function.

## The 8-point FFT core (`fft8`)

The same core serves as the transmitter's IFFT (`INVERSE = 1`) and the
receiver's FFT (`INVERSE = 0`). It computes the 8-point transform as three
radix-2 decimation-in-frequency stages. Each stage ends in a register:

1. butterflies on samples (n, n+4); the difference is multiplied by W8^n
2. butterflies on (n, n+2) inside each half; the difference is multiplied by W8^(2n)
3. butterflies on (n, n+1)

Here W8 = e^(−j2π/8) for the forward transform and its conjugate for the
inverse. Multiplying by W8^0 costs nothing. W8^2 (±j) is a swap and a
negation. W8^1 and W8^3 are (±1 ± j)/√2: a sum or difference of the two
parts, then one multiplication by 11585 = round(2^14/√2), rounded to
nearest. The core therefore needs only four constant multipliers. The last
stage delivers the bins in bit-reversed order, and the output port is wired
back into natural order.

Internal words are 21 bits, so no stage can overflow for any 16-bit input.
The inverse transform divides by 8 at the output, with rounding. The forward
transform is unscaled. Both saturate to 16 bits. An IFFT followed by an FFT
therefore returns its input. Against a floating-point DFT the core is within
1 LSB on random vectors with parts up to ±4000.

The core is fully pipelined. It takes a new vector every clock and delivers
the result 3 clocks later.

### Two IFFTs for one complex symbol (`tx_ifft`)

The transmitter uses two IFFT cores, one for the in-phase bins and one for
the quadrature bins. Each core gets its bin vector as a purely real input.
Because the transform is linear, the wanted complex result is
`x = IFFT(I) + j·IFFT(Q)`. A registered combiner forms it:
`x.re = A.re − B.im` and `x.im = A.im + B.re`. The latency is 4 clocks.

## Flow control and timing

The transmitter's input is a show-ahead FIFO. `in_data` is valid while
`readempty` is low, and `readreq` pops it. `control_unit` admits one nibble
at a time. It pops only when idle, then waits for the output module's
`symbol_done`. At most one symbol is inside the transmitter, so no pipeline
stage needs back-pressure. The output side holds on `wrfull`. A word is sent
in every clock in which `out_valid` is high, and `out_valid` is
`busy & !wrfull`, so it depends combinationally on `wrfull`. `start_output`
marks the first word of each symbol.

| event | clock (readreq = 0) |
|---|---|
| QAM point registered | 1 |
| repeated / zero-padded | 2 / 3 |
| IFFT result (2 cores + combiner) | 7 |
| prefix added | 8 |
| first output word | 9 |
| last output word | 28 |
| next readreq (FIFO not empty) | 29 |
| first recovered sub-carrier at the receiver | 34 |
| fourth recovered sub-carrier | 37 |

With `wrfull` low and the FIFO never empty, the throughput is one symbol
(one nibble, 20 words) per 29 clocks. The pipeline fill is not overlapped
with the previous symbol's output.

The receiver counts the words of each symbol. `in_start`, given with the
first word, resets the count, so the receiver re-aligns on every symbol.
`enable` marks valid words; gaps between words are allowed. The first
recovered sub-carrier leaves 6 clocks after the symbol's last word, and the
other three follow on consecutive clocks. The next symbol's words may
arrive immediately.

## Interfaces

`ofdm_transceiver` (parameter `N_CP`, default 2):

| port | dir | width | meaning |
|---|---|---|---|
| `clock` | in | 1 | rising-edge clock |
| `arst_n` | in | 1 | asynchronous active-low reset; clears all state and valid flags |
| `in_data` | in | 4 | nibble at the head of the input FIFO |
| `readempty` | in | 1 | input FIFO empty |
| `readreq` | out | 1 | pop the input FIFO |
| `wrfull` | in | 1 | transmit sink cannot take a word this clock |
| `tx_data` | out | 16 | transmitted word |
| `tx_valid` | out | 1 | `tx_data` is taken this clock |
| `start_output` | out | 1 | first word of a symbol |
| `rx_re`, `rx_im` | out | 16 each | recovered data sub-carrier |
| `rx_valid` | out | 1 | `rx_re`/`rx_im` valid |
| `rx_index` | out | 2 | which of the four data sub-carriers |

`ofdm_transmitter` and `ofdm_receiver` can each be used on their own. The
receiver's input ports are `enable`, `in_start` and `in_data[15:0]`. Its
outputs are `out_re`, `out_im`, `out_valid` and `out_index`.

## Relation to the original description

Taken from it:

- the transmitter chain: 16-QAM, symbol generator, zero padding, IFFT, cyclic prefix, output module
- the 4-bit input and the 16-bit in-phase and quadrature components
- the four-fold repetition (64 bits), the 32 zero bits on each side (128 bits) and the 8-point, 16-bit transform
- two IFFT modules, one per component
- a 16-bit output word
- the receiver chain: prefix removal, serial-to-parallel, FFT, parallel-to-serial
- the names of the top-level ports: `clock`, `arst_n`, `in_data`, `readempty`, `readreq`, `wrfull`, `start_output`, `enable`

Chosen here, because the description does not give them:

- the 16-QAM constellation, bit order and amplitude
- the position of the data bins (2..5)
- the FFT stage structure, twiddle precision and scaling
- how the two IFFT outputs are combined
- the prefix length of 2 samples
- the real-then-imaginary word order
- the FIFO handshake, `out_valid` and the one-symbol-at-a-time controller
- the receiver's `in_start` alignment
- reset behaviour
- at the receiver, sending out only the four data bins

Differences worth knowing:

- **Transform size.** The original text also calls the transform a
  48-point mixed-radix 8-2 FFT. Its data path, however, is a 128-bit vector
  of eight 16-bit bins, and 48 is not a product of 8s and 2s. This RTL
  builds the 8-point transform that the data path implies.
- **Port widths.** The original top-level symbols show a 48-bit
  `out_data` and a 1-bit `in_data` for the transmitter, and a 48-bit
  `in_data` for the receiver. The text specifies a 4-bit input and a 16-bit
  output, and this RTL follows the text.
- **Blocks that are only named.** An interleaver appears in the original
  transmitter's block view. A deinterleaver, a Viterbi decoder, a
  Reed-Solomon decoder and a descrambler appear in its receiver view. No
  function, code or size is given for any of them, and the transmitter has
  no matching encoder or scrambler. They are not built.
- **Size.** The original reports 78 slice registers for the transmitter and
  30 for the receiver. This RTL registers whole symbol vectors at every
  stage: about 1900 flip-flop bits in the transmitter and 1300 in the
  receiver (generic synthesis). Both still fit easily in the Spartan-6 part
  the original targets (11440 registers).
- **Not covered.** No 16-QAM decision (demapper), channel model,
  equalizer or timing recovery is included. None of them is described.

## Verification

Each module has a self-checking testbench `tb/tb_<module>.sv`. Each bench
prints `TB_RESULT checks=N failures=M` and stops itself with a watchdog. The
reference values are worked out independently inside the benches, mostly by
floating-point DFTs with `$cos`/`$sin`:

- `tb_fft8`: 64 back-to-back vectors through a forward and an inverse core, compared with a DFT; checks the 3-clock latency and one result per clock
- `tb_tx_ifft`: compared with the inverse DFT of `I + jQ`
- `tb_ofdm_transmitter`: every output word compared with a floating-point symbol model; checks that prefix words equal tail words, the 9-clock latency, the 29-clock period and the `wrfull` hold
- `tb_ofdm_receiver`: symbols built in floating point, with random gaps and garbage prefix words; checks the recovered points and the 6-clock latency
- `tb_ofdm_transceiver`: the full chain at default parameters, 200 symbols, random FIFO under-runs and `wrfull` holds; checks every recovered sub-carrier, the prefix and the 29- and 34-clock timing; counts that every mechanism occurred
- the remaining benches cover the mapper, repetition, padding, prefix, serializers and controller

To run a bench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv -Irtl \
    --top-module tb_ofdm_transceiver rtl/ofdm_pkg.sv tb/tb_ofdm_transceiver.sv
./obj_dir/Vtb_ofdm_transceiver
```

Replace the bench name to run any other. Every bench runs in well under a
second. Verilator is a two-state simulator, so all state that is read is
reset.

## Changing the design

- `N_CP` (transmitter, receiver, top) sets the prefix length. Give the transmitter and receiver the same value.
- The sizes in `ofdm_pkg` (`OFDM_N_REP`, `OFDM_N_PAD`) and the QAM unit can be changed, within the 8 bins of the core.
- `fft8` is fixed at 8 points.
- Every stage before the output module takes a new symbol per clock. To overlap symbols, `output_module` would need a second symbol buffer, and `control_unit` would then release the next nibble as soon as the current symbol is loaded.
