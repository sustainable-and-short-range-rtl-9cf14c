# Hamming-protected baseband for a short-range (DSRC) transceiver

A short-range vehicle/industrial radio link sends small safety messages over a
noisy channel. This design is the digital baseband of such a transceiver:
it line-codes the data, protects every word with a single-error-correcting
Hamming code before it goes to the ASK modulator, and on the receive side
repairs any single flipped bit before line-decoding the data again.

```
 TX:  data bits --> line encoder --> Hamming encoder --> [ASK modulator]  --> RF
                   (FM0 / Manchester /  (8 chips -> 12-bit
                    diff. Manchester)    code word)

 RX:  RF --> [ASK demodulator] --> Hamming decoder --> line decoder --> data bits
                                  (checker bits, 4-to-16     + violation flags
                                   decoder, correcting XORs)
```

The ASK modulator and demodulator are analog and are not part of the RTL;
`dsrc_transceiver` brings the code word out (`tx_codeword_o`) and takes it in
(`rx_codeword_i`) where they connect.

The Hamming codec is the heart of the design. The line coder, the register
stages, the valid strobes and the status flags around it are this design's
own choices, made to turn the signal chain above into a usable block.

## The (12,8) Hamming code

A code word of N = M + P bits carries M data bits and P parity bits, with P the
smallest number for which 2^P >= M + P + 1. For the default M = 8 this gives
P = 4 and N = 12. Bits are numbered by **position 1..12**. Parity bits sit at
the power-of-two positions and data bits fill the rest:

| position | 1  | 2  | 3  | 4  | 5  | 6  | 7  | 8  | 9  | 10  | 11  | 12  |
|----------|----|----|----|----|----|----|----|----|----|-----|-----|-----|
| holds    | P1 | P2 | D3 | P4 | D5 | D6 | D7 | P8 | D9 | D10 | D11 | D12 |

Parity bit 2^k is the XOR of every data position whose index has bit k set:

```
P1 = D3 ^ D5 ^ D7 ^ D9 ^ D11        P2 = D3 ^ D6 ^ D7 ^ D10 ^ D11
P4 = D5 ^ D6 ^ D7 ^ D12             P8 = D9 ^ D10 ^ D11 ^ D12
```

The receiver recomputes the same four sums, this time including the parity
bit itself. These are the checker bits:

```
C1 = P1 ^ D3 ^ D5 ^ D7 ^ D9 ^ D11   C2 = P2 ^ D3 ^ D6 ^ D7 ^ D10 ^ D11
C3 = P4 ^ D5 ^ D6 ^ D7 ^ D12        C4 = P8 ^ D9 ^ D10 ^ D11 ^ D12
```

Read as the binary number C4C3C2C1, the checker word is 0 for a valid code
word. If exactly one bit was flipped, the checker word equals that bit's
position, because each position belongs to exactly the checks named by the
bits of its index. A 4-to-16 one-hot decoder turns the checker word into 16
lines. Line 0 means "no error". Line i drives one input of an XOR gate on
position i, which inverts the received bit back. Lines 13 to 15 name no
position. They can only come from two or more errors, and the decoder then
passes the word on unchanged and raises `uncorrectable_o`. Most double errors
give a checker word of 1 to 12 and are "corrected" at the wrong position.
A Hamming code without an extra overall parity bit cannot tell those apart
from single errors.

**Bit ordering.** Data words are taken most significant bit first. `data[7]`
goes to position 3 and `data[0]` to position 12. Code words are declared
`logic [N:1]`, so bit i of the vector *is* position i.

**Worked example.** Data `1100_0101` gives P8P4P2P1 = 0000. Positions 1..12 of
the code word then read `0 0 1 0 1 0 0 0 0 1 0 1`. If position 10 arrives as
0, the checker word is C4C3C2C1 = `1010` = 10. Decoder line 10 then inverts
position 10 back, and the data `1100_0101` is recovered. The testbenches check
this example literally.

The same modules work for any M. With `M = 4` they become the classic (7,4)
code, with a 3-bit checker word and a 3-to-8 decoder (`syndrome_decoder #(.W(3))`).

## Line codes

Each data bit becomes two half-bit *chips*. With the default sizes, one
transceiver word is 4 data bits, which make 8 chips, which fill one 8-bit
Hamming data word. So the Hamming code protects the line-coded chip stream,
not the raw data. The code is selected by `code_i` (`dsrc_pkg::line_code_e`).
L is the line level at the end of the previous bit:

| code (`line_code_e`)          | bit 1          | bit 0          | rule                                                        |
|-------------------------------|----------------|----------------|-------------------------------------------------------------|
| `LC_MANCHESTER`               | `01`           | `10`           | IEEE 802.3 polarity                                         |
| `LC_FM0`                      | `~L ~L`        | `~L L`         | level always inverts at the bit start; a 0 also inverts mid-bit |
| `LC_DIFF_MANCHESTER`          | `L ~L`         | `~L L`         | level always inverts mid-bit; a 0 also inverts at the bit start |

L is held in a register in both the encoder and the decoder, so consecutive
words form one continuous line signal, and it is 0 after reset. The decoder
raises a per-bit `violation` flag when a transition the code requires is
missing: equal halves for Manchester and differential Manchester, or no
transition at the bit start for FM0. Within a word the earliest bit is the
MSB, and its chips are the top two bits of the chip vector.

The polarity conventions above are common ones, chosen by this design. Change
them in `line_encoder.sv`, `line_decoder.sv` and `tb_ref_pkg.sv` together.

## Transceiver interface and timing (`dsrc_transceiver`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; active-low **synchronous** reset |
| `code_i` | in | 2 | line code for both directions; change it only while both pipelines are empty |
| `tx_valid_i`, `tx_data_i` | in | 1, M/2 | one data word per cycle |
| `tx_valid_o`, `tx_codeword_o` | out | 1, N | code word for the modulator, **2 cycles** after `tx_valid_i` |
| `rx_valid_i`, `rx_codeword_i` | in | 1, N | code word from the demodulator |
| `rx_valid_o`, `rx_data_o` | out | 1, M/2 | recovered data, **3 cycles** after `rx_valid_i` |
| `rx_violation_o` | out | M/2 | per-bit line code violation |
| `rx_syndrome_o` | out | P | checker word C4C3C2C1 of that code word |
| `rx_corrected_o` | out | 1 | one bit was corrected |
| `rx_uncorrectable_o` | out | 1 | checker word names no position (multi-bit error) |

Both directions take one word per cycle with no back-pressure. The transmit
path is: line encoder register, Hamming encoder (combinational), code word
register. The receive path is: input register, Hamming decoder
(combinational), register, line decoder register. The status flags are
delayed to line up with `rx_data_o`. An assertion checks that the decoder
reports exactly one outcome per word: clean, corrected or uncorrectable.

The code word crosses to the analog side in parallel, with a valid strobe.
Serialising it onto the carrier, and finding word boundaries on the
receive side, belong to the modem and are not modelled here.

## Modules

| file | what it is |
|------|------------|
| `rtl/dsrc_pkg.sv` | `parity_bits()`, `is_parity_pos()`, `line_code_e`, default `DATA_BITS = 8` |
| `rtl/hamming_parity_gen.sv` | parity bit generator: P XOR trees |
| `rtl/hamming_encoder.sv` | places data and parity into the N-bit code word |
| `rtl/hamming_checker_gen.sv` | checker bit generator: P XOR trees over the received word |
| `rtl/syndrome_decoder.sv` | W-to-2^W one-hot decoder (4-to-16 by default) |
| `rtl/hamming_decoder.sv` | checker bits -> decoder -> correcting XORs -> data, flags |
| `rtl/hamming_codec.sv` | encoder and decoder side by side (combinational) |
| `rtl/line_encoder.sv` | FM0 / Manchester / differential Manchester encoder, registered |
| `rtl/line_decoder.sv` | the matching decoder with violation flags, registered |
| `rtl/dsrc_transceiver.sv` | top: the transmit and receive chains |

All Hamming modules have one parameter, `M` (data bits, default 8). `P` and
`N` are derived from it. The line coders take `BITS` (data bits per word,
default 4). The transceiver takes `M`, which must be even, and uses M/2 data
bits per word.

## Not in the RTL

* **ASK modulation and demodulation.** These are analog RF stages. The
  code word ports are the boundary.
* **Adiabatic circuit implementation.** The codec this RTL is modelled on was
  built from dual-rail Efficient Charge Recovery Logic (ECRL) cells on
  18 nm FinFETs. These are buffer/inverter, NAND/AND and XOR/XNOR gates,
  powered by a ramping power clock instead of a DC supply. That
  implementation is what gives the codec its very low power (a few µW) and
  its data-independent supply current, which resists differential power
  analysis. Those properties belong to the transistor circuit. The RTL
  describes the same logic function as ordinary single-rail gates. Any
  power, delay or current-trace figure therefore applies to a transistor
  implementation, not to a standard-cell synthesis of this RTL.

## Choices this design makes

* The data word is packed MSB first, and code words are indexed by position
  (`[N:1]`).
* The Hamming blocks are purely combinational. The transceiver adds the
  register stages and valid strobes described above.
* `uncorrectable_o` (checker word > N) and the line-code violation flags are
  additions. A plain Hamming decoder has neither.
* The line code conventions, the reset level L = 0, and the use of one
  `code_i` for both directions are this design's own.
* The Hamming code protects the line-coded chips, which is the order of the
  signal chain above. With the defaults, each 12-bit code word therefore
  carries 4 data bits.

## Simulation

Every testbench is self-checking. It prints
`TB_RESULT checks=<n> failures=<n>`, has a watchdog, and works out its
expected values independently of the RTL. The models in `tb/tb_ref_pkg.sv`
use the explicit parity equations and transition-based line coding. Example,
for the full transceiver at its default size:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb \
    rtl/dsrc_pkg.sv tb/tb_ref_pkg.sv tb/tb_dsrc_transceiver.sv \
    --top-module tb_dsrc_transceiver
./obj_dir/Vtb_dsrc_transceiver
```

Replace `tb_dsrc_transceiver` with any other testbench name to run that one:

| testbench | what it covers |
|-----------|----------------|
| `tb_hamming_parity_gen` | all 256 words (M = 8) and all 16 words (M = 4) |
| `tb_hamming_encoder` | all words, M = 8 and M = 4, plus the worked example |
| `tb_hamming_checker_gen` | all words × no error and every single-bit error, plus the example |
| `tb_syndrome_decoder` | 4-to-16 and 3-to-8, every input |
| `tb_hamming_decoder` | all words × every single error; random double errors (checker word, uncorrectable flag); the (7,4) decoder, every word × every single error |
| `tb_hamming_codec` | random encode -> channel -> decode |
| `tb_line_encoder` | literal chips of each code; random streams with idle cycles and a code change |
| `tb_line_decoder` | random streams in each code; injected violations land on the right bit |
| `tb_dsrc_transceiver` | end to end, see below |

`tb_dsrc_transceiver` loops the transmit code word back to the receiver
through a channel model. The model flips no bit, one bit or two bits per
word, and in idle slots it injects code words whose chips break the line
code. It checks, for every word:

* the transmit and receive latencies (2 and 3 cycles);
* every receive output, against a reference receiver;
* for words with at most one error, that the data sent is the data received.

The test runs each line code in turn, switching codes without a reset. It
counts each mechanism and fails if one never occurred: each line code, clean
words, correction at each of the 12 positions, an uncorrectable double
error, a double error taken for a single one, a line-code violation, idle
cycles and a code change. It runs in well under a second.

Every testbench passes. For each module, a deliberately broken copy was
also run against its testbench: the wrong bit order, a missing parity term,
a decoder line stuck low, and so on. Each broken copy made its testbench fail.
