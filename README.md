# Analog (8,4) Hamming decoder with digital built-in self-test

An analog iterative decoder works on currents. Every node of its factor graph
is a small Gilbert-multiplier circuit, and the whole graph settles to the
decoded answer in continuous time. It decodes quickly and uses little power,
but it is very hard to test after fabrication. Its internal nets carry
probabilities rather than logic levels, so there is nothing to scan.

This design makes the decoder testable with purely digital means. The key
fact is this: if the bias and reference voltages of a sum-product node are
moved to the supply rails, the node becomes a static differential XOR gate.
This holds for check nodes directly. Equality nodes need four extra
transistors, which give them the same topology. In test mode the whole
decoder core therefore becomes an array of XOR gates:

- an on-chip controller sends the four XY combinations to every node at once;
- it compares each node's differential output pair with the XOR truth table;
- it reports one pass/fail bit for the core, and lets you read out single node
  groups.

A second controller tests the analog input interface and the comparators.
It passes one-bit words through the sample-and-hold chains and around the core.

The RTL here models the whole chip:

- the (8,4) extended Hamming decoder core;
- its serial sample-and-hold input interface;
- the probability converters;
- the comparators and output shift registers;
- both self-test controllers;
- a back-up decoder without output interface.

The analog parts are behavioural models in fixed-point arithmetic. The
controllers and the interface timing are synthesizable logic.

## The code and the factor graph

The code is the (8,4) extended Hamming code, with generator rows:

    10001011  01001110  00101101  00010111

It is decoded on a redundant 8x8 parity-check matrix:

    11101000  01110100  10001011  00010111
    01011001  11000101  10100110  00111010

Every row and every column of this matrix has four ones. The graph therefore
has:

- 8 four-edge check nodes (`check4`);
- 8 equality nodes with five edges (`equality5`): four check edges plus the
  channel edge;
- 4 output equality nodes, which combine all five edges of the four
  information bits (codeword bits 1-4).

All constants and the shared arithmetic live in `hamming_pkg`.

## Node hierarchy and the probability model

| module | what it is |
|---|---|
| `sp_node` | unidirectional node: two inputs X, Y and one output Z |
| `node3` | three `sp_node`s, one per output edge: a bi-directional three-edge node |
| `check4` | two `node3` check nodes joined by an internal edge |
| `equality5` | three `node3` equality nodes in a chain |
| `hamming_core` | 8 `check4`, 8 `equality5`, 4 output nodes, the message registers |

**Number format.** A probability pair (p0, p1) is carried as one 12-bit code
of p1. The code for probability 1 is 4096, and p0 is implied as 4096 − p1.
Codes are clipped to 1..4095, just as a real normaliser never reaches exactly
zero current.

**Node functions.**

- Check node: `p1 = a0*b1 + a1*b0`.
- Equality node: `p1 = a1*b1 / (a0*b0 + a1*b1)`, an exact integer division.

**Timing model.** The real core settles continuously. The model registers the
check-to-bit messages instead, so one clock is one flooding iteration. A
codeword is held for nine clocks, so it gets about eight iterations. This
is enough for every single-error pattern to be corrected.

**Reset.** PIPE resets all messages to 0.5. This stands in for the reset
circuit that equalises the interconnections before each new word.

## Test mode and the result groups

In test mode (`test = 1`):

- every `sp_node` ignores its probability inputs;
- it drives its test pairs to `{x^y, ~(x^y)}`;
- node variants with extra diode-connected output transistors expose one more
  copy of the pair for each extra output.

In decoding mode the test outputs read 0.

The pairs are gathered per three-edge node into 41 groups:

| group | node | pairs | bits | error switch |
|---|---|---|---|---|
| C1, C3, ..., C15 | CHECK3_1NG (first half of each `check4`) | 4 | 8 | ERR1 |
| C2, C4, ..., C16 | CHECK3_2NG (second half) | 5 | 10 | – |
| E3, E6, ..., E24 | EQUALITY3 (last of each `equality5`) | 3 | 6 | ERR2 |
| other E1..E24 | EQUALITY3_NG | 4 | 8 | – |
| E25 | the four output nodes | 4 | 8 | – |

**Numbering.** Check node r (0-based) holds C(2r+1) and C(2r+2). Bit node j
holds E(3j+1) to E(3j+3).

**Good responses.** A good group reads `0101...` for XOR = 0 and `1010...`
for XOR = 1.

**Error injection.** ERR1 and ERR2 close the extra switch in the flagged
nodes. This forces unidirectional node 0's pairs to `{1,0}`. A group
hit by an error therefore reads `1010...`, even when XY = 00 or 11.

## Decoder-core BIST (`dec_bist`)

**Sequence.** Raising TEST starts it:

1. It sends XY = 00, 01, 11, 10, one pair per clock.
2. It checks every group against the expected pattern on the clock after each
   vector.
3. It raises `finish` five clocks after TEST, with `good_core` = AND of all
   group results.

Results are kept until TEST falls. A new rising edge of TEST starts the test
again.

**Reading single groups.** `show_node` selects one group for `good_node`:

| show_node | group |
|---|---|
| `00_iiii` | C(i+1) |
| `10_iiii` | E(i+1) |
| `11_iiii`, i < 9 | E(i+17) |

Other addresses read 0.

**Expected result with faults injected.** In the top-level testbench:

- ERR1 fails the odd C groups;
- ERR2 fails every third E group;
- the result bytes read as `10101010` for C and `11011011 10110110 01101101`
  for E.

## Input interface, converters and output

**Sequencer (`sh_sequencer`).** FRAME in clock 0 starts it. It then repeats a
nine-clock cycle:

- SEL1..SEL8 in clocks 1-8, one LLR sample each;
- PIPE in clock 9.

**Sample-and-hold chains (`sh_chain`).**

- Each SELi clock stores `vin` and `vref` on sampling capacitor i of two
  eight-cell chains.
- PIPE copies all samples to the hold capacitors.
- PIPE also resets the core, which then decodes the held word while the next
  word is sampled.

**Converters (`llr_to_prob`).** Each converter is a differential pair. It turns
(Vin − Vref) into p1 = 1/(1 + 2^((Vin−Vref)/16)), so 16 voltage codes are one
doubling of the odds. Vin above Vref means a 0.

**Comparators and output (`comparator`, `out_shift_reg`).**

- The four comparators slice the core outputs.
- On SAMPLE, the output register latches them. SAMPLE comes with the SEL8 of
  the following word: clock 17, then every nine clocks.
- The four bits show on `dout[3:0]` (DOUT1..4) from clock 18.
- They are then shifted out serially on DOUT1 over the next three clocks.

Four bits every nine clocks give 3.70 Mbit/s at an 8.33 MHz clock.

## I/O BIST (`io_bist`)

In test mode the I/O BIST drives FRAME and the serial input itself:

- a 1 is stored as Vin = 0, Vref = mid-scale;
- a 0 is stored as Vin = 255;
- `io_bypass_mux` routes four converter outputs straight to the comparators,
  past the core.

**Sequence.**

1. The BIST streams four words after one FRAME: `10010110`, the same word
   again, then its complement twice.
2. It checks the comparator outputs for cells 1-4, cells 5-8, cells 1-4 and
   cells 5-8.
3. The checks fall at the end of clocks 18, 27, 36 and 45. `finish` rises
   with the last check, 46 clocks from FRAME (3.7 µs at 12.5 MHz).

On the first mismatch it stops at once, with `finish = 1` and `good_io = 0`.

**Comparator offsets.** The parameter `CMP_OFFSET` of `decoder_chip` gives each
comparator an input offset. A large offset makes the I/O BIST fail, as
comparator offset does on silicon.

## Back-up decoder

The top also holds a second decoder with ports prefixed `bk_`. It has its own:

- input interface;
- core;
- core BIST, which shares TEST, ERR1 and ERR2.

It has no comparators, output registers or I/O BIST. Its four soft outputs
(12-bit p1 codes) are brought straight out as `bk_y`.

## Decoding performance

`decoder_chip_ber_tb` measures the model's bit error rate like a bench test:
- random words are encoded, sent as BPSK through Gaussian noise and
  converted to input voltages;
- the decoded DOUT bits are compared with the source;
- a maximum-likelihood decoder and plain hard decisions, computed in the
  testbench from the same inputs, serve as references.

With 2500 words (10,000 bits) per point:

| Eb/N0 | hard-decision errors | ML errors | decoder errors |
|---|---|---|---|
| 3 dB | 766 | 98 | 186 |
| 5 dB | 378 | 17 | 37 |
| 7 dB | 132 | 0 | 0 |

This puts the model about 0.5-0.7 dB from ML. Low-speed measurements of
the real chip were reported at 0.3-0.4 dB from ML. Two things in the model
explain most of the gap:
- The 8-bit input voltage codes clip channel LLRs beyond about ±5.5.
- Eight iterations per word are not fully converged. Run on its own with
  unclipped inputs at 3 dB, the core makes about 20% fewer errors after 32
  iterations than after 8.

The real network settles continuously, so it has no fixed iteration count.
Its accuracy grows as the clock slows down. The model has no equivalent,
because the interface fixes the frame at nine clocks.

## How far the model can be trusted

What is exact:

- the logic of the self-test (patterns, group checks, Show_Node map, result
  flags);
- the interface timing (FRAME, SEL, PIPE, SAMPLE, first output after 17
  clocks, one word per 9 clocks).

What is idealised:

- **Convergence.** The decoding arithmetic is exact sum-product arithmetic. The
  analog core's speed, mismatch and transistor non-idealities are not
  modelled, so one clock per iteration is a modelling choice, not a speed
  claim. Bit error rates measured on silicon cannot be predicted from this
  model.
- **Unstated details.** Several details are this design's own choices:
  - which unidirectional node in a three-edge node carries the extra outputs
    and the error switch;
  - the exact group numbering;
  - the I/O test pattern;
  - the LLR scale (16 codes per doubling);
  - the 8-bit voltage and 12-bit probability widths.
- **Clock edges.** All logic uses the rising clock edge. The original circuit
  samples some signals on the falling edge; with one clock edge, every latency
  is a whole number of cycles.
- **Merged circuits.**
  - The discharge of the hold capacitors before each transfer is folded into
    the PIPE copy.
  - The SR latch behind each comparator is folded into the output register.
- **Added port.** `io_bist` has one port the pin list does not have:
  `sel_last`. It selects which half of the input cells the bypass routes to the
  comparators.

Not modelled at all:

- the bias network and reference voltages;
- the pads;
- the off-chip FPGA test controller and the bit-error-rate test bench.

## Simulating

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and finishes. For example, with Verilator 5:

    verilator --binary --timing -Wno-fatal -Irtl rtl/hamming_pkg.sv \
        $(ls rtl/*.sv | grep -v hamming_pkg) \
        tb/decoder_chip_tb.sv --top-module decoder_chip_tb
    ./obj_dir/Vdecoder_chip_tb

The package goes first, and only once. `-Wno-fatal` keeps the remaining lint
warnings from stopping the build; those warnings are about unused package
constants and deliberately open pins.

The main testbenches:

- `decoder_chip_tb` exercises the whole chip:
  - streaming decoding with corrected single errors;
  - both BISTs, with and without ERR1/ERR2;
  - Show_Node readout of every group;
  - a comparator-offset instance that fails the I/O test;
  - the back-up decoder.

  It counts each mechanism and fails if one never happened.
- `decoder_chip_full_tb` uses the top with default parameters. It decodes
  three codewords, then runs the self-test with ERR1.
- `decoder_chip_ber_tb` runs the bit-error-rate measurement above at
  default parameters.
- `hamming_core_tb` decodes every codeword with each single-bit error.
