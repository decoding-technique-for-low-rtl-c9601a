# Low-transition serial link with a windowed swap code

Every 0→1 or 1→0 change on a long wire charges or discharges its
capacitance. On a serial line, the number of such changes per word sets most
of the line's dynamic power. This design sends 8-bit words between two cores
over one serial data line. It rearranges the bits of each word so that
neighbouring bits change less often. Two additional lines, **L1** and **L2**,
travel with the word and tell the receiver how to undo the rearrangement.

Over all 256 possible words, the code removes 240 of the 896 transitions
inside words, about 27 %. The end-to-end test sends 3000 random words and
sees the same ratio on the line: 7645 transitions instead of 10432. The cost
is the two extra lines, plus an encoder and a decoder of a few hundred gates
each.

```
 core 1 ──► sender ─────────────► switch A ──► switch B ──► receiver ───────────────► core 2
            (encoder, serializer) (5-flit      (5-flit      (deserializer, decoder)
                                   FIFO)        FIFO)
                          serial data line + L1 + L2, one bit per cycle
```

## The code

Bits are numbered a_0 … a_7. a_0 is the leftmost bit when a word is written
out, and it is the first bit on the line. In the RTL, words have the type
`logic [0:7]` (`lp_pkg::word_t`), so a literal such as `8'b11000110` reads the
same way. This ascending range is deliberate. Verilator's `ASCRANGE` lint
warning about it is expected.

### Decoding (lp_decoder)

L1/L2 pick a window of the word:

| L1 L2 | window       | scan positions j |
|-------|--------------|------------------|
| 0 0   | none: the word passes unchanged | – |
| 1 0   | a_0 … a_4    | 0 ≤ j < 3        |
| 0 1   | a_3 … a_7    | 3 ≤ j < 6        |
| 1 1   | a_0 … a_7    | 0 ≤ j < 6        |

The decoder scans the window from its low end. At position j it looks at bits
j, j+1 and j+2:

* **`a a ~a`** (two equal bits, then a different one): invert bits j+1 and
  j+2, which gives `a ~a a`. Continue at j+3.
* **otherwise**: continue at j+1.

Each swap therefore puts back one transition that the encoder took out. After
a swap the scan skips ahead, so that swaps never overlap.

Worked examples, which are also the first checks in the testbenches:

| on the line | L1 L2 | decoded  |
|-------------|-------|----------|
| 11000110    | 1 1   | 10101010 |
| 00110001    | 1 0   | 01010001 |
| 10000110    | 0 1   | 10001010 |
| 11111111    | 0 0   | 11111111 |

Take the first row. At j=0 the bits are `1 1 0`, so the decoder swaps them to
`1 0 1` and jumps to j=3. There it sees `0 0 1`, swaps that to `0 1 0`, and
jumps to j=6, which ends the window.

The RTL unrolls the scan into a fixed loop over j = 0…5 with a skip counter,
so the decoder is plain combinational logic: about 130 word-level cells
before mapping.

### Encoding (lp_encoder)

The encoder runs the scan the other way round. In a window it looks for
**`a ~a a`**, which has two transitions, and turns it into **`a a ~a`**, which
has one. It inverts the same two bits as the decoder and then jumps three
places. This is done for all three windows in parallel.

An inverse scan alone is not always undone by the decoder. The decoder can
also fire on an `a a ~a` that was already in the data. Its skip pattern can
also differ from the encoder's. For this reason, each of the three candidates
is run through a copy of the decoder inside the encoder. A candidate is kept
only if it gives the data word back.

Among the kept candidates and the plain word (L1 L2 = 00), the one with the
fewest transitions is sent. Ties go to 00, then 10, then 01, then 11. As a
result:

* decoding never loses data: every one of the 256 words decodes back
  correctly, and this is checked exhaustively;
* the code never adds transitions inside a word;
* all four rows of the table above come out of the encoder exactly as
  printed, including its choice of 01 over the equally good 11 in row 3.

Be careful when changing the tie order or the windows. Every change must keep
the round-trip check, and the tests compare the encoder against an
independent model of this exact policy.

## The link

### Flits and framing

Each cycle the link carries one **flit**, `lp_pkg::flit_t`. It is
`{d, l1, l2}`: the serial bit plus the current word's L1/L2 value. L1/L2 are
held constant for all 8 bit times of a word. Every hop uses valid/ready flow
control: a flit moves when valid and ready are both high. A stage that is
refused keeps its flit unchanged, and `lp_switch` asserts this rule.

There is no framing line. The serializer and the deserializer both count bits
from reset, and no hop ever drops or adds a flit, so the two counts stay
aligned. If you add a hop that can lose flits, you also need a framing
signal.

### Sender (lp_sender = lp_encoder + lp_serializer)

A word is encoded combinationally in the cycle `in_valid && in_ready` accepts
it. It is then loaded into a shift register and leaves a_0 first, one bit per
cycle. `in_ready` is high when the serializer is idle. It is also high in the
cycle the last bit of the current word is taken, so back-to-back words leave
with no gap.

### Switches (lp_switch, instances A and B)

Each switch is a circular FIFO of `DEPTH` flits, five by default. It has no
combinational path from input to output. `in_ready` drops when the FIFO is
full, and that backpressure travels back to the sender. Each switch has one
input and one output and does no routing.

### Receiver (lp_receiver = lp_deserializer + lp_decoder)

Bits are collected into a word, and L1/L2 are taken from the word's last bit
time. The completed word is held on `out_valid`/`out_data` until the consumer
takes it. While a word is held, the next word's first bit is accepted only in
the cycle the held word is taken. This is enough to run at full rate when the
consumer keeps up. The decoder sits combinationally between the word register
and `out_data`.

### Timing

| quantity | value |
|----------|-------|
| throughput, nothing stalled | one word per 8 cycles; the line is never idle |
| latency, idle link | `out_valid` in the W + 3 = 11th cycle after the edge that accepted the word |
| buffering | 2 × 5 flits in the switches, plus one word in the serializer and one in the deserializer |

## Top level: lp_link_top

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; synchronous reset, active low |
| `in_valid`, `in_ready`, `in_data` | in/out/in | 1/1/8 | word from core 1 |
| `out_valid`, `out_ready`, `out_data` | out/in/out | 1/1/8 | decoded word to core 2 |
| `out_l` | out | 2 | L1/L2 the word travelled with |
| `line_data`, `line_l`, `line_valid` | out | 1/2/1 | the hop between switch A and switch B, for measuring transitions |

| parameter | default | meaning |
|-----------|---------|---------|
| `DEPTH` | 5 | flits per switch buffer |
| `lp_pkg::W` | 8 | word width; the windows in `lp_pkg` are written for 8 |

The cores at the two ends are not part of the design. Their side of the link
is the pair of valid/ready ports.

## Where this design makes its own choices

The decoding rule, the windows, the word width and the four table rows are
the parts this design takes from its source. The chain of blocks (sender,
two buffered switches, receiver, with two extra lines next to the serial
line) follows the source's architecture too. The following are this design's
own choices or readings:

* **The a_3 … a_7 window (L1 L2 = 01)** moves on by one position when it
  does not swap, the same as the other windows. The rule would otherwise
  look at the same position every time.
* **The L1 L2 = 11 window** is read as one scan over a_0 … a_7. It is not
  the two halves scanned one after the other, so its result can differ from
  10 and 01 combined.
* **The whole encoder.** The source describes only the decoder.
* **The switch depth of 5.** It comes from the five buffer cells drawn for
  each switch. The switches do no routing.
* **Bit order on the line (a_0 first), the valid/ready handshake, framing by
  counting, and the synchronous active-low reset.**

Only transitions inside a word are reduced. The change between the last bit
of one word and the first bit of the next is not coded. The L1/L2 lines
themselves can change only between words, at most once each.

## Verification

Each block has a self-checking testbench in `tb/`. Each one ends with a
`TB_RESULT checks=N failures=M` line and has a watchdog. `tb/lp_ref_pkg.sv`
holds an independent reference of the code. It is written as the
moving-index scan the rule describes, not as the unrolled loop of the RTL.

| testbench | what it shows |
|-----------|---------------|
| `tb_lp_decoder` | table rows; all 256 words × 4 L1/L2 values against the reference |
| `tb_lp_encoder` | table rows exactly; all 256 words decode back, never gain transitions, and match the reference encoder |
| `tb_lp_serializer` | bit order, L1/L2 on every bit time, 8 cycles per word with no idle cycle, random stalls |
| `tb_lp_deserializer` | words and L1/L2 reassembled under random stalls, 8 cycles per word |
| `tb_lp_switch` | exact fill level at full, drain, one flit per cycle streaming, random order check |
| `tb_lp_sender`, `tb_lp_receiver` | bit-level stream against the reference encoding and decoding |
| `tb_lp_link_top` | whole link at default parameters (see below) |

`tb_lp_link_top` checks, in order:

1. the latency of one word through an idle link;
2. the four table words, which must appear on the line with their printed
   code;
3. one word per 8 cycles when streaming;
4. 3000 random words with random gaps and long consumer stalls.

It fails if any L1/L2 value is never used, or if switch A or switch B never
fills. It also fails if the sender never refuses a word or the receiver never
holds one, or if the line carries more transitions than the plain words would
have.

For each block, a one-line fault was injected: a wrong skip distance, a
different tie order, a gap between words, swapped L lines, a bad pointer
wrap, and so on. Each block's testbench catches its fault.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```sh
verilator --binary --timing --assert -Irtl -Itb --top-module tb_lp_link_top \
  rtl/lp_pkg.sv tb/lp_ref_pkg.sv rtl/lp_*.sv tb/tb_lp_link_top.sv -o sim
./obj_dir/sim
```

Replace `tb_lp_link_top` with any other testbench name to run that one. The
end-to-end test runs in well under a second. Lint with
`verilator --lint-only -Wall -Irtl rtl/lp_pkg.sv rtl/<module>.sv`. The
expected warnings are `ASCRANGE` for the word type, and `UNUSEDPARAM` for
window constants that a module importing the package does not use.

To change the buffering, set `DEPTH` on `lp_link_top`. To change the code,
edit the window constants in `lp_pkg`, and mirror the change in the
`window` function of `tb/lp_ref_pkg.sv`.
