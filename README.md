# Exact stochastic multiplication and scaled addition

In stochastic computing a number in [0, 1] is a stream of bits, and its
value is the fraction of ones. One AND gate multiplies two such numbers and
one multiplexer averages them, but only on average: with independent random
streams the error falls as 1/sqrt(length), so an error below 0.1% takes
millions of bits.

This design removes the error completely. It does not make the streams
random. It arranges them so that every bit of one operand meets every bit
of the other exactly once. The result is exact for every input, with the
shortest possible output stream:

| operation | inputs | output stream | result |
|-----------|--------|---------------|--------|
| multiply  | two n-bit streams, values a/n and b/n | n^2 bits | exactly a*b ones |
| scaled add, (x1 + x2)/2 | two n-bit streams | 2n bits | exactly a+b ones |

The stream length is n = 4 or n = 8, chosen per operation. The hardware is
tiny and bit-serial. It uses two multiplexers per operand, one flip-flop, an
AND gate, and delay lines whose length can be set from 1 to 8 bits.

## Stream conventions

- One stream bit is carried per clock cycle. A "bit period" in this text is
  one clock cycle.
- An operand is a numerator k, 0..n, with value k/n. The converter
  `bin2stoch` makes the n-bit stream 1...10...0: k ones first, then zeros.
  Any order of the ones would give the same exact result.
- An *operation* lasts n^2 bit periods, numbered t = 0 .. n^2-1. The input
  streams carry data only in block 0, which is bits 0..n-1. Block j is bits
  jn .. jn+n-1.

## Multiplier: repeat one operand, rotate the other

The product stream is n blocks of n bits:

    block j, bit i:   y = A[i]  AND  B[(i + j) mod n]

Here A and B are the operand bit sequences. Over the n^2 bits each pair
(A[i], B[k]) is ANDed exactly once. So the number of ones is
ones(A) * ones(B), and the value is (a/n)(b/n) with no error. For example,
A = 1,0,1,0 (2/4) and B = 0,1,0,0 (1/4) give:

    repeated A : 1010 1010 1010 1010
    rotated  B : 0100 1000 0001 0010
    product    : 0000 1000 0000 0010   -> 2/16

Two small circuits make the two streams. Neither stores a whole sequence in
registers. Each keeps it *in flight* in a delay line and feeds it back.

**Repeating circuit** (`repeating_circuit`). This is a 2:1 mux and a delay
line of n bit periods around the output. In block 0 the select SEL-0 is 0,
and the input goes straight to the output. From then on SEL-0 is 1, and the
mux outputs what it emitted n bits earlier. Every block is therefore a copy
of block 0.

**Bit-shifting circuit** (`bit_shifting_circuit`). This is the subtle part.
Block j+1 must equal block j rotated left by one: bit 0 moves to the end.
The circuit has these parts:

- MUX-1 works like the repeating mux. It takes the input in block 0 and the
  delay-line output afterwards. Its output is the circuit output.
- A flip-flop captures the *first* bit of every block. It is enabled when
  SEL-1 is 0, which happens only in the first bit of a block. It holds that
  bit while the rest of the block passes.
- MUX-2 feeds the delay line. It passes the current output bit when SEL-1
  is 1, and the held first bit when SEL-1 is 0.
- The delay line is n-1 bit periods long, not n.

Because the feedback path is one bit shorter than a block, bits 1..n-1 of
block j come back as bits 0..n-2 of block j+1. The bit inserted at the first
position of block j+1 is the held bit 0 of block j. It arrives n-1 cycles
later, as the last bit of block j+1. Example, n = 4, input 1,0,0,0:

    t       0123 4567 89.. ....
    SEL-0   0000 1111 1111 1111
    SEL-1   0111 0111 0111 0111
    output  1000 0001 0010 0100

The mux-2 value in bit 0 of block 0 is a stale flip-flop value. It comes
back out of the delay line in bit n-1 of block 0. MUX-1 still selects the
input there, so the stale value never reaches the output. For the same
reason, neither circuit needs its delay line cleared between operations.

`stochastic_multiplier` combines the two circuits with an AND gate. It also
brings out the repeated and rotated streams for observation.

## Scaled adder

`scaled_adder` delays the second stream by n bit periods and ORs it with
the first. Each input carries its n bits in block 0 and zeros after that.
So the 2n-bit output is the first stream followed by the second. It holds
exactly a+b ones, which is the value (a/n + b/n)/2. For example,
1,1,0,0 + 1,0,0,0 gives 1,1,0,0,1,0,0,0 = 3/8.

For this to work, the second input must be 0 for the n cycles before an
operation. Otherwise older bits leak into the first half of the output.
The top level meets this automatically, because its operations are
n^2 >= 2n bits long.

## Control: select signals and delay codes

`select_gen` is a chain of six divide-by-two stages, written as a 6-bit
counter that advances once per bit. Its outputs are OR gates over groups of
stages:

| signal  | n = 4        | n = 8              | meaning |
|---------|--------------|--------------------|---------|
| SEL-1   | cnt[0]\|cnt[1] | cnt[0]\|cnt[1]\|cnt[2] | 0 only in the first bit of each block |
| SEL-0   | cnt[2]\|cnt[3] | cnt[3]\|cnt[4]\|cnt[5] | 0 only in block 0 |

Both signals repeat every n^2 bits. A synchronous `clear` restarts the
counter at bit 0.

`tunable_delay` is the delay line. A 3-bit code `dig` sets the delay to
dig+1 bit periods, from 1 to 8. The structure is fixed: 8 flip-flops and a
tap mux. Only the code depends on n:

| user                 | delay | code (n=4) | code (n=8) |
|----------------------|-------|-----------|-----------|
| repeating circuit    | n     | 3         | 7         |
| bit-shifting circuit | n-1   | 2         | 6         |
| scaled adder         | n     | 3         | 7         |

The 3-bit code limits n to 8.

## Top level: `sc_arith_top`

The top level computes the exact product and the exact scaled sum of two
operands. Both operations run at the same time on the same operands. The
operands can be given in two forms:

- as binary numerators `a`, `b`;
- as raw n-bit streams on `x1_in`, `x2_in`, with `stream_src` = 1.

The results also come in two forms: as streams and as binary counts.

| port | dir | meaning |
|------|-----|---------|
| `start` | in | start an operation; accepted only while `busy` is 0 |
| `size` | in | `SIZE_4` (n = 4) or `SIZE_8` (n = 8), from `sc_pkg::size_e` |
| `a`, `b` | in [3:0] | binary operands, 0..n; an assertion checks the range |
| `stream_src` | in | 0: operands from `a`/`b`; 1: operands from `x1_in`/`x2_in` |
| `x1_in`, `x2_in` | in | operand stream bits, read in bits 0..n-1 only |
| `busy` | out | an operation is running |
| `sum_done` | out | pulses one cycle after the last sum bit; `sum` is final |
| `done` | out | pulses one cycle after the last product bit; `prod` and `sum` are final |
| `prod` | out [6:0] | a*b; the value is prod/n^2 |
| `sum` | out [4:0] | a+b; the value is sum/(2n) |
| `prod_stream`, `sum_stream`, `rep_stream`, `shf_stream`, `sel0`, `sel1` | out | internal streams, for observation |

Timing:

- `a`, `b`, `size` and `stream_src` are sampled in the cycle `start` is
  accepted.
- Bit 0 of the streams is in the next cycle.
- In stream mode, bit i of each operand stream (i = 0..n-1) must be
  present on `x1_in`/`x2_in` i+1 cycles after the start cycle. Those ports are ignored at all other times.
- `sum_done` comes 2n+1 cycles after `start`.
- `done` comes n^2+1 cycles after `start`: 17 cycles for n = 4, 65 for
  n = 8.
- `busy` is already low in the `done` cycle, so the next `start` can be
  given then. Operations run back to back with one cycle between them.
- Changing `size` between operations is safe.

## How this relates to the reference circuits

These parts follow the published circuit structure:

- the repeating circuit: mux and n-bit delay around the output;
- the bit-shifting circuit: two muxes, the first-bit flip-flop and an
  (n-1)-bit delay;
- the AND-gate multiplier;
- the delay-and-merge scaled adder;
- the six-stage divider with OR-merged select signals, for n = 4 and 8;
- the 3-bit, 1X-to-8X delay range.

These are choices made in this design:

- **Synchronous delay line.** The original delay block is an analog,
  transistor-level delay line, tuned by three digital inputs. Here it is a
  clocked shift register. The linear mapping from code to delay (code + 1)
  is assumed; only its end points, 1X and 8X, are given.
- **Flip-flop clocking.** The first-bit flip-flop is clocked every cycle,
  with enable = NOT SEL-1.
- **Select wiring.** Which divider stage feeds which OR gate was derived
  from the required select waveforms. The divider is a synchronous counter
  with a `clear`, not a ripple divider driven by a separate clock.
- **Merge gate.** The scaled adder's merge is an OR. The reference example
  does not settle the gate type: with non-overlapping inputs, an XOR would
  give the same output.
- **Converters.** The binary/stochastic converters are a comparator
  (`bin2stoch`) and a ones counter (`stoch2bin`). These are the simplest
  circuits that do the job.
- **Top-level control.** The top-level handshake, the stream/binary
  operand select and running both operations side by side are this
  design's own.
- **Operand zero.** An operand of 0 is accepted, although the reference
  range is 1/n .. n/n.

Not modelled: transistor counts, analog timing, and the 0.125 ns bit period
of the reference 0.18 um implementation. All cycle counts above are in bit
periods.

## Verification

Each block has a self-checking testbench in `tb/`. Each compares against
values computed independently in the testbench and ends with a
`TB_RESULT checks=N failures=M` line.

- **`tunable_delay_tb`** checks every delay code against a stream history.
- **`repeating_circuit_tb`** and **`bit_shifting_circuit_tb`** check every
  output bit, for n = 4 and 8, against `A[t mod n]` and
  `B[((t mod n) + t/n) mod n]`. They include the 1,0,1,0 and 1,0,0,0
  examples. Input bits after block 0 are random and must be ignored.
- **`stochastic_multiplier_tb`** checks every product bit and the exact
  count of ones. This includes 2/4 x 1/4 = 2/16 and the smallest cases,
  1/4 x 1/4 and 1/8 x 1/8.
- **`scaled_adder_tb`** checks the 2n-bit output and the count of ones.
- **`select_gen_tb`**, **`bin2stoch_tb`** and **`stoch2bin_tb`** check the
  select waveforms, the conversion and the counting.
- **`sc_arith_top_tb`** runs every operand pair for n = 4 and n = 8 at the
  default configuration. It then runs 22 operations with stream operands.
  These include 1,0,1,0 x 0,1,0,0 = 2/16 and
  (1,1,0,0 + 1,0,0,0)/2 = 3/8. It checks the following:
  - `prod = a*b` and `sum = a+b`;
  - both latencies;
  - every bit of the repeated, rotated, product and sum streams.

  It also counts size switches, back-to-back starts, starts ignored while
  busy, stream-mode operations, recirculation and first-bit re-insertion. It fails if any of them
  never happens.

To run a testbench with Verilator:

    verilator --binary --timing --assert -Irtl -y rtl \
        --top-module sc_arith_top_tb rtl/sc_pkg.sv tb/sc_arith_top_tb.sv
    ./obj_dir/Vsc_arith_top_tb

Replace the module and file names to run another block's testbench. Every
testbench finishes in well under a second.

## Files

| file | contents |
|------|----------|
| `rtl/sc_pkg.sv` | constants (delay-code width, stage count), `size_e`, `dig_for()` |
| `rtl/tunable_delay.sv` | 1..8-bit programmable delay line |
| `rtl/repeating_circuit.sv` | repeats an n-bit sequence n times |
| `rtl/bit_shifting_circuit.sv` | emits a sequence and its n-1 left rotations |
| `rtl/select_gen.sv` | SEL-0 / SEL-1 for n = 4 and n = 8 |
| `rtl/stochastic_multiplier.sv` | exact n x n multiplier |
| `rtl/scaled_adder.sv` | exact (x1 + x2)/2 |
| `rtl/bin2stoch.sv`, `rtl/stoch2bin.sv` | number converters |
| `rtl/sc_arith_top.sv` | binary-in/binary-out top level |
| `tb/*_tb.sv` | one testbench per module |

## Changing the design

- **Larger n.** Widen `DIG_W` in `sc_pkg` so the delay reaches n, and
  raise `LOG2N_MAX` so the divider has 2·log2(n) stages. Then add the
  SEL-0/SEL-1 OR groups for the new size to `select_gen`, and a case to the
  size decode in `sc_arith_top`. Operand, product and sum widths follow
  `LOG2N_MAX`.
- **Other operand encodings.** Any n-bit pattern with k ones can replace
  `bin2stoch`. The multiplier and the adder stay exact whatever the order
  of the ones.
