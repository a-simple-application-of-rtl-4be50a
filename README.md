# FM0 transmit path for DSRC

Dedicated short-range communication (DSRC) links, as used for electronic toll
collection, send their data in FM0 (bi-phase space) line code. FM0 keeps the
signal DC-balanced and carries the bit clock inside the data: the level changes
at every bit boundary, so a receiver can always find the bit edges. This RTL
is a small FM0 transmitter. Words are written into a buffer and a memory.
They are serialized most significant bit first, stepped by a ring counter,
and then encoded by a one-flip-flop FM0 encoder at one bit per clock.

```
 in_data/in_valid ─► input_buffer ─► memory_block ─► prefetch ─► tx_word
        in_ready ◄─┘  (1 word)        (16 x 8, queue)   register     │
                                                                     ▼
                                      ring_counter ──one-hot──► bit select ─► fm0_encoder ─► fm0_out
```

## The FM0 code

Each bit occupies one symbol period, split into two halves.

* The level inverts at every symbol boundary.
* A `0` inverts the level again in the middle of the symbol.
* A `1` keeps the level constant for the whole symbol.

For example, starting from a high line, the bits `1 0 0 1` give the half-levels
`00 10 10 11`.

## The encoder as a state machine

Each symbol is described by a two-bit state code `(A, B)`. `A` is the level
of the first half and `B` the level of the second half. The four states are
S1 = 11, S2 = 10, S3 = 01 and S4 = 00. The boundary rule forces
`A(t) = ~B(t-1)`. The mid-symbol rule forces `B(t) = A(t)` for a `1` and
`B(t) = ~A(t)` for a `0`. Together:

```
A(t) = ~B(t-1)
B(t) =  X xor B(t-1)
```

| previous (A,B) | A(t), X=0 | A(t), X=1 | B(t), X=0 | B(t), X=1 |
|---|---|---|---|---|
| 1 1 (S1) | 0 | 0 | 1 | 0 |
| 1 0 (S2) | 1 | 1 | 0 | 1 |
| 0 1 (S3) | 0 | 0 | 1 | 0 |
| 0 0 (S4) | 1 | 1 | 0 | 1 |

The line is formed by letting the clock choose the half:
`fm0_out = CLK ? A(t) : B(t)`. While the symbol clock is high the line carries
`A`, and while it is low the line carries `B`.

### One flip-flop instead of two

The table shows that the next state depends only on `B(t-1)`, never on
`A(t-1)`. So `rtl/fm0_encoder.sv` keeps only a `B` register, which holds
`B(t-1)`. An inverter gives `A(t)` and an XOR gives `B(t)`. The register
takes `B(t)` at the rising edge that ends the symbol. The whole encoder is
one flip-flop, an inverter, an XOR, a 2:1 multiplexer and the enable AND.
This costs something: `B(t)` is formed combinationally from `x`, so `x` must
stay stable for the whole clock period and not only around the edge. In this
design `x` comes straight from registers, so it meets that rule.

The clock drives the output multiplexer as a data input. That is the point
of the architecture, and the reason a symbol takes one clock period rather
than two. A physical implementation has to treat `fm0_out` as a
clock-derived signal. The duty cycle of the clock sets the ratio between the
two half-symbols.

The register resets to 1, so encoding starts from state S1. The first
symbol's first half is therefore low.

## The transmit path (`rtl/fm0_dsrc_top.sv`)

* **Input buffer** (`input_buffer`). This is a one-entry holding register
  with valid/ready on both sides. It accepts a word in any cycle where it is
  empty or its word is leaving, so it passes one word per clock. It holds the
  source off (`in_ready` low) while the memory is full.
* **Memory block** (`memory_block`). A `DEPTH` x `WIDTH` RAM with one
  synchronous write port and one synchronous read port. A read takes one
  clock. A read of the address being written in the same cycle returns the
  old word. The top uses it as a circular queue, with a write pointer, a read
  pointer and a fill level (`mem_level`).
* **Prefetch register**. This register lives in the top. The oldest word is
  read ahead into it, which hides the read latency. When the word on the
  line ends, the prefetched word becomes the current word (`tx_word`) in the
  same clock. Stored words therefore leave back to back with no gap symbol.
* **Ring counter** (`ring_counter`). A one-hot circular shift register with
  `N = WIDTH` stages. Its last stage feeds the first. Stage `k` selects bit
  `WIDTH-1-k` of `tx_word` as the encoder's data bit. The counter is
  restarted at stage 0 each time a new word is taken.
* **FM0 encoder** (`fm0_encoder`). It is enabled while `tx_active` is high.
  When no word is waiting, `tx_active` drops at a word boundary. The encoder
  then holds its state and the line stays low. When data returns, FM0
  continues from the held state.

### Timing

* A word accepted at rising edge `n` is written into memory at `n+1`.
* It is read at `n+2` and reaches the prefetch register at `n+3`.
* If the line was idle, its first symbol occupies the clock period that
  starts at edge `n+4`.
* After that the line carries one bit per clock period.
* A stream of `k` words that keeps the memory non-empty leaves as `8k`
  consecutive symbols.
* The input side takes up to one word per clock. The line drains one word
  per 8 clocks. A burst longer than the memory plus the buffer (17 words)
  therefore sees back-pressure.

### Interface of the top

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | symbol clock, one bit per period |
| `rst_n` | in | 1 | asynchronous active-low reset |
| `in_data` | in | `WIDTH` | word to send |
| `in_valid` / `in_ready` | in / out | 1 | the word moves at a rising edge where both are high |
| `fm0_out` | out | 1 | FM0 line: first half-symbol while `clk` is high, second while it is low |
| `tx_active` | out | 1 | a symbol is on the line in this period |
| `mem_level` | out | `$clog2(DEPTH)+1` | words waiting in memory |

Parameters are `WIDTH` (default 8) and `DEPTH` (default 16, a power of two
is not required). Their defaults live in `rtl/fm0_pkg.sv`.

## Design choices beyond the FM0 architecture

The encoder follows the FM0 state-machine derivation and its
one-flip-flop form exactly. The transmit path around it uses the three
parts named above in their natural order, but the following details are
choices of this design:

* the word width (8) and memory depth (16);
* the valid/ready handshake and the one-entry input buffer;
* the queue discipline and the prefetch register;
* most-significant-bit-first order;
* the ring counter's restart input;
* the encoder enable, and a line held low while idle.

Not included:

* **The second code of a shared mode multiplexer.** The architecture this
  encoder comes from puts a mode select on its output mux, with mode 0
  selecting FM0. Only FM0 is built, so there is no `mode` input.
* **Clock gating.** It is named as a companion technique, but nothing about
  it is specified, so none is built.
* **Speed and power.** The reference figures for the encoder alone are
  900 MHz and 1.14 mW. They depend on the process and are not something RTL
  can show. The RTL is a single-clock design, and the clock sets the bit
  rate. European DSRC (500 kbit/s) would need a 0.5 MHz symbol clock.
  Japanese DSRC (1 or 4 Mbit/s) would need 1 or 4 MHz.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

* `fm0_encoder_tb` compares both half-levels of 2000+ random symbols, with
  idle gaps, against a model written from the FM0 rules. It checks the
  transition-table path S1 → S3 → S4 from reset. It also checks the rate of
  one symbol per clock.
* `ring_counter_tb` checks the stage vector and last flag against a position
  model, under random rotate, hold and restart. Wrap-around is covered.
* `input_buffer_tb` runs a random source and a random sink against a
  reference queue. It checks order, loss and duplication, refusal when full,
  and one word per clock.
* `memory_block_tb` runs random reads and writes against a shadow array. It
  checks the read latency, the hold behaviour and same-address collisions.
* `fm0_dsrc_top_tb` runs the whole path at the default sizes. It decodes
  `fm0_out` back into words and compares them with what was sent (202
  words). It checks the 320-symbol unbroken run of a 40-word burst and the
  4-clock start latency. It counts back-pressure, memory full, idle gaps,
  word hand-over, ring wrap and address wrap, and fails if any of them never
  happens.

The modules also carry assertions: the ring counter stays one-hot, a held
input word is stable, and the queue neither overflows nor reads while empty.

To run the end-to-end test with Verilator 5:

```
verilator --binary --timing --assert --top-module fm0_dsrc_top_tb \
  -y rtl -y tb +libext+.sv rtl/fm0_pkg.sv tb/fm0_dsrc_top_tb.sv
./obj_dir/Vfm0_dsrc_top_tb
```

Replace the top module and file name to run another testbench. The
testbenches sample the line a few time units after each clock edge. They
expect the design's outputs to settle within that time, which holds in
zero-delay simulation.

## Changing it

* **Word width.** `WIDTH` sets the word width and the ring length together.
  A different serialization order only touches the bit-select loop in the
  top.
* **Memory depth.** `DEPTH` sets the memory and the pointer widths.
* **Testbench sizes.** The top testbench assumes 8 and 16 in its expected
  counts (`W`, `D`), so change those together with the parameters.
