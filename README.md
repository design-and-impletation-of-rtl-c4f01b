# Keystream generators: an alternating step generator with key-dependent decimation, and two hash-based stream ciphers

A binary additive stream cipher XORs each message bit with a keystream bit.
Its security rests on the keystream generator. Linear feedback shift registers
(LFSRs) are cheap and fast, but their output is linear. An attacker who has a
short stretch of keystream can solve for the state. This RTL holds three
generators that break that linearity in different ways:

* **K-generator (`asg`).** An alternating step generator, with a key-dependent
  number of steps. A 128-stage register R1 decides, bit by bit, whether R2 or
  R3 is clocked, and how many times (1 to 16). This irregular clocking is the
  main design and the one with the strongest security argument.
* **Stream cipher 1 (`sc1_keystream`).** Each n-bit keystream word is an
  LFSR-based Toeplitz hash of the previous word XORed with the key, followed by
  the state of a small counter LFSR.
* **Stream cipher 2 (`sc2`).** A filter generator: a nonlinear function of a
  9-stage LFSR. Every LFSR period, the register is reseeded from CRC
  remainders of its own output. It returns to the key after (2^9-1)^2 bits.

`keystream_top` instantiates all three side by side. They share only the clock
and the reset.

All code is synthesizable SystemVerilog-2017. Parameters default to the sizes
the design was specified with. Anything the specification left open is a
design choice, and each one is listed in [Design choices](#design-choices-and-departures).

## The K-generator (`asg`)

### Registers and the key

| register | stages | feedback polynomial |
|---|---|---|
| R1 (control) | 128 | x^128 + x^126 + x^101 + x^99 + 1 |
| R2 | 89 | x^89 + x^51 + 1 |
| R3 | 97 | x^97 + x^91 + 1 |

All three are Fibonacci LFSRs (`lfsr.sv`). Each shifts towards bit 0, and bit 0
is its output. The specification fixes R1 at 128 stages. It asks only that R2
and R3 be longer than 80 stages. The lengths 89 and 97 have primitive
trinomials, and they give coprime periods, since gcd(2^89-1, 2^97-1) = 1.

The key has four parts:

* the three initial states, which must be nonzero;
* two sets of four 6-bit indices, `idx1` and `idx2`, which pick stages 0..63 of R1;
* the output class, `mode_r1`.

`load` takes the whole key in one cycle.

### One keystream bit

Let t be the position of R1.

1. **Choose.** If R1 bit 0 (called A0) is 1, R2 will be clocked. If it is 0,
   R3 will be clocked.
2. **Count.** The clock count is the decimation value. For R2 it uses the
   indices `idx1`:

       del1 = 1 + R1[idx1_0] + 2*R1[idx1_1] + 4*R1[idx1_2] + 8*R1[idx1_3]

   `del2` is the same with `idx2`, and is used for R3. Each value lies in 1..16.
   `asg_delta.sv` builds the circuit in four parts:
   * one 6-to-64 decoder per index;
   * an AND of the decoder output with R1, reduced to the selected bit;
   * a left shift by the bit's weight;
   * an adder.
3. **Clock.** The chosen register steps `del` times, once per clock cycle. The
   other register stands still.
4. **Output.** The keystream bit is:
   * `z = R1[0] ^ R2[0] ^ R3[0]` for class Ω¹ (`mode_r1 = 1`);
   * `z = R2[0] ^ R3[0]` for class Ω² (`mode_r1 = 0`).

   R1 is still at position t. R2 and R3 are after their clocking.
5. **Advance.** R1 steps once.

The intended period is 2^128 · (2^89-1) · (2^97-1). The varying step count
means an attacker cannot tell which positions of R2 and R3 contributed to a
given bit.

### Clock control (`asg_ctrl`)

A three-state machine does the sequencing:

    S1 --A0=1, count:=del1--> S3 (clock R2 each cycle) --count over--> S1
    S1 --A0=0, count:=del2--> S2 (clock R3 each cycle) --count over--> S1

S1 lasts one cycle. In that cycle the machine samples A0 and both deltas, and
loads a down counter. S2 or S3 lasts `del` cycles. Its last cycle raises
`done`, which steps R1 and registers z. Registers are not clock gated: every
register runs on `clk` and has a step enable.

**Timing.** One bit takes 1 + delta clock cycles. With random key bits that is
2 to 17 cycles, 9.5 on average. `ks_valid` pulses for one cycle, the cycle after
`done`. `ct_bit = msg_bit ^ ks_bit` is combinational, so the message bit must be
presented while `ks_valid` is high. `enable` is sampled only in S1. A bit
already started always finishes. A `load` aborts the current bit and returns
the machine to S1.

Synthesis of `asg` at the defaults gives 372 flip-flops. The count is mostly
the three registers, 128 + 89 + 97 stages.

## Stream cipher 1 (`toeplitz_hash`, `sc1_keystream`)

### The hash

An n x m binary Toeplitz matrix is defined by m + n - 1 bits. An LFSR supplies
them. Its successive states are the matrix columns. The hash is computed
serially:

* each message bit steps the n-stage LFSR A;
* if the bit is 1, the current state of A is XORed into the n-bit accumulator H.

After m bits, H = T·M over GF(2).

The LFSR's feedback polynomial and initial state sit in a control register. It
can be rewritten with `cfg_load`. It resets to:

* polynomial h(x) = x^5 + x^2 + 1;
* initial state (A0..A4) = (0 0 0 1 1).

`start` reloads A from the control register and clears H. So every message sees
the same matrix.

### The chaining

With KEY and the X words n bits wide, and S_i the state of a degree-(m-n) LFSR
(x^4 + x + 1) stepped once per word:

    X_1 = HASH(KEY || S_1)
    X_i = HASH((KEY ^ X_{i-1}) || S_i)
    keystream = X_1 || X_2 || ...

The defaults are n = 5 and m = 9, so the hash input is 9 bits. The most
significant bit of `{KEY ^ X, S}` goes in first.

**Timing.** One word takes m + 2 = 11 cycles:
* 1 cycle to build the input;
* m cycles to absorb it;
* 1 cycle to take the result.

`ks_valid` pulses with `ks_word`. `ct_word = pt_word ^ ks_word`. `load` takes
the key and seed, and restarts at X_1.

### Period

The expected period is n(2^n-1)(2^(m-n)-1) bits. The state space is (X, S),
and the map from one state to the next need not be a permutation. So the
period depends on the key, the hash polynomial and the initial state.

Measured with the RTL (`tb_sc1_table1`). Each size was run with every key:

| n | m | expected | measured longest | keys reaching the expected value | hash polynomial, start state |
|---|---|---|---|---|---|
| 4 | 7 | 420 | 224 | 0 of 16 | x^4+x+1, all ones |
| 5 | 8 | 1085 | 1085 | 31 of 32 | x^5+x^2+1, all ones |
| 5 | 9 (default) | 2325 | 2325 | 31 of 32 | x^5+x^2+1, all ones |
| 7 | 10 | 6223 | 6223 | 127 of 128 | x^7+x+1, 7'd38 |
| 7 | 11 | 13335 | 13335 | 127 of 128 | x^7+x+1, 7'd38 |

The default configuration reaches the expected period for almost every key,
and so do n = 7 with a suitable start state. n = 4 is the exception: no start
state with either primitive polynomial (x^4+x+1, x^4+x^3+1) reached 420; the
longest found was 224. With the hash start state 7'd1, the n = 7 sizes stay
below 1500 bits. In short, the start state of the hash LFSR is part of what
makes a good key, not only KEY itself.

## Stream cipher 2 (`sc2`, `crc_div`, `sc2_filter`)

A 9-stage LFSR steps every cycle. Its feedback polynomial is Q(x) = x^9 + x^4 + 1.
The filter gives one keystream bit per cycle:

    f = x0 ^ x1·x2 ^ x3·x4 ^ x5·x6 ^ x7·x8

f is balanced and quadratic. The specification leaves the filter open, so this
function is this design's choice.

The bit leaving the LFSR also feeds two serial CRC dividers (`crc_div`):

* G1(x) = x^6 + x^5 + x^4 + x^3 + 1;
* G2(x) = x^2 + x + 1.

**Reseeding.** A cycle counter marks the last cycle of each 2^9 - 1 = 511-cycle
interval. In that cycle the LFSR is loaded instead of stepped. The new state is
`{1, rem_G1, rem_G2}`. The leading 1 fills the ninth bit and keeps the seed
nonzero. Both dividers are cleared. A second counter counts intervals. After
2^9 - 1 intervals the LFSR is reloaded with the key instead, so the keystream
repeats every (2^9-1)^2 = 261121 bits.

At smaller sizes (`tb_sc2_table2`) the keystream period is exactly
(2^m-1)^2 bits. The runs used m = 4, 5 and 7, with n = m, giving 225, 961 and
16129 bits. The same holds for 261121 bits at m = 9 (`tb_sc2`).

**Timing.** Each cycle with `enable` high produces one bit. `ks_valid` and
`ks_bit` are registered. `ct_bit = msg_bit ^ ks_bit`. The `reseed` and `rekey`
outputs pulse with the bit of the cycle in which the load happened.

## Top level (`keystream_top`)

Ports are grouped by prefix:

* `asg_*`: the K-generator ports, as in `asg`;
* `sc1_*`: stream cipher 1;
* `sc2_*`: stream cipher 2.

Clock `clk` is rising-edge. Reset `rst_n` is asynchronous and active low.
After reset each generator holds a fixed nonzero default state. Real use starts
with a `*_load` of a key.

Shared constants are in `ks_pkg.sv`:

* register lengths;
* polynomials, as masks of their low coefficients c_0..c_{L-1};
* the state type of the clock-control machine.

## Design choices and departures

These points are not fixed by the specification. They were decided here:

* **Polynomials.** Not specified for R1, R2, R3 or the stream cipher 1 state
  register. Standard primitive polynomials are used.
* **K-generator clock gating.** R2 and R3 are described as clocked through
  gates driven by R1. Here they are clock-enabled on one clock. The control
  takes one decision cycle per bit.
* **K-generator indices.** Keyed and limited to R1 stages 0..63, to match the
  6-bit decoder. The fixed choice "stages 0..w-1" is the special case
  `idx[k] = k`.
* **A0 conflict.** One sentence of the description pairs A0 = 0 with R2. That
  contradicts both the algorithm and the state diagram. The algorithm is
  followed: A0 = 1 clocks R2, del1 times.
* **K-generator output timing.** Output taken after the clocking of R2/R3 and
  before R1 steps.
* **Stream cipher 1 KEY width and input order.** KEY is n bits wide; the hash
  input goes MSB first.
* **Stream cipher 2 filter, seed layout and feed.** The filter function and the
  seed layout are this design's. So is feeding the dividers from the LFSR's
  output bit, with the dividers cleared at every reseed. The reload exponent n
  is taken equal to m = 9.
* **Not reproduced.** Two blocks in the source schematics, an 8-bit counter and
  an 8-input multiplexer in stream cipher 2, have no stated function and are
  not reproduced.

## Verification

Each module has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `tb_lfsr` | full period 31 of a 5-stage register; 800 bits of the 128-stage register against its recurrence; load/hold |
| `tb_asg_delta` | 3000 random R1 states and index sets against direct bit selection; extremes 1 and 16 |
| `tb_asg_ctrl` | 600 random decisions: one S1 cycle, exactly del clocks of the right register, done only in the last cycle |
| `tb_asg` | 3200 keystream bits, both output classes, against a separate model; spacing of every bit equals 1 + delta |
| `tb_toeplitz_hash` | 700 messages against an explicit Toeplitz matrix product, including a rewritten control register |
| `tb_sc1_keystream` | 1150 words against a model of the chaining; 11-cycle word spacing; key reload restarts at X_1; period 2325 bits |
| `tb_crc_div` | 400 random streams against schoolbook long division for G1 and G2 |
| `tb_sc2_filter` | all 512 inputs; balance; nonlinearity |
| `tb_sc2` | one full key period (261121 bits) plus 2000, with random stalls: every bit, 510 reseeds, one key reload, repetition |
| `tb_keystream_top` | all three at default size through the top ports: encrypt, reload the key, decrypt, compare; checks periods, balance and key dependence; counts each mechanism (R2 and R3 clocking, both ASG classes, key reloads, stalls, hash polynomial reload, reseed, rekey) and fails if one never occurs |
| `tb_sc1_table1` | stream cipher 1 at five (n, m) sizes, every key: period bounds and the table above |
| `tb_sc2_table2` | stream cipher 2 at m = 4, 5, 7: measured keystream period (2^m-1)^2 and reseed count |

Running one test with Verilator 5. The package goes first, and `-y` finds the
other modules:

    verilator --binary --timing --assert -Irtl -y rtl -y tb rtl/ks_pkg.sv tb/tb_keystream_top.sv \
        --top-module tb_keystream_top -Mdir obj && ./obj/Vtb_keystream_top

Each test runs in under a second, except `tb_sc1_table1`, which takes about 8 s.

## Changing the design

* **K-generator.** `L1`, `L2`, `L3`, `TAPS1..3`, `W1`, `W2` and `IDXW` are
  parameters of `asg`. The counter width follows W. Keep `L1 >= 2^IDXW` if
  every index should reach a stage.
* **Stream cipher 1.** `N`, `M`, `HPOLY`, `HINIT` and `SPOLY` are parameters.
  `M - N` must be at least 2.
* **Stream cipher 2.** `M`, `N`, `QPOLY`, `D1/G1POLY`, `D2/G2POLY` and `NF` are
  parameters. `D1 + D2 < M` is required for the padding bit.
* **Polynomial masks.** For p(x) = x^L + ... + c_1 x + c_0, bit i of the mask is
  c_i.
