# A programmable 32-bit cryptography processor

Most ciphers are built from a few primitive operations: add and subtract, XOR, table
substitution, bit permutation and, for public-key schemes such as RSA, modular multiplication
and exponentiation. This processor puts one hardware unit for each of those primitives on a
shared 32-bit bus. A small control unit runs a program of these operations for a chosen number
of rounds. A different cipher is then a different program and different table contents, not
different hardware.

The most intricate part, and the one most of this text explains, is the modular multiplier. It is
a loop-unrolled (radix-4) Montgomery multiplier built as a one-dimensional systolic row of 8-bit
processing units. Two independent multiplications are interleaved so that every unit does useful
work in every cycle. The exponentiation unit is wrapped around it and uses those two streams for
the square and the multiply of each exponent bit at the same time.

The architecture follows a published description of a programmable cryptography processor. The
RTL here is an independent implementation. Where that description is silent (instruction set,
handshakes, table organisation, several timing details), the choices are this design's own. Each
one is listed under "Departures and own choices" below and in the opening comment of the file
concerned.

## Block diagram

```
                 +-----------+   +-----+   +------------+
                 | add/sub   |   | XOR |   | S/P EPROM  |
                 | (4 x 8-bit|   |     |   | 4 tables x |
                 | Brent-Kung)|  |     |   | 4 lanes x  |
                 +-----+-----+   +--+--+   | 256 x 32   |
                       |            |      +-----+------+
 in stream  +-------+  |            |            |        +---------------+
 ---------->|  I/O  |==+============+============+========| control unit  |
 <----------| buffer|  |      32-bit bus (result mux)     | instr buffer, |
 out stream +-------+  |                                  | cycle ROM,    |
                 +-----+------+       +------------------+| counters      |
                 | register   |       | exponentiation   |+---------------+
                 | bank 16x32 |       |  +------------+  |
                 +------------+       |  | Montgomery |  |
                                      |  | multiplier |  |
                                      |  +------------+  |
                                      +------------------+
```

`crypto_top` holds one instance of each unit. In every cycle the control word picks:

- two register operands (A and B);
- the unit whose output drives the bus;
- the register that is written from the bus.

## The Montgomery multiplier (`mont_mult`, `mont_pe`, `qgen`)

### Arithmetic

Montgomery multiplication computes `A*B*2^-n mod N` for an odd modulus `N` without any trial
division. Bit `i` of `A` is processed by

```
q_i     = (R + a_i*B) mod 2
R       = (R + a_i*B + q_i*N) / 2
```

Two such steps are merged into one radix-4 step:

```
R  <-  (R + (2a_{i+1} + a_i)*B + (2q_{i+1} + q_i)*N) / 4
```

so an n-bit multiplication takes n/2 steps (16 for 32 bits). Each step adds one of
{0, B, 2B, 3B} and one of {0, N, 2N, 3N}. Those eight values are formed once, when the
multiplication starts, and held in registers.

The two quotient bits of a step depend only on the two low bits of R, B and N and on the two
operand bits. The `qgen` block produces them with two 2-input multiplexers, two 2-bit adders and
two XORs:

- `q_i = R[0] xor (a_i and B[0])`;
- `s` is the 2-bit sum `R[1:0] + (a_i ? B[1:0] : 0) + (q_i ? N[1:0] : 0)`;
- `q_{i+1} = s[1] xor (a_{i+1} and B[0])`.

Invariant: with `A, B < N` and `R < 2N`, R stays below 2N. At the end a single conditional
subtraction of N brings the result below N, so it can be used as an operand again.

### The systolic row

The running sum `S = 4R` is split into bytes, and unit `j` owns byte `j`. A 32-bit multiplication
uses five units. The fifth only absorbs carries, since S < 8N < 2^35. The units are connected as
follows:

- **CARRY_OUT (2 bits)** goes left to unit j+1. It is bits 9:8 of the unit's 10-bit sum.
- **LSB_OUT (2 bits)** goes right to unit j-1. Bits 1:0 of byte j+1 of S are bits 7:6 of byte j
  of R = S/4. Each unit therefore forms its byte of R from the two bits it receives from the left
  (LSB_IN) above the six high bits of its own last result. This is how the division by 4 is done
  without shifting any register.

Inside a unit, one step works in two stages:

| cycle | what happens in unit j |
|-------|------------------------|
| t     | MUX B and MUX N pick byte j of `da*B` and `dq*N`; ADDER 1 adds them into REG 1 (9 bits) |
| t+1   | ADDER 2 adds `{LSB_IN, own[7:2]}` and CARRY_IN from the right neighbour; ADDER 3 adds REG 1; the 10-bit sum goes to that stream's RES_REG |

### Schedule and the two streams

A step issues every cycle, alternately for stream 0 and stream 1. The step issued in cycle `c`
executes in unit `j` in cycle `c + 1 + j`, so each unit lags its right neighbour by one cycle:

```
cycle:      1    2    3    4    5    6    7  ...
unit 0:    s0k0 s1k0 s0k1 s1k1 s0k2 s1k2 ...
unit 1:         s0k0 s1k0 s0k1 s1k1 s0k2 ...
unit 2:              s0k0 s1k0 s0k1 s1k1 ...
```

(`s0k1` = stream 0, step 1). All dependencies are exactly one cycle old when they are used:

- unit j executes stream s, step k one cycle after unit j-1 did, so CARRY_IN is ready;
- the left neighbour finished step k-1 of stream s in the previous cycle, so LSB_IN is ready;
- qgen needs the two low bits of stream s's R (bits 3:2 of unit 0's result), which unit 0
  wrote in the previous cycle.

A single stream could issue only every other cycle, and every unit would then sit idle half the
time. The second stream fills those gaps.

Each unit therefore keeps two result registers (RES_REG 1 and 2), one per stream. A **RES MUX**
shows each neighbour the register of the step that neighbour is executing.

### Longer operands: 32-bit groups

The same five-unit row handles operands of 1 to 4 words (32 to 128 bits). The operand is split
into 32-bit groups that pass through the row one after another:

- Units 0-3 take bytes 0-3 of the current group. Unit 4 works only in the most significant
  group, where it holds the top byte and absorbs the carries.
- Each unit keeps one result register per stream and per group.
- Each radix-4 step is issued group by group, both streams per group:
  `(s0,g0) (s1,g0) idle idle (s0,g1) (s1,g1) idle idle ... (s0,g_top) (s1,g_top)`.
  A step therefore takes `4*groups - 2` issue slots; with one group this is the plain
  alternation above.
- Unit 3's carry out of group g becomes unit 0's CARRY_IN for group g+1. The two idle slots
  give it time to arrive. Unit 0's low bits of group g+1 (from the previous step) are unit 3's
  LSB_IN for group g.
- The q bits and the two operand bits of a step are formed when group 0 is issued, and held for
  the step's other groups.

An n-bit multiplication (`n = 32*groups`) takes n/2 steps. `done` comes
`16*groups*(4*groups-2) + 7` cycles after `start`: 39 cycles for 32 bits, 199 for 64 bits and
903 for 128 bits.

### Interface and timing

- Pulse `start` with `ng` (the number of groups), `n_in` (odd) and `b_in` (< N).
- The operand bits are pulled two at a time. When `a_shift[s]` is high, `a_digit_s` must hold
  `{a_{i+1}, a_i}` of stream s. The supplier shifts its A register right by 2 after each pulse.
  Rotating it instead restores the register after n/2 pulses.
- When `done` pulses, `res0` and `res1` hold `A_s*B*2^-n mod N`. Both results come from the same
  B and N.

`MAXG` (default 4) sets the longest operand in groups.

## Exponentiation (`exp_unit`)

Square-and-multiply, least significant exponent bit first, computing `P0 * M^E mod N`:

1. **Into Montgomery form.** B-REG = `2^(2n) mod N`. Stream 0 (fed from the M-SHIFT REG) gives
   `M*2^n`; stream 1 (fed from the P-SHIFT REG) gives `P0*2^n`.
2. **Per exponent bit.** B-REG = M. Stream 0 gives `M*M` and stream 1 gives `P*M`, at the same
   time. The DECODER writes M back always, and writes P back only if `e_i = 1` (bit taken from
   the E-SHIFT REG).
3. **Out of Montgomery form.** B-REG = 1. Stream 1 gives `P*2^-n`.

The B-REG input multiplexer therefore chooses between `2^2n mod N`, `1` and `M`. The M and P
shift registers rotate two bits per multiplier step, so a multiplication leaves them unchanged
until the decoder overwrites them.

The operands are loaded one 32-bit word per cycle from the bus (`ld`, `ld_word`), and the result
is read back one word at a time (`rd_word`). Loading word 0 clears the upper words, so a short
operand after a long one starts clean. The shift registers rotate within the n bits in use.

Operation modes:

- **Exponentiation:** P0 = 1 and nbits = n. Latency is `(nbits+2)*(L+2)+1`, where L is the
  multiplier latency: 1395 cycles for 32 bits, 13267 for 64 bits, 117651 for 128 bits.
- **Single modular multiplication `A*B mod N`:** M = B, P0 = A, E = 1, nbits = 1. Latency is
  124 cycles for 32 bits.

`2^2n mod N` is an input. The processor keeps it in registers r12 upwards, and it must be
computed beforehand.

## Substitution and permutation (`sp_eprom`)

Tables are programmed into a memory through its write port, which models programming an EPROM.
The memory holds 4 tables, each with 4 byte lanes of 256 × 32-bit entries. A SUBST instruction
works on each 32-bit word as follows:

- each byte `b` of the word indexes lane `b` of the chosen table, one lane per cycle (4 cycles
  per word);
- the four 32-bit entries are XORed together.

This structure covers several kinds of table:

- **8-to-32-bit S-boxes:** one lane holds the S-box.
- **Arbitrary 32-bit permutations, expansions and compressions:** each lane entry holds its
  byte's bits already moved to their output positions, and the XOR acts as an OR.
- **Combinations of the two.**

## Control (`control_unit`) and instruction set

The master (the host) writes up to 16 instructions into the instruction buffer. It then pulses
`start` with three values:

- `prog_len`: the program length;
- `rounds`: 1 to 255;
- `nwords`: the operand length in 32-bit words, 1 to 4.

Three counters run the program:

- the **instruction counter** selects the instruction;
- the **read counter** counts the instruction's cycles, and also gives the word index (and, for
  SUBST, the byte lane);
- the **round counter** counts passes over the program.

A **cycle ROM**, indexed by opcode and word count, gives each instruction's length. When the read
counter reaches it, the next instruction starts. `done` pulses after the last cycle of the last
round.

Instruction format (`instr_t`, 18 bits): `{op[3:0], rd[3:0], rs1[3:0], rs2[3:0], tbl[1:0]}`.

| op | operation | cycles |
|----|-----------|--------|
| ADD / SUB | `rd.. = rs1.. ± rs2..` over `nwords` consecutive registers, carry/borrow chained | nwords |
| XOR | `rd.. = rs1.. ^ rs2..` | nwords |
| SUBST | `rd.. = XOR_b table[tbl][b][byte b of rs1..]` | 4·nwords |
| MODMUL | `rd.. = rs1.. * rs2.. mod N` | 2·nwords + exponentiation latency with nbits = 1 (126 for one word) |
| MODEXP | `rd.. = rs1.. ^ rs2.. mod N` (exponent of 32·nwords bits) | 2·nwords + exponentiation latency (1397 for one word) |
| IN | `rd..` ← input buffer; stalls while it is empty | nwords |
| OUT | output buffer ← `rs1..`; stalls while it is full | nwords |
| NOP | — | 1 |

Multi-word operands sit in consecutive registers, least significant word first. The modular
instructions take the modulus N from r8 upwards and `2^2n mod N` (n = 32·nwords) from r12
upwards. They spend nwords cycles loading the operands into the exponentiation unit, one cycle
starting it, the unit's latency waiting, and nwords cycles writing the result back. Because all
loads come before any write, `rd` may equal `rs1`. During a stall all counters hold and nothing
is written.

## Other blocks

- `bk_adder8`: an 8-bit Brent-Kung prefix adder (up-sweep 1:0, 3:0, 7:0; down-sweep 2:0, 4:0,
  5:0, 6:0).
- `addsub32`: four of these adders in a carry chain. It subtracts by inverting b with carry-in 1,
  and its carry ports chain words.
- `xor_array`: a 32-bit XOR unit.
- `reg_bank`: 16 × 32-bit registers with four read ports (two operands, a word of N, a word of
  2^2n mod N) and one write port. It clears on reset.
- `io_buffer`: two 8-word FIFOs (built from `sync_fifo`) with valid/ready handshakes on the
  outside.
- `crypto_pkg`: opcodes, the instruction and control-word structs, and the latency formulas
  that fill the cycle ROM.

## Departures and own choices

| item | the published description | here |
|------|---------------------------|------|
| Processing-unit pipeline | shows a register (REG 2) after the adder that adds CARRY_IN, but also states that neighbouring units work on the same step one cycle apart | ADDER 2 feeds ADDER 3 directly. With one cycle between neighbours, the carry arrives in the cycle the result is due. REG 1 is kept |
| Final reduction | not described | one conditional subtraction of N, so results are < N |
| Operands longer than 32 bits in the multiplier | 32-bit groups processed in turn, with a circulated carry (only outlined) | built for up to 4 groups; the issue order, idle slots and per-group result registers are this design's own (see above) 
| `2^2n mod N` | used as a multiplexer input, origin not given | supplied by the host in r12.. |
| Exponent bit 0 | no multiplication is done | the multiply stream runs anyway; its result is discarded |
| Instruction set, buffer, stall rule, register conventions | not described | as in the table above |
| EPROM organisation and size | "an EPROM implements S- and P-boxes" | 4 × 4 × 256 × 32 bits, XOR of byte-lane lookups, asynchronous read |
| Meaning of the three counters | named only | round, instruction and read (cycle) counters |
| I/O buffer, register bank | named only | FIFOs with valid/ready handshakes; 16 × 32 register file |

The reported clock rate and area came from a different technology and synthesis tool. Nothing in
this RTL is tuned to reproduce them.

## Verification

Every module has a self-checking testbench in `tb/`. Each one ends by printing
`TB_RESULT checks=<n> failures=<m>`.

| testbench | what it checks |
|-----------|----------------|
| `tb_bk_adder8` | all 131,072 input combinations |
| `tb_addsub32` | corner cases and 20k random add/subtract operations; 96-bit add and subtract done word by word |
| `tb_xor_array` | walking ones and random operands |
| `tb_sp_eprom` | every entry is written and read back; reprogramming affects only the written entries |
| `tb_qgen` | all inputs: the q bits make the sums divisible by 2 and by 4 |
| `tb_mont_pe` | one unit, cycle by cycle, with random streams and groups, against a reference of the unit's arithmetic |
| `tb_mont_mult` | 168 multiplications (both streams) of 1 to 4 groups against `A*B*2^-n mod N` computed with wide integers; latency for each group count; operand registers restored |
| `tb_exp_unit` | exponentiations of 1 to 4 words (including the textbook RSA pair 65^17 mod 3233 = 2790 and back), E = 0, zero exponent bits, single multiplications, word-wise loading and read-out; latency |
| `tb_reg_bank`, `tb_io_buffer` | against reference arrays and queues, including the FIFOs' full and empty states |
| `tb_control_unit` | every control-word field, every cycle, for a two-round two-word program with random stalls; `done` timing |
| `tb_crypto_top` | runs the whole processor at its default size (see below) |

`tb_crypto_top` plays the host. It programs an S-box table and a bit-reversal permutation table,
then runs two programs:

- 64-bit ADD/SUB/XOR/SUBST/OUT over 3 rounds;
- RSA-style MODEXP and MODMUL with 64-bit moduli over 2 rounds, then the same program with 32-bit
  moduli for 1 round;
- one 128-bit MODEXP, which uses all 16 registers.

Input arrives with random gaps and output leaves with random back-pressure, and every output word
is checked. The testbench also counts how often each of the following happened, and fails if any
count is zero:

- input stall and output stall;
- carry and borrow between words;
- S-box and P-box lookups;
- exponentiation and modular multiplication;
- a multi-word modular operation;
- a new round starting;
- a change of operand length.

The whole run takes about 160,000 cycles, most of them in the 128-bit exponentiation.

`tb_blowfish_rounds` shows the processor running a real cipher structure: Blowfish's 16-round
Feistel network with its four 8-to-32-bit S-boxes. Each S-box is placed in its own table, in the
byte lane it is indexed by. A single SUBST then returns one S-box entry, and the round function
`((S0 + S1) ^ S2) + S3` becomes four SUBSTs, two ADDs and one XOR. The round program has 13
instructions and takes 25 cycles. The round counter repeats it 16 times, and the host streams in
one subkey per round.

The S-boxes and subkeys in this test are random. Four blocks are encrypted and checked against a
reference model, then decrypted on the processor back to the plaintext. The test also checks
that the 16 rounds take exactly `16 × 25 + 1` cycles from `start` to `done`.

To simulate one testbench with Verilator (5.x), run from the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing -Wno-fatal -Irtl -y rtl rtl/crypto_pkg.sv tb/tb_crypto_top.sv \
          --top-module tb_crypto_top -Mdir obj_top
./obj_top/Vtb_crypto_top
```

Replace `tb_crypto_top` with any other testbench name. `-y rtl` lets Verilator find each module
in `rtl/<module>.sv`. The package has to be named first.

## Limits

- Modular operands are at most 128 bits (4 words). RSA with realistic key sizes (512 bits and
  more) does not fit: the 16-register bank cannot hold N, 2^2n mod N, M, E and the result at
  that size. `MAXG` could be raised in the multiplier, but the register bank and control would
  have to grow with it.
- A 128-bit MODEXP takes 117,659 cycles. At 77 MHz that is about 1.5 ms, or roughly 84 kbit/s
  of exponent-sized data.
- Apart from the Blowfish-structured test, no cipher program (DES, IDEA, ...) is provided. The instruction set has no shift or
  bit-field extraction instruction, so a cipher whose S-box indices are not byte-aligned (DES)
  needs its bit selection folded into the permutation tables.
- Operands of the modular instructions must be below N, and N must be odd. Assertions in
  `mont_mult` flag an even modulus.
