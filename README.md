# Key-locked shift-register generators

A linear-feedback shift register is easy to reverse-engineer: its XOR gates and
feedback taps show the characteristic polynomial directly. This design hides the
function of small pseudorandom generators behind extra key inputs. The circuit
contains every gate that any of several generators needs. The key bits decide
which gates take part, so the same netlist can be an M-sequence generator, an
(M-1)- or (M-3)-sequence generator, an (M+1)-sequence generator, or one of
hundreds of odd, nonlinear state machines. Only the correct key gives the
intended generator. A wrong key does not stop the circuit. It turns it into a
different generator, and nothing on the outputs says that the key was wrong.

The RTL holds these generators, all 4 bits wide:

| module | what it is | state graph |
|---|---|---|
| `mseq_gen` | M-sequence, x^4 + x + 1 | one 15-cycle + 0000 fixed |
| `mminus1_gen` | (M-1)-sequence, (x+1)(x^3+x^2+1) | 14-cycle + 2-cycle |
| `mminus3_gen` | (M-3)-sequence, (x+1)^2(x^2+x+1) | 12-cycle + 4-cycle |
| `mplus1_gen` | (M+1)-sequence, all 16 states | one 16-cycle |
| `keyed_prng2` | locked by a 2-bit key, 4 generators | see below |
| `encrypted_prng` | locked by a 9-bit key, 512 generators | see below |
| `key_transform` | maps the primary key to the generator key | - |
| `prng_lock_top` | `key_transform` → `encrypted_prng`, plus all of the above | - |

All of them are built on `galois_core`, a programmable Galois register.

## State numbering

The bits are q1..q4. Every state vector is declared `logic [1:4]`, so `q[1]` is
q1 and is the leftmost bit. A state printed with `%b` therefore reads
q1 q2 q3 q4. All state strings in this README and in the testbenches use that
order. Verilator warns about the ascending ranges (`ASCRANGE`). This is
deliberate, so that the indices match the stage numbers.

## The programmable Galois register

`galois_core #(N)` computes, with addition modulo 2:

    q1* = qN + c1
    qj* = q(j-1) + a(j-1)·qN + cj        j = 2..N

The coefficients `a` select the polynomial x^N + a(N-1)x^(N-1) + … + a1·x + 1.
The inputs `c` add a term to each stage. That term is a constant in the fixed
generators, a key bit in the locked ones, and a zero-detector output where the
register is made nonlinear. The module works for any N. It is tested at N = 4
and at N = 8. At N = 8 it checks the 255-period of x^8+x^4+x^3+x^2+1.

## The fixed generators

- **M-sequence** (`mseq_gen`): a = 100, c = 0000. The polynomial is primitive,
  so all 15 nonzero states form one cycle. 0000 maps to itself.
- **(M-1)-sequence** (`mminus1_gen`): a = 110 and c = 1110.
  x^4+x^2+x+1 has the factor (x+1). Adding the constant 1 to stages 1-3 shifts
  the affine map so that the graph is 14 + 2.
- **(M-3)-sequence** (`mminus3_gen`): a = 101 and c = 1101. The graph is 12 + 4.

For both the (M-1) and the (M-3) generator, the parity of the state (the XOR of
all four bits) inverts on every clock of the long cycle. The testbenches check
this.

## Reaching the all-zeros state: the (M+1) generator

An M-sequence register skips 0000, because 0000 would map to itself.
`mplus1_gen` puts 0000 into the cycle with a single NOR gate:

    z   = NOR(q2, q3, q4)
    q2* = q1 + q4 + z           (other stages as in the M-sequence)

z is high in only two states, 1000 and 0000:

- In 1000 the M-sequence would go to 0100. The extra z flips q2, so the
  register goes to 0000 instead.
- In 0000, z is still high. q2 is flipped once more, and the register goes to
  0100. This is the state that 1000 would have reached.

Net effect: 0000 is inserted between 1000 and 0100. The result is one 16-state
cycle. The register has no gate in front of q4 (q4* = q3). This is the only
choice that gives the transitions 1000 → 0000 → 0100.

## The two-key locked generator (`keyed_prng2`)

The gates, with k = k1k0:

    f   = q4 + k0·k1                 feedback line
    z   = NOR(q2, q3, q4)
    q1* = f
    q2* = q1 + f + k1·¬k0·z
    q3* = q2 + k0·f
    q4* = q3

| k1k0 | what it becomes | graph |
|---|---|---|
| 00 | M-sequence | 15, 1 |
| 01 | x^4+x^2+x+1 without constants | 7, 7, 1, 1 |
| 10 | (M+1)-sequence | 16 |
| 11 | (M-1)-sequence: f inverted adds 1 to stages 1-3 | 14, 2 |

Both keys high invert the feedback line. That single inversion gives the
constant 1 on stages 1-3 of the (M-1) generator. Key 01 also adds the q4 tap
into stage 3, but without the constant. This gives a 7+7+1+1 graph, which is
useless as a generator but looks like a plausible one.

## The nine-key locked generator (`encrypted_prng`)

Every coefficient and every stage constant of the Galois register is a key bit.
Two gated zero detectors are added:

    q1* = q4 + k5
    q2* = q1 + k0·q4 + k6 + k3·za        za = NOR(q2, q3, q4)
    q3* = q2 + k1·q4 + k7
    q4* = q3 + k2·q4 + k8 + k4·zb        zb = NOR(q1, q2, q4)

| key bits | role |
|---|---|
| k0 k1 k2 | polynomial coefficients a1 a2 a3 |
| k5 k6 k7 k8 | stage constants c1 c2 c3 c4 |
| k3 | switches za into stage 2 (the (M+1) trick) |
| k4 | switches zb into stage 4 |

`prng_pkg::decode_key` holds this map.

Among the 512 keys:

- 32 give an M-sequence generator (graph 15-1). These are 2 primitive
  polynomials × 16 constant vectors.
- 16 give an (M-1)-sequence generator (14-2).
- 8 give an (M-3)-sequence generator (12-4).
- 32 give a single 16-state cycle.
- The rest give many other graph shapes, some with tails (states not on any
  cycle).

The testbench sweeps all 512 keys and checks the first three counts.

**Example key k8..k0 = 010001101.** It gives the (M+1)-sequence

    0000 0110 0001 1111 1000 0010 0011 1110 0101 1101 1001 1011 1010 0111 1100 0100

Here q3* = ¬q2 (c3 = 1), q4* = q3 + q4, and za feeds stage 2. za fires twice
per period, at 0000 and at 1000. The state parity alternates on every clock
except on those two clocks, where it is kept. The testbench checks both the
sequence and this parity rule.

## How many generators one register holds

For a width N, consider a Galois register with free coefficients and free
stage constants. Three kinds of generator can be counted among its settings:

    M-sequence       2^N     · phi(2^N - 1)     / N
    (M-1)-sequence   2^(N-1) · phi(2^(N-1) - 1) / (N - 1)
    (M-3)-sequence   2^(N-1) · phi(2^(N-2) - 1) / (N - 2)

Here phi is Euler's totient. phi(2^k - 1)/k is the number of primitive
polynomials of degree k. Each such polynomial gives a generator for every
constant vector (M) or for half of them (M-1, M-3).

| N | M | M-1 | M-3 |
|---|---|---|---|
| 4 | 32 | 16 | 8 |
| 5 | 192 | 32 | 32 |
| 6 | 384 | 192 | 64 |
| 7 | 2304 | 384 | 384 |

`tb_galois_variants` tries every (a, c) of `galois_core` at N = 4 to 7 and
checks these counts, using the helper `tb/galois_sweep.sv`. The locked circuits
in this RTL are 4 bits wide. The count grows quickly with N, so a wider locked
register would hide its generator among many more look-alikes.

## Key transformation table (`key_transform`)

The generator's key pins are not brought out. A table sits between the chip's
primary key and the generator:

- It has 2^PK_W words of TK_W bits (9 and 9). The primary key is the index.
- It is written through `prog_we/prog_addr/prog_data` at the last production
  step.
- It is then closed with `lock_req`. After that, writes are ignored.
- Until it is locked, the transformed key is all-zeros. The 9-key generator
  then only rotates its state (q1* = q4, qj* = q(j-1)).
- The read is registered, with one clock of latency.
- The lock flip-flop is cleared by `rst_n`. It stands in for a one-time fuse.

This is a substitution-box form of the key transformation. Other forms, such as
a cryptographic primitive or a one-way function fed by a key sequence, are not
built. The tamper resistance of a real key memory is physical, and RTL does
not model it.

## Top level (`prng_lock_top`)

The main path is primary key → `key_transform` → `encrypted_prng`.

- After `kt_lock_req`, `kt_locked` rises on the next clock edge.
- A primary-key change reaches the generator one clock later.

The two-key generator and the four fixed generators sit beside the main path,
each on its own ports. The fixed generators share one `fx_en/fx_load/fx_seed`.

Every generator has the same control ports:

- `rst_n`: asynchronous, active low, resets to 1000.
- `load`: loads `seed` synchronously. It has priority over `en`.
- `en`: advances the generator one state per clock.

The output is the whole state. The design has no serial output and no
output-valid signal.

## How far to trust it, and where it is this design's own

What follows the original circuits:

- The next-state equations of all the generators.
- Which key bit drives which gate.
- The mode list of the 2-key generator.
- The 16-state example sequence of the 9-key generator.
- The counts 32/16/8.

The testbenches reproduce all of these.

What is inferred:

- **Wires that leave the schematics.** In the 2-key circuit, the AND gate
  after q4 takes both key lines, and the NOR output goes back to the
  three-input AND. In the 9-key circuit, NOR(q2,q3,q4) goes to
  the k3 gate and NOR(q1,q2,q4) to the k4 gate. These connections are not fully
  visible in the original drawings. They were chosen because they reproduce all
  four 2-key graphs, the example sequence and the 32/16/8 counts.

What is entirely this design's choice:

- Reset, load, enable and the reset value.
- Everything in `key_transform` beyond "a protected memory that maps the
  primary key to the generator key".

## Simulating

Each block has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=N failures=M`, and each has a watchdog. `tb_graph_pkg`
turns a 16-entry next-state table into its sorted cycle lengths (e.g.
`"14-2"`).

| testbench | checks |
|---|---|
| `tb_galois_core` | random a/c/state against the equations at N = 4 and 8; N = 8 period 255 |
| `tb_mseq_gen`, `tb_mminus1_gen`, `tb_mminus3_gen`, `tb_mplus1_gen` | all 16 transitions, graph shape, period, parity rule, z pulses |
| `tb_keyed_prng2` | all four keys: 16 transitions each and graph shape; parity of key 11 |
| `tb_encrypted_prng` | all 512 keys × 16 states against the equations; 32/16/8 counts; example sequence |
| `tb_galois_variants` | every (a, c) at N = 4..7: generator counts against the formulas above |
| `tb_key_transform` | program, lock, read back, refused writes, latency, reset |
| `tb_prng_lock_top` | whole design at default parameters: unlocked rotation, correct key, 31 wrong keys, both zero detectors, all 2-key modes, the four fixed generators |

To run one with Verilator 5:

    verilator --binary -Wno-fatal -Irtl -Itb -y rtl +libext+.sv --top-module tb_prng_lock_top \
        rtl/prng_pkg.sv tb/tb_graph_pkg.sv tb/tb_prng_lock_top.sv -o sim
    ./obj_dir/sim

`-Wno-fatal` keeps the ascending-range warnings from stopping the build. For
any other testbench, replace the last file and the `--top-module`, and add
`-y tb` for `tb_galois_variants`. Each one runs in a few seconds at most.
