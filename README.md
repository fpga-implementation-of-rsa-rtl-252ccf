# 1024-bit RSA encryption/decryption core

This core does the public-key arithmetic that an e-passport chip needs for
1024-bit RSA:

- encryption `C = M^e mod n` with the public key (n, e);
- decryption `M = C^d mod n` with the private key (n, d).

Every operand is 1024 bits wide. The core uses the two simplest textbook
methods:

- **square-and-multiply** turns the exponentiation into a series of modular
  multiplications;
- each modular multiplication is done **bit-serially by add-and-shift**: one
  bit of the multiplier per clock, one 1025-bit addition and conditional
  subtraction per clock.

There are no Montgomery domains and no carry-save arithmetic. Nothing is
precomputed from the modulus. The cost is speed: one 1024-bit operation takes
about 1.5 million clocks. The benefit is a small, easily checked datapath.

The key pairs are not made in hardware. They are generated off-chip and
stored in two ROMs: (n, e) for the encryption unit and (n, d) for the
decryption unit.

## Block structure

```
rsa_top
 ├── u_enc : rsa_crypt_unit  (KEY_FILE = public key)
 │     ├── u_rom : rsa_key_rom   word 0 = n, word 1 = e
 │     └── u_exp : rsa_modexp    square-and-multiply sequencer
 │           └── u_mul : rsa_modmul   add-and-shift modular multiplier
 └── u_dec : rsa_crypt_unit  (KEY_FILE = private key)
       ├── u_rom : rsa_key_rom   word 0 = n, word 1 = d
       └── u_exp : rsa_modexp
             └── u_mul : rsa_modmul
```

`rsa_pkg` holds the default key length `KEY_BITS = 1024` and the state
enums. Every module has a parameter `K`, the modulus length, whose default is
`KEY_BITS`.

The encryption unit and the decryption unit are the same module. Only the ROM
contents differ. The two units share nothing, so they can run at the same
time.

## The add-and-shift modular multiplier (`rsa_modmul`)

This is the heart of the design and its only arithmetic. It computes
`product = y * z mod n` (ports `mpand`, `mplier`, `modulus`). It scans z from
its least significant bit upward and keeps two K-bit registers:

- `acc`, the running sum. It starts at 0.
- `mult`, which holds `y * 2^i mod n`. It starts at y.

In step i (one clock):

```
sum  = acc + (z[i] ? mult : 0)        // < 2n, fits in K+1 bits
acc  = (sum  >= n) ? sum  - n : sum
dbl  = 2 * mult                       // < 2n, fits in K+1 bits
mult = (dbl  >= n) ? dbl  - n : dbl
```

Both values stay below n after one conditional subtraction, because each is
below 2n before it. The comparison is the borrow bit of a (K+2)-bit
subtraction, so each step has two adders and two subtractors working in
parallel. After K steps, `acc` equals `y * z mod n` exactly. This is the true
product, not a Montgomery product, so no conversion is needed before or after
exponentiation.

Requirements and behaviour:

- `mpand < modulus` is required, and an assertion checks it.
- `mplier` may be any K-bit value.
- The latency is always K clocks. There is no early exit when the remaining
  multiplier bits are zero.

The published form of this algorithm loops from bit 0 upward and halves the
running sum (adding n first when it is odd). That form gives
`y * z * 2^-k mod n`, a Montgomery product. However, the example given with it
(`0xe * 0x3 mod 0x21 = 0x9`) is a plain modular product. This design keeps the
bit order and the "add y·z_i" step, but it doubles the multiplicand instead of
halving the sum. As a result, the example holds as given.

## Square-and-multiply sequencing (`rsa_modexp`)

The exponent is scanned from its most significant bit, over all K bit
positions. The accumulator c starts at 1. For each bit:

1. c ← c·c mod n (square);
2. if the bit is 1: c ← c·m mod n (multiply).

One `rsa_modmul` does both operations, one after the other. A small FSM
(`EXP_SQ_START → EXP_SQ_WAIT → [EXP_MUL_START → EXP_MUL_WAIT] →` next bit)
starts the multiplier and takes in its result. Each modular multiplication
costs K + 2 clocks: one start clock, K iterations and one capture clock. An
exponentiation therefore costs

    (K + w) · (K + 2) clocks,   w = number of 1 bits in the exponent,

counted from the `data_enb` clock to `ready`. For K = 1024 and a random full
length exponent (w ≈ 512), this is about 1.57 M clocks. At the 36 MHz that an
FPGA implementation of this architecture is reported to reach, that is about
43 ms. Leading zero bits of the exponent are not skipped, so a short exponent
such as 65537 still costs 1024 squarings.

Requirements: `indata < inmod` and `inmod > 1`. Assertions check both.

## Key ROMs and the key pair (`rsa_key_rom`)

Each ROM holds two K-bit words: word 0 is n, and word 1 is the exponent. The
read is synchronous (the data appears one clock after the address), as in an
FPGA block RAM. The contents are loaded with `$readmemh` from a text file
with one word per line in hex, K/4 digits each. The file name is a parameter,
and paths are relative to the directory the simulator or synthesis tool runs
in (the repository root):

| file | contents |
|---|---|
| `rtl/rsa_pub_key.hex`  | default 1024-bit n and e |
| `rtl/rsa_priv_key.hex` | the same n and d |
| `tb/rsa64_pub_key.hex`, `tb/rsa64_priv_key.hex` | a 64-bit pair for fast tests |

The pairs were made in the usual way:

- two random primes p and q of K/2 bits, with n = p·q of exactly K bits;
- a random odd e below φ(n) = (p−1)(q−1) with gcd(e, φ(n)) = 1;
- d = e⁻¹ mod φ(n).

e is a random full-length number, not 65537. Encryption and decryption
therefore take about the same time. These are **demonstration keys**, public
in this repository. To use another key, write a new pair of files in the
same format and pass them as `PUB_KEY_FILE` / `PRIV_KEY_FILE` to `rsa_top`.

## Encryption and decryption units (`rsa_crypt_unit`, `rsa_top`)

When `enb` is pulsed, a unit does the following:

1. It latches `din`.
2. It reads n from ROM word 0, then reads the exponent from word 1.
3. It starts `rsa_modexp`.

The key is reloaded on every operation, which costs 3 clocks.

`rsa_top` brings out the ports of each unit:

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `reset` | in | 1 | clock; synchronous, active-high reset |
| `enc_enb` | in | 1 | one-clock start pulse, honoured when the unit is idle |
| `enc_plain` | in | K | plain text, must be below n |
| `enc_cipher` | out | K | cipher text, valid while `enc_ready` is high |
| `enc_ready` | out | 1 | low from the start edge until the result is valid; low after reset |
| `dec_enb`, `dec_cipher`, `dec_plain`, `dec_ready` | | | the same for decryption |

Timing per operation: `ready` rises `4 + (K + w)(K + 2)` clocks after the
clock that samples `enb`. The result stays on the output until the next
result is produced. Pulsing `enb` while the unit is busy is a protocol error,
and an assertion catches it. A round trip is encrypt, then apply
`enc_cipher` to `dec_cipher`, then decrypt. It returns the message.

Synthesized size, flip-flops only: about 12.3 k per unit and 24.6 k for the
whole core. Most of this is the 1024-bit operand registers (c, m, exponent
shifter, n, and the multiplier's acc, mult, z and n copies). A 1024-bit
input/output register is kept at each level for clarity. A tighter design
would share these registers.

## How far it can be trusted

What was checked in simulation, all self-checking:

- `tb_rsa_modmul`: the published example `0xe·0x3 mod 0x21 = 0x9` and random
  products at K = 1024, plus 300 random and edge-case products at K = 64.
  Each result is compared with the simulator's own wide `*` and `%`. The
  latency of K clocks is checked every time.
- `tb_rsa_modexp`: `0x11^0x903ad9 mod 0x3b2c159 = 0x36cf344` at K = 32 and at
  K = 1024, edge cases (exponent 0 and 1, message 0 and 1, even modulus) and
  60 random cases. These are compared with a right-to-left reference
  exponentiation. The latency `(K + w)(K + 2)` is checked.
- `tb_rsa_key_rom`: ROM words, the one-clock read, and that each stored pair
  is a working RSA key (an encrypt/decrypt round trip computed in the
  testbench).
- `tb_rsa_crypt_unit`: 12 encrypt/decrypt round trips with the 64-bit key,
  and one full 1024-bit encryption, with reference values and latencies.
- `tb_rsa_top` (default parameters, 1024 bits): encrypts 0x11, decrypts it
  while the other unit encrypts a random 1016-bit message, then decrypts
  that. It checks cipher texts against a reference, recovered plain texts,
  latencies, and counts of key loads, squarings (exactly K per operation),
  multiplies (exactly the exponent weight), square-only steps and clocks with
  both units busy. It finishes in a few seconds of wall-clock time.

Not checked: timing closure at any clock frequency, FPGA resource use,
side-channel behaviour, and behaviour when the input rules (`din < n`, no
start while busy) are broken.

## Where this design departs from, or fills in, the original description

- **Multiplier recurrence**: the multiplicand is doubled and reduced each
  step, instead of the running sum being halved (see above). The function
  (plain `y·z mod n`) and the bit order follow the original. The internal
  recurrence is this design's.
- **Exponent start value**: c starts at 1 and all K bits are processed.
  The published loop starts from m when the top exponent bit is 1 and still
  processes that bit, which would count it twice.
- **Key values**: the original key pair is not available. The ROMs hold a
  pair generated for this design, so cipher texts differ from any published
  values for the same message.
- **Handshakes, reset, ROM layout, ready outputs**: not specified by the
  original. They are chosen here as described above.
- **Cycle counts**: the original reports only simulation times for its
  examples, and its multiplier may stop early on short operands. This design
  always spends K clocks per multiplication.
- **Clock rate**: the 36.3 MHz that an FPGA implementation of this
  architecture reached was not reproduced. No FPGA flow is part of this
  repository.
- **Key generation** (choosing p, q, e; computing n, φ(n), d) is not
  hardware here, as in the original system, where it is done in software.

## Simulating

From the repository root (the key files are read by paths relative to it):

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    --top-module tb_rsa_top rtl/rsa_pkg.sv tb/tb_rsa_top.sv -o sim
./obj_dir/sim
```

Each testbench prints `TB_RESULT checks=<n> failures=<m>` at the end and
stops itself with a watchdog if the design hangs. The same command works for
`tb_rsa_modmul`, `tb_rsa_modexp`, `tb_rsa_key_rom` and `tb_rsa_crypt_unit`.
Verilator's wide arithmetic makes the full 1024-bit top test take a few
seconds.

To change the key length, set `K` on `rsa_top` and supply key files with K/4
hex digits per line. `K` must be at least 2. Latency grows as K².
