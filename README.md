# FCSR stream cipher

This is a synchronous stream cipher whose keystream comes from eight **feedback-with-carry shift
registers** (FCSRs). An FCSR is a shift register whose feedback is a sum computed with integer
arithmetic rather than an XOR. A small carry memory keeps the high part of each sum. Each
register's output is a long, well-distributed bit sequence, but the sequences' 2-adic structure
makes them predictable. To hide that, the eight output bits of each clock pass through a balanced,
highly nonlinear 8-input Boolean function `f_d`. The result is one keystream bit per clock. Eight
keystream bits make a keystream byte, and each byte is XORed with one data byte. Decryption is the
same operation with the same seeds.

```
            +--------- fcsr_bank ---------+      +----------- keygen -----------+     xor_cipher
 seeds c -->| FCSR1 (31 cells)  -> bit 0  |      |                              |
 start  --->| FCSR2 (37)        -> bit 1  |----->| f_d (256x1 table) -> key bit |     data byte
 reset  --->| ...                         | 8 b  |        |                     |        |
            | FCSR8 (100)       -> bit 7  |      | ks_buffer: 8 bits -> byte    |--> (XOR) --> out byte
            +-------------^---------------+      +-------------|----------------+
                          +------- step (one step per keystream bit) ---+
```

## How one FCSR works

A register of `r` cells holds `a_{r-1}` (the cell that takes feedback) down to `a_0` (the output
cell), plus a carry memory `m`. Its connection integer is `q = p^e`, with `p` an odd prime. The
taps are the binary digits of `q + 1 = q_1*2 + q_2*4 + ... + q_r*2^r`, and `r = floor(log2(q+1))`,
so `q_r` is always 1. One step does four things:

1. `sigma = m + sum_{k=1..r} q_k * a_{r-k}`: the memory plus a count of the tapped cells that hold 1.
2. The output bit `a_0` leaves, and every cell moves one place towards `a_0`.
3. `sigma mod 2` enters `a_{r-1}`.
4. `sigma div 2` becomes the new memory.

In `rtl/fcsr.sv`, `cells[0]` is `a_0`, so cell `j` is multiplied by `q_{r-j}`.
`fcsr_pkg::tap_mask` builds that mask from `q + 1` when the design is elaborated.

**The output sequence.** An FCSR seeded with `c` emits the 2-adic expansion of `-c/q`. This is the
bit sequence `s_0, s_1, ...` with `sum s_i 2^i = -c/q` in the 2-adic integers. It can be produced
in software by starting with `x = -c`, then repeating "emit `b = x mod 2`, set `x = (x - b*q)/2`".
The testbenches use this reference. When `p` is prime, 2 is a primitive root modulo `p`, and
`gcd(c, p) = 1`, the sequence is an ℓ-sequence with period `phi(q) = p^(e-1)(p-1)`.

**Initialisation.** The initial cells and memory are computed by the following procedure:

```
m = c
for i = 1..r:  s    = m + sum_{k=1..i-1} q_{i-k} * a(k)
               a(i) = s mod 2
               m    = s div 2
```

This is exactly what the register itself computes in `r` steps from all-zero cells with memory `c`.
So no separate datapath is needed. On `start` (or reset), the cells are cleared, `c` is loaded into
the memory, and the register runs by itself for `r` cycles. It then raises `ready`, with
`a(1) = c mod 2` in the output cell. The cost is the memory width. The memory must hold `c`, which
can be as large as `q`, so it is `r + 1` bits wide. In normal running the memory never needs more
than a few bits, because it stays below the number of taps.

**Seed validity.** `fcsr_c_check` requires `0 < c < q` and `c mod p != 0`. For prime `p` the last
condition is the same as `gcd(c, p) = 1`. A bad seed is only flagged on `c_bad`. Whatever supplies
the seeds must then choose another seed and pulse `start` again.

## The eight registers

| FCSR | p  | e  | q = p^e (hex)                            | r cells | period q(p-1)/p | taps (set bits of q+1) |
|------|----|----|------------------------------------------|---------|-----------------|------|
| 1    | 11 | 9  | 8c8b6d2b                                 | 31      | 2.1436e9        | 15   |
| 2    | 13 | 10 | 201901a5c9                               | 37      | 1.2725e11       | 13   |
| 3    | 19 | 30 | ad62418d14ea824701c4b4886cc66f59         | 127     | 2.1834e38       | 55   |
| 4    | 11 | 31 | 976aaa7d50312ba42b26cabcc23              | 107     | 1.7449e32       | 51   |
| 5    | 3  | 35 | b1bf6cd930979b                           | 55      | 3.3354e16       | 31   |
| 6    | 13 | 19 | 4f40383682c46121d5                       | 70      | 1.3495e21       | 28   |
| 7    | 61 | 14 | 82b802a1c7e9b777e48f9                    | 83      | 9.7149e24       | 43   |
| 8    | 61 | 17 | 1c4bd19b59c28ba9c314f2ce7d               | 100     | 2.2051e30       | 53   |

The product of the eight periods is about 1.0021e184. That is the approximate period of the
combined keystream. Only `p` and `e` are stored (`fcsr_pkg::FCSR_P`, `FCSR_E`). Everything else is
computed from them by constant functions.

**Where the taps come from.** The taps here are derived from `q + 1`. The original description also
prints tap lists. Those lists agree with `q + 1` in their leading positions, but some are shorter
and several differ further down (FCSR1's last tap, and FCSR4, 5, 7 and 8). Only the taps of
`q = p^e` give the stated `q`, `r` and periods, so those taps were used. To try other taps,
replace `tap_mask`.

## Keystream bits and bytes

`bool_fd` is a 256-entry table lookup with this truth table:
`6F4FC635EE280B7135159C4BB472512B CA8A932DD2E4A84D90D0C977CABEF217`. The table has 128 ones, so
the function is balanced. Two orderings are conventions of this design:

- The eight bits form an index with FCSR1 as the most significant bit.
- Entry 0 is the leftmost bit of the hexadecimal string.

`ks_buffer` shifts each keystream bit in at the least significant end. The first of eight bits
therefore becomes bit 7 of the byte. When the eighth bit arrives, the byte moves to an output
register (`ks_valid`) and the bit count restarts.

## Sessions, flow control and timing

All interfaces use valid/ready handshakes. A transfer happens on a clock edge where both are high.
Reset is synchronous and active high.

- **Reset** starts a session with the built-in seeds `fcsr_pkg::DEFAULT_C`. With only `clk` and
  `reset` connected, the cipher produces a fixed keystream.
- **`start`** (one cycle) starts a new session with the seeds `c[0..7]`. Each seed is 128 bits wide
  and only its low `r` bits may be set. `c_bad` is valid from the cycle after `start`.
- **Initialisation** takes `r` cycles per register. `ready` rises when the 127-cell FCSR3 is done:
  127 cycles after `start`, or after the reset cycle.
- **Running:** each cycle, `keygen` computes `key = f_d(out_bits)`, pushes the bit into the byte
  buffer (`key_valid`) and steps all eight FCSRs together.
- **Stall:** if a finished keystream byte is waiting and no data byte takes it, `step` stays low
  and the registers hold their state. No keystream is skipped: the n-th data byte of a session
  always meets the n-th keystream byte.
- **XOR:** `xor_cipher` consumes one data byte and one keystream byte together. It registers
  `data ^ keystream` on `ct_data`.

If data is always present and the output is always taken, the first output byte appears 136
cycles after `start` (127 + 8 + 1). After that, one byte appears every 8 cycles.

## Files

| file | contents |
|------|----------|
| `rtl/fcsr_pkg.sv` | p, e, f_d table, default seeds; functions for q, r and the tap mask |
| `rtl/fcsr.sv` | one FCSR with its own initialisation |
| `rtl/fcsr_c_check.sv` | seed validity test |
| `rtl/fcsr_bank.sv` | the eight FCSRs |
| `rtl/bool_fd.sv` | combining function |
| `rtl/ks_buffer.sv` | bit-to-byte buffer |
| `rtl/keygen.sv` | f_d + buffer + step control |
| `rtl/xor_cipher.sv` | data/keystream XOR |
| `rtl/fcsr_stream_cipher.sv` | top level |
| `tb/tb_ref_pkg.sv` | reference models shared by the testbenches |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_keystream_stats.sv` | randomness tests on 100 keystream samples of 500,000 bits |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops by itself. For example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/fcsr_pkg.sv tb/tb_ref_pkg.sv rtl/*.sv \
    tb/tb_fcsr_stream_cipher.sv --top-module tb_fcsr_stream_cipher -Mdir obj_top
obj_top/Vtb_fcsr_stream_cipher
```

Here is what each testbench checks:

- **`tb_fcsr_stream_cipher`** runs the top at its default size. An encrypting copy feeds a
  decrypting copy. Every ciphertext byte is compared with plaintext XOR a reference keystream
  built from the 2-adic model and the printed table. The test covers reset and `start` sessions
  and a bad seed. It also produces keystream stalls, plaintext waiting for keystream, and output
  back-pressure. It checks the 127-, 136- and 8-cycle timings.
- **`tb_fcsr` and `tb_fcsr_bank`** compare the register outputs with the 2-adic expansion of
  `-c/q`, using random seeds and random `step`. `tb_fcsr` also runs two small instances
  (`q = 11^2` and `q = 3^5`) for several periods. It checks that each output repeats with period
  `q(p-1)/p` and is balanced over one period.
- **`tb_keystream_stats`** applies five standard randomness tests with the usual chi-square and
  normal bounds: frequency, serial, poker (8-bit blocks), runs (lengths up to 14) and
  autocorrelation (shift 8). It runs for about 3 minutes. The samples passing each test were:

  | level | frequency | serial | poker | runs | autocorrelation |
  |-------|-----------|--------|-------|------|-----------------|
  | 0.05  | 92        | 93     | 97    | 89   | 93              |
  | 0.01  | 98        | 98     | 99    | 95   | 100             |

  These rates are what a random source gives.

## Design choices and limits

These points are this design's own. They are not part of the original description.

- **Seed interface.** Seeds arrive as eight 128-bit input ports. No random source for `c` is built
  in. With about 1070 port bits, the top does not fit a small pin-limited FPGA as it stands. Such a
  device would need a narrow seed-loading port in front of `c`.
- **Register width.** Each carry memory is `r + 1` bits wide so that the hardware can compute its
  own initial state. The original top level had only clock and reset as inputs (11 pins in all). The design
  has about 1330 flip-flops in all: 610 cells, about 620 memory bits and the rest control.
- **Stall.** The keystream generator stalls when no data is present. The original design runs
  freely.
- **Bit orders.** The bit orders of `f_d`'s index, of the truth table and within a keystream byte
  are conventions. Another implementation must use the same ones to interoperate.
- **Top-level outputs.** The original block diagram also has an `en` signal from the first register
  into the key generator, and a `key` output that passes through a gate. Neither function is
  described. Here `ready` signals the end of
  initialisation, and `key` is the plain keystream bit.
- **Timing.** No timing is claimed. The longest path is likely the 55-input tap count of FCSR3
  plus its 128-bit memory adder.
