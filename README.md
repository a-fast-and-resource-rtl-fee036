# CSS core: computational secret sharing in hardware

A storage system that spreads data over several independent servers wants two things: no single
server (or small group of them) should learn anything about the data, and the data should
survive the loss of some servers. Shamir's secret sharing gives both but multiplies the stored
volume by the number of servers. Information dispersal (IDS, Rabin's scheme) keeps the volume
low but gives no secrecy. Computational secret sharing (CSS, Krawczyk's scheme) combines the two:

1. encrypt the data with a fresh random AES key,
2. split the *key* with Shamir's scheme (perfect secrecy, small),
3. split the *ciphertext* with information dispersal (no expansion beyond n/k).

Any k of the n shares give back the key and the ciphertext, and hence the data. Fewer than k
give nothing: they hold no information about the key, and the ciphertext cannot be read without
the key.

This repository holds synthesizable SystemVerilog for a CSS core. It includes share generation,
reconstruction, the AES-128 counter-mode cipher shared by both directions, and the packet
buffers around them. The default configuration uses 64-bit words, an 8/4 threshold scheme
(n = 8 shares, any k = 4 recover) and 8-bit x-values.

## One polynomial machine for both schemes

Both schemes evaluate a polynomial of degree k−1 over GF(2^W) at n points x_1..x_n:

    share_i = c_{k-1} x_i^{k-1} + ... + c_1 x_i + c_0

They differ only in what the coefficients are:

| mode | c_0 | c_1 .. c_{k-1} | data per polynomial |
|------|-----|----------------|---------------------|
| Shamir (`MODE_SHAMIR`) | the secret word | random words | 1 word |
| IDS (`MODE_IDS`) | data word | data words | k words |

For this reason one unit, the SGU, does both, and a mode bit selects where each coefficient comes from.
Reconstruction inverts the same structure. The shares of k known points form a Vandermonde
system `SH = X · C`, so `C = X^-1 · SH`. In Shamir mode only row 0 of X^-1 is needed, because only
c_0 matters. In IDS mode all k rows are needed. X^-1 depends only on which shares are
present, so the host processor computes it once and loads it into the core.

Addition in GF(2^W) is XOR. Multiplication is a carry-less (polynomial) product followed by
reduction modulo an irreducible polynomial x^W + r(x). Low-weight polynomials are used, so
the reduction is a fixed XOR network:

| W | r(x) |
|---|------|
| 8 | x^4+x^3+x+1 |
| 16 | x^5+x^3+x+1 |
| 32 | x^7+x^3+x^2+1 |
| 64 | x^4+x^3+x+1 |
| 128 | x^7+x^2+x+1 |

The choice is in `css_pkg::gf_low_poly`. The reduction (`gf_reduce`) folds the bits above
W back down, 8 bits at a time from the top. Any consumer of shares must use the same polynomials.

## Data flow and packets

```
 secin ─► [secret-in buf] ─► AES-CTR ─► [SGU buf] ─► split ─► SGU ─► N × [share-out buf] ─► shout[N]
                               ▲  ▲                                                      
 new_key ──────────────────────┘  │ arbiter (one packet at a time, round robin)
                                  ▼
 secout ◄─ [secret-out buf] ◄─ AES-CTR ◄─ [SRU buf] ◄─ pack ◄─ SRU ◄─ K × [share-in buf] ◄─ shin[K]
```

Everything moves in packets. A plaintext packet is `PKT_BLOCKS` (64) blocks of 128 bits with a
`css_hdr_t` header:

| field | bits |
|-------|------|
| `pkt_id` | 32 |
| `frag` | 16 |
| `rsvd` | 15 |
| `new_key` | 1 |

Every stream (secret in/out, shares in/out) uses valid/ready handshakes, a `last` flag and the
header beside every beat.

**Sharing.** When the secret-in buffer holds a whole packet and the SGU buffer has room for all
of it, the arbiter sends it through AES:

1. A *key block* goes first. It is a bypass block that carries the AES key through the pipeline
   unencrypted. If `new_key` is set in the header, the core pulls a fresh key from the
   `new_key` port. Otherwise it reuses the last key.
2. The encrypted blocks follow.

The splitter cuts the blocks into W-bit words, most significant word first. The SGU then works
on each packet in two steps:

1. The 128/W key words, in Shamir mode: one polynomial each, so 2 polynomials at W = 64.
2. The payload words, in IDS mode: k words per polynomial.

The SGU's n outputs go to n share-out buffers. A share packet is KEY_WORDS key-share words
followed by PAY_WORDS/k payload-share words. At the defaults that is 2 + 128/4 = 34 words of 64 bits.

**Reconstruction.** The host presents k share packets of one data packet on the k share-in
streams. The columns of X^-1 must match the order of those streams. When all k buffers hold a
whole share packet and the SRU buffer has room for it, the SRU runs:

1. The first KEY_WORDS share sets in Shamir mode, which recovers the key.
2. The rest in IDS mode, which recovers the ciphertext.

The packer rebuilds 128-bit blocks. The arbiter takes the recovered key block and loads it as
the decryption key, then decrypts the payload into the secret-out buffer.

**Counter mode.** The counter block is `{hdr (64 bits), zeros, block count (CTR_W bits)}`. The
count restarts at 0 for every packet. Two things make it unique: the header (packet id and
fragment) and a key that is fresh whenever `new_key` is set. The user of the core must not repeat
a header under the same key.

## SGU: Horner evaluation with n parallel PEUs

`sgu` holds n polynomial evaluation units (`peu`), one per share, with its own 8-bit x-value
each. All PEUs take the same coefficient in the same cycle, highest coefficient first:

    acc ← acc · x_i + c        (c_{k-1} first, product masked to 0 on that cycle)

After c_0 the sum is the share. A PEU multiplies a W-bit value by an 8-bit x. That product is
only W+7 bits wide, and its reduction is a handful of XORs. This is why the x-values are kept
short: the cost of a PEU grows only linearly with W.

The SGU has two pipeline stages:

* **Stage A** is the sequencer. It counts coefficients, latches the mode at the start of each
  polynomial and pops secret words. In Shamir mode it pops one secret word per polynomial.
  In IDS mode it pops k.
* **Stage B** drives the PEUs. It multiplexes each coefficient from the secret word or from
  the random input. The random source must answer every `rand_rd` in the same cycle.

In Shamir mode the secret sits at c_0 and is read last. It is popped at the start of the
polynomial and held until then. In IDS mode the first data word becomes c_{k-1}.

**Rate.** A polynomial takes k cycles. In IDS mode that is k data words in k cycles, so one
W-bit word per cycle. At 64 bits and 100 MHz that is 6.4 Gbit/s of secret data. In Shamir
mode it is one word per k cycles, but only for the 2 key words of each packet.

## SRU: sub-reconstructions and the inverse matrix

`sru` evaluates `secret_r = Σ_j X^-1[r][j] · share_j` with k sub-reconstruction slices
(`sru_subrec`). Each slice holds:

* one column of X^-1 in a small memory,
* a share register,
* a full W × W carry-less multiplier,
* a product register.

The k unreduced products are XORed together and reduced once, not once per slice, and then
registered. That is 3 register stages from `share_rd` to `secret_valid`.

The matrix elements are full W-bit field elements, so here, unlike in the SGU, both
multiplier inputs are wide. That makes the SRU the large part of the core.

The sequencer applies the rows in one of two ways:

* **Shamir mode:** only row 0. One share set in, one secret word out, every cycle.
* **IDS mode:** rows k−1 down to 0 on the same share set, so one share set per k cycles. The
  words then leave in the order the SGU read them, one word per cycle.

Loading X^-1 uses the port `mat_we/mat_col/mat_row/mat_data`. Column j belongs to share-in
stream j. For Shamir shares at points x_j, row 0 holds the Lagrange coefficients at 0. The
testbenches compute X^-1 by Gauss-Jordan elimination over GF(2^W) (`tb/gf_ref_pkg.sv`). A
host must do the same.

## Multipliers

**Karatsuba** (`karatsuba_mul`). Split `a = a1·x^h + a0` and `b` the same way. Then

    a·b = a1b1·x^(2h) + ((a1+a0)(b1+b0) + a1b1 + a0b0)·x^h + a0b0

This needs three half-size products instead of four. The module recurses until the width
reaches `BASE_W` = 16. A 64-bit multiplier is therefore 9 base multipliers plus XOR trees. The
base case is a plain AND/XOR array (`clmul`) or, with `USE_DSP = 1`, the DSP-based block below.

**Carry-less products from an integer multiplier** (`dsp_clmul9x6`, `dsp_base_mul`). FPGA DSP
slices multiply integers, and integer carries spoil a polynomial product. The trick is to leave
room for the carries:

1. Place the 9 bits of `a` at positions 0, 3, 6, …, 24. That fits the 25-bit port.
2. Place the 6 bits of `b` at positions 0, 3, …, 15. That fits the 18-bit port.
3. Multiply as integers.

The integer product is `Σ_k n_k·2^(3k)`, where n_k counts the pairs with i+j = k and both bits
set. Since n_k ≤ 6 < 8, each count stays inside its own 3-bit group. Bit 3k is then the parity
of n_k, which is exactly bit k of the polynomial product. The other product bits are ignored.

`dsp_base_mul` builds a 16 × 16 product from four such 9 × 6 pieces:

* `a` is cut into 9 + 7 bits and `b` into 6 + 6 bits.
* The last 4 bits of `b` are multiplied in ordinary logic.

That gives 4 DSPs per 16-bit block and 4 · 9 = 36 per 64-bit multiplier. Over the 4 SRU
slices that is 144. At W = 8 one 9 × 6 piece covers the whole 8 × 8 product.

`DSP_SLICES` (default k) chooses how many SRU slices use DSP-based multipliers. The rest are
built from logic. The SGU never uses DSPs, because its multipliers are too narrow to profit.

## AES-128 and the arbiter

`aes128_pipe` is a fully unrolled AES-128 encryption pipeline. It computes the round keys on
the fly, so every block carries its own key and key changes cost nothing. The pipeline has
22 stages:

* an input register,
* the initial AddRoundKey,
* two stages per round.

It accepts one block per cycle. The S-box table is computed at elaboration time from the
field inverse and the affine map, so no table file is needed. Counter mode only ever
*encrypts* counter blocks, so the decryption direction needs no inverse cipher.

`aes_ctr_unit` wraps the pipeline with a key register and a block counter for each direction.
A tag field travels alongside each block and carries:

* the direction,
* the bypass flag,
* `last`,
* the header,
* the data to XOR.

The XOR happens at the pipeline output. A key block travels as a bypass block and loads the
key register as it enters.

`aes_arbiter` shares the single AES unit between the sharing and the reconstruction path,
one packet at a time, in round-robin order. It starts a packet only when two things hold:

1. The source holds the whole packet.
2. The destination has room for it, *counting the blocks still inside the 22-stage pipeline*.

So a packet never stalls halfway, and the pipeline never needs backpressure. At 64 blocks
per packet and one block per cycle, the pipeline adds 22 cycles per packet.

## Buffers

All buffers are `pkt_fifo`. Each entry stores the data together with its `last` flag and its
header. The FIFO also reports its fill level, its free space and how many complete packets it
holds; the packet-level decisions above are made on these counts. Each buffer holds `BUF_PKTS`
(2) packets, so one packet can be filled while the other is drained. The SGU and SRU buffers
hold one extra block per packet for the key block.

## Departures from the reference architecture

* **Cycles per PEU evaluation.** A PEU takes k cycles per polynomial, not k−1. The first cycle
  loads c_{k-1} by masking the product instead of using a separate clear.
* **SRU pipeline depth.** The SRU pipeline is fixed at three register stages. It is not a
  generic.
* **DSP granularity.** DSP use is chosen per SRU slice. The reference reports a reduced DSP
  count at 128 bits (96), which cannot be matched exactly with whole slices.
* **AES.** The AES core is a new design, not a third-party core.
* **Own choices.** The following are all this design's choices:
  * the packet size,
  * the header,
  * the share packet layout,
  * the counter block,
  * the order of the key and payload words,
  * the buffer depths,
  * the handshakes,
  * the reduction polynomials.
* **Not included.** The following parts stay outside the core:
  * The random number generator. Random words enter on `rand_word/rand_rd` and keys on
    `new_key/new_key_rd`. The random source must be a true or cryptographic generator.
  * The network interfaces and the switch that spreads share packets over them.
  * The host processor that computes X^-1, manages buffers and picks x-values.
* **Not verified.** No timing closure or resource figure is claimed for this RTL. Only
  functional simulation has been done.

## Files

| file | content |
|------|---------|
| `rtl/css_pkg.sv` | mode enum, header struct, reduction polynomials |
| `rtl/aes_pkg.sv` | AES round functions, computed S-box, key schedule step |
| `rtl/css_core.sv` | top: buffers, arbiter, AES, SGU/SRU with packet control |
| `rtl/sgu.sv`, `rtl/peu.sv` | share generation |
| `rtl/sru.sv`, `rtl/sru_subrec.sv` | reconstruction |
| `rtl/karatsuba_mul.sv`, `rtl/clmul.sv`, `rtl/dsp_base_mul.sv`, `rtl/dsp_clmul9x6.sv`, `rtl/gf_reduce.sv` | field arithmetic |
| `rtl/aes128_pipe.sv`, `rtl/aes_ctr_unit.sv`, `rtl/aes_arbiter.sv` | cipher |
| `rtl/pkt_fifo.sv`, `rtl/block_splitter.sv`, `rtl/word_packer.sv` | buffers and width conversion |
| `tb/gf_ref_pkg.sv` | bit-serial GF reference, polynomial evaluation, matrix inversion |
| `tb/tb_*.sv` | one self-checking testbench per unit, plus `tb_css_core` |

`tb_css_core` runs the core at its default parameters. It has three phases:

1. It shares 10 packets while the share outputs are held back, which forces backpressure
   through every buffer.
2. It reconstructs packets from shares {0, 2, 5, 7} while new packets are still being shared.
   This makes the two paths compete for AES.
3. It reconstructs the rest from shares {1, 3, 4, 6}.

It checks every share word against a software model, and every reconstructed block against
the original. It counts each mechanism and fails if any never happened:

* new keys and reused keys,
* both modes in the SGU and the SRU,
* AES contention,
* waiting for buffer room,
* input backpressure.

## Simulating

With Verilator 5 (from the repository root):

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb \
  rtl/css_pkg.sv rtl/aes_pkg.sv tb/gf_ref_pkg.sv tb/tb_css_core.sv \
  --top-module tb_css_core -Mdir obj_css -o sim
./obj_css/sim
```

Replace `tb_css_core` with any other testbench to test one unit. Each testbench prints
`TB_RESULT checks=<n> failures=<m>`. The full core test takes well under a minute of
simulation. To change the configuration, override the `css_core` parameters: `W`, `N`, `K`,
`XW`, `PKT_BLOCKS`, `BUF_PKTS`, `CTR_W`, `BASE_W`, `DSP_SLICES`. `W` must be one of 8, 16, 32,
64 or 128, and `PKT_BLOCKS·128/W` must be a multiple of `K`.
