# Lightweight encryption engines: a serial SIMON 32/64 core and five AES S-Box datapaths

This RTL holds two small encryption engines for devices with little area and power to
spare, such as RFID tags and wireless sensor nodes. They are independent of each other.

- **A SIMON 32/64 block-cipher core** with a five-signal serial interface. The plaintext and
  key arrive one bit per clock. Each clock the core then computes one complete round across
  the whole 32-bit state, and the ciphertext leaves one bit per clock. It has the pin count
  of a bit-serial design: clock, reset, data in, key in and data out. It finishes a block in
  128 clocks. A bit-serial datapath needs about 1,088 clocks per block, and a fully unrolled
  one needs 132 pins.
- **Five ways to build the AES S-Box.** Two are lookup tables and three compute the
  multiplicative inverse in GF(2^8) as x^254 (Fermat's little theorem) using chains of
  GF multipliers. Each variant sits behind an AXI4-Stream byte interface, so you can compare
  them on equal terms.

`crypto_top` places both engines side by side. They share only the clock and the reset.

## The SIMON 32/64 core

### Cipher

SIMON 32/64 is a Feistel cipher on two 16-bit words, XL and XR. It uses a 64-bit key and 32
rounds. One round computes

    XL' = (S^1 XL & S^8 XL) ^ S^2 XL ^ XR ^ K_i,   XR' = XL

where S^j is a left rotation by j. The key schedule starts from the four key words
K_0..K_3 and extends them:

    T       = S^-3 K_(i+3) ^ K_(i+1)
    K_(i+4) = K_i ^ T ^ S^-1 T ^ 0xFFFC ^ z_0[i]

Here z_0 is the 62-bit constant sequence of the SIMON specification. `simon_pkg` holds it as
`SIMON_Z0`, with bit i equal to z_0[i].

### Datapath

- **`simon_data_reg`**: 32 flip-flops holding {XL, XR}.
- **`simon_key_reg`**: 64 flip-flops holding {Key4, Key3, Key2, Key1}. Key1 always holds
  the current round key K_i, and Key4 holds K_(i+3).

A multiplexer sits in front of every flip-flop. It chooses between two sources:

- **FIFO mode:** the neighbouring flip-flop. The bank is then one long shift register.
- **ENCRYPT mode:** the result of the round logic.

A third setting, **IDLE**, holds the bank. The logic between the banks is:

- **`simon_round`**: one 16-bit round function.
- **`simon_key_expand`**: one 16-bit key expansion. It reads Key1, Key2 and Key4, and its
  result is shifted into Key4 while the other words move down by one.

With no extra state flip-flops, the same 96 bits act as the serial input buffer, the
working state and the serial output buffer.

### Schedule

`simon_ctrl` holds a free-running 7-bit counter. The counter's value selects the multiplexer
modes:

| counter | data bank | key bank | pins |
|---|---|---|---|
| 0–31 | FIFO | FIFO | plaintext bit on `serial_in`, key bit on `key_in` |
| 32–63 | IDLE | FIFO | key bit on `key_in` (`serial_in` ignored) |
| 64–95 | ENCRYPT | ENCRYPT | round i = counter − 64 |
| 96–127 | FIFO | FIFO | ciphertext bit on `serial_out`, `data_ready_n` low |

After 127 the counter wraps to 0, and the next block can start at once. Asserting `rst_n`
(active low, asynchronous) returns the schedule to clock 0. `dbg_state` shows the current
region: 0 load plaintext, 1 load key, 2 encrypt, 3 shift out.

### Bit order

This is the one thing a host must get right. Every value travels **least significant bit
first**:

- The plaintext {XL, XR} goes from XR[0] up to XL[15] in clocks 0–31.
- The key goes from bit 0 to bit 63 in clocks 0–63. Its low 16-bit word is the first round
  key. In the usual notation the reference key is written `1918 1110 0908 0100`, so
  `0x0100` is sent first, LSB first.
- The ciphertext leaves from bit 0 up to bit 31. Bit j is on `serial_out` for the whole of
  clock 96 + j, so a host can sample it on the rising edge that ends that clock.

A host that uses an SPI peripheral configured LSB first, with the bytes of each word sent
low byte first, produces exactly this order.

### Verification

The core reproduces these test pairs bit for bit through its pins:

| plaintext | key | ciphertext |
|---|---|---|
| `6565 6877` | `1918 1110 0908 0100` | `C69B E9BB` (the SIMON reference vector) |
| `524A B37D` | `1918 1110 0908 0100` | `F514 71C9` |
| `AC91 BAC0` | `1029 3847 56AF EDB3` | `57E1 5C37` |

It also matches a behavioural model on random blocks.

### Departures and omissions

- **Bit order, data-ready window and debug encoding** are this design's choices.
- **Clock gating** is only the IDLE hold of the data bank. No gated clock is generated,
  since clock gating is a library-cell decision.
- **Power gating, pads and tapered output buffers** are circuit-level parts of a chip and
  are not modelled. The core's ports are the chip's signal pins.

## The AES S-Box variants

All five map a byte x to A(x^-1) in GF(2^8) modulo x^8 + x^4 + x^3 + x + 1, with 0 mapping
to 0. A is the affine step (`sbox_affine`):

    A(y) = y ^ rotl(y,1) ^ rotl(y,2) ^ rotl(y,3) ^ rotl(y,4) ^ 0x63

All five share one interface: `en_i`, `valid_i`/`data_i` in and `valid_o`/`data_o` out. Each
accepts one byte per clock, and `en_i` low freezes every stage.

| module | idea | latency (clocks) |
|---|---|---|
| `sbox_lut_v1` | 256-byte ROM, registered output | 1 |
| `sbox_lut_v2` | 256-to-1 selection split in two: the low nibble picks one byte in each of 16 rows, register, then the high nibble picks the row | 2 |
| `sbox_flt_v1` | x^254 by a chain of 11 multipliers, then affine, registered | 1 |
| `sbox_flt_v2` | the same chain cut into 12 register stages | 12 |
| `sbox_flt_v3` | a shorter 11-stage pipeline that runs two multiplier chains in parallel | 11 |

### The exponent chains

The hardest part to read is how x^254 is reached. Each arrow below is one GF(2^8)
multiplier (a squaring is a multiplier with both inputs equal). A power in brackets is
carried along in a delay register until it is needed.

- **V1** (one clock) and **V2** (one stage per multiplier):
  `x → x2 → x3 (·x) → x6 → x12 → x15 (·x3) → x30 → x60 → x120 → x126 (·x6) → x127 (·x) → x254`.
  In V2 the stage registers hold:

  | stage | registers |
  |---|---|
  | s1 | x |
  | s2 | x2 [x] |
  | s3 | x3 [x] |
  | s4 | x6 [x3, x] |
  | s5 | x12 [x6, x3, x] |
  | s6 | x15 [x6, x] |
  | s7–s9 | x30 / x60 / x120 [x6, x] |
  | s10 | x126 [x] |
  | s11 | x127 |
  | s12 | x254 |

- **V3**: one chain keeps squaring (`x2, x4, x8, …, x64`) beside `x3 → x6 → x12 → x15 → x30 → x60`.
  The two chains meet in x124 = x64 · x60, and then x127 = x124 · x3 and x254 = x127^2.
  The stage registers hold:

  | stage | registers |
  |---|---|
  | s1 | x |
  | s2 | x2 [x] |
  | s3 | x2, x3 |
  | s4 | x4, x6 [x3] |
  | s5 | x8, x12 [x3] |
  | s6 | x16, x15 [x3] |
  | s7 | x32, x30 [x3] |
  | s8 | x64, x60 [x3] |
  | s9 | x124 [x3] |
  | s10 | x127 |
  | s11 | x254 |

In the pipelined versions the affine step is combinational after the last stage, so the
latency equals the number of stages.

### Multipliers

There are two forms:

- **`gf_mul_long`**: eight AND-gated, shifted partial products XORed into a 15-bit
  carry-less product.
- **`gf_mul_karatsuba`**: splits each operand into 4-bit halves and uses three 4×4 products
  in place of four: H = aH·bH, L = aL·bL and M = (aH^aL)·(bH^bL). The product is
  H·x^8 ^ (M^H^L)·x^4 ^ L.

Both forms finish in `gf_reduce`, which clears bits 14..8 by XORing in the shifted
polynomial. The `gf_mul` wrapper picks one of the two through its `KARATSUBA` parameter.
The Fermat variants use Karatsuba by default, and they expose the same parameter.

### Lookup-table contents

The ROMs are not typed in. `aes_sbox_pkg::gen_sbox_table` computes them at elaboration from
power tables of the generator 3: for x = 3^k, x^-1 = 3^(255−k), and the affine step is then
applied. The testbenches compare this against an independent brute-force inverse and against
the first row of the standard table.

### Stream wrapper

`sbox_axis` puts one variant (parameter `ARCH`, default FLT V2) behind AXI4-Stream. The
whole pipeline advances when the output is empty or being taken:
`en = m_axis_tready | ~m_axis_tvalid`. The input is accepted exactly then
(`s_axis_tready = en`), and `tlast` follows its byte through a matching delay line.

At full rate, a batch of B bytes takes B + latency − 1 clocks from the first byte accepted
to the last byte delivered. Simulation gives these figures:

| batch | LUT V1 | LUT V2 | FLT V1 | FLT V2 | FLT V3 |
|---|---|---|---|---|---|
| 256 bytes | 256 | 257 | 256 | 267 | 266 |
| 4,096 bytes | 4,096 | 4,097 | 4,096 | 4,107 | 4,106 |

`s_axis_tready` depends combinationally on `m_axis_tready`. An assertion checks that a
stalled output stays stable.

### Departures and notes

- **Middle register of LUT V2.** It is drawn in the original as one byte wide. Here it
  holds all 16 candidate bytes, because the second stage must choose among them.
- **Stage counts.** The two published tables disagree about which Fermat pipeline has 11
  stages and which has 12. This RTL follows the stage-by-stage structure: V2 has 12 stages
  and V3 has 11.
- **Affine step.** It is sometimes written with shifts. It is implemented with rotations,
  which is what yields the AES table.
- **AXI wrapper.** Its stream flavour, stall scheme and `tlast` handling are this design's
  own. The original system sat behind a Zynq processor, which is not part of this RTL.

## Files

- `rtl/simon_pkg.sv`, `rtl/aes_sbox_pkg.sv`: shared types, constants and elaboration-time
  functions.
- `rtl/simon_*.sv`: the SIMON core and its parts.
- `rtl/gf_*.sv`, `rtl/sbox_*.sv`: the S-Box multipliers, variants and stream wrapper.
- `rtl/crypto_top.sv`: the top. Stream array index a is architecture a: 0 LUT V1, 1 LUT V2,
  2 FLT V1, 3 FLT V2, 4 FLT V3.
- `tb/tb_<module>.sv`: one self-checking testbench per module. Each ends with a
  `TB_RESULT checks=N failures=M` line.
- `tb/tb_aes_ref_pkg.sv`: an independent GF(2^8) and S-Box reference.
- `tb/tb_simon_200k.sv`: 200,000 random blocks through the SIMON core, each checked
  against the model. It takes about 13 s.
- The Fermat-variant testbenches also run a copy built with the long multiplier
  (`KARATSUBA = 0`). The copy must match the default build every clock.
- `tb/tb_crypto_top.sv`: the end-to-end test at default parameters. It runs SIMON blocks
  (including a reset mid-operation) alongside 256- and 4,096-byte batches on all five S-Box
  streams, with and without back-pressure.

## Simulating

With Verilator 5, for example for the top:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/simon_pkg.sv rtl/aes_sbox_pkg.sv tb/tb_aes_ref_pkg.sv tb/tb_crypto_top.sv \
        --top-module tb_crypto_top -o sim
    ./obj_dir/sim

Replace `tb_crypto_top` with any other testbench. The SIMON testbenches need only
`simon_pkg.sv`. Each run other than `tb_simon_200k` finishes in well under a second.
