# Chaotic-map stream cipher for 8-bit images

This is a stream cipher for grayscale images. Each 8-bit pixel is XORed with
one key byte. The key bytes come from three chaotic maps in 32-bit fixed-point
arithmetic: logistic, Lozi and tent. The maps are chained into one cascade and
their output is XORed with a 32-bit LFSR. Decryption is the same operation with
the same key stream. The whole cipher key is every map parameter, every initial
value and the LFSR seed. That is nine 32-bit words, 288 bits.

The RTL holds an encryptor and a decryptor side by side (`image_crypto_top`).
Each has its own key generator. Pixels stream in one per clock, so the
throughput is 8 bits per clock. Image handling (flattening a 256×256 image into
a stream, reshaping it back, displaying it) is left to the host and is not in
the RTL.

## Block structure

```
image_crypto_top
├── fpccm_prnbg  u_tx      key bytes for encryption (key_tx)
│   ├── fpccm_prbg         logistic -> Lozi -> tent cascade, fed back via z^-1
│   │   ├── single_pulse   start pulse after reset
│   │   ├── logistic_map
│   │   ├── lozi_map       (holds the Lozi y register)
│   │   └── tent_map
│   └── lfsr_pn            32-bit Fibonacci LFSR, low byte used
└── fpccm_prnbg  u_rx      key bytes for decryption (key_rx)

cipher_out = pix_in     ^ kbyte_tx
plain_out  = cipher_out ^ kbyte_rx
```

`chaos_pkg` holds the fixed-point type, the Q4.28 multiply, the key struct
`key_t` and `DEFAULT_KEY`.

## Number format

Every map state and parameter is a signed 32-bit Q4.28 number: 4 integer bits
(sign included) and 28 fraction bits. The range is [-8, 8) and one LSB is
2^-28. A product of two Q4.28 numbers is formed at 64 bits. Bits [59:28] are
kept, which truncates toward minus infinity and wraps on overflow. Additions and
subtractions also wrap. This truncate-and-wrap rule is this design's choice. It
is the usual default of fixed-point model tools, but it is not stated for the
original design. Any change to it changes the key stream bit for bit.

## The three maps

Each map module is combinational from its input to its output (only the Lozi
block has a register). It has a start multiplexer in front: while `start` is
high the map works on its own initial value from the key; otherwise it works on
`x_in`.

| module | iteration | default parameters (Q4.28) |
|---|---|---|
| `logistic_map` | x' = (r·x)·(1−x) | r = 3.99 (`3FD70A3D`), x0 = 0.939243 (`0F0723AB`) |
| `lozi_map` | x' = (1+y) − α·\|x\|, y' = β·x | α = 1.4, β = 0.3, x0 = 0.52714, y0 = 0.42743 |
| `tent_map` | x' = μ·x if x ≤ 0.5, else μ·(1−x) | μ = 1.8, x0 = 0.5271456 |

The default constants are the exact Q4.28 codes of the values listed. r = 3.99
is used rather than r = 4. In Q4.28, r = 4 makes the orbit collapse to 0 once x
hits exactly 0.5. Likewise μ = 1.8 is used for the tent factor. 0.5 is the
tent's breakpoint, not its factor.

In the Lozi block, y is kept in a register that stores β·x each enabled cycle.
So in each iteration y holds β times the previous iteration's x. The tent
comparison is signed, so a negative input takes the μ·x branch.

## The cascade and its start cycle

`fpccm_prbg` chains the maps in one clock cycle. The logistic output feeds the
Lozi map and the Lozi output feeds the tent map. The tent output goes back
through a register (z^-1) to the logistic input. The critical path is therefore
six 32×32 multipliers in series, and it sets the clock rate. A published
implementation of this structure ran at about 33.7 MHz on a Zynq-7000.

The start cycle is the subtle part. `single_pulse` is a register that comes
out of reset at 1 and then loads `q ^ q`, which is 0. Its output is high until
the first enabled clock. In that cycle **every** map takes its own initial
value, not its input. So the first key byte is `tent(x0_tent)`. The logistic
result of that cycle is not used. The Lozi register still loads β·x0_lozi.
From the second byte on, the full cascade runs:

```
n = 0 : t0 = tent(x0_tent);                y = β·x0_lozi
n ≥ 1 : l = logistic(t_{n-1});  z = (1+y) − α|l|;  y = β·l;  t_n = tent(z)
```

The key byte is the 8 least significant bits of `t_n`. Those are the bits that
change fastest. Which bits are tapped is this design's choice.

The cascaded orbit is not confined to [0, 1]. The Lozi stage can return
values from about −1.3 to 1.3. Negative values pass through the tent's μ·x
branch and into the logistic map. There the fixed-point wrap keeps them in
range. This is how the cascade actually behaves. The testbenches show that it
takes both tent branches and negative Lozi inputs many times per image.

## PN generator

`lfsr_pn` is a 32-bit Fibonacci LFSR with XOR feedback. The polynomial word is
`POLY = 32'h40102001` (taps at bits 30, 20, 13 and 0). The feedback bit is the
XOR of the tapped bits and is shifted in at bit 0. The default seed is
`32'h0BFD97C8`. That bit convention is this design's reading of the polynomial
word. The LFSR uses the same start multiplexer as the maps: in the start cycle
it works from the seed, so the seed is part of the key. `fpccm_prnbg` outputs
`cascade byte XOR LFSR[7:0]`.

## Key layout

`chaos_pkg::key_t` is a packed struct of 288 bits, MSB first:

`log_r, log_x0, lozi_a, lozi_b, lozi_x0, lozi_y0, tent_mu, tent_x0, pn_seed`

The key is an input port, not a constant. So the encryptor and decryptor can
be given different keys. A one-bit change in any word gives a different byte
stream after a few iterations. For example, flipping the LSB of r garbles more
than 99% of the decrypted pixels.

## Interface and timing (`image_crypto_top`)

| port | dir | width | meaning |
|---|---|---|---|
| clk, rst_n | in | 1 | clock; asynchronous active-low reset |
| pix_valid | in | 1 | a plain pixel is on `pix_in`; both generators advance |
| pix_in | in | 8 | plain pixel |
| key_tx, key_rx | in | 288 | encryption and decryption keys (`key_t`) |
| cipher_out | out | 8 | `pix_in ^ kbyte_tx`, same cycle |
| plain_out | out | 8 | `cipher_out ^ kbyte_rx`, same cycle |
| out_valid | out | 1 | equal to `pix_valid` |

- **Latency.** The outputs are combinational from `pix_in`, with no pipeline
  register. Register them outside if the surrounding logic needs it.
- **Pixel order.** After reset, the first cycle with `pix_valid` high uses key
  byte 0, the next valid cycle uses byte 1, and so on. Cycles with `pix_valid`
  low leave both generators untouched. The `pix_valid` clock enable is this
  design's addition; held high, the design runs free as in the original model.
- **New image.** Start a new image with a reset, so that both key streams
  restart from the key.
- **Key changes.** The key must be stable from reset until the image ends. The
  maps read their parameters every cycle.

## What is not in the RTL

- **Host-side image handling.** Host-side flattening and reshaping of the
  256×256 image, and the display, have no hardware here.
- **Board link.** The JTAG hardware co-simulation link is not included. Its
  role is taken by the top-level ports.
- **Clocking.** The board's clocking primitives are not included.
- **XOR-combined variant.** A variant that XORs the three map outputs instead
  of cascading them is not part of this design.
- **Sequencing.** No frame buffer and no pixel counter are included.
- **Bit-exactness.** The RTL is not proven bit-exact to any earlier
  implementation. Four details are this design's readings, so a stream from
  another implementation of the same maps may differ:
  - the rounding rule;
  - the key-byte bit positions;
  - the LFSR shift direction;
  - the start-cycle behaviour of the inner maps.

## Verification

Each module has a self-checking testbench in `tb/`. Bit-exact reference models
written with 64-bit integers, plus real-valued versions of each map, are in
`tb/chaos_ref_pkg.sv`.

| testbench | what it checks |
|---|---|
| `tb_single_pulse` | pulse after reset, hold while disabled, single cycle |
| `tb_logistic_map`, `tb_tent_map`, `tb_lozi_map` | 2000-step orbits bit-exact against the model; each step within a few LSBs of the real-valued formula; start mux; both tent branches; negative Lozi inputs; enable hold |
| `tb_lfsr_pn` | 3000 steps against a tap-by-tap model; seed load; enable |
| `tb_fpccm_prbg`, `tb_fpccm_prnbg` | cascade and final key byte against the model, for the default key and random keys, with random enable gaps; bit balance of the key bytes (45–55% ones per bit position); NIST SP 800-22 frequency (monobit) and runs tests on about 64000 key-stream bits, both required to give p > 0.01 (default key: p ≈ 0.31 and ≈ 0.09) |
| `tb_image_crypto_top` | a synthetic 256×256 image encrypted and decrypted with gaps in the stream. Every pixel is checked. It also checks cipher entropy > 7.99 bits, neighbour correlation near 0, NPCR > 99% and UACI of 25–40%. A second pass with no gaps checks 65536 pixels in 65536 cycles, and that a one-bit-wrong receiver key garbles > 95% of pixels. |

On the synthetic image, the cipher image measures:

- entropy 7.9973 bits;
- horizontal neighbour correlation −0.008;
- NPCR 99.60% and UACI 31.9% against the plain image.

To run a testbench with plain Verilator from the repository root:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_image_crypto_top \
  -y rtl -y tb +libext+.sv rtl/chaos_pkg.sv tb/chaos_ref_pkg.sv tb/tb_image_crypto_top.sv
./obj_dir/Vtb_image_crypto_top
```

Each testbench ends by printing `TB_RESULT checks=N failures=M`. The full-size
image test takes well under a second of simulation time.

## Changing it

- **Key.** Pass another `key_t` on the key ports. Start from
  `chaos_pkg::DEFAULT_KEY`.
- **Map arithmetic.** `chaos_pkg::fmul` holds the rounding rule. `WL` and
  `FRAC` set the format, but the constants in `DEFAULT_KEY` and `FIX_ONE` /
  `FIX_HALF` are written for Q4.28.
- **LFSR.** Change the taps with the `POLY` parameter of `lfsr_pn`.
- **Reference models.** If you change the arithmetic or the bit taps, update
  `tb/chaos_ref_pkg.sv` to match. The testbenches compare bit for bit.
