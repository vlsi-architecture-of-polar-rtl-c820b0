# (32,16) polar encoder, BPSK channel and successive-cancellation decoder

Polar codes protect a block of data by spreading K data bits over the most
reliable positions of an N-bit vector u, setting the rest ("frozen" positions)
to zero, and transmitting x = u · F^(⊗n) over GF(2), where F = [[1,0],[1,1]]
and N = 2^n. The decoder works through the same recursive structure in reverse,
one bit at a time: successive cancellation (SC).

This design is a complete link for a rate-1/2 code with N = 32 and K = 16:

```
enc_in[15:0] ─► encoder_32bit ─► enc_out[31:0] ─► channel ─► dec_in[287:0] ─► decoder_32bit ─► dec_out[15:0]
                    (t1)                           (t2)      32 × 9-bit          (t3)
                                                              samples
```

Everything is combinational. There is no clock and no reset: a data word
presented at `enc_in` appears at `dec_out` after the propagation delay. The
channel adds no noise, so `dec_out` always equals `enc_in`. The decoder's
ability to correct errors is tested on its own, with noisy samples.

## Code construction

| item | value | origin |
|---|---|---|
| block length N | 32 | source design |
| data bits K | 16 | source design |
| sample width | 9 bits, two's complement | source design (288 = 32 × 9) |
| information set | {7,11,13,14,15,19,21,22,23,25,26,27,28,29,30,31} | own choice: 5G NR reliability sequence restricted to N = 32 |
| `INFO_MASK` | `32'hFEE8_E880` (bit i set = index i carries data) | follows from the set |
| data order | data bit k → k-th information index, ascending | own choice |
| frozen value | 0 | own choice |

Bit i of every vector is index i. No bit-reversal permutation is used.
Together with the information set, this fixes every codeword. Example:
data `16'hE9E0` encodes to `32'h9600_9600`. The channel then turns that
codeword into the 288-bit word
`ff80403ff00ffffe01008040201008040201` repeated twice. This is the reference
vector of the source design, and the testbenches check it bit for bit.

The source design does not say which positions are frozen, or how the 16
data bits map onto them. It does show the data word `1010101010101010` next to
the codeword above. No standard ordering maps that data word to that codeword,
so this design does not reproduce the pairing. It does keep the codeword
itself as a valid codeword. To change the code, edit `INFO_MASK` in
`polar_pkg`. The mask must have exactly K bits set.

## Blocks

### `encoder_32bit`
First the data bits are scattered onto the information positions. Then five
butterfly stages run. At stage s, each pair (j, j + 2^s) in a block of 2^(s+1)
becomes (x[j] ⊕ x[j+2^s], x[j+2^s]). That costs 80 two-input XORs, five
levels deep. Parameters: `CN`, `CK`, `CMASK` (default: the package values).

### `channel`
This is a BPSK mapper with unit amplitude. Coded bit 0 becomes +1 (`9'h001`)
and bit 1 becomes −1 (`9'h1FF`). Sample i sits in `dec_in[9*i +: 9]`, so coded
bit 31 lands in `dec_in[287:279]`. Noise is deliberately left out of the
hardware.

### `decoder_32bit` and `sc_node`
This is the part that takes the most effort to follow. `sc_node` is a module
that instantiates itself. A node of size M takes M LLRs (positive means bit 0)
and returns two things: the M decisions of its leaves, and their re-encoding
x_hat. With H = M/2:

* left child input: `f(L[i], L[i+H]) = sign·sign·min(|L[i]|, |L[i+H]|)` (min-sum)
* right child input: `g(L[i], L[i+H], xl[i]) = L[i+H] ± L[i]`, minus when the
  left child's partial sum `xl[i]` is 1, saturated to ±255
* node output: `x_hat = {xr, xl ⊕ xr}`, the same butterfly as the encoder

A leaf decides 1 when its LLR is negative. A frozen leaf always decides 0, and
a zero LLR also decides 0. The left-before-right dependency of SC becomes a
combinational path here: it runs through all 32 leaves in order, and it sets
the decoder's delay. The decoder then picks out the decisions at the
information positions, in ascending order, as `dec_out`.

When the top-level decoder is synthesized, it comes to about 2000 word-level
cells (9- and 10-bit adders, comparators and muxes) with no storage.

### `polar_pkg`
This package holds N, K, `LLR_W`, `INFO_MASK`, the `llr_t` type and the
functions `f_minsum` and `g_sat`.

### `Polar_Code`
This is the top level, and it only wires the three blocks together. The
instance names t1, t2 and t3 and the net names match the source design.

## Where this departs from, or adds to, the source design

* The source design lists SC, SCL and BP as candidate decoders but never says
  which one it uses. This design uses plain SC with min-sum.
* The information set, data order, sign convention for zero and saturation
  are all choices made here (see above).
* The reported implementation figures (about 2 mm², 80.67 ns, 125 mW,
  12.4 Gbps) come from a vendor flow. They are not reproduced or checked.
* The channel carries no noise, as in the source design's own vectors.

## Simulation

Each testbench checks itself and ends by printing
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `tb_encoder_32bit` | all 65536 data words against the generator-matrix product (x[j] = ⊕ u[i] over i ⊇ j); frozen positions are zero after re-transforming; the reference codeword |
| `tb_channel` | the 288-bit reference vector; random codewords, sample by sample |
| `tb_decoder_32bit` | the reference sample word decodes to `E9E0`; all data words decode noise-free; 20000 noisy frames and 5000 large-amplitude (saturating) frames against a separately written, leaf-by-leaf SC model; at least one frame with sign errors is corrected |
| `tb_Polar_Code` | full link at default sizes: the data sequence 0000, aaaa, ff00, f0f0, ffff, 0007, 00ff, cccc, then all 65536 words; internal `enc_out` and `dec_in` are checked against independent models |

To run one with Verilator (from the directory that holds `rtl/` and `tb/`):

```
verilator --binary --timing -Wno-fatal -Irtl -y rtl -y tb +libext+.sv \
    rtl/polar_pkg.sv tb/tb_Polar_Code.sv --top-module tb_Polar_Code -o sim
./obj_dir/sim
```

Each one runs in well under a second.
