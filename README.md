# Decimal Matrix Code (DMC) protected memory register

Radiation can flip several neighbouring memory cells at once (a multiple cell upset,
MCU). Single-error-correcting Hamming codes cannot repair that. Interleaving would help,
but some memories cannot use it. The Decimal Matrix Code protects a 32-bit word with 36
check bits and corrects any upset confined to one half of the word, with one rare
exception (below). Its central trick is to use integer addition, not parity, for the
horizontal check bits. An even number of flips cancels out in a parity bit, but it almost
always changes an integer sum.

This repository holds synthesizable SystemVerilog for the encoder, the decoder
(syndrome calculator, error locator, error corrector), the two storage arrays, and a top
level `topdecimal`. That top level writes a word, lets you upset any stored bit, reads
the word back and corrects it. The encoder is shared between writing and reading (the
*error reuse technique*, ERT), so the decoder needs no second set of adders.

## The word as a matrix

The 32 data bits are cut into K = K1 x K2 = 2 x 4 symbols of m = 4 bits. They are laid
out as two rows of four symbols:

| row | symbol 3 | symbol 2 | symbol 1 | symbol 0 |
|-----|----------|----------|----------|----------|
| 0   | D15..D12 | D11..D8  | D7..D4   | D3..D0   |
|     | symbol 7 | symbol 6 | symbol 5 | symbol 4 |
| 1   | D31..D28 | D27..D24 | D23..D20 | D19..D16 |

**Horizontal check bits (20).** In each row, the symbol in column c is paired with the
symbol in column c+2. The two are added as unsigned 4-bit integers into a 5-bit sum:

| group | bits      | value                  |
|-------|-----------|------------------------|
| 0     | H4..H0    | D3..D0  + D11..D8      |
| 1     | H9..H5    | D7..D4  + D15..D12     |
| 2     | H14..H10  | D19..D16 + D27..D24    |
| 3     | H19..H15  | D23..D20 + D31..D28    |

**Vertical check bits (16).** `V[j] = D[j] ^ D[j+16]`, the parity of column j over the
two rows.

In the physical layout, each row of data is followed by its two horizontal groups
(D15..D0 then H9..H0, and D31..D16 then H19..H10). The vertical bits form a third row
under the data.

Example: for `D = 0xF5AF_F6AC`, H = `11001_10100_11001_10010` and V = `0x0303`.

## Decoding: how an upset is found

A read recomputes H and V from the data it read and compares them with the stored copies:

* horizontal syndrome per group: `dH[g] = H_recomputed[g] - H_stored[g]`, a 5-bit
  subtraction that wraps around. Only "zero or not" matters.
* vertical syndrome per column: `S[j] = V_recomputed[j] ^ V_stored[j]`.

`S[j] = 1` says that column j flipped in exactly one of the two rows. A non-zero `dH[g]`
says which symbol pair, and therefore which row, took the hit. Data bit (row r, column j)
is flipped back exactly when

    S[j] = 1  and  dH[group of (r, j)] != 0

Take an upset that turns symbol 0 from `1100` into `1111` and symbol 2 from `0110` into
`0111`. It gives `dH0 = 10110 - 10010 = 00100` and `S = 0x0103`, so bits D0, D1 and D8
are flipped back. A parity code would not see the two flips in symbol 0 at all. Their
integer sum changes by 3.

### What is corrected

* Any pattern of upsets confined to one row of data (D15..D0 or D31..D16), as long as no
  symbol pair keeps its sum. This covers single bits, and scattered or consecutive bits in
  two adjacent symbols. It also covers bursts across four symbols, and two non-adjacent
  symbols on most data.
* Every burst of up to 5 adjacent bits inside a row, on any data. Such a burst touches at
  most two neighbouring symbols, and neighbouring symbols are never paired. This is the
  "5-bit" correction capability usually quoted for this code.
* Upsets of horizontal check bits only, or of vertical check bits only. A lone non-zero
  syndrome of one kind never flips data.

### What escapes

* **Equal sums.** The errors can leave a pair's sum unchanged. Example: symbol 0 = `0110`
  and symbol 2 = `1001`, with all 8 bits flipped, gives `1001 + 0110`, still `01111`.
  Then `dH = 0` and those bits stay wrong. `err_detected` is still raised, because `S` is
  non-zero. This needs every bit of both symbols flipped and the symbols' values adding up
  to 2^m - 1. That makes it rare: for m = 4 it is about 4 x (2^-4)^2, roughly 1 in 64, of the
  8-bit upsets that cover both symbols of a pair, and such upsets are rare to begin with.
* **Same column in both rows.** `D[j]` and `D[j+16]` both flipped leaves `S[j] = 0`, so
  the error is seen (`dH != 0`) but cannot be placed. The word is returned uncorrected
  with `err_detected = 1`.
* **Upsets in both rows of different columns, or in both H and V bits at once.** These
  can make the locator flip good bits. The code does not guarantee anything for them.

`err_detected` only says that some syndrome was non-zero. It does not say whether the
correction succeeded. The code has no "uncorrectable" flag.

## Sharing the encoder (ERT)

The decoder's first step, recomputing H and V from the read data, is exactly what the
encoder does on a write. `dmc_ert_codec` holds one `dmc_encoder` behind a 2:1 multiplexer
that `mode` controls:

| mode           | operation | encoder input            | useful outputs                       |
|----------------|-----------|--------------------------|--------------------------------------|
| `DMC_ENCODE`   | write     | `d_wr`                   | `h_enc`, `v_enc` (to store)          |
| `DMC_SYNDROME` | read      | `d_rd` (from memory)     | `d_correct`, `dh`, `s`, `err_detected` |

This saves the four adders and 16 XOR gates of a second encoder. The cost is that a write
and a read cannot happen in the same cycle.

## Top level `topdecimal` and its timing

```
 din ──► dmc_ert_codec (encode) ──► dmc_sram info (32 b) ──┐
                     └──► h,v ──► dmc_sram redundancy (36 b)┤
                                                            ▼  ^ err_data / err_h / err_v
 dout ◄── reg ◄── dmc_ert_codec (syndrome, locate, correct) ◄── d1, h, v as read
```

| port           | dir | width | meaning                                               |
|----------------|-----|-------|-------------------------------------------------------|
| `clk`          | in  | 1     | clock, rising edge                                    |
| `rst`          | in  | 1     | synchronous, active high; restarts in a write cycle   |
| `din`          | in  | 32    | word to store                                         |
| `err_data`     | in  | 32    | cells of the stored data to upset (XOR on the read)   |
| `err_h`        | in  | 20    | cells of the stored horizontal bits to upset          |
| `err_v`        | in  | 16    | cells of the stored vertical bits to upset            |
| `dout`         | out | 32    | corrected word (registered)                           |
| `d1`           | out | 32    | data as read, after the upsets                        |
| `dout_valid`   | out | 1     | `dout` was loaded at the last edge                    |
| `err_detected` | out | 1     | the word now on `dout` had a non-zero syndrome        |

A small controller alternates two cycles, starting with a write after reset:

```
clk edge        1        2        3        4
cycle before    W        R        W        R
at the edge     store    dout <=  store    dout <=
                din,H,V  correct  din,H,V  correct
dout_valid after  0      1        0        1
```

* Write cycle: `din` must be valid. At the edge, `din` goes to the information array and
  its 36 check bits go to the redundancy array.
* Read cycle: the stored word is read, and the `err_*` masks are XORed in to model
  upsets. The shared encoder recomputes the check bits, and the decoder corrects the
  word. At the edge, the result goes to `dout` and `dout_valid` is high for the
  following cycle.

This gives one word every 2 cycles. The corrected word appears 2 edges after `din` is
sampled. The whole read path is combinational between the storage and `dout`. Its depth
is one 4-bit adder, one 5-bit subtracter, a 5-input OR, an AND and an XOR.

The storage is one word deep (a memory register). `dmc_sram` itself takes any `DEPTH`.
A design needing an addressed memory can instantiate it deeper and drive the address
ports. The top level does not, because its interface has no address.

## Modules

| file                  | what it is |
|-----------------------|------------|
| `rtl/dmc_pkg.sv`      | sizes (M, K1, K2 and derived widths) and the `dmc_mode_e` / `dmc_phase_e` enums |
| `rtl/dmc_encoder.sv`  | pair adders and column XORs; data pass-through `u` |
| `rtl/dmc_syndrome.sv` | per-group subtracters and column XORs |
| `rtl/dmc_locator.sv`  | `S[j] & (dH[group] != 0)` per data bit; `err_detected` |
| `rtl/dmc_corrector.sv`| XOR of the located bits into the read data |
| `rtl/dmc_decoder.sv`  | syndrome -> locator -> corrector |
| `rtl/dmc_ert_codec.sv`| shared encoder plus decoder, selected by `mode` |
| `rtl/dmc_sram.sv`     | register array, synchronous write, combinational read, no reset |
| `rtl/topdecimal.sv`   | controller, codec, the two arrays, upset injection, output register |

Everything except the storage and the output register is combinational. Synthesised,
the top is about 100 word-level cells, 35 flip-flops and 68 storage bits.

### Other symbol organisations

`M`, `K1` and `K2` are parameters of every codec module (`K2` must be even). The vertical
bits XOR all K1 rows together. Each row's groups pair column c with column c + K2/2.
Two other ways to cut a 32-bit word were weighed against the default:

* m = 2, k = 4 x 4: 24 + 8 = 32 check bits.
* m = 8, k = 2 x 2: 18 + 16 = 34 check bits. Published figures for this organisation
  quote 40, so its check bits may be arranged differently from the rule used here.

`tb/tb_dmc_alt_configs.sv` checks both organisations for single-bit correction. Only the
default m = 4, k = 2 x 4 is verified in depth.

## Simulating

Each testbench is self-checking and prints `TB_RESULT checks=N failures=M`. To build and
run one with Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb \
    rtl/dmc_pkg.sv tb/dmc_tb_pkg.sv tb/tb_topdecimal.sv --top-module tb_topdecimal
./obj_dir/Vtb_topdecimal
```

| testbench               | covers |
|-------------------------|--------|
| `tb_dmc_encoder`        | two reference words with known check bits, all-0/all-1, 2000 random words |
| `tb_dmc_syndrome`       | wrap-around subtraction (`01111 - 10110 = 11001`), random vectors |
| `tb_dmc_locator`        | each group and row, lone H or V syndromes, random |
| `tb_dmc_corrector`      | walking bits, random |
| `tb_dmc_decoder`        | worked examples, 3000 random one-row patterns, H-only/V-only check-bit upsets, same-column escapes |
| `tb_dmc_ert_codec`      | both modes, checking that the unused input really is ignored |
| `tb_dmc_sram`           | 16 x 36 array and the default single word |
| `tb_topdecimal`         | end to end at default sizes, about 1800 write/read pairs. It counts clean reads, corrections, upset types 1-5, all 5-bit bursts, check-bit upsets, equal-sum and same-column escapes. It fails if any of these never happens, and it checks the 2-cycle latency |
| `tb_dmc_alt_configs`    | m = 2 / k = 4 x 4 and m = 8 / k = 2 x 2 |

`tb/dmc_tb_pkg.sv` holds the reference: the check-bit equations written out one by one,
and the expected result of a one-row upset. That result is computed as "every flipped bit
comes back, except in pairs whose sum did not change". All of them pass.

`topdecimal` has no parameters of its own, so `tb_topdecimal` exercises the full-size
design.

## Where this implementation makes its own choices

The encoding and decoding equations, the 2 x 4 x 4-bit organisation, the shared encoder
and the block structure are those of the DMC scheme. The following are choices of this
implementation:

* **Horizontal bit count.** The code uses 20 horizontal bits, four 5-bit sums, which
  with the 16 vertical bits gives the 36 check bits of the scheme.
* **Whole word corrected.** The corrector repairs all 32 bits, both rows.
* **Subtraction.** It wraps modulo 32, as a plain 5-bit subtracter does. A drop of 7
  in a sum gives `11001`.
* **Interface and timing.** The controller that alternates write and read cycles, the
  upset-injection inputs, `dout_valid`, `err_detected` and the synchronous active-high
  reset are all this implementation's own. So are the one-word storage depth and the
  storage timing (synchronous write, combinational read).
* **Memory model.** The storage is a plain register array. There is no SRAM macro, no
  scrubbing and no write-back of the corrected word.
* **Generic parameters.** The parameterisation over M, K1 and K2 goes beyond the default
  organisation.
