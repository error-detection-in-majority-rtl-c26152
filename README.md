# Majority-logic decoding with early error detection for EG-LDPC protected memory

A memory protected by an error-correcting code has to pass every word it reads
through a decoder. Euclidean-geometry LDPC (EG-LDPC) codes suit this well. They
correct several flipped bits per word, and they can be decoded by *one-step
majority logic*: a rotating register, a few XOR trees and one majority gate. The
drawback is speed. A serial majority-logic decoder spends one clock per codeword
bit, so 15 clocks for a 15-bit word, and it spends them whether or not the word
holds an error. Nearly every word read from a real memory is error-free, so most
of that time is wasted.

This design keeps the serial decoder but watches its check sums during the first
three decoding cycles. If none of them is ever nonzero, the word holds no error
and the decode stops there. For the (15,7) EG-LDPC code this rule is exact for
every error of up to four flipped bits: each such error makes at least one of
the 12 check sums of the first three cycles nonzero. The testbench checks this
over all 1940 patterns. An error-free word therefore costs 3 decoding cycles
instead of 15. A word with an error still gets the full 15-cycle decode, which
corrects up to two flipped bits.

## The codes

The RTL supports two families of cyclic codes that are one-step majority-logic
decodable. `FAMILY` selects the family and `S` selects the size within it:

| FAMILY | S | code (N,K) | check sums J | corrects | generator polynomial |
|--------|---|------------|--------------|----------|----------------------|
| `CODE_EG` (default) | 2 (default) | (15,7) | 4 | 2 bits | 1 + x^4 + x^6 + x^7 + x^8 |
| `CODE_EG` | 3 | (63,37) | 8 | 4 bits | degree 26 |
| `CODE_EG` | 4 | (255,175) | 16 | 8 bits | degree 80 |
| `CODE_DSCC` | 1 | (7,3) | 3 | 1 bit | degree 4 |
| `CODE_DSCC` | 2 | (21,11) | 5 | 2 bits | degree 10 |
| `CODE_DSCC` | 3 | (73,45) | 9 | 4 bits | degree 28 |

`CODE_EG` gives the Euclidean-geometry LDPC codes EG(2,2^S). `CODE_DSCC` gives
the difference-set cyclic codes, which are the projective-geometry codes
PG(2,2^S).

Either way, the parity-check matrix is made of all N cyclic shifts of the
incidence vector of one line of the geometry. For EG codes the line is
{1 + b*alpha : b in GF(2^S)}, where alpha is a primitive element of GF(2^(2S));
this line misses the origin. For DSCCs it is the projective line spanned by 1
and alpha in GF(2^(3S)). Its point exponents, taken modulo N, form a perfect
difference set: {0, 1, 12, 20, 26, 30, 33, 35, 57} for the (73,45) code. Two
lines share at most one point. So the J rows that contain bit N-1 (2^S for EG,
2^S + 1 for DSCC) touch every other bit at most once: they are *orthogonal* on
bit N-1.
For the (15,7) code these rows are

    B1 = r1 ^ r5  ^ r13 ^ r14
    B2 = r0 ^ r2  ^ r6  ^ r14
    B3 = r7 ^ r8  ^ r10 ^ r14
    B4 = r3 ^ r11 ^ r12 ^ r14

An error in bit 14 sets all four sums, and an error in any other bit sets at most
one. So when at most two bits are wrong, bit 14 is wrong exactly when at least
three of the four sums are 1.

`rtl/eg_ldpc_pkg.sv` computes all of this at elaboration time: the line, the
check-sum rows, K and the generator polynomial g(x) = (x^N+1)/h(x). Here h(x) is
the reciprocal of gcd(line(x), x^N+1). The package stores no tables, so changing
`FAMILY` or `S` needs no other change. Vectors are sized for N up to 255.

## Decoder datapath (`mldd_decoder`)

The decoder has four parts, plus the detector and the controller:

1. **`cyclic_shift_register`**: N taps. A load captures the word. Each shift
   moves tap i to tap i+1 and feeds tap N-1 back into tap 0. This multiplies the
   word by x modulo x^N+1, so a codeword stays a codeword. After N shifts, every
   bit has been in tap N-1 once and the word is back in its original alignment.
2. **`xor_matrix`**: forms the J check sums on the current taps, straight from the
   codeword bits. This is a "Type-II" decoder: no syndrome is computed.
3. **`majority_gate`**: 1 when more than J/2 sums are 1. A tie with even J gives 0.
4. **The correcting XOR**: sits on the feedback path of the shift register. The bit
   leaving tap N-1 is XORed with the majority decision as it re-enters at tap 0.
5. **`error_detector`**: ORs the J sums of each cycle in the detection window
   into a sticky flag. Its size depends only on J, not on N.
6. **`mldd_control`**: runs the states IDLE → RUN → DONE. At the last cycle of the
   window it checks the detector's flag, which includes the current cycle's
   sums. If the flag is clear, the controller goes to DONE early. Otherwise it
   runs all N cycles.

Only a word with a nonzero check sum can have a bit corrected. So a word that
stops early has simply been rotated `DETECT_CYCLES` times, and the output
rotates it back by wiring. A word decoded in full is already aligned.

### Timing

Counted from the clock in which `start_i` is accepted (`ready_o` high):

| word | decoding cycles | `valid_o` after |
|------|-----------------|-----------------|
| no error in the window | `DETECT_CYCLES` = 3 | 4 clocks |
| error detected | N = 15 | 16 clocks |

`valid_o` is high for one cycle. During that cycle `codeword_o`, `data_o` (the
top K bits), `error_o` (an error was seen in the window) and `early_o` are valid.
The decoder takes its next word one cycle later.

### What the early stop guarantees

- (15,7), errors of 1 to 4 bits: all are detected in the window. This was checked
  exhaustively.
- (15,7), errors of 5 bits: 18 of the 3003 patterns escape the window. The code
  has minimum distance 5, so some 5-bit errors turn one codeword into another,
  and no check can see them. Such a word is returned unchanged, with `error_o`
  low.
- (15,7), errors of 3 or 4 bits: these are detected (`error_o` high) but are
  beyond the correction capability. The decoded word may be wrong, and nothing
  flags that beyond `error_o`.
- (63,37): 1500 random patterns of each weight from 1 to 4 were all detected in
  the window and corrected.
- (73,45) DSCC: 1500 random patterns of each weight from 1 to 5 were all detected
  in the window. Those of up to 4 bits were corrected. A word with an error
  takes 73 decoding cycles; a clean word still takes 3.

## Memory system (`mldd_memory_system`, the top)

    wr_data --> eg_encoder --> codeword_memory --> mldd_decoder --> rd_data
                                   ^ upset port         (early stop)

- **`eg_encoder`**: a systematic encoder. Data goes in bits N-1..N-K. Parity goes
  in bits N-K-1..0 and is the remainder of d(x)*x^(N-K) divided by g(x). It is
  combinational.
- **`codeword_memory`**: DEPTH × N bits (64 × 15 by default), with a synchronous
  write and a synchronous read. The `upset` port XORs a mask into a stored word
  to place soft errors. If a write and an upset hit the same word in the same
  cycle, the write wins.
- **Read handshake**: `rd_en` is taken while `rd_ready` is high. One read is in
  flight at a time. `rd_valid` comes 5 clocks after the accepted request for a
  clean word and 17 clocks after it otherwise. Corrected words are not written
  back to memory.

## Parameters

| module | parameter | default | meaning |
|--------|-----------|---------|---------|
| `mldd_memory_system`, `mldd_decoder`, `eg_encoder`, `xor_matrix` | `FAMILY` | `CODE_EG` | code family: `CODE_EG` or `CODE_DSCC` |
| `mldd_memory_system`, `mldd_decoder`, `eg_encoder`, `xor_matrix` | `S` | 2 | code size: N = 4^S − 1 (EG) or 4^S + 2^S + 1 (DSCC) |
| `mldd_memory_system`, `codeword_memory` | `DEPTH` | 64 | words in memory |
| `mldd_memory_system`, `mldd_decoder`, `mldd_control` | `DETECT_CYCLES` | 3 | length of the detection window |

The three-cycle window is taken from the original description. So are the two
code families. The EG-LDPC family is the default, and its 15-bit length follows
the description's example of a 15-bit codeword. The 73-bit DSCC is the
description's own example, but it needs a parameter change.
The memory depth, the handshakes, the bit order, the upset port and the reset
style are this design's own choices. Reset is asynchronous and active low. The
memory array is not reset.

## Departures and omissions

- The scheme is also stated to catch *five* flipped bits in three cycles. That
  cannot hold for the (15,7) EG code (see above), for which four is the
  guarantee. For the (73,45) DSCC, five was supported by random testing, not
  proven exhaustively.
- The syndrome-based fault detector and fully parallel decoders are alternatives
  the scheme is compared with. They are not part of this design.
- After a full decode, the decoder does not check that the final check sums are
  zero. An error beyond the correction capability (3 or 4 bits for the (15,7)
  code) is signalled only by `error_o`.
- Scrubbing (writing corrected words back) is not implemented.

## Verification

Each block has a self-checking testbench in `tb/`. Every testbench prints
`TB_RESULT checks=<n> failures=<n>`.

| testbench | what it covers |
|-----------|----------------|
| `tb_eg_ldpc_pkg` | (N,K,J) of all six codes; g(x) against tabulated values; the check sums are orthogonal and are parity checks of the code |
| `tb_eg_encoder` | all 128 (15,7) data words, 2000 random (63,37) and (73,45) words; each codeword is divisible by g(x) |
| `tb_codeword_memory` | random writes, upsets and reads against a model, including write/upset collisions |
| `tb_cyclic_shift_register`, `tb_xor_matrix`, `tb_majority_gate`, `tb_error_detector` | datapath parts; exhaustive where the input space is small |
| `tb_mldd_control` | shift counts, window, early flag and handshake, with the error raised in each cycle |
| `tb_mldd_decoder` | 200 clean words, then every error of 0 to 5 bits on random (15,7) codewords: latency, detection and correction |
| `tb_mldd_decoder_s3` | the decoder for the (63,37) code, with random errors of 1 to 4 bits |
| `tb_mldd_decoder_dscc` | the decoder for the (73,45) DSCC, with random errors of 1 to 5 bits |
| `tb_mldd_memory_system` | end to end, all defaults: 64 words, upsets of 0–4 bits, a collision, back-to-back reads with stalls; it requires every mechanism to occur at least once and reports the average read latency (12.5 clocks here against 17 without the early stop) |
| `tb_mldd_memory_system_dscc` | the same end-to-end flow with the (73,45) DSCC and upsets of 0–5 bits |

Reference values in the testbenches come from `tb/tb_ref_pkg.sv`, not from the
RTL package. It holds tabulated generator polynomials and check sums, and it
builds codewords as d(x)*g(x).

To run one testbench with Verilator:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/eg_ldpc_pkg.sv tb/tb_ref_pkg.sv tb/tb_mldd_memory_system.sv \
        --top-module tb_mldd_memory_system -Mdir obj
    ./obj/Vtb_mldd_memory_system

Each testbench runs in under a second.
