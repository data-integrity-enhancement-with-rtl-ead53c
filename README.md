# Interleaved Hsiao/CRC EDAC for narrow memories

A 32-bit word stored in memory can be hit by radiation-induced upsets, and at
small geometries one particle often flips two *neighbouring* cells. A single
SEC-DED code (single-error-correcting, double-error-detecting) over the whole
word corrects one flipped bit and can only report two. This design splits the
word into its even and its odd bits and protects each half with its own
(24,16) SEC-DED code. Neighbouring bits always fall into different halves, so
a double-adjacent upset becomes one correctable error in each half.

One half uses a Hsiao code and the other a CRC-8 code by default; either half
can be switched to the other code. The 48-bit codeword (32-bit message plus
16-bit check-bit) is then stored in an ordinary 8-bit or 16-bit memory
device. The message goes to its own address, and the check-bit goes to a
mirrored address at the top of the address space. A controller writes and
reads the codewords beat by beat. When a read needed a correction, the
controller writes the repaired codeword back ("scrubbing").

## The 48-bit codeword

```
message  m[31:0]     check-bit  c[15:0]
even half: m[0], m[2], .., m[30]  -> data bits 0..15 -> check bits c[0], c[2], .., c[14]
odd  half: m[1], m[3], .., m[31]  -> data bits 0..15 -> check bits c[1], c[3], .., c[15]
```

Message bit `2i` is data bit `i` of the even half and `2i+1` is data bit `i`
of the odd half. Check bit `i` of the even encoder becomes check-bit `2i`,
and check bit `i` of the odd encoder becomes `2i+1`. In the message and in
the check-bit alike, every pair of adjacent positions has one bit in each
half.

What the decoder does with a given error pattern:

| errors in the 48-bit codeword                         | result                              |
|-------------------------------------------------------|-------------------------------------|
| none                                                  | both halves `ERR_NONE`              |
| one bit anywhere                                      | corrected                           |
| two adjacent bits (inside a byte or across bytes)     | corrected, one bit per half         |
| one even-position and one odd-position bit, anywhere  | corrected                           |
| two bits in the same half                             | that half `ERR_DETECTED`, no change |
| three or more bits in one half                        | detected or miscorrected            |

Errors of three or more bits in one half are beyond SEC-DED. Such a word may
be reported as uncorrectable, or it may be "corrected" to a wrong value.

## The two half-codes

Both codes take 16 data bits and add 8 check bits. Both decode the same way.
The syndrome is the received check byte XOR the check byte recomputed from
the received data:

* a zero syndrome means the half is clean;
* a syndrome equal to one column of the parity-check matrix names the bit in
  error, and that bit is flipped (this can be a data bit or a check bit);
* any other non-zero syndrome is reported as uncorrectable. The received bits
  are passed through unchanged.

**Hsiao (24,16).** The parity-check matrix is `H = [D | I8]`. Each of the 16
columns of `D` has exactly three ones, so every column has odd weight. No two
columns are equal, and each of the eight rows holds six ones of `D`. These
are the classic Hsiao rules: they give the fewest ones and balanced rows, so
each check bit is a 6-input XOR. The column set used here is the first one
found when you:

1. list the 56 weight-3 columns of eight rows in lexicographic order of
   their row indexes;
2. try subsets of 16 in lexicographic order;
3. keep the first subset whose rows all weigh six.

The columns, as hex with row 1 in bit 0, are (`edac_pkg::HSIAO_COL`):

```
07 0b 13 23 43 83 1c 2c 4c 8c 34 c8 70 b0 d0 e0
```

Every column has odd weight, so a double error always gives a non-zero
even-weight syndrome. `hsiao_decoder` reports this on a separate
`double_err` output.

**CRC-8 (24,16).** The check byte is the remainder of `d(x) * x^8` divided
by the generator `x^8 + x^2 + x + 1` (0x07). The message is taken MSB first
and the seed is zero. With a zero seed the division collapses into a fixed
XOR matrix: column `j` is the remainder of a message with only bit `j` set
(`edac_pkg::crc_col`). This matrix is computed at elaboration time from the
`POLY` parameter. With this generator the 24-bit code has a minimum
distance of four. So the 24 single-bit syndromes are distinct and non-zero, and no double
error produces any of them. That makes syndrome decoding a true SEC-DED
decoder. Any generator you substitute must keep that property.

## Storing a codeword in an 8- or 16-bit device

A 48-bit codeword takes six bytes or three 16-bit words. The message sits at
its host byte address `A` (aligned to four bytes), least significant part
first. The check-bit address comes from the address of the last message
beat:

```
last  = A + 4 - MEM_W/8          (A+3 for a byte device, A+2 for a 16-bit device)
check = ~(last >> 1)
```

On a byte device the low check byte goes to `check` and the high byte to
`check + 1`. On a 16-bit device the whole check-bit is one word at `check`.
Messages grow upward from address 0 and check-bits grow downward from the
top. Every four message bytes use two check bytes: two thirds of the device
holds messages and one third holds check-bits.

| codeword | message (8-bit device) | check-bit (8-bit device) | message (16-bit) | check-bit (16-bit) |
|----------|------------------------|--------------------------|------------------|--------------------|
| 0        | 0000_0000h - 0003h     | FFFF_FFFEh (low), FFFFh  | 0000_0000h, 0002h | FFFF_FFFEh        |
| 1        | 0000_0004h - 0007h     | FFFF_FFFCh, FFFDh        | 0000_0004h, 0006h | FFFF_FFFCh        |
| 2        | 0000_0008h - 000Bh     | FFFF_FFFAh, FFFBh        | 0000_0008h, 000Ah | FFFF_FFFAh        |
| 3        | 0000_000Ch - 000Fh     | FFFF_FFF8h, FFF9h        | 0000_000Ch, 000Eh | FFFF_FFF8h        |

Nothing stops a host from writing a message so high that it overlaps the
check-bit area. Keep message addresses below two thirds of the address space.

## Controller operation and timing

`codeword_mem_ctrl` serves one request at a time.

* **Write:** the interleaved encoder supplies the check-bit combinationally.
  The controller then issues `NBEATS` back-to-back write beats: the message
  beats first, then the check-bit beats. `NBEATS` is 6 for an 8-bit device
  and 3 for a 16-bit device.
* **Read:** the controller issues `NBEATS` read beats. The device returns
  each beat one cycle later. The controller assembles the codeword and passes
  it through the interleaved decoder. Then:
  * If a half was corrected and neither half is uncorrectable, the corrected
    codeword (message and check-bit) is written back first. Then the response
    goes out with `scrubbed` set.
  * An uncorrectable word is reported but left in memory as it is.

The latency is counted in clock edges, from the edge that accepts the
request (`req_valid && req_ready`) to the first cycle with `resp_valid` high:

| request        | 8-bit device | 16-bit device | formula          |
|----------------|--------------|---------------|------------------|
| write          | 7            | 4             | NBEATS + 1       |
| clean read     | 9            | 6             | NBEATS + 3       |
| scrubbed read  | 15           | 9             | 2 * NBEATS + 3   |

`resp_valid` is a one-cycle pulse, and `req_ready` is high again in that
same cycle. The encoder and decoder are purely combinational. The decode
path sits between the codeword register and the controller's next-state
logic: a SEC-DED syndrome tree, a comparison against 24 columns per half,
and a correction mux.

### Interfaces

Top level `edac_mem_top` (types in `edac_pkg`):

| port | dir | meaning |
|------|-----|---------|
| `clk`, `rst_n` | in | clock; asynchronous active-low reset |
| `req_valid` / `req_ready` | in / out | request handshake; keep `req` stable while it waits (an assertion checks this) |
| `req` (`req_t`) | in | `write`, `addr` (byte address; bits 1:0 ignored), `wdata` |
| `resp_valid` | out | one-cycle pulse when a request is complete |
| `resp` (`resp_t`) | out | `rdata` (corrected message, zero for writes), `even_err`/`odd_err` (`ERR_NONE`, `ERR_CORRECTED`, `ERR_DETECTED`), `scrubbed`, `even_syn`/`odd_syn` (syndromes) |
| `mem_en`, `mem_we`, `mem_addr[31:0]`, `mem_wdata[MEM_W-1:0]` | out | memory beat: one per cycle |
| `mem_rdata[MEM_W-1:0]` | in | read data, valid the cycle after a read beat |

Parameters of the top:

| parameter | default | meaning |
|-----------|---------|---------|
| `MEM_W` | 8 | memory device width, 8 or 16 |
| `EVEN_CODE` | `CODE_HSIAO` | code of the even half |
| `ODD_CODE` | `CODE_CRC` | code of the odd half |

Set both halves to the same code to get two identical Hsiao halves or two
identical CRC halves.

## Module hierarchy

```
edac_mem_top
 +- interleaved_encoder   even/odd split, two half-encoders, check-bit interleave
 |   +- hsiao_encoder / crc8_encoder
 +- interleaved_decoder   even/odd split, two half-decoders, re-interleave
 |   +- hsiao_decoder / crc8_decoder   (each recomputes its check byte with the encoder)
 +- codeword_mem_ctrl     beat sequencing, check-bit address, scrubbing
edac_pkg                  widths, Hsiao columns, CRC function, enums, request/response structs
```

## Design choices and their limits

Some points go beyond the original description, or settle things it leaves
open. They are listed so you can judge them or change them:

* **Code pairing.** The default pairs a Hsiao half with a CRC half.
  Identical halves are a parameter setting. Both arrangements are described
  as options for this kind of EDAC.
* **Hsiao matrix.** Many matrices satisfy the Hsiao rules. The one used is
  the first found by the search described above. Any other valid matrix
  works if it is placed in `HSIAO_COL`.
* **CRC generator.** `x^8 + x^2 + x + 1` was chosen for its distance-4
  property at this length. Bit order is MSB first, with a zero seed.
* **Decoders.** The syndrome-matching decoders, the status encoding, and the
  pass-through of uncorrectable data belong to this design.
* **Memory side.** These also belong to this design:
  * the byte order of the message and of the check-bit in memory;
  * the request/response handshake;
  * the synchronous one-cycle memory bus;
  * not writing back an uncorrectable word;
  * the asynchronous reset.
* **Scrub policy.** Scrubbing happens only on reads that needed a
  correction. There is no background scrubber that walks the memory.
* **16-bit format.** The default width is 8. The 16-bit format needs
  `MEM_W = 16`.
* **Memory device.** The device itself is not part of the RTL. The
  testbenches use the behavioural model `tb/mem_device_model.sv`.
* **Verilator lint warning.** Verilator reports `SYNCASYNCNET` on `rst_n`.
  The reset drives the flops asynchronously, and the handshake assertion
  uses it in `disable iff`. The warning is harmless.

## Verification

Every block has a self-checking testbench in `tb/`. Each one ends by
printing `TB_RESULT checks=N failures=M`, and each has a cycle watchdog. The
reference models in `tb/tb_edac_ref_pkg.sv` are written independently of the
RTL:

* Hsiao check bits come from a table of row triples.
* CRC check bits come from long division of the 24-bit dividend.

| testbench | what it covers |
|-----------|----------------|
| `tb_hsiao_encoder` | Hsiao rules of the matrix; re-runs the lexicographic search and compares with `HSIAO_COL`; all 65536 data words |
| `tb_crc8_encoder` | known remainders; all 65536 messages against long division |
| `tb_hsiao_decoder`, `tb_crc8_decoder` | clean words, all 24 single and all 276 double errors, random triple errors |
| `tb_interleaved_encoder` | default, Hsiao+Hsiao and CRC+CRC configurations; walking ones and random messages |
| `tb_interleaved_decoder` | all 48 single, all 47 adjacent, random even+odd pairs, random same-half pairs |
| `tb_codeword_mem_ctrl` | exact beat addresses and data for the four codewords of the table above, at 8 and 16 bits; device contents; scrubbing; no write-back on uncorrectable words; latencies |
| `tb_edac_mem_top` | end to end at the default parameters; 64 slots; single, adjacent, even+odd and same-half double upsets through real memory cells; checks memory contents after each scrub and the latencies; counts each mechanism and fails if one never occurred |
| `tb_edac_mem_configs` | the same end-to-end checks for 16-bit Hsiao+CRC, 8-bit Hsiao+Hsiao, 8-bit CRC+CRC and 16-bit CRC+Hsiao |

The end-to-end test injects the upsets directly into the memory model's
cells, between the write and the read.

To run a testbench with Verilator 5:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/edac_pkg.sv tb/tb_edac_ref_pkg.sv tb/tb_edac_mem_top.sv \
    --top-module tb_edac_mem_top
./obj_dir/Vtb_edac_mem_top
```

For another testbench, substitute its name. All of them finish in well under
a second.
