# FTApprox: a 16-bit fault-tolerant approximate number format, in RTL

FTApprox stores a 32-bit unsigned fixed-point number in 16 bits and computes
with it through 8-bit arithmetic. It aims to save the energy of 32-bit adders
and multipliers, and it survives the bit flips that soft errors cause in
storage. The word keeps only the two leading non-zero 4-bit blocks of the
number. Their position is stored as a 7-bit codeword that corrects one flipped
bit and detects two. The 8 kept bits are guarded by one parity bit.

This repository holds synthesizable SystemVerilog for the format's hardware:
- a converter from 32-bit numbers to FTApprox words;
- the parity and control-signal checkers;
- an 8-bit add/multiply unit that works on FTApprox words and returns
  FTApprox words;
- a converter from FTApprox words back to 32 bits;
- a small top level that wires these together.

## The word

```
 15      14 ........ 8   7 ............ 0
+------+----------------+----------------+
|parity| control signal |   data part    |
+------+----------------+----------------+
```

The 32-bit number is split into eight 4-bit blocks, block 7 at the MSB end.
The **MSVB** (most significant valid block) is the highest block that holds a
1.

- **Data part (7:0).** The MSVB followed by the block to its right. If the MSVB
  is block 0, blocks 1 and 0 are kept instead. Bits below the kept blocks are
  dropped, but the highest dropped bit is ORed into data bit 0. This removes
  part of the downward bias of plain truncation at the cost of one OR gate.
- **Control signal (14:8).** The codeword of the MSVB index. Its first three
  bits (14:12) are the index itself:

  | MSVB | code     | MSVB | code     |
  |------|----------|------|----------|
  | 0    | 000 0000 | 4    | 100 1011 |
  | 1    | 001 1110 | 5    | 101 0101 |
  | 2    | 010 1101 | 6    | 110 0110 |
  | 3    | 011 0011 | 7    | 111 1000 |

  Any two codewords differ in at least 4 bits.
- **Parity (15).** The XOR of the data part (even parity).

The value a word stands for is `data << 4*pos`, where `pos = MSVB-1`, or 0 for
MSVB 0. Zero is encoded as data 0 with the MSVB-0 code.

Example: `0x0026DB19` has its MSVB in block 5 (`0010`). Block 4 is `0110` and
the top dropped bit (bit 15) is 1, so the data part is `0010 0111`. The word is
`0 1010101 00100111` = `0x5527`, which stands for `0x00270000`, an error of
0.37 %.

## What happens to a flipped bit

Operands are checked every time they are loaded:

| flips in the stored word                      | outcome                                   |
|-----------------------------------------------|-------------------------------------------|
| 1 in the control signal                       | corrected: mapped to the nearest codeword |
| 2 in the control signal                       | detected: tie between codewords           |
| 1 in data or parity                           | detected by parity                        |
| 1 in control and 1 in data or parity          | control corrected, parity detects         |
| 2 in data, or 1 in data and 1 in parity       | **not detected**: computed with bad data  |

The control module computes the Hamming distance from the loaded signal to
all eight codewords. If one codeword is strictly nearest (distance 0 or 1),
its index is used. If several share the least distance, the module raises
`uncorrectable`. With this code that happens for every double flip, because
each word two flips away from a codeword is equally close to three codewords.
It also happens for the eight words at distance 3 from seven codewords.

A detected error does not stop the arithmetic: the result comes out with
`err_detect` set. The recovery, reloading the operand from a lower level of
the memory hierarchy, is left to the surrounding system. The per-operand
flags (`parity_err`, `uncorrectable`, `corrected`) say which operand to
reload.

## Arithmetic on FTApprox words

`ftapprox_alu` runs four steps in one combinational path:

1. **Parity check** of both data parts.
2. **Control mapping** of both control signals, giving each operand's MSVB
   and so its block position `pos`.
3. **Compute.**
   - *Add:* the operand at the lower position is shifted right by 4 bits per
     block of difference, and the bits that fall off are dropped. The two are
     then summed by one 8-bit adder into a 9-bit result at the higher
     position. An operand two or more blocks lower contributes nothing.
   - *Multiply:* one 8x8 multiplier gives a 16-bit product. Its position is
     the sum of the operands' positions.
4. **Normalise** (`ftapprox_normalize`). The leading non-zero block of the raw
   result becomes the new MSVB. Two blocks are kept, with the same OR
   truncation as the encoder. The codeword and the parity bit are attached. A
   carry out of the adder moves the MSVB up one block. A result of 2^32 or
   more saturates to data `0xFF` at MSVB 7 and raises `overflow`.

Worked example: `A = 0x000A1384` is stored as `1 1001011 10100001`. Bit 12
then flips, so A is loaded as `1 1011011 10100001`. `B = 0x0026DB19` is stored
as `0 1010101 00100111`.
- Both parity checks pass.
- A's control signal is at distance 1 from `1001011`, so A is corrected to
  MSVB 4.
- A's data is aligned one block down, to `0000 1010`. Added to `0010 0111`,
  this gives `0011 0001` at B's position.
- The result is `1 1010101 00110001`, which stands for 3,211,264.

**Precision caveat.** Every result keeps only 8 significant bits. A long sum
of small terms into one FTApprox accumulator stops growing once the terms
fall two blocks below it. In the 784-input dot products of
`tb_ftapprox_dnn_layer` (pixels 0..255, weights 0..4095), the accumulated
result ends about 92 % below the exact sum. The arithmetic is implemented as
the format defines it. Applications that need long reductions must either
accumulate in wider precision or order their sums.

## Modules

| module                | function                                                        |
|-----------------------|-----------------------------------------------------------------|
| `ftapprox_pkg`        | `ftapprox_t` word struct, `op_e`, codeword table, helpers       |
| `ftapprox_parity`     | XOR of the data part; mismatch against the stored bit           |
| `ftapprox_control`    | nearest-codeword mapping, correction, tie detection             |
| `ftapprox_encoder`    | 32-bit number to word (MSVB find, select, OR truncation)        |
| `ftapprox_decoder`    | word to 32-bit number, with its own parity and control checks   |
| `ftapprox_adder`      | block alignment and 8-bit add                                   |
| `ftapprox_multiplier` | 8x8 multiply, positions add                                     |
| `ftapprox_normalize`  | raw result to canonical word; saturation                        |
| `ftapprox_alu`        | two parity checks, two control mappings, add/mul, normalise     |
| `ftapprox_top`        | store path, registered compute path, result expansion           |

`ftapprox_top` has two independent paths:
- **Store path (combinational):** `st_value` (32 bits) goes in and `st_word`
  comes out.
- **Compute path:** `ld_a`, `ld_b` (the words as loaded from storage), `op`
  (`OP_ADD` = 0, `OP_MUL` = 1) and `in_valid` are presented in one cycle. On
  the next rising edge they give:
  - `out_valid`;
  - `res_word` and its 32-bit expansion `res_value`;
  - `err_detect`, `overflow`, and the 2-bit per-operand `parity_err`,
    `uncorrectable` and `corrected` (bit 0 is operand a).

  One operation can be issued every cycle. Reset (`rst_n`) is synchronous and
  active low.

## Departures and design choices

These points are taken from the format's worked examples rather than its
prose:
- the parity is even;
- the operand at the lower position is truncated during alignment, without
  rounding.

These points are choices of this implementation:
- **Unsigned only.** Signed numbers are not handled; the format defines none.
- **Zero** is encoded as data 0 at MSVB 0.
- **MSVB 0** uses the block-0 codeword, although its data part holds blocks
  1 and 0.
- **Results** are re-truncated with the OR rule.
- **Overflow** beyond 32 bits saturates.
- **The decoder** runs its own parity and control checks.
- **The top's output register** gives a latency of one cycle.

The adder and the multiplier are exact. Any 8-bit approximate adder or
multiplier with the same ports can replace them.

## Simulating

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`. The golden models are in
`tb/ftapprox_ref_pkg.sv`: plain integer arithmetic and a literal copy of the
codeword table.

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/ftapprox_pkg.sv tb/ftapprox_ref_pkg.sv rtl/ftapprox_top.sv tb/tb_ftapprox_top.sv \
  --top-module tb_ftapprox_top -o sim && ./obj_dir/sim
```

To run another testbench, replace the last two file names. The other modules
are found through `-Irtl`.

- `tb_ftapprox_control`: all 128 control signals, every single flip
  (56/56 corrected) and every double flip (168/168 detected).
- `tb_ftapprox_multiplier`: all 65,536 products.
- `tb_ftapprox_top`: 30,000 back-to-back operations with idle cycles and
  injected storage faults, checked against the golden model with the
  one-cycle latency. It fails unless each mechanism occurs at least once:
  - add, add with carry into a new block, multiply;
  - overflow, MSVB-0 result, OR truncation;
  - control correction, control tie, parity detection;
  - an undetected double data flip.
- `tb_ftapprox_dnn_layer`: a 784x100 fully connected layer run through the
  top, first without errors and then at two soft-error rates:
  - E1: 1 % of operands with one flip, 0.01 % with two;
  - E2: 2 % and 0.04 %.

  On `err_detect` it reloads the clean operands and repeats the operation.
  Every neuron must then match its error-free result, unless an undetected
  double flip reached it.
