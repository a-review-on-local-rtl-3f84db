# Local memory bus controller with Hamming ECC

A small memory controller that protects every stored 32-bit word with 7 check
bits. On a write the word is encoded into a 39-bit codeword and stored. On a
read the codeword is checked: a single flipped data bit is corrected on the fly,
a two-bit error is flagged, and a 2-bit status tells the host what happened. A
diagnostic mode corrupts codewords on purpose as they are written, so the
checking path can be exercised without faulty memory.

```
             ecc_en                                          ecc_en        ecc_en
               |                                               |             |
data_in --> ecc_encoder --> ecc_error_inject --> Memory39 --> ecc_decoder --> ecc_status --> data_out
  [31:0]      [38:0]          ^ force_error      16 x 39      raw data,       corrected      ind[1:0]
                                                              syndrome gen    data, status
```

All of it is synthesizable SystemVerilog. `topmodel` is the top level.

## The code

The data bits and check bits are interleaved in the codeword the way a textbook
Hamming code numbers its positions:

| codeword bit | contents |
|---|---|
| 0 | CB6, XOR of all 32 data bits |
| 1, 2, 4, 8, 16, 32 | CB0 .. CB5 |
| 3, 5, 6, 7, 9 .. 15, 17 .. 31, 33 .. 38 | data bits 0 .. 31, in order |

CBk (k = 0..5) is the XOR of every data bit whose codeword position has bit k
set. For example, data bit 0 sits at position 3 and feeds CB0 and CB1. Data bit
31 sits at position 38 and feeds CB1, CB2 and CB5. Every data bit also feeds
CB6. Some reference values:

| data | ecc_en | codeword |
|---|---|---|
| 0x0000_0007 | 0 | 0x00_0000_0068 |
| 0x0000_000F | 0 | 0x00_0000_00E8 |
| 0x0000_0007 | 1 | 0x00_0000_0069 |
| 0x0000_000F | 1 | 0x00_0000_00FE |

With `ecc_en` low the encoder still places the data at the same positions, but
it leaves every check bit at 0.

The decoder recomputes the check bits and forms the 7-bit syndrome `gen`:

* `gen[6:1]`: the recomputed CB5..CB0 XOR the stored ones. For a single flipped
  bit at position 1..38, this is the position of that bit.
* `gen[0]`: the recomputed CB6 XOR the stored one. It is 1 when an odd number of
  data bits or CB6 itself flipped.

Examples: a clean 0x69 gives `gen = 0x00`. 0x61 (bit 3 flipped) gives
`gen = 0x07`, meaning position 3 with odd parity. 0x41 (bits 3 and 5 flipped)
gives `gen = 0x0C`, meaning position 3^5 = 6 with even parity.

## Correction and the status code

`ecc_status` turns the syndrome into the `ind` output and the corrected data:

| `ind` | meaning | when | data_out |
|---|---|---|---|
| 00 | no error | `gen == 0`, or `ecc_en` low | unchanged |
| 01 | single error corrected | `gen[0] = 1` and `gen[6:1]` is 0 (CB6 hit) or a data position | faulty bit flipped back |
| 10 | two-bit error detected | `gen[0] = 0`, `gen[6:1] != 0` | unchanged (wrong) |
| 11 | invalid | `gen[0] = 1` but `gen[6:1]` is a check-bit position or above 38 | unchanged |

The correction XORs a one-hot mask, selected by the syndrome, into the data.

**Limits of this code, and how they are handled.** CB6 covers only the data
bits, not CB0..CB5. The code therefore has minimum distance 3, not the 4 of a
true SEC-DED code. Two cases follow:

* A single flip of one of CB0..CB5 gives `gen[0] = 0` with a one-hot
  `gen[6:1]`. That is the same shape as some two-bit data errors (for example,
  positions 3 and 7). `ecc_status` reports both as `10`. The data read for a
  check-bit hit is actually intact, but calling it `01` would let those two-bit
  data errors pass as "corrected". This block takes the fail-safe choice.
* A data bit plus a check bit flipped together gives odd parity. The syndrome
  may then point at a third data bit, which gets "corrected" wrongly and
  reported as `01`. No decoder can avoid this with this code. If it matters,
  make CB6 the parity over the data and CB0..CB5 (one line in
  `ecc_pkg::calc_check` plus the decoder). That makes every double error
  detectable, but the reference codeword values above would change.

Every single flip of a data bit or of CB6 is always corrected. Every flip of two
data bits is always reported as `10`.

## Forced errors (diagnostic mode)

`force_error` selects how many bits `ecc_error_inject` flips in the codeword on
its way into memory:

| force_error | effect |
|---|---|
| 00 | normal operation |
| 01 | 1 bit flipped |
| 10 | 2 adjacent bits flipped |
| 11 | 3 adjacent bits flipped |

The lowest flipped position is kept in a 6-bit register, brought out as
`err_pos`. It steps by one on every rising clock edge while a mode other than 00
is selected, and wraps from 38 to 0. The adjacent bits wrap the same way. Reset
sets it to 0. So successive writes in one mode walk the error across the whole
codeword. To hit one particular bit, hold a mode for the right number of idle
cycles after reset. For example, three cycles in mode 01 put the position at 3.

## Memory and timing

`Memory39` holds 16 words of 39 bits. It has a separate write port
(`wr_en`, `wr_addrs`) and read port (`rd_en`, `rd_addrs`). Everything happens on
the rising edge of `clk`:

* **Write:** with `wr_en` high, the encoded (and possibly corrupted) `data_in`
  is stored at `wr_addr`.
* **Read:** with `rd_en` high, the word at `rd_addr` is loaded into the read
  register. `data_out` and `ind` are valid right after that edge, one cycle of
  latency. Decoding and correction are combinational after the register.
  With `rd_en` low, the last read word is held.
* **Same address in one cycle:** a read of the address being written returns
  the old word.
* **Reset:** `rst` is synchronous. While it is high, every edge clears all
  words, the read register and the error position, and reads and writes are
  ignored.

`ecc_en` acts at write time, where it chooses whether check bits are generated.
It also acts at read time, where it chooses whether checking and correction
happen. It is applied combinationally on the read side, so hold it steady while
the read data is used. A word written with `ecc_en` low and read with it high
will usually show errors, because its check bits are all zero.

## Top-level ports (`topmodel`)

| port | dir | width | meaning |
|---|---|---|---|
| clk | in | 1 | clock |
| rst | in | 1 | synchronous reset |
| wr_en, wr_addr | in | 1, 4 | write request |
| rd_en, rd_addr | in | 1, 4 | read request |
| data_in | in | 32 | write data |
| ecc_en | in | 1 | ECC on/off |
| force_error | in | 2 | forced-error mode |
| data_out | out | 32 | read data (corrected) |
| ind | out | 2 | error status, see above |
| err_pos | out | 6 | forced-error position |

The host processor that drives these ports is not part of the RTL.

## Where this design makes its own choices

These points follow the source design:

* the block structure and signal names
* the 32/39-bit code, including which data bits feed each check bit
* the codeword layout, the syndrome format and the 00/01/10/11 status encoding
* the 16-word memory
* the three forced-error modes

These points are this design's own choices:

* the synchronous reset, the registered read and the read-before-write order
* the stepping and wrapping of the forced-error position
* mode 11 meaning three adjacent bits
* when status `11` is produced
* reporting a single check-bit flip as `10`
* the `err_pos` port

The source also mentions a separate `ecc_sts` output. Here the status is carried
by `ind`, and the corrected data by `data_out`.

## Files

| file | content |
|---|---|
| `rtl/ecc_pkg.sv` | widths, types, position and check-bit functions |
| `rtl/ecc_encoder.sv` | 32 -> 39-bit encoder |
| `rtl/ecc_error_inject.sv` | forced-error generator |
| `rtl/Memory39.sv` | 16 x 39 memory |
| `rtl/ecc_decoder.sv` | data extraction and syndrome |
| `rtl/ecc_status.sv` | correction and status |
| `rtl/topmodel.sv` | controller top level |
| `tb/ecc_ref_pkg.sv` | reference model of the code, written from the check-bit table |
| `tb/<block>_tb.sv` | self-checking testbench for each block |

## Simulating

Every testbench checks itself against a reference model and ends by printing
`TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
    --top-module topmodel_tb rtl/ecc_pkg.sv tb/ecc_ref_pkg.sv tb/topmodel_tb.sv
./obj_dir/Vtopmodel_tb
```

Replace `topmodel_tb` with `ecc_encoder_tb`, `ecc_decoder_tb`, `ecc_status_tb`,
`Memory39_tb` or `ecc_error_inject_tb` to test a single block.

`topmodel_tb` runs the controller at its default size in two parts:

1. It replays a reference sequence: data 0x7 is stored clean at address 0, with a
   forced single error on bit 3 at address 1 (stored as 0x61), and with a forced
   double error at address 2. Reading them back must give 0x7 with no error, 0x7
   corrected, and a detected double error. It also places the word 0x41 (bits 3
   and 5 flipped) directly in memory, which must read as raw 0x4 with `ind = 10`.
2. It runs 20,000 cycles of random traffic against a model.

It also counts how often each mechanism occurred: correction, double detection,
invalid syndrome, ECC off, each forced-error mode, reset and read hold. A
mechanism that never occurred counts as a failure.

## Changing it

The data and check widths are fixed by the code. `ecc_pkg` holds the widths, and
its functions derive the layout from them, but the check-bit count only fits 32
data bits. The memory depth is `Memory39`'s `ADDR_W` parameter, together with
`ecc_pkg::ADDR_W` for the top-level address ports.
