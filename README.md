# A 256 x 128-bit TCAM lookup table for IPv6 routes

This design is a ternary CAM that stores IPv6 route prefixes and returns, in one clock, the
lowest address whose prefix covers a 128-bit search key. It uses two ideas to make the table
smaller and to let it hold more routes than a conventional TCAM of the same size.

* **Don't-care reduction (DCR).** A prefix only ever has don't-care bits at its low end. So a
  32-bit word does not need 32 mask cells. It stores its 32 data bits in plain binary CAM cells
  plus a 5-bit code that says how many of its least-significant bits are don't care. Two
  thermometer decoders expand that code back into bypass signals during a search.
* **Data relocation (DR).** Most IPv6 prefixes are short. Each 32x128-bit bank has a 2-bit
  type register, so one row can hold four prefixes of up to 32 bits, two of up to 64 bits, or
  one long prefix. A bank can also be switched off entirely. With all banks of the first kind,
  the 256-row-equivalent table holds 1024 prefixes instead of 256.

The RTL is written in SystemVerilog (IEEE 1800-2017) and can be synthesised. Everything that
is analog in a real CAM is modelled by its logic function: the match-line precharge, the sense
amplifiers, and the complementary search lines.

## Organisation

```
tcam_lookup_top                 8 banks + control + input registers + bank priority
├── control_unit                registers the command, per-bank write enables, search enable
├── input_circuit               registers BL / X_Data / bank type / GSL, broadcasts them
├── memory_bank  x8             one 32x128-bit bank, bank number BANK_ID = 1..8
│   ├── bank_control            BSR[2:1] register -> one-hot BS[1:4], Bank_ML_en
│   ├── wl_decoder              row address -> word lines (writes only)
│   ├── sl_mux                  GSL[128:1] -> four 32-bit local search lines by bank type
│   ├── dcr_block32x32  x4      32 rows of {32 data bits, 5-bit first-X code}
│   │   └── dcr_word32  x32     match line of one 32-bit word
│   │       ├── msb_therm_decoder, lsb_therm_decoder
│   │       └── bypass_cascade4  x8
│   └── bank_addr_encoder       ml_selector + prio_encoder128 + bank address
└── addr_priority_select        lowest matching bank, output register
```

`tcam_pkg` holds the sizes, the bank type encoding (`bank_type_e`) and the command encoding
(`sw_op_e`). Buses named after the architecture keep its 1-based, MSB-first numbering:
`gsl[128:1]`, `bl[128:1]`, `x_data[20:1]`, and `bs[4:1]` for BS[1:4].

## How a 32-bit word matches (DCR)

Every 32-bit word holds data `D[32:1]` and a code `X[5:1]`, 0..31. Bits `X..1` of the word are
don't care and bits `32..X+1` are compared. The word therefore encodes a prefix of
`32 - X` bits, which is 1 to 32 bits.

The word is cut into eight 4-bit *bypass cascade blocks*. Block #0 covers bits 32..29, block
#1 covers 28..25, and so on down to block #7, which covers 4..1. The blocks form a three-level
tree of enables:

```
ML_en -> #0 -> #1 -+-> #2 -+-> #4 --+
                   |       +-> #5 --+
                   +-> #3 -+-> #6 --+-- AND --> word match
                           +-> #7 --+
```

A block's match is its enable ANDed with the match of its non-bypassed bits. Bits are
bypassed at two levels:

* `X[5:3] = m` counts whole don't-care blocks from the bottom. The MSB thermometer decoder sets
  `TDM[k] = (m >= 8 - k)`, and `TDM[k]` bypasses block #k entirely. Block #7 goes first and
  block #0 is never bypassed.
* `X[2:1] = n` counts don't-care bits inside the block just above the bypassed ones. The LSB
  thermometer decoder sets `TDL[3] = n>=1`, `TDL[2] = n>=2` and `TDL[1] = n>=3`. In that
  block, `TDL[3]` masks its bit 1, `TDL[2]` its bit 2 and `TDL[1]` its bit 3. Bit 4 is always
  compared. A block is this "partial" block when `TDM[k+1]` is set and `TDM[k]` is clear.

Example: a 21-bit prefix has `X = 11 = 0b01011`, so `m = 2` and `n = 3`. Blocks #7 and #6
(bits 8..1) are bypassed. Block #5 (bits 12..9) compares only its bit 12. Bits 32..12 are
compared.

Because block #0 can never be bypassed, **a 32-bit word cannot be entirely don't care.**

## How a row is used (DR)

| BSR[2:1] | type   | prefixes per row | lengths  | blocks 1..4 hold           | search lines LSL_1..4      |
|----------|--------|------------------|----------|----------------------------|----------------------------|
| 00       | Type 0 | 0 (bank off)     | –        | –                          | all 0, match lines off     |
| 01       | Type 1 | 4                | 1..32    | four separate prefixes     | GSL_1, GSL_1, GSL_1, GSL_1 |
| 10       | Type 2 | 2                | 33..64   | {1,2} and {3,4}            | GSL_1, GSL_2, GSL_1, GSL_2 |
| 11       | Type 3 | 1                | 97..128  | one prefix over all four   | GSL_1, GSL_2, GSL_3, GSL_4 |

GSL_1 is `gsl[128:97]`, the top 32 bits of the key, and GSL_4 is `gsl[32:1]`. Block #k of a
row is written from `bl[128-32(k-1) -: 32]` and `x_data[20-5(k-1) -: 5]`. For a prefix of
length L, each block gets a code:

* For a block whose bit range starts at key bit `T` (T = 0, 32, 64 or 96 from the top), the
  code is `X = 32 - (L - T)` when `L - T < 32`, and `X = 0` otherwise.
* In Type 1, each block uses `T = 0`, since it holds its own prefix.

**Type 3 limit.** A Type 3 prefix of 65..96 bits would need block #4 to be wholly don't care.
The 5-bit code cannot express that, so in this RTL Type 3 banks store prefixes of 97..128
bits. A prefix of 65..96 bits can be expanded by software into two or more longer entries, or
the code could be widened by one bit.

The ML selector then forms the row's match outputs by type. In Type 1 these are the four
block matches. In Type 2 they are `BML1&BML2` and `BML3&BML4`. In Type 3 they are the AND of
all four.

## Addresses and priority

A bank's 128 row outputs feed a priority encoder. Input `4*row + slot` is the match of the
32-bit slot where an entry begins: slots 0..3 in Type 1, slots 0 and 2 in Type 2, slot 0 in
Type 3. The **lowest set input wins**. The bank's address is `{BANK_ID[3:0], row[4:0],
slot[1:0]}`, with banks numbered 1..8. The table's priority select keeps the lowest-numbered
matching bank. The result is therefore the lowest matching address overall. A miss gives
`address = 0`, `hit = 0`.

The hardware does not look at prefix lengths. To get longest-prefix match, software must
place longer prefixes at lower addresses:

* Type 3 banks get the lowest bank numbers, then Type 2, then Type 1.
* Within a bank, entries are sorted by decreasing length in address order (row, then slot).

There is no per-entry valid bit, and every word matches something, since bit 32 is always
compared. So a free slot must hold a copy of an entry of the same bank at a lower address.
That copy can then never win.

## Command interface and timing

One command per clock on `sw_op`:

| `sw_op`        | uses                                         | effect                              |
|----------------|----------------------------------------------|-------------------------------------|
| `OP_NOP`       | –                                            | –                                   |
| `OP_SEARCH`    | `gsl`                                        | search all enabled banks            |
| `OP_WRITE_ROW` | `bank_sel` (0 = bank #1), `row_addr`, `bl`, `x_data` | write one row of one bank    |
| `OP_WRITE_BSR` | `bank_sel`, `bsr_data`                       | set the bank's type                 |

* **Sampling.** A command is sampled on rising edge *k* by `control_unit` and `input_circuit`.
* **Writes.** A write lands in the row or the type register on edge *k+1*.
* **Searches.** The search compares every word combinationally between edges *k* and *k+1*.
  `address`, `hit` and `valid` are registered on edge *k+1*.
* **Throughput and latency.** One search can be issued every clock, with a one-cycle latency.
* **Write then search.** A search issued on the cycle after a write sees the new data.
* **Reset.** The synchronous active-low `rst_n` makes every bank Type 0, so the table matches
  nothing. It does not clear the storage.
* **Idle search lines.** The search register only loads on a search, so the search lines stay
  still otherwise.

## What follows the architecture and what is this design's choice

These parts follow the architecture as described:

* the bank organisation (four 32x32 blocks, bank control, SL MUX, address encoder, WL decoder);
* the BSR/BS/Bank_ML_en table;
* the SL MUX routing;
* the ML selector table;
* the low-priority 128-to-7 encoder and the 11-bit address built from a 4-bit bank field and a
  7-bit encoder field;
* the 5-bit first-X code per 32-bit word;
* the two thermometer decoders (TDL[1:3], TDM[1:7]);
* the eight-block, three-level cascade tree with its bit ranges;
* eight banks with a lowest-address priority select.

These are choices of this design:

* the meaning of the code as a count of don't-care LSBs, and which TDM/TDL bit bypasses which
  block or bit;
* the field order of X_Data and the encoder input order;
* bank numbers 1..8, and address 0 with a `hit` flag on a miss;
* the command encoding, the input and output registers, and the one-cycle latency;
* synchronous reset to Type 0;
* the use of BS[3:4] inside the encoder, which masks inputs that the ML selector already holds
  at 0.

Not modelled:

* transistor-level structures: BCAM cells, precharged AND match lines, sense amplifiers,
  differential search lines;
* the ROM form of the encoder.

A two-level bypass in the circuit becomes a mask in the RTL. Area, energy and frequency
figures of a 65 nm implementation (about 289 MHz, 0.234 fJ/bit/search) do not transfer to
this RTL.

## Capacity

| load                                                     | banks needed           | fits in 8 banks |
|----------------------------------------------------------|------------------------|-----------------|
| 256 prefixes: 166 of 1..32 bits, 89 of 33..64, 1 long    | 2 Type 1 + 2 Type 2 + 1 Type 3 = 5 | yes |
| 1024 prefixes of 1..32 bits                              | 8 Type 1               | yes             |
| 4K mix: 2569 / 1430 / 7                                  | 21 + 23 + 1 = 45       | no              |

`N_BANKS` and `ROWS` are parameters. Note that the address keeps a 4-bit bank field and a
7-bit row/slot field, so more than 15 banks, or more than 32 rows, would need wider address
fields.

## Simulating

Every testbench in `tb/` checks itself. Each prints `TB_RESULT checks=N failures=M` and stops
itself with a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_tcam_lookup_top \
    -y rtl -y tb +libext+.sv rtl/tcam_pkg.sv tb/tcam_ref_pkg.sv tb/tb_tcam_lookup_top.sv
./obj_dir/Vtb_tcam_lookup_top
```

For a testbench that does not use the reference package, leave out `tb/tcam_ref_pkg.sv`.

* `tcam_ref_pkg` is the reference model. It keeps entries as (value, length) pairs, matches
  them by comparing the top `length` bits, and builds the row image (`bl`, `x_data`) of a row.
  Don't-care data bits are filled with random values, so masking is exercised.
* `tb_tcam_lookup_top` runs the full 8-bank table at its default parameters:
  * it fills every bank, with all four types, one bank written but left empty, and repeated
    prefixes;
  * it runs 3000 back-to-back searches;
  * it switches the empty bank to Type 1, then rewrites rows and searches them on the next
    cycle;
  * every result is checked against the model, including the one-cycle latency;
  * it counts each mechanism: a hit in each type, misses, matches suppressed in a Type 0 bank,
    priority between banks and within a bank, masked bits, back-to-back searches,
    write-then-search and a type switch. A mechanism that never happens is a failure.
* `tb_workload_capacity` loads the 256-prefix mix and then 1024 prefixes, and searches every
  stored entry.
* Each block has its own testbench, `tb_<module>`. The decoders and the cascade block are
  tested exhaustively. The other blocks get random stimulus against an independent model.

All of these testbenches pass with Verilator 5. A full-size table run takes well under a
second of wall time.
