# Pre-classified CAM with integrated target RAM

This is a content-addressable memory (CAM) that searches every stored key in
one clock cycle. It reaches RAM-like capacity because its keys sit in
ordinary RAM rows, next to the data they look up.

In a fully parallel CAM, every stored word is compared with the reference
word at the same time. The usual layout gives each word its own physical row
and match line, and that layout does not scale to megabits. This design puts
many words in one row and still searches them all at once, because it
*pre-classifies* the data first. A small pre-classification RAM (the
**PRAM**) maps the low bits of the key to one of **C classes**. Each class
owns one row of the array. A SEARCH opens that one row and compares all of
its key columns with the reference word in parallel, with one comparator per
column.

Each key column heads a **page** of 2^r words. Word 0 of a page is the key
itself. Words 1 … 2^r−1 are the *target RAM*, the data that a search result
normally selects in a separate RAM. Both kinds of cell are ordinary memory
cells in the same array.

The RTL follows the architecture of the paper *Fully-Parallel Multi-Megabit
Integrated CAM/RAM Design*. The parameter defaults are its 1 Mb
configuration. Its 8 kb test-chip configuration is a parameter set of the
same RTL.

## Array organisation

| symbol | meaning | 1 Mb default | 8 kb test chip |
|---|---|---|---|
| b (`B`) | word width; one bit sub-array per bit | 32 | 8 |
| C (`C`) | classes = rows per sub-array | 32 | 16 |
| y (`Y`) | pages (CAM columns) per row | 128 | 16 |
| r (`R`) | page-offset bits; 2^r words per page | 3 | 2 |
| PRAM | entries × class bits, indexed by data LSBs | 64 × 5 | 64 × 4 |
| resolver | lowest-level section × higher levels | 8 × 4 × 4 | 4 × 4 |

The array has (y·2^r) columns by (C·b) rows: 1024 × 1024 cells by default.
Bit i of every word lives in sub-array i. Inside a sub-array, the cell of
class c, page p and offset k is at row c, column p·2^r + k. Column offset 0
of each page is the CAM column.

* **Search path.** The class row is sensed in all b sub-arrays. In each
  sub-array, each CAM column XORs its bit with that sub-array's bit of the
  reference word. On a mismatch it pulls the page's match line low. A match
  line runs through all b sub-arrays, so it stays high only when the whole
  key matches (`bit_subarray`, `ml_compare`, `camram_array`).
* **Responder selection.** The priority encoder (`prio_enc`) reduces the y
  match lines to one winner. The lowest page number wins. The result is a
  one-hot set of *responder select lines* and a binary page address.
* **Word access.** The responder select lines are ANDed with the r offset
  bits. This gives y·2^r *decoded responder select lines* (DRSLs,
  `drsl_decode`). Each DRSL picks one column of the open row for a READ or a
  WRITE.

## Operations

Requests use a valid/ready handshake. A request that is not accepted must
be held unchanged until it is; assertions check this. Each accepted request
gives exactly one response, one cycle wide, on `rsp_*`. Responses come in
request order.

| op | what it does | stage cycles |
|---|---|---|
| `OP_SEARCH` | Looks the key up in its base class, then in the classes it has overflowed into. The hit becomes the *responder*. | o + 1 |
| `OP_INSERT` | Writes a new key into the lowest free CAM column of its class, or of an overflow class. The new entry becomes the responder. | 1 + new overflows |
| `OP_READ` | Reads word `req_off` of the responder's page. | 1 |
| `OP_WRITE` | Writes `req_data` to word `req_off` of the responder's page. Offset 0 rewrites the key. | 1 |

In the table, o is the number of overflow classes the search visits.

`rsp_hit` means different things for different operations:

* SEARCH: the key was found.
* INSERT: the key was placed.
* READ or WRITE: the access was made. After a miss or a failed insert there
  is no responder, and READ and WRITE do nothing.

The other response fields are:

* `rsp_cls` and `rsp_page`: the location of the hit, of the new entry, or of
  the word accessed.
* `rsp_base`: the class the PRAM gave the key.
* `rsp_ovf`: the class offset of the last step.

The PRAM has its own write port (`pram_we`, `pram_waddr`, `pram_wclass`).
Software can use it at any time to spread the data more evenly over the
classes. The PRAM is not reset and must be written before use. Moving
entries that a rewrite puts in the wrong class is left to software.

**TEST mode** (`test_mode = 1`) bypasses the responder. READ and WRITE then
take the class, page and offset from `req_tcls`, `req_tpage` and `req_off`.
Each class row becomes a plain RAM of y·2^r words of b bits: 64 × 8 on the
test chip, 1024 × 32 by default. The PRAM can be observed through
`rsp_base`. Change `test_mode` only while no operation is in flight.

## Class overflow

Data never spread evenly over the classes, so some classes fill before the
memory does. Each class c has a 2-bit **overflow count**, `count[c]`, in
`class_ctrl`. It says how many of the following classes (c+1, c+2, c+3,
wrapping past C−1 to 0) may hold keys whose base class is c.

* **INSERT** starts at class `base + count[base]`. If that class has no free
  CAM column, it moves to the next class, one class per cycle, up to offset
  3. The key goes into the lowest free column of the first class with room,
  and `count[base]` is raised to the offset used. If all four classes are
  full, the insert fails, nothing is written, and the count is unchanged.
* **SEARCH** searches `base`, then `base+1`, … `base+count[base]` in
  consecutive cycles. It stops at the first class with a hit. If none of
  these classes hits, the result is a true miss. A search with o overflows
  therefore holds the pipeline stage for o + 1 cycles, and `req_ready` is
  low meanwhile. This is the price of the scheme: throughput depends on the
  data.
* Keys of different base classes can share a class row. This is harmless:
  a key has only one base class, so an entry that overflowed from another
  class holds a different key and cannot match.

An example, with C = 16. Class 15 is full, and class 0 already holds keys
of its own. An INSERT of a key whose base class is 15:

1. The insert finds no room in class 15.
2. It places the key in class 0, sets `count[15] = 1`, and reports
   `rsp_ovf = 1` after 2 stage cycles.

A later SEARCH for that key:

1. It misses in class 15.
2. It hits in class 0 in the next cycle.

Empty columns must neither match nor look occupied. An **entry-valid
plane** of C × y bits does this (`camram_array`). It gates the match lines.
During an INSERT, the priority encoder resolves the *free* columns of the
class instead of the match lines, so the same resolver picks where the new
key goes. Reset clears the valid plane and the counts. Entries are never
deleted.

## Pipeline and timing

The PRAM lookup and the array access are two memory accesses, and only one
may be on the critical path. So the PRAM is read one cycle ahead of the
array:

```
edge n   : request accepted; PRAM read -> class register (x_base);
           op/data/offset -> data/address pipeline register
cycle n+1: class_ctrl adds the overflow step to the class; the array is
           searched or accessed; the priority encoder resolves; the next
           step's class is computed from this cycle's result
edge n+1 : response registered (or, if more overflow classes remain, the
           step advances and the stage holds)
```

While the array finishes one operation, the PRAM is already reading the
class of the next. A SEARCH with o overflows followed by n READs or WRITEs,
issued back to back, takes **o + n + 1 cycles**, measured from the
acceptance of the SEARCH to the response of the last access.

The search, read and match paths are combinational within the stage cycle.
Array writes, valid-bit updates and count updates happen at the clock edge
that ends the stage. One rising-edge clock and an asynchronous active-low
reset (`rst_n`) drive everything.

## Multiple-match resolver

Several pages can match: the same key can be inserted twice, and WRITE can
change keys. The resolver gives priority by position, so the lowest page
wins.

A ripple chain would be too slow for 128 inputs, so the resolver (`mmr`)
works like a carry-look-ahead adder:

* Lowest-level `mmr_section` blocks of `MMR_LEAF` inputs pass on only their
  lowest active input. Each block also reports a hit that does not depend
  on its inhibit input.
* Each higher level groups `MMR_FAN` blocks. Block k of a group is
  inhibited when the group itself is inhibited, or when any block before it
  in the group has a hit.

The 128-input default has 8-input sections under two 4-way levels. The test
chip's 16-input resolver is four 4-input sections. `prio_enc` adds the
encoder from one-hot to binary address. The width must be
`MMR_LEAF · MMR_FAN^k`; otherwise elaboration stops with an error.

## Departures from the original circuit

The RTL captures the logic of the architecture, not its circuits:

* **Clocking.** The original uses separate timing clocks for the PRAM read,
  the CAM/RAM access and the match evaluation. Here one clock edge per stage
  does the same job. The register that holds the overflow step stands in
  for the second class register before the array.
* **Not modelled.** These are circuit parts with no logic function beyond
  what the RTL already does:
  * the per-column latch sense amplifiers;
  * the dynamic XOR with its extra buffer stages;
  * the bipolar match-line pull-down and the precharge devices;
  * the bit-line precharge and column-access circuits;
  * the reference-line drivers;
  * the memory cell itself, written here as flip-flops;
  * pads;
  * the physical floorplan of the 1 Mb array, with I/O, class decoders and
    reference drivers in a central spine and 512 columns on either side.
* **This design's own choices.** The original does not specify these:
  * the valid/ready handshake and the response format;
  * the separate `OP_INSERT` opcode (the original only says that writes to
    a full class are redirected by its count);
  * the entry-valid plane;
  * lowest-free-column placement;
  * what happens when an insert finds all four classes full;
  * ignoring READ and WRITE without a responder;
  * wrapping from the last class to class 0;
  * the PRAM write port;
  * reusing the test chip's 64-entry PRAM for the 1 Mb configuration, whose
    PRAM size is not given.
* **Speed.** The timing results of the original circuit (37 MHz for 1 Mb,
  match-line load sensitivity, power) are properties of its transistor-level
  circuit and say nothing about this RTL.

## Files

| file | contents |
|---|---|
| `rtl/cam_pkg.sv` | default sizes, opcode enum `op_e` |
| `rtl/camram_top.sv` | top: PRAM stage, pipeline registers, control, array, DRSLs, priority encoder |
| `rtl/pram.sv` | pre-classification RAM |
| `rtl/class_ctrl.sv` | overflow counts, operation sequencing, responder and response registers |
| `rtl/camram_array.sv` | b sub-arrays, wired match lines, entry-valid plane |
| `rtl/bit_subarray.sv` | one bit's sub-array |
| `rtl/ml_compare.sv` | per-column comparators and match-line pull-downs |
| `rtl/drsl_decode.sv` | decoded responder select lines |
| `rtl/prio_enc.sv`, `rtl/mmr.sv`, `rtl/mmr_section.sv` | priority encoder and resolver |
| `tb/tb_<module>.sv` | self-checking testbench of each module |
| `tb/tb_camram_top.sv` | end-to-end test at the 8 kb test-chip size |
| `tb/tb_camram_full.sv` | the same test at the 1 Mb default size |

## Simulating

Every testbench checks itself. Each ends with one line,
`TB_RESULT checks=N failures=M`, and has a watchdog. For example:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
  rtl/cam_pkg.sv tb/tb_camram_full.sv --top-module tb_camram_full -Mdir obj_full
./obj_full/Vtb_camram_full
```

Replace `tb_camram_full` with any other testbench name. The 1 Mb test
builds and runs in well under a minute.

Change the size by overriding `B`, `C`, `Y`, `R`, `PRAM_AW`, `MMR_LEAF` and
`MMR_FAN` on `camram_top`. `C` and `Y` must be powers of two, `PRAM_AW`
must not exceed `B`, and `Y` must equal `MMR_LEAF · MMR_FAN^k`.

## Verification

The end-to-end tests drive random streams of INSERT, SEARCH, READ and WRITE
requests, with gaps and back-pressure. A reference model predicts every
response: hit, data, class, page, base class, overflow offset and latency.
The PRAM starts by sending all keys to three base classes, so classes fill,
overflow and finally refuse inserts. Then the PRAM is rewritten while
traffic continues, which also sends keys to the last class, whose overflows
wrap to class 0. Finally, TEST mode writes and reads a whole class row.

The tests count how often each mechanism occurs, and a mechanism that never
occurs fails the test:

* search hit in the base class
* search hit in an overflow class
* true miss after the overflow classes
* insert into an overflow class
* insert refused because all four classes are full
* stall
* READ followed at once by SEARCH
* TEST mode access
* PRAM rewrite during operation
* several matches resolved
* READ or WRITE refused for lack of a responder
* overflow wrapping past the last class
* the o + n + 1 cycle count

The module testbenches cover the rest:

* The resolver is checked exhaustively per section, and at both resolver
  configurations with single, nested and random match patterns.
* The sub-array test fills and checks all 32K cells of a default sub-array.
* The control test checks the applied class cycle by cycle.
