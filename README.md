# HADCWSN: a hardware LZW compressor for sensor-node data pages

A battery-powered wireless sensor node spends most of its energy on the radio.
Sending one bit costs far more than hundreds of simple logic operations. So it
pays to compress a batch of readings before sending it, as long as the
compressor itself is cheap. This design does that compression in a small
logic device attached to the node. The node streams one flash page of readings
into it (264 bytes: 132 two-byte readings) and gets back LZW codes. The codes
can go to flash or straight to the radio.

The compressor uses dictionary-based LZW:

* Each input byte is 8 bits. Each output code is 9 bits.
* Codes 0–255 stand for single bytes.
* Codes 256–511 name strings that the hardware learned while reading the page.
* The dictionary is built from the data as it arrives, so no code table has to
  be shared with the receiver.
* The dictionary is emptied after every page. Each page can therefore be
  decoded on its own, even if another page is lost in the network.

The main parts are:

| Part | Module | Role |
|------|--------|------|
| State machine | `rtl/lzw_state_machine.sv` | holds the current string, decides when to emit a code, counts the page |
| Dictionary | `rtl/lzw_dictionary.sv` | content-addressable string table: one-cycle search, insert on a miss |
| Reading transform | `rtl/pair_transform.sv` | optional front stage that groups the high bytes of neighbouring readings |
| Top | `rtl/hadcwsn_top.sv` | wires the three together |
| Shared types | `rtl/hadcwsn_pkg.sv` | widths, the string type, helper functions |

## How a page is encoded

The state machine always holds a *current string*: the longest run of recent
input that the dictionary knows. It also holds that string's code. Each cycle
that `enable` is high, it takes one byte `b`:

1. **No string held** (first byte of a page): `b` becomes the string, and its
   code is `b` itself.
2. **String S held, shorter than 4 bytes:** the state machine asks the
   dictionary for `S·b`.
   * **Hit:** `S·b` becomes the current string, and its code comes from the
     dictionary.
   * **Miss:** the code of `S` is emitted. In the same clock edge the
     dictionary stores `S·b` as its next entry. `b` starts a new string.
3. **String S already 4 bytes long:** the code of `S` is emitted without a
   search, and nothing is added. `b` starts a new string.

An example, using bytes a=0, b=1, c=2:

| input taken | string search | result | code out | new entry |
|---|---|---|---|---|
| a | – | string = a | | |
| a | aa | miss | 0 | aa = 256 |
| a | aa | hit, string = aa | | |
| a | aaa | miss | 256 | aaa = 257 |
| b | ab | miss | 0 | ab = 258 |
| a | ba | miss | 1 | ba = 259 |
| a | aa | hit, string = aa | | |
| c | aac | miss | 256 | aac = 260 |
| (end of page) | | | 2 | |

The input `aaaabaac` gives the codes `0 256 0 1 256 2`.

### End of a page

When the 264th byte has been taken, the machine spends one cycle in a FLUSH
state. In that cycle it:

* emits the code of the string it still holds, with `done_out`;
* clears the dictionary.

If a byte is offered in that same cycle, it is taken as the first byte of the
next page. So the input never has to stop, and pages can follow each other
back to back.

### The dictionary is full

A page can create up to 263 new strings. The 9-bit code space holds 256.
Once `ENTRIES` strings are stored, the dictionary adds nothing more until the
next page. Every string it does not know is then a miss. Encoding goes on with
the entries it has. A decoder applies the same rule, so it stays in step.

### Decoding

Decoding is not part of the hardware. A receiver decodes with the usual LZW
rules, plus two additions:

* When code `k` follows code `j`, the decoder adds the string of `j` followed
  by the first byte of the string of `k`, but only if:
  * the string of `j` is shorter than 4 bytes;
  * the dictionary is not yet full.
* The decoder empties its dictionary at every page boundary.

A working decoder of this kind is the function `lzw_decode_page` in
`tb/tb_lzw_ref_pkg.sv`.

## The string dictionary

The dictionary is the hard part, and it takes almost all of the area. A
software LZW would look strings up in a hash table over several memory
accesses. To keep a rate of one byte per clock, this dictionary instead:

* holds each entry as a whole string of up to four bytes in a 32-bit word, plus
  a 3-bit length;
* compares the candidate string with every stored entry at once, in
  combinational logic;
* gives the code `256 + index` of the matching entry (`encoded`,
  `dic_encoded`) in the same cycle;
* on a miss, writes the candidate string to slot `fill` at the clock edge and
  increments `fill`.

A search-and-insert is therefore one cycle. Other details:

* Entries at or above `fill` are never matched. Emptying the table (`flush` or
  `rst`) only resets `fill`, so the storage array itself needs no reset.
* `full_encode` is high when `fill == ENTRIES`.
* Strings only enter after a miss, so entries are unique and at most one
  entry can match.

The length field is needed because a 32-bit word alone cannot tell the string
"a" from the string "\x00 a". Strings in the table are always 2 to 4 bytes
long, because single bytes have fixed codes.

Cost grows linearly with `ENTRIES`: one 35-bit comparator and one 35-bit
register per entry. After generic synthesis, the 256-entry build is about
2,150 word-level cells, 73 flip-flop bits in the control and 8,960 bits of
entry storage. Almost all of that is the dictionary. The 44-entry build is
about 460 cells, roughly a fifth of that size.

## The reading transform

Consecutive sensor readings differ little, so their high bytes repeat. The
transform takes two two-byte readings, high byte first, and reorders them:

    H0 L0 H1 L1   ->   H0 H1 L0 L1

This puts the repeated high bytes next to each other in the stream. In
general it is the transpose of a `READINGS x BYTES_PER_READING` byte matrix.

`pair_transform` uses two buffers:

* a collect buffer that gathers one group;
* an output buffer that sends the previous group, one byte per cycle.

It keeps up with one byte per cycle and tolerates any gaps in the input.

`transform_en` at the top selects whether the LZW stage sees transformed or
raw bytes. Change it only between pages: `carry` should be low and no group
still on its way. A page is a whole number of groups (264 = 66 x 4), so no
bytes are left in the buffer at a page boundary.

Whether the transform helps depends on the data. It is offered as a mode, not
forced.

## Interface and timing (`hadcwsn_top`)

| Port | Dir | Width | Meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | clock |
| `reset` | in | 1 | synchronous reset, active high |
| `enable` | in | 1 | `data_in` holds a byte; one byte is taken each cycle this is high |
| `data_in` | in | 8 | input byte |
| `transform_en` | in | 1 | 1: bytes pass through the reading transform first |
| `data_out` | out | 9 | LZW code, registered; holds until the next code |
| `data_ready_out` | out | 1 | one-cycle strobe: a new code is on `data_out` |
| `done_out` | out | 1 | high together with the last code of a page |
| `carry` | out | 1 | a string is held whose code has not been emitted yet |

Timing:

* **Rate:** one byte per clock. There is no back-pressure.
* **Codes:** at most one code per clock, never more than one per byte taken.
* **Page without the transform:** `done_out` comes PAGE_BYTES + 1 = 265 cycles
  after the first byte of the page was taken.
* **Page with the transform:** each byte reaches the LZW stage 4 cycles later,
  so a page takes 269 cycles.
* **Back-to-back pages:** `done_out` pulses come exactly 264 cycles apart.

Parameters of the top: `ENTRIES` (default 256), `PAGE_BYTES` (264),
`READINGS` (2) and `BYTES_PER_READING` (2). `ENTRIES` may be 1 to 256.
`ENTRIES = 44` is the small build meant for a CPLD. The maximum string length
(4 bytes) is fixed by the 32-bit string word in `hadcwsn_pkg`.

## Sizes and expected results

The two published builds of this compressor are:

| Build | Device | Entries | Clock | Power |
|---|---|---|---|---|
| FPGA | Cyclone II | 256 | 12.9 MHz | 112 mW |
| CPLD | MAX II | 44 | 36.1 MHz | 10.3 mW |

On recorded indoor temperature and light pages, those builds reported output
sizes of:

* 121–237 bytes per 264-byte page with 256 entries;
* 129–279 bytes with 44 entries. With 44 entries, untransformed temperature
  data grew rather than shrank.

Those recordings are not available here. `tb/tb_hadcwsn_workloads.sv` runs
generated stand-in data, drifting 10-bit readings, through both sizes in both
modes. It prints output sizes of 124–195 bytes with 256 entries and 150–238
bytes with 44. Those numbers describe the stand-in data only.

Energy per page follows from the cycle count: 265 cycles at the clock rate and
power of the target device. For example, at 36 MHz and 10 mW it comes to about
0.08 µJ of core energy. That figure leaves out the interface to the node.

## Where this design departs from, or goes beyond, its source

The following are choices made for this RTL, where the source describes only
the function:

* **Strings of at most four bytes.** This reads the 32-bit string bus between
  the state machine and the dictionary as the string itself. A four-byte
  string is emitted without adding an entry. The dictionary has an extra
  `string_len` input that the published block diagram does not show.
* **One-cycle, fully parallel dictionary search.** The source gives only the
  function of the dictionary and its entry counts.
* **Signal meanings.** `FULL_ENCODE` is read as "dictionary full". `CARRY` is
  read as "a string is pending". The published diagram prints these names
  without describing them.
* **Handshake and reset.** A byte is taken every cycle `enable` is high, with
  no back-pressure. The FLUSH cycle also takes a byte. Reset is synchronous
  and active high.
* **Reading transform in hardware.** The source shows the transform as a
  reordering of the data but does not say where it runs. Here it is a
  selectable hardware stage. The byte order (high byte first) is assumed.
* **No host interface.** The original used a vendor I2C core, which is left
  out here. The top exposes the raw byte interface, ready for whatever link to
  the node is used.

## Verification

Each block has a self-checking testbench. Each prints
`TB_RESULT checks=N failures=M`, and each has a watchdog.

| Testbench | What it checks |
|---|---|
| `tb_lzw_dictionary` | hit flag, codes in insertion order, insert on a miss only with `enable`, strings that differ only in length, table-full behaviour, flush, reset, random traffic (8-entry table) |
| `tb_lzw_state_machine` | the `aaaabaac` example, codes against a software encoder over 40 short pages with and without gaps (behavioural dictionary, 16-byte pages), `data_out` hold, `carry`, flush latency |
| `tb_pair_transform` | byte order at full rate and with gaps, first-output latency, a 3x3 variant |
| `tb_hadcwsn_top` | see below |
| `tb_hadcwsn_workloads` | the four data-set kinds (temperature and light, normal and transformed) on the 256- and 44-entry builds, lossless round trip, page latency |

`tb_hadcwsn_top` is the end-to-end test at full default size. It runs eight
pages:

* sensor-like, constant and random data;
* back to back and with idle cycles;
* both transform modes, with switches between them.

It compares every code with the reference encoder, decodes every page back to
its input, and checks the 265-cycle page latency and the back-to-back spacing.
It also counts each mechanism and fails if one never happens:

* dictionary hit;
* insertion;
* full table;
* four-byte cut;
* byte taken in the FLUSH cycle;
* idle input;
* transform use;
* mode switch.

The software reference is in `tb/tb_lzw_ref_pkg.sv`. It has an encoder with
the same rules, a decoder and the transform.

To simulate with Verilator 5 (the simulator must support `--timing`):

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
        --top-module tb_hadcwsn_top \
        rtl/hadcwsn_pkg.sv tb/tb_lzw_ref_pkg.sv tb/tb_hadcwsn_top.sv
    ./obj_dir/Vtb_hadcwsn_top

Replace the top module and the last file name to run another testbench. Every
testbench finishes in well under a second.

To lint the RTL:

    verilator --lint-only -Wall -Irtl -y rtl +libext+.sv rtl/hadcwsn_pkg.sv rtl/hadcwsn_top.sv

This runs without warnings.

## Changing the design

* **Dictionary size:** set `ENTRIES`. The code width stays 9 bits, so 256 is
  the maximum.
* **Page length:** set `PAGE_BYTES`. Keep it a multiple of
  `READINGS * BYTES_PER_READING` if the transform is used.
* **Longer strings:** change `MAX_LEN` in `hadcwsn_pkg`. The string word and
  the comparators grow with it. `LEN_W` must still hold `MAX_LEN`.
* **Larger code space:** change `CODE_W` in `hadcwsn_pkg`. Both `ENTRIES` and
  the output width follow from it.
