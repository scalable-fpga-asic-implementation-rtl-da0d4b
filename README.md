# Parallel table-lookup coding with a flexible multi-ported CAM

Table-lookup coding, such as Huffman encoding in JPEG, turns each input symbol
into a code word by finding the symbol in a table. A processor does this one
symbol at a time, and copying the table once per processing element costs a lot
of area. This design keeps **one** symbol table and gives it **p independent
search ports**, so p symbols are coded in parallel.

The symbol table is a content addressable memory (CAM) built from ordinary
single-port memory banks. The CAM is the *adapted flexible multi-ported CAM*
(FMCAM) of Kumaki, Kono, Ishizaki, Koide and Mattausch (IEICE Trans. Inf. &
Syst., vol. E90-D, no. 1, 2007). Each port returns the address where its symbol
is stored. A p-port RAM holds the code words at the same addresses, and turns
each match address into a code word.

The default configuration is 16 ports and a 256-word table of 32-bit reference
words, split into 16 categories of 16 words each.

```
 symbols (p ports)          +--------------------------- fmcam ---------------------------+
 sym_valid/sym ------------>| port block: p x port_module                                   |
                            |   category comparators -> category decoder -> bank mux ->     |
                            |   search comparator, start-address register                   |
                            |        ^ broadcast bus (loop address + one word per bank)     |
                            | category block: 16 x category_bank (single-port, 16 words)    |
                            |        ^ loop address                                         |
                            | controller: category registers, mode, counting value,         |
                            |             loop_address_counter                              |
                            +-------------------------------+-------------------------------+
                                                            | match address per port
                                                            v
                                              multiport_ram (code-word table, p read ports)
                                                            |
                                                            v  out_code per port
```

## How a port searches: the loop counter and the broadcast bus

This is the part that is least like a normal CAM.

A conventional CAM compares the key with every stored word in the same clock.
This one does not. The stored words are split into **categories**, and each
category lives in its own single-port **bank** of 16 words. A search compares
the key with only one word per clock, and only within one bank. That is a
bit-parallel, block-parallel search. Each port therefore needs just one
search comparator, and the memory stays a plain memory.

The **loop-address counter** in the controller drives the search. It counts
0, 1, 2, … through the word addresses of a bank and wraps around, every clock,
whether or not anyone is searching. All banks are read at that address, and the
words they return (one per bank) are **broadcast** to every port together with
the address they came from. The read is synchronous, so the broadcast is one
clock behind the counter.

A port that accepts a request:

1. Runs its category comparators on the key and works out which bank(s) the key
   can be in.
2. Lets the category decoder select the lowest such bank. The bank's broadcast
   word goes through a multiplexer to the search comparator.
3. Stores the loop address of its first comparison as its **start address**.
4. Compares one broadcast word per clock until the next broadcast address would
   be the start address again. By then it has seen every word of the bank once.

The counter never restarts for a request, so a port starts comparing in the
clock after its request arrives, wherever the counter happens to be. Other
ports that started earlier do not make it wait. Sixteen ports can be at sixteen
different points of the same loop. This is the mechanism that lets the ports
run without synchronizing with each other.

The match address is `{bank index, loop address}`, 4 + 4 = 8 bits. It addresses
both the CAM's contents and the code-word RAM.

Timing of one port, with a loop of L words and no pauses:

```
clock   t        t+1        t+2  ...  t+L        t+L+1
        accept   compare    compare   compare    rsp.done (and ready again)
                 (start=A)  A+1       A+L-1
                            rsp.hit one clock after each matching compare
```

In multiple search mode a search therefore takes L + 1 clocks from one
acceptance to the next. In `tlc_top` each code word appears one clock after its
`rsp.hit`, because the RAM read is synchronous.

## Search modes and loop length

The published adaptation adds two ways to cut wasted comparison clocks:

* **Single search mode.** The mode-select register in the controller is set to
  1 (`MODE_SINGLE`). A port then stops at the first match and is ready for a new
  symbol on the next clock. Coding tables map each symbol to exactly one code
  word, so nothing is lost. In **multiple search mode** (`MODE_MULTIPLE`, the
  reset state) the whole loop runs and every match is reported. Masked searches
  need this mode. Each port samples the mode when it accepts a request.
* **Counting value setting mode.** A bank holds 16 words, but a category may
  use fewer. The counting value sets the loop length (1 to 16). The counter
  then wraps after word `limit-1`, and every search lasts only that many
  comparisons. A value of 0, or one above 16, selects the full bank.

## Categories, and categories larger than a bank

Each bank has a category register `{en, pattern, bits}`. `bits` says which bit
positions of a 32-bit word form the category field, and `pattern` gives their
value. A key belongs to the bank when the selected bits equal the pattern.
Software chooses both, so the category field can sit anywhere in the word.

Several banks can form **one larger category**: give their registers patterns
that accept the same keys. A port whose key selects several banks searches
them one after another, lowest bank first, each for one full loop. Each bank's
search starts at the address where the previous one ended. A search over a
joined category takes proportionally longer. Single search mode still stops
at the first match.

A key that no enabled category accepts ends at once: `done` is set and `found`
is 0, with no comparisons.

## Masked searches

Each request carries a 32-bit mask, and a mask bit of 1 makes that bit
don't-care. Masked bits are left out of the category test as well. A key
masked inside the category field therefore goes to every category it could
belong to, and those banks are searched in turn.

## Writing the tables while searching

The contents-table is written one word per clock (`tbl_we`, `tbl`). Each bank
is single-ported, so a write uses the bank's only access in that clock. The
category block holds the loop counter for that clock and marks the next
broadcast invalid. Ports skip invalid broadcasts, so no comparison is lost and
a running search still covers every word exactly once. Every stored word has a
valid bit, and invalid words never match. Reset clears all valid bits and
category enables.

The code-word RAM has its own write port (`code_we`, `code_waddr`,
`code_wdata`). It is not reset, so load it before use.

## Interfaces

All blocks use one clock, `clk`, and a synchronous active-low reset, `rst_n`.
The types are in `rtl/fmcam_pkg.sv`.

| Signal (tlc_top) | Type | Meaning |
|---|---|---|
| `cfg_we`, `cfg` | `cfg_wr_t` | `cfg.kind` = `CFG_CATREG` writes `cfg.catreg` to register `cfg.idx`; `CFG_MODE` writes `cfg.mode`; `CFG_LIMIT` writes `cfg.limit` |
| `tbl_we`, `tbl` | `tbl_wr_t` | writes `{valid, word}` to word `tbl.addr` of bank `tbl.bank` |
| `code_we`, `code_waddr`, `code_wdata` | `codeword_t` | code-word table write; a code word is `{len[4:0], bits[15:0]}` |
| `sym_valid[p]`, `sym_ready[p]`, `sym[p]` | `search_req_t` | per-port request `{data, mask}`; it is taken in a clock where both valid and ready are high; ready is high while the port is idle |
| `out_valid[p]`, `out_code[p]`, `out_addr[p]` | | one pulse per match: the code word and its table address |
| `out_done[p]`, `out_found[p]` | | end of the search, in the same clock as its last code word; `found` says whether anything matched |

Change the search mode and the counting value only while every port is idle.
A port that is in the middle of a loop when the loop is shortened may miss its
start address.

Parameters: `NUM_PORTS` (default 16) on `tlc_top`, `fmcam`, `port_block` and
`multiport_ram`. The geometry is fixed in `fmcam_pkg`: `ADDR_W` = a = 8,
`DATA_W` = d = 32, `NUM_CAT` = c = 16. The bank depth is 2^a / c = 16 and the
loop address is 4 bits wide. These are the sizes the architecture was evaluated
with.

## What follows the published architecture and what is this design's own

These follow the published architecture:

* The split into controller, category block and port block.
* The contents of a port module: category comparators, category decoder, bank
  multiplexer, search comparator and start-address register.
* The free-running circular loop counter, whose range is one bank.
* Ending a search when the counter returns to the start address.
* Single and multiple search modes, with single mode selected by a high mode
  signal from the controller.
* The counting value that shortens the loop.
* Category registers that set both the category pattern and the position of
  the category bits.
* Joining categories.
* Match address = category address combined with comparison address.
* The FMCAM match address feeding a multi-port code-word RAM.
* The sizes a = 8, d = 32, c = 16 and p = 16.

These are choices of this design:

* The valid/ready request handshake and the response format (`hit`, `done`,
  `found`).
* Mask polarity (1 = don't care), and masked bits being excluded from the
  category test.
* The per-word valid bit.
* Synchronous bank reads, with a `next_addr` field on the broadcast bus so that
  a port sees the end of its loop without an extra clock.
* Pausing the counter during table writes.
* The bank-by-bank order for joined categories.
* Immediate completion for a key with no category.
* The configuration-write format and the code-word format.
* Reset behaviour.
* A single global loop length.

The code-word RAM is one storage array read by all ports. The published
design suggests an area-efficient bank-based multi-port RAM here, but its
insides are not part of this design. It can replace `multiport_ram` without
changing the interface.

Not included: the SIMD processing-element array that produces the symbols. It
connects to the `sym_*` and `out_*` ports.

## Measured behaviour

`tb/tlc_top_tb.sv` encodes JPEG AC run/size symbols on all 16 ports at the
default size. The 162 symbols are grouped by run into 16 banks of 11 words,
with the counting value at 11. The code words form a canonical Huffman code
built from the length counts of the JPEG example luminance AC table, with
symbols taken in ascending order. This is not the exact JPEG table.

The symbol stream is random. Sixteen ports handle 640 symbols in about 385
clocks: about 9.6 clocks per symbol per port, or 0.60 clocks per symbol
overall. This count includes the testbench waiting for each code word before
it sends the next symbol. The published results for the adapted FMCAM
(measured on real pictures, with its own overheads) are 10.79 clocks per
comparison for 1 port and 0.68 for 16 ports, so the two are of similar size.

`tb/huffman_rate_tb.sv` runs the same table on coders of 1, 2, 4, 8 and 16
ports. Each port sends 30 symbols back to back. The stream is run twice:

* once with the full 16-word loop in multiple mode, which is how a CAM without
  the two adaptations behaves;
* once in single mode with counting value 11.

| ports | full loop: clk/symbol/port | full loop: clk/symbol overall | single mode + 11: clk/symbol/port | single mode + 11: clk/symbol overall |
|---|---|---|---|---|
| 1 | 17.07 | 17.07 | 7.17 | 7.17 |
| 2 | 17.07 | 8.53 | 7.07 | 3.53 |
| 4 | 17.07 | 4.27 | 7.70 | 1.93 |
| 8 | 17.07 | 2.13 | 7.50 | 0.94 |
| 16 | 17.07 | 1.07 | 8.03 | 0.50 |

In the full loop every port takes exactly 17 clocks per symbol: one to
accept and 16 comparisons. The testbench checks this.

The two adaptations cut this to about 7 to 8 clocks, roughly 58% fewer.
The published comparison reports 43% fewer clocks than the original FMCAM,
whose loop has more overhead (19.00 against 10.79 clocks at one port). The
overall rate falls in proportion to the port count, as the architecture
intends.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. Each
has a watchdog. With plain Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/fmcam_pkg.sv tb/tlc_top_tb.sv --top-module tlc_top_tb
./obj_dir/Vtlc_top_tb
```

For any other block, replace the testbench name: `loop_address_counter_tb`,
`category_registers_tb`, `fmcam_controller_tb`, `category_bank_tb`,
`category_block_tb`, `category_comparators_tb`, `search_comparator_tb`,
`port_module_tb`, `port_block_tb`, `fmcam_tb`, `multiport_ram_tb` or
`huffman_rate_tb` (which uses `tb/huffman_rate_unit.sv`).

`tb/port_checker.sv` is a shared monitor for one port. From its own copy of the
category registers and the table, it predicts the hits of every search: which
addresses, in which order, whether anything was found, and how many
comparisons (valid broadcast clocks) the search must take. That last check
enforces the cycle behaviour of both search modes and of the counting value.

The port, port-block, FMCAM and top testbenches count the mechanisms they
exercise and fail if one never happens:

* single-mode early stop
* multiple matches
* joined categories
* keys with no category
* searches paused by table writes
* shortened loops
* all ports busy at once
* mode switches

## Files

| File | Contents |
|---|---|
| `rtl/fmcam_pkg.sv` | sizes, structs, enums |
| `rtl/tlc_top.sv` | FMCAM + code-word RAM |
| `rtl/fmcam.sv` | adapted FMCAM |
| `rtl/fmcam_controller.sv`, `rtl/loop_address_counter.sv`, `rtl/category_registers.sv` | controller |
| `rtl/category_block.sv`, `rtl/category_bank.sv` | contents-table |
| `rtl/port_block.sv`, `rtl/port_module.sv`, `rtl/category_comparators.sv`, `rtl/search_comparator.sv` | ports |
| `rtl/multiport_ram.sv` | code-word table |
| `tb/*_tb.sv`, `tb/port_checker.sv`, `tb/huffman_rate_unit.sv` | testbenches, the shared port monitor, one coder of the rate test |
