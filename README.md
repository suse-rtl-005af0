# SUSE-CBM: an IPv4 longest-prefix-match table in one hashed SRAM

This is synthesizable SystemVerilog for a routing-table engine that keeps a
full BGP-sized IPv4 forwarding table in a single set-associative hash table
built from on-chip SRAM, and answers longest-prefix-match (LPM) lookups with a
handful of parallel memory reads. It implements the SUSE ("superior
storage-efficiency") scheme in its controlled bit-map (CBM) form. Two ideas
make the table small:

1. **Store a transformed prefix, not the prefix.** A prefix is read as a
   polynomial over GF(2) and divided by a fixed generator
   g(x) = x^16 + x^8 + x^6 + x^5 + x^4 + x^2 + 1 (CRC-16). The pair
   (quotient q(x), remainder r(x)) determines the prefix uniquely, so the
   16-bit remainder is used as the set index and only the quotient is
   stored. A 24-bit prefix needs 8 stored bits, a 29-bit prefix 13, and a
   prefix of 16 bits or fewer needs none. The remainder also spreads prefixes
   over the sets better than taking low-order bits would.
2. **Aggregate prefixes.** Every prefix is rounded down to one of eight
   *treads* (8, 12, 16, 20, 22, 24, 25, 29) before hashing. The bits between
   the tread and the real length (at most 3) are its *round-off bits*. Prefixes
   of the same length, same q(x) and same next hop share one field, with a
   bit-map that has one bit per value of the round-off bits.

A lookup therefore probes exactly eight sets, one per tread, and the engine
picks the longest prefix that matches.

## Table organisation

| quantity | value |
|---|---|
| sets | 2^16 (one per value of r(x)) |
| ways per set | 4 entries of 41 bits = 164 bits, read in one access |
| memory modules | 8 single-port modules (`sram_bank`), 2^13 rows x 164 bits each |
| total table | 10,747,904 bits (about 10.75 Mb) |
| next-hop address (NHA) | 8 bits, stored with each field |
| spillover TCAM | 256 slots, for prefixes whose set is full |

The eight probes of a lookup should fall into different modules so that they
can be read in the same cycle. The sets of each tread are therefore placed
with their own *skew* (`skew_map`):

    row    = r / 8
    module = r mod 8                              if skew = 0
           = (r/8 + r mod 8 + skew - 1) mod 8     if skew > 0

For a fixed skew this is a one-to-one map from r to (module, row), so entries
of different treads share physical rows. They cannot be confused, because
every field carries its prefix length. The skews are 0, 1 and 3 for treads
8, 12 and 16. With these, the three probes of 192.128.x.y (r = 0x00C0, 0x0C08,
0xC080) land in modules 0, 1 and 2. Treads 20, 22, 24, 25 and 29 use skews 2,
4, 5, 6 and 7. Those five values are this implementation's choice.

## The 41-bit CBM entry

Short prefixes (8..24 bits) use a two-field entry. A long prefix (25..32
bits) takes a whole entry. The field widths are those of the SUSE CBM format.
The bit positions below are this implementation's.

Two-field entry, `e[40] = 1`: `e[39:20]` is field A and `e[19:0]` is field B.
Each field is `{ind[3:0], data[7:0], nha[7:0]}`:

| `ind` | prefix length | tread | `data[7:0]` |
|---|---|---|---|
| 0..11 | 8 + ind (8..19) | 8, 12 or 16 | 8-bit bit-map (q(x) is always 0) |
| 12 | 20 or 21 | 20 | `{0, len==21, bitmap[1:0], q[3:0]}` |
| 13 / 14 | 22 / 23 | 22 | `{bitmap[1:0], q[5:0]}` |
| 15 | 24 | 24 | `q[7:0]` (no bit-map: always present) |

One-field entry, `e[40] = 0`:
`{0000, code[3:0], bitmap[7:0], q[15:0], nha[7:0]}`. The length is
33 - code, so codes 1..4 are /32../29 (tread 29, 13-bit q) and codes 5..8
are /28../25 (tread 25, 9-bit q). Code 0 marks an empty entry.

Bit i of a bit-map stands for the prefix whose round-off bits equal i. For
example, a /18 at tread 16 uses bits 0..3. A field whose bit-map is all zero
is empty. An all-zero word is an empty entry, which is the state the table is
cleared to after reset.

A field matches a lookup at tread t (`cbm_match`) when all of these hold:

* its length rounds down to t;
* its q(x) equals the address's q(x) at t;
* the bit-map bit picked by the address bits that follow t is set.

The longest matching field of the set wins.

## Hashing hardware

* `rem_hash`: r(x) in one combinational step. A remainder is linear,
  Rem(a+b) = Rem(a) + Rem(b), so r(x) is the XOR of Rem(x^j) over the set
  bits j of the dividend. The 32 constants Rem(x^j) are computed at
  elaboration by a constant function from g(x).
* `quot_div`: q(x) by long division, W = 4 dividend bits per clock. The
  first 16 bits load the window. Each step shifts in one bit, emits the
  window's top bit as a quotient bit, and XORs g(x) in when that bit is 1.
  The start cycle already does the first W steps. A 29..32-bit dividend
  (13..16 quotient bits) finishes in 4 cycles. `done` is high one cycle
  after start for lengths of 16 or fewer. W = 1 is the plain serial LFSR
  divider.

## Lookup (`lookup_ctrl`)

1. Accept the address (`lk_valid`/`lk_ready`). Start eight `quot_div`s, one
   per tread.
2. Compute the eight r(x) values (`rem_hash`) and their (module, row) pairs
   (`skew_map`).
3. `mem_scheduler` issues the eight reads in batches. In each batch a
   module serves at most one read; among reads to the same module the lowest
   tread goes first. The number of batches B is the largest number of probes
   that fall into one module (1..8).
4. Once every set has returned and q(x) is ready, eight `cbm_match` units
   check the sets. The longest of their matches and the TCAM's match is the
   result.

`res` carries `hit`, `len`, `nha`, `from_tcam` and `accesses` (= B).
`res_valid` rises max(B + 3, 5) cycles after the accepting cycle. Lookups are
not pipelined: a new one is accepted after the previous result.

## Updates (`update_ctrl`)

An update hashes its prefix like a lookup, but only at its own tread. It
then reads the set, decides, and writes the set back. An update takes about
8 to 12 cycles. The resulting status is reported in `upd_status`:

* **Announce.** The update tries these in order and takes the first that
  applies:
  1. the prefix is already present: `EXISTS`, nothing changes;
  2. a field with the same length, q(x) and NHA exists: set its bit
     (`AGGREGATED`);
  3. a two-field entry has a free half: `NEW_FIELD`;
  4. an entry is empty: `NEW_ENTRY`;
  5. a TCAM slot is free: `TCAM`;
  6. none of these: `FULL`.
* **Withdraw.** The update clears the prefix's bit. A field left with no bit
  is freed, and an entry left with no field becomes all-zero (`DELETED`). If
  the prefix is not in the set, the update looks in the TCAM (`TCAM_DEL`). If
  the prefix is found nowhere, the status is `NOT_FOUND`.

Only prefixes of one length share a field. Withdrawing one prefix therefore
never needs a new entry, and it never removes another prefix. The table is
*lossless*. Changing a route's next hop takes a withdrawal followed by an
announcement.

## Spillover TCAM (`spill_tcam`)

The TCAM is made of registers and comparators. It has 256 slots of
`{valid, prefix, len, nha}`, all compared with the lookup address in
parallel, and the longest match wins. It also reports, combinationally, the
slot that holds a given exact prefix and the lowest free slot, for the
update controller. Slots are cleared by reset.

## Top level (`suse_top`)

`suse_top` connects eight `sram_bank`s, `lookup_ctrl`, `update_ctrl` and
`spill_tcam`. After reset a sequencer writes every row of all modules to
zero, one row per cycle in all modules at once (8,192 cycles), and then
raises `init_done`. Lookups and updates share the memory ports and run one
at a time. A waiting lookup goes before a waiting update, and an assertion
checks that the two never own the memory at once.

Ports: `clk`, `rst_n` (asynchronous, active low), `init_done`;
`lk_valid`, `lk_ready`, `lk_addr[31:0]`, `res_valid`, `res`;
`upd_valid`, `upd_ready`, `upd_op`, `upd_prefix[31:0]` (left-aligned),
`upd_len[5:0]` (8..32), `upd_nha[7:0]`, `upd_done`, `upd_status`. The
types are defined in `suse_pkg`.

## Files

| file | contents |
|---|---|
| `rtl/suse_pkg.sv` | constants, types, the entry encode/decode functions, the remainder table function |
| `rtl/rem_hash.sv`, `rtl/quot_div.sv` | r(x) and q(x) |
| `rtl/skew_map.sv`, `rtl/mem_scheduler.sv` | module placement and conflict-free batching |
| `rtl/sram_bank.sv` | one memory module |
| `rtl/cbm_match.sv` | set checker |
| `rtl/spill_tcam.sv` | spillover TCAM |
| `rtl/lookup_ctrl.sv`, `rtl/update_ctrl.sv` | controllers |
| `rtl/suse_top.sv` | top level |
| `tb/suse_ref_pkg.sv` | reference models: bit-serial division, placement, entry encoders |
| `tb/*_tb.sv` | one self-checking testbench per module, plus the routing-table workload `suse_table_tb` |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. Each one also has a watchdog. To run one with Verilator 5:

    verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
        rtl/suse_pkg.sv tb/suse_ref_pkg.sv $(ls rtl/*.sv | grep -v suse_pkg) \
        tb/suse_top_tb.sv --top-module suse_top_tb
    obj_dir/Vsuse_top_tb

Replace `suse_top_tb` with any other testbench name to run that one.

The testbenches check these things:

* `rem_hash_tb`, `quot_div_tb`: every length against bit-serial long
  division, and the latency of the divider.
* `skew_map_tb`: the 192.128.x.y example, the placement equation, and that
  each skew is a permutation.
* `sram_bank_tb`: writes and reads at full size.
* `mem_scheduler_tb`: the grant rules and the batch count.
* `cbm_match_tb`: random sets that mix matches and decoys.
* `spill_tcam_tb`: longest match, exact search and free-slot search.
* `lookup_ctrl_tb`: a pre-built table with results, batch counts and
  latency checked.
* `update_ctrl_tb`: a scripted fill and drain of one set, checked word by
  word.
* `suse_top_tb`: the full-size design with all parameters at their
  defaults. It announces about 2,000 routes, withdraws several hundred and
  runs about 4,000 checked lookups. It also presents lookups and updates
  together, and counts every placement kind, TCAM use, misses, multi-batch
  lookups and stalls. It finishes in well under a minute.
* `suse_table_tb`: a routing-table workload, also at full size. It builds
  a 170,000-prefix table shaped like a BGP table (mostly /16 to /24,
  clustered under /16 networks that share a few next hops). It then runs
  100,000 lookups: each picks a stored prefix and fills the host bits at
  random. Every status, result and latency is checked. It prints the
  entries used, the prefixes that overflowed, and the batch statistics.
  It takes about 20 seconds.

## How far to trust it, and where it departs from the SUSE design

* **Follows the SUSE design:**
  * g(x), the 2^16 sets, the 4-way 164-bit sets;
  * the 8 modules of 2^13 rows and the skewed placement equation;
  * the tread set and the field widths of the CBM entry;
  * aggregation of same-length, same-next-hop prefixes and lossless
    withdrawal;
  * the one-step remainder method and the W-bit-per-cycle quotient;
  * batched, conflict-free access scheduling;
  * the 256-entry spillover TCAM searched in parallel with the table.
* **This implementation's own choices:**
  * the bit positions inside an entry and the marking of empty
    fields/entries;
  * the skews of treads 20 to 29;
  * W = 4 (from the suggested range 2..4);
  * the scheduler's fixed priority;
  * the order in which free places are tried;
  * single-port memories with one-cycle reads;
  * the clear sequencer;
  * one-at-a-time lookups and updates;
  * a register-based TCAM.
* **Memory accesses per lookup.** The SUSE evaluation reports 1.07 memory
  accesses per lookup on average and 4 at worst. With the placement above,
  the eight remainders of a random address fall into the eight modules
  almost independently. `suse_table_tb` measures 2.60 batches on average
  (standard deviation 0.68, 7 at most) over 100,000 lookups. Treat lookup throughput as unproven. A placement
  that reaches the published figure would need skews or a mapping that are
  not given here.
* **Throughput.** A lookup takes 5 to 11 cycles and is not pipelined. The
  published "over 100 M lookups per second" would need a pipelined version
  at a high clock.
* **Not included:**
  * prefixes shorter than 8 bits;
  * the table of output ports and port settings that the NHA points to
    (its format is not defined; the NHA is the output);
  * the round-off-only and full-bit-map entry formats, which are
    alternatives to CBM.
* **Capacity.** The default table (262,144 entries plus 256 TCAM slots)
  is sized for tables of the 150 K to 200 K-prefix class. The SUSE
  evaluation reports at most 109 prefixes per real table that do not fit
  their four-way set. On the synthetic 170,000-prefix table of
  `suse_table_tb` the table takes 101,767 entries (1.7 prefixes per entry).
  However, 1,113 prefixes (0.65%) overflow their sets: 256 fill the TCAM
  and 857 are refused with status FULL. The overflow comes from ordinary
  hashing spread and is spread over all lengths. How real tables behave
  depends on their structure, which a synthetic table only imitates. A
  larger TCAM (`TCAM_DEPTH` in `suse_pkg`) is the simplest remedy; it has
  not been tried here.
* **Larger tables.** For about 0.5 M to 1 M prefixes the SUSE scaling
  rule is a higher-degree g(x) (degree 17 or 18) with 2^17 or 2^18 sets,
  which shortens q(x) by one bit per degree. That needs a different g(x)
  constant, different field widths, and `DEG`/`ROW_W` changes in
  `suse_pkg`.
