# Short-read mapping accelerator: BWA inexact search on FPGA

This design maps short DNA reads (90 symbols over A, C, G, T) to a reference
genome with the inexact-match search of the Burrows-Wheeler Aligner (BWA).
Most of the work is random, data-dependent reads of the genome's occurrence
array. A CPU handles that access pattern badly. The accelerator gives it a
custom datapath instead:

* an encoded occurrence array, about 1/32 of the plain size, decoded in one
  clock cycle;
* many small processing elements (PEs), 64 by default, each working on its
  own read;
* a memory path with two address streams that feeds a 200 MHz DDR3
  controller from an 80 MHz accelerator clock at up to two requests per
  accelerator cycle.

The RTL is SystemVerilog (IEEE 1800-2017) in `rtl/`, and the self-checking
testbenches are in `tb/`.

## 1. The search the PEs run

The reference X (length n) is preprocessed off-line into three things:

* its suffix array, with the end marker `$` sorting first;
* its BWT string B, where row r holds the symbol before suffix SA[r];
* `C(a)`, the number of symbols of X smaller than `a`.

`O(a, r)` is the number of symbols `a` in B[0..r], and `O(a, -1) = 0`. A
string W occurs in X exactly when its suffix-array interval [k, l] is not
empty. Extending W by one symbol on the left is one step:

    k(aW) = C(a) + O(a, k(W) - 1) + 1
    l(aW) = C(a) + O(a, l(W))

The inexact search `InexRecur(W, i, z, k, l)` walks W from its last symbol
to its first. `z` is the number of differences still allowed. A call:

* is dropped if `z < 0`, or if `z < D(i)`;
* reports [k, l] if `i < 0`;
* otherwise spawns:
  * an insertion `(i-1, z-1, k, l)`;
  * for every symbol `a` with `k_a <= l_a`, a deletion `(i, z-1, k_a, l_a)`;
  * for the same `a`, a match `(i-1, z, k_a, l_a)` if `a = W[i]`, or a
    mismatch `(i-1, z-1, k_a, l_a)` if not.

`D(i)` is an optional lower bound on the differences that the prefix W[0..i]
must contain. The host supplies it with the read. All zeros turns this
pruning off.

Small example, used in the decoder test: X = `CCTGAG` gives
B = `G G $ C A T C` and C = (A 0, C 1, G 3, T 5). Searching `AG` from
[0, 6] gives [4, 5] after `G`, then [1, 1] after `A`: one occurrence.

## 2. Encoded occurrence array (`bwa_occ_decoder`)

Storing four 32-bit counts per row would take 48 GB for a human genome. The
encoding stores one 256-bit code per group of 64 consecutive rows:

| bits       | content                                             |
|------------|-----------------------------------------------------|
| [127:0]    | BWT symbol of row r of the group in [2r+1:2r]       |
| [159:128]  | O(A, last row of the group)                         |
| [191:160]  | O(C, last row)                                      |
| [223:192]  | O(G, last row)                                      |
| [255:224]  | O(T, last row)                                      |

Symbols are coded A=00, C=01, G=10, T=11. For row j of a group, the decoder
subtracts the number of symbols `a` in the rows after j:

    O(a, 64g + j) = O(a, 64g + 63) - #{ r in (j, 63] : B[64g + r] = a }

Each symbol gets a 64-bit match vector, masked to rows after j, then a
popcount and one subtractor. That is one combinational stage, so a code is
decoded in the cycle it arrives.

`$` is not a symbol. The host writes 00 in its slot and gives its row in
`cfg.dollar_row`, and the decoder masks that slot out. Rows past the end of
the BWT in the last group are padded with A, and the stored counts include
the padding. A human genome (3e9 rows) then takes 1.5 GB. Two codes fill one
512-bit DDR3 word: the even code goes in the low half, the odd code in the
high half.

## 3. Processing element (`bwa_pe`, `bwa_call_stack`)

The recursion is unrolled with a register file of pending calls
(`bwa_call_stack`). It is last in, first out, so the search runs depth-first.
Each entry holds i (8 bits) and z (4 bits), both two's complement, plus k and
l (32 bits each).

The control path, state by state:

| state            | action |
|------------------|--------|
| `S_IDLE`         | accept a read (`read_t`: id, length, budget, symbols, D) |
| `S_START`        | push `InexRecur(W, len-1, zmax, 0, last_row)` |
| `S_POP`          | pop; if the register file is empty, go to `S_DONE` |
| `S_CHECK`        | drop if z<0 or z<D(i); if i<0 go to `S_EMIT`; else push the insertion call |
| `S_REQ_K/WAIT_K` | fetch the code of row k-1 and decode it (skipped when k = 0) |
| `S_REQ_L/WAIT_L` | fetch the code of row l and decode it |
| `S_REUSE_L`      | decode row l from the code already held, when both rows share it |
| `S_EXT_DEL`      | for symbol a, one adder pass gives k_a, l_a; if k_a <= l_a, push the deletion call |
| `S_EXT_MAT`      | push the match or mismatch call; next symbol |
| `S_EMIT`         | output the hit [k, l] |
| `S_DONE`         | output the end-of-read record, with an overflow flag |

Cost per call:

* 2 cycles to pop and test;
* one memory round trip per distinct code, so 0 to 2;
* 1 cycle per symbol, plus 1 per symbol that survives.

A PE keeps one memory request in flight. Throughput comes from many PEs
working in parallel.

**Depth.** Each level of the depth-first search leaves at most 8 entries
behind. There are at most len + z + 1 levels, so a 90-symbol read with 4
differences needs at most about 770 entries. The default is 1024. A push into
a full register file is dropped, and the read's done record then has
`overflow = 1`, which means its results are incomplete.

**Results.** A PE reports suffix-array intervals, not genome positions.
Turning an interval into positions needs the suffix array itself, which
these blocks do not store or look up. The host does that step. A read can
report the same interval more than once, as BWA's InexRecur can.

## 4. Memory path with two address streams (`bwa_mem_access`)

The 32 PEs of a channel share one DDR3 controller. Its user side runs at
200 MHz with 512-bit data; the PEs run at 80 MHz. With one arbiter, the FIFO
could receive at most one address per 80 MHz cycle, and the fast side would
mostly sit idle. So the PEs are split into two streams (PEs 0-15 and 16-31):

1. Each stream has a round-robin arbiter (`bwa_rr_arbiter`) that lets one
   request through per accelerator cycle.
2. The two winners are written as one pair into `bwa_addr_fifo`, a
   clock-crossing FIFO that is two entries wide on the write side and one
   entry wide on the read side. Each half has its own valid bit, and the
   reader skips empty halves. Pointers count pairs in Gray code, through
   two-flop synchronisers.
3. The DDR3 side issues one address per controller clock. The word address
   is the code address divided by two.
4. The controller returns words in order and cannot be stalled. A tag FIFO
   (`bwa_sync_fifo`) in the controller clock domain remembers, for each
   outstanding read, the requesting PE and which half of the word it wants.
5. The selected 256-bit code goes back through one of two return FIFOs
   (`bwa_async_fifo`), one per stream. Within a stream, the code is on a
   shared bus (`rsp_code[s]`), and `pe_rsp_valid` picks the PE it is for.

Since each PE has at most one read outstanding, FIFOs of N_PE (tags) and
N_PE/2 (returns) entries can never overflow. Assertions check this.

Measured in `tb_bwa_mem_access`, with every PE requesting and a 12-clock
controller latency: 2.0 addresses per accelerator cycle reach the
controller. A single return FIFO caps this at 1.0: the return path has to be
as wide as the request path, or it becomes the bottleneck.

## 5. Channels and the top level (`bwa_channel`, `bwa_accel_top`)

A channel is N_PE PEs plus one memory path:

* a new read goes to the lowest-numbered idle PE;
* result records from all PEs are merged by a round-robin arbiter.

`bwa_accel_top` places N_CH channels side by side. Each channel has its own
read stream, result stream and DDR3 controller port, and each channel's DDR3
holds a full copy of the encoded array.

Top-level ports (types in `bwa_pkg`):

| port                                   | clock      | meaning |
|----------------------------------------|------------|---------|
| `cfg` (`ref_cfg_t`)                    | static     | C(A..T), row of `$`, last BWT row (= n) |
| `read_valid/read_ready/read_in[c]`     | clk        | reads (`read_t`) for channel c |
| `res_valid/res_ready/res_out[c]`       | clk        | `result_t`: `{id, done, overflow, k, l}` |
| `pe_busy[c]`                           | clk        | which PEs hold a read |
| `ddr_read/ddr_addr/ddr_ready[c]`       | ddr_clk[c] | read request, 512-bit word address, accepted when both are high |
| `ddr_rdata_valid/ddr_rdata[c]`         | ddr_clk[c] | returned word, in request order |

Every read gives zero or more hit records, then exactly one record with
`done = 1`. Both resets are asynchronous and active low, and should be
released together.

The host side is not part of this RTL. The PCIe link is reduced to the
stream ports above, and the DDR3 controllers are outside the top. The host
does the rest:

* builds the BWT, C, the codes and the D(i) bounds;
* loads the codes into DDR3;
* converts the reported intervals into genome positions.

## 6. Parameters

| parameter                 | default | from |
|---------------------------|---------|------|
| `N_CH`                    | 2       | the two-channel organisation |
| `N_PE` (per channel)      | 32      | 32 PEs per channel, 64 in total |
| `STACK_DEPTH`             | 1024    | own bound (section 3); must be a power of two |
| `AFIFO_DEPTH` (pairs)     | 16      | own choice, power of two |
| `RFIFO_DEPTH`             | 32      | own choice, at least N_PE, power of two |
| `READ_LEN` (package)      | 90      | 90-symbol reads |
| `ROW_W`, `CNT_W` (package)| 32      | 32-bit counts for a 3-billion-symbol genome |
| code / DDR word width     | 256 / 512 | 64 rows per code; controller data path |
| read difference budget    | 0..7 (3 bits) | own choice; 3 to 4 differences is typical |

## 7. What is this design's own

The following are choices made here, not taken from the original
architecture description:

* The explicit `z < 0` drop. Without it the deletion branch would never end.
* D(i) as a per-read input, and the `z < D(i)` test.
* The k = 0 shortcut and fetching a shared code only once.
* LIFO order of the call register file, its depth, and overflow reporting.
* One outstanding memory request per PE; the PE's request/response protocol.
* Symbol codes, the code bit layout beyond "symbols low, counts high", the
  handling of `$` and padding, and two codes per DDR3 word.
* Round-robin arbitration; PE-to-stream assignment; the 5-bit PE tag stored
  with each 32-bit address.
* The whole return path: tag FIFO, per-stream return FIFOs, and delivery to
  the PEs.
* Read dispatch (lowest idle PE), result merging, and the record formats.
* Reads arriving on a port stream rather than being staged in DDR3.
* One extension step (two additions and a compare) per cycle, instead of a
  literal single shared 32-bit adder.
* The on-chip memory size. Each PE holds 1,024 calls of 76 bits, so
  64 PEs use about 5.0 Mbit for call registers. The original PE array used
  about 21 Mbit of on-chip memory, roughly four times as much. How that
  memory was divided is not known, so a deeper register file may be closer to
  the original. `STACK_DEPTH` sets the depth.

Not built: converting intervals to genome positions (needs the suffix array),
the PCIe interface, the DDR3 controller and memory, and the host software.

## 8. Verification

Every testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.
Shared testbench code:

* `tb/bwa_ref_pkg.sv`: a software reference. It builds a random genome, its
  suffix array by merge sort, the BWT, C, the occurrence table and the
  encoded codes. It also makes reads with substitutions and indels, computes
  D(i) with the greedy substring-cut rule, and runs InexRecur recursively in
  software.
* `tb/ddr3_ctrl_model.sv`: a behavioural DDR3 controller user port with
  fixed latency and random wait requests.

| testbench            | what it checks |
|----------------------|----------------|
| `tb_bwa_occ_decoder` | every row of 200 random groups against running counts, with and without `$`; the 7-row example |
| `tb_bwa_call_stack`  | LIFO order against a queue model, full/empty, overflow, clear |
| `tb_bwa_rr_arbiter`  | grant against a round-robin model; each of 16 requesters served once per 16 cycles under full load |
| `tb_bwa_addr_fifo`   | order and content across 80/200 MHz clocks, full, and two addresses per slow cycle without stalls |
| `tb_bwa_mem_access`  | each PE gets the code it asked for; more than 1.5 addresses per accelerator cycle (2.0 measured); both one- and two-stream writes occur |
| `tb_bwa_pe`          | 24 reads (20-90 symbols, 0-3 differences, with and without D) give exactly the software's interval multisets; a 16-entry register file reports overflow |
| `tb_bwa_channel`     | 36 reads through 32 PEs and the DDR3 model; every result checked |
| `tb_bwa_accel_top`   | the whole design at default parameters, 80 reads on two channels, every result checked |
| `tb_bwa_workload_misses` | reads with exactly 0, 1, 2, 3 and 4 differences (3 each, with D) on one PE over a 16,000-symbol reference, every result checked; prints cycles per read for each difference count |

`tb_bwa_channel` and `tb_bwa_accel_top` also count how often each mechanism
occurred, and fail if any count is zero:

* two-stream and one-stream FIFO writes, and arbiter contention;
* controller wait requests and result back-pressure;
* code reuse, the k = 0 shortcut and `$` masking;
* z < 0 drops and D(i) drops;
* read dispatch waiting for an idle PE.

The full-size run of `tb_bwa_accel_top` takes about 400,000 accelerator
cycles, roughly 75 s of simulation after a 2-minute build. Its reads allow 0
to 2 differences. Reads with 3 or 4 differences are tested on a single PE
(`tb_bwa_pe` and `tb_bwa_workload_misses`), because their search trees take too long to simulate on all
64 PEs. With a 10-cycle memory round trip, `tb_bwa_workload_misses` measured
about 2,300, 2,600, 3,900, 2,800 and 9,100 cycles per read for 0 to 4
differences. The counts vary from read to read, so 3 differences came out
lower than 2 in this sample.

### Running a testbench with Verilator

From the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
      rtl/bwa_pkg.sv tb/bwa_ref_pkg.sv rtl/*.sv tb/ddr3_ctrl_model.sv \
      tb/tb_bwa_accel_top.sv --top-module tb_bwa_accel_top -Mdir obj_top
    ./obj_top/Vtb_bwa_accel_top

Substitute another testbench file and top module name to run a different
test. The smaller ones need only the files they use, but the whole `rtl/`
set always works. `verilator --lint-only -Wall rtl/bwa_pkg.sv rtl/*.sv
--top-module bwa_accel_top` lints the design.

## 9. How far to trust it

Tested in simulation:

* the search logic, checked against an independent software model on random
  genomes of 1,500 to 8,000 symbols;
* the memory path, checked with clock-domain crossing at realistic clock
  ratios.

Not done:

* timing closure at 80 MHz;
* runs on real genome data;
* real DDR3 or PCIe IP in the loop;
* a clock-domain-crossing check with a formal or CDC tool.

Known limits:

* Sizes are 32-bit throughout, enough for genomes up to 4.29e9 rows.
* Reads longer than `READ_LEN` need the package constant changed.
* The configuration input must not change while reads are being mapped.
