# Hash memory with a key-reconfigurable orthogonal hash-function generator

A hash memory stores pairs `<X, Y>`. X is an n-bit search argument and Y is a q-bit
information code. The cell for a pair is found by computing an address from X. This design
computes that address with a hardware function generator that can be reconfigured by a key.
That buys four things:

* **Even spread.** The generator maps X to n output bits that form an *orthogonal system* of
  Boolean functions: every nonzero XOR-combination of outputs is balanced. In other words,
  `X -> F(X)` is a permutation of n-bit words. The low h bits are the cell address
  `H_K(X)`. Because they are balanced, addresses are spread as evenly as an ideal random hash
  would spread them.
* **No stored key.** The upper n−h bits, the *convolution* `S_K(X)`, together with the address
  determine X uniquely. A cell therefore stores only `S` and `Y`, which saves h bits per record
  compared with storing X itself.
* **Collision resolution without clustering.** When a cell is taken, the key is incremented and
  the same generator computes a fresh, uncorrelated pair `<H_{K+1}(X), S_{K+1}(X)>`. It then
  tries `K+2`, and so on. Secondary addresses do not pile up behind primary ones the way they do
  with linear probing (`H, H+1, H+2, ...`).
* **Keys as access control.** Each user's records are placed and recognised through that user's
  key. Several users can share one memory, and a search under the wrong key practically never
  finds another user's record.

## Operations

| op | what happens | response |
|---|---|---|
| `OP_INSERT` (K, X, Y) | probe j = 0, 1, …: read the cell at `H_{K+j}(X)`. If it is free, write `{1, S_{K+j}(X), Y}` and stop. | `ST_OK`, or `ST_FULL` after `MAX_PROBES` occupied cells |
| `OP_SEARCH` (K, X) | probe j = 0, 1, …: read the cell at `H_{K+j}(X)`. If it is occupied and holds `S_{K+j}(X)`, return its Y. If it is free, stop. | `ST_FOUND` with Y, or `ST_NOT_FOUND` (free cell or probe limit) |
| `OP_CLEAR` | mark every cell free | `ST_OK` |

Every response also carries `resp_probes`, the number of memory accesses used, and
`resp_addr`, the last cell probed.

Semantics to be aware of:

* An insert does not look for an existing record of the same X. Inserting X twice under the
  same key stores two records, and a search returns the one met first.
* A search compares only the convolution. A record stored for some other argument X′ at
  another probe step can, in rare cases, carry the same `<address, convolution>` as the one the
  search computes. The search then returns that record. The chance per probe is about
  2^−(n−h), which is 2^−20 at the default size. The probe step is not stored, so that a cell
  holds only `S` and `Y`.
* Single records cannot be deleted; only `OP_CLEAR` frees cells.

## The function generator (`ofs_generator`)

The key enters the generator by XOR: `F_K(X) = F(X xor K)`. If F is an orthogonal system, so is
`F(X xor A)` for any constant A, so every key yields an orthogonal system. A key of R < N bits
is zero-extended.

The underlying F is this design's own choice: a substitution-permutation network of `ROUNDS`
rounds. Each round:

1. passes every nibble through the 4-bit S-box `C 5 6 B 9 0 A D 3 E F 8 4 7 1 2` (the PRESENT
   S-box, `hm_pkg::sbox4`). It is a permutation with the best nonlinearity a 4-bit function can
   have;
2. moves bit i to position `i·N/4 mod (N−1)`, with bit N−1 staying in place. This is the same
   as `(i mod 4)·N/4 + i/4`.

Each round is a permutation, so F is one, and the system is orthogonal for every key.
The round count sets how well F avalanches:

* At N = 32, three rounds leave some input/output bit pairs that flip only about 20% of the
  time.
* Five rounds (the default) bring every pair into 45–53% over 2000 random trials. This is the
  strict avalanche criterion the approach asks of the functions.

The generator is purely combinational: five S-box layers, with wiring between them.

## Block structure and timing

```
 req ──► hm_controller ──gen_x──► ofs_generator ──addr, conv──► hm_controller
            │  ▲                       ▲ k = K+j
            │  └──probe j── probe_counter ◄── load K / inc
            ├──addr, we, {1,S,Y}──► hash_mem_array ──cell──► conv_comparator ──free/hit/collide──► hm_controller
            └──► resp
```

| module | role |
|---|---|
| `hash_memory` | top level; wires the blocks below |
| `hm_controller` | FSM: reset/clear sweep, idle, read, compare |
| `probe_counter` | holds `K+j` and the probe number `j` |
| `ofs_generator` | `H_{K+j}(X)` and `S_{K+j}(X)` |
| `hash_mem_array` | 2^H cells `{occupied, S, Y}`, single-port synchronous RAM with 1-cycle read |
| `conv_comparator` | decides whether the cell is free, a hit or a collision |
| `hm_pkg` | `op_e`, `st_e`, the S-box |

Timing:

* A probe takes two clocks. In the first, the generator output for `K+j` is registered and the
  RAM is read. In the second, the comparator decides, and a free cell is written during an
  insert.
* An operation of p probes raises `resp_valid` exactly **2p clocks** after the clock edge that
  accepted the request.
* `OP_CLEAR` takes **2^H clocks**, one write per cell.
* After reset the memory clears itself the same way. `req_ready` rises 2^H clocks after reset
  is released.

Handshake:

* A request is taken on a rising edge where `req_valid && req_ready` (ready means idle).
* `req_op`, `req_x`, `req_key` and `req_y` are sampled at that edge.
* The response is a one-cycle `resp_valid` pulse. Its `resp_status`, `resp_y`, `resp_probes`
  and `resp_addr` stay valid until the next response.
* Reset `rst_n` is asynchronous and active low.

The controller carries assertions:

* memory writes happen only while clearing or on an insert that found a free cell;
* the probe number never reaches `MAX_PROBES`;
* a response is given only in the idle state.

## Parameters (top level `hash_memory`)

| name | default | meaning |
|---|---|---|
| `N` | 32 | n, search-argument bits (a multiple of 4) |
| `H` | 12 | h, address bits; M = 2^H = 4096 cells |
| `R` | 32 | r, key bits, R ≤ N |
| `Q` | 16 | q, information bits |
| `ROUNDS` | 5 | generator rounds |
| `MAX_PROBES` | 2^H | probes before an insert reports FULL or a search gives up |
| `PW` | derived | width of `resp_probes` |

The approach does not fix any of these sizes; the defaults are this design's own. A cell is
N−H+Q+1 = 37 bits, so the default memory is 4096 × 37 bits. A cell holding the full argument
would need N+Q+1 = 49 bits. Dropping h bits per record is what raises the memory efficiency
from w = α to w = α / (1 − h/(n+q)), which is 1.33·α at these sizes, not counting the
occupied flag.

## Where this design goes beyond the description it follows

The approach defines the operations, the key-increment probing, the `F(X xor K)`
reconfiguration, and what is stored per cell. The following are this design's own choices:

* the generator's inner function (the S-box network above);
* the word sizes;
* the occupied flag that marks a free cell;
* the probe limit;
* the clear sweep;
* the handshake and the two-clock probe;
* the absence of duplicate detection on insert.

The approach also suggests a block cipher such as DES or Rijndael as a ready-made generator.
That variant is not built here.

## Verification

Each testbench in `tb/` is self-checking and ends with a line
`TB_RESULT checks=<n> failures=<n>`. `tb/hm_ref_pkg.sv` holds a reference model written from the
definitions, not from the RTL: the generator and a probe-by-probe model of the memory.

| testbench | what it shows |
|---|---|
| `tb_ofs_generator` | exhaustive permutation check of a 16-bit generator for three keys; 20 000 comparisons of the 32-bit generator with the reference; key-as-XOR identity; avalanche statistics |
| `tb_probe_counter`, `tb_hash_mem_array`, `tb_conv_comparator` | unit behaviour against small models |
| `tb_hm_controller` | the FSM with stand-in blocks (linear stand-in generator, so probe chains are predictable): statuses, Y, probe counts, addresses, 2p-clock latency, reset sweep, FULL and probe-limit paths |
| `tb_hash_memory` | end to end at n=16, h=6, 12-probe limit: three users share the memory until it is full; every mechanism (collision, hit after probing, miss at a free cell, miss at the probe limit, FULL, clear, one X under two keys) must occur |
| `tb_hash_memory_full` | default size; fills to load 0.95 and searches everything |
| `tb_hash_memory_static` | default size; searches for a key under which a fixed set of 120 arguments lands collision-free, then checks that every search takes one access |

Measured by `tb_hash_memory_full` at the default size:

| load band | accesses per insert | ideal 1/(1−α) | linear probing, same primary address |
|---|---|---|---|
| 0.5–0.6 | 2.41 | 2.23 | 3.14 |
| 0.7–0.8 | 3.76 | 4.05 | 9.78 |
| 0.9–0.95 | 13.2 | 13.8 | 74.0 |

* Above load 0.5, key-incremented probing needs about 70% fewer accesses than linear probing.
* A successful search at load 0.95 averages 3.14 accesses. The ideal is
  (1/α)·ln(1/(1−α)) = 3.15.
* Of 1000 searches made with a wrong key, none returned a record.

The testbench fails if any band strays more than 15% from 1/(1−α).

To run a testbench with Verilator (5.x), from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wall -Wno-fatal --top-module tb_hash_memory \
  -y rtl -y tb +libext+.sv -Irtl -Itb rtl/hm_pkg.sv tb/hm_ref_pkg.sv tb/tb_hash_memory.sv
./obj_dir/Vtb_hash_memory
```

The unit testbenches that do not use the reference model need only `rtl/hm_pkg.sv` and their
own file. Every testbench finishes in well under a second of simulation time.

Lint notes:

* Verilator warns `SYNCASYNCNET` on `rst_n`, because it is an asynchronous reset for the flops
  and a `disable iff` condition in the controller's assertions. Both uses are intended.
* In `hm_controller`, the output `pc_key_in` is wired straight from `req_key`. The probing
  counter loads the key from it on the accepting edge.
