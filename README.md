# Motion estimation on a 3D-stacked DRAM frame store

Block-based motion estimation compares a 16x16 macroblock (MB) of the
current frame with many displaced 16x16 candidate blocks of one or more
reference frames and keeps the displacement (motion vector) with the
smallest sum of absolute differences (SAD). Conventionally the reference
frames sit in off-chip DRAM and the estimator keeps a search-region copy in
on-chip SRAM. This design instead puts the current frame and up to five
reference frames in DRAM dies stacked on the logic die and connected by
through-silicon vias, and organises that DRAM so that the estimator needs
no search-region buffer at all.

The engine asks the frame store for a candidate by giving only the current
MB position and the motion vector. The store works out which stored MBs the
candidate overlaps, opens the right word-lines, and delivers the candidate
one 16-pixel row per clock cycle. Since the store can deliver any vector in
any order, any search scheme can run on it. Full search and three step
search are built here, plus two combinations of them.

The RTL is SystemVerilog (IEEE 1800-2017). It lints cleanly in Verilator
and elaborates in Yosys/slang at the full HDTV size: 12 banks and
100,280,640 bits of modelled DRAM.

## Design at a glance

```
            wr_* (load MB rows)                       start, x_mb, y_mb, alg, nref, prec_*
                 |                                                  |
   +-------------+---------------------------+              +-------+--------+
   |             |                           |              |  controller    |
   v             v                           v              +-------+--------+
 frame_storage  frame_storage  ...  frame_storage                   |
 (current, 0)   (reference 1)       (reference M)                   |
   |  2 banks      |  2 banks            |  2 banks                 |
   |  128 b/row    |                     |                          |
   |               v                     v                          |
   +--cur MB--> me_unit[0]   ...     me_unit[M-1]  <----------------+
                   |                     |
                   +----- best SAD across references -----> best_ref, best_mv, best_sad
```

| Module | Role |
|---|---|
| `me3d_top` | M+1 frame stores, M engines, controller, choice of the best reference |
| `frame_storage` | two banks of one frame, candidate-row walk, shifters, load port |
| `cand_addr_calc` | motion vector to overlapped MBs and pixel offsets |
| `mb_addr_gen` | MB index to bank, word-line and column |
| `row_combiner` | the two barrel shifters that form one candidate row |
| `dram_bank` | one bank: 8 bit-plane sub-arrays, open word-line, activation delay |
| `dram_subarray` | one bit plane of a bank (memory array model) |
| `me_unit` | one search engine per reference frame |
| `sad_unit` | row-serial SAD with pixel truncation |
| `me3d_pkg` | default sizes and the `me_alg_e` search-scheme type |

Default sizes (all parameters):

| Parameter | Default | Meaning |
|---|---|---|
| `N` | 16 | MB size in pixels |
| `D` | 8 | bits per luminance pixel |
| `FW`, `FH` | 120, 68 | frame size in MBs (1920x1088, i.e. 1080p padded to whole MBs) |
| `S` | 2 | MBs per word-line in one bank |
| `M` | 5 | reference frames, i.e. 5 engines and 6 frame stores |
| `R` | 32 | search range +-R (80x80 search region) |
| `MVW` | 8 | signed motion vector component width |
| `T_ACT` | 2 | extra cycles to open a new word-line |
| `W` | 2 | refinement window +-W of coarse-to-fine search |

## How a frame is laid out in the DRAM

Each frame store has two banks. A bank word is one MB row: 16 pixels x
8 bits = 128 bits. The data path from each store to the logic die is
therefore 128 bits wide, which makes 768 bits for six stores.

**MB-by-MB mapping.** The MB with raster index `i = y*FW + x` goes to bank
`x % 2`. Horizontally neighbouring MBs therefore always sit in different
banks. A candidate row straddles at most two neighbouring MBs, so both of
its halves can be read in the same cycle. Inside a bank, the 16 rows of an
MB take 16 consecutive columns of one word-line, and a word-line holds
`S = 2` MBs of that bank:

```
bank = x % 2
row  = floor(i / (2*S))            -- word-line
col  = ((i / 2) % S) * N + r       -- r = row inside the MB
```

A bank thus has 2040 word-lines of 32 columns. Reading the 16 rows of one MB
is a burst along one open word-line. `mb_addr_gen` computes this mapping.
It requires `FW` to be even.

**Bit planes.** Each bank is split into `D` sub-arrays (`dram_subarray`).
Sub-array *b* holds bit *b* of every pixel, so each sub-array supplies 16
bits per access and all sub-arrays share one address. The input `prec`
(1..8) is the number of most significant bits in use. The remaining low
sub-arrays are idle: they are not read and they return zeros. Lower
precision therefore costs less DRAM activity, and the SAD datapath
truncates the current MB to match.

**Word-line timing.** A bank keeps one word-line open. Reads on that
word-line run at one word per cycle. Moving to another word-line takes
`T_ACT` further cycles, and the bank pulses `act` once for each
activation. Write-back, refresh and the analog behaviour of the cells are
not modelled. A write closes the open word-line.

## Turning a motion vector into rows

This is the core of the design (`cand_addr_calc` feeding `frame_storage`).
Take a candidate at vector `(mv_x, mv_y)` from current MB `(x_mb, y_mb)`.
Per axis, `s` is the sign of the vector component. The candidate overlaps
the stored MB columns `x_mb + s*floor(|mv_x|/N)` and `x_mb + s*ceil(|mv_x|/N)`.
The smaller of the two is the *left* MB and the larger the *right* MB. The
same rule gives the *top* and *bottom* MB rows. The offsets are:

```
x_off = |mv_x| % N        if mv_x >= 0
        N - |mv_x| % N    if mv_x <  0          (range 0..N)
```

`y_off` follows the same rule with `mv_y`. Candidate row `r` comes from:

* the top MBs, MB row `y_off + r`, while `r < N - y_off`;
* the bottom MBs, MB row `r - (N - y_off)`, after that.

In each case one row is read from the left MB and one from the right MB, in
the two banks at once. `row_combiner` shifts the left row left by `x_off`
pixels and the right row right by `N - x_off` pixels, then merges them.
Output pixel `p` is `left[p + x_off]` or `right[p + x_off - N]`.

If `x_off` is 0 or N, only one MB column contributes, and only that bank is
read. If `y_off` is 0 or N, only one MB row is used. A candidate can thus
touch 1, 2 or 4 stored MBs. In the general case it opens two word-lines in
each bank: top, then bottom.

Timing of `frame_storage`:

* A request is a `req_valid`/`req_ready` handshake carrying MB position,
  vector and precision.
* The first row appears two cycles after acceptance if its word-lines are
  open. After that, one row per cycle comes out on `out_row`, with
  `out_idx` and `out_last`.
* A word-line change stalls the row walk for `T_ACT + 1` cycles.
* The next request is accepted in the same cycle as the last row's read, so
  candidates stream without gaps.
* The row stream cannot be held back: the consumer must take each row in
  the cycle it is valid.
* Candidates must lie inside the frame. An assertion checks this.

## The search engines

`me3d_top` works in three phases:

1. It reads the current MB from store 0 (zero vector, full precision) and
   copies its rows into a register file in every engine.
2. It starts engines `0..nref-1`. Engine *k* works only with reference store
   *k+1*, so the references are searched in parallel.
3. When all started engines are done, it picks the reference with the
   smallest SAD; on a tie the lowest frame number wins.

Each `me_unit` generates vectors and issues requests back to back, with up
to four candidates outstanding. It accumulates each candidate's SAD
(`sad_unit`: 16 absolute differences per cycle) and keeps the first
minimum. Vectors whose block would leave the frame are skipped. Four search
modes are available (`alg`, type `me3d_pkg::me_alg_e`):

* **Full search** (`ALG_FS`) tries all (2R+1)^2 = 4225 vectors in raster
  order at precision `prec_fs`.
* **Three step search** (`ALG_TSS`) runs log2(R) = 5 steps with step sizes
  16, 8, 4, 2, 1. Each step evaluates the 3x3 pattern around the centre and
  moves the centre to the best point. Each step has its own precision field
  in `prec_tss` (4 bits per step, step 0 in the low bits). The centre is
  evaluated again in every step, because SADs at different precisions
  cannot be compared. For example, 4 bits in step 1 and 8 bits in steps 4
  and 5 is a typical setting.
* **Hybrid** (`ALG_FSTSS`) is sequenced by the top. Every reference first
  gets a three step search. The top then picks the reference with the
  least SAD, and that engine alone runs a full search at `prec_fs`. Its
  full-search result is final; the other engines keep their three step
  results on `ref_*`.
* **Coarse-to-fine** (`ALG_C2F`) runs inside each engine. It starts with a
  full search at reduced precision `prec_fs`. It then searches the
  (2W+1)^2 vectors around the coarse winner at full precision.
  `ref_ncand` counts both passes.

Measured at the default size (one MB, five references in parallel):

* Full search takes 91,089 cycles, about 21.6 cycles per candidate,
  including word-line activations.
* Three step search takes 832 to 987 cycles for 37 to 45 candidates.
* The hybrid takes 92,027 cycles and coarse-to-fine 91,616 cycles: both are
  dominated by their full search.

At 30 frames/s of 8160 MBs, three step search therefore needs about
242 MHz. Full search would need 22 G cycles/s: a real-time full search
needs a data-reusing datapath, which is not part of this design.

## Departures and open points

* **Column address.** A word-line is packed with `((i/2) % S) * N`. An
  `(i % S) * N` form would put two MBs of the same bank and word-line on the
  same columns whenever `S` is even.
* **Own choices.** The following are choices of this design:
  * `S = 2` MBs per word-line, read from 512 bit-lines per sub-array;
  * the activation time `T_ACT` in cycles;
  * the request/row-stream handshake;
  * zero outputs from idle bit planes;
  * the TSS step sizes and re-evaluation of the centre;
  * the hybrid's reading as "three step search on every reference, then
    full search on the best reference";
  * the coarse-to-fine window `W`;
  * raster order and first-minimum tie-break;
  * skipping of out-of-frame candidates;
  * fixed frame roles: store 0 holds the current frame;
  * the best-reference choice.

  Rotating frames between roles as video advances is left to whatever
  drives the load port.
* **Not built:**
  * new three step search, four step search and diamond search (the
    engine generates only the patterns above, although the store serves
    any vector sequence);
  * variable block sizes below 16x16;
  * a data-reusing full-search datapath;
  * the variant that keeps an on-chip search-region SRAM;
  * whole-MB-per-cycle delivery from four banks;
  * the off-chip DRAM from which frames are loaded;
  * the through-silicon vias themselves, which are plain wires in the RTL;
  * sub-bank counts other than one per bank.
* **Not modelled.** Energy, power, access times in ns and footprint are
  not part of the RTL. The `act` output (one bit per bank) and the
  per-reference candidate counts `ref_ncand` give the event counts such
  estimates start from.

## Simulation

Every testbench in `tb/` checks itself against an independent software
model and ends with a `TB_RESULT checks=... failures=...` line.

* `me_tb_pkg` generates synthetic frames. The current frame is a hashed
  texture. Reference *k* is that texture displaced by a known vector, with
  a little noise everywhere except in reference 2, which holds an exact
  copy. The package also has software full search, three step search and
  coarse-to-fine search.
* `tb_me3d_top` uses a 6x5-MB frame, five references and a +-8 range. It
  checks every engine and the final choice over eight runs. It also counts
  that each mechanism happened: activations, two-bank and one-bank reads,
  top/bottom split candidates, truncated reads, skipped candidates,
  back-to-back requests, all four search modes, and a win by a later
  reference.
* `tb_me3d_full` runs at the default parameters. It loads six 1920x1088
  frames (783,360 write cycles). It then runs one full search, two three
  step searches, one hybrid and one coarse-to-fine search on all five
  references. The whole run takes well under a
  minute.
* There is one testbench per module: `tb_mb_addr_gen` (exhaustive at the
  HDTV size), `tb_cand_addr_calc`, `tb_row_combiner`, `tb_dram_subarray`,
  `tb_dram_bank`, `tb_sad_unit`, `tb_frame_storage` and `tb_me_unit`.

To run one with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    --top-module tb_me3d_full rtl/me3d_pkg.sv tb/me_tb_pkg.sv tb/tb_me3d_full.sv
./obj_dir/Vtb_me3d_full
```

Testbenches for smaller sizes override `FW`, `FH`, `M`, `R`, `W` and `T_ACT` on
`me3d_top`. All sizes follow from those parameters. `FW` must stay even and
`R` must be a power of two for three step search.
