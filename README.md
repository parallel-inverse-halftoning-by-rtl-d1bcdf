# Parallel look-up-table inverse halftoning

Inverse halftoning turns a binary (halftone) image back into a gray-level
image. The look-up-table method does this with almost no arithmetic. For every
pixel it takes a *template*: the pixel and a fixed set of neighbours, P bits in
all. That template addresses a table built off-line from training images, and
the table returns the gray level. One table can answer one template per clock.

This design answers **K templates per clock** (K = 4). It splits the single
table into **N smaller tables (s-LUTs)** (N = 8) that can be read at the same
time. The s-LUTs together hold no more entries than the single table would. The
split is by a cheap hash of the template, called the XM function here:

    slut(t) = popcount(t XOR m) mod N

Here `m` is the mean template of the training set. Neighbouring templates tend
to differ in how many ones they hold, so the K templates of a group usually
fall into different s-LUTs. When two or more of them fall into the same s-LUT,
only one is looked up. The others borrow the gray level of a neighbouring
template. That costs a little image quality: the sample images lose about
0.1 to 0.2 dB of PSNR at K = 4 and N = 8 compared with the serial method.

The default configuration is K = 4, N = 8 and P = 20 (the "19pels" template:
a centre pixel and 19 neighbours), with 8-bit gray levels.

## Datapath

```
 templates[0..3] ──► cpld1_router ──► 8 x slut ──► pixel_compensation ──► gray[0..3]
 mean_template   ──►   (4 clocks)     (2 clocks)        (1 clock)
 load port ─────────────────────────►  (tables)
```

* A group of K templates enters with `in_valid`. Its K gray levels leave with
  `out_valid` **7 clocks later**. A new group can enter every clock.
* `gray[j]` always belongs to `templates[j]`. Template j carries the
  *sequence number* j+1 through the pipeline, and the higher the number, the
  higher its priority.
* `out_discarded[j]` and `out_miss[j]` tell why template j got a borrowed gray
  level. Discarded means it lost its s-LUT to a higher template. Miss means its
  s-LUT did not hold it. They are for diagnostics only.

### Router (`cpld1_router`)

The router has four register stages:

1. Register the K templates.
2. Compute each template's s-LUT number with `xm_csa_tree`. In parallel,
   append the sequence number: `tagged = {j+1, t_j}` (3 + 20 bits).
3. K `slut_demux` demultiplexers put each tagged word in the column of its
   s-LUT. All other columns get zero.
4. N `slut_priority_mux` multiplexers, one per s-LUT, pick from their column
   the word with the highest non-zero sequence number.

Each s-LUT port then carries one tagged template or all zeros. A sequence
field of 0 means "idle".

The XM function (`xm_csa_tree`) XORs the template with `m` and counts the ones
with a tree of carry-save adders (`csa_reduce`, a level-by-level 3:2 reduction).
Only log2(N) bits are ever formed, because the count is needed only modulo N.
So the tree works on 3-bit words for N = 8, and N must be a power of two.

### s-LUTs (`slut`, `cam`, `contone_rom`)

Each s-LUT holds only a small fraction of the 2^P possible templates. That is
why it is a CAM followed by a gray-level memory, not a directly addressed
table:

* The **CAM** holds the templates. It answers a key with the address of the
  matching entry, or with **0** if the template is not stored. Address 0 is
  never an entry, so a CAM of address width D holds 2^D - 1 templates.
* The **gray-level memory** at the same address holds the gray level.
  Address 0 always reads zero.

An s-LUT too big for one CAM-ROM pair uses several pairs (`BANKS`). All pairs
see the same key. Only one can hold the template, and the others output zero,
so their outputs are simply ORed. The s-LUT also outputs `hit` (some CAM
matched). That flag tells a stored gray level of 0 apart from "not found".

With the defaults (D = 13, BANKS = 2), each s-LUT holds 16,382 templates and
all eight hold 131,056. An 8-way split of a training set of about 50,000
templates puts up to about 9,000 in the fullest s-LUT, so that s-LUT needs
the second bank.

The CAM compares all entries in parallel, one comparator per entry, and
OR-encodes the match lines into an address. This assumes that a template is
stored at most once; an assertion checks it. The CAM answer is registered, and
so is the memory read. That gives the s-LUT its 2-clock latency.

### Pixel compensation (`pixel_compensation`)

This stage is the least obvious part of the design. The s-LUT results arrive in
*s-LUT order*, and each carries the sequence number of the template it served.
For each template j, the stage finds the s-LUT tagged j+1 and decides whether
template j was **served**: it reached an s-LUT and that s-LUT held it.

* A served template gets its own gray level.
* An unserved template gets the gray level **already chosen for template
  j+1**.

The choice is made from the highest template down. A run of unserved templates
therefore all copy the next served template above them. Example, with s-LUT
numbers in brackets:

```
  t0[5]  t1[2]  t2[5]  t3[2]
  t0 loses s-LUT 5 to t2, t1 loses s-LUT 2 to t3
  gray3 = own(t3); gray2 = own(t2); gray1 = gray2; gray0 = gray1 (= own(t2))
```

The highest template always wins its s-LUT, so the chain always ends in a real
lookup. If the highest template itself is not in its table, it gets 0, because
there is nothing above it to copy.

## Loading the tables

The tables are produced off-line:

1. For every training template, compute `slut(t)`.
2. Average the gray levels of repeated templates.
3. Store each distinct template in its s-LUT.

The same `m` must then be applied at `mean_template`. Write one entry per
clock:

| port | meaning |
|---|---|
| `load_en` | write strobe |
| `load_slut` | s-LUT number, 0..N-1 |
| `load_bank` | CAM-ROM pair within the s-LUT |
| `load_addr` | entry, 1..2^D-1 (0 is reserved) |
| `load_template`, `load_gray` | the pair to store |

Reset clears every CAM entry. Lookups and loads may overlap, but a lookup
that races a load of the same entry sees either the old or the new contents.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `K` | 4 | templates per clock |
| `N` | 8 | number of s-LUTs (power of two) |
| `P` | 20 | template bits |
| `D` | 13 | CAM/memory address width; 2^D - 1 entries per bank |
| `BANKS` | 2 | CAM-ROM pairs per s-LUT |

The defaults live in `rtl/ih_pkg.sv`. The gray level is 8 bits. The sequence
number is ceil(log2(K+1)) bits wide.

## Departures and interpretations

* **Own choices.** The source description gives the algorithm and the
  block-level logic. The following are choices of this implementation:
  * the register after every step, and hence the 7-clock latency;
  * the CAM's internal structure;
  * the table size (D, BANKS);
  * the load port;
  * the reset;
  * the `hit`, `discarded` and `miss` signals.
* **Template width.** The template is taken as 20 bits. One view of the
  original two-chip implementation labels the template buses 19 bits wide.
  `P` is a parameter.
* **Borrowing runs.** An unserved template copies the value *chosen* for the
  next template up, not that template's own lookup. The two differ when two
  adjacent templates are both unserved. The block-level equations of the
  source copy the next template's own lookup result, while its algorithm
  statement copies from the nearest template that was kept. This design
  follows the algorithm statement.
* **Table misses.** A template that reaches its s-LUT but is not found there
  also borrows, as the algorithm statement asks. The block-level equations
  cover only collisions.
* **Collisions.** The highest-numbered template wins a collision, as the
  block-level multiplexer equations give.
* **Not built:**
  * forming templates from the halftone image (the template shape and the
    placement of the K templates in the image are not specified);
  * writing the gray levels back into an output image;
  * the off-line training.

  The top takes ready-made templates and returns gray levels in template order.
* **The two-chip split.** The original implementation splits the logic over
  two programmable chips, with the CAMs and memories outside them. Here
  `cpld1_router` is the first chip, `pixel_compensation` is the second, and
  `slut` covers the external memories. The design makes no attempt to meet
  those devices' pin counts or clock rates.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=<n> failures=<n>`. The reference values come from
independent models in the testbenches, for example `$countones` for the XM
function and queue-based models for the pipelines. The testbenches also check
latency and one-group-per-clock throughput.

| testbench | what it covers |
|---|---|
| `tb_xm_csa_tree` | corner patterns and random pairs at P = 20 / N = 8 and P = 22 / N = 16 |
| `tb_slut_demux`, `tb_slut_priority_mux` | exhaustive selects and random priority patterns |
| `tb_cam`, `tb_contone_rom`, `tb_slut` | small tables (D = 4); overwrite, reset, reads of address 0, second bank |
| `tb_cpld1_router` | 1,000 back-to-back groups; all eight ports checked; forced full collisions |
| `tb_pixel_compensation` | 2,000 random s-LUT result sets with collisions and misses |
| `tb_parallel_inverse_halftone` | end to end (see below) |
| `tb_pih_full_size` | end to end at full size (see below) |

`tb_parallel_inverse_halftone` runs end to end with tables reduced to 31
entries per bank. It trains 300 random templates, streams 2,000 groups with
10 % unknown templates, and counts collision drops, table misses, copies
across two templates and second-bank hits. Any of these that never happens
counts as a failure.

`tb_pih_full_size` runs the same checks with every parameter at its default.
It loads 49,500 trained templates, then streams 20,000 groups (80,000 pixels).
It takes about 25 s with Verilator.

Both end-to-end tests also print the share of groups in which at least one
template lost a collision. With independent random templates it is about 62 %.
This is an upper bound rather than a prediction for real images. The four
templates of a real group are neighbours and tend to differ in their number of
ones, so they collide far less often; about a fifth of groups was the figure
reported for K = 4.

Both end-to-end tests share the stimulus and reference model in
`tb/pih_harness.sv`. To run one with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb rtl/ih_pkg.sv \
          tb/tb_parallel_inverse_halftone.sv --top-module tb_parallel_inverse_halftone
./obj_dir/Vtb_parallel_inverse_halftone
```

Other modules are found through `-Irtl -Itb`. Replace the testbench name to
run another test.

## Files

| file | contents |
|---|---|
| `rtl/ih_pkg.sv` | default sizes |
| `rtl/parallel_inverse_halftone.sv` | top level |
| `rtl/cpld1_router.sv` | router |
| `rtl/xm_csa_tree.sv`, `rtl/csa_reduce.sv` | XM function |
| `rtl/slut_demux.sv`, `rtl/slut_priority_mux.sv` | steering and collision arbitration |
| `rtl/slut.sv`, `rtl/cam.sv`, `rtl/contone_rom.sv` | s-LUTs |
| `rtl/pixel_compensation.sv` | back end |
| `tb/` | testbenches and the shared end-to-end harness |
