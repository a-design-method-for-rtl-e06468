# LUT cascade for multiple-output logic functions

This is a reconfigurable circuit that computes any multiple-output
combinational function of many inputs. It uses a short chain of large
look-up tables (LUTs) in place of an FPGA's routed network of small LUTs. The
function is decomposed off-line into a **cascade**: a row of K-input LUT
*cells*. Each cell reads a few *rails* (the narrow output word of the cell
before it) and a few primary inputs, and sends a narrower word on. The last
cell gives the function value. Because the cells are a chain, the hardware is
one memory and a little control: cell *p* is **page p** of a LUT memory, and
the cascade is evaluated by reading one page per clock.

Many outputs are handled through the function's **encoded characteristic
function for non-zero outputs (ECFN)**. With *m* outputs f_0 .. f_{m-1} and
w = ceil(log2 m) extra variables z, the ECFN is

    ECFN(x, z) = OR over j of  [z == j] AND f_j(x)

This single-output function of n + w variables is what the cascade holds. Output
f_j is obtained by running the cascade with z = j. The z variables need
not come first or last: the decomposition can place them anywhere in the
variable order, wherever that keeps the rails narrow. One evaluation of all
outputs therefore takes s·m page reads (s cells, m outputs). When m is
large, the outputs are split into groups, each with its own shorter
cascade, and the groups run in parallel.

The RTL is the evaluation hardware. The decomposition itself is software
and is not part of it: building the ECFN's BDD, choosing the variable order
and cutting the BDD into cells. The RTL receives its result through
configuration ports: the LUT words, the source of every address bit, and s
and m.

## Module hierarchy

    irredundant_cascade_top      GROUPS engines side by side, output partition
      lut_cascade_engine         one cascade: evaluates f_0..f_{m-1} for one x
        cascade_sequencer        steps (page, z): s pages per output, m outputs
        rail_input_select        builds each page's K-bit address
        lut_page_mem             PAGES x 2^K words of R bits
    cascade_pkg                  sequencer state type, sizing functions

Default parameters: K = 15 address bits per cell, and R = K-1 = 14 rail bits
per word, which is the most rails a cell can pass on (a cell must also read at
least one new variable). N_IN = 256 inputs, M_OUT = 245 outputs and PAGES = 34
cells are the largest input count, output count and cascade length among the
benchmark circuits this architecture targets (the DES circuit). GROUPS = 1.

## How a cascade is laid out in the memory

A cell with u_in incoming rails and v new variables has u_in + v <= K
address bits and u_out <= R outgoing rails. It is stored as one page: word
`a` of page `p` (memory word p·2^K + a) holds the rail values the cell sends
for address `a`. The last cell of a cascade puts f in bit 0.

Where each address bit comes from is set separately for every page by
`rail_input_select`. It holds a table of PAGES × K source codes:

| code                     | address bit is                                  |
|--------------------------|-------------------------------------------------|
| 0 .. R-1                 | bit *code* of the previous page's word (a rail) |
| R .. R+W-1               | z[code-R], the output-select variable           |
| R+W .. R+W+N_IN-1        | x[code-R-W]                                     |
| R+W+N_IN and above       | constant 0 (bit not used by this cell)          |

Here W = ceil(log2 M_OUT). Reset sets every code to constant 0. On page 0 the
rail bits read 0, so a first page never sees the previous output's rails.

Example with K = 5 and 10 inputs, three cells:

    page 0: x0 x1 x2 x3 x4          -> rails y0 y1 y2
    page 1: y0 y1 y2 x5 x6          -> rails y3 y4
    page 2: y3 y4 x7 x8 x9          -> f

The engine testbench loads exactly this cascade, with f = "the number of ones
in x is a multiple of 3". Page 0 passes the count (3 rails). Page 1 passes the
count mod 3 (2 rails). Page 2 gives f.

A cell that needs fewer than K address bits sets the spare bits to the
constant-0 code. Only the words with those bits at 0 are then read.

## Evaluation timing

`cascade_sequencer` issues one read per clock. The read order is (page 0,
z=0), (page 1, z=0), ..., (page s-1, z=0), (page 0, z=1), ... up to (page s-1,
z=m-1). The memory has one clock of read latency. In the clock a read's word
appears, the next page's address is formed from it through the select
multiplexers, so the chain runs at one page per clock with no bubbles. One
clock after the last page of pass j is read, bit 0 of the memory word is f_j.
The engine stores it in `f[j]`.

* `lut_cascade_engine`: `done` pulses **s·m + 2** clocks after the clock edge
  that takes `start`. `x` is sampled with `start` and may change afterwards.
  `f` is cleared at start and valid from `done` until the next start. Bits
  at index m and above read 0.
* `irredundant_cascade_top`: all groups start on the same `x`. `done` pulses
  one clock after the slowest group is done, that is **s·max(m_g) + 3** clocks
  after start. A single cascade would need s·Σm_g + 2.

The output partition in numbers: the DES circuit with 245 outputs needs a
34-cell cascade, or 34·245 = 8330 page reads. Split into four groups it
needs cascades of at most 15 cells and about 62 outputs each, or about 15·62
= 930 reads in parallel. That is roughly a ninefold speed-up, paid for with
four memories.

## Configuration interface

All writes take one clock each. They are only allowed while `busy` is low;
an assertion in the engine flags a write during evaluation.

| port group                              | writes                                   |
|-----------------------------------------|------------------------------------------|
| `lut_we, lut_page, lut_addr, lut_data`  | one LUT word                             |
| `sel_we, sel_page, sel_bit, sel_code`   | one address-bit source code              |
| `len_we, len_pages, len_outputs`        | s (1..PAGES) and m (1..outputs per group) |
| `cfg_group` (top only)                  | which group's engine is written          |

Out-of-range s or m are clamped. In the top, group g owns outputs
`f[g·MG + j]`, where MG = ceil(M_OUT / GROUPS) and j = 0 .. m_g - 1. Within
the group, output j is selected by z = j.

## What follows the architecture and what is this implementation's choice

Taken from the architecture:
* the cascade of K-input multiple-output LUT cells, K = 15;
* cells stored as pages of one memory;
* multiple outputs through the ECFN, with the output-select variables mixed
  freely with the inputs;
* evaluation time proportional to s·m;
* parallel cascades for a partitioned output set.

Chosen here:
* the rail width R = K-1;
* the synchronous-read memory and one read per clock;
* the per-bit programmable address-source table and its code layout;
* masking of rails on page 0;
* the configuration ports, the registers for s and m, and the clamping;
* sampling `x` at start;
* contiguous, equal-sized output groups with a shared start and done;
* asynchronous active-low reset of the control state (the LUT memory is not
  reset).

The cascade is drawn in the architecture as a chain of separate LUTs. Here
the cells take turns on one memory, one page per clock. That gives the same
function with one memory instead of s, at s clocks per output.

Not built:
* cascades whose cells have different K. The architecture allows them, to
  save memory. Here every page has 2^K words, and a smaller cell leaves
  address bits unused.
* The decomposition software, and whatever host loads the configuration.

## Sizes

At the defaults, one engine holds 34 × 2^15 × 14 = 15,597,568 memory bits.
Its select table is 34 × 15 codes of 9 bits. The function of any benchmark
with up to 256 inputs, 245 outputs, 34 cells and 14 rails fits. GROUPS > 1
replicates the whole engine, including its memory.

## Testbenches

Each testbench checks itself and ends with
`TB_RESULT checks=<n> failures=<n>`.

| testbench                     | parameters            | what it checks |
|-------------------------------|-----------------------|----------------|
| `tb_lut_page_mem`             | K=4, R=3, 3 pages     | random fill, 1-clock read latency, hold, read-during-write returns old data, out-of-range page |
| `tb_rail_input_select`        | K=5, 10 inputs        | reset to constant 0, random source tables against a model, rail masking |
| `tb_cascade_sequencer`        | 5 pages, 6 outputs    | read order, capture timing, done at s·m+2, clamping |
| `tb_lut_cascade_engine`       | K=5, 10 inputs, 3 pages | the mod-3 cascade above on all 1024 inputs; random cascades and random source tables with m = 3 and 4 against a model walking the pages; latency of every run |
| `tb_irredundant_cascade_top`  | 4 groups, K=7, 14 inputs, 16 outputs | group g gives bits of (popcount(x) + 5g) mod 16; groups of unequal m; latency s·max(m)+3; reconfiguring one group between runs; counts each mechanism and fails any that never happened |
| `tb_workload_des_shape`       | defaults; and GROUPS=4 | cascades the size of the DES benchmark filled with random cells (its real LUT contents need the decomposition): one 34-cell cascade with 245 outputs (8333 clocks) and four 15-cell groups (933 clocks), every output against a model, latency, speed-up above 8 |
| `tb_full_size`                | defaults              | 24-page cascade of the 256-input function "popcount(x) mod 16" (4 outputs), loaded word by word (~790k writes), 40 evaluations with outputs and latency checked |

To run one with Verilator (from the directory that holds `rtl/` and `tb/`):

    verilator --binary --timing --assert -Irtl rtl/cascade_pkg.sv \
        rtl/*.sv tb/tb_full_size.sv --top-module tb_full_size -Mdir obj
    ./obj/Vtb_full_size

The simulator has no X state, so every register that is read is reset or
loaded first. The LUT memory is written by the host before use.
