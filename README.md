# Lake memory tile: a unified buffer in SystemVerilog

A coarse-grained reconfigurable array for image processing needs memories that
can act as line buffers, double buffers, FIFOs or plain RAM, and that keep up
with one word per cycle on several ports at once. Giving each port its own
SRAM bank is expensive. This tile takes a different route. It uses one
single-ported SRAM that is four words wide, and surrounds it with small
buffers:

- **Aggregation buffers** collect serial input words into wide rows.
- **Transpose buffers** turn wide rows back into serial output words.

One SRAM access moves four words. Four port-streams of one word per cycle
therefore need about one SRAM access per cycle in total, which a single
port can supply. Where the data go and when is set by configuration:

- nested-loop address generators;
- small row schedules;
- prefetch distances;
- synchronisation groups.

Together these turn the same hardware into any access pattern a
compiler can express as loops. This is the "unified buffer".

The RTL models the taped-out configuration:

- 2 input ports and 2 output ports of 16-bit words;
- a fetch width of 4 words (64 bits), built from two 512 x 32 SRAM macros,
  which gives 2048 words of storage;
- address generators with 6 loops and 16-bit ranges and strides;
- three modes: unified buffer, FIFO and SRAM;
- chaining of tiles;
- one 32-bit configuration bus that reaches the configuration registers and
  the SRAM macros.

## Structure

```
MemCore                        complete core: configuration space + datapath
├── cfg_space                  configuration registers (tile_cfg_t) on the bus
└── LakeTop                    datapath, all ports of the tile
    ├── agg_buffer      x2     input streams -> 4-word rows
    ├── addr_gen        x4     2 input + 2 output SRAM address generators
    ├── transpose_buffer x2    rows -> output streams, with prefetch
    ├── fifo_ctrl              FIFO mode
    ├── sram_mode_ctrl         random-access mode and chaining
    ├── accessor_arb           shares the single SRAM port
    ├── sync_groups            keeps grouped output ports in step
    └── storage_buffer         the SRAM: two sram_macro, side by side
        └── sram_macro  x2     512 x 32, one-cycle read
```

`lake_pkg` holds the shared sizes, the mode encoding (`mode_e`), the request
struct for the SRAM port (`sram_req_t`) and the configuration structs
(`ag_cfg_t`, `agg_cfg_t`, `tb_cfg_t`, `tile_cfg_t`).

`MemCore` is the top. `LakeTop` can also be used on its own: there every
configuration field is a port. The interconnect of the array (connection
and switch boxes) is not part of this RTL.

## Unified-buffer mode (mode 0)

This is the hard part of the tile. One word travels this path:

```
data_in[p] --> agg_buffer p --(4-word row, input addr_gen p)--> SRAM
SRAM --(row, output addr_gen q)--> transpose_buffer q --> data_out[q]
```

### Aggregation: building rows

Each input port owns an aggregation buffer of four rows of four words. There
is no back-pressure: a word arrives on every cycle that `wen_in[p]` is high.
Two schedules of up to 16 entries set the row order:

- `agg_in_p_in_sched`, with its length `agg_in_p_in_period`, says which row
  the next group of words fills.
- `agg_in_p_out_sched`, with `agg_in_p_out_period`, says which row is written
  to the SRAM next.

A row is offered to the SRAM when it is full. A line-length aligner
(`agg_align_p_line_length`, 0 = off) also closes a row early at the end of
each image line, so a new line always starts at a new SRAM row. Words of a
closed row that were never written are masked out of the SRAM write, so the
old contents survive.

Each row written to the SRAM steps input address generator p. If a word
arrives for a row that is still waiting for the SRAM, the word is dropped and
the buffer's `overflow` pulses. The schedule must give the SRAM time to
drain. With the writers at top priority this happens only while the
configuration bus holds the macros.

### Address generators

Each of the four generators is a nest of up to six loops (`dimensionality`),
with 16-bit `ranges` and `strides` and a `starting_addr`. It produces the row
address `starting_addr + Σ idx[i]·stride[i]`.

- The sum is kept as one running offset per loop, so there is no multiplier.
- A step in cycle t gives the new address in cycle t+1.
- At the end of the nest the generator wraps to its first iteration. An
  input generator keeps going, so a ring of image lines is just its loop
  nest run again.
- An output port stops fetching once its nest has run through. It restarts
  only after `flush`. The output nest must therefore describe the whole
  read schedule. A loop with stride 0 repeats a pattern. For example, a
  double buffer over four frames uses ranges 64, 2, 2 with strides 1, 64, 0.

### Transpose buffers and prefetch

Each output port owns a transpose buffer of two rows, used as a ring. The
prefetcher requests the next row when both of these hold:

- a row slot is free, counting rows already requested;
- at most `pre_fetch_q_input_latency` words remain to be sent.

The default latency of 4 hides the SRAM and arbitration latency, so a port
can send a word on every cycle that `ren_in[q]` is high.

By default a fetched row leaves whole, words 0 to 3 in order. A word
schedule (`tb_word_order[q]`, of type `tb_cfg_t`) can change this:

- It takes only `words_per_row` words from each fetched row.
- The n-th word sent is word `sched[n]` of its row, and the schedule repeats
  every `period` entries.
- Period 0, the reset value, switches the schedule off.

Used together with the output address generator, this reorders a stream word
by word. For example, write eight words into rows 0 and 1. Then read rows
0, 1, 0, 1 (ranges 2, 2 with strides 1, 0), taking one word per row with the
schedule 1, 1, 3, 3. The port sends 1, 5, 3, 7. A row that gives only one
word is used up quickly, so with such schedules the two-row ring cannot keep
one word per cycle: these four words take five cycles.

An output port starts fetching on the first cycle its `ren_in` is high.
Whatever drives `ren_in`, normally the array's schedule, must not ask for
data that have not yet been written. `valid_out[q]` marks the cycles in which
a word leaves. It is registered: a word leaves one cycle after the pop that
produced it.

### Sharing the SRAM port

`accessor_arb` gives the SRAM port to one requester per cycle, in this
fixed priority order:

1. aggregation buffer 0
2. aggregation buffer 1
3. transpose buffer 0
4. transpose buffer 1
5. FIFO controller
6. SRAM-mode controller

Writers come first because they cannot be held back. A requester that loses
keeps its request (a stall). Read data return one cycle after the grant,
tagged for the requester that asked. An assertion checks that at most one
grant is given per cycle.

### Sync groups

`sync_group[q]` is a member mask for output port q. Ports that share a
group bit emit a word only in cycles when all of them are requested and all
of them have a word ready. Their streams therefore stay aligned even when one
port's prefetch is late. A port that waits this way is "held". A port whose
mask shares no bit with another port's runs on its own.

## FIFO mode (mode 1)

Port 0 becomes a queue of up to `fifo_depth` words:

- `wen_in[0]` pushes and `ren_in[0]` pops.
- `empty` and `full` report the fill level, counting every word held.

Words pass through three stages in order: a front row (filling), an SRAM
ring over the whole memory, and a back row (draining). When the SRAM and the
back row are empty, a pop is served straight from the front row. This bypass
means a short queue never waits for the SRAM.

A push while the queue is full is refused. The front row is written to the
SRAM in the same cycle it fills. If that write is not granted, the push is
refused too.

A pop is answered on `data_out[0]`/`valid_out[0]` one cycle later. `valid_out`
stays low when there was nothing to give. This happens when the queue is
empty, or in the one cycle while the back row is refilled from the SRAM.

## SRAM mode (mode 2) and chaining

Port 0 becomes a word-addressed RAM:

- Word address `addr_in[0]` selects row `addr[10:2]` and word `addr[1:0]`.
- A write stores `data_in[0]` through the word mask.
- A read returns the word on `data_out[0]` two cycles after `ren_in[0]`: one
  cycle of SRAM latency and one output register.
- If a write and a read come in the same cycle, the write wins and the read
  is dropped.

Chaining builds a larger memory from several tiles. Address bit 11 then names
the tile:

- A tile with `enable_chain_input` set writes only addresses whose bit 11
  equals its `chain_idx_input`.
- A tile with `enable_chain_output` set reads only addresses whose bit 11
  equals its `chain_idx_output`.

For reads, each tile also forwards words: `data_out` carries
`chain_data_in` in any cycle where the tile has no word of its own and
`chain_valid_in` is set. The tile's own words appear on `chain_data_out`. So
when tile B's `chain_data_out` feeds tile A's `chain_data_in`, A's outputs
carry the reads of both tiles. The chain index is one bit wide, so two tiles
form a 4096-word memory.

## Configuration bus and register map

`MemCore` has one 32-bit configuration bus:
`config_addr_in[9:0]`, `config_data_in`, `config_write`, `config_read` and
`config_data_out`. Read data appear one cycle after `config_read`.

`config_addr_in[9:8]` selects the target:

| [9:8] | target | [7:0] |
|---|---|---|
| 0 | configuration registers | register number |
| 1 | SRAM macro 0 (words 0–1 of a row) | row 0–255 |
| 2 | SRAM macro 1 (words 2–3 of a row) | row 0–255 |

While the bus reaches a macro, the datapath cannot use the SRAM, and
`sram_ready_out` is low. Registers beyond the last one ignore writes and
read as zero. Every register resets to zero, which leaves the tile disabled
(`tile_en` = 0).

There are 36 registers of 32 bits. Register k holds bits [32k+31 : 32k] of the
packed struct `lake_pkg::tile_cfg_t`:

| field | bits | registers |
|---|---|---|
| `mode` | 1136:1135 | 35 |
| `tile_en` | 1134 | 35 |
| `fifo_depth` | 1133:1118 | 34–35 |
| `enable_chain_input` | 1117 | 34 |
| `enable_chain_output` | 1116 | 34 |
| `chain_idx_input` | 1115 | 34 |
| `chain_idx_output` | 1114 | 34 |
| `agg_align_0_line_length` | 1113:1109 | 34 |
| `agg_align_1_line_length` | 1108:1102 | 34 |
| `agg_in_0_in_period` | 1101:1098 | 34 |
| `agg_in_0_in_sched` (16 x 2 bits) | 1097:1066 | 33–34 |
| `agg_in_0_out_period` | 1065:1062 | 33 |
| `agg_in_0_out_sched` | 1061:1030 | 32–33 |
| `agg_in_1_in_period` | 1029:1026 | 32 |
| `agg_in_1_in_sched` | 1025:994 | 31–32 |
| `agg_in_1_out_period` | 993:990 | 30–31 |
| `agg_in_1_out_sched` | 989:958 | 29–30 |
| `pre_fetch_0_input_latency` | 957:942 | 29 |
| `pre_fetch_1_input_latency` | 941:926 | 28–29 |
| `sync_group` (2 x 2 bits) | 925:922 | 28 |
| `input_addr_gen[1]` (`ag_cfg_t`, 211 bits) | 921:711 | 22–28 |
| `input_addr_gen[0]` | 710:500 | 15–22 |
| `output_addr_gen[1]` | 499:289 | 9–15 |
| `output_addr_gen[0]` | 288:78 | 2–9 |
| `tb_word_order[1]` (`tb_cfg_t`, 39 bits) | 77:39 | 1–2 |
| `tb_word_order[0]` | 38:0 | 0–1 |

Inside `ag_cfg_t`, from the most significant end, the fields are:

- `dimensionality` (3 bits);
- `ranges[5..0]` (16 bits each);
- `strides[5..0]` (16 bits each);
- `starting_addr` (16 bits).

Inside `tb_cfg_t`, from the most significant end, the fields are:

- `words_per_row` (3 bits);
- `period` (4 bits);
- `sched[15..0]` (2 bits each).

The simplest way to build a configuration is as in the testbenches. Fill a
`tile_cfg_t` variable, cast it to a vector, and write the 32-bit slices.

## Clocking and reset

Everything is on one clock edge. `rst_n` is an asynchronous, active-low reset
of all control state. The SRAM contents are not reset.

- `clk_en` gates every register.
- `tile_en` gates the datapath.
- `flush` restarts the schedules, address generators and buffers without
  touching the configuration.

## Measured behaviour

All figures come from the testbenches at the default sizes.

| case | result |
|---|---|
| Identity stream, N x N image into port 0, port 0 reading from the 9th pixel | N² + 13 cycles from the first pixel in to the last pixel out (N = 8 … 52) |
| 3x3-convolution line buffer, N x N image, port 0 one line behind, port 1 two lines behind | N² + 2N + 5 cycles (N = 8 … 52), using a ring of 4 lines (4N words) |
| Word reordering, eight words read back as 1, 5, 3, 7 | four words in five cycles once the port has started |
| Double buffer, four 16x16 frames in two SRAM regions, read one frame behind | last pixel out 1285 cycles after the first pixel in (1024 + 256 + 5) |
| Two input and two output streams at once in unified-buffer mode | 64 words leave port 0 in 74 cycles |
| SRAM-mode read | data two cycles after `ren_in` |
| FIFO pop | data one cycle after `ren_in` |

In the two-stream case, the single SRAM port is exactly saturated: four
streams at a quarter of a row per cycle each. Any extra access, such as a
partial row at a line end, costs a cycle.

## Where this design departs from the original tile, or fills gaps

Only the outside of the tile is fixed by the published description:

- the port list and widths;
- the names and widths of the configuration fields;
- the sizes: 2+2 ports, 16-bit words, a 4-word fetch, 2 x 512 x 32 macros,
  and 6-loop 16-bit address generators;
- the three modes, chaining, and the split into aggregation buffer, SRAM and
  transpose buffer.

The insides are this design's own:

- fixed-priority arbitration;
- the drop-on-overflow policy and the write mask of the aggregation buffer;
- the prefetch rule, the two-row depth and the word schedules of the transpose buffers;
- the FIFO's front/back-row structure and bypass;
- the SRAM-mode address split, the tile bit and write-over-read;
- the member-mask reading of `sync_group`;
- the wrap-around of the address generators;
- the configuration register map and bus target field;
- the `mode` encoding (0 = unified buffer, as in the published constraints;
  1 = FIFO and 2 = SRAM are assumed).

Further points:

- **Configuration data width.** The interface list prints
  `config_data_in` as 16 bits in one place and 32 bits in another. This
  design uses 32 bits, the width of a macro.
- **Bus reach into the SRAM.** The bus row address is 8 bits, as in the
  interface list, so it reaches rows 0–255 of each macro. Rows 256–511 are
  reached only through the datapath, for example in SRAM mode.
- **Identity-stream timing.** The original tile's identity stream produces
  its first output at cycle 8 and lasts N² + 7 cycles. This RTL lasts
  N² + 13 cycles, six cycles more. A row must be complete and written before
  it can be fetched, and the output is registered.
- **Transpose-buffer word schedules.** The original tile draws address
  generators inside its transpose buffers but does not publish their
  settings. The word schedule described above is this design's own
  stand-in, in the style of the aggregation schedules.
- **Not included.** The connection and switch boxes of the array are not
  included. Neither is the configuration solver that derives register values
  from input and output traces: it is software.

## Simulating

Any simulator with SystemVerilog-2017 support should do. With Verilator 5,
from the repository root, run:

```
verilator --binary --timing --top-module tb_MemCore -y rtl rtl/lake_pkg.sv tb/tb_MemCore.sv
./obj_dir/Vtb_MemCore
```

Replace `tb_MemCore` with any testbench below. Each prints
`TB_RESULT checks=<n> failures=<n>` and stops. Each also has a watchdog that
counts a failure if the run hangs. With no timescale the time unit is 1 ps,
so "35 ns" at the end of a run means 3500 clock cycles.

| testbench | what it covers |
|---|---|
| `tb_MemCore` | end to end, at default sizes. Two chained cores configured only through the bus; SRAM preload over the bus; unified buffer with two streams, line alignment, sync-group holds, arbiter stalls and an overflow; FIFO against a software queue (full, empty, bypass); chained SRAM mode. Fails if any of these never happens. |
| `tb_LakeTop` | the same phases on `LakeTop` with the configuration on ports |
| `tb_conv33_linebuffer` | line buffer for a 3x3 convolution, and identity streams, for 8x8 … 52x52 images; a double buffer over four 16x16 frames |
| `tb_cfg_space` | register writes and reads, out-of-range addresses, field placement |
| `tb_addr_gen`, `tb_agg_buffer`, `tb_transpose_buffer`, `tb_accessor_arb`, `tb_sync_groups`, `tb_fifo_ctrl`, `tb_sram_mode_ctrl`, `tb_storage_buffer`, `tb_sram_macro` | each unit alone, against a reference model in the testbench |

The testbenches never depend on power-up values. They reset the design and
gate their monitors with `rst_n`, so they also pass with random initial
state (`+verilator+rand+reset+2`).

## Changing the design

- The sizes live in `lake_pkg`: `DATA_W`, `FETCH_W`, `MACRO_DEPTH`,
  `MACRO_W`, `NUM_MACROS`, `AG_DIMS`, `AG_W`, `AGG_HEIGHT`, `SCHED_LEN` and
  `NUM_PORTS`.
- The configuration struct and the register map follow from these sizes.
  `CFG_WORDS` is computed from `$bits(tile_cfg_t)`.
- The FIFO and the SRAM mode use port 0 only.
- The requester order of the arbiter is set where `LakeTop` builds its
  request array.
