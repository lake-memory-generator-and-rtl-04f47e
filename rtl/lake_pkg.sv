// lake_pkg: types and constants shared by the Lake memory tile.
//
// The memory tile streams 16-bit words through a wide-fetch SRAM. Four words
// (one 64-bit row, made of two 512x32 macros side by side) are moved per SRAM
// access. The nested-loop address generators have six loop levels with 16-bit
// counters. Those numbers follow the tile as taped out; the mode encoding and
// the struct layouts are this design's own choices.
package lake_pkg;

  localparam int unsigned DATA_W      = 16;  // word width of every data port
  localparam int unsigned FETCH_W     = 4;   // words per SRAM row (wide fetch)
  localparam int unsigned MACRO_DEPTH = 512; // rows per SRAM macro
  localparam int unsigned MACRO_W     = 32;  // bits per SRAM macro
  localparam int unsigned NUM_MACROS  = 2;
  localparam int unsigned AG_DIMS     = 6;   // nested loops per address generator
  localparam int unsigned AG_W        = 16;  // counter / stride / address width
  localparam int unsigned AGG_HEIGHT  = 4;   // rows per aggregation buffer
  localparam int unsigned SCHED_LEN   = 16;  // entries of an aggregation schedule
  localparam int unsigned NUM_PORTS   = 2;   // input ports and output ports of the tile

  // Tile operating mode (the "mode" configuration field).
  typedef enum logic [1:0] {
    MODE_UB   = 2'd0,   // unified buffer: agg -> SRAM -> tb streams
    MODE_FIFO = 2'd1,   // first-in first-out queue
    MODE_SRAM = 2'd2    // random access by address
  } mode_e;

  // Configuration of one nested-loop address generator. Loop 0 is innermost.
  // A loop of range R runs its index 0..R-1; address = start + sum(idx*stride).
  typedef struct packed {
    logic [2:0]                       dimensionality; // loops in use, 1..6
    logic [AG_DIMS-1:0][AG_W-1:0]     ranges;
    logic [AG_DIMS-1:0][AG_W-1:0]     strides;
    logic [AG_W-1:0]                  starting_addr;
  } ag_cfg_t;

  // Configuration of one aggregation buffer.
  typedef struct packed {
    logic [AG_W-1:0]                  line_length; // words per line; 0 = no alignment
    logic [3:0]                       in_period;   // schedule length, 1..15
    logic [SCHED_LEN-1:0][1:0]        in_sched;    // row filled by the n-th group
    logic [3:0]                       out_period;
    logic [SCHED_LEN-1:0][1:0]        out_sched;   // row drained by the n-th write
  } agg_cfg_t;

  // Word order of one transpose buffer. With period 0 every fetched row is
  // sent whole, words 0..FETCH_W-1. Otherwise each fetched row gives
  // words_per_row words (0 = FETCH_W), and the n-th word sent is word
  // sched[n] of its row, the schedule repeating every `period` entries.
  typedef struct packed {
    logic [$clog2(FETCH_W):0]         words_per_row;
    logic [3:0]                       period;
    logic [SCHED_LEN-1:0][1:0]        sched;
  } tb_cfg_t;

  // One request to the single SRAM port, one row wide.
  typedef struct packed {
    logic                             req;
    logic                             wr;      // 1 = write, 0 = read
    logic [$clog2(MACRO_DEPTH)-1:0]   addr;    // row address
    logic [FETCH_W-1:0]               wmask;   // words written
    logic [FETCH_W-1:0][DATA_W-1:0]   wdata;
  } sram_req_t;

  // Every configuration field of one tile, in the order of the tile's
  // register list. The configuration space stores this struct as 32-bit
  // words, word k holding bits [32k +: 32].
  typedef struct packed {
    logic [1:0]                       mode;
    logic                             tile_en;
    logic [15:0]                      fifo_depth;
    logic                             enable_chain_input;
    logic                             enable_chain_output;
    logic                             chain_idx_input;
    logic                             chain_idx_output;
    logic [4:0]                       agg_align_0_line_length;
    logic [6:0]                       agg_align_1_line_length;
    logic [3:0]                       agg_in_0_in_period;
    logic [SCHED_LEN-1:0][1:0]        agg_in_0_in_sched;
    logic [3:0]                       agg_in_0_out_period;
    logic [SCHED_LEN-1:0][1:0]        agg_in_0_out_sched;
    logic [3:0]                       agg_in_1_in_period;
    logic [SCHED_LEN-1:0][1:0]        agg_in_1_in_sched;
    logic [3:0]                       agg_in_1_out_period;
    logic [SCHED_LEN-1:0][1:0]        agg_in_1_out_sched;
    logic [AG_W-1:0]                  pre_fetch_0_input_latency;
    logic [AG_W-1:0]                  pre_fetch_1_input_latency;
    logic [NUM_PORTS-1:0][1:0]        sync_group;
    ag_cfg_t [NUM_PORTS-1:0]          input_addr_gen;
    ag_cfg_t [NUM_PORTS-1:0]          output_addr_gen;
    tb_cfg_t [NUM_PORTS-1:0]          tb_word_order;
  } tile_cfg_t;

  localparam int unsigned CFG_BITS  = $bits(tile_cfg_t);
  localparam int unsigned CFG_WORDS = (CFG_BITS + 31) / 32;

endpackage
