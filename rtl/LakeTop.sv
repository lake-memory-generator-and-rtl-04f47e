// LakeTop: the Lake memory tile core, in its taped-out shape of two input and
// two output ports of 16-bit words around one wide-fetch SRAM.
//
// Three modes share the storage (mode field, see lake_pkg::mode_e):
//  * Unified buffer (0). Each input stream fills an aggregation buffer
//    (serial in, parallel out); full rows are written to the SRAM at the
//    addresses of that port's input address generator. Each output port
//    prefetches rows through its output address generator into a transpose
//    buffer (parallel in, serial out) and sends one word per cycle while its
//    ren_in bit is high; a word schedule (strg_ub_tb_word_order) can pick and
//    reorder the words of each row. Output ports of one sync group send together.
//    An output port starts fetching at the first cycle its ren_in is high, so
//    the schedule driving ren_in must not ask for data before it is written.
//  * FIFO (1). Port 0 is a queue of up to fifo_ctrl_fifo_depth words; wen_in[0]
//    pushes, ren_in[0] pops, empty and full report the fill level.
//  * SRAM (2). Port 0 is a word-addressed memory at addr_in[0]: wen_in[0]
//    writes data_in[0], ren_in[0] reads into data_out[0] one cycle later.
// The single SRAM port is shared by an arbiter (writers first). Chaining
// joins tiles: in SRAM mode the address bit above the local range selects
// the tile (chain_idx_*), and with enable_chain_output a tile's data_out
// forwards chain_data_in when it has no word of its own. Its own words
// also leave on chain_data_out for the next tile. The configuration bus
// (config_*) reads and writes the two SRAM macros directly.
//
// Timing: data_out / valid_out are registered, one cycle after the pop that
// produced them. clk_en and tile_en gate every register; flush clears the
// datapath state but not the configuration. Port names and widths follow
// the tile's interface list; the insides of every unit, the arbitration, the
// mode encoding, the address-generator configuration structs and the word
// schedules are this design's own.
module LakeTop
  import lake_pkg::*;
(
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic                               clk_en,
  input  logic                               tile_en,
  input  logic                               flush,
  input  logic [1:0]                         mode,
  // data ports
  input  logic [NUM_PORTS-1:0][DATA_W-1:0]       data_in,
  input  logic [NUM_PORTS-1:0]                   wen_in,
  input  logic [NUM_PORTS-1:0]                   ren_in,
  input  logic [NUM_PORTS-1:0][AG_W-1:0]         addr_in,
  output logic [NUM_PORTS-1:0][DATA_W-1:0]       data_out,
  output logic [NUM_PORTS-1:0]                   valid_out,
  output logic                               empty,
  output logic                               full,
  output logic                               sram_ready_out,
  // chaining
  input  logic                               enable_chain_input,
  input  logic                               enable_chain_output,
  input  logic                               chain_idx_input,
  input  logic                               chain_idx_output,
  input  logic [NUM_PORTS-1:0][DATA_W-1:0]       chain_data_in,
  input  logic [NUM_PORTS-1:0]                   chain_valid_in,
  output logic [NUM_PORTS-1:0][DATA_W-1:0]       chain_data_out,
  output logic [NUM_PORTS-1:0]                   chain_valid_out,
  // configuration bus to the SRAM macros
  input  logic [NUM_MACROS-1:0]              config_en,
  input  logic                               config_read,
  input  logic                               config_write,
  input  logic [7:0]                         config_addr_in,
  input  logic [MACRO_W-1:0]                 config_data_in,
  output logic [NUM_MACROS-1:0][MACRO_W-1:0] config_data_out,
  // configuration registers
  input  logic [15:0]                        fifo_ctrl_fifo_depth,
  input  logic [4:0]                         strg_ub_agg_align_0_line_length,
  input  logic [6:0]                         strg_ub_agg_align_1_line_length,
  input  logic [3:0]                         strg_ub_agg_in_0_in_period,
  input  logic [SCHED_LEN-1:0][1:0]          strg_ub_agg_in_0_in_sched,
  input  logic [3:0]                         strg_ub_agg_in_0_out_period,
  input  logic [SCHED_LEN-1:0][1:0]          strg_ub_agg_in_0_out_sched,
  input  logic [3:0]                         strg_ub_agg_in_1_in_period,
  input  logic [SCHED_LEN-1:0][1:0]          strg_ub_agg_in_1_in_sched,
  input  logic [3:0]                         strg_ub_agg_in_1_out_period,
  input  logic [SCHED_LEN-1:0][1:0]          strg_ub_agg_in_1_out_sched,
  input  logic [AG_W-1:0]                    strg_ub_pre_fetch_0_input_latency,
  input  logic [AG_W-1:0]                    strg_ub_pre_fetch_1_input_latency,
  input  logic [NUM_PORTS-1:0][1:0]              strg_ub_sync_grp_sync_group,
  input  ag_cfg_t [NUM_PORTS-1:0]                strg_ub_input_addr_gen,
  input  ag_cfg_t [NUM_PORTS-1:0]                strg_ub_output_addr_gen,
  input  tb_cfg_t [NUM_PORTS-1:0]                strg_ub_tb_word_order
);

  // Requesters of the SRAM port, highest priority first.
  localparam int unsigned R_AGG  = 0;           // NUM_PORTS aggregation-buffer writers
  localparam int unsigned R_TB   = NUM_PORTS;       // NUM_PORTS transpose-buffer readers
  localparam int unsigned R_FIFO = 2 * NUM_PORTS;
  localparam int unsigned R_SRAM = 2 * NUM_PORTS + 1;
  localparam int unsigned NREQ   = 2 * NUM_PORTS + 2;
  localparam int unsigned AW     = $clog2(MACRO_DEPTH);

  logic en, ub, fifo_m, sram_m;
  assign en     = clk_en && tile_en;
  assign ub     = (mode == MODE_UB);
  assign fifo_m = (mode == MODE_FIFO);
  assign sram_m = (mode == MODE_SRAM);

  sram_req_t [NREQ-1:0]               reqs;
  logic      [NREQ-1:0]               grant, ret_valid;
  sram_req_t                          sram_req;
  logic [FETCH_W-1:0][DATA_W-1:0]     rdata;
  logic                               rvalid, arb_stall;

  // ---------------- unified buffer: input side ----------------
  agg_cfg_t  [NUM_PORTS-1:0]              agg_cfg;
  logic      [NUM_PORTS-1:0]              agg_valid, agg_overflow;
  logic      [NUM_PORTS-1:0][FETCH_W-1:0][DATA_W-1:0] agg_data;
  logic      [NUM_PORTS-1:0][FETCH_W-1:0] agg_mask;
  logic      [NUM_PORTS-1:0][AG_W-1:0]    in_addr;
  logic      [NUM_PORTS-1:0]              in_last, in_done;

  always_comb begin
    agg_cfg = '0;
    agg_cfg[0].line_length = AG_W'(strg_ub_agg_align_0_line_length);
    agg_cfg[0].in_period   = strg_ub_agg_in_0_in_period;
    agg_cfg[0].in_sched    = strg_ub_agg_in_0_in_sched;
    agg_cfg[0].out_period  = strg_ub_agg_in_0_out_period;
    agg_cfg[0].out_sched   = strg_ub_agg_in_0_out_sched;
    agg_cfg[1].line_length = AG_W'(strg_ub_agg_align_1_line_length);
    agg_cfg[1].in_period   = strg_ub_agg_in_1_in_period;
    agg_cfg[1].in_sched    = strg_ub_agg_in_1_in_sched;
    agg_cfg[1].out_period  = strg_ub_agg_in_1_out_period;
    agg_cfg[1].out_sched   = strg_ub_agg_in_1_out_sched;
  end

  for (genvar p = 0; p < int'(NUM_PORTS); p++) begin : g_in
    agg_buffer u_agg (
      .clk      (clk),
      .rst_n    (rst_n),
      .clk_en   (en),
      .flush    (flush),
      .cfg      (agg_cfg[p]),
      .wen      (ub && wen_in[p]),
      .data_in  (data_in[p]),
      .row_valid(agg_valid[p]),
      .row_data (agg_data[p]),
      .row_mask (agg_mask[p]),
      .row_ack  (grant[R_AGG + p]),
      .overflow (agg_overflow[p])
    );

    addr_gen u_in_ag (
      .clk           (clk),
      .rst_n         (rst_n),
      .clk_en        (en),
      .restart       (flush),
      .dimensionality(strg_ub_input_addr_gen[p].dimensionality),
      .ranges        (strg_ub_input_addr_gen[p].ranges),
      .strides       (strg_ub_input_addr_gen[p].strides),
      .starting_addr (strg_ub_input_addr_gen[p].starting_addr),
      .step          (grant[R_AGG + p]),
      .addr          (in_addr[p]),
      .last          (in_last[p]),
      .done          (in_done[p])
    );

    always_comb begin
      reqs[R_AGG + p]       = '0;
      reqs[R_AGG + p].req   = ub && agg_valid[p];
      reqs[R_AGG + p].wr    = 1'b1;
      reqs[R_AGG + p].addr  = in_addr[p][AW-1:0];
      reqs[R_AGG + p].wmask = agg_mask[p];
      reqs[R_AGG + p].wdata = agg_data[p];
    end
  end

  // ---------------- unified buffer: output side ----------------
  logic [NUM_PORTS-1:0]              started, tb_req, tb_avail, go, held;
  logic [NUM_PORTS-1:0][DATA_W-1:0]  tb_word;
  logic [NUM_PORTS-1:0][AG_W-1:0]    out_addr;
  logic [NUM_PORTS-1:0]              out_last, out_done;
  logic [NUM_PORTS-1:0][AG_W-1:0]    latency;

  assign latency[0] = strg_ub_pre_fetch_0_input_latency;
  assign latency[1] = strg_ub_pre_fetch_1_input_latency;

  for (genvar q = 0; q < int'(NUM_PORTS); q++) begin : g_out
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)      started[q] <= 1'b0;
      else if (en) begin
        if (flush)                     started[q] <= 1'b0;
        else if (ub && ren_in[q])      started[q] <= 1'b1;
      end
    end

    addr_gen u_out_ag (
      .clk           (clk),
      .rst_n         (rst_n),
      .clk_en        (en),
      .restart       (flush),
      .dimensionality(strg_ub_output_addr_gen[q].dimensionality),
      .ranges        (strg_ub_output_addr_gen[q].ranges),
      .strides       (strg_ub_output_addr_gen[q].strides),
      .starting_addr (strg_ub_output_addr_gen[q].starting_addr),
      .step          (grant[R_TB + q]),
      .addr          (out_addr[q]),
      .last          (out_last[q]),
      .done          (out_done[q])
    );

    transpose_buffer u_tb (
      .clk          (clk),
      .rst_n        (rst_n),
      .clk_en       (en),
      .flush        (flush),
      .fetch_en     (ub && started[q] && !out_done[q]),
      .input_latency(latency[q]),
      .order        (strg_ub_tb_word_order[q]),
      .fetch_req    (tb_req[q]),
      .fetch_ack    (grant[R_TB + q]),
      .row_in_valid (ret_valid[R_TB + q]),
      .row_in       (rdata),
      .word_avail   (tb_avail[q]),
      .word_out     (tb_word[q]),
      .pop          (go[q])
    );

    always_comb begin
      reqs[R_TB + q]      = '0;
      reqs[R_TB + q].req  = tb_req[q];
      reqs[R_TB + q].addr = out_addr[q][AW-1:0];
    end
  end

  sync_groups #(.PORTS(NUM_PORTS), .GROUPS(2)) u_sync (
    .member(strg_ub_sync_grp_sync_group),
    .ren   (ub ? ren_in : '0),
    .avail (tb_avail),
    .go    (go),
    .held  (held)
  );

  // ---------------- FIFO mode ----------------
  logic              fifo_gnt, fifo_pop_valid;
  logic [DATA_W-1:0] fifo_pop_data;

  fifo_ctrl u_fifo (
    .clk       (clk),
    .rst_n     (rst_n),
    .clk_en    (en),
    .flush     (flush),
    .enable    (fifo_m),
    .fifo_depth(fifo_ctrl_fifo_depth),
    .push      (wen_in[0]),
    .push_data (data_in[0]),
    .pop       (ren_in[0]),
    .pop_valid (fifo_pop_valid),
    .pop_data  (fifo_pop_data),
    .empty     (empty),
    .full      (full),
    .req       (reqs[R_FIFO]),
    .gnt       (fifo_gnt),
    .ret_valid (ret_valid[R_FIFO]),
    .ret_data  (rdata)
  );
  assign fifo_gnt = grant[R_FIFO];

  // ---------------- SRAM mode ----------------
  logic              sram_rd_valid;
  logic [DATA_W-1:0] sram_rd_data;

  sram_mode_ctrl u_sram_mode (
    .clk                (clk),
    .rst_n              (rst_n),
    .clk_en             (en),
    .enable             (sram_m),
    .wen                (wen_in[0]),
    .ren                (ren_in[0]),
    .addr               (addr_in[0]),
    .data_in            (data_in[0]),
    .enable_chain_input (enable_chain_input),
    .enable_chain_output(enable_chain_output),
    .chain_idx_input    (chain_idx_input),
    .chain_idx_output   (chain_idx_output),
    .req                (reqs[R_SRAM]),
    .ret_valid          (ret_valid[R_SRAM]),
    .ret_data           (rdata),
    .rd_valid           (sram_rd_valid),
    .rd_data            (sram_rd_data)
  );

  // ---------------- shared SRAM ----------------
  accessor_arb #(.NREQ(NREQ)) u_arb (
    .clk       (clk),
    .rst_n     (rst_n),
    .clk_en    (en),
    .port_ready(sram_ready_out),
    .reqs      (reqs),
    .grant     (grant),
    .sram_req  (sram_req),
    .ret_valid (ret_valid),
    .stall     (arb_stall)
  );

  storage_buffer u_storage (
    .clk            (clk),
    .rst_n          (rst_n),
    .clk_en         (clk_en),
    .req            (sram_req),
    .rdata          (rdata),
    .rvalid         (rvalid),
    .ready          (sram_ready_out),
    .config_en      (config_en),
    .config_read    (config_read),
    .config_write   (config_write),
    .config_addr_in (config_addr_in),
    .config_data_in (config_data_in),
    .config_data_out(config_data_out)
  );

  // ---------------- output registers and chaining ----------------
  logic [NUM_PORTS-1:0][DATA_W-1:0] own_data;
  logic [NUM_PORTS-1:0]             own_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      own_data  <= '0;
      own_valid <= '0;
    end else if (en) begin
      for (int q = 0; q < int'(NUM_PORTS); q++) begin
        own_valid[q] <= 1'b0;
        if (ub && go[q]) begin
          own_data[q]  <= tb_word[q];
          own_valid[q] <= 1'b1;
        end
      end
      if (fifo_m && fifo_pop_valid) begin
        own_data[0]  <= fifo_pop_data;
        own_valid[0] <= 1'b1;
      end
      if (sram_m && sram_rd_valid) begin
        own_data[0]  <= sram_rd_data;
        own_valid[0] <= 1'b1;
      end
    end
  end

  always_comb begin
    for (int q = 0; q < int'(NUM_PORTS); q++) begin
      if (enable_chain_output && !own_valid[q] && chain_valid_in[q]) begin
        data_out[q]  = chain_data_in[q];
        valid_out[q] = 1'b1;
      end else begin
        data_out[q]  = own_data[q];
        valid_out[q] = own_valid[q];
      end
    end
    chain_data_out  = own_data;
    chain_valid_out = own_valid;
  end

endmodule
