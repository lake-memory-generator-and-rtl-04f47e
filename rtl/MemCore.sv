// MemCore: the complete memory core of a Lake tile: configuration space plus
// the LakeTop datapath with its SRAM.
//
// Everything the tile holds except the array interconnect. One 32-bit
// configuration bus reaches both the configuration registers and the SRAM
// macros; config_addr_in[9:8] selects the target:
//   0  configuration registers (cfg_space, register k = bits [32k +: 32] of
//      lake_pkg::tile_cfg_t),
//   1  SRAM macro 0, row config_addr_in[7:0] (words 0-1 of a storage row),
//   2  SRAM macro 1, row config_addr_in[7:0] (words 2-3 of a storage row).
// Read data appear on config_data_out one cycle after config_read. While the
// bus reaches a macro the datapath cannot use the SRAM (sram_ready_out low).
// The data, control and chaining ports are those of LakeTop; see there for
// the three modes and their timing. The document gives the split into
// configuration space, core logic and SRAM macros; the bus address map is
// this design's own.
module MemCore
  import lake_pkg::*;
(
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic                               clk_en,
  input  logic                               flush,
  // data ports
  input  logic [NUM_PORTS-1:0][DATA_W-1:0]   data_in,
  input  logic [NUM_PORTS-1:0]               wen_in,
  input  logic [NUM_PORTS-1:0]               ren_in,
  input  logic [NUM_PORTS-1:0][AG_W-1:0]     addr_in,
  output logic [NUM_PORTS-1:0][DATA_W-1:0]   data_out,
  output logic [NUM_PORTS-1:0]               valid_out,
  output logic                               empty,
  output logic                               full,
  output logic                               sram_ready_out,
  // chaining
  input  logic [NUM_PORTS-1:0][DATA_W-1:0]   chain_data_in,
  input  logic [NUM_PORTS-1:0]               chain_valid_in,
  output logic [NUM_PORTS-1:0][DATA_W-1:0]   chain_data_out,
  output logic [NUM_PORTS-1:0]               chain_valid_out,
  // configuration bus
  input  logic [9:0]                         config_addr_in,
  input  logic [31:0]                        config_data_in,
  input  logic                               config_read,
  input  logic                               config_write,
  output logic [31:0]                        config_data_out
);

  tile_cfg_t                         cfg;
  logic                              reg_sel;
  logic [NUM_MACROS-1:0]             mem_sel;
  logic [1:0]                        sel_q;
  logic [31:0]                       reg_rdata;
  logic [NUM_MACROS-1:0][MACRO_W-1:0] mem_rdata;

  assign reg_sel    = (config_addr_in[9:8] == 2'd0);
  assign mem_sel[0] = (config_addr_in[9:8] == 2'd1) && (config_read || config_write);
  assign mem_sel[1] = (config_addr_in[9:8] == 2'd2) && (config_read || config_write);

  cfg_space #(.ADDR_W(8)) u_cfg (
    .clk  (clk),
    .rst_n(rst_n),
    .write(config_write && reg_sel),
    .read (config_read && reg_sel),
    .addr (config_addr_in[7:0]),
    .wdata(config_data_in),
    .rdata(reg_rdata),
    .cfg  (cfg)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)           sel_q <= '0;
    else if (config_read) sel_q <= config_addr_in[9:8];
  end

  always_comb begin
    unique case (sel_q)
      2'd1:    config_data_out = mem_rdata[0];
      2'd2:    config_data_out = mem_rdata[1];
      default: config_data_out = reg_rdata;
    endcase
  end

  LakeTop u_lake (
    .clk                              (clk),
    .rst_n                            (rst_n),
    .clk_en                           (clk_en),
    .tile_en                          (cfg.tile_en),
    .flush                            (flush),
    .mode                             (cfg.mode),
    .data_in                          (data_in),
    .wen_in                           (wen_in),
    .ren_in                           (ren_in),
    .addr_in                          (addr_in),
    .data_out                         (data_out),
    .valid_out                        (valid_out),
    .empty                            (empty),
    .full                             (full),
    .sram_ready_out                   (sram_ready_out),
    .enable_chain_input               (cfg.enable_chain_input),
    .enable_chain_output              (cfg.enable_chain_output),
    .chain_idx_input                  (cfg.chain_idx_input),
    .chain_idx_output                 (cfg.chain_idx_output),
    .chain_data_in                    (chain_data_in),
    .chain_valid_in                   (chain_valid_in),
    .chain_data_out                   (chain_data_out),
    .chain_valid_out                  (chain_valid_out),
    .config_en                        (mem_sel),
    .config_read                      (config_read),
    .config_write                     (config_write),
    .config_addr_in                   (config_addr_in[7:0]),
    .config_data_in                   (config_data_in),
    .config_data_out                  (mem_rdata),
    .fifo_ctrl_fifo_depth             (cfg.fifo_depth),
    .strg_ub_agg_align_0_line_length  (cfg.agg_align_0_line_length),
    .strg_ub_agg_align_1_line_length  (cfg.agg_align_1_line_length),
    .strg_ub_agg_in_0_in_period       (cfg.agg_in_0_in_period),
    .strg_ub_agg_in_0_in_sched        (cfg.agg_in_0_in_sched),
    .strg_ub_agg_in_0_out_period      (cfg.agg_in_0_out_period),
    .strg_ub_agg_in_0_out_sched       (cfg.agg_in_0_out_sched),
    .strg_ub_agg_in_1_in_period       (cfg.agg_in_1_in_period),
    .strg_ub_agg_in_1_in_sched        (cfg.agg_in_1_in_sched),
    .strg_ub_agg_in_1_out_period      (cfg.agg_in_1_out_period),
    .strg_ub_agg_in_1_out_sched       (cfg.agg_in_1_out_sched),
    .strg_ub_pre_fetch_0_input_latency(cfg.pre_fetch_0_input_latency),
    .strg_ub_pre_fetch_1_input_latency(cfg.pre_fetch_1_input_latency),
    .strg_ub_sync_grp_sync_group      (cfg.sync_group),
    .strg_ub_input_addr_gen           (cfg.input_addr_gen),
    .strg_ub_output_addr_gen          (cfg.output_addr_gen),
    .strg_ub_tb_word_order            (cfg.tb_word_order)
  );

endmodule
