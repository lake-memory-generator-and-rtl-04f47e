// sram_mode_ctrl: random-access (SRAM) mode of the memory tile, with chaining.
//
// Makes the tile a plain memory of 16-bit words: a word address selects a
// SRAM row (address / FETCH_W) and a word within it. A write drives one word
// through the row's word mask; a read fetches the row and returns the
// addressed word one cycle later. For chaining, several tiles share an address
// space: the address bit just above the local range names the tile, and with
// enable_chain_input (writes) or enable_chain_output (reads) set, a tile acts
// only on addresses whose tile bit equals its chain_idx_input / chain_idx_output.
// If wen and ren come together the write is done and the read is dropped.
// The request is combinational: its row address is a slice of addr, and the
// write data is data_in copied into all four word lanes (the mask picks one),
// so most request bits are wired straight from inputs.
//
// The document names the mode and the chain_* configuration fields; the
// address split, the tile bit and the write-over-read rule are this design's
// own choices.
module sram_mode_ctrl
  import lake_pkg::*;
#(
  parameter int unsigned FW = FETCH_W
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       clk_en,
  input  logic                       enable,
  input  logic                       wen,
  input  logic                       ren,
  input  logic [AG_W-1:0]            addr,
  input  logic [DATA_W-1:0]          data_in,
  input  logic                       enable_chain_input,
  input  logic                       enable_chain_output,
  input  logic                       chain_idx_input,
  input  logic                       chain_idx_output,
  output sram_req_t                  req,
  input  logic                       ret_valid,
  input  logic [FW-1:0][DATA_W-1:0]  ret_data,
  output logic                       rd_valid,
  output logic [DATA_W-1:0]          rd_data
);

  localparam int unsigned AW     = $clog2(MACRO_DEPTH);
  localparam int unsigned WW     = $clog2(FW);
  localparam int unsigned TILE_B = AW + WW;        // tile-select bit of the word address

  logic          wr_hit, rd_hit;
  logic [WW-1:0] sel_q;

  always_comb begin
    wr_hit = enable && wen &&
             (!enable_chain_input  || (addr[TILE_B] == chain_idx_input));
    rd_hit = enable && ren && !wen &&
             (!enable_chain_output || (addr[TILE_B] == chain_idx_output));
    req       = '0;
    req.req   = wr_hit || rd_hit;
    req.wr    = wr_hit;
    req.addr  = addr[WW +: AW];
    req.wmask = FW'(1) << addr[WW-1:0];
    for (int w = 0; w < int'(FW); w++) req.wdata[w] = data_in;
    rd_valid  = ret_valid;
    rd_data   = ret_data[sel_q];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                sel_q <= '0;
    else if (clk_en && rd_hit) sel_q <= addr[WW-1:0];
  end

endmodule
