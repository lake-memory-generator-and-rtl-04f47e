// storage_buffer: the tile's wide-fetch SRAM, built from two 512x32 macros.
//
// The two macros sit side by side and share one row address, so one access
// moves a 64-bit row of four 16-bit words: macro 0 holds words 0 and 1 of a
// row, macro 1 words 2 and 3. The datapath reaches the row through a single
// request (`req`, see lake_pkg::sram_req_t). The configuration bus reaches
// each macro on its own (config_en[m] selects macro m) so the memory can be
// preloaded and read back 32 bits at a time; while any config_en bit is set
// the bus owns the macros and `ready` is low.
//
// Timing: read data (rdata, config_data_out) is valid the cycle after the
// access; rvalid marks a datapath read. Two macros of 512x32 follow the
// document; the word-to-macro mapping and the bus behaviour are this design's
// own choices.
module storage_buffer
  import lake_pkg::*;
#(
  parameter int unsigned CFG_AW = 8,
  localparam int unsigned AW    = $clog2(MACRO_DEPTH)
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              clk_en,
  input  sram_req_t                         req,
  output logic [FETCH_W-1:0][DATA_W-1:0]    rdata,
  output logic                              rvalid,
  output logic                              ready,
  // configuration-bus access to the macros
  input  logic [NUM_MACROS-1:0]             config_en,
  input  logic                              config_read,
  input  logic                              config_write,
  input  logic [CFG_AW-1:0]                 config_addr_in,
  input  logic [MACRO_W-1:0]                config_data_in,
  output logic [NUM_MACROS-1:0][MACRO_W-1:0] config_data_out
);

  localparam int unsigned WPM = FETCH_W / NUM_MACROS; // words per macro

  logic                  cfg_mode;
  logic [NUM_MACROS-1:0] m_cen, m_wen;
  logic [AW-1:0]         m_addr [NUM_MACROS];
  logic [WPM-1:0]        m_mask [NUM_MACROS];
  logic [MACRO_W-1:0]    m_din  [NUM_MACROS];
  logic [MACRO_W-1:0]    m_dout [NUM_MACROS];

  assign cfg_mode = |config_en;
  assign ready    = !cfg_mode;

  always_comb begin
    for (int m = 0; m < int'(NUM_MACROS); m++) begin
      if (cfg_mode) begin
        m_cen[m]  = clk_en && config_en[m] && (config_read || config_write);
        m_wen[m]  = config_write;
        m_addr[m] = AW'(config_addr_in);
        m_mask[m] = '1;
        m_din[m]  = config_data_in;
      end else begin
        m_cen[m]  = clk_en && req.req;
        m_wen[m]  = req.wr;
        m_addr[m] = req.addr;
        m_mask[m] = req.wmask[m*WPM +: WPM];
        m_din[m]  = req.wdata[m*WPM +: WPM];
      end
    end
  end

  for (genvar m = 0; m < int'(NUM_MACROS); m++) begin : g_macro
    sram_macro #(.DEPTH(MACRO_DEPTH), .WIDTH(MACRO_W), .LANES(WPM)) u_macro (
      .clk     (clk),
      .cen     (m_cen[m]),
      .wen     (m_wen[m]),
      .addr    (m_addr[m]),
      .wmask   (m_mask[m]),
      .data_in (m_din[m]),
      .data_out(m_dout[m])
    );
    assign rdata[m*WPM +: WPM]   = m_dout[m];
    assign config_data_out[m]    = m_dout[m];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      rvalid <= 1'b0;
    else if (clk_en) rvalid <= !cfg_mode && req.req && !req.wr;
  end

endmodule
