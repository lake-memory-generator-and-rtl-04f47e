// fifo_ctrl: FIFO mode of the memory tile.
//
// Turns the wide single-port SRAM into a first-in first-out queue of 16-bit
// words, at most fifo_depth words deep. Words enter a front row; when it holds
// FETCH_W words, the row is written to the SRAM in the same cycle. Rows leave
// the SRAM into a back row, from which words are popped. The SRAM rows are a
// ring over the whole memory. Order is kept because words always go front ->
// SRAM -> back; when the SRAM and the back row are both empty, pops are served
// straight from the front row (a bypass), so a short queue never waits for the
// SRAM. `empty` and `full` count all words held.
//
// Interface: push/push_data and pop, one word each per cycle. pop_valid and
// pop_data answer a pop in the same cycle; pop_valid is low while the next
// word is still being fetched from the SRAM (one cycle after the back row
// runs dry). A push is refused while full, or when its row write is not
// granted. The SRAM request goes through the tile's arbiter (req/gnt, read
// data on ret_valid). The document names FIFO mode, fifo_depth, empty and full;
// the front/back-row structure is this design's own.
module fifo_ctrl
  import lake_pkg::*;
#(
  parameter int unsigned FW = FETCH_W
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       clk_en,
  input  logic                       flush,
  input  logic                       enable,
  input  logic [15:0]                fifo_depth,
  input  logic                       push,
  input  logic [DATA_W-1:0]          push_data,
  input  logic                       pop,
  output logic                       pop_valid,
  output logic [DATA_W-1:0]          pop_data,
  output logic                       empty,
  output logic                       full,
  output sram_req_t                  req,
  input  logic                       gnt,
  input  logic                       ret_valid,
  input  logic [FW-1:0][DATA_W-1:0]  ret_data
);

  localparam int unsigned AW = $clog2(MACRO_DEPTH);
  localparam int unsigned WW = $clog2(FW + 1);

  logic [FW-1:0][DATA_W-1:0] front, back;
  logic [WW-1:0]             fcnt, bcnt;
  logic [AW-1:0]             wr_row, rd_row;
  logic [AW:0]               sram_rows;
  logic                      inflight;
  logic [16:0]               count;

  logic pop_back, pop_front, push_ok, row_write, row_read;
  logic [WW-1:0] widx;
  logic [FW-1:0][DATA_W-1:0] row_w;

  always_comb begin
    empty     = (count == '0);
    full      = (count >= 17'(fifo_depth));
    pop_back  = enable && pop && (bcnt != '0);
    pop_front = enable && pop && (bcnt == '0) && (sram_rows == '0) && !inflight && (fcnt != '0);
    pop_valid = pop_back || pop_front;
    pop_data  = pop_back ? back[0] : front[0];
    widx      = fcnt - WW'(pop_front);
    // The word being pushed completes the front row.
    row_w = pop_front ? (front >> DATA_W) : front;
    row_w[FW-1] = push_data;
    row_write = enable && push && !full && (widx == WW'(FW - 1));
    // Fetch the next row as the back row runs dry, never alongside a write.
    row_read  = enable && !row_write && !inflight && (sram_rows != '0) &&
                (bcnt == '0 || (bcnt == WW'(1) && pop_back));
    req       = '0;
    req.req   = row_write || row_read;
    req.wr    = row_write;
    req.addr  = row_write ? wr_row : rd_row;
    req.wmask = '1;
    req.wdata = row_w;
    push_ok   = enable && push && !full && (!row_write || gnt);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fcnt <= '0; bcnt <= '0; wr_row <= '0; rd_row <= '0;
      sram_rows <= '0; inflight <= 1'b0; count <= '0;
    end else if (clk_en) begin
      if (flush) begin
        fcnt <= '0; bcnt <= '0; wr_row <= '0; rd_row <= '0;
        sram_rows <= '0; inflight <= 1'b0; count <= '0;
      end else begin
        count <= count + 17'(push_ok) - 17'(pop_valid);
        // front row
        if (pop_front) front <= front >> DATA_W;
        if (push_ok) begin
          if (row_write) begin
            fcnt   <= '0;
            wr_row <= wr_row + 1'b1;
          end else begin
            front[widx] <= push_data;
            fcnt        <= widx + 1'b1;
          end
        end else begin
          fcnt <= widx;
        end
        // SRAM ring
        sram_rows <= sram_rows + (AW+1)'(push_ok && row_write) - (AW+1)'(row_read && gnt);
        if (row_read && gnt) begin
          rd_row   <= rd_row + 1'b1;
          inflight <= 1'b1;
        end
        // back row
        if (ret_valid) begin
          back     <= ret_data;
          bcnt     <= WW'(FW);
          inflight <= 1'b0;
        end else if (pop_back) begin
          back <= back >> DATA_W;
          bcnt <= bcnt - 1'b1;
        end
      end
    end
  end

endmodule
