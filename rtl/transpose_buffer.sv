// transpose_buffer: transpose buffer, parallel in, serial out, with prefetch.
//
// Receives whole SRAM rows of FW words and hands them out one word at a time
// on an output stream. It holds HEIGHT rows and works as a small ring, so
// one row can be drained while the next is already fetched. The prefetcher
// asks for the next row (`fetch_req`) when a row slot is free, counting rows
// still in flight, and when no more than input_latency words are left to
// send; this covers the SRAM read latency so the output keeps one word per
// cycle. By default the words of a row leave in order 0..FW-1. A word
// schedule (`order`, see lake_pkg::tb_cfg_t) can instead take fewer words
// from each row and pick them in any order, so together with the output
// address generator a stream can be reordered word by word. The name
// input_latency follows the tile's strg_ub_pre_fetch_* registers; the
// transpose buffer's own addressing is drawn as address generators but not
// specified, so the ring, the request rule and the word-schedule format are
// this design's own choices.
//
// Interface: fetch_req / fetch_ack (ack in the cycle the SRAM read is issued);
// row_in is taken when row_in_valid is high, which the owner raises the cycle
// after the read for this buffer. `word_avail` says a word can be popped;
// `pop` takes word_out in the same cycle. `order` is static configuration;
// its schedule pointer restarts on flush.
module transpose_buffer
  import lake_pkg::*;
#(
  parameter int unsigned HEIGHT = 2,
  parameter int unsigned FW     = FETCH_W
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         clk_en,
  input  logic                         flush,
  input  logic                         fetch_en,       // stream has rows left to read
  input  logic [AG_W-1:0]              input_latency,
  input  tb_cfg_t                      order,
  output logic                         fetch_req,
  input  logic                         fetch_ack,
  input  logic                         row_in_valid,
  input  logic [FW-1:0][DATA_W-1:0]    row_in,
  output logic                         word_avail,
  output logic [DATA_W-1:0]            word_out,
  input  logic                         pop
);

  localparam int unsigned RW = (HEIGHT > 1) ? $clog2(HEIGHT) : 1;
  localparam int unsigned WW = $clog2(FW);
  localparam int unsigned CW = $clog2(HEIGHT + 1);

  logic [HEIGHT-1:0][FW-1:0][DATA_W-1:0] rows;
  logic [RW-1:0]  wr_row, rd_row;
  logic [WW-1:0]  ridx;
  logic [CW-1:0]  occ, inflight;
  logic [AG_W-1:0] words_left;
  logic           do_pop, row_done;
  logic [3:0]     sptr;
  logic [WW:0]    nwords;
  logic [WW-1:0]  widx;

  function automatic logic [RW-1:0] inc_row(input logic [RW-1:0] r);
    return (r == RW'(HEIGHT - 1)) ? '0 : r + 1'b1;
  endfunction

  assign nwords     = (order.period == '0 || order.words_per_row == '0 ||
                       order.words_per_row > (WW+1)'(FW)) ? (WW+1)'(FW) : order.words_per_row;
  assign widx       = (order.period == '0) ? ridx : WW'(order.sched[sptr]);
  assign words_left = AG_W'(occ) * AG_W'(nwords) - AG_W'(ridx);
  assign fetch_req  = fetch_en && (occ + inflight < CW'(HEIGHT)) &&
                      (words_left <= input_latency);
  assign word_avail = (occ != '0);
  assign word_out   = rows[rd_row][widx];
  assign do_pop     = pop && word_avail;
  assign row_done   = do_pop && ((WW+1)'(ridx) == nwords - 1'b1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_row   <= '0;
      rd_row   <= '0;
      ridx     <= '0;
      occ      <= '0;
      inflight <= '0;
      sptr     <= '0;
    end else if (clk_en) begin
      if (flush) begin
        wr_row   <= '0;
        rd_row   <= '0;
        ridx     <= '0;
        occ      <= '0;
        inflight <= '0;
        sptr     <= '0;
      end else begin
        if (row_in_valid) begin
          rows[wr_row] <= row_in;
          wr_row       <= inc_row(wr_row);
        end
        inflight <= inflight + CW'(fetch_req && fetch_ack) - CW'(row_in_valid);
        occ      <= occ + CW'(row_in_valid) - CW'(row_done);
        if (do_pop) begin
          ridx <= row_done ? '0 : ridx + 1'b1;
          if (row_done) rd_row <= inc_row(rd_row);
          sptr <= (sptr + 1'b1 >= order.period) ? '0 : sptr + 1'b1;
        end
      end
    end
  end

endmodule
