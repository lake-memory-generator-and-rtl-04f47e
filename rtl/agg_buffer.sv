// agg_buffer: aggregation buffer, serial in, parallel out.
//
// Gathers the 16-bit words of one input stream into rows of FETCH_W words so
// the SRAM can be written one wide row at a time. It holds AGG_HEIGHT rows.
// Two small schedules, as in the tile's strg_ub_agg_in_* registers, decide the
// row order: the n-th group of words is written into row in_sched[n], and the
// n-th row handed to the SRAM is row out_sched[n]; each schedule repeats with
// its own period (in_period / out_period entries). An aligner closes a row
// early at the end of a line of line_length words, so a new line always
// starts a new row; the words of a closed row that were never written are
// left out of the write mask.
//
// Interface: word in with `wen`; `row_valid` offers row out_sched[ptr] with
// its data and word mask, and `row_ack` (same cycle) consumes it. A word that
// arrives while its row still waits for the SRAM is dropped and `overflow`
// pulses; the stream has no back-pressure. Schedules, periods and line length
// follow the document's register list; the drop policy, the 2-bit row index
// and the word mask are this design's own choices.
module agg_buffer
  import lake_pkg::*;
#(
  parameter int unsigned HEIGHT = AGG_HEIGHT,
  parameter int unsigned FW     = FETCH_W
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         clk_en,
  input  logic                         flush,
  input  agg_cfg_t                     cfg,
  input  logic                         wen,
  input  logic [DATA_W-1:0]            data_in,
  output logic                         row_valid,
  output logic [FW-1:0][DATA_W-1:0]    row_data,
  output logic [FW-1:0]                row_mask,
  input  logic                         row_ack,
  output logic                         overflow
);

  localparam int unsigned RW = $clog2(HEIGHT);
  localparam int unsigned WW = $clog2(FW);

  logic [HEIGHT-1:0][FW-1:0][DATA_W-1:0] rows;
  logic [HEIGHT-1:0][FW-1:0]             masks;
  logic [HEIGHT-1:0]                     full;
  logic [3:0]                            in_ptr, out_ptr;
  logic [WW-1:0]                         wcnt;
  logic [AG_W-1:0]                       lcnt;
  logic [RW-1:0]                         in_row, out_row;
  logic                                  line_end, row_close, accept;

  assign in_row    = RW'(cfg.in_sched[in_ptr]);
  assign out_row   = RW'(cfg.out_sched[out_ptr]);
  assign accept    = wen && !full[in_row];
  assign line_end  = (cfg.line_length != '0) && (lcnt + 1'b1 >= cfg.line_length);
  assign row_close = accept && ((wcnt == WW'(FW-1)) || line_end);

  assign row_valid = full[out_row];
  assign row_data  = rows[out_row];
  assign row_mask  = masks[out_row];

  function automatic logic [3:0] next_ptr(input logic [3:0] p, input logic [3:0] period);
    return (p + 4'd1 >= period) ? 4'd0 : p + 4'd1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full     <= '0;
      masks    <= '0;
      in_ptr   <= '0;
      out_ptr  <= '0;
      wcnt     <= '0;
      lcnt     <= '0;
      overflow <= 1'b0;
    end else if (clk_en) begin
      overflow <= wen && full[in_row];
      if (flush) begin
        full    <= '0;
        masks   <= '0;
        in_ptr  <= '0;
        out_ptr <= '0;
        wcnt    <= '0;
        lcnt    <= '0;
      end else begin
        if (row_valid && row_ack) begin
          full[out_row] <= 1'b0;
          out_ptr       <= next_ptr(out_ptr, cfg.out_period);
        end
        if (accept) begin
          rows[in_row][wcnt] <= data_in;
          if (wcnt == '0) masks[in_row] <= FW'(1);
          else            masks[in_row][wcnt] <= 1'b1;
          lcnt <= line_end ? '0 : lcnt + 1'b1;
          if (row_close) begin
            full[in_row] <= 1'b1;
            wcnt         <= '0;
            in_ptr       <= next_ptr(in_ptr, cfg.in_period);
          end else begin
            wcnt <= wcnt + 1'b1;
          end
        end
      end
    end
  end

endmodule
