// tb_conv33_linebuffer: the tile as the two-line buffer of a 3x3 convolution.
//
// An N x N image streams into input port 0, one pixel per cycle in raster
// order. The SRAM holds a ring of four image lines (N rows of four pixels);
// output port 0 replays the stream one line later and output port 1 two
// lines later, so together with the live input they give the three image
// rows a 3x3 window needs. Both output addresses walk the same ring as the
// input. For every image size the test checks each output pixel against the
// pixel N or 2N positions back, counts the pixels, and reports the cycles
// from the first input pixel to the last output pixel (N*N + 2N + a few
// cycles of pipeline). Sizes: 8, 16, 20, 24, 32, 40, 44, 48 and 52.
// Each size is also run as an identity stream: output port 0 alone starts
// reading once eight pixels have gone in, and must give the image back
// unchanged, N*N pixels in about N*N + 8 cycles.
// Last, a double buffer: four 16x16 frames stream in back to back, written
// alternately to two frame regions of the SRAM (rows 0-63 and 64-127), while
// output port 0 reads each frame from the other region one frame later.
// Then a word-reordering example: eight words arrive on alternate cycles and
// port 0, read continuously, must send 1, 5, 3, 7 and nothing more. The input generator puts words 0-3 in row
// 0 and 4-7 in row 1; the output generator visits rows 0, 1, 0, 1, and the
// word schedule takes one word per row: words 1, 1, 3, 3.
module tb_conv33_linebuffer;
  import lake_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic flush;
  logic [1:0][15:0] data_in, data_out, chain_data_out;
  logic [1:0] wen_in, ren_in, valid_out, chain_valid_out;
  logic empty, full, ready;
  logic [1:0][31:0] config_data_out;
  logic [15:0][1:0] sched;
  ag_cfg_t [1:0] in_ag, out_ag;
  tb_cfg_t [1:0] order;
  int checks = 0, failures = 0;
  int n, cyc, cnt0, cnt1, last_cyc;
  bit identity;
  bit mon_on = 1'b1;

  always #5 clk = ~clk;

  LakeTop dut (
    .clk, .rst_n, .clk_en(1'b1), .tile_en(1'b1), .flush, .mode(MODE_UB),
    .data_in, .wen_in, .ren_in, .addr_in('0), .data_out, .valid_out, .empty, .full,
    .sram_ready_out(ready),
    .enable_chain_input(1'b0), .enable_chain_output(1'b0),
    .chain_idx_input(1'b0), .chain_idx_output(1'b0),
    .chain_data_in('0), .chain_valid_in('0), .chain_data_out, .chain_valid_out,
    .config_en(2'b00), .config_read(1'b0), .config_write(1'b0), .config_addr_in(8'd0),
    .config_data_in(32'd0), .config_data_out,
    .fifo_ctrl_fifo_depth(16'd0),
    .strg_ub_agg_align_0_line_length('0), .strg_ub_agg_align_1_line_length('0),
    .strg_ub_agg_in_0_in_period(4'd4), .strg_ub_agg_in_0_in_sched(sched),
    .strg_ub_agg_in_0_out_period(4'd4), .strg_ub_agg_in_0_out_sched(sched),
    .strg_ub_agg_in_1_in_period(4'd4), .strg_ub_agg_in_1_in_sched(sched),
    .strg_ub_agg_in_1_out_period(4'd4), .strg_ub_agg_in_1_out_sched(sched),
    .strg_ub_pre_fetch_0_input_latency(16'd4), .strg_ub_pre_fetch_1_input_latency(16'd4),
    .strg_ub_sync_grp_sync_group({2'b10, 2'b01}),   // independent ports
    .strg_ub_input_addr_gen(in_ag), .strg_ub_output_addr_gen(out_ag),
    .strg_ub_tb_word_order(order)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // pixel value at raster position i of the current image
  function automatic logic [15:0] pix(input int i);
    return 16'((i * 7 + n) & 16'hffff);
  endfunction

  always @(posedge clk) begin
    cyc++;
    if (rst_n && !flush && mon_on) begin
      if (valid_out[0]) begin
        check(data_out[0] == pix(cnt0), $sformatf("N=%0d port 0 pixel %0d", n, cnt0));
        cnt0++;
        last_cyc = cyc;
      end
      if (valid_out[1]) begin
        check(data_out[1] == pix(cnt1), $sformatf("N=%0d port 1 pixel %0d", n, cnt1));
        cnt1++;
        last_cyc = cyc;
      end
    end
  end

  initial begin
    int sizes[9] = '{8, 16, 20, 24, 32, 40, 44, 48, 52};
    int start_cyc;
    flush = 0; data_in = '0; wen_in = 0; ren_in = 0;
    for (int i = 0; i < 16; i++) sched[i] = 2'(i % 4);
    in_ag = '0; out_ag = '0; order = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    foreach (sizes[s]) begin
      n = sizes[s];
      for (int pass = 0; pass < 2; pass++) begin
        identity = (pass == 1);
        // ring of N rows (4 lines), walked N/4 times: N*N/4 rows in all
        in_ag = '0;
        in_ag[0].dimensionality = 2;
        in_ag[0].ranges[0] = 16'(n);     in_ag[0].strides[0] = 1;
        in_ag[0].ranges[1] = 16'(n / 4); in_ag[0].strides[1] = 0;
        out_ag[0] = in_ag[0];
        out_ag[1] = in_ag[0];
        @(negedge clk); flush = 1; @(negedge clk); flush = 0;
        cnt0 = 0; cnt1 = 0;
        start_cyc = cyc + 1;
        for (int i = 0; i < n * n; i++) begin
          @(negedge clk); wen_in[0] = 1; data_in[0] = pix(i);
          if (identity) begin
            if (i == 8) ren_in[0] = 1;      // reads start after eight pixels
          end else begin
            if (i == n)     ren_in[0] = 1;   // one line behind
            if (i == 2 * n) ren_in[1] = 1;   // two lines behind
          end
        end
        @(negedge clk); wen_in[0] = 0;
        wait ((identity ? cnt0 : cnt1) >= n * n || cyc > start_cyc + n * n + 4 * n + 50);
        repeat (4) @(negedge clk);
        ren_in = 0;
        check(cnt0 == n * n, $sformatf("N=%0d port 0 gave %0d pixels", n, cnt0));
        if (identity) begin
          check(cnt1 == 0, $sformatf("N=%0d identity: port 1 gave %0d pixels", n, cnt1));
          check(last_cyc - start_cyc + 1 <= n * n + 16,
                $sformatf("N=%0d identity took %0d cycles", n, last_cyc - start_cyc + 1));
          $display("identity %0dx%0d: %0d cycles from first pixel in to last pixel out", n, n,
                   last_cyc - start_cyc + 1);
        end else begin
          check(cnt1 == n * n, $sformatf("N=%0d port 1 gave %0d pixels", n, cnt1));
          check(last_cyc - start_cyc + 1 <= n * n + 2 * n + 8,
                $sformatf("N=%0d took %0d cycles", n, last_cyc - start_cyc + 1));
          $display("conv33 %0dx%0d: %0d cycles from first pixel in to last pixel out", n, n,
                   last_cyc - start_cyc + 1);
        end
      end
    end
    // double buffer: 64 rows per frame, 2 frame regions, the pair twice
    n = 16;
    identity = 1;
    in_ag = '0;
    in_ag[0].dimensionality = 3;
    in_ag[0].ranges[0] = 16'd64; in_ag[0].strides[0] = 1;
    in_ag[0].ranges[1] = 16'd2;  in_ag[0].strides[1] = 64;
    in_ag[0].ranges[2] = 16'd2;  in_ag[0].strides[2] = 0;
    out_ag[0] = in_ag[0];
    out_ag[1] = in_ag[0];
    @(negedge clk); flush = 1; @(negedge clk); flush = 0;
    cnt0 = 0; cnt1 = 0;
    start_cyc = cyc + 1;
    for (int i = 0; i < 4 * 256; i++) begin
      @(negedge clk); wen_in[0] = 1; data_in[0] = pix(i);
      if (i == 256) ren_in[0] = 1;   // one frame behind
    end
    @(negedge clk); wen_in[0] = 0;
    wait (cnt0 >= 4 * 256 || cyc > start_cyc + 6 * 256);
    repeat (20) @(negedge clk);
    ren_in = 0;
    check(cnt0 == 4 * 256, $sformatf("double buffer gave %0d pixels", cnt0));
    $display("double buffer: %0d pixels of 4 frames read back one frame behind, last after %0d cycles", cnt0, last_cyc - start_cyc + 1);
    // word reordering
    identity = 1;
    mon_on = 0;
    in_ag = '0;
    in_ag[0].dimensionality = 1;
    in_ag[0].ranges[0] = 16'd2; in_ag[0].strides[0] = 1;
    out_ag[0] = '0;
    out_ag[0].dimensionality = 2;
    out_ag[0].ranges[0] = 16'd2; out_ag[0].strides[0] = 1;
    out_ag[0].ranges[1] = 16'd2; out_ag[0].strides[1] = 0;
    order[0] = '0;
    order[0].words_per_row = 1;
    order[0].period = 4;
    order[0].sched[0] = 1; order[0].sched[1] = 1;
    order[0].sched[2] = 3; order[0].sched[3] = 3;
    @(negedge clk); flush = 1; @(negedge clk); flush = 0;
    for (int i = 0; i < 8; i++) begin
      @(negedge clk); wen_in[0] = 1; data_in[0] = 16'(i);
      @(negedge clk); wen_in[0] = 0;
    end
    repeat (4) @(negedge clk);
    begin
      logic [15:0] got[$];
      string vpat;
      int exp_seq[4] = '{1, 5, 3, 7};
      // one read request with nothing fetched yet starts the port's prefetch
      @(negedge clk); ren_in[0] = 1;
      @(negedge clk); ren_in[0] = 0;
      check(!valid_out[0], "reordering: nothing sent before prefetch");
      repeat (6) @(negedge clk);
      ren_in[0] = 1;
      vpat = "";
      for (int k = 0; k < 10; k++) begin
        @(negedge clk);
        vpat = {vpat, valid_out[0] ? "1" : "0"};
        if (valid_out[0]) got.push_back(data_out[0]);
      end
      ren_in[0] = 0;
      check(got.size() == 4, $sformatf("reordering gave %0d words", got.size()));
      foreach (exp_seq[k])
        if (k < got.size())
          check(got[k] == 16'(exp_seq[k]), $sformatf("reordered word %0d = %0d, exp %0d", k, got[k], exp_seq[k]));
      $display("reordering: words sent %p, valid_out per cycle %s", got, vpat);
    end
    order = '0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
