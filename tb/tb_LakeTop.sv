// tb_LakeTop: end-to-end test of the memory tile at its default sizes.
//
// Two tiles are instantiated; tile B's chain outputs feed tile A's chain
// inputs so the pair can be used as one chained memory. The test runs:
//  1. configuration bus: words written into both macros of tile A and read
//     back over the bus;
//  2. unified-buffer mode on tile A: two input streams are aggregated and
//     written to two SRAM regions by the input address generators, and read
//     back by the output address generators through the transpose buffers.
//     Port 1 uses 6-word lines, so every second row is a 2-word aligned row.
//     Output port 1 is requested a few cycles late, so the sync group has to
//     hold port 0. A config-bus burst in the middle takes the SRAM away and
//     must make the arbiter stall and, since the inputs cannot wait, an
//     aggregation buffer overflow;
//  3. FIFO mode on tile A against a software queue, reaching full and empty;
//  4. SRAM mode on both tiles, chained: tile A is tile 0, tile B tile 1,
//     words are written across both and read back through tile A's data_out,
//     checking the two-cycle read latency.
// Each mechanism is counted and a mechanism that never happens is a failure.
module tb_LakeTop;
  import lake_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic flush;
  logic [1:0] mode_a, mode_b;

  // tile A inputs
  logic [1:0][15:0] data_in, addr_in;
  logic [1:0] wen_in, ren_in;
  logic [1:0] config_en;
  logic config_read, config_write;
  logic [7:0] config_addr_in;
  logic [31:0] config_data_in;
  logic [15:0] fifo_depth;
  logic [4:0] ll0;
  logic [6:0] ll1;
  logic [3:0] in0_p, out0_p, in1_p, out1_p;
  logic [15:0][1:0] in0_s, out0_s, in1_s, out1_s;
  logic [1:0][1:0] sync_group;
  ag_cfg_t [1:0] in_ag, out_ag;
  logic ecin, ecout;
  // tile A outputs
  logic [1:0][15:0] data_out, chain_data_out_a;
  logic [1:0] valid_out, chain_valid_out_a;
  logic empty, full, sram_ready_out;
  logic [1:0][31:0] config_data_out;
  // tile B
  logic [1:0][15:0] data_out_b, chain_data_out_b;
  logic [1:0] valid_out_b, chain_valid_out_b;
  logic empty_b, full_b, ready_b;
  logic [1:0][31:0] cfg_out_b;

  int checks = 0, failures = 0;
  int n_stall = 0, n_hold = 0, n_overflow = 0, n_align = 0, n_full = 0, n_empty_pop = 0;
  int n_chain_fwd = 0, n_cfg = 0;

  always #5 clk = ~clk;

  LakeTop u_a (
    .clk, .rst_n, .clk_en(1'b1), .tile_en(1'b1), .flush, .mode(mode_a),
    .data_in, .wen_in, .ren_in, .addr_in, .data_out, .valid_out, .empty, .full, .sram_ready_out,
    .enable_chain_input(ecin), .enable_chain_output(ecout),
    .chain_idx_input(1'b0), .chain_idx_output(1'b0),
    .chain_data_in(chain_data_out_b), .chain_valid_in(chain_valid_out_b),
    .chain_data_out(chain_data_out_a), .chain_valid_out(chain_valid_out_a),
    .config_en, .config_read, .config_write, .config_addr_in, .config_data_in, .config_data_out,
    .fifo_ctrl_fifo_depth(fifo_depth),
    .strg_ub_agg_align_0_line_length(ll0), .strg_ub_agg_align_1_line_length(ll1),
    .strg_ub_agg_in_0_in_period(in0_p), .strg_ub_agg_in_0_in_sched(in0_s),
    .strg_ub_agg_in_0_out_period(out0_p), .strg_ub_agg_in_0_out_sched(out0_s),
    .strg_ub_agg_in_1_in_period(in1_p), .strg_ub_agg_in_1_in_sched(in1_s),
    .strg_ub_agg_in_1_out_period(out1_p), .strg_ub_agg_in_1_out_sched(out1_s),
    .strg_ub_pre_fetch_0_input_latency(16'd4), .strg_ub_pre_fetch_1_input_latency(16'd4),
    .strg_ub_sync_grp_sync_group(sync_group),
    .strg_ub_input_addr_gen(in_ag), .strg_ub_output_addr_gen(out_ag),
    .strg_ub_tb_word_order('0)
  );

  LakeTop u_b (
    .clk, .rst_n, .clk_en(1'b1), .tile_en(1'b1), .flush, .mode(mode_b),
    .data_in, .wen_in, .ren_in, .addr_in, .data_out(data_out_b), .valid_out(valid_out_b),
    .empty(empty_b), .full(full_b), .sram_ready_out(ready_b),
    .enable_chain_input(ecin), .enable_chain_output(1'b0),
    .chain_idx_input(1'b1), .chain_idx_output(1'b1),
    .chain_data_in('0), .chain_valid_in('0),
    .chain_data_out(chain_data_out_b), .chain_valid_out(chain_valid_out_b),
    .config_en(2'b00), .config_read(1'b0), .config_write(1'b0), .config_addr_in(8'd0),
    .config_data_in(32'd0), .config_data_out(cfg_out_b),
    .fifo_ctrl_fifo_depth(16'd0),
    .strg_ub_agg_align_0_line_length('0), .strg_ub_agg_align_1_line_length('0),
    .strg_ub_agg_in_0_in_period('0), .strg_ub_agg_in_0_in_sched('0),
    .strg_ub_agg_in_0_out_period('0), .strg_ub_agg_in_0_out_sched('0),
    .strg_ub_agg_in_1_in_period('0), .strg_ub_agg_in_1_in_sched('0),
    .strg_ub_agg_in_1_out_period('0), .strg_ub_agg_in_1_out_sched('0),
    .strg_ub_pre_fetch_0_input_latency('0), .strg_ub_pre_fetch_1_input_latency('0),
    .strg_ub_sync_grp_sync_group('0),
    .strg_ub_input_addr_gen('0), .strg_ub_output_addr_gen('0),
    .strg_ub_tb_word_order('0)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // mechanism monitors (tile A)
  always @(posedge clk) begin
    if (rst_n) begin
      if (u_a.arb_stall) n_stall++;
      if (|u_a.held) n_hold++;
      if (|u_a.agg_overflow) n_overflow++;
      if (mode_a == MODE_UB && u_a.grant[1] && u_a.reqs[1].wmask == 4'b0011) n_align++;
      if (mode_a == MODE_FIFO && full && wen_in[0]) n_full++;
      if (mode_a == MODE_FIFO && empty && ren_in[0]) n_empty_pop++;
      if (ecout && valid_out[0] && !chain_valid_out_a[0]) n_chain_fwd++;
    end
  end

  task automatic do_flush();
    @(negedge clk); flush = 1; @(negedge clk); flush = 0;
  endtask

  // ---------------- unified buffer checking ----------------
  // Port 0 carries 0..63 in 16 full rows. Port 1 carries 24 lines of 6 words,
  // 1000 + 6*line + k: each line gives a full row and a 2-word row, so output
  // port 1 reads 48 rows, where words 2 and 3 of every second row are stale.
  int exp0, got1;
  bit ub_on;
  int out_cnt0, out_cnt1, first_out, last_out, cyc;

  always @(posedge clk) begin
    cyc++;
    if (rst_n && ub_on) begin
      check(valid_out[0] == valid_out[1], "sync group: both ports valid together");
      if (valid_out[0]) begin
        check(data_out[0] == 16'(exp0), $sformatf("UB port 0 got %0d exp %0d", data_out[0], exp0));
        exp0++;
        out_cnt0++;
        if (first_out < 0) first_out = cyc;
        last_out = cyc;
      end
      if (valid_out[1]) begin
        int row, w, line;
        row  = got1 / 4;
        w    = got1 % 4;
        line = row / 2;
        if (row % 2 == 0)
          check(data_out[1] == 16'(1000 + 6 * line + w), $sformatf("UB port 1 word %0d got %0d", got1, data_out[1]));
        else if (w < 2)
          check(data_out[1] == 16'(1004 + 6 * line + w), $sformatf("UB port 1 word %0d got %0d", got1, data_out[1]));
        got1++;
        out_cnt1++;
      end
    end
  end

  task automatic run_ub();
    mode_a = MODE_UB;
    ll0 = 0; ll1 = 7'd6;
    in0_p = 4; out0_p = 4; in1_p = 4; out1_p = 4;
    in0_s = '0; out0_s = '0; in1_s = '0; out1_s = '0;
    for (int i = 0; i < 4; i++) begin
      in0_s[i] = 2'(i); out0_s[i] = 2'(i); in1_s[i] = 2'(3 - i); out1_s[i] = 2'(3 - i);
    end
    sync_group[0] = 2'b01; sync_group[1] = 2'b01;
    in_ag = '0; out_ag = '0;
    // port 0: rows 0..15 ; port 1: rows 100..147
    in_ag[0].dimensionality = 1; in_ag[0].ranges[0] = 16; in_ag[0].strides[0] = 1;
    in_ag[1].dimensionality = 2; in_ag[1].ranges[0] = 2; in_ag[1].strides[0] = 1;
    in_ag[1].ranges[1] = 24; in_ag[1].strides[1] = 2; in_ag[1].starting_addr = 100;
    out_ag[0] = in_ag[0];
    out_ag[1] = in_ag[1];
    exp0 = 0; got1 = 0; out_cnt0 = 0; out_cnt1 = 0; first_out = -1;
    do_flush();
    ub_on = 1;
    fork
      begin // input port 0: 64 words, first at cycle 0
        for (int i = 0; i < 64; i++) begin
          @(negedge clk); wen_in[0] = 1; data_in[0] = 16'(i);
        end
        @(negedge clk); wen_in[0] = 0;
      end
      begin // input port 1: 144 words, one every cycle
        for (int i = 0; i < 144; i++) begin
          @(negedge clk); wen_in[1] = 1; data_in[1] = 16'(1000 + i);
        end
        @(negedge clk); wen_in[1] = 0;
      end
      begin // output port 0 asks from cycle 28, port 1 four cycles later
        repeat (28) @(negedge clk);
        ren_in[0] = 1;
        repeat (4) @(negedge clk);
        ren_in[1] = 1;
      end
    join
    wait (out_cnt0 >= 64);
    repeat (10) @(negedge clk);
    ren_in = 0;
    ub_on = 0;
    check(out_cnt0 == 64, $sformatf("port 0 words %0d exp 64", out_cnt0));
    check(out_cnt1 == 64, $sformatf("port 1 words %0d exp 64 (kept in step with port 0)", out_cnt1));
    // While both inputs still stream, writes take priority over reads and
    // leave a few bubbles; 64 words must still leave within 80 cycles.
    $display("UB: 64 words left port 0 in %0d cycles", last_out - first_out + 1);
    check(last_out - first_out + 1 <= 80, $sformatf("port 0 took %0d cycles for 64 words", last_out - first_out + 1));
    // overflow: the config bus holds the SRAM while port 0 streams in
    do_flush();
    fork
      begin
        for (int i = 0; i < 40; i++) begin
          @(negedge clk); wen_in[0] = 1; data_in[0] = 16'(i);
        end
        @(negedge clk); wen_in[0] = 0;
      end
      begin
        @(negedge clk);
        config_en = 2'b01; config_read = 1;
        repeat (30) @(negedge clk);
        config_en = 0; config_read = 0;
      end
    join
    repeat (5) @(negedge clk);
  endtask

  // ---------------- FIFO ----------------
  task automatic run_fifo();
    logic [15:0] q[$];
    logic pend;
    logic [15:0] pend_data;
    int next_v;
    mode_a = MODE_FIFO;
    fifo_depth = 16'd24;
    do_flush();
    next_v = 0;
    pend = 0;
    for (int n = 0; n < 800; n++) begin
      int bias;
      bias = (n < 200) ? 80 : (n < 400) ? 20 : (n < 600) ? 60 : 35;
      @(negedge clk);
      // result of the pop issued in the previous cycle
      if (pend) check(valid_out[0] && data_out[0] == pend_data, $sformatf("FIFO pop got %0d exp %0d", data_out[0], pend_data));
      else      check(!valid_out[0], "FIFO: no output without a pop");
      check(empty == (q.size() == 0), "FIFO empty flag");
      check(full == (q.size() >= 24), "FIFO full flag");
      wen_in[0] = ($urandom_range(0, 99) < bias);
      data_in[0] = 16'(next_v);
      ren_in[0] = ($urandom_range(0, 99) >= bias);
      #1;
      pend = ren_in[0] && u_a.fifo_pop_valid;
      if (pend) pend_data = q.pop_front();
      if (wen_in[0] && !full) begin q.push_back(data_in[0]); next_v++; end
    end
    @(negedge clk);
    wen_in = 0; ren_in = 0;
  endtask

  // ---------------- SRAM mode, chained ----------------
  task automatic run_sram();
    logic [15:0] ref_w [4096];
    mode_a = MODE_SRAM; mode_b = MODE_SRAM;
    ecin = 1; ecout = 1;
    do_flush();
    for (int a = 0; a < 4096; a += 7) begin
      @(negedge clk);
      wen_in[0] = 1; addr_in[0] = 16'(a); data_in[0] = 16'(a ^ 16'h5a5a);
      ref_w[a] = data_in[0];
    end
    @(negedge clk); wen_in[0] = 0;
    for (int a = 0; a < 4096; a += 7) begin
      @(negedge clk);
      ren_in[0] = 1; addr_in[0] = 16'(a);
      @(negedge clk);
      ren_in[0] = 0;
      check(!valid_out[0], "SRAM read: nothing after one cycle");
      @(negedge clk);
      check(valid_out[0] && data_out[0] == ref_w[a],
            $sformatf("chained read %0d got %0h exp %0h", a, data_out[0], ref_w[a]));
    end
  endtask

  initial begin
    flush = 0; mode_a = MODE_UB; mode_b = MODE_UB;
    data_in = '0; addr_in = '0; wen_in = 0; ren_in = 0;
    config_en = 0; config_read = 0; config_write = 0; config_addr_in = 0; config_data_in = 0;
    fifo_depth = 0; ll0 = 0; ll1 = 0;
    in0_p = 0; out0_p = 0; in1_p = 0; out1_p = 0;
    in0_s = '0; out0_s = '0; in1_s = '0; out1_s = '0;
    sync_group = '0; in_ag = '0; out_ag = '0; ecin = 0; ecout = 0; ub_on = 0; cyc = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // 1. configuration bus
    for (int m = 0; m < 2; m++)
      for (int a = 0; a < 8; a++) begin
        @(negedge clk);
        config_en = 2'(1 << m); config_write = 1; config_addr_in = 8'(200 + a);
        config_data_in = 32'(m * 1000 + a * 17);
      end
    @(negedge clk); config_write = 0;
    for (int m = 0; m < 2; m++)
      for (int a = 0; a < 8; a++) begin
        @(negedge clk);
        config_en = 2'(1 << m); config_read = 1; config_addr_in = 8'(200 + a);
        @(negedge clk);
        config_en = 0; config_read = 0;
        check(config_data_out[m] == 32'(m * 1000 + a * 17), "config readback");
        n_cfg++;
      end
    // 2-4
    run_ub();
    run_fifo();
    run_sram();
    $display("stalls %0d, sync holds %0d, overflows %0d, aligned rows %0d, FIFO full pushes %0d, empty pops %0d, chain forwards %0d, config reads %0d",
             n_stall, n_hold, n_overflow, n_align, n_full, n_empty_pop, n_chain_fwd, n_cfg);
    check(n_stall > 0, "arbiter stall happened");
    check(n_hold > 0, "sync-group hold happened");
    check(n_overflow > 0, "aggregation overflow happened");
    check(n_align > 0, "line alignment happened");
    check(n_full > 0, "FIFO full happened");
    check(n_empty_pop > 0, "FIFO empty pop happened");
    check(n_chain_fwd > 0, "chain forwarding happened");
    check(n_cfg > 0, "config access happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
