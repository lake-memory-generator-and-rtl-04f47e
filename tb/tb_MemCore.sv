// tb_MemCore: end-to-end test of the memory core at its default sizes, with
// every setting written through the configuration bus.
//
// Two cores are instantiated; core B's chain outputs feed core A's chain
// inputs. Each phase builds a tile_cfg_t for each core and writes it into
// the configuration registers word by word, reading one register back. Then:
//  1. SRAM preload over the bus into both macros of core A, read back;
//  2. unified-buffer mode on core A: two input streams are aggregated and
//     written to two SRAM regions by the input address generators and read
//     back through the transpose buffers. Input 1 uses 6-word lines, so every
//     second row is an aligned 2-word row. Output 1 is requested four cycles
//     after output 0, so the sync group holds output 0. A bus burst to a
//     macro then takes the SRAM away while input 0 streams: the arbiter
//     stalls and the aggregation buffer overflows;
//     Then a word schedule on output 0 reorders eight words to 1, 5, 3, 7;
//  3. FIFO mode on core A against a software queue, reaching full and empty;
//  4. SRAM mode on both cores, chained as tiles 0 and 1, written across both
//     and read back through core A, with the two-cycle read latency.
// Each mechanism is counted and one that never happens is a failure.
module tb_MemCore;
  import lake_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic flush;
  logic [1:0][15:0] data_in, addr_in;
  logic [1:0] wen_in, ren_in;
  // bus of core A and core B
  logic [9:0]  ca_addr, cb_addr;
  logic [31:0] ca_wdata, cb_wdata, ca_rdata, cb_rdata;
  logic        ca_read, ca_write, cb_read, cb_write;
  // outputs
  logic [1:0][15:0] data_out, chain_data_out_a, data_out_b, chain_data_out_b;
  logic [1:0] valid_out, chain_valid_out_a, valid_out_b, chain_valid_out_b;
  logic empty, full, ready_a, empty_b, full_b, ready_b;
  logic [1:0] wen_b, ren_b;

  tile_cfg_t cfg_a, cfg_b;
  int checks = 0, failures = 0;
  int n_stall = 0, n_hold = 0, n_overflow = 0, n_align = 0, n_full = 0, n_empty_pop = 0;
  int n_chain_fwd = 0, n_cfg = 0, n_reorder = 0;

  always #5 clk = ~clk;

  MemCore u_a (
    .clk, .rst_n, .clk_en(1'b1), .flush,
    .data_in, .wen_in, .ren_in, .addr_in, .data_out, .valid_out, .empty, .full,
    .sram_ready_out(ready_a),
    .chain_data_in(chain_data_out_b), .chain_valid_in(chain_valid_out_b),
    .chain_data_out(chain_data_out_a), .chain_valid_out(chain_valid_out_a),
    .config_addr_in(ca_addr), .config_data_in(ca_wdata), .config_read(ca_read),
    .config_write(ca_write), .config_data_out(ca_rdata)
  );

  MemCore u_b (
    .clk, .rst_n, .clk_en(1'b1), .flush,
    .data_in, .wen_in(wen_b), .ren_in(ren_b), .addr_in, .data_out(data_out_b),
    .valid_out(valid_out_b), .empty(empty_b), .full(full_b), .sram_ready_out(ready_b),
    .chain_data_in('0), .chain_valid_in('0),
    .chain_data_out(chain_data_out_b), .chain_valid_out(chain_valid_out_b),
    .config_addr_in(cb_addr), .config_data_in(cb_wdata), .config_read(cb_read),
    .config_write(cb_write), .config_data_out(cb_rdata)
  );

  // core B sees the same port-0 traffic only in SRAM mode
  assign wen_b = (cfg_b.mode == MODE_SRAM) ? wen_in : 2'b00;
  assign ren_b = (cfg_b.mode == MODE_SRAM) ? ren_in : 2'b00;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // Write both configurations over the buses, then read one register back.
  task automatic apply_cfg();
    logic [CFG_WORDS*32-1:0] fa, fb;
    fa = '0; fb = '0;
    fa[CFG_BITS-1:0] = cfg_a;
    fb[CFG_BITS-1:0] = cfg_b;
    for (int k = 0; k < CFG_WORDS; k++) begin
      @(negedge clk);
      ca_write = 1; ca_addr = 10'(k); ca_wdata = fa[32*k +: 32];
      cb_write = 1; cb_addr = 10'(k); cb_wdata = fb[32*k +: 32];
    end
    @(negedge clk);
    ca_write = 0; cb_write = 0;
    ca_read = 1; ca_addr = 10'(CFG_WORDS - 1);
    @(negedge clk);
    ca_read = 0;
    check(ca_rdata == fa[32*(CFG_WORDS-1) +: 32], "configuration register read back");
    n_cfg++;
  endtask

  always @(posedge clk) begin
    if (rst_n) begin
      if (u_a.u_lake.arb_stall) n_stall++;
      if (|u_a.u_lake.held) n_hold++;
      if (|u_a.u_lake.agg_overflow) n_overflow++;
      if (cfg_a.mode == MODE_UB && u_a.u_lake.grant[1] && u_a.u_lake.reqs[1].wmask == 4'b0011) n_align++;
      if (cfg_a.mode == MODE_FIFO && full && wen_in[0]) n_full++;
      if (cfg_a.mode == MODE_FIFO && empty && ren_in[0]) n_empty_pop++;
      if (cfg_a.enable_chain_output && valid_out[0] && !chain_valid_out_a[0]) n_chain_fwd++;
    end
  end

  task automatic do_flush();
    @(negedge clk); flush = 1; @(negedge clk); flush = 0;
  endtask

  // ---------------- unified buffer ----------------
  // Input 0 carries 0..63 in 16 full rows. Input 1 carries 24 lines of 6
  // words, 1000 + 6*line + k: a full row and a 2-word row per line, so
  // output 1 reads 48 rows, where words 2 and 3 of every second row are stale.
  int exp0, got1, out_cnt0, out_cnt1, first_out, last_out, cyc;
  bit ub_on;

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
    cfg_a = '0;
    cfg_a.mode = MODE_UB; cfg_a.tile_en = 1;
    cfg_a.agg_align_1_line_length = 7'd6;
    cfg_a.agg_in_0_in_period = 4; cfg_a.agg_in_0_out_period = 4;
    cfg_a.agg_in_1_in_period = 4; cfg_a.agg_in_1_out_period = 4;
    for (int i = 0; i < 4; i++) begin
      cfg_a.agg_in_0_in_sched[i] = 2'(i);     cfg_a.agg_in_0_out_sched[i] = 2'(i);
      cfg_a.agg_in_1_in_sched[i] = 2'(3 - i); cfg_a.agg_in_1_out_sched[i] = 2'(3 - i);
    end
    cfg_a.pre_fetch_0_input_latency = 4; cfg_a.pre_fetch_1_input_latency = 4;
    cfg_a.sync_group[0] = 2'b01; cfg_a.sync_group[1] = 2'b01;
    cfg_a.input_addr_gen[0].dimensionality = 1;
    cfg_a.input_addr_gen[0].ranges[0] = 16; cfg_a.input_addr_gen[0].strides[0] = 1;
    cfg_a.input_addr_gen[1].dimensionality = 2;
    cfg_a.input_addr_gen[1].ranges[0] = 2;  cfg_a.input_addr_gen[1].strides[0] = 1;
    cfg_a.input_addr_gen[1].ranges[1] = 24; cfg_a.input_addr_gen[1].strides[1] = 2;
    cfg_a.input_addr_gen[1].starting_addr = 100;
    cfg_a.output_addr_gen = cfg_a.input_addr_gen;
    apply_cfg();
    exp0 = 0; got1 = 0; out_cnt0 = 0; out_cnt1 = 0; first_out = -1;
    do_flush();
    ub_on = 1;
    fork
      begin
        for (int i = 0; i < 64; i++) begin
          @(negedge clk); wen_in[0] = 1; data_in[0] = 16'(i);
        end
        @(negedge clk); wen_in[0] = 0;
      end
      begin
        for (int i = 0; i < 144; i++) begin
          @(negedge clk); wen_in[1] = 1; data_in[1] = 16'(1000 + i);
        end
        @(negedge clk); wen_in[1] = 0;
      end
      begin
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
    check(out_cnt1 == 64, $sformatf("port 1 words %0d exp 64", out_cnt1));
    $display("UB: 64 words left port 0 in %0d cycles", last_out - first_out + 1);
    check(last_out - first_out + 1 <= 80, "UB output rate");
    // overflow: a bus burst to macro 0 holds the SRAM while input 0 streams
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
        ca_read = 1; ca_addr = 10'h100;
        repeat (30) @(negedge clk);
        ca_read = 0;
      end
    join
    repeat (5) @(negedge clk);
  endtask

  // ---------------- word reordering ----------------
  task automatic run_reorder();
    logic [15:0] got[$];
    int exp_seq[4] = '{1, 5, 3, 7};
    cfg_a = '0;
    cfg_a.mode = MODE_UB; cfg_a.tile_en = 1;
    cfg_a.agg_in_0_in_period = 4; cfg_a.agg_in_0_out_period = 4;
    for (int i = 0; i < 4; i++) begin
      cfg_a.agg_in_0_in_sched[i] = 2'(i); cfg_a.agg_in_0_out_sched[i] = 2'(i);
    end
    cfg_a.pre_fetch_0_input_latency = 4;
    cfg_a.sync_group[0] = 2'b01; cfg_a.sync_group[1] = 2'b10;
    cfg_a.input_addr_gen[0].dimensionality = 1;
    cfg_a.input_addr_gen[0].ranges[0] = 2; cfg_a.input_addr_gen[0].strides[0] = 1;
    cfg_a.output_addr_gen[0].dimensionality = 2;
    cfg_a.output_addr_gen[0].ranges[0] = 2; cfg_a.output_addr_gen[0].strides[0] = 1;
    cfg_a.output_addr_gen[0].ranges[1] = 2; cfg_a.output_addr_gen[0].strides[1] = 0;
    cfg_a.tb_word_order[0].words_per_row = 1;
    cfg_a.tb_word_order[0].period = 4;
    cfg_a.tb_word_order[0].sched[0] = 1; cfg_a.tb_word_order[0].sched[1] = 1;
    cfg_a.tb_word_order[0].sched[2] = 3; cfg_a.tb_word_order[0].sched[3] = 3;
    apply_cfg();
    do_flush();
    for (int i = 0; i < 8; i++) begin
      @(negedge clk); wen_in[0] = 1; data_in[0] = 16'(i);
    end
    @(negedge clk); wen_in[0] = 0;
    repeat (4) @(negedge clk);
    ren_in[0] = 1;
    repeat (12) begin
      @(negedge clk);
      if (valid_out[0]) got.push_back(data_out[0]);
    end
    ren_in[0] = 0;
    check(got.size() == 4, $sformatf("reordering gave %0d words", got.size()));
    foreach (exp_seq[k])
      if (k < got.size()) begin
        check(got[k] == 16'(exp_seq[k]), $sformatf("reordered word %0d = %0d, exp %0d", k, got[k], exp_seq[k]));
        if (got[k] == 16'(exp_seq[k]) && k > 0) n_reorder++;
      end
  endtask

  // ---------------- FIFO ----------------
  task automatic run_fifo();
    logic [15:0] q[$];
    logic pend;
    logic [15:0] pend_data;
    int next_v;
    cfg_a = '0;
    cfg_a.mode = MODE_FIFO; cfg_a.tile_en = 1; cfg_a.fifo_depth = 16'd24;
    apply_cfg();
    do_flush();
    next_v = 0;
    pend = 0;
    for (int n = 0; n < 800; n++) begin
      int bias;
      bias = (n < 200) ? 80 : (n < 400) ? 20 : (n < 600) ? 60 : 35;
      @(negedge clk);
      if (pend) check(valid_out[0] && data_out[0] == pend_data, $sformatf("FIFO pop got %0d exp %0d", data_out[0], pend_data));
      else      check(!valid_out[0], "FIFO: no output without a pop");
      check(empty == (q.size() == 0), "FIFO empty flag");
      check(full == (q.size() >= 24), "FIFO full flag");
      wen_in[0] = ($urandom_range(0, 99) < bias);
      data_in[0] = 16'(next_v);
      ren_in[0] = ($urandom_range(0, 99) >= bias);
      #1;
      pend = ren_in[0] && u_a.u_lake.fifo_pop_valid;
      if (pend) pend_data = q.pop_front();
      if (wen_in[0] && !full) begin q.push_back(data_in[0]); next_v++; end
    end
    @(negedge clk);
    wen_in = 0; ren_in = 0;
  endtask

  // ---------------- SRAM mode, chained ----------------
  task automatic run_sram();
    logic [15:0] ref_w [4096];
    cfg_a = '0; cfg_b = '0;
    cfg_a.mode = MODE_SRAM; cfg_a.tile_en = 1;
    cfg_a.enable_chain_input = 1; cfg_a.enable_chain_output = 1;
    cfg_b = cfg_a;
    cfg_b.chain_idx_input = 1; cfg_b.chain_idx_output = 1;
    cfg_b.enable_chain_output = 1;
    apply_cfg();
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
    flush = 0; data_in = '0; addr_in = '0; wen_in = 0; ren_in = 0;
    ca_addr = 0; ca_wdata = 0; ca_read = 0; ca_write = 0;
    cb_addr = 0; cb_wdata = 0; cb_read = 0; cb_write = 0;
    cfg_a = '0; cfg_b = '0; ub_on = 0; cyc = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // 1. SRAM preload over the bus
    for (int m = 0; m < 2; m++)
      for (int a = 0; a < 8; a++) begin
        @(negedge clk);
        ca_write = 1; ca_addr = 10'((m + 1) * 256 + 200 + a); ca_wdata = 32'(m * 1000 + a * 17);
      end
    @(negedge clk); ca_write = 0;
    for (int m = 0; m < 2; m++)
      for (int a = 0; a < 8; a++) begin
        @(negedge clk);
        ca_read = 1; ca_addr = 10'((m + 1) * 256 + 200 + a);
        @(negedge clk);
        ca_read = 0;
        check(ca_rdata == 32'(m * 1000 + a * 17), "SRAM preload read back");
      end
    run_ub();
    run_reorder();
    run_fifo();
    run_sram();
    $display("stalls %0d, sync holds %0d, overflows %0d, aligned rows %0d, FIFO full pushes %0d, empty pops %0d, chain forwards %0d, config loads %0d, reordered words %0d",
             n_stall, n_hold, n_overflow, n_align, n_full, n_empty_pop, n_chain_fwd, n_cfg, n_reorder);
    check(n_stall > 0, "arbiter stall happened");
    check(n_hold > 0, "sync-group hold happened");
    check(n_overflow > 0, "aggregation overflow happened");
    check(n_align > 0, "line alignment happened");
    check(n_full > 0, "FIFO full happened");
    check(n_empty_pop > 0, "FIFO empty pop happened");
    check(n_chain_fwd > 0, "chain forwarding happened");
    check(n_cfg > 0, "configuration load happened");
    check(n_reorder > 0, "word reordering happened");
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
