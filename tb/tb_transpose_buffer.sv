// tb_transpose_buffer: a small SRAM model answers each granted fetch one
// cycle later with row k = {4k+3, 4k+2, 4k+1, 4k}. The words popped from the
// buffer must count up 0, 1, 2, ... without gaps or repeats, first with random
// grants and random pops, then with every fetch granted and a pop every cycle,
// where the prefetch must keep the stream at one word per cycle (64 words in
// 64 consecutive cycles). fetch_en low must stop all fetching. Last, a word
// schedule takes 3 words of each row in the order 3,1,0 / 2,2,1 (period 6),
// so word n of the stream must be 4*(n/3) + sched[n mod 6].
module tb_transpose_buffer;
  import lake_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic flush, fetch_en, fetch_req, fetch_ack, row_in_valid, word_avail, pop;
  logic [AG_W-1:0] input_latency;
  logic [FETCH_W-1:0][DATA_W-1:0] row_in;
  logic [DATA_W-1:0] word_out;
  tb_cfg_t order;
  int checks = 0, failures = 0;
  int next_row = 0, expect_word = 0;
  bit rand_ack, rand_pop, want_pop;
  int popped = 0, first_pop_cyc = -1, last_pop_cyc = 0, cyc = 0;

  always #5 clk = ~clk;

  transpose_buffer dut (.clk, .rst_n, .clk_en(1'b1), .flush, .fetch_en, .input_latency,
                        .order, .fetch_req, .fetch_ack, .row_in_valid, .row_in, .word_avail,
                        .word_out, .pop);

  // expected n-th word of the stream under the current word order
  function automatic int exp_word(input int n);
    int wpr;
    if (order.period == 0) return n;
    wpr = (order.words_per_row == 0) ? FETCH_W : int'(order.words_per_row);
    return FETCH_W * (n / wpr) + int'(order.sched[n % int'(order.period)]);
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  assign pop = want_pop && word_avail;

  // SRAM model and stream checker
  always @(posedge clk) begin
    cyc++;
    row_in_valid <= 1'b0;
    if (rst_n && fetch_req && fetch_ack) begin
      row_in_valid <= 1'b1;
      for (int w = 0; w < FETCH_W; w++) row_in[w] <= DATA_W'(FETCH_W * next_row + w);
      next_row++;
    end
    if (rst_n && pop) begin
      check(word_out == DATA_W'(exp_word(expect_word)),
            $sformatf("word %0d exp %0d", word_out, exp_word(expect_word)));
      expect_word++;
      popped++;
      if (first_pop_cyc < 0) first_pop_cyc = cyc;
      last_pop_cyc = cyc;
    end
  end

  always @(negedge clk) begin
    fetch_ack <= rand_ack ? 1'($urandom_range(0, 2) != 0) : 1'b1;
    want_pop  <= rand_pop ? 1'($urandom_range(0, 1))      : 1'b1;
  end

  initial begin
    flush = 0; fetch_en = 0; input_latency = 4; rand_ack = 1; rand_pop = 1;
    order = '0;
    row_in_valid = 0; row_in = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    check(next_row == 0, "no fetch while fetch_en is low");
    fetch_en = 1;
    wait (expect_word >= 200);
    @(negedge clk);
    fetch_en = 0;
    rand_pop = 0;
    repeat (20) @(negedge clk);
    check(!word_avail, "drained after fetch_en low");
    // full-rate phase
    flush = 1; @(negedge clk); flush = 0;
    next_row = 0; expect_word = 0; popped = 0; first_pop_cyc = -1;
    rand_ack = 0; rand_pop = 0;
    fetch_en = 1;
    wait (popped >= 64);
    @(negedge clk);
    check(last_pop_cyc - first_pop_cyc == 63,
          $sformatf("64 words in %0d cycles, exp 64", last_pop_cyc - first_pop_cyc + 1));
    // word schedule, random grants and pops
    fetch_en = 0;
    repeat (10) @(negedge clk);
    flush = 1; @(negedge clk); flush = 0;
    order = '0;
    order.words_per_row = 3;
    order.period = 6;
    order.sched[0] = 3; order.sched[1] = 1; order.sched[2] = 0;
    order.sched[3] = 2; order.sched[4] = 2; order.sched[5] = 1;
    next_row = 0; expect_word = 0; popped = 0;
    rand_ack = 1; rand_pop = 1;
    fetch_en = 1;
    wait (popped >= 120);
    @(negedge clk);
    fetch_en = 0;
    check(popped >= 120, "word schedule stream");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
