// tb_agg_buffer: drives word streams into the aggregation buffer and checks
// the rows it hands to the SRAM, in order, with their word masks:
//   A  identity schedule, words every cycle, rows taken at once;
//   B  line alignment: lines of 6 words give a full row, then a 2-word row;
//   C  a swapped output schedule (fill rows 0,1, drain 1,0);
//   D  no rows taken: the fifth group of words overflows and is dropped.
// Expected rows are built from the stream itself, not from the buffer.
module tb_agg_buffer;
  import lake_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic flush, wen, row_valid, row_ack, overflow;
  agg_cfg_t cfg;
  logic [DATA_W-1:0] data_in;
  logic [FETCH_W-1:0][DATA_W-1:0] row_data;
  logic [FETCH_W-1:0] row_mask;
  int checks = 0, failures = 0;
  int overflows = 0;

  typedef struct { logic [FETCH_W-1:0][DATA_W-1:0] d; logic [FETCH_W-1:0] m; } row_t;
  row_t exp_q[$];
  bit ack_en;

  always #5 clk = ~clk;

  agg_buffer dut (.clk, .rst_n, .clk_en(1'b1), .flush, .cfg, .wen, .data_in,
                  .row_valid, .row_data, .row_mask, .row_ack, .overflow);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  assign row_ack = ack_en && row_valid;

  always @(posedge clk) begin
    if (rst_n && overflow) overflows++;
    if (rst_n && row_valid && row_ack) begin
      if (exp_q.size() == 0) check(1'b0, "unexpected row");
      else begin
        row_t e;
        e = exp_q.pop_front();
        check(row_mask == e.m, $sformatf("mask %b exp %b", row_mask, e.m));
        for (int w = 0; w < FETCH_W; w++)
          if (e.m[w]) check(row_data[w] == e.d[w], $sformatf("word %0d got %0d exp %0d", w, row_data[w], e.d[w]));
      end
    end
  end

  task automatic send(input int n, input int base, input int gap);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      wen = 1; data_in = DATA_W'(base + i);
      @(negedge clk);
      wen = 0;
      repeat (gap) @(negedge clk);
    end
  endtask

  function automatic row_t mk(input int first, input int cnt);
    row_t r;
    r.d = '0; r.m = '0;
    for (int w = 0; w < cnt; w++) begin r.d[w] = DATA_W'(first + w); r.m[w] = 1'b1; end
    return r;
  endfunction

  task automatic restart();
    @(negedge clk); flush = 1; @(negedge clk); flush = 0;
  endtask

  task automatic drain(input string name);
    repeat (20) @(negedge clk);
    check(exp_q.size() == 0, $sformatf("%s: %0d rows never came", name, exp_q.size()));
    exp_q.delete();
  endtask

  initial begin
    flush = 0; wen = 0; data_in = 0; ack_en = 1;
    cfg = '0;
    cfg.in_period = 4; cfg.out_period = 4;
    for (int i = 0; i < 4; i++) begin cfg.in_sched[i] = 2'(i); cfg.out_sched[i] = 2'(i); end
    repeat (2) @(negedge clk);
    rst_n = 1;
    // A: back-to-back words
    for (int g = 0; g < 6; g++) exp_q.push_back(mk(100 + 4 * g, 4));
    @(negedge clk);
    for (int i = 0; i < 24; i++) begin
      wen = 1; data_in = DATA_W'(100 + i); @(negedge clk);
    end
    wen = 0;
    drain("A");
    // B: lines of 6 words
    restart();
    cfg.line_length = 6;
    for (int l = 0; l < 3; l++) begin
      exp_q.push_back(mk(200 + 6 * l, 4));
      exp_q.push_back(mk(204 + 6 * l, 2));
    end
    send(18, 200, 0);
    drain("B");
    // C: fill rows 0,1 and drain them 1,0
    restart();
    cfg.line_length = 0;
    cfg.in_period = 2; cfg.out_period = 2;
    cfg.in_sched[0] = 0; cfg.in_sched[1] = 1;
    cfg.out_sched[0] = 1; cfg.out_sched[1] = 0;
    for (int p = 0; p < 2; p++) begin
      exp_q.push_back(mk(300 + 8 * p + 4, 4));
      exp_q.push_back(mk(300 + 8 * p, 4));
    end
    send(16, 300, 3);
    drain("C");
    check(overflows == 0, "no overflow in A-C");
    // D: nothing drains: four rows fill, the fifth group is dropped
    restart();
    cfg.in_period = 4; cfg.out_period = 4;
    for (int i = 0; i < 4; i++) begin cfg.in_sched[i] = 2'(i); cfg.out_sched[i] = 2'(i); end
    ack_en = 0;
    send(20, 400, 0);
    @(negedge clk);
    check(overflows == 4, $sformatf("overflow count %0d exp 4", overflows));
    for (int g = 0; g < 4; g++) exp_q.push_back(mk(400 + 4 * g, 4));
    ack_en = 1;
    drain("D");
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
