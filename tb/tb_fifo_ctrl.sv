// tb_fifo_ctrl: the FIFO controller runs against a one-cycle SRAM model that
// grants every request. Random pushes and pops are checked against a software
// queue: every popped word must be the oldest one held, empty and full must
// match the word count, pushes while full must be refused, and the test
// counts how often each path was used (pops while less than a row is held, rows
// through the SRAM, waits for a fetch) and fails if any never happened.
module tb_fifo_ctrl;
  import lake_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic flush, push, pop, pop_valid, empty, full, gnt, ret_valid;
  logic [15:0] fifo_depth;
  logic [DATA_W-1:0] push_data, pop_data;
  sram_req_t req;
  logic [FETCH_W-1:0][DATA_W-1:0] ret_data;
  logic [FETCH_W-1:0][DATA_W-1:0] mem [MACRO_DEPTH];
  logic [DATA_W-1:0] q[$];
  int checks = 0, failures = 0;
  int n_bypass = 0, n_sram_wr = 0, n_wait = 0, n_full = 0;
  int push_pct = 50;
  int next_val = 0;

  always #5 clk = ~clk;

  fifo_ctrl dut (.clk, .rst_n, .clk_en(1'b1), .flush, .enable(1'b1), .fifo_depth, .push,
                 .push_data, .pop, .pop_valid, .pop_data, .empty, .full, .req, .gnt,
                 .ret_valid, .ret_data);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  assign gnt = req.req;

  // SRAM model
  always @(posedge clk) begin
    ret_valid <= 1'b0;
    if (rst_n && req.req) begin
      if (req.wr) begin
        mem[req.addr] <= req.wdata;
        n_sram_wr++;
      end else begin
        ret_data  <= mem[req.addr];
        ret_valid <= 1'b1;
      end
    end
  end

  // scoreboard
  always @(posedge clk) begin
    if (rst_n && !flush) begin
      check(empty == (q.size() == 0), $sformatf("empty flag, %0d held", q.size()));
      check(full == (q.size() >= int'(fifo_depth)), $sformatf("full flag, %0d held", q.size()));
      if (pop && pop_valid) begin
        if (q.size() == 0) check(1'b0, "pop from empty queue");
        else check(pop_data == q.pop_front(), "pop order");
        if (q.size() < FETCH_W - 1) n_bypass++;
      end
      if (pop && !pop_valid && q.size() > 0) n_wait++;
      if (push && !full) q.push_back(push_data);
      if (push && full) n_full++;
    end
  end

  always @(negedge clk) begin
    push      <= ($urandom_range(0, 99) < push_pct);
    push_data <= DATA_W'(next_val);
    next_val++;
    pop       <= ($urandom_range(0, 99) >= push_pct);
  end

  initial begin
    flush = 0; fifo_depth = 16'd40; ret_valid = 0; ret_data = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int phase = 0; phase < 6; phase++) begin
      push_pct = (phase % 3 == 0) ? 50 : (phase % 3 == 1) ? 85 : 15;
      repeat (400) @(negedge clk);
    end
    $display("short-queue pops %0d, SRAM row writes %0d, fetch waits %0d, refused pushes %0d",
             n_bypass, n_sram_wr, n_wait, n_full);
    check(n_bypass > 0, "pops with under a row held");
    check(n_sram_wr > 0, "SRAM path used");
    check(n_wait > 0, "fetch wait seen");
    check(n_full > 0, "full reached");
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
