// tb_addr_gen: checks the nested-loop address generator against a software
// loop nest. Two configurations: three loops with distinct strides and a
// start offset, then all six loops. Steps come with random gaps; every
// address, the `last` flag and the final `done` are compared with the
// expected iteration, and the generator must wrap back to the start.
module tb_addr_gen;
  import lake_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic restart, step;
  logic [2:0] dimensionality;
  logic [AG_DIMS-1:0][AG_W-1:0] ranges, strides;
  logic [AG_W-1:0] starting_addr, addr;
  logic last, done;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  addr_gen dut (.clk, .rst_n, .clk_en(1'b1), .restart, .dimensionality, .ranges,
                .strides, .starting_addr, .step, .addr, .last, .done);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Walk the loop nest in software, stepping the DUT once per iteration.
  task automatic run_nest(input int dims);
    int idx[AG_DIMS];
    int total, expect_addr;
    total = 1;
    for (int i = 0; i < dims; i++) total *= int'(ranges[i]);
    foreach (idx[i]) idx[i] = 0;
    for (int n = 0; n < total; n++) begin
      expect_addr = int'(starting_addr);
      for (int i = 0; i < dims; i++) expect_addr += idx[i] * int'(strides[i]);
      check(addr == AG_W'(expect_addr), $sformatf("iter %0d addr %0d exp %0d", n, addr, expect_addr));
      check(last == (n == total - 1), $sformatf("iter %0d last", n));
      check(done == 1'b0, "done early");
      // random idle cycles: the address must hold
      repeat ($urandom_range(0, 2)) begin
        @(posedge clk); #1;
        check(addr == AG_W'(expect_addr), "addr moved without step");
      end
      step = 1'b1;
      @(posedge clk); #1;
      step = 1'b0;
      for (int i = 0; i < dims; i++) begin
        if (idx[i] + 1 < int'(ranges[i])) begin idx[i]++; break; end
        idx[i] = 0;
      end
    end
    check(done == 1'b1, "done after last iteration");
    check(addr == starting_addr, "wrapped to starting address");
  endtask

  initial begin
    restart = 1'b0; step = 1'b0;
    dimensionality = 3'd3;
    ranges = '0; strides = '0;
    ranges[0] = 3; ranges[1] = 2; ranges[2] = 4;
    strides[0] = 1; strides[1] = 10; strides[2] = 100;
    starting_addr = 16'd5;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    #1;
    run_nest(3);
    // all six loops
    restart = 1'b1; @(posedge clk); #1; restart = 1'b0;
    check(done == 1'b0, "restart clears done");
    dimensionality = 3'd6;
    for (int i = 0; i < 6; i++) begin
      ranges[i]  = AG_W'(2 + (i % 2));
      strides[i] = AG_W'(1 << (2 * i));
    end
    starting_addr = 16'd40;
    #1;
    run_nest(6);
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
