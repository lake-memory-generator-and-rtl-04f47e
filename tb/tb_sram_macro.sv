// tb_sram_macro: writes random words to random rows of the macro, some with a
// partial lane mask, and reads them all back against a reference array,
// checking the one-cycle read latency and that reads hold their data.
module tb_sram_macro;
  logic clk = 1'b0;
  logic cen, wen;
  logic [8:0]  addr;
  logic [1:0]  wmask;
  logic [31:0] data_in, data_out;
  logic [31:0] model [512];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sram_macro dut (.clk, .cen, .wen, .addr, .wmask, .data_in, .data_out);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    cen = 0; wen = 0; addr = 0; wmask = 0; data_in = 0;
    // fill every row fully
    for (int a = 0; a < 512; a++) begin
      @(negedge clk);
      cen = 1; wen = 1; addr = 9'(a); wmask = 2'b11; data_in = $urandom;
      model[a] = data_in;
    end
    // partial writes
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      cen = 1; wen = 1; addr = 9'($urandom_range(0, 511)); wmask = 2'($urandom_range(0, 3));
      data_in = $urandom;
      if (wmask[0]) model[addr][15:0]  = data_in[15:0];
      if (wmask[1]) model[addr][31:16] = data_in[31:16];
    end
    // writes with cen low must not land
    for (int n = 0; n < 50; n++) begin
      @(negedge clk);
      cen = 0; wen = 1; addr = 9'($urandom_range(0, 511)); wmask = 2'b11; data_in = $urandom;
    end
    // read back
    for (int a = 0; a < 512; a++) begin
      @(negedge clk);
      cen = 1; wen = 0; addr = 9'(a);
      @(negedge clk);
      cen = 0;
      check(data_out == model[a], $sformatf("row %0d got %h exp %h", a, data_out, model[a]));
      @(negedge clk);
      check(data_out == model[a], "read data held");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
