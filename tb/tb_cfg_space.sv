// tb_cfg_space: writes random values into every configuration register,
// reads each back one cycle after the read, and checks that the struct
// output carries each register's bits at [32k +: 32], e.g. that the mode
// and tile_en fields sit at the top of the struct. Writes past the last
// register must change nothing and read back as zero.
module tb_cfg_space;
  import lake_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic write, read;
  logic [7:0] addr;
  logic [31:0] wdata, rdata;
  tile_cfg_t cfg;
  logic [CFG_WORDS-1:0][31:0] model;
  logic [CFG_WORDS*32-1:0] flat_model;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  cfg_space dut (.clk, .rst_n, .write, .read, .addr, .wdata, .rdata, .cfg);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    write = 0; read = 0; addr = 0; wdata = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(cfg == '0, "reset clears every field");
    for (int k = 0; k < CFG_WORDS; k++) begin
      @(negedge clk);
      write = 1; addr = 8'(k); wdata = $urandom; model[k] = wdata;
    end
    @(negedge clk);
    write = 1; addr = 8'(CFG_WORDS); wdata = 32'hffff_ffff;   // past the end
    @(negedge clk);
    write = 0;
    flat_model = model;
    check(cfg == tile_cfg_t'(flat_model[CFG_BITS-1:0]), "struct matches registers");
    check(cfg.mode == flat_model[CFG_BITS-1 -: 2], "mode is the top field");
    check(cfg.tile_en == flat_model[CFG_BITS-3], "tile_en follows mode");
    check(cfg.tb_word_order[0].sched == flat_model[31:0], "last field at the bottom");
    for (int k = 0; k <= CFG_WORDS; k++) begin
      @(negedge clk);
      read = 1; addr = 8'(k);
      @(negedge clk);
      read = 0;
      if (k < CFG_WORDS) check(rdata == model[k], $sformatf("register %0d read back", k));
      else               check(rdata == '0, "read past the end is zero");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
