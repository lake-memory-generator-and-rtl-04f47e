// tb_sram_mode_ctrl: random word writes and reads through the random-access
// controller, against a row-wide SRAM model and a word-level reference.
// Reads must return the addressed word one cycle after ren. Then chaining is
// switched on with this tile as tile 1: accesses whose tile bit (bit 11) is 0
// must leave the memory alone and return nothing, those with bit 11 set must
// act on the local word.
module tb_sram_mode_ctrl;
  import lake_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic wen, ren, ret_valid, rd_valid;
  logic enable_chain_input, enable_chain_output, chain_idx_input, chain_idx_output;
  logic [AG_W-1:0] addr;
  logic [DATA_W-1:0] data_in, rd_data;
  sram_req_t req;
  logic [FETCH_W-1:0][DATA_W-1:0] ret_data;
  logic [FETCH_W-1:0][DATA_W-1:0] mem [MACRO_DEPTH];
  logic [DATA_W-1:0] ref_mem [2048];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sram_mode_ctrl dut (.clk, .rst_n, .clk_en(1'b1), .enable(1'b1), .wen, .ren, .addr, .data_in,
                      .enable_chain_input, .enable_chain_output, .chain_idx_input,
                      .chain_idx_output, .req, .ret_valid, .ret_data, .rd_valid, .rd_data);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(posedge clk) begin
    ret_valid <= 1'b0;
    if (rst_n && req.req) begin
      if (req.wr) begin
        for (int w = 0; w < FETCH_W; w++) if (req.wmask[w]) mem[req.addr][w] <= req.wdata[w];
      end else begin
        ret_data  <= mem[req.addr];
        ret_valid <= 1'b1;
      end
    end
  end

  task automatic write_word(input int a, input logic [15:0] d);
    @(negedge clk);
    wen = 1; ren = 0; addr = AG_W'(a); data_in = d;
    @(negedge clk);
    wen = 0;
  endtask

  task automatic read_word(input int a, input bit expect_hit, input logic [15:0] e);
    @(negedge clk);
    wen = 0; ren = 1; addr = AG_W'(a);
    @(negedge clk);
    ren = 0;
    check(rd_valid == expect_hit, $sformatf("rd_valid for %0h", a));
    if (expect_hit) check(rd_data == e, $sformatf("addr %0d got %0h exp %0h", a, rd_data, e));
  endtask

  initial begin
    wen = 0; ren = 0; addr = 0; data_in = 0; ret_valid = 0;
    enable_chain_input = 0; enable_chain_output = 0; chain_idx_input = 0; chain_idx_output = 0;
    for (int r = 0; r < MACRO_DEPTH; r++) mem[r] = '0;
    foreach (ref_mem[i]) ref_mem[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      int a;
      a = $urandom_range(0, 63);
      if ($urandom_range(0, 1)) begin
        logic [15:0] d;
        d = 16'($urandom);
        write_word(a, d);
        ref_mem[a] = d;
      end else begin
        read_word(a, 1, ref_mem[a]);
      end
    end
    // chaining, this tile answers to tile index 1
    enable_chain_input = 1; enable_chain_output = 1; chain_idx_input = 1; chain_idx_output = 1;
    for (int a = 0; a < 16; a++) write_word(a, 16'hdead);            // other tile: ignored
    for (int a = 0; a < 16; a++) read_word(a, 0, 16'h0);             // other tile: no data
    for (int a = 0; a < 16; a++) begin
      write_word(2048 + a, 16'(a * 3 + 1));                           // this tile
      ref_mem[a] = 16'(a * 3 + 1);
    end
    for (int a = 0; a < 16; a++) read_word(2048 + a, 1, ref_mem[a]);
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
