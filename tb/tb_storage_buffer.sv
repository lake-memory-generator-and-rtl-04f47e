// tb_storage_buffer: checks the wide SRAM built from two macros. Rows are
// written through the datapath request with random word masks and read back
// against a reference; the configuration bus then writes 32-bit words into
// each macro, and the test reads them back both over the bus and as words of
// a datapath row (macro 0 = words 0-1, macro 1 = words 2-3). It also checks
// rvalid timing and that `ready` drops while the bus owns the macros.
module tb_storage_buffer;
  import lake_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  sram_req_t req;
  logic [FETCH_W-1:0][DATA_W-1:0] rdata;
  logic rvalid, ready;
  logic [1:0] config_en;
  logic config_read, config_write;
  logic [7:0] config_addr_in;
  logic [31:0] config_data_in;
  logic [1:0][31:0] config_data_out;
  logic [FETCH_W-1:0][DATA_W-1:0] model [64];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  storage_buffer dut (.clk, .rst_n, .clk_en(1'b1), .req, .rdata, .rvalid, .ready,
                      .config_en, .config_read, .config_write, .config_addr_in,
                      .config_data_in, .config_data_out);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    req = '0; config_en = 0; config_read = 0; config_write = 0;
    config_addr_in = 0; config_data_in = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int a = 0; a < 64; a++) begin
      @(negedge clk);
      req.req = 1; req.wr = 1; req.addr = 9'(a); req.wmask = '1;
      for (int w = 0; w < FETCH_W; w++) req.wdata[w] = 16'($urandom);
      model[a] = req.wdata;
    end
    for (int n = 0; n < 100; n++) begin
      @(negedge clk);
      req.req = 1; req.wr = 1; req.addr = 9'($urandom_range(0, 63));
      req.wmask = 4'($urandom_range(0, 15));
      for (int w = 0; w < FETCH_W; w++) begin
        req.wdata[w] = 16'($urandom);
        if (req.wmask[w]) model[req.addr][w] = req.wdata[w];
      end
    end
    for (int a = 0; a < 64; a++) begin
      @(negedge clk);
      req.req = 1; req.wr = 0; req.addr = 9'(a);
      @(negedge clk);
      req.req = 0;
      check(rvalid, "rvalid after read");
      check(rdata == model[a], $sformatf("row %0d got %h exp %h", a, rdata, model[a]));
      @(negedge clk);
      check(!rvalid, "rvalid one cycle only");
    end
    // configuration bus
    for (int a = 0; a < 16; a++) begin
      for (int m = 0; m < 2; m++) begin
        @(negedge clk);
        config_en = 2'(1 << m); config_write = 1; config_addr_in = 8'(a);
        config_data_in = $urandom;
        model[a][2*m]   = config_data_in[15:0];
        model[a][2*m+1] = config_data_in[31:16];
        #1 check(!ready, "ready low during config");
      end
    end
    @(negedge clk);
    config_write = 0;
    for (int a = 0; a < 16; a++) begin
      for (int m = 0; m < 2; m++) begin
        @(negedge clk);
        config_en = 2'(1 << m); config_read = 1; config_addr_in = 8'(a);
        @(negedge clk);
        config_en = 0; config_read = 0;
        check(config_data_out[m] == {model[a][2*m+1], model[a][2*m]},
              $sformatf("config read macro %0d row %0d", m, a));
      end
    end
    for (int a = 0; a < 16; a++) begin
      @(negedge clk);
      #1 check(ready, "ready after config");
      req.req = 1; req.wr = 0; req.addr = 9'(a);
      @(negedge clk);
      req.req = 0;
      check(rdata == model[a], $sformatf("row %0d after config", a));
    end
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
