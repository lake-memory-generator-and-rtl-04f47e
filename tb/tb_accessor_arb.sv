// tb_accessor_arb: random requests from four requesters. Each cycle the
// grant must go to the lowest-numbered requester that asks (none while the
// port is not ready), the forwarded request must be the granted one, stall
// must flag any request left waiting, and ret_valid must follow a granted
// read by exactly one cycle.
module tb_accessor_arb;
  import lake_pkg::*;

  localparam int N = 4;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic port_ready, stall;
  sram_req_t [N-1:0] reqs;
  logic [N-1:0] grant, ret_valid, exp_ret;
  sram_req_t sram_req;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  accessor_arb #(.NREQ(N)) dut (.clk, .rst_n, .clk_en(1'b1), .port_ready, .reqs, .grant,
                                .sram_req, .ret_valid, .stall);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    int winner;
    logic [N-1:0] want;
    reqs = '0; port_ready = 1; exp_ret = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      check(ret_valid == exp_ret, $sformatf("ret_valid %b exp %b", ret_valid, exp_ret));
      port_ready = ($urandom_range(0, 7) != 0);
      for (int i = 0; i < N; i++) begin
        reqs[i].req   = 1'($urandom_range(0, 1));
        reqs[i].wr    = 1'($urandom_range(0, 1));
        reqs[i].addr  = 9'($urandom);
        reqs[i].wmask = 4'($urandom);
        reqs[i].wdata = {$urandom, $urandom};
        want[i] = reqs[i].req;
      end
      winner = -1;
      if (port_ready)
        for (int i = 0; i < N; i++) if (want[i] && winner < 0) winner = i;
      #1;
      if (winner < 0) begin
        check(grant == '0, "no grant");
        check(sram_req.req == 1'b0, "no request forwarded");
        exp_ret = '0;
      end else begin
        check(grant == N'(1 << winner), $sformatf("grant %b exp %0d", grant, winner));
        check(sram_req == reqs[winner], "forwarded request");
        exp_ret = '0;
        exp_ret[winner] = !reqs[winner].wr;
      end
      check(stall == ((want & ~grant) != '0), "stall flag");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
