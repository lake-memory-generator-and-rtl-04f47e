// accessor_arb: shares the tile's single SRAM port among its accessors.
//
// The storage SRAM is single-ported, so in each cycle one of the accessors
// (the aggregation-buffer writers, the transpose-buffer readers, and the FIFO
// and random-access controllers) drives it. Requester 0 has the highest
// priority; the tile puts writers first so the aggregation buffers, which
// have no back-pressure, drain before readers fetch. A requester that is not
// granted keeps its request and waits (a stall). For reads the arbiter
// remembers who asked and raises ret_valid[i] one cycle later, when the SRAM
// data arrive. The document names the accessors but not their arbitration;
// fixed priority is this design's own choice.
module accessor_arb
  import lake_pkg::*;
#(
  parameter int unsigned NREQ = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clk_en,
  input  logic                 port_ready,          // SRAM not taken by the config bus
  input  sram_req_t [NREQ-1:0] reqs,
  output logic      [NREQ-1:0] grant,
  output sram_req_t            sram_req,
  output logic      [NREQ-1:0] ret_valid,           // read data for requester i this cycle
  output logic                 stall                // some request waited this cycle
);

  logic [NREQ-1:0] want;

  always_comb begin
    grant    = '0;
    sram_req = '0;
    for (int i = 0; i < int'(NREQ); i++) want[i] = reqs[i].req;
    if (port_ready) begin
      for (int i = int'(NREQ) - 1; i >= 0; i--) begin
        if (want[i]) begin
          grant    = '0;
          grant[i] = 1'b1;
          sram_req = reqs[i];
        end
      end
    end
    stall = |(want & ~grant);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ret_valid <= '0;
    else if (clk_en) begin
      for (int i = 0; i < int'(NREQ); i++) ret_valid[i] <= grant[i] && !reqs[i].wr;
    end
  end

  // One grant at most per cycle.
  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(grant));

endmodule
