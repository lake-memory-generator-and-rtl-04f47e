// addr_gen: nested-loop address generator of the memory tile.
//
// Up to six loops (loop 0 innermost) with 16-bit ranges and strides, as in the
// taped-out tile's SRAM address generators. Each `step` advances the loop
// nest by one iteration; `addr` is starting_addr + sum(idx[i] * stride[i]),
// kept incrementally as one partial offset per loop so no multiplier is
// needed. `done` rises after the last iteration and holds until `restart`.
// When the nest finishes it wraps back to its first iteration, so the same
// pattern repeats. The incremental form and the restart input are this
// design's own choices; the document gives only the loop count and width.
//
// Timing: addr and done are registered; a step in cycle t shows in t+1.
module addr_gen
  import lake_pkg::*;
#(
  parameter int unsigned DIMS  = AG_DIMS,
  parameter int unsigned WIDTH = AG_W
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic                            clk_en,
  input  logic                            restart,   // back to the first iteration
  input  logic [2:0]                      dimensionality,
  input  logic [DIMS-1:0][WIDTH-1:0]      ranges,
  input  logic [DIMS-1:0][WIDTH-1:0]      strides,
  input  logic [WIDTH-1:0]                starting_addr,
  input  logic                            step,
  output logic [WIDTH-1:0]                addr,
  output logic                            last,      // current iteration is the last
  output logic                            done       // whole nest has been stepped through
);

  logic [DIMS-1:0][WIDTH-1:0] idx;
  logic [DIMS-1:0][WIDTH-1:0] offs;
  logic [DIMS-1:0]            at_max;   // loop i sits on its last index
  logic [DIMS:0]              carry;    // carry[i]: loop i advances this step
  logic                       c;

  always_comb begin
    for (int i = 0; i < DIMS; i++) begin
      // Unused loops count as finished so they never block the carry.
      at_max[i] = (i >= int'(dimensionality)) || (idx[i] + 1'b1 >= ranges[i]);
    end
    c = step;
    for (int i = 0; i < DIMS; i++) begin
      carry[i] = c;
      c        = c && at_max[i];
    end
    carry[DIMS] = c;
    last = &at_max;
  end

  always_comb begin
    addr = starting_addr;
    for (int i = 0; i < DIMS; i++) addr = addr + offs[i];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx  <= '0;
      offs <= '0;
      done <= 1'b0;
    end else if (clk_en) begin
      if (restart) begin
        idx  <= '0;
        offs <= '0;
        done <= 1'b0;
      end else if (step) begin
        for (int i = 0; i < DIMS; i++) begin
          if (carry[i]) begin
            if (at_max[i]) begin
              idx[i]  <= '0;
              offs[i] <= '0;
            end else begin
              idx[i]  <= idx[i] + 1'b1;
              offs[i] <= offs[i] + strides[i];
            end
          end
        end
        if (carry[DIMS]) done <= 1'b1;
      end
    end
  end

endmodule
