// sram_macro: single-port SRAM macro, 512 words of 32 bits by default.
//
// Stands in for the foundry macro the tile uses (two 512x32 macros per tile).
// It is written as a plain array so it synthesizes to a memory cell. One
// access per cycle: with cen high, wen high writes the 16-bit halves selected
// by wmask; wen low reads. Read data appears one cycle after the access and
// holds until the next read. The half-word write mask is this design's
// choice; the document gives only the macro's size.
module sram_macro #(
  parameter int unsigned DEPTH = 512,
  parameter int unsigned WIDTH = 32,
  parameter int unsigned LANES = 2,              // independently written lanes
  localparam int unsigned AW   = $clog2(DEPTH),
  localparam int unsigned LW   = WIDTH / LANES
) (
  input  logic                clk,
  input  logic                cen,    // chip enable, active high
  input  logic                wen,    // write enable, active high
  input  logic [AW-1:0]       addr,
  input  logic [LANES-1:0]    wmask,
  input  logic [WIDTH-1:0]    data_in,
  output logic [WIDTH-1:0]    data_out
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (cen) begin
      if (wen) begin
        for (int l = 0; l < int'(LANES); l++)
          if (wmask[l]) mem[addr][l*LW +: LW] <= data_in[l*LW +: LW];
      end else begin
        data_out <= mem[addr];
      end
    end
  end

endmodule
