// cfg_space: the tile's configuration registers and their bus.
//
// Holds every configuration field of the tile (lake_pkg::tile_cfg_t) as a
// bank of 32-bit registers. A write on the configuration bus stores
// config_data into register config_addr; register k holds bits [32k +: 32]
// of the packed struct, so the register map follows the struct's field order
// (the last register is only partly used). A read returns the register one
// cycle later on rdata. Writes beyond the last register are ignored and such
// reads return zero. All registers reset to zero, which leaves the tile
// disabled (tile_en = 0). The document names the configuration space
// (configuration registers and bus demultiplexing) and the fields; the
// address map and reset values are this design's own.
module cfg_space
  import lake_pkg::*;
#(
  parameter int unsigned ADDR_W = 8
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               write,
  input  logic               read,
  input  logic [ADDR_W-1:0]  addr,
  input  logic [31:0]        wdata,
  output logic [31:0]        rdata,
  output tile_cfg_t          cfg
);

  logic [CFG_WORDS-1:0][31:0] regs;
  logic [CFG_BITS-1:0]        flat;

  assign flat = CFG_BITS'(regs);
  assign cfg  = tile_cfg_t'(flat);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      regs  <= '0;
      rdata <= '0;
    end else begin
      if (write && addr < ADDR_W'(CFG_WORDS)) regs[addr] <= wdata;
      if (read) rdata <= (addr < ADDR_W'(CFG_WORDS)) ? regs[addr] : '0;
    end
  end

endmodule
