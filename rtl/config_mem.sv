// config_mem: per-tile configuration memory.
//
// DEPTH configuration words (tile_cfg_t: FU function, crossbar selects,
// constant), one per schedule slot. The host writes a word with we/waddr/
// wdata (takes effect on the next clock edge); the tile reads the word of
// the current slot, raddr, combinationally, as a small register file.
// Words are cleared to all-zero (FU_NOP, every select on input N) at reset.
// The depth is this design's choice.
module config_mem
  import cgra_pkg::*;
#(
  parameter int unsigned DEPTH = 8,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       we,
  input  logic [AW-1:0] waddr,
  input  tile_cfg_t  wdata,
  input  logic [AW-1:0] raddr,
  output tile_cfg_t  rdata
);
  tile_cfg_t mem [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(DEPTH); i++) mem[i] <= '0;
    end else if (we) begin
      mem[waddr] <= wdata;
    end
  end

  assign rdata = mem[raddr];
endmodule
