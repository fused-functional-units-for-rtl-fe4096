// tile_crossbar: the crossbar switch inside a CGRA tile.
//
// Eleven destinations (the eight king-mesh outputs N, S, W, E, NW, NE, SW,
// SE and the three FU operands) each pick one of the sources: the eight
// neighbour inputs (codes 0..7, numbered like the directions in cgra_pkg),
// the tile's own result (code 8) or the constant of the current
// configuration word (code 9). Codes 10..15 give 0. A neighbour input may
// feed any number of destinations in the same cycle. The source codes are
// this design's encoding. Purely combinational; the tile registers what
// leaves towards its neighbours.
module tile_crossbar
  import cgra_pkg::*;
#(
  parameter int unsigned W = DATA_W
) (
  input  logic [NUM_DIRS-1:0][W-1:0]   in_dir,
  input  logic [W-1:0]                 res,
  input  logic [W-1:0]                 konst,
  input  logic [NUM_DIRS-1:0][3:0]     out_sel,
  input  logic [NUM_OPNDS-1:0][3:0]    opnd_sel,
  output logic [NUM_DIRS-1:0][W-1:0]   out_dir,
  output logic [NUM_OPNDS-1:0][W-1:0]  opnd
);
  function automatic logic [W-1:0] pick(logic [3:0] code,
                                        logic [NUM_DIRS-1:0][W-1:0] nb,
                                        logic [W-1:0] r, logic [W-1:0] k);
    if (code < 4'(NUM_DIRS)) return nb[code[2:0]];
    if (code == SRC_RES)     return r;
    if (code == SRC_CONST)   return k;
    return '0;
  endfunction

  always_comb begin
    for (int d = 0; d < int'(NUM_DIRS); d++)  out_dir[d] = pick(out_sel[d], in_dir, res, konst);
    for (int o = 0; o < int'(NUM_OPNDS); o++) opnd[o]    = pick(opnd_sel[o], in_dir, res, konst);
  end
endmodule
