// cgra_tile: one tile of the king-mesh CGRA, built around the fused FU.
//
// Contents: a configuration memory (one word per schedule slot), the tile
// crossbar, the fixed-point fused FU and, in memory tiles (MEM_EN = 1, the
// left-most column), a memory-interface unit that issues loads and stores to
// the row's scratchpad bank. The tile's wrapper logic feeds the crossbar's
// three operand outputs to the FU's a, b, c inputs and drives the FU's
// function select from the configuration word.
//
// Timing (all state changes only while run = 1; otherwise the tile holds):
//   * every output towards a neighbour is a register: what the crossbar
//     selects in slot t is seen by the neighbour in slot t+1 (one hop per
//     cycle);
//   * an FU function computes in one cycle: the result register holds it in
//     slot t+1 and is offered to the crossbar as source 8;
//   * FU_LD reads spm[op0]; the word becomes the tile's result in slot t+1,
//     the same one-cycle latency as the FU; FU_ST writes op1 to spm[op0];
//   * FU_NOP and FU_ST keep the result. In tiles without a memory port
//     FU_LD and FU_ST act as FU_NOP.
// The hop and FU latencies, the result register and the memory-tile
// behaviour are this design's choices; the tile composition (crossbar to the
// eight neighbours, FU, configuration memory, memory tiles in the left
// column) follows the array it is built for.
module cgra_tile
  import cgra_pkg::*;
#(
  parameter int unsigned W         = DATA_W,
  parameter int unsigned CFG_DEPTH = 8,
  parameter bit          MEM_EN    = 1'b0,
  parameter int unsigned SPM_AW    = 8,
  localparam int unsigned CAW      = (CFG_DEPTH > 1) ? $clog2(CFG_DEPTH) : 1
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // configuration load
  input  logic                        cfg_we,
  input  logic [CAW-1:0]              cfg_addr,
  input  tile_cfg_t                   cfg_wdata,
  // schedule
  input  logic                        run,
  input  logic [CAW-1:0]              pc,
  // king-mesh links
  input  logic [NUM_DIRS-1:0][W-1:0]  in_dir,
  output logic [NUM_DIRS-1:0][W-1:0]  out_dir,
  // scratchpad port (used when MEM_EN)
  output logic                        spm_en,
  output logic                        spm_we,
  output logic [SPM_AW-1:0]           spm_addr,
  output logic [W-1:0]                spm_wdata,
  input  logic [W-1:0]                spm_rdata
);
  tile_cfg_t cfg;
  logic [NUM_DIRS-1:0][W-1:0]  xbar_out;
  logic [NUM_OPNDS-1:0][W-1:0] opnd;
  logic [W-1:0] fu_y, res_reg, res_now;
  logic         ld_pending;
  logic         is_fu_op, is_ld, is_st;

  config_mem #(.DEPTH(CFG_DEPTH)) u_cfg (
    .clk  (clk),
    .rst_n(rst_n),
    .we   (cfg_we),
    .waddr(cfg_addr),
    .wdata(cfg_wdata),
    .raddr(pc),
    .rdata(cfg)
  );

  assign res_now = ld_pending ? spm_rdata : res_reg;

  tile_crossbar #(.W(W)) u_xbar (
    .in_dir  (in_dir),
    .res     (res_now),
    .konst   (cfg.konst),
    .out_sel (cfg.out_sel),
    .opnd_sel(cfg.opnd_sel),
    .out_dir (xbar_out),
    .opnd    (opnd)
  );

  fused_fu #(.W(W)) u_fu (
    .op(cfg.op),
    .a (opnd[0]),
    .b (opnd[1]),
    .c (opnd[2]),
    .y (fu_y)
  );

  always_comb begin
    is_fu_op = cfg.op inside {FU_ADD, FU_SUB, FU_LT, FU_LTE, FU_GT, FU_GTE, FU_MUL, FU_MAC};
    is_ld    = MEM_EN && cfg.op == FU_LD;
    is_st    = MEM_EN && cfg.op == FU_ST;
    spm_en    = run && (is_ld || is_st);
    spm_we    = is_st;
    spm_addr  = opnd[0][SPM_AW-1:0];
    spm_wdata = opnd[1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_dir    <= '0;
      res_reg    <= '0;
      ld_pending <= 1'b0;
    end else if (run) begin
      out_dir <= xbar_out;
      if (is_fu_op) begin
        res_reg    <= fu_y;
        ld_pending <= 1'b0;
      end else begin
        res_reg    <= res_now;
        ld_pending <= is_ld;
      end
    end
  end
endmodule
