// cgra_top: king-mesh CGRA of fused-FU tiles, plus the fused floating-point
// units and the banded switch as stand-alone units.
//
// The array: ROWS x COLS tiles (cgra_tile) on a rectangular grid, each tile
// linked to its up to eight neighbours (N, S, W, E and the four diagonals);
// links that would leave the grid read 0. Every tile holds a 16-bit fused FU.
// The tiles of the left-most column are memory tiles: tile (r, 0) loads and
// stores in scratchpad bank r (one bank per row). A single sequencer
// (cgra_ctrl) steps all configuration memories in lockstep.
//
// Use: while idle, write each tile's configuration words (cfg_we, cfg_tile =
// r*COLS + c, cfg_addr = slot, cfg_wdata) and fill the scratchpads through
// the host port (host_en/host_we/host_bank/host_addr/host_wdata; a read
// returns host_rdata one cycle later). Pulse start with ii (slots per
// iteration) and iters; busy stays high for ii*iters cycles and done pulses
// once at the end. Read results back through the host port. The host port
// is meant for use while the array is idle; if both write one word in the
// same cycle, the array's write wins.
//
// Beside the array, with ports of their own, sit the fused floating-point
// adder (fpa_*) and multiplier (fpm_*) and the banded switch (sw_*); these
// are combinational. They are separate units of the same family of fused
// designs, not tiles of the array.
//
// The array size, the sequencer and the memory arrangement are parameters
// and choices of this design; 4x4 is the middle one of the three array
// sizes (2x2, 4x4, 6x6) the fused FU was evaluated in.
module cgra_top
  import cgra_pkg::*;
#(
  parameter int unsigned ROWS      = 4,
  parameter int unsigned COLS      = 4,
  parameter int unsigned W         = DATA_W,
  parameter int unsigned CFG_DEPTH = 8,
  parameter int unsigned SPM_DEPTH = 256,
  parameter int unsigned ITER_W    = 16,
  // stand-alone fused floating-point units
  parameter int unsigned FPA_EXP_W = 6,
  parameter int unsigned FPA_MAN_W = 14,
  parameter int unsigned FPM_EXP_W = 6,
  parameter int unsigned FPM_MAN_W = 15,
  // stand-alone banded switch
  parameter int unsigned SW_N      = 8,
  parameter int unsigned SW_PHYS_W = 16,
  parameter int unsigned SW_EFF_W  = 16,
  parameter int unsigned SW_BAND   = 2,
  parameter bit          SW_ONEHOT = 1'b0,
  localparam int unsigned NT       = ROWS * COLS,
  localparam int unsigned TW       = (NT > 1) ? $clog2(NT) : 1,
  localparam int unsigned CAW      = (CFG_DEPTH > 1) ? $clog2(CFG_DEPTH) : 1,
  localparam int unsigned SAW      = (SPM_DEPTH > 1) ? $clog2(SPM_DEPTH) : 1,
  localparam int unsigned BW       = (ROWS > 1) ? $clog2(ROWS) : 1,
  localparam int unsigned FPA_WL   = 1 + FPA_EXP_W + FPA_MAN_W,
  localparam int unsigned FPM_WL   = 1 + FPM_EXP_W + FPM_MAN_W,
  localparam int unsigned SW_WIN   = 2 * SW_BAND + 1,
  localparam int unsigned SW_SEL_W = SW_ONEHOT ? SW_WIN : ((SW_WIN > 1) ? $clog2(SW_WIN) : 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // configuration load
  input  logic                 cfg_we,
  input  logic [TW-1:0]        cfg_tile,
  input  logic [CAW-1:0]       cfg_addr,
  input  tile_cfg_t            cfg_wdata,
  // run control
  input  logic                 start,
  input  logic [CAW:0]         ii,
  input  logic [ITER_W-1:0]    iters,
  output logic                 busy,
  output logic                 done,
  // host access to the scratchpads
  input  logic                 host_en,
  input  logic                 host_we,
  input  logic [BW-1:0]        host_bank,
  input  logic [SAW-1:0]       host_addr,
  input  logic [W-1:0]         host_wdata,
  output logic [W-1:0]         host_rdata,
  // fused floating-point adder
  input  logic                 fpa_mode,
  input  fu_op_e               fpa_op,
  input  logic [FPA_WL-1:0]    fpa_a,
  input  logic [FPA_WL-1:0]    fpa_b,
  output logic [FPA_WL-1:0]    fpa_y,
  // fused floating-point multiplier
  input  logic                 fpm_mode,
  input  fu_op_e               fpm_op,
  input  logic [FPM_WL-1:0]    fpm_a,
  input  logic [FPM_WL-1:0]    fpm_b,
  input  logic [FPM_WL-1:0]    fpm_c,
  output logic [FPM_WL-1:0]    fpm_y,
  // banded switch
  input  logic [SW_N-1:0][SW_PHYS_W-1:0]     sw_in,
  input  logic [2*SW_N-1:0][SW_SEL_W-1:0]    sw_sel,
  output logic [2*SW_N-1:0][SW_PHYS_W-1:0]   sw_out
);
  logic [CAW-1:0] pc;

  cgra_ctrl #(.DEPTH(CFG_DEPTH), .ITER_W(ITER_W)) u_ctrl (
    .clk  (clk),
    .rst_n(rst_n),
    .start(start),
    .ii   (ii),
    .iters(iters),
    .busy (busy),
    .pc   (pc),
    .done (done)
  );

  logic [ROWS-1:0][COLS-1:0][NUM_DIRS-1:0][W-1:0] t_in, t_out;
  logic [ROWS-1:0]          spm_en, spm_we;
  logic [ROWS-1:0][SAW-1:0] spm_addr;
  logic [ROWS-1:0][W-1:0]   spm_wdata, spm_rdata, host_rd;

  // Neighbour offsets per direction (N, S, W, E, NW, NE, SW, SE) and the
  // direction that points back.
  localparam int DR [NUM_DIRS] = '{-1, 1, 0, 0, -1, -1, 1, 1};
  localparam int DC [NUM_DIRS] = '{0, 0, -1, 1, -1, 1, -1, 1};
  localparam int OPP[NUM_DIRS] = '{1, 0, 3, 2, 7, 6, 5, 4};

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      for (genvar d = 0; d < NUM_DIRS; d++) begin : g_link
        localparam int NR = r + DR[d];
        localparam int NC = c + DC[d];
        if (NR >= 0 && NR < ROWS && NC >= 0 && NC < COLS) begin : g_on
          assign t_in[r][c][d] = t_out[NR][NC][OPP[d]];
        end else begin : g_edge
          assign t_in[r][c][d] = '0;
        end
      end

      logic          m_en, m_we;
      logic [SAW-1:0] m_addr;
      logic [W-1:0]  m_wdata;

      cgra_tile #(
        .W        (W),
        .CFG_DEPTH(CFG_DEPTH),
        .MEM_EN   (c == 0),
        .SPM_AW   (SAW)
      ) u_tile (
        .clk      (clk),
        .rst_n    (rst_n),
        .cfg_we   (cfg_we && cfg_tile == TW'(r * COLS + c)),
        .cfg_addr (cfg_addr),
        .cfg_wdata(cfg_wdata),
        .run      (busy),
        .pc       (pc),
        .in_dir   (t_in[r][c]),
        .out_dir  (t_out[r][c]),
        .spm_en   (m_en),
        .spm_we   (m_we),
        .spm_addr (m_addr),
        .spm_wdata(m_wdata),
        .spm_rdata((c == 0) ? spm_rdata[r] : '0)
      );

      if (c == 0) begin : g_mem
        assign spm_en[r]    = m_en;
        assign spm_we[r]    = m_we;
        assign spm_addr[r]  = m_addr;
        assign spm_wdata[r] = m_wdata;
      end
    end

    scratchpad #(.W(W), .DEPTH(SPM_DEPTH)) u_spm (
      .clk    (clk),
      .rst_n  (rst_n),
      .a_en   (spm_en[r]),
      .a_we   (spm_we[r]),
      .a_addr (spm_addr[r]),
      .a_wdata(spm_wdata[r]),
      .a_rdata(spm_rdata[r]),
      .b_en   (host_en && host_bank == BW'(r)),
      .b_we   (host_we),
      .b_addr (host_addr),
      .b_wdata(host_wdata),
      .b_rdata(host_rd[r])
    );
  end

  logic [BW-1:0] host_bank_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       host_bank_q <= '0;
    else if (host_en) host_bank_q <= host_bank;
  end
  assign host_rdata = host_rd[host_bank_q];

  // ---------------- stand-alone units ----------------
  fp_add_fused #(.EXP_W(FPA_EXP_W), .MAN_W(FPA_MAN_W)) u_fpa (
    .fp_mode(fpa_mode),
    .op     (fpa_op),
    .a      (fpa_a),
    .b      (fpa_b),
    .y      (fpa_y)
  );

  fp_mul_fused #(.EXP_W(FPM_EXP_W), .MAN_W(FPM_MAN_W)) u_fpm (
    .fp_mode(fpm_mode),
    .op     (fpm_op),
    .a      (fpm_a),
    .b      (fpm_b),
    .c      (fpm_c),
    .y      (fpm_y)
  );

  banded_switch #(
    .N     (SW_N),
    .PHYS_W(SW_PHYS_W),
    .EFF_W (SW_EFF_W),
    .BAND  (SW_BAND),
    .ONEHOT(SW_ONEHOT)
  ) u_sw (
    .in_data (sw_in),
    .sel     (sw_sel),
    .out_data(sw_out)
  );
endmodule
