// cgra_array_check: random-program check of a cgra_top array of R x C
// tiles against a cycle-level reference model of the array.
//
// Used by tb_cgra_sizes for the array sizes other than the default. It
// fills every scratchpad bank through the host port, loads NPROG random
// programs (random functions, crossbar sources, constants, ii and iters)
// and runs each; every cycle all neighbour links are compared with the
// model, at the end every bank word. It also counts loads, stores and
// multiply-adds executed, so the caller can see the run did real work.
// Has its own clock; raises finished when done.
module cgra_array_check
  import cgra_pkg::*;
#(
  parameter int R = 2,
  parameter int C = 2,
  parameter int NPROG = 6
) (
  output int checks,
  output int failures,
  output int n_ld,
  output int n_st,
  output int n_mac,
  output bit finished
);
  localparam int W = 16, DEPTH = 8, SPM = 256;
  localparam int TW = (R * C > 1) ? $clog2(R * C) : 1;
  localparam int BW = (R > 1) ? $clog2(R) : 1;

  logic clk = 0, rst_n = 0;
  logic cfg_we = 0;
  logic [TW-1:0] cfg_tile = 0;
  logic [2:0] cfg_addr = 0;
  tile_cfg_t cfg_wdata = '0;
  logic start = 0;
  logic [3:0] ii = 0;
  logic [15:0] iters = 0;
  logic busy, done;
  logic host_en = 0, host_we = 0;
  logic [BW-1:0] host_bank = 0;
  logic [7:0] host_addr = 0;
  logic [W-1:0] host_wdata = 0, host_rdata;
  logic [20:0] fpa_y;
  logic [21:0] fpm_y;
  logic [15:0][15:0] sw_out;

  cgra_top #(.ROWS(R), .COLS(C)) dut (
    .clk(clk), .rst_n(rst_n),
    .cfg_we(cfg_we), .cfg_tile(cfg_tile), .cfg_addr(cfg_addr), .cfg_wdata(cfg_wdata),
    .start(start), .ii(ii), .iters(iters), .busy(busy), .done(done),
    .host_en(host_en), .host_we(host_we), .host_bank(host_bank), .host_addr(host_addr),
    .host_wdata(host_wdata), .host_rdata(host_rdata),
    .fpa_mode(1'b0), .fpa_op(FU_NOP), .fpa_a('0), .fpa_b('0), .fpa_y(fpa_y),
    .fpm_mode(1'b0), .fpm_op(FU_NOP), .fpm_a('0), .fpm_b('0), .fpm_c('0), .fpm_y(fpm_y),
    .sw_in('0), .sw_sel('0), .sw_out(sw_out));

  always #5 clk = ~clk;

  localparam int DR [8] = '{-1, 1, 0, 0, -1, -1, 1, 1};
  localparam int DC [8] = '{0, 0, -1, 1, -1, 1, -1, 1};
  localparam int OPP[8] = '{1, 0, 3, 2, 7, 6, 5, 4};

  tile_cfg_t    m_cfg [R][C][DEPTH];
  logic [W-1:0] m_out [R][C][8];
  logic [W-1:0] m_res [R][C];
  logic         m_pend[R][C];
  logic [W-1:0] m_rd  [R];
  logic [W-1:0] m_mem [R][SPM];

  function automatic logic [W-1:0] alu(fu_op_e f, logic [W-1:0] x, logic [W-1:0] z, logic [W-1:0] k);
    logic signed [W-1:0] sx, sz;
    sx = x; sz = z;
    case (f)
      FU_ADD: return x + z;
      FU_SUB: return x - z;
      FU_LT:  return W'(sx < sz);
      FU_LTE: return W'(sx <= sz);
      FU_GT:  return W'(sx > sz);
      FU_GTE: return W'(sx >= sz);
      FU_MUL: return W'(x * z);
      FU_MAC: return W'(x * z + k);
      default: return '0;
    endcase
  endfunction

  function automatic logic [W-1:0] src(int r, int c, logic [3:0] code, logic [W-1:0] rn, logic [W-1:0] k);
    if (code < 8) begin
      int nr, nc;
      nr = r + DR[code]; nc = c + DC[code];
      if (nr < 0 || nr >= R || nc < 0 || nc >= C) return '0;
      return m_out[nr][nc][OPP[code]];
    end
    if (code == 8) return rn;
    if (code == 9) return k;
    return '0;
  endfunction

  task automatic model_step(int slot);
    logic [W-1:0] n_out [R][C][8];
    logic [W-1:0] n_res [R][C];
    logic         n_pend[R][C];
    logic [W-1:0] n_rd [R];
    logic [W-1:0] rn, o0, o1, o2;
    tile_cfg_t k;
    n_rd = m_rd;
    for (int r = 0; r < R; r++) begin
      for (int c = 0; c < C; c++) begin
        k  = m_cfg[r][c][slot];
        rn = m_pend[r][c] ? m_rd[r] : m_res[r][c];
        o0 = src(r, c, k.opnd_sel[0], rn, k.konst);
        o1 = src(r, c, k.opnd_sel[1], rn, k.konst);
        o2 = src(r, c, k.opnd_sel[2], rn, k.konst);
        for (int d = 0; d < 8; d++) n_out[r][c][d] = src(r, c, k.out_sel[d], rn, k.konst);
        n_res[r][c]  = rn;
        n_pend[r][c] = 0;
        if (k.op inside {FU_ADD, FU_SUB, FU_LT, FU_LTE, FU_GT, FU_GTE, FU_MUL, FU_MAC}) begin
          n_res[r][c] = alu(k.op, o0, o1, o2);
          if (k.op == FU_MAC) n_mac++;
        end else if (c == 0 && k.op == FU_LD) begin
          n_rd[r] = m_mem[r][o0[7:0]];
          n_pend[r][c] = 1;
          n_ld++;
        end else if (c == 0 && k.op == FU_ST) begin
          m_mem[r][o0[7:0]] = o1;
          n_st++;
        end
      end
    end
    m_out = n_out; m_res = n_res; m_pend = n_pend; m_rd = n_rd;
  endtask

  task automatic check_links();
    int bad;
    bad = 0;
    for (int r = 0; r < R; r++)
      for (int c = 0; c < C; c++)
        for (int d = 0; d < 8; d++)
          if (dut.t_out[r][c][d] !== m_out[r][c][d]) bad++;
    checks++;
    if (bad != 0) begin
      failures++;
      $display("FAIL %0dx%0d: %0d links differ from the model at %0t", R, C, bad, $time);
    end
  endtask

  function automatic tile_cfg_t rand_cfg();
    tile_cfg_t w;
    w = tile_cfg_t'({$urandom, $urandom});
    w.op = fu_op_e'($urandom_range(0, 10));
    for (int o = 0; o < 3; o++) w.opnd_sel[o] = 4'($urandom_range(0, 10));
    for (int d = 0; d < 8; d++) w.out_sel[d] = 4'($urandom_range(0, 10));
    return w;
  endfunction

  initial begin
    checks = 0; failures = 0; n_ld = 0; n_st = 0; n_mac = 0; finished = 0;
    for (int r = 0; r < R; r++) begin
      m_rd[r] = '0;
      for (int c = 0; c < C; c++) begin
        m_res[r][c] = '0; m_pend[r][c] = 0;
        for (int d = 0; d < 8; d++) m_out[r][c][d] = '0;
      end
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int b = 0; b < R; b++)
      for (int a = 0; a < SPM; a++) begin
        @(negedge clk);
        host_en = 1; host_we = 1; host_bank = BW'(b); host_addr = 8'(a); host_wdata = W'($urandom);
        m_mem[b][a] = host_wdata;
      end
    @(negedge clk);
    host_en = 0; host_we = 0;
    for (int p = 0; p < NPROG; p++) begin
      int n_ii, n_it;
      n_ii = $urandom_range(1, DEPTH);
      n_it = $urandom_range(1, 6);
      for (int r = 0; r < R; r++)
        for (int c = 0; c < C; c++)
          for (int s = 0; s < n_ii; s++) begin
            @(negedge clk);
            cfg_we = 1; cfg_tile = TW'(r * C + c); cfg_addr = 3'(s); cfg_wdata = rand_cfg();
            m_cfg[r][c][s] = cfg_wdata;
          end
      @(negedge clk);
      cfg_we = 0;
      start = 1; ii = 4'(n_ii); iters = 16'(n_it);
      @(negedge clk);
      start = 0;
      for (int it = 0; it < n_it; it++)
        for (int s = 0; s < n_ii; s++) begin
          checks++;
          if (!busy || int'(dut.pc) != s) begin failures++; $display("FAIL %0dx%0d: pc", R, C); end
          model_step(s);
          @(negedge clk);
          check_links();
        end
      checks++;
      if (busy) begin failures++; $display("FAIL %0dx%0d: still busy", R, C); end
    end
    for (int b = 0; b < R; b++)
      for (int a = 0; a < SPM; a++) begin
        @(negedge clk);
        host_en = 1; host_we = 0; host_bank = BW'(b); host_addr = 8'(a);
        @(negedge clk);
        host_en = 0;
        checks++;
        if (host_rdata !== m_mem[b][a]) begin
          failures++;
          $display("FAIL %0dx%0d: bank %0d word %0d", R, C, b, a);
        end
      end
    finished = 1;
  end
endmodule
