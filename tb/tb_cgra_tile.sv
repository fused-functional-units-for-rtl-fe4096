// tb_cgra_tile: self-checking test of one CGRA tile (memory tile variant).
//
// The tile's eight neighbour inputs are driven with random data, its
// configuration memory is loaded with random words (every function,
// including load and store, every crossbar source) and it is run with a
// random slot sequence and occasional stalls (run low). A small synchronous
// memory answers the tile's scratchpad port. A cycle-level reference model
// of the tile (registered outputs, one-cycle FU and load latency, result
// kept on nop/store) predicts the eight outputs and the memory requests
// every cycle. A second tile with MEM_EN = 0 checks that load and store act
// as nop there.
module tb_cgra_tile;
  import cgra_pkg::*;
  localparam int W = 16, DEPTH = 8, SPM_AW = 4;

  logic clk = 0, rst_n = 0;
  logic cfg_we = 0;
  logic [2:0] cfg_addr = 0, pc = 0;
  tile_cfg_t cfg_wdata = '0;
  logic run = 0;
  logic [NUM_DIRS-1:0][W-1:0] in_dir = '0, out_dir, out_dir_nm;
  logic spm_en, spm_we, nm_en, nm_we;
  logic [SPM_AW-1:0] spm_addr, nm_addr;
  logic [W-1:0] spm_wdata, spm_rdata = '0, nm_wdata;
  logic [W-1:0] mem [1 << SPM_AW];
  int checks = 0, failures = 0;
  int n_ld = 0, n_st = 0, n_stall = 0;

  cgra_tile #(.W(W), .CFG_DEPTH(DEPTH), .MEM_EN(1'b1), .SPM_AW(SPM_AW)) dut (
    .clk(clk), .rst_n(rst_n), .cfg_we(cfg_we), .cfg_addr(cfg_addr), .cfg_wdata(cfg_wdata),
    .run(run), .pc(pc), .in_dir(in_dir), .out_dir(out_dir),
    .spm_en(spm_en), .spm_we(spm_we), .spm_addr(spm_addr), .spm_wdata(spm_wdata), .spm_rdata(spm_rdata));

  cgra_tile #(.W(W), .CFG_DEPTH(DEPTH), .MEM_EN(1'b0), .SPM_AW(SPM_AW)) dut_nm (
    .clk(clk), .rst_n(rst_n), .cfg_we(cfg_we), .cfg_addr(cfg_addr), .cfg_wdata(cfg_wdata),
    .run(run), .pc(pc), .in_dir(in_dir), .out_dir(out_dir_nm),
    .spm_en(nm_en), .spm_we(nm_we), .spm_addr(nm_addr), .spm_wdata(nm_wdata), .spm_rdata(16'hdead));

  // behavioural memory on the tile's port
  always_ff @(posedge clk) begin
    if (spm_en && spm_we)  mem[spm_addr] <= spm_wdata;
    if (spm_en && !spm_we) spm_rdata <= mem[spm_addr];
  end

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference model ----------------
  tile_cfg_t cfgs [DEPTH];
  logic [NUM_DIRS-1:0][W-1:0] m_out, n_out;
  logic [W-1:0] m_res, m_rdata, n_res;
  logic m_pend;
  logic [W-1:0] m_mem [1 << SPM_AW];

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

  function automatic logic [W-1:0] src(logic [3:0] code, logic [W-1:0] r, logic [W-1:0] k);
    if (code < 8) return in_dir[code];
    if (code == 8) return r;
    if (code == 9) return k;
    return '0;
  endfunction

  function automatic bit is_alu(fu_op_e f);
    return f inside {FU_ADD, FU_SUB, FU_LT, FU_LTE, FU_GT, FU_GTE, FU_MUL, FU_MAC};
  endfunction

  // one model step for the memory tile and the plain tile
  task automatic model_step();
    tile_cfg_t c;
    logic [W-1:0] rn, o0, o1, o2, p0, p1, p2;
    c = cfgs[pc];
    rn = m_pend ? m_rdata : m_res;
    o0 = src(c.opnd_sel[0], rn, c.konst);
    o1 = src(c.opnd_sel[1], rn, c.konst);
    o2 = src(c.opnd_sel[2], rn, c.konst);
    // memory requests expected this cycle
    checks++;
    if (spm_en !== (c.op == FU_LD || c.op == FU_ST) ||
        ((c.op == FU_LD || c.op == FU_ST) && (spm_we !== (c.op == FU_ST) || spm_addr !== o0[SPM_AW-1:0] ||
                                              (c.op == FU_ST && spm_wdata !== o1)))) begin
      failures++;
      $display("FAIL memory request op=%s", c.op.name());
    end
    checks++;
    if (nm_en !== 1'b0) begin failures++; $display("FAIL plain tile issued a memory request"); end
    for (int d = 0; d < 8; d++) m_out[d] = src(c.out_sel[d], rn, c.konst);
    if (c.op == FU_LD) begin m_rdata = m_mem[o0[SPM_AW-1:0]]; n_ld++; end
    if (c.op == FU_ST) begin m_mem[o0[SPM_AW-1:0]] = o1; n_st++; end
    if (is_alu(c.op)) begin m_res = alu(c.op, o0, o1, o2); m_pend = 0; end
    else begin m_res = rn; m_pend = (c.op == FU_LD); end
    // plain tile
    p0 = src(c.opnd_sel[0], n_res, c.konst);
    p1 = src(c.opnd_sel[1], n_res, c.konst);
    p2 = src(c.opnd_sel[2], n_res, c.konst);
    for (int d = 0; d < 8; d++) n_out[d] = src(c.out_sel[d], n_res, c.konst);
    if (is_alu(c.op)) n_res = alu(c.op, p0, p1, p2);
  endtask

  function automatic tile_cfg_t rand_cfg();
    tile_cfg_t c;
    c = tile_cfg_t'({$urandom, $urandom});
    c.op = fu_op_e'($urandom_range(0, 10));
    for (int o = 0; o < 3; o++) c.opnd_sel[o] = 4'($urandom_range(0, 10));
    for (int d = 0; d < 8; d++) c.out_sel[d] = 4'($urandom_range(0, 10));
    return c;
  endfunction

  initial begin
    for (int i = 0; i < (1 << SPM_AW); i++) begin
      mem[i] = W'($urandom);
      m_mem[i] = mem[i];
    end
    m_out = '0; n_out = '0; m_res = '0; n_res = '0; m_pend = 0; m_rdata = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (20) begin
      // load a fresh program
      for (int s = 0; s < DEPTH; s++) begin
        @(negedge clk);
        run = 0;
        cfg_we = 1; cfg_addr = 3'(s); cfg_wdata = rand_cfg();
        cfgs[s] = cfg_wdata;
      end
      @(negedge clk);
      cfg_we = 0;
      repeat (200) begin
        @(negedge clk);
        for (int d = 0; d < 8; d++) in_dir[d] = W'($urandom);
        pc  = 3'($urandom);
        run = ($urandom_range(0, 9) != 0);
        #1;
        if (run) model_step();
        else begin
          n_stall++;
          checks++;
          if (spm_en !== 1'b0) begin failures++; $display("FAIL memory request while stalled"); end
        end
        @(posedge clk);
        #1;
        checks += 2;
        if (out_dir !== m_out) begin failures++; $display("FAIL memory tile outputs %h exp %h", out_dir, m_out); end

        if (out_dir_nm !== n_out) begin failures++; $display("FAIL plain tile outputs"); end
      end
    end
    if (n_ld == 0 || n_st == 0 || n_stall == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
