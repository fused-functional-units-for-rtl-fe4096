// tb_cgra_top: end-to-end test of the whole design at its default size
// (4x4 tiles, 16-bit datapath, 8 configuration slots, 256-word banks).
//
// Part 1, a hand-scheduled kernel: c[i] = a[i]*b[i] + a[i] for i = 0..19,
//   with a in bank 0, b in bank 1, c written to bank 2. One iteration takes
//   7 slots: tile (1,1) keeps the loop counter (add of its own result and
//   the constant 1) and sends it diagonally and sideways to the memory tiles
//   (0,0), (1,0) and (2,0); (0,0) and (1,0) load a and b and pass them east
//   and north-east to tile (0,1), which executes the fused multiply-add;
//   the product travels back south-west and south to tile (2,0), which
//   stores it. The run must take exactly ii*iters = 140 cycles.
// Part 2, random programs: every tile gets random configuration words
//   (every function and crossbar source), the banks random data, and the
//   array runs random ii and iters. A cycle-level reference model of the
//   array predicts all 128 neighbour links every cycle and the bank
//   contents at the end.
// Part 3, the stand-alone fused FP adder, FP multiplier (both modes) and
//   banded switch are exercised through the top's ports.
// Each mechanism (every FU function, loads, stores, diagonal links, links
// at the array edge, multi-iteration runs, reconfiguration, FP and integer
// modes of the FP units) is counted; one that never happens is a failure.
module tb_cgra_top;
  import cgra_pkg::*;
  localparam int R = 4, C = 4, W = 16, DEPTH = 8, SPM = 256;

  logic clk = 0, rst_n = 0;
  logic cfg_we = 0;
  logic [3:0] cfg_tile = 0;
  logic [2:0] cfg_addr = 0;
  tile_cfg_t cfg_wdata = '0;
  logic start = 0;
  logic [3:0] ii = 0;
  logic [15:0] iters = 0;
  logic busy, done;
  logic host_en = 0, host_we = 0;
  logic [1:0] host_bank = 0;
  logic [7:0] host_addr = 0;
  logic [W-1:0] host_wdata = 0, host_rdata;
  logic fpa_mode = 0, fpm_mode = 0;
  fu_op_e fpa_op = FU_NOP, fpm_op = FU_NOP;
  logic [20:0] fpa_a = 0, fpa_b = 0, fpa_y;
  logic [21:0] fpm_a = 0, fpm_b = 0, fpm_c = 0, fpm_y;
  logic [7:0][15:0] sw_in = '0;
  logic [15:0][2:0] sw_sel = '0;
  logic [15:0][15:0] sw_out;

  cgra_top dut (
    .clk(clk), .rst_n(rst_n),
    .cfg_we(cfg_we), .cfg_tile(cfg_tile), .cfg_addr(cfg_addr), .cfg_wdata(cfg_wdata),
    .start(start), .ii(ii), .iters(iters), .busy(busy), .done(done),
    .host_en(host_en), .host_we(host_we), .host_bank(host_bank), .host_addr(host_addr),
    .host_wdata(host_wdata), .host_rdata(host_rdata),
    .fpa_mode(fpa_mode), .fpa_op(fpa_op), .fpa_a(fpa_a), .fpa_b(fpa_b), .fpa_y(fpa_y),
    .fpm_mode(fpm_mode), .fpm_op(fpm_op), .fpm_a(fpm_a), .fpm_b(fpm_b), .fpm_c(fpm_c), .fpm_y(fpm_y),
    .sw_in(sw_in), .sw_sel(sw_sel), .sw_out(sw_out));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int busy_cycles = 0;
  always @(negedge clk) if (busy) busy_cycles++;
  int n_op [16];
  int n_diag = 0, n_edge = 0, n_multi_iter = 0, n_reconfig = 0, n_fp = 0, n_fpint = 0, n_sw = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference model of the array ----------------
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

  function automatic logic [W-1:0] nb_in(int r, int c, int d);
    int nr, nc;
    nr = r + DR[d]; nc = c + DC[d];
    if (nr < 0 || nr >= R || nc < 0 || nc >= C) return '0;
    return m_out[nr][nc][OPP[d]];
  endfunction

  function automatic logic [W-1:0] src(int r, int c, logic [3:0] code, logic [W-1:0] rn, logic [W-1:0] k);
    if (code < 8) begin
      int nr, nc;
      nr = r + DR[code]; nc = c + DC[code];
      if (nr < 0 || nr >= R || nc < 0 || nc >= C) n_edge++;
      else if (code >= 4) n_diag++;
      return nb_in(r, c, int'(code));
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
          n_op[k.op]++;
        end else if (c == 0 && k.op == FU_LD) begin
          n_rd[r] = m_mem[r][o0[7:0]];
          n_pend[r][c] = 1;
          n_op[k.op]++;
        end else if (c == 0 && k.op == FU_ST) begin
          m_mem[r][o0[7:0]] = o1;
          n_op[k.op]++;
        end
      end
    end
    m_out = n_out; m_res = n_res; m_pend = n_pend; m_rd = n_rd;
  endtask

  // compare every neighbour link of the array with the model
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
      $display("FAIL %0d links differ from the model at %0t", bad, $time);
    end
  endtask

  // ---------------- host-side helpers ----------------
  task automatic write_cfg(int r, int c, int slot, tile_cfg_t w);
    @(negedge clk);
    cfg_we = 1; cfg_tile = 4'(r * C + c); cfg_addr = 3'(slot); cfg_wdata = w;
    m_cfg[r][c][slot] = w;
    @(negedge clk);
    cfg_we = 0;
  endtask

  task automatic host_write(int bank, int addr, logic [W-1:0] v);
    @(negedge clk);
    host_en = 1; host_we = 1; host_bank = 2'(bank); host_addr = 8'(addr); host_wdata = v;
    m_mem[bank][addr] = v;
    @(negedge clk);
    host_en = 0; host_we = 0;
  endtask

  task automatic host_read(int bank, int addr, output logic [W-1:0] v);
    @(negedge clk);
    host_en = 1; host_we = 0; host_bank = 2'(bank); host_addr = 8'(addr);
    @(negedge clk);
    host_en = 0;
    v = host_rdata;
  endtask

  // run the loaded program for n_ii slots and n_it iterations, stepping
  // the model and checking the links, the pc and the cycle count
  task automatic run_prog(int n_ii, int n_it);
    int cyc, n_done;
    @(negedge clk);
    start = 1; ii = 4'(n_ii); iters = 16'(n_it);
    @(negedge clk);
    start = 0;
    cyc = 0; n_done = 0;
    for (int it = 0; it < n_it; it++) begin
      for (int s = 0; s < n_ii; s++) begin
        checks++;
        if (!busy || int'(dut.pc) != s) begin
          failures++;
          $display("FAIL busy=%0d pc=%0d expected slot %0d", busy, dut.pc, s);
        end
        model_step(s);
        @(negedge clk);
        if (done) n_done++;
        check_links();
        cyc++;
      end
    end
    checks += 2;
    if (busy) begin failures++; $display("FAIL still busy after %0d cycles", cyc); end
    if (n_done != 1) begin failures++; $display("FAIL done pulsed %0d times", n_done); end
    if (n_it > 1) n_multi_iter++;
  endtask

  function automatic tile_cfg_t mk(fu_op_e op, logic [3:0] s0, logic [3:0] s1, logic [3:0] s2, logic [W-1:0] kk);
    tile_cfg_t w;
    w = '0;
    w.op = op;
    w.opnd_sel[0] = s0; w.opnd_sel[1] = s1; w.opnd_sel[2] = s2;
    w.konst = kk;
    return w;
  endfunction

  // ---------------- part 1: hand-scheduled multiply-add kernel ----------------
  localparam int NK = 20;
  logic [W-1:0] ka [NK], kb [NK];

  task automatic kernel_test();
    tile_cfg_t w;
    int c0;
    logic [W-1:0] v, expv;
    for (int r = 0; r < R; r++)
      for (int c = 0; c < C; c++)
        for (int s = 0; s < DEPTH; s++) write_cfg(r, c, s, mk(FU_NOP, 15, 15, 15, 0));
    // (1,1): loop counter, sent NW, W and SW in slot 0
    w = mk(FU_ADD, SRC_RES, SRC_CONST, 15, 1);
    w.out_sel[DIR_NW] = SRC_RES; w.out_sel[DIR_W] = SRC_RES; w.out_sel[DIR_SW] = SRC_RES;
    write_cfg(1, 1, 0, w);
    // (0,0): load a[i]; pass it east
    write_cfg(0, 0, 1, mk(FU_LD, 4'(DIR_SE), 15, 15, 0));
    w = mk(FU_NOP, 15, 15, 15, 0); w.out_sel[DIR_E] = SRC_RES;
    write_cfg(0, 0, 2, w);
    // (1,0): load b[i]; pass it north-east; later forward the product south
    write_cfg(1, 0, 1, mk(FU_LD, 4'(DIR_E), 15, 15, 0));
    w = mk(FU_NOP, 15, 15, 15, 0); w.out_sel[DIR_NE] = SRC_RES;
    write_cfg(1, 0, 2, w);
    w = mk(FU_NOP, 15, 15, 15, 0); w.out_sel[DIR_S] = 4'(DIR_NE);
    write_cfg(1, 0, 5, w);
    // (0,1): a*b + a; send it south-west
    write_cfg(0, 1, 3, mk(FU_MAC, 4'(DIR_W), 4'(DIR_SW), 4'(DIR_W), 0));
    w = mk(FU_NOP, 15, 15, 15, 0); w.out_sel[DIR_SW] = SRC_RES;
    write_cfg(0, 1, 4, w);
    // (2,0): capture the address, then store the product
    write_cfg(2, 0, 1, mk(FU_ADD, 4'(DIR_NE), SRC_CONST, 15, 0));
    write_cfg(2, 0, 6, mk(FU_ST, SRC_RES, 4'(DIR_N), 15, 0));
    for (int i = 0; i < NK; i++) begin
      ka[i] = W'($urandom); kb[i] = W'($urandom);
      host_write(0, i, ka[i]);
      host_write(1, i, kb[i]);
    end
    busy_cycles = 0;
    run_prog(7, NK);
    c0 = busy_cycles;
    checks++;
    if (c0 != 7 * NK) begin failures++; $display("FAIL kernel ran %0d cycles, expected %0d", c0, 7 * NK); end
    for (int i = 0; i < NK; i++) begin
      host_read(2, i, v);
      expv = W'(ka[i] * kb[i] + ka[i]);
      checks++;
      if (v !== expv) begin failures++; $display("FAIL kernel c[%0d]=%h expected %h", i, v, expv); end
    end
    n_reconfig++;
  endtask

  // ---------------- part 2: random programs against the model ----------------
  function automatic tile_cfg_t rand_cfg();
    tile_cfg_t w;
    w = tile_cfg_t'({$urandom, $urandom});
    w.op = fu_op_e'($urandom_range(0, 10));
    for (int o = 0; o < 3; o++) w.opnd_sel[o] = 4'($urandom_range(0, 10));
    for (int d = 0; d < 8; d++) w.out_sel[d] = 4'($urandom_range(0, 10));
    return w;
  endfunction

  task automatic random_test(int n_prog);
    logic [W-1:0] v;
    for (int p = 0; p < n_prog; p++) begin
      int n_ii, n_it;
      n_ii = $urandom_range(1, DEPTH);
      n_it = $urandom_range(1, 6);
      for (int r = 0; r < R; r++)
        for (int c = 0; c < C; c++)
          for (int s = 0; s < n_ii; s++) write_cfg(r, c, s, rand_cfg());
      n_reconfig++;
      run_prog(n_ii, n_it);
    end
    for (int b = 0; b < R; b++)
      for (int a = 0; a < SPM; a++) begin
        host_read(b, a, v);
        checks++;
        if (v !== m_mem[b][a]) begin failures++; $display("FAIL bank %0d word %0d = %h expected %h", b, a, v, m_mem[b][a]); end
      end
  endtask

  // ---------------- part 3: stand-alone units ----------------
  task automatic side_units_test();
    #1;
    // FP adder: 1.5 + 2.25 = 3.75 (bias 31, 14-bit mantissa)
    fpa_mode = 1; fpa_op = FU_ADD; fpa_a = {1'b0, 6'd31, 14'h2000}; fpa_b = {1'b0, 6'd32, 14'h0800};
    #1; checks++; n_fp++;
    if (fpa_y !== {1'b0, 6'd32, 14'h3800}) begin failures++; $display("FAIL fp add %h", fpa_y); end
    // FP adder, integer mode: 100 - 300 = -200 on 16 bits
    fpa_mode = 0; fpa_op = FU_SUB; fpa_a = 21'd100; fpa_b = 21'd300;
    #1; checks++; n_fpint++;
    if (fpa_y !== {5'b0, 16'hff38}) begin failures++; $display("FAIL fp-adder int sub %h", fpa_y); end
    // FP multiplier: -1.5 * 2.5 = -3.75 (bias 31, 15-bit mantissa)
    fpm_mode = 1; fpm_op = FU_MUL; fpm_a = {1'b1, 6'd31, 15'h4000}; fpm_b = {1'b0, 6'd32, 15'h2000};
    #1; checks++; n_fp++;
    if (fpm_y !== {1'b1, 6'd32, 15'h7000}) begin failures++; $display("FAIL fp mul %h", fpm_y); end
    // FP multiplier, integer mode: 300*7 + 5
    fpm_mode = 0; fpm_op = FU_MAC; fpm_a = 22'd300; fpm_b = 22'd7; fpm_c = 22'd5;
    #1; checks++; n_fpint++;
    if (fpm_y !== 22'd2105) begin failures++; $display("FAIL fp-multiplier int mac %h", fpm_y); end
    // banded switch: output 2k takes input k-2+sel
    for (int i = 0; i < 8; i++) sw_in[i] = 16'(16'h1000 * i + 16'h0011);
    for (int k = 0; k < 16; k++) sw_sel[k] = 3'(k % 5);
    #1;
    for (int k = 0; k < 16; k++) begin
      int s;
      s = k / 2 - 2 + k % 5;
      checks++; n_sw++;
      if (sw_out[k] !== ((s >= 0 && s < 8) ? sw_in[s] : 16'h0)) begin
        failures++; $display("FAIL switch output %0d", k);
      end
    end
  endtask

  initial begin
    for (int i = 0; i < 16; i++) n_op[i] = 0;
    for (int r = 0; r < R; r++) begin
      m_rd[r] = '0;
      for (int c = 0; c < C; c++) begin
        m_res[r][c] = '0; m_pend[r][c] = 0;
        for (int d = 0; d < 8; d++) m_out[r][c][d] = '0;
        for (int s = 0; s < DEPTH; s++) m_cfg[r][c][s] = '0;
      end
      for (int a = 0; a < SPM; a++) m_mem[r][a] = '0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    // fill the banks so that the model knows every word
    for (int b = 0; b < R; b++)
      for (int a = 0; a < SPM; a++) host_write(b, a, W'($urandom));
    kernel_test();
    random_test(12);
    side_units_test();
    // every mechanism must have happened
    for (int o = 1; o <= 10; o++) begin
      checks++;
      if (n_op[o] == 0) begin failures++; $display("FAIL function %s never executed", fu_op_e'(o)); end
    end
    checks++;
    if (n_diag == 0 || n_edge == 0 || n_multi_iter == 0 || n_reconfig < 2 || n_fp == 0 || n_fpint == 0 || n_sw == 0) begin
      failures++;
      $display("FAIL coverage diag=%0d edge=%0d multi=%0d reconfig=%0d", n_diag, n_edge, n_multi_iter, n_reconfig);
    end
    $display("mechanisms: add=%0d sub=%0d lt=%0d lte=%0d gt=%0d gte=%0d mul=%0d mac=%0d ld=%0d st=%0d",
             n_op[1], n_op[2], n_op[3], n_op[4], n_op[5], n_op[6], n_op[7], n_op[8], n_op[9], n_op[10]);
    $display("mechanisms: diagonal=%0d edge=%0d multi-iteration runs=%0d reconfigurations=%0d",
             n_diag, n_edge, n_multi_iter, n_reconfig);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
