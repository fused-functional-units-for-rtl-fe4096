// tb_fp_add_fused: self-checking test of the fused floating-point adder at
// its default format (6-bit exponent, 14-bit mantissa).
//
// FP mode: the reference turns each operand into an exact 128-bit scaled
// integer, adds exactly, then rounds toward zero by locating the leading
// one. Operand exponents are drawn close together (cancellation) as well as
// far apart (alignment beyond the guard bits). Underflow, overflow
// saturation, zero operands and exact cancellation are covered.
// Integer mode: add, sub and signed compares on the low 16 bits against
// plain SystemVerilog arithmetic. Combinational: sampled 1 ns after inputs.
module tb_fp_add_fused;
  import cgra_pkg::*;
  localparam int E = 6, M = 14, WL = 1 + E + M, IW = M + 2, BIAS = 31;

  logic          fp_mode;
  fu_op_e        op;
  logic [WL-1:0] a, b, y;
  int checks = 0, failures = 0;
  int n_cancel = 0, n_sat = 0, n_under = 0;

  fp_add_fused #(.EXP_W(E), .MAN_W(M)) dut (.fp_mode(fp_mode), .op(op), .a(a), .b(b), .y(y));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic signed [127:0] to_fixed(logic [WL-1:0] v);
    logic [127:0] mag;
    int e;
    e = int'(v[WL-2 -: E]);
    if (e == 0) return '0;
    mag = 128'({1'b1, v[M-1:0]}) << (e - 1);
    return v[WL-1] ? -$signed(mag) : $signed(mag);
  endfunction

  function automatic logic [WL-1:0] ref_add(logic [WL-1:0] x, logic [WL-1:0] z, bit sub);
    logic signed [127:0] s;
    logic [127:0] mag;
    logic sgn;
    int p, e;
    s = sub ? to_fixed(x) - to_fixed(z) : to_fixed(x) + to_fixed(z);
    if (s == 0) return '0;
    sgn = s < 0;
    mag = sgn ? -s : s;
    p = 0;
    for (int i = 0; i < 128; i++) if (mag[i]) p = i;
    e = p + 1 - M;
    if (e <= 0) begin n_under++; return {sgn, {(WL-1){1'b0}}}; end
    if (e > (1 << E) - 1) begin n_sat++; return {sgn, {E{1'b1}}, {M{1'b1}}}; end
    return {sgn, E'(e), M'(mag >> (p - M))};
  endfunction

  function automatic logic [WL-1:0] rand_fp(int e_lo, int e_hi);
    return {1'($urandom), E'($urandom_range(e_lo, e_hi)), M'($urandom)};
  endfunction

  task automatic check_fp(logic [WL-1:0] x, logic [WL-1:0] z, bit sub);
    logic [WL-1:0] exp_y;
    fp_mode = 1; op = sub ? FU_SUB : FU_ADD; a = x; b = z;
    #1;
    exp_y = ref_add(x, z, sub);
    checks++;
    if (y !== exp_y) begin
      failures++;
      $display("FAIL fp %s a=%h b=%h y=%h exp=%h", sub ? "sub" : "add", x, z, y, exp_y);
    end
  endtask

  task automatic check_int(fu_op_e f, logic [IW-1:0] x, logic [IW-1:0] z);
    logic [WL-1:0] exp_y;
    logic signed [IW-1:0] sx, sz;
    sx = x; sz = z;
    fp_mode = 0; op = f; a = {5'h1f, x}; b = {5'h15, z};   // upper bits ignored
    #1;
    case (f)
      FU_ADD: exp_y = WL'(IW'(x + z));
      FU_SUB: exp_y = WL'(IW'(x - z));
      FU_LT:  exp_y = WL'(sx <  sz);
      FU_LTE: exp_y = WL'(sx <= sz);
      FU_GT:  exp_y = WL'(sx >  sz);
      FU_GTE: exp_y = WL'(sx >= sz);
      default: exp_y = '0;
    endcase
    checks++;
    if (y !== exp_y) begin
      failures++;
      $display("FAIL int %s a=%h b=%h y=%h exp=%h", f.name(), x, z, y, exp_y);
    end
  endtask

  initial begin
    logic [WL-1:0] x;
    // directed
    check_fp(21'h0, 21'h0, 0);
    check_fp({1'b0, 6'd31, 14'd0}, {1'b0, 6'd31, 14'd0}, 0);          // 1 + 1
    check_fp({1'b0, 6'd31, 14'd0}, {1'b0, 6'd31, 14'd0}, 1);          // 1 - 1
    check_fp({1'b0, 6'd63, 14'h3fff}, {1'b0, 6'd63, 14'h3fff}, 0);    // overflow
    check_fp({1'b0, 6'd1, 14'h0001}, {1'b1, 6'd1, 14'h0000}, 0);      // underflow
    check_fp({1'b0, 6'd40, 14'h0}, {1'b0, 6'd0, 14'h1234}, 0);        // subnormal input
    // random, nearby exponents (cancellation)
    repeat (6000) begin
      int e0;
      e0 = $urandom_range(1, 63);
      x = rand_fp(e0, e0);
      check_fp(x, rand_fp((e0 > 2) ? e0 - 2 : 1, (e0 < 61) ? e0 + 2 : 63), 1'($urandom));
    end
    // random, any exponents
    repeat (6000) check_fp(rand_fp(0, 63), rand_fp(0, 63), 1'($urandom));
    // exact cancellation
    repeat (200) begin
      x = rand_fp(1, 63);
      check_fp(x, x, 1);
      check_fp(x, {~x[WL-1], x[WL-2:0]}, 0);
    end
    // integer mode
    for (int k = 1; k <= 6; k++) begin
      check_int(fu_op_e'(k), 16'h7fff, 16'h8000);
      check_int(fu_op_e'(k), 16'h8000, 16'h7fff);
      check_int(fu_op_e'(k), 16'h1234, 16'h1234);
      repeat (1000) check_int(fu_op_e'(k), IW'($urandom), IW'($urandom));
    end
    if (n_sat == 0 || n_under == 0) begin
      failures++;
      $display("FAIL coverage: saturation %0d underflow %0d", n_sat, n_under);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
