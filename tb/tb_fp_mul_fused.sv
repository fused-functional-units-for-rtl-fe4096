// tb_fp_mul_fused: self-checking test of the fused floating-point multiplier
// at its default format (6-bit exponent, 15-bit mantissa).
//
// FP mode: the reference forms the exact 32-bit significand product and
// exponent sum and truncates (rounding toward zero); a second, independent
// check converts operands and result to 'real' and requires
// |result| <= |exact product| < |result| + 1 ulp for normal results.
// Integer mode: all eight fixed-point functions on the low 16 bits against
// plain SystemVerilog arithmetic. Combinational: sampled 1 ns after inputs.
module tb_fp_mul_fused;
  import cgra_pkg::*;
  localparam int E = 6, M = 15, WL = 1 + E + M, IW = M + 1, BIAS = 31;

  logic          fp_mode;
  fu_op_e        op;
  logic [WL-1:0] a, b, c, y;
  int checks = 0, failures = 0;
  int n_sat = 0, n_under = 0, n_norm1 = 0;

  fp_mul_fused #(.EXP_W(E), .MAN_W(M)) dut (.fp_mode(fp_mode), .op(op), .a(a), .b(b), .c(c), .y(y));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real to_real(logic [WL-1:0] v);
    real r;
    int e, sh;
    e = int'(v[WL-2 -: E]);
    if (e == 0) return 0.0;
    sh = e - BIAS - M;
    r = real'({1'b1, v[M-1:0]}) * (2.0 ** sh);
    return v[WL-1] ? -r : r;
  endfunction

  function automatic logic [WL-1:0] ref_mul(logic [WL-1:0] x, logic [WL-1:0] z);
    logic sgn;
    logic [2*IW-1:0] p;
    int e, msb;
    sgn = x[WL-1] ^ z[WL-1];
    if (x[WL-2 -: E] == 0 || z[WL-2 -: E] == 0) return {sgn, {(WL-1){1'b0}}};
    p = {1'b1, x[M-1:0]} * {1'b1, z[M-1:0]};
    msb = p[2*IW-1] ? 2*IW-1 : 2*IW-2;
    if (p[2*IW-1]) n_norm1++;
    e = int'(x[WL-2 -: E]) + int'(z[WL-2 -: E]) - BIAS + (msb - 2*M);
    if (e <= 0) begin n_under++; return {sgn, {(WL-1){1'b0}}}; end
    if (e > (1 << E) - 1) begin n_sat++; return {sgn, {E{1'b1}}, {M{1'b1}}}; end
    return {sgn, E'(e), M'(p >> (msb - M))};
  endfunction

  task automatic check_fp(logic [WL-1:0] x, logic [WL-1:0] z);
    logic [WL-1:0] exp_y;
    real ex, ry, ulp;
    int ye;
    fp_mode = 1; op = FU_MUL; a = x; b = z; c = WL'($urandom);
    #1;
    exp_y = ref_mul(x, z);
    checks++;
    if (y !== exp_y) begin
      failures++;
      $display("FAIL fp mul a=%h b=%h y=%h exp=%h", x, z, y, exp_y);
    end
    if (y[WL-2 -: E] != 0 && y[WL-2 -: E] != {E{1'b1}}) begin
      ex = to_real(x) * to_real(z);
      ry = to_real(y);
      ye = int'(y[WL-2 -: E]) - BIAS - M;
      ulp = 2.0 ** ye;
      if (ex < 0) begin ex = -ex; ry = -ry; end
      checks++;
      if (!(ry <= ex && ex < ry + ulp)) begin
        failures++;
        $display("FAIL fp mul real-check a=%h b=%h y=%h", x, z, y);
      end
    end
  endtask

  task automatic check_int(fu_op_e f, logic [IW-1:0] x, logic [IW-1:0] z, logic [IW-1:0] k);
    logic [WL-1:0] exp_y;
    logic signed [IW-1:0] sx, sz;
    logic [2*IW-1:0] prod;
    sx = x; sz = z;
    prod = x * z;
    fp_mode = 0; op = f; a = {6'h2a, x}; b = {6'h15, z}; c = {6'h3f, k};
    #1;
    case (f)
      FU_ADD: exp_y = WL'(IW'(x + z));
      FU_SUB: exp_y = WL'(IW'(x - z));
      FU_LT:  exp_y = WL'(sx <  sz);
      FU_LTE: exp_y = WL'(sx <= sz);
      FU_GT:  exp_y = WL'(sx >  sz);
      FU_GTE: exp_y = WL'(sx >= sz);
      FU_MUL: exp_y = WL'(prod[IW-1:0]);
      FU_MAC: exp_y = WL'(IW'(prod[IW-1:0] + k));
      default: exp_y = '0;
    endcase
    checks++;
    if (y !== exp_y) begin
      failures++;
      $display("FAIL int %s a=%h b=%h c=%h y=%h exp=%h", f.name(), x, z, k, y, exp_y);
    end
  endtask

  initial begin
    check_fp({1'b0, 6'd31, 15'd0}, {1'b1, 6'd31, 15'd0});               // 1 * -1
    check_fp({1'b0, 6'd31, 15'h7fff}, {1'b0, 6'd31, 15'h7fff});         // ~2 * ~2
    check_fp({1'b0, 6'd63, 15'd0}, {1'b0, 6'd63, 15'd0});               // overflow
    check_fp({1'b0, 6'd1, 15'd0}, {1'b0, 6'd1, 15'd0});                 // underflow
    check_fp({1'b1, 6'd0, 15'h1}, {1'b0, 6'd40, 15'd0});                // zero input
    repeat (8000) check_fp({1'($urandom), E'($urandom_range(16, 46)), M'($urandom)},
                           {1'($urandom), E'($urandom_range(16, 46)), M'($urandom)});
    repeat (4000) check_fp(WL'($urandom), WL'($urandom));
    for (int k = 1; k <= 10; k++) begin
      check_int(fu_op_e'(k), 16'h7fff, 16'h8000, 16'h0001);
      check_int(fu_op_e'(k), 16'hffff, 16'hffff, 16'hffff);
      repeat (800) check_int(fu_op_e'(k), IW'($urandom), IW'($urandom), IW'($urandom));
    end
    if (n_sat == 0 || n_under == 0 || n_norm1 == 0) begin
      failures++;
      $display("FAIL coverage: saturation %0d underflow %0d carry-out %0d", n_sat, n_under, n_norm1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
