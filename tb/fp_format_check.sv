// fp_format_check: checks fp_add_fused and fp_mul_fused at one
// floating-point format (EXP_W exponent bits, MAN_W mantissa bits).
//
// Used by tb_fp_formats to cover every format of the custom-precision
// experiments. Both units get N random floating-point operations (exact
// reference on 320-bit scaled integers, rounding toward zero, flush to zero,
// saturation) and N random operations of each integer function. The
// integer width is MAN_W+2 on the adder and MAN_W+1 on the multiplier.
// Runs from time 0; raises finished when done and reports its counts.
module fp_format_check
  import cgra_pkg::*;
#(
  parameter int E = 6,
  parameter int M = 14,
  parameter int N = 1000
) (
  output int checks,
  output int failures,
  output bit finished
);
  localparam int WL = 1 + E + M;
  localparam int AIW = M + 2;
  localparam int MIW = M + 1;
  localparam int BIAS = (1 << (E - 1)) - 1;
  localparam int XW = 320;

  logic          mode_a, mode_m;
  fu_op_e        op_a, op_m;
  logic [WL-1:0] aa, ab, ay, ma, mb, mc, my;

  fp_add_fused #(.EXP_W(E), .MAN_W(M)) u_add (.fp_mode(mode_a), .op(op_a), .a(aa), .b(ab), .y(ay));
  fp_mul_fused #(.EXP_W(E), .MAN_W(M)) u_mul (.fp_mode(mode_m), .op(op_m), .a(ma), .b(mb), .c(mc), .y(my));

  function automatic logic [WL-1:0] rand_word();
    logic [WL-1:0] v;
    for (int i = 0; i < WL; i++) v[i] = 1'($urandom);
    return v;
  endfunction

  function automatic logic signed [XW-1:0] to_fixed(logic [WL-1:0] v);
    logic [XW-1:0] mag;
    int e;
    e = int'(v[WL-2 -: E]);
    if (e == 0) return '0;
    mag = XW'({1'b1, v[M-1:0]}) << (e - 1);
    return v[WL-1] ? -$signed(mag) : $signed(mag);
  endfunction

  // pack an exact magnitude given in units of 2**(1-BIAS-M)
  function automatic logic [WL-1:0] pack(logic sgn, logic [XW-1:0] mag, int unit_shift);
    int p, e;
    p = -1;
    for (int i = 0; i < XW; i++) if (mag[i]) p = i;
    if (p < 0) return '0;
    e = p + 1 - M + unit_shift;
    if (e <= 0) return {sgn, {(WL-1){1'b0}}};
    if (e > (1 << E) - 1) return {sgn, {E{1'b1}}, {M{1'b1}}};
    return {sgn, E'(e), M'(mag >> (p - M))};
  endfunction

  function automatic logic [WL-1:0] ref_add(logic [WL-1:0] x, logic [WL-1:0] z, bit sub);
    logic signed [XW-1:0] s;
    s = sub ? to_fixed(x) - to_fixed(z) : to_fixed(x) + to_fixed(z);
    if (s == 0) return '0;
    return pack(s < 0, (s < 0) ? -s : s, 0);
  endfunction

  function automatic logic [WL-1:0] ref_mul(logic [WL-1:0] x, logic [WL-1:0] z);
    logic sgn;
    logic [XW-1:0] p;
    int ex, ez;
    sgn = x[WL-1] ^ z[WL-1];
    ex = int'(x[WL-2 -: E]);
    ez = int'(z[WL-2 -: E]);
    if (ex == 0 || ez == 0) return {sgn, {(WL-1){1'b0}}};
    p = XW'({1'b1, x[M-1:0]}) * XW'({1'b1, z[M-1:0]});
    // p is in units of 2**(ex+ez-2*BIAS-2M); pack() expects units of
    // 2**(1-BIAS-M), so shift the exponent by ex+ez-BIAS-M-1
    return pack(sgn, p, ex + ez - BIAS - M - 1);
  endfunction

  function automatic logic [WL-1:0] ref_int(fu_op_e f, logic [WL-1:0] x, logic [WL-1:0] z, logic [WL-1:0] k, int iw);
    logic [63:0] ux, uz, uk, msk, r;
    longint sx, sz;
    msk = (64'd1 << iw) - 1;
    ux = x & msk; uz = z & msk; uk = k & msk;
    sx = longint'(ux << (64 - iw)) >>> (64 - iw);
    sz = longint'(uz << (64 - iw)) >>> (64 - iw);
    case (f)
      FU_ADD: r = ux + uz;
      FU_SUB: r = ux - uz;
      FU_LT:  r = 64'(sx <  sz);
      FU_LTE: r = 64'(sx <= sz);
      FU_GT:  r = 64'(sx >  sz);
      FU_GTE: r = 64'(sx >= sz);
      FU_MUL: r = ux * uz;
      FU_MAC: r = ux * uz + uk;
      default: r = 0;
    endcase
    return WL'(r & msk);
  endfunction

  task automatic cmp(logic [WL-1:0] got, logic [WL-1:0] exp_v, string what);
    checks++;
    if (got !== exp_v) begin
      failures++;
      if (failures < 10) $display("FAIL E=%0d M=%0d %s: %h expected %h", E, M, what, got, exp_v);
    end
  endtask

  initial begin
    checks = 0; failures = 0; finished = 0;
    mode_a = 0; mode_m = 0; op_a = FU_NOP; op_m = FU_NOP;
    aa = '0; ab = '0; ma = '0; mb = '0; mc = '0;
    #1;
    repeat (N) begin
      bit sub;
      sub = 1'($urandom);
      mode_a = 1; op_a = sub ? FU_SUB : FU_ADD; aa = rand_word(); ab = rand_word();
      if ($urandom_range(0, 1) == 1) ab[WL-2 -: E] = aa[WL-2 -: E];     // cancellation
      mode_m = 1; op_m = FU_MUL; ma = rand_word(); mb = rand_word(); mc = rand_word();
      #1;
      cmp(ay, ref_add(aa, ab, sub), "fp add/sub");
      cmp(my, ref_mul(ma, mb), "fp mul");
    end
    for (int f = 1; f <= 8; f++) begin
      repeat (N / 4) begin
        mode_a = 0; op_a = fu_op_e'(f); aa = rand_word(); ab = rand_word();
        mode_m = 0; op_m = fu_op_e'(f); ma = rand_word(); mb = rand_word(); mc = rand_word();
        #1;
        cmp(ay, (f <= 6) ? ref_int(fu_op_e'(f), aa, ab, '0, AIW) : '0, "adder int");
        cmp(my, ref_int(fu_op_e'(f), ma, mb, mc, MIW), "multiplier int");
      end
    end
    finished = 1;
  end
endmodule
