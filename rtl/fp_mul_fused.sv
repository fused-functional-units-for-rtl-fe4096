// fp_mul_fused: custom-width floating-point multiplier that also executes
// the fixed-point functions of the fused FU on its own multiplier and adder.
//
// Format: sign, EXP_W exponent bits (bias 2**(EXP_W-1)-1), MAN_W mantissa bits
// with a hidden one. The default (6, 15) is the 22-bit format whose
// significand, MAN_W+1 = 16 bits, matches a 16-bit integer.
//
// Hardware shared by both modes: a SIG_W x SIG_W partial-product multiplier
// (carry-save output, 2*SIG_W bits), a 3:2 row and one 2*SIG_W-bit
// carry-propagate adder.
//
// fp_mode = 1, op FU_MUL: y = a * b. The significands go through the
//   multiplier and adder, the exponents are added (a separate small adder),
//   the product is normalised by at most one place and truncated (rounding
//   toward zero). Zero or subnormal inputs give a signed zero, underflow
//   flushes to a signed zero, overflow saturates to the largest finite
//   value, and the all-ones exponent is an ordinary exponent (no infinities
//   or NaNs). These are choices of this design.
// fp_mode = 0: the low INT_W = SIG_W bits of a, b, c are two's-complement
//   integers; op is FU_ADD, FU_SUB, FU_LT, FU_LTE, FU_GT, FU_GTE, FU_MUL or
//   FU_MAC with the meaning of fused_fu (mul and mac keep the low INT_W bits,
//   compares are signed and give 1 or 0). Result in the low INT_W bits of y.
// Any other op gives 0. Purely combinational.
module fp_mul_fused
  import cgra_pkg::*;
#(
  parameter int unsigned EXP_W = 6,
  parameter int unsigned MAN_W = 15,
  localparam int unsigned WL    = 1 + EXP_W + MAN_W,
  localparam int unsigned SIG_W = MAN_W + 1,
  localparam int unsigned INT_W = SIG_W
) (
  input  logic          fp_mode,
  input  fu_op_e        op,
  input  logic [WL-1:0] a,
  input  logic [WL-1:0] b,
  input  logic [WL-1:0] c,
  output logic [WL-1:0] y
);
  localparam int unsigned PW = 2 * SIG_W;
  localparam int unsigned BIAS = (1 << (EXP_W - 1)) - 1;
  localparam logic [EXP_W-1:0] EXP_MAX = '1;

  logic              sa, sb, sp;
  logic [EXP_W-1:0]  ea, eb;
  logic              a_zero, b_zero;
  logic [SIG_W-1:0]  ma, mb;          // multiplier operands
  logic [INT_W-1:0]  ia, ib, ic;

  always_comb begin
    sa = a[WL-1];
    sb = b[WL-1];
    sp = sa ^ sb;
    ea = a[WL-2 -: EXP_W];
    eb = b[WL-2 -: EXP_W];
    a_zero = (ea == '0);
    b_zero = (eb == '0);
    ia = a[INT_W-1:0];
    ib = b[INT_W-1:0];
    ic = c[INT_W-1:0];
    if (fp_mode) begin
      ma = {1'b1, a[MAN_W-1:0]};
      mb = {1'b1, b[MAN_W-1:0]};
    end else begin
      ma = ia;
      mb = ib;
    end
  end

  logic [PW-1:0] pp_s, pp_c, mac_s, mac_c;

  pp_multiplier #(.IN_W(SIG_W), .OUT_W(PW)) u_pp (
    .a       (ma),
    .b       (mb),
    .pp_sum  (pp_s),
    .pp_carry(pp_c)
  );

  csa #(.W(PW)) u_csa (
    .x    (pp_s),
    .y    (pp_c),
    .z    (PW'(ic)),
    .sum  (mac_s),
    .carry(mac_c)
  );

  // Shared carry-propagate adder.
  logic [PW-1:0] add_x, add_y, add_sum;
  logic          add_cin;

  always_comb begin
    add_x   = PW'($signed(ia));
    add_y   = PW'($signed(ib));
    add_cin = 1'b0;
    if (fp_mode) begin
      add_x = pp_s;
      add_y = pp_c;
    end else begin
      unique case (op)
        FU_SUB, FU_LT, FU_GTE: begin
          add_y   = ~PW'($signed(ib));
          add_cin = 1'b1;
        end
        FU_GT, FU_LTE: begin
          add_x   = PW'($signed(ib));
          add_y   = ~PW'($signed(ia));
          add_cin = 1'b1;
        end
        FU_MUL: begin
          add_x = pp_s;
          add_y = pp_c;
        end
        FU_MAC: begin
          add_x = mac_s;
          add_y = mac_c;
        end
        default: ;
      endcase
    end
    add_sum = add_x + add_y + PW'(add_cin);
  end

  // FP exponent path, normalisation and packing.
  logic signed [EXP_W+1:0] rexp;
  logic [MAN_W-1:0]        rman;
  logic [WL-1:0]           fp_res;

  always_comb begin
    rexp = $signed({2'b00, ea}) + $signed({2'b00, eb}) - $signed((EXP_W+2)'(BIAS));
    if (add_sum[PW-1]) begin
      rexp = rexp + 1;
      rman = add_sum[PW-2 -: MAN_W];
    end else begin
      rman = add_sum[PW-3 -: MAN_W];
    end
    if (a_zero || b_zero || rexp <= 0) begin
      fp_res = {sp, {(WL-1){1'b0}}};
    end else if (rexp > $signed({2'b00, EXP_MAX})) begin
      fp_res = {sp, EXP_MAX, {MAN_W{1'b1}}};
    end else begin
      fp_res = {sp, rexp[EXP_W-1:0], rman};
    end
  end

  logic sign;
  assign sign = add_sum[INT_W];

  always_comb begin
    y = '0;
    if (fp_mode) begin
      if (op == FU_MUL) y = fp_res;
    end else begin
      unique case (op)
        FU_ADD, FU_SUB, FU_MUL, FU_MAC: y = WL'(add_sum[INT_W-1:0]);
        FU_LT, FU_GT:                   y = WL'(sign);
        FU_LTE, FU_GTE:                 y = WL'(!sign);
        default:                        y = '0;
      endcase
    end
  end
endmodule
