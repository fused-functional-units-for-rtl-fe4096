// fp_add_fused: custom-width floating-point adder that also executes the
// fixed-point add, sub and compare functions on its own significand adder.
//
// Format: sign, EXP_W exponent bits (bias 2**(EXP_W-1)-1), MAN_W mantissa bits
// with a hidden leading one. The default (6, 14) is the 21-bit format sized so
// that the significand adder, MAN_W+2 bits of datapath, runs 16-bit integer
// operations; other widths (IEEE half, single, ... or any mix) come from the
// two parameters.
//
// fp_mode = 1: y = a + b (op FU_ADD) or a - b (op FU_SUB). The classic path is
//   unpack, order the operands by magnitude, align the smaller one with a
//   guard, round and sticky bit, add or subtract, normalise, pack.
//   Rounding is toward zero, subnormal inputs and results are flushed to
//   zero, results beyond the largest exponent saturate to the largest finite
//   value, and the all-ones exponent is read as an ordinary exponent (no
//   infinities or NaNs). An exact zero result is +0. These are choices of
//   this design, not given by the format.
// fp_mode = 0: the low INT_W = MAN_W+2 bits of a and b are two's-complement
//   integers and op is one of FU_ADD, FU_SUB, FU_LT, FU_LTE, FU_GT, FU_GTE,
//   with the same meaning as in fused_fu (compares are signed, give 1 or 0).
//   The operands are steered into the same significand adder; the result is
//   in the low INT_W bits of y, the upper bits are 0.
// Any other op gives 0. Purely combinational.
module fp_add_fused
  import cgra_pkg::*;
#(
  parameter int unsigned EXP_W = 6,
  parameter int unsigned MAN_W = 14,
  localparam int unsigned WL    = 1 + EXP_W + MAN_W,
  localparam int unsigned INT_W = MAN_W + 2
) (
  input  logic          fp_mode,
  input  fu_op_e        op,
  input  logic [WL-1:0] a,
  input  logic [WL-1:0] b,
  output logic [WL-1:0] y
);
  // Significand adder: overflow bit, hidden bit, MAN_W bits, guard, round,
  // sticky. It is wider than INT_W+1, so integers fit sign-extended.
  localparam int unsigned AW    = MAN_W + 5;
  localparam int unsigned SW    = MAN_W + 1;        // significand width
  localparam int unsigned SHW   = $clog2(AW + 1);   // leading-zero count width
  localparam logic [EXP_W-1:0] EXP_MAX = '1;

  // ---------------- FP operand preparation ----------------
  logic              sa, sb;
  logic [EXP_W-1:0]  ea, eb, el, es;
  logic [SW-1:0]     siga, sigb, sigl, sigs;
  logic              sl, eff_sub, a_ge_b;
  logic [EXP_W-1:0]  ediff;
  logic [SW+1:0]     small_ext;                     // sig, G, R before shift
  logic [SW+1:0]     small_sh;
  logic              sticky;
  logic [AW-1:0]     fx, fy;

  always_comb begin
    sa   = a[WL-1];
    sb   = b[WL-1] ^ (op == FU_SUB);
    ea   = a[WL-2 -: EXP_W];
    eb   = b[WL-2 -: EXP_W];
    siga = (ea != '0) ? {1'b1, a[MAN_W-1:0]} : '0;
    sigb = (eb != '0) ? {1'b1, b[MAN_W-1:0]} : '0;
    a_ge_b = {ea, siga} >= {eb, sigb};
    el   = a_ge_b ? ea : eb;
    es   = a_ge_b ? eb : ea;
    sigl = a_ge_b ? siga : sigb;
    sigs = a_ge_b ? sigb : siga;
    sl   = a_ge_b ? sa : sb;
    eff_sub = sa ^ sb;
    ediff = el - es;
    small_ext = {sigs, 2'b00};
    small_sh  = '0;
    sticky    = 1'b0;
    for (int i = 0; i < SW + 2; i++) begin
      if (i >= int'(ediff)) small_sh[i - int'(ediff)] = small_ext[i];
      else                  sticky = sticky | small_ext[i];
    end
    if (es == '0) begin
      small_sh = '0;
      sticky   = 1'b0;
    end
    fx = {1'b0, sigl, 3'b000};
    fy = {1'b0, small_sh, sticky};
  end

  // ---------------- shared adder ----------------
  logic [AW-1:0] add_x, add_y, add_sum;
  logic          add_cin;
  logic [INT_W-1:0] ia, ib;

  always_comb begin
    ia = a[INT_W-1:0];
    ib = b[INT_W-1:0];
    add_x   = fx;
    add_y   = fy;
    add_cin = 1'b0;
    if (fp_mode) begin
      if (eff_sub) begin
        add_y   = ~fy;
        add_cin = 1'b1;
      end
    end else begin
      add_x = AW'($signed(ia));
      add_y = AW'($signed(ib));
      unique case (op)
        FU_SUB, FU_LT, FU_GTE: begin
          add_y   = ~AW'($signed(ib));
          add_cin = 1'b1;
        end
        FU_GT, FU_LTE: begin
          add_x   = AW'($signed(ib));
          add_y   = ~AW'($signed(ia));
          add_cin = 1'b1;
        end
        default: ;
      endcase
    end
    add_sum = add_x + add_y + AW'(add_cin);
  end

  // ---------------- FP normalisation and packing ----------------
  logic [AW-1:0]     norm;
  logic [SHW-1:0]    lz;
  logic              lz_found;
  logic signed [EXP_W+1:0] rexp;
  logic [WL-1:0]     fp_res;

  always_comb begin
    lz = '0;
    lz_found = 1'b0;
    for (int i = AW - 2; i >= 0; i--) begin
      if (!lz_found) begin
        if (add_sum[i]) lz_found = 1'b1;
        else            lz = lz + 1'b1;
      end
    end
    if (add_sum[AW-1]) begin
      norm = add_sum >> 1;
      norm[0] = add_sum[1] | add_sum[0];
      rexp = $signed({2'b00, el}) + 1;
    end else begin
      norm = add_sum << lz;
      rexp = $signed({2'b00, el}) - $signed({{(EXP_W+2-SHW){1'b0}}, lz});
    end
    if (add_sum == '0 || el == '0 || rexp <= 0) begin
      fp_res = '0;
      if (add_sum != '0 && el != '0) fp_res[WL-1] = sl;   // signed underflow
    end else if (rexp > $signed({2'b00, EXP_MAX})) begin
      fp_res = {sl, EXP_MAX, {MAN_W{1'b1}}};
    end else begin
      fp_res = {sl, rexp[EXP_W-1:0], norm[MAN_W+2:3]};
    end
  end

  // ---------------- result selection ----------------
  logic sign;
  assign sign = add_sum[INT_W];

  always_comb begin
    y = '0;
    if (fp_mode) begin
      if (op == FU_ADD || op == FU_SUB) y = fp_res;
    end else begin
      unique case (op)
        FU_ADD, FU_SUB: y = WL'(add_sum[INT_W-1:0]);
        FU_LT, FU_GT:   y = WL'(sign);
        FU_LTE, FU_GTE: y = WL'(!sign);
        default:        y = '0;
      endcase
    end
  end
endmodule
