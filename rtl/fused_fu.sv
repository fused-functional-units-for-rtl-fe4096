// fused_fu: fixed-point fused functional unit (the configurable FU generator).
//
// One carry-propagate adder serves every function:
//   add          a + b
//   sub          a - b            (a + ~b + 1)
//   lt / gte     sign of a - b    (gte is the complement of lt)
//   gt / lte     sign of b - a    (operands swapped, lte is the complement)
//   mul          low W bits of a*b: the partial-product multiplier's sum and
//                carry vectors are added by the same adder
//   mac          low W bits of a*b + c: a 3:2 row folds the addend c into the
//                multiplier's two vectors, then the same adder sums them
// The comparisons are signed. The adder is one bit wider than the data
// (operands sign-extended), so its top bit is the true sign of the
// difference even when the W-bit difference overflows. Comparisons return 1
// or 0. FU_NOP, loads and stores give 0.
//
// LEVEL selects the generator's incremental design: 1 add, 2 +sub, 3 +lt,
// 4 +gte, 5 +gt/lte, 6 +mul, 7 +mac (the full fused unit, the default).
// Functions above the level return 0 and their hardware is not generated.
// Which comparisons come in at levels 3 to 5 is this design's own split.
//
// Interface: op selects the function, a/b/c are the operands (c only for
// mac), y the result. Purely combinational; the surrounding tile registers y.
module fused_fu
  import cgra_pkg::*;
#(
  parameter int unsigned W     = DATA_W,
  parameter int unsigned LEVEL = 7
) (
  input  fu_op_e       op,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  output logic [W-1:0] y
);
  localparam bit HAS_SUB  = LEVEL >= 2;
  localparam bit HAS_LT   = LEVEL >= 3;
  localparam bit HAS_GTE  = LEVEL >= 4;
  localparam bit HAS_GT   = LEVEL >= 5;
  localparam bit HAS_MUL  = LEVEL >= 6;
  localparam bit HAS_MAC  = LEVEL >= 7;

  logic [W-1:0] pp_s, pp_c;     // multiplier carry-save output
  logic [W-1:0] mac_s, mac_c;   // after folding in the addend

  if (HAS_MUL) begin : g_mul
    pp_multiplier #(.IN_W(W), .OUT_W(W)) u_pp (
      .a       (a),
      .b       (b),
      .pp_sum  (pp_s),
      .pp_carry(pp_c)
    );
  end else begin : g_no_mul
    assign pp_s = '0;
    assign pp_c = '0;
  end

  if (HAS_MAC) begin : g_mac
    csa #(.W(W)) u_csa (
      .x    (pp_s),
      .y    (pp_c),
      .z    (c),
      .sum  (mac_s),
      .carry(mac_c)
    );
  end else begin : g_no_mac
    assign mac_s = '0;
    assign mac_c = '0;
  end

  // Shared adder: operand steering, one W+1 bit adder, result selection.
  logic [W:0] add_x, add_y, add_sum;
  logic       add_cin;
  logic       sign;

  always_comb begin
    add_x   = {a[W-1], a};
    add_y   = {b[W-1], b};
    add_cin = 1'b0;
    unique case (op)
      FU_SUB, FU_LT, FU_GTE: begin
        add_y   = ~{b[W-1], b};
        add_cin = 1'b1;
      end
      FU_GT, FU_LTE: begin
        add_x   = {b[W-1], b};
        add_y   = ~{a[W-1], a};
        add_cin = 1'b1;
      end
      FU_MUL: begin
        add_x = {1'b0, pp_s};
        add_y = {1'b0, pp_c};
      end
      FU_MAC: begin
        add_x = {1'b0, mac_s};
        add_y = {1'b0, mac_c};
      end
      default: ;
    endcase
    add_sum = add_x + add_y + {{W{1'b0}}, add_cin};
    sign    = add_sum[W];
  end

  always_comb begin
    y = '0;
    unique case (op)
      FU_ADD: y = add_sum[W-1:0];
      FU_SUB: if (HAS_SUB) y = add_sum[W-1:0];
      FU_LT:  if (HAS_LT)  y = {{(W-1){1'b0}}, sign};
      FU_GTE: if (HAS_GTE) y = {{(W-1){1'b0}}, ~sign};
      FU_GT:  if (HAS_GT)  y = {{(W-1){1'b0}}, sign};
      FU_LTE: if (HAS_GT)  y = {{(W-1){1'b0}}, ~sign};
      FU_MUL: if (HAS_MUL) y = add_sum[W-1:0];
      FU_MAC: if (HAS_MAC) y = add_sum[W-1:0];
      default: y = '0;
    endcase
  end
endmodule
