// pp_multiplier: partial-product multiplier with a carry-save result.
//
// Produces two vectors whose sum, modulo 2**OUT_W, is the unsigned product
// a*b. The partial products a & {b[i]} << i are reduced with a linear array
// of 3:2 carry-save rows; the final carry-propagate addition is left to the
// caller, so a unit that already owns an adder can reuse it instead of
// carrying a second one. OUT_W = 2*IN_W gives the full product; a smaller
// OUT_W gives its low bits (the low bits of a two's-complement product are
// the same as those of the unsigned one). Purely combinational.
module pp_multiplier #(
  parameter int unsigned IN_W  = 16,
  parameter int unsigned OUT_W = 16
) (
  input  logic [IN_W-1:0]  a,
  input  logic [IN_W-1:0]  b,
  output logic [OUT_W-1:0] pp_sum,
  output logic [OUT_W-1:0] pp_carry
);
  localparam int unsigned NPP = (IN_W < OUT_W) ? IN_W : OUT_W;

  logic [OUT_W-1:0] a_ext;
  logic [NPP-1:0][OUT_W-1:0] pp;
  logic [NPP:0][OUT_W-1:0] s_chain;
  logic [NPP:0][OUT_W-1:0] c_chain;

  always_comb begin
    a_ext = OUT_W'(a);
    for (int i = 0; i < NPP; i++) begin
      pp[i] = b[i] ? (a_ext << i) : '0;
    end
  end

  assign s_chain[0] = '0;
  assign c_chain[0] = '0;

  for (genvar i = 0; i < NPP; i++) begin : g_rows
    csa #(.W(OUT_W)) u_row (
      .x    (s_chain[i]),
      .y    (c_chain[i]),
      .z    (pp[i]),
      .sum  (s_chain[i+1]),
      .carry(c_chain[i+1])
    );
  end

  assign pp_sum   = s_chain[NPP];
  assign pp_carry = c_chain[NPP];
endmodule
