// banded_switch: N-input, 2N-output banded switch (the switch generator).
//
// The switch sits between two levels of functional units: its N inputs are
// the outputs of N FUs on the level above, its 2N outputs feed the two
// operand inputs of N FUs on the level below. Banding limits how far
// vertically an operand can reach: both operands of FU j may only take
// inputs j-BAND .. j+BAND (clipped at the edges), so each output is a
// (2*BAND+1)-way multiplexer instead of an N-way one.
//
// Parameters, as in the generator: N (input count; output count is 2N),
// PHYS_W (width of the multiplexers), EFF_W (width of the routed data,
// EFF_W <= PHYS_W; input bits above EFF_W are not routed and the outputs
// carry 0 there), BAND (banding number) and ONEHOT (select encoding: 0 binary,
// 1 one-hot).
//
// Select of output k (FU k/2, operand k%2) is a window offset s: the output
// takes input k/2 - BAND + s. Binary: SEL_W = clog2(2*BAND+1) bits; an offset
// past the window or outside 0..N-1 gives 0. One-hot: SEL_W = 2*BAND+1 bits,
// an AND-OR multiplexer (no bit set gives 0). The defaults N = 8, 16 bits,
// BAND = 2 are this design's picks; BAND = 2 is the example the banding
// number is explained with. Purely combinational.
module banded_switch #(
  parameter int unsigned N      = 8,
  parameter int unsigned PHYS_W = 16,
  parameter int unsigned EFF_W  = 16,
  parameter int unsigned BAND   = 2,
  parameter bit          ONEHOT = 1'b0,
  localparam int unsigned WIN   = 2 * BAND + 1,
  localparam int unsigned SEL_W = ONEHOT ? WIN : ((WIN > 1) ? $clog2(WIN) : 1)
) (
  input  logic [N-1:0][PHYS_W-1:0]   in_data,
  input  logic [2*N-1:0][SEL_W-1:0]  sel,
  output logic [2*N-1:0][PHYS_W-1:0] out_data
);
  initial begin
    assert (EFF_W <= PHYS_W) else $error("banded_switch: EFF_W must not exceed PHYS_W");
  end

  logic [PHYS_W-1:0] eff_mask;
  always_comb begin
    for (int i = 0; i < int'(PHYS_W); i++) eff_mask[i] = (i < int'(EFF_W));
  end

  for (genvar k = 0; k < 2 * N; k++) begin : g_out
    localparam int J = k / 2;
    always_comb begin
      out_data[k] = '0;
      for (int s = 0; s < int'(WIN); s++) begin
        automatic int src = J - int'(BAND) + s;
        if (src >= 0 && src < int'(N)) begin
          if (ONEHOT) begin
            if (sel[k][s]) out_data[k] = out_data[k] | (in_data[src] & eff_mask);
          end else begin
            if (int'(sel[k]) == s) out_data[k] = in_data[src] & eff_mask;
          end
        end
      end
    end
  end
endmodule
