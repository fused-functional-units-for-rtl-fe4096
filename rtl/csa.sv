// csa: W-bit 3:2 carry-save adder (3-to-2 compressor row).
//
// Reduces three addends to a sum vector and a carry vector whose sum equals
// the sum of the three inputs modulo 2**W. The carry vector is returned
// already shifted left by one place, so the caller just adds the two outputs.
// Purely combinational.
module csa #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic [W-1:0] z,
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);
  logic [W-1:0] maj;
  always_comb begin
    sum   = x ^ y ^ z;
    maj   = (x & y) | (x & z) | (y & z);
    carry = {maj[W-2:0], 1'b0};
  end
endmodule
