// scratchpad: one scratchpad memory bank.
//
// DEPTH words of W bits with two ports: port A for the memory-interface
// tile of its row, port B for the host (to load inputs and read results).
// Each port does one read or one write per cycle; reads are synchronous, the
// word appears on rdata in the cycle after the request and stays there until
// the port's next read. If both ports write the same word in one cycle, port
// A wins. The read data registers are cleared at reset; the array itself is
// not reset. Bank count, depth and the two-port arrangement are this
// design's choices.
module scratchpad #(
  parameter int unsigned W     = 16,
  parameter int unsigned DEPTH = 256,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          a_en,
  input  logic          a_we,
  input  logic [AW-1:0] a_addr,
  input  logic [W-1:0]  a_wdata,
  output logic [W-1:0]  a_rdata,
  input  logic          b_en,
  input  logic          b_we,
  input  logic [AW-1:0] b_addr,
  input  logic [W-1:0]  b_wdata,
  output logic [W-1:0]  b_rdata
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (b_en && b_we) mem[b_addr] <= b_wdata;
    if (a_en && a_we) mem[a_addr] <= a_wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_rdata <= '0;
      b_rdata <= '0;
    end else begin
      if (a_en && !a_we) a_rdata <= mem[a_addr];
      if (b_en && !b_we) b_rdata <= mem[b_addr];
    end
  end
endmodule
