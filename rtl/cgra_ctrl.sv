// cgra_ctrl: schedule sequencer of the CGRA.
//
// A start pulse (ignored while busy) latches the schedule length ii (slots
// per iteration, 1..DEPTH; 0 is read as 1) and the iteration count iters
// (0 is read as 1). While busy, every tile executes configuration slot pc;
// pc steps 0, 1, .., ii-1 and wraps, once per cycle, for iters rounds. The
// cycle after the last slot busy falls and done pulses for one cycle. A run
// therefore takes exactly ii*iters cycles. All tiles share this one pc
// (a statically scheduled array); the sequencer itself is this design's
// choice, the configuration memories it steps are the array's.
module cgra_ctrl #(
  parameter int unsigned DEPTH  = 8,
  parameter int unsigned ITER_W = 16,
  localparam int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [AW:0]       ii,
  input  logic [ITER_W-1:0] iters,
  output logic              busy,
  output logic [AW-1:0]     pc,
  output logic              done
);
  logic [AW:0]       ii_q;
  logic [ITER_W-1:0] iter_left;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      pc        <= '0;
      done      <= 1'b0;
      ii_q      <= '0;
      iter_left <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy      <= 1'b1;
          pc        <= '0;
          ii_q      <= (ii == '0) ? (AW+1)'(1) : ii;
          iter_left <= (iters == '0) ? ITER_W'(1) : iters;
        end
      end else if ((AW+1)'(pc) == ii_q - 1'b1) begin
        pc <= '0;
        if (iter_left == ITER_W'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          iter_left <= iter_left - 1'b1;
        end
      end else begin
        pc <= pc + 1'b1;
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) busy |-> (AW+1)'(pc) < ii_q)
    else $error("cgra_ctrl: pc left the schedule");
endmodule
