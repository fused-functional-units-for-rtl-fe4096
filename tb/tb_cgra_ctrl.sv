// tb_cgra_ctrl: self-checking test of the schedule sequencer.
// For a range of (ii, iters) pairs: busy must last exactly ii*iters cycles,
// pc must run 0..ii-1 in order and wrap, done must pulse once in the cycle
// after the last slot, and a start pulse while busy must be ignored.
module tb_cgra_ctrl;
  localparam int DEPTH = 8;

  logic clk = 0, rst_n = 0, start = 0;
  logic [3:0] ii = 0;
  logic [15:0] iters = 0;
  logic busy, done;
  logic [2:0] pc;
  int checks = 0, failures = 0;

  cgra_ctrl #(.DEPTH(DEPTH), .ITER_W(16)) dut (.clk(clk), .rst_n(rst_n), .start(start), .ii(ii),
                                              .iters(iters), .busy(busy), .pc(pc), .done(done));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int n_ii, int n_it);
    int cycles, exp_pc, n_done, eff_ii, eff_it;
    eff_ii = (n_ii == 0) ? 1 : n_ii;
    eff_it = (n_it == 0) ? 1 : n_it;
    @(negedge clk);
    start = 1; ii = 4'(n_ii); iters = 16'(n_it);
    @(negedge clk);
    start = 0;
    cycles = 0; exp_pc = 0; n_done = 0;
    while (busy) begin
      checks++;
      if (int'(pc) != exp_pc) begin failures++; $display("FAIL pc %0d exp %0d", pc, exp_pc); end
      if (cycles == 2) begin start = 1; ii = 4'd1; iters = 16'd1; end   // must be ignored
      else start = 0;
      exp_pc = (exp_pc + 1) % eff_ii;
      cycles++;
      @(negedge clk);
      if (done) n_done++;
    end
    start = 0;
    @(negedge clk);
    if (done) n_done++;
    checks += 2;
    if (cycles != eff_ii * eff_it) begin
      failures++;
      $display("FAIL ii=%0d iters=%0d ran %0d cycles", n_ii, n_it, cycles);
    end
    if (n_done != 1) begin failures++; $display("FAIL done pulsed %0d times", n_done); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    checks++;
    if (busy || done) begin failures++; $display("FAIL not idle after reset"); end
    run(1, 1); run(8, 1); run(3, 5); run(0, 0); run(8, 20); run(5, 1);
    repeat (20) run($urandom_range(1, 8), $urandom_range(1, 12));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
