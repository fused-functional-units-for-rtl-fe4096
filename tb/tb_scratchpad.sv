// tb_scratchpad: self-checking test of a scratchpad bank.
// Random reads and writes on both ports against a reference array; a read
// must show its word in the next cycle and hold it while the port is idle
// or writing. Same-cycle writes to one word by both ports must leave port
// A's data.
module tb_scratchpad;
  localparam int W = 16, DEPTH = 32;

  logic clk = 0, rst_n = 0;
  logic a_en = 0, a_we = 0, b_en = 0, b_we = 0;
  logic [4:0] a_addr = 0, b_addr = 0;
  logic [W-1:0] a_wdata = 0, b_wdata = 0, a_rdata, b_rdata;
  logic [W-1:0] model [DEPTH];
  logic [W-1:0] exp_a, exp_b;
  int checks = 0, failures = 0, n_conflict = 0;

  scratchpad #(.W(W), .DEPTH(DEPTH)) dut (
    .clk(clk), .rst_n(rst_n),
    .a_en(a_en), .a_we(a_we), .a_addr(a_addr), .a_wdata(a_wdata), .a_rdata(a_rdata),
    .b_en(b_en), .b_we(b_we), .b_addr(b_addr), .b_wdata(b_wdata), .b_rdata(b_rdata));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    // fill through port B
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      b_en = 1; b_we = 1; b_addr = 5'(i); b_wdata = W'($urandom);
      model[i] = b_wdata;
    end
    @(negedge clk);
    b_en = 0;
    exp_a = '0; exp_b = '0;
    repeat (3000) begin
      @(negedge clk);
      a_en = 1'($urandom); a_we = 1'($urandom); a_addr = 5'($urandom); a_wdata = W'($urandom);
      b_en = 1'($urandom); b_we = 1'($urandom); b_addr = 5'($urandom); b_wdata = W'($urandom);
      if ($urandom_range(0, 7) == 0) begin
        a_en = 1; a_we = 1; b_en = 1; b_we = 1; b_addr = a_addr; n_conflict++;
      end
      // reads sample the array before this edge's writes
      if (a_en && !a_we) exp_a = model[a_addr];
      if (b_en && !b_we) exp_b = model[b_addr];
      if (b_en && b_we) model[b_addr] = b_wdata;
      if (a_en && a_we) model[a_addr] = a_wdata;
      @(posedge clk);
      #1;
      checks += 2;
      if (a_rdata !== exp_a) begin failures++; $display("FAIL port A read %h exp %h", a_rdata, exp_a); end
      if (b_rdata !== exp_b) begin failures++; $display("FAIL port B read %h exp %h", b_rdata, exp_b); end
    end
    // final sweep through port B
    a_en = 0;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      b_en = 1; b_we = 0; b_addr = 5'(i);
      @(posedge clk);
      #1;
      checks++;
      if (b_rdata !== model[i]) begin failures++; $display("FAIL final word %0d", i); end
    end
    if (n_conflict == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
