// tb_config_mem: self-checking test of the per-tile configuration memory.
// Checks the all-zero state after reset, that a write is visible on the read
// port from the next clock edge and not before, and random write/read
// traffic against a reference array.
module tb_config_mem;
  import cgra_pkg::*;
  localparam int DEPTH = 8;

  logic clk = 0, rst_n = 0, we = 0;
  logic [2:0] waddr = 0, raddr = 0;
  tile_cfg_t wdata, rdata;
  tile_cfg_t model [DEPTH];
  int checks = 0, failures = 0;

  config_mem #(.DEPTH(DEPTH)) dut (.clk(clk), .rst_n(rst_n), .we(we), .waddr(waddr),
                                   .wdata(wdata), .raddr(raddr), .rdata(rdata));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic tile_cfg_t rand_cfg();
    return tile_cfg_t'({$urandom, $urandom});
  endfunction

  initial begin
    wdata = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < DEPTH; i++) begin
      raddr = 3'(i);
      #1;
      checks++;
      if (rdata !== '0) begin failures++; $display("FAIL word %0d not cleared", i); end
      model[i] = '0;
    end
    // write timing: not visible before the edge, visible after
    @(negedge clk);
    we = 1; waddr = 3; raddr = 3; wdata = rand_cfg();
    #1;
    checks++;
    if (rdata !== '0) begin failures++; $display("FAIL write visible before clock edge"); end
    @(negedge clk);
    we = 0;
    model[3] = wdata;
    checks++;
    if (rdata !== model[3]) begin failures++; $display("FAIL write not visible after edge"); end
    // random traffic
    repeat (2000) begin
      @(negedge clk);
      if (we) model[waddr] = wdata;
      we = 1'($urandom);
      waddr = 3'($urandom);
      wdata = rand_cfg();
      raddr = 3'($urandom);
      #1;
      checks++;
      if (rdata !== model[raddr]) begin
        failures++;
        $display("FAIL read %0d", raddr);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
