// tb_tile_crossbar: self-checking test of the tile crossbar.
// Random neighbour data, result, constant and select codes (all 16 codes,
// including the ones that read 0); each of the 11 destinations is compared
// with a reference lookup. Combinational: sampled 1 ns after inputs.
module tb_tile_crossbar;
  import cgra_pkg::*;
  localparam int W = 16;

  logic [NUM_DIRS-1:0][W-1:0]  in_dir, out_dir;
  logic [W-1:0]                res, konst;
  logic [NUM_DIRS-1:0][3:0]    out_sel;
  logic [NUM_OPNDS-1:0][3:0]   opnd_sel;
  logic [NUM_OPNDS-1:0][W-1:0] opnd;
  int checks = 0, failures = 0;

  tile_crossbar dut (.in_dir(in_dir), .res(res), .konst(konst), .out_sel(out_sel),
                     .opnd_sel(opnd_sel), .out_dir(out_dir), .opnd(opnd));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] expect_src(logic [3:0] code);
    if (code <= 7) return in_dir[code];
    if (code == 8) return res;
    if (code == 9) return konst;
    return '0;
  endfunction

  initial begin
    repeat (3000) begin
      for (int d = 0; d < 8; d++) begin
        in_dir[d]  = W'($urandom);
        out_sel[d] = 4'($urandom);
      end
      for (int o = 0; o < 3; o++) opnd_sel[o] = 4'($urandom);
      res = W'($urandom);
      konst = W'($urandom);
      #1;
      for (int d = 0; d < 8; d++) begin
        checks++;
        if (out_dir[d] !== expect_src(out_sel[d])) begin
          failures++;
          $display("FAIL out %0d sel %0d", d, out_sel[d]);
        end
      end
      for (int o = 0; o < 3; o++) begin
        checks++;
        if (opnd[o] !== expect_src(opnd_sel[o])) begin
          failures++;
          $display("FAIL operand %0d sel %0d", o, opnd_sel[o]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
