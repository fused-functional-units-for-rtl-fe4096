// tb_banded_switch: self-checking test of the banded switch.
//
// Three instances: the default (N 8, 16 bits, band 2, binary selects), a
// one-hot variant with band 1, and one with 8 effective bits on 16-bit
// multiplexers. Random inputs and selects are applied; the reference picks
// input k/2 - BAND + sel (0 outside the window or the array) and masks the
// effective width. Combinational: sampled 1 ns after inputs.
module tb_banded_switch;
  localparam int N = 8, W = 16;

  logic [N-1:0][W-1:0]   din;
  logic [2*N-1:0][2:0]   sel_b;     // binary, band 2
  logic [2*N-1:0][2:0]   sel_o;     // one-hot, band 1
  logic [2*N-1:0][2:0]   sel_e;     // binary, band 2, 8 effective bits
  logic [2*N-1:0][W-1:0] out_b, out_o, out_e;
  int checks = 0, failures = 0;
  int n_edge = 0;

  banded_switch dut_b (.in_data(din), .sel(sel_b), .out_data(out_b));
  banded_switch #(.N(N), .PHYS_W(W), .EFF_W(W), .BAND(1), .ONEHOT(1'b1))
    dut_o (.in_data(din), .sel(sel_o), .out_data(out_o));
  banded_switch #(.N(N), .PHYS_W(W), .EFF_W(8), .BAND(2), .ONEHOT(1'b0))
    dut_e (.in_data(din), .sel(sel_e), .out_data(out_e));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] pick(int k, int band, int off);
    int src;
    src = k / 2 - band + off;
    if (off > 2 * band || src < 0 || src >= N) return '0;
    return din[src];
  endfunction

  initial begin
    repeat (3000) begin
      for (int i = 0; i < N; i++) din[i] = W'($urandom);
      for (int k = 0; k < 2 * N; k++) begin
        sel_b[k] = 3'($urandom_range(0, 7));
        sel_o[k] = 3'(1 << $urandom_range(0, 2));
        if ($urandom_range(0, 9) == 0) sel_o[k] = 3'b000;
        sel_e[k] = 3'($urandom_range(0, 4));
      end
      #1;
      for (int k = 0; k < 2 * N; k++) begin
        logic [W-1:0] eo;
        int off;
        if (k / 2 - 2 + int'(sel_b[k]) < 0 || k / 2 - 2 + int'(sel_b[k]) >= N) n_edge++;
        checks++;
        if (out_b[k] !== pick(k, 2, int'(sel_b[k]))) begin
          failures++;
          $display("FAIL binary out %0d sel %0d: %h", k, sel_b[k], out_b[k]);
        end
        off = (sel_o[k] == 3'b001) ? 0 : (sel_o[k] == 3'b010) ? 1 : (sel_o[k] == 3'b100) ? 2 : 7;
        eo = pick(k, 1, off);
        checks++;
        if (out_o[k] !== eo) begin
          failures++;
          $display("FAIL one-hot out %0d sel %b: %h exp %h", k, sel_o[k], out_o[k], eo);
        end
        checks++;
        if (out_e[k] !== (pick(k, 2, int'(sel_e[k])) & 16'h00ff)) begin
          failures++;
          $display("FAIL effective-width out %0d: %h", k, out_e[k]);
        end
      end
    end
    if (n_edge == 0) begin failures++; $display("FAIL no edge selects"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
