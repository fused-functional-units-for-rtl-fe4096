// tb_fused_fu: self-checking test of the fixed-point fused FU.
//
// Drives the full unit (LEVEL 7) with directed corner values and random
// operands for every function and compares against plain SystemVerilog
// arithmetic (signed compare, '*', '+'). A second instance at LEVEL 2
// (add and sub only) is checked to return 0 for functions it does not have.
// The unit is combinational: results are sampled 1 ns after the inputs.
module tb_fused_fu;
  import cgra_pkg::*;
  localparam int unsigned W = 16;

  fu_op_e       op;
  logic [W-1:0] a, b, c, y, y2;
  int checks = 0, failures = 0;

  fused_fu #(.W(W)) dut (.op(op), .a(a), .b(b), .c(c), .y(y));
  fused_fu #(.W(W), .LEVEL(2)) dut_l2 (.op(op), .a(a), .b(b), .c(c), .y(y2));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] model(fu_op_e f, logic [W-1:0] x, logic [W-1:0] z, logic [W-1:0] k);
    logic signed [W-1:0] sx, sz;
    logic [2*W-1:0] prod;
    sx = x; sz = z;
    prod = x * z;
    case (f)
      FU_ADD: return x + z;
      FU_SUB: return x - z;
      FU_LT:  return (sx <  sz) ? 1 : 0;
      FU_LTE: return (sx <= sz) ? 1 : 0;
      FU_GT:  return (sx >  sz) ? 1 : 0;
      FU_GTE: return (sx >= sz) ? 1 : 0;
      FU_MUL: return prod[W-1:0];
      FU_MAC: return prod[W-1:0] + k;
      default: return '0;
    endcase
  endfunction

  task automatic check(fu_op_e f, logic [W-1:0] x, logic [W-1:0] z, logic [W-1:0] k);
    logic [W-1:0] exp2;
    op = f; a = x; b = z; c = k;
    #1;
    checks++;
    if (y !== model(f, x, z, k)) begin
      failures++;
      $display("FAIL op=%s a=%h b=%h c=%h y=%h exp=%h", f.name(), x, z, k, y, model(f, x, z, k));
    end
    exp2 = (f == FU_ADD || f == FU_SUB) ? model(f, x, z, k) : '0;
    checks++;
    if (y2 !== exp2) begin
      failures++;
      $display("FAIL level2 op=%s y=%h exp=%h", f.name(), y2, exp2);
    end
  endtask

  localparam logic [W-1:0] CORNERS [6] = '{16'h0000, 16'h0001, 16'hffff, 16'h7fff, 16'h8000, 16'h1234};

  initial begin
    fu_op_e f;
    // directed: every function on every pair of corner values
    for (int k = 0; k <= 10; k++) begin
      f = fu_op_e'(k);
      foreach (CORNERS[i]) foreach (CORNERS[j]) check(f, CORNERS[i], CORNERS[j], CORNERS[(i+j)%6]);
    end
    // random
    repeat (4000) begin
      f = fu_op_e'($urandom_range(0, 10));
      check(f, W'($urandom), W'($urandom), W'($urandom));
    end
    // equal operands: the comparison boundaries
    repeat (200) begin
      logic [W-1:0] v;
      v = W'($urandom);
      check(FU_LT, v, v, 0); check(FU_LTE, v, v, 0);
      check(FU_GT, v, v, 0); check(FU_GTE, v, v, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
