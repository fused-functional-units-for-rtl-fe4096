// tb_fp_formats: runs the fused FP adder and multiplier at every
// custom floating-point format of the precision experiments
// (word length / exponent / mantissa):
//    8/3/4 quarter, 12/5/6, 13/5/7, 16/5/10 half, 21/6/14, 22/6/15,
//   24/6/17, 31/8/22, 32/8/23 single, 39/8/30, 40/8/31.
// The 12-, 21-, 31- and 39-bit formats are the adders that execute 8-,
// 16-, 24- and 32-bit integer operations, the 13-, 22-, 32- and 40-bit ones
// the multipliers that do; both units are checked at every format.
module tb_fp_formats;
  localparam int NF = 11;
  localparam int FE [NF] = '{3, 5, 5, 5, 6, 6, 6, 8, 8, 8, 8};
  localparam int FM [NF] = '{4, 6, 7, 10, 14, 15, 17, 22, 23, 30, 31};

  int  c [NF], f [NF];
  bit  fin [NF];
  int  checks = 0, failures = 0;

  for (genvar i = 0; i < NF; i++) begin : g_fmt
    fp_format_check #(.E(FE[i]), .M(FM[i]), .N(1500)) u_chk (.checks(c[i]), .failures(f[i]), .finished(fin[i]));
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit all;
    #2;
    do begin
      #10;
      all = 1;
      for (int i = 0; i < NF; i++) all &= fin[i];
    end while (!all);
    for (int i = 0; i < NF; i++) begin
      $display("format %0d/%0d/%0d: %0d checks, %0d failures", 1 + FE[i] + FM[i], FE[i], FM[i], c[i], f[i]);
      checks += c[i];
      failures += f[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
