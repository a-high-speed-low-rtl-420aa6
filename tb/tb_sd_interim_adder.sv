// tb_sd_interim_adder: exhaustive check of the interim-sum adder.
//
// For h = 4 and h = 3, in both the full-adder-chain and the look-ahead form,
// every value of the low operand bits and of the two position h-1 negabits is
// applied. Each operand half is worth lo - neg * 2^(h-1); the (h+1)-bit output
// w, read as two's complement, must equal the sum of the two halves.
// Purely combinational.
module tb_sd_interim_adder;
  import sd_pkg::*;
  import tb_sd_ref_pkg::*;

  int checks   = 0;
  int failures = 0;
  bit [3:0] done = '0;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar g = 0; g < 4; g++) begin : g_cfg
    localparam int       HG   = (g < 2) ? 4 : 3;
    localparam sd_arch_e AG   = (g % 2 == 0) ? SD_ARCH_CLA : SD_ARCH_RIPPLE;
    logic [HG-2:0] x_lo, y_lo;
    logic          xs_neg, ys_neg;
    logic [HG:0]   w;

    sd_interim_adder #(.H(HG), .ARCH(AG)) dut (
      .x_lo(x_lo), .y_lo(y_lo), .xs_neg(xs_neg), .ys_neg(ys_neg), .w(w)
    );

    initial begin
      int half, expv;
      half = 1 << (HG - 1);
      for (int k = 0; k < (1 << (2 * HG)); k++) begin
        {xs_neg, x_lo, ys_neg, y_lo} = k[2*HG-1:0];
        #1;
        expv = int'(x_lo) - (xs_neg ? half : 0) + int'(y_lo) - (ys_neg ? half : 0);
        checks++;
        if (dval(32'(w), HG) != expv) begin
          failures++;
          $display("h=%0d arch=%0d k=%0d: w=%0d expected %0d", HG, AG, k,
                   dval(32'(w), HG), expv);
        end
      end
      done[g] = 1'b1;
    end
  end

  initial begin
    wait (&done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule : tb_sd_interim_adder
