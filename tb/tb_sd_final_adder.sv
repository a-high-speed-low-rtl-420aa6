// tb_sd_final_adder: exhaustive check of the generic final adder s = w + t.
//
// For h = 3, 4, 5 and 8, in both the full-adder-chain and the simplified
// look-ahead form, and for h = 12 with look-ahead (h = 8 and 12 use the
// two-level look-ahead), every interim sum w in [-2^h+2, 2^h-2] is combined with
// every transfer t in {-1, 0, 1} (given in the two's complement form that the
// transfer conversion produces). The output read as two's complement must be
// w + t. Purely combinational.
module tb_sd_final_adder;
  import sd_pkg::*;
  import tb_sd_ref_pkg::*;

  int checks   = 0;
  int failures = 0;
  bit [8:0] done = '0;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar g = 0; g < 9; g++) begin : g_cfg
    localparam int       HG = (g < 6) ? 3 + g / 2 : (g < 8) ? 8 : 12;
    localparam sd_arch_e AG = (g % 2 == 0) ? SD_ARCH_CLA : SD_ARCH_RIPPLE;
    logic [HG:0] w, t_tc, s;

    sd_final_adder #(.H(HG), .ARCH(AG)) dut (.w(w), .t_tc(t_tc), .s(s));

    initial begin
      int m;
      m = (1 << HG) - 1;
      for (int wv = -m + 1; wv <= m - 1; wv++) begin
        for (int tv = -1; tv <= 1; tv++) begin
          w    = denc(wv, HG)[HG:0];
          t_tc = denc(tv, HG)[HG:0];
          #1;
          checks++;
          if (dval(32'(s), HG) != wv + tv) begin
            failures++;
            $display("h=%0d arch=%0d w=%0d t=%0d: s=%0d", HG, AG, wv, tv, dval(32'(s), HG));
          end
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

endmodule : tb_sd_final_adder
