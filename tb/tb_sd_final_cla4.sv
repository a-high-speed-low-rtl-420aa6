// tb_sd_final_cla4: exhaustive check of the radix-16 fused final adder.
//
// Every interim sum w in [-14, 14] is combined with all four codes of the
// transfer pair (t_pos, t_neg), whose value is t_pos - t_neg. The 5-bit
// output read as two's complement must be w + t. Purely combinational.
module tb_sd_final_cla4;
  import tb_sd_ref_pkg::*;

  int checks   = 0;
  int failures = 0;

  logic [4:0] w, s;
  logic       t_pos, t_neg;

  sd_final_cla4 dut (.w(w), .t_pos(t_pos), .t_neg(t_neg), .s(s));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int tv;
    for (int wv = -14; wv <= 14; wv++) begin
      for (int k = 0; k < 4; k++) begin
        w     = denc(wv, 4)[4:0];
        t_pos = k[0];
        t_neg = k[1];
        tv    = int'(t_pos) - int'(t_neg);
        #1;
        checks++;
        if (dval(32'(s), 4) != wv + tv) begin
          failures++;
          $display("w=%0d pos=%0b neg=%0b: s=%0d", wv, t_pos, t_neg, dval(32'(s), 4));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule : tb_sd_final_cla4
