// tb_sd_xfer_conv: checks the transfer-to-two's-complement conversion.
//
// For h = 4 and h = 6 all four posibit/negabit input codes are applied and
// the (h+1)-bit output, read as a signed number, must equal t_pos - t_neg.
// Purely combinational.
module tb_sd_xfer_conv;
  import tb_sd_ref_pkg::*;

  int checks   = 0;
  int failures = 0;
  bit [1:0] done = '0;

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar g = 0; g < 2; g++) begin : g_cfg
    localparam int HG = 4 + 2 * g;
    logic        t_pos, t_neg;
    logic [HG:0] t_tc;

    sd_xfer_conv #(.H(HG)) dut (.t_pos(t_pos), .t_neg(t_neg), .t_tc(t_tc));

    initial begin
      for (int k = 0; k < 4; k++) begin
        t_pos = k[0];
        t_neg = k[1];
        #1;
        checks++;
        if (dval(32'(t_tc), HG) != int'(t_pos) - int'(t_neg)) begin
          failures++;
          $display("h=%0d pos=%0b neg=%0b: got %0d", HG, t_pos, t_neg, dval(32'(t_tc), HG));
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

endmodule : tb_sd_xfer_conv
