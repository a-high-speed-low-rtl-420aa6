// tb_sd_digit_slice: exhaustive check of one digit position.
//
// Configurations: h = 4 with look-ahead (the default slice, which uses the
// fused radix-16 final adder), h = 4 with full-adder chains, and h = 2, 3, 5
// with look-ahead (generic final adder). For each, every valid digit pair
// (x, y) is applied with every incoming transfer code (t_pos, t_neg); this
// covers all that a slice can see from its right neighbour, so it is the same
// as applying all values of x_i, y_i, x_(i-1), y_(i-1). Checked against
// integer arithmetic:
//   - t_(i+1) and phi equal the reference transfer and correction flag;
//   - s_i lies in [-(2^h-1), 2^h-1];
//   - s_i + 2^h * t_(i+1) = x_i + y_i + t_i.
// Purely combinational.
module tb_sd_digit_slice;
  import sd_pkg::*;
  import tb_sd_ref_pkg::*;

  int checks   = 0;
  int failures = 0;
  bit [4:0] done = '0;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar g = 0; g < 5; g++) begin : g_cfg
    localparam int       HG = (g == 0 || g == 1) ? 4 : (g == 2) ? 2 : (g == 3) ? 3 : 5;
    localparam sd_arch_e AG = (g == 1) ? SD_ARCH_RIPPLE : SD_ARCH_CLA;
    logic [HG:0] x, y, s;
    logic        t_in_pos, t_in_neg, t_out_pos, t_out_neg, phi;

    sd_digit_slice #(.H(HG), .ARCH(AG)) dut (
      .x(x), .y(y), .t_in_pos(t_in_pos), .t_in_neg(t_in_neg),
      .s(s), .t_out_pos(t_out_pos), .t_out_neg(t_out_neg), .phi(phi)
    );

    initial begin
      int m, tin, tout, sv;
      m = (1 << HG) - 1;
      for (int xv = -m; xv <= m; xv++) begin
        for (int yv = -m; yv <= m; yv++) begin
          for (int k = 0; k < 4; k++) begin
            x        = denc(xv, HG)[HG:0];
            y        = denc(yv, HG)[HG:0];
            t_in_pos = k[0];
            t_in_neg = k[1];
            tin      = int'(t_in_pos) - int'(t_in_neg);
            #1;
            tout = int'(t_out_pos) - int'(t_out_neg);
            sv   = dval(32'(s), HG);
            checks += 4;
            if (tout != ref_transfer(xv, yv, HG)) begin
              failures++;
              $display("h=%0d arch=%0d x=%0d y=%0d: t_out=%0d", HG, AG, xv, yv, tout);
            end
            if (phi != ref_phi(xv, yv, HG)) begin
              failures++;
              $display("h=%0d arch=%0d x=%0d y=%0d: phi=%0b", HG, AG, xv, yv, phi);
            end
            if (sv < -m || sv > m) begin
              failures++;
              $display("h=%0d arch=%0d x=%0d y=%0d t=%0d: s=%0d out of range",
                       HG, AG, xv, yv, tin, sv);
            end
            if (sv + (tout << HG) != xv + yv + tin) begin
              failures++;
              $display("h=%0d arch=%0d x=%0d y=%0d t=%0d: s=%0d t_out=%0d wrong",
                       HG, AG, xv, yv, tin, sv, tout);
            end
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

endmodule : tb_sd_digit_slice
