// tb_sd_xfer_logic: exhaustive check of the transfer / correction logic.
//
// For h = 4, 3 and 2, every pair of valid digits (x, y) is applied. For each
// pair the testbench checks, against integer arithmetic:
//   - phi equals the reference correction flag;
//   - the transfer t_pos - t_neg equals the reference transfer;
//   - the corrected carry-save halves, read with the position h-1 negabits
//     xs_neg / ys_neg, plus 2^h times the transfer give back x + y;
//   - that interim sum lies in [-2^h+2, 2^h-2].
// Purely combinational; one input pair per time unit.
module tb_sd_xfer_logic;
  import tb_sd_ref_pkg::*;

  int checks   = 0;
  int failures = 0;
  bit [2:0] done = '0;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar g = 0; g < 3; g++) begin : g_cfg
    localparam int HG = 4 - g;
    logic [HG:0] x, y;
    logic        phi, t_pos, t_neg, xs_neg, ys_neg;

    sd_xfer_logic #(.H(HG)) dut (
      .x(x), .y(y), .phi(phi), .t_pos(t_pos), .t_neg(t_neg),
      .xs_neg(xs_neg), .ys_neg(ys_neg)
    );

    initial begin
      int m, t, xh, yh, wv, lo_mask;
      m = (1 << HG) - 1;
      lo_mask = (1 << (HG - 1)) - 1;
      for (int xv = -m; xv <= m; xv++) begin
        for (int yv = -m; yv <= m; yv++) begin
          x = denc(xv, HG)[HG:0];
          y = denc(yv, HG)[HG:0];
          #1;
          t  = int'(t_pos) - int'(t_neg);
          xh = (int'(x) & lo_mask) - (xs_neg ? (1 << (HG - 1)) : 0);
          yh = (int'(y) & lo_mask) - (ys_neg ? (1 << (HG - 1)) : 0);
          wv = xh + yh;
          checks += 4;
          if (phi != ref_phi(xv, yv, HG)) begin
            failures++;
            $display("h=%0d x=%0d y=%0d: phi=%0b", HG, xv, yv, phi);
          end
          if (t != ref_transfer(xv, yv, HG)) begin
            failures++;
            $display("h=%0d x=%0d y=%0d: t=%0d expected %0d", HG, xv, yv, t,
                     ref_transfer(xv, yv, HG));
          end
          if (wv + (t << HG) != xv + yv) begin
            failures++;
            $display("h=%0d x=%0d y=%0d: w=%0d t=%0d do not sum to p", HG, xv, yv, wv, t);
          end
          if (wv < -m + 1 || wv > m - 1) begin
            failures++;
            $display("h=%0d x=%0d y=%0d: w=%0d out of range", HG, xv, yv, wv);
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

endmodule : tb_sd_xfer_logic
