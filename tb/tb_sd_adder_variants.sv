// tb_sd_adder_variants: end-to-end test of the MRSD adder in its
// non-default configurations.
//
//   h = 4, N = 16, full-adder-chain slices
//   h = 3, N = 12, look-ahead slices (generic final adder)
//   h = 8, N = 8,  look-ahead slices (radix 256)
//   h = 2, N = 20, full-adder-chain slices
// For each, random operands biased toward the correction cases are added and
// the value of S (128-bit integer arithmetic) must equal X + Y, with every
// sum digit inside the digit set and equal to the digit-by-digit reference.
// Purely combinational: one operand pair per time unit.
module tb_sd_adder_variants;
  import sd_pkg::*;
  import tb_sd_ref_pkg::*;

  localparam int NRAND = 5000;

  int checks   = 0;
  int failures = 0;
  bit [3:0] done = '0;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar g = 0; g < 4; g++) begin : g_cfg
    localparam int       HG = (g == 0) ? 4 : (g == 1) ? 3 : (g == 2) ? 8 : 2;
    localparam int       NG = (g == 0) ? 16 : (g == 1) ? 12 : (g == 2) ? 8 : 20;
    localparam sd_arch_e AG = (g == 0 || g == 3) ? SD_ARCH_RIPPLE : SD_ARCH_CLA;
    localparam int       MG = (1 << HG) - 1;

    logic [NG-1:0][HG:0] x, y;
    logic [NG:0][HG:0]   s;
    logic [NG-1:0]       phi;

    sd_adder #(.H(HG), .N(NG), .ARCH(AG)) dut (.x(x), .y(y), .s(s), .phi(phi));

    initial begin
      int xd [NG];
      int yd [NG];
      int t, tn, sv, wv;
      logic signed [127:0] vx, vy, vs;
      for (int r = 0; r < NRAND; r++) begin
        for (int i = 0; i < NG; i++) begin
          xd[i] = rand_digit(HG);
          yd[i] = rand_digit(HG);
          x[i]  = denc(xd[i], HG)[HG:0];
          y[i]  = denc(yd[i], HG)[HG:0];
        end
        #1;
        vx = '0;
        vy = '0;
        vs = '0;
        t  = 0;
        for (int i = 0; i < NG; i++) begin
          tn = ref_transfer(xd[i], yd[i], HG);
          wv = xd[i] + yd[i] - (tn << HG);
          sv = dval(32'(s[i]), HG);
          checks += 2;
          if (sv != wv + t) begin
            failures++;
            $display("h=%0d arch=%0d digit %0d: s=%0d expected %0d", HG, AG, i, sv, wv + t);
          end
          if (sv < -MG || sv > MG) begin
            failures++;
            $display("h=%0d arch=%0d digit %0d: s=%0d out of range", HG, AG, i, sv);
          end
          t = tn;
          vx += 128'(signed'(longint'(xd[i]))) <<< (HG * i);
          vy += 128'(signed'(longint'(yd[i]))) <<< (HG * i);
          vs += 128'(signed'(longint'(sv))) <<< (HG * i);
        end
        vs += 128'(signed'(longint'(dval(32'(s[NG]), HG)))) <<< (HG * NG);
        checks++;
        if (vs != vx + vy) begin
          failures++;
          $display("h=%0d arch=%0d: S=%0d, X+Y=%0d", HG, AG, vs, vx + vy);
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

endmodule : tb_sd_adder_variants
