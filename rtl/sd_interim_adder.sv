// sd_interim_adder: forms the interim sum w_i of one digit position.
//
// Its operands are the two h-bit carry-save halves of the corrected position
// sum: bits h-2..0 taken unchanged from x_i and y_i, and in position h-1 the
// negabits xs_neg and ys_neg from sd_xfer_logic. The low h-1 bits do not wait
// for that logic, so their addition starts at time zero. The position h-1
// adder receives the two negabits inverted, and its carry out, inverted, is
// the negabit W^h of the result; w = W^h w^(h-1) .. w^0 is then an ordinary
// (h+1)-bit two's complement number, in [-2^h+2, 2^h-2] for valid digits.
//
// ARCH = SD_ARCH_RIPPLE: half adder in position 0, full-adder chain above it.
// ARCH = SD_ARCH_CLA:    every carry is formed directly from generate and
//                        propagate signals (flat carry look-ahead); this is
//                        the default, as in the faster form of the slice.
// The flat look-ahead layout is this design's choice for a "standard CLA".
//
// Combinational. Requires H >= 2.
module sd_interim_adder
  import sd_pkg::*;
#(
  parameter int unsigned H    = SD_H,
  parameter sd_arch_e    ARCH = SD_ARCH_CLA
) (
  input  logic [H-2:0] x_lo,
  input  logic [H-2:0] y_lo,
  input  logic         xs_neg,
  input  logic         ys_neg,
  output logic [H:0]   w
);

  logic [H-1:0] a, b, g, p;
  logic [H:0]   c;

  always_comb begin
    // Negabits enter position h-1 inverted.
    a = {~xs_neg, x_lo};
    b = {~ys_neg, y_lo};
    g = a & b;
    p = a ^ b;
    c = '0;
    if (ARCH == SD_ARCH_RIPPLE) begin
      for (int k = 1; k <= int'(H); k++) begin
        c[k] = fa_carry(a[k-1], b[k-1], c[k-1]);
      end
    end else begin
      for (int k = 1; k <= int'(H); k++) begin
        for (int j = 0; j < k; j++) begin
          logic term;
          term = g[j];
          for (int m = j + 1; m < k; m++) begin
            term = term & p[m];
          end
          c[k] = c[k] | term;
        end
      end
    end
    w[H-1:0] = p ^ c[H-1:0];
    // Inverted carry out of position h-1 is the negabit of weight 2^h.
    w[H] = ~c[H];
  end

endmodule : sd_interim_adder
