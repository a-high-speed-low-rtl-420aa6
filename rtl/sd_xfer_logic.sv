// sd_xfer_logic: transfer extraction and exception correction of one digit
// position of the MRSD adder (the "combinational logic" box of a digit slice).
//
// The operand digits x_i and y_i, each (h+1)-bit two's complement, are read as
// a carry-save form of the position sum p_i = x_i + y_i, so no addition is
// needed to form p_i. The bit group {X^h (negabit, weight 2^h), x^(h-1),
// y^(h-1)} is re-encoded as one posibit x'^h = ~X^h in position h and two
// negabits ~x^(h-1), ~y^(h-1) in position h-1; the value is unchanged. Then the
// pair (x'^h, Y^h) is a first guess of the outgoing transfer t_(i+1) in
// [-1, 1], and the two h-bit halves give the interim sum w_i.
//
// The guess is wrong only when the interim sum would fall to -2^h or
// -2^h + 1, i.e. when bits h-1..1 of both digits are zero and x^0 & y^0 is
// not set. The flag phi marks that case; the transfer is then reduced by one
// and the interim sum raised by 2^h (both position h-1 negabits cleared):
//   phi    = ~( |x[h-1:1] | |y[h-1:1] | (x[0] & y[0]) )
//   t_pos  = ~( X^h | (Y^h & phi) )       posibit of t_(i+1)
//   t_neg  = Y^h | phi                    negabit of t_(i+1)
//   xs_neg = ~( x^(h-1) | phi )           negabit of w_i half from x
//   ys_neg = ~( y^(h-1) | phi )           negabit of w_i half from y
// The flag and re-encoding follow the published scheme; the exact gate form of
// t_pos and t_neg is derived here from its table of exceptions. The input
// X^h = Y^h = 1 with phi = 1 needs a digit -2^h and never occurs.
//
// Interface: x, y are the operand digits; all outputs are combinational, one
// flag-plus-two-gate delay deep. Requires H >= 2.
module sd_xfer_logic #(
  parameter int unsigned H = sd_pkg::SD_H
) (
  input  logic [H:0] x,
  input  logic [H:0] y,
  output logic       phi,
  output logic       t_pos,
  output logic       t_neg,
  output logic       xs_neg,
  output logic       ys_neg
);

  always_comb begin
    phi    = ~((|x[H-1:1]) | (|y[H-1:1]) | (x[0] & y[0]));
    t_pos  = ~(x[H] | (y[H] & phi));
    t_neg  = y[H] | phi;
    xs_neg = ~(x[H-1] | phi);
    ys_neg = ~(y[H-1] | phi);
  end

endmodule : sd_xfer_logic
