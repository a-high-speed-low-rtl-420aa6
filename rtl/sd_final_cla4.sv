// sd_final_cla4: final step s_i = w_i + t_i of a radix-16 (h = 4) digit
// position, with the transfer conversion folded in.
//
// The transfer t_i arrives from position i-1 as its posibit/negabit pair
// (t_pos, t_neg). Two decoded signals replace the two's complement transfer:
//   a = ~t_pos &  t_neg   (t_i = -1: decrement w)
//   b =  t_pos & ~t_neg   (t_i = +1: increment w)
// Sum bit j of w flips when a is set and all lower bits of w are 0 (a borrow
// ripples up to it) or when b is set and all lower bits are 1:
//   s^j = w^j ^ (a & ~w^(j-1)..~w^0 | b & w^(j-1)..w^0),  j = 0..3
//   S^4 = a & ~w^3~w^2~w^1~w^0 | ~(b & w^3 w^2 w^1 w^0) & W^4
// The last line uses that w lies in [-14, 14]: a decrement can only carry into
// the sign when w = 0 and an increment only when w = -1.
// These equations follow the published radix-16 logic; the decode of a and b
// from the transfer pair is worked out here from the transfer encoding.
//
// Combinational; a and b each feed a chain of AND terms.
module sd_final_cla4 (
  input  logic [4:0] w,
  input  logic       t_pos,
  input  logic       t_neg,
  output logic [4:0] s
);

  logic a, b;
  logic all0;   // bits of w below the current position are all zero
  logic all1;   // bits of w below the current position are all one

  always_comb begin
    a    = ~t_pos & t_neg;
    b    = t_pos & ~t_neg;
    all0 = 1'b1;
    all1 = 1'b1;
    for (int j = 0; j < 4; j++) begin
      s[j] = w[j] ^ ((a & all0) | (b & all1));
      all0 = all0 & ~w[j];
      all1 = all1 & w[j];
    end
    s[4] = (a & all0) | (~(b & all1) & w[4]);
  end

endmodule : sd_final_cla4
