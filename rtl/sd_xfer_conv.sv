// sd_xfer_conv: converts a transfer digit t in [-1, 1], held as a posibit /
// negabit pair (t = t_pos - t_neg), into the (h+1)-bit two's complement number
// T^h t^(h-1) .. t^0 that the final adder of a digit slice adds to the interim
// sum.
//
//   t = +1  (t_pos & ~t_neg) -> 0..01
//   t =  0  (t_pos == t_neg) -> 0..00
//   t = -1  (~t_pos & t_neg) -> 1..11
// so t^0 = t_pos ^ t_neg and every bit above it equals ~t_pos & t_neg.
//
// Follows the published conversion; combinational, two gate levels.
module sd_xfer_conv #(
  parameter int unsigned H = sd_pkg::SD_H
) (
  input  logic       t_pos,
  input  logic       t_neg,
  output logic [H:0] t_tc
);

  always_comb begin
    t_tc[H:1] = {H{~t_pos & t_neg}};
    t_tc[0]   = t_pos ^ t_neg;
  end

endmodule : sd_xfer_conv
