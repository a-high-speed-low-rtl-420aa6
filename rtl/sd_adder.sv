// sd_adder: carry-free adder for n-digit maximally redundant signed-digit
// numbers of radix 2^h.
//
// Each digit is an (h+1)-bit two's complement value in [-(2^h-1), 2^h-1],
// the largest digit set h+1 bits can hold symmetrically. X and Y have N digits
// (digit i weighs 2^(h*i)); the sum S has N+1 digits, where the top digit
// s_N is the transfer out of position N-1 and lies in [-1, 1].
//
// The adder is N copies of sd_digit_slice. A slice passes only a transfer
// digit in [-1, 1] to its left neighbour, and that transfer depends only on
// the slice's own operand digits, so the delay is that of one slice whatever
// N is. Position 0 receives a zero transfer. Transfers travel between slices
// as posibit/negabit pairs; the top one is converted to two's complement by
// sd_xfer_conv to form s_N.
//
// Interface (all combinational, no clock):
//   x, y : [N-1:0][H:0] operand digits, x[i] is digit i
//   s    : [N:0][H:0]   sum digits
//   phi  : [N-1:0]      exception flag of each position (a transfer guess
//                        that had to be corrected), for observation only
// H defaults to 4 (radix 16) and ARCH to carry look-ahead, as in the
// characterised form of the slice; N = 16 is this design's own default.
module sd_adder
  import sd_pkg::*;
#(
  parameter int unsigned H    = SD_H,
  parameter int unsigned N    = SD_N,
  parameter sd_arch_e    ARCH = SD_ARCH_CLA
) (
  input  logic [N-1:0][H:0] x,
  input  logic [N-1:0][H:0] y,
  output logic [N:0][H:0]   s,
  output logic [N-1:0]      phi
);

  // t_pos[i] / t_neg[i]: transfer into position i (t_i).
  logic [N:0] t_pos, t_neg;

  assign t_pos[0] = 1'b0;
  assign t_neg[0] = 1'b0;

  for (genvar i = 0; i < int'(N); i++) begin : g_digit
    sd_digit_slice #(.H(H), .ARCH(ARCH)) u_slice (
      .x         (x[i]),
      .y         (y[i]),
      .t_in_pos  (t_pos[i]),
      .t_in_neg  (t_neg[i]),
      .s         (s[i]),
      .t_out_pos (t_pos[i+1]),
      .t_out_neg (t_neg[i+1]),
      .phi       (phi[i])
    );
  end

  sd_xfer_conv #(.H(H)) u_top_digit (
    .t_pos (t_pos[N]),
    .t_neg (t_neg[N]),
    .t_tc  (s[N])
  );

endmodule : sd_adder
