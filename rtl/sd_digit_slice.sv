// sd_digit_slice: one digit position i of the MRSD adder.
//
// Inputs are the operand digits x_i, y_i ((h+1)-bit two's complement, in
// [-2^h+1, 2^h-1]) and the transfer t_i from position i-1 as a
// posibit/negabit pair. Outputs are the sum digit s_i (same encoding) and the
// transfer t_(i+1) for position i+1, also as a posibit/negabit pair, so that
//   x_i + y_i = w_i + 2^h * t_(i+1),   s_i = w_i + t_i.
//
// Data flow:
//   sd_xfer_logic     exception flag, t_(i+1) and the corrected negabits in
//                     position h-1, straight from the operand bits;
//   sd_interim_adder  w_i from the low h-1 operand bits (starting at once)
//                     and those negabits;
//   final step        s_i = w_i + t_i. For h = 4 with look-ahead this is
//                     sd_final_cla4, which decodes t_i itself; otherwise
//                     sd_xfer_conv turns t_i into two's complement and
//                     sd_final_adder adds it.
// t_(i+1) leaves the slice after the flag and one gate level, well before w_i
// is complete, so the neighbour's final step overlaps this slice's interim
// addition; the longest path is flag -> transfer -> neighbour's final adder.
//
// ARCH selects full-adder chains (SD_ARCH_RIPPLE) or carry look-ahead
// (SD_ARCH_CLA, the default). Combinational. Requires H >= 2.
// The split into these parts follows the published slice. Two choices are
// made here: the transfer travels between slices as the raw posibit/negabit
// pair, decoded by the receiving slice; and the merged radix-16 final adder
// is used only for h = 4 with look-ahead.
module sd_digit_slice
  import sd_pkg::*;
#(
  parameter int unsigned H    = SD_H,
  parameter sd_arch_e    ARCH = SD_ARCH_CLA
) (
  input  logic [H:0] x,
  input  logic [H:0] y,
  input  logic       t_in_pos,
  input  logic       t_in_neg,
  output logic [H:0] s,
  output logic       t_out_pos,
  output logic       t_out_neg,
  output logic       phi
);

  logic       xs_neg, ys_neg;
  logic [H:0] w;

  sd_xfer_logic #(.H(H)) u_xfer (
    .x      (x),
    .y      (y),
    .phi    (phi),
    .t_pos  (t_out_pos),
    .t_neg  (t_out_neg),
    .xs_neg (xs_neg),
    .ys_neg (ys_neg)
  );

  sd_interim_adder #(.H(H), .ARCH(ARCH)) u_wsum (
    .x_lo   (x[H-2:0]),
    .y_lo   (y[H-2:0]),
    .xs_neg (xs_neg),
    .ys_neg (ys_neg),
    .w      (w)
  );

  if (ARCH == SD_ARCH_CLA && H == 4) begin : g_cla4
    sd_final_cla4 u_final (
      .w     (w),
      .t_pos (t_in_pos),
      .t_neg (t_in_neg),
      .s     (s)
    );
  end else begin : g_generic
    logic [H:0] t_tc;
    sd_xfer_conv #(.H(H)) u_conv (
      .t_pos (t_in_pos),
      .t_neg (t_in_neg),
      .t_tc  (t_tc)
    );
    sd_final_adder #(.H(H), .ARCH(ARCH)) u_final (
      .w    (w),
      .t_tc (t_tc),
      .s    (s)
    );
  end

endmodule : sd_digit_slice
