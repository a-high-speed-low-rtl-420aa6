// sd_final_adder: last step of signed-digit addition in one position,
// s_i = w_i + t_i, for any radix exponent h.
//
// w is the (h+1)-bit two's complement interim sum, in [-2^h+2, 2^h-2], and
// t_tc the incoming transfer t_i in [-1, 1] as produced by sd_xfer_conv (so
// t_tc is one of 0..00, 0..01, 1..11). The sum always fits in h+1 bits; no new
// transfer is made. Because there is no overflow, the most significant sum bit
// is taken from the carry c^h into position h as
//   S^h = ~c^h & (W^h | T^h) | (W^h & T^h).
//
// ARCH = SD_ARCH_RIPPLE: half adder in position 0, full adders up to h-1.
// ARCH = SD_ARCH_CLA:    simplified look-ahead. Bits 1..h of t_tc are all the
//   same bit tau, so with c^1 = w^0 & t^0 the carry into position k >= 2 is
//     c^k = tau & OR(w^1..w^(k-1)) | (tau | AND(w^1..w^(k-1))) & c^1.
//   The published form of this equation lets the OR and AND run up to w^k; the
//   carry into position k depends only on the bits below k, and that is what
//   is built here.
//   For h a multiple of 4 from 8 up, the OR and AND terms are built in two
//   levels: bits 1..h-1 are cut into groups of four, each group makes a group
//   "any one" and a group "all one" signal, and the carry into position k
//   combines the group signals below its own group with the bits of its own
//   group. For smaller h the terms are formed flat.
//
// Combinational. Requires H >= 2 and a t_tc of the form above.
module sd_final_adder
  import sd_pkg::*;
#(
  parameter int unsigned H    = SD_H,
  parameter sd_arch_e    ARCH = SD_ARCH_CLA
) (
  input  logic [H:0] w,
  input  logic [H:0] t_tc,
  output logic [H:0] s
);

  // Two-level look-ahead for h = 4k, k >= 2.
  localparam bit USE_GROUPS = (ARCH == SD_ARCH_CLA) && (H >= 8) && (H % 4 == 0);
  // Groups of four over bits 1..H-1.
  localparam int unsigned NGRP = (H + 2) / 4;

  logic       tau, c1;
  logic [H:0] c, c_flat, c_grp;

  assign tau = t_tc[1];
  assign c1  = w[0] & t_tc[0];

  // Ripple chain or flat simplified look-ahead.
  always_comb begin
    c_flat    = '0;
    c_flat[1] = c1;
    if (ARCH == SD_ARCH_RIPPLE) begin
      for (int k = 2; k <= int'(H); k++) begin
        c_flat[k] = fa_carry(w[k-1], t_tc[k-1], c_flat[k-1]);
      end
    end else begin
      for (int k = 2; k <= int'(H); k++) begin
        logic any_one, all_one;
        any_one = 1'b0;
        all_one = 1'b1;
        for (int j = 1; j < k; j++) begin
          any_one = any_one | w[j];
          all_one = all_one & w[j];
        end
        c_flat[k] = (tau & any_one) | ((tau | all_one) & c1);
      end
    end
  end

  // Two-level simplified look-ahead (only used when USE_GROUPS).
  logic [NGRP-1:0] grp_any, grp_all;   // group has a one / is all ones
  logic [NGRP:0]   pre_any, pre_all;   // same over all groups below

  assign pre_any[0] = 1'b0;
  assign pre_all[0] = 1'b1;
  assign c_grp[0]   = 1'b0;
  assign c_grp[1]   = c1;

  for (genvar g = 0; g < int'(NGRP); g++) begin : g_group
    localparam int LO = 4 * g + 1;
    localparam int HI = (4 * g + 4 < int'(H) - 1) ? 4 * g + 4 : int'(H) - 1;
    assign grp_any[g]   = |w[HI:LO];
    assign grp_all[g]   = &w[HI:LO];
    assign pre_any[g+1] = pre_any[g] | grp_any[g];
    assign pre_all[g+1] = pre_all[g] & grp_all[g];
  end

  for (genvar k = 2; k <= int'(H); k++) begin : g_carry
    localparam int GRP = (k - 2) / 4;     // group holding bit k-1
    localparam int LO  = 4 * GRP + 1;     // first bit of that group
    logic any_one, all_one;
    assign any_one  = pre_any[GRP] | (|w[k-1:LO]);
    assign all_one  = pre_all[GRP] & (&w[k-1:LO]);
    assign c_grp[k] = (tau & any_one) | ((tau | all_one) & c1);
  end

  assign c = USE_GROUPS ? c_grp : c_flat;

  always_comb begin
    for (int j = 0; j < int'(H); j++) begin
      s[j] = fa_sum(w[j], t_tc[j], c[j]);
    end
    s[H] = (~c[H] & (w[H] | t_tc[H])) | (w[H] & t_tc[H]);
  end

endmodule : sd_final_adder
