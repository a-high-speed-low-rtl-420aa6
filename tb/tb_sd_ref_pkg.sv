// tb_sd_ref_pkg: reference arithmetic shared by the MRSD adder testbenches.
//
// Digits are handled here as plain integers, independently of the bit-level
// tricks of the design:
//   dval(bits, h)   value of an (h+1)-bit two's complement digit
//   denc(v, h)      (h+1)-bit two's complement code of v
//   ref_transfer    the transfer t_(i+1) that the adder must produce for the
//                   digit pair (x, y): the sign bits give a first guess, which
//                   is corrected for the few small position sums that would
//                   leave the interim sum out of range:
//                     x >= 0, y >= 0 : 1, but 0 when x + y <= 1
//                     x <  0, y <  0 : -1
//                     mixed signs    : 0, but -1 when x + y = -2^h + 1
//   ref_phi         whether that correction was needed
package tb_sd_ref_pkg;

  function automatic int dval(input logic [31:0] bits, input int h);
    int v;
    v = int'(bits & ((32'd1 << (h + 1)) - 1));
    if (v >= (1 << h)) v -= (1 << (h + 1));
    return v;
  endfunction

  function automatic logic [31:0] denc(input int v, input int h);
    return 32'(v) & ((32'd1 << (h + 1)) - 1);
  endfunction

  function automatic int ref_transfer(input int x, input int y, input int h);
    if (x >= 0 && y >= 0) return (x + y <= 1) ? 0 : 1;
    if (x < 0 && y < 0) return -1;
    return (x + y == -(1 << h) + 1) ? -1 : 0;
  endfunction

  function automatic bit ref_phi(input int x, input int y, input int h);
    if (x >= 0 && y >= 0) return (x + y <= 1);
    if (x < 0 && y < 0) return 1'b0;
    return (x + y == -(1 << h) + 1);
  endfunction

  // Random digit in [-(2^h-1), 2^h-1]; about one draw in four is taken from
  // the values around the correction cases (0, 1, -1, -(2^h-1)).
  function automatic int rand_digit(input int h);
    int m;
    m = (1 << h) - 1;
    if ($urandom_range(3) == 0) begin
      case ($urandom_range(3))
        0: return 0;
        1: return 1;
        2: return -1;
        default: return -m;
      endcase
    end
    return int'($urandom_range(2 * m)) - m;
  endfunction

endpackage : tb_sd_ref_pkg
