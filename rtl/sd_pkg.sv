// sd_pkg: shared definitions for the maximally redundant signed-digit (MRSD)
// adder.
//
// A digit of the radix-2^h number system is an (h+1)-bit two's complement
// value in [-(2^h-1), 2^h-1]; the code 100..0 (-2^h) is not a valid digit.
// The default radix exponent h = 4 (radix 16) is the configuration that the
// adder was characterised in; the default digit count is this design's own
// choice, since the number system itself puts no bound on it.
//
// The architecture enum selects between the two digit-slice forms:
//   SD_ARCH_RIPPLE - the interim-sum and final adders are full-adder chains;
//   SD_ARCH_CLA    - both adders use carry look-ahead (the faster, main form).
//
// The package also holds small full-adder functions used by the ripple forms.
package sd_pkg;

  // Default radix exponent: radix r = 2^SD_H.
  localparam int unsigned SD_H = 4;
  // Default number of operand digits (the sum has SD_N + 1 digits).
  localparam int unsigned SD_N = 16;

  typedef enum logic {
    SD_ARCH_RIPPLE = 1'b0,
    SD_ARCH_CLA    = 1'b1
  } sd_arch_e;

  // Sum bit of a full adder.
  function automatic logic fa_sum(input logic a, input logic b, input logic c);
    return a ^ b ^ c;
  endfunction

  // Carry (majority) of a full adder.
  function automatic logic fa_carry(input logic a, input logic b, input logic c);
    return (a & b) | (a & c) | (b & c);
  endfunction

endpackage : sd_pkg
