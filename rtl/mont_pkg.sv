// Shared constants and helpers of the RSA / Montgomery exponentiation design.
//
// KEY_BITS and RADIX_BITS are the default operand width (256-bit RSA key)
// and the log2 of the Montgomery radix (radix 16). The key register
// selector used by the cipher top is an enum here. neg_inv_mod2k() returns
// -N^-1 mod 2^k for an odd N from its low bits: it is what the digit
// recurrence of the Montgomery multiplier uses to pick each quotient digit.
// The widths follow the 256-bit, radix-16 configuration of the design; the
// Newton-iteration inverse is this design's own choice.
package mont_pkg;

  localparam int unsigned KEY_BITS   = 256;
  localparam int unsigned RADIX_BITS = 4;

  // Key register selector of the cipher top.
  typedef enum logic [1:0] {
    KEY_N  = 2'd0,  // modulus
    KEY_E  = 2'd1,  // public exponent
    KEY_D  = 2'd2,  // private exponent
    KEY_R2 = 2'd3   // R^2 mod N, R = 2^KEY_BITS
  } key_sel_e;

  // -N^-1 mod 2^16 for odd N (only the low 16 bits of n0 are used).
  // Newton iteration x <- x*(2 - N*x) doubles the number of correct low
  // bits; x = N is correct to 3 bits for any odd N, so four steps give 48.
  // Callers keep the low bits they need (at most 16).
  function automatic logic [15:0] neg_inv_mod2k(input logic [15:0] n0);
    logic [15:0] x;
    x = n0;
    for (int i = 0; i < 4; i++) begin
      x = x * (16'd2 - n0 * x);
    end
    return 16'd0 - x;
  endfunction

endpackage
