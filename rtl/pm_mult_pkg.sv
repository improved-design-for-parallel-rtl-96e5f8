// Shared constants and types of the Phase-Mode Booth multiplier.
//
// The multiplier is an 8 x 8 bit signed multiplier built from two radix-4
// Booth encoders that each run two serial operations per product, so that
// the encoders work at twice the rate of the carry save adder (CSA) and the
// carry lookahead adder (CLA).  The 8-bit size, the two encoders and the two
// serial operations are the example organisation of the design; the
// encoder pipeline depth and the CLA group size are this implementation's
// choice.
package pm_mult_pkg;

  // Word length of multiplicand X and multiplier Y.
  localparam int unsigned N_BITS      = 8;
  // Number of Booth encoders working side by side.
  localparam int unsigned N_ENCODERS  = 2;
  // Serial operations per encoder and product (N_BITS / 2 / N_ENCODERS).
  localparam int unsigned N_SERIAL    = 2;
  // Register stages inside one Booth encoder (decode, select).
  localparam int unsigned ENC_LATENCY = 2;
  // Bits per carry lookahead group.
  localparam int unsigned CLA_GROUP   = 4;

  // Control signals of the first Booth block, named as in the design:
  // "+1", "+2", "-" and "-2".
  typedef struct packed {
    logic plus1;   // route x to the plus path
    logic plus2;   // plus path: take the shifted multiplicand (2X)
    logic minus;   // negative digit: invert and set the complementary bit
    logic minus2;  // minus path: take the shifted multiplicand (-2X)
  } booth_ctl_t;

  // Reference value of a radix-4 Booth digit from y(i+1), y(i), y(i-1).
  function automatic int booth_digit(input logic [2:0] y3);
    return -2 * int'(y3[2]) + int'(y3[1]) + int'(y3[0]);
  endfunction

endpackage
