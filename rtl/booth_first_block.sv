// First block of the Phase-Mode Booth encoder: digit decode.
//
// Looks at three adjacent multiplier bits y(i+1), y(i), y(i-1) and raises
// the control signals the rest of the encoder uses:
//   "+1"  the digit is +1 or +2: the multiplicand goes to the plus path,
//   "+2"  the digit is +2: the plus path takes the shifted multiplicand,
//   "-"   the digit is -1 or -2: the partial product is inverted and the
//         complementary bit (c.n.) is set,
//   "-2"  the digit is -2: the minus path takes the shifted multiplicand.
// 000 and 111 raise nothing (digit 0).  The equations are the radix-4 Booth
// recoding table written with these four signals; "+1" is held back
// whenever "-" is raised so that a negative digit always takes the minus
// path.  The gate-level arrangement of the original cell is not reproduced.
// Purely combinational.
module booth_first_block
  import pm_mult_pkg::*;
(
  input  logic [2:0] y3,   // {y(i+1), y(i), y(i-1)}
  output booth_ctl_t ctl
);

  logic y_hi, y_mid, y_lo;

  always_comb begin
    {y_hi, y_mid, y_lo} = y3;
    ctl.plus1  = ~y_hi & (y_mid | y_lo);
    ctl.plus2  = ~y_hi & y_mid & y_lo;
    ctl.minus  =  y_hi & ~(y_mid & y_lo);
    ctl.minus2 =  y_hi & ~y_mid & ~y_lo;
  end

endmodule
