// Input shifter of the input-shift multiplier organisation.
//
// Ahead of a serial Booth encoder, moves the multiplicand two bit positions
// to the left for each serial operation, so that the partial product of
// serial step s leaves the encoder already at weight 4^s relative to the
// encoder's first digit.  The shift is arithmetic: the W_IN-bit two's
// complement input is sign-extended to W_OUT bits and shifted by 2*step,
// zeros entering at the bottom.  Purely combinational.
//
// W_OUT must be at least W_IN + 2*(STEPS-1) for the result to be exact.
module input_shifter #(
  parameter int unsigned W_IN  = 8,
  parameter int unsigned STEPS = 2,
  parameter int unsigned W_OUT = W_IN + 2 * (STEPS - 1),
  parameter int unsigned SW    = (STEPS > 1) ? $clog2(STEPS) : 1
) (
  input  logic [W_IN-1:0]  x,
  input  logic [SW-1:0]    step,
  output logic [W_OUT-1:0] x_shifted
);

  logic [W_OUT-1:0] x_ext;

  always_comb begin
    x_ext     = W_OUT'(signed'(x));
    x_shifted = x_ext << (2 * step);
  end

endmodule
