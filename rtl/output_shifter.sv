// Output shifter of the output-shift multiplier organisation.
//
// Behind a serial Booth encoder, moves both the partial product and its
// complementary bit two bit positions to the left for each serial
// operation.  The partial product is a W_IN-bit two's complement word
// (one's complement form when the complementary bit is set); it is
// sign-extended to W_OUT bits and shifted by 2*step.  The complementary
// bit comes out as a one-hot vector at bit 2*step.  Because the
// complementary bit is moved with the word, the bits shifted in at the
// bottom are zeros for every digit.  Purely combinational.
module output_shifter #(
  parameter int unsigned W_IN  = 10,
  parameter int unsigned STEPS = 2,
  parameter int unsigned W_OUT = W_IN + 2 * (STEPS - 1),
  parameter int unsigned SW    = (STEPS > 1) ? $clog2(STEPS) : 1,
  parameter int unsigned CW    = 2 * (STEPS - 1) + 1
) (
  input  logic [W_IN-1:0]  pp,
  input  logic             cn,
  input  logic [SW-1:0]    step,
  output logic [W_OUT-1:0] pp_shifted,
  output logic [CW-1:0]    cn_shifted
);

  logic [W_OUT-1:0] pp_ext;

  always_comb begin
    pp_ext     = W_OUT'(signed'(pp));
    pp_shifted = pp_ext << (2 * step);
    cn_shifted = CW'(cn) << (2 * step);
  end

endmodule
