// Third block of the Phase-Mode Booth encoder: merge and inversion.
//
// For each partial product bit p(j) the plus lines +x(j) and +2x(j-1) are
// merged, and so are the minus lines +x'(j) and +2x'(j-1).  When the
// control signal "-" is present the merged minus line is inverted; when it
// is absent the minus line is blocked.  p(j) is the merge of both results,
// so for a negative digit the block emits the one's complement of |digit|*X
// and the missing +1 is supplied separately as the complementary bit.
// Bit 0 has no +2 input.  Purely combinational.
module booth_third_block #(
  parameter int unsigned W = 4
) (
  input  logic         minus,     // control signal "-"
  input  logic [W-1:0] plus_1x,
  input  logic [W-1:0] plus_2x,
  input  logic [W-1:0] minus_1x,
  input  logic [W-1:0] minus_2x,
  output logic [W-1:0] pp
);

  logic [W-1:0] plus_m, minus_m;

  always_comb begin
    plus_m  = plus_1x  | {plus_2x[W-2:0],  1'b0};
    minus_m = minus_1x | {minus_2x[W-2:0], 1'b0};
    pp      = plus_m | ({W{minus}} & ~minus_m);
  end

endmodule
