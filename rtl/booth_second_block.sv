// Second block of the Phase-Mode Booth encoder: sign and shift steering.
//
// Three extended AND gates per multiplicand bit x(i):
//   gate 1: Y = x(i), X = "+1"  ->  B = "+" (plus path),  C = "-" (minus path)
//   gate 2: Y = "+",  X = "+2"  ->  B = +2x(i),           C = +x(i)
//   gate 3: Y = "-",  X = "-2"  ->  B = +2x'(i),          C = +x'(i)
// So x(i) ends up on exactly one of four lines, chosen by "+1", "+2" and
// "-2".  The +2 lines carry the bit one position up (the shift of the 2X
// digits); that re-indexing is done by the third block.  Every gate's Re
// input is pulsed each cycle, which makes the gates steer within the cycle
// and leaves no state behind between cycles.
//
// W is the number of multiplicand bits handled (the encoder passes its
// sign-extended multiplicand).
module booth_second_block
  import pm_mult_pkg::*;
#(
  parameter int unsigned W = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] x,
  input  booth_ctl_t   ctl,
  output logic [W-1:0] plus_1x,   // +x(i)
  output logic [W-1:0] plus_2x,   // +2x(i), weight i+1
  output logic [W-1:0] minus_1x,  // +x'(i)
  output logic [W-1:0] minus_2x   // +2x'(i), weight i+1
);

  logic [W-1:0] plus_path, minus_path;

  for (genvar i = 0; i < W; i++) begin : g_bit
    ext_and_gate u_sign (
      .clk, .rst_n,
      .x(ctl.plus1), .y(x[i]), .re(1'b1),
      .b(plus_path[i]), .c(minus_path[i])
    );
    ext_and_gate u_plus (
      .clk, .rst_n,
      .x(ctl.plus2), .y(plus_path[i]), .re(1'b1),
      .b(plus_2x[i]), .c(plus_1x[i])
    );
    ext_and_gate u_minus (
      .clk, .rst_n,
      .x(ctl.minus2), .y(minus_path[i]), .re(1'b1),
      .b(minus_2x[i]), .c(minus_1x[i])
    );
  end

endmodule
