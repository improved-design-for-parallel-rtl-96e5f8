// Top level: the two Phase-Mode Booth multiplier organisations side by side.
//
// Both organisations proposed for applying the serial Booth encoder are
// built and fed from one operand stream, so that their results can be
// compared cycle by cycle:
//   * booth_mult_in_shift  - the multiplicand is shifted ahead of each
//                            encoder (input shift),
//   * booth_mult_out_shift - the partial product and its complementary bit
//                            are shifted behind each encoder (output shift).
// Each is an N x N signed multiplier with E encoders doing S serial
// operations per product, a carry save adder block and a carry lookahead
// block; the defaults are the 8-bit example with two encoders and two
// serial operations.
//
// Interface: valid/ready on the operand side.  An operand pair is taken
// when in_valid and in_ready are both high; in_ready is high one cycle in
// every S (both multipliers run the same frame counter from reset, and the
// top only offers a pair when both take it).  Each multiplier returns its
// product with its own out_valid, ENC_LATENCY + S + 2 cycles after the
// accepting edge, one product per S cycles at most.  There is no output
// back-pressure.  Reset is synchronous and active low.
module pm_booth_mult_top
  import pm_mult_pkg::*;
#(
  parameter int unsigned N = N_BITS,
  parameter int unsigned E = N_ENCODERS,
  parameter int unsigned S = N_SERIAL
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  output logic           in_ready,
  input  logic [N-1:0]   x,
  input  logic [N-1:0]   y,
  output logic           a_valid,   // input-shift result valid
  output logic [2*N-1:0] a_p,       // input-shift product
  output logic           b_valid,   // output-shift result valid
  output logic [2*N-1:0] b_p        // output-shift product
);

  logic a_ready, b_ready;

  assign in_ready = a_ready & b_ready;

  booth_mult_in_shift #(.N(N), .E(E), .S(S)) u_in_shift (
    .clk, .rst_n,
    .in_valid(in_valid & in_ready), .in_ready(a_ready),
    .x, .y,
    .out_valid(a_valid), .p(a_p)
  );

  booth_mult_out_shift #(.N(N), .E(E), .S(S)) u_out_shift (
    .clk, .rst_n,
    .in_valid(in_valid & in_ready), .in_ready(b_ready),
    .x, .y,
    .out_valid(b_valid), .p(b_p)
  );

endmodule
