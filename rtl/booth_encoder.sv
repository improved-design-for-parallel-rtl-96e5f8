// Phase-Mode radix-4 Booth encoder.
//
// One Booth digit {y(i+1), y(i), y(i-1)} and a W-bit two's complement
// multiplicand X enter each cycle; two cycles later the encoder emits the
// partial product digit*X as a (W+2)-bit word plus the complementary bit
// cn.  For digits -1 and -2 the word is the one's complement and cn = 1, so
// that pp + cn = digit*X; otherwise cn = 0 and pp = digit*X.
//
// Structure: the first block decodes the digit into "+1", "+2", "-", "-2";
// the second block steers each multiplicand bit to the plus or minus path
// with extended AND gates; the third block merges the paths and inverts
// the minus path.  The multiplicand is sign-extended to W+2 bits first, so
// that every digit's product fits.  The encoder is pipelined: stage 1
// registers the control signals with the multiplicand, stage 2 registers
// the partial product, so its rate does not depend on W.  The two-stage
// split and the sign extension are this implementation's choices.
//
// Latency ENC_LATENCY = 2 cycles, throughput one digit per cycle.
// in_valid travels with the data to out_valid.  Reset is synchronous,
// active low, and clears the valid flags and the data registers.
module booth_encoder
  import pm_mult_pkg::*;
#(
  parameter int unsigned W = 2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [2:0]   y3,        // {y(i+1), y(i), y(i-1)}
  input  logic [W-1:0] x,         // multiplicand, two's complement
  output logic         out_valid,
  output logic [W+1:0] pp,        // partial product (one's complement if cn)
  output logic         cn         // complementary bit
);

  localparam int unsigned WE = W + 2;

  booth_ctl_t    ctl_d, ctl_q;
  logic [WE-1:0] xe_q;
  logic          v1_q;

  booth_first_block u_first (.y3, .ctl(ctl_d));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ctl_q <= '0;
      xe_q  <= '0;
      v1_q  <= 1'b0;
    end else begin
      ctl_q <= ctl_d;
      xe_q  <= WE'(signed'(x));
      v1_q  <= in_valid;
    end
  end

  logic [WE-1:0] p1x, p2x, m1x, m2x, pp_d;

  booth_second_block #(.W(WE)) u_second (
    .clk, .rst_n, .x(xe_q), .ctl(ctl_q),
    .plus_1x(p1x), .plus_2x(p2x), .minus_1x(m1x), .minus_2x(m2x)
  );

  booth_third_block #(.W(WE)) u_third (
    .minus(ctl_q.minus),
    .plus_1x(p1x), .plus_2x(p2x), .minus_1x(m1x), .minus_2x(m2x),
    .pp(pp_d)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pp        <= '0;
      cn        <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      pp        <= pp_d;
      cn        <= ctl_q.minus;
      out_valid <= v1_q;
    end
  end

endmodule
