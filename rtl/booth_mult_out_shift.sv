// Signed N x N multiplier with serial Booth encoders and output shifters
// (output-shift organisation).
//
// The N/2 radix-4 Booth digits of Y are shared among E encoders; encoder e
// handles digits e*S .. e*S+S-1 one after the other (S serial operations)
// on the unshifted multiplicand, so each encoder is only N+2 bits wide.
// Behind each encoder an output shifter moves the partial product and its
// complementary bit 2*s bits to the left for step s; encoder e's words are
// finally placed at bit 2*S*e.  Every digit's complementary bit therefore
// lands at its own position 2*d, and all of them fit in one row.  The E*S
// partial products and that row are collected and reduced by the carry
// save adder block to a sum and a carry word, which the carry lookahead
// block adds into the 2N-bit product.
//
// Timing: a free-running step counter divides time into frames of S
// cycles.  in_ready is high in the last cycle of each frame; an operand
// pair taken then is encoded during the next frame (encoders at full clock
// rate), and the CSA and CLA registers are enabled once per frame, i.e. at
// 1/S of the encoder rate (two-to-one for S = 2, the encoder/adder clock
// ratio of the design).  One product per S cycles.  Latency from the clock
// edge that accepts an operand pair to the edge that raises out_valid is
// ENC_LATENCY + S + 2 cycles (6 at the defaults): operand register, the
// two encoder stages of the last step, the frame collector, the CSA
// register and the product register.  The CLA carry-out is not used: the
// product is exact in 2N bits.  Reset is synchronous and active low.
module booth_mult_out_shift
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
  input  logic [N-1:0]   x,          // multiplicand, two's complement
  input  logic [N-1:0]   y,          // multiplier, two's complement
  output logic           out_valid,
  output logic [2*N-1:0] p           // product X*Y, two's complement
);

  localparam int unsigned PW   = 2 * N;
  localparam int unsigned SW   = (S > 1) ? $clog2(S) : 1;
  localparam int unsigned WP   = N + 2;             // encoder word
  localparam int unsigned WS   = WP + 2 * (S - 1);  // shifted word
  localparam int unsigned CW   = 2 * (S - 1) + 1;   // shifted c.n. vector
  localparam int unsigned ROWS = E * S + 1;

  // The digits must be shared out exactly.
  initial assert (2 * E * S == N)
    else $error("booth_mult_out_shift: N must equal 2*E*S");

  // ---------------- frame control and operand register ----------------
  logic [SW-1:0] step_q;
  logic [N-1:0]  x_q, y_q;
  logic          v_q;

  assign in_ready = (step_q == SW'(S - 1));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      step_q <= '0;
      x_q    <= '0;
      y_q    <= '0;
      v_q    <= 1'b0;
    end else begin
      step_q <= in_ready ? '0 : step_q + 1'b1;
      if (in_ready) begin
        x_q <= x;
        y_q <= y;
        v_q <= in_valid;
      end
    end
  end

  // y(-1) = 0 below the multiplier
  logic [N:0] y_ext;
  assign y_ext = {y_q, 1'b0};

  // step tag travelling beside the encoder pipeline
  logic [ENC_LATENCY-1:0][SW-1:0] step_pipe;
  always_ff @(posedge clk) begin
    if (!rst_n) step_pipe <= '0;
    else        step_pipe <= {step_pipe[ENC_LATENCY-2:0], step_q};
  end
  logic [SW-1:0] step_out;
  assign step_out = step_pipe[ENC_LATENCY-1];

  // ---------------- encoders and shifters ----------------
  logic [E-1:0][2:0]    y3;
  logic [E-1:0][WP-1:0] enc_pp;
  logic [E-1:0]         enc_cn, enc_v;
  logic [E-1:0][WS-1:0] pp_sh;
  logic [E-1:0][CW-1:0] cn_sh;

  for (genvar e = 0; e < E; e++) begin : g_enc
    // digit e*S + step uses y(2d+1), y(2d), y(2d-1) = y_ext[2d+2 : 2d]
    assign y3[e] = y_ext[2*(e*S + int'(step_q)) +: 3];

    booth_encoder #(.W(N)) u_enc (
      .clk, .rst_n,
      .in_valid(v_q), .y3(y3[e]), .x(x_q),
      .out_valid(enc_v[e]), .pp(enc_pp[e]), .cn(enc_cn[e])
    );

    output_shifter #(.W_IN(WP), .STEPS(S), .W_OUT(WS)) u_shift (
      .pp(enc_pp[e]), .cn(enc_cn[e]), .step(step_out),
      .pp_shifted(pp_sh[e]), .cn_shifted(cn_sh[e])
    );
  end

  // ---------------- collection of one frame ----------------
  // rows 0 .. E*S-1: partial products, row E*S: complementary bits
  logic [ROWS-1:0][PW-1:0] rows_q;
  logic                    frame_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rows_q  <= '0;
      frame_q <= 1'b0;
    end else begin
      for (int e = 0; e < E; e++) begin
        rows_q[e*S + int'(step_out)] <= PW'(signed'(pp_sh[e])) << (2 * S * e);
        for (int k = 0; k < CW; k += 2) begin
          if (cn_sh[e][k]) rows_q[E*S][2*S*e + k] <= 1'b1;
        end
      end
      // a new frame starts with an empty row of complementary bits
      if (step_out == '0) begin
        for (int e = 0; e < E; e++) begin
          for (int k = 0; k < CW; k += 2) begin
            rows_q[E*S][2*S*e + k] <= cn_sh[e][k];
          end
        end
      end
      frame_q <= enc_v[0] && (step_out == SW'(S - 1));
    end
  end

  // ---------------- CSA block (once per frame) ----------------
  logic [PW-1:0] csa_s, csa_c, sum_q, carry_q;
  logic          csa_v_q;

  csa_tree #(.ROWS(ROWS), .WIDTH(PW)) u_csa (
    .rows(rows_q), .sum(csa_s), .carry(csa_c)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sum_q   <= '0;
      carry_q <= '0;
      csa_v_q <= 1'b0;
    end else begin
      csa_v_q <= frame_q;
      if (frame_q) begin
        sum_q   <= csa_s;
        carry_q <= csa_c;
      end
    end
  end

  // ---------------- CLA block (once per frame) ----------------
  logic [PW-1:0] cla_sum;
  logic          cla_cout;

  cla_adder #(.WIDTH(PW), .GROUP(CLA_GROUP)) u_cla (
    .a(sum_q), .b(carry_q), .cin(1'b0), .sum(cla_sum), .cout(cla_cout)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      p         <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= csa_v_q;
      if (csa_v_q) p <= cla_sum;
    end
  end

endmodule
