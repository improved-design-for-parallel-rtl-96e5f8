// End-to-end testbench of pm_booth_mult_top at its default parameters.
//
// All 65536 signed 8 x 8 operand pairs go through both multiplier
// organisations, in random order of idle and back-to-back cycles.  Both
// products are compared with the signed product computed here and with the
// expected cycle of arrival.  The testbench also counts how often each
// mechanism of the design was exercised and fails if one never was:
//   Booth digits 0, +1, +2, -1, -2 (seen at the encoders' decode input),
//   complementary bits issued, serial steps 0 and 1 on both encoders,
//   an input shift by two bits, an output shift by two bits,
//   operand pairs taken back to back (one per frame), idle frames, and
//   CSA/CLA updates at the reduced rate.
module tb_pm_booth_mult_top
  import pm_mult_pkg::*;
;
  localparam int unsigned N = N_BITS;
  localparam int unsigned LAT = ENC_LATENCY + N_SERIAL + 2;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_ready, a_valid, b_valid;
  logic [N-1:0] x = '0, y = '0;
  logic [2*N-1:0] a_p, b_p;
  int checks = 0, failures = 0;
  int cyc = 0, last_accept = -1;

  // mechanism counters
  int n_digit [5];       // index digit + 2
  int n_cn = 0, n_step0 = 0, n_step1 = 0, n_in_shift = 0, n_out_shift = 0;
  int n_b2b = 0, n_idle = 0, n_csa = 0, n_a = 0, n_b = 0;

  pm_booth_mult_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { int val; int cyc; } exp_t;
  exp_t qa[$], qb[$];

  always @(posedge clk) begin
    cyc++;
    if (rst_n) begin
      // operand side
      if (in_ready && !in_valid) n_idle++;
      if (in_valid && in_ready) begin
        if (last_accept >= 0 && cyc - last_accept == N_SERIAL) n_b2b++;
        last_accept = cyc;
        qa.push_back('{int'(signed'(x)) * int'(signed'(y)), cyc + LAT + 1});
        qb.push_back('{int'(signed'(x)) * int'(signed'(y)), cyc + LAT + 1});
      end
      // internal activity of the input-shift multiplier
      if (dut.u_in_shift.v_q) begin
        for (int e = 0; e < N_ENCODERS; e++) begin
          n_digit[booth_digit(dut.u_in_shift.y3[e]) + 2]++;
          if (dut.u_in_shift.step_q == 0) n_step0++; else n_step1++;
          if (dut.u_in_shift.step_q != 0 && dut.u_in_shift.x_q != 0) n_in_shift++;
        end
      end
      if (dut.u_out_shift.enc_v[0])
        for (int e = 0; e < N_ENCODERS; e++) begin
          if (dut.u_out_shift.enc_cn[e]) n_cn++;
          if (dut.u_out_shift.step_out != 0 && dut.u_out_shift.enc_pp[e] != 0) n_out_shift++;
        end
      if (dut.u_in_shift.frame_q) n_csa++;
      // results
      if (a_valid) begin
        exp_t e;
        n_a++;
        checks++;
        if (qa.size() == 0) begin failures++; $display("FAIL unexpected input-shift product"); end
        else begin
          e = qa.pop_front();
          if (int'(signed'(a_p)) != e.val || cyc != e.cyc) begin
            failures++;
            if (failures < 10) $display("FAIL input-shift p=%0d expected %0d, cycle %0d/%0d", signed'(a_p), e.val, cyc, e.cyc);
          end
        end
      end
      if (b_valid) begin
        exp_t e;
        n_b++;
        checks++;
        if (qb.size() == 0) begin failures++; $display("FAIL unexpected output-shift product"); end
        else begin
          e = qb.pop_front();
          if (int'(signed'(b_p)) != e.val || cyc != e.cyc) begin
            failures++;
            if (failures < 10) $display("FAIL output-shift p=%0d expected %0d, cycle %0d/%0d", signed'(b_p), e.val, cyc, e.cyc);
          end
        end
      end
    end
  end

  task automatic need(input string what, input int count);
    checks++;
    $display("  %-28s %0d", what, count);
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    for (int k = 0; k < 5; k++) n_digit[k] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int v = 0; v < 65536; v++) begin
      int u;
      @(negedge clk);
      while ($urandom_range(0, 7) == 0) @(negedge clk);
      u = (v * 40503) % 65536;   // visit every pair once, in scrambled order
      in_valid = 1'b1;
      x = N'(u);
      y = N'(u >> 8);
      do @(posedge clk); while (!in_ready);
      @(negedge clk) in_valid = 1'b0;
    end
    repeat (LAT + 4) @(posedge clk);
    checks++;
    if (qa.size() != 0 || qb.size() != 0 || n_a != 65536 || n_b != 65536) begin
      failures++;
      $display("FAIL products a=%0d b=%0d, pending %0d %0d", n_a, n_b, qa.size(), qb.size());
    end
    $display("mechanisms:");
    need("digit -2", n_digit[0]);
    need("digit -1", n_digit[1]);
    need("digit 0",  n_digit[2]);
    need("digit +1", n_digit[3]);
    need("digit +2", n_digit[4]);
    need("complementary bits", n_cn);
    need("serial step 0", n_step0);
    need("serial step 1", n_step1);
    need("input shift by 2", n_in_shift);
    need("output shift by 2", n_out_shift);
    need("back-to-back operands", n_b2b);
    need("idle frames", n_idle);
    need("CSA/CLA frame updates", n_csa);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
