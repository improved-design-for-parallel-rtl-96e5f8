// Word-length sweep of pm_booth_mult_top.
//
// Runs the top at other sizes than its 8-bit default, with the digits
// shared out as N = 2*E*S:
//   N = 4  (E = 1, S = 2),  N = 16 (E = 2, S = 4),
//   N = 32 (E = 4, S = 4),  N = 64 (E = 4, S = 8).
// Each instance gets random operand pairs plus the extreme values (most
// negative and most positive) and must return the signed product in both
// organisations after ENC_LATENCY + S + 2 cycles, one pair per S cycles.
module tb_pm_booth_mult_sizes
  import pm_mult_pkg::*;
;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int done_count = 0;

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one harness per size
  for (genvar g = 0; g < 4; g++) begin : g_size
    localparam int unsigned N = (g == 0) ? 4 : (g == 1) ? 16 : (g == 2) ? 32 : 64;
    localparam int unsigned E = (g == 0) ? 1 : (g == 1) ? 2 : 4;
    localparam int unsigned S = (g == 0) ? 2 : (g == 1) ? 4 : (g == 2) ? 4 : 8;
    localparam int unsigned LAT = ENC_LATENCY + S + 2;
    localparam int unsigned PAIRS = 3000;

    logic in_valid = 1'b0, in_ready, a_valid, b_valid;
    logic [N-1:0] x = '0, y = '0;
    logic [2*N-1:0] a_p, b_p;
    int cyc = 0, n_out = 0;

    typedef struct { logic [2*N-1:0] val; int cyc; } exp_t;
    exp_t qa[$], qb[$];

    pm_booth_mult_top #(.N(N), .E(E), .S(S)) dut (.*);

    function automatic logic [N-1:0] pick(input int k);
      logic [N-1:0] v;
      case (k % 7)
        0: v = {1'b1, {(N-1){1'b0}}};   // most negative
        1: v = {1'b0, {(N-1){1'b1}}};   // most positive
        default: begin
          logic [127:0] r;
          r = {$urandom, $urandom, $urandom, $urandom};
          v = N'(r);
        end
      endcase
      return v;
    endfunction

    always @(posedge clk) begin
      cyc++;
      if (rst_n) begin
        if (in_valid && in_ready) begin
          logic signed [2*N-1:0] prod;
          prod = (2*N)'(signed'(x)) * (2*N)'(signed'(y));
          qa.push_back('{prod, cyc + LAT + 1});
          qb.push_back('{prod, cyc + LAT + 1});
        end
        if (a_valid) begin
          exp_t e;
          checks++;
          e = qa.pop_front();
          if (a_p != e.val || cyc != e.cyc) begin
            failures++;
            $display("FAIL N=%0d input shift: %h expected %h (cycle %0d/%0d)", N, a_p, e.val, cyc, e.cyc);
          end
        end
        if (b_valid) begin
          exp_t e;
          checks++;
          n_out++;
          e = qb.pop_front();
          if (b_p != e.val || cyc != e.cyc) begin
            failures++;
            $display("FAIL N=%0d output shift: %h expected %h (cycle %0d/%0d)", N, b_p, e.val, cyc, e.cyc);
          end
        end
      end
    end

    initial begin
      @(posedge rst_n);
      for (int k = 0; k < PAIRS; k++) begin
        @(negedge clk);
        in_valid = 1'b1;
        x = pick(k);
        y = pick(k / 7 + 3 * k);
        do @(posedge clk); while (!in_ready);
        @(negedge clk) in_valid = 1'b0;
      end
      repeat (LAT + 4) @(posedge clk);
      checks++;
      if (n_out != PAIRS || qa.size() != 0) begin
        failures++;
        $display("FAIL N=%0d: %0d products, %0d pending", N, n_out, qa.size());
      end
      $display("N=%0d: %0d products checked", N, n_out);
      done_count++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    wait (done_count == 4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
