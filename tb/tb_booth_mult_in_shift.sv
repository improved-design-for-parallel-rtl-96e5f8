// Self-checking testbench of booth_mult_in_shift at its default size
// (8 x 8 bits, two encoders, two serial operations).
// Every one of the 65536 operand pairs is multiplied, with random idle
// cycles in between.  Each product is compared with the signed product
// computed here, must arrive ENC_LATENCY + S + 2 cycles after its operands
// were taken, and in_ready must come once every S cycles so that
// back-to-back pairs are taken at that rate.
module tb_booth_mult_in_shift
  import pm_mult_pkg::*;
;
  localparam int unsigned N = N_BITS;
  localparam int unsigned LAT = ENC_LATENCY + N_SERIAL + 2;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_ready, out_valid;
  logic [N-1:0] x = '0, y = '0;
  logic [2*N-1:0] p;
  int checks = 0, failures = 0;
  int cyc = 0, last_accept = -1, back_to_back = 0, outputs = 0;

  booth_mult_in_shift dut (.*);

  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { int val; int cyc; } exp_t;
  exp_t q[$];

  // monitor: sampled at each rising edge, before the edge's updates
  always @(posedge clk) begin
    cyc++;
    if (rst_n) begin
      if (in_ready) begin
        checks++;
        if (last_accept >= 0 && (cyc - last_accept) % N_SERIAL != 0) begin
          failures++;
          $display("FAIL in_ready spacing at cycle %0d", cyc);
        end
      end
      if (in_valid && in_ready) begin
        if (last_accept >= 0 && cyc - last_accept == N_SERIAL) back_to_back++;
        last_accept = cyc;
        q.push_back('{int'(signed'(x)) * int'(signed'(y)), cyc + LAT + 1});
      end
      if (out_valid) begin
        exp_t e;
        outputs++;
        checks++;
        if (q.size() == 0) begin
          failures++;
          $display("FAIL unexpected product");
        end else begin
          e = q.pop_front();
          if (int'(signed'(p)) != e.val || cyc != e.cyc) begin
            failures++;
            if (failures < 10)
              $display("FAIL p=%0d expected %0d, cycle %0d expected %0d",
                       signed'(p), e.val, cyc, e.cyc);
          end
        end
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int v = 0; v < 65536; v++) begin
      @(negedge clk);
      while ($urandom_range(0, 9) == 0) @(negedge clk);
      in_valid = 1'b1;
      x = N'(v);
      y = N'(v >> 8);
      do @(posedge clk); while (!in_ready);
      @(negedge clk) in_valid = 1'b0;
    end
    repeat (LAT + 4) @(posedge clk);
    checks++;
    if (q.size() != 0 || outputs != 65536 || back_to_back == 0) begin
      failures++;
      $display("FAIL outputs=%0d pending=%0d back_to_back=%0d", outputs, q.size(), back_to_back);
    end
    $display("products=%0d back_to_back=%0d", outputs, back_to_back);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
