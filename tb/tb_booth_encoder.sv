// Self-checking testbench of booth_encoder.
// Two instances: the 2-bit default (every multiplicand with every digit
// pattern) and an 8-bit one (random).  A new digit enters every cycle;
// each result must appear exactly ENC_LATENCY cycles later with
// pp + cn = digit * x and cn = 1 only for negative digits.
module tb_booth_encoder
  import pm_mult_pkg::*;
;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle++;

  // 2-bit instance
  logic       v2 = 1'b0, ov2;
  logic [2:0] y2;
  logic [1:0] x2;
  logic [3:0] pp2;
  logic       cn2;
  booth_encoder dut2 (.clk, .rst_n, .in_valid(v2), .y3(y2), .x(x2),
                      .out_valid(ov2), .pp(pp2), .cn(cn2));

  // 8-bit instance
  logic       v8 = 1'b0, ov8;
  logic [2:0] y8;
  logic [7:0] x8;
  logic [9:0] pp8;
  logic       cn8;
  booth_encoder #(.W(8)) dut8 (.clk, .rst_n, .in_valid(v8), .y3(y8), .x(x8),
                               .out_valid(ov8), .pp(pp8), .cn(cn8));

  typedef struct { int val; bit neg; int cyc; } exp_t;
  exp_t q2[$], q8[$];

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // drivers
  initial begin
    y2 = '0; x2 = '0; y8 = '0; x8 = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      v2 = (n < 32) || (n < 200 && ($urandom_range(0, 3) != 0));
      y2 = (n < 32) ? 3'(n % 8) : 3'($urandom);
      x2 = (n < 32) ? 2'(n / 8) : 2'($urandom);
      v8 = ($urandom_range(0, 4) != 0);
      y8 = 3'($urandom);
      x8 = 8'($urandom);
      if (n % 97 == 5) x8 = 8'h80;
      if (v2) q2.push_back('{booth_digit(y2) * int'(signed'(x2)), booth_digit(y2) < 0, cycle + ENC_LATENCY});
      if (v8) q8.push_back('{booth_digit(y8) * int'(signed'(x8)), booth_digit(y8) < 0, cycle + ENC_LATENCY});
    end
    @(negedge clk) begin v2 = 0; v8 = 0; end
    repeat (5) @(posedge clk);
    checks++;
    if (q2.size() != 0 || q8.size() != 0) begin
      failures++;
      $display("FAIL results missing: %0d %0d", q2.size(), q8.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // monitors
  always @(posedge clk) if (rst_n) begin
    #1;
    if (ov2) begin
      exp_t e;
      checks++;
      if (q2.size() == 0) begin failures++; $display("FAIL unexpected 2-bit output"); end
      else begin
        e = q2.pop_front();
        if (int'(signed'(pp2)) + int'(cn2) != e.val || cn2 != e.neg || cycle != e.cyc) begin
          failures++;
          $display("FAIL 2-bit pp=%b cn=%b expected %0d (cycle %0d/%0d)", pp2, cn2, e.val, cycle, e.cyc);
        end
      end
    end
    if (ov8) begin
      exp_t e;
      checks++;
      if (q8.size() == 0) begin failures++; $display("FAIL unexpected 8-bit output"); end
      else begin
        e = q8.pop_front();
        if (int'(signed'(pp8)) + int'(cn8) != e.val || cn8 != e.neg || cycle != e.cyc) begin
          failures++;
          $display("FAIL 8-bit pp=%b cn=%b expected %0d (cycle %0d/%0d)", pp8, cn8, e.val, cycle, e.cyc);
        end
      end
    end
  end
endmodule
