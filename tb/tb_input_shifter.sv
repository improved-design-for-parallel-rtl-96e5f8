// Self-checking testbench of input_shifter: every 8-bit multiplicand at
// every step of the default two-step configuration, and a four-step
// instance with random values; result = x * 4**step as a signed value.
module tb_input_shifter;
  int checks = 0, failures = 0;

  logic [7:0] x;
  logic       step2;
  logic [9:0] xs2;
  input_shifter dut2 (.x, .step(step2), .x_shifted(xs2));

  logic [1:0]  step4;
  logic [13:0] xs4;
  input_shifter #(.W_IN(8), .STEPS(4)) dut4 (.x, .step(step4), .x_shifted(xs4));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      for (int s = 0; s < 4; s++) begin
        x = 8'(v); step2 = 1'(s); step4 = 2'(s);
        #1;
        if (s < 2) begin
          checks++;
          if (int'(signed'(xs2)) != int'(signed'(x)) * (4 ** s)) begin
            failures++;
            $display("FAIL 2-step x=%0d s=%0d got %0d", signed'(x), s, signed'(xs2));
          end
        end
        checks++;
        if (int'(signed'(xs4)) != int'(signed'(x)) * (4 ** s)) begin
          failures++;
          $display("FAIL 4-step x=%0d s=%0d got %0d", signed'(x), s, signed'(xs4));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
