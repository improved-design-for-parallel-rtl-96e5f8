// Self-checking testbench of output_shifter: every 10-bit partial product
// with both complementary-bit values at both steps of the default
// configuration; word = pp * 4**step (signed), complementary bit at 2*step.
module tb_output_shifter;
  int checks = 0, failures = 0;

  logic [9:0]  pp;
  logic        cn;
  logic        step;
  logic [11:0] pps;
  logic [2:0]  cns;
  output_shifter dut (.pp, .cn, .step, .pp_shifted(pps), .cn_shifted(cns));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 1024; v++) begin
      for (int s = 0; s < 2; s++) begin
        for (int c = 0; c < 2; c++) begin
          pp = 10'(v); step = 1'(s); cn = 1'(c);
          #1;
          checks++;
          if (int'(signed'(pps)) != int'(signed'(pp)) * (4 ** s) ||
              int'(cns) != c * (4 ** s)) begin
            failures++;
            $display("FAIL pp=%0d cn=%0d s=%0d got %0d %b", signed'(pp), c, s, signed'(pps), cns);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
