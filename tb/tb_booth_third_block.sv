// Self-checking testbench of booth_third_block: random line patterns
// (W = 6), result computed bit by bit in the testbench.
module tb_booth_third_block;
  localparam int unsigned W = 6;
  logic minus;
  logic [W-1:0] plus_1x, plus_2x, minus_1x, minus_2x, pp;
  int checks = 0, failures = 0;

  booth_third_block #(.W(W)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      logic [W-1:0] exp_pp;
      minus    = 1'($urandom);
      plus_1x  = W'($urandom);
      plus_2x  = W'($urandom);
      minus_1x = W'($urandom);
      minus_2x = W'($urandom);
      #1;
      for (int j = 0; j < W; j++) begin
        logic pl, mi;
        pl = plus_1x[j]  | (j > 0 ? plus_2x[j-1]  : 1'b0);
        mi = minus_1x[j] | (j > 0 ? minus_2x[j-1] : 1'b0);
        exp_pp[j] = pl | (minus & ~mi);
      end
      checks++;
      if (pp !== exp_pp) begin
        failures++;
        $display("FAIL pp=%b expected %b", pp, exp_pp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
