// Self-checking testbench of csa_tree: the default five-row tree and a
// six-row and a three-row instance, random words and all-ones words;
// sum + carry must equal the sum of the rows modulo 2**16.
module tb_csa_tree;
  int checks = 0, failures = 0;

  logic [4:0][15:0] r5;
  logic [5:0][15:0] r6;
  logic [2:0][15:0] r3;
  logic [15:0] s5, c5, s6, c6, s3, c3;

  csa_tree dut5 (.rows(r5), .sum(s5), .carry(c5));
  csa_tree #(.ROWS(6), .WIDTH(16)) dut6 (.rows(r6), .sum(s6), .carry(c6));
  csa_tree #(.ROWS(3), .WIDTH(16)) dut3 (.rows(r3), .sum(s3), .carry(c3));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 5000; n++) begin
      logic [15:0] t5, t6, t3;
      for (int k = 0; k < 6; k++) begin
        r6[k] = (n < 10) ? 16'hffff : 16'($urandom);
        if (k < 5) r5[k] = (n < 10) ? 16'hffff : 16'($urandom);
        if (k < 3) r3[k] = 16'($urandom);
      end
      #1;
      t5 = '0; t6 = '0; t3 = '0;
      for (int k = 0; k < 6; k++) begin
        t6 += r6[k];
        if (k < 5) t5 += r5[k];
        if (k < 3) t3 += r3[k];
      end
      checks++;
      if (16'(s5 + c5) != t5 || 16'(s6 + c6) != t6 || 16'(s3 + c3) != t3) begin
        failures++;
        $display("FAIL %h/%h %h/%h %h/%h", 16'(s5 + c5), t5, 16'(s6 + c6), t6, 16'(s3 + c3), t3);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
