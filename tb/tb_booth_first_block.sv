// Self-checking testbench of booth_first_block: all eight bit patterns
// against the radix-4 Booth recoding table (digit value and the four
// control signals derived from it independently).
module tb_booth_first_block
  import pm_mult_pkg::*;
;
  logic [2:0] y3;
  booth_ctl_t ctl;
  int checks = 0, failures = 0;

  booth_first_block dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // digit per pattern {y(i+1), y(i), y(i-1)} = 0..7
  int table_digit [8] = '{0, 1, 1, 2, -2, -1, -1, 0};

  initial begin
    for (int v = 0; v < 8; v++) begin
      int d;
      y3 = 3'(v);
      #1;
      d = table_digit[v];
      checks++;
      if (ctl.plus1 !== (d > 0) || ctl.plus2 !== (d == 2) ||
          ctl.minus !== (d < 0) || ctl.minus2 !== (d == -2)) begin
        failures++;
        $display("FAIL y3=%b ctl=%b digit=%0d", y3, ctl, d);
      end
      checks++;
      if (booth_digit(y3) != d) begin
        failures++;
        $display("FAIL package digit for %b", y3);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
