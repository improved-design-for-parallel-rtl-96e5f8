// Self-checking testbench of booth_second_block: every multiplicand value
// (W = 4) with every combination of the four control signals; each bit
// must appear on exactly the line its controls select.
module tb_booth_second_block
  import pm_mult_pkg::*;
;
  localparam int unsigned W = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [W-1:0] x;
  booth_ctl_t   ctl;
  logic [W-1:0] plus_1x, plus_2x, minus_1x, minus_2x;
  int checks = 0, failures = 0;

  booth_second_block #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x = '0; ctl = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int v = 0; v < 16; v++) begin
      for (int k = 0; k < 16; k++) begin
        logic [W-1:0] e1, e2, m1, m2;
        @(negedge clk);
        x   = W'(v);
        ctl = 4'(k);
        #1;
        e2 = (ctl.plus1 &  ctl.plus2)  ? x : '0;
        e1 = (ctl.plus1 & ~ctl.plus2)  ? x : '0;
        m2 = (~ctl.plus1 &  ctl.minus2) ? x : '0;
        m1 = (~ctl.plus1 & ~ctl.minus2) ? x : '0;
        checks++;
        if (plus_1x !== e1 || plus_2x !== e2 || minus_1x !== m1 || minus_2x !== m2) begin
          failures++;
          $display("FAIL x=%h ctl=%b: %h %h %h %h", x, ctl, plus_1x, plus_2x, minus_1x, minus_2x);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
