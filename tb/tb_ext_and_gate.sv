// Self-checking testbench of ext_and_gate.
// Drives random pulse patterns on X, Y and Re and compares B, C with a
// model of the cell's state diagram (within a cycle: Y, then X, then Re),
// plus a directed sequence through the transitions of the state diagram.
module tb_ext_and_gate;
  logic clk = 1'b0, rst_n = 1'b0;
  logic x = 1'b0, y = 1'b0, re = 1'b0;
  logic b, c;
  int   checks = 0, failures = 0;
  logic st;  // model state

  ext_and_gate dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic xi, yi, ri);
    logic held, eb, ec;
    x = xi; y = yi; re = ri;
    #1;
    held = st | yi;
    eb   = held & xi;
    ec   = held & ~xi & ri;
    checks++;
    if (b !== eb || c !== ec) begin
      failures++;
      $display("FAIL x=%b y=%b re=%b st=%b: b=%b c=%b expected %b %b",
               xi, yi, ri, st, b, c, eb, ec);
    end
    @(posedge clk);
    st = held & ~xi & ~ri;
    #1;
  endtask

  initial begin
    st = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    #1;
    // directed: Re on empty cell, Y sets, X reads to B, Y sets, Re reads to C
    apply(0, 0, 1);
    apply(1, 0, 0);
    apply(0, 1, 0);
    apply(0, 0, 0);   // state held
    apply(1, 0, 0);   // B
    apply(0, 0, 1);   // empty: nothing
    apply(0, 1, 0);
    apply(0, 0, 1);   // C
    apply(1, 0, 0);   // empty: nothing
    apply(1, 1, 0);   // same-cycle Y then X: B
    apply(0, 1, 1);   // same-cycle Y then Re: C
    repeat (2000) apply(1'($urandom), 1'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
