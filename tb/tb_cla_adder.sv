// Self-checking testbench of cla_adder: the default 16-bit adder and a
// 10-bit one with a partial last group, random operands plus carry chains
// that run through every group; sum and carry-out against plain addition.
module tb_cla_adder;
  int checks = 0, failures = 0;

  logic [15:0] a, b, s;
  logic        cin, cout;
  cla_adder dut (.a, .b, .cin, .sum(s), .cout);

  logic [9:0] a10, b10, s10;
  logic       cout10;
  cla_adder #(.WIDTH(10), .GROUP(4)) dut10 (.a(a10), .b(b10), .cin, .sum(s10), .cout(cout10));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 20000; n++) begin
      logic [16:0] e;
      logic [10:0] e10;
      case (n % 4)
        0: begin a = 16'hffff; b = 16'(n / 4 % 17 == 0 ? 0 : 1 << (n / 4 % 16)); end
        default: begin a = 16'($urandom); b = 16'($urandom); end
      endcase
      cin = 1'($urandom);
      a10 = a[9:0]; b10 = b[9:0];
      #1;
      e   = 17'(a) + 17'(b) + 17'(cin);
      e10 = 11'(a10) + 11'(b10) + 11'(cin);
      checks++;
      if ({cout, s} != e || {cout10, s10} != e10) begin
        failures++;
        $display("FAIL %h+%h+%b = %b%h (exp %h); 10-bit %h", a, b, cin, cout, s, e, e10);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
