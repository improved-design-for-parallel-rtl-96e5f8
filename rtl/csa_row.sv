// One row of (3,2) counters: three WIDTH-bit words in, a sum word and a
// carry word out, with a + b + c = sum + carry (mod 2**WIDTH).  The carry
// word is already shifted one position up; the top carry is dropped, as
// all arithmetic of the multiplier is modulo 2**WIDTH.  Combinational.
module csa_row #(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic [WIDTH-1:0] c,
  output logic [WIDTH-1:0] sum,
  output logic [WIDTH-1:0] carry
);

  logic [WIDTH-1:0] co;

  for (genvar i = 0; i < WIDTH; i++) begin : g_fa
    full_adder u_fa (.a(a[i]), .b(b[i]), .ci(c[i]), .s(sum[i]), .co(co[i]));
  end

  assign carry = {co[WIDTH-2:0], 1'b0};

endmodule
