// Carry lookahead adder block: sum = a + b + cin over WIDTH bits.
//
// Bit generate g = a & b and propagate p = a ^ b.  Bits are grouped in
// GROUP-bit groups; inside a group every carry is computed directly from
// the group's g, p and carry-in (full lookahead), and each group also
// forms a group generate and propagate.  The group carries are then
// produced from those in a second lookahead level, so no carry ripples
// bit by bit.  The original design names only the carry lookahead block; the
// group size and the two-level arrangement are this implementation's
// choice.  Purely combinational.
module cla_adder #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned GROUP = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  localparam int unsigned NG = (WIDTH + GROUP - 1) / GROUP;

  logic [WIDTH-1:0] g, p, c;
  logic [NG-1:0]    gg, gp;
  logic [NG:0]      gc;

  always_comb begin
    g = a & b;
    p = a ^ b;

    // group generate / propagate
    for (int k = 0; k < NG; k++) begin
      gg[k] = 1'b0;
      gp[k] = 1'b1;
      for (int j = 0; j < GROUP; j++) begin
        if (k * GROUP + j < WIDTH) begin
          gg[k] = g[k*GROUP+j] | (p[k*GROUP+j] & gg[k]);
          gp[k] = gp[k] & p[k*GROUP+j];
        end
      end
    end

    // second level: group carries as sums of products
    for (int k = 0; k <= NG; k++) begin
      logic term;
      gc[k] = 1'b0;
      for (int m = 0; m <= k; m++) begin
        // carry into group k started at group m-1 (m = 0: cin)
        term = (m == 0) ? cin : gg[m-1];
        for (int q = m; q < k; q++) term = term & gp[q];
        gc[k] = gc[k] | term;
      end
    end

    // first level: carries inside each group
    for (int k = 0; k < NG; k++) begin
      for (int j = 0; j < GROUP; j++) begin
        if (k * GROUP + j < WIDTH) begin
          logic t;
          c[k*GROUP+j] = gc[k];
          for (int q = 0; q < GROUP; q++) begin
            if (q < j) c[k*GROUP+j] = c[k*GROUP+j] & p[k*GROUP+q];
          end
          for (int m = 0; m < GROUP; m++) begin
            if (m < j) begin
              t = g[k*GROUP+m];
              for (int q = 0; q < GROUP; q++) begin
                if (q > m && q < j) t = t & p[k*GROUP+q];
              end
              c[k*GROUP+j] = c[k*GROUP+j] | t;
            end
          end
        end
      end
    end

    sum  = p ^ c;
    cout = gc[NG];
  end

endmodule
