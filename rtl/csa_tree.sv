// Carry save adder block: reduces ROWS words of WIDTH bits to a sum word
// and a carry word whose total equals the total of the inputs
// (mod 2**WIDTH).
//
// Built as a Wallace-style tree of (3,2) counter rows: each level groups
// the words in threes, replaces every group by its sum and carry words and
// passes the one or two left-over words through, until two words remain.
// The number of words after each level is worked out at elaboration by
// rows_after(); every level is held in an array of ROWS words whose unused
// entries are zero.  Purely combinational; the multiplier registers the
// result.  The default of five rows is the 8 x 8 output-shift multiplier:
// four partial products and one row of complementary bits.
module csa_tree #(
  parameter int unsigned ROWS  = 5,
  parameter int unsigned WIDTH = 16
) (
  input  logic [ROWS-1:0][WIDTH-1:0] rows,
  output logic [WIDTH-1:0]           sum,
  output logic [WIDTH-1:0]           carry
);

  // words left after l reduction levels
  function automatic int unsigned rows_after(input int unsigned r, input int unsigned l);
    int unsigned n = r;
    for (int unsigned k = 0; k < l; k++) if (n > 2) n = 2 * (n / 3) + n % 3;
    return n;
  endfunction

  // number of levels needed to reach two words
  function automatic int unsigned levels_needed(input int unsigned r);
    int unsigned n = r, l = 0;
    while (n > 2) begin
      n = 2 * (n / 3) + n % 3;
      l++;
    end
    return l;
  endfunction

  localparam int unsigned LEVELS = levels_needed(ROWS);

  for (genvar l = 0; l <= LEVELS; l++) begin : g_lvl
    logic [ROWS-1:0][WIDTH-1:0] r;
    if (l == 0) begin : g_in
      assign r = rows;
    end else begin : g_red
      localparam int unsigned RP     = rows_after(ROWS, l - 1);
      localparam int unsigned GROUPS = RP / 3;
      localparam int unsigned LEFT   = RP % 3;
      for (genvar g = 0; g < GROUPS; g++) begin : g_grp
        csa_row #(.WIDTH(WIDTH)) u_row (
          .a(g_lvl[l-1].r[3*g]), .b(g_lvl[l-1].r[3*g+1]), .c(g_lvl[l-1].r[3*g+2]),
          .sum(r[2*g]), .carry(r[2*g+1])
        );
      end
      for (genvar k = 0; k < LEFT; k++) begin : g_pass
        assign r[2*GROUPS+k] = g_lvl[l-1].r[3*GROUPS+k];
      end
      for (genvar k = 2 * GROUPS + LEFT; k < ROWS; k++) begin : g_zero
        assign r[k] = '0;
      end
    end
  end

  assign sum = g_lvl[LEVELS].r[0];
  if (ROWS > 1) begin : g_two
    assign carry = g_lvl[LEVELS].r[1];
  end else begin : g_one
    assign carry = '0;
  end

endmodule
