// Extended AND gate of the Phase-Mode logic family, written as a clocked
// state machine.
//
// The cell stores one flux quantum.  A pulse on Y sets the stored state; a
// pulse on X while the state is set is passed on to B (X*Y = B), and a pulse
// on Re while the state is set is passed on to C (Y*Re = C).  Either read
// empties the cell.  X or Re arriving at an empty cell is absorbed.  This
// follows the cell's state diagram: 0 --Y--> 1, 1 --X/B--> 0,
// 1 --Re/C--> 0, 0 --Re--> 0.
//
// Pulses are modelled as one-cycle high levels.  The cell diagram does not
// order pulses that arrive together; here, within one clock cycle, Y is
// taken first, then X, then Re, so that a cell whose Re is pulsed every
// cycle acts as a one-cycle steering switch: Y goes to B when X is present
// and to C otherwise.  A Y pulse while the state is already set leaves it
// set.  B and C are combinational in the inputs and the state; the state
// register is the only storage.  Reset (rst_n low, synchronous) empties it.
module ext_and_gate (
  input  logic clk,
  input  logic rst_n,
  input  logic x,    // read to B
  input  logic y,    // set
  input  logic re,   // read to C (clock / reset pulse)
  output logic b,    // X * Y
  output logic c     // Y * Re
);

  logic state_q;
  logic held;

  always_comb begin
    held = state_q | y;
    b    = held & x;
    c    = held & ~x & re;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) state_q <= 1'b0;
    else        state_q <= held & ~x & ~re;
  end

endmodule
