// Basic scheduler cell of the two-dimensional crossbar scheduler.
//
// One cell sits at each crossing of an input port (row) and an output port
// (column). R1 arrives from the cell above and is 1 while no cell above has
// taken this column; R3 arrives from the cell on the left and is 1 while no
// cell to the left has taken this row. The cell allocates its crossing when
// it has a request and both are 1:
//
//   Allocate = Request & R1 & R3
//   R2       = R1 & ~Allocate      (to the cell below)
//   R4       = R3 & ~Allocate      (to the cell on the right)
//
// So a granted cell pulls R2 and R4 low and blocks the rest of its column and
// row, and a cell that does not allocate passes R1 to R2 and R3 to R4. The
// gate structure (one three-input AND, two two-input ANDs with an inverted
// input) and the truth table are the design's; the port names follow the
// R1..R4 naming of that truth table.
//
// Timing: purely combinational, no clock and no state.
module sched_cell (
  input  logic request,   // this input port asks for this output port
  input  logic r1,        // column still free (from the cell above)
  input  logic r3,        // row still free (from the cell on the left)
  output logic allocate,  // crossing granted
  output logic r2,        // column still free (to the cell below)
  output logic r4         // row still free (to the cell on the right)
);

  always_comb begin
    allocate = request & r1 & r3;
    r2       = r1 & ~allocate;
    r4       = r3 & ~allocate;
  end

endmodule
