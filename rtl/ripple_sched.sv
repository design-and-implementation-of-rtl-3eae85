// Ripple scheduler array: the two-dimensional crossbar scheduler proper.
//
// N_IN x N_OUT scheduler cells form a grid; cell (i,j) stands for "input
// port i is connected to output port j". Each cell's R2 feeds R1 of the cell
// below it, and each cell's R4 feeds R3 of the cell to its right. A
// column-free signal therefore ripples down every column and a row-free
// signal ripples right along every row. A requesting cell is granted only
// when no cell above it has taken its column and no cell to its left has
// taken its row, and once granted it blocks both. The allocation is thus a
// maximal, conflict-free match with fixed priority: lower row index first,
// then lower column index.
//
// col_in drives R1 of the top row and row_in drives R3 of the first column;
// the scheduler ties both to 1 so that every port starts free. col_out is R2
// of the bottom row (1: output port j was not allocated) and row_out is R4 of
// the last column (1: input port i was not allocated); the design leaves
// them unconnected, and they are brought out here so that arrays can be
// chained into a larger scheduler. Driving col_in/row_in low masks an
// output or input port.
//
// STYLE picks the cell's gate form: AND gates (sched_cell) or QCA majority
// gates (sched_cell_maj). Both compute the same function.
//
// Timing: combinational. The worst path ripples through N_IN + N_OUT - 1
// cells, from cell (0,0) to cell (N_IN-1, N_OUT-1).
module ripple_sched
  import xbar_sched_pkg::*;
#(
  parameter int unsigned N_IN  = NUM_IN_PORTS,
  parameter int unsigned N_OUT = NUM_OUT_PORTS,
  parameter cell_style_e STYLE = CELL_GATE
) (
  input  logic [N_IN-1:0][N_OUT-1:0] request,   // request[i][j]: input i wants output j
  input  logic [N_OUT-1:0]           col_in,    // R1 into the top row
  input  logic [N_IN-1:0]            row_in,    // R3 into the first column
  output logic [N_IN-1:0][N_OUT-1:0] allocate,  // allocate[i][j]: input i connected to output j
  output logic [N_OUT-1:0]           col_out,   // R2 out of the bottom row
  output logic [N_IN-1:0]            row_out    // R4 out of the last column
);

  // col_free[i][j] is R1 of cell (i,j); row i = N_IN is the bottom edge.
  // row_free[i][j] is R3 of cell (i,j); column j = N_OUT is the right edge.
  logic [N_IN:0][N_OUT-1:0] col_free;
  logic [N_IN-1:0][N_OUT:0] row_free;

  for (genvar j = 0; j < N_OUT; j++) begin : g_top_edge
    assign col_free[0][j] = col_in[j];
    assign col_out[j]     = col_free[N_IN][j];
  end

  for (genvar i = 0; i < N_IN; i++) begin : g_row
    assign row_free[i][0] = row_in[i];
    assign row_out[i]     = row_free[i][N_OUT];

    for (genvar j = 0; j < N_OUT; j++) begin : g_col
      if (STYLE == CELL_MAJ) begin : g_maj
        sched_cell_maj u_cell (
          .request  (request[i][j]),
          .r1       (col_free[i][j]),
          .r3       (row_free[i][j]),
          .allocate (allocate[i][j]),
          .r2       (col_free[i+1][j]),
          .r4       (row_free[i][j+1])
        );
      end else begin : g_gate
        sched_cell u_cell (
          .request  (request[i][j]),
          .r1       (col_free[i][j]),
          .r3       (row_free[i][j]),
          .allocate (allocate[i][j]),
          .r2       (col_free[i+1][j]),
          .r4       (row_free[i][j+1])
        );
      end
    end
  end

  // The non-blocking rule: at most one grant per input port (row) and per
  // output port (column), and every grant was requested.
  always_comb begin
    for (int i = 0; i < N_IN; i++) begin
      assert final ($onehot0(allocate[i]))
        else $error("input port %0d allocated to more than one output", i);
    end
    for (int j = 0; j < N_OUT; j++) begin
      logic [N_IN-1:0] column;
      for (int i = 0; i < N_IN; i++) column[i] = allocate[i][j];
      assert final ($onehot0(column))
        else $error("output port %0d allocated to more than one input", j);
    end
    assert final ((allocate & ~request) == '0)
      else $error("allocation without a request");
  end

endmodule
