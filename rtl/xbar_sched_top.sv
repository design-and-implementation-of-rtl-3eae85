// Two-dimensional crossbar switch scheduler, 3x3 by default.
//
// A crossbar switch connects N_IN input ports to N_OUT output ports; in any
// cycle an input may drive only one output and an output may listen to only
// one input. This scheduler takes the request matrix (request[i][j]: input i
// has data for output j) and returns an allocation matrix that obeys that
// rule, for the crossbar's connection matrix to apply.
//
// It is a grid of scheduler cells (see ripple_sched and sched_cell) with the
// top-row R1 and first-column R3 inputs tied to 1, as the design ties them.
// The grid is instantiated twice, side by side, once in each gate form the
// design is given in: allocate comes from the AND-gate cells, allocate_maj
// from the majority-gate (QCA gate set) cells. The two are equal for every
// request matrix. out_free and in_free are the bottom-row R2 and last-column
// R4 outputs of the AND-gate grid, which the design leaves unconnected:
// out_free[j] = 1 when output j was not allocated, in_free[i] = 1 when input
// i was not allocated. Because both edges are tied to 1, cell (0,0) has top
// priority: allocate[0][0] always equals request[0][0].
//
// The crossbar's connection matrix and its queue buffers are not part of
// this block; they connect to request and allocate.
//
// Timing: combinational, no clock. The allocation is valid one ripple delay
// (N_IN + N_OUT - 1 cells) after the request matrix settles.
module xbar_sched_top
  import xbar_sched_pkg::*;
#(
  parameter int unsigned N_IN  = NUM_IN_PORTS,
  parameter int unsigned N_OUT = NUM_OUT_PORTS
) (
  input  logic [N_IN-1:0][N_OUT-1:0] request,
  output logic [N_IN-1:0][N_OUT-1:0] allocate,
  output logic [N_IN-1:0][N_OUT-1:0] allocate_maj,
  output logic [N_OUT-1:0]           out_free,
  output logic [N_IN-1:0]            in_free
);

  logic [N_OUT-1:0] maj_col_out;
  logic [N_IN-1:0]  maj_row_out;

  ripple_sched #(
    .N_IN  (N_IN),
    .N_OUT (N_OUT),
    .STYLE (CELL_GATE)
  ) u_sched_gate (
    .request  (request),
    .col_in   ('1),
    .row_in   ('1),
    .allocate (allocate),
    .col_out  (out_free),
    .row_out  (in_free)
  );

  ripple_sched #(
    .N_IN  (N_IN),
    .N_OUT (N_OUT),
    .STYLE (CELL_MAJ)
  ) u_sched_maj (
    .request  (request),
    .col_in   ('1),
    .row_in   ('1),
    .allocate (allocate_maj),
    .col_out  (maj_col_out),
    .row_out  (maj_row_out)
  );

  // Both gate forms must agree on every output.
  always_comb begin
    assert final (allocate_maj == allocate && maj_col_out == out_free && maj_row_out == in_free)
      else $error("gate and majority forms disagree");
  end

endmodule
