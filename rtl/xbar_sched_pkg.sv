// Shared constants, types and gate functions of the two-dimensional crossbar
// scheduler.
//
// The scheduler exists in two equivalent gate-level forms: the conventional
// form built from AND gates and inverters, and the form that uses only the
// gates of quantum-dot cellular automata (QCA), namely majority gates and
// inverters. In QCA an AND gate is a majority gate with one input held at
// polarisation -1, which is logic 0; QCA_FIXED_LOW names that constant.
//
// The 3x3 size is the scheduler size the design is built and evaluated at.
// The enum cell_style_e selects the gate form of an array of cells.
package xbar_sched_pkg;

  // Default scheduler size: 3 input ports by 3 output ports.
  localparam int unsigned NUM_IN_PORTS  = 3;
  localparam int unsigned NUM_OUT_PORTS = 3;

  // A QCA cell fixed at polarisation -1 reads as logic 0.
  localparam logic QCA_FIXED_LOW = 1'b0;

  // Gate form of a scheduler cell.
  typedef enum logic {
    CELL_GATE = 1'b0,  // AND gates and inverters
    CELL_MAJ  = 1'b1   // majority gates and inverters (QCA gate set)
  } cell_style_e;

  // Three-input majority gate M(p,q,r) = pq + qr + pr.
  function automatic logic maj3(input logic p, input logic q, input logic r);
    return (p & q) | (q & r) | (p & r);
  endfunction

  // Five-input majority gate: 1 when at least three inputs are 1.
  function automatic logic maj5(input logic a, input logic b, input logic c,
                                input logic d, input logic e);
    logic [2:0] ones;
    ones = 3'(a) + 3'(b) + 3'(c) + 3'(d) + 3'(e);
    return ones >= 3'd3;
  endfunction

endpackage
