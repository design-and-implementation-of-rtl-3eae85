// Scheduler cell written in the gate set of quantum-dot cellular automata.
//
// It computes the same function as sched_cell, using only majority gates and
// inverters, the two gates QCA offers. An AND of k inputs is a majority gate
// with k-1 extra inputs held at polarisation -1 (logic 0):
//
//   Allocate = M5(R1, Request, R3, 0, 0)   = Request & R1 & R3
//   R2       = M3(R1, ~Allocate, 0)        = R1 & ~Allocate
//   R4       = M3(R3, ~Allocate, 0)        = R3 & ~Allocate
//
// That is three majority gates and two inverters per cell, as in the QCA
// layout of the cell. Using a single five-input majority gate for the
// three-input AND is how this model reads that layout, where the request
// line meets both column/row lines next to two cells fixed at -1.
// The QCA layout itself (cell placement, four-phase clock zones) is a
// physical layout and is not modelled; here the gates are ideal and
// combinational.
//
// Ports and timing as sched_cell.
module sched_cell_maj
  import xbar_sched_pkg::*;
(
  input  logic request,
  input  logic r1,
  input  logic r3,
  output logic allocate,
  output logic r2,
  output logic r4
);

  logic allocate_n;

  always_comb begin
    allocate   = maj5(r1, request, r3, QCA_FIXED_LOW, QCA_FIXED_LOW);
    allocate_n = ~allocate;
    r2         = maj3(r1, allocate_n, QCA_FIXED_LOW);
    r4         = maj3(r3, allocate_n, QCA_FIXED_LOW);
  end

endmodule
