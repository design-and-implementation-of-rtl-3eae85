// Self-checking testbench for sched_cell_maj, the majority-gate form of the
// scheduler cell. It must meet the same truth table as the AND-gate form.
//
// Applies all eight input combinations and compares Allocate, R2 and R4 with
// the cell's truth table, written out below as constants (not computed from
// the cell's equations). The cell is combinational, so each result is
// checked 1 ns after its inputs change, in the same step.
module tb_sched_cell_maj;

  logic request, r1, r3;
  logic allocate, r2, r4;
  int checks = 0;
  int failures = 0;

  sched_cell_maj dut (
    .request  (request),
    .r1       (r1),
    .r3       (r3),
    .allocate (allocate),
    .r2       (r2),
    .r4       (r4)
  );

  // Truth table rows: {request, r1, r3} -> {allocate, r2, r4}.
  typedef struct packed {
    logic request, r1, r3;
    logic allocate, r2, r4;
  } row_t;

  localparam row_t TABLE [8] = '{
    '{1'b0, 1'b0, 1'b0, 1'b0, 1'b0, 1'b0},
    '{1'b0, 1'b0, 1'b1, 1'b0, 1'b0, 1'b1},
    '{1'b0, 1'b1, 1'b0, 1'b0, 1'b1, 1'b0},
    '{1'b0, 1'b1, 1'b1, 1'b0, 1'b1, 1'b1},
    '{1'b1, 1'b0, 1'b0, 1'b0, 1'b0, 1'b0},
    '{1'b1, 1'b0, 1'b1, 1'b0, 1'b0, 1'b1},
    '{1'b1, 1'b1, 1'b0, 1'b0, 1'b1, 1'b0},
    '{1'b1, 1'b1, 1'b1, 1'b1, 1'b0, 1'b0}
  };

  initial begin : watchdog
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (TABLE[k]) begin
      request = TABLE[k].request;
      r1      = TABLE[k].r1;
      r3      = TABLE[k].r3;
      #1;
      checks++;
      if ({allocate, r2, r4} !== {TABLE[k].allocate, TABLE[k].r2, TABLE[k].r4}) begin
        failures++;
        $display("row %0d: req=%b r1=%b r3=%b got alloc=%b r2=%b r4=%b expected %b %b %b",
                 k, request, r1, r3, allocate, r2, r4,
                 TABLE[k].allocate, TABLE[k].r2, TABLE[k].r4);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
