// Self-checking testbench for ripple_sched.
//
// Three instances are checked against a reference model written here:
//   dut_a  3x3, AND-gate cells (the default size and form)
//   dut_m  3x3, majority-gate cells
//   dut_w  4x5, AND-gate cells (a non-square size)
// The reference visits the cells row by row, left to right, and grants a
// requesting cell when neither its row nor its column has been taken yet and
// both are enabled at the edge (row_in, col_in). That is the fixed-priority
// greedy match the ripple chains must produce.
//
// Stimulus: the request pattern of the 3x3 block diagram example (grants at
// (1,1), (2,2), (3,3) in 1-based numbering), all 512 request matrices of
// the 3x3 array with both edges at 1, and random requests and edge masks for
// all instances. The array is combinational; each result is checked 1 ns
// after the inputs change.
module tb_ripple_sched;
  import xbar_sched_pkg::*;

  localparam int unsigned MAXN = 8;
  typedef logic [MAXN-1:0][MAXN-1:0] mat_t;

  int checks = 0;
  int failures = 0;

  // 3x3 instances
  logic [2:0][2:0] req3, alloc_a, alloc_m;
  logic [2:0]      col_in3, row_in3, col_out_a, row_out_a, col_out_m, row_out_m;

  ripple_sched dut_a (
    .request (req3), .col_in (col_in3), .row_in (row_in3),
    .allocate (alloc_a), .col_out (col_out_a), .row_out (row_out_a)
  );

  ripple_sched #(.N_IN(3), .N_OUT(3), .STYLE(CELL_MAJ)) dut_m (
    .request (req3), .col_in (col_in3), .row_in (row_in3),
    .allocate (alloc_m), .col_out (col_out_m), .row_out (row_out_m)
  );

  // 4 inputs x 5 outputs
  logic [3:0][4:0] req45, alloc_w;
  logic [4:0]      col_in5, col_out_w;
  logic [3:0]      row_in4, row_out_w;

  ripple_sched #(.N_IN(4), .N_OUT(5)) dut_w (
    .request (req45), .col_in (col_in5), .row_in (row_in4),
    .allocate (alloc_w), .col_out (col_out_w), .row_out (row_out_w)
  );

  // Reference: greedy row-major match. Returns the allocation; col_free and
  // row_free return which edge-enabled ports stayed unallocated.
  function automatic mat_t ref_alloc(input mat_t req, input int n_in, input int n_out,
                                     input logic [MAXN-1:0] col_en, input logic [MAXN-1:0] row_en,
                                     output logic [MAXN-1:0] col_free,
                                     output logic [MAXN-1:0] row_free);
    mat_t a = '0;
    col_free = col_en;
    row_free = row_en;
    for (int i = 0; i < n_in; i++)
      for (int j = 0; j < n_out; j++)
        if (req[i][j] && col_free[j] && row_free[i]) begin
          a[i][j]     = 1'b1;
          col_free[j] = 1'b0;
          row_free[i] = 1'b0;
        end
    return a;
  endfunction

  task automatic check3(input string tag);
    mat_t req, exp;
    logic [MAXN-1:0] cf, rf;
    req = '0;
    for (int i = 0; i < 3; i++) for (int j = 0; j < 3; j++) req[i][j] = req3[i][j];
    exp = ref_alloc(req, 3, 3, MAXN'(col_in3), MAXN'(row_in3), cf, rf);
    for (int i = 0; i < 3; i++) for (int j = 0; j < 3; j++) begin
      checks += 2;
      if (alloc_a[i][j] !== exp[i][j]) begin
        failures++;
        $display("%s gate: req=%b cell(%0d,%0d) alloc=%b expected %b", tag, req3, i, j,
                 alloc_a[i][j], exp[i][j]);
      end
      if (alloc_m[i][j] !== exp[i][j]) begin
        failures++;
        $display("%s maj: req=%b cell(%0d,%0d) alloc=%b expected %b", tag, req3, i, j,
                 alloc_m[i][j], exp[i][j]);
      end
    end
    checks += 2;
    if (col_out_a !== cf[2:0] || row_out_a !== rf[2:0]) begin
      failures++;
      $display("%s gate: edge outputs col=%b row=%b expected %b %b", tag, col_out_a, row_out_a,
               cf[2:0], rf[2:0]);
    end
    if (col_out_m !== cf[2:0] || row_out_m !== rf[2:0]) begin
      failures++;
      $display("%s maj: edge outputs col=%b row=%b expected %b %b", tag, col_out_m, row_out_m,
               cf[2:0], rf[2:0]);
    end
  endtask

  task automatic check45();
    mat_t req, exp;
    logic [MAXN-1:0] cf, rf;
    req = '0;
    for (int i = 0; i < 4; i++) for (int j = 0; j < 5; j++) req[i][j] = req45[i][j];
    exp = ref_alloc(req, 4, 5, MAXN'(col_in5), MAXN'(row_in4), cf, rf);
    for (int i = 0; i < 4; i++) for (int j = 0; j < 5; j++) begin
      checks++;
      if (alloc_w[i][j] !== exp[i][j]) begin
        failures++;
        $display("4x5: req=%b cell(%0d,%0d) alloc=%b expected %b", req45, i, j,
                 alloc_w[i][j], exp[i][j]);
      end
    end
    checks++;
    if (col_out_w !== cf[4:0] || row_out_w !== rf[3:0]) begin
      failures++;
      $display("4x5: edge outputs col=%b row=%b expected %b %b", col_out_w, row_out_w,
               cf[4:0], rf[3:0]);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    req45 = '0; col_in5 = '1; row_in4 = '1;

    // Block diagram example (0-based): requests at (0,0) (0,1) (0,2) (1,0)
    // (1,1) (2,1) (2,2); only (0,0), (1,1) and (2,2) may be allocated.
    col_in3 = '1; row_in3 = '1;
    req3 = '0;
    req3[0] = 3'b111; req3[1] = 3'b011; req3[2] = 3'b110;
    #1;
    check3("example");
    checks++;
    if (alloc_a !== {3'b100, 3'b010, 3'b001}) begin
      failures++;
      $display("example: allocation %b, expected the diagonal", alloc_a);
    end

    // Every 3x3 request matrix, edges at 1.
    for (int p = 0; p < 512; p++) begin
      req3 = 9'(p);
      #1;
      check3("exhaustive");
    end

    // Random requests and edge masks.
    for (int k = 0; k < 2000; k++) begin
      req3    = 9'($urandom);
      col_in3 = 3'($urandom) | 3'($urandom);
      row_in3 = 3'($urandom) | 3'($urandom);
      req45   = 20'($urandom);
      col_in5 = 5'($urandom) | 5'($urandom);
      row_in4 = 4'($urandom) | 4'($urandom);
      #1;
      check3("random");
      check45();
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
