// End-to-end testbench for xbar_sched_top at its default 3x3 size.
//
// Every one of the 512 request matrices is applied, followed by random ones.
// For each, both allocation outputs (AND-gate grid and majority-gate grid)
// and the unallocated-port outputs are compared with a reference: a
// row-by-row, left-to-right greedy match that grants a requesting cell when
// neither its input (row) nor its output (column) has been taken.
//
// The testbench also counts how often each mechanism of the scheduler acts
// and fails if one never does:
//   grant        a requesting cell is allocated
//   col_block    a request is refused because a cell above took the output
//   row_block    a request is refused because a cell to the left took the input
//   both_block   a request is refused by both at once
//   full_match   all three inputs are connected in one matrix
//   port_idle    an output port stays unallocated while others are busy
// The scheduler is combinational: the allocation must be valid in the same
// step as the request, checked 1 ns after the request changes.
module tb_xbar_sched_top;

  localparam int N = 3;

  logic [N-1:0][N-1:0] request, allocate, allocate_maj;
  logic [N-1:0]        out_free, in_free;

  int checks = 0;
  int failures = 0;
  int n_grant = 0, n_col_block = 0, n_row_block = 0, n_both_block = 0;
  int n_full_match = 0, n_port_idle = 0;

  xbar_sched_top dut (
    .request      (request),
    .allocate     (allocate),
    .allocate_maj (allocate_maj),
    .out_free     (out_free),
    .in_free      (in_free)
  );

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply_and_check(input logic [N-1:0][N-1:0] req);
    logic [N-1:0][N-1:0] exp;
    logic [N-1:0] col_taken, row_taken;
    int grants;
    request = req;
    #1;
    exp = '0; col_taken = '0; row_taken = '0; grants = 0;
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++)
        if (req[i][j]) begin
          if (!col_taken[j] && !row_taken[i]) begin
            exp[i][j] = 1'b1;
            col_taken[j] = 1'b1;
            row_taken[i] = 1'b1;
            grants++;
            n_grant++;
          end else if (col_taken[j] && row_taken[i]) n_both_block++;
          else if (col_taken[j]) n_col_block++;
          else n_row_block++;
        end
    if (grants == N) n_full_match++;
    if (grants > 0 && grants < N) n_port_idle++;

    checks++;
    if (allocate !== exp) begin
      failures++;
      $display("request %b: allocate %b, expected %b", req, allocate, exp);
    end
    checks++;
    if (allocate_maj !== exp) begin
      failures++;
      $display("request %b: allocate_maj %b, expected %b", req, allocate_maj, exp);
    end
    checks++;
    if (out_free !== ~col_taken || in_free !== ~row_taken) begin
      failures++;
      $display("request %b: out_free %b in_free %b, expected %b %b", req, out_free, in_free,
               ~col_taken, ~row_taken);
    end
  endtask

  initial begin
    for (int p = 0; p < 512; p++) apply_and_check(9'(p));
    for (int k = 0; k < 1000; k++) apply_and_check(9'($urandom));

    $display("grant=%0d col_block=%0d row_block=%0d both_block=%0d full_match=%0d port_idle=%0d",
             n_grant, n_col_block, n_row_block, n_both_block, n_full_match, n_port_idle);
    checks++;
    if (n_grant == 0 || n_col_block == 0 || n_row_block == 0 || n_both_block == 0 ||
        n_full_match == 0 || n_port_idle == 0) begin
      failures++;
      $display("a scheduler mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
