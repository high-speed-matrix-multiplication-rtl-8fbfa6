// Self-checking testbench for outer_product_array. For each order n = 1..NMAX
// it feeds the n columns of a random A and the n rows of a random B (zeros
// outside the n x n corner, random idle cycles between pairs), and checks all
// NMAX x NMAX cells against a product computed here, that `done` comes
// exactly two cycles after the n-th pair, and that `start` clears the array.
module tb_outer_product_array;
  import matmul_pkg::*;
  localparam int unsigned DATA_W = 8, NMAX = 3;
  localparam int unsigned NW = ord_w(NMAX), ACC_W = acc_w(DATA_W, NMAX);

  logic clk = 1'b0, rst_n = 1'b0;
  logic start, in_valid, done;
  logic [NW-1:0] n;
  logic [DATA_W-1:0] a_col [NMAX];
  logic [DATA_W-1:0] b_row [NMAX];
  logic [ACC_W-1:0] c [NMAX][NMAX];

  int checks = 0, failures = 0;
  int unsigned A [NMAX][NMAX];
  int unsigned B [NMAX][NMAX];

  outer_product_array #(.DATA_W(DATA_W), .NMAX(NMAX)) dut (
    .clk, .rst_n, .start, .n, .in_valid, .a_col, .b_row, .done, .c
  );

  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int ord, input bit ones);
    for (int r = 0; r < NMAX; r++)
      for (int q = 0; q < NMAX; q++) begin
        A[r][q] = (r < ord && q < ord) ? (ones ? 255 : $urandom_range(255)) : 0;
        B[r][q] = (r < ord && q < ord) ? (ones ? 255 : $urandom_range(255)) : 0;
      end
    n = NW'(ord); start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    for (int r = 0; r < NMAX; r++)
      for (int q = 0; q < NMAX; q++) check(c[r][q] == '0, "cleared by start");
    for (int k = 0; k < ord; k++) begin
      while ($urandom_range(2) == 0) begin
        in_valid = 1'b0;
        @(negedge clk);
        check(!done, "done too early");
      end
      in_valid = 1'b1;
      for (int r = 0; r < NMAX; r++) begin
        a_col[r] = DATA_W'(A[r][k]);
        b_row[r] = DATA_W'(B[k][r]);
      end
      @(negedge clk);
      check(!done, "done too early");
    end
    in_valid = 1'b0;
    for (int r = 0; r < NMAX; r++) begin a_col[r] = '1; b_row[r] = '1; end
    @(negedge clk);
    check(done, $sformatf("n=%0d: done two cycles after the last pair", ord));
    @(negedge clk);
    check(!done, "done is one pulse");
    for (int r = 0; r < NMAX; r++)
      for (int q = 0; q < NMAX; q++) begin
        longint e = 0;
        for (int k = 0; k < ord; k++) e += longint'(A[r][k]) * longint'(B[k][q]);
        check(c[r][q] == ACC_W'(e), $sformatf("n=%0d C[%0d][%0d]=%0d expected %0d", ord, r, q, c[r][q], e));
      end
  endtask

  initial begin
    start = 1'b0; in_valid = 1'b0; n = NW'(1);
    for (int r = 0; r < NMAX; r++) begin a_col[r] = '0; b_row[r] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int rep = 0; rep < 3; rep++)
      for (int ord = 1; ord <= NMAX; ord++) run(ord, 1'b0);
    run(NMAX, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
