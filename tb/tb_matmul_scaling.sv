// Scaling testbench: the whole multiplier built for NMAX = 8 and P = 3
// processing elements instead of the default 3 and 1, exercised at every
// order 1..8. This checks that the design grows by repeating hardware and
// changing parameters only: for each order it loads random A and B (rows
// spread over the three elements' local memories), runs the PE engine, reads
// C back and compares it with a product computed here, checks the total
// computation time ceil(N/3)*N^2+4 and the latency N+3, and forms the same
// product on the 8 x 8 multiplier array. It counts runs in which some
// element had no row in the last group, and runs with every element busy. It also
// checks that a start with order NMAX+1 is refused.
module tb_matmul_scaling;
  import matmul_pkg::*;
  localparam int unsigned DATA_W = 8, NMAX = 8, P = 3;
  localparam int unsigned NW = ord_w(NMAX), AW = addr_w(NMAX), ACC_W = acc_w(DATA_W, NMAX);

  logic clk = 1'b0, rst_n = 1'b0;
  logic load_we, start, busy, done;
  logic [AW-1:0] addr1, addr2, addr3;
  logic [DATA_W-1:0] din1, din2;
  logic [NW-1:0] n;
  logic [ACC_W-1:0] dout3;
  logic [31:0] latency_cycles, total_cycles;
  logic op_start, op_valid, op_done;
  logic [NW-1:0] op_n;
  logic [DATA_W-1:0] op_a_col [NMAX];
  logic [DATA_W-1:0] op_b_row [NMAX];
  logic [ACC_W-1:0] op_c [NMAX][NMAX];

  int checks = 0, failures = 0;
  int unsigned A [NMAX][NMAX];
  int unsigned B [NMAX][NMAX];

  int n_uneven = 0, n_even = 0;

  matmul_top #(.DATA_W(DATA_W), .NMAX(NMAX), .P(P)) dut (
    .clk, .rst_n, .load_we, .addr1, .din1, .addr2, .din2, .start, .n,
    .busy, .done, .addr3, .dout3, .latency_cycles, .total_cycles,
    .op_start, .op_n, .op_valid, .op_a_col, .op_b_row, .op_done, .op_c
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
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint cref(input int ord, input int r, input int c);
    longint e = 0;
    for (int k = 0; k < ord; k++) e += longint'(A[r][k]) * longint'(B[k][c]);
    return e;
  endfunction

  task automatic run(input int ord);
    for (int r = 0; r < NMAX; r++)
      for (int c = 0; c < NMAX; c++) begin
        A[r][c] = (ord == NMAX) ? 255 - $urandom_range(3) : $urandom_range(255);
        B[r][c] = (ord == NMAX) ? 255 - $urandom_range(3) : $urandom_range(255);
        load_we = 1'b1;
        addr1 = AW'(r * NMAX + c); din1 = DATA_W'(A[r][c]);
        addr2 = AW'(r * NMAX + c); din2 = DATA_W'(B[r][c]);
        @(negedge clk);
      end
    load_we = 1'b0;
    n = NW'(ord); start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (!done) @(negedge clk);
    check(total_cycles == 32'(((ord + P - 1) / P) * ord * ord + 4), $sformatf("n=%0d total %0d", ord, total_cycles));
    if (ord % P != 0) n_uneven++; else n_even++;
    check(latency_cycles == 32'(ord + 3), $sformatf("n=%0d latency %0d", ord, latency_cycles));
    @(negedge clk);
    for (int r = 0; r < ord; r++)
      for (int c = 0; c < ord; c++) begin
        addr3 = AW'(r * NMAX + c);
        @(negedge clk);
        check(dout3 == ACC_W'(cref(ord, r, c)),
              $sformatf("n=%0d C[%0d][%0d] = %0d expected %0d", ord, r, c, dout3, cref(ord, r, c)));
      end
    // Multiplier array.
    op_n = NW'(ord); op_start = 1'b1;
    @(negedge clk);
    op_start = 1'b0;
    for (int k = 0; k < ord; k++) begin
      op_valid = 1'b1;
      for (int r = 0; r < NMAX; r++) begin
        op_a_col[r] = (r < ord) ? DATA_W'(A[r][k]) : '0;
        op_b_row[r] = (r < ord) ? DATA_W'(B[k][r]) : '0;
      end
      @(negedge clk);
    end
    op_valid = 1'b0;
    @(negedge clk);
    check(op_done, $sformatf("n=%0d: array done", ord));
    for (int r = 0; r < ord; r++)
      for (int c = 0; c < ord; c++)
        check(op_c[r][c] == ACC_W'(cref(ord, r, c)), $sformatf("n=%0d array C[%0d][%0d]", ord, r, c));
  endtask

  initial begin
    load_we = 1'b0; start = 1'b0; n = NW'(1);
    addr1 = '0; addr2 = '0; addr3 = '0; din1 = '0; din2 = '0;
    op_start = 1'b0; op_valid = 1'b0; op_n = NW'(1);
    for (int r = 0; r < NMAX; r++) begin op_a_col[r] = '0; op_b_row[r] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    // An order above NMAX (representable here, as 9 fits in 4 bits) is refused.
    n = NW'(NMAX + 1); start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    check(!busy, "order NMAX+1 refused");
    for (int ord = 1; ord <= NMAX; ord++) run(ord);
    check(n_uneven > 0 && n_even > 0, "both full and partly used element groups");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
