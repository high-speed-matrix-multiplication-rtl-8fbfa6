// End-to-end testbench for matmul_top at its default parameters.
// For every order n = 1..NMAX (and a final all-0xFF run at n = NMAX) it loads
// random matrices A and B through the host port, starts a run, waits for
// `done`, reads C back through the MEM3 port and compares every element with
// a product computed here. It checks the latency (n+3 cycles) and total
// computation time (n^3+4 cycles) reported by the design against cycles
// counted here, that a start while busy is ignored, and counts how often the
// design's mechanisms occur: a fresh-product load in the PE (feedback off),
// an accumulation (feedback on), a push into the result FIFO, a MEM3 write,
// a change of matrix order between runs, and a run of the multiplier array,
// which forms each product again from columns of A and rows of B and is
// checked too. A mechanism never seen counts as a failure. A write to MEM1
// attempted while busy must be ignored, or the product read back is wrong.
module tb_matmul_top;
  import matmul_pkg::*;
  localparam int unsigned DATA_W = DATA_W_DEF, NMAX = NMAX_DEF;
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
  int n_array_runs = 0;

  int checks = 0, failures = 0;
  int cycle = 0;
  int n_fresh = 0, n_accum = 0, n_fifo_push = 0, n_c_write = 0, n_order_change = 0;
  int last_order = 0;

  int unsigned A [NMAX][NMAX];
  int unsigned B [NMAX][NMAX];

  matmul_top dut (
    .clk, .rst_n, .load_we, .addr1, .din1, .addr2, .din2, .start, .n,
    .busy, .done, .addr3, .dout3, .latency_cycles, .total_cycles,
    .op_start, .op_n, .op_valid, .op_a_col, .op_b_row, .op_done, .op_c
  );

  always #5 clk = ~clk;

  // Mechanism counters, observed on internal strobes.
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n && dut.g_pe[0].u_pe.prod_v && !dut.g_pe[0].u_pe.fb_en) n_fresh++;
    if (rst_n && dut.g_pe[0].u_pe.prod_v &&  dut.g_pe[0].u_pe.fb_en) n_accum++;
    if (rst_n && dut.pe_out_valid[0]) n_fifo_push++;
    if (rst_n && dut.c_we) n_c_write++;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int ord, input bit ones);
    int t0, t_end;
    // Load A and B (also the unused part of the NMAX x NMAX arrays).
    for (int r = 0; r < NMAX; r++)
      for (int c = 0; c < NMAX; c++) begin
        A[r][c] = ones ? 255 : $urandom_range(255);
        B[r][c] = ones ? 255 : $urandom_range(255);
        load_we = 1'b1;
        addr1 = AW'(r * NMAX + c); din1 = DATA_W'(A[r][c]);
        addr2 = AW'(r * NMAX + c); din2 = DATA_W'(B[r][c]);
        @(negedge clk);
      end
    load_we = 1'b0;
    if (last_order != 0 && last_order != ord) n_order_change++;
    last_order = ord;
    // Start.
    n = NW'(ord); start = 1'b1;
    t0 = cycle;
    @(negedge clk);
    start = 1'b0;
    check(busy, "busy after start");
    // A second start and a load attempt while busy are ignored.
    @(negedge clk);
    n = NW'(1); start = 1'b1; load_we = 1'b1; addr1 = '0; din1 = ~DATA_W'(A[0][0]);
    @(negedge clk);
    start = 1'b0; load_we = 1'b0;
    while (!done) @(negedge clk);
    t_end = cycle;
    check(t_end - t0 == ord * ord * ord + 4 + 1,
          $sformatf("n=%0d: done %0d cycles after start", ord, t_end - t0));
    check(latency_cycles == 32'(ord + 3), $sformatf("n=%0d latency %0d", ord, latency_cycles));
    check(total_cycles == 32'(ord * ord * ord + 4), $sformatf("n=%0d total %0d", ord, total_cycles));
    @(negedge clk);
    check(!busy, "idle after done");
    // Read C back.
    for (int r = 0; r < ord; r++)
      for (int c = 0; c < ord; c++) begin
        longint e = 0;
        for (int k = 0; k < ord; k++) e += longint'(A[r][k]) * longint'(B[k][c]);
        addr3 = AW'(r * NMAX + c);
        @(negedge clk);
        check(dout3 == ACC_W'(e), $sformatf("n=%0d C[%0d][%0d] = %0d expected %0d", ord, r, c, dout3, e));
      end
    // Same product on the multiplier array: column k of A with row k of B.
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
    check(op_done, $sformatf("n=%0d: array done after %0d column/row pairs", ord, ord));
    n_array_runs++;
    for (int r = 0; r < ord; r++)
      for (int c = 0; c < ord; c++) begin
        longint e = 0;
        for (int k = 0; k < ord; k++) e += longint'(A[r][k]) * longint'(B[k][c]);
        check(op_c[r][c] == ACC_W'(e), $sformatf("n=%0d array C[%0d][%0d] = %0d expected %0d", ord, r, c, op_c[r][c], e));
      end
  endtask

  initial begin
    load_we = 1'b0; start = 1'b0; n = NW'(1);
    addr1 = '0; addr2 = '0; addr3 = '0; din1 = '0; din2 = '0;
    op_start = 1'b0; op_valid = 1'b0; op_n = NW'(1);
    for (int r = 0; r < NMAX; r++) begin op_a_col[r] = '0; op_b_row[r] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int ord = 1; ord <= NMAX; ord++) run(ord, 1'b0);
    for (int r = 0; r < 3; r++) run($urandom_range(NMAX - 1) + 1, 1'b0);
    run(NMAX, 1'b1);
    $display("mechanisms: fresh=%0d accumulate=%0d fifo_push=%0d c_write=%0d order_change=%0d array_runs=%0d",
             n_fresh, n_accum, n_fifo_push, n_c_write, n_order_change, n_array_runs);
    check(n_array_runs > 0, "multiplier array never ran");
    check(n_fresh > 0, "PE fresh-product load never happened");
    check(n_accum > 0 || NMAX == 1, "PE accumulation never happened");
    check(n_fifo_push > 0, "FIFO push never happened");
    check(n_c_write == n_fifo_push, "every FIFO entry written to MEM3");
    check(n_order_change > 0, "matrix order never changed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
