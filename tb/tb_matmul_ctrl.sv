// Self-checking testbench for matmul_ctrl, built with NMAX = 5 and P = 2
// processing elements so that rows are split over elements and the last
// local row is only partly used for odd orders. For each order n = 1..NMAX
// it starts a run and checks the read address sequence (local row ii of A at
// ii*NMAX+k, B[k][j] at k*NMAX+j, k innermost, ceil(n/P) local rows), and
// that `pe_valid[p]` trails `rd_en` by one cycle and is high only when row
// ii*P+p exists. A stand-in for PE 0 plus its FIFO produces one result token
// a fixed time after every n-th read; the testbench checks that the
// controller pops each token into the next local row-major address of C,
// pulses `done` after ceil(n/P)*n writes and reports the latency and total
// time of the run. It also checks that a start with order 0, or above NMAX,
// is ignored, and that the partly used last row happened.
module tb_matmul_ctrl;
  import matmul_pkg::*;
  localparam int unsigned NMAX = 5, P = 2;
  localparam int unsigned NW = ord_w(NMAX), AW = addr_w(NMAX), LAW = laddr_w(NMAX, P);
  localparam int unsigned TOKEN_DELAY = 3;  // read cycle -> FIFO not empty

  logic clk = 1'b0, rst_n = 1'b0;
  logic start, busy, done, pe_clear, rd_en;
  logic [P-1:0] pe_valid;
  logic fifo_empty, fifo_rd, c_we;
  logic [NW-1:0] n_in, n;
  logic [LAW-1:0] addr_a, addr_c;
  logic [AW-1:0] addr_b;
  logic [31:0] latency_cycles, total_cycles;

  int checks = 0, failures = 0;
  int cycle = 0;
  int tokens = 0;          // results waiting in the stand-in FIFO
  int pend[$];             // cycles at which tokens become visible
  logic [P-1:0] live_d;       // expected pe_valid
  int n_partial = 0;          // read cycles with some element idle

  matmul_ctrl #(.NMAX(NMAX), .P(P)) dut (
    .clk, .rst_n, .start, .n_in, .busy, .done, .n, .pe_clear,
    .rd_en, .addr_a, .addr_b, .pe_valid,
    .fifo_empty, .fifo_rd, .c_we, .addr_c, .latency_cycles, .total_cycles
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

  assign fifo_empty = (tokens == 0);

  // Stand-in FIFO: tokens appear TOKEN_DELAY cycles after each n-th read.
  always @(posedge clk) begin
    cycle   <= cycle + 1;
    if (fifo_rd) tokens <= tokens - 1 + ((pend.size() > 0 && pend[0] == cycle) ? 1 : 0);
    else         tokens <= tokens + ((pend.size() > 0 && pend[0] == cycle) ? 1 : 0);
    if (pend.size() > 0 && pend[0] == cycle) void'(pend.pop_front());
  end

  task automatic run(input int ord);
    int reads = 0, writes = 0, t0, t_first = -1, t_last = -1;
    int i = 0, j = 0, k = 0;
    int qn = (ord + P - 1) / P;
    n_in = NW'(ord); start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    check(busy, "busy after start");
    t0 = cycle;
    while (!done) begin
      check(pe_valid == live_d, $sformatf("pe_valid %b expected %b", pe_valid, live_d));
      live_d = '0;
      if (rd_en) begin
        for (int p = 0; p < P; p++) live_d[p] = (i * P + p < ord);
        if (live_d != '1) n_partial++;
        check(addr_a == LAW'(i * NMAX + k), $sformatf("addr_a %0d for local row %0d, k %0d", addr_a, i, k));
        check(addr_b == AW'(k * NMAX + j), $sformatf("addr_b %0d for B[%0d][%0d]", addr_b, k, j));
        reads++;
        if (k == ord - 1) pend.push_back(cycle + TOKEN_DELAY);
        if (++k == ord) begin
          k = 0;
          if (++j == ord) begin j = 0; i++; end
        end
      end
      if (c_we) begin
        check(addr_c == LAW'((writes / ord) * NMAX + writes % ord),
              $sformatf("addr_c %0d for write %0d", addr_c, writes));
        if (t_first < 0) t_first = cycle;
        t_last = cycle;
        writes++;
      end
      @(negedge clk);
      if (cycle - t0 > 200) break;
    end
    check(done, "done pulse");
    check(reads == qn * ord * ord, $sformatf("reads %0d", reads));
    check(writes == qn * ord, $sformatf("writes %0d", writes));
    @(negedge clk);
    check(!busy && !done, "idle after done");
    check(latency_cycles == 32'(t_first - t0), $sformatf("latency %0d vs %0d", latency_cycles, t_first - t0));
    check(total_cycles == 32'(t_last - t0 + 1), $sformatf("total %0d vs %0d", total_cycles, t_last - t0 + 1));
    check(total_cycles == 32'(qn * ord * ord + TOKEN_DELAY + 1),
          $sformatf("total %0d for n=%0d", total_cycles, ord));
  endtask

  initial begin
    start = 1'b0; n_in = '0; live_d = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    // Illegal order: ignored.
    n_in = '0; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    check(!busy, "order 0 ignored");
    if (NMAX + 1 < (1 << NW)) begin
      n_in = NW'(NMAX + 1); start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      check(!busy, "order above NMAX ignored");
    end
    for (int ord = 1; ord <= NMAX; ord++) run(ord);
    run(NMAX);
    check(n_partial > 0, "a partly used local row never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
