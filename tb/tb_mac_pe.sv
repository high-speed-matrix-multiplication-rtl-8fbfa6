// Self-checking testbench for mac_pe. For every order n = 1..NMAX it streams
// dot products of random bytes (back to back, and with random idle cycles),
// and checks each result against a sum computed here, that a result appears
// exactly two cycles after its last input pair, that a product-only element
// (n = 1) and feedback accumulation (n > 1) both occur, and that `clear`
// discards a half-finished element.
module tb_mac_pe;
  import matmul_pkg::*;
  localparam int unsigned DATA_W = 8, NMAX = 3;
  localparam int unsigned NW = ord_w(NMAX), ACC_W = acc_w(DATA_W, NMAX);

  logic clk = 1'b0, rst_n = 1'b0;
  logic clear, in_valid, out_valid;
  logic [NW-1:0] n;
  logic [DATA_W-1:0] a, b;
  logic [ACC_W-1:0] out_data;

  int checks = 0, failures = 0;
  int cycle = 0;
  longint exp_q[$];     // expected results in order
  int due_q[$];         // cycle at which each result is due
  int n_single = 0, n_accum = 0, n_results = 0;

  mac_pe #(.DATA_W(DATA_W), .NMAX(NMAX)) dut (
    .clk, .rst_n, .clear, .n, .in_valid, .a, .b, .out_valid, .out_data
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Output monitor: every out_valid must match the next expected result on
  // its due cycle.
  always @(negedge clk) if (rst_n) begin
    if (out_valid) begin
      if (exp_q.size() == 0) check(1'b0, "unexpected result");
      else begin
        longint e;
        int due;
        e = exp_q.pop_front();
        due = due_q.pop_front();
        check(out_data == ACC_W'(e), $sformatf("result %0d expected %0d", out_data, e));
        check(cycle == due, $sformatf("result at cycle %0d, due %0d", cycle, due));
        n_results++;
      end
    end else if (due_q.size() > 0) begin
      check(cycle < due_q[0], $sformatf("result due at %0d missing", due_q[0]));
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Drive one element of order `ord`; `gaps` inserts random idle cycles.
  task automatic element(input int ord, input bit gaps);
    longint sum = 0;
    for (int k = 0; k < ord; k++) begin
      while (gaps && $urandom_range(3) == 0) begin
        in_valid = 1'b0;
        @(negedge clk);
      end
      in_valid = 1'b1;
      a = DATA_W'($urandom); b = DATA_W'($urandom);
      sum += longint'(a) * longint'(b);
      if (k == ord - 1) begin
        exp_q.push_back(sum);
        due_q.push_back(cycle + 2);
      end
      @(negedge clk);
    end
    in_valid = 1'b0;
    if (ord == 1) n_single++; else n_accum++;
  endtask

  initial begin
    clear = 1'b0; in_valid = 1'b0; a = '0; b = '0; n = NW'(1);
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int ord = 1; ord <= NMAX; ord++) begin
      n = NW'(ord);
      for (int e = 0; e < 20; e++) element(ord, 1'b0);   // back to back
      for (int e = 0; e < 20; e++) element(ord, 1'b1);   // with gaps
      repeat (3) @(negedge clk);
    end
    // All-ones bytes: the largest sum must not overflow.
    n = NW'(NMAX);
    begin
      longint s = 0;
      for (int k = 0; k < NMAX; k++) begin
        in_valid = 1'b1; a = '1; b = '1;
        s += longint'(a) * longint'(b);
        if (k == NMAX - 1) begin exp_q.push_back(s); due_q.push_back(cycle + 2); end
        @(negedge clk);
      end
      in_valid = 1'b0;
      repeat (3) @(negedge clk);
    end
    // Clear in the middle of an element: the partial sum must be dropped.
    if (NMAX > 1) begin
      in_valid = 1'b1; a = 8'd200; b = 8'd200;
      @(negedge clk);
      in_valid = 1'b0; clear = 1'b1;
      @(negedge clk);
      clear = 1'b0;
      @(negedge clk);
      element(NMAX, 1'b0);
      repeat (4) @(negedge clk);
    end
    check(exp_q.size() == 0, "results missing at the end");
    check(n_single > 0 && n_accum > 0, "both single-term and accumulated elements seen");
    check(n_results == 3 * 40 + 2 - (NMAX > 1 ? 0 : 1), $sformatf("result count %0d", n_results));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
