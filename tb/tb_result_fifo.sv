// Self-checking testbench for result_fifo. Drives random pushes and pops
// (never into a full or from an empty FIFO), checks every popped word and the
// empty/full/count flags against a queue model, and makes sure the FIFO was
// seen both full and empty and with simultaneous push and pop.
module tb_result_fifo;
  localparam int unsigned W = 18, DEPTH = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  logic wr_en, rd_en, full, empty;
  logic [W-1:0] din, dout;
  logic [2:0] count;
  logic [W-1:0] q[$];
  int checks = 0, failures = 0;
  int n_full = 0, n_both = 0;

  result_fifo #(.W(W), .DEPTH(DEPTH)) dut (
    .clk, .rst_n, .wr_en, .din, .full, .rd_en, .dout, .empty, .count
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

  initial begin
    wr_en = 1'b0; rd_en = 1'b0; din = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int t = 0; t < 2000; t++) begin
      // Flags against the model.
      check(empty == (q.size() == 0), $sformatf("empty flag, size %0d", q.size()));
      check(full == (q.size() == DEPTH), $sformatf("full flag, size %0d", q.size()));
      check(count == 3'(q.size()), $sformatf("count %0d vs %0d", count, q.size()));
      if (q.size() == DEPTH) n_full++;
      // Bias towards filling in the first half, emptying in the second.
      wr_en = (q.size() < DEPTH) && ($urandom_range(99) < (t < 1000 ? 70 : 30));
      rd_en = (q.size() > 0) && ($urandom_range(99) < (t < 1000 ? 30 : 70));
      din = W'($urandom);
      if (rd_en) begin
        check(dout == q[0], $sformatf("pop data %0h vs %0h", dout, q[0]));
        void'(q.pop_front());
      end
      if (wr_en) q.push_back(din);
      if (wr_en && rd_en) n_both++;
      @(negedge clk);
    end
    check(n_full > 0, "FIFO never became full");
    check(n_both > 0, "never pushed and popped together");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
