// Self-checking testbench for matrix_mem (MEM1/MEM2/MEM3 block RAM).
// Fills every word with random data, reads all of them back in random order
// and checks the one-cycle read latency, that a write leaves `dout`
// unchanged, and that data survives later writes to other addresses.
module tb_matrix_mem;
  localparam int unsigned W = 8, DEPTH = 9, AW = 4;

  logic clk = 1'b0;
  logic we;
  logic [AW-1:0] addr;
  logic [W-1:0] din, dout;
  logic [W-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  matrix_mem #(.W(W), .DEPTH(DEPTH)) dut (.clk, .we, .addr, .din, .dout);

  always #5 clk = ~clk;

  task automatic check(input logic [W-1:0] got, input logic [W-1:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] held;
    we = 1'b0; addr = '0; din = '0;
    @(negedge clk);
    // Fill.
    for (int a = 0; a < DEPTH; a++) begin
      we = 1'b1; addr = AW'(a); din = W'($urandom); model[a] = din;
      @(negedge clk);
    end
    // Read every word twice in random order.
    for (int r = 0; r < 4 * DEPTH; r++) begin
      int a = $urandom_range(DEPTH - 1);
      we = 1'b0; addr = AW'(a);
      @(negedge clk);
      check(dout, model[a], $sformatf("read addr %0d", a));
      // A write leaves the output register alone and updates the array.
      if (r % 3 == 0) begin
        int b = $urandom_range(DEPTH - 1);
        held = dout;
        we = 1'b1; addr = AW'(b); din = W'($urandom); model[b] = din;
        @(negedge clk);
        check(dout, held, "dout held during write");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
