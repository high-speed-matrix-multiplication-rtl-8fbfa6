// Result FIFO between the processing element and MEM3.
//
// A synchronous first-word-fall-through FIFO: `dout` always shows the oldest
// entry while `empty` is low, and `rd_en` pops it at the next clock edge.
// `wr_en` pushes `din`. Writing while full or reading while empty is a
// protocol error and is flagged by assertions; such a request is ignored.
// The FIFO decouples the PE's result stream from the writes into MEM3; its
// depth is this design's choice (the PE delivers at most one result per N
// cycles and MEM3 accepts one per cycle, so a few entries are enough).
//
// Lint reports rst_n as used both asynchronously and synchronously: the
// synchronous use is only the `disable iff` of the assertions, as intended.
module result_fifo #(
  parameter int unsigned W     = 18,
  parameter int unsigned DEPTH = 4,
  localparam int unsigned PW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         wr_en,
  input  logic [W-1:0] din,
  output logic         full,
  input  logic         rd_en,
  output logic [W-1:0] dout,
  output logic         empty,
  output logic [PW:0]  count
);

  logic [W-1:0]  mem [DEPTH];
  logic [PW-1:0] wr_ptr, rd_ptr;
  logic          do_wr, do_rd;

  assign full  = (count == (PW+1)'(DEPTH));
  assign empty = (count == '0);
  assign do_wr = wr_en && !full;
  assign do_rd = rd_en && !empty;
  assign dout  = mem[rd_ptr];

  function automatic logic [PW-1:0] next_ptr(input logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + PW'(1);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_wr) wr_ptr <= next_ptr(wr_ptr);
      if (do_rd) rd_ptr <= next_ptr(rd_ptr);
      count <= count + (PW+1)'(do_wr) - (PW+1)'(do_rd);
    end
  end

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr] <= din;
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(wr_en && full));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(rd_en && empty));

endmodule
