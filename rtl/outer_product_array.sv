// Matrix arrangement of multiplier units: an NMAX x NMAX array of
// multiply-accumulate cells that forms C = A x B by outer products.
//
// Each cycle with `in_valid` high the array takes one whole column k of A
// (`a_col[i]` = A[i][k]) and one whole row k of B (`b_row[j]` = B[k][j]) and
// cell (i,j) adds A[i][k]*B[k][j] to its element of C. Every element of A
// and B is therefore read exactly once, and one partial product of every
// element of C is formed per clock. After n such cycles C is complete.
//
// Interface: `start` (with the order on `n`, 1..NMAX) clears all cells and
// starts a product; then n column/row pairs follow on `in_valid`, in any
// rhythm. `done` pulses in the cycle after the n-th pair has been added, and
// `c` holds the result until the next `start`. Cells outside the n x n
// corner accumulate too (the caller drives zeros there or ignores them).
// Inputs are registered for one cycle before the multipliers (one-cycle
// multiply, one-cycle add), so `done` follows the n-th pair by two cycles.
//
// The read order (column of A with row of B, one partial product of every C
// element per cycle) follows the architecture's data re-use scheme; the
// start/done handshake, the input register and unsigned arithmetic are this
// design's choices.
module outer_product_array
  import matmul_pkg::*;
#(
  parameter int unsigned DATA_W = DATA_W_DEF,
  parameter int unsigned NMAX   = NMAX_DEF,
  localparam int unsigned NW    = ord_w(NMAX),
  localparam int unsigned ACC_W = acc_w(DATA_W, NMAX)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [NW-1:0]     n,
  input  logic              in_valid,
  input  logic [DATA_W-1:0] a_col [NMAX],
  input  logic [DATA_W-1:0] b_row [NMAX],
  output logic              done,
  output logic [ACC_W-1:0]  c [NMAX][NMAX]
);

  logic [DATA_W-1:0] a_q [NMAX];
  logic [DATA_W-1:0] b_q [NMAX];
  logic              v_q;
  logic [NW-1:0]     remaining;   // column/row pairs still to be added

  // Input register: one column of A and one row of B.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_q <= 1'b0;
      for (int i = 0; i < NMAX; i++) begin
        a_q[i] <= '0;
        b_q[i] <= '0;
      end
    end else begin
      v_q <= in_valid && !start;
      if (in_valid) begin
        a_q <= a_col;
        b_q <= b_row;
      end
    end
  end

  // Pair counter and completion pulse.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      remaining <= '0;
      done      <= 1'b0;
    end else if (start) begin
      remaining <= n;
      done      <= 1'b0;
    end else begin
      done <= v_q && (remaining == NW'(1));
      if (v_q && remaining != '0) remaining <= remaining - NW'(1);
    end
  end

  // The multiplier array: cell (i,j) multiplies a_q[i] by b_q[j] and adds.
  for (genvar i = 0; i < NMAX; i++) begin : g_row
    for (genvar j = 0; j < NMAX; j++) begin : g_col
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n)                         c[i][j] <= '0;
        else if (start)                     c[i][j] <= '0;
        else if (v_q && remaining != '0)    c[i][j] <= c[i][j] + ACC_W'(a_q[i]) * ACC_W'(b_q[j]);
      end
    end
  end

endmodule
