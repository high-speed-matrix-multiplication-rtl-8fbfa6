// Processing element: one multiplier, a product register, one adder with a
// partial-sum register and a down-counter.
//
// Each cycle with `in_valid` high the PE takes one byte of A and one byte of
// B. Stage 1 multiplies them in a single cycle and registers the product.
// Stage 2 adds the product to the partial sum: the counter holds the number of
// products of the current element still to come. When it is zero the
// feedback path is off and the fresh product is loaded into the partial-sum
// register (first term of a new element); otherwise the feedback is on and the
// product is added to the stored partial sum while the counter decrements.
// When the term just added was the N-th one, the output buffer is enabled for
// one cycle (`out_valid`) and the next element starts with feedback off, so
// consecutive elements follow each other with no idle cycle.
//
// Timing: a product entering at cycle t is in the partial sum at t+2; the
// result of an element appears on `out_data` with `out_valid` two cycles after
// its last pair of inputs (multiplier latency 1 + adder latency 1). One pair
// is accepted per clock, so an element of an N x N product takes N cycles.
// `n` (the matrix order, 1..NMAX) must stay constant while an element is in
// flight; `clear` synchronously empties the pipeline and the counter.
//
// The structure (multiplier, register, adder, counter-driven feedback and
// output buffers) follows the architecture; the two-stage pipeline split and
// the unsigned arithmetic are this design's choices.
//
// Lint reports rst_n as used both asynchronously and synchronously: the
// synchronous use is only the `disable iff` of the assertions, as intended.
module mac_pe
  import matmul_pkg::*;
#(
  parameter int unsigned DATA_W = DATA_W_DEF,
  parameter int unsigned NMAX   = NMAX_DEF,
  localparam int unsigned NW    = ord_w(NMAX),
  localparam int unsigned ACC_W = acc_w(DATA_W, NMAX)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  input  logic [NW-1:0]     n,
  input  logic              in_valid,
  input  logic [DATA_W-1:0] a,
  input  logic [DATA_W-1:0] b,
  output logic              out_valid,
  output logic [ACC_W-1:0]  out_data
);

  // Stage 1: multiplier and product register.
  logic [2*DATA_W-1:0] prod_q;
  logic                prod_v;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prod_q <= '0;
      prod_v <= 1'b0;
    end else if (clear) begin
      prod_v <= 1'b0;
    end else begin
      prod_v <= in_valid;
      if (in_valid) prod_q <= a * b;
    end
  end

  // Stage 2: adder, partial-sum register and term counter.
  logic [NW-1:0]    cnt;       // products of this element still to come
  logic [ACC_W-1:0] psum;
  logic             fb_en;     // feedback buffer enable
  logic             last_term; // this product completes the element

  assign fb_en     = (cnt != '0);
  assign last_term = fb_en ? (cnt == NW'(1)) : (n == NW'(1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt       <= '0;
      psum      <= '0;
      out_valid <= 1'b0;
    end else if (clear) begin
      cnt       <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= prod_v && last_term;
      if (prod_v) begin
        psum <= (fb_en ? psum : '0) + ACC_W'(prod_q);
        cnt  <= fb_en ? cnt - NW'(1) : n - NW'(1);
      end
    end
  end

  assign out_data = psum;

  // The order must be legal whenever a product is accumulated.
  a_order_legal: assert property (@(posedge clk) disable iff (!rst_n)
    prod_v |-> (n >= NW'(1) && n <= NW'(NMAX)));

endmodule
