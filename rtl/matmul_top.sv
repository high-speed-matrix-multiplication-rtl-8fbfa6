// Matrix multiplier, C = A x B, for square matrices of any order N from 1 to
// NMAX, built from P processing elements that work in isolation (P = 1 by
// default: a single processing element).
//
// Datapath: each element p owns a local MEM1 holding the rows r of A with
// r mod P = p, a PE (multiplier, register, adder and counter), a result FIFO
// and a local MEM3 holding the same rows of C. MEM2 holds matrix B and is
// broadcast to every element. Each clock every element gets one byte of A
// from its own MEM1 and the shared byte of B over dedicated routes, so no
// element ever needs data from another. The control unit generates the read
// addresses (row of A against column j of B) and the MEM3 write addresses,
// and measures latency and total computation time.
//
// Use: while `busy` is low the host owns the memories. It loads A and B by
// raising `load_we` with `addr1`/`din1` (A) and `addr2`/`din2` (B); element
// [r][c] has the host address r*NMAX+c, which the top maps to element
// r mod P, local address (r div P)*NMAX+c. A one-cycle `start` with the
// order on `n` begins a run; `busy` stays high until `done` pulses. Then the
// host reads C by placing r*NMAX+c on `addr3`: `dout3` shows the element one
// cycle later. The MEM3 memories are single-ported: while the control unit
// writes results the host's `addr3` is ignored for that cycle.
//
// Timing: ceil(N/P)*N*N clock cycles of streaming plus a 4-cycle pipeline
// tail (memory read, multiplier, adder, FIFO): a total computation time of
// ceil(N/P)*N^2+4 cycles (N^3+4 with one element) and a latency to the
// first element of C of N+3 cycles.
//
// Beside it, on its own `op_` ports, sits the multiplier-array arrangement
// (outer_product_array): an NMAX x NMAX grid of multiply-accumulate cells
// that takes one column of A and one row of B per clock and finishes C in N
// cycles. The two engines share only clock and reset.
//
// The block structure (MEM1, MEM2, PE with counter, FIFO, MEM3, multiplier
// array), the single PE of the default build and the option of distributing
// rows of A over several elements with B shared follow the architecture; the
// host interface, address layout, interleaved row assignment and FIFO depth
// are this design's choices.
//
// Lint reports rst_n as used both asynchronously and synchronously: the
// synchronous use is only the `disable iff` of the assertions, as intended.
module matmul_top
  import matmul_pkg::*;
#(
  parameter int unsigned DATA_W     = DATA_W_DEF,
  parameter int unsigned NMAX       = NMAX_DEF,
  parameter int unsigned P          = PE_DEF,
  parameter int unsigned FIFO_DEPTH = FIFO_DEF,
  localparam int unsigned NW        = ord_w(NMAX),
  localparam int unsigned AW        = addr_w(NMAX),
  localparam int unsigned LAW       = laddr_w(NMAX, P),
  localparam int unsigned QMAX      = lane_rows(NMAX, P),
  localparam int unsigned ACC_W     = acc_w(DATA_W, NMAX)
) (
  input  logic              clk,
  input  logic              rst_n,
  // Host load port for A (MEM1) and B (MEM2).
  input  logic              load_we,
  input  logic [AW-1:0]     addr1,
  input  logic [DATA_W-1:0] din1,
  input  logic [AW-1:0]     addr2,
  input  logic [DATA_W-1:0] din2,
  // Run control.
  input  logic              start,
  input  logic [NW-1:0]     n,
  output logic              busy,
  output logic              done,
  // Host read port for C (MEM3).
  input  logic [AW-1:0]     addr3,
  output logic [ACC_W-1:0]  dout3,
  // Measured figures of the last run, in clock cycles.
  output logic [31:0]       latency_cycles,
  output logic [31:0]       total_cycles,
  // Multiplier-array engine (outer-product order), fed directly by the host.
  input  logic              op_start,
  input  logic [NW-1:0]     op_n,
  input  logic              op_valid,
  input  logic [DATA_W-1:0] op_a_col [NMAX],
  input  logic [DATA_W-1:0] op_b_row [NMAX],
  output logic              op_done,
  output logic [ACC_W-1:0]  op_c [NMAX][NMAX]
);

  // Host address r*NMAX+c -> element r mod P, local address (r div P)*NMAX+c.
  typedef struct packed {
    logic [$clog2(P > 1 ? P : 2)-1:0] lane;
    logic [LAW-1:0]                   local_addr;
  } lane_addr_t;

  function automatic lane_addr_t split(input logic [AW-1:0] a);
    int unsigned r, c;
    lane_addr_t  x;
    r = int'(a) / NMAX;
    c = int'(a) % NMAX;
    x.lane       = ($bits(x.lane))'(r % P);
    x.local_addr = LAW'((r / P) * NMAX + c);
    return x;
  endfunction

  logic [NW-1:0]     n_run;
  logic              pe_clear, rd_en, fifo_rd, c_we;
  logic [P-1:0]      pe_valid;
  logic [LAW-1:0]    ctl_addr_a, ctl_addr_c;
  logic [AW-1:0]     ctl_addr_b;
  logic [DATA_W-1:0] b_q;
  logic              mem_we;
  lane_addr_t        host1, host3;
  logic [$bits(host3.lane)-1:0] lane3_q;

  logic [DATA_W-1:0] a_q       [P];
  logic              pe_out_valid [P];
  logic [ACC_W-1:0]  pe_out    [P];
  logic              fifo_full [P];
  logic              fifo_empty [P];
  logic [ACC_W-1:0]  fifo_dout [P];
  logic [ACC_W-1:0]  c_q       [P];

  assign mem_we = load_we && !busy;
  assign host1  = split(addr1);
  assign host3  = split(addr3);

  // MEM3 read data comes one cycle after the address: select with the
  // element index of the previous cycle.
  always_ff @(posedge clk) lane3_q <= host3.lane;
  assign dout3 = c_q[lane3_q];

  // MEM2: matrix B, shared by every element.
  matrix_mem #(.W(DATA_W), .DEPTH(NMAX*NMAX)) u_mem2 (
    .clk, .we(mem_we), .addr(busy ? ctl_addr_b : addr2), .din(din2), .dout(b_q)
  );

  matmul_ctrl #(.NMAX(NMAX), .P(P)) u_ctrl (
    .clk, .rst_n, .start, .n_in(n), .busy, .done, .n(n_run), .pe_clear,
    .rd_en, .addr_a(ctl_addr_a), .addr_b(ctl_addr_b), .pe_valid,
    .fifo_empty(fifo_empty[0]), .fifo_rd, .c_we, .addr_c(ctl_addr_c),
    .latency_cycles, .total_cycles
  );

  for (genvar p = 0; p < P; p++) begin : g_pe
    logic lane_rd;

    // Local MEM1: rows r of A with r mod P = p.
    matrix_mem #(.W(DATA_W), .DEPTH(QMAX*NMAX)) u_mem1 (
      .clk, .we(mem_we && host1.lane == ($bits(host1.lane))'(p)),
      .addr(busy ? ctl_addr_a : host1.local_addr), .din(din1), .dout(a_q[p])
    );

    mac_pe #(.DATA_W(DATA_W), .NMAX(NMAX)) u_pe (
      .clk, .rst_n, .clear(pe_clear), .n(n_run), .in_valid(pe_valid[p]),
      .a(a_q[p]), .b(b_q), .out_valid(pe_out_valid[p]), .out_data(pe_out[p])
    );

    assign lane_rd = fifo_rd && !fifo_empty[p];

    result_fifo #(.W(ACC_W), .DEPTH(FIFO_DEPTH)) u_fifo (
      .clk, .rst_n, .wr_en(pe_out_valid[p]), .din(pe_out[p]), .full(fifo_full[p]),
      .rd_en(lane_rd), .dout(fifo_dout[p]), .empty(fifo_empty[p]), .count()
    );

    // Local MEM3: the same rows of C.
    matrix_mem #(.W(ACC_W), .DEPTH(QMAX*NMAX)) u_mem3 (
      .clk, .we(lane_rd), .addr(c_we ? ctl_addr_c : host3.local_addr),
      .din(fifo_dout[p]), .dout(c_q[p])
    );

    // The PE never pushes into a full FIFO (MEM3 drains it every cycle), and
    // results of all elements arrive together, so element 0 paces the writes.
    a_fifo_room: assert property (@(posedge clk) disable iff (!rst_n)
      pe_out_valid[p] |-> !fifo_full[p]);
    a_lanes_in_step: assert property (@(posedge clk) disable iff (!rst_n)
      !fifo_empty[p] |-> !fifo_empty[0]);
  end

  // The host cannot write A or B while the control unit reads them.
  a_no_load_during_read: assert property (@(posedge clk) disable iff (!rst_n) rd_en |-> !mem_we);

  // The multiplier-array arrangement stands beside the PE path: it needs a
  // whole column of A and a whole row of B per cycle, which the byte-wide
  // memories cannot supply, so its operands come from the ports.
  outer_product_array #(.DATA_W(DATA_W), .NMAX(NMAX)) u_array (
    .clk, .rst_n, .start(op_start), .n(op_n), .in_valid(op_valid),
    .a_col(op_a_col), .b_row(op_b_row), .done(op_done), .c(op_c)
  );

endmodule
