// Control unit of the matrix multiplier.
//
// On `start` (accepted only in IDLE and only for an order 1 <= n_in <= NMAX)
// it latches the order N and streams the dot products of C = A x B through
// the P processing elements. Row r of A and of C belongs to element r mod P
// and sits at local row r div P of that element's memories; B is shared by
// all elements. For every local row ii, every column j and every k (k
// innermost) it presents, one pair per clock, the local address ii*NMAX+k of
// A[ii*P+p][k] to every element's MEM1 and the address k*NMAX+j of B[k][j]
// to the shared MEM2. That is ceil(N/P)*N*N read cycles. With P = 1 this is
// simply row i of A against column j of B for every C[i][j].
// `rd_en` marks a cycle in which the addresses are valid. Because the
// memories have a one-cycle read latency, `pe_valid[p]` is `rd_en` delayed by
// one cycle, and it is high only for elements whose row ii*P+p is below N.
//
// In parallel it empties the result FIFOs into the MEM3 memories. All active
// elements finish their results in the same cycle, and element 0 is always
// active, so whenever FIFO 0 is not empty it pops one entry from every
// non-empty FIFO (`fifo_rd`) and writes each to its element's MEM3 at local
// address wi*NMAX+wj. After the last local row is written it pulses `done` for
// one cycle and returns to IDLE. It also measures the latency (cycles from the
// first read to the first write of C) and the total computation time (first
// read to last write of C, inclusive), the two figures the architecture is
// judged by.
//
// When NMAX+1 is a power of two the upper range test on `n_in` is always
// true and lint reports it as constant; it is kept for other NMAX values.
//
// The read order (row of A against column of B in each element) and the
// distribution of rows of A over elements with B shared by all follow the
// architecture; the interleaved row assignment, the address layout, the
// start/done handshake and the cycle counters are this design's choices.
module matmul_ctrl
  import matmul_pkg::*;
#(
  parameter int unsigned NMAX = NMAX_DEF,
  parameter int unsigned P    = PE_DEF,
  localparam int unsigned NW  = ord_w(NMAX),
  localparam int unsigned AW  = addr_w(NMAX),
  localparam int unsigned LAW = laddr_w(NMAX, P),
  localparam int unsigned CW  = 32
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [NW-1:0]  n_in,
  output logic           busy,
  output logic           done,
  output logic [NW-1:0]  n,         // latched order, to the PEs
  output logic           pe_clear,  // empties the PEs at the start of a run
  // Read side: local MEM1 address, shared MEM2 address, PE input strobes.
  output logic           rd_en,
  output logic [LAW-1:0] addr_a,
  output logic [AW-1:0]  addr_b,
  output logic [P-1:0]   pe_valid,
  // Write side: result FIFOs to the MEM3 memories.
  input  logic           fifo_empty,  // FIFO of element 0
  output logic           fifo_rd,
  output logic           c_we,
  output logic [LAW-1:0] addr_c,
  // Measured figures of the last run, in clock cycles.
  output logic [CW-1:0]  latency_cycles,
  output logic [CW-1:0]  total_cycles
);

  ctrl_state_e   state;
  logic [NW-1:0] qn;          // local rows in use: ceil(N/P)
  logic [NW-1:0] ii, j, k;    // read indices: C[ii*P+p][j] += A[..][k]*B[k][j]
  logic [NW-1:0] wi, wj;      // write indices (local row, column)
  logic [CW-1:0] cyc;         // cycles since the first read
  logic          first_wr;    // no element of C written yet
  logic          last_rd, last_wr;
  logic [P-1:0]  row_live;    // element p's row ii*P+p exists

  always_comb begin
    for (int p = 0; p < P; p++)
      row_live[p] = (int'(ii) * int'(P) + p) < int'(n);
  end

  assign busy     = (state == CTRL_RUN) || (state == CTRL_DRAIN);
  assign done     = (state == CTRL_DONE);
  assign rd_en    = (state == CTRL_RUN);
  assign addr_a   = LAW'(ii) * LAW'(NMAX) + LAW'(k);
  assign addr_b   = AW'(k) * AW'(NMAX) + AW'(j);
  assign addr_c   = LAW'(wi) * LAW'(NMAX) + LAW'(wj);
  assign fifo_rd  = busy && !fifo_empty;
  assign c_we     = fifo_rd;
  assign pe_clear = (state == CTRL_IDLE) && start;
  assign last_rd  = (ii == qn - NW'(1)) && (j == n - NW'(1)) && (k == n - NW'(1));
  assign last_wr  = (wi == qn - NW'(1)) && (wj == n - NW'(1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state          <= CTRL_IDLE;
      n              <= NW'(1);
      qn             <= NW'(1);
      {ii, j, k}     <= '0;
      {wi, wj}       <= '0;
      pe_valid       <= '0;
      cyc            <= '0;
      first_wr       <= 1'b1;
      latency_cycles <= '0;
      total_cycles   <= '0;
    end else begin
      pe_valid <= rd_en ? row_live : '0;
      if (busy) cyc <= cyc + CW'(1);

      unique case (state)
        CTRL_IDLE: begin
          if (start && n_in != '0 && n_in <= NW'(NMAX)) begin
            state      <= CTRL_RUN;
            n          <= n_in;
            qn         <= NW'((int'(n_in) + int'(P) - 1) / int'(P));
            {ii, j, k} <= '0;
            {wi, wj}   <= '0;
            cyc        <= '0;
            first_wr   <= 1'b1;
          end
        end
        CTRL_RUN: begin
          // k is the innermost index: one element of C per N cycles in each PE.
          if (k != n - NW'(1)) begin
            k <= k + NW'(1);
          end else begin
            k <= '0;
            if (j != n - NW'(1)) begin
              j <= j + NW'(1);
            end else begin
              j  <= '0;
              ii <= ii + NW'(1);
            end
          end
          if (last_rd) state <= CTRL_DRAIN;
        end
        CTRL_DRAIN: ;
        CTRL_DONE: state <= CTRL_IDLE;
        default:   state <= CTRL_IDLE;
      endcase

      if (c_we) begin
        first_wr <= 1'b0;
        if (first_wr) latency_cycles <= cyc;
        if (wj != n - NW'(1)) begin
          wj <= wj + NW'(1);
        end else begin
          wj <= '0;
          wi <= wi + NW'(1);
        end
        if (last_wr) begin
          state        <= CTRL_DONE;
          total_cycles <= cyc + CW'(1);
        end
      end
    end
  end

endmodule
