// Shared constants and types of the single-PE matrix multiplier.
//
// Matrix elements are one unsigned byte each; the largest matrix order the
// default build handles is 3 (the 3x3 case used as the worked example for this
// architecture), with one processing element. With p elements, row r of A
// and C lives in the local memory of element r mod p. Products are 16 bits and a sum of NMAX of them needs
// $clog2(NMAX) extra bits, so accumulators never overflow.
package matmul_pkg;

  localparam int unsigned DATA_W_DEF = 8;  // one byte per element
  localparam int unsigned NMAX_DEF   = 3;  // largest supported order
  localparam int unsigned FIFO_DEF   = 4;  // result FIFO depth (own choice)
  localparam int unsigned PE_DEF     = 1;  // processing elements (one)

  // Width of an address into an NMAX x NMAX matrix (at least one bit).
  function automatic int unsigned addr_w(input int unsigned nmax);
    return (nmax * nmax > 1) ? $clog2(nmax * nmax) : 1;
  endfunction

  // Width needed for the matrix order itself, 1..nmax.
  function automatic int unsigned ord_w(input int unsigned nmax);
    return $clog2(nmax + 1);
  endfunction

  // Rows of A (and of C) held by one of p processing elements when row r
  // goes to element r mod p: ceil(nmax / p).
  function automatic int unsigned lane_rows(input int unsigned nmax, input int unsigned p);
    return (nmax + p - 1) / p;
  endfunction

  // Width of an address into one element's local memory of lane_rows x nmax.
  function automatic int unsigned laddr_w(input int unsigned nmax, input int unsigned p);
    return (lane_rows(nmax, p) * nmax > 1) ? $clog2(lane_rows(nmax, p) * nmax) : 1;
  endfunction

  // Accumulator width: full product plus carry room for nmax terms.
  function automatic int unsigned acc_w(input int unsigned data_w, input int unsigned nmax);
    return 2 * data_w + ((nmax > 1) ? $clog2(nmax) : 0);
  endfunction

  typedef enum logic [1:0] {
    CTRL_IDLE,   // waiting for start; host owns MEM1/MEM2/MEM3
    CTRL_RUN,    // streaming A row / B column pairs into the PE
    CTRL_DRAIN,  // all pairs issued, waiting for the last results
    CTRL_DONE    // one-cycle completion pulse
  } ctrl_state_e;

endpackage
