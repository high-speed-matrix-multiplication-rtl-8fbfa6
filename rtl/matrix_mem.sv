// Single-port block RAM used for MEM1 (matrix A), MEM2 (matrix B) and
// MEM3 (result matrix C).
//
// On each rising clock edge the memory either writes `din` at `addr` (when
// `we` is high) or reads `addr` into the registered output `dout` (when `we`
// is low); `dout` holds its value during a write. The read therefore has one
// cycle of latency. This write-or-read behaviour is the one the reference
// memory process for this architecture describes; width and depth are
// parameters (depth defaults to NMAX*NMAX words, one per matrix element,
// stored row-major with a row stride of NMAX).
module matrix_mem #(
  parameter int unsigned W     = 8,
  parameter int unsigned DEPTH = 9,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [W-1:0]  din,
  output logic [W-1:0]  dout
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= din;
    else    dout      <= mem[addr];
  end

endmodule
