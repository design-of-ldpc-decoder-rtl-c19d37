// edge_ram: the message memory through which check and variable nodes
// exchange information.
//
// One word per Tanner-graph edge (3 * 6Z = 18Z edges, 306 for Z = 17), each a
// 24-bit cost pair.  Edges are stored check-major: the edge of check m in block
// column k lives at address 6*m + k.  Each word holds the variable-to-check
// message until the CNU overwrites it with the check-to-variable message, and
// the VNU overwrites that in turn, so one word per edge is enough.
// Simple dual port: a synchronous read (data one cycle after raddr) and a
// synchronous write.  A read and a write of the same address in one cycle
// return the old word.  The memory is not reset; the decoder writes every
// word during initialisation before any is read.
module edge_ram
  import ldpc_pkg::*;
#(
  parameter int Z     = ZDEF,
  parameter int DEPTH = 18 * Z,
  parameter int AW    = $clog2(DEPTH)
) (
  input  logic           clk,
  input  logic           we,
  input  logic [AW-1:0]  waddr,
  input  cost_pair_t     wdata,
  input  logic [AW-1:0]  raddr,
  output cost_pair_t     rdata
);

  cost_pair_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
