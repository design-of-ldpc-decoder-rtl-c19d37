// addr_ctrl: address control between the node units and the edge RAM.
//
// A node unit names an edge by its node index and the edge's slot at that
// node; this block turns that into an edge-RAM address.
//   check pass    (var_phase = 0): address = 6 * node + slot, since the RAM is
//                                  stored check-major;
//   variable pass (var_phase = 1): address = ROM[3 * node + slot], looked up
//                                  in addr_rom through rom_addr / rom_data.
// Purely combinational; the units keep the addresses they read from so that
// the write-back goes to the same words.
module addr_ctrl
  import ldpc_pkg::*;
#(
  parameter int Z  = ZDEF,
  parameter int AW = $clog2(18 * Z),
  parameter int NW = $clog2(6 * Z)
) (
  input  logic           var_phase,
  input  logic [NW-1:0]  node,
  input  logic [2:0]     slot,
  output logic [AW-1:0]  rom_addr,
  input  logic [AW-1:0]  rom_data,
  output logic [AW-1:0]  ram_addr
);

  always_comb begin
    rom_addr = AW'(DV * int'(node) + int'(slot));
    if (var_phase) ram_addr = rom_data;
    else           ram_addr = AW'(DC * int'(node) + int'(slot));
  end

endmodule
