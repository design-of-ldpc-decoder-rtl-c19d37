// addr_rom: the ROM that holds the Tanner-graph connections for the
// variable-node pass.
//
// Entry 3*n + i holds the edge-RAM address of the i-th edge of variable n:
//     6 * var_check(n, i) + (n / Z)
// (the edge sits in block row i, and within its check in slot n / Z, the block
// column of the variable).  The table is filled at initialisation from the
// quasi-cyclic construction in ldpc_pkg; in an FPGA it becomes ROM contents.
// Read is combinational (a small distributed ROM).
module addr_rom
  import ldpc_pkg::*;
#(
  parameter int Z     = ZDEF,
  parameter int DEPTH = 18 * Z,
  parameter int AW    = $clog2(DEPTH)
) (
  input  logic [AW-1:0] addr,
  output logic [AW-1:0] data
);

  logic [AW-1:0] rom [DEPTH];

  initial begin
    for (int n = 0; n < 6 * Z; n++)
      for (int i = 0; i < DV; i++)
        rom[DV * n + i] = AW'(DC * var_check(n, i, Z) + n / Z);
  end

  assign data = rom[addr];

endmodule
