// tb_addr_ctrl: checks the address control with a table of random ROM
// contents standing in for the ROM: in the check pass the address is
// 6*node + slot, in the variable pass the ROM word at 3*node + slot.
module tb_addr_ctrl;
  import ldpc_pkg::*;

  localparam int Z  = ZDEF;
  localparam int AW = $clog2(18 * Z);
  localparam int NW = $clog2(6 * Z);

  logic var_phase = 0;
  logic [NW-1:0] node = '0;
  logic [2:0] slot = '0;
  logic [AW-1:0] rom_addr, rom_data, ram_addr;
  logic [AW-1:0] table_q [18 * Z];
  int checks = 0, failures = 0;

  addr_ctrl dut (.*);

  assign rom_data = table_q[rom_addr];

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (table_q[k]) table_q[k] = AW'($urandom_range(18 * Z - 1));
    for (int t = 0; t < 2000; t++) begin
      int nd, sl, expv;
      var_phase = 1'($urandom);
      if (var_phase) begin nd = $urandom_range(6 * Z - 1); sl = $urandom_range(2); end
      else           begin nd = $urandom_range(3 * Z - 1); sl = $urandom_range(5); end
      node = NW'(nd); slot = 3'(sl);
      #1;
      expv = var_phase ? int'(table_q[3 * nd + sl]) : 6 * nd + sl;
      checks++;
      if (int'(ram_addr) != expv) begin
        failures++;
        $display("FAIL phase %0d node %0d slot %0d: %0d exp %0d", var_phase, nd, sl, ram_addr, expv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
