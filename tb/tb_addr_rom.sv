// tb_addr_rom: checks every ROM entry against connections found by scanning
// the parity-check matrix built independently in ldpc_ref_pkg: entry 3n+i
// must address the edge of the i-th check of variable n (checks in
// increasing order), stored check-major as 6*check + slot.
module tb_addr_rom;
  import ldpc_pkg::*;
  import ldpc_ref_pkg::*;

  localparam int Z     = ZDEF;
  localparam int DEPTH = 18 * Z;
  localparam int AW    = $clog2(DEPTH);

  logic [AW-1:0] addr = '0, data;
  int checks = 0, failures = 0;

  addr_rom dut (.*);

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    build(Z);
    for (int n = 0; n < Nr; n++)
      for (int i = 0; i < 3; i++) begin
        addr = AW'(3 * n + i);
        #1;
        checks++;
        if (int'(data) != 6 * var_chk[n][i] + var_slot[n][i]) begin
          failures++;
          $display("FAIL n=%0d i=%0d got %0d exp %0d", n, i, data, 6 * var_chk[n][i] + var_slot[n][i]);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
