// tb_cnu: runs one check-node pass of the CNU over a model of the edge RAM
// (synchronous read, check-major addressing 6*node + slot done by the test
// bench).  The RAM starts with random normalised cost pairs; afterwards every
// word must hold the min-max message that the brute-force rule of
// ldpc_ref_pkg computes from the other five words of its check.  The pass
// must take 208 cycles per check.
module tb_cnu;
  import ldpc_pkg::*;
  import ldpc_ref_pkg::*;

  localparam int Z  = ZDEF;
  localparam int M  = 3 * Z;
  localparam int E  = 18 * Z;
  localparam int AW = $clog2(E);
  localparam int NW = $clog2(6 * Z);

  logic clk = 0, rst = 1, start = 0, done;
  logic [NW-1:0] node;
  logic [2:0] slot;
  logic [AW-1:0] addr, ram_raddr, ram_waddr;
  cost_pair_t ram_rdata, ram_wdata;
  logic ram_we;

  cost_pair_t mem [E];
  pair_t expv [E];
  int checks = 0, failures = 0;

  cnu dut (.*);

  always #5 clk = ~clk;
  assign addr = AW'(6 * int'(node) + int'(slot));
  always @(posedge clk) begin
    ram_rdata <= mem[ram_raddr];
    if (ram_we) mem[ram_waddr] <= ram_wdata;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int pass = 0; pass < 2; pass++) begin
      int cyc;
      foreach (mem[e]) begin
        int v;
        v = (pass == 1 && $urandom_range(9) == 0) ? $urandom_range(4095) : $urandom_range(120);
        mem[e].c0 = '0; mem[e].c1 = '0;
        if ($urandom_range(1)) mem[e].c0 = W'(v); else mem[e].c1 = W'(v);
      end
      for (int m = 0; m < M; m++)
        for (int k = 0; k < 6; k++) begin
          pair_t o [5];
          for (int j = 1; j <= 5; j++) begin
            o[j-1].c0 = mem[6*m + (k+j)%6].c0;
            o[j-1].c1 = mem[6*m + (k+j)%6].c1;
          end
          expv[6*m + k] = check_rule(o);
        end
      rst <= 1;
      repeat (2) @(posedge clk);
      rst <= 0;
      start <= 1; @(posedge clk); start <= 0;
      cyc = 1;
      while (!done) begin @(posedge clk); cyc++; end
      checks++;
      if (cyc != 208 * M + 2) begin failures++; $display("FAIL pass took %0d cycles, expected %0d", cyc, 208 * M + 2); end
      @(posedge clk);
      foreach (mem[e]) begin
        checks++;
        if (int'(mem[e].c0) != expv[e].c0 || int'(mem[e].c1) != expv[e].c1) begin
          failures++;
          if (failures < 10) $display("FAIL edge %0d got %0d/%0d exp %0d/%0d", e, mem[e].c0, mem[e].c1, expv[e].c0, expv[e].c1);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
