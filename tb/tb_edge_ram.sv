// tb_edge_ram: checks the edge message RAM against an array model: random
// writes and reads, read data one cycle after the address, and old data
// returned when a word is read and written in the same cycle.
module tb_edge_ram;
  import ldpc_pkg::*;

  localparam int DEPTH = 18 * ZDEF;
  localparam int AW    = $clog2(DEPTH);

  logic clk = 0;
  logic we = 0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  cost_pair_t wdata = '0, rdata;

  int checks = 0, failures = 0;
  cost_pair_t model [DEPTH];

  edge_ram dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill every word
    for (int a = 0; a < DEPTH; a++) begin
      we <= 1; waddr <= AW'(a); wdata <= cost_pair_t'($urandom);
      @(posedge clk);
      model[a] = wdata;
    end
    we <= 0;
    for (int t = 0; t < 3000; t++) begin
      cost_pair_t expv;
      int ra;
      ra = $urandom_range(DEPTH - 1);
      raddr <= AW'(ra);
      we    <= ($urandom_range(1) == 1);
      waddr <= ($urandom_range(3) == 0) ? AW'(ra) : AW'($urandom_range(DEPTH - 1));
      wdata <= cost_pair_t'($urandom);
      @(posedge clk);
      expv = model[ra];
      if (we) model[waddr] = wdata;
      #1;
      checks++;
      if (rdata != expv) begin
        failures++;
        $display("FAIL addr %0d got %h exp %h", ra, rdata, expv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
