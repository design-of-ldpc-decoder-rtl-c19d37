// tb_input_cache: loads two codewords of random LLRs (including -128, 0 and
// 127) with random gaps and checks: llr_ready drops and full rises after
// exactly N beats, extra beats are refused, each stored cost pair is the
// LLR's magnitude on the unlikely bit value, read data follows the address
// by one cycle, and release makes room for the next codeword.
module tb_input_cache;
  import ldpc_pkg::*;

  localparam int N  = 6 * ZDEF;
  localparam int NW = $clog2(N);

  logic clk = 0, rst = 1;
  logic signed [QW-1:0] llr_in = '0;
  logic llr_valid = 0, llr_ready, full, release_i = 0;
  logic [NW-1:0] raddr = '0;
  cost_pair_t rdata;

  int checks = 0, failures = 0;
  int vals [N];

  input_cache dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int frame = 0; frame < 2; frame++) begin
      int n;
      foreach (vals[k]) begin
        case ($urandom_range(7))
          0: vals[k] = -128;
          1: vals[k] = 127;
          2: vals[k] = 0;
          default: vals[k] = int'($urandom_range(255)) - 128;
        endcase
      end
      n = 0;
      while (n < N) begin
        check(llr_ready && !full, "ready while filling");
        llr_valid <= ($urandom_range(2) != 0);
        llr_in    <= QW'(vals[n]);
        @(posedge clk);
        if (llr_valid) n++;
      end
      llr_valid <= 1; llr_in <= 8'sd5;
      @(posedge clk);
      check(full && !llr_ready, "full after N beats");
      @(posedge clk);
      llr_valid <= 0;
      for (int k = 0; k < N; k++) begin
        int c0, c1;
        raddr <= NW'(k);
        @(posedge clk);
        #1;
        c0 = vals[k] < 0 ? -vals[k] : 0;
        c1 = vals[k] < 0 ? 0 : vals[k];
        check(int'(rdata.c0) == c0 && int'(rdata.c1) == c1,
              $sformatf("entry %0d llr %0d got %0d/%0d", k, vals[k], rdata.c0, rdata.c1));
      end
      check(full, "stays full until released");
      release_i <= 1; @(posedge clk); release_i <= 0;
      @(posedge clk);
      check(!full && llr_ready, "released");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
