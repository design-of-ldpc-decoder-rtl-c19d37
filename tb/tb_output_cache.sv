// tb_output_cache: writes N random cost pairs in random order, starts the
// read-out and takes the stream with random back-pressure.  The pairs must
// leave in variable order, each exactly once, with soft_last on the last and
// busy dropping after it; a second start replays the same contents.
module tb_output_cache;
  import ldpc_pkg::*;

  localparam int N  = 6 * ZDEF;
  localparam int NW = $clog2(N);

  logic clk = 0, rst = 1, we = 0, start = 0, busy;
  logic [NW-1:0] waddr = '0;
  cost_pair_t wdata = '0, soft_data;
  logic soft_valid, soft_last, soft_ready = 0;

  int checks = 0, failures = 0;
  cost_pair_t model [N];

  output_cache dut (.*);

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
    int order [N];
    repeat (2) @(posedge clk);
    rst <= 0;
    foreach (order[k]) order[k] = k;
    order.shuffle();
    foreach (order[k]) begin
      we <= 1; waddr <= NW'(order[k]); wdata <= cost_pair_t'($urandom);
      @(posedge clk);
      model[order[k]] = wdata;
    end
    we <= 0;
    for (int rep = 0; rep < 2; rep++) begin
      int n;
      check(!busy && !soft_valid, "idle before start");
      start <= 1; @(posedge clk); start <= 0;
      n = 0;
      while (n < N) begin
        @(negedge clk);
        soft_ready = ($urandom_range(2) != 0);
        if (soft_valid && soft_ready) begin
          check(soft_data == model[n], $sformatf("pair %0d", n));
          check(soft_last == (n == N - 1), $sformatf("last flag at %0d", n));
          n++;
        end
      end
      @(posedge clk);
      #1;
      check(!busy, "busy drops after last pair");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
