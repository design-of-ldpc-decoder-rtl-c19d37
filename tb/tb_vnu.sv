// tb_vnu: runs the VNU over a model of the edge RAM and of the input and
// output caches (synchronous reads, as the real ones).  Edge addresses come
// from the connections of the independently built matrix in ldpc_ref_pkg.
// First an initialisation pass: every edge word must become the channel pair
// of its variable.  Then a normal pass over random check messages: every
// edge word must become the normalised extrinsic sum and every output-cache
// entry the normalised a-posteriori sum.  A pass takes 11 cycles per
// variable.
module tb_vnu;
  import ldpc_pkg::*;
  import ldpc_ref_pkg::*;

  localparam int Z  = ZDEF;
  localparam int N  = 6 * Z;
  localparam int E  = 18 * Z;
  localparam int AW = $clog2(E);
  localparam int NW = $clog2(N);

  logic clk = 0, rst = 1, start = 0, init = 0, done;
  logic [NW-1:0] node, in_raddr, oc_waddr;
  logic [2:0] slot;
  logic [AW-1:0] addr, ram_raddr, ram_waddr;
  cost_pair_t ram_rdata, ram_wdata, in_rdata, oc_wdata;
  logic ram_we, oc_we;

  cost_pair_t mem [E];
  cost_pair_t chan [N];
  cost_pair_t oc [N];
  int checks = 0, failures = 0;

  vnu dut (.*);

  always #5 clk = ~clk;
  assign addr = AW'(6 * var_chk[node][slot] + var_slot[node][slot]);
  always @(posedge clk) begin
    ram_rdata <= mem[ram_raddr];
    in_rdata  <= chan[in_raddr];
    if (ram_we) mem[ram_waddr] <= ram_wdata;
    if (oc_we) oc[oc_waddr] <= oc_wdata;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(bit ini);
    int cyc;
    init <= ini; start <= 1; @(posedge clk); start <= 0; init <= 0;
    cyc = 1;
    while (!done) begin @(posedge clk); cyc++; end
    checks++;
    if (cyc != 11 * N + 2) begin failures++; $display("FAIL pass took %0d cycles", cyc); end
    @(posedge clk);
  endtask

  task automatic cmp(string what, int idx, cost_pair_t got, pair_t e);
    checks++;
    if (int'(got.c0) != e.c0 || int'(got.c1) != e.c1) begin
      failures++;
      if (failures < 10) $display("FAIL %s %0d got %0d/%0d exp %0d/%0d", what, idx, got.c0, got.c1, e.c0, e.c1);
    end
  endtask

  initial begin
    cost_pair_t prev_mem [E];
    build(Z);
    foreach (chan[n]) begin
      pair_t p;
      p = llr2pair(int'($urandom_range(255)) - 128);
      chan[n].c0 = W'(p.c0); chan[n].c1 = W'(p.c1);
    end
    foreach (mem[e]) mem[e] = cost_pair_t'($urandom);
    repeat (2) @(posedge clk);
    rst <= 0;
    // initialisation pass
    run(1);
    for (int n = 0; n < N; n++)
      for (int i = 0; i < 3; i++) begin
        pair_t e;
        e.c0 = chan[n].c0; e.c1 = chan[n].c1;
        cmp("init edge", n, mem[6 * var_chk[n][i] + var_slot[n][i]], e);
      end
    // normal pass with random check messages
    foreach (mem[e]) begin
      mem[e].c0 = W'($urandom_range(($urandom_range(9) == 0) ? 4095 : 200));
      mem[e].c1 = W'($urandom_range(($urandom_range(9) == 0) ? 4095 : 200));
    end
    prev_mem = mem;
    run(0);
    for (int n = 0; n < N; n++) begin
      int t0, t1;
      t0 = chan[n].c0; t1 = chan[n].c1;
      for (int i = 0; i < 3; i++) begin
        t0 += prev_mem[6 * var_chk[n][i] + var_slot[n][i]].c0;
        t1 += prev_mem[6 * var_chk[n][i] + var_slot[n][i]].c1;
      end
      cmp("posterior", n, oc[n], normalise(t0, t1));
      for (int i = 0; i < 3; i++) begin
        int a;
        a = 6 * var_chk[n][i] + var_slot[n][i];
        cmp("edge", a, mem[a], normalise(t0 - prev_mem[a].c0, t1 - prev_mem[a].c1));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
