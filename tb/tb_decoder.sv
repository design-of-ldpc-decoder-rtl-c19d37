// tb_decoder: end-to-end test of the LDPC decoder at its default size
// (Z = 17, N = 102, 10 iterations).
//
// Each frame: a random codeword (Gaussian elimination on the parity-check
// matrix), a noisy channel, LLRs fed with random gaps, then the decoded bits
// collected with random back-pressure.  Every bit is compared with the
// behavioural reference decoder of ldpc_ref_pkg; frames with few errors must
// also give back the transmitted codeword.  The start-to-decode_over latency
// is compared with the schedule: the control unit stays busy for
// (11N + 2) + 10 ((208M + 2) + (11N + 2)) + 1 cycles.
// One frame pulses start_decode before its data is loaded, and the next
// frame is loaded while the previous one is still being read out.
module tb_decoder;
  import ldpc_pkg::*;
  import ldpc_ref_pkg::*;

  localparam int Z  = ZDEF;
  localparam int N  = 6 * Z;
  localparam int M  = 3 * Z;
  localparam int NF = 6;
  // cycles the control unit is busy: init pass, MAX_ITER x (CNU pass, VNU
  // pass), each pass costing its work plus two hand-over cycles, and FINISH
  localparam int BUSY_CYC = (11 * N + 2) + MAX_ITER * ((208 * M + 2) + (11 * N + 2)) + 1;

  logic clk = 0, reset = 1;
  logic signed [QW-1:0] llr_in = '0;
  logic llr_valid = 0, llr_ready, start_decode = 0, decode_over;
  logic code, code_valid, code_last, code_ready = 1, code_out_over, busy;
  logic [$clog2(MAX_ITER + 1)-1:0] iter;

  int checks = 0, failures = 0;
  longint cyc = 0;

  decoder dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;
  int busy_cnt = 0;
  always @(posedge clk) if (busy) busy_cnt++;

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // frame data
  bit    cw   [NF][];
  int    llr  [NF][];
  bit    exp_hard [NF][];
  pair_t exp_post [][];
  int    noise [NF] = '{0, 20, 40, 55, 30, 26};
  bit    expect_correct [NF] = '{1, 1, 0, 0, 0, 0};
  int    stalls = 0, prestart = 0, overlap = 0, corrected = 0;

  task automatic load(int f);
    int n;
    n = 0;
    while (n < N) begin
      llr_valid <= ($urandom_range(3) != 0);
      llr_in    <= QW'(llr[f][n]);
      @(posedge clk);
      if (llr_valid && llr_ready) n++;
    end
    llr_valid <= 0;
  endtask

  task automatic collect(int f);
    int n;
    bit got [];
    got = new[N];
    n = 0;
    while (n < N) begin
      code_ready <= (f % 2 == 1) ? ($urandom_range(2) != 0) : 1'b1;
      @(posedge clk);
      if (code_valid && !code_ready) stalls++;
      if (code_valid && code_ready) begin
        got[n] = code;
        check(code == exp_hard[f][n], $sformatf("frame %0d bit %0d: got %0b ref %0b", f, n, code, exp_hard[f][n]));
        check(code_last == (n == N - 1), $sformatf("frame %0d code_last at %0d", f, n));
        n++;
      end
    end
    code_ready <= 1;
    @(posedge clk);
    @(posedge clk);
    check(code_out_over, $sformatf("frame %0d code_out_over", f));
    if (expect_correct[f]) begin
      int errs;
      errs = 0;
      foreach (got[k]) if (got[k] != cw[f][k]) errs++;
      check(errs == 0, $sformatf("frame %0d: %0d residual errors", f, errs));
    end
    begin
      int raw;
      raw = 0;
      foreach (llr[f][k]) if ((llr[f][k] < 0) != cw[f][k]) raw++;
      if (raw > 0 && got == cw[f]) corrected++;
      $display("frame %0d: noise %0d, %0d channel errors, decoded %s", f, noise[f], raw,
               (got == cw[f]) ? "correct" : "with errors");
    end
  endtask

  initial begin
    build(Z);
    $display("code: N=%0d M=%0d rank=%0d", Nr, Mr, rank_r);
    exp_post = new[NF];
    for (int f = 0; f < NF; f++) begin
      codeword(cw[f]);
      check(is_codeword(cw[f]), "generated codeword satisfies H");
      channel(cw[f], 24, noise[f], llr[f]);
      decode(llr[f], MAX_ITER, exp_hard[f], exp_post[f]);
    end
    repeat (4) @(posedge clk);
    reset <= 0;
    @(posedge clk);
    load(0);
    for (int f = 0; f < NF; f++) begin
      int t0;
      // frame 2 requests its decode before its data has arrived
      if (f == 2) begin
        start_decode <= 1; @(posedge clk); start_decode <= 0;
        prestart++;
        load(f);
      end
      else begin
        wait (!busy);
        @(posedge clk);
        start_decode <= 1; @(posedge clk); start_decode <= 0;
      end
      t0 = busy_cnt;
      while (!decode_over) @(posedge clk);
      @(posedge clk);
      check(busy_cnt - t0 == BUSY_CYC, $sformatf("frame %0d busy %0d cycles, expected %0d", f, busy_cnt - t0, BUSY_CYC));
      // load the next frame while this one is read out
      fork
        collect(f);
        if (f + 1 < NF && f + 1 != 2) begin
          load(f + 1);
          if (code_valid) overlap++;
        end
      join
    end
    check(stalls > 0, "back-pressure stall occurred");
    check(prestart > 0, "early start request occurred");
    check(overlap > 0, "load overlapped read-out");
    check(corrected > 0, "channel errors were corrected");
    $display("stalls=%0d prestart=%0d overlap=%0d corrected_frames=%0d", stalls, prestart, overlap, corrected);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
