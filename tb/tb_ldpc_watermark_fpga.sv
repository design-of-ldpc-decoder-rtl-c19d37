// tb_ldpc_watermark_fpga: whole-system test of the FPGA receiver at its
// default parameters (Z = 17, 10 iterations, 434 clocks per UART bit).
//
// Three watermark codewords are sent through a noisy channel, loaded as LLRs
// and decoded; the decoded bits are taken both from the code stream and from
// the UART line, where a model receiver samples each bit in its middle.  Both
// are compared with the reference decoder (ldpc_ref_pkg); the UART bytes must
// be the bits packed eight to a byte, first bit in bit 0, 13 bytes per
// codeword with a zero-padded last byte.  The test counts each mechanism at
// least once: channel errors corrected, a decode requested before its data,
// the serial port stalling the decoder's bit stream, a partial byte flushed
// at the end of a codeword, and loading overlapping read-out.
module tb_ldpc_watermark_fpga;
  import ldpc_pkg::*;
  import ldpc_ref_pkg::*;

  localparam int Z   = ZDEF;
  localparam int N   = 6 * Z;
  localparam int NF  = 3;
  localparam int CPB = 434;
  localparam int NB  = (N + 7) / 8;

  logic clk = 0, reset = 1;
  logic signed [QW-1:0] llr_in = '0;
  logic llr_valid = 0, llr_ready, start_decode = 0, decode_over, busy;
  logic [$clog2(MAX_ITER + 1)-1:0] iter;
  logic code, code_valid, code_ready, code_out_over, uart_txd;

  int checks = 0, failures = 0;

  ldpc_watermark_fpga dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2_000_000) @(posedge clk);
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

  bit    cw [NF][];
  int    llr [NF][];
  bit    exp_hard [NF][];
  pair_t exp_post [][];
  int    noise [NF] = '{0, 30, 26};
  int    stalls = 0, prestart = 0, overlap = 0, corrected = 0, flushes = 0, max_iter_seen = 0;

  // code stream monitor
  int code_f = 0, code_n = 0;
  always @(posedge clk) begin
    if (!reset && code_valid && code_ready) begin
      check(code == exp_hard[code_f][code_n], $sformatf("frame %0d bit %0d", code_f, code_n));
      code_n++;
      if (code_n == N) begin code_n = 0; code_f++; end
    end
    if (!reset && code_valid && !code_ready) stalls++;
    if (int'(iter) > max_iter_seen) max_iter_seen = int'(iter);
  end

  // UART receiver model
  int rx_f = 0, rx_b = 0;
  initial begin
    forever begin
      logic [7:0] rx;
      logic [7:0] exp_byte;
      @(negedge uart_txd);
      if (reset) continue;
      repeat (CPB / 2) @(posedge clk);
      check(uart_txd == 0, "start bit");
      for (int b = 0; b < 8; b++) begin
        repeat (CPB) @(posedge clk);
        rx[b] = uart_txd;
      end
      repeat (CPB) @(posedge clk);
      check(uart_txd == 1, "stop bit");
      exp_byte = '0;
      for (int b = 0; b < 8; b++)
        if (rx_b * 8 + b < N) exp_byte[b] = exp_hard[rx_f][rx_b * 8 + b];
      check(rx == exp_byte, $sformatf("frame %0d byte %0d: %02h expected %02h", rx_f, rx_b, rx, exp_byte));
      if (rx_b == NB - 1 && N % 8 != 0) flushes++;
      rx_b++;
      if (rx_b == NB) begin rx_b = 0; rx_f++; end
    end
  end

  task automatic load(int f);
    int n;
    n = 0;
    while (n < N) begin
      llr_valid <= 1;
      llr_in    <= QW'(llr[f][n]);
      @(posedge clk);
      if (llr_valid && llr_ready) n++;
    end
    llr_valid <= 0;
  endtask

  initial begin
    build(Z);
    exp_post = new[NF];
    for (int f = 0; f < NF; f++) begin
      int raw;
      codeword(cw[f]);
      channel(cw[f], 24, noise[f], llr[f]);
      decode(llr[f], MAX_ITER, exp_hard[f], exp_post[f]);
      raw = 0;
      foreach (llr[f][k]) if ((llr[f][k] < 0) != cw[f][k]) raw++;
      if (raw > 0 && exp_hard[f] == cw[f]) corrected++;
      check(f == 0 ? exp_hard[f] == cw[f] : 1'b1, "noiseless frame decodes to its codeword");
    end
    repeat (4) @(posedge clk);
    reset <= 0;
    @(posedge clk);
    // frame 0: start requested before the data arrives
    start_decode <= 1; @(posedge clk); start_decode <= 0;
    prestart++;
    load(0);
    for (int f = 0; f < NF; f++) begin
      while (!decode_over) @(posedge clk);
      @(posedge clk);
      if (f + 1 < NF) begin
        load(f + 1);
        if (code_valid) overlap++;
        start_decode <= 1; @(posedge clk); start_decode <= 0;
      end
    end
    // wait for the last codeword to leave the UART
    while (rx_f < NF) @(posedge clk);
    check(code_f == NF, "all codewords left on the code stream");
    check(code_out_over, "code_out_over after the last bit");
    check(max_iter_seen == MAX_ITER, "ran the full number of iterations");
    check(stalls > 0, "serial port stalled the bit stream");
    check(prestart > 0, "early start request");
    check(overlap > 0, "load overlapped read-out");
    check(corrected > 0, "channel errors corrected");
    check(flushes > 0, "partial byte flushed");
    $display("stalls=%0d prestart=%0d overlap=%0d corrected=%0d flushes=%0d", stalls, prestart, overlap, corrected, flushes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
