// tb_watermark_image: the image-recovery use of the receiver, end to end, at
// the default parameters.
//
// A 16 x 16 binary watermark image (a frame with a diagonal cross, 256
// pixels) is split into blocks of 53 information bits, each block is
// LDPC-encoded into a 102-bit codeword (the last block zero-filled), and the
// codewords pass through a noisy channel whose errors stand in for the
// damage that embedding and extraction do.  The receiver decodes them and
// sends the bits back over the UART; a model receiver collects the bytes,
// the information bits are taken out of each codeword and the image is
// rebuilt.  Checks: every UART byte matches the reference decoder, and the
// rebuilt image equals the original although the channel flipped bits.
module tb_watermark_image;
  import ldpc_pkg::*;
  import ldpc_ref_pkg::*;

  localparam int Z   = ZDEF;
  localparam int N   = 6 * Z;
  localparam int CPB = 434;
  localparam int NB  = (N + 7) / 8;
  localparam int IMG = 16;
  localparam int NPIX = IMG * IMG;

  logic clk = 0, reset = 1;
  logic signed [QW-1:0] llr_in = '0;
  logic llr_valid = 0, llr_ready, start_decode = 0, decode_over, busy;
  logic [$clog2(MAX_ITER + 1)-1:0] iter;
  logic code, code_valid, code_ready, code_out_over, uart_txd;

  int checks = 0, failures = 0;

  ldpc_watermark_fpga dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (4_000_000) @(posedge clk);
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

  bit    image [NPIX];
  bit    rebuilt [NPIX];
  int    nblk;
  bit    cw [][];
  int    llr [][];
  bit    exp_hard [][];
  bit    rx_bits [][];
  int    raw_errors = 0;

  // UART receiver model: collects the bits of each codeword
  int rx_f = 0, rx_b = 0;
  initial begin
    forever begin
      logic [7:0] rx;
      @(negedge uart_txd);
      if (reset) continue;
      repeat (CPB / 2) @(posedge clk);
      for (int b = 0; b < 8; b++) begin
        repeat (CPB) @(posedge clk);
        rx[b] = uart_txd;
      end
      repeat (CPB) @(posedge clk);
      check(uart_txd == 1, "stop bit");
      for (int b = 0; b < 8; b++)
        if (rx_b * 8 + b < N) begin
          rx_bits[rx_f][rx_b * 8 + b] = rx[b];
          check(rx[b] == exp_hard[rx_f][rx_b * 8 + b], $sformatf("codeword %0d bit %0d", rx_f, rx_b * 8 + b));
        end
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
    int k;
    build(Z);
    k = k_info();
    for (int y = 0; y < IMG; y++)
      for (int x = 0; x < IMG; x++)
        image[y * IMG + x] = (x == 0 || y == 0 || x == IMG - 1 || y == IMG - 1 || x == y || x == IMG - 1 - y);
    nblk = (NPIX + k - 1) / k;
    cw = new[nblk]; llr = new[nblk]; exp_hard = new[nblk]; rx_bits = new[nblk];
    for (int f = 0; f < nblk; f++) begin
      bit info [];
      pair_t post [];
      info = new[k];
      foreach (info[i]) info[i] = (f * k + i < NPIX) ? image[f * k + i] : 1'b0;
      encode(info, cw[f]);
      check(is_codeword(cw[f]), "encoded block satisfies H");
      channel(cw[f], 24, 28, llr[f]);
      foreach (llr[f][n]) if ((llr[f][n] < 0) != cw[f][n]) raw_errors++;
      decode(llr[f], MAX_ITER, exp_hard[f], post);
      rx_bits[f] = new[N];
    end
    $display("%0d pixels in %0d codewords of %0d information bits; channel flipped %0d bits",
             NPIX, nblk, k, raw_errors);
    repeat (4) @(posedge clk);
    reset <= 0;
    @(posedge clk);
    for (int f = 0; f < nblk; f++) begin
      load(f);
      start_decode <= 1; @(posedge clk); start_decode <= 0;
      while (!decode_over) @(posedge clk);
    end
    while (rx_f < nblk) @(posedge clk);
    for (int f = 0; f < nblk; f++) begin
      bit info [];
      extract(rx_bits[f], info);
      foreach (info[i]) if (f * k + i < NPIX) rebuilt[f * k + i] = info[i];
    end
    begin
      int bad;
      bad = 0;
      foreach (image[p]) if (rebuilt[p] != image[p]) bad++;
      check(raw_errors > 0, "the channel introduced errors");
      check(bad == 0, $sformatf("%0d watermark pixels wrong", bad));
      for (int y = 0; y < IMG; y++) begin
        string line;
        line = "";
        for (int x = 0; x < IMG; x++) line = {line, rebuilt[y * IMG + x] ? "#" : "."};
        $display("  %s", line);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
