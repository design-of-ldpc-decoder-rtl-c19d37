// tb_serial_port: sends codewords of 13 and 16 bits (one ending in a partial
// byte, one on a byte boundary) through the serial port with a short bit
// time, decodes the UART line with a model receiver sampling mid-bit, and
// checks start bits, stop bits and that every byte holds the bits in order,
// first bit in bit 0, the last partial byte zero-padded.
module tb_serial_port;

  localparam int CPB = 8;

  logic clk = 0, rst = 1;
  logic code = 0, code_valid = 0, code_last = 0, code_ready, txd;

  int checks = 0, failures = 0;
  logic [7:0] exp_bytes [$];

  serial_port #(.CLKS_PER_BIT(CPB)) dut (.*);

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

  int rx_count = 0;
  initial begin
    forever begin
      logic [7:0] rx;
      @(negedge txd);
      if (rst) continue;
      repeat (CPB / 2) @(posedge clk);
      check(txd == 0, "start bit");
      for (int b = 0; b < 8; b++) begin
        repeat (CPB) @(posedge clk);
        rx[b] = txd;
      end
      repeat (CPB) @(posedge clk);
      check(txd == 1, "stop bit");
      check(exp_bytes.size() > 0 && rx == exp_bytes.pop_front(), $sformatf("byte %0d = %02h", rx_count, rx));
      rx_count++;
    end
  end

  initial begin
    int stalls;
    stalls = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int w = 0; w < 6; w++) begin
      int len;
      logic [7:0] cur;
      int nb;
      len = (w % 2 == 0) ? 13 : 16;
      cur = '0; nb = 0;
      for (int i = 0; i < len; i++) begin
        bit b;
        b = 1'($urandom);
        @(negedge clk);
        code = b; code_valid = 1; code_last = (i == len - 1);
        while (!code_ready) begin stalls++; @(negedge clk); end
        // taken at the next rising edge
        cur[nb] = b; nb++;
        if (nb == 8 || i == len - 1) begin exp_bytes.push_back(cur); cur = '0; nb = 0; end
        @(posedge clk);
        #1 code_valid = 0;
        if ($urandom_range(1)) @(posedge clk);
      end
    end
    code_valid <= 0;
    while (exp_bytes.size() > 0) @(posedge clk);
    repeat (20 * CPB) @(posedge clk);
    check(rx_count == 12, $sformatf("%0d bytes received", rx_count));
    check(stalls > 0, "stream stalled while the UART was busy");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
