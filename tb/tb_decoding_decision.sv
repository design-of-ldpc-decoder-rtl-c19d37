// tb_decoding_decision: streams random soft pairs (ties included) through
// the decision stage under random valid and ready, and checks that the bits
// come out in order, each 1 exactly when the cost of 1 is lower, that a
// stalled bit is held, and that code_out_over rises after the last bit and
// is cleared by clear.
module tb_decoding_decision;
  import ldpc_pkg::*;

  logic clk = 0, rst = 1, clear = 0;
  cost_pair_t soft_data = '0;
  logic soft_valid = 0, soft_last = 0, soft_ready;
  logic code, code_valid, code_last, code_ready = 0, code_out_over;

  int checks = 0, failures = 0;
  bit exp_q [$];
  bit last_q [$];

  decoding_decision dut (.*);

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

  // output side
  int got = 0;
  always @(posedge clk) begin
    if (!rst && code_valid && code_ready) begin
      bit e, l;
      e = exp_q.pop_front();
      l = last_q.pop_front();
      check(code == e, $sformatf("bit %0d", got));
      check(code_last == l, $sformatf("last flag %0d", got));
      got++;
    end
  end

  initial begin
    int sent;
    repeat (2) @(posedge clk);
    rst <= 0;
    sent = 0;
    for (int t = 0; t < 3000; t++) begin
      cost_pair_t p;
      p.c0 = W'($urandom_range(20));
      p.c1 = ($urandom_range(4) == 0) ? p.c0 : W'($urandom_range(20));
      soft_data  <= p;
      soft_valid <= ($urandom_range(2) != 0) && sent < 500;
      soft_last  <= (sent == 499);
      code_ready <= ($urandom_range(2) != 0);
      @(posedge clk);
      if (soft_valid && soft_ready) begin
        exp_q.push_back(soft_data.c1 < soft_data.c0);
        last_q.push_back(soft_last);
        sent++;
      end
    end
    soft_valid <= 0;
    code_ready <= 1;
    repeat (3) @(posedge clk);
    check(got == 500, "all bits delivered");
    check(code_out_over, "code_out_over after the last bit");
    clear <= 1; @(posedge clk); clear <= 0;
    @(posedge clk);
    check(!code_out_over, "cleared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
