// tb_control_unit: drives the control unit with model CNU and VNU units that
// report done after a random delay, and checks the sequence it produces:
// nothing starts until start_decode, a full input cache and an idle output
// cache are all present (a start request is remembered); then one VNU pass
// with init, then MAX_ITER pairs of (CNU pass, VNU pass) with the iteration
// counter running 1 .. MAX_ITER; var_phase is high exactly in VNU passes;
// finally one-cycle decode_over, in_release and out_start pulses.
module tb_control_unit;
  import ldpc_pkg::*;

  localparam int IW = $clog2(MAX_ITER + 1);

  logic clk = 0, rst = 1;
  logic start_decode = 0, in_full = 0, out_busy = 0;
  logic cnu_start, cnu_done = 0, vnu_start, vnu_init, vnu_done = 0;
  logic var_phase, decode_over, in_release, out_start, clear_out, busy;
  logic [IW-1:0] iter;

  int checks = 0, failures = 0;
  string log_q [$];

  control_unit dut (.*);

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

  // model units: record each start, answer done after a random delay
  always @(posedge clk) begin
    if (!rst) begin
      if (cnu_start) begin
        check(!var_phase, "CNU runs with var_phase low");
        log_q.push_back($sformatf("C%0d", iter));
        fork begin
          repeat ($urandom_range(20, 3)) @(posedge clk);
          cnu_done <= 1; @(posedge clk); cnu_done <= 0;
        end join_none
      end
      if (vnu_start) begin
        check(var_phase, "VNU runs with var_phase high");
        log_q.push_back(vnu_init ? "I" : $sformatf("V%0d", iter));
        fork begin
          repeat ($urandom_range(20, 3)) @(posedge clk);
          vnu_done <= 1; @(posedge clk); vnu_done <= 0;
        end join_none
      end
    end
  end

  int n_over = 0, n_rel = 0, n_out = 0;
  always @(posedge clk) begin
    if (!rst && decode_over) n_over++;
    if (!rst && in_release) n_rel++;
    if (!rst && out_start) n_out++;
  end

  initial begin
    string expected [$];
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int rep = 0; rep < 2; rep++) begin
      // request first, data later, output cache still busy
      start_decode <= 1; @(posedge clk); start_decode <= 0;
      out_busy <= (rep == 1);
      repeat (10) @(posedge clk);
      check(!busy && log_q.size() == 0, "waits for a full input cache");
      in_full <= 1;
      repeat (10) @(posedge clk);
      if (rep == 1) begin
        check(!busy && log_q.size() == 0, "waits for the output cache");
        out_busy <= 0;
      end
      while (!decode_over) @(posedge clk);
      check(in_release && out_start, "release and read-out start with decode_over");
      in_full <= 0;
      @(posedge clk);
      check(!decode_over, "decode_over is one cycle");
      expected = {"I"};
      for (int i = 1; i <= MAX_ITER; i++) begin
        expected.push_back($sformatf("C%0d", i));
        expected.push_back($sformatf("V%0d", i));
      end
      check(log_q.size() == expected.size(), $sformatf("%0d unit passes, expected %0d", log_q.size(), expected.size()));
      foreach (expected[k])
        check(k < log_q.size() && log_q[k] == expected[k], $sformatf("pass %0d", k));
      log_q.delete();
      repeat (30) @(posedge clk);
      check(!busy && log_q.size() == 0, "stays idle without a new request");
    end
    check(n_over == 2 && n_rel == 2 && n_out == 2, "one finish per decode");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
