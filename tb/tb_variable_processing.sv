// tb_variable_processing: checks the VNU sum / min / subtract pipeline.
//
// Random cost pairs (some near full scale, to hit saturation) go in on
// back-to-back cycles; three cycles later each extrinsic output must equal
// In plus the other two inputs, per bit value, saturated at 4095 and reduced
// by its smaller cost, and soft_out the same over all three inputs.  With
// init set every output must be In itself.
module tb_variable_processing;
  import ldpc_pkg::*;

  logic clk = 0, rst = 1;
  logic in_valid = 0, init = 0, out_valid;
  cost_pair_t variablein_1, variablein_2, variablein_3, In;
  cost_pair_t Vprocess_result_1, Vprocess_result_2, Vprocess_result_3, soft_out;

  int checks = 0, failures = 0;

  variable_processing dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int sat(int v);
    return v > 4095 ? 4095 : v;
  endfunction

  function automatic cost_pair_t norm(int a0, int a1);
    cost_pair_t p;
    int mn;
    a0 = sat(a0); a1 = sat(a1);
    mn = a0 < a1 ? a0 : a1;
    p.c0 = W'(a0 - mn); p.c1 = W'(a1 - mn);
    return p;
  endfunction

  function automatic logic [W-1:0] rc();
    return ($urandom_range(7) == 0) ? W'($urandom_range(4095, 3000)) : W'($urandom_range(200));
  endfunction

  cost_pair_t exp_q [$];
  int sent = 0;

  always @(posedge clk) begin
    if (out_valid) begin
      cost_pair_t e [4];
      for (int l = 0; l < 4; l++) e[l] = exp_q.pop_front();
      checks += 4;
      if (Vprocess_result_1 != e[0]) begin failures++; $display("FAIL r1 %h %h", Vprocess_result_1, e[0]); end
      if (Vprocess_result_2 != e[1]) begin failures++; $display("FAIL r2"); end
      if (Vprocess_result_3 != e[2]) begin failures++; $display("FAIL r3"); end
      if (soft_out != e[3])          begin failures++; $display("FAIL soft"); end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int t = 0; t < 500; t++) begin
      cost_pair_t v [3];
      cost_pair_t i_n;
      bit ini;
      for (int k = 0; k < 3; k++) begin v[k].c0 = rc(); v[k].c1 = rc(); end
      i_n.c0 = rc(); i_n.c1 = rc();
      ini = ($urandom_range(4) == 0);
      variablein_1 <= v[0]; variablein_2 <= v[1]; variablein_3 <= v[2]; In <= i_n;
      init <= ini;
      in_valid <= ($urandom_range(3) != 0);
      @(posedge clk);
      if (in_valid) begin
        if (init) begin
          for (int l = 0; l < 4; l++) exp_q.push_back(norm(i_n.c0, i_n.c1));
        end else begin
          int s0, s1;
          s0 = i_n.c0 + v[0].c0 + v[1].c0 + v[2].c0;
          s1 = i_n.c1 + v[0].c1 + v[1].c1 + v[2].c1;
          for (int l = 0; l < 3; l++) exp_q.push_back(norm(s0 - v[l].c0, s1 - v[l].c1));
          exp_q.push_back(norm(s0, s1));
        end
        sent++;
      end
    end
    in_valid <= 0;
    repeat (5) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL: %0d results missing", exp_q.size() / 4); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
