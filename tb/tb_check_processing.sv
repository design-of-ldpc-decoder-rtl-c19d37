// tb_check_processing: checks the min-max check-node core.
//
// Random cost pairs (including zero and full-scale costs) are applied on
// inf1..inf5; for each target value a the 16 even-parity configurations with
// bit 0 = a are presented one per clock with the stage enables staggered as
// the CNU sequencer does.  Three cycles after the last one out_min_max must
// equal the brute-force min over configurations of the max of the selected
// costs.  Also checks that the core holds its value when no enable is set.
module tb_check_processing;
  import ldpc_pkg::*;

  logic clk = 0, rst = 1;
  logic [5:0] peizhi_serial = '0;
  logic [2*W-1:0] inf1, inf2, inf3, inf4, inf5;
  logic find_meet_inf = 0, find_max_en = 0, store_max_en = 0, find_min_en = 0;
  logic [W-1:0] out_min_max;

  int checks = 0, failures = 0;

  check_processing dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] rnd_cost();
    case ($urandom_range(5))
      0: return '0;
      1: return '1;
      default: return W'($urandom_range(300));
    endcase
  endfunction

  logic [W-1:0] c [1:5][2];

  function automatic int ref_val(int a);
    int best;
    best = 4095;
    for (int p = 0; p < 32; p++) begin
      int mx;
      if (($countones(p) % 2) != a) continue;
      mx = 0;
      for (int k = 1; k <= 5; k++) if (c[k][p[k-1]] > mx) mx = c[k][p[k-1]];
      if (mx < best) best = mx;
    end
    return best;
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int t = 0; t < 300; t++) begin
      for (int k = 1; k <= 5; k++) begin
        c[k][0] = rnd_cost();
        c[k][1] = ($urandom_range(1)) ? '0 : rnd_cost();
      end
      inf1 = {c[1][1], c[1][0]};
      inf2 = {c[2][1], c[2][0]};
      inf3 = {c[3][1], c[3][0]};
      inf4 = {c[4][1], c[4][0]};
      inf5 = {c[5][1], c[5][0]};
      for (int a = 0; a < 2; a++) begin
        for (int q = 0; q < 16 + 3; q++) begin
          logic [3:0] qq;
          qq = 4'(q);
          find_meet_inf <= (q < 16);
          find_max_en   <= (q >= 1 && q < 17);
          store_max_en  <= (q == 2);
          find_min_en   <= (q > 2 && q < 18);
          peizhi_serial <= {(^qq) ^ 1'(a), qq, 1'(a)};
          @(posedge clk);
        end
        find_meet_inf <= 0; find_max_en <= 0; store_max_en <= 0; find_min_en <= 0;
        @(posedge clk);
        checks++;
        if (int'(out_min_max) != ref_val(a)) begin
          failures++;
          $display("FAIL trial %0d a=%0d: got %0d ref %0d", t, a, out_min_max, ref_val(a));
        end
        // hold with no enables
        repeat (2) @(posedge clk);
        checks++;
        if (int'(out_min_max) != ref_val(a)) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
