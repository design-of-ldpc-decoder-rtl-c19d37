// variable_processing: the arithmetic pipeline of the variable node unit
// (VNU) for a degree-3 variable.
//
// Inputs are the three check-to-variable cost pairs variablein_1..3 and the
// channel cost pair In.  For each edge j the outgoing (extrinsic) message is
// built from In and the two other inputs, per bit value b:
//     sum_j(b) = In(b) + sum of variablein_k(b), k != j
//     Vprocess_result_j(b) = sum_j(b) - min(sum_j(0), sum_j(1))
// The subtraction removes the common part, so one of the two costs becomes
// zero (normalisation).  A fourth lane adds all three inputs to In and gives
// the normalised a-posteriori pair (the soft decision) in soft_out.
// With init set the check inputs are treated as zero, so every output is In:
// the initialisation pass that seeds the edge memory with the channel values.
// Additions saturate at 2^12 - 1.
//
// Pipeline of three registered stages (sum, min, subtract), as in the unit's
// schematic: in_valid in cycle t gives out_valid and the results in cycle t+3,
// one variable per clock at most.
module variable_processing
  import ldpc_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        in_valid,
  input  logic        init,
  input  cost_pair_t  variablein_1,
  input  cost_pair_t  variablein_2,
  input  cost_pair_t  variablein_3,
  input  cost_pair_t  In,
  output logic        out_valid,
  output cost_pair_t  Vprocess_result_1,
  output cost_pair_t  Vprocess_result_2,
  output cost_pair_t  Vprocess_result_3,
  output cost_pair_t  soft_out
);

  localparam int L = 4;   // three extrinsic lanes and the a-posteriori lane

  cost_pair_t     v [3];
  cost_pair_t     sum_d [L];
  cost_pair_t     sum_q [L];
  cost_pair_t     sum_q2 [L];
  logic [W-1:0]   min_q [L];
  cost_pair_t     res_q [L];
  logic [2:0]     vld;

  always_comb begin
    v[0] = init ? '0 : variablein_1;
    v[1] = init ? '0 : variablein_2;
    v[2] = init ? '0 : variablein_3;
    sum_d[0].c0 = sat_add(In.c0, sat_add(v[1].c0, v[2].c0));
    sum_d[0].c1 = sat_add(In.c1, sat_add(v[1].c1, v[2].c1));
    sum_d[1].c0 = sat_add(In.c0, sat_add(v[0].c0, v[2].c0));
    sum_d[1].c1 = sat_add(In.c1, sat_add(v[0].c1, v[2].c1));
    sum_d[2].c0 = sat_add(In.c0, sat_add(v[0].c0, v[1].c0));
    sum_d[2].c1 = sat_add(In.c1, sat_add(v[0].c1, v[1].c1));
    sum_d[3].c0 = sat_add(sum_d[0].c0, v[0].c0);
    sum_d[3].c1 = sat_add(sum_d[0].c1, v[0].c1);
  end

  always_ff @(posedge clk) begin
    if (rst) vld <= '0;
    else     vld <= {vld[1:0], in_valid};
  end

  always_ff @(posedge clk) begin
    for (int l = 0; l < L; l++) begin
      // stage 1: sum
      sum_q[l]  <= sum_d[l];
      // stage 2: min, the sum travels alongside
      min_q[l]  <= (sum_q[l].c0 < sum_q[l].c1) ? sum_q[l].c0 : sum_q[l].c1;
      sum_q2[l] <= sum_q[l];
      // stage 3: subtract
      res_q[l].c0 <= sum_q2[l].c0 - min_q[l];
      res_q[l].c1 <= sum_q2[l].c1 - min_q[l];
    end
  end

  assign out_valid         = vld[2];
  assign Vprocess_result_1 = res_q[0];
  assign Vprocess_result_2 = res_q[1];
  assign Vprocess_result_3 = res_q[2];
  assign soft_out          = res_q[3];

endmodule
