// check_processing: the arithmetic core of the check node unit (CNU).
//
// It evaluates the binary min-max check-node rule for one outgoing message
// value, one configuration per clock.  A configuration is a 6-bit vector
// (peizhi_serial) of bit values for the six variables of a degree-6 check;
// only the 32 even-parity vectors occur.  Bit 0 is the value of the target
// variable and bits 1..5 the values taken by the five other variables, whose
// incoming cost pairs arrive on inf1..inf5 (cost of 1 in [23:12], cost of 0
// in [11:0]).  For the target value a the outgoing cost is
//     min over the 16 configurations with bit0 = a of
//         max over k = 1..5 of cost_k(bit k of the configuration).
// Bit 0 selects nothing here: the sequencer chooses which 16 configurations
// to present.
//
// Three register stages, each advanced by its own enable from the sequencer,
// as the port list of the unit shows:
//   find_meet_inf : pick from each inf_k the cost that matches the config bit
//   find_max_en   : register the largest of the five picked costs
//   store_max_en  : load that maximum into the running minimum (first config)
//   find_min_en   : replace the running minimum by the smaller of the two
// out_min_max is the running minimum; after the 16th configuration of a sweep
// has passed through all stages it is the outgoing message value.
// The port names and widths follow the unit's schematic; the split of the
// work across the four enables is this design's choice.
module check_processing
  import ldpc_pkg::*;
(
  input  logic             clk,
  input  logic             rst,
  input  logic [5:0]       peizhi_serial,
  input  logic [2*W-1:0]   inf1,
  input  logic [2*W-1:0]   inf2,
  input  logic [2*W-1:0]   inf3,
  input  logic [2*W-1:0]   inf4,
  input  logic [2*W-1:0]   inf5,
  input  logic             find_meet_inf,
  input  logic             find_max_en,
  input  logic             store_max_en,
  input  logic             find_min_en,
  output logic [W-1:0]     out_min_max
);

  logic [2*W-1:0] inf [1:5];
  logic [W-1:0]   meet   [1:5];
  logic [W-1:0]   max_q;
  logic [W-1:0]   max_d;
  logic [W-1:0]   min_q;

  assign inf[1] = inf1;
  assign inf[2] = inf2;
  assign inf[3] = inf3;
  assign inf[4] = inf4;
  assign inf[5] = inf5;

  // Stage 1: select the cost matching each configuration bit.
  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 1; k <= 5; k++) meet[k] <= '0;
    end else if (find_meet_inf) begin
      for (int k = 1; k <= 5; k++)
        meet[k] <= peizhi_serial[k] ? inf[k][2*W-1:W] : inf[k][W-1:0];
    end
  end

  // Stage 2: maximum of the five selected costs.
  always_comb begin
    max_d = meet[1];
    for (int k = 2; k <= 5; k++)
      if (meet[k] > max_d) max_d = meet[k];
  end

  always_ff @(posedge clk) begin
    if (rst)              max_q <= '0;
    else if (find_max_en) max_q <= max_d;
  end

  // Stage 3: minimum over the configurations of one sweep.
  always_ff @(posedge clk) begin
    if (rst)               min_q <= COST_MAX;
    else if (store_max_en) min_q <= max_q;
    else if (find_min_en && max_q < min_q) min_q <= max_q;
  end

  assign out_min_max = min_q;

endmodule
