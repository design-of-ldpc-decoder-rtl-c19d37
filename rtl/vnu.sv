// vnu: variable node unit.  Runs the variable-node half of one decoding
// iteration (or, with init set, the initialisation pass) over all N = 6Z
// variables, one variable at a time, using the variable_processing pipeline.
//
// For each variable n:
//   READ   3 cycles: read the three check-to-variable pairs of the variable
//          (addresses from the address control, node = n, slot = 0..2, which
//          looks them up in the connection ROM) and the channel pair In(n)
//          from the input cache.
//   CALC   1 + 3 cycles: hand the four pairs to the pipeline and wait for it.
//   WRITE  3 cycles: write the three new variable-to-check pairs over the
//          words they came from; in the first write cycle also store the
//          a-posteriori pair of variable n in the output cache.
// start is a one-cycle pulse sampled with init; done pulses once after the
// last variable.  One variable takes 3 + 1 + 1 + 3 + 3 = 11 cycles.  The
// serial schedule is this design's choice.
module vnu
  import ldpc_pkg::*;
#(
  parameter int Z  = ZDEF,
  parameter int N  = 6 * Z,
  parameter int AW = $clog2(18 * Z),
  parameter int NW = $clog2(6 * Z)
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           start,
  input  logic           init,
  output logic           done,
  // address control lookup
  output logic [NW-1:0]  node,
  output logic [2:0]     slot,
  input  logic [AW-1:0]  addr,
  // edge RAM
  output logic [AW-1:0]  ram_raddr,
  input  cost_pair_t     ram_rdata,
  output logic           ram_we,
  output logic [AW-1:0]  ram_waddr,
  output cost_pair_t     ram_wdata,
  // input cache
  output logic [NW-1:0]  in_raddr,
  input  cost_pair_t     in_rdata,
  // output cache
  output logic           oc_we,
  output logic [NW-1:0]  oc_waddr,
  output cost_pair_t     oc_wdata
);

  typedef enum logic [2:0] {S_IDLE, S_READ, S_RLAST, S_ISSUE, S_WAIT, S_WRITE} state_t;

  state_t         state;
  logic           init_q;
  logic [NW-1:0]  n;
  logic [2:0]     s;
  logic           rd_q;
  logic [1:0]     rd_slot_q;
  cost_pair_t     vin [DV];
  cost_pair_t     chan;
  logic [AW-1:0]  eaddr [DV];
  cost_pair_t     res [DV];
  cost_pair_t     soft_q;
  logic           p_valid;
  cost_pair_t     p_res [DV];
  cost_pair_t     p_soft;

  assign node      = n;
  assign slot      = s;
  assign ram_raddr = addr;
  assign in_raddr  = n;

  variable_processing u_pipe (
    .clk              (clk),
    .rst              (rst),
    .in_valid         (state == S_ISSUE),
    .init             (init_q),
    .variablein_1     (vin[0]),
    .variablein_2     (vin[1]),
    .variablein_3     (vin[2]),
    .In               (chan),
    .out_valid        (p_valid),
    .Vprocess_result_1(p_res[0]),
    .Vprocess_result_2(p_res[1]),
    .Vprocess_result_3(p_res[2]),
    .soft_out         (p_soft)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      rd_q      <= 1'b0;
      rd_slot_q <= '0;
    end else begin
      rd_q      <= (state == S_READ);
      rd_slot_q <= s[1:0];
    end
    if (rd_q) vin[rd_slot_q] <= ram_rdata;
    if (state == S_RLAST) chan <= in_rdata;
    if (state == S_READ) eaddr[s[1:0]] <= addr;
    if (p_valid) begin
      res  <= p_res;
      soft_q <= p_soft;
    end
  end

  always_comb begin
    ram_we    = (state == S_WRITE);
    ram_waddr = eaddr[s[1:0]];
    ram_wdata = res[s[1:0]];
    oc_we     = (state == S_WRITE) && (s == 3'd0);
    oc_waddr  = n;
    oc_wdata  = soft_q;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state  <= S_IDLE;
      init_q <= 1'b0;
      n      <= '0;
      s      <= '0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          init_q <= init;
          n      <= '0;
          s      <= '0;
          state  <= S_READ;
        end
        S_READ: begin
          if (s == 3'(DV - 1)) begin
            s     <= '0;
            state <= S_RLAST;
          end else begin
            s <= s + 1'b1;
          end
        end
        S_RLAST: state <= S_ISSUE;
        S_ISSUE: state <= S_WAIT;
        S_WAIT:  if (p_valid) state <= S_WRITE;
        S_WRITE: begin
          if (s == 3'(DV - 1)) begin
            s <= '0;
            if (int'(n) == N - 1) begin
              done  <= 1'b1;
              state <= S_IDLE;
            end else begin
              n     <= n + 1'b1;
              state <= S_READ;
            end
          end else begin
            s <= s + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
