// cnu: check node unit.  Runs the check-node half of one decoding iteration
// over all M = 3Z checks, one check at a time, using the check_processing
// core for the arithmetic.
//
// For each check m:
//   READ   6 cycles: read the six variable-to-check cost pairs of the check
//          from the edge RAM (addresses come from the address control,
//          node = m, slot = 0..5) and keep them in msg[0..5].
//   CALC 192 cycles: for each edge k (6), each target value a (2) and each of
//          the 16 even-parity configurations with bit 0 = a, present one
//          configuration to the core.  The core's inf1..inf5 carry the other
//          five edges' pairs, msg[(k+1)%6] .. msg[(k+5)%6].  Configuration q
//          (0..15) of target value a is {^q ^ a, q, a}, so its bits 1..4 run
//          through every pattern and bit 5 restores even parity.  The core is
//          a 3-stage pipeline; a tag that travels with each configuration
//          marks the first (store_max_en) and last one of a sweep, and when
//          the last leaves the core its minimum is the cost of value a on
//          edge k.
//   WRITE  6 cycles: write the six check-to-variable pairs back over the
//          words they were computed from.
// start is a one-cycle pulse; done pulses once after the last check.
// One check takes 6 + 1 + 192 + 3 + 6 = 208 cycles.  The sequence of 32
// configurations, split in two sets of 16 by the target value, follows the
// description of the unit; the serial, one-configuration-per-clock schedule
// and the read/compute/write order are this design's choice.
module cnu
  import ldpc_pkg::*;
#(
  parameter int Z  = ZDEF,
  parameter int M  = 3 * Z,
  parameter int AW = $clog2(18 * Z),
  parameter int NW = $clog2(6 * Z)
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           start,
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
  output cost_pair_t     ram_wdata
);

  typedef enum logic [2:0] {S_IDLE, S_READ, S_RLAST, S_CALC, S_DRAIN, S_WRITE} state_t;

  typedef struct packed {
    logic       valid;
    logic       first;
    logic       last;
    logic [2:0] k;
    logic       a;
  } tag_t;

  state_t          state;
  logic [NW-1:0]   m;
  logic [2:0]      s;          // read/write slot counter
  logic            rd_q;       // a read was issued last cycle
  logic [2:0]      rd_slot_q;
  cost_pair_t      msg [DC];
  logic [AW-1:0]   eaddr [DC];
  cost_pair_t      res [DC];
  logic [2:0]      ck;         // edge under computation
  logic            ca;         // target value
  logic [3:0]      cq;         // configuration within the sweep
  tag_t            t1, t2, t3;
  tag_t            t0;

  // core interface
  logic [5:0]      peizhi;
  logic [2*W-1:0]  inf [1:5];
  logic [W-1:0]    out_min_max;

  function automatic logic [2:0] wrap6(logic [2:0] k, int j);
    return 3'((int'(k) + j) % DC);
  endfunction

  assign node      = m;
  assign slot      = s;
  assign ram_raddr = addr;

  // Configuration issue.
  always_comb begin
    t0.valid = (state == S_CALC);
    t0.first = (cq == 4'd0);
    t0.last  = (cq == 4'd15);
    t0.k     = ck;
    t0.a     = ca;
    peizhi   = {(^cq) ^ ca, cq, ca};
    for (int j = 1; j <= 5; j++) inf[j] = msg[wrap6(ck, j)];
  end

  check_processing u_core (
    .clk          (clk),
    .rst          (rst),
    .peizhi_serial(peizhi),
    .inf1         (inf[1]),
    .inf2         (inf[2]),
    .inf3         (inf[3]),
    .inf4         (inf[4]),
    .inf5         (inf[5]),
    .find_meet_inf(t0.valid),
    .find_max_en  (t1.valid),
    .store_max_en (t2.valid && t2.first),
    .find_min_en  (t2.valid && !t2.first),
    .out_min_max  (out_min_max)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      t1 <= '0;
      t2 <= '0;
      t3 <= '0;
    end else begin
      t1 <= t0;
      t2 <= t1;
      t3 <= t2;
    end
  end

  // Result capture.
  always_ff @(posedge clk) begin
    if (t3.valid && t3.last) begin
      if (t3.a) res[t3.k].c1 <= out_min_max;
      else      res[t3.k].c0 <= out_min_max;
    end
  end

  // Read data capture.
  always_ff @(posedge clk) begin
    if (rst) begin
      rd_q      <= 1'b0;
      rd_slot_q <= '0;
    end else begin
      rd_q      <= (state == S_READ);
      rd_slot_q <= s;
    end
    if (rd_q) msg[rd_slot_q] <= ram_rdata;
    if (state == S_READ) eaddr[s] <= addr;
  end

  always_comb begin
    ram_we    = (state == S_WRITE);
    ram_waddr = eaddr[s];
    ram_wdata = res[s];
  end

  // Sequencer.
  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE;
      m     <= '0;
      s     <= '0;
      ck    <= '0;
      ca    <= 1'b0;
      cq    <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          m     <= '0;
          s     <= '0;
          state <= S_READ;
        end
        S_READ: begin
          if (s == 3'(DC - 1)) begin
            s     <= '0;
            state <= S_RLAST;
          end else begin
            s <= s + 1'b1;
          end
        end
        S_RLAST: begin
          ck    <= '0;
          ca    <= 1'b0;
          cq    <= '0;
          state <= S_CALC;
        end
        S_CALC: begin
          cq <= cq + 1'b1;
          if (cq == 4'd15) begin
            ca <= ~ca;
            if (ca) begin
              if (ck == 3'(DC - 1)) state <= S_DRAIN;
              else                  ck <= ck + 1'b1;
            end
          end
        end
        S_DRAIN: if (t3.valid && t3.last && t3.k == 3'(DC - 1) && t3.a) begin
          s     <= '0;
          state <= S_WRITE;
        end
        S_WRITE: begin
          if (s == 3'(DC - 1)) begin
            s <= '0;
            if (int'(m) == M - 1) begin
              done  <= 1'b1;
              state <= S_IDLE;
            end else begin
              m     <= m + 1'b1;
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
