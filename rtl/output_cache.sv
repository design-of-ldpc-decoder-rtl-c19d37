// output_cache: holds the soft decisions of one codeword and sends them out
// one per clock (parallel to serial conversion).
//
// The VNU writes the a-posteriori cost pair of each variable (write port,
// one pair per write).  A start pulse from the control unit begins the
// read-out: the pairs of variables 0 .. N-1 leave in order on a valid/ready
// stream, soft_last marking variable N-1; busy is high from start until the
// last pair has been taken.  The array is read combinationally (a
// distributed RAM), so a pair can leave on every cycle that soft_ready is
// high.  Writing while busy is the caller's error; the control unit never
// starts a decode until the read-out is over.
module output_cache
  import ldpc_pkg::*;
#(
  parameter int Z  = ZDEF,
  parameter int N  = 6 * Z,
  parameter int NW = $clog2(N)
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           we,
  input  logic [NW-1:0]  waddr,
  input  cost_pair_t     wdata,
  input  logic           start,
  output logic           busy,
  output cost_pair_t     soft_data,
  output logic           soft_valid,
  output logic           soft_last,
  input  logic           soft_ready
);

  cost_pair_t     mem [N];
  logic [NW-1:0]  rptr;

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      busy <= 1'b0;
      rptr <= '0;
    end else if (!busy) begin
      if (start) begin
        busy <= 1'b1;
        rptr <= '0;
      end
    end else if (soft_ready) begin
      if (int'(rptr) == N - 1) begin
        busy <= 1'b0;
        rptr <= '0;
      end else begin
        rptr <= rptr + 1'b1;
      end
    end
  end

  assign soft_valid = busy;
  assign soft_last  = busy && (int'(rptr) == N - 1);
  assign soft_data  = mem[rptr];

  a_no_write_while_busy: assert property (@(posedge clk) disable iff (rst) !(busy && we))
    else $error("output_cache written during read-out");

endmodule
