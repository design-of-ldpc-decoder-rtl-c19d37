// input_cache: collects one codeword of channel values and holds it for the
// whole decode (serial to parallel conversion).
//
// The extracted watermark arrives as quantised log-likelihood ratios, one
// QW-bit signed value per accepted beat (llr_valid && llr_ready), in variable
// order 0 .. N-1.  Positive means bit 0 is more likely.  Each value is turned
// into a normalised cost pair on the way in:
//     llr >= 0 : cost0 = 0,     cost1 = llr
//     llr <  0 : cost0 = -llr,  cost1 = 0
// which is the initial likelihood L(P_i) the variable nodes start from.
// After N beats the cache is full: llr_ready drops and full rises.  It stays
// full, and is read by the VNU through the synchronous read port (data one
// cycle after raddr), until the control unit pulses release at the end of the
// decode; then the next codeword can be loaded while the previous result is
// still being read out.
module input_cache
  import ldpc_pkg::*;
#(
  parameter int Z  = ZDEF,
  parameter int N  = 6 * Z,
  parameter int NW = $clog2(N)
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic signed [QW-1:0] llr_in,
  input  logic                 llr_valid,
  output logic                 llr_ready,
  output logic                 full,
  input  logic                 release_i,
  input  logic [NW-1:0]        raddr,
  output cost_pair_t           rdata
);

  cost_pair_t      mem [N];
  logic [NW-1:0]   wptr;
  cost_pair_t      conv;

  assign llr_ready = !full;

  always_comb begin
    if (llr_in < 0) begin
      conv.c0 = W'(-int'(llr_in));
      conv.c1 = '0;
    end else begin
      conv.c0 = '0;
      conv.c1 = W'(int'(llr_in));
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wptr <= '0;
      full <= 1'b0;
    end else if (release_i) begin
      wptr <= '0;
      full <= 1'b0;
    end else if (llr_valid && llr_ready) begin
      if (int'(wptr) == N - 1) begin
        wptr <= '0;
        full <= 1'b1;
      end else begin
        wptr <= wptr + 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (llr_valid && llr_ready) mem[wptr] <= conv;
    rdata <= mem[raddr];
  end

endmodule
