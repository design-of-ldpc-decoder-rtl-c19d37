// decoding_decision: turns the soft decisions into the decoded bit stream.
//
// Each a-posteriori cost pair becomes one bit: 1 when the cost of 1 is the
// smaller, 0 otherwise (a tie gives 0).  The bit is registered and offered on
// code / code_valid with code_ready back-pressure (a one-entry pipeline
// register: a new pair is taken whenever the register is empty or being
// emptied).  code_last marks the last bit of the codeword.  code_out_over
// rises in the cycle after the last bit has been taken and stays high until
// clear (the start of the next decode): the "all decoding information read
// out" indication.
module decoding_decision
  import ldpc_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        clear,
  input  cost_pair_t  soft_data,
  input  logic        soft_valid,
  input  logic        soft_last,
  output logic        soft_ready,
  output logic        code,
  output logic        code_valid,
  output logic        code_last,
  input  logic        code_ready,
  output logic        code_out_over
);

  assign soft_ready = !code_valid || code_ready;

  always_ff @(posedge clk) begin
    if (rst) begin
      code          <= 1'b0;
      code_valid    <= 1'b0;
      code_last     <= 1'b0;
      code_out_over <= 1'b0;
    end else begin
      if (soft_ready) begin
        code_valid <= soft_valid;
        if (soft_valid) begin
          code      <= (soft_data.c1 < soft_data.c0);
          code_last <= soft_last;
        end
      end
      if (clear)
        code_out_over <= 1'b0;
      else if (code_valid && code_ready && code_last)
        code_out_over <= 1'b1;
    end
  end

  a_code_stable: assert property (@(posedge clk) disable iff (rst)
      code_valid && !code_ready |=> code_valid && $stable(code) && $stable(code_last))
    else $error("decoded bit changed while stalled");

endmodule
