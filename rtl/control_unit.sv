// control_unit: top-level control of the decoder.
//
// It starts the units in turn and watches for each to report completion:
//   1. wait until a decode was requested (start_decode pulse, remembered
//      until it can be served), the input cache is full and the output cache
//      has finished sending the previous codeword;
//   2. initialisation: the VNU with init set copies every channel value onto
//      the variable's three edges;
//   3. one iteration = a CNU pass over all checks, then a VNU pass over all
//      variables; the iteration counter starts at 1 and the loop ends after
//      MAX_ITER (10) iterations;
//   4. finish: pulse decode_over, release the input cache for the next
//      codeword and start the output cache read-out.
// var_phase tells the address control which unit is addressing the edge
// RAM.  clear_out pulses when a decode starts, clearing code_out_over.
// The fixed iteration count follows the decoder description; there is no
// early stop on a satisfied parity check because none is described.
module control_unit
  import ldpc_pkg::*;
#(
  parameter int MAX_ITER_P = MAX_ITER,
  parameter int IW         = $clog2(MAX_ITER_P + 1)
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           start_decode,
  input  logic           in_full,
  input  logic           out_busy,
  output logic           cnu_start,
  input  logic           cnu_done,
  output logic           vnu_start,
  output logic           vnu_init,
  input  logic           vnu_done,
  output logic           var_phase,
  output logic           decode_over,
  output logic           in_release,
  output logic           out_start,
  output logic           clear_out,
  output logic           busy,
  output logic [IW-1:0]  iter
);

  typedef enum logic [2:0] {S_IDLE, S_INIT, S_CNU, S_VNU, S_FINISH} state_t;

  state_t state;
  logic   pending;
  logic   launched;   // the running phase's unit has been started

  assign busy      = (state != S_IDLE);
  assign var_phase = (state == S_INIT) || (state == S_VNU);
  assign vnu_init  = (state == S_INIT);

  always_comb begin
    cnu_start = (state == S_CNU) && !launched;
    vnu_start = (state == S_INIT || state == S_VNU) && !launched;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state       <= S_IDLE;
      pending     <= 1'b0;
      launched    <= 1'b0;
      iter        <= '0;
      decode_over <= 1'b0;
      in_release  <= 1'b0;
      out_start   <= 1'b0;
      clear_out   <= 1'b0;
    end else begin
      decode_over <= 1'b0;
      in_release  <= 1'b0;
      out_start   <= 1'b0;
      clear_out   <= 1'b0;
      if (start_decode) pending <= 1'b1;
      if (cnu_start || vnu_start) launched <= 1'b1;
      unique case (state)
        S_IDLE: if ((pending || start_decode) && in_full && !out_busy) begin
          pending   <= 1'b0;
          launched  <= 1'b0;
          iter      <= '0;
          clear_out <= 1'b1;
          state     <= S_INIT;
        end
        S_INIT: if (vnu_done) begin
          launched <= 1'b0;
          iter     <= IW'(1);
          state    <= S_CNU;
        end
        S_CNU: if (cnu_done) begin
          launched <= 1'b0;
          state    <= S_VNU;
        end
        S_VNU: if (vnu_done) begin
          launched <= 1'b0;
          if (int'(iter) == MAX_ITER_P) begin
            state <= S_FINISH;
          end else begin
            iter  <= iter + 1'b1;
            state <= S_CNU;
          end
        end
        S_FINISH: begin
          decode_over <= 1'b1;
          in_release  <= 1'b1;
          out_start   <= 1'b1;
          state       <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
