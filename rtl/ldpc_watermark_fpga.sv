// ldpc_watermark_fpga: the FPGA side of the image-watermark receiver.
//
// The watermark bits extracted from the marked image arrive from the host as
// quantised LLRs, one codeword of N = 6Z values at a time.  The LDPC decoder
// corrects them and its decoded bits are packed into bytes and returned to
// the host over a UART (uart_txd), where the watermark image is rebuilt.
// The decoder's status and its bit stream are also brought out
// (decode_over, code, code_valid, code_ready, code_out_over) so they can be
// watched directly; a bit is taken by the serial port when code_valid and
// code_ready are both high.  Timing: see decoder and serial_port; with the
// default 434 clocks per UART bit, sending one codeword (13 bytes) takes
// about 56,000 clocks, under half of one decode.
module ldpc_watermark_fpga
  import ldpc_pkg::*;
#(
  parameter int Z            = ZDEF,
  parameter int MAX_ITER_P   = MAX_ITER,
  parameter int CLKS_PER_BIT = 434,
  parameter int IW           = $clog2(MAX_ITER_P + 1)
) (
  input  logic                 clk,
  input  logic                 reset,
  input  logic signed [QW-1:0] llr_in,
  input  logic                 llr_valid,
  output logic                 llr_ready,
  input  logic                 start_decode,
  output logic                 decode_over,
  output logic                 busy,
  output logic [IW-1:0]        iter,
  output logic                 code,
  output logic                 code_valid,
  output logic                 code_ready,
  output logic                 code_out_over,
  output logic                 uart_txd
);

  logic code_last;

  decoder #(.Z(Z), .MAX_ITER_P(MAX_ITER_P)) decoder_1 (
    .clk          (clk),
    .reset        (reset),
    .llr_in       (llr_in),
    .llr_valid    (llr_valid),
    .llr_ready    (llr_ready),
    .start_decode (start_decode),
    .decode_over  (decode_over),
    .code         (code),
    .code_valid   (code_valid),
    .code_last    (code_last),
    .code_ready   (code_ready),
    .code_out_over(code_out_over),
    .busy         (busy),
    .iter         (iter)
  );

  serial_port #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_serial (
    .clk       (clk),
    .rst       (reset),
    .code      (code),
    .code_valid(code_valid),
    .code_last (code_last),
    .code_ready(code_ready),
    .txd       (uart_txd)
  );

endmodule
