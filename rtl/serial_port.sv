// serial_port: sends the decoded bit stream back to the PC over a UART.
//
// Decoded bits arrive on a valid/ready stream (code, code_valid, code_last)
// and are packed eight to a byte, the first bit in bit 0.  When code_last
// arrives a partly filled byte is sent at once with its upper bits zero, so
// every codeword starts on a byte boundary (a 102-bit codeword takes 13
// bytes).  Full bytes go to uart_tx; the stream is stalled (code_ready low)
// while a byte waits for the transmitter.  That the decoder's output goes to
// the computer over a serial port is the design's; the packing, padding and
// frame format are this design's choice.
module serial_port #(
  parameter int CLKS_PER_BIT = 434
) (
  input  logic clk,
  input  logic rst,
  input  logic code,
  input  logic code_valid,
  input  logic code_last,
  output logic code_ready,
  output logic txd
);

  logic [7:0] shreg;
  logic [2:0] nbits;
  logic [7:0] byte_q;
  logic       byte_valid;
  logic       tx_ready;

  assign code_ready = !byte_valid;

  always_ff @(posedge clk) begin
    if (rst) begin
      shreg      <= '0;
      nbits      <= '0;
      byte_q     <= '0;
      byte_valid <= 1'b0;
    end else begin
      if (byte_valid && tx_ready) byte_valid <= 1'b0;
      if (code_valid && code_ready) begin
        if (nbits == 3'd7 || code_last) begin
          byte_q     <= (shreg | (8'(code) << nbits));
          byte_valid <= 1'b1;
          shreg      <= '0;
          nbits      <= '0;
        end else begin
          shreg <= shreg | (8'(code) << nbits);
          nbits <= nbits + 1'b1;
        end
      end
    end
  end

  uart_tx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_tx (
    .clk     (clk),
    .rst     (rst),
    .tx_data (byte_q),
    .tx_valid(byte_valid),
    .tx_ready(tx_ready),
    .txd     (txd)
  );

endmodule
