// uart_tx: asynchronous serial transmitter, 8 data bits, no parity, one stop
// bit, least significant bit first.
//
// A byte is taken when tx_valid && tx_ready; tx_ready is low while the frame
// (start bit, 8 data bits, stop bit, CLKS_PER_BIT clocks each) is on the line.
// txd idles high.  The default divider, 434, gives 115200 baud from a 50 MHz
// clock; frame format and rate are this design's choice.
module uart_tx #(
  parameter int CLKS_PER_BIT = 434,
  parameter int CW           = $clog2(CLKS_PER_BIT)
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [7:0] tx_data,
  input  logic       tx_valid,
  output logic       tx_ready,
  output logic       txd
);

  logic [9:0]    frame;   // stop, data[7:0], start - shifted out from bit 0
  logic [3:0]    bits_left;
  logic [CW-1:0] cnt;

  assign tx_ready = (bits_left == 4'd0);

  always_ff @(posedge clk) begin
    if (rst) begin
      frame     <= '1;
      bits_left <= '0;
      cnt       <= '0;
      txd       <= 1'b1;
    end else if (tx_ready) begin
      txd <= 1'b1;
      if (tx_valid) begin
        frame     <= {1'b1, tx_data, 1'b0};
        bits_left <= 4'd10;
        cnt       <= '0;
        txd       <= 1'b0;
      end
    end else begin
      if (int'(cnt) == CLKS_PER_BIT - 1) begin
        cnt       <= '0;
        bits_left <= bits_left - 1'b1;
        frame     <= {1'b1, frame[9:1]};
        txd       <= (bits_left == 4'd1) ? 1'b1 : frame[1];
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end

endmodule
