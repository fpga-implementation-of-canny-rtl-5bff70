// uart_tx: RS-232 transmitter, 8 data bits, no parity, one stop bit (8N1).
//
// tx_ready is high while the transmitter is idle. A one-clock tx_start with
// tx_ready high loads tx_data; the byte is then sent as a low start bit, the
// eight data bits LSB first and a high stop bit, each CLKS_PER_BIT clocks
// long, after which tx_ready returns high. txd idles high.
//
// As for uart_rx, the format, baud rate and structure are choices of this
// implementation. Bit 0 of the frame register holds the start bit, which txd
// takes directly when the byte is loaded, so that bit is never read (a lint
// warning that stands).
module uart_tx #(
  parameter int CLKS_PER_BIT = 868
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       tx_start,
  input  logic [7:0] tx_data,
  output logic       tx_ready,
  output logic       txd
);

  localparam int TW = $clog2(CLKS_PER_BIT + 1);

  logic [9:0]    frame;     // stop, data[7:0], start; shifted out LSB first
  logic [3:0]    bits_left;
  logic [TW-1:0] timer;

  assign tx_ready = (bits_left == 4'd0);

  always_ff @(posedge clk) begin
    if (rst) begin
      frame     <= '1;
      bits_left <= '0;
      timer     <= '0;
      txd       <= 1'b1;
    end else if (bits_left == 4'd0) begin
      txd <= 1'b1;
      if (tx_start) begin
        frame     <= {1'b1, tx_data, 1'b0};
        bits_left <= 4'd10;
        timer     <= '0;
        txd       <= 1'b0;
      end
    end else if (int'(timer) == CLKS_PER_BIT - 1) begin
      timer     <= '0;
      bits_left <= bits_left - 1'b1;
      frame     <= {1'b1, frame[9:1]};
      txd       <= (bits_left == 4'd1) ? 1'b1 : frame[1];
    end else begin
      timer <= timer + 1'b1;
    end
  end

endmodule
