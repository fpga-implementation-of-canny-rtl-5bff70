// uart_rx: RS-232 receiver, 8 data bits, no parity, one stop bit (8N1).
//
// The serial input is brought into the clock domain by two flip-flops. A
// falling edge starts a frame; the line is sampled half a bit later to confirm
// the start bit and then once per bit period (CLKS_PER_BIT clocks) for the
// eight data bits, LSB first, and the stop bit. A byte with a valid (high)
// stop bit is presented on rx_data with a one-clock rx_valid pulse; a frame
// whose stop bit is low is dropped and flagged with a one-clock rx_frame_err.
// The default bit period is 100 MHz / 115200 baud.
//
// The serial link of the design this follows uses a UART taken from
// elsewhere; the 8N1 format, the baud rate and this receiver are choices of
// this implementation.
module uart_rx #(
  parameter int CLKS_PER_BIT = 868
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       rxd,
  output logic       rx_valid,
  output logic [7:0] rx_data,
  output logic       rx_frame_err
);

  typedef enum logic [1:0] {RX_IDLE, RX_START, RX_DATA, RX_STOP} rx_state_t;

  localparam int TW = $clog2(CLKS_PER_BIT + 1);

  rx_state_t   state;
  logic [TW-1:0] timer;
  logic [2:0]  bit_idx;
  logic [7:0]  shreg;
  logic        rxd_m, rxd_s;

  always_ff @(posedge clk) begin
    if (rst) begin
      rxd_m <= 1'b1;
      rxd_s <= 1'b1;
    end else begin
      rxd_m <= rxd;
      rxd_s <= rxd_m;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state        <= RX_IDLE;
      timer        <= '0;
      bit_idx      <= '0;
      shreg        <= '0;
      rx_valid     <= 1'b0;
      rx_data      <= '0;
      rx_frame_err <= 1'b0;
    end else begin
      rx_valid     <= 1'b0;
      rx_frame_err <= 1'b0;
      unique case (state)
        RX_IDLE: begin
          timer <= '0;
          if (!rxd_s) state <= RX_START;
        end
        RX_START: begin
          if (int'(timer) == CLKS_PER_BIT / 2 - 1) begin
            timer   <= '0;
            bit_idx <= '0;
            state   <= rxd_s ? RX_IDLE : RX_DATA;   // a glitch is not a start bit
          end else begin
            timer <= timer + 1'b1;
          end
        end
        RX_DATA: begin
          if (int'(timer) == CLKS_PER_BIT - 1) begin
            timer   <= '0;
            shreg   <= {rxd_s, shreg[7:1]};
            bit_idx <= bit_idx + 1'b1;
            if (bit_idx == 3'd7) state <= RX_STOP;
          end else begin
            timer <= timer + 1'b1;
          end
        end
        RX_STOP: begin
          if (int'(timer) == CLKS_PER_BIT - 1) begin
            timer <= '0;
            state <= RX_IDLE;
            if (rxd_s) begin
              rx_valid <= 1'b1;
              rx_data  <= shreg;
            end else begin
              rx_frame_err <= 1'b1;
            end
          end else begin
            timer <= timer + 1'b1;
          end
        end
      endcase
    end
  end

endmodule
