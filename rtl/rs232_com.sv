// rs232_com: serial link between the host computer and the detector.
//
// A UART receiver and transmitter share a FIFO memory buffer whose addresses
// are managed by address_controller. With loopback high the buffer stores the
// bytes received from the host and sends them back, the frame echo used to
// test the link. With loopback low the received bytes are handed to the
// detector on rx_data/rx_valid, and the buffer stores the bytes offered on
// px_data/px_valid (the detector's output pixels) and sends them to the host.
// A byte to be stored is held in a register until the controller's WR_MEM
// state writes it.
//
// Timing: a received byte is written 2 to 4 clocks after rx_valid; a stored
// byte is handed to the transmitter 3 clocks after the transmitter and the
// controller are both idle.
//
// The three parts (UART, FIFO block memory buffer, address controller) and
// the echo test follow the design this implements. The detector mode and the
// byte holding register are choices of this implementation.
module rs232_com #(
  parameter int CLKS_PER_BIT = 868,
  parameter int FIFO_DEPTH   = 4096
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       loopback,
  input  logic       rxd,
  output logic       txd,
  output logic       rx_valid,
  output logic [7:0] rx_data,
  input  logic       px_valid,
  input  logic [7:0] px_data,
  output logic       overflow
);

  localparam int AW = $clog2(FIFO_DEPTH);

  logic          rx_v, tx_ready;
  logic [7:0]    rx_b, byte_hold, mem_dout;
  logic          store_en, wren, rden, uartwrite;
  logic [AW-1:0] wraddr, rdaddr;

  uart_rx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_rx (
    .clk, .rst, .rxd, .rx_valid(rx_v), .rx_data(rx_b), .rx_frame_err()
  );

  assign rx_valid = rx_v && !loopback;
  assign rx_data  = rx_b;
  assign store_en = loopback ? rx_v : px_valid;

  always_ff @(posedge clk) begin
    if (store_en) byte_hold <= loopback ? rx_b : px_data;
  end

  address_controller #(.DEPTH(FIFO_DEPTH)) u_ctrl (
    .clk, .rst,
    .rx_en(store_en), .tx_en(tx_ready),
    .wren, .rden, .uartwrite,
    .s_wraddr(wraddr), .s_rdaddr(rdaddr),
    .empty(), .full(), .overflow
  );

  bram_sdp #(.DW(8), .DEPTH(FIFO_DEPTH)) u_buffer (
    .clk, .wea(wren), .addra(wraddr), .dina(byte_hold),
    .enb(rden), .addrb(rdaddr), .doutb(mem_dout)
  );

  uart_tx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_tx (
    .clk, .rst, .tx_start(uartwrite), .tx_data(mem_dout), .tx_ready, .txd
  );

endmodule
