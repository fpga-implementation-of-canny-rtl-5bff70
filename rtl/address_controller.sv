// address_controller: the FIFO address controller of the serial link.
//
// A four-state machine owns the write and read addresses of the memory
// buffer and the control signals between the UART and that buffer:
//   IDLE        all controls low; a pending byte goes to WR_MEM first,
//               otherwise tx_en (transmitter ready) with data in the buffer
//               goes to RD_MEM.
//   WR_MEM      wren high: the byte is written at s_wraddr, which then
//               increments.
//   RD_MEM      rden high: the memory reads s_rdaddr (registered read), and
//               the read address increments.
//   UART_WRITE  uartwrite high: the word now on the memory output is loaded
//               into the transmitter.
// rx_en marks one byte to store. It is remembered until WR_MEM is reached (at
// most two clocks later), so a byte that arrives during a read is not lost.
// The buffer is a circular FIFO of DEPTH words; a byte that finds it full is
// dropped and overflow is raised until reset.
//
// The four states, their names and the signals rx_en, tx_en, wren, rden,
// uartwrite, s_wraddr and s_rdaddr are those of the serial link this design
// follows. The write priority, the remembered request, the empty/full checks,
// the overflow flag and the single-edge timing (the write happens on the clock
// after the request) are choices of this implementation.
module address_controller #(
  parameter int DEPTH = 4096,
  parameter int AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          rx_en,
  input  logic          tx_en,
  output logic          wren,
  output logic          rden,
  output logic          uartwrite,
  output logic [AW-1:0] s_wraddr,
  output logic [AW-1:0] s_rdaddr,
  output logic          empty,
  output logic          full,
  output logic          overflow
);

  typedef enum logic [1:0] {IDLE, WR_MEM, RD_MEM, UART_WRITE} ac_state_t;

  localparam int NW = $clog2(DEPTH + 1);

  ac_state_t     state;
  logic          wr_pend;
  logic [NW-1:0] count;

  assign empty     = (count == '0);
  assign full      = (int'(count) == DEPTH);
  assign wren      = (state == WR_MEM) && !full;
  assign rden      = (state == RD_MEM);
  assign uartwrite = (state == UART_WRITE);

  function automatic logic [AW-1:0] next_addr(input logic [AW-1:0] a);
    return (int'(a) == DEPTH - 1) ? '0 : a + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= IDLE;
      wr_pend  <= 1'b0;
      count    <= '0;
      s_wraddr <= '0;
      s_rdaddr <= '0;
      overflow <= 1'b0;
    end else begin
      // A second byte arriving while one is still pending is lost.
      if (rx_en && wr_pend && state != WR_MEM) overflow <= 1'b1;
      if (rx_en) wr_pend <= 1'b1;
      else if (state == WR_MEM) wr_pend <= 1'b0;

      unique case (state)
        IDLE: begin
          if (wr_pend)              state <= WR_MEM;
          else if (tx_en && !empty) state <= RD_MEM;
        end
        WR_MEM: begin
          if (full) overflow <= 1'b1;
          else      s_wraddr <= next_addr(s_wraddr);
          state <= IDLE;
        end
        RD_MEM: begin
          s_rdaddr <= next_addr(s_rdaddr);
          state    <= UART_WRITE;
        end
        UART_WRITE: state <= IDLE;
      endcase

      count <= NW'(int'(count) + (wren ? 1 : 0) - (rden ? 1 : 0));
    end
  end

endmodule
