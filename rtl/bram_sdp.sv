// bram_sdp: simple dual-port block memory (one write port, one read port).
//
// This is the memory from which every buffer of the detector is built: the
// FIFO buffer of the serial link and the parallel line buffers of each
// processing stage. Port A writes DW-bit words when wea is high; port B
// returns the word at addrb one clock after enb (registered read, as a
// BlockRAM does). A read and a write to the same address in one clock return
// the old word (read-first). Contents are not reset; the design never reads a
// word it has not written.
//
// Block memories with a write port A and a read port B (wea, dina, addrb,
// doutb) are what the design this follows uses throughout; read-first
// behaviour is a choice of this implementation.
module bram_sdp #(
  parameter int DW    = 8,
  parameter int DEPTH = 4096,
  parameter int AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          wea,
  input  logic [AW-1:0] addra,
  input  logic [DW-1:0] dina,
  input  logic          enb,
  input  logic [AW-1:0] addrb,
  output logic [DW-1:0] doutb
);

  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wea) mem[addra] <= dina;
  end

  always_ff @(posedge clk) begin
    if (enb) doutb <= mem[addrb];
  end

endmodule
