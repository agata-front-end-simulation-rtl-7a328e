// dpram: dual-port, dual-clock output buffer of the carrier.
//
// The readout engine writes 16-bit words on the global clock; the DMA
// controller reads them on the bus clock with one cycle of latency
// (data_out is registered). The two halves of the buffer are used as a
// ping-pong pair by the readout engine and the DMA controller; the memory
// itself knows nothing of that. Size and word width follow the document's
// output buffer; the read latency is this design's choice.
module dpram #(
  parameter int unsigned DEPTH = fe_pkg::RO_BUFSIZE,
  parameter int unsigned WIDTH = 16
) (
  input  logic                     wclk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] addr_in,
  input  logic [WIDTH-1:0]         data_in,
  input  logic                     rclk,
  input  logic [$clog2(DEPTH)-1:0] addr_out,
  output logic [WIDTH-1:0]         data_out
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge wclk) begin
    if (we) mem[addr_in] <= data_in;
  end

  always_ff @(posedge rclk) begin
    data_out <= mem[addr_out];
  end
endmodule
