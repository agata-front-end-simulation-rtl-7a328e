// fast_mem: memory bank on the output bus that receives the event data.
//
// Word-addressed, 2^AW words of DW bits; the low AW address bits are used. A
// valid write stores wdata; a valid read returns the word on rdata after one
// clock. Size and latency are this design's choices.
module fast_mem #(
  parameter int unsigned AW = 12,
  parameter int unsigned DW = 32
) (
  input  logic             clk,
  input  fe_pkg::bus_req_t req,
  output logic [DW-1:0]    rdata
);
  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (req.valid && req.we) mem[req.addr[AW-1:0]] <= DW'(req.wdata);
    if (req.valid && !req.we) rdata <= mem[req.addr[AW-1:0]];
  end
endmodule
