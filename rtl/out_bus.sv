// out_bus: the shared output bus between the bus masters (the carrier's DMA
// controller and the CPU) and the fast memory.
//
// The request of the master holding the grant is passed to the slave; the
// requests of the others are masked. Read data from the slave is returned to
// every master. Purely combinational. A request struct per master
// (fe_pkg::bus_req_t) is this design's choice of bus signals.
module out_bus #(
  parameter int unsigned NM = 2
) (
  input  fe_pkg::bus_req_t m_req [NM],
  input  logic [NM-1:0]    gnt,
  output fe_pkg::bus_req_t s_req,
  input  logic [31:0]      s_rdata,
  output logic [31:0]      m_rdata
);
  always_comb begin
    s_req = '0;
    for (int i = 0; i < NM; i++)
      if (gnt[i]) s_req = m_req[i];
  end
  assign m_rdata = s_rdata;
endmodule
