// tb_out_bus: random requests from two masters and random grants; the slave
// must see exactly the granted master's request (nothing when no grant) and
// every master must see the slave's read data.
module tb_out_bus;
  fe_pkg::bus_req_t m_req [2];
  logic [1:0] gnt;
  fe_pkg::bus_req_t s_req;
  logic [31:0] s_rdata, m_rdata;
  int checks = 0, failures = 0;

  out_bus #(.NM(2)) dut (.*);

  initial begin
    #100000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int n = 0; n < 500; n++) begin
      fe_pkg::bus_req_t exp_r;
      m_req[0] = fe_pkg::bus_req_t'({$urandom, $urandom});
      m_req[1] = fe_pkg::bus_req_t'({$urandom, $urandom});
      case ($urandom % 3) 0: gnt = 2'b00; 1: gnt = 2'b01; default: gnt = 2'b10; endcase
      s_rdata = $urandom;
      #1;
      exp_r = (gnt == 2'b01) ? m_req[0] : (gnt == 2'b10) ? m_req[1] : '0;
      checks++; if (s_req !== exp_r) begin failures++; $display("FAIL request routing"); end
      checks++; if (m_rdata !== s_rdata) begin failures++; $display("FAIL read data"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
