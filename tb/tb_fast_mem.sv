// tb_fast_mem: random bus writes and reads against a model array; a read
// returns its word one clock later and idle cycles change nothing.
module tb_fast_mem;
  localparam int AW = 12;
  logic clk = 0;
  fe_pkg::bus_req_t req = '0;
  logic [31:0] rdata;
  logic [31:0] model [int];
  int checks = 0, failures = 0;

  fast_mem dut (.*);
  always #5 clk = ~clk;

  initial begin
    #2000000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      int a;
      bit wr;
      a  = $urandom % 64;
      wr = ($urandom % 2) || !model.exists(a);
      req.valid <= ($urandom % 5 != 0);
      req.we    <= wr;
      req.addr  <= 16'(a);
      req.wdata <= $urandom;
      @(posedge clk); #1;
      if (req.valid && wr) model[a] = req.wdata;
      else if (req.valid) begin
        checks++;
        if (rdata !== model[a]) begin failures++; $display("FAIL read %0d", a); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
