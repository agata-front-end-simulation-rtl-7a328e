// tb_dpram: writes on one clock, reads on an unrelated clock. Fills the
// buffer with random words, then reads every address back (one read-clock
// latency) and compares with a model array; a second pass rewrites half the
// addresses while the other half is read.
module tb_dpram;
  localparam int D = 4096, AW = 12;
  logic wclk = 0, rclk = 0, we = 0;
  logic [AW-1:0] addr_in = 0, addr_out = 0;
  logic [15:0] data_in = 0, data_out;
  logic [15:0] model [D];
  int checks = 0, failures = 0;

  dpram dut (.*);
  always #5 wclk = ~wclk;
  always #7 rclk = ~rclk;

  initial begin
    #2000000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic rd_check(input int a);
    addr_out <= AW'(a);
    @(posedge rclk); @(posedge rclk); #1;
    checks++;
    if (data_out !== model[a]) begin failures++; $display("FAIL addr %0d: %h vs %h", a, data_out, model[a]); end
  endtask

  initial begin
    for (int a = 0; a < D; a++) begin
      model[a] = 16'($urandom);
      @(posedge wclk); we <= 1; addr_in <= AW'(a); data_in <= model[a];
    end
    @(posedge wclk); we <= 0;
    for (int a = 0; a < D; a += 7) rd_check(a);
    // write the upper half while reading the lower half
    fork
      for (int a = D/2; a < D; a++) begin
        @(posedge wclk); we <= 1; addr_in <= AW'(a); data_in <= ~16'(a);
      end
      for (int a = 0; a < D/2; a += 5) rd_check(a);
    join
    @(posedge wclk); we <= 0;
    for (int a = D/2; a < D; a++) model[a] = ~16'(a);
    for (int a = D/2; a < D; a += 3) rd_check(a);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
