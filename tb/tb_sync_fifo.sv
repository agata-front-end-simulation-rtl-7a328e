// tb_sync_fifo: random pushes and pops against a queue model; checks the
// head word, empty, full and count every cycle, including writes while full
// and reads while empty (which must be ignored).
module tb_sync_fifo;
  localparam int W = 16, D = 8;
  logic clk = 0, rst = 1, wr_en = 0, rd_en = 0;
  logic [W-1:0] wdata = 0, rdata;
  logic empty, full;
  logic [$clog2(D):0] count;
  int checks = 0, failures = 0;
  logic [W-1:0] q[$];

  sync_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000; failures++; $display("watchdog"); 
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int n = 0; n < 3000; n++) begin
      // bias towards filling in the first half, draining in the second
      wr_en <= ($urandom % 100) < (n < 1500 ? 70 : 30);
      rd_en <= ($urandom % 100) < (n < 1500 ? 30 : 70);
      wdata <= W'($urandom);
      @(posedge clk);
      // model the edge that just happened
      begin
        bit did_rd;
        did_rd = rd_en && q.size() > 0;
        if (did_rd) void'(q.pop_front());
        if (wr_en && (q.size() + (did_rd ? 1 : 0)) < D) q.push_back(wdata);
      end
      #1;
      chk(count == q.size(), "count");
      chk(empty == (q.size() == 0), "empty");
      chk(full == (q.size() == D), "full");
      if (q.size() > 0) chk(rdata == q[0], "head");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
