// tb_async_fifo: two unrelated clocks; the writer pushes a numbered sequence
// whenever the FIFO is not full, the reader pops at random whenever it is
// not empty; every word must arrive once, in order, and the FIFO must never
// report more than DEPTH words in flight.
module tb_async_fifo;
  localparam int W = 8, D = 2, N = 300;
  logic wclk = 0, rclk = 0, wrst = 1, rrst = 1;
  logic wr_en = 0, rd_en = 0, full, empty;
  logic [W-1:0] wdata = 0, rdata;
  int checks = 0, failures = 0, sent = 0, got = 0;

  async_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 wclk = ~wclk;
  always #7 rclk = ~rclk;

  initial begin
    #200000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // writer
  initial begin
    repeat (4) @(posedge wclk);
    wrst <= 0;
    while (sent < N) begin
      #1;
      if (!full && ($urandom % 4 != 0)) begin
        wr_en <= 1; wdata <= W'(sent); sent++;
      end else wr_en <= 0;
      @(posedge wclk);
      checks++;
      if (sent - got > D + 1) begin failures++; $display("FAIL overfill"); end
    end
    wr_en <= 0;
  end

  // reader
  initial begin
    repeat (4) @(posedge rclk);
    rrst <= 0;
    while (got < N) begin
      #1;
      if (!empty && ($urandom % 3 != 0)) begin
        checks++;
        if (rdata !== W'(got)) begin failures++; $display("FAIL got %0d exp %0d", rdata, got); end
        got++;
        rd_en <= 1;
      end else rd_en <= 0;
      @(posedge rclk);
    end
    rd_en <= 0;
    repeat (10) @(posedge rclk);
    checks++; if (!empty) begin failures++; $display("FAIL not empty at end"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
