// tb_gts_if: sends fiber words and checks the decoded outputs one clock
// later: timestamp counting and its CC reset, L1A pulses with the event
// number counting up and its EC reset, command loading, the reset pulse and
// the returned fiber word carrying trigger_request and backpressure.
module tb_gts_if;
  logic gclk = 0, local_rst = 1, trigger_request = 0, backpressure = 0;
  logic [15:0] fiber_in = 0, fiber_out;
  logic L1A, rst;
  logic [47:0] timestamp;
  logic [23:0] event_num;
  logic [7:0]  cmd;
  int checks = 0, failures = 0;

  gts_if dut (.*);
  always #5 gclk = ~gclk;

  initial begin
    #200000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic send(input logic [7:0] op, input logic [7:0] arg);
    fiber_in = {op, arg};
    @(posedge gclk); #1;
    fiber_in = 0;
  endtask

  initial begin
    longint ts0;
    repeat (3) @(posedge gclk); #1;
    chk(rst && timestamp == 0 && event_num == 0 && !L1A, "reset state");
    local_rst <= 0;
    @(posedge gclk); #1;
    chk(!rst && timestamp == 1, "count starts");
    repeat (10) @(posedge gclk); #1;
    chk(timestamp == 11, $sformatf("timestamp %0d", timestamp));
    send(8'h01, 0);
    chk(L1A && event_num == 1, "L1A 1");
    @(posedge gclk); #1;
    chk(!L1A && event_num == 1, "L1A is one clock");
    send(8'h01, 0); chk(L1A && event_num == 2, "L1A 2");
    send(8'h03, 0); chk(event_num == 0 && !L1A, "EC reset");
    send(8'h01, 0); chk(event_num == 1, "count after EC reset");
    ts0 = timestamp;
    send(8'h02, 0); chk(timestamp == 0, "CC reset");
    @(posedge gclk); #1; chk(timestamp == 1, "count after CC reset");
    send(8'h04, 8'h5A); chk(cmd == 8'h5A, "cmd load");
    @(posedge gclk); #1; chk(cmd == 8'h5A, "cmd held");
    send(8'h05, 0); chk(rst, "reset pulse");
    @(posedge gclk); #1; chk(!rst, "reset is one clock");
    trigger_request <= 1; backpressure <= 0;
    @(posedge gclk); #1; chk(fiber_out == 16'h0001, "fiber_out trigger");
    trigger_request <= 0; backpressure <= 1;
    @(posedge gclk); #1; chk(fiber_out == 16'h0002, "fiber_out backpressure");
    // event counter wraps at 24 bits: not reached here, but counts many
    for (int i = 0; i < 100; i++) send(8'h01, 0);
    chk(event_num == 101, $sformatf("event_num %0d", event_num));
    chk(ts0 > 0, "timestamp ran");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
