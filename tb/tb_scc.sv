// tb_scc: local trigger.
// Directed part: a flat trace must never trigger; a rising ramp must give one
// trigger of exactly hold_time cycles, starting two clocks after the sample
// that puts the first ramp sample in the middle of the window.
// Random part: noisy exponential pulses, compared cycle by cycle with a
// model that follows the counting rule: count the earlier four samples below
// the middle one and the later four above it; the trigger goes high two
// clocks after the window is seen with count >= threshold, if armed.
module tb_scc;
  logic clk = 0, reset = 1;
  logic [13:0] data_in = 0;
  logic [11:0] threshold = 8;
  logic [9:0]  hold_time = 5;
  logic trigger_request, local_trigger;
  int checks = 0, failures = 0, ntrig = 0;

  scc dut (.*);
  always #5 clk = ~clk;

  initial begin
    #2000000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // model state
  int hist[$];           // samples in the window, oldest first
  int res_q = 0, hold = 0; bit armed = 0;

  function automatic int count_win();
    int c = 0;
    if (hist.size() < 9) return 0;
    for (int i = 0; i < 4; i++) if (hist[i] < hist[4]) c++;
    for (int i = 5; i < 9; i++) if (hist[i] > hist[4]) c++;
    return c;
  endfunction

  // drive one sample, advance one clock, update model and compare
  task automatic step(input int s);
    bit hit;
    data_in <= 14'(s);
    @(posedge clk);
    hit = (res_q >= threshold);
    if (!hit) armed = 1;
    if (hold != 0) hold--;
    else if (hit && armed && hold_time != 0) begin hold = hold_time; armed = 0; end
    res_q = count_win();       // count of the window before this edge
    hist.push_back(s); if (hist.size() > 9) void'(hist.pop_front());
    #1;
    chk(trigger_request == (hold != 0), "trigger_request vs model");
    chk(local_trigger == trigger_request, "local_trigger");
    if (trigger_request && hold == hold_time) ntrig++;
  endtask

  initial begin
    for (int i = 0; i < 9; i++) hist.push_back(0);
    repeat (3) @(posedge clk);
    reset <= 0;
    // flat: never triggers
    for (int i = 0; i < 40; i++) step(100);
    chk(ntrig == 0, "flat trace triggered");
    // ramp: one trigger of hold_time cycles
    begin
      int first = -1, len = 0;
      for (int i = 0; i < 30; i++) begin
        step(100 + 10*(i+1));
        if (trigger_request) begin if (first < 0) first = i; len++; end
      end
      for (int i = 0; i < 20; i++) begin step(400); if (trigger_request) len++; end
      // count reaches 8 once the first ramp sample is the middle one (i=4:
      // four flat samples below it, four ramp samples above); the count is
      // registered at the next clock and the trigger rises one clock later
      chk(first == 6, $sformatf("ramp trigger start %0d", first));
      chk(len == 5, $sformatf("ramp trigger length %0d", len));
    end
    // noisy pulses, random threshold and hold
    for (int p = 0; p < 40; p++) begin
      threshold = 12'(5 + $urandom % 4);
      hold_time = 10'(1 + $urandom % 12);
      for (int i = 0; i < 120; i++) begin
        real a;
        a = (i < 10) ? 0.0 : 2000.0 * $exp(-(i-10)/40.0);
        step(500 + $rtoi(a) + int'($urandom % 7) - 3);
      end
    end
    chk(ntrig >= 20, $sformatf("too few triggers on pulses: %0d", ntrig));
    $display("triggers seen: %0d", ntrig);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
