// tb_trigger_matching: the matching machine against queue models of its
// three FIFOs (L1A times, pulse buffer, event FIFO). The event FIFO reports
// full at random, so every copy also exercises the stall. With latency 100
// and window 20 the script covers: pulses older than the window (discarded),
// a pulse inside (matched), a newer one (left for the next L1A), a pulse that
// arrives while the window is still open (waited for), a misaligned word
// (error, dropped), a window that spans the 16-bit timestamp rollover, and
// an L1A that matches nothing. The full event stream is compared word by
// word with the expected one, and the counters are checked.
module tb_trigger_matching;
  localparam int PL = 64;
  logic clk = 0, rst = 1;
  logic [15:0] timestamp_lsw = 0, L1A_latency = 100, matching_window = 20;
  fe_pkg::ch_word_t ch_head = '0;
  logic ch_empty = 1, read_enable_c;
  logic [15:0] tst_head = 0;
  logic tst_empty = 1, read_enable_t;
  logic write_enable_ev, ev_full = 0, latch_energy;
  fe_pkg::ev_word_t ev_data;
  logic [15:0] n_matched, n_discarded, n_errors;
  int checks = 0, failures = 0, nlatch = 0, nstall = 0;

  trigger_matching #(.PULSE_LEN(PL)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #5000000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  logic [16:0] chq[$];
  logic [15:0] tq[$];
  logic [17:0] evq[$], expq[$];

  always @(posedge clk) begin
    timestamp_lsw <= timestamp_lsw + 1'b1;
    if (!rst) begin
    if (read_enable_c) void'(chq.pop_front());
    if (read_enable_t) void'(tq.pop_front());
    if (write_enable_ev) begin
      if (ev_full) begin failures++; $display("FAIL write while full"); end
      evq.push_back(ev_data);
    end
    if (latch_energy) nlatch++;
    end
    if (ev_full && !rst) nstall++;
    ev_full   <= ($urandom % 10) < 3;
    ch_empty  <= (chq.size() == 0);
    ch_head   <= (chq.size() != 0) ? chq[0] : '0;
    tst_empty <= (tq.size() == 0);
    tst_head  <= (tq.size() != 0) ? tq[0] : '0;
  end

  task automatic push_pulse(input int t, input int id, input bit expect_match);
    chq.push_back({1'b1, 16'(t)});
    for (int k = 0; k < PL; k++) chq.push_back({1'b0, 16'(id*100 + k)});
    if (expect_match) exp_pulse(t, id);
  endtask

  task automatic exp_pulse(input int t, input int id);
    expq.push_back({fe_pkg::EV_SOF, 16'(t)});
    for (int k = 0; k < PL; k++) expq.push_back({fe_pkg::EV_SAMPLE, 16'(id*100 + k)});
  endtask

  task automatic expect_eoe(input int n);
    expq.push_back({fe_pkg::EV_EOE, 16'(n)});
  endtask

  task automatic wait_done(input int n_eoe);
    int seen;
    do begin
      @(posedge clk);
      seen = 0;
      foreach (evq[i]) if (evq[i][17:16] == fe_pkg::EV_EOE) seen++;
    end while (seen < n_eoe);
    repeat (3) @(posedge clk);
  endtask

  initial begin
    int tnow;
    repeat (3) @(posedge clk);
    rst <= 0;
    // L1A 1 at 310: window [210,230]
    push_pulse(50, 1, 0); push_pulse(200, 2, 0); push_pulse(210, 3, 1);
    push_pulse(300, 4, 0);            // newer now, matched by L1A 2
    expect_eoe(1);
    tq.push_back(16'd310);
    wait_done(1);
    chk(chq.size() == PL + 1, "pulse 300 must stay buffered");
    // L1A 2 at 400: window [300,320]
    exp_pulse(300, 4); expect_eoe(1);
    tq.push_back(16'd400);
    wait_done(2);
    // L1A 3: window opens now; the pulse arrives 5 clocks later
    tnow = timestamp_lsw;
    tq.push_back(16'(tnow + 100));
    repeat (5) @(posedge clk);
    chk(evq.size() == expq.size(), "must wait while the window is open");
    push_pulse(tnow + 10, 5, 1);
    expect_eoe(1);
    wait_done(3);
    // misaligned word, then a pulse matched by L1A 4
    chq.push_back({1'b0, 16'hBAD0});
    push_pulse(1000, 6, 1); expect_eoe(1);
    tq.push_back(16'd1095);
    wait_done(4);
    // window across the rollover: trq = 99 - 100 = 65535
    push_pulse(65530, 7, 0); push_pulse(3, 8, 1); expect_eoe(1);
    tq.push_back(16'd99);
    wait_done(5);
    // nothing to match
    expect_eoe(0);
    tq.push_back(16'd2000);
    wait_done(6);

    chk(evq.size() == expq.size(), $sformatf("stream length %0d vs %0d", evq.size(), expq.size()));
    foreach (expq[i]) if (i < evq.size())
      chk(evq[i] == expq[i], $sformatf("word %0d: %h vs %h", i, evq[i], expq[i]));
    chk(n_matched == 5, $sformatf("n_matched %0d", n_matched));
    chk(n_discarded == 3, $sformatf("n_discarded %0d", n_discarded));
    chk(n_errors == 1, $sformatf("n_errors %0d", n_errors));
    chk(nlatch == 5, $sformatf("latch_energy pulses %0d", nlatch));
    chk(nstall > 0, "event FIFO never full");
    chk(chq.size() == 0 && tq.size() == 0, "FIFOs drained");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
