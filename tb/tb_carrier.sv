// tb_carrier: the carrier card at a reduced size (4 channels, 16-sample
// pulses, 128-word pulse buffers, 256-word output buffer) driven directly:
// the testbench supplies timestamp, event number, L1A and local_trigger,
// and plays the bus arbiter and memory, granting the bus after random
// delays or withholding it. A reference model predicts every event word
// except the energies, as in the full-system test; the timestamp starts
// just below 2^16 so the 16-bit pulse times wrap during the run.
// Mechanisms counted (the test fails on any that never happened): matched,
// discarded and dropped pulses, empty channel records, backpressure from
// the tag FIFOs and from a full output buffer, truncation, spy samples.
module tb_carrier;
  import fe_pkg::*;
  localparam int NCH = 4, MAW = 10, PL = 16, FD = 16, FP = 128, RB = 256, HW = RB / 2;
  localparam int LAT = 200, WIN = 100;

  logic        gclk = 0, bus_clk = 0, rst = 1, bus_rst = 1;
  logic        L1A = 0, local_trigger = 0;
  logic [47:0] timestamp = 0;
  logic [23:0] event_num = 0;
  logic [15:0] matching_window = 16'(WIN), L1A_latency = 16'(LAT);
  logic [7:0]  cmd = 8'h01;
  logic signed [13:0] ch [NCH];
  logic [15:0] spy;
  logic        backpressure, bus_request, gnt = 0;
  bus_req_t    bus_port;
  logic [MAW-1:0] dma_wptr;
  logic [15:0] n_events_ro, n_events_dma;
  logic        ch_overflow, match_error;

  carrier #(.NCHAN(NCH), .RO_BUFSIZE(RB), .FIFOLEN_P(FP), .FIFOLEN_EV(128),
            .PULSE_LEN(PL), .MWD_M(32), .MWD_L(16), .MEM_AW(MAW)) dut (.*);

  always #5 gclk = ~gclk;
  always #4 bus_clk = ~bus_clk;

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 30) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #400000000; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // the sample channel c presents at clock e (always 1..8000)
  function automatic logic [13:0] f(input int c, input int e);
    int unsigned h;
    h = 32'(e) * 32'd2654435761 + 32'(c) * 32'd40503;
    h = h ^ (h >> 13);
    return 14'(1 + h % 8000);
  endfunction

  // ---------------- model state ----------------
  int          E = 0;                      // index of the next gclk edge
  logic [47:0] ts_vis = 48'd65000;         // timestamp driven for edge E
  logic [23:0] ev_vis = 0;                 // event number driven for edge E
  logic        lt_prev = 0;
  int          busy_until = -1;
  logic [15:0] pend_T [$];                 // pulses held in the pulse buffers
  int          pend_E [$];
  logic [15:0] exp_w [$][$];               // expected events, in order
  logic        exp_m [$][$];               // 1: word is checked
  logic [15:0] spy_exp [$];
  int          trig_at [$], l1a_at [$];
  int          lt_hold = 0;
  int          issued = 0;

  // mechanism counters
  int n_trig = 0, n_l1a = 0, n_match = 0, n_disc = 0, n_empty_ch = 0;
  int n_drop = 0, n_bp_tag = 0, n_bp_half = 0, n_trunc = 0;
  int n_spy = 0, n_cpu_wait = 0, n_events_chk = 0, n_bp_held = 0;

  // bus side
  bit          hog = 0;
  logic [MAW-1:0] wexp = 0;
  int          gdelay = 0;
  logic        gnt_nx = 0;
  logic [15:0] st [$];

  task automatic sched(ref int q [$], input int e);
    int i;
    i = 0;
    while (i < q.size() && q[i] <= e) i++;
    q.insert(i, e);
  endtask

  task automatic build_event(input logic [15:0] a16);
    logic [15:0] w [$];
    logic        m [$];
    logic [15:0] trq, dt, sel_T [$];
    int          sel_E [$], total;
    trq = a16 - 16'(LAT);
    while (pend_T.size()) begin
      dt = pend_T[0] - trq;
      if (dt[15]) begin
        void'(pend_T.pop_front()); void'(pend_E.pop_front()); n_disc++;
      end else if (dt <= 16'(WIN)) begin
        sel_T.push_back(pend_T.pop_front()); sel_E.push_back(pend_E.pop_front());
        n_match++;
      end else break;
    end
    w.push_back(0); m.push_back(1);
    w.push_back(ev_vis[15:0]);          m.push_back(1);
    w.push_back({8'h0, ev_vis[23:16]}); m.push_back(1);
    w.push_back(ts_vis[15:0]);          m.push_back(1);
    w.push_back(ts_vis[31:16]);         m.push_back(1);
    w.push_back(ts_vis[47:32]);         m.push_back(1);
    for (int c = 0; c < NCH; c++) begin
      w.push_back({2'b10, 4'(c), 10'b0}); m.push_back(1);
      foreach (sel_T[p]) begin
        w.push_back({2'b01, 14'b0}); m.push_back(1);
        w.push_back(sel_T[p]);       m.push_back(1);
        for (int k = 0; k < PL; k++) begin
          logic [13:0] s;
          s = f(c, sel_E[p] - FD + 1 + k);
          w.push_back({2'b00, s}); m.push_back(1);
          if (c == int'(cmd[3:0])) spy_exp.push_back(16'(s));
        end
      end
      w.push_back({2'b11, 4'(c), 10'(sel_T.size())}); m.push_back(1);
      foreach (sel_T[p]) begin w.push_back(0); m.push_back(0); end
      if (sel_T.size() == 0) n_empty_ch++;
    end
    total = w.size();
    if (total > HW) begin
      w = w[0:HW-1]; m = m[0:HW-1];
      w[0] = {1'b1, 3'b0, 12'(HW)};
    end else
      w[0] = {1'b0, 3'b0, 12'(total)};
    exp_w.push_back(w); exp_m.push_back(m);
  endtask

  // one global clock: observe at the falling edge, then drive the inputs for
  // the next rising edge (edge E)
  task automatic step();
    bit send;
    @(negedge gclk);
    if (rst) begin steps_rst(); return; end
    // L1A and the tags driven for edge E-1 have been taken
    if (L1A) begin
      build_event(timestamp[15:0]);
      issued++; n_l1a++;
    end
    chk(!match_error, "match_error");
    if (spy != 0) begin
      chk(spy_exp.size() != 0 && spy == spy_exp[0],
          $sformatf("spy %h, expected %h", spy, spy_exp.size() ? spy_exp[0] : 16'hx));
      if (spy_exp.size()) void'(spy_exp.pop_front());
      n_spy++;
    end
    if (backpressure) begin
      if (issued - int'(n_events_dma) >= 14) n_bp_tag++;
      if (issued - int'(n_events_dma) <= 3)  n_bp_half++;
    end
    // inputs for edge E
    ts_vis = ts_vis + 1;
    send = 0;
    if (l1a_at.size() && l1a_at[0] <= E) begin
      if (!backpressure) begin send = 1; void'(l1a_at.pop_front()); ev_vis++; end
      else n_bp_held++;
    end
    L1A = send;
    timestamp = ts_vis; event_num = ev_vis;
    for (int c = 0; c < NCH; c++) ch[c] = f(c, E);
    if (trig_at.size() && trig_at[0] <= E) begin
      void'(trig_at.pop_front());
      lt_hold = 4;
    end
    local_trigger = lt_hold > 0;
    if (lt_hold > 0) lt_hold--;
    // the channels see a rising edge of local_trigger at edge E
    if (local_trigger && !lt_prev) begin
      chk(E > busy_until, "trigger while a pulse is recorded");
      n_trig++;
      if (FP - (PL + 1) * pend_T.size() >= PL + 1) begin
        pend_T.push_back(ts_vis[15:0]); pend_E.push_back(E);
        busy_until = E + PL;
      end else n_drop++;
    end
    lt_prev = local_trigger;
    E++;
  endtask

  task automatic steps_rst();
    for (int c = 0; c < NCH; c++) ch[c] = f(c, E);
    E++;
  endtask

  task automatic steps(input int n);
    repeat (n) step();
  endtask

  // wait until everything sent has arrived in memory and has been checked
  task automatic quiesce(input string what);
    int t;
    t = 0;
    while ((l1a_at.size() || L1A || issued != int'(n_events_dma) || exp_w.size() ||
            trig_at.size()) && t < 400000) begin
      step(); t++;
    end
    chk(t < 400000, {"drain timeout after ", what});
    steps(20);
  endtask

  // trigger now-ish, optionally with an L1A whose window holds it
  task automatic pulse_at(input int e, input bit with_l1a, input int r);
    sched(trig_at, e);
    if (with_l1a) sched(l1a_at, e + LAT - r);
  endtask

  task automatic flush_l1a();
    sched(l1a_at, E + LAT + WIN + 100);
  endtask

  // ---------------- bus: grants after a random delay, takes the writes ----
  always @(negedge bus_clk) begin
    if (bus_port.valid) begin
      chk(gnt, "bus write without grant");
      chk(bus_port.we && MAW'(bus_port.addr) == wexp, "bus write address");
      wexp++;
      st.push_back(bus_port.wdata[15:0]); st.push_back(bus_port.wdata[31:16]);
      parse();
    end
    if (hog) gnt_nx = 0;
    else if (!bus_request) begin gnt_nx = 0; gdelay = $urandom % 4; end
    else if (gdelay > 0) gdelay--;
    else gnt_nx = 1;
    if (bus_request && !gnt) n_cpu_wait++;
  end
  // the grant is registered, as from a real arbiter
  always @(posedge bus_clk) gnt <= gnt_nx;

  // compare complete events in the read stream with the model
  task automatic parse();
    int L, n;
    while (st.size()) begin
      L = int'(st[0][11:0]);
      n = (L + 1) / 2 * 2;
      if (st.size() < n) break;
      chk(exp_w.size() != 0, "event in memory that the model did not expect");
      if (exp_w.size() == 0) begin st = {}; break; end
      begin
        logic [15:0] w [$];
        logic        m [$];
        int bad;
        w = exp_w.pop_front(); m = exp_m.pop_front();
        chk(st[0] == w[0], $sformatf("event %0d length word %h, expected %h", n_events_chk, st[0], w[0]));
        if (w[0][15]) n_trunc++;
        bad = 0;
        for (int i = 1; i < w.size() && i < L; i++)
          if (m[i] && st[i] != w[i]) begin
            if (bad < 3) $display("  event %0d word %0d: %h expected %h", n_events_chk, i, st[i], w[i]);
            bad++;
          end
        chk(bad == 0, $sformatf("event %0d has %0d wrong words", n_events_chk, bad));
        n_events_chk++;
      end
      repeat (n) void'(st.pop_front());
    end
  endtask

  // ---------------- sequence ----------------
  initial begin
    for (int c = 0; c < NCH; c++) ch[c] = 0;
    steps(10);
    @(negedge gclk); rst = 0; @(negedge bus_clk); bus_rst = 0;
    steps(40);

    // 1. normal running, with L1As holding a pulse, discarding one, or
    //    finding nothing
    for (int i = 0; i < 60; i++) begin
      int e;
      e = E + 150 + $urandom % 150;
      if ($urandom % 3 == 0) pulse_at(e, 1, 10 + $urandom % 80);
      else begin
        pulse_at(e, 0, 0);
        sched(l1a_at, e + LAT + 20);
      end
      while (E < e) step();
    end
    flush_l1a();
    quiesce("normal running");
    chk(!ch_overflow, "overflow during normal running");

    // 2. ten pulses without L1A: the pulse buffers take seven
    begin
      int d0;
      d0 = n_drop;
      for (int i = 0; i < 10; i++) begin pulse_at(E + 30, 0, 0); steps(30); end
      steps(50);
      chk(ch_overflow, "ch_overflow not raised");
      chk(n_drop - d0 == 3, $sformatf("dropped %0d pulses, expected 3", n_drop - d0));
    end
    flush_l1a();
    quiesce("overflow");

    // 3. no grant while L1As come in quick succession: the tag FIFOs fill
    for (int i = 0; i < 3; i++) begin pulse_at(E + 40, 0, 0); steps(40); end
    hog = 1;
    for (int i = 0; i < 24; i++) sched(l1a_at, E + 60 + 10 * i);
    steps(1500);
    hog = 0;
    quiesce("tag backpressure");

    // 4. no grant with three events: both output buffer halves fill
    hog = 1;
    for (int i = 0; i < 3; i++) begin pulse_at(E + 60, 1, 20); steps(60); end
    steps(LAT + 2000);
    hog = 0;
    quiesce("full buffer");

    // 5. pulses 40 clocks apart in the window: three pulses on four
    //    channels do not fit in half the output buffer
    for (int i = 0; i < 6; i++) begin
      pulse_at(E + 40, (i % 3) == 0, 5);
      steps(40);
    end
    flush_l1a();
    quiesce("truncation");

    chk(spy_exp.size() == 0, $sformatf("%0d spy samples never seen", spy_exp.size()));
    chk(int'(n_events_ro) == issued && int'(n_events_dma) == issued, "event counters");
    chk(n_events_chk == issued, $sformatf("checked %0d of %0d events", n_events_chk, issued));
    $display("triggers %0d  L1As %0d  matched %0d  discarded %0d  empty channel records %0d",
             n_trig, n_l1a, n_match, n_disc, n_empty_ch);
    $display("dropped %0d  tag backpressure %0d  buffer-full backpressure %0d  L1A held %0d",
             n_drop, n_bp_tag, n_bp_half, n_bp_held);
    $display("truncated %0d  spy %0d  bus waits %0d  events %0d",
             n_trunc, n_spy, n_cpu_wait, n_events_chk);
    chk(n_trig > 0,     "no local triggers");
    chk(n_match > 0,    "no matched pulses");
    chk(n_disc > 0,     "no discarded pulses");
    chk(n_empty_ch > 0, "no empty channel records");
    chk(n_drop > 0,     "no dropped pulses");
    chk(n_bp_tag > 0,   "no tag FIFO backpressure");
    chk(n_bp_half > 0,  "no buffer-full backpressure");
    chk(n_trunc > 0,    "no truncated events");
    chk(n_spy > 0,      "no spy samples");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
