// tb_fes: end-to-end test of the whole front end at its full size (no
// parameter overrides): 12 channels, 64-sample pulses, 512-word pulse
// buffers, 4096-word output buffer, 4096-word fast memory.
//
// The testbench plays three roles:
//   * trigger system: it shapes rising edges on the trigger channel so that
//     the local trigger fires, and sends L1A / CC reset / EC reset / command
//     words over the fiber, holding L1As back while backpressure is high;
//   * detector: channel c carries the known sequence f(c, clock), so every
//     recorded sample can be predicted exactly;
//   * CPU: it reads the fast memory over the bus as the DMA fills it, and
//     can also keep the bus to itself for a while.
// A reference model mirrors the timestamp and event counters, takes the
// local trigger times from trigger_request, applies the matching rule
// (pulse time T matches an L1A at time A when 0 <= T-(A-latency) <= window,
// older pulses are discarded, newer ones wait) and predicts every event word
// except the energies (only their number is checked). It also predicts which
// pulses are dropped for lack of room in the pulse buffer, which is exact
// when the buffers are known to be drained.
//
// Phases: normal running; a trigger burst without L1As (overflow); CC and EC
// reset; a burst of L1As while the CPU holds the bus (tag backpressure); the
// CPU holding the bus with only a few events (no free buffer half); closely
// spaced pulses under a wide window (events larger than a buffer half are
// truncated). Every mechanism is counted and the test fails on any that
// never happened. The trigger-matching error path cannot be reached with a
// working pulse recorder, so match_error must stay low throughout.
module tb_fes;
  import fe_pkg::*;
  localparam int NCH = 12, MAW = 12, PL = 64, FD = 16, FP = 512, HW = 2048;
  localparam int LAT = 400, WIN = 250;

  logic        gclk = 0, bus_clk = 0, local_rst = 1;
  logic [15:0] fiber_in = 0, fiber_out;
  logic signed [13:0] ch [NCH];
  logic [13:0] trigger_ch = 0;
  logic [11:0] trigger_thresh = 12'd6;
  logic [9:0]  hold_time = 10'd20;
  logic [15:0] matching_window = 16'(WIN), L1A_latency = 16'(LAT);
  logic [15:0] spy;
  logic        trigger_request, L1A, backpressure;
  logic        cpu_bus_request = 0, cpu_gnt;
  bus_req_t    cpu_req = '0;
  logic [31:0] bus_rdata;
  logic [MAW-1:0] dma_wptr;
  logic [15:0] n_events;
  logic        ch_overflow, match_error;

  fes dut (.*);

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
  logic [47:0] ts_vis = 0;                 // mirror of the timestamp
  logic [23:0] ev_vis = 0;                 // mirror of the event number
  logic        l1a_sent = 0, lt_prev = 0;
  int          busy_until = -1;
  logic [15:0] pend_T [$];                 // pulses held in the pulse buffers
  int          pend_E [$];
  logic [15:0] exp_w [$][$];               // expected events, in order
  logic        exp_m [$][$];               // 1: word is checked
  logic [15:0] spy_exp [$];
  int          trig_at [$], l1a_at [$];
  logic [7:0]  op_req = 0, op_arg = 0;
  int          issued = 0;

  // mechanism counters
  int n_trig = 0, n_l1a = 0, n_match = 0, n_disc = 0, n_empty_ch = 0;
  int n_drop = 0, n_bp_tag = 0, n_bp_half = 0, n_trunc = 0, n_cc = 0, n_ec = 0;
  int n_spy = 0, n_cpu_wait = 0, n_events_chk = 0, n_bp_held = 0;
  bit after_cc = 0, after_ec = 0;

  // CPU side
  bit          hog = 0;
  logic [MAW-1:0] rdp = 0;
  bit          rd_pending = 0;
  int          burst = 0, cooldown = 0;
  logic [15:0] st [$];

  task automatic sched(ref int q [$], input int e);
    int i;
    i = 0;
    while (i < q.size() && q[i] <= e) i++;
    q.insert(i, e);
  endtask

  // ramp on the trigger channel starting at clock s
  function automatic logic [13:0] trig_wave(input int s, input int e);
    int k;
    k = e - s;
    if (k < 0 || k >= 46) return 0;
    if (k < 8) return 14'(200 * (k + 1));
    if (k < 38) return 14'd1600;
    return 14'(1600 - 200 * (k - 37));
  endfunction

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
          if (c == 3) spy_exp.push_back(16'(s));
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
    logic [7:0] op;
    @(negedge gclk);
    // counters after the edge just passed, from the inputs it saw
    if (local_rst) begin ts_vis = 0; ev_vis = 0; end
    else begin
      ts_vis = (fiber_in[15:8] == 8'h02) ? 48'd0 : ts_vis + 1;
      if (fiber_in[15:8] == 8'h01) ev_vis = ev_vis + 1;
      else if (fiber_in[15:8] == 8'h03) ev_vis = 0;
    end
    // an L1A sent for the previous edge is visible now
    if (l1a_sent) begin
      chk(L1A, "L1A pulse from the fiber");
      build_event(ts_vis[15:0]);
      issued++; n_l1a++;
      l1a_sent = 0;
    end else if (!local_rst) chk(!L1A, "spurious L1A");
    // local trigger, as the channels will sample it at edge E
    if (!local_rst && trigger_request && !lt_prev) begin
      chk(E > busy_until, "trigger while a pulse is recorded");
      n_trig++;
      if (FP - (PL + 1) * pend_T.size() >= PL + 1) begin
        pend_T.push_back(ts_vis[15:0]); pend_E.push_back(E);
        busy_until = E + PL;
      end else n_drop++;
    end
    lt_prev = trigger_request && !local_rst;
    if (!local_rst) chk(!match_error, "match_error");
    if (spy != 0) begin
      chk(spy_exp.size() != 0 && spy == spy_exp[0],
          $sformatf("spy %h, expected %h", spy, spy_exp.size() ? spy_exp[0] : 16'hx));
      if (spy_exp.size()) void'(spy_exp.pop_front());
      n_spy++;
    end
    if (backpressure) begin
      if (issued - int'(n_events) >= 14) n_bp_tag++;
      if (issued - int'(n_events) <= 3)  n_bp_half++;
    end
    // inputs for edge E
    op = 8'h00;
    if (op_req != 0) begin
      op = op_req; op_req = 0;
    end else if (l1a_at.size() && l1a_at[0] <= E) begin
      if (!backpressure && !local_rst) begin
        op = 8'h01; void'(l1a_at.pop_front()); l1a_sent = 1;
      end else n_bp_held++;
    end
    fiber_in = {op, (op == 8'h04) ? op_arg : 8'h00};
    for (int c = 0; c < NCH; c++) ch[c] = f(c, E);
    trigger_ch = 0;
    foreach (trig_at[i]) trigger_ch |= trig_wave(trig_at[i], E);
    while (trig_at.size() && trig_at[0] + 46 < E) void'(trig_at.pop_front());
    E++;
  endtask

  task automatic steps(input int n);
    repeat (n) step();
  endtask

  // wait until everything sent has arrived in memory and has been checked
  task automatic quiesce(input string what);
    int t;
    t = 0;
    while ((l1a_at.size() || l1a_sent || issued != int'(n_events) || exp_w.size() ||
            trig_at.size()) && t < 400000) begin
      step(); t++;
    end
    chk(t < 400000, {"drain timeout after ", what});
    steps(20);
  endtask

  // trigger now-ish, optionally with an L1A whose window holds it
  task automatic pulse_at(input int e, input bit with_l1a, input int r);
    sched(trig_at, e);
    if (with_l1a) sched(l1a_at, e + 12 + LAT - r);
  endtask

  task automatic flush_l1a();
    sched(l1a_at, E + LAT + WIN + 100);
  endtask

  // ---------------- CPU: reads the event data as it arrives ----------------
  always @(negedge bus_clk) begin
    if (rd_pending) begin
      st.push_back(bus_rdata[15:0]); st.push_back(bus_rdata[31:16]);
      rd_pending = 0;
      parse();
    end
    if (cpu_bus_request && !cpu_gnt) n_cpu_wait++;
    cpu_req = '0;
    if (hog) cpu_bus_request = 1;
    else if (cooldown > 0) begin cooldown--; cpu_bus_request = 0; end
    else if (rdp != dma_wptr) begin
      cpu_bus_request = 1;
      if (cpu_gnt) begin
        cpu_req.valid = 1; cpu_req.we = 0; cpu_req.addr = 16'(rdp);
        rdp++; rd_pending = 1; burst++;
        if (burst == 8 || rdp == dma_wptr) begin cooldown = 2; burst = 0; end
      end
    end else cpu_bus_request = 0;
  end

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
        if (after_cc) begin n_cc++; after_cc = 0; end
        if (after_ec) begin n_ec++; after_ec = 0; end
        n_events_chk++;
      end
      repeat (n) void'(st.pop_front());
    end
  endtask

  // ---------------- sequence ----------------
  initial begin
    for (int c = 0; c < NCH; c++) ch[c] = 0;
    steps(10);
    local_rst = 0;
    steps(40);
    op_req = 8'h04; op_arg = 8'h03;     // spy on channel 3
    steps(5);

    // 1. normal running: pulses 300..600 clocks apart; about one in eight
    //    gets an L1A whose window holds it, the others an L1A whose window
    //    starts just after it (the pulse is discarded, the event is empty).
    //    This keeps the load below what the output bus can carry, so the
    //    pulse buffers never fill up.
    for (int i = 0; i < 40; i++) begin
      int e;
      e = E + 300 + $urandom % 300;
      if ($urandom % 8 == 0) pulse_at(e, 1, 20 + $urandom % 200);
      else begin
        pulse_at(e, 0, 0);
        sched(l1a_at, e + 12 + LAT + 30);
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
      for (int i = 0; i < 10; i++) begin pulse_at(E + 80, 0, 0); steps(80); end
      steps(100);
      chk(ch_overflow, "ch_overflow not raised");
      chk(n_drop - d0 == 3, $sformatf("dropped %0d pulses, expected 3", n_drop - d0));
    end
    flush_l1a();
    quiesce("overflow");

    // 3. counter resets, then a few events
    op_req = 8'h03; step(); after_ec = 1;
    op_req = 8'h02; step(); after_cc = 1;
    steps(10);
    for (int i = 0; i < 4; i++) begin
      pulse_at(E + 150, 1, 50);
      steps(150);
    end
    flush_l1a();
    quiesce("counter resets");

    // 4. the CPU holds the bus while L1As come in quick succession: the
    //    tag FIFOs fill up
    for (int i = 0; i < 4; i++) begin pulse_at(E + 120, 0, 0); steps(120); end
    hog = 1;
    for (int i = 0; i < 24; i++) sched(l1a_at, E + LAT - 300 + 15 * i);
    steps(3000);
    hog = 0;
    quiesce("tag backpressure");

    // 5. the CPU holds the bus with only three events: both buffer halves
    //    fill and the readout stops
    hog = 1;
    for (int i = 0; i < 3; i++) begin pulse_at(E + 150, 1, 30); steps(150); end
    steps(LAT + 6000);
    hog = 0;
    quiesce("full buffer");

    // 6. pulses 90 clocks apart in a wide window: 3 pulses x 12 channels do
    //    not fit in half the output buffer
    for (int i = 0; i < 12; i++) begin
      pulse_at(E + 90, (i % 3) == 0, 20);
      steps(90);
    end
    flush_l1a();
    quiesce("truncation");

    // results
    chk(spy_exp.size() == 0, $sformatf("%0d spy samples never seen", spy_exp.size()));
    chk(int'(n_events) == issued, "DMA event count");
    chk(n_events_chk == issued, $sformatf("checked %0d of %0d events", n_events_chk, issued));
    $display("triggers %0d  L1As %0d  matched %0d  discarded %0d  empty channel records %0d",
             n_trig, n_l1a, n_match, n_disc, n_empty_ch);
    $display("dropped %0d  tag backpressure %0d  buffer-full backpressure %0d  L1A held %0d",
             n_drop, n_bp_tag, n_bp_half, n_bp_held);
    $display("truncated %0d  after CC %0d  after EC %0d  spy %0d  CPU waits %0d  events %0d",
             n_trunc, n_cc, n_ec, n_spy, n_cpu_wait, n_events_chk);
    chk(n_trig > 0,     "no local triggers");
    chk(n_l1a > 0,      "no L1As");
    chk(n_match > 0,    "no matched pulses");
    chk(n_disc > 0,     "no discarded pulses");
    chk(n_empty_ch > 0, "no empty channel records");
    chk(n_drop > 0,     "no dropped pulses");
    chk(n_bp_tag > 0,   "no tag FIFO backpressure");
    chk(n_bp_half > 0,  "no buffer-full backpressure");
    chk(n_bp_held > 0,  "no L1A held back");
    chk(n_trunc > 0,    "no truncated events");
    chk(n_cc > 0,       "no event after CC reset");
    chk(n_ec > 0,       "no event after EC reset");
    chk(n_spy > 0,      "no spy samples");
    chk(n_cpu_wait > 0, "no bus contention");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
