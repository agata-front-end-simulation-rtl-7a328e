// tb_channel: one complete channel with its default MWD and FIFO depths,
// except a pulse buffer of 100 words so that a second buffered pulse
// overflows. Exponential pulses (tau = 65536/13 samples, no baseline) are
// injected with a local trigger at chosen cycles, and L1As are sent with
// latency 450 and window 10:
//   pulse A @200 (1000)  matched by L1A @647
//   pulse B @500 (500)   dropped: A still fills the buffer -> ch_overflow
//   pulse C @700 (700)   buffered, discarded by L1A @1300, which then
//                        matches nothing (empty end-of-event)
//   pulse D @1400 (1500) matched by L1A @1845
// The event FIFO must then hold SOF(time), the 64 samples starting 15 cycles
// before the trigger cycle, EOE(n) for each L1A, and the energy FIFO one
// energy per matched pulse equal to the pulse amplitude within 2 %.
module tb_channel;
  localparam int PL = 64, FD = 16;
  localparam real TAU = 65536.0 / 13.0;
  logic gclk = 0, rst = 1, L1A = 0, local_trigger = 0;
  logic [15:0] timestamp_lsw = 0;
  logic signed [13:0] ch = 0;
  logic ev_pulse_re = 0, ev_energy_re = 0, ev_empty, en_empty;
  logic [17:0] ev_pulse;
  logic signed [17:0] ev_energy;
  logic [15:0] matching_window = 10, L1A_latency = 450;
  logic ch_overflow;
  logic [15:0] n_matched, n_discarded, n_errors;
  int checks = 0, failures = 0, novf = 0;

  channel #(.FIFOLEN_P(100)) dut (.*);
  always #5 gclk = ~gclk;

  initial begin
    #5000000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  int tp [4] = '{200, 500, 700, 1400};
  int amp[4] = '{1000, 500, 700, 1500};
  int l1a[3] = '{647, 1300, 1845};
  int sample[int];   // sample value at each cycle
  int cyc = 0;

  function automatic int wave(int n);
    real v = 0.0;
    for (int k = 0; k < 4; k++) if (n >= tp[k]) v += amp[k] * $exp(-(n - tp[k]) / TAU);
    return $rtoi(v);
  endfunction

  // stimulus: cycle counter = timestamp
  initial begin
    repeat (3) @(posedge gclk);
    rst <= 0;
    for (cyc = 0; cyc < 2400; cyc++) begin
      sample[cyc] = wave(cyc);
      ch            <= 14'(sample[cyc]);
      timestamp_lsw <= 16'(cyc);
      local_trigger <= (cyc == tp[0] || cyc == tp[1] || cyc == tp[2] || cyc == tp[3]);
      L1A           <= (cyc == l1a[0] || cyc == l1a[1] || cyc == l1a[2]);
      @(posedge gclk);
      #1 if (ch_overflow) novf++;
    end
  end

  // drain and check the event FIFO and the energy FIFO
  logic [17:0] got[$];
  int en[$];
  always @(posedge gclk) begin
    if (!rst && ev_pulse_re) got.push_back(ev_pulse);
    if (!rst && ev_energy_re) en.push_back(ev_energy);
    ev_pulse_re  <= !ev_empty && !ev_pulse_re && !rst;
    ev_energy_re <= !en_empty && !ev_energy_re && !rst;
  end

  logic [17:0] expq[$];
  initial begin
    wait (cyc == 2400);
    repeat (20) @(posedge gclk);
    // expected event stream
    foreach (tp[p]) if (p == 0 || p == 3) begin
      expq.push_back({fe_pkg::EV_SOF, 16'(tp[p])});
      for (int k = 1; k <= PL; k++) begin
        int c;
        c = tp[p] + k - FD;
        expq.push_back({fe_pkg::EV_SAMPLE, 16'(wave(c))});
      end
      expq.push_back({fe_pkg::EV_EOE, 16'd1});
      if (p == 0) expq.push_back({fe_pkg::EV_EOE, 16'd0});
    end
    chk(got.size() == expq.size(), $sformatf("event words %0d vs %0d", got.size(), expq.size()));
    foreach (expq[i]) if (i < got.size())
      chk(got[i] == expq[i], $sformatf("word %0d: %h vs %h", i, got[i], expq[i]));
    chk(en.size() == 2, $sformatf("energies %0d", en.size()));
    if (en.size() == 2) begin
      chk(en[0] > 980 && en[0] < 1020, $sformatf("energy A %0d", en[0]));
      chk(en[1] > 1470 && en[1] < 1530, $sformatf("energy D %0d", en[1]));
    end
    chk(novf == 1, $sformatf("overflows %0d", novf));
    chk(n_matched == 2 && n_discarded == 1 && n_errors == 0,
        $sformatf("counters %0d %0d %0d", n_matched, n_discarded, n_errors));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
