// tb_mezzanine: six channels with different sample streams (channel i sees
// i*1000 + cycle), one shared trigger and one shared L1A. Every channel must
// deliver its own pulse: SOF with the trigger time, 64 samples of its own
// stream, EOE(1), and one energy word.
module tb_mezzanine;
  localparam int NCH = 6, PL = 64, FD = 16;
  logic gclk = 0, rst = 1, L1A = 0, local_trigger = 0;
  logic [47:0] timestamp = 0;
  logic [15:0] matching_window = 10, L1A_latency = 100;
  logic signed [13:0] ch [NCH];
  logic ev_pulse_re [NCH], ev_energy_re [NCH];
  logic [17:0] ev_pulse [NCH];
  logic signed [17:0] ev_energy [NCH];
  logic ev_empty [NCH], en_empty [NCH], ch_overflow [NCH];
  logic [15:0] n_matched [NCH], n_errors [NCH];
  int checks = 0, failures = 0, cyc = 0;

  mezzanine dut (.*);
  always #5 gclk = ~gclk;

  initial begin
    #2000000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    for (int i = 0; i < NCH; i++) begin ch[i] = 0; ev_pulse_re[i] = 0; ev_energy_re[i] = 0; end
    repeat (3) @(posedge gclk);
    rst <= 0;
    for (cyc = 0; cyc < 600; cyc++) begin
      for (int i = 0; i < NCH; i++) ch[i] <= 14'(i*1000 + cyc);
      timestamp     <= 48'(cyc);
      local_trigger <= (cyc == 100);
      L1A           <= (cyc == 195);
      @(posedge gclk);
    end
    #1;
    // read each channel's event FIFO through its show-ahead head
    for (int i = 0; i < NCH; i++) begin
      chk(!ev_empty[i], "event FIFO empty");
      chk(ev_pulse[i] == {fe_pkg::EV_SOF, 16'd100}, $sformatf("ch%0d SOF %h", i, ev_pulse[i]));
      ev_pulse_re[i] = 1; @(posedge gclk); #1;
      for (int k = 1; k <= PL; k++) begin
        chk(ev_pulse[i] == {fe_pkg::EV_SAMPLE, 16'(i*1000 + 100 + k - FD)},
            $sformatf("ch%0d sample %0d: %h", i, k, ev_pulse[i]));
        @(posedge gclk); #1;
      end
      chk(ev_pulse[i] == {fe_pkg::EV_EOE, 16'd1}, $sformatf("ch%0d EOE %h", i, ev_pulse[i]));
      @(posedge gclk); #1;
      ev_pulse_re[i] = 0;
      chk(ev_empty[i], "event FIFO not drained");
      chk(!en_empty[i], "no energy");
      chk(n_matched[i] == 1 && n_errors[i] == 0, "counters");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
