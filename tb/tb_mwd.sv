// tb_mwd: MWD filter at its default size (M=256, L=128, 1/tau = 13/65536).
// Exponentially decaying pulses (tau = 65536/13 samples) with pile-up are fed
// in. Every output is compared with the MWD formula evaluated directly on
// the sample history (D from the definition, E as the floored mean of the
// last L values of D). In addition the flat top of an isolated pulse must
// equal its amplitude within 1 %, which is what the filter is for.
module tb_mwd;
  localparam int M = 256, L = 128;
  logic clk = 0, rst = 1;
  logic signed [13:0] ch = 0;
  logic signed [15:0] energy_out;
  int checks = 0, failures = 0;

  mwd dut (.*);
  always #5 clk = ~clk;

  initial begin
    #5000000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  longint x[$], d[$];
  localparam real TAU = 65536.0 / 13.0;

  function automatic longint xs(int n); return (n < 0) ? 0 : x[n]; endfunction
  function automatic longint ds(int n); return (n < 0) ? 0 : d[n]; endfunction
  function automatic longint fdiv(longint a, int sh);   // floor division by 2^sh
    return a >>> sh;
  endfunction

  initial begin
    int n = 0;
    int t0 [4] = '{300, 1200, 1350, 2400};
    int amp[4] = '{1000, 2000, 800, 3000};
    longint e_prev = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (n = 0; n < 3400; n++) begin
      real v;
      longint s, e, sum;
      v = 0.0; s = 0; sum = 0;
      for (int k = 0; k < 4; k++)
        if (n >= t0[k]) v += amp[k] * $exp(-(n - t0[k]) / TAU);
      x.push_back(longint'($rtoi(v)));
      for (int k = n - M; k < n; k++) s += xs(k);
      d.push_back(xs(n) - xs(n - M) + fdiv(13 * s, 16));
      for (int j = 0; j < L; j++) sum += ds(n - j);
      e = fdiv(sum, 7);
      if (e > 32767) e = 32767; if (e < -32768) e = -32768;
      ch <= 14'(x[n]);
      @(posedge clk);     // x(n) captured; E(n-1) now on the output
      #1;
      if (n > 0) chk(energy_out == 16'(e_prev), $sformatf("n=%0d out=%0d exp=%0d", n-1, energy_out, e_prev));
      e_prev = e;
      if (n == t0[0] + 201) chk(energy_out > 990 && energy_out < 1010, $sformatf("flat top %0d", energy_out));
      if (n == t0[3] + 201) chk(energy_out > 2970 && energy_out < 3030, $sformatf("flat top %0d", energy_out));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
