// tb_arbiter: three masters request at random and hold the bus for random
// lengths. Checks: grants are one-hot, go only to requesters, are held while
// the owner keeps requesting, and a waiting master is granted within one
// turn of the others (round-robin), one clock after the bus is free.
module tb_arbiter;
  localparam int NM = 3;
  logic clk = 0, rst = 1;
  logic [NM-1:0] req = 0, gnt;
  int checks = 0, failures = 0;
  int hold [NM], waitc [NM], maxwait = 0, handovers = 0;

  arbiter #(.NM(NM)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #2000000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  logic [NM-1:0] gnt_q = 0;
  initial begin
    for (int i = 0; i < NM; i++) begin hold[i] = 0; waitc[i] = 0; end
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int n = 0; n < 4000; n++) begin
      @(posedge clk); #1;
      chk($countones(gnt) <= 1, "one-hot");
      chk((gnt & ~req) == 0 || (gnt & gnt_q) != 0, "grant without request");
      if ((gnt_q & req) != 0) chk(gnt == gnt_q, "grant not held");
      if (gnt != gnt_q && gnt != 0) handovers++;
      for (int i = 0; i < NM; i++) begin
        if (req[i] && !gnt[i]) waitc[i]++; else waitc[i] = 0;
        if (waitc[i] > maxwait) maxwait = waitc[i];
      end
      gnt_q = gnt;
      // masters: keep request while owning for a random time, then drop
      for (int i = 0; i < NM; i++) begin
        if (gnt[i]) begin
          if (hold[i] == 0) hold[i] = 1 + $urandom % 6;
          hold[i]--;
          if (hold[i] == 0) req[i] <= 0;
        end else if (!req[i]) req[i] <= ($urandom % 3 == 0);
      end
    end
    // a waiter sees at most the other two masters' tenures (<= 6 each) plus
    // one idle clock per handover
    chk(maxwait <= 2 * 7 + 2, $sformatf("max wait %0d", maxwait));
    chk(handovers > 100, "too few handovers");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
