// tb_dma_controller: a modelled buffer (one clock read latency) holds events
// of random length in its two halves; tokens name the half to send. The bus
// grant is random. Every bus write is compared with the expected packed
// 32-bit word and ring address (a small ring, so it wraps), writes must only
// happen while granted, the token must come back naming the same half, and
// the event counter must match. A full return-token FIFO is also exercised.
module tb_dma_controller;
  import fe_pkg::*;
  localparam int RB = 256, HW = RB / 2, AW = $clog2(RB), MAW = 6, NEV = 60;

  logic bus_clk = 0, rst = 1;
  logic token_in_valid, token_in, token_in_re, token_out_we, token_out, token_out_full;
  logic [AW-1:0] addr_out;
  logic [15:0] data_out;
  logic bus_request, gnt;
  bus_req_t bus_port;
  logic [MAW-1:0] wptr;
  logic [15:0] n_events;

  dma_controller #(.RO_BUFSIZE(RB), .MEM_AW(MAW)) dut (.*);
  always #5 bus_clk = ~bus_clk;

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string what);
    checks++; if (!ok) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #5000000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic [15:0] buf_mem [RB];
  always_ff @(posedge bus_clk) data_out <= buf_mem[addr_out];

  logic        tokq [$];
  logic        busy [2];          // half holds an event not yet returned
  logic        sentq [$];         // halves in the order they were sent
  logic [MAW-1:0] exp_a [$];
  logic [31:0]    exp_d [$];
  int          made = 0, returned = 0, nwrites = 0, n_full = 0, n_nogrant = 0;
  logic [MAW-1:0] wmodel = 0;
  logic        tok_full_r = 0, gnt_r = 0;

  assign token_in_valid = tokq.size() != 0;
  assign token_in       = tokq.size() ? tokq[0] : 1'b0;
  assign token_out_full = tok_full_r;
  assign gnt            = gnt_r;

  task automatic make_event(input logic h);
    int len;
    logic [15:0] w [$];
    len = (made % 7 == 0) ? HW : 1 + $urandom % HW;
    w.push_back({1'(len == HW), 3'b0, 12'(len)});
    for (int i = 1; i < len; i++) w.push_back(16'($urandom));
    foreach (w[i]) buf_mem[{h, (AW-1)'(i)}] = w[i];
    for (int i = 0; i < len; i += 2) begin
      exp_a.push_back(wmodel); wmodel++;
      exp_d.push_back({(i + 1 < len) ? w[i+1] : 16'h0, w[i]});
    end
    busy[h] = 1; tokq.push_back(h); sentq.push_back(h); made++;
  endtask

  initial begin
    busy[0] = 0; busy[1] = 0;
    repeat (3) @(posedge bus_clk);
    #1 rst = 0;
    while (returned < NEV) begin
      logic ti, tw, th, v, g;
      bus_req_t bp;
      @(negedge bus_clk);
      ti = token_in_re; tw = token_out_we; th = token_out; bp = bus_port; g = gnt;
      if (bus_request && !g) n_nogrant++;
      chk(!(tw && token_out_full), "token returned into a full FIFO");
      chk(!(ti && !token_in_valid), "token read when empty");
      if (bp.valid) begin
        chk(g, "bus write without grant");
        chk(bp.we, "bus read issued");
        chk(exp_a.size() != 0, "unexpected bus write");
        if (exp_a.size()) begin
          chk(MAW'(bp.addr) == exp_a[0] && bp.wdata == exp_d[0],
              $sformatf("write %0d: @%0d %h, expected @%0d %h", nwrites, bp.addr, bp.wdata, exp_a[0], exp_d[0]));
          void'(exp_a.pop_front()); void'(exp_d.pop_front());
        end
        nwrites++;
      end
      @(posedge bus_clk); #1;
      if (ti) void'(tokq.pop_front());
      if (tw) begin
        logic hs;
        hs = sentq.pop_front();
        chk(th == hs, "returned token names another half");
        chk(exp_a.size() == 0 || sentq.size() != 0, "token returned before all words were sent");
        busy[th] = 0; returned++;
      end
      // refill a free half now and then
      for (int h = 0; h < 2; h++)
        if (!busy[h] && made < NEV && $urandom % 20 == 0) make_event(1'(h));
      gnt_r = bus_request && ($urandom % 4 != 0);
      tok_full_r = ($urandom % 5 == 0);
      if (tok_full_r) n_full++;
    end
    repeat (5) @(posedge bus_clk); #1;
    chk(exp_a.size() == 0, "words left unsent");
    chk(n_events == 16'(NEV), $sformatf("n_events %0d", n_events));
    chk(wptr == wmodel, "wptr");
    chk(n_nogrant > 0 && n_full > 0, "grant and token back-pressure not exercised");
    $display("events %0d writes %0d", returned, nwrites);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
