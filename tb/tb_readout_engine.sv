// tb_readout_engine: the engine is fed from modelled tag, event and energy
// FIFOs that randomly report empty, and its token partner (the DMA side)
// returns halves after random delays and sometimes reports a full token
// FIFO. Every finished half is compared word by word with an event built by
// a reference model, including truncation of events larger than a half.
// Also checked: the spy output, that a handed-over half is never reused
// before its token comes back, and the event counter.
module tb_readout_engine;
  import fe_pkg::*;
  localparam int NCH = 3, RB = 256, HW = RB / 2, AW = $clog2(RB);
  localparam int NEV = 40;

  logic gclk = 0, rst = 1;
  logic [DSIZE_EV-1:0]        pulse        [NCH];
  logic                       pulse_empty  [NCH];
  logic                       pulse_re     [NCH];
  logic signed [DSIZE_EV-1:0] energy       [NCH];
  logic                       energy_empty [NCH];
  logic                       energy_re    [NCH];
  logic [47:0] tst_out;
  logic [23:0] evc_out;
  logic tag_empty, rd_enable_tag, we;
  logic [AW-1:0] addr_in;
  logic [15:0] data_in;
  logic token_in_valid, token_in, token_in_re, token_out_we, token_out, token_out_full;
  logic [7:0] cmd;
  logic [15:0] spy, n_events;
  logic [1:0] free_halves;

  readout_engine #(.NCHAN(NCH), .RO_BUFSIZE(RB)) dut (.*);
  always #5 gclk = ~gclk;

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string what);
    checks++; if (!ok) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #5000000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // modelled FIFOs and expected events
  logic [DSIZE_EV-1:0] evq [NCH][$];
  logic [DSIZE_EV-1:0] enq [NCH][$];
  logic [47:0] tsq [$];
  logic [23:0] ecq [$];
  logic [15:0] expq [$][$];
  logic [15:0] mem [RB];
  logic        ret_half [$];
  int          ret_wait [$];
  logic        held [2];
  int          n_trunc = 0, n_spy = 0, n_tokfull = 0;
  int          vis_p [NCH], vis_e [NCH], vis_t;   // words visible to the engine
  logic        tok_full_r;

  task automatic make_event(input int n);
    logic [15:0] w [$];
    int np, ns, total;
    logic [47:0] ts;
    logic [23:0] ec;
    logic [15:0] s;
    ts = {16'($urandom), 32'($urandom)};
    ec = 24'($urandom);
    tsq.push_back(ts); ecq.push_back(ec);
    w.push_back(16'h0);   // word 0, filled below
    w.push_back(ec[15:0]); w.push_back({8'h0, ec[23:16]});
    w.push_back(ts[15:0]); w.push_back(ts[31:16]); w.push_back(ts[47:32]);
    for (int c = 0; c < NCH; c++) begin
      logic [15:0] ens [$];
      ens = {};
      w.push_back({2'b10, 4'(c), 10'b0});
      // every fifth event is large to force truncation
      np = (n % 5 == 4) ? 3 + $urandom % 2 : $urandom % 3;
      for (int p = 0; p < np; p++) begin
        logic [17:0] e;
        s = 16'($urandom);
        evq[c].push_back({2'(EV_SOF), s});
        w.push_back({2'b01, 14'b0}); w.push_back(s);
        ns = (n % 5 == 4) ? 20 + $urandom % 20 : 1 + $urandom % 8;
        for (int k = 0; k < ns; k++) begin
          s = 16'($urandom);
          evq[c].push_back({2'(EV_SAMPLE), s});
          w.push_back({2'b00, s[13:0]});
        end
        e = 18'($urandom);
        enq[c].push_back(e);
        ens.push_back(e[15:0]);
      end
      evq[c].push_back({2'(EV_EOE), 16'(np)});
      w.push_back({2'b11, 4'(c), 10'(np)});
      foreach (ens[i]) w.push_back(ens[i]);
    end
    total = w.size();
    if (total > HW) begin
      w = w[0:HW-1];
      w[0] = {1'b1, 3'b0, 12'(HW)};
    end else
      w[0] = {1'b0, 3'b0, 12'(total)};
    expq.push_back(w);
  endtask

  // inputs are driven from the model one delta after each clock edge
  always_comb begin
    for (int c = 0; c < NCH; c++) begin
      pulse_empty[c]  = vis_p[c] == 0;
      pulse[c]        = evq[c].size() ? evq[c][0] : '0;
      energy_empty[c] = vis_e[c] == 0;
      energy[c]       = enq[c].size() ? enq[c][0] : '0;
    end
    tag_empty      = vis_t == 0;
    tst_out        = tsq.size() ? tsq[0] : '0;
    evc_out        = ecq.size() ? ecq[0] : '0;
    token_in_valid = ret_half.size() != 0 && ret_wait[0] == 0;
    token_in       = ret_half.size() ? ret_half[0] : 1'b0;
    token_out_full = tok_full_r;
  end

  int done = 0;
  logic [15:0] spy_exp = 0;
  initial begin
    cmd = 8'h01;
    for (int c = 0; c < NCH; c++) begin vis_p[c] = 0; vis_e[c] = 0; end
    vis_t = 0; tok_full_r = 0; held[0] = 0; held[1] = 0;
    for (int n = 0; n < NEV; n++) make_event(n);
    repeat (3) @(posedge gclk);
    #1 rst = 0;
    while (done < NEV) begin
      logic pr [NCH], er [NCH];
      logic tr, tw, ti, wv;
      logic [AW-1:0] wa;
      logic [15:0] wd, sp_next;
      logic th, tv;
      @(negedge gclk);
      // sample the engine's requests in the middle of the clock
      for (int c = 0; c < NCH; c++) begin pr[c] = pulse_re[c]; er[c] = energy_re[c]; end
      tr = rd_enable_tag; tw = token_out_we; th = token_out; ti = token_in_re; tv = token_in;
      wv = we; wa = addr_in; wd = data_in;
      chk(spy == spy_exp, "spy");
      sp_next = 0;
      for (int c = 0; c < NCH; c++) begin
        chk(!(pr[c] && pulse_empty[c]), "pulse read when empty");
        chk(!(er[c] && energy_empty[c]), "energy read when empty");
        if (pr[c] && c == int'(cmd[3:0]) && pulse[c][17:16] == 2'(EV_SAMPLE)) begin
          sp_next = pulse[c][15:0]; n_spy++;
        end
      end
      spy_exp = sp_next;
      chk(!(tr && tag_empty), "tag read when empty");
      chk(!(tw && token_out_full), "token written when full");
      if (wv) begin
        chk(!held[wa[AW-1]], "write into a half not yet returned");
        mem[wa] = wd;
      end
      @(posedge gclk); #1;
      // apply the reads and the token exchange
      for (int c = 0; c < NCH; c++) begin
        if (pr[c]) begin void'(evq[c].pop_front()); vis_p[c]--; end
        if (er[c]) begin void'(enq[c].pop_front()); vis_e[c]--; end
      end
      if (tr) begin void'(tsq.pop_front()); void'(ecq.pop_front()); vis_t--; end
      if (ti && ret_half.size() && ret_wait[0] == 0) begin
        void'(ret_half.pop_front()); void'(ret_wait.pop_front());
        held[tv] = 0;   // the returned token frees its half in the checker too
      end
      foreach (ret_wait[i]) if (ret_wait[i] > 0) ret_wait[i]--;
      if (tw) begin
        logic [15:0] w [$];
        w = expq.pop_front();
        chk(!held[th], "token for a half already held");
        held[th] = 1;
        if (w[0][15]) n_trunc++;
        foreach (w[i]) begin
          chk(mem[{th, (AW-1)'(i)}] == w[i],
              $sformatf("event %0d word %0d: %h vs %h", done, i, mem[{th, (AW-1)'(i)}], w[i]));
        end
        done++;
        // the reader frees the half some time later
        ret_half.push_back(th); ret_wait.push_back($urandom % 60);
      end
      // words arrive at random; once visible they stay until read
      for (int c = 0; c < NCH; c++) begin
        if (vis_p[c] < evq[c].size() && $urandom % 5 != 0) vis_p[c]++;
        if (vis_e[c] < enq[c].size() && $urandom % 4 != 0) vis_e[c]++;
      end
      if (vis_t < tsq.size() && $urandom % 30 == 0) vis_t++;
      tok_full_r = ($urandom % 4 == 0);
      if (tok_full_r) n_tokfull++;
      if (done == NEV / 2) cmd = 8'h02;
    end
    repeat (100) @(posedge gclk);
    #1;
    chk(n_events == 16'(NEV), $sformatf("n_events %0d", n_events));
    chk(n_trunc >= 5, $sformatf("truncated events %0d", n_trunc));
    chk(n_spy > 50, $sformatf("spy samples %0d", n_spy));
    $display("events %0d truncated %0d spy %0d", done, n_trunc, n_spy);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
