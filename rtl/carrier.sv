// carrier: readout card holding two six-channel mezzanines.
//
// On every L1A the carrier stores the 48-bit timestamp and the 24-bit event
// number in two tag FIFOs (tags storage) while each of the 12 channels
// matches its buffered pulses against the same L1A. The readout engine
// (global clock) assembles one event per L1A into one half of the dual-port
// output buffer; the DMA controller (bus clock) copies finished halves to
// the output bus. The halves are passed back and forth as 1-bit tokens
// through two dual-clock FIFOs of depth 2 (ro2dma and dma2ro).
//
// backpressure is raised, registered, when the tag FIFOs have at most two
// free places or when neither buffer half is free. rst belongs to the global
// clock and bus_rst to the bus clock; both are synchronous. spy follows the
// readout engine (see there).
//
// The composition and FIFO names follow the document; the backpressure rule
// and the status outputs are this design's choices.
module carrier #(
  parameter int unsigned NCHAN           = fe_pkg::NCHAN,
  parameter int unsigned DSIZE_P         = fe_pkg::DSIZE_P,
  parameter int unsigned MAX_L1A_SERVICE = fe_pkg::MAX_L1A_SERVICE,
  parameter int unsigned RO_BUFSIZE      = fe_pkg::RO_BUFSIZE,
  parameter int unsigned FIFOLEN_P       = fe_pkg::FIFOLEN_P,
  parameter int unsigned FIFOLEN_EV      = fe_pkg::FIFOLEN_EV,
  parameter int unsigned PULSE_LEN       = fe_pkg::PULSE_LEN,
  parameter int unsigned MWD_M           = 256,
  parameter int unsigned MWD_L           = 128,
  parameter int unsigned MEM_AW          = 12
) (
  input  logic                      gclk,
  input  logic                      bus_clk,
  input  logic                      rst,
  input  logic                      bus_rst,
  input  logic                      L1A,
  input  logic                      local_trigger,
  input  logic [47:0]               timestamp,
  input  logic [23:0]               event_num,
  input  logic [15:0]               matching_window,
  input  logic [15:0]               L1A_latency,
  input  logic [7:0]                cmd,
  input  logic signed [DSIZE_P-1:0] ch [NCHAN],
  output logic [15:0]               spy,
  output logic                      backpressure,
  // bus master port
  output logic                      bus_request,
  input  logic                      gnt,
  output fe_pkg::bus_req_t          bus_port,
  // status
  output logic [MEM_AW-1:0]         dma_wptr,
  output logic [15:0]               n_events_ro,
  output logic [15:0]               n_events_dma,
  output logic                      ch_overflow,
  output logic                      match_error
);
  localparam int unsigned NM  = NCHAN / 2;
  localparam int unsigned DEV = fe_pkg::DSIZE_EV;
  localparam int unsigned AW  = $clog2(RO_BUFSIZE);

  // ---------------- mezzanines ----------------
  logic signed [DSIZE_P-1:0] m_ch   [2][NM];
  logic                      p_re   [2][NM], e_re [2][NM];
  logic [DEV-1:0]            p_dat  [2][NM];
  logic signed [DEV-1:0]     e_dat  [2][NM];
  logic                      p_emp  [2][NM], e_emp [2][NM], m_ovf [2][NM];
  logic [15:0]               m_nm   [2][NM], m_ner [2][NM];

  logic [DEV-1:0]            pulse    [NCHAN];
  logic signed [DEV-1:0]     energy   [NCHAN];
  logic                      pulse_empty [NCHAN], energy_empty [NCHAN];
  logic                      pulse_re [NCHAN], energy_re [NCHAN];

  for (genvar m = 0; m < 2; m++) begin : g_mez
    for (genvar i = 0; i < NM; i++) begin : g_map
      assign m_ch[m][i]              = ch[m*NM + i];
      assign p_re[m][i]              = pulse_re[m*NM + i];
      assign e_re[m][i]              = energy_re[m*NM + i];
      assign pulse[m*NM + i]         = p_dat[m][i];
      assign energy[m*NM + i]        = e_dat[m][i];
      assign pulse_empty[m*NM + i]   = p_emp[m][i];
      assign energy_empty[m*NM + i]  = e_emp[m][i];
    end
    mezzanine #(.NCH(NM), .DSIZE_P(DSIZE_P), .FIFOLEN_P(FIFOLEN_P),
                .FIFOLEN_EV(FIFOLEN_EV), .PULSE_LEN(PULSE_LEN),
                .MWD_M(MWD_M), .MWD_L(MWD_L)) mz (
      .gclk(gclk), .rst(rst), .L1A(L1A), .local_trigger(local_trigger),
      .timestamp(timestamp), .matching_window(matching_window),
      .L1A_latency(L1A_latency), .ch(m_ch[m]),
      .ev_pulse_re(p_re[m]), .ev_energy_re(e_re[m]),
      .ev_pulse(p_dat[m]), .ev_energy(e_dat[m]),
      .ev_empty(p_emp[m]), .en_empty(e_emp[m]), .ch_overflow(m_ovf[m]),
      .n_matched(m_nm[m]), .n_errors(m_ner[m]));
  end

  always_ff @(posedge gclk) begin
    if (rst) begin
      ch_overflow <= 1'b0;
      match_error <= 1'b0;
    end else begin
      for (int m = 0; m < 2; m++)
        for (int i = 0; i < NM; i++) begin
          if (m_ovf[m][i])      ch_overflow <= 1'b1;
          if (m_ner[m][i] != 0) match_error <= 1'b1;
        end
    end
  end

  // ---------------- tags storage ----------------
  logic [47:0] tst_out;
  logic [23:0] evc_out;
  logic        tst_empty, evc_empty, tst_full, evc_full, rd_enable_tag;
  logic [$clog2(MAX_L1A_SERVICE):0] tst_count, evc_count;

  sync_fifo #(.WIDTH(48), .DEPTH(MAX_L1A_SERVICE)) tstamp_fifo (
    .clk(gclk), .rst(rst), .wr_en(L1A), .wdata(timestamp),
    .rd_en(rd_enable_tag), .rdata(tst_out), .empty(tst_empty), .full(tst_full),
    .count(tst_count));
  sync_fifo #(.WIDTH(24), .DEPTH(MAX_L1A_SERVICE)) evcount_fifo (
    .clk(gclk), .rst(rst), .wr_en(L1A), .wdata(event_num),
    .rd_en(rd_enable_tag), .rdata(evc_out), .empty(evc_empty), .full(evc_full),
    .count(evc_count));

  // ---------------- readout engine + output buffer ----------------
  logic          ro_we;
  logic [AW-1:0] ro_addr, dma_addr;
  logic [15:0]   ro_data, dma_data;
  logic          r2d_valid, r2d_tok, r2d_re, r2d_we, r2d_wtok, r2d_full;
  logic          d2r_valid, d2r_tok, d2r_re, d2r_we, d2r_wtok, d2r_full;
  logic [1:0]    free_halves;
  logic          r2d_empty, d2r_empty;

  readout_engine #(.NCHAN(NCHAN), .RO_BUFSIZE(RO_BUFSIZE)) ro (
    .gclk(gclk), .rst(rst),
    .pulse(pulse), .pulse_empty(pulse_empty), .pulse_re(pulse_re),
    .energy(energy), .energy_empty(energy_empty), .energy_re(energy_re),
    .tst_out(tst_out), .evc_out(evc_out), .tag_empty(tst_empty || evc_empty),
    .rd_enable_tag(rd_enable_tag),
    .we(ro_we), .addr_in(ro_addr), .data_in(ro_data),
    .token_in_valid(d2r_valid), .token_in(d2r_tok), .token_in_re(d2r_re),
    .token_out_we(r2d_we), .token_out(r2d_wtok), .token_out_full(r2d_full),
    .cmd(cmd), .spy(spy), .free_halves(free_halves), .n_events(n_events_ro));

  dpram #(.DEPTH(RO_BUFSIZE), .WIDTH(16)) DPRAM (
    .wclk(gclk), .we(ro_we), .addr_in(ro_addr), .data_in(ro_data),
    .rclk(bus_clk), .addr_out(dma_addr), .data_out(dma_data));

  async_fifo #(.WIDTH(1), .DEPTH(2)) ro2dma (
    .wclk(gclk), .wrst(rst), .wr_en(r2d_we), .wdata(r2d_wtok), .full(r2d_full),
    .rclk(bus_clk), .rrst(bus_rst), .rd_en(r2d_re), .rdata(r2d_tok), .empty(r2d_empty));
  async_fifo #(.WIDTH(1), .DEPTH(2)) dma2ro (
    .wclk(bus_clk), .wrst(bus_rst), .wr_en(d2r_we), .wdata(d2r_wtok), .full(d2r_full),
    .rclk(gclk), .rrst(rst), .rd_en(d2r_re), .rdata(d2r_tok), .empty(d2r_empty));

  assign r2d_valid = !r2d_empty;
  assign d2r_valid = !d2r_empty;

  dma_controller #(.RO_BUFSIZE(RO_BUFSIZE), .MEM_AW(MEM_AW)) dma (
    .bus_clk(bus_clk), .rst(bus_rst),
    .token_in_valid(r2d_valid), .token_in(r2d_tok), .token_in_re(r2d_re),
    .token_out_we(d2r_we), .token_out(d2r_wtok), .token_out_full(d2r_full),
    .addr_out(dma_addr), .data_out(dma_data),
    .bus_request(bus_request), .gnt(gnt), .bus_port(bus_port),
    .wptr(dma_wptr), .n_events(n_events_dma));

  // ---------------- backpressure ----------------
  always_ff @(posedge gclk) begin
    if (rst) backpressure <= 1'b0;
    else     backpressure <= (32'(tst_count) + 2 >= MAX_L1A_SERVICE) ||
                             (free_halves == 2'b00);
  end
endmodule
