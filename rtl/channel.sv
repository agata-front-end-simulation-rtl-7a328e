// channel: one detector channel of the front end.
//
// Samples arrive every clock. They go two ways:
//   * through a pre-trigger delay line (delay_fifo, FIFOLEN_D samples) to the
//     pulse controller. On a rising edge of local_trigger the controller
//     writes the 16-bit timestamp (marked by bit 16) and then PULSE_LEN
//     delayed samples into the pulse buffer ch_fifo. If local_trigger is
//     first seen high at clock t (timestamp_lsw = T then), the timestamp
//     word holds T and the samples are those presented at clocks
//     t-FIFOLEN_D+1 .. t-FIFOLEN_D+PULSE_LEN. A trigger that arrives
//     while a pulse is being recorded is ignored; if ch_fifo has no room for
//     a whole pulse the pulse is dropped and ch_overflow pulses.
//   * through the MWD filter, whose output the energy controller follows:
//     it keeps the peak since the last latch and writes it to en_fifo when
//     trigger matching signals latch_energy.
// Every L1A stores the current timestamp in tstamp_fifo (tstamp_in). The
// trigger matching machine pairs these L1A times with the buffered pulses and
// copies matched ones into ev_fifo.
//
// Outputs: the heads of ev_fifo (ev_pulse, an fe_pkg::ev_word_t) and of
// en_fifo (ev_energy, signed), each with its empty flag and read enable.
// All FIFOs are show-ahead. The buffer structure, the FIFO names and the
// ports follow the document; the depths, the pulse length, the energy peak
// rule and the drop-whole-pulse overflow rule are this design's choices.
module channel #(
  parameter int unsigned DSIZE_P         = fe_pkg::DSIZE_P,
  parameter int unsigned DSIZE_EV        = fe_pkg::DSIZE_EV,
  parameter int unsigned MAX_L1A_SERVICE = fe_pkg::MAX_L1A_SERVICE,
  parameter int unsigned FIFOLEN_D       = fe_pkg::FIFOLEN_D,
  parameter int unsigned FIFOLEN_P       = fe_pkg::FIFOLEN_P,
  parameter int unsigned FIFOLEN_EV      = fe_pkg::FIFOLEN_EV,
  parameter int unsigned PULSE_LEN       = fe_pkg::PULSE_LEN,
  parameter int unsigned MWD_M           = 256,
  parameter int unsigned MWD_L           = 128
) (
  input  logic                      gclk,
  input  logic                      rst,
  input  logic                      L1A,
  input  logic                      local_trigger,
  input  logic [15:0]               timestamp_lsw,
  input  logic signed [DSIZE_P-1:0] ch,
  input  logic                      ev_pulse_re,
  input  logic                      ev_energy_re,
  output logic                      ev_empty,
  output logic                      en_empty,
  output logic [DSIZE_EV-1:0]       ev_pulse,
  output logic signed [DSIZE_EV-1:0] ev_energy,
  input  logic [15:0]               matching_window,
  input  logic [15:0]               L1A_latency,
  output logic                      ch_overflow,
  output logic [15:0]               n_matched,
  output logic [15:0]               n_discarded,
  output logic [15:0]               n_errors
);
  localparam int unsigned DAW = $clog2(FIFOLEN_D);
  localparam int unsigned PCW = $clog2(FIFOLEN_P) + 1;
  localparam int unsigned RCW = $clog2(PULSE_LEN + 1);

  // ---------------- tstamp_in + tstamp_fifo ----------------
  logic [15:0] tst_head;
  logic        tst_empty, tst_full, read_enable_t;
  logic [$clog2(MAX_L1A_SERVICE):0] tst_count;
  sync_fifo #(.WIDTH(16), .DEPTH(MAX_L1A_SERVICE)) tstamp_fifo (
    .clk(gclk), .rst(rst), .wr_en(L1A), .wdata(timestamp_lsw),
    .rd_en(read_enable_t), .rdata(tst_head), .empty(tst_empty), .full(tst_full),
    .count(tst_count));

  // ---------------- delay_fifo: pre-trigger delay line ----------------
  logic signed [DSIZE_P-1:0] dly [FIFOLEN_D];
  logic [DAW-1:0]            dptr;
  logic                      dfull;
  logic signed [DSIZE_P-1:0] pulse_out;
  assign pulse_out = dfull ? dly[dptr] : '0;
  always_ff @(posedge gclk) dly[dptr] <= ch;
  always_ff @(posedge gclk) begin
    if (rst) begin
      dptr <= '0; dfull <= 1'b0;
    end else begin
      dptr <= (dptr == DAW'(FIFOLEN_D-1)) ? '0 : dptr + 1'b1;
      if (dptr == DAW'(FIFOLEN_D-1)) dfull <= 1'b1;
    end
  end

  // ---------------- pulse_cntr + ch_fifo ----------------
  fe_pkg::ch_word_t ch_wdata, ch_head;
  logic             write_enable_p, read_enable_c, ch_empty, ch_full;
  logic [PCW-1:0]   ch_count;
  logic             lt_q, recording, start;
  logic [RCW-1:0]   rec_cnt;
  logic             room;

  assign room  = (32'(FIFOLEN_P) - 32'(ch_count)) >= 32'(PULSE_LEN + 1);
  assign start = local_trigger && !lt_q && !recording;

  always_comb begin
    write_enable_p = 1'b0;
    ch_wdata       = '{is_tstamp: 1'b0, payload: 16'(pulse_out)};
    if (recording) begin
      write_enable_p = 1'b1;
    end else if (start && room) begin
      write_enable_p = 1'b1;
      ch_wdata       = '{is_tstamp: 1'b1, payload: timestamp_lsw};
    end
  end

  always_ff @(posedge gclk) begin
    if (rst) begin
      lt_q <= 1'b0; recording <= 1'b0; rec_cnt <= '0; ch_overflow <= 1'b0;
    end else begin
      lt_q        <= local_trigger;
      ch_overflow <= start && !room;
      if (recording) begin
        rec_cnt <= rec_cnt - 1'b1;
        if (rec_cnt == 1) recording <= 1'b0;
      end else if (start && room) begin
        recording <= 1'b1;
        rec_cnt   <= RCW'(PULSE_LEN);
      end
    end
  end

  sync_fifo #(.WIDTH(17), .DEPTH(FIFOLEN_P)) ch_fifo (
    .clk(gclk), .rst(rst), .wr_en(write_enable_p), .wdata(ch_wdata),
    .rd_en(read_enable_c), .rdata(ch_head), .empty(ch_empty), .full(ch_full),
    .count(ch_count));

  // ---------------- trigger_matching + ev_fifo ----------------
  fe_pkg::ev_word_t ev_wdata;
  logic             write_enable_ev, ev_full, latch_energy;
  logic [$clog2(FIFOLEN_EV):0] ev_count;

  trigger_matching #(.PULSE_LEN(PULSE_LEN)) tm (
    .clk(gclk), .rst(rst), .timestamp_lsw(timestamp_lsw),
    .L1A_latency(L1A_latency), .matching_window(matching_window),
    .ch_head(ch_head), .ch_empty(ch_empty), .read_enable_c(read_enable_c),
    .tst_head(tst_head), .tst_empty(tst_empty), .read_enable_t(read_enable_t),
    .write_enable_ev(write_enable_ev), .ev_data(ev_wdata), .ev_full(ev_full),
    .latch_energy(latch_energy),
    .n_matched(n_matched), .n_discarded(n_discarded), .n_errors(n_errors));

  sync_fifo #(.WIDTH(DSIZE_EV), .DEPTH(FIFOLEN_EV)) ev_fifo (
    .clk(gclk), .rst(rst), .wr_en(write_enable_ev), .wdata(DSIZE_EV'(ev_wdata)),
    .rd_en(ev_pulse_re), .rdata(ev_pulse), .empty(ev_empty), .full(ev_full),
    .count(ev_count));

  // ---------------- MWD + energy_cntr + en_fifo ----------------
  logic signed [15:0] energy_out, peak;
  logic               en_full;
  logic [$clog2(FIFOLEN_EV):0] en_count;

  mwd #(.DSIZE_P(DSIZE_P), .M(MWD_M), .L(MWD_L)) mwd_ch (
    .clk(gclk), .rst(rst), .ch(ch), .energy_out(energy_out));

  always_ff @(posedge gclk) begin
    if (rst)                     peak <= 16'sh8000;
    else if (latch_energy)       peak <= energy_out;
    else if (energy_out > peak)  peak <= energy_out;
  end

  logic signed [15:0] peak_now;
  assign peak_now = (energy_out > peak) ? energy_out : peak;

  sync_fifo #(.WIDTH(DSIZE_EV), .DEPTH(FIFOLEN_EV)) en_fifo (
    .clk(gclk), .rst(rst), .wr_en(latch_energy), .wdata(DSIZE_EV'(peak_now)),
    .rd_en(ev_energy_re), .rdata(ev_energy), .empty(en_empty), .full(en_full),
    .count(en_count));
endmodule
