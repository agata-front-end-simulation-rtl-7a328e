// mezzanine: six channels on one digitiser mezzanine card.
//
// All six channels share the global clock, reset, L1A, local trigger, the
// low 16 bits of the timestamp and the matching settings; each has its own
// sample input and its own pulse and energy FIFO read ports. The grouping by
// six and the port names follow the document (arrays indexed 0..5 here).
module mezzanine #(
  parameter int unsigned NCH      = fe_pkg::NCH_MEZ,
  parameter int unsigned DSIZE_P  = fe_pkg::DSIZE_P,
  parameter int unsigned DSIZE_EV = fe_pkg::DSIZE_EV,
  parameter int unsigned FIFOLEN_P  = fe_pkg::FIFOLEN_P,
  parameter int unsigned FIFOLEN_EV = fe_pkg::FIFOLEN_EV,
  parameter int unsigned PULSE_LEN  = fe_pkg::PULSE_LEN,
  parameter int unsigned MWD_M      = 256,
  parameter int unsigned MWD_L      = 128
) (
  input  logic                       gclk,
  input  logic                       rst,
  input  logic                       L1A,
  input  logic                       local_trigger,
  input  logic [47:0]                timestamp,
  input  logic [15:0]                matching_window,
  input  logic [15:0]                L1A_latency,
  input  logic signed [DSIZE_P-1:0]  ch           [NCH],
  input  logic                       ev_pulse_re  [NCH],
  input  logic                       ev_energy_re [NCH],
  output logic [DSIZE_EV-1:0]        ev_pulse     [NCH],
  output logic signed [DSIZE_EV-1:0] ev_energy    [NCH],
  output logic                       ev_empty     [NCH],
  output logic                       en_empty     [NCH],
  output logic                       ch_overflow  [NCH],
  output logic [15:0]                n_matched    [NCH],
  output logic [15:0]                n_errors     [NCH]
);
  logic [15:0] n_discarded [NCH];

  for (genvar i = 0; i < NCH; i++) begin : g_ch
    channel #(.DSIZE_P(DSIZE_P), .DSIZE_EV(DSIZE_EV), .FIFOLEN_P(FIFOLEN_P),
              .FIFOLEN_EV(FIFOLEN_EV), .PULSE_LEN(PULSE_LEN),
              .MWD_M(MWD_M), .MWD_L(MWD_L)) c (
      .gclk(gclk), .rst(rst), .L1A(L1A), .local_trigger(local_trigger),
      .timestamp_lsw(timestamp[15:0]), .ch(ch[i]),
      .ev_pulse_re(ev_pulse_re[i]), .ev_energy_re(ev_energy_re[i]),
      .ev_empty(ev_empty[i]), .en_empty(en_empty[i]),
      .ev_pulse(ev_pulse[i]), .ev_energy(ev_energy[i]),
      .matching_window(matching_window), .L1A_latency(L1A_latency),
      .ch_overflow(ch_overflow[i]), .n_matched(n_matched[i]),
      .n_discarded(n_discarded[i]), .n_errors(n_errors[i]));
  end
endmodule
