// fes: front-end system of one detector readout slot.
//
// Twelve detector channels and one trigger channel are sampled on the 100 MHz
// global clock. The local trigger (scc) watches the trigger channel and
// raises trigger_request towards the global trigger system and local_trigger
// towards the channels, which then record the pulse with its timestamp. The
// trigger system answers through the fiber with an L1A validation; gts_if
// turns it into L1A, timestamp and event number. The carrier keeps the pulses
// an L1A matches in time, assembles one event per L1A and copies it, in the
// bus-clock domain, over the output bus to the fast memory, which a CPU reads.
// The CPU's bus master port is brought out: cpu_bus_request / cpu_gnt /
// cpu_req / bus_rdata. dma_wptr tells the CPU how far the event data reach.
//
// Clocks: gclk (global, trigger and channels) and bus_clk (DMA, bus, memory).
// local_rst resets the global-clock side through gts_if; a two-flop
// synchroniser derives the bus-clock reset from it.
//
// The partition into these blocks and their connections follow the
// document's front-end block diagram; where signals cross between them the
// widths are the document's.
module fes #(
  parameter int unsigned NCHAN  = fe_pkg::NCHAN,
  parameter int unsigned MEM_AW = 12
) (
  input  logic                    gclk,
  input  logic                    bus_clk,
  input  logic                    local_rst,
  input  logic [15:0]             fiber_in,
  output logic [15:0]             fiber_out,
  input  logic signed [13:0]      ch [NCHAN],
  input  logic [13:0]             trigger_ch,
  input  logic [11:0]             trigger_thresh,
  input  logic [9:0]              hold_time,
  input  logic [15:0]             matching_window,
  input  logic [15:0]             L1A_latency,
  output logic [15:0]             spy,
  output logic                    trigger_request,
  output logic                    L1A,
  output logic                    backpressure,
  // CPU bus master port
  input  logic                    cpu_bus_request,
  output logic                    cpu_gnt,
  input  fe_pkg::bus_req_t        cpu_req,
  output logic [31:0]             bus_rdata,
  // status
  output logic [MEM_AW-1:0]       dma_wptr,
  output logic [15:0]             n_events,
  output logic                    ch_overflow,
  output logic                    match_error
);
  logic        rst, local_trigger;
  logic [47:0] timestamp;
  logic [23:0] event_num;
  logic [7:0]  cmd;
  logic        bus_rst_s1, bus_rst;

  gts_if gts (
    .gclk(gclk), .local_rst(local_rst), .fiber_in(fiber_in), .fiber_out(fiber_out),
    .trigger_request(trigger_request), .backpressure(backpressure),
    .L1A(L1A), .timestamp(timestamp), .event_num(event_num), .cmd(cmd), .rst(rst));

  scc trg (
    .clk(gclk), .reset(rst), .data_in(trigger_ch), .threshold(trigger_thresh),
    .hold_time(hold_time), .trigger_request(trigger_request),
    .local_trigger(local_trigger));

  always_ff @(posedge bus_clk) begin
    bus_rst_s1 <= local_rst;
    bus_rst    <= bus_rst_s1;
  end

  logic             dma_request;
  logic [1:0]       gnt;
  fe_pkg::bus_req_t m_req [2];
  fe_pkg::bus_req_t s_req;
  logic [31:0]      s_rdata;
  logic [15:0]      n_events_ro;

  carrier #(.NCHAN(NCHAN), .MEM_AW(MEM_AW)) c1 (
    .gclk(gclk), .bus_clk(bus_clk), .rst(rst), .bus_rst(bus_rst),
    .L1A(L1A), .local_trigger(local_trigger), .timestamp(timestamp),
    .event_num(event_num), .matching_window(matching_window),
    .L1A_latency(L1A_latency), .cmd(cmd), .ch(ch), .spy(spy),
    .backpressure(backpressure), .bus_request(dma_request), .gnt(gnt[0]),
    .bus_port(m_req[0]), .dma_wptr(dma_wptr), .n_events_ro(n_events_ro),
    .n_events_dma(n_events), .ch_overflow(ch_overflow), .match_error(match_error));

  assign m_req[1] = cpu_req;
  assign cpu_gnt  = gnt[1];

  arbiter #(.NM(2)) arb (
    .clk(bus_clk), .rst(bus_rst), .req({cpu_bus_request, dma_request}), .gnt(gnt));

  out_bus #(.NM(2)) bus1 (
    .m_req(m_req), .gnt(gnt), .s_req(s_req), .s_rdata(s_rdata), .m_rdata(bus_rdata));

  fast_mem #(.AW(MEM_AW), .DW(32)) M9 (.clk(bus_clk), .req(s_req), .rdata(s_rdata));
endmodule
