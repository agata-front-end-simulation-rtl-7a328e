// trigger_matching: selects the buffered pulses of one channel that a
// validation (L1A) asks for.
//
// Each pulse in the channel buffer is a timestamp word (bit 16 set) followed
// by PULSE_LEN sample words. For every L1A time waiting in the L1A FIFO the
// machine computes, modulo 2^16,
//     trigger_request_time = L1A_time - L1A_latency
//     window               = [trigger_request_time, + matching_window]
// and then inspects the oldest pulse:
//   * older than the window  -> the pulse is dropped (discard),
//   * inside the window      -> a start-of-pulse word with the pulse time and
//                               the samples are copied to the event FIFO and
//                               latch_energy pulses once (match),
//   * newer than the window  -> the L1A is finished.
// If the buffer is empty the L1A is finished once the window has closed.
// A finished L1A writes one end-of-event word whose payload is the number of
// pulses matched, and is removed from the L1A FIFO. A word that should be a
// timestamp but is not is dropped and counted as an error.
//
// Interface: show-ahead FIFO heads in, read enables out, the event FIFO's
// write port out. Timing: one FIFO word moved per clock; a full event FIFO
// stalls the copy. Counters of matched, discarded pulses and errors are
// outputs.
//
// The state names and the window arithmetic follow the document; the
// end-of-event word, the wait for an open window and the error recovery are
// this design's own.
module trigger_matching #(
  parameter int unsigned PULSE_LEN = fe_pkg::PULSE_LEN
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [15:0] timestamp_lsw,
  input  logic [15:0] L1A_latency,
  input  logic [15:0] matching_window,
  // channel buffer
  input  fe_pkg::ch_word_t    ch_head,
  input  logic        ch_empty,
  output logic        read_enable_c,
  // L1A timestamp FIFO
  input  logic [15:0] tst_head,
  input  logic        tst_empty,
  output logic        read_enable_t,
  // event FIFO
  output logic        write_enable_ev,
  output fe_pkg::ev_word_t    ev_data,
  input  logic        ev_full,
  output logic        latch_energy,
  // statistics
  output logic [15:0] n_matched,
  output logic [15:0] n_discarded,
  output logic [15:0] n_errors
);
  typedef enum logic [2:0] {
    CHECK_L1A_FIFO, MATCH_S_START, MATCH_S_DUMP, MATCH_S_CLOSE, MATCH_S_ERROR
  } tm_state_e;

  localparam int unsigned DW = $clog2(PULSE_LEN + 1);

  tm_state_e      state, next_state;
  logic [15:0]    trq, trq_nx;          // trigger request time of current L1A
  logic [15:0]    pulses, pulses_nx;    // pulses matched for current L1A
  logic [DW-1:0]  dump_cnt, dump_cnt_nx;
  logic           keep, keep_nx;        // copy (match) or drop (discard)
  logic           inc_match, inc_disc, inc_err;
  logic [15:0]    dt, open_t;

  assign dt     = ch_head.payload - trq;   // pulse time relative to window start
  assign open_t = timestamp_lsw - trq;     // time elapsed since window start

  always_comb begin
    next_state      = state;
    trq_nx          = trq;
    pulses_nx       = pulses;
    dump_cnt_nx     = dump_cnt;
    keep_nx         = keep;
    read_enable_c   = 1'b0;
    read_enable_t   = 1'b0;
    write_enable_ev = 1'b0;
    ev_data         = '{kind: fe_pkg::EV_SAMPLE, payload: ch_head.payload};
    latch_energy    = 1'b0;
    inc_match       = 1'b0;
    inc_disc        = 1'b0;
    inc_err         = 1'b0;
    unique case (state)
      CHECK_L1A_FIFO: begin
        if (!tst_empty) begin
          trq_nx     = tst_head - L1A_latency;
          pulses_nx  = '0;
          next_state = MATCH_S_START;
        end
      end
      MATCH_S_START: begin
        if (ch_empty) begin
          if (open_t > matching_window) next_state = MATCH_S_CLOSE;
        end else if (!ch_head.is_tstamp) begin
          next_state = MATCH_S_ERROR;
        end else if (dt[15]) begin                 // older than the window
          read_enable_c = 1'b1;
          keep_nx       = 1'b0;
          dump_cnt_nx   = DW'(PULSE_LEN);
          inc_disc      = 1'b1;
          next_state    = MATCH_S_DUMP;
        end else if (dt <= matching_window) begin  // inside the window
          if (!ev_full) begin
            read_enable_c   = 1'b1;
            write_enable_ev = 1'b1;
            ev_data         = '{kind: fe_pkg::EV_SOF, payload: ch_head.payload};
            latch_energy    = 1'b1;
            keep_nx         = 1'b1;
            dump_cnt_nx     = DW'(PULSE_LEN);
            pulses_nx       = pulses + 1'b1;
            inc_match       = 1'b1;
            next_state      = MATCH_S_DUMP;
          end
        end else begin                             // newer than the window
          next_state = MATCH_S_CLOSE;
        end
      end
      MATCH_S_DUMP: begin
        if (dump_cnt == 0) begin
          next_state = MATCH_S_START;
        end else if (!ch_empty) begin
          if (ch_head.is_tstamp) begin             // pulse cut short
            inc_err    = 1'b1;
            next_state = MATCH_S_START;
          end else if (!keep || !ev_full) begin
            read_enable_c   = 1'b1;
            write_enable_ev = keep;
            dump_cnt_nx     = dump_cnt - 1'b1;
          end
        end
      end
      MATCH_S_CLOSE: begin
        if (!ev_full) begin
          write_enable_ev = 1'b1;
          ev_data         = '{kind: fe_pkg::EV_EOE, payload: pulses};
          read_enable_t   = 1'b1;
          next_state      = CHECK_L1A_FIFO;
        end
      end
      MATCH_S_ERROR: begin
        read_enable_c = 1'b1;
        inc_err       = 1'b1;
        next_state    = MATCH_S_START;
      end
      default: next_state = CHECK_L1A_FIFO;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state       <= CHECK_L1A_FIFO;
      trq         <= '0;
      pulses      <= '0;
      dump_cnt    <= '0;
      keep        <= 1'b0;
      n_matched   <= '0;
      n_discarded <= '0;
      n_errors    <= '0;
    end else begin
      state    <= next_state;
      trq      <= trq_nx;
      pulses   <= pulses_nx;
      dump_cnt <= dump_cnt_nx;
      keep     <= keep_nx;
      if (inc_match) n_matched   <= n_matched + 1'b1;
      if (inc_disc)  n_discarded <= n_discarded + 1'b1;
      if (inc_err)   n_errors    <= n_errors + 1'b1;
    end
  end

  // the event FIFO is never written while full
  assert property (@(posedge clk) disable iff (rst) write_enable_ev |-> !ev_full);
  // a FIFO is never read while empty
  assert property (@(posedge clk) disable iff (rst) read_enable_c |-> !ch_empty);
  assert property (@(posedge clk) disable iff (rst) read_enable_t |-> !tst_empty);
endmodule
