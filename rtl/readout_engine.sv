// readout_engine: builds complete events in the carrier's output buffer.
//
// For every L1A whose tags (48-bit timestamp and 24-bit event number) wait in
// the tag FIFOs, the engine takes a free half of the dual-port buffer and
// writes, as 16-bit words (bits 15:14 give the word type):
//   word 0      {truncated, 3'b0, length[11:0]}   written last
//   words 1..5  event number [15:0], [23:16]; timestamp [15:0], [31:16], [47:32]
//   per channel c = 0..NCHAN-1:
//     {2'b10, c[3:0], 10'b0}                channel header
//     {2'b01, 14'b0}, pulse time            start of each matched pulse
//     {2'b00, sample[13:0]}                 the pulse samples
//     {2'b11, c[3:0], npulses[9:0]}         channel trailer
//     one raw 16-bit energy word per pulse
// The channel's event FIFO delivers its share of the L1A up to an end-of-event
// word; the engine waits on an empty FIFO, so it stays in step with trigger
// matching. Words that do not fit in the half are dropped and the truncated
// bit is set. The finished half is handed to the DMA side with a 1-bit token
// naming it; tokens coming back mark halves free again (both free after reset).
//
// spy shows, one clock late, each sample read from channel cmd[3:0] and is 0
// otherwise; cmd[7:4] is not used. One buffer word is written per clock
// at most.
//
// The engine, its inputs and the token exchange follow the document; the
// buffer format, the ping-pong use of the halves and the spy selection are
// this design's own.
module readout_engine #(
  parameter int unsigned NCHAN      = fe_pkg::NCHAN,
  parameter int unsigned DSIZE_EV   = fe_pkg::DSIZE_EV,
  parameter int unsigned RO_BUFSIZE = fe_pkg::RO_BUFSIZE
) (
  input  logic                        gclk,
  input  logic                        rst,
  input  logic [DSIZE_EV-1:0]         pulse        [NCHAN],
  input  logic                        pulse_empty  [NCHAN],
  output logic                        pulse_re     [NCHAN],
  input  logic signed [DSIZE_EV-1:0]  energy       [NCHAN],
  input  logic                        energy_empty [NCHAN],
  output logic                        energy_re    [NCHAN],
  input  logic [47:0]                 tst_out,
  input  logic [23:0]                 evc_out,
  input  logic                        tag_empty,
  output logic                        rd_enable_tag,
  output logic                        we,
  output logic [$clog2(RO_BUFSIZE)-1:0] addr_in,
  output logic [15:0]                 data_in,
  input  logic                        token_in_valid,
  input  logic                        token_in,
  output logic                        token_in_re,
  output logic                        token_out_we,
  output logic                        token_out,
  input  logic                        token_out_full,
  input  logic [7:0]                  cmd,
  output logic [15:0]                 spy,
  output logic [1:0]                  free_halves,
  output logic [15:0]                 n_events
);
  localparam int unsigned AW  = $clog2(RO_BUFSIZE);
  localparam int unsigned HW  = RO_BUFSIZE / 2;      // words per half
  localparam int unsigned PW  = AW;                  // pointer can reach HW
  localparam int unsigned CHW = $clog2(NCHAN);

  typedef enum logic [2:0] {
    S_IDLE, S_HDR, S_CH_HDR, S_CH_DATA, S_CH_SOFT, S_CH_EN, S_FINISH, S_TOKEN
  } ro_state_e;

  ro_state_e       state, state_nx;
  logic            half, half_nx;
  logic [PW-1:0]   ptr, ptr_nx;
  logic            trunc, trunc_nx;
  logic [2:0]      hidx, hidx_nx;
  logic [CHW-1:0]  c, c_nx;
  logic [9:0]      en_left, en_left_nx;
  logic [1:0]      free_nx;
  logic [15:0]     spy_nx;

  // one buffer write request per clock
  logic        wr_req;
  logic [15:0] wr_word;

  fe_pkg::ev_word_t head;
  assign head = fe_pkg::ev_word_t'(pulse[c]);

  always_comb begin
    state_nx      = state;
    half_nx       = half;
    hidx_nx       = hidx;
    c_nx          = c;
    en_left_nx    = en_left;
    free_nx       = free_halves;
    spy_nx        = 16'd0;
    wr_req        = 1'b0;
    wr_word       = '0;
    rd_enable_tag = 1'b0;
    token_in_re   = 1'b0;
    token_out_we  = 1'b0;
    token_out     = half;
    for (int i = 0; i < NCHAN; i++) begin
      pulse_re[i]  = 1'b0;
      energy_re[i] = 1'b0;
    end
    // word 0 is written directly in S_FINISH
    we      = 1'b0;
    addr_in = {half, {(AW-1){1'b0}}};
    data_in = {trunc, 3'b0, 12'(ptr)};

    if (token_in_valid) begin
      token_in_re       = 1'b1;
      free_nx[token_in] = 1'b1;
    end

    unique case (state)
      S_IDLE: begin
        if (!tag_empty && (free_halves != 2'b00)) begin
          half_nx          = free_halves[0] ? 1'b0 : 1'b1;
          free_nx[half_nx] = 1'b0;
          hidx_nx          = 3'd1;
          state_nx         = S_HDR;
        end
      end
      S_HDR: begin
        wr_req = 1'b1;
        unique case (hidx)
          3'd1:    wr_word = evc_out[15:0];
          3'd2:    wr_word = {8'h00, evc_out[23:16]};
          3'd3:    wr_word = tst_out[15:0];
          3'd4:    wr_word = tst_out[31:16];
          default: wr_word = tst_out[47:32];
        endcase
        hidx_nx = hidx + 1'b1;
        if (hidx == 3'd5) begin
          rd_enable_tag = 1'b1;
          c_nx          = '0;
          state_nx      = S_CH_HDR;
        end
      end
      S_CH_HDR: begin
        wr_req   = 1'b1;
        wr_word  = {2'b10, 4'(c), 10'b0};
        state_nx = S_CH_DATA;
      end
      S_CH_DATA: begin
        if (!pulse_empty[c]) begin
          unique case (head.kind)
            fe_pkg::EV_SAMPLE: begin
              wr_req      = 1'b1;
              wr_word     = {2'b00, head.payload[13:0]};
              pulse_re[c] = 1'b1;
              if (4'(c) == cmd[3:0]) spy_nx = head.payload;
            end
            fe_pkg::EV_SOF: begin
              wr_req   = 1'b1;
              wr_word  = {2'b01, 14'b0};
              state_nx = S_CH_SOFT;
            end
            fe_pkg::EV_EOE: begin
              wr_req      = 1'b1;
              wr_word     = {2'b11, 4'(c), head.payload[9:0]};
              pulse_re[c] = 1'b1;
              en_left_nx  = head.payload[9:0];
              state_nx    = S_CH_EN;
            end
            default: pulse_re[c] = 1'b1;   // unknown word: skip
          endcase
        end
      end
      S_CH_SOFT: begin
        wr_req      = 1'b1;
        wr_word     = head.payload;
        pulse_re[c] = 1'b1;
        state_nx    = S_CH_DATA;
      end
      S_CH_EN: begin
        if (en_left == 0) begin
          if (32'(c) == NCHAN-1) state_nx = S_FINISH;
          else begin
            c_nx     = c + 1'b1;
            state_nx = S_CH_HDR;
          end
        end else if (!energy_empty[c]) begin
          wr_req       = 1'b1;
          wr_word      = energy[c][15:0];
          energy_re[c] = 1'b1;
          en_left_nx   = en_left - 1'b1;
        end
      end
      S_FINISH: begin
        we       = 1'b1;
        state_nx = S_TOKEN;
      end
      S_TOKEN: begin
        if (!token_out_full) begin
          token_out_we = 1'b1;
          state_nx     = S_IDLE;
        end
      end
      default: state_nx = S_IDLE;
    endcase

    // sequential buffer writes with truncation at the end of the half
    ptr_nx   = ptr;
    trunc_nx = trunc;
    if (state == S_IDLE) begin
      ptr_nx   = PW'(1);
      trunc_nx = 1'b0;
    end else if (wr_req) begin
      if (32'(ptr) < HW) begin
        we      = 1'b1;
        addr_in = {half, ptr[AW-2:0]};
        data_in = wr_word;
        ptr_nx  = ptr + 1'b1;
      end else begin
        trunc_nx = 1'b1;
      end
    end
  end

  always_ff @(posedge gclk) begin
    if (rst) begin
      state       <= S_IDLE;
      half        <= 1'b0;
      ptr         <= '0;
      trunc       <= 1'b0;
      hidx        <= '0;
      c           <= '0;
      en_left     <= '0;
      free_halves <= 2'b11;
      spy         <= '0;
      n_events    <= '0;
    end else begin
      state       <= state_nx;
      half        <= half_nx;
      ptr         <= ptr_nx;
      trunc       <= trunc_nx;
      hidx        <= hidx_nx;
      c           <= c_nx;
      en_left     <= en_left_nx;
      free_halves <= free_nx;
      spy         <= spy_nx;
      if (token_out_we) n_events <= n_events + 1'b1;
    end
  end
endmodule
