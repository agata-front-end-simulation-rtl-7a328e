// dma_controller: moves finished events from the carrier's output buffer to
// the fast memory over the output bus, on the bus clock.
//
// A token from the readout engine names the buffer half holding a finished
// event. The controller reads word 0 of that half (the event length), then
// requests the bus and keeps it for the whole event. It reads the event's
// 16-bit words in pairs and writes each pair as one 32-bit word
// {word 2k+1, word 2k} to consecutive fast-memory addresses (a ring of
// 2^MEM_AW words starting at 0; wptr is the next address). A missing odd
// word is sent as 0. The token is then returned so the half can be refilled.
//
// Timing: the buffer has one clock of read latency; each buffer read takes
// three clocks, so a 32-bit bus write happens at most every seven clocks.
// The token exchange follows the document; the bus protocol (request,
// registered grant, one write per valid cycle), the packing and the ring
// are this design's choices.
module dma_controller #(
  parameter int unsigned RO_BUFSIZE = fe_pkg::RO_BUFSIZE,
  parameter int unsigned MEM_AW     = 12
) (
  input  logic                          bus_clk,
  input  logic                          rst,
  input  logic                          token_in_valid,
  input  logic                          token_in,
  output logic                          token_in_re,
  output logic                          token_out_we,
  output logic                          token_out,
  input  logic                          token_out_full,
  output logic [$clog2(RO_BUFSIZE)-1:0] addr_out,
  input  logic [15:0]                   data_out,
  output logic                          bus_request,
  input  logic                          gnt,
  output fe_pkg::bus_req_t              bus_port,
  output logic [MEM_AW-1:0]             wptr,
  output logic [15:0]                   n_events
);
  localparam int unsigned AW = $clog2(RO_BUFSIZE);

  typedef enum logic [3:0] {
    D_IDLE, D_LEN_W, D_LEN_D, D_LO_A, D_LO_W, D_LO_D, D_HI_A, D_HI_W, D_HI_D,
    D_WR, D_RET
  } dma_state_e;

  dma_state_e  state;
  logic        half;
  logic [11:0] len, idx;
  logic [15:0] lo, hi;

  assign token_out   = half;
  assign bus_request = !(state inside {D_IDLE, D_LEN_W, D_LEN_D, D_RET});

  always_comb begin
    token_in_re    = (state == D_IDLE) && token_in_valid;
    token_out_we   = (state == D_RET) && !token_out_full;
    bus_port       = '0;
    if (state == D_WR && gnt) begin
      bus_port.valid = 1'b1;
      bus_port.we    = 1'b1;
      bus_port.addr  = fe_pkg::BUS_AW'(wptr);
      bus_port.wdata = {hi, lo};
    end
  end

  always_ff @(posedge bus_clk) begin
    if (rst) begin
      state    <= D_IDLE;
      half     <= 1'b0;
      len      <= '0;
      idx      <= '0;
      lo       <= '0;
      hi       <= '0;
      addr_out <= '0;
      wptr     <= '0;
      n_events <= '0;
    end else begin
      unique case (state)
        D_IDLE: if (token_in_valid) begin
          half     <= token_in;
          addr_out <= {token_in, {(AW-1){1'b0}}};
          state    <= D_LEN_W;
        end
        D_LEN_W: state <= D_LEN_D;
        D_LEN_D: begin
          len   <= data_out[11:0];
          idx   <= '0;
          state <= D_LO_A;
        end
        D_LO_A: begin
          addr_out <= {half, idx[AW-2:0]};
          state    <= D_LO_W;
        end
        D_LO_W: state <= D_LO_D;
        D_LO_D: begin
          lo    <= data_out;
          state <= D_HI_A;
        end
        D_HI_A: begin
          addr_out <= {half, (AW-1)'(idx + 1'b1)};
          state    <= D_HI_W;
        end
        D_HI_W: state <= D_HI_D;
        D_HI_D: begin
          hi    <= (idx + 1'b1 < len) ? data_out : 16'd0;
          state <= D_WR;
        end
        D_WR: if (gnt) begin
          wptr <= wptr + 1'b1;
          idx  <= idx + 12'd2;
          state <= (idx + 12'd2 >= len) ? D_RET : D_LO_A;
        end
        D_RET: if (!token_out_full) begin
          n_events <= n_events + 1'b1;
          state    <= D_IDLE;
        end
        default: state <= D_IDLE;
      endcase
    end
  end
endmodule
