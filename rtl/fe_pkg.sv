// fe_pkg: constants and types shared by the front-end readout.
//
// The front end samples 12 detector channels at the 100 MHz global clock,
// buffers every locally triggered pulse together with its 16-bit timestamp,
// and keeps only the pulses that a global validation (L1A) matches in time.
// Widths printed in the block diagrams (14-bit samples, 16-bit timestamp
// low word, 48-bit timestamp, 24-bit event number, 8-bit command, 16-bit spy
// and fiber words) are taken as given. Depths and the event-word encoding
// are this design's own choices.
package fe_pkg;

  localparam int unsigned ADC_BITS        = 14;  // sample width
  localparam int unsigned DSIZE_P         = 14;  // channel sample width
  localparam int unsigned TSTAMP_SIZE     = 16;  // timestamp bits kept per channel
  localparam int unsigned TS_BITS         = 48;  // full timestamp
  localparam int unsigned EV_BITS         = 24;  // event number
  localparam int unsigned DSIZE_EV        = 18;  // event FIFO word: 2-bit kind + 16-bit payload
  localparam int unsigned NCH_MEZ         = 6;   // channels per mezzanine
  localparam int unsigned NCHAN           = 12;  // channels per carrier
  localparam int unsigned MAX_L1A_SERVICE = 16;  // pending L1As per FIFO
  localparam int unsigned FIFOLEN_D       = 16;  // pre-trigger delay (samples)
  localparam int unsigned FIFOLEN_P       = 512; // channel pulse buffer
  localparam int unsigned FIFOLEN_EV      = 512; // matched event buffer
  localparam int unsigned PULSE_LEN       = 64;  // samples recorded per pulse
  localparam int unsigned RO_BUFSIZE      = 4096;// output buffer words (two halves)
  localparam int unsigned BUS_AW          = 16;  // bus address width
  localparam int unsigned BUS_DW          = 32;  // bus data width

  // Kinds of the words in a channel's event FIFO.
  typedef enum logic [1:0] {
    EV_SAMPLE = 2'b00,   // payload = sign-extended sample
    EV_SOF    = 2'b01,   // start of a matched pulse, payload = pulse time
    EV_EOE    = 2'b10    // end of the channel's share of one L1A, payload = pulses
  } ev_kind_e;

  typedef struct packed {
    ev_kind_e    kind;
    logic [15:0] payload;
  } ev_word_t;

  // Word of the channel pulse buffer: bit 16 set marks a timestamp.
  typedef struct packed {
    logic        is_tstamp;
    logic [15:0] payload;
  } ch_word_t;

  // One bus master request; a transfer happens in each cycle valid is high
  // while the master holds the grant.
  typedef struct packed {
    logic              valid;
    logic              we;
    logic [BUS_AW-1:0] addr;
    logic [BUS_DW-1:0] wdata;
  } bus_req_t;

  // Opcodes of the fiber word from the trigger system (fiber_in[15:8]).
  typedef enum logic [7:0] {
    OP_IDLE     = 8'h00,
    OP_L1A      = 8'h01,
    OP_CC_RESET = 8'h02,
    OP_EC_RESET = 8'h03,
    OP_CMD      = 8'h04,
    OP_RESET    = 8'h05
  } fiber_op_e;

endpackage
