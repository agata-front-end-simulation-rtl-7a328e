// gts_if: front-end side of the global trigger and synchronisation link.
//
// It keeps the two counters that tag every event:
//   timestamp  48-bit count of global-clock cycles, cleared by a CC reset,
//   event_num  24-bit count of L1A validations, cleared by an EC reset.
// It decodes one 16-bit word per clock from the incoming fiber,
// fiber_in = {opcode, argument}:
//   0x01 L1A       L1A pulses for one clock and event_num counts up; the new
//                  event number is presented together with the L1A
//   0x02 CC reset  timestamp restarts from 0
//   0x03 EC reset  event_num restarts from 0
//   0x04 command   cmd <= argument
//   0x05 reset     rst pulses for one clock
// Outgoing, fiber_out = {14'b0, backpressure, trigger_request}, registered.
// All outputs are registered; local_rst holds rst high and clears the rest.
//
// The counters, their resets and the signals exchanged with the carrier and
// the local trigger follow the document; the fiber word format is this
// design's own, as the document does not give one.
module gts_if (
  input  logic        gclk,
  input  logic        local_rst,
  input  logic [15:0] fiber_in,
  output logic [15:0] fiber_out,
  input  logic        trigger_request,
  input  logic        backpressure,
  output logic        L1A,
  output logic [47:0] timestamp,
  output logic [23:0] event_num,
  output logic [7:0]  cmd,
  output logic        rst
);
  fe_pkg::fiber_op_e op;
  assign op = fe_pkg::fiber_op_e'(fiber_in[15:8]);

  always_ff @(posedge gclk) begin
    if (local_rst) begin
      timestamp <= '0;
      event_num <= '0;
      cmd       <= '0;
      L1A       <= 1'b0;
      rst       <= 1'b1;
      fiber_out <= '0;
    end else begin
      timestamp <= (op == fe_pkg::OP_CC_RESET) ? 48'd0 : timestamp + 1'b1;
      L1A       <= (op == fe_pkg::OP_L1A);
      if (op == fe_pkg::OP_L1A)           event_num <= event_num + 1'b1;
      else if (op == fe_pkg::OP_EC_RESET) event_num <= '0;
      if (op == fe_pkg::OP_CMD) cmd <= fiber_in[7:0];
      rst       <= (op == fe_pkg::OP_RESET);
      fiber_out <= {14'b0, backpressure, trigger_request};
    end
  end
endmodule
