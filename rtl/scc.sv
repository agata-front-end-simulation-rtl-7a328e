// scc: local trigger ("SCC") of the front end.
//
// The trigger channel is shifted through a window of NSAMPLE samples. Each
// cycle the design counts the samples ahead of the middle sample that are
// smaller than it and the samples after it that are larger; on a rising
// edge of the signal the count approaches NSAMPLE-1, on noise it stays low.
// When the registered count reaches the threshold, trigger_request (to the
// trigger system) and local_trigger (to the channels) go high for hold_time
// cycles. A new trigger is armed only once the count has fallen below the
// threshold again, so one rising edge gives one trigger.
//
// Timing: a sample is in the window one cycle after it is presented, the
// count is registered one cycle later, and the trigger goes high on the
// following cycle. hold_time = 0 disables the trigger.
//
// The counting rule and the port set follow the document; the window size,
// the "count >= threshold" comparison, the re-arming rule and the synchronous
// reset are this design's choices. The document's averaging process is not
// described and is not built.
module scc #(
  parameter int unsigned ADC_BITS  = 14,
  parameter int unsigned NSAMPLE   = 9,
  parameter int unsigned MIDSAMPLE = 4
) (
  input  logic                clk,
  input  logic                reset,
  input  logic [ADC_BITS-1:0] data_in,
  input  logic [11:0]         threshold,
  input  logic [9:0]          hold_time,
  output logic                trigger_request,
  output logic                local_trigger
);
  localparam int unsigned CW = $clog2(NSAMPLE) + 1;

  logic [ADC_BITS-1:0] pipe [NSAMPLE];
  logic [CW-1:0]       count_c, result;
  logic [9:0]          hold_cnt;
  logic                armed, hit;

  // shift register, newest sample at the end
  always_ff @(posedge clk) begin
    if (reset) begin
      for (int i = 0; i < NSAMPLE; i++) pipe[i] <= '0;
    end else begin
      for (int i = 0; i < NSAMPLE-1; i++) pipe[i] <= pipe[i+1];
      pipe[NSAMPLE-1] <= data_in;
    end
  end

  // count samples below the middle one before it and above it after it
  always_comb begin
    count_c = '0;
    for (int i = 0; i < MIDSAMPLE; i++)
      if (pipe[i] < pipe[MIDSAMPLE]) count_c = count_c + 1'b1;
    for (int i = MIDSAMPLE+1; i < NSAMPLE; i++)
      if (pipe[i] > pipe[MIDSAMPLE]) count_c = count_c + 1'b1;
  end

  assign hit = (12'(result) >= threshold);

  always_ff @(posedge clk) begin
    if (reset) begin
      result   <= '0;
      hold_cnt <= '0;
      armed    <= 1'b0;
    end else begin
      result <= count_c;
      if (!hit) armed <= 1'b1;
      if (hold_cnt != 0) begin
        hold_cnt <= hold_cnt - 1'b1;
      end else if (hit && armed && hold_time != 0) begin
        hold_cnt <= hold_time;
        armed    <= 1'b0;
      end
    end
  end

  assign trigger_request = (hold_cnt != 0);
  assign local_trigger   = (hold_cnt != 0);
endmodule
