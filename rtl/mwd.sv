// mwd: fixed-point Moving Window Deconvolution energy filter.
//
// For a preamplifier signal with exponential decay constant tau, the
// deconvolved signal
//     D(n) = x(n) - x(n-M) + (TAU_K / 2^TAU_SHIFT) * sum_{k=n-M}^{n-1} x(k)
// is a step of height equal to the pulse amplitude lasting M samples, free
// of the decay. A moving average over L samples then gives
//     E(n) = floor( sum_{j=0}^{L-1} D(n-j) / L ),
// a trapezoid whose flat top is the pulse energy. Samples before reset count
// as zero. L must be a power of two. Both delay lines are memories read
// before they are written; a fill flag masks their contents until they have
// been written once after reset.
//
// Timing: one sample per clock; the sample x(n) captured at a rising edge
// has E(n) on energy_out right after the next rising edge. The output is saturated to OUT_W signed bits.
//
// The document only names the fixed-point MWD; the formula is the standard
// one, and M, L and the 1/tau factor (13/65536, about 50 us at 100 MHz)
// are this design's choices.
module mwd #(
  parameter int unsigned DSIZE_P   = 14,
  parameter int unsigned M         = 256,
  parameter int unsigned L         = 128,
  parameter int unsigned TAU_K     = 13,
  parameter int unsigned TAU_SHIFT = 16,
  parameter int unsigned OUT_W     = 16
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic signed [DSIZE_P-1:0]  ch,
  output logic signed [OUT_W-1:0]    energy_out
);
  localparam int unsigned MAW = $clog2(M);
  localparam int unsigned LAW = $clog2(L);

  logic signed [DSIZE_P-1:0] xbuf [M];
  logic signed [31:0]        dbuf [L];
  logic [MAW-1:0]            xp;
  logic [LAW-1:0]            dp;
  logic                      xfull, dfull;
  logic signed [31:0]        acc, sum_d, d_r;
  logic signed [31:0]        x_n, x_m, d_m, d_c, tau_term, e_c;

  assign x_n      = 32'(ch);
  assign x_m      = xfull ? 32'(xbuf[xp]) : 32'sd0;
  assign tau_term = (acc * $signed(32'(TAU_K))) >>> TAU_SHIFT;
  assign d_c      = x_n - x_m + tau_term;
  assign d_m      = dfull ? dbuf[dp] : 32'sd0;
  assign e_c      = sum_d >>> LAW;

  always_ff @(posedge clk) begin
    xbuf[xp] <= ch;
    dbuf[dp] <= d_r;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      xp <= '0; dp <= '0; xfull <= 1'b0; dfull <= 1'b0;
      acc <= '0; sum_d <= '0; d_r <= '0;
    end else begin
      // stage 1: deconvolution
      xp  <= (xp == MAW'(M-1)) ? '0 : xp + 1'b1;
      if (xp == MAW'(M-1)) xfull <= 1'b1;
      acc <= acc + x_n - x_m;
      d_r <= d_c;
      // stage 2: moving average (the first D enters one clock after reset)
      dp    <= (dp == LAW'(L-1)) ? '0 : dp + 1'b1;
      if (dp == LAW'(L-1)) dfull <= 1'b1;
      sum_d <= sum_d + d_r - d_m;
    end
  end

  localparam logic signed [31:0] OMAX = 32'sd2**(OUT_W-1) - 1;
  localparam logic signed [31:0] OMIN = -(32'sd2**(OUT_W-1));
  always_comb begin
    if (e_c > OMAX)      energy_out = OMAX[OUT_W-1:0];
    else if (e_c < OMIN) energy_out = OMIN[OUT_W-1:0];
    else                 energy_out = e_c[OUT_W-1:0];
  end
endmodule
