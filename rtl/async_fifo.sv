// async_fifo: dual-clock FIFO for the token exchange between the readout
// engine (global clock) and the DMA controller (bus clock).
//
// Gray-coded read and write pointers cross the clock boundary through
// two-flop synchronisers; full and empty are computed in the writing and
// reading domain respectively and are conservative. DEPTH must be a power
// of two. The head word is visible on rdata while empty is low (show-ahead).
// Each side has its own synchronous reset.
module async_fifo #(
  parameter int unsigned WIDTH = 1,
  parameter int unsigned DEPTH = 2
) (
  input  logic             wclk,
  input  logic             wrst,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wdata,
  output logic             full,
  input  logic             rclk,
  input  logic             rrst,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rdata,
  output logic             empty
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] rgray_w1, rgray_w2, wgray_r1, wgray_r2;

  function automatic logic [AW:0] b2g(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // write side
  // full: write pointer one lap ahead, i.e. the two top Gray bits inverted
  localparam logic [AW:0] TOPMASK = (AW+1)'(3) << (AW-1);
  logic [AW:0] wbin_nx;
  assign full    = (wgray == (rgray_w2 ^ TOPMASK));
  assign wbin_nx = wbin + (AW+1)'(wr_en && !full);
  always_ff @(posedge wclk) begin
    if (wr_en && !full) mem[wbin[AW-1:0]] <= wdata;
  end
  always_ff @(posedge wclk) begin
    if (wrst) begin
      wbin <= '0; wgray <= '0; rgray_w1 <= '0; rgray_w2 <= '0;
    end else begin
      wbin <= wbin_nx; wgray <= b2g(wbin_nx);
      rgray_w1 <= rgray; rgray_w2 <= rgray_w1;
    end
  end

  // read side
  logic [AW:0] rbin_nx;
  assign empty   = (rgray == wgray_r2);
  assign rdata   = mem[rbin[AW-1:0]];
  assign rbin_nx = rbin + (AW+1)'(rd_en && !empty);
  always_ff @(posedge rclk) begin
    if (rrst) begin
      rbin <= '0; rgray <= '0; wgray_r1 <= '0; wgray_r2 <= '0;
    end else begin
      rbin <= rbin_nx; rgray <= b2g(rbin_nx);
      wgray_r1 <= wgray; wgray_r2 <= wgray_r1;
    end
  end
endmodule
