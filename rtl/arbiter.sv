// arbiter: round-robin arbiter of the output bus.
//
// Grants are one-hot and registered: a master sees gnt one clock after it
// raises req at the earliest. A master keeps the grant as long as it holds
// req; when it drops req the next requesting master after it in round-robin
// order is granted. The policy is this design's choice; the document only
// names the arbiter.
module arbiter #(
  parameter int unsigned NM = 2
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [NM-1:0] req,
  output logic [NM-1:0] gnt
);
  localparam int unsigned IW = (NM > 1) ? $clog2(NM) : 1;
  logic [IW-1:0] last;
  logic [NM-1:0] gnt_nx;
  logic [IW-1:0] last_nx;

  // k-th master after master l in round-robin order
  function automatic logic [IW-1:0] rr(input logic [IW-1:0] l, input int k);
    return IW'((32'(l) + k) % NM);
  endfunction

  always_comb begin
    gnt_nx  = '0;
    last_nx = last;
    if ((gnt & req) != '0) begin
      gnt_nx = gnt;                          // hold
    end else begin
      for (int k = 1; k <= NM; k++) begin
        if (req[rr(last, k)] && gnt_nx == '0) begin
          gnt_nx[rr(last, k)] = 1'b1;
          last_nx             = rr(last, k);
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      gnt  <= '0;
      last <= IW'(NM-1);
    end else begin
      gnt  <= gnt_nx;
      last <= last_nx;
    end
  end

  assert property (@(posedge clk) disable iff (rst) $onehot0(gnt));
endmodule
