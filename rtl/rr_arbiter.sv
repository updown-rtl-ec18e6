// rr_arbiter: round-robin arbiter.
//
// Grants one of N requesters per cycle, starting the search just after the last
// requester that was granted and accepted, so every requester is served within N
// grants. Used wherever several lanes or memory channels share one path.
//
// Interface: req is the request vector, grant is one-hot (or zero) and
// combinational; `advance` (grant accepted downstream) moves the priority at the
// clock edge.
module rr_arbiter #(
  parameter int unsigned N = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N-1:0]         req,
  input  logic                 advance,
  output logic [N-1:0]         grant,
  output logic [$clog2(N)-1:0] grant_idx
);
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;
  logic [IW-1:0] last;

  // Requests rotated so that bit 0 is the requester just after the last grant;
  // the lowest set bit of the rotated vector is the winner.
  logic [2*N-1:0] req2;
  logic [N-1:0]   rot;
  logic [IW-1:0]  off;
  logic           found;

  always_comb begin
    req2  = {req, req} >> (int'(last) + 1);
    rot   = req2[N-1:0];
    off   = '0;
    found = 1'b0;
    for (int k = 0; k < N; k++)
      if (!found && rot[k]) begin
        off   = IW'(k);
        found = 1'b1;
      end
    grant_idx = IW'((int'(last) + 1 + int'(off)) % N);
    grant     = found ? (N'(1) << grant_idx) : '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                  last <= IW'(N - 1);
    else if (advance && |req)    last <= grant_idx;
  end

  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(grant));
endmodule
