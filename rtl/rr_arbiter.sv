// rr_arbiter: round-robin arbiter.
//
// Grants one of N requesters per cycle. The search for a requester starts at
// the position just after the last one granted, so every requester that keeps
// its request up is served within N grants, which is the "alternating priority
// among input ports" the HS-Scale router uses. The grant is combinational
// (one-hot, zero when no request); the priority pointer moves on a clock edge
// where `advance` is high and a grant was given.
module rr_arbiter #(
  parameter int N = hs_pkg::NPORTS
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N-1:0]         req,
  input  logic                 advance,
  output logic [N-1:0]         grant,
  output logic [$clog2(N)-1:0] grant_idx,
  output logic                 grant_valid
);

  localparam int IW = $clog2(N);

  logic [IW-1:0] last;   // index of the most recent grant

  always_comb begin
    grant       = '0;
    grant_idx   = '0;
    grant_valid = 1'b0;
    for (int k = 1; k <= N; k++) begin
      logic [IW-1:0] idx;
      idx = IW'((int'(last) + k) % N);
      if (!grant_valid && req[idx]) begin
        grant_valid = 1'b1;
        grant_idx   = idx;
        grant[idx]  = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                      last <= IW'(N - 1);
    else if (advance && grant_valid) last <= grant_idx;
  end

  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(grant));

endmodule
