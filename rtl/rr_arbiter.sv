// rr_arbiter: round-robin arbiter of the router's switch control.
//
// Among the N request lines it grants the first one at or after the rotating
// priority pointer. When advance is high the pointer moves to the line just
// after the granted one, so every requester is served within N grants.
// grant is one-hot and combinational from req and the pointer; the pointer
// is the only state. Round-robin is the scheduling the router uses by default.
module rr_arbiter #(
  parameter int N = 5
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N-1:0]         req,
  input  logic                 advance,
  output logic [N-1:0]         grant,
  output logic [$clog2(N)-1:0] grant_idx,
  output logic                 grant_valid
);

  logic [$clog2(N)-1:0] ptr;

  always_comb begin
    grant       = '0;
    grant_idx   = '0;
    grant_valid = 1'b0;
    for (int k = 0; k < N; k++) begin
      int idx;
      idx = (int'(ptr) + k) % N;
      if (!grant_valid && req[idx]) begin
        grant_valid    = 1'b1;
        grant_idx      = ($clog2(N))'(idx);
        grant[idx]     = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ptr <= '0;
    else if (advance && grant_valid)
      ptr <= (grant_idx == ($clog2(N))'(N - 1)) ? '0 : grant_idx + 1'b1;
  end

  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(grant));

endmodule
