// rr_scheduler - the readout scheduler.
//
// Only channels with a pending request are read out, and in order of
// channel index: the search starts just after the channel served last and
// wraps from N-1 to 0, so a busy low-numbered channel cannot starve the
// others.  When take is high and some request is pending, grant_valid
// and the one-hot grant are high for that cycle and grant_idx names the
// channel.  Combinational search, pointer updated on a grant.
module rr_scheduler #(
  parameter int unsigned N  = 64,
  parameter int unsigned IW = $clog2(N)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [N-1:0]  req,
  input  logic          take,
  output logic          grant_valid,
  output logic [IW-1:0] grant_idx,
  output logic [N-1:0]  grant
);
  logic [IW-1:0] last;
  logic          found;
  logic [IW-1:0] idx;

  always_comb begin
    found = 1'b0;
    idx   = '0;
    for (int i = 1; i <= N; i++) begin
      logic [IW-1:0] cand;
      cand = IW'((32'(last) + i) % N);
      if (!found && req[cand]) begin
        found = 1'b1;
        idx   = cand;
      end
    end
    grant_valid = take && found;
    grant_idx   = idx;
    grant       = grant_valid ? (N'(1) << idx) : '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)           last <= IW'(N - 1);   // first search starts at 0
    else if (grant_valid) last <= idx;
  end
endmodule
