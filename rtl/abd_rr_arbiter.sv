// abd_rr_arbiter: round-robin arbiter for N requesters.
//
// grant is one-hot among the asserted req bits, or zero when none is
// asserted. The search starts one past the requester granted last; the
// pointer moves only when the grant is taken (advance), so a requester that
// is held keeps its place. Purely combinational grant, one pointer register.
module abd_rr_arbiter #(
  parameter int unsigned N = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  input  logic         advance,
  output logic [N-1:0] grant,
  output logic [$clog2(N > 1 ? N : 2)-1:0] grant_idx
);
  localparam int unsigned IW = $clog2(N > 1 ? N : 2);

  logic [IW-1:0] last_q;

  always_comb begin
    grant     = '0;
    grant_idx = '0;
    for (int unsigned k = 1; k <= N; k++) begin
      int unsigned idx;
      idx = (int'(last_q) + k) % N;
      if (req[idx] && grant == '0) begin
        grant[idx] = 1'b1;
        grant_idx  = IW'(idx);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                       last_q <= IW'(N - 1);
    else if (advance && grant != '0)  last_q <= grant_idx;
  end

  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(grant));

endmodule
