// rr_arbiter: round-robin arbiter used by the router's separable allocator.
//
// Grants one of N requests, searching from the position after the last
// accepted grant, so every steady requester is served within N grants.
// grant is one-hot and combinational; the priority pointer moves only when
// the caller signals that the grant was used (advance), so a grant that is
// lost in the second allocation stage does not cost that requester its turn.
// The round-robin policy is this design's choice; the document does not name
// the arbitration used inside the router.
module rr_arbiter #(
  parameter int unsigned N = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  input  logic         advance,
  output logic [N-1:0] grant,
  output logic         any
);

  localparam int unsigned IDX_W = (N > 1) ? $clog2(N) : 1;

  logic [IDX_W-1:0] last;
  logic [IDX_W-1:0] grant_idx;

  always_comb begin
    grant     = '0;
    grant_idx = '0;
    any       = 1'b0;
    for (int k = 1; k <= N; k++) begin
      int unsigned idx;
      idx = (int'(last) + k) % N;
      if (!any && req[idx]) begin
        any            = 1'b1;
        grant[idx]     = 1'b1;
        grant_idx      = IDX_W'(idx);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)              last <= IDX_W'(N - 1);
    else if (advance && any) last <= grant_idx;
  end

endmodule
