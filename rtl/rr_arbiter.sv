// Round-robin arbiter.
//
// Grants one of N requests per cycle, combinationally. The request just
// after the last served one has the highest priority. The priority pointer
// moves past the granted requester only when `advance` is high, so a
// requester that wins but is not served keeps winning. Used for the V:1 and
// P:1 arbiters of the router, the V:1 arbiter of the BVA unit, the BVA
// arbiter of a pillar and the flit selection of the buses. The round-robin
// policy is this design's choice; the document does not name one.
module rr_arbiter #(
  parameter int unsigned N = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  input  logic         advance,   // the granted request was served
  output logic [N-1:0] gnt,       // one-hot, zero when no request
  output logic [$clog2(N > 1 ? N : 2)-1:0] gnt_idx,
  output logic         any
);
  localparam int unsigned IW = $clog2(N > 1 ? N : 2);

  logic [IW-1:0] ptr;   // highest-priority index

  always_comb begin
    gnt     = '0;
    gnt_idx = '0;
    any     = 1'b0;
    for (int unsigned k = 0; k < N; k++) begin
      int unsigned i;
      i = (int'(ptr) + k) % N;
      if (!any && req[i]) begin
        any        = 1'b1;
        gnt[i]     = 1'b1;
        gnt_idx    = IW'(i);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ptr <= '0;
    else if (advance && any) ptr <= IW'((int'(gnt_idx) + 1) % N);
  end
endmodule
