// rr_arbiter: round-robin arbiter used by each switch output port.
//
// Grants one of N requesters. The search starts just after the last
// granted requester, so every requester is served in turn. The grant is
// combinational from req; the priority pointer moves when `advance` is
// high (the granted requester has taken the output).
module rr_arbiter #(
  parameter int unsigned N = 6
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  input  logic         advance,
  output logic [N-1:0] grant
);
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  logic [IW-1:0] last;

  always_comb begin
    grant = '0;
    for (int unsigned k = 1; k <= N; k++) begin
      int unsigned idx;
      idx = (int'(last) + k) % N;
      if (req[idx] && grant == '0) grant[idx] = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      last <= IW'(N-1);
    end else if (advance) begin
      for (int unsigned i = 0; i < N; i++)
        if (grant[i]) last <= IW'(i);
    end
  end

endmodule
