// Round-robin arbiter.
//
// Grants one of N requesters per cycle. The search starts just after the
// requester granted last, so every requester is served within N grants while
// it keeps requesting. `grant` is one-hot and combinational from `req`; the
// pointer moves only when `advance` is high (the granted transfer happened),
// so a stalled grant stays on the same requester.
module rr_arbiter #(
  parameter int N = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N-1:0]         req,
  input  logic                 advance,
  output logic [N-1:0]         grant,
  output logic [$clog2(N > 1 ? N : 2)-1:0] grant_idx,
  output logic                 any
);
  localparam int IW = $clog2(N > 1 ? N : 2);
  logic [IW-1:0] last_q;

  always_comb begin
    grant     = '0;
    grant_idx = '0;
    any       = 1'b0;
    for (int k = 1; k <= N; k++) begin
      logic [IW-1:0] j;
      j = IW'((int'(last_q) + k) % N);
      if (!any && req[j]) begin
        any       = 1'b1;
        grant[j]  = 1'b1;
        grant_idx = j;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n)             last_q <= IW'(N-1);
    else if (advance && any) last_q <= grant_idx;
  end
endmodule
