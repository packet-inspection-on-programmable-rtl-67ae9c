// Discarder: the exit for packets found malicious.
//
// Packets that matched a header-only rule arrive as descriptors from each of
// the m classifier paths i(M); suspected packets in which a verifier found a
// payload string arrive from the wrapper. A round-robin arbiter merges the
// m+1 sources into one registered descriptor stream (out_*), which tells the
// packet memory which packets to drop and, through cause and ref_id, which
// rule or string caught each one. The discarder counts drops by cause and
// remembers the reference of the last one. The document names the discarder
// and its inputs; the descriptor form, merging and counters are this
// design's.
//
// Timing: a descriptor accepted in cycle t is offered at out_* in cycle t+1.
module discarder
  import pi_pkg::*;
#(
  parameter int M_CLS = 4,
  parameter int CNT_W = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [M_CLS-1:0]  mal_valid,
  output logic [M_CLS-1:0]  mal_ready,
  input  desc_t             mal_desc [M_CLS],
  input  logic              ver_valid,
  output logic              ver_ready,
  input  desc_t             ver_desc,
  output logic              out_valid,
  input  logic              out_ready,
  output desc_t             out_desc,
  output logic [CNT_W-1:0]  n_header_rule,    // dropped on a header-only rule
  output logic [CNT_W-1:0]  n_content_match,  // dropped on a payload string
  output logic [REF_W-1:0]  last_ref          // rule or string of the last drop
);
  localparam int N  = M_CLS + 1;
  localparam int SW = $clog2(N);

  logic [N-1:0]  req, grant;
  logic [SW-1:0] gidx;
  logic          gany, take;
  desc_t         src [N];

  always_comb begin
    for (int i = 0; i < M_CLS; i++) src[i] = mal_desc[i];
    src[M_CLS] = ver_desc;
    req = {ver_valid, mal_valid};
  end

  rr_arbiter #(.N(N)) u_arb (
    .clk, .rst_n, .req, .advance(take), .grant, .grant_idx(gidx), .any(gany)
  );

  assign take = gany && (!out_valid || out_ready);
  assign {ver_ready, mal_ready} = take ? grant : '0;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid       <= 1'b0;
      out_desc        <= '0;
      n_header_rule   <= '0;
      n_content_match <= '0;
      last_ref        <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (take) begin
        out_valid <= 1'b1;
        out_desc  <= src[gidx];
        last_ref  <= src[gidx].ref_id;
        if (src[gidx].cause == WHY_CONTENT_MATCH) n_content_match <= n_content_match + 1'b1;
        else                                      n_header_rule   <= n_header_rule + 1'b1;
      end
    end
  end
endmodule
