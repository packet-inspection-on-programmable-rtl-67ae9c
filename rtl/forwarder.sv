// Forwarder: the exit for packets found benign.
//
// Two kinds of packet arrive here: packets no header rule matched, as
// descriptors from each of the m classifier paths i(B), and suspected packets
// the verifiers cleared, from the wrapper. A round-robin arbiter merges the
// m+1 sources into one registered descriptor stream (out_*), which tells the
// packet memory which packets to send on. The forwarder also counts the
// packets it passed, split by cause. The document names the forwarder and its
// inputs; the descriptor form, the merging and the counters are this
// design's.
//
// Timing: a descriptor accepted in cycle t is offered at out_* in cycle t+1.
module forwarder
  import pi_pkg::*;
#(
  parameter int M_CLS = 4,
  parameter int CNT_W = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [M_CLS-1:0]  ben_valid,
  output logic [M_CLS-1:0]  ben_ready,
  input  desc_t             ben_desc [M_CLS],
  input  logic              ver_valid,
  output logic              ver_ready,
  input  desc_t             ver_desc,
  output logic              out_valid,
  input  logic              out_ready,
  output desc_t             out_desc,
  output logic [CNT_W-1:0]  n_header_benign,   // passed by the classifiers
  output logic [CNT_W-1:0]  n_verified_clean   // cleared by a verifier
);
  localparam int N  = M_CLS + 1;
  localparam int SW = $clog2(N);

  logic [N-1:0]  req, grant;
  logic [SW-1:0] gidx;
  logic          gany, take;
  desc_t         src [N];

  always_comb begin
    for (int i = 0; i < M_CLS; i++) src[i] = ben_desc[i];
    src[M_CLS] = ver_desc;
    req = {ver_valid, ben_valid};
  end

  rr_arbiter #(.N(N)) u_arb (
    .clk, .rst_n, .req, .advance(take), .grant, .grant_idx(gidx), .any(gany)
  );

  assign take = gany && (!out_valid || out_ready);
  assign {ver_ready, ben_ready} = take ? grant : '0;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid        <= 1'b0;
      out_desc         <= '0;
      n_header_benign  <= '0;
      n_verified_clean <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (take) begin
        out_valid <= 1'b1;
        out_desc  <= src[gidx];
        if (int'(gidx) == M_CLS) n_verified_clean <= n_verified_clean + 1'b1;
        else                     n_header_benign  <= n_header_benign + 1'b1;
      end
    end
  end
endmodule
