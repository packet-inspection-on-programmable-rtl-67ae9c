// Packet inspection system, top level.
//
// Packets enter through the dispatcher, which hands each whole packet to one
// of M_CLS classifiers. A classifier checks the header against the rule set
// and labels the packet benign, malicious or suspected; the packet then waits
// in that classifier's buffer (BUF). From there a steering stage sends the
// descriptor of a benign packet to the forwarder, that of a malicious packet
// to the discarder, and the bytes of a suspected packet to the verifier of its
// class. The P verifiers scan the payload with multi-threading Aho-Corasick
// FSMs, A per verifier, M threads each. The wrapper gathers their verdicts and
// passes cleared packets to the forwarder and matching ones to the discarder.
// Both exits deliver descriptors; the packet bytes themselves are kept by the
// packet memory outside this design, which forwards or drops them.
//
// The structure (dispatcher, m classifiers each with a buffer, P verifiers
// each with a buffer and several FSMs, wrapper, forwarder, discarder, and the
// benign/suspected/malicious paths between them) follows the document's
// system figure. The defaults follow the document where it gives a number:
// 329 header rules, 8 verifier classes, 20 threads per FSM, two FSMs per class
// for up to 97 strings in subsets of 50. The number of classifiers (4) and
// all buffer sizes are this design's choices.
//
// Configuration: rule_* writes one classifier rule into every classifier;
// cfg_* writes the class map or transition table of FSM cfg_fsm in verifier
// cfg_ver. All streams are valid/ready.
module pi_top
  import pi_pkg::*;
#(
  parameter int M_CLS   = 4,     // classifiers
  parameter int P       = 8,     // verifiers (rule classes)
  parameter int M       = 20,    // threads per FSM
  parameter int A       = 2,     // FSMs per verifier
  parameter int NRULES  = 329,   // header rules per classifier
  parameter int CBUF    = 2048,  // classifier buffer, bytes
  parameter int TBUF    = 2048,  // verifier buffer per thread, bytes
  parameter int DQ      = 4,     // packets queued per thread
  parameter int STATE_W = 10,
  parameter int CLASS_W = 6,
  parameter int PAT_W   = 6,
  localparam int RW     = $clog2(NRULES),
  localparam int VW     = $clog2(P > 1 ? P : 2),
  localparam int FW     = $clog2(A > 1 ? A : 2),
  localparam int ENT_W  = STATE_W + 1 + PAT_W
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // packets in
  input  logic                       in_valid,
  output logic                       in_ready,
  input  logic [7:0]                 in_data,
  input  logic                       in_last,
  input  hdr_t                       in_hdr,
  // classifier rules
  input  logic                       rule_we,
  input  logic [RW-1:0]              rule_idx,
  input  rule_t                      rule_data,
  // verifier FSM tables
  input  logic [VW-1:0]              cfg_ver,
  input  logic [FW-1:0]              cfg_fsm,
  input  logic                       cmap_we,
  input  logic [7:0]                 cmap_addr,
  input  logic [CLASS_W-1:0]         cmap_data,
  input  logic                       tbl_we,
  input  logic [STATE_W+CLASS_W-1:0] tbl_addr,
  input  logic [ENT_W-1:0]           tbl_data,
  // exits
  output logic                       fwd_valid,
  input  logic                       fwd_ready,
  output desc_t                      fwd_desc,
  output logic                       dsc_valid,
  input  logic                       dsc_ready,
  output desc_t                      dsc_desc,
  // status
  output logic [31:0]                n_header_benign,
  output logic [31:0]                n_verified_clean,
  output logic [31:0]                n_header_rule,
  output logic [31:0]                n_content_match,
  output logic [REF_W-1:0]           last_drop_ref,
  output logic [M-1:0]               thr_busy [P]
);
  // dispatcher -> classifiers
  logic [M_CLS-1:0] d_valid, d_ready;
  beat_t            d_beat;

  dispatcher #(.M_CLS(M_CLS)) u_disp (
    .clk, .rst_n, .in_valid, .in_ready, .in_data, .in_last, .in_hdr,
    .out_valid(d_valid), .out_ready(d_ready), .out_beat(d_beat), .sel()
  );

  // classifier paths
  logic [M_CLS-1:0] ben_valid, ben_ready, mal_valid, mal_ready;
  desc_t            ben_desc [M_CLS];
  desc_t            mal_desc [M_CLS];
  logic [P-1:0]     sus_valid [M_CLS];
  logic [P-1:0]     sus_ready [M_CLS];
  beat_t            sus_beat  [M_CLS];

  for (genvar c = 0; c < M_CLS; c++) begin : g_cls
    logic   c_valid, c_ready, b_valid, b_ready;
    cbeat_t c_beat, b_beat;

    classifier #(.NRULES(NRULES)) u_cls (
      .clk, .rst_n,
      .in_valid(d_valid[c]), .in_ready(d_ready[c]), .in_beat(d_beat),
      .out_valid(c_valid), .out_ready(c_ready), .out_beat(c_beat),
      .rule_we, .rule_idx, .rule_data
    );

    sync_fifo #(.WIDTH($bits(cbeat_t)), .DEPTH(CBUF)) u_buf (
      .clk, .rst_n,
      .in_valid(c_valid), .in_ready(c_ready), .in_data(c_beat),
      .out_valid(b_valid), .out_ready(b_ready), .out_data(b_beat),
      .count()
    );

    cls_steer #(.P(P)) u_steer (
      .clk, .rst_n,
      .in_valid(b_valid), .in_ready(b_ready), .in_beat(b_beat),
      .ben_valid(ben_valid[c]), .ben_ready(ben_ready[c]), .ben_desc(ben_desc[c]),
      .mal_valid(mal_valid[c]), .mal_ready(mal_ready[c]), .mal_desc(mal_desc[c]),
      .sus_valid(sus_valid[c]), .sus_ready(sus_ready[c]), .sus_beat(sus_beat[c])
    );
  end

  // verifiers
  logic [P-1:0] v_valid, v_ready;
  desc_t        v_desc [P];

  for (genvar v = 0; v < P; v++) begin : g_ver
    logic [M_CLS-1:0] iv, ir;
    for (genvar c = 0; c < M_CLS; c++) begin : g_x
      assign iv[c]              = sus_valid[c][v];
      assign sus_ready[c][v]    = ir[c];
    end

    verifier #(
      .M_CLS(M_CLS), .M(M), .A(A), .VID(v), .TBUF(TBUF), .DQ(DQ),
      .STATE_W(STATE_W), .CLASS_W(CLASS_W), .PAT_W(PAT_W)
    ) u_ver (
      .clk, .rst_n,
      .in_valid(iv), .in_ready(ir), .in_beat(sus_beat),
      .res_valid(v_valid[v]), .res_ready(v_ready[v]), .res_desc(v_desc[v]),
      .cfg_fsm,
      .cmap_we(cmap_we && cfg_ver == VW'(v)), .cmap_addr, .cmap_data,
      .tbl_we (tbl_we  && cfg_ver == VW'(v)), .tbl_addr, .tbl_data,
      .thr_busy(thr_busy[v])
    );
  end

  // wrapper -> forwarder / discarder
  logic  wf_valid, wf_ready, wd_valid, wd_ready;
  desc_t wf_desc, wd_desc;

  wrapper #(.P(P)) u_wrap (
    .clk, .rst_n,
    .in_valid(v_valid), .in_ready(v_ready), .in_desc(v_desc),
    .fwd_valid(wf_valid), .fwd_ready(wf_ready), .fwd_desc(wf_desc),
    .dsc_valid(wd_valid), .dsc_ready(wd_ready), .dsc_desc(wd_desc)
  );

  forwarder #(.M_CLS(M_CLS)) u_fwd (
    .clk, .rst_n,
    .ben_valid, .ben_ready, .ben_desc,
    .ver_valid(wf_valid), .ver_ready(wf_ready), .ver_desc(wf_desc),
    .out_valid(fwd_valid), .out_ready(fwd_ready), .out_desc(fwd_desc),
    .n_header_benign, .n_verified_clean
  );

  discarder #(.M_CLS(M_CLS)) u_dsc (
    .clk, .rst_n,
    .mal_valid, .mal_ready, .mal_desc,
    .ver_valid(wd_valid), .ver_ready(wd_ready), .ver_desc(wd_desc),
    .out_valid(dsc_valid), .out_ready(dsc_ready), .out_desc(dsc_desc),
    .n_header_rule, .n_content_match, .last_ref(last_drop_ref)
  );
endmodule
