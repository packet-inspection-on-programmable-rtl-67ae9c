// Verifier: exact payload string matching for one class of rules.
//
// The verifier scans every byte of each suspected packet of its class against
// the class's payload strings. The strings are split into A subsets and each
// subset is held by one multi-threading Aho-Corasick FSM (mt_fsm); the A FSMs
// run in lockstep on the same bytes, so a packet is checked against all
// strings of the class in one pass, and a hit in any FSM marks it malicious.
//
// Input buffer (BUF). Up to m classifiers send suspected packets. A
// round-robin arbiter takes whole packets from them, one at a time, and puts
// each packet in the byte queue of one FSM thread (the next thread in turn
// with room for another packet). A packet's descriptor (id, header, length)
// goes into that thread's descriptor queue when its last byte is written.
//
// Thread scheduler. In cycle t, slot t mod M is served: if thread t mod M has
// a byte queued, it goes through the M-to-1 multiplexer into all FSMs. The
// byte comes back M cycles later, with the thread's updated state; on the
// packet's last byte the thread's descriptor is popped and the verdict goes
// into the result queue. Threads finish in whatever order their packets end,
// so verdicts leave out of order and carry the packet id. Bytes are issued
// only while the result queue has room for every packet that could end
// within one trip round the ring.
//
// The document gives the verifier's place in the system, its BUF and FSMs,
// the multi-threading FSM, the subsets of 50 strings per FSM and the
// out-of-order completion; the queue structure, the thread assignment and the
// flow control are this design's. Throughput: one byte per cycle per
// verifier when M or more packets are queued; a single packet advances one
// byte every M cycles.
//
// Interface: in_* are valid/ready byte streams, one per classifier. res_* is
// a valid/ready stream of descriptors with cause WHY_CONTENT_MATCH (ref_id =
// {verifier, FSM, pattern}) or WHY_CONTENT_CLEAN. cfg_* writes the class map
// and transition table of FSM cfg_fsm. thr_busy shows the threads that hold
// at least one packet.
module verifier
  import pi_pkg::*;
#(
  parameter int M_CLS   = 4,     // classifiers feeding this verifier
  parameter int M       = 20,    // threads per FSM
  parameter int A       = 2,     // FSMs per verifier
  parameter int VID     = 0,     // this verifier's class number
  parameter int TBUF    = 2048,  // bytes queued per thread
  parameter int DQ      = 4,     // packets queued per thread
  parameter int STATE_W = 10,
  parameter int CLASS_W = 6,
  parameter int PAT_W   = 6,
  localparam int TID_W  = $clog2(M),
  localparam int FW     = $clog2(A > 1 ? A : 2),
  localparam int ENT_W  = STATE_W + 1 + PAT_W
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [M_CLS-1:0]           in_valid,
  output logic [M_CLS-1:0]           in_ready,
  input  beat_t                      in_beat [M_CLS],
  output logic                       res_valid,
  input  logic                       res_ready,
  output desc_t                      res_desc,
  input  logic [FW-1:0]              cfg_fsm,
  input  logic                       cmap_we,
  input  logic [7:0]                 cmap_addr,
  input  logic [CLASS_W-1:0]         cmap_data,
  input  logic                       tbl_we,
  input  logic [STATE_W+CLASS_W-1:0] tbl_addr,
  input  logic [ENT_W-1:0]           tbl_data,
  output logic [M-1:0]               thr_busy
);
  localparam int RES_DEPTH = 2*M + 4;
  localparam int RCW       = $clog2(RES_DEPTH+1);
  localparam int DCW       = $clog2(DQ+1);
  localparam int SW        = $clog2(M_CLS > 1 ? M_CLS : 2);

  typedef struct packed {
    logic [ID_W-1:0]  id;
    hdr_t             hdr;
    logic [LEN_W-1:0] len;
  } pdesc_t;

  // ---------------- input buffer ----------------
  logic [SW-1:0]    gidx;
  logic             gany;
  logic             lock_q;          // a packet is being written
  logic [SW-1:0]    src_q;
  logic [TID_W-1:0] wthr_q, wptr_q;
  logic [LEN_W-1:0] wlen_q;
  logic [SW-1:0]    src;
  logic [TID_W-1:0] wthr;
  logic             have_thr;
  beat_t            ib;
  logic             ivalid, iacc;

  logic [M-1:0]     bq_in_ready, bq_out_valid, bq_pop, bq_push;
  logic [8:0]       bq_out [M];
  logic [M-1:0]     dq_push, dq_pop, dq_out_valid;
  pdesc_t           dq_out [M];
  logic [DCW-1:0]   pk_cnt [M];      // packets owned by each thread

  rr_arbiter #(.N(M_CLS)) u_arb (
    .clk, .rst_n, .req(in_valid), .advance(!lock_q && iacc),
    .grant(), .grant_idx(gidx), .any(gany)
  );

  // First thread from wptr_q on that can take another packet.
  always_comb begin
    have_thr = 1'b0;
    wthr     = wptr_q;
    for (int k = 0; k < M; k++) begin
      logic [TID_W-1:0] t;
      t = TID_W'((int'(wptr_q) + k) % M);
      if (!have_thr && int'(pk_cnt[t]) < DQ && bq_in_ready[t]) begin
        have_thr = 1'b1;
        wthr     = t;
      end
    end
    if (lock_q) begin
      have_thr = 1'b1;
      wthr     = wthr_q;
    end
  end

  assign src    = lock_q ? src_q : gidx;
  assign ib     = in_beat[src];
  assign ivalid = lock_q ? in_valid[src_q] : (gany && have_thr);
  assign iacc   = ivalid && bq_in_ready[wthr];

  always_comb begin
    in_ready      = '0;
    in_ready[src] = ivalid && bq_in_ready[wthr];
    bq_push       = '0;
    bq_push[wthr] = iacc;
    dq_push       = '0;
    dq_push[wthr] = iacc && ib.last;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      lock_q <= 1'b0;
      src_q  <= '0;
      wthr_q <= '0;
      wptr_q <= '0;
      wlen_q <= '0;
    end else if (iacc) begin
      lock_q <= !ib.last;
      wlen_q <= ib.last ? '0 : wlen_q + 1'b1;
      if (!lock_q) begin
        src_q  <= gidx;
        wthr_q <= wthr;
        wptr_q <= (int'(wthr) == M-1) ? '0 : wthr + 1'b1;
      end
    end
  end

  // ---------------- thread scheduler and FSMs ----------------
  logic [TID_W-1:0] slot_q;
  logic [M-1:0]     first_q;
  logic             iss, res_room;
  logic [RCW-1:0]   res_count;
  logic [8:0]       iss_byte;

  assign res_room = int'(res_count) + M + 1 < RES_DEPTH;
  assign iss_byte = bq_out[slot_q];     // the M-to-1 input multiplexer
  assign iss      = bq_out_valid[slot_q] && res_room;

  always_comb begin
    bq_pop         = '0;
    bq_pop[slot_q] = iss;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      slot_q  <= '0;
      first_q <= '1;
    end else begin
      slot_q <= (int'(slot_q) == M-1) ? '0 : slot_q + 1'b1;
      if (iss) first_q[slot_q] <= iss_byte[0];
    end
  end

  logic [A-1:0]     f_done, f_hit;
  logic [TID_W-1:0] f_tid   [A];
  logic [PAT_W-1:0] f_pat   [A];

  for (genvar f = 0; f < A; f++) begin : g_fsm
    mt_fsm #(.M(M), .STATE_W(STATE_W), .CLASS_W(CLASS_W), .PAT_W(PAT_W)) u_fsm (
      .clk, .rst_n,
      .in_valid (iss),
      .in_first (first_q[slot_q]),
      .in_last  (iss_byte[0]),
      .in_byte  (iss_byte[8:1]),
      .in_tid   (slot_q),
      .cmap_we  (cmap_we && cfg_fsm == FW'(f)),
      .cmap_addr, .cmap_data,
      .tbl_we   (tbl_we && cfg_fsm == FW'(f)),
      .tbl_addr, .tbl_data,
      .out_valid(),
      .out_done (f_done[f]),
      .out_tid  (f_tid[f]),
      .out_state(),
      .out_hit  (f_hit[f]),
      .out_pat  (f_pat[f])
    );
  end

  // ---------------- per-thread queues ----------------
  for (genvar t = 0; t < M; t++) begin : g_thr
    logic dq_in_ready;
    sync_fifo #(.WIDTH(9), .DEPTH(TBUF)) u_bq (
      .clk, .rst_n,
      .in_valid (bq_push[t]), .in_ready(bq_in_ready[t]),
      .in_data  ({ib.data, ib.last}),
      .out_valid(bq_out_valid[t]), .out_ready(bq_pop[t]),
      .out_data (bq_out[t]), .count()
    );
    sync_fifo #(.WIDTH($bits(pdesc_t)), .DEPTH(DQ)) u_dq (
      .clk, .rst_n,
      .in_valid (dq_push[t]), .in_ready(dq_in_ready),
      .in_data  ({ib.id, ib.hdr, wlen_q + 1'b1}),
      .out_valid(dq_out_valid[t]), .out_ready(dq_pop[t]),
      .out_data (dq_out[t]), .count()
    );
    always_ff @(posedge clk) begin
      if (!rst_n) pk_cnt[t] <= '0;
      else        pk_cnt[t] <= pk_cnt[t] + DCW'(bq_push[t] && !lock_q) - DCW'(dq_pop[t]);
    end
    assign thr_busy[t] = (pk_cnt[t] != '0);
    // pk_cnt limits the packets of a thread, so its descriptor queue never fills up.
    always_ff @(posedge clk) if (rst_n) assert (!dq_push[t] || dq_in_ready);
  end

  // ---------------- verdicts ----------------
  logic [TID_W-1:0] dtid;
  logic             done, any_hit;
  logic [FW-1:0]    hit_fsm;
  desc_t            rd;
  logic             rq_in_ready;

  assign done = f_done[0];
  assign dtid = f_tid[0];

  always_comb begin
    any_hit = 1'b0;
    hit_fsm = '0;
    for (int f = A-1; f >= 0; f--) begin
      if (f_hit[f]) begin
        any_hit = 1'b1;
        hit_fsm = FW'(f);
      end
    end
    dq_pop       = '0;
    dq_pop[dtid] = done;
    rd.id        = dq_out[dtid].id;
    rd.hdr       = dq_out[dtid].hdr;
    rd.len       = dq_out[dtid].len;
    rd.cause     = any_hit ? WHY_CONTENT_MATCH : WHY_CONTENT_CLEAN;
    rd.ref_id    = '0;
    if (any_hit)
      rd.ref_id = REF_W'({3'(VID), 4'(hit_fsm), 6'(f_pat[hit_fsm])});
  end

  sync_fifo #(.WIDTH($bits(desc_t)), .DEPTH(RES_DEPTH)) u_rq (
    .clk, .rst_n,
    .in_valid (done), .in_ready(rq_in_ready),
    .in_data  (rd),
    .out_valid(res_valid), .out_ready(res_ready),
    .out_data (res_desc), .count(res_count)
  );

  // The FSMs run in lockstep; a verdict always finds its descriptor and room.
  always_ff @(posedge clk) if (rst_n) assert (!done || (dq_out_valid[dtid] && rq_in_ready));
  for (genvar f = 1; f < A; f++) begin : g_chk
    always_ff @(posedge clk)
      if (rst_n) assert (f_done[f] == f_done[0] && (!f_done[0] || f_tid[f] == f_tid[0]));
  end
endmodule
