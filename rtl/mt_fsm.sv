// Multi-threading Aho-Corasick string-matching FSM.
//
// An Aho-Corasick automaton reads one packet byte per step and moves to the
// next state; a state that ends a pattern reports a match. A conventional FSM
// closes the loop "state register -> next-state logic -> state register" in
// one clock cycle. Here the loop is cut into M pipeline stages and M packets
// (threads) are interleaved on it: in cycle t the FSM takes a byte of thread
// t mod M, and the state of that thread comes back round the ring exactly M
// cycles later, in time for its next byte. Every stage therefore holds useful
// work in every cycle, the clock can be about M times faster than that of the
// single-cycle FSM, and the throughput is one byte per cycle shared by M
// packets. This structure, the name "M-threading FSM" and the input
// multiplexer in front of the first stage follow the document.
//
// Stages of the ring (this design's split of the next-state logic):
//   C1  : the byte is mapped to a character class by a 256-entry class map,
//         and the thread's current state is taken from the ring (or the root
//         state 0 at the first byte of a packet); both go into the pipeline
//         register s1_q.
//   C2  : the transition table is read at {state, class}; the synchronous
//         read gives the second register. An entry holds the next state and,
//         with the outputs along the failure chain already folded in, whether
//         that state ends a pattern and which one.
//   then M-2 plain registers. A synthesis tool with register retiming moves
//         them into C1/C2, the way the document's own flow added pipeline
//         registers to the synthesized netlist.
// The automaton is not hard-wired: the class map and the transition table are
// memories written through the configuration ports, so a new pattern subset
// is loaded without a new bitstream. Storing the transition function as a
// table with character classes is this design's choice.
//
// Interface: the thread scheduler drives in_tid = t mod M every cycle and
// raises in_valid when that thread has a byte (in_first on a packet's first
// byte, in_last on its last). A slot without a byte keeps its state going
// round the ring, so a thread may pause. out_* report the ring's feedback
// entry: out_valid for a byte processed M cycles ago, out_done on the last
// byte of a packet, with out_hit (a pattern was seen anywhere in the packet)
// and out_pat (the first pattern seen). M must be at least 2.
module mt_fsm #(
  parameter int M       = 20,  // threads = pipeline stages in the ring
  parameter int STATE_W = 10,  // up to 1024 automaton states
  parameter int CLASS_W = 6,   // up to 64 character classes
  parameter int PAT_W   = 6,   // up to 64 patterns per FSM
  localparam int TID_W  = $clog2(M),
  localparam int ENT_W  = STATE_W + 1 + PAT_W
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // byte input, one slot per cycle
  input  logic                       in_valid,
  input  logic                       in_first,
  input  logic                       in_last,
  input  logic [7:0]                 in_byte,
  input  logic [TID_W-1:0]           in_tid,
  // configuration: character class map and transition table
  input  logic                       cmap_we,
  input  logic [7:0]                 cmap_addr,
  input  logic [CLASS_W-1:0]         cmap_data,
  input  logic                       tbl_we,
  input  logic [STATE_W+CLASS_W-1:0] tbl_addr,
  input  logic [ENT_W-1:0]           tbl_data,   // {next, match, pattern}
  // ring feedback, M cycles after the byte went in
  output logic                       out_valid,
  output logic                       out_done,
  output logic [TID_W-1:0]           out_tid,
  output logic [STATE_W-1:0]         out_state,
  output logic                       out_hit,
  output logic [PAT_W-1:0]           out_pat
);
  typedef struct packed {
    logic                 valid;
    logic                 last;
    logic [TID_W-1:0]     tid;
    logic [STATE_W-1:0]   state;
    logic                 hit;
    logic [PAT_W-1:0]     pat;
  } ctx_t;

  typedef struct packed {
    logic [STATE_W-1:0] next;
    logic               match;
    logic [PAT_W-1:0]   pat;
  } ent_t;

  logic [CLASS_W-1:0] cmap [256];
  ent_t               tbl  [2**(STATE_W+CLASS_W)];

  always_ff @(posedge clk) begin
    if (cmap_we) cmap[cmap_addr] <= cmap_data;
    if (tbl_we)  tbl[tbl_addr]   <= ent_t'(tbl_data);
  end

  ctx_t               fb;       // state register output: the thread now in slot 0
  ctx_t               s1_d, s1_q;
  logic [CLASS_W-1:0] cls_d, cls_q;
  ctx_t               s2_q, s2;
  ent_t               rd_q;

  // C1: input multiplexer (the thread's state from the ring or the root) and
  // character class lookup.
  always_comb begin
    s1_d       = fb;
    s1_d.valid = in_valid;
    s1_d.last  = in_last;
    s1_d.tid   = in_tid;
    if (in_valid && in_first) begin
      s1_d.state = '0;
      s1_d.hit   = 1'b0;
      s1_d.pat   = '0;
    end
    cls_d = cmap[in_byte];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s1_q  <= '0;
      cls_q <= '0;
      s2_q  <= '0;
    end else begin
      s1_q  <= s1_d;
      cls_q <= cls_d;
      s2_q  <= s1_q;
    end
  end

  // C2: transition table read, synchronous (block RAM style).
  always_ff @(posedge clk) rd_q <= tbl[{s1_q.state, cls_q}];

  // Slots without a byte pass their context round unchanged.
  always_comb begin
    s2 = s2_q;
    if (s2_q.valid) begin
      s2.state = rd_q.next;
      s2.hit   = s2_q.hit | rd_q.match;
      if (rd_q.match && !s2_q.hit) s2.pat = rd_q.pat;
    end
  end

  // Remaining M-2 ring registers.
  if (M > 2) begin : g_delay
    ctx_t d_q [M-2];
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        for (int i = 0; i < M-2; i++) d_q[i] <= '0;
      end else begin
        d_q[0] <= s2;
        for (int i = 1; i < M-2; i++) d_q[i] <= d_q[i-1];
      end
    end
    assign fb = d_q[M-3];
  end else begin : g_nodelay
    assign fb = s2;
  end

  assign out_valid = fb.valid;
  assign out_done  = fb.valid && fb.last;
  assign out_tid   = fb.tid;
  assign out_state = fb.state;
  assign out_hit   = fb.hit;
  assign out_pat   = fb.pat;

  initial assert (M >= 2) else $error("mt_fsm needs M >= 2");
  // A thread's context must come back in the slot of the same thread.
  logic [M-1:0] primed_q;   // slot has been filled once since reset
  always_ff @(posedge clk) begin
    if (!rst_n) primed_q <= '0;
    else        primed_q[in_tid] <= 1'b1;
  end
  always_ff @(posedge clk) if (rst_n) assert (!primed_q[in_tid] || fb.tid == in_tid);
endmodule
