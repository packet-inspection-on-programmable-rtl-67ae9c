// Dispatcher: spreads incoming packets over the m classifiers.
//
// Packets arrive as a byte stream with the header fields alongside. The
// dispatcher gives each packet a sequence number and sends the whole packet
// to one classifier, then moves to the next classifier for the next packet
// (round robin). Between packets, a classifier that cannot take a byte is
// skipped: the selection moves on every cycle until a ready one is found, so
// one slow classifier does not hold up the others. Once the first byte has
// been accepted the packet stays on that classifier until its last byte.
// The document names the dispatcher and places it in front of the
// classifiers; the round-robin policy and the skipping are this design's.
//
// Interface: in_* is a valid/ready byte stream; in_hdr must be held for the
// whole packet. out_valid/out_ready are per classifier, out_beat is shared.
// The routing is combinational (no added latency). Only the first byte of a
// packet may be withdrawn from a classifier that did not take it, to be
// offered to the next one.
module dispatcher
  import pi_pkg::*;
#(
  parameter int M_CLS = 4,
  localparam int SW   = $clog2(M_CLS > 1 ? M_CLS : 2)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  output logic              in_ready,
  input  logic [7:0]        in_data,
  input  logic              in_last,
  input  hdr_t              in_hdr,
  output logic [M_CLS-1:0]  out_valid,
  input  logic [M_CLS-1:0]  out_ready,
  output beat_t             out_beat,
  output logic [SW-1:0]     sel            // classifier now selected
);
  logic [SW-1:0]   sel_q;
  logic            busy_q;   // inside a packet
  logic [ID_W-1:0] id_q;

  function automatic logic [SW-1:0] nxt(input logic [SW-1:0] s);
    return (s == SW'(M_CLS-1)) ? '0 : s + 1'b1;
  endfunction

  assign sel           = sel_q;
  assign in_ready      = out_ready[sel_q];
  assign out_beat.id   = id_q;
  assign out_beat.hdr  = in_hdr;
  assign out_beat.data = in_data;
  assign out_beat.last = in_last;

  always_comb begin
    out_valid        = '0;
    out_valid[sel_q] = in_valid;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sel_q  <= '0;
      busy_q <= 1'b0;
      id_q   <= '0;
    end else if (in_valid && in_ready) begin
      busy_q <= !in_last;
      if (in_last) begin
        id_q  <= id_q + 1'b1;
        sel_q <= nxt(sel_q);
      end
    end else if (!busy_q && !out_ready[sel_q]) begin
      sel_q <= nxt(sel_q);
    end
  end
endmodule
