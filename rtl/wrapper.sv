// Wrapper: collects the verdicts of the P verifiers.
//
// Each verifier delivers one descriptor per suspected packet, with cause
// WHY_CONTENT_MATCH (a payload string was found) or WHY_CONTENT_CLEAN. The
// wrapper takes them with a round-robin arbiter, one per cycle, and passes a
// clean packet on to the forwarder and a matching one to the discarder. Each
// output has its own register, so a stalled discarder does not stop clean
// verdicts from other verifiers as long as the arbiter picks them.
// The document places the wrapper between the verifiers and the forwarder and
// discarder; its arbitration and registers are this design's.
//
// Timing: a verdict accepted in cycle t is offered at fwd_*/dsc_* in cycle
// t+1. All interfaces are valid/ready.
module wrapper
  import pi_pkg::*;
#(
  parameter int P = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [P-1:0]  in_valid,
  output logic [P-1:0]  in_ready,
  input  desc_t         in_desc [P],
  output logic          fwd_valid,
  input  logic          fwd_ready,
  output desc_t         fwd_desc,
  output logic          dsc_valid,
  input  logic          dsc_ready,
  output desc_t         dsc_desc
);
  localparam int SW = $clog2(P > 1 ? P : 2);

  logic [P-1:0] req, grant;
  logic [SW-1:0] gidx;
  logic          gany, fwd_free, dsc_free, take;

  assign fwd_free = !fwd_valid || fwd_ready;
  assign dsc_free = !dsc_valid || dsc_ready;

  // A verifier may be picked only if the register its verdict goes to is free.
  always_comb begin
    for (int v = 0; v < P; v++)
      req[v] = in_valid[v] && ((in_desc[v].cause == WHY_CONTENT_MATCH) ? dsc_free : fwd_free);
  end

  rr_arbiter #(.N(P)) u_arb (
    .clk, .rst_n, .req, .advance(take), .grant, .grant_idx(gidx), .any(gany)
  );

  assign take     = gany;
  assign in_ready = grant;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      fwd_valid <= 1'b0;
      dsc_valid <= 1'b0;
      fwd_desc  <= '0;
      dsc_desc  <= '0;
    end else begin
      if (fwd_valid && fwd_ready) fwd_valid <= 1'b0;
      if (dsc_valid && dsc_ready) dsc_valid <= 1'b0;
      if (take) begin
        if (in_desc[gidx].cause == WHY_CONTENT_MATCH) begin
          dsc_valid <= 1'b1;
          dsc_desc  <= in_desc[gidx];
        end else begin
          fwd_valid <= 1'b1;
          fwd_desc  <= in_desc[gidx];
        end
      end
    end
  end
endmodule
